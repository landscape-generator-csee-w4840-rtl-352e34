// tb_trig_rom: checks both lookup tables entry by entry.
//
// Every address 0..179 of a sine and a cosine instance is read and
// compared, one clock after the address, with sin/cos of that many degrees
// times 2^18 (allowed one unit of rounding difference). A few entries are
// also checked against hand values: sin 90 = 1.0 = 0x40000, cos 60 = 0.5.
module tb_trig_rom;
  import lg_pkg::*;

  logic clk = 0;
  logic [7:0] addr;
  trig_t sq, cq;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  trig_rom #(.COSINE(1'b0)) u_sin (.clk, .addr, .q(sq));
  trig_rom #(.COSINE(1'b1)) u_cos (.clk, .addr, .q(cq));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(int a, int b);
    return (a - b <= 1) && (b - a <= 1);
  endfunction

  initial begin
    for (int i = 0; i < 180; i++) begin
      int es, ec;
      es = int'($sin(i * 3.141592653589793 / 180.0) * 262144.0);
      ec = int'($cos(i * 3.141592653589793 / 180.0) * 262144.0);
      @(negedge clk);
      addr = 8'(i);
      @(negedge clk);
      check(near(int'(sq), es), $sformatf("sin %0d: %0d vs %0d", i, sq, es));
      check(near(int'(cq), ec), $sformatf("cos %0d: %0d vs %0d", i, cq, ec));
      if (i == 90) check(sq == 20'sh40000, "sin 90 is 1.0");
      if (i == 60) check(near(int'(cq), 131072), "cos 60 is 0.5");
      if (i == 0)  check(cq == 20'sh40000 && sq == 0, "cos 0 is 1.0, sin 0 is 0");
      if (i == 135) check(cq < 0, "cos 135 negative");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
