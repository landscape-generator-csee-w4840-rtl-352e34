// tb_input_debounce: checks that glitches are filtered and steady changes
// pass after the debounce interval.
//
// Uses CYCLES = 20. A glitch shorter than the interval must not reach the
// output; a level held long enough must appear between CYCLES and
// CYCLES+3 clocks (two synchroniser stages plus the final register).
module tb_input_debounce;
  logic clk = 0, rst = 1;
  logic [2:0] raw = 3'b001, clean;
  int checks = 0, failures = 0;
  localparam int N = 20;

  always #5 clk = ~clk;

  input_debounce #(.W(3), .CYCLES(N), .RESET_VAL(3'b001)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int t;
    repeat (3) @(negedge clk);
    rst = 0;
    check(clean == 3'b001, "reset value");
    for (int g = 1; g < N - 1; g += 3) begin   // glitches of g clocks on bit 1
      raw[1] = 1;
      repeat (g) @(negedge clk);
      raw[1] = 0;
      repeat (N + 5) begin
        @(negedge clk);
        if (clean[1]) break;
      end
      check(clean[1] == 0, $sformatf("glitch of %0d clocks filtered", g));
    end
    for (int b = 0; b < 3; b++) begin
      logic nv;
      nv = ~clean[b];
      raw[b] = nv;
      t = 0;
      while (clean[b] != nv && t < 5 * N) begin @(negedge clk); t++; end
      check(clean[b] == nv, $sformatf("bit %0d follows", b));
      check(t >= N && t <= N + 3, $sformatf("bit %0d delay %0d clocks", b, t));
    end
    // bouncing then settling
    for (int k = 0; k < 10; k++) begin raw[2] = ~raw[2]; repeat (3) @(negedge clk); end
    raw[2] = 1'b1;
    repeat (N + 5) @(negedge clk);
    check(clean[2] == 1'b1, "settles after bounce");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
