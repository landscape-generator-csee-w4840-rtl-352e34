// tb_hmap_avalon_ctrl: drives the CPU-side register interface.
//
// Checks that writing x, y then data produces one RAM write at y*32+x with
// the data zero-extended to 36 bits, that register reads return what was
// written (one clock of read latency), that offset 3 reflects gen_start
// and that offset 4 bit 0 drives gen_done.
module tb_hmap_avalon_ctrl;
  import lg_pkg::*;

  logic clk = 0, rst = 1;
  logic chipselect = 0, read = 0, write = 0;
  logic [5:0] address;
  logic [31:0] writedata, readdata;
  logic gen_start = 0, gen_done;
  logic [9:0] hmap_address;
  logic [35:0] data;
  logic wren;
  int checks = 0, failures = 0;
  int nwrites = 0;
  logic [9:0] last_addr;
  logic [35:0] last_data;

  always #5 clk = ~clk;

  hmap_avalon_ctrl dut (.*);

  always @(posedge clk) if (wren) begin
    nwrites++; last_addr = hmap_address; last_data = data;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(input int a, input logic [31:0] d);
    @(negedge clk);
    chipselect = 1; write = 1; address = 6'(a); writedata = d;
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask

  task automatic bus_read(input int a, output logic [31:0] d);
    @(negedge clk);
    chipselect = 1; read = 1; address = 6'(a);
    @(negedge clk);
    chipselect = 0; read = 0;
    d = readdata;
  endtask

  initial begin
    logic [31:0] rd;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 300; k++) begin
      int xi, yi;
      logic [31:0] v;
      xi = $urandom_range(0, 31); yi = $urandom_range(0, 31); v = $urandom;
      bus_write(0, xi);
      bus_write(1, yi);
      check(nwrites == k, "no RAM write on x/y");
      bus_write(2, v);
      check(nwrites == k + 1, "one RAM write per data write");
      check(last_addr == 10'(yi * 32 + xi), $sformatf("address %0d vs %0d", last_addr, yi*32+xi));
      check(last_data == {4'b0, v}, "data zero-extended");
      bus_read(2, rd);
      check(rd == v, "data register reads back");
      bus_read(0, rd);
      check(rd == 32'(xi), "x register reads back");
    end
    gen_start = 1;
    bus_read(3, rd);
    check(rd == 1, "start reads 1");
    gen_start = 0;
    bus_read(3, rd);
    check(rd == 0, "start reads 0");
    check(gen_done == 0, "done low after reset");
    bus_write(4, 1);
    check(gen_done == 1, "done set by CPU");
    bus_write(4, 0);
    check(gen_done == 0, "done cleared by CPU");
    bus_read(9, rd);
    check(rd == 0, "unused offset reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
