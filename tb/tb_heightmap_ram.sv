// tb_heightmap_ram: random writes and reads against a model array.
//
// Fills all 1024 words with random 36-bit values, then mixes random reads
// and writes and checks that q, one clock after its address, matches the
// model (read-during-write to the same address gives the old word).
module tb_heightmap_ram;
  import lg_pkg::*;

  logic clk = 0;
  logic [9:0] wraddress, rdaddress;
  logic [35:0] data, q;
  logic wren = 0;
  logic [35:0] model [1024];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  heightmap_ram dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [35:0] expect_q;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      wren = 1; wraddress = 10'(i); data = {4'($urandom), $urandom};
      model[i] = data;
    end
    @(negedge clk) wren = 0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      rdaddress = 10'($urandom);
      expect_q  = model[rdaddress];
      wren = 1'($urandom_range(0, 1));
      wraddress = ($urandom_range(0, 3) == 0) ? rdaddress : 10'($urandom);
      data = {4'($urandom), $urandom};
      if (wren) model[wraddress] = data;
      @(negedge clk);
      wren = 0;
      checks++;
      if (q !== expect_q) begin
        failures++;
        $display("FAIL: addr %0d q %h expected %h", rdaddress, q, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
