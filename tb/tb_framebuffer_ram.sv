// tb_framebuffer_ram: writes and reads a full 320 x 240 x 2-bit buffer.
//
// Writes a pattern computed from each address to every pixel, reads all
// of them back (one clock of latency), then overwrites random pixels and
// checks them against a model.
module tb_framebuffer_ram;
  import lg_pkg::*;

  logic clk = 0;
  logic [FB_AW-1:0] wraddress, rdaddress;
  pixel_t data, q;
  logic wren = 0;
  pixel_t model [FB_DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  framebuffer_ram dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pixel_t pattern(int a);
    return pixel_t'((a / 320) + 3 * (a % 320));
  endfunction

  initial begin
    for (int i = 0; i < FB_DEPTH; i++) begin
      @(negedge clk);
      wren = 1; wraddress = FB_AW'(i); data = pattern(i);
      model[i] = data;
    end
    @(negedge clk) wren = 0;
    for (int i = 0; i < FB_DEPTH; i++) begin
      rdaddress = FB_AW'(i);
      @(negedge clk);
      checks++;
      if (q !== model[i]) begin
        failures++;
        if (failures < 10) $display("FAIL: pixel %0d is %0d, expected %0d", i, q, model[i]);
      end
    end
    for (int k = 0; k < 5000; k++) begin
      int a;
      a = $urandom_range(0, FB_DEPTH - 1);
      wren = 1; wraddress = FB_AW'(a); data = pixel_t'($urandom); model[a] = data;
      @(negedge clk);
      wren = 0; rdaddress = FB_AW'(a);
      @(negedge clk);
      checks++;
      if (q !== model[a]) begin
        failures++;
        if (failures < 10) $display("FAIL: pixel %0d is %0d, expected %0d", a, q, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
