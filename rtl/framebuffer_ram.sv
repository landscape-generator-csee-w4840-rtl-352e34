// framebuffer_ram: one 76800 x 2-bit frame buffer (320 x 240 pixels).
//
// Pixel (x, y) lives at address y*320 + x. The 2-bit value is a colour
// index; 0 is background. The design holds two of these as a double
// buffer: one is written (cleared, then drawn into) while the other is
// scanned out to the display. Simple dual-port, synchronous on both ports:
// a write lands at the rising edge with wren high, q follows rdaddress by
// one clock. Not reset: the system clears a buffer before drawing into it.
// Both buffers power up all zero, as FPGA block RAM does, so the first
// frame drawn after start-up lands in an empty buffer.
module framebuffer_ram
  import lg_pkg::*;
#(
  parameter int DEPTH = FB_DEPTH,
  parameter int AW    = FB_AW
) (
  input  logic          clk,
  input  logic [AW-1:0] wraddress,
  input  pixel_t        data,
  input  logic          wren,
  input  logic [AW-1:0] rdaddress,
  output pixel_t        q
);

  pixel_t mem [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (wren && int'(wraddress) < DEPTH) mem[wraddress] <= data;
    q <= (int'(rdaddress) < DEPTH) ? mem[rdaddress] : '0;
  end

endmodule
