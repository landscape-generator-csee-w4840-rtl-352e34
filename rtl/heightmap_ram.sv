// heightmap_ram: the 1024 x 36-bit height map memory.
//
// Simple dual-port RAM: one write port, used by the CPU interface while a
// new landscape is generated, and one read port, used by the face drawer.
// Word (row*32 + column) holds the height of grid point (column, row) in
// 18.18 signed fixed point; x and y of a point are implied by its address.
// Both ports are synchronous: a write lands at the rising edge where wren
// is high, and q shows the word at rdaddress one clock after it is
// presented (read-during-write to one address returns the old word).
// The RAM is not reset; it is filled by the CPU before it is drawn.
module heightmap_ram
  import lg_pkg::*;
#(
  parameter int DEPTH = GRID_N * GRID_N,
  parameter int AW    = HMAP_AW,
  parameter int DW    = FIX_W
) (
  input  logic          clk,
  input  logic [AW-1:0] wraddress,
  input  logic [DW-1:0] data,
  input  logic          wren,
  input  logic [AW-1:0] rdaddress,
  output logic [DW-1:0] q
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wren) mem[wraddress] <= data;
    q <= mem[rdaddress];
  end

endmodule
