// lg_pkg: types and constants shared by the landscape generator.
//
// Numbers in the design use a signed fixed-point format with 18 integer
// and 18 fraction bits (36 bits, bit 35..18 integer, 17..0 fraction), as
// the 9-bit embedded multipliers of the target FPGA suggested. Sine and
// cosine are stored narrower, 20 bits with the same 18 fraction bits.
// Screen coordinates are 11-bit signed integers. The frame is 320 x 240
// pixels of 2 bits each; the height map is a 32 x 32 grid.
package lg_pkg;

  localparam int FIX_W    = 36;   // height value width
  localparam int FRAC_W   = 18;   // fraction bits
  localparam int TRIG_W   = 20;   // sine/cosine width
  localparam int COORD_W  = 11;   // screen coordinate width

  localparam int GRID_N   = 32;   // height map is GRID_N x GRID_N
  localparam int HMAP_AW  = 10;   // log2(GRID_N*GRID_N)

  localparam int FB_W     = 320;  // framebuffer width
  localparam int FB_H     = 240;  // framebuffer height
  localparam int FB_DEPTH = FB_W * FB_H;
  localparam int FB_AW    = 17;   // ceil(log2(FB_DEPTH))

  typedef logic signed [FIX_W-1:0]   fix_t;
  typedef logic signed [TRIG_W-1:0]  trig_t;
  typedef logic signed [COORD_W-1:0] coord_t;
  typedef logic [1:0]                pixel_t;

  // One on-screen point.
  typedef struct packed {
    coord_t x;
    coord_t y;
  } point_t;

  // States of the system controller (Generate, Draw, Wait, Clear).
  typedef enum logic [1:0] {
    SYS_GEN   = 2'd0,
    SYS_DRAW  = 2'd1,
    SYS_WAIT  = 2'd2,
    SYS_CLEAR = 2'd3
  } sys_state_e;

endpackage
