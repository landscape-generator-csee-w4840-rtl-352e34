// fb_to_vga: scans a 320 x 240 frame buffer out as 640 x 480 VGA video.
//
// A horizontal counter (800 clocks per line: 96 sync, 48 back porch, 640
// active, 16 front porch) and a vertical counter (525 lines: 2 sync, 33
// back porch, 480 active, 10 front porch) give standard 640 x 480 timing
// from a 25 MHz pixel clock. Each frame-buffer pixel covers 2 x 2 screen
// pixels, so the read address is (line/2)*320 + (column/2). The 2-bit
// value read back is mapped to a colour through a table picked by
// color_options (see palette() below; index 0 is the background, whose red
// ramps with the line number). Sync pulses are active low; blank_n is low
// outside the active picture, where the colour outputs are 0.
//
// Timing: position is presented to the frame buffer in the cycle the
// counters reach a pixel; the RAM answers one clock later and the colour
// is registered one clock after that, so hs, vs and blank_n are delayed by
// two clocks to stay aligned with r, g, b. frame_done pulses for one clock
// at the last clock of each frame. The timing numbers and colour tables
// follow the report; the pipeline alignment is this design's own.
module fb_to_vga
  import lg_pkg::*;
#(
  parameter int HSYNC   = 96,
  parameter int HBACK   = 48,
  parameter int HACTIVE = 640,
  parameter int HFRONT  = 16,
  parameter int VSYNC   = 2,
  parameter int VBACK   = 33,
  parameter int VACTIVE = 480,
  parameter int VFRONT  = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [2:0]       color_options,
  output logic [FB_AW-1:0] position,
  input  pixel_t           current_value,
  output logic             frame_done,
  output logic             vga_hs,
  output logic             vga_vs,
  output logic             vga_blank_n,
  output logic             vga_sync_n,
  output logic [9:0]       vga_r,
  output logic [9:0]       vga_g,
  output logic [9:0]       vga_b
);

  localparam int HTOTAL = HSYNC + HBACK + HACTIVE + HFRONT;
  localparam int VTOTAL = VSYNC + VBACK + VACTIVE + VFRONT;
  localparam int HSTART = HSYNC + HBACK;
  localparam int VSTART = VSYNC + VBACK;

  typedef struct packed {
    logic [9:0] r;
    logic [9:0] g;
    logic [9:0] b;
  } rgb_t;

  localparam logic [9:0] FULL = 10'h3FF;
  localparam logic [9:0] DIM  = 10'h080;

  // Colour table. grad is the current line number.
  function automatic rgb_t palette(input logic [2:0] opt, input pixel_t v,
                                   input logic [9:0] grad);
    rgb_t bg;
    bg = '{r: grad, g: DIM, b: 10'd0};
    unique case (opt)
      3'b000: unique case (v)
                2'b00: return bg;
                2'b01: return '{r: 10'd0, g: FULL, b: FULL};
                2'b10: return '{r: FULL,  g: 10'd0, b: FULL};
                2'b11: return '{r: FULL,  g: FULL, b: FULL};
              endcase
      3'b001: unique case (v)
                2'b00: return bg;
                2'b01, 2'b10: return '{r: 10'd0, g: FULL, b: grad + 10'd200};
                2'b11: return '{r: FULL, g: FULL, b: FULL};
              endcase
      3'b010: unique case (v)
                2'b00: return bg;
                default: return '{r: 10'd0, g: FULL, b: FULL};
              endcase
      3'b100: unique case (v)
                2'b00: return '{r: 10'd0, g: 10'd0, b: 10'd0};
                default: return '{r: FULL, g: FULL, b: FULL};
              endcase
      default: unique case (v)
                2'b00: return bg;
                2'b11: return '{r: FULL, g: FULL, b: FULL};
                default: return '{r: 10'd0, g: FULL, b: FULL};
              endcase
    endcase
    return bg;
  endfunction

  logic [9:0] hcount, vcount;
  logic       end_of_line, end_of_field;

  assign end_of_line  = (int'(hcount) == HTOTAL - 1);
  assign end_of_field = (int'(vcount) == VTOTAL - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (end_of_line) begin
      hcount <= '0;
      vcount <= end_of_field ? '0 : vcount + 10'd1;
    end else begin
      hcount <= hcount + 10'd1;
    end
  end

  // stage 0: counters -> timing and read address
  logic hs0, vs0, act0;
  logic [9:0] col0, line0;
  always_comb begin
    hs0   = int'(hcount) < HSYNC;
    vs0   = int'(vcount) < VSYNC;
    act0  = (int'(hcount) >= HSTART) && (int'(hcount) < HSTART + HACTIVE) &&
            (int'(vcount) >= VSTART) && (int'(vcount) < VSTART + VACTIVE);
    col0  = hcount - 10'(HSTART);
    line0 = vcount - 10'(VSTART);
    position = act0 ? FB_AW'(int'(line0[9:1]) * FB_W + int'(col0[9:1])) : '0;
  end

  // stages 1 and 2
  logic       hs1, vs1, act1, hs2, vs2, act2;
  logic [9:0] grad1;
  rgb_t       colour;

  always_ff @(posedge clk) begin
    if (rst) begin
      {hs1, vs1, act1, hs2, vs2, act2} <= '0;
      colour     <= '0;
      frame_done <= 1'b0;
      grad1      <= '0;
    end else begin
      hs1   <= hs0;
      vs1   <= vs0;
      act1  <= act0;
      grad1 <= vcount;
      hs2   <= hs1;
      vs2   <= vs1;
      act2  <= act1;
      colour <= act1 ? palette(color_options, current_value, grad1) : '0;
      frame_done <= end_of_line && end_of_field;
    end
  end

  assign vga_hs      = ~hs2;
  assign vga_vs      = ~vs2;
  assign vga_blank_n = act2;
  assign vga_sync_n  = 1'b0;
  assign vga_r       = colour.r;
  assign vga_g       = colour.g;
  assign vga_b       = colour.b;

endmodule
