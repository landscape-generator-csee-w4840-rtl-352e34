// landscape_top: hardware landscape generator with rotating wireframe view.
//
// A CPU (outside this module, on the Avalon slave port) fills a 32 x 32
// height map with a diamond-square fractal landscape. The face drawer then
// projects the height map, rotated by the current view angle and tilted
// 60 degrees, into a 320 x 240 x 2-bit frame buffer as a wireframe with
// hidden back faces removed, while the VGA unit scans the other frame
// buffer out at 640 x 480 with every pixel doubled. The system controller
// sequences Generate, Draw, Wait (end of displayed frame, then swap the
// buffers) and Clear (zero the now-hidden buffer).
//
// Clocking: everything runs on 25 MHz, made here by halving clk_50; that
// clock is also given out on vga_clk and is the clock of the Avalon port.
// reset is active high and synchronised to the 25 MHz clock.
// Controls (after debouncing): sw[0] animate (new landscape every frame),
// sw[7:5] colour table, key[1] / key[2] (active low) turn the view one
// degree per frame up / down. ledr[3:0] show the controller state one-hot.
// BACKFACE_ON and Z_SECTION fix the cull enable and the drawn colour bands.
// The structure follows the report's block diagram; the reset, the choice
// of switch for animate and the debouncer details are this design's own.
module landscape_top
  import lg_pkg::*;
#(
  parameter logic       BACKFACE_ON     = 1'b1,
  parameter logic [5:0] Z_SECTION       = 6'b111111,
  parameter int         DEBOUNCE_CYCLES = 500
) (
  input  logic        clk_50,
  input  logic        reset,
  input  logic [3:0]  key,
  input  logic [17:0] sw,
  output logic [17:0] ledr,
  // Avalon-MM slave for the CPU (clocked by vga_clk)
  input  logic        av_chipselect,
  input  logic        av_read,
  input  logic        av_write,
  input  logic [5:0]  av_address,
  input  logic [31:0] av_writedata,
  output logic [31:0] av_readdata,
  // VGA
  output logic        vga_clk,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b
);

  // ---- clock and reset -------------------------------------------------------
  logic clk25 = 1'b0;
  always_ff @(posedge clk_50) clk25 <= ~clk25;
  assign vga_clk = clk25;

  logic rst_meta, rst;
  always_ff @(posedge clk25) begin
    rst_meta <= reset;
    rst      <= rst_meta | reset;
  end

  // ---- controls ---------------------------------------------------------------
  logic [5:0] ctl_raw, ctl;
  assign ctl_raw = {key[2], key[1], sw[7:5], sw[0]};

  input_debounce #(.W(6), .CYCLES(DEBOUNCE_CYCLES), .RESET_VAL(6'b110000)) u_debounce (
    .clk  (clk25),
    .rst  (rst),
    .raw  (ctl_raw),
    .clean(ctl)
  );

  logic       animate, angle_inc, angle_dec;
  logic [2:0] color_options;
  assign animate       = ctl[0];
  assign color_options = ctl[3:1];
  assign angle_inc     = ~ctl[4] &  ctl[5];
  assign angle_dec     =  ctl[4] & ~ctl[5];

  // ---- system controller ---------------------------------------------------------
  sys_state_e       state;
  logic             gen_start, gen_done, draw_start, draw_done, frame_done;
  logic             show_fb2, clear_wren;
  logic [FB_AW-1:0] clear_address;
  logic [3:0]       led;

  system_fsm u_fsm (
    .clk          (clk25),
    .rst          (rst),
    .animate      (animate),
    .gen_done     (gen_done),
    .draw_done    (draw_done),
    .frame_done   (frame_done),
    .state        (state),
    .gen_start    (gen_start),
    .draw_start   (draw_start),
    .show_fb2     (show_fb2),
    .clear_wren   (clear_wren),
    .clear_address(clear_address),
    .led          (led)
  );
  assign ledr = {14'd0, led};

  // ---- height map path -----------------------------------------------------------
  logic [HMAP_AW-1:0] hmap_wraddress, hmap_rdaddress;
  logic [FIX_W-1:0]   hmap_data, hmap_q;
  logic               ctrl_wren, hmap_wren;

  hmap_avalon_ctrl u_ctrl (
    .clk         (clk25),
    .rst         (rst),
    .chipselect  (av_chipselect),
    .read        (av_read),
    .write       (av_write),
    .address     (av_address),
    .writedata   (av_writedata),
    .readdata    (av_readdata),
    .gen_start   (gen_start),
    .gen_done    (gen_done),
    .hmap_address(hmap_wraddress),
    .data        (hmap_data),
    .wren        (ctrl_wren)
  );
  // the height map may only change while a new one is being generated
  assign hmap_wren = ctrl_wren && (state == SYS_GEN);

  heightmap_ram u_hmap (
    .clk      (clk25),
    .wraddress(hmap_wraddress),
    .data     (hmap_data),
    .wren     (hmap_wren),
    .rdaddress(hmap_rdaddress),
    .q        (hmap_q)
  );

  // ---- lookup ROMs -----------------------------------------------------------
  logic [7:0] cos_addr, sin_addr;
  trig_t      cos_q, sin_q;

  trig_rom #(.COSINE(1'b1)) u_cos (.clk(clk25), .addr(cos_addr), .q(cos_q));
  trig_rom #(.COSINE(1'b0)) u_sin (.clk(clk25), .addr(sin_addr), .q(sin_q));

  // ---- face drawer -------------------------------------------------------------
  logic [FB_AW-1:0] draw_address;
  pixel_t           draw_data;
  logic             draw_wren;
  logic [8:0]       angle;
  logic             face_culled, face_drawn;

  draw_faces u_draw (
    .clk            (clk25),
    .rst            (rst),
    .start          (draw_start),
    .done           (draw_done),
    .angle_increment(angle_inc),
    .angle_decrement(angle_dec),
    .backface_on    (BACKFACE_ON),
    .z_section      (Z_SECTION),
    .heightmap_addr (hmap_rdaddress),
    .heightmap_in   (hmap_q),
    .cos_addr       (cos_addr),
    .sin_addr       (sin_addr),
    .cos_in         (cos_q),
    .sin_in         (sin_q),
    .frame_address  (draw_address),
    .frame_data     (draw_data),
    .frame_wren     (draw_wren),
    .angle          (angle),
    .face_culled    (face_culled),
    .face_drawn     (face_drawn)
  );

  // ---- double-buffered frame store ----------------------------------------------
  logic [FB_AW-1:0] wr_address, position;
  pixel_t           wr_data, fb1_q, fb2_q, current_value;
  logic             wr_en, fb1_wren, fb2_wren;

  assign wr_address = clear_wren ? clear_address : draw_address;
  assign wr_data    = clear_wren ? 2'b00 : draw_data;
  assign wr_en      = clear_wren || draw_wren;
  assign fb1_wren   = wr_en &&  show_fb2;   // write the hidden buffer
  assign fb2_wren   = wr_en && !show_fb2;

  framebuffer_ram u_fb1 (
    .clk(clk25), .wraddress(wr_address), .data(wr_data), .wren(fb1_wren),
    .rdaddress(position), .q(fb1_q)
  );
  framebuffer_ram u_fb2 (
    .clk(clk25), .wraddress(wr_address), .data(wr_data), .wren(fb2_wren),
    .rdaddress(position), .q(fb2_q)
  );

  // the selection is sampled with the read address, so a swap never splits
  // one pixel's address and data between the two buffers
  logic show_fb2_q;
  always_ff @(posedge clk25) show_fb2_q <= show_fb2;
  assign current_value = show_fb2_q ? fb2_q : fb1_q;

  fb_to_vga u_vga (
    .clk          (clk25),
    .rst          (rst),
    .color_options(color_options),
    .position     (position),
    .current_value(current_value),
    .frame_done   (frame_done),
    .vga_hs       (vga_hs),
    .vga_vs       (vga_vs),
    .vga_blank_n  (vga_blank_n),
    .vga_sync_n   (vga_sync_n),
    .vga_r        (vga_r),
    .vga_g        (vga_g),
    .vga_b        (vga_b)
  );

endmodule
