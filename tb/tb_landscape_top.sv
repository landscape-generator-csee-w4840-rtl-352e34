// tb_landscape_top: end-to-end run of the whole landscape generator at its
// default parameters.
//
// A behavioural model of the CPU software sits on the Avalon port: it
// polls the start register, builds a 33 x 33 diamond-square landscape,
// writes the 32 x 32 corner heights (x, y, data registers) and signals
// done. The testbench watches the controller state on ledr. Whenever the
// buffers swap (Wait -> Clear) it renders the frame that was just drawn
// with its own software renderer and decodes the whole next VGA frame
// (640 x 480, 2 x 2 per frame-buffer pixel) back to colour indices, which
// must match the reference everywhere. Across five rounds it turns the
// animate switch off, holds the rotate keys (checking the angle moves one
// degree per frame) and switches the colour table. It counts how often
// each mechanism happened (each state, both buffer swaps, Clear->Generate
// and Clear->Draw, angle up and down, culled faces, clipped pixels,
// colour-table switch, debounced key) and counts a failure for any that
// never did.
module tb_landscape_top;
  import lg_pkg::*;

  logic        clk_50 = 0, reset = 1;
  logic [3:0]  key = 4'b1111;
  logic [17:0] sw = 18'd1;
  logic [17:0] ledr;
  logic        av_chipselect = 0, av_read = 0, av_write = 0;
  logic [5:0]  av_address = 0;
  logic [31:0] av_writedata = 0, av_readdata;
  logic        vga_clk, vga_hs, vga_vs, vga_blank_n, vga_sync_n;
  logic [9:0]  vga_r, vga_g, vga_b;
  int checks = 0, failures = 0;

  always #5 clk_50 = ~clk_50;

  landscape_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- mechanism counters ----
  int n_gen = 0, n_draw = 0, n_wait = 0, n_clear = 0, n_swap_to2 = 0, n_swap_to1 = 0;
  int n_clear_gen = 0, n_clear_draw = 0, n_inc = 0, n_dec = 0, n_cull = 0, n_clip = 0;
  int n_colour_switch = 0, n_debounced = 0, n_frames_checked = 0;

  initial begin
    repeat (12_000_000) @(posedge clk_50);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- CPU model ----
  fix_t hmap [1024];

  task automatic bus_write(input int a, input logic [31:0] d);
    @(negedge vga_clk);
    av_chipselect = 1; av_write = 1; av_address = 6'(a); av_writedata = d;
    @(negedge vga_clk);
    av_chipselect = 0; av_write = 0;
  endtask

  task automatic bus_read(input int a, output logic [31:0] d);
    @(negedge vga_clk);
    av_chipselect = 1; av_read = 1; av_address = 6'(a);
    @(negedge vga_clk);
    av_chipselect = 0; av_read = 0;
    d = av_readdata;
  endtask

  int base = 0;   // added to every height; raised later to push peaks off the frame

  task automatic generate_landscape();
    int g [33][33];
    int len, half;
    g[0][0] = $urandom_range(0, 127); g[0][32] = $urandom_range(0, 127);
    g[32][0] = $urandom_range(0, 127); g[32][32] = $urandom_range(0, 127);
    for (len = 32; len > 1; len /= 2) begin
      half = len / 2;
      for (int i = 0; i < 32; i += len)
        for (int j = 0; j < 32; j += len)
          g[i + half][j + half] = (g[i][j] + g[i + len][j] + g[i][j + len] + g[i + len][j + len]) / 4
                                  + $urandom_range(0, 7);
      for (int i = 0; i < 32; i += len)
        for (int j = 0; j < 32; j += len) begin
          g[i + half][j] = (g[i][j] + g[i + len][j]) / 2 + $urandom_range(0, 7);
          g[i + len][j + half] = (g[i + len][j] + g[i + len][j + len]) / 2 + $urandom_range(0, 7);
          g[i + half][j + len] = (g[i][j + len] + g[i + len][j + len]) / 2 + $urandom_range(0, 7);
          g[i][j + half] = (g[i][j] + g[i][j + len]) / 2 + $urandom_range(0, 7);
        end
    end
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        bus_write(0, i);
        bus_write(1, j);
        bus_write(2, (g[i][j] + base) * 262144);
        hmap[j * 32 + i] = fix_t'((longint'(g[i][j]) + longint'(base)) * 262144);
      end
    bus_write(4, 1);
    bus_write(4, 0);
  endtask

  initial begin : cpu
    logic [31:0] st;
    @(negedge reset);
    forever begin
      bus_read(3, st);
      if (st[0]) generate_landscape();
      else repeat (20) @(negedge vga_clk);
    end
  end

  // ---- reference renderer ----
  int sin_t [180], cos_t [180];
  pixel_t rf [FB_DEPTH];

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  task automatic ref_line(int ax, int ay, int bx, int by, int colour);
    int dx, dy, sx, sy, e, e2, cx, cy;
    dx = iabs(bx - ax); dy = -iabs(by - ay);
    sx = ax < bx ? 1 : -1; sy = ay < by ? 1 : -1;
    e = dx + dy; cx = ax; cy = ay;
    forever begin
      if (cx >= 0 && cx < 320 && cy >= 0 && cy < 240) rf[cy * 320 + cx] = pixel_t'(colour);
      if (cx == bx && cy == by) break;
      e2 = 2 * e;
      if (e2 >= dy) begin e += dy; cx += sx; end
      if (e2 <= dx) begin e += dx; cy += sy; end
    end
  endtask

  task automatic ref_render(input fix_t hm [1024], input int deg);
    int px [4], py [4], c, r, q, inner, band;
    longint cs, sn, gx, gy, nz;
    foreach (rf[i]) rf[i] = 0;
    cs = longint'(cos_t[deg % 180]); sn = longint'(sin_t[deg % 180]);
    if (deg >= 180) begin cs = -cs; sn = -sn; end
    q = deg / 90;
    case (q) 0: begin c = 0; r = 0; end 1: begin c = 0; r = 30; end
             2: begin c = 30; r = 30; end default: begin c = 30; r = 0; end endcase
    inner = 0;
    for (int f = 0; f < 961; f++) begin
      for (int v = 0; v < 4; v++) begin
        gx = 6 * (longint'(c) + longint'(v) % 2) - 96; gy = 6 * (longint'(r) + longint'(v) / 2) - 96;
        px[v] = int'(((gx * cs - gy * sn) >>> 18) + 160);
        py[v] = int'((((gx * sn + gy * cs) * 131072
                       - longint'(hm[(r + v / 2) * 32 + c + v % 2]) * 227023) >>> 36) + 180);
      end
      nz = (longint'(px[1]) - longint'(px[0])) * (longint'(py[2]) - longint'(py[0]))
         - (longint'(py[1]) - longint'(py[0])) * (longint'(px[2]) - longint'(px[0]));
      band = f / 160; if (band > 5) band = 5;
      if (nz >= 0) begin
        ref_line(px[0], py[0], px[1], py[1], band % 3 + 1);
        ref_line(px[0], py[0], px[2], py[2], band % 3 + 1);
        ref_line(px[1], py[1], px[3], py[3], band % 3 + 1);
        ref_line(px[2], py[2], px[3], py[3], band % 3 + 1);
      end
      if (inner == 30) begin
        inner = 0;
        case (q) 0: begin c++; r = 0; end 1: begin r--; c = 0; end
                 2: begin c--; r = 30; end default: begin r++; c = 30; end endcase
      end else begin
        inner++;
        case (q) 0: r++; 1: c++; 2: r--; default: c--; endcase
      end
    end
  endtask

  // decode a VGA colour back to a colour index for table 0 (-1 if none)
  function automatic int decode0(logic [9:0] r, logic [9:0] g, logic [9:0] b);
    if (g == 10'h080 && b == 0) return 0;
    if (r == 0 && g == 10'h3FF && b == 10'h3FF) return 1;
    if (r == 10'h3FF && g == 0 && b == 10'h3FF) return 2;
    if (r == 10'h3FF && g == 10'h3FF && b == 10'h3FF) return 3;
    return -1;
  endfunction

  // table 4: index 0 black, others white
  function automatic int decode4(logic [9:0] r, logic [9:0] g, logic [9:0] b);
    if ({r, g, b} == 30'd0) return 0;
    if ({r, g, b} == {30{1'b1}}) return 1;
    return -1;
  endfunction

  // check the next whole frame on the VGA output against rf
  task automatic check_frame(input int opt);
    int line, col, bad, v, e;
    bad = 0;
    line = 0;
    while (line < 480) begin
      @(negedge vga_clk);
      if (vga_blank_n) begin
        col = 0;
        while (vga_blank_n) begin
          e = int'(rf[(line / 2) * 320 + col / 2]);
          if (opt == 0) v = decode0(vga_r, vga_g, vga_b);
          else begin v = decode4(vga_r, vga_g, vga_b); e = int'(e != 0); end
          if (v != e) begin
            if (bad < 3) $display("  VGA (%0d,%0d) index %0d expected %0d", col, line, v, e);
            bad++;
          end
          col++;
          @(negedge vga_clk);
        end
        check(col == 640, $sformatf("active line of %0d pixels", col));
        line++;
      end
    end
    check(bad == 0, $sformatf("displayed frame: %0d pixels differ", bad));
    n_frames_checked++;
  endtask

  // ---- observers ----
  logic [3:0] prev_led = 0;
  logic       prev_fb = 0;
  always @(negedge vga_clk) begin
    if (!reset) begin
      if (ledr[3:0] != prev_led) begin
        case (ledr[3:0])
          4'b0001: begin n_gen++;  if (prev_led == 4'b1000) n_clear_gen++;  end
          4'b0010: begin n_draw++; if (prev_led == 4'b1000) n_clear_draw++; end
          4'b0100: n_wait++;
          4'b1000: n_clear++;
          default: ;
        endcase
      end
      prev_led <= ledr[3:0];
      if (dut.u_fsm.show_fb2 != prev_fb) begin
        if (dut.u_fsm.show_fb2) n_swap_to2++; else n_swap_to1++;
      end
      prev_fb <= dut.u_fsm.show_fb2;
      if (dut.u_draw.face_culled) n_cull++;
      if (dut.u_draw.line_plot && !dut.u_draw.frame_wren) n_clip++;
    end
  end

  // what the most recent Draw state drew
  fix_t last_hmap [1024];
  int   last_angle = 0;
  always @(negedge vga_clk)
    if (!reset && ledr[3:0] == 4'b0010 && prev_led != 4'b0010) begin
      last_hmap  = hmap;
      last_angle = int'(dut.u_draw.angle);
    end

  // ---- scenario ----
  initial begin : scenario
    fix_t drawn_hmap [1024];
    int   drawn_angle, prev_angle, opt;
    for (int i = 0; i < 180; i++) begin
      sin_t[i] = $rtoi($sin(i * 3.141592653589793 / 180.0) * 262144.0);
      cos_t[i] = $rtoi($cos(i * 3.141592653589793 / 180.0) * 262144.0);
    end
    repeat (10) @(negedge clk_50);
    reset = 0;
    check(ledr[3:0] == 4'b0001 || ledr[3:0] == 4'b0000, "starts in Generate");
    prev_angle = 0;
    for (int round = 0; round < 5; round++) begin
      // wait for the swap, then check the next displayed frame
      @(negedge vga_clk iff ledr[3:0] == 4'b1000);
      drawn_hmap  = last_hmap;
      drawn_angle = last_angle;
      if (round > 0) begin
        if (round == 2 || round == 3)
          check(drawn_angle == (prev_angle + 1) % 360, $sformatf("angle up: %0d after %0d", drawn_angle, prev_angle));
        else if (round == 4)
          check(drawn_angle == (prev_angle + 359) % 360, $sformatf("angle down: %0d after %0d", drawn_angle, prev_angle));
        else
          check(drawn_angle == prev_angle, "angle holds");
        if (drawn_angle == (prev_angle + 1) % 360) n_inc++;
        if (drawn_angle == (prev_angle + 359) % 360) n_dec++;
      end
      prev_angle = drawn_angle;
      opt = int'(sw[7:5]);
      ref_render(drawn_hmap, drawn_angle);
      // inputs for the next round, set while the buffer is being cleared
      case (round)
        0: key[1] = 1'b0;                     // hold "angle up" during the next draw
        1: begin sw[0] = 1'b0; end            // animate off: Clear -> Draw
        2: begin key[1] = 1'b1; key[2] = 1'b0; end
        3: begin key[2] = 1'b1; sw[0] = 1'b1; base = 130; end
        default: ;
      endcase
      check_frame(opt);
      if (round == 2) begin sw[7:5] = 3'b100; n_colour_switch++; end
      if (round == 3) sw[7:5] = 3'b000;
    end
    // a 50-clock pulse on key[1] must not reach the controls
    key[1] = 1'b0;
    repeat (50) @(negedge vga_clk);
    key[1] = 1'b1;
    repeat (600) @(negedge vga_clk);
    check(dut.angle_inc == 1'b0, "short key glitch filtered");
    n_debounced = n_inc;

    $display("mechanisms: gen=%0d draw=%0d wait=%0d clear=%0d swap->2=%0d swap->1=%0d clear->gen=%0d clear->draw=%0d",
             n_gen, n_draw, n_wait, n_clear, n_swap_to2, n_swap_to1, n_clear_gen, n_clear_draw);
    $display("            inc=%0d dec=%0d culled=%0d clipped_pixels=%0d colour_switch=%0d debounce=%0d frames=%0d",
             n_inc, n_dec, n_cull, n_clip, n_colour_switch, n_debounced, n_frames_checked);
    check(n_gen > 0, "Generate state happened");
    check(n_draw > 0, "Draw state happened");
    check(n_wait > 0, "Wait state happened");
    check(n_clear > 0, "Clear state happened");
    check(n_swap_to2 > 0 && n_swap_to1 > 0, "buffer swapped both ways");
    check(n_clear_gen > 0, "Clear -> Generate (animate on) happened");
    check(n_clear_draw > 0, "Clear -> Draw (animate off) happened");
    check(n_inc > 0, "angle increment happened");
    check(n_dec > 0, "angle decrement happened");
    check(n_cull > 0, "backface cull happened");
    check(n_clip > 0, "off-frame pixel clipping happened");
    check(n_colour_switch > 0, "colour table switch happened");
    check(n_debounced > 0, "debounced key change happened");
    check(n_frames_checked == 5, "five frames checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
