// tb_draw_faces: renders whole height maps and compares the images.
//
// The height map RAM, the sine/cosine ROMs and the frame buffer are
// modelled here. A software renderer in this file projects every vertex,
// computes each face's normal, culls, picks the band colour and walks each
// edge with Bresenham's method in the same grid-sort order, producing a
// reference 320 x 240 image. Each pass compares all 76800 pixels, the
// numbers of drawn and culled faces, the cycle count of the pass (9 clocks
// per face, plus length+2 clocks per drawn edge, plus 3) and the angle
// after the pass, and that a start held high until done starts no second
// pass. ANGLE_STEP = 100 makes successive passes visit all four
// quadrants and both wrap-arounds. Passes also run with culling off and
// with some colour bands masked.
module tb_draw_faces;
  import lg_pkg::*;

  localparam int STEP = 100;
  logic clk = 0, rst = 1, start = 0, done;
  logic angle_increment = 0, angle_decrement = 0, backface_on = 1;
  logic [5:0] z_section = 6'b111111;
  logic [HMAP_AW-1:0] heightmap_addr;
  fix_t heightmap_in;
  logic [7:0] cos_addr, sin_addr;
  trig_t cos_in, sin_in;
  logic [FB_AW-1:0] frame_address;
  pixel_t frame_data;
  logic frame_wren;
  logic [8:0] angle;
  logic face_culled, face_drawn;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  draw_faces #(.ANGLE_STEP(STEP)) dut (.*);

  // ---- models of the memories around the block ----
  fix_t   hmap [1024];
  pixel_t fb [FB_DEPTH];
  pixel_t rf [FB_DEPTH];
  int     sin_t [180], cos_t [180];

  always @(posedge clk) begin
    heightmap_in <= hmap[heightmap_addr];
    cos_in <= trig_t'(cos_t[cos_addr]);
    sin_in <= trig_t'(sin_t[sin_addr]);
    if (frame_wren) fb[frame_address] <= frame_data;
  end

  int n_culled = 0, n_drawn = 0;
  always @(posedge clk) begin
    if (face_culled) n_culled++;
    if (face_drawn)  n_drawn++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- reference renderer ----
  int rx [4], ry [4];
  int ref_culled, ref_drawn, ref_cycles;

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  task automatic project(input int c, input int r, input int deg);
    longint cs, sn, gx, gy, z;
    int k;
    k = deg % 180;
    cs = longint'(cos_t[k]); sn = longint'(sin_t[k]);
    if (deg >= 180) begin cs = -cs; sn = -sn; end
    gx = -96 + 6 * c; gy = -96 + 6 * r;
    z = longint'(hmap[r * 32 + c]);
    rx[0] = int'(((gx * cs - gy * sn) >>> 18) + 160);
    ry[0] = int'((((gx * sn + gy * cs) * 131072 - z * 227023) >>> 36) + 180);
  endtask

  task automatic ref_line(int ax, int ay, int bx, int by, int colour);
    int dx, dy, sx, sy, e, e2, cx, cy;
    dx = iabs(bx - ax); dy = -iabs(by - ay);
    sx = ax < bx ? 1 : -1; sy = ay < by ? 1 : -1;
    e = dx + dy; cx = ax; cy = ay;
    ref_cycles += 2;
    forever begin
      ref_cycles++;
      if (cx >= 0 && cx < 320 && cy >= 0 && cy < 240) rf[cy * 320 + cx] = pixel_t'(colour);
      if (cx == bx && cy == by) break;
      e2 = 2 * e;
      if (e2 >= dy) begin e += dy; cx += sx; end
      if (e2 <= dx) begin e += dx; cy += sy; end
    end
  endtask

  task automatic ref_render(input int deg, input bit bf, input logic [5:0] zs);
    int px [4], py [4], c, r, q, inner, band, colour;
    longint nz;
    ref_culled = 0; ref_drawn = 0; ref_cycles = 3;
    foreach (rf[i]) rf[i] = 0;
    q = deg / 90;
    case (q) 0: begin c = 0; r = 0; end 1: begin c = 0; r = 30; end
             2: begin c = 30; r = 30; end default: begin c = 30; r = 0; end endcase
    inner = 0;
    for (int f = 0; f < 961; f++) begin
      ref_cycles += 9;
      for (int v = 0; v < 4; v++) begin
        project(c + v % 2, r + v / 2, deg);
        px[v] = rx[0]; py[v] = ry[0];
      end
      nz = (longint'(px[1]) - longint'(px[0])) * (longint'(py[2]) - longint'(py[0]))
         - (longint'(py[1]) - longint'(py[0])) * (longint'(px[2]) - longint'(px[0]));
      band = f / 160; if (band > 5) band = 5;
      colour = band % 3 + 1;
      if (bf && nz < 0) ref_culled++;
      else if (zs[5 - band]) begin
        ref_drawn++;
        ref_line(px[0], py[0], px[1], py[1], colour);
        ref_line(px[0], py[0], px[2], py[2], colour);
        ref_line(px[1], py[1], px[3], py[3], colour);
        ref_line(px[2], py[2], px[3], py[3], colour);
      end
      // next face in grid-sort order
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

  task automatic run_pass(input int exp_angle, input int next_angle, input string what);
    int cycles, bad;
    foreach (fb[i]) fb[i] = 0;
    n_culled = 0; n_drawn = 0;
    ref_render(exp_angle, backface_on, z_section);
    check(int'(angle) == exp_angle, $sformatf("%s: angle %0d expected %0d", what, angle, exp_angle));
    @(negedge clk);
    start = 1;
    cycles = 0;
    // start is held high until done, as the system controller does
    do begin @(negedge clk); cycles++; end while (!done);
    @(negedge clk);
    start = 0;
    begin
      int nd, nc;
      nd = n_drawn; nc = n_culled;
      repeat (40) @(negedge clk);
      check(n_drawn == nd && n_culled == nc, $sformatf("%s: no second pass after done", what));
    end
    bad = 0;
    for (int i = 0; i < FB_DEPTH; i++)
      if (fb[i] != rf[i]) begin
        if (bad < 3) $display("  pixel (%0d,%0d) is %0d, expected %0d", i % 320, i / 320, fb[i], rf[i]);
        bad++;
      end
    check(bad == 0, $sformatf("%s: %0d pixels differ", what, bad));
    check(n_culled == ref_culled && n_drawn == ref_drawn,
          $sformatf("%s: drawn %0d culled %0d, expected %0d %0d", what, n_drawn, n_culled,
                    ref_drawn, ref_culled));
    check(cycles == ref_cycles, $sformatf("%s: %0d cycles, expected %0d", what, cycles, ref_cycles));
    check(int'(angle) == next_angle, $sformatf("%s: next angle %0d expected %0d", what, angle, next_angle));
    $display("%s: angle %0d, %0d drawn, %0d culled, %0d cycles", what, exp_angle, n_drawn, n_culled, cycles);
  endtask

  // diamond-square height map, heights in whole units scaled to 18.18
  task automatic make_landscape(input int rough);
    int g [33][33];
    int len, half;
    g[0][0] = $urandom_range(0, 127); g[0][32] = $urandom_range(0, 127);
    g[32][0] = $urandom_range(0, 127); g[32][32] = $urandom_range(0, 127);
    for (len = 32; len > 1; len /= 2) begin
      half = len / 2;
      for (int i = 0; i < 32; i += len)
        for (int j = 0; j < 32; j += len)
          g[i + half][j + half] = (g[i][j] + g[i + len][j] + g[i][j + len] + g[i + len][j + len]) / 4
                                  + $urandom_range(0, rough - 1);
      for (int i = 0; i < 32; i += len)
        for (int j = 0; j < 32; j += len) begin
          g[i + half][j] = (g[i][j] + g[i + len][j]) / 2 + $urandom_range(0, rough - 1);
          g[i + len][j + half] = (g[i + len][j] + g[i + len][j + len]) / 2 + $urandom_range(0, rough - 1);
          g[i + half][j + len] = (g[i][j + len] + g[i + len][j + len]) / 2 + $urandom_range(0, rough - 1);
          g[i][j + half] = (g[i][j] + g[i][j + len]) / 2 + $urandom_range(0, rough - 1);
        end
    end
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        hmap[j * 32 + i] = fix_t'(longint'(g[i][j]) * 262144 + longint'($urandom_range(0, 262143)));
  endtask

  initial begin
    for (int i = 0; i < 180; i++) begin
      sin_t[i] = $rtoi($sin(i * 3.141592653589793 / 180.0) * 262144.0);
      cos_t[i] = $rtoi($cos(i * 3.141592653589793 / 180.0) * 262144.0);
    end
    make_landscape(24);
    repeat (3) @(negedge clk);
    rst = 0;
    run_pass(0, 0, "still");
    angle_increment = 1;
    run_pass(0, 100, "inc1");
    run_pass(100, 200, "inc2");
    run_pass(200, 300, "inc3");
    run_pass(300, 40, "inc4");
    angle_increment = 0; angle_decrement = 1;
    run_pass(40, 300, "dec1");
    angle_decrement = 0;
    backface_on = 0;
    run_pass(300, 300, "no cull");
    backface_on = 1;
    z_section = 6'b101001;
    make_landscape(8);
    run_pass(300, 300, "bands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
