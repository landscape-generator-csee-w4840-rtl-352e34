// tb_vertex_rotator: checks the projection of grid vertices.
//
// For random grid points, heights and view angles it compares the screen
// point with the formula evaluated here in 64-bit integers (exact), checks
// it against real-valued trigonometry to within two pixels, and checks the
// one-clock latency and the tag. Hand case: at angle 0 a zero-height
// corner (0,0) lands at (160-96, 180-48) = (64, 132).
module tb_vertex_rotator;
  import lg_pkg::*;

  logic clk = 0;
  logic in_valid = 0;
  logic [4:0] col, row;
  fix_t z;
  trig_t cos_phi, sin_phi;
  logic [1:0] in_tag, out_tag;
  logic out_valid;
  point_t out_pt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vertex_rotator dut (.*);

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

  // floor division by 2^s
  function automatic longint fl(longint v, int s);
    return v >>> s;
  endfunction

  task automatic try(input int c, input int r, input int zi_q, input int deg);
    longint gx, gy, cs, sn, ex, ey, rz;
    real    rad, fx, fy;
    rad = deg * 3.141592653589793 / 180.0;
    cs = longint'($rtoi($cos(rad) * 262144.0));
    sn = longint'($rtoi($sin(rad) * 262144.0));
    gx = -96 + 6 * c; gy = -96 + 6 * r;
    rz = longint'(zi_q);
    ex = fl(gx * cs - gy * sn, 18) + 160;
    ey = fl((gx * sn + gy * cs) * 131072 - rz * 227023, 36) + 180;
    fx = gx * $cos(rad) - gy * $sin(rad) + 160.0;
    fy = 0.5 * (gx * $sin(rad) + gy * $cos(rad)) - (zi_q / 262144.0) * 0.8660254 + 180.0;
    @(negedge clk);
    in_valid = 1; col = 5'(c); row = 5'(r); z = fix_t'(zi_q);
    cos_phi = trig_t'(cs); sin_phi = trig_t'(sn); in_tag = 2'(c);
    @(negedge clk);
    in_valid = 0;
    check(out_valid && out_tag == 2'(c), "valid and tag after one clock");
    check(longint'(out_pt.x) == ex && longint'(out_pt.y) == ey,
          $sformatf("c%0d r%0d z%0d a%0d: (%0d,%0d) expected (%0d,%0d)", c, r, zi_q, deg,
                    int'(out_pt.x), int'(out_pt.y), ex, ey));
    check((real'(out_pt.x) - fx) < 2.0 && (fx - real'(out_pt.x)) < 2.0 &&
          (real'(out_pt.y) - fy) < 2.0 && (fy - real'(out_pt.y)) < 2.0,
          $sformatf("real-valued projection (%f,%f)", fx, fy));
    @(negedge clk);
    check(!out_valid, "valid is one clock long");
  endtask

  initial begin
    try(0, 0, 0, 0);
    check(out_pt.x == 64 && out_pt.y == 132, "hand case corner (0,0)");
    try(31, 31, 0, 0);
    try(16, 16, 100 * 262144, 0);
    check(out_pt.x == 160 && out_pt.y == 180 - 87, "hand case raised centre");
    for (int k = 0; k < 3000; k++)
      try($urandom_range(0, 31), $urandom_range(0, 31), $urandom_range(0, 200 * 262144),
          $urandom_range(0, 179));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
