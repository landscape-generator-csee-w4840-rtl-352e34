// tb_face_normal: checks the normal z component and the cull decision.
//
// Hand cases (flat square, mirrored square, degenerate face), random
// corners, collinear corners (zero normal) and corners at the ends of the
// 11-bit range, compared with the cross product worked out here; cull must
// be set only for a negative normal with backface_on high.
module tb_face_normal;
  import lg_pkg::*;

  point_t a, b, c;
  logic backface_on;
  logic signed [2*COORD_W+1:0] normal_z;
  logic cull;
  int checks = 0, failures = 0;

  face_normal dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input int ax, ay, bx, by, cx, cy, input bit bf);
    longint n;
    a = '{x: coord_t'(ax), y: coord_t'(ay)};
    b = '{x: coord_t'(bx), y: coord_t'(by)};
    c = '{x: coord_t'(cx), y: coord_t'(cy)};
    backface_on = bf;
    #1;
    n = (longint'(bx) - longint'(ax)) * (longint'(cy) - longint'(ay))
      - (longint'(by) - longint'(ay)) * (longint'(cx) - longint'(ax));
    checks++;
    if (longint'(normal_z) != n || cull != (bf && n < 0)) begin
      failures++;
      $display("FAIL: (%0d,%0d)(%0d,%0d)(%0d,%0d) n=%0d exp %0d cull=%0d", ax, ay, bx, by, cx, cy,
               normal_z, n, cull);
    end
  endtask

  initial begin
    try(64, 84, 70, 84, 64, 87, 1);     // flat face seen from above: 6*3 = 18, drawn
    try(64, 84, 58, 84, 64, 87, 1);     // mirrored: -18, culled
    try(64, 84, 58, 84, 64, 87, 0);     // same, culling off
    try(10, 10, 20, 20, 30, 30, 1);     // degenerate: 0, drawn
    for (int k = 0; k < 2000; k++)
      try($urandom_range(0, 800) - 400, $urandom_range(0, 800) - 400,
          $urandom_range(0, 800) - 400, $urandom_range(0, 800) - 400,
          $urandom_range(0, 800) - 400, $urandom_range(0, 800) - 400, 1'($urandom));
    // Zero normals: coincident or collinear corners must never be culled.
    for (int k = 0; k < 300; k++) begin
      int ax, ay, dx, dy, s1, s2;
      ax = $urandom_range(0, 600) - 300;  ay = $urandom_range(0, 600) - 300;
      dx = $urandom_range(0, 40) - 20;    dy = $urandom_range(0, 40) - 20;
      s1 = $urandom_range(0, 10) - 5;     s2 = $urandom_range(0, 10) - 5;
      try(ax, ay, ax + s1 * dx, ay + s1 * dy, ax + s2 * dx, ay + s2 * dy, 1);
    end
    // Corners at the ends of the coordinate range: widest differences.
    for (int k = 0; k < 500; k++)
      try($urandom_range(0, 2047) - 1024, $urandom_range(0, 2047) - 1024,
          $urandom_range(0, 2047) - 1024, $urandom_range(0, 2047) - 1024,
          $urandom_range(0, 2047) - 1024, $urandom_range(0, 2047) - 1024, 1);
    try(-1024, -1024, 1023, -1024, -1024, 1023, 1);   // largest positive normal
    try(-1024, -1024, -1024, 1023, 1023, -1024, 1);   // largest negative normal
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
