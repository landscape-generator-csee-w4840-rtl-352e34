// tb_line_drawer: checks the Bresenham line unit against a software model.
//
// Draws fixed lines in all eight octants plus random ones, collects every
// plotted pixel and compares the list with a reference Bresenham walk
// computed here. Also checks that the line takes max(|dx|,|dy|)+1 plot
// cycles, starts at p0, ends at p1 and that done follows the last pixel.
module tb_line_drawer;
  import lg_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  point_t p0, p1;
  logic busy, plot, done;
  coord_t x, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  line_drawer dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic run_line(input int ax, input int ay, input int bx, input int by);
    int ref_x[$], ref_y[$], got_x[$], got_y[$];
    int cx, cy, dx, dy, sx, sy, e, e2, cycles, n;
    // reference
    dx = iabs(bx - ax); dy = -iabs(by - ay);
    sx = ax < bx ? 1 : -1; sy = ay < by ? 1 : -1;
    e = dx + dy; cx = ax; cy = ay;
    forever begin
      ref_x.push_back(cx); ref_y.push_back(cy);
      if (cx == bx && cy == by) break;
      e2 = 2 * e;
      if (e2 >= dy) begin e += dy; cx += sx; end
      if (e2 <= dx) begin e += dx; cy += sy; end
    end
    // DUT
    @(negedge clk);
    p0.x = coord_t'(ax); p0.y = coord_t'(ay);
    p1.x = coord_t'(bx); p1.y = coord_t'(by);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin
      if (plot) begin
        got_x.push_back(int'(x)); got_y.push_back(int'(y));
      end
      cycles++;
      @(negedge clk);
    end
    n = ref_x.size();
    check(n == (iabs(bx-ax) > iabs(by-ay) ? iabs(bx-ax) : iabs(by-ay)) + 1, "reference length");
    check(got_x.size() == n, $sformatf("pixel count %0d vs %0d for (%0d,%0d)-(%0d,%0d)",
                                       got_x.size(), n, ax, ay, bx, by));
    check(cycles == n, $sformatf("plot cycles %0d vs %0d", cycles, n));
    if (got_x.size() == n)
      for (int i = 0; i < n; i++)
        check(got_x[i] == ref_x[i] && got_y[i] == ref_y[i],
              $sformatf("pixel %0d: (%0d,%0d) vs (%0d,%0d)", i, got_x[i], got_y[i], ref_x[i], ref_y[i]));
    if (got_x.size() > 0) begin
      check(got_x[0] == ax && got_y[0] == ay, "first pixel is p0");
      check(got_x[got_x.size()-1] == bx && got_y[got_y.size()-1] == by, "last pixel is p1");
    end
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run_line(0, 0, 40, 20);
    run_line(10, 10, 10, 10);
    run_line(5, 5, -7, 30);
    run_line(100, 50, 20, 45);
    run_line(-20, -20, -30, -60);
    run_line(0, 0, 0, 25);
    run_line(0, 0, -25, 0);
    run_line(3, 100, 90, 2);
    run_line(319, 239, 0, 0);
    for (int k = 0; k < 200; k++)
      run_line($urandom_range(0, 400) - 40, $urandom_range(0, 300) - 30,
               $urandom_range(0, 400) - 40, $urandom_range(0, 300) - 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
