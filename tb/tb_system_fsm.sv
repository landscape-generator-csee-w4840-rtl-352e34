// tb_system_fsm: runs the controller through its four states.
//
// Uses a small FB_PIXELS (64) to keep the clear short. Checks the reset
// state, the gen/draw handshakes, that Wait holds until frame_done, the
// buffer swap at each Wait->Clear, that Clear writes every address 0..63
// exactly once in order, and the exit to Generate (animate on) or Draw
// (animate off).
module tb_system_fsm;
  import lg_pkg::*;

  localparam int NPIX = 64;
  logic clk = 0, rst = 1;
  logic animate = 1, gen_done = 0, draw_done = 0, frame_done = 0;
  sys_state_e state;
  logic gen_start, draw_start, show_fb2, clear_wren;
  logic [FB_AW-1:0] clear_address;
  logic [3:0] led;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  system_fsm #(.FB_PIXELS(NPIX)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask

  task automatic one_round(input bit anim, input bit from_gen);
    logic prev_fb;
    int n;
    if (from_gen) begin
      check(state == SYS_GEN && gen_start && !draw_start && led == 4'b0001, "in Generate");
      repeat (5) @(negedge clk);
      check(state == SYS_GEN, "Generate holds until gen_done");
      pulse(gen_done);
    end
    check(state == SYS_DRAW && draw_start && !gen_start && led == 4'b0010, "in Draw");
    repeat (7) @(negedge clk);
    pulse(draw_done);
    check(state == SYS_WAIT && !draw_start && led == 4'b0100, "in Wait");
    prev_fb = show_fb2;
    repeat (30) @(negedge clk);
    check(state == SYS_WAIT && show_fb2 == prev_fb, "Wait holds, no swap yet");
    pulse(frame_done);
    check(state == SYS_CLEAR && show_fb2 != prev_fb && led == 4'b1000, "swap and Clear");
    animate = anim;
    n = 0;
    while (state == SYS_CLEAR) begin
      check(clear_wren && int'(clear_address) == n, $sformatf("clear address %0d", n));
      n++;
      @(negedge clk);
    end
    check(n == NPIX, $sformatf("clear took %0d clocks", n));
    check(state == (anim ? SYS_GEN : SYS_DRAW), "exit of Clear follows animate");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    check(!show_fb2, "buffer 1 shown after reset");
    one_round(1, 1);
    one_round(0, 1);
    one_round(1, 0);
    one_round(1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
