// system_fsm: top-level sequencer of the landscape generator.
//
// Four states, cycled once per displayed frame:
//   GEN    ask the CPU for a new height map (gen_start high) until gen_done
//   DRAW   run the face drawer (draw_start high) until draw_done
//   WAIT   wait for the end of the frame being displayed (frame_done);
//          then swap the two frame buffers: the one just drawn is shown
//   CLEAR  write 0 to every one of the FB_DEPTH pixels of the buffer that
//          is now hidden, one per clock; then go to GEN if animate is set,
//          otherwise straight to DRAW (same landscape, maybe a new angle)
// Reset enters GEN with frame buffer 1 shown (show_fb2 = 0), so drawing
// goes to buffer 2. gen_start and draw_start are decoded from the state,
// so they drop in the same clock the state is left. led is a one-hot view
// of the state. States and transitions follow the report's system state
// diagram; the reset state and the clear counter width are our choices.
module system_fsm
  import lg_pkg::*;
#(
  parameter int FB_PIXELS = FB_DEPTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             animate,
  input  logic             gen_done,
  input  logic             draw_done,
  input  logic             frame_done,
  output sys_state_e       state,
  output logic             gen_start,
  output logic             draw_start,
  output logic             show_fb2,      // 1: buffer 2 shown, buffer 1 written
  output logic             clear_wren,
  output logic [FB_AW-1:0] clear_address,
  output logic [3:0]       led
);

  logic [FB_AW-1:0] clear_count;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= SYS_GEN;
      show_fb2    <= 1'b0;
      clear_count <= '0;
    end else begin
      unique case (state)
        SYS_GEN:   if (gen_done)  state <= SYS_DRAW;
        SYS_DRAW:  if (draw_done) state <= SYS_WAIT;
        SYS_WAIT:  if (frame_done) begin
                     show_fb2    <= ~show_fb2;
                     clear_count <= '0;
                     state       <= SYS_CLEAR;
                   end
        SYS_CLEAR: begin
                     if (int'(clear_count) == FB_PIXELS - 1)
                       state <= animate ? SYS_GEN : SYS_DRAW;
                     clear_count <= clear_count + 1'b1;
                   end
      endcase
    end
  end

  assign gen_start     = (state == SYS_GEN);
  assign draw_start    = (state == SYS_DRAW);
  assign clear_wren    = (state == SYS_CLEAR);
  assign clear_address = clear_count;
  assign led           = 4'b0001 << state;

endmodule
