// draw_faces: draws the height map as a wireframe into a frame buffer.
//
// On start it reads sine and cosine of the current view angle from the two
// lookup ROMs (angles of 180 and up read entry angle-180 and negate it).
// It then visits the 31 x 31 faces of the 32 x 32 height map in one of four
// orders chosen by the quadrant of the angle, so that faces further from
// the viewer come first (grid sorting). For each face it reads its four
// corners, top-left, top-right, bottom-left and bottom-right (grid points
// (c,r), (c+1,r), (c,r+1), (c+1,r+1)), passes each through the vertex
// rotator, and computes the z component of the face normal. A face with a
// negative normal is culled when backface_on is set. Otherwise its four
// edges TL-TR, TL-BL, TR-BR and BL-BR are drawn with the line module; each
// plotted pixel that falls inside the 320 x 240 frame is written.
//
// Colour: faces are numbered in drawing order and split into six bands of
// 160 faces; bands 0..5 get colour index 1,2,3,1,2,3, and a band is drawn
// only if z_section[5-band] is set. After the last face, the angle moves
// one degree up (angle_increment) or down (angle_decrement), wrapping in
// 0..359, done is high for that one cycle and the unit is idle again.
//
// Timing: the corner reads are pipelined, RAM and rotator each add one
// clock. From the clock in which start is seen to the clock in which done
// is high, a pass takes 3 + 9*961 clocks plus, for each drawn edge,
// (pixels + 2) clocks. The state sequence follows the report's Draw Faces
// state diagram; the trig-load states, the pipelined reads and the
// on-screen clipping are this design's own choices.
module draw_faces
  import lg_pkg::*;
#(
  parameter int ANGLE_STEP = 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  output logic            done,
  input  logic            angle_increment,
  input  logic            angle_decrement,
  input  logic            backface_on,
  input  logic [5:0]      z_section,
  // height map read port
  output logic [HMAP_AW-1:0] heightmap_addr,
  input  fix_t            heightmap_in,
  // lookup ROMs
  output logic [7:0]      cos_addr,
  output logic [7:0]      sin_addr,
  input  trig_t           cos_in,
  input  trig_t           sin_in,
  // frame buffer write port
  output logic [FB_AW-1:0] frame_address,
  output pixel_t          frame_data,
  output logic            frame_wren,
  // status
  output logic [8:0]      angle,
  output logic            face_culled,   // one-cycle pulse per culled face
  output logic            face_drawn     // one-cycle pulse per drawn face
);

  localparam int LAST = GRID_N - 2;      // last face index along an axis (30)
  localparam int NFACES = (GRID_N - 1) * (GRID_N - 1);

  typedef enum logic [3:0] {
    IDLE, TRIG_ADDR, TRIG_LOAD,
    GET_FACE1, GET_FACE2, GET_FACE3, GET_FACE4, GET_WAIT,
    BACK_FACE, DRAW1, DRAW2, DRAW3, DRAW4, NEXT_FACE, FINISH
  } state_e;

  state_e state;

  trig_t  cos_phi, sin_phi;
  logic [4:0] fc, fr;                    // current face (column, row)
  logic [4:0] inner;                     // faces done in the current line
  logic [9:0] face_count;                // faces visited in this pass
  logic [1:0] quadrant;
  point_t     pts [4];
  logic [3:0] got;                       // which corners have arrived
  logic       line_launched;
  pixel_t     colour;

  // ---- corner fetch pipeline ------------------------------------------------
  logic       issue;
  logic [1:0] issue_idx;
  logic [4:0] issue_c, issue_r;
  logic       rd_valid;
  logic [1:0] rd_idx;
  logic [4:0] rd_c, rd_r;
  logic       rot_valid;
  logic [1:0] rot_idx;
  point_t     rot_pt;

  always_comb begin
    issue     = 1'b0;
    issue_idx = 2'd0;
    case (state)
      GET_FACE1: begin issue = 1'b1; issue_idx = 2'd0; end
      GET_FACE2: begin issue = 1'b1; issue_idx = 2'd1; end
      GET_FACE3: begin issue = 1'b1; issue_idx = 2'd2; end
      GET_FACE4: begin issue = 1'b1; issue_idx = 2'd3; end
      default: ;
    endcase
    issue_c = fc + {4'd0, issue_idx[0]};
    issue_r = fr + {4'd0, issue_idx[1]};
    heightmap_addr = {issue_r, issue_c};
  end

  always_ff @(posedge clk) begin
    rd_valid <= issue && !rst;
    rd_idx   <= issue_idx;
    rd_c     <= issue_c;
    rd_r     <= issue_r;
  end

  vertex_rotator u_rot (
    .clk      (clk),
    .in_valid (rd_valid),
    .col      (rd_c),
    .row      (rd_r),
    .z        (heightmap_in),
    .cos_phi  (cos_phi),
    .sin_phi  (sin_phi),
    .in_tag   (rd_idx),
    .out_valid(rot_valid),
    .out_pt   (rot_pt),
    .out_tag  (rot_idx)
  );

  // ---- normal / cull --------------------------------------------------------
  logic signed [2*COORD_W+1:0] normal_z;
  logic cull;

  face_normal u_norm (
    .a          (pts[0]),
    .b          (pts[1]),
    .c          (pts[2]),
    .backface_on(backface_on),
    .normal_z   (normal_z),
    .cull       (cull)
  );

  // ---- line module ----------------------------------------------------------
  logic   line_start, line_busy, line_plot, line_done;
  point_t line_p0, line_p1;
  coord_t line_x, line_y;

  always_comb begin
    line_p0 = pts[0];
    line_p1 = pts[1];
    case (state)
      DRAW1: begin line_p0 = pts[0]; line_p1 = pts[1]; end
      DRAW2: begin line_p0 = pts[0]; line_p1 = pts[2]; end
      DRAW3: begin line_p0 = pts[1]; line_p1 = pts[3]; end
      DRAW4: begin line_p0 = pts[2]; line_p1 = pts[3]; end
      default: ;
    endcase
  end

  assign line_start = (state inside {DRAW1, DRAW2, DRAW3, DRAW4}) && !line_launched;

  line_drawer u_line (
    .clk  (clk),
    .rst  (rst),
    .start(line_start),
    .p0   (line_p0),
    .p1   (line_p1),
    .busy (line_busy),
    .plot (line_plot),
    .x    (line_x),
    .y    (line_y),
    .done (line_done)
  );

  // pixels outside the frame are dropped
  always_comb begin
    logic in_frame;
    in_frame = (line_x >= 0) && (int'(line_x) < FB_W) && (line_y >= 0) && (int'(line_y) < FB_H);
    frame_wren    = line_plot && in_frame;
    frame_address = FB_AW'(int'(line_y) * FB_W + int'(line_x));
    frame_data    = colour;
  end

  // ---- band colour ----------------------------------------------------------
  logic [2:0] band;
  logic       band_on;
  always_comb begin
    band = (face_count >= 10'(5 * 160)) ? 3'd5 : 3'(face_count / 10'd160);
    band_on = z_section[3'd5 - band];
  end

  // ---- trig operands ---------------------------------------------------------
  logic [7:0] trig_index;
  assign trig_index = (angle >= 9'd180) ? 8'(angle - 9'd180) : angle[7:0];
  assign cos_addr   = trig_index;
  assign sin_addr   = trig_index;

  // ---- main FSM ---------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= IDLE;
      angle         <= '0;
      got           <= '0;
      line_launched <= 1'b0;
      face_count    <= '0;
      face_culled   <= 1'b0;
      face_drawn    <= 1'b0;
      fc            <= '0;
      fr            <= '0;
      inner         <= '0;
      quadrant      <= '0;
      colour        <= 2'd1;
      cos_phi       <= '0;
      sin_phi       <= '0;
    end else begin
      face_culled <= 1'b0;
      face_drawn  <= 1'b0;

      if (rot_valid) begin
        pts[rot_idx] <= rot_pt;
        got[rot_idx] <= 1'b1;
      end

      case (state)
        IDLE: if (start) state <= TRIG_ADDR;

        TRIG_ADDR: state <= TRIG_LOAD;     // ROM data valid next cycle

        TRIG_LOAD: begin
          if (angle >= 9'd180) begin
            cos_phi <= -cos_in;
            sin_phi <= -sin_in;
          end else begin
            cos_phi <= cos_in;
            sin_phi <= sin_in;
          end
          // grid sort: start corner of this quadrant
          quadrant   <= 2'(angle / 9'd90);
          unique case (2'(angle / 9'd90))
            2'd0: begin fc <= 5'd0;         fr <= 5'd0;         end
            2'd1: begin fc <= 5'd0;         fr <= 5'(LAST);     end
            2'd2: begin fc <= 5'(LAST);     fr <= 5'(LAST);     end
            2'd3: begin fc <= 5'(LAST);     fr <= 5'd0;         end
          endcase
          inner      <= '0;
          face_count <= '0;
          state      <= GET_FACE1;
        end

        GET_FACE1: begin got <= '0; state <= GET_FACE2; end
        GET_FACE2: state <= GET_FACE3;
        GET_FACE3: state <= GET_FACE4;
        GET_FACE4: state <= GET_WAIT;
        GET_WAIT:  if (got == 4'b1111 && !rot_valid) state <= BACK_FACE;

        BACK_FACE: begin
          unique case (band % 3'd3)
            3'd0:    colour <= 2'd1;
            3'd1:    colour <= 2'd2;
            default: colour <= 2'd3;
          endcase
          if (cull) begin
            face_culled <= 1'b1;
            state       <= NEXT_FACE;
          end else if (band_on) begin
            face_drawn  <= 1'b1;
            state       <= DRAW1;
          end else begin
            state       <= NEXT_FACE;
          end
        end

        DRAW1, DRAW2, DRAW3, DRAW4: begin
          if (!line_launched) begin
            line_launched <= 1'b1;
          end else if (line_done) begin
            line_launched <= 1'b0;
            case (state)
              DRAW1:   state <= DRAW2;
              DRAW2:   state <= DRAW3;
              DRAW3:   state <= DRAW4;
              default: state <= NEXT_FACE;
            endcase
          end
        end

        NEXT_FACE: begin
          face_count <= face_count + 10'd1;
          if (int'(face_count) == NFACES - 1) begin
            state <= FINISH;
          end else begin
            state <= GET_FACE1;
            if (int'(inner) == LAST) begin
              inner <= '0;
              unique case (quadrant)
                2'd0: begin fc <= fc + 5'd1; fr <= 5'd0;     end
                2'd1: begin fr <= fr - 5'd1; fc <= 5'd0;     end
                2'd2: begin fc <= fc - 5'd1; fr <= 5'(LAST); end
                2'd3: begin fr <= fr + 5'd1; fc <= 5'(LAST); end
              endcase
            end else begin
              inner <= inner + 5'd1;
              unique case (quadrant)
                2'd0: fr <= fr + 5'd1;
                2'd1: fc <= fc + 5'd1;
                2'd2: fr <= fr - 5'd1;
                2'd3: fc <= fc - 5'd1;
              endcase
            end
          end
        end

        FINISH: begin
          if (angle_increment && !angle_decrement)
            angle <= (int'(angle) + ANGLE_STEP >= 360) ? 9'(int'(angle) + ANGLE_STEP - 360)
                                                       : 9'(int'(angle) + ANGLE_STEP);
          else if (angle_decrement && !angle_increment)
            angle <= (int'(angle) < ANGLE_STEP) ? 9'(int'(angle) + 360 - ANGLE_STEP)
                                                : 9'(int'(angle) - ANGLE_STEP);
          state <= IDLE;
        end

        default: state <= IDLE;
      endcase
    end
  end

  // done is decoded from the state so that a start held high by the
  // controller is already low again when this unit is back in IDLE
  assign done = (state == FINISH);

  // the line unit only runs inside a draw state
  assert property (@(posedge clk) disable iff (rst)
                   line_plot |-> (state inside {DRAW1, DRAW2, DRAW3, DRAW4}));

endmodule
