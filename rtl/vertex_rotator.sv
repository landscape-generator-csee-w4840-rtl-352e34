// vertex_rotator: turns one height-map vertex into a screen point.
//
// A vertex is grid point (col, row) with height z (18.18 fixed point).
// Its ground position is gx = ORIGIN + SPACING*col, gy = ORIGIN +
// SPACING*row, a 32 x 32 grid 6 pixels apart centred near the origin.
// The vertex is turned about the vertical axis by the view angle phi and
// then tilted towards the viewer by the fixed angle theta (60 degrees):
//
//   screen_x = gx*cos(phi) - gy*sin(phi)                        + X_OFF
//   screen_y = cos(theta)*(gx*sin(phi) + gy*cos(phi)) - z*sin(theta) + Y_OFF
//
// so that height lifts a point up the screen. The report writes the same
// product of two rotation matrices with the roles of x and y exchanged;
// this form, which its hardware used, keeps height on the vertical axis.
// The two halves are the X and Y coordinate calculators of the face
// drawer. All products are exact; the sums are floored to whole pixels.
//
// Interface: inputs are sampled when in_valid is high; the point appears
// on out_pt with out_valid one clock later, carrying in_tag along.
module vertex_rotator
  import lg_pkg::*;
#(
  parameter int          SPACING   = 6,
  parameter int          ORIGIN    = -96,
  parameter int          X_OFF     = 160,
  parameter int          Y_OFF     = 180,
  parameter logic [19:0] COS_TILT  = 20'h20000,  // cos 60 deg, 0.5
  parameter logic [19:0] SIN_TILT  = 20'h376CF,  // sin 60 deg, 0.866 (227023)
  parameter int          TAG_W     = 2
) (
  input  logic             clk,
  input  logic             in_valid,
  input  logic [4:0]       col,
  input  logic [4:0]       row,
  input  fix_t             z,
  input  trig_t            cos_phi,
  input  trig_t            sin_phi,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output point_t           out_pt,
  output logic [TAG_W-1:0] out_tag
);

  localparam int PW = 64;
  typedef logic signed [PW-1:0] wide_t;

  wide_t gx, gy, rx, ry, sy;

  always_comb begin
    gx = wide_t'(ORIGIN) + wide_t'(SPACING) * wide_t'({1'b0, col});
    gy = wide_t'(ORIGIN) + wide_t'(SPACING) * wide_t'({1'b0, row});
    // rotation about the vertical axis, results carry 18 fraction bits
    rx = gx * wide_t'(cos_phi) - gy * wide_t'(sin_phi);
    ry = gx * wide_t'(sin_phi) + gy * wide_t'(cos_phi);
    // tilt, results carry 36 fraction bits
    sy = ry * wide_t'($signed(COS_TILT)) - wide_t'(z) * wide_t'($signed(SIN_TILT));
  end

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    if (in_valid) begin
      out_pt.x <= COORD_W'((rx >>> FRAC_W) + wide_t'(X_OFF));
      out_pt.y <= COORD_W'((sy >>> (2 * FRAC_W)) + wide_t'(Y_OFF));
      out_tag  <= in_tag;
    end
  end

endmodule
