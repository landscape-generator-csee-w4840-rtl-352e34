// face_normal: backface test for one quadrilateral face.
//
// From three screen corners of a face, top-left a, top-right b and
// bottom-left c, it forms the edge vectors u = b - a and v = c - a and
// their cross product's z component, normal_z = ux*vy - uy*vx. A face
// whose normal_z is below zero faces away from the viewer and is culled
// when backface_on is set; a face with normal_z >= 0 is drawn. Purely
// combinational.
module face_normal
  import lg_pkg::*;
(
  input  point_t                       a,
  input  point_t                       b,
  input  point_t                       c,
  input  logic                         backface_on,
  output logic signed [2*COORD_W+1:0]  normal_z,
  output logic                         cull
);

  logic signed [COORD_W:0] ux, uy, vx, vy;

  always_comb begin
    ux = (COORD_W+1)'(b.x) - (COORD_W+1)'(a.x);
    uy = (COORD_W+1)'(b.y) - (COORD_W+1)'(a.y);
    vx = (COORD_W+1)'(c.x) - (COORD_W+1)'(a.x);
    vy = (COORD_W+1)'(c.y) - (COORD_W+1)'(a.y);
    normal_z = (2*COORD_W+2)'(ux * vy) - (2*COORD_W+2)'(uy * vx);
    cull = backface_on && (normal_z < 0);
  end

endmodule
