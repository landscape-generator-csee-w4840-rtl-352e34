// line_drawer: Bresenham line rasteriser, one pixel per clock.
//
// A pulse on start (while idle) latches the two end points p0 and p1.
// From the next cycle on, plot is high for one cycle per pixel and x/y
// give that pixel, beginning at p0 and ending exactly at p1, so a line
// takes max(|dx|,|dy|)+1 cycles. done is a one-cycle pulse in the cycle
// after the last pixel, and the unit is idle again from then on.
//
// It is the integer, all-octant form of Bresenham's method: an error
// term err = dx - |dy| (dx = |x1-x0|) is doubled every step and compared
// with -|dy| and dx to decide whether x, y or both advance. The report
// states the method with a fractional slope and a 0.5 threshold and a
// swap of end points; this integer form plots the same pixels for every
// slope and needs no divider, which is the form its line module used.
// rst returns the unit to idle at once.
module line_drawer
  import lg_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  point_t p0,
  input  point_t p1,
  output logic   busy,
  output logic   plot,
  output coord_t x,
  output coord_t y,
  output logic   done
);

  localparam int EW = COORD_W + 3;   // room for 2*err with no overflow

  typedef enum logic [1:0] {L_IDLE, L_RUN, L_DONE} lstate_e;
  lstate_e state;

  logic signed [EW-1:0] dx, dy, err, e2;  // dy holds -|y1-y0|
  logic                 step_x_pos, step_y_pos;
  coord_t               xe, ye;            // end point
  logic                 last;

  assign e2   = err <<< 1;
  assign last = (x == xe) && (y == ye);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= L_IDLE;
    end else begin
      case (state)
        L_IDLE: if (start) begin
          logic signed [EW-1:0] ddx, ddy;
          ddx = EW'(p1.x) - EW'(p0.x);
          ddy = EW'(p1.y) - EW'(p0.y);
          step_x_pos <= (ddx >= 0);
          step_y_pos <= (ddy >= 0);
          dx  <= (ddx >= 0) ? ddx : -ddx;
          dy  <= (ddy >= 0) ? -ddy : ddy;
          err <= ((ddx >= 0) ? ddx : -ddx) + ((ddy >= 0) ? -ddy : ddy);
          x   <= p0.x;
          y   <= p0.y;
          xe  <= p1.x;
          ye  <= p1.y;
          state <= L_RUN;
        end
        L_RUN: begin
          if (last) begin
            state <= L_DONE;
          end else begin
            logic signed [EW-1:0] nerr;
            nerr = err;
            if (e2 >= dy) begin
              nerr = nerr + dy;
              x <= step_x_pos ? x + coord_t'(1) : x - coord_t'(1);
            end
            if (e2 <= dx) begin
              nerr = nerr + dx;
              y <= step_y_pos ? y + coord_t'(1) : y - coord_t'(1);
            end
            err <= nerr;
          end
        end
        L_DONE: state <= L_IDLE;
        default: state <= L_IDLE;
      endcase
    end
  end

  assign plot = (state == L_RUN);
  assign busy = (state != L_IDLE);
  assign done = (state == L_DONE);

endmodule
