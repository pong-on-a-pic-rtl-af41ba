// in_circle: does the point (x,y) lie in the round ball?
//
// The ball is given by the upper-left corner (x1,y1) of its bounding square and
// its diameter d. Its radius is r = d/2 and its centre (x1+r, y1+r). A point is
// inside when (x-xc)^2 + (y-yc)^2 <= r^2 AND the point also lies in the square
// of side d+1 starting at (x1,y1). The distance test is done with signed
// differences and full-width products; the box test is kept as the guard that
// removes everything outside the ball's neighbourhood, as in the reference
// design, where it suppressed the false shapes that product overflow drew far
// from the ball. Purely combinational.
//
// Following the reference: the r = d>>1 radius, the centre at corner + r and
// the (d+1)-square guard built from an in_box. This design's own choice: the
// products are computed without overflow (2*COORD_W+2 bits).
module in_circle
  import pong_pkg::*;
(
  input  coord_t x,
  input  coord_t y,
  input  coord_t x1,
  input  coord_t y1,
  input  coord_t d,
  output logic   hit
);

  localparam int unsigned PW = 2 * COORD_W + 4;

  coord_t                    r;
  coord_t                    d1;
  logic signed [COORD_W+1:0] dx, dy;
  logic signed [PW-1:0]      dxe, dye;
  logic        [PW-1:0]      dist2, r2;
  logic                      box_in;

  always_comb begin
    r     = d >> 1;
    d1    = d + 1'b1;
    dx    = $signed({2'b00, x}) - $signed({2'b00, x1}) - $signed({2'b00, r});
    dy    = $signed({2'b00, y}) - $signed({2'b00, y1}) - $signed({2'b00, r});
    dxe   = PW'(dx);
    dye   = PW'(dy);
    dist2 = unsigned'(dxe * dxe) + unsigned'(dye * dye);
    r2    = PW'(r) * PW'(r);
  end

  in_box u_bounds (
    .x(x), .y(y), .x1(x1), .y1(y1), .width(d1), .height(d1), .hit(box_in)
  );

  assign hit = box_in && (dist2 <= r2);

endmodule
