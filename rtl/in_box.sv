// in_box: does the point (x,y) lie in a rectangle?
//
// The rectangle has its upper-left corner at (x1,y1) and covers width columns
// and height rows, so the test is x1 <= x < x1+width and y1 <= y < y1+height.
// The right and bottom edges are computed one bit wider than the coordinates,
// so a rectangle that ends at or past 1024 does not wrap around to the left or
// the top of the screen. Purely combinational.
//
// The test itself follows the reference design; the extra carry bit is this
// design's own (the reference kept the sum at 10 bits).
module in_box
  import pong_pkg::*;
(
  input  coord_t x,
  input  coord_t y,
  input  coord_t x1,
  input  coord_t y1,
  input  coord_t width,
  input  coord_t height,
  output logic   hit
);

  logic [COORD_W:0] x2, y2;

  always_comb begin
    x2     = {1'b0, x1} + {1'b0, width};
    y2     = {1'b0, y1} + {1'b0, height};
    hit = (x >= x1) && ({1'b0, x} < x2) && (y >= y1) && ({1'b0, y} < y2);
  end

endmodule
