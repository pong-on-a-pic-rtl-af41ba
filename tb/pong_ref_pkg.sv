// pong_ref_pkg: reference model of the Pong picture, for the testbenches.
//
// ref_rgb() returns the {blue, green, red} colour that the display must show
// at active pixel (c, r) for a given set of shape registers. It is written
// straight from the screen description, with plain integer arithmetic, and
// shares no code with the design:
//   ball        inside the circle of radius d/2 centred at corner + d/2, and
//               inside the (d+1)-pixel square from the corner
//   paddles     rectangles corner + width x height
//   lines       rows 76-77 and 478-479 across the screen; columns 320-321 of
//               rows 0-75
//   score bars  rows 20-59, 64 pixels per point, player 1 from the left edge,
//               player 2 from the right edge
//   red = paddles|lines, green = ball|paddles|lines, blue = paddles|lines|bars
package pong_ref_pkg;
  import pong_pkg::*;

  function automatic bit in_rect(int c, int r, int x0, int y0, int w, int h);
    return c >= x0 && c < x0 + w && r >= y0 && r < y0 + h;
  endfunction

  function automatic bit ref_ball(int c, int r, shapes_t s);
    int rad, dx, dy;
    rad = int'(s.ball_width) / 2;
    dx  = c - (int'(s.ballx) + rad);
    dy  = r - (int'(s.bally) + rad);
    return (dx * dx + dy * dy <= rad * rad) &&
           in_rect(c, r, s.ballx, s.bally, s.ball_width + 1, s.ball_width + 1);
  endfunction

  function automatic bit ref_lines(int c, int r, shapes_t s);
    return in_rect(c, r, s.paddle1x, s.paddle1y, s.paddle_width, s.paddle_height) ||
           in_rect(c, r, s.paddle2x, s.paddle2y, s.paddle_width, s.paddle_height) ||
           in_rect(c, r, 0, 76, 640, 2) || in_rect(c, r, 0, 478, 640, 2) ||
           in_rect(c, r, 320, 0, 2, 76);
  endfunction

  function automatic bit ref_bars(int c, int r, shapes_t s);
    int w1, w2;
    w1 = int'(s.score[2:0]) * 64;
    w2 = int'(s.score[5:3]) * 64;
    return in_rect(c, r, 0, 20, w1, 40) || in_rect(c, r, 640 - w2, 20, w2, 40);
  endfunction

  function automatic logic [2:0] ref_rgb(int c, int r, shapes_t s);
    bit l;
    l = ref_lines(c, r, s);
    return {l || ref_bars(c, r, s), l || ref_ball(c, r, s), l};
  endfunction

endpackage
