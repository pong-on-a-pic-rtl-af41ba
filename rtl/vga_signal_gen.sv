// vga_signal_gen: draws the Pong screen, one pixel per clock.
//
// A row_col_counter gives the position of the current pixel and a data_read
// holds the shape registers sent by the game controller. Each shape is a
// combinational hit-test on (col,row):
//   ball          in_circle, corner (ballx,bally), diameter ball_width
//   paddle 1, 2   in_box, corner (paddleNx,paddleNy), paddle_width x paddle_height
//   top line      in_box (0,76) 640x2     bottom line  in_box (0,478) 640x2
//   centre mark   in_box (320,0) 2x76, above the play area
//   score bars    in_box, rows 20..59; player 1 grows from the left edge,
//                 player 2 from the right edge, 64 pixels per point
// The tests are OR-ed into the three colour bits and gated by data_valid, so
// the output is black during blanking:
//   red   = paddles | lines
//   green = ball | paddles | lines
//   blue  = paddles | lines | score bars
// Paddles and lines are therefore white, the ball green and the score bars blue.
// The score register holds player 1 in bits [2:0] and player 2 in bits [5:3].
//
// Interface: clk pixel clock, rst asynchronous reset of the shape registers,
// vsync_n and data_valid from vga_sync_gen, bus the 16-bit word from the game
// controller. rgb is {blue, green, red} and is combinational from the
// registered (col,row), so it belongs to the pixel selected by the data_valid
// of the same cycle. Only ball_width is used for the round ball; ball_height
// is stored but, as in the reference design, not drawn with.
//
// Shapes, geometry and colours follow the reference design.
module vga_signal_gen
  import pong_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      vsync_n,
  input  logic      data_valid,
  input  bus_word_t bus,
  output logic [2:0] rgb
);

  coord_t  col, row;
  shapes_t sh;
  coord_t  score1_w, score2_w, score2_x;
  logic in_ball, in_paddle1, in_paddle2, in_top, in_bottom, in_center;
  logic in_score1, in_score2, lines;

  row_col_counter u_pos (
    .clk(clk), .vsync_n(vsync_n), .data_valid(data_valid), .col(col), .row(row)
  );

  data_read #(.SYNC_STAGES(SYNC_STAGES)) u_regs (
    .clk(clk), .rst(rst), .bus(bus), .shapes(sh)
  );

  in_circle u_ball (
    .x(col), .y(row), .x1(sh.ballx), .y1(sh.bally), .d(sh.ball_width),
    .hit(in_ball)
  );
  in_box u_paddle1 (
    .x(col), .y(row), .x1(sh.paddle1x), .y1(sh.paddle1y),
    .width(sh.paddle_width), .height(sh.paddle_height), .hit(in_paddle1)
  );
  in_box u_paddle2 (
    .x(col), .y(row), .x1(sh.paddle2x), .y1(sh.paddle2y),
    .width(sh.paddle_width), .height(sh.paddle_height), .hit(in_paddle2)
  );
  in_box u_top (
    .x(col), .y(row), .x1(coord_t'(0)), .y1(coord_t'(LINE_TOP_Y)),
    .width(coord_t'(H_ACTIVE)), .height(coord_t'(LINE_THICK)), .hit(in_top)
  );
  in_box u_bottom (
    .x(col), .y(row), .x1(coord_t'(0)), .y1(coord_t'(LINE_BOTTOM_Y)),
    .width(coord_t'(H_ACTIVE)), .height(coord_t'(LINE_THICK)), .hit(in_bottom)
  );
  in_box u_center (
    .x(col), .y(row), .x1(coord_t'(CENTER_X)), .y1(coord_t'(0)),
    .width(coord_t'(LINE_THICK)), .height(coord_t'(LINE_TOP_Y)), .hit(in_center)
  );

  always_comb begin
    score1_w = coord_t'(sh.score[2:0]) * coord_t'(SCORE_UNIT);
    score2_w = coord_t'(sh.score[5:3]) * coord_t'(SCORE_UNIT);
    score2_x = coord_t'(H_ACTIVE) - score2_w;
  end

  in_box u_score1 (
    .x(col), .y(row), .x1(coord_t'(0)), .y1(coord_t'(SCORE_Y)),
    .width(score1_w), .height(coord_t'(SCORE_H)), .hit(in_score1)
  );
  in_box u_score2 (
    .x(col), .y(row), .x1(score2_x), .y1(coord_t'(SCORE_Y)),
    .width(score2_w), .height(coord_t'(SCORE_H)), .hit(in_score2)
  );

  always_comb begin
    lines  = in_paddle1 || in_paddle2 || in_top || in_bottom || in_center;
    rgb[0] = lines && data_valid;
    rgb[1] = (in_ball || lines) && data_valid;
    rgb[2] = (lines || in_score1 || in_score2) && data_valid;
  end

endmodule
