// pic_model: behavioural model of the game controller that drives the display
// (not synthesizable; in the real system this is a microcontroller program).
//
// It plays a game of Pong and sends the shapes over the 16-bit port. Game
// state follows the game rules of the system: ball position and velocity in
// fixed point with 4 fractional bits, serve from the middle of the 640x400
// table (which starts at row 78) at 1 pixel per step in x and y; the ball
// bounces off the top and bottom of the table; at a paddle it reverses its x
// velocity, gains 4/16 pixel per step of x speed and 4/16 of y speed per pixel
// the paddle moved over the last two steps; a ball that reaches a side without
// a paddle gives the other player a point and a new serve (towards the player
// who lost the point after player 1 scored); at 5 points both scores restart.
// After every point the fixed sizes and positions and the score are sent again.
//
// Each word goes out in three port writes, T_WRITE apart: the upper byte
// (code) to NONE, then the lower data byte, then the code together with data
// bits [9:8]. 'sent' holds every value sent so far, for the checker.
//
// Stimulus choices of this model: the paddles are not read from knobs. Paddle
// 1 follows the ball except at a score of 1:0, when it waits at the bottom;
// paddle 2 follows it only in the first rally of a game and otherwise waits at
// the top. So both paddles hit the ball, both players score and full games are
// played quickly. Game steps are made in
// batches of STEPS_PER_UPDATE, one batch per rising edge of 'update', and the
// positions are sent after each batch; the pauses after a point are counted in
// batches (PAUSE_UPDATES, and WIN_PAUSE_UPDATES after a won game).
module pic_model
  import pong_pkg::*;
#(
  parameter int    STEPS_PER_UPDATE  = 64,
  parameter int    PAUSE_UPDATES     = 1,
  parameter int    WIN_PAUSE_UPDATES = 2,
  parameter real   T_WRITE           = 200.0   // ns between port writes
) (
  input  logic        update,
  output logic [15:0] port,
  output shapes_t     sent,
  output logic        busy
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int TABLE_W = 640, TABLE_H = 400, TABLE_Y0 = 78;
  localparam int PADDLE_W = 5, PADDLE_H = 100, BALL = 16;

  int ballx, bally, vx, vy;                  // fixed point, 4 fractional bits
  int paddle1, paddle2, old1 [2], old2 [2];
  int score1, score2;
  int pause;
  // Event counters for the checker.
  int hits1 = 0, hits2 = 0, points1 = 0, points2 = 0, wall_bounces = 0;
  int games = 0, rally_hits2 = 0;
  int words [64];

  task automatic send(logic [7:0] code, int data);
    port[15:8] = 8'h00;
    #(T_WRITE);
    port[7:0] = 8'(data);
    #(T_WRITE);
    port[15:8] = code | 8'((data >> 8) & 3);
    #(T_WRITE);
    words[code[7:2]]++;
    case (code[7:2])
      6'b111000: sent.paddle1x = coord_t'(data);
      6'b111001: sent.paddle2x = coord_t'(data);
      6'b110000: sent.paddle1y = coord_t'(data);
      6'b110001: sent.paddle2y = coord_t'(data);
      6'b101000: sent.ballx = coord_t'(data);
      6'b101001: sent.bally = coord_t'(data);
      6'b110010: sent.paddle_width = coord_t'(data);
      6'b110011: sent.paddle_height = coord_t'(data);
      6'b101010: sent.ball_width = coord_t'(data);
      6'b101011: sent.ball_height = coord_t'(data);
      6'b100100: sent.score = coord_t'(data);
      default: ;
    endcase
  endtask

  task automatic serve_and_score(int player);   // 0: player 1, 1: player 2, 2: reset
    ballx = ((TABLE_W + BALL) >> 1) << 4;
    bally = (TABLE_Y0 + ((TABLE_H + BALL) >> 1)) << 4;
    vx = 16;
    vy = 16;
    rally_hits2 = 0;
    if (player == 0) begin score1++; points1++; vx = -vx; end
    else if (player == 1) begin score2++; points2++; end
    else begin score1 = 0; score2 = 0; end
    send(8'he0, 0);
    send(8'he4, TABLE_W - PADDLE_W);
    send(8'hc8, PADDLE_W);
    send(8'hcc, PADDLE_H);
    send(8'ha8, BALL);
    send(8'hac, BALL);
    send(8'h90, (score2 << 3) | score1);
    pause = PAUSE_UPDATES;
    if (score1 >= 5 || score2 >= 5) begin
      games++;
      score1 = 0;
      score2 = 0;
      pause = PAUSE_UPDATES + WIN_PAUSE_UPDATES;
    end
  endtask

  function automatic int clamp_paddle(int y);
    if (y < TABLE_Y0) return TABLE_Y0;
    if (y > TABLE_Y0 + TABLE_H - PADDLE_H) return TABLE_Y0 + TABLE_H - PADDLE_H;
    return y;
  endfunction

  task automatic game_step();
    int bxr, byr, d1, d2;
    // Paddle positions (stand-in for the knobs).
    paddle1 = (score1 == 1 && score2 == 0)
            ? TABLE_Y0 + TABLE_H - PADDLE_H : clamp_paddle((bally >>> 4) + BALL / 2 - PADDLE_H / 2);
    paddle2 = (rally_hits2 == 0 && score1 + score2 == 0)
            ? clamp_paddle((bally >>> 4) + BALL / 2 - PADDLE_H / 2) : TABLE_Y0;
    old1[1] = old1[0]; old2[1] = old2[0];
    old1[0] = paddle1; old2[0] = paddle2;
    d1 = paddle1 - old1[1];
    d2 = paddle2 - old2[1];
    ballx += vx;
    bally += vy;
    bxr = ballx >>> 4;
    byr = bally >>> 4;
    if (bxr <= PADDLE_W && vx < 0) begin
      if (byr + BALL >= paddle1 && byr <= paddle1 + PADDLE_H) begin
        vx = -vx + 4; vy += 4 * d1; hits1++;
      end else serve_and_score(1);
    end
    if (bxr >= TABLE_W - PADDLE_W - BALL && vx > 0) begin
      if (byr + BALL >= paddle2 && byr <= paddle2 + PADDLE_H) begin
        vx = -vx - 4; vy += 4 * d2; hits2++; rally_hits2++;
      end else serve_and_score(0);
    end
    if (byr <= TABLE_Y0 && vy < 0) begin vy = -vy; wall_bounces++; end
    if (byr >= TABLE_Y0 + TABLE_H - BALL && vy > 0) begin vy = -vy; wall_bounces++; end
  endtask

  initial begin
    port = '0;
    busy = 1'b0;
    sent = SHAPES_RESET;
    foreach (words[i]) words[i] = 0;
    old1 = '{0, 0}; old2 = '{0, 0};
    paddle1 = TABLE_Y0; paddle2 = TABLE_Y0;
    @(posedge update);
    busy = 1'b1;
    serve_and_score(2);
    send(8'hc0, paddle1);
    send(8'hc4, paddle2);
    send(8'ha0, ballx >>> 4);
    send(8'ha4, bally >>> 4);
    busy = 1'b0;
    forever begin
      @(posedge update);
      busy = 1'b1;
      if (pause > 0) pause--;
      else for (int s = 0; s < STEPS_PER_UPDATE && pause == 0; s++) game_step();
      send(8'hc0, paddle1);
      send(8'hc4, paddle2);
      send(8'ha0, ballx >>> 4);
      send(8'ha4, bally >>> 4);
      busy = 1'b0;
    end
  end

endmodule
