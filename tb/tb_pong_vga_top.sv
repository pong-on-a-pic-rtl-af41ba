// tb_pong_vga_top: end-to-end test of the display side of the Pong game, with
// the design at its default parameters.
//
// A 40 MHz board clock drives the top; a behavioural game controller
// (pic_model) plays Pong and sends shapes over the 16-bit port after every
// VSync pulse. The testbench watches only the top's outputs, clocked by the
// pixel clock the design makes: it rebuilds the beam position from the HSync
// and VSync edges and compares every pixel of every frame with the reference
// picture for the shapes sent so far. It plays until one full game (5 points)
// is over and counts each mechanism: clock manager lock, the 25 MHz pixel
// clock, sync periods, every bus code, NONE words, paddle hits on both sides,
// wall bounces, points for both players, a won game with score restart, the
// round ball and its clipped corners, score bars and the white lines/paddles.
// A mechanism that never happened counts as a failure.
module tb_pong_vga_top;
  import pong_pkg::*;
  import pong_ref_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int MAX_FRAMES = 600;

  logic        clk = 0, reset = 1;
  logic [15:0] data;
  logic        hsync_n, vsync_n;
  logic [2:0]  rgb;
  logic        update = 0, busy;
  shapes_t     sent;
  int checks = 0, failures = 0;

  pong_vga_top dut (.clk(clk), .reset(reset), .data(data), .hsync_n(hsync_n),
                    .vsync_n(vsync_n), .rgb(rgb));

  pic_model pic (.update(update), .port(data), .sent(sent), .busy(busy));

  always #12.5 clk = !clk;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) fail($sformatf("%s never happened", what));
  endtask

  initial begin
    #(MAX_FRAMES * 17.0e6);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Bus monitor: words with the NONE code.
  int none_words = 0;
  logic [5:0] last_code = '1;
  always @(data) begin
    if (data[15:10] == 6'b000000 && last_code != 6'b000000) none_words++;
    last_code = data[15:10];
  end

  // Pixel-clock monitor.
  int h = -1, v = -1, frames = 0, pix_checked = 0;
  int n_ball = 0, n_clip = 0, n_bar = 0, n_white = 0, lock_seen = 0;
  longint pclk_cycles = 0, last_hfall = -1, last_vfall = -1;
  logic ph = 1, pv = 1;
  bit   score_bars_seen [8];

  initial begin
    realtime t0, t1;
    #100 reset = 0;
    wait (dut.locked);
    lock_seen = 1;
    @(posedge dut.pclk) t0 = $realtime;
    repeat (100) @(posedge dut.pclk);
    t1 = $realtime;
    checks++;
    if (t1 - t0 < 3999.0 || t1 - t0 > 4001.0)
      fail($sformatf("pixel clock: 100 cycles in %0.1f ns, expected 4000", t1 - t0));
  end

  always @(negedge dut.pclk) begin
    pclk_cycles++;
    if (h >= 0) h++;
    if (ph && !hsync_n) begin                 // HSync fall: position 8 of a line
      if (last_hfall >= 0) begin
        checks++;
        if (pclk_cycles - last_hfall != 800) fail("HSync period");
      end
      last_hfall = pclk_cycles;
      h = 8;
      if (v >= 0) v++;
    end
    if (pv && !vsync_n) begin                 // VSync fall: line 2 of a frame
      if (last_vfall >= 0) begin
        checks++;
        if (pclk_cycles - last_vfall != 800 * 525) fail("VSync period");
        frames++;
      end
      last_vfall = pclk_cycles;
      v = 2;
      update = 1;                             // the controller sends its update now
    end else if (v > 4) update = 0;
    ph = hsync_n;
    pv = vsync_n;
    if (h >= 0 && v >= 0 && last_vfall >= 0) begin
      logic [2:0] exp;
      bit active;
      active = h >= 152 && h < 792 && v >= 37 && v < 517;
      if (active && busy) fail("controller still sending during active video");
      exp = active ? ref_rgb(h - 152, v - 37, sent) : 3'b000;
      checks++;
      pix_checked++;
      if (rgb !== exp)
        fail($sformatf("frame %0d pixel (%0d,%0d): rgb=%b expected %b",
                       frames, h - 152, v - 37, rgb, exp));
      if (active) begin
        int c, r;
        c = h - 152; r = v - 37;
        if (rgb == 3'b010) n_ball++;
        if (rgb == 3'b111) n_white++;
        if (rgb == 3'b100) n_bar++;
        if (rgb == 3'b100 && r == 40 && c == 0) score_bars_seen[sent.score[2:0]] = 1;
        // A pixel of the ball's bounding square that is not part of the ball.
        if (c >= sent.ballx && c <= sent.ballx + sent.ball_width &&
            r >= sent.bally && r <= sent.bally + sent.ball_width &&
            r > 78 && r < 476 && !ref_ball(c, r, sent) && rgb == 3'b000) n_clip++;
      end
    end
  end

  initial begin
    wait (pic.games >= 1 && frames >= 2 && pic.pause == 0);
    @(posedge vsync_n);
    $display("%0d frames, %0d pixels checked", frames, pix_checked);
    expect_seen("clock manager lock", lock_seen);
    expect_seen("frames", frames);
    expect_seen("code PADDLE1X", pic.words[6'b111000]);
    expect_seen("code PADDLE2X", pic.words[6'b111001]);
    expect_seen("code PADDLE1Y", pic.words[6'b110000]);
    expect_seen("code PADDLE2Y", pic.words[6'b110001]);
    expect_seen("code BALLX", pic.words[6'b101000]);
    expect_seen("code BALLY", pic.words[6'b101001]);
    expect_seen("code PADDLE_WIDTH", pic.words[6'b110010]);
    expect_seen("code PADDLE_HEIGHT", pic.words[6'b110011]);
    expect_seen("code BALL_WIDTH", pic.words[6'b101010]);
    expect_seen("code BALL_HEIGHT", pic.words[6'b101011]);
    expect_seen("code SCORE", pic.words[6'b100100]);
    expect_seen("NONE words on the bus", none_words);
    expect_seen("paddle 1 hits", pic.hits1);
    expect_seen("paddle 2 hits", pic.hits2);
    expect_seen("wall bounces", pic.wall_bounces);
    expect_seen("points player 1", pic.points1);
    expect_seen("points player 2", pic.points2);
    expect_seen("games won, score restart", pic.games);
    expect_seen("ball pixels", n_ball);
    expect_seen("clipped ball corners", n_clip);
    expect_seen("white pixels", n_white);
    expect_seen("score bar pixels", n_bar);
    for (int s = 1; s < 5; s++)
      expect_seen($sformatf("player 1 bar at %0d points", s), int'(score_bars_seen[s]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
