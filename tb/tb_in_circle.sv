// tb_in_circle: self-checking test of the round-ball test.
// Sweeps every point of a window around balls of several diameters and
// positions and compares with the reference model; also checks the pixel
// count of the 16-pixel ball and that its bounding-box corners are outside.
module tb_in_circle;
  import pong_pkg::*;
  import pong_ref_pkg::*;

  coord_t x, y, x1, y1, d;
  logic   hit;
  int checks = 0, failures = 0;

  in_circle dut (.x(x), .y(y), .x1(x1), .y1(y1), .d(d), .hit(hit));

  function automatic shapes_t ball_at(int bx, int by, int bd);
    shapes_t s = SHAPES_RESET;
    s.ballx = coord_t'(bx); s.bally = coord_t'(by); s.ball_width = coord_t'(bd);
    return s;
  endfunction

  task automatic sweep(int bx, int by, int bd, output int count);
    shapes_t s = ball_at(bx, by, bd);
    count = 0;
    x1 = coord_t'(bx); y1 = coord_t'(by); d = coord_t'(bd);
    for (int py = by - 4; py <= by + bd + 4; py++)
      for (int px = bx - 4; px <= bx + bd + 4; px++) begin
        bit exp;
        if (px < 0 || py < 0 || px > 1023 || py > 1023) continue;
        x = coord_t'(px); y = coord_t'(py);
        #1;
        exp = ref_ball(px, py, s);
        count += int'(hit);
        checks++;
        if (hit !== exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL ball (%0d,%0d) d=%0d at (%0d,%0d): hit=%0b exp=%0b",
                     bx, by, bd, px, py, hit, exp);
        end
      end
  endtask

  task automatic expect_count(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d pixels, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    #1;
    // 16-pixel ball: radius 8, lattice points with dx^2+dy^2 <= 64 number 197.
    sweep(312, 278, 16, n);
    expect_count("d=16 ball", n, 197);
    // Corners of the bounding box are not part of the ball.
    x1 = 312; y1 = 278; d = 16;
    x = 312; y = 278; #1; checks++; if (hit) begin failures++; $display("FAIL corner"); end
    x = 328; y = 294; #1; checks++; if (hit) begin failures++; $display("FAIL corner2"); end
    // Centre is.
    x = 320; y = 286; #1; checks++; if (!hit) begin failures++; $display("FAIL centre"); end
    sweep(0, 0, 16, n);
    sweep(620, 462, 16, n);
    sweep(100, 200, 5, n);
    sweep(40, 90, 31, n);
    sweep(500, 300, 60, n);
    sweep(7, 9, 0, n);
    expect_count("d=0 ball", n, 1);
    for (int i = 0; i < 20; i++)
      sweep($urandom_range(4, 900), $urandom_range(4, 900), $urandom_range(1, 100), n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
