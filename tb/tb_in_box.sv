// tb_in_box: self-checking test of the rectangle test.
// Corner and edge points of fixed rectangles, then random rectangles and
// points (including rectangles that reach past coordinate 1023), compared with
// an integer-arithmetic reference.
module tb_in_box;
  import pong_pkg::*;

  coord_t x, y, x1, y1, w, h;
  logic   hit;
  int checks = 0, failures = 0;

  in_box dut (.x(x), .y(y), .x1(x1), .y1(y1), .width(w), .height(h), .hit(hit));

  task automatic check(int px, int py, int bx, int by, int bw, int bh);
    bit exp;
    x = coord_t'(px); y = coord_t'(py); x1 = coord_t'(bx); y1 = coord_t'(by);
    w = coord_t'(bw); h = coord_t'(bh);
    #1;
    exp = px >= bx && px < bx + bw && py >= by && py < by + bh;
    checks++;
    if (hit !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL p=(%0d,%0d) box=(%0d,%0d %0dx%0d) hit=%0b exp=%0b",
                 px, py, bx, by, bw, bh, hit, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    // Paddle-sized box at (635,78), 5x100: its four corners and just outside.
    check(635, 78, 635, 78, 5, 100);  check(639, 177, 635, 78, 5, 100);
    check(634, 78, 635, 78, 5, 100);  check(640, 78, 635, 78, 5, 100);
    check(635, 77, 635, 78, 5, 100);  check(635, 178, 635, 78, 5, 100);
    // Empty box.
    check(10, 10, 10, 10, 0, 5);
    // Box reaching past 1023 must not wrap.
    check(1023, 5, 1000, 0, 100, 10); check(3, 5, 1000, 0, 100, 10);
    for (int i = 0; i < 20000; i++) begin
      int bx, by;
      bx = $urandom_range(0, 1023); by = $urandom_range(0, 1023);
      check((i % 4 == 0) ? bx + $urandom_range(0, 40) - 20 & 1023 : $urandom_range(0, 1023),
            (i % 4 == 0) ? by + $urandom_range(0, 40) - 20 & 1023 : $urandom_range(0, 1023),
            bx, by, $urandom_range(0, 300), $urandom_range(0, 300));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
