// tb_vga_signal_gen: self-checking test of the picture generator.
// The testbench runs its own 640x480 timing counters, drives VSync and the
// active-video flag, and writes shape registers over the bus during vertical
// blanking. Three frames are drawn: the reset picture, a mid-game picture and
// one with the ball against the bottom-right corner, large paddles and high
// scores. Every pixel of every frame (and black during blanking) is compared
// with the reference model of the picture.
module tb_vga_signal_gen;
  import pong_pkg::*;
  import pong_ref_pkg::*;

  logic       clk = 0, rst = 1, vsync_n, data_valid;
  bus_word_t  bus;
  logic [2:0] rgb;
  int checks = 0, failures = 0;
  int n_ball = 0, n_white = 0, n_blue = 0;

  vga_signal_gen dut (.clk(clk), .rst(rst), .vsync_n(vsync_n),
                      .data_valid(data_valid), .bus(bus), .rgb(rgb));

  always #5 clk = !clk;

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Words to send before each frame: {code, value}.
  typedef struct { logic [5:0] code; int value; } wr_t;
  wr_t frame_writes [3][$];

  shapes_t expect_s;

  function automatic shapes_t apply(shapes_t s, logic [5:0] c, int v);
    case (c)
      6'b111000: s.paddle1x = coord_t'(v);
      6'b111001: s.paddle2x = coord_t'(v);
      6'b110000: s.paddle1y = coord_t'(v);
      6'b110001: s.paddle2y = coord_t'(v);
      6'b101000: s.ballx = coord_t'(v);
      6'b101001: s.bally = coord_t'(v);
      6'b110010: s.paddle_width = coord_t'(v);
      6'b110011: s.paddle_height = coord_t'(v);
      6'b101010: s.ball_width = coord_t'(v);
      6'b101011: s.ball_height = coord_t'(v);
      6'b100100: s.score = coord_t'(v);
      default: ;
    endcase
    return s;
  endfunction

  initial begin
    frame_writes[1] = '{'{6'b111000, 0}, '{6'b111001, 635}, '{6'b110000, 150},
                        '{6'b110001, 300}, '{6'b101000, 312}, '{6'b101001, 278},
                        '{6'b110010, 5}, '{6'b110011, 100}, '{6'b101010, 16},
                        '{6'b101011, 16}, '{6'b100100, (3 << 3) | 2}};
    frame_writes[2] = '{'{6'b000000, 999}, '{6'b101000, 624}, '{6'b101001, 464},
                        '{6'b110010, 10}, '{6'b110011, 50}, '{6'b110000, 78},
                        '{6'b111001, 630}, '{6'b110001, 428}, '{6'b101010, 15},
                        '{6'b100100, (7 << 3) | 5}, '{6'b011111, 1}};
  end

  initial begin
    int wi;
    bus = '0;
    vsync_n = 1; data_valid = 0;
    expect_s = '{paddle1x: 0, paddle2x: 635, paddle1y: 0, paddle2y: 0, ballx: 320,
                 bally: 240, paddle_width: 5, paddle_height: 100, ball_width: 5,
                 ball_height: 10, score: 0};
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 3; f++) begin
      wi = 0;
      for (int v = 0; v < 525; v++) begin
        for (int h = 0; h < 800; h++) begin
          @(negedge clk);
          // Bus writes early in the frame (lines 5..30, before active video).
          if (v >= 5 && h == 0 && wi < frame_writes[f].size()) begin
            bus = {frame_writes[f][wi].code, coord_t'(frame_writes[f][wi].value)};
            expect_s = apply(expect_s, frame_writes[f][wi].code, frame_writes[f][wi].value);
            wi++;
          end
          vsync_n    = !(v >= 2 && v < 4);
          data_valid = (h >= 152 && h < 792) && (v >= 37 && v < 517);
          #1;
          begin
            logic [2:0] exp;
            exp = data_valid ? ref_rgb(h - 152, v - 37, expect_s) : 3'b000;
            checks++;
            if (rgb !== exp) begin
              failures++;
              if (failures < 20)
                $display("FAIL frame %0d pixel (%0d,%0d): rgb=%b expected %b",
                         f, h - 152, v - 37, rgb, exp);
            end
            if (rgb == 3'b010) n_ball++;
            if (rgb == 3'b111) n_white++;
            if (rgb == 3'b100) n_blue++;
          end
        end
      end
    end
    // Each kind of pixel must have appeared.
    checks += 3;
    if (n_ball == 0)  begin failures++; $display("FAIL no ball pixels"); end
    if (n_white == 0) begin failures++; $display("FAIL no white pixels"); end
    if (n_blue == 0)  begin failures++; $display("FAIL no score pixels"); end
    $display("ball pixels %0d, white %0d, score bar %0d", n_ball, n_white, n_blue);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
