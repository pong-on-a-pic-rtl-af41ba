// data_read: shape registers written over the microcontroller's parallel bus.
//
// The microcontroller drives a 16-bit bus, {code[5:0], value[9:0]}, whenever it
// likes; it has no clock in common with the display. The bus is sampled on
// every pixel clock through SYNC_STAGES flip-flops, and the sampled word is
// decoded: if its code names one of the eleven shape registers, the 10-bit
// value is written into it; CODE_NONE and any other code write nothing. The
// sender keeps a word on the bus for many pixel clocks, so the same register is
// simply written again with the same value on each of them. The sender first
// puts CODE_NONE on the upper byte, then the low data byte, then code and upper
// data bits together, so the lower byte is never taken with a stale code.
//
// Interface: clk pixel clock, rst asynchronous active-high reset that loads
// SHAPES_RESET (a small ball in the middle, paddles at the two sides, zero
// score). bus is the raw 16-bit input. shapes holds every register; a word
// reaches shapes SYNC_STAGES+1 clock edges after it appears on bus.
//
// The code map, the register set and the reset values follow the reference
// design; the input synchroniser is this design's own addition for an
// asynchronous input (SYNC_STAGES = 0 samples the bus directly, as the
// reference did).
module data_read
  import pong_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic      clk,
  input  logic      rst,
  input  bus_word_t bus,
  output shapes_t   shapes
);

  bus_word_t word;

  if (SYNC_STAGES == 0) begin : g_direct
    assign word = bus;
  end else begin : g_sync
    bus_word_t stage [SYNC_STAGES];
    always_ff @(posedge clk or posedge rst) begin
      if (rst) begin
        for (int i = 0; i < SYNC_STAGES; i++) stage[i] <= '0;
      end else begin
        stage[0] <= bus;
        for (int i = 1; i < SYNC_STAGES; i++) stage[i] <= stage[i-1];
      end
    end
    assign word = stage[SYNC_STAGES-1];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      shapes <= SHAPES_RESET;
    end else begin
      case (word.code)
        CODE_PADDLE1X:      shapes.paddle1x      <= word.value;
        CODE_PADDLE2X:      shapes.paddle2x      <= word.value;
        CODE_PADDLE1Y:      shapes.paddle1y      <= word.value;
        CODE_PADDLE2Y:      shapes.paddle2y      <= word.value;
        CODE_BALLX:         shapes.ballx         <= word.value;
        CODE_BALLY:         shapes.bally         <= word.value;
        CODE_PADDLE_WIDTH:  shapes.paddle_width  <= word.value;
        CODE_PADDLE_HEIGHT: shapes.paddle_height <= word.value;
        CODE_BALL_WIDTH:    shapes.ball_width    <= word.value;
        CODE_BALL_HEIGHT:   shapes.ball_height   <= word.value;
        CODE_SCORE:         shapes.score         <= word.value;
        default: ;
      endcase
    end
  end

endmodule
