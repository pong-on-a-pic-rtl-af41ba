// pong_pkg: types and constants shared by the Pong VGA display logic.
//
// The display side of the game receives shape positions and sizes from a
// microcontroller over a 16-bit parallel bus. Bits [15:10] of the bus hold a
// control code naming the register to write, bits [9:0] hold the value. Bit 15
// is the "valid" bit: it is set in every code except NONE. The code values are
// those the game firmware uses (its byte values 0xE0, 0xC0, ... shifted right by
// two, because the two data bits [9:8] share the upper port with the code).
//
// The VGA timing numbers are the 640x480 @ 59.94 Hz standard mode, counted in
// pixel clocks per line and in lines per frame, including the 8-pixel/8-line
// borders on each side of the active area. The play-field geometry (line
// positions, score bars) is that of the reference display.
package pong_pkg;

  localparam int unsigned COORD_W = 10;        // width of every coordinate and size
  typedef logic [COORD_W-1:0] coord_t;

  // Control codes carried on bus bits [15:10].
  typedef enum logic [5:0] {
    CODE_NONE          = 6'b000000,
    CODE_SCORE         = 6'b100100,
    CODE_BALLX         = 6'b101000,
    CODE_BALLY         = 6'b101001,
    CODE_BALL_WIDTH    = 6'b101010,
    CODE_BALL_HEIGHT   = 6'b101011,
    CODE_PADDLE1Y      = 6'b110000,
    CODE_PADDLE2Y      = 6'b110001,
    CODE_PADDLE_WIDTH  = 6'b110010,
    CODE_PADDLE_HEIGHT = 6'b110011,
    CODE_PADDLE1X      = 6'b111000,
    CODE_PADDLE2X      = 6'b111001
  } code_e;

  // One word on the microcontroller bus.
  typedef struct packed {
    logic [5:0] code;   // control code, see code_e
    coord_t     value;  // 10-bit payload
  } bus_word_t;

  // Everything the display needs to know about the game.
  typedef struct packed {
    coord_t paddle1x, paddle2x;
    coord_t paddle1y, paddle2y;
    coord_t ballx, bally;
    coord_t paddle_width, paddle_height;
    coord_t ball_width, ball_height;
    coord_t score;      // [2:0] player 1, [5:3] player 2
  } shapes_t;

  // Register values after reset (before the microcontroller has sent anything).
  localparam shapes_t SHAPES_RESET = '{
    paddle1x: 10'd0,   paddle2x: 10'd635,
    paddle1y: 10'd0,   paddle2y: 10'd0,
    ballx: 10'd320,    bally: 10'd240,
    paddle_width: 10'd5, paddle_height: 10'd100,
    ball_width: 10'd5, ball_height: 10'd10,
    score: 10'd0
  };

  // 640x480 VGA timing, in 25.175 MHz pixel clocks (horizontal) and lines
  // (vertical). A line starts with the front porch, then the sync pulse, the
  // back porch, the left border, the active pixels and the right border.
  localparam int unsigned H_FRONT  = 8;
  localparam int unsigned H_SYNC   = 96;
  localparam int unsigned H_BACK   = 40;
  localparam int unsigned H_BORDER = 8;
  localparam int unsigned H_ACTIVE = 640;
  localparam int unsigned H_TOTAL  = 800;
  localparam int unsigned V_FRONT  = 2;
  localparam int unsigned V_SYNC   = 2;
  localparam int unsigned V_BACK   = 25;
  localparam int unsigned V_BORDER = 8;
  localparam int unsigned V_ACTIVE = 480;
  localparam int unsigned V_TOTAL  = 525;

  // Fixed parts of the play field.
  localparam int unsigned LINE_TOP_Y    = 76;   // top line of the play area, 2 rows
  localparam int unsigned LINE_BOTTOM_Y = 478;  // bottom line, 2 rows
  localparam int unsigned LINE_THICK    = 2;
  localparam int unsigned CENTER_X      = 320;  // centre mark above the play area, 2 columns
  localparam int unsigned SCORE_Y       = 20;   // score bars: rows 20..59
  localparam int unsigned SCORE_H       = 40;
  localparam int unsigned SCORE_UNIT    = 64;   // bar length per point

endpackage
