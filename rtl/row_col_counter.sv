// row_col_counter: position of the pixel being drawn.
//
// col counts the active pixels of the current line: it is 0 on the first cycle
// data_valid is high and reaches H_ACTIVE-1 on the last; outside active video
// it is held at 0. row counts completed active lines: it steps on the clock
// edge after the last active pixel of a line (col == ACTIVE_COLS-1 with
// data_valid high) and is cleared while vsync_n is low, so it is 0 on the
// first active line of every frame.
//
// Interface: clk is the pixel clock; data_valid and vsync_n come from the sync
// generator. col and row are registers, aligned with the data_valid the
// generator drives in the same cycle, so a combinational shape test on
// (col,row) gives the colour of the pixel being sent.
//
// The counting scheme follows the reference design, which counted columns a
// second time to find the end of a line; here the end of the line is taken
// from col itself. No reset is needed: both counters are brought to a known
// value by the first blanking interval and the first VSync pulse.
module row_col_counter
  import pong_pkg::*;
#(
  parameter int unsigned ACTIVE_COLS = H_ACTIVE
) (
  input  logic   clk,
  input  logic   vsync_n,
  input  logic   data_valid,
  output coord_t col,
  output coord_t row
);

  always_ff @(posedge clk) begin
    col <= data_valid ? col + 1'b1 : '0;
  end

  always_ff @(posedge clk) begin
    if (!vsync_n)
      row <= '0;
    else if (data_valid && col == coord_t'(ACTIVE_COLS - 1))
      row <= row + 1'b1;
  end

endmodule
