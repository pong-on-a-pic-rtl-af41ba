// tb_row_col_counter: self-checking test of the pixel position counters.
// Drives a miniature frame (lines of 14 clocks with 8 active pixels, 2 sync
// lines, 6 active lines, a few blank ones) with ACTIVE_COLS = 8, and checks on
// every clock that col is the index of the active pixel in its line and row
// the index of the active line in its frame. Three frames are run, so the
// clearing of row by VSync is exercised.
module tb_row_col_counter;
  import pong_pkg::*;
  localparam int COLS = 8;
  logic   clk = 0, vsync_n = 1, data_valid = 0;
  coord_t col, row;
  int checks = 0, failures = 0;
  int exp_row, exp_col;

  row_col_counter #(.ACTIVE_COLS(COLS)) dut (
    .clk(clk), .vsync_n(vsync_n), .data_valid(data_valid), .col(col), .row(row)
  );

  always #5 clk = !clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Line layout: 3 blank clocks, 8 active, 3 blank. Frame: 2 sync lines,
    // 2 blank, 6 active, 1 blank.
    for (int f = 0; f < 3; f++) begin
      for (int l = 0; l < 11; l++) begin
        for (int h = 0; h < 14; h++) begin
          @(negedge clk);
          vsync_n    = !(l < 2);
          data_valid = (l >= 4 && l < 10) && (h >= 3 && h < 3 + COLS);
          #1;
          // Frame 0 starts from unknown counter values: check from frame 1
          // on, and on frame 0 from the first active line after VSync.
          if (data_valid && !(f == 0 && l < 4)) begin
            checks += 2;
            if (int'(col) != h - 3) begin
              failures++;
              $display("FAIL col f%0d l%0d h%0d: %0d", f, l, h, col);
            end
            if (int'(row) != l - 4) begin
              failures++;
              $display("FAIL row f%0d l%0d h%0d: %0d", f, l, h, row);
            end
          end
          if (!data_valid && h != 3 + COLS && !(f == 0 && l < 1)) begin
            // One clock after active video ends col is back at 0.
            checks++;
            if (col != 0) begin
              failures++;
              $display("FAIL col not cleared f%0d l%0d h%0d: %0d", f, l, h, col);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
