// vga_sync_gen: VGA horizontal/vertical timing generator.
//
// A horizontal counter runs over the pixel clocks of one line (0..H_TOTAL-1)
// and a vertical counter over the lines of one frame (0..V_TOTAL-1). Both sync
// pulses are active low and decoded from the counters: a line is front porch,
// sync pulse, back porch, left border, active video, right border, and a frame
// is laid out the same way in lines. With the default 640x480 numbers HSync is
// low for counts 8..103, pixels are active for counts 152..791, VSync is low
// for lines 2..3 and lines 37..516 are active.
//
// The vertical counter advances at the start of each HSync pulse (the clock
// edge on which the horizontal count becomes H_FRONT), so every VSync edge lines
// up with an HSync falling edge. This is done with a clock enable in the single
// pixel-clock domain rather than by clocking the counter from HSync itself.
//
// Interface: clk is the pixel clock (25 MHz, standing in for 25.175 MHz), rst
// is a synchronous active-high reset that sets both counters to zero.
// hsync_n, vsync_n and data_valid are decoded combinationally from the counter
// registers, so they change right after the clock edge that moves the counters.
// data_valid is high while both counters are in their active ranges.
//
// The timing values follow the standard table of the design; the counter
// structure and the choice of the HSync falling edge for the line step follow
// the reference design. The single-clock rewrite is this design's own.
module vga_sync_gen
  import pong_pkg::*;
#(
  parameter int unsigned HFRONT  = H_FRONT,
  parameter int unsigned HSYNC   = H_SYNC,
  parameter int unsigned HBACK   = H_BACK,
  parameter int unsigned HBORDER = H_BORDER,
  parameter int unsigned HACTIVE = H_ACTIVE,
  parameter int unsigned HTOTAL  = H_TOTAL,
  parameter int unsigned VFRONT  = V_FRONT,
  parameter int unsigned VSYNC   = V_SYNC,
  parameter int unsigned VBACK   = V_BACK,
  parameter int unsigned VBORDER = V_BORDER,
  parameter int unsigned VACTIVE = V_ACTIVE,
  parameter int unsigned VTOTAL  = V_TOTAL
) (
  input  logic clk,
  input  logic rst,
  output logic hsync_n,
  output logic vsync_n,
  output logic data_valid
);

  localparam int unsigned HA0 = HFRONT + HSYNC + HBACK + HBORDER;  // first active pixel
  localparam int unsigned VA0 = VFRONT + VSYNC + VBACK + VBORDER;  // first active line

  logic [$clog2(HTOTAL)-1:0] hcnt;
  logic [$clog2(VTOTAL)-1:0] vcnt;
  logic hdata, vdata;
  int unsigned h, v;

  assign h = int'(hcnt);
  assign v = int'(vcnt);

  always_ff @(posedge clk) begin
    if (rst) begin
      hcnt <= '0;
      vcnt <= '0;
    end else begin
      hcnt <= (h == HTOTAL - 1) ? '0 : hcnt + 1'b1;
      if (h == HFRONT - 1)
        vcnt <= (v == VTOTAL - 1) ? '0 : vcnt + 1'b1;
    end
  end

  always_comb begin
    hsync_n    = !(h >= HFRONT && h < HFRONT + HSYNC);
    vsync_n    = !(v >= VFRONT && v < VFRONT + VSYNC);
    hdata      = h >= HA0 && h < HA0 + HACTIVE;
    vdata      = v >= VA0 && v < VA0 + VACTIVE;
    data_valid = hdata && vdata;
  end

  // Active video never overlaps a sync pulse.
  a_no_sync_in_active: assert property (@(posedge clk) disable iff (rst)
    data_valid |-> (hsync_n && vsync_n));

endmodule
