// pong_vga_top: FPGA side of a two-player Pong game shown on a 640x480 VGA
// monitor.
//
// The game itself (paddle reading, ball motion, collisions, score) runs on a
// microcontroller, which sends the position and size of every shape over a
// 16-bit parallel bus. This block turns those numbers into a picture:
//   vga_dcm         40 MHz board clock -> 25 MHz pixel clock (x5/8)
//   vga_sync_gen    HSync, VSync and the active-video flag
//   vga_signal_gen  pixel position, shape registers, shape tests, RGB
//
// Interface: clk is the 40 MHz board clock and reset an active-high reset of
// the whole block. data is the bus from the microcontroller: [15:10] control
// code (bit 15 set for a valid word), [9:0] value. hsync_n and vsync_n are the
// active-low sync outputs and rgb is {blue, green, red}, one bit per colour,
// wired straight to the VGA connector (R, G, B on connector pins 1, 2, 3,
// HSync on 13, VSync on 14). All three are produced in the 25 MHz domain.
//
// The pixel-clock logic is held in reset while reset is high or the clock
// manager has not locked; that reset is released two pixel clocks after both
// conditions clear (a local reset synchroniser, this design's own choice).
module pong_vga_top
  import pong_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [15:0] data,
  output logic        hsync_n,
  output logic        vsync_n,
  output logic [2:0]  rgb
);

  logic pclk, clkdv_unused, clk0_unused, locked;
  logic data_valid;
  logic [1:0] rst_sync;
  logic prst;

  vga_dcm u_dcm (
    .CLKIN_IN(clk), .RST_IN(reset), .CLKDV_OUT(clkdv_unused),
    .CLKFX_OUT(pclk), .CLK0_OUT(clk0_unused), .LOCKED_OUT(locked)
  );

  // Reset for the pixel-clock domain: asserted at once, released synchronously.
  always_ff @(posedge pclk or posedge reset) begin
    if (reset) rst_sync <= 2'b11;
    else       rst_sync <= {rst_sync[0], !locked};
  end
  assign prst = rst_sync[1];

  vga_sync_gen u_sync (
    .clk(pclk), .rst(prst), .hsync_n(hsync_n), .vsync_n(vsync_n),
    .data_valid(data_valid)
  );

  vga_signal_gen u_signal (
    .clk(pclk), .rst(prst), .vsync_n(vsync_n), .data_valid(data_valid),
    .bus(bus_word_t'(data)), .rgb(rgb)
  );

endmodule
