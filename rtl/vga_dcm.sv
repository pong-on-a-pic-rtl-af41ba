// vga_dcm: behavioural model of the FPGA's Digital Clock Manager (not
// synthesizable; on the FPGA this is the vendor's DCM primitive).
//
// The board supplies a 40 MHz clock and VGA 640x480 wants 25.175 MHz; the DCM's
// frequency synthesiser multiplies the input by CLKFX_MULTIPLY/CLKFX_DIVIDE =
// 5/8 and gives 25 MHz, close enough for a monitor. The model measures the
// period of CLKIN_IN on every rising edge and runs:
//   CLK0_OUT   the input clock itself (the 1X feedback output)
//   CLKDV_OUT  a clock CLKDV_DIVIDE times slower than the input
//   CLKFX_OUT  a clock CLKFX_MULTIPLY/CLKFX_DIVIDE times the input frequency
// Outputs are held low while RST_IN is high and until a first input period has
// been measured. LOCKED_OUT rises after LOCK_CYCLES input cycles out of reset
// and falls with RST_IN. Phase alignment between CLKFX_OUT and CLKIN_IN, jitter
// and lock-range limits of the real part are not modelled.
//
// Port names and the 5/8 and divide-by-2 settings are those of the clock
// wizard's configuration in the reference design; the lock delay is this
// model's own choice.
module vga_dcm #(
  parameter int unsigned CLKFX_MULTIPLY = 5,
  parameter int unsigned CLKFX_DIVIDE   = 8,
  parameter int unsigned CLKDV_DIVIDE   = 2,
  parameter int unsigned LOCK_CYCLES    = 16
) (
  input  logic CLKIN_IN,
  input  logic RST_IN,
  output logic CLKDV_OUT,
  output logic CLKFX_OUT,
  output logic CLK0_OUT,
  output logic LOCKED_OUT
);
  timeunit 1ns;
  timeprecision 1ps;

  realtime     t_last;
  realtime     period;
  bit          have_last;
  int unsigned n_in;

  assign CLK0_OUT = CLKIN_IN;

  initial begin
    period     = 0.0;
    t_last     = 0.0;
    have_last  = 1'b0;
    n_in       = 0;
    LOCKED_OUT = 1'b0;
  end

  // Period measurement and lock.
  always @(posedge CLKIN_IN or posedge RST_IN) begin
    if (RST_IN) begin
      have_last  = 1'b0;
      period     = 0.0;
      n_in       = 0;
      LOCKED_OUT = 1'b0;
    end else begin
      if (have_last) period = $realtime - t_last;
      t_last    = $realtime;
      have_last = 1'b1;
      if (n_in < LOCK_CYCLES) n_in = n_in + 1;
      LOCKED_OUT = (n_in >= LOCK_CYCLES);
    end
  end

  // Frequency synthesiser output: half period = T_in * DIVIDE / MULTIPLY / 2.
  initial begin
    CLKFX_OUT = 1'b0;
    forever begin
      if (RST_IN || period == 0.0) begin
        CLKFX_OUT = 1'b0;
        @(posedge CLKIN_IN);
      end else begin
        #(period * CLKFX_DIVIDE / CLKFX_MULTIPLY / 2.0);
        CLKFX_OUT = !CLKFX_OUT && !RST_IN;
      end
    end
  end

  // Divided clock output: half period = T_in * CLKDV_DIVIDE / 2.
  initial begin
    CLKDV_OUT = 1'b0;
    forever begin
      if (RST_IN || period == 0.0) begin
        CLKDV_OUT = 1'b0;
        @(posedge CLKIN_IN);
      end else begin
        #(period * CLKDV_DIVIDE / 2.0);
        CLKDV_OUT = !CLKDV_OUT && !RST_IN;
      end
    end
  end

endmodule
