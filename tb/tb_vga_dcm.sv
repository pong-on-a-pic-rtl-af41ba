// tb_vga_dcm: self-checking test of the clock manager model.
// Drives a 40 MHz clock and checks that LOCKED rises after 16 input cycles,
// that CLKFX is 25 MHz (40 ns period, 20 ns high), CLKDV 20 MHz, CLK0 follows
// the input, that reset stops the outputs and drops LOCKED, and that the
// model follows a change of input frequency (50 MHz in -> 31.25 MHz out).
module tb_vga_dcm;
  timeunit 1ns;
  timeprecision 1ps;

  logic clkin = 0, rst = 1;
  logic clkdv, clkfx, clk0, locked;
  realtime half = 12.5;
  int checks = 0, failures = 0;
  int fx_edges = 0;

  always @(posedge clkfx) fx_edges++;

  vga_dcm dut (.CLKIN_IN(clkin), .RST_IN(rst), .CLKDV_OUT(clkdv),
               .CLKFX_OUT(clkfx), .CLK0_OUT(clk0), .LOCKED_OUT(locked));

  always #(half) clkin = !clkin;

  task automatic near(string what, realtime got, realtime exp);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("FAIL %s: %0.3f ns, expected %0.3f ns", what, got, exp);
    end
  endtask

  task automatic measure(ref logic sig, output realtime period, output realtime high);
    realtime t0, t1, t2;
    @(posedge sig); t0 = $realtime;
    @(negedge sig); t1 = $realtime;
    @(posedge sig); t2 = $realtime;
    period = t2 - t0;
    high   = t1 - t0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime p, h;
    int n;
    #100;
    checks++;
    if (locked || clkfx) begin failures++; $display("FAIL outputs active in reset"); end
    @(negedge clkin) rst = 0;
    n = 0;
    while (!locked) begin @(posedge clkin); n++; #0.1; end
    checks++;
    if (n != 16) begin failures++; $display("FAIL lock after %0d cycles", n); end
    repeat (4) @(posedge clkin);
    measure(clkfx, p, h);  near("CLKFX period", p, 40.0); near("CLKFX high", h, 20.0);
    measure(clkfx, p, h);  near("CLKFX period again", p, 40.0);
    measure(clkdv, p, h);  near("CLKDV period", p, 50.0);
    measure(clk0, p, h);   near("CLK0 period", p, 25.0);
    // Count CLKFX edges over 1 us: 25 of them.
    begin
      int e0;
      e0 = fx_edges;
      #1000;
      checks++;
      if (fx_edges - e0 < 24 || fx_edges - e0 > 26) begin
        failures++; $display("FAIL %0d CLKFX edges in 1 us", fx_edges - e0);
      end
    end
    // Reset stops the outputs.
    @(negedge clkin) rst = 1;
    #200;
    checks++;
    if (locked || clkfx) begin failures++; $display("FAIL outputs active in reset (2)"); end
    // New input frequency: 50 MHz.
    half = 10.0;
    #100;
    @(negedge clkin) rst = 0;
    wait (locked);
    repeat (4) @(posedge clkin);
    measure(clkfx, p, h);  near("CLKFX period at 50 MHz in", p, 32.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
