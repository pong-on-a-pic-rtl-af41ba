// tb_vga_sync_gen: self-checking test of the VGA timing generator at the
// default 640x480 timing. Runs a little over two frames after reset and
// measures, from the outputs only: HSync period (800 clocks) and pulse width
// (96), the first HSync fall 8 clocks after reset, active pixels per line (640,
// starting 144 clocks after the HSync fall), VSync period (525 lines), pulse
// width (2 lines), VSync falling together with HSync, and 480 active lines per
// frame starting 35 lines after the VSync fall.
module tb_vga_sync_gen;
  logic clk = 0, rst = 1;
  logic hsync_n, vsync_n, data_valid;
  int checks = 0, failures = 0;

  vga_sync_gen dut (.clk(clk), .rst(rst), .hsync_n(hsync_n), .vsync_n(vsync_n),
                    .data_valid(data_valid));

  always #20 clk = !clk;

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0, last_hfall = -1, last_vfall = -1, hfall_at_vfall = -1;
  longint dv_first = -1;
  int dv_in_line = 0, lines_active = 0, frames = 0, hfalls = 0;
  int line_since_vfall = -1, first_active_line = -1;
  logic ph = 1, pv = 1, pdv = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // Count clock edges after reset release and sample just after each edge.
    forever begin
      @(posedge clk); cyc++;
      #1;
      if (ph && !hsync_n) begin                       // HSync falling
        if (last_hfall < 0) expect_eq("first HSync fall", cyc, 8);
        else begin
          expect_eq("HSync period", cyc - last_hfall, 800);
          if (line_since_vfall >= 0 && last_vfall >= 0)
            expect_eq("active pixels in line", dv_in_line,
                      (line_since_vfall >= 35 && line_since_vfall < 515) ? 640 : 0);
        end
        if (line_since_vfall >= 0) line_since_vfall++;
        last_hfall = cyc; dv_in_line = 0; hfalls++;
      end
      if (!ph && hsync_n) expect_eq("HSync pulse", cyc - last_hfall, 96);
      if (pv && !vsync_n) begin                       // VSync falling
        expect_eq("VSync falls with HSync", cyc, last_hfall);
        if (last_vfall >= 0) begin
          expect_eq("VSync period", cyc - last_vfall, 525 * 800);
          expect_eq("active lines", lines_active, 480);
          expect_eq("first active line", first_active_line, 35);
          frames++;
        end
        last_vfall = cyc; line_since_vfall = 0; lines_active = 0; first_active_line = -1;
      end
      if (!pv && vsync_n) expect_eq("VSync pulse", cyc - last_vfall, 2 * 800);
      if (data_valid && !pdv) begin
        expect_eq("data_valid start after HSync fall", cyc - last_hfall, 144);
        lines_active++;
        if (first_active_line < 0) first_active_line = line_since_vfall;
      end
      if (data_valid) dv_in_line++;
      ph = hsync_n; pv = vsync_n; pdv = data_valid;
      if (frames == 2 && cyc > last_vfall + 10000) break;
    end
    expect_eq("frames seen", frames, 2);
    // Line 0 starts at reset; the first VSync fall is at the second HSync fall,
    // then two frames and 12 more HSync falls in the last 10000 clocks.
    expect_eq("lines seen", hfalls, 2 + 2 * 525 + 12);
    $display("HSync %0d Hz, VSync %0.2f Hz at a 25 MHz pixel clock",
             25000000 / 800, 25.0e6 / (800.0 * 525.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
