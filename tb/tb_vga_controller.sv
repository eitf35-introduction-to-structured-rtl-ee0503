// tb_vga_controller: one full 640x480@60 frame and the start of the next.
// Counts, per line, the clocks (800), the low hsync clocks (96, starting at pixel 656) and the
// visible clocks (640); per frame the lines (525), the lines with vsync low (2, starting at line
// 490) and the visible lines (480); and checks the frame is 800 * 525 clocks long.
module tb_vga_controller;
  logic clk = 0, rst = 1;
  logic [9:0] hcount, vcount;
  logic hsync, vsync, blank, frame_start;
  int checks = 0, failures = 0;

  vga_controller dut (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank, .frame_start);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int want);
    checks++;
    if (got != want) begin failures++; $display("FAIL: %s = %0d, expected %0d", what, got, want); end
  endtask

  initial begin
    int clocks, vs_lines, vis_lines, lines, first_vs_line;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    while (!frame_start) @(posedge clk);
    clocks = 0; vs_lines = 0; vis_lines = 0; lines = 0; first_vs_line = -1;
    for (int l = 0; l < 525; l++) begin
      int hs_low, vis, first_hs;
      hs_low = 0; vis = 0; first_hs = -1;
      for (int p = 0; p < 800; p++) begin
        if (p == 0) begin
          if (!vsync) begin vs_lines++; if (first_vs_line < 0) first_vs_line = int'(vcount); end
          if (int'(vcount) != l) begin failures++; checks++; $display("FAIL: vcount %0d at line %0d", vcount, l); end
        end
        if (!hsync) begin hs_low++; if (first_hs < 0) first_hs = int'(hcount); end
        if (!blank) vis++;
        clocks++;
        @(posedge clk);
      end
      if (vis > 0) vis_lines++;
      lines++;
      if (l == 0 || l == 300 || l == 524) begin
        check("hsync low clocks", hs_low, 96);
        check("hsync start", first_hs, 656);
        if (l == 0) check("visible pixels", vis, 640);
        if (l == 524) check("visible pixels in blank line", vis, 0);
      end
    end
    check("lines", lines, 525);
    check("vsync lines", vs_lines, 2);
    check("vsync start", first_vs_line, 490);
    check("visible lines", vis_lines, 480);
    check("frame clocks", clocks, 800 * 525);
    check("next frame starts", int'(frame_start), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (900000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
