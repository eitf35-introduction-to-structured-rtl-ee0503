// tb_display_controller: whole VGA frames captured and inspected.
// The display controller is driven by the VGA timing generator; the testbench records every
// visible pixel of a frame (undoing the two-cycle pipeline delay) and then tests chosen pixels:
// the middle of particular segments of particular digits, a lit pixel of the operator glyphs, the
// colours, the decimal point of a square root, the "OF" overflow mark and the typed entry line.
// Expected pixels come from the layout (cells of 32x64 from x = 64, lines at y = 96 and 288) and
// the segment patterns of the digits shown. It also checks that hsync and vsync come out two
// cycles after the timing generator's, and that nothing is lit outside the two text lines.
module tb_display_controller;
  import calc_pkg::*;
  logic clk = 0, rst = 1;
  logic [9:0] hcount, vcount;
  logic hs_raw, vs_raw, blank, frame_start;
  expr_t expr = '0;
  result_fmt_t fmt;
  entry_t entry = '0;
  logic latched = 0;
  logic [2:0] rgb;
  logic hs, vs;
  int checks = 0, failures = 0;

  vga_controller u_vga (.clk, .rst, .hcount, .vcount, .hsync(hs_raw), .vsync(vs_raw), .blank, .frame_start);
  result_formatter u_fmt (.res(expr.res), .fmt);
  display_controller dut (.clk, .rst, .hcount, .vcount, .hsync_in(hs_raw), .vsync_in(vs_raw),
                          .blank_in(blank), .expr, .fmt, .entry, .latched, .rgb, .hsync(hs), .vsync(vs));

  always #5 clk = ~clk;

  logic [2:0] fb [480][640];
  logic [9:0] h1, h2, v1, v2;
  logic hs1, hs2, vs1, vs2, b1, b2;
  int outside_lit = 0, sync_err = 0;

  always @(posedge clk) begin
    h1 <= hcount; h2 <= h1; v1 <= vcount; v2 <= v1;
    hs1 <= hs_raw; hs2 <= hs1; vs1 <= vs_raw; vs2 <= vs1; b1 <= blank; b2 <= b1;
    if (!rst) begin
      if (hs != hs2 || vs != vs2) sync_err++;
      if (!b2) begin
        fb[v2][h2] <= rgb;
        if (rgb != 0 && !((v2 >= 96 && v2 < 160) || (v2 >= 288 && v2 < 352))) outside_lit++;
      end else if (rgb != 0) outside_lit++;
    end
  end

  // segment middles {a..g} inside a cell
  int mx [7] = '{14, 24, 24, 14, 4, 4, 14};
  int my [7] = '{5, 18, 45, 57, 45, 18, 31};
  logic [6:0] pat [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};

  task automatic frame();
    @(posedge clk);
    while (!frame_start) @(posedge clk);
    @(posedge clk);
    while (!frame_start) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  function automatic logic [2:0] px(input int line, input int col, input int x, input int y);
    return fb[(line == 0 ? 96 : 288) + y][64 + 32 * col + x];
  endfunction

  task automatic check_digit(input string what, input int line, input int col, input int d,
                             input logic [2:0] color);
    for (int s = 0; s < 7; s++) begin
      logic [2:0] want;
      want = pat[d][s] ? color : 3'b000;
      checks++;
      if (px(line, col, mx[s], my[s]) != want) begin
        failures++;
        $display("FAIL: %s line %0d cell %0d segment %0d: %b, expected %b", what, line, col, s,
                 px(line, col, mx[s], my[s]), want);
      end
    end
  endtask

  task automatic check_px(input string what, input int line, input int col, input int x,
                          input int y, input logic [2:0] want);
    checks++;
    if (px(line, col, x, y) != want) begin
      failures++; $display("FAIL: %s: %b, expected %b", what, px(line, col, x, y), want);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // 098 + 099 = +197, typing "12"
    expr.shown = 1; expr.a = 98; expr.op = OP_ADD; expr.has_b = 1; expr.b = 99;
    expr.res = '0; expr.res.mag = 197;
    entry.kind = ENTRY_NUMBER; entry.ndigits = 2; entry.digits = {4'd0, 4'd0, 4'd1, 4'd2};
    frame();
    check_digit("a", 0, 0, 0, 3'b010);
    check_digit("a", 0, 1, 9, 3'b010);
    check_digit("a", 0, 2, 8, 3'b010);
    check_px("plus bar", 0, 3, 12, 29, 3'b110);
    check_px("plus gap", 0, 3, 2, 20, 3'b000);
    check_digit("b", 0, 4, 0, 3'b010);
    check_digit("b", 0, 6, 9, 3'b010);
    check_px("equals", 0, 7, 12, 21, 3'b110);
    check_px("sign +", 0, 8, 14, 18, 3'b010);
    check_digit("result", 0, 9, 1, 3'b010);
    check_digit("result", 0, 10, 9, 3'b010);
    check_digit("result", 0, 11, 7, 3'b010);
    check_digit("entry", 1, 0, 1, 3'b111);
    check_digit("entry", 1, 1, 2, 3'b111);
    check_digit("entry end", 1, 2, 8, 3'b000);
    // sqrt(255) = +15.968, latched operator entry
    expr.a = 255; expr.op = OP_SQRT; expr.has_b = 0; expr.b = 0;
    expr.res = '0; expr.res.mag = 15; expr.res.frac = 992; expr.res.has_frac = 1;
    entry = '0; entry.kind = ENTRY_OPERATOR; entry.op = OP_MUL; latched = 1;
    frame();
    check_px("sqrt glyph", 0, 3, 18, 9, 3'b110);
    check_digit("no b", 0, 4, 8, 3'b000);
    check_digit("root", 0, 9, 1, 3'b010);
    check_digit("root", 0, 10, 5, 3'b010);
    check_px("point", 0, 10, 29, 57, 3'b010);
    check_px("no point", 0, 9, 29, 57, 3'b000);
    check_digit("root", 0, 11, 9, 3'b010);
    check_digit("root", 0, 12, 6, 3'b010);
    check_digit("root", 0, 13, 8, 3'b010);
    check_px("times entry", 1, 0, 14, 29, 3'b011);
    // 005 - 200 = -195 and 255 x 255 overflow
    expr.a = 5; expr.op = OP_SUB; expr.has_b = 1; expr.b = 200;
    expr.res = '0; expr.res.mag = 195; expr.res.neg = 1;
    entry = '0; latched = 0;
    frame();
    check_px("minus sign", 0, 8, 14, 29, 3'b010);
    check_px("no plus bar", 0, 8, 14, 18, 3'b000);
    check_digit("result", 0, 9, 1, 3'b010);
    check_digit("entry empty", 1, 0, 8, 3'b000);
    expr.a = 255; expr.op = OP_MUL; expr.b = 255;
    expr.res = '0; expr.res.mag = 16'd65025; expr.res.overflow = 1;
    frame();
    check_px("O", 0, 9, 4, 30, 3'b100);
    check_px("F", 0, 10, 4, 10, 3'b100);
    check_px("no sign", 0, 8, 14, 29, 3'b000);
    check_px("times", 0, 3, 4, 17, 3'b110);
    checks++;
    if (outside_lit != 0) begin failures++; $display("FAIL: %0d pixels lit outside the text", outside_lit); end
    checks++;
    if (sync_err != 0) begin failures++; $display("FAIL: syncs misaligned %0d times", sync_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
