// tb_glyph_rom: the registered read and the shape of the glyphs.
// Data must follow the address one cycle later. For each glyph the testbench counts lit pixels
// and checks shape rules that hold for that sign: '+' and 'x' are left-right symmetric, '-' has
// only two rows lit, '=' has four, the blank glyph none, and O and F have their expected top rows.
module tb_glyph_rom;
  import calc_pkg::*;
  logic clk = 0;
  glyph_t glyph = GL_BLANK;
  logic [3:0] row = 0;
  logic [7:0] data;
  int checks = 0, failures = 0;

  glyph_rom dut (.clk, .glyph, .row, .data);

  always #5 clk = ~clk;

  function automatic logic [7:0] mirror(input logic [7:0] v);
    logic [7:0] m;
    for (int i = 0; i < 8; i++) m[i] = v[7 - i];
    return m;
  endfunction

  logic [7:0] img [9][16];

  initial begin
    for (int g = 0; g < 9; g++)
      for (int r = 0; r < 16; r++) begin
        @(posedge clk); glyph <= glyph_t'(g); row <= 4'(r);
        @(posedge clk); #1;
        img[g][r] = data;
      end
    // read latency: change the address and look before the next edge
    @(posedge clk); glyph <= GL_MINUS; row <= 4'd7;
    @(posedge clk); glyph <= GL_BLANK; row <= 4'd7; #1;
    checks++;
    if (data != 8'h7E) begin failures++; $display("FAIL: registered read gave %h", data); end
    begin
      int rows_lit [9];
      for (int g = 0; g < 9; g++) begin
        rows_lit[g] = 0;
        for (int r = 0; r < 16; r++) if (img[g][r] != 0) rows_lit[g]++;
      end
      checks++; if (rows_lit[GL_BLANK] != 0) begin failures++; $display("FAIL: blank"); end
      checks++; if (rows_lit[GL_MINUS] != 2) begin failures++; $display("FAIL: minus rows %0d", rows_lit[GL_MINUS]); end
      checks++; if (rows_lit[GL_EQ] != 4) begin failures++; $display("FAIL: equals rows"); end
      for (int g = 1; g < 9; g++) begin
        checks++;
        if (rows_lit[g] == 0) begin failures++; $display("FAIL: glyph %0d empty", g); end
      end
      for (int r = 0; r < 16; r++) begin
        checks++;
        if (img[GL_PLUS][r] != mirror(img[GL_PLUS][r]) || img[GL_TIMES][r] != mirror(img[GL_TIMES][r])) begin
          failures++; $display("FAIL: + or x not symmetric in row %0d", r);
        end
      end
      checks++;
      if (img[GL_PLUS][7] != 8'h7E || img[GL_PLUS][4] != 8'h18) begin failures++; $display("FAIL: plus shape"); end
      checks++;
      if (img[GL_F][2] != 8'h7E || img[GL_O][2] != 8'h3C || img[GL_O][8] != 8'h66) begin failures++; $display("FAIL: O/F shape"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
