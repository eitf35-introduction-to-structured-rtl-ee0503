// tb_entry_buffer: typing, saturation and backspace.
// Checks the digits and value after typed numbers ("009" = 9, "1234" saturates to 255, a fifth
// digit is ignored), operator entry, backspace over digits and operators, a digit after an
// operator starting a new number, and clear; then 200 random three-digit numbers.
module tb_entry_buffer;
  import calc_pkg::*;
  logic clk = 0, rst = 1, clear = 0;
  key_event_t key = '0;
  entry_t entry;
  int checks = 0, failures = 0;

  entry_buffer dut (.clk, .rst, .key, .clear, .entry);

  always #5 clk = ~clk;

  task automatic hit(input key_kind_t k, input logic [3:0] d, input alu_op_t o);
    @(posedge clk);
    key <= '{valid: 1'b1, kind: k, digit: d, op: o};
    @(posedge clk);
    key <= '0;
    @(posedge clk);
  endtask
  task automatic digit(input int d); hit(KEY_DIGIT, 4'(d), OP_ADD); endtask
  task automatic bksp(); hit(KEY_BACKSPACE, 0, OP_ADD); endtask

  task automatic expect_num(input string what, input int nd, input int val);
    checks++;
    if (entry.kind != ENTRY_NUMBER || int'(entry.ndigits) != nd || int'(entry.value) != val) begin
      failures++;
      $display("FAIL: %s: kind %0d ndigits %0d value %0d, expected %0d digits value %0d",
               what, entry.kind, entry.ndigits, entry.value, nd, val);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    digit(0); digit(0); digit(9);
    expect_num("009", 3, 9);
    bksp();
    expect_num("00", 2, 0);
    digit(7);
    expect_num("007", 3, 7);
    digit(1); expect_num("0071", 4, 71);
    digit(5); expect_num("fifth digit", 4, 71);
    @(posedge clk) clear <= 1; @(posedge clk) clear <= 0; @(posedge clk);
    checks++;
    if (entry.kind != ENTRY_EMPTY) begin failures++; $display("FAIL: clear"); end
    digit(1); digit(2); digit(3); digit(4);
    expect_num("1234", 4, 255);
    bksp(); bksp(); bksp(); bksp();
    checks++;
    if (entry.kind != ENTRY_EMPTY) begin failures++; $display("FAIL: backspace to empty"); end
    digit(3);
    hit(KEY_OPERATOR, 0, OP_MUL);
    checks++;
    if (entry.kind != ENTRY_OPERATOR || entry.op != OP_MUL) begin failures++; $display("FAIL: operator"); end
    hit(KEY_OPERATOR, 0, OP_MOD3);
    checks++;
    if (entry.kind != ENTRY_OPERATOR || entry.op != OP_MOD3) begin failures++; $display("FAIL: operator change"); end
    bksp();
    checks++;
    if (entry.kind != ENTRY_EMPTY) begin failures++; $display("FAIL: backspace over operator"); end
    hit(KEY_OPERATOR, 0, OP_SUB);
    digit(4);
    expect_num("digit after operator", 1, 4);
    hit(KEY_ENTER, 0, OP_ADD);
    expect_num("enter ignored", 1, 4);
    for (int i = 0; i < 200; i++) begin
      int h, t, u, v;
      @(posedge clk) clear <= 1; @(posedge clk) clear <= 0;
      h = $urandom_range(0, 9); t = $urandom_range(0, 9); u = $urandom_range(0, 9);
      digit(h); digit(t); digit(u);
      v = 100 * h + 10 * t + u;
      expect_num("random", 3, v > 255 ? 255 : v);
      checks++;
      if (entry.digits[2] != 4'(h) || entry.digits[1] != 4'(t) || entry.digits[0] != 4'(u)) begin
        failures++; $display("FAIL: digits of %0d%0d%0d", h, t, u);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
