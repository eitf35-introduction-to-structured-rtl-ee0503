// tb_key_decoder: feeds scan-code sequences of presses and releases and checks the key events.
// Every press must give one event of the right kind, digit or operator; release codes (F0 xx),
// the E0 prefix and unknown keys must give none.
module tb_key_decoder;
  import calc_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] code = 0;
  logic code_valid = 0;
  key_event_t key;
  int checks = 0, failures = 0;
  key_event_t got [$];

  key_decoder dut (.clk, .rst, .code, .code_valid, .key);

  always #5 clk = ~clk;
  always @(posedge clk) if (key.valid) got.push_back(key);

  task automatic send(input logic [7:0] c);
    @(posedge clk); code <= c; code_valid <= 1;
    @(posedge clk); code_valid <= 0;
    repeat (3) @(posedge clk);
  endtask

  // press and release a key, expect one event
  task automatic press(input logic [7:0] c, input logic ext, input key_kind_t k,
                       input logic [3:0] d, input alu_op_t o);
    got.delete();
    if (ext) send(8'hE0);
    send(c);
    if (ext) send(8'hE0);
    send(8'hF0);
    send(c);
    checks++;
    if (got.size() != 1 || got[0].kind != k || (k == KEY_DIGIT && got[0].digit != d)
        || (k == KEY_OPERATOR && got[0].op != o)) begin
      failures++;
      $display("FAIL: code %h gave %0d events", c, got.size());
    end
  endtask

  initial begin
    logic [7:0] row [10] = '{8'h45, 8'h16, 8'h1E, 8'h26, 8'h25, 8'h2E, 8'h36, 8'h3D, 8'h3E, 8'h46};
    logic [7:0] pad [10] = '{8'h70, 8'h69, 8'h72, 8'h7A, 8'h6B, 8'h73, 8'h74, 8'h6C, 8'h75, 8'h7D};
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 10; i++) begin
      press(row[i], 0, KEY_DIGIT, 4'(i), OP_ADD);
      press(pad[i], 0, KEY_DIGIT, 4'(i), OP_ADD);
    end
    press(8'h79, 0, KEY_OPERATOR, 0, OP_ADD);
    press(8'h7B, 0, KEY_OPERATOR, 0, OP_SUB);
    press(8'h4E, 0, KEY_OPERATOR, 0, OP_SUB);
    press(8'h7C, 0, KEY_OPERATOR, 0, OP_MUL);
    press(8'h3A, 0, KEY_OPERATOR, 0, OP_MOD3);
    press(8'h1B, 0, KEY_OPERATOR, 0, OP_SQRT);
    press(8'h5A, 0, KEY_ENTER, 0, OP_ADD);
    press(8'h5A, 1, KEY_ENTER, 0, OP_ADD);
    press(8'h66, 0, KEY_BACKSPACE, 0, OP_ADD);
    // unknown key (F1) must give nothing
    got.delete();
    send(8'h05); send(8'hF0); send(8'h05);
    checks++;
    if (got.size() != 0) begin failures++; $display("FAIL: unknown key gave an event"); end
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
