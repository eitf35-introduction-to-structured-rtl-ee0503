// tb_ram_test_ctrl: the RAM bring-up fixture with a RAM behind it.
// Writes typed digits at successive addresses (BTN[2] with SWITCH[0] = 0), checks that a step
// without a fresh latch does not write, steps back down (SWITCH[0] = 1) and reads every stored
// value again, and checks wrap-around of the address at 0.
module tb_ram_test_ctrl;
  import calc_pkg::*;
  logic clk = 0, rst = 1;
  key_event_t key = '0;
  logic latch_press = 0, step_press = 0, down = 0;
  logic ram_we; logic [12:0] ram_addr; logic [7:0] ram_din, ram_dout;
  logic [3:0] kbd_data; logic armed;
  int checks = 0, failures = 0;

  ram_test_ctrl dut (.clk, .rst, .key, .latch_press, .step_press, .down, .ram_we, .ram_addr,
                     .ram_din, .kbd_data, .armed);
  sp_ram u_ram (.clk, .we(ram_we), .addr(ram_addr), .din(ram_din), .dout(ram_dout));

  always #5 clk = ~clk;

  task automatic digit(input int d);
    @(posedge clk) key <= '{valid: 1'b1, kind: KEY_DIGIT, digit: 4'(d), op: OP_ADD};
    @(posedge clk) key <= '0;
  endtask
  task automatic latch();
    @(posedge clk) latch_press <= 1;
    @(posedge clk) latch_press <= 0;
  endtask
  task automatic step();
    @(posedge clk) step_press <= 1;
    @(posedge clk) step_press <= 0;
    repeat (2) @(posedge clk);
  endtask
  task automatic expect_at(input int a, input int v);
    checks++;
    if (int'(ram_addr) != a || int'(ram_dout) != v) begin
      failures++; $display("FAIL: address %0d data %0d, expected %0d at %0d", ram_addr, ram_dout, v, a);
    end
  endtask

  initial begin
    int vals [6] = '{3, 9, 0, 7, 5, 1};
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 6; i++) begin
      digit(vals[i]); latch(); step();
    end
    step();                      // no latch: address moves, nothing written
    expect_at(7, 0);
    down <= 1;
    step();
    expect_at(6, 0);             // was never written
    for (int i = 5; i >= 0; i--) begin
      step();
      expect_at(i, vals[i]);
    end
    step();                      // wraps from 0 to the top
    expect_at(8191, 0);
    down <= 0;
    digit(4); latch(); step();   // writes at 8191, wraps to 0
    expect_at(0, vals[0]);
    down <= 1;
    step();
    expect_at(8191, 4);
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
