// tb_debouncer: a bouncing button press must give exactly one press pulse, glitches shorter than
// the window none, and the pulse must come STABLE_CYCLES (+ 2 synchroniser, + 1 output register)
// cycles after the input settles.
module tb_debouncer;
  localparam int W = 50;
  logic clk = 0, rst = 1, btn_raw = 0;
  logic level, press;
  int checks = 0, failures = 0;
  int npress = 0, cycle = 0, last_press_cycle = 0;

  debouncer #(.STABLE_CYCLES(W)) dut (.clk, .rst, .btn_raw, .level, .press);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (press) begin npress++; last_press_cycle = cycle; end
  end

  initial begin
    int settle;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (10) @(posedge clk);
    for (int p = 0; p < 5; p++) begin
      int n0;
      n0 = npress;
      // bounce: random short pulses
      for (int i = 0; i < 8; i++) begin
        btn_raw <= 1; repeat ($urandom_range(1, W / 3)) @(posedge clk);
        btn_raw <= 0; repeat ($urandom_range(1, W / 3)) @(posedge clk);
      end
      btn_raw <= 1;
      @(posedge clk);
      settle = cycle;
      repeat (3 * W) @(posedge clk);
      checks++;
      if (npress != n0 + 1) begin failures++; $display("FAIL: %0d pulses for one press", npress - n0); end
      checks++;
      if (last_press_cycle - settle != W + 2) begin
        failures++; $display("FAIL: pulse %0d cycles after settling", last_press_cycle - settle);
      end
      // bouncing release
      for (int i = 0; i < 8; i++) begin
        btn_raw <= 0; repeat ($urandom_range(1, W / 3)) @(posedge clk);
        btn_raw <= 1; repeat ($urandom_range(1, W / 3)) @(posedge clk);
      end
      btn_raw <= 0;
      repeat (3 * W) @(posedge clk);
      checks++;
      if (npress != n0 + 1 || level != 0) begin failures++; $display("FAIL: release gave a pulse"); end
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
