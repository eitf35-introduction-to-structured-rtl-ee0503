// tb_dcm_clkdiv: the clock-manager model must give half the input frequency with a 50 % duty
// cycle and raise locked LOCK_CYCLES + 1 input clocks after reset is released (counted here with up to
// two clocks of testbench slack), staying locked.
module tb_dcm_clkdiv;
  logic clk_in = 0, rst = 1;
  logic clk_div, locked;
  int checks = 0, failures = 0;
  int in_edges = 0;

  dcm_clkdiv #(.LOCK_CYCLES(16)) dut (.clk_in, .rst, .clk_div, .locked);

  always #10 clk_in = ~clk_in;     // 50 MHz
  always @(posedge clk_in) in_edges++;

  initial begin
    int lock_at;
    realtime t0, t1, t2;
    repeat (3) @(posedge clk_in);
    rst <= 0;
    in_edges = 0;
    lock_at = -1;
    while (!locked) begin @(posedge clk_in); if (locked && lock_at < 0) lock_at = in_edges; end
    #1;
    checks++;
    if (in_edges < 17 || in_edges > 19) begin failures++; $display("FAIL: locked after %0d clocks", in_edges); end
    for (int i = 0; i < 5; i++) begin
      @(posedge clk_div) t0 = $realtime;
      @(negedge clk_div) t1 = $realtime;
      @(posedge clk_div) t2 = $realtime;
      checks += 2;
      if (t2 - t0 != 40.0) begin failures++; $display("FAIL: period %0t", t2 - t0); end
      if (t1 - t0 != 20.0) begin failures++; $display("FAIL: high time %0t", t1 - t0); end
      checks++;
      if (!locked) begin failures++; $display("FAIL: lost lock"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
