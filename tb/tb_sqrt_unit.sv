// tb_sqrt_unit: square root of every n in 0..255.
// Checks root/1024 against the real square root (error below 0.0005, half a unit of the 10 fraction bits, so three correct decimals),
// the exact fixed-point value for 255 (15.96875, shown as 15.968), that busy is high during a
// run, and the run time: ITERATIONS * (divider latency + 1) + 1 cycles from start to done.
module tb_sqrt_unit;
  localparam int ITER = 3, LAT = 18;
  logic clk = 0, rst = 1, start = 0;
  logic [7:0] n = 0;
  logic busy, done;
  logic [13:0] root;
  int checks = 0, failures = 0;

  sqrt_unit #(.FRAC_W(10), .ITERATIONS(ITER)) dut (.clk, .rst, .start, .n, .busy, .done, .root);

  always #5 clk = ~clk;

  initial begin
    real r, err;
    int cycles, expect_cycles;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int v = 0; v < 256; v++) begin
      @(posedge clk);
      start <= 1; n <= 8'(v);
      @(posedge clk);
      start <= 0;
      cycles = 1;
      while (!done) begin
        @(posedge clk);
        cycles++;
        if (!done && !busy) begin failures++; $display("FAIL: busy low during run n=%0d", v); end
      end
      r = real'(root) / 1024.0;
      err = r - $sqrt(real'(v));
      if (err < 0) err = -err;
      checks++;
      if (err >= 0.0005) begin failures++; $display("FAIL: sqrt(%0d) = %f", v, r); end
      // counted from the edge that takes start to the edge after the one that sets done
      expect_cycles = (v == 0) ? 2 : ITER * (LAT + 1) + 2;
      checks++;
      if (cycles != expect_cycles) begin
        failures++; $display("FAIL: sqrt(%0d) took %0d cycles, expected %0d", v, cycles, expect_cycles);
      end
      if (v == 255) begin
        checks++;
        if (root != 14'd16352) begin failures++; $display("FAIL: sqrt(255) raw %0d", root); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
