// tb_result_formatter: integer results 0..999 and every 10-bit fraction.
// Digits are worked out here with / and % on integers: hundreds, tens and units of the
// magnitude, and the three leading decimals of frac/1024 truncated (floor(frac*1000/1024)).
// Flags must pass through; an overflowing result shows zero digits.
module tb_result_formatter;
  import calc_pkg::*;
  alu_result_t res;
  result_fmt_t fmt;
  int checks = 0, failures = 0;

  result_formatter dut (.res, .fmt);

  initial begin
    for (int v = 0; v < 1000; v++) begin
      res = '0; res.mag = 16'(v); res.neg = v[0];
      #1;
      checks++;
      if (int'(fmt.int_bcd[2]) != v / 100 || int'(fmt.int_bcd[1]) != (v / 10) % 10
          || int'(fmt.int_bcd[0]) != v % 10 || fmt.neg != v[0] || fmt.has_frac || fmt.overflow) begin
        failures++; $display("FAIL: %0d -> %h", v, fmt.int_bcd);
      end
    end
    for (int f = 0; f < 1024; f++) begin
      int d;
      res = '0; res.mag = 16'(f % 16); res.frac = 10'(f); res.has_frac = 1;
      #1;
      d = (f * 1000) / 1024;
      checks++;
      if (int'(fmt.frac_bcd[2]) != d / 100 || int'(fmt.frac_bcd[1]) != (d / 10) % 10
          || int'(fmt.frac_bcd[0]) != d % 10 || !fmt.has_frac
          || int'(fmt.int_bcd[1]) != (f % 16) / 10 || int'(fmt.int_bcd[0]) != (f % 16) % 10) begin
        failures++; $display("FAIL: frac %0d -> %h, expected %0d", f, fmt.frac_bcd, d);
      end
    end
    res = '0; res.mag = 16'd65025; res.overflow = 1; #1;
    checks++;
    if (!fmt.overflow || fmt.int_bcd != '0) begin failures++; $display("FAIL: overflow"); end
    // the square root of 255 in Q4.10 is 16352 = 15 + 992/1024 -> 15.968
    res = '0; res.mag = 16'd15; res.frac = 10'd992; res.has_frac = 1; #1;
    checks++;
    if (fmt.int_bcd[1:0] != {4'd1, 4'd5} || fmt.frac_bcd != {4'd9, 4'd6, 4'd8}) begin
      failures++; $display("FAIL: 15.968");
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
