// tb_seg7_engine: the lit pixels of every digit 0..9, minus, O and F.
// For each character, the middle pixel of each of the seven segments must be lit exactly when
// the character's pattern has that segment (pattern written out here, not taken from the
// package), the decimal point only when dp is set, and pixels between the segments never.
module tb_seg7_engine;
  logic [4:0] x; logic [5:0] y; logic [6:0] seg; logic dp; logic lit;
  int checks = 0, failures = 0;

  seg7_engine dut (.x, .y, .seg, .dp, .lit);

  // segment middles {a..g}: (x, y)
  int mx [7] = '{14, 24, 24, 14, 4, 4, 14};
  int my [7] = '{5, 18, 45, 57, 45, 18, 31};
  // {g,f,e,d,c,b,a} for 0..9
  logic [6:0] pat [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};

  initial begin
    for (int d = 0; d < 10; d++) begin
      for (int withdp = 0; withdp < 2; withdp++) begin
        seg = pat[d]; dp = withdp[0];
        for (int s = 0; s < 7; s++) begin
          x = 5'(mx[s]); y = 6'(my[s]); #1;
          checks++;
          if (lit != pat[d][s]) begin failures++; $display("FAIL: digit %0d segment %0d", d, s); end
        end
        x = 5'd29; y = 6'd57; #1;
        checks++;
        if (lit != dp) begin failures++; $display("FAIL: decimal point"); end
        // gaps: centre of the upper and lower halves, corners
        x = 5'd14; y = 6'd18; #1; checks++; if (lit) begin failures++; $display("FAIL: gap lit"); end
        x = 5'd14; y = 6'd45; #1; checks++; if (lit) begin failures++; $display("FAIL: gap lit"); end
        x = 5'd0;  y = 6'd0;  #1; checks++; if (lit) begin failures++; $display("FAIL: corner lit"); end
        x = 5'd31; y = 6'd63; #1; checks++; if (lit) begin failures++; $display("FAIL: corner lit"); end
      end
    end
    // all segments off
    seg = 7'h00; dp = 0;
    for (int s = 0; s < 7; s++) begin
      x = 5'(mx[s]); y = 6'(my[s]); #1;
      checks++;
      if (lit) begin failures++; $display("FAIL: blank lit segment %0d", s); end
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
