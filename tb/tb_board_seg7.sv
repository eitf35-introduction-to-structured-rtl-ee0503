// tb_board_seg7: the four-digit multiplexed board display.
// With a 6-bit scan counter each digit must be enabled (its anode low, the others high) for 16
// clocks in turn, rightmost first, and while it is enabled the segment lines must carry that
// digit's pattern (active low, written out here) and its point.
module tb_board_seg7;
  import calc_pkg::*;
  localparam int RW = 6;
  logic clk = 0, rst = 1;
  logic [3:0][3:0] chars;
  logic [3:0] dps;
  logic [6:0] seg_n; logic dp_n; logic [3:0] an_n;
  int checks = 0, failures = 0;
  logic [6:0] pat [16];
  int on_count [4];

  board_seg7 #(.REFRESH_W(RW)) dut (.clk, .rst, .chars, .dps, .seg_n, .dp_n, .an_n);

  always #5 clk = ~clk;

  initial begin
    pat = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F,
            7'h40, 7'h3F, 7'h71, 7'h00, 7'h00, 7'h00};
    chars = {4'd1, CH_MINUS, 4'd9, 4'd0};
    dps = 4'b0100;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 4; t++) begin
      chars = {4'(t), CH_F, CH_BLANK, 4'(7 + t)};
      dps = 4'b0001 << t;
      on_count = '{0, 0, 0, 0};
      repeat (4) @(posedge clk);
      for (int c = 0; c < (1 << RW); c++) begin
        @(posedge clk); #1;
        if (!$onehot(~an_n)) begin checks++; failures++; $display("FAIL: anodes %b", an_n); end
        for (int d = 0; d < 4; d++) if (!an_n[d]) begin
          on_count[d]++;
          if (seg_n != ~pat[chars[d]] || dp_n != ~dps[d]) begin
            checks++; failures++;
            $display("FAIL: digit %0d shows %b, expected %b", d, seg_n, ~pat[chars[d]]);
          end
        end
      end
      for (int d = 0; d < 4; d++) begin
        checks++;
        if (on_count[d] != 16) begin failures++; $display("FAIL: digit %0d on %0d clocks", d, on_count[d]); end
      end
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
