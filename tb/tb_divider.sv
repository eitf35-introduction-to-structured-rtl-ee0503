// tb_divider: checks the pipelined divider against integer division.
// Sends one division per clock for 400 random operand pairs (plus corner cases), and checks
// every result, in order, against floor(dividend * 1024 / divisor) split into integer and
// fraction parts, and that each result leaves exactly DIVIDEND_W + FRAC_W cycles after it entered.
// A second instance with QUOT_INT_W = 8, as the square-root unit uses it, gets its own stream of
// operands whose integer quotient is below 256 and must answer them exactly, 8 + FRAC_W cycles
// after they entered.
module tb_divider;
  localparam int DW = 18, VW = 14, FW = 10, LAT = DW + FW, N = 400;
  localparam int QI8 = 8, LAT8 = QI8 + FW;
  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic [DW-1:0] dividend = 0;
  logic [VW-1:0] divisor = 1;
  logic out_valid;
  logic [DW-1:0] qi;
  logic [FW-1:0] qf;
  int checks = 0, failures = 0;
  logic [DW-1:0] exp_a [N];
  logic [VW-1:0] exp_b [N];
  int issue_cycle [N];
  int cycle = 0, nout = 0;

  divider #(.DIVIDEND_W(DW), .DIVISOR_W(VW), .FRAC_W(FW)) dut (
    .clk, .rst, .in_valid, .dividend, .divisor, .out_valid, .quot_int(qi), .quot_frac(qf));

  logic [DW-1:0] dividend8 = 0;
  logic [VW-1:0] divisor8 = 1;
  logic out_valid8;
  logic [DW-1:0] qi8;
  logic [FW-1:0] qf8;
  logic [DW-1:0] exp_a8 [N];
  logic [VW-1:0] exp_b8 [N];
  int nout8 = 0;

  divider #(.DIVIDEND_W(DW), .DIVISOR_W(VW), .FRAC_W(FW), .QUOT_INT_W(QI8)) dut8 (
    .clk, .rst, .in_valid, .dividend(dividend8), .divisor(divisor8), .out_valid(out_valid8),
    .quot_int(qi8), .quot_frac(qf8));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    for (int i = 0; i < N; i++) begin
      case (i)
        0: begin exp_a[i] = '1; exp_b[i] = 14'd1; end
        1: begin exp_a[i] = 18'd255 << 10; exp_b[i] = 14'd1024; end
        2: begin exp_a[i] = 0; exp_b[i] = 14'd16383; end
        default: begin
          exp_a[i] = DW'($urandom);
          exp_b[i] = VW'($urandom);
          if (exp_b[i] == 0) exp_b[i] = 1;
        end
      endcase
      // Operands for dut8: integer quotient below 2**QI8.
      case (i)
        0: begin exp_a8[i] = 18'd255 << 10; exp_b8[i] = 14'd1024; end
        1: begin exp_a8[i] = 18'd1 << 10;   exp_b8[i] = 14'd16383; end
        2: begin exp_a8[i] = (18'd1 << QI8) - 1; exp_b8[i] = 14'd1; end
        default: begin
          exp_b8[i] = VW'($urandom);
          if (exp_b8[i] == 0) exp_b8[i] = 1;
          exp_a8[i] = DW'($urandom % (32'(exp_b8[i]) << QI8));
        end
      endcase
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < N; i++) begin
      @(posedge clk);
      in_valid <= 1; dividend <= exp_a[i]; divisor <= exp_b[i];
      dividend8 <= exp_a8[i]; divisor8 <= exp_b8[i];
      issue_cycle[i] = cycle + 1;  // sampled by the divider at the next edge
    end
    @(posedge clk) in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (nout != N) begin failures++; $display("FAIL: %0d results, expected %0d", nout, N); end
    checks++;
    if (nout8 != N) begin failures++; $display("FAIL: %0d results from dut8, expected %0d", nout8, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && out_valid) begin
    logic [DW+FW-1:0] q;
    q = ({exp_a[nout], {FW{1'b0}}}) / exp_b[nout];
    checks += 2;
    if ({qi, qf} !== q) begin
      failures++;
      $display("FAIL: %0d / %0d gave %0d.%0d, expected %0d", exp_a[nout], exp_b[nout], qi, qf, q);
    end
    if (cycle - issue_cycle[nout] != LAT) begin
      failures++;
      $display("FAIL: latency %0d, expected %0d", cycle - issue_cycle[nout], LAT);
    end
    nout++;
  end

  always @(posedge clk) if (!rst && out_valid8) begin
    logic [DW+FW-1:0] q;
    q = ({exp_a8[nout8], {FW{1'b0}}}) / exp_b8[nout8];
    checks += 2;
    if ({qi8, qf8} !== q) begin
      failures++;
      $display("FAIL: dut8 %0d / %0d gave %0d.%0d, expected %0d", exp_a8[nout8], exp_b8[nout8], qi8, qf8, q);
    end
    if (cycle - issue_cycle[nout8] != LAT8) begin
      failures++;
      $display("FAIL: dut8 latency %0d, expected %0d", cycle - issue_cycle[nout8], LAT8);
    end
    nout8++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
