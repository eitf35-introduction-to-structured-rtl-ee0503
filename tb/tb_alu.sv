// tb_alu: every ALU operation on random and corner-case operands.
// The expected sign, magnitude, fraction flag and overflow flag are computed in the testbench;
// integer operations must finish one cycle after start, the square root within 100 cycles with an
// error below 0.001.
module tb_alu;
  import calc_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  alu_op_t op = OP_ADD;
  logic [7:0] a = 0, b = 0;
  logic busy, done;
  alu_result_t result;
  int checks = 0, failures = 0;
  int n_ovf = 0;

  alu dut (.clk, .rst, .start, .op, .a, .b, .busy, .done, .result);

  always #5 clk = ~clk;

  task automatic run(input alu_op_t o, input logic [7:0] x, input logic [7:0] y);
    int cycles, exp_val;
    logic exp_neg;
    @(posedge clk);
    start <= 1; op <= o; a <= x; b <= y;
    @(posedge clk);
    start <= 0;
    cycles = 1;
    while (!done && cycles < 200) begin @(posedge clk); cycles++; end
    // expected value
    exp_neg = 0;
    case (o)
      OP_ADD:  exp_val = int'(x) + int'(y);
      OP_SUB:  begin exp_val = int'(x) - int'(y); exp_neg = exp_val < 0; if (exp_neg) exp_val = -exp_val; end
      OP_MUL:  exp_val = int'(x) * int'(y);
      OP_MOD3: exp_val = int'(x) % 3;
      default: exp_val = 0;
    endcase
    checks++;
    if (o == OP_SQRT) begin
      real r, e;
      r = real'(result.mag) + real'(result.frac) / 1024.0;
      e = r - $sqrt(real'(x)); if (e < 0) e = -e;
      if (!done || e >= 0.001 || !result.has_frac || result.neg || result.overflow || cycles > 100) begin
        failures++; $display("FAIL: sqrt(%0d) = %f after %0d cycles", x, r, cycles);
      end
    end else begin
      if (!done || cycles != 2 || result.mag != 16'(exp_val) || result.neg != exp_neg
          || result.has_frac || result.overflow != (exp_val > 999)) begin
        failures++;
        $display("FAIL: op %s %0d %0d -> neg=%0d mag=%0d ovf=%0d (%0d cycles), expected %0d%0d",
                 o.name(), x, y, result.neg, result.mag, result.overflow, cycles, exp_neg, exp_val);
      end
      if (result.overflow) n_ovf++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    run(OP_ADD, 98, 99);
    run(OP_SUB, 5, 200);
    run(OP_SUB, 200, 5);
    run(OP_MUL, 255, 255);
    run(OP_MUL, 31, 32);
    run(OP_MOD3, 254, 0);
    run(OP_SQRT, 255, 0);
    run(OP_SQRT, 0, 0);
    for (int i = 0; i < 300; i++) begin
      run(alu_op_t'($urandom_range(0, 4)), 8'($urandom), 8'($urandom));
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL: no overflow seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
