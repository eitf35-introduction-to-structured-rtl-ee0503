// alu: the calculator's arithmetic unit.
//
// Takes two unsigned 8-bit operands and one of five operations: a + b, a - b, a * b, a mod 3
// and the square root of a. The result is sign and magnitude; subtraction is the only operation
// that gives a negative result. overflow is set when the magnitude does not fit the three
// decimal digits of the display (above 999), which only a product can do. The square root comes
// from sqrt_unit with 10 fraction bits; its integer part goes to mag and the fraction to frac.
// The operation set, unsigned operands, signed result and overflow indication follow the project
// description; the overflow limit of 999 is this design's reading of "three digits".
// Interface: pulse start with op, a and b; done pulses when result is valid, one cycle later for
// add, sub, mul and mod 3, and when the square-root unit finishes for sqrt. result holds until
// the next done. start is ignored while busy.
module alu
  import calc_pkg::*;
#(
  parameter int unsigned SQRT_ITERATIONS = 3
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  alu_op_t     op,
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic        busy,
  output logic        done,
  output alu_result_t result
);

  logic        sq_start, sq_busy, sq_done;
  logic [13:0] sq_root;
  logic        wait_sqrt;

  assign sq_start = start && !busy && (op == OP_SQRT);

  sqrt_unit #(.FRAC_W(10), .ITERATIONS(SQRT_ITERATIONS)) u_sqrt (
    .clk  (clk),
    .rst  (rst),
    .start(sq_start),
    .n    (a),
    .busy (sq_busy),
    .done (sq_done),
    .root (sq_root)
  );

  // Integer operations, combinational.
  alu_result_t int_res;
  always_comb begin
    int_res = '0;
    case (op)
      OP_ADD: int_res.mag = 16'(a) + 16'(b);
      OP_SUB: begin
        int_res.neg = a < b;
        int_res.mag = (a < b) ? 16'(b - a) : 16'(a - b);
      end
      OP_MUL:  int_res.mag = 16'(a) * 16'(b);
      OP_MOD3: int_res.mag = 16'(a % 8'd3);
      default: int_res.mag = '0;
    endcase
    int_res.overflow = int_res.mag > 16'(DISPLAY_MAX);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      done      <= 1'b0;
      result    <= '0;
      wait_sqrt <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        if (op == OP_SQRT) wait_sqrt <= 1'b1;
        else begin
          result <= int_res;
          done   <= 1'b1;
        end
      end
      if (wait_sqrt && sq_done) begin
        wait_sqrt       <= 1'b0;
        result          <= '0;
        result.mag      <= 16'(sq_root[13:10]);
        result.frac     <= sq_root[9:0];
        result.has_frac <= 1'b1;
        done            <= 1'b1;
      end
    end
  end

  assign busy = wait_sqrt || sq_busy;

endmodule
