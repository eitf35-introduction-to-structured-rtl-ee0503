// sqrt_unit: square root of an unsigned 8-bit integer in Q4.10 fixed point.
//
// Newton-Raphson iteration x' = (x + n/x) / 2. The start value comes from a 32-entry table
// indexed by n[7:3]: entry i holds round(sqrt(8*i + 4) * 1024), the root of the middle of the
// table interval, so the seed is never far from the answer. Each iteration sends n/x to the
// pipelined divider (dividend n << 10 and divisor x give n/x with 10 fraction bits), waits for it,
// then adds integer and fraction parts to x and halves the sum, rounding to nearest.
// ITERATIONS = 3 reaches an error below 1/2048, so below 0.001 (three correct decimals after the
// point), for every n in 0..255; more iterations do not improve it. n = 0 returns 0
// at once without dividing.
// The method, the seed table, the divider and the 10 fraction bits follow the project
// description; the table size and the iteration count are this design's choices.
// Interface: pulse start with n; busy is high until done pulses with root valid. root holds
// its value until the next start. done rises ITERATIONS * (LATENCY + 1) + 1 cycles after the
// clock edge that takes start, or one cycle after it for n = 0. The divider computes 8 integer
// and FRAC_W fraction quotient bits (LATENCY = 18), so that is 58 cycles with the defaults.
module sqrt_unit #(
  parameter int unsigned FRAC_W     = 10,
  parameter int unsigned ITERATIONS = 3
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [7:0]        n,
  output logic              busy,
  output logic              done,
  output logic [FRAC_W+3:0] root   // 4 integer bits, FRAC_W fraction bits
);

  localparam int unsigned XW  = FRAC_W + 4;   // width of x
  localparam int unsigned DW  = 8 + FRAC_W;   // dividend n << FRAC_W

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_t;
  state_t state;

  logic [7:0]    n_q;
  logic [XW-1:0] x;
  logic [3:0]    iter;

  logic          div_valid;
  logic [DW-1:0] q_int;
  logic [FRAC_W-1:0] q_frac;

  // Seed table: round(sqrt(8*i + 4) * 1024).
  function automatic logic [13:0] seed_lut(input logic [4:0] i);
    case (i)
      5'd0:  return 14'd2048;   5'd1:  return 14'd3547;   5'd2:  return 14'd4579;
      5'd3:  return 14'd5418;   5'd4:  return 14'd6144;   5'd5:  return 14'd6792;
      5'd6:  return 14'd7384;   5'd7:  return 14'd7932;   5'd8:  return 14'd8444;
      5'd9:  return 14'd8927;   5'd10: return 14'd9385;   5'd11: return 14'd9822;
      5'd12: return 14'd10240;  5'd13: return 14'd10642;  5'd14: return 14'd11029;
      5'd15: return 14'd11403;  5'd16: return 14'd11765;  5'd17: return 14'd12116;
      5'd18: return 14'd12457;  5'd19: return 14'd12790;  5'd20: return 14'd13114;
      5'd21: return 14'd13430;  5'd22: return 14'd13738;  5'd23: return 14'd14040;
      5'd24: return 14'd14336;  5'd25: return 14'd14626;  5'd26: return 14'd14910;
      5'd27: return 14'd15188;  5'd28: return 14'd15462;  5'd29: return 14'd15731;
      5'd30: return 14'd15995;  default: return 14'd16255;
    endcase
  endfunction

  // x never drops below 1.0 for n >= 1 (the seed is at least 2.0 and Newton steps for a square
  // root stay at or above the root), so n/x < 256 and 8 integer quotient bits are enough.
  divider #(.DIVIDEND_W(DW), .DIVISOR_W(XW), .FRAC_W(FRAC_W), .QUOT_INT_W(8)) u_div (
    .clk      (clk),
    .rst      (rst),
    .in_valid (state == S_ISSUE),
    .dividend ({n_q, {FRAC_W{1'b0}}}),
    .divisor  (x),
    .out_valid(div_valid),
    .quot_int (q_int),
    .quot_frac(q_frac)
  );

  // x + n/x in fixed point: the fraction bits of the quotient line up with those of x, carries
  // from the fraction run into the integer bits. The added 1 rounds the halving to nearest.
  logic [DW+FRAC_W:0] sum;
  assign sum = (DW+FRAC_W+1)'(x) + (DW+FRAC_W+1)'({q_int, q_frac}) + (DW+FRAC_W+1)'(1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
      root  <= '0;
      x     <= '0;
      n_q   <= '0;
      iter  <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          n_q  <= n;
          iter <= '0;
          if (n == 8'd0) begin
            root <= '0;
            done <= 1'b1;
          end else begin
            x     <= XW'(seed_lut(n[7:3])) << (FRAC_W - 10);
            state <= S_ISSUE;
          end
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: if (div_valid) begin
          x    <= XW'(sum >> 1);
          iter <= iter + 4'd1;
          if (iter == 4'(ITERATIONS - 1)) begin
            root  <= XW'(sum >> 1);
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
