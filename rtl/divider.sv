// divider: pipelined fixed-point divider, one division accepted every clock.
//
// Computes dividend / divisor as an integer part (DIVIDEND_W bits) and FRAC_W fraction bits,
// the form the square-root unit needs. It is a restoring divider unrolled into
// LATENCY = QUOT_INT_W + FRAC_W stages: stage k compares the partial remainder, with the next
// dividend bit shifted in, against the divisor and produces one quotient bit. Every stage has a
// register, so a new division can enter each cycle and leaves LATENCY cycles later with out_valid.
// QUOT_INT_W is the number of integer quotient bits computed. At its default, DIVIDEND_W, any
// division is exact like a general divider core. A caller that knows the integer quotient is
// below 2**QUOT_INT_W (dividend >> QUOT_INT_W < divisor) can lower it: the top dividend bits
// then start out as the partial remainder and the stages that would only produce leading zeros
// are left out. An assertion checks that bound.
// The project asks for a divider core set to one clock per division with 10 fraction bits; the
// widths of dividend and divisor are this design's choice for 8-bit operands and a Q4.10 divisor.
// Division by zero returns all ones.
module divider #(
  parameter int unsigned DIVIDEND_W = 18,
  parameter int unsigned DIVISOR_W  = 14,
  parameter int unsigned FRAC_W     = 10,
  parameter int unsigned QUOT_INT_W = DIVIDEND_W
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic [DIVIDEND_W-1:0] dividend,
  input  logic [DIVISOR_W-1:0]  divisor,
  output logic                  out_valid,
  output logic [DIVIDEND_W-1:0] quot_int,
  output logic [FRAC_W-1:0]     quot_frac
);

  localparam int unsigned QW      = QUOT_INT_W + FRAC_W;
  localparam int unsigned LATENCY = QW;
  localparam int unsigned SKIP    = DIVIDEND_W - QUOT_INT_W;  // dividend bits preloaded

  // Stage registers; index 0 is the input.
  logic [DIVISOR_W-1:0] rem [LATENCY+1];
  logic [QW-1:0]        num [LATENCY+1];  // dividend bits still to be shifted in
  logic [QW-1:0]        quo [LATENCY+1];
  logic [DIVISOR_W-1:0] dvs [LATENCY+1];
  logic                 vld [LATENCY+1];

  assign rem[0] = DIVISOR_W'(dividend >> QUOT_INT_W);
  assign num[0] = {dividend[QUOT_INT_W-1:0], {FRAC_W{1'b0}}};
  assign quo[0] = '0;
  assign dvs[0] = divisor;
  assign vld[0] = in_valid;

  for (genvar s = 0; s < LATENCY; s++) begin : g_stage
    logic [DIVISOR_W:0]   trial;
    logic                 fits;
    logic [DIVISOR_W-1:0] rem_next;

    always_comb begin
      trial    = {rem[s], num[s][QW-1]};
      fits     = trial >= {1'b0, dvs[s]};
      rem_next = fits ? DIVISOR_W'(trial - {1'b0, dvs[s]}) : trial[DIVISOR_W-1:0];
    end

    always_ff @(posedge clk) begin
      if (rst) vld[s+1] <= 1'b0;
      else     vld[s+1] <= vld[s];
      rem[s+1] <= rem_next;
      num[s+1] <= num[s] << 1;
      quo[s+1] <= {quo[s][QW-2:0], fits};
      dvs[s+1] <= dvs[s];
    end
  end

  assign out_valid = vld[LATENCY];
  assign quot_int  = DIVIDEND_W'(quo[LATENCY][QW-1:FRAC_W]);
  assign quot_frac = quo[LATENCY][FRAC_W-1:0];

  // The preloaded remainder must fit the divisor width and stay below the divisor.
  if (SKIP > DIVISOR_W) begin : g_bad_width
    $error("divider: DIVIDEND_W - QUOT_INT_W must not exceed DIVISOR_W");
  end
  if (SKIP > 0) begin : g_bound
    assert property (@(posedge clk) disable iff (rst)
                     in_valid |-> (dividend >> QUOT_INT_W) < DIVIDEND_W'(divisor));
  end

endmodule
