// debouncer: clean push-button input and one pulse per press.
//
// The raw button is synchronised by two flip-flops. A counter runs while the synchronised input
// differs from the accepted level and restarts whenever they agree; only when the input has held
// its new level for STABLE_CYCLES clocks is the level accepted. press pulses for one cycle when the
// accepted level goes from 0 to 1, so one press of the button moves the stack address by exactly
// one. The project asks for debouncing; the method and the 10 ms window (250 000 cycles at
// 25 MHz) are this design's choice.
module debouncer #(
  parameter int unsigned STABLE_CYCLES = 250_000
) (
  input  logic clk,
  input  logic rst,
  input  logic btn_raw,
  output logic level,
  output logic press
);

  logic [1:0] sync;
  logic [$clog2(STABLE_CYCLES+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync  <= '0;
      cnt   <= '0;
      level <= 1'b0;
      press <= 1'b0;
    end else begin
      sync  <= {sync[0], btn_raw};
      press <= 1'b0;
      if (sync[1] == level) begin
        cnt <= '0;
      end else if (cnt == ($bits(cnt))'(STABLE_CYCLES - 1)) begin
        cnt   <= '0;
        level <= sync[1];
        press <= sync[1];
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
