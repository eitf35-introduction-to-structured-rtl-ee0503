// dcm_clkdiv: behavioural model of the FPGA's digital clock manager, set to divide by two.
//
// This is a model, not the clock manager itself: on the FPGA the vendor's clock-manager
// primitive is used. It turns the 50 MHz board clock into the 25 MHz pixel and system clock
// (clk_div) and raises locked once the output is stable, here after LOCK_CYCLES input clocks.
// In hardware the real primitive takes its place with the same ports. Division by two follows
// the project description; the lock delay is this model's choice.
module dcm_clkdiv #(
  parameter int unsigned LOCK_CYCLES = 16
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_div,
  output logic locked
);

  logic [$clog2(LOCK_CYCLES+1)-1:0] lock_cnt;

  always_ff @(posedge clk_in) clk_div <= !clk_div;

  always_ff @(posedge clk_in) begin
    if (rst) begin
      lock_cnt <= '0;
      locked   <= 1'b0;
    end else if (lock_cnt == ($bits(lock_cnt))'(LOCK_CYCLES)) begin
      locked <= 1'b1;
    end else begin
      lock_cnt <= lock_cnt + 1'b1;
    end
  end

endmodule
