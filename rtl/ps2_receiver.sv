// ps2_receiver: receives scan codes from a PS/2 keyboard.
//
// The keyboard drives ps2_clk and ps2_data; a frame is 11 bits sent LSB first and sampled on the
// falling edge of ps2_clk: a start bit (0), eight data bits, an odd parity bit and a stop bit (1).
// Both lines are brought into the system clock domain by two flip-flops; a falling edge of the
// synchronised clock shifts in one bit. After the eleventh bit the frame is checked and, if
// start, stop and parity are right, code is updated and code_valid pulses for one cycle; a bad
// frame pulses frame_error instead. If ps2_clk stays high for TIMEOUT_CYCLES in the middle of a
// frame, the partial frame is dropped so the receiver falls back into step.
// The keyboard controller itself is only named in the project description; the frame format is
// the PS/2 standard, and the timeout is this design's choice (200 us at 25 MHz).
module ps2_receiver #(
  parameter int unsigned TIMEOUT_CYCLES = 5000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic [7:0] code,
  output logic       code_valid,
  output logic       frame_error
);

  logic [2:0]  clk_sync;
  logic [1:0]  data_sync;
  logic        fall;
  logic [10:0] shift;
  logic [3:0]  nbits;
  logic [$clog2(TIMEOUT_CYCLES+1)-1:0] idle;

  assign fall = clk_sync[2] && !clk_sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_sync    <= '1;
      data_sync   <= '1;
      shift       <= '0;
      nbits       <= '0;
      idle        <= '0;
      code        <= '0;
      code_valid  <= 1'b0;
      frame_error <= 1'b0;
    end else begin
      clk_sync    <= {clk_sync[1:0], ps2_clk};
      data_sync   <= {data_sync[0], ps2_data};
      code_valid  <= 1'b0;
      frame_error <= 1'b0;
      if (fall) begin
        idle  <= '0;
        shift <= {data_sync[1], shift[10:1]};
        if (nbits == 4'd10) begin
          nbits <= '0;
          // shift[1] is the start bit, shift[9:2] data, shift[10] parity, data_sync[1] stop.
          if (!shift[1] && data_sync[1] && (^{shift[10:2]})) begin
            code       <= shift[9:2];
            code_valid <= 1'b1;
          end else begin
            frame_error <= 1'b1;
          end
        end else begin
          nbits <= nbits + 4'd1;
        end
      end else if (nbits != 4'd0) begin
        if (idle == ($bits(idle))'(TIMEOUT_CYCLES)) begin
          nbits <= '0;
          idle  <= '0;
        end else begin
          idle <= idle + 1'b1;
        end
      end
    end
  end

endmodule
