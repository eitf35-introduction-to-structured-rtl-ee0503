// board_seg7: driver for the four-digit seven-segment display on the FPGA board.
//
// The board's four digits share one set of segment lines and each has its own enable (anode),
// all active low. A free-running counter of REFRESH_W bits selects one digit at a time with its
// two top bits, so every digit is lit a quarter of the time; with 17 bits at 25 MHz the whole
// display is refreshed about 190 times a second, too fast to see flicker. chars[3] is the leftmost
// digit, in the character codes of calc_pkg (0-9, minus, O, F, blank); dps sets the points.
// Showing the result on the board display is in the project description; the multiplexing
// scheme and rate are this design's choice for the board's common-anode display.
module board_seg7
  import calc_pkg::*;
#(
  parameter int unsigned REFRESH_W = 17
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [3:0][3:0] chars,
  input  logic [3:0]      dps,
  output logic [6:0]      seg_n,   // {g,f,e,d,c,b,a}, low = on
  output logic            dp_n,
  output logic [3:0]      an_n     // digit enables, low = on, an_n[3] leftmost
);

  logic [REFRESH_W-1:0] cnt;
  logic [1:0]           sel;

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  assign sel = cnt[REFRESH_W-1 -: 2];

  always_ff @(posedge clk) begin
    if (rst) begin
      seg_n <= '1;
      dp_n  <= 1'b1;
      an_n  <= '1;
    end else begin
      seg_n <= ~seg7_encode(chars[sel]);
      dp_n  <= ~dps[sel];
      an_n  <= ~(4'b0001 << sel);
    end
  end

endmodule
