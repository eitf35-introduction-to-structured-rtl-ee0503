// result_formatter: ALU result to decimal display digits.
//
// Purely combinational. The integer magnitude (0..999) becomes three BCD digits by
// shift-and-add-3; the 10 fraction bits of a square root become three decimal digits as
// floor(frac * 1000 / 1024), i.e. truncated, so sqrt(255) = 15.96875 reads 15.968. Sign,
// fraction and overflow flags are passed on. Converting integer and fraction parts to BCD
// for display is what the project asks; the conversion method is this design's choice.
module result_formatter
  import calc_pkg::*;
(
  input  alu_result_t res,
  output result_fmt_t fmt
);

  always_comb begin
    fmt.neg      = res.neg;
    fmt.has_frac = res.has_frac;
    fmt.overflow = res.overflow;
    fmt.int_bcd  = bin_to_bcd3(res.overflow ? 10'd0 : res.mag[9:0]);
    fmt.frac_bcd = frac_to_bcd3(res.frac);
  end

endmodule
