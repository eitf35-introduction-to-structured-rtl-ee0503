// glyph_rom: ROM of the operator and status glyphs shown on the VGA screen.
//
// Holds 8x16 pixel bitmaps for the characters a seven-segment pattern cannot show well: +, -,
// x, mod (drawn as %), the square-root sign, = and the letters O and F of the overflow mark.
// Address is the glyph code and the row (0 at the top); data is the row, bit 7 the leftmost
// pixel. The read is registered, like a block ROM: data belongs to the address of the previous
// cycle. Keeping operators in a ROM and drawing digits with a segment engine is the mixed
// approach the project description suggests; the bitmaps are this design's.
module glyph_rom
  import calc_pkg::*;
(
  input  logic       clk,
  input  glyph_t     glyph,
  input  logic [3:0] row,
  output logic [7:0] data
);

  function automatic logic [7:0] bitmap(input glyph_t g, input logic [3:0] r);
    logic [7:0] d;
    d = 8'h00;
    case (g)
      GL_PLUS:  if (r >= 4'd4 && r <= 4'd11) d = (r == 4'd7 || r == 4'd8) ? 8'h7E : 8'h18;
      GL_MINUS: if (r == 4'd7 || r == 4'd8) d = 8'h7E;
      GL_TIMES:
        case (r)
          4'd4, 4'd11: d = 8'h42;
          4'd5, 4'd10: d = 8'h66;
          4'd6, 4'd9:  d = 8'h3C;
          4'd7, 4'd8:  d = 8'h18;
          default:     d = 8'h00;
        endcase
      GL_MOD:
        case (r)
          4'd3:        d = 8'h62;
          4'd4:        d = 8'h66;
          4'd5, 4'd6:  d = 8'h0C;
          4'd7, 4'd8:  d = 8'h18;
          4'd9, 4'd10: d = 8'h30;
          4'd11:       d = 8'h66;
          4'd12:       d = 8'h46;
          default:     d = 8'h00;
        endcase
      GL_SQRT:
        case (r)
          4'd2:              d = 8'h0F;
          4'd3, 4'd4, 4'd5:  d = 8'h08;
          4'd6, 4'd7, 4'd8:  d = 8'h10;
          4'd9:              d = 8'hD0;
          4'd10, 4'd11:      d = 8'h60;
          4'd12:             d = 8'h40;
          default:           d = 8'h00;
        endcase
      GL_EQ:    if (r == 4'd5 || r == 4'd6 || r == 4'd9 || r == 4'd10) d = 8'h7E;
      GL_O:
        if (r == 4'd2 || r == 4'd13)    d = 8'h3C;
        else if (r > 4'd2 && r < 4'd13) d = 8'h66;
      GL_F:
        if (r == 4'd2 || r == 4'd3)     d = 8'h7E;
        else if (r == 4'd7 || r == 4'd8) d = 8'h7C;
        else if (r > 4'd3 && r < 4'd14) d = 8'h60;
      default: d = 8'h00;
    endcase
    return d;
  endfunction


  always_ff @(posedge clk) data <= bitmap(glyph, row);

endmodule
