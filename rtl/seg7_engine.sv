// seg7_engine: draws one emulated seven-segment digit on the VGA screen.
//
// A character cell is 32 pixels wide and 64 high. Given the pixel position inside the cell and
// the segment pattern {g,f,e,d,c,b,a} (active high) plus the decimal point, lit tells whether
// that pixel belongs to a segment that is on. Segments are 4-pixel-thick bars: a, g and d
// horizontal at the top, middle and bottom, f/b and e/c vertical on the left and right of the
// upper and lower halves, and the point is a 4x4 square in the bottom right corner.
// Combinational; one instance is shared by every digit position on the screen, as the project
// description recommends. The cell size and segment geometry are this design's choice.
module seg7_engine (
  input  logic [4:0] x,      // 0..31 inside the cell
  input  logic [5:0] y,      // 0..63 inside the cell
  input  logic [6:0] seg,    // {g,f,e,d,c,b,a}
  input  logic       dp,
  output logic       lit
);

  logic hx, left, right, top_row, mid_row, bot_row, upper, lower;

  always_comb begin
    hx      = (x >= 5'd7)  && (x <= 5'd22);
    left    = (x >= 5'd3)  && (x <= 5'd6);
    right   = (x >= 5'd23) && (x <= 5'd26);
    top_row = (y >= 6'd4)  && (y <= 6'd7);
    mid_row = (y >= 6'd30) && (y <= 6'd33);
    bot_row = (y >= 6'd56) && (y <= 6'd59);
    upper   = (y >= 6'd8)  && (y <= 6'd29);
    lower   = (y >= 6'd34) && (y <= 6'd55);
    lit = (seg[0] && hx && top_row)      // a
        | (seg[1] && right && upper)     // b
        | (seg[2] && right && lower)     // c
        | (seg[3] && hx && bot_row)      // d
        | (seg[4] && left && lower)      // e
        | (seg[5] && left && upper)      // f
        | (seg[6] && hx && mid_row)      // g
        | (dp && (x >= 5'd28) && bot_row);
  end

endmodule
