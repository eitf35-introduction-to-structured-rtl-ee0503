// display_controller: draws the calculator on the VGA screen.
//
// Follows the beam position from vga_controller and decides the colour of every pixel. The
// screen shows two lines of 32x64-pixel character cells starting at x = 64: the upper line
// (y = 96..159) holds the last evaluated expression as "aaa op bbb = sRRR", the lower line
// (y = 288..351) what is being typed. Digits are drawn by one shared seg7_engine, operators, '='
// and the overflow mark "OF" come from glyph_rom, scaled up four times. A square-root result is
// shown as two integer digits, a point and three decimals ("+15.968"); an integer result as sign
// and three digits. Colours are 3-bit RGB: digits green, operators yellow, overflow red, the
// typed entry white, or cyan once it is latched.
// Pipeline: cell lookup, segment test and ROM address in the first stage, ROM data and pixel
// choice in the second, a registered colour in the third; hsync and vsync are delayed by the same
// two cycles so they stay aligned with the pixels.
// The seven-segment emulation, operators from a ROM, three-digit operands and a signed
// three-digit result follow the project description; the layout and colours are this design's.
module display_controller
  import calc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [9:0]  hcount,
  input  logic [9:0]  vcount,
  input  logic        hsync_in,
  input  logic        vsync_in,
  input  logic        blank_in,
  input  expr_t       expr,
  input  result_fmt_t fmt,
  input  entry_t      entry,
  input  logic        latched,
  output logic [2:0]  rgb,      // {r,g,b}
  output logic        hsync,
  output logic        vsync
);

  localparam logic [9:0] X0      = 10'd64;
  localparam logic [9:0] ROW1_Y0 = 10'd96;
  localparam logic [9:0] ROW2_Y0 = 10'd288;

  localparam logic [2:0] C_GREEN  = 3'b010;
  localparam logic [2:0] C_YELLOW = 3'b110;
  localparam logic [2:0] C_RED    = 3'b100;
  localparam logic [2:0] C_WHITE  = 3'b111;
  localparam logic [2:0] C_CYAN   = 3'b011;

  // ---------------- stage 0: which character is under the beam ----------------
  logic [9:0] xo, yo1, yo2;
  logic       in_x, in_row1, in_row2;
  logic [3:0] col;
  logic [4:0] rx;
  logic [5:0] ry;

  always_comb begin
    xo      = hcount - X0;
    yo1     = vcount - ROW1_Y0;
    yo2     = vcount - ROW2_Y0;
    in_x    = (hcount >= X0) && (xo < 10'd512);
    in_row1 = (vcount >= ROW1_Y0) && (yo1 < 10'd64);
    in_row2 = (vcount >= ROW2_Y0) && (yo2 < 10'd64);
    col     = xo[8:5];
    rx      = xo[4:0];
    ry      = in_row1 ? yo1[5:0] : yo2[5:0];
  end

  function automatic glyph_t op_glyph(input alu_op_t op);
    case (op)
      OP_ADD:  return GL_PLUS;
      OP_SUB:  return GL_MINUS;
      OP_MUL:  return GL_TIMES;
      OP_MOD3: return GL_MOD;
      default: return GL_SQRT;
    endcase
  endfunction

  logic [2:0][3:0] a_bcd, b_bcd;
  assign a_bcd = bin_to_bcd3({2'b00, expr.a});
  assign b_bcd = bin_to_bcd3({2'b00, expr.b});

  // Cell content: a segment character or a glyph, with its colour.
  logic       use_glyph;
  glyph_t     glyph;
  logic [3:0] ch;
  logic       dp;
  logic [2:0] color;
  logic       cell_on;

  always_comb begin
    use_glyph = 1'b0;
    glyph     = GL_BLANK;
    ch        = CH_BLANK;
    dp        = 1'b0;
    color     = C_GREEN;
    cell_on   = in_x && (in_row1 || in_row2);
    if (in_row1) begin
      if (!expr.shown) cell_on = 1'b0;
      case (col)
        4'd0, 4'd1, 4'd2: ch = a_bcd[2 - col];
        4'd3: begin use_glyph = 1'b1; glyph = op_glyph(expr.op); color = C_YELLOW; end
        4'd4, 4'd5, 4'd6: ch = expr.has_b ? b_bcd[6 - col] : CH_BLANK;
        4'd7: begin use_glyph = 1'b1; glyph = GL_EQ; color = C_YELLOW; end
        4'd8: begin
          use_glyph = 1'b1;
          glyph     = fmt.overflow ? GL_BLANK : (fmt.neg ? GL_MINUS : GL_PLUS);
        end
        4'd9, 4'd10, 4'd11, 4'd12, 4'd13: begin
          if (fmt.overflow) begin
            use_glyph = 1'b1;
            color     = C_RED;
            glyph     = (col == 4'd9) ? GL_O : (col == 4'd10) ? GL_F : GL_BLANK;
          end else if (fmt.has_frac) begin
            case (col)
              4'd9:    ch = fmt.int_bcd[1];
              4'd10:   begin ch = fmt.int_bcd[0]; dp = 1'b1; end
              4'd11:   ch = fmt.frac_bcd[2];
              4'd12:   ch = fmt.frac_bcd[1];
              default: ch = fmt.frac_bcd[0];
            endcase
          end else begin
            case (col)
              4'd9:    ch = fmt.int_bcd[2];
              4'd10:   ch = fmt.int_bcd[1];
              4'd11:   ch = fmt.int_bcd[0];
              default: ch = CH_BLANK;
            endcase
          end
        end
        default: ch = CH_BLANK;
      endcase
    end else begin
      color = latched ? C_CYAN : C_WHITE;
      if (entry.kind == ENTRY_OPERATOR) begin
        if (col == 4'd0) begin use_glyph = 1'b1; glyph = op_glyph(entry.op); end
      end else if (entry.kind == ENTRY_NUMBER && col < 4'(entry.ndigits)) begin
        ch = entry.digits[2'(4'(entry.ndigits) - 4'd1 - col)];
      end
    end
  end

  logic seg_lit;
  seg7_engine u_seg (
    .x  (rx),
    .y  (ry),
    .seg(seg7_encode(ch)),
    .dp (dp),
    .lit(seg_lit)
  );

  logic [7:0] rom_row;
  glyph_rom u_rom (
    .clk  (clk),
    .glyph(glyph),
    .row  (ry[5:2]),
    .data (rom_row)
  );

  // ---------------- stage 1: pixel from ROM row or segment engine ----------------
  logic       s1_on, s1_glyph, s1_seg, s1_blank, s1_hs, s1_vs;
  logic [2:0] s1_bit, s1_color;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_on <= 1'b0; s1_glyph <= 1'b0; s1_seg <= 1'b0; s1_blank <= 1'b1;
      s1_hs <= 1'b1; s1_vs <= 1'b1; s1_bit <= '0; s1_color <= '0;
    end else begin
      s1_on    <= cell_on;
      s1_glyph <= use_glyph;
      s1_seg   <= seg_lit;
      s1_blank <= blank_in;
      s1_hs    <= hsync_in;
      s1_vs    <= vsync_in;
      s1_bit   <= rx[4:2];
      s1_color <= color;
    end
  end

  logic pix;
  assign pix = s1_on && (s1_glyph ? rom_row[3'd7 - s1_bit] : s1_seg);

  // ---------------- stage 2: registered outputs ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      rgb   <= '0;
      hsync <= 1'b1;
      vsync <= 1'b1;
    end else begin
      rgb   <= (pix && !s1_blank) ? s1_color : 3'b000;
      hsync <= s1_hs;
      vsync <= s1_vs;
    end
  end

endmodule
