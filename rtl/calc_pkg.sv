// calc_pkg: types, codes and small functions shared by the calculator.
//
// Operators are stored in the 8-bit stack RAM as the byte codes 130..135, so operands in that
// range are refused at entry. The code range follows the project description; which code stands
// for which operator is this design's choice. Display characters use a 4-bit code: 0..9 are
// decimal digits, the rest are the signs and letters the displays can show.
package calc_pkg;

  // Byte codes of the operators as they are held in the stack RAM.
  localparam logic [7:0] CODE_ADD  = 8'd130;
  localparam logic [7:0] CODE_SUB  = 8'd131;
  localparam logic [7:0] CODE_MUL  = 8'd132;
  localparam logic [7:0] CODE_MOD3 = 8'd133;
  localparam logic [7:0] CODE_SQRT = 8'd134;
  localparam logic [7:0] CODE_EQ   = 8'd135;  // reserved, never stored

  // Largest magnitude the three display digits can show.
  localparam int unsigned DISPLAY_MAX = 999;

  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,
    OP_SUB  = 3'd1,
    OP_MUL  = 3'd2,
    OP_MOD3 = 3'd3,
    OP_SQRT = 3'd4
  } alu_op_t;

  typedef enum logic [2:0] {
    KEY_DIGIT     = 3'd0,
    KEY_OPERATOR  = 3'd1,
    KEY_ENTER     = 3'd2,
    KEY_BACKSPACE = 3'd3
  } key_kind_t;

  // One key press as delivered by the key decoder.
  typedef struct packed {
    logic      valid;
    key_kind_t kind;
    logic [3:0] digit;
    alu_op_t   op;
  } key_event_t;

  typedef enum logic [1:0] {
    ENTRY_EMPTY    = 2'd0,
    ENTRY_NUMBER   = 2'd1,
    ENTRY_OPERATOR = 2'd2
  } entry_kind_t;

  // What the user is typing, before it is latched and stored.
  typedef struct packed {
    entry_kind_t     kind;
    logic [2:0]      ndigits;   // 0..4 digits typed
    logic [3:0][3:0] digits;    // BCD, digits[0] is the last one typed
    logic [7:0]      value;     // decimal value saturated to 255
    alu_op_t         op;
  } entry_t;

  // ALU result: sign and magnitude; for the square root also 10 fraction bits.
  typedef struct packed {
    logic        neg;
    logic [15:0] mag;
    logic [9:0]  frac;
    logic        has_frac;
    logic        overflow;   // magnitude above DISPLAY_MAX
  } alu_result_t;

  // The expression last taken from the stack, with its result, for the displays.
  typedef struct packed {
    logic        shown;
    logic [7:0]  a;
    alu_op_t     op;
    logic        has_b;
    logic [7:0]  b;
    alu_result_t res;
  } expr_t;

  // Result in display form.
  typedef struct packed {
    logic            neg;
    logic            has_frac;
    logic            overflow;
    logic [2:0][3:0] int_bcd;   // [2] hundreds, [1] tens, [0] units
    logic [2:0][3:0] frac_bcd;  // [2] tenths, [1] hundredths, [0] thousandths
  } result_fmt_t;

  // Display character codes for the seven-segment displays.
  localparam logic [3:0] CH_MINUS = 4'd10;
  localparam logic [3:0] CH_O     = 4'd11;
  localparam logic [3:0] CH_F     = 4'd12;
  localparam logic [3:0] CH_BLANK = 4'd15;

  // Glyph codes of the operator ROM.
  typedef enum logic [3:0] {
    GL_BLANK = 4'd0,
    GL_PLUS  = 4'd1,
    GL_MINUS = 4'd2,
    GL_TIMES = 4'd3,
    GL_MOD   = 4'd4,
    GL_SQRT  = 4'd5,
    GL_EQ    = 4'd6,
    GL_O     = 4'd7,
    GL_F     = 4'd8
  } glyph_t;

  // Segment pattern {g,f,e,d,c,b,a}, active high, of a display character.
  function automatic logic [6:0] seg7_encode(input logic [3:0] ch);
    case (ch)
      4'd0:    return 7'b0111111;
      4'd1:    return 7'b0000110;
      4'd2:    return 7'b1011011;
      4'd3:    return 7'b1001111;
      4'd4:    return 7'b1100110;
      4'd5:    return 7'b1101101;
      4'd6:    return 7'b1111101;
      4'd7:    return 7'b0000111;
      4'd8:    return 7'b1111111;
      4'd9:    return 7'b1101111;
      CH_MINUS: return 7'b1000000;
      CH_O:    return 7'b0111111;
      CH_F:    return 7'b1110001;
      default: return 7'b0000000;
    endcase
  endfunction

  // Binary 0..999 to three BCD digits by shift-and-add-3 (double dabble).
  function automatic logic [2:0][3:0] bin_to_bcd3(input logic [9:0] bin);
    logic [21:0] sh;
    sh = {12'd0, bin};
    for (int i = 0; i < 10; i++) begin
      if (sh[13:10] > 4'd4) sh[13:10] = sh[13:10] + 4'd3;
      if (sh[17:14] > 4'd4) sh[17:14] = sh[17:14] + 4'd3;
      if (sh[21:18] > 4'd4) sh[21:18] = sh[21:18] + 4'd3;
      sh = sh << 1;
    end
    return sh[21:10];
  endfunction

  // Ten binary fraction bits to the three leading decimal fraction digits (truncated):
  // floor(frac * 1000 / 1024), then to BCD.
  function automatic logic [2:0][3:0] frac_to_bcd3(input logic [9:0] frac);
    logic [19:0] scaled;
    scaled = 20'(frac) * 20'd1000;
    return bin_to_bcd3(scaled[19:10]);
  endfunction

  function automatic alu_op_t code_to_op(input logic [7:0] code);
    case (code)
      CODE_SUB:  return OP_SUB;
      CODE_MUL:  return OP_MUL;
      CODE_MOD3: return OP_MOD3;
      CODE_SQRT: return OP_SQRT;
      default:   return OP_ADD;
    endcase
  endfunction

  function automatic logic [7:0] op_to_code(input alu_op_t op);
    case (op)
      OP_SUB:  return CODE_SUB;
      OP_MUL:  return CODE_MUL;
      OP_MOD3: return CODE_MOD3;
      OP_SQRT: return CODE_SQRT;
      default: return CODE_ADD;
    endcase
  endfunction

  function automatic logic is_operator_code(input logic [7:0] v);
    return (v >= CODE_ADD) && (v <= CODE_EQ);
  endfunction

  // Modulo 3 and square root take one operand; the others take two.
  function automatic logic op_is_unary(input alu_op_t op);
    return (op == OP_MOD3) || (op == OP_SQRT);
  endfunction

endpackage
