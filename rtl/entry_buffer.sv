// entry_buffer: the number or operator the user is typing.
//
// Digit keys shift a BCD digit in (at most four are kept; further digits are ignored). An
// operator key replaces the entry by that operator, and a digit after an operator starts a new
// number. Backspace removes the last digit, or the operator. value is the typed number in binary,
// saturated at 255, so "1234" gives 255. clear empties the entry once it has been stored.
// Typing three digits per operand ("009"), saturation at 255 and editing with backspace follow
// the project description; the four-digit limit is this design's choice.
// Interface: key events from key_decoder; the entry is a register, updated the cycle after a key.
module entry_buffer
  import calc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  key_event_t key,
  input  logic       clear,
  output entry_t     entry
);

  entry_kind_t     kind;
  logic [2:0]      ndigits;
  logic [3:0][3:0] digits;
  alu_op_t         op;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      kind    <= ENTRY_EMPTY;
      ndigits <= '0;
      digits  <= '0;
      op      <= OP_ADD;
    end else if (key.valid) begin
      case (key.kind)
        KEY_DIGIT: begin
          if (kind != ENTRY_NUMBER) begin
            kind    <= ENTRY_NUMBER;
            ndigits <= 3'd1;
            digits  <= {12'd0, key.digit};
          end else if (ndigits < 3'd4) begin
            ndigits <= ndigits + 3'd1;
            digits  <= {digits[2:0], key.digit};
          end
        end
        KEY_OPERATOR: begin
          kind    <= ENTRY_OPERATOR;
          op      <= key.op;
          ndigits <= '0;
          digits  <= '0;
        end
        KEY_BACKSPACE: begin
          if (kind == ENTRY_NUMBER && ndigits > 3'd1) begin
            ndigits <= ndigits - 3'd1;
            digits  <= {4'd0, digits[3:1]};
          end else begin
            kind    <= ENTRY_EMPTY;
            ndigits <= '0;
            digits  <= '0;
          end
        end
        default: ;  // Enter is handled by the stack controller
      endcase
    end
  end

  // Decimal value of the typed digits, saturated to 255.
  logic [13:0] dec_value;
  always_comb begin
    dec_value = 14'(digits[3]) * 14'd1000 + 14'(digits[2]) * 14'd100
              + 14'(digits[1]) * 14'd10 + 14'(digits[0]);
    entry.kind    = kind;
    entry.ndigits = ndigits;
    entry.digits  = digits;
    entry.op      = op;
    entry.value   = (dec_value > 14'd255) ? 8'd255 : dec_value[7:0];
  end

endmodule
