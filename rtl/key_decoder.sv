// key_decoder: PS/2 scan codes (set 2) to calculator key events.
//
// A key press sends its make code; a release sends F0 followed by the make code, and some keys
// send E0 first. The decoder drops the code after F0, so each press gives exactly one event, and
// remembers an E0 only long enough to tell the keypad Enter (E0 5A) from the main one (both mean
// Enter). Keys: 0-9 on the main row or the keypad give digits; keypad +, keypad - or the main
// '-', keypad * give add, subtract and multiply; 'm' gives modulo 3 and 's' the square root;
// Enter evaluates; Backspace deletes. Every other key is ignored.
// Enter, Backspace and 's' for the square root are named in the project description; the other
// key assignments are this design's choice.
// Interface: code/code_valid from ps2_receiver in, one-cycle key.valid pulse out, the cycle after.
module key_decoder
  import calc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] code,
  input  logic       code_valid,
  output key_event_t key
);

  logic release_next;

  key_event_t dec;
  always_comb begin
    dec       = '0;
    dec.valid = 1'b1;
    dec.kind  = KEY_DIGIT;
    case (code)
      8'h45, 8'h70: dec.digit = 4'd0;
      8'h16, 8'h69: dec.digit = 4'd1;
      8'h1E, 8'h72: dec.digit = 4'd2;
      8'h26, 8'h7A: dec.digit = 4'd3;
      8'h25, 8'h6B: dec.digit = 4'd4;
      8'h2E, 8'h73: dec.digit = 4'd5;
      8'h36, 8'h74: dec.digit = 4'd6;
      8'h3D, 8'h6C: dec.digit = 4'd7;
      8'h3E, 8'h75: dec.digit = 4'd8;
      8'h46, 8'h7D: dec.digit = 4'd9;
      8'h79:        begin dec.kind = KEY_OPERATOR; dec.op = OP_ADD;  end
      8'h7B, 8'h4E: begin dec.kind = KEY_OPERATOR; dec.op = OP_SUB;  end
      8'h7C:        begin dec.kind = KEY_OPERATOR; dec.op = OP_MUL;  end
      8'h3A:        begin dec.kind = KEY_OPERATOR; dec.op = OP_MOD3; end
      8'h1B:        begin dec.kind = KEY_OPERATOR; dec.op = OP_SQRT; end
      8'h5A:        dec.kind = KEY_ENTER;
      8'h66:        dec.kind = KEY_BACKSPACE;
      default:      dec.valid = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      release_next <= 1'b0;
      key          <= '0;
    end else begin
      key.valid <= 1'b0;
      if (code_valid) begin
        if (code == 8'hF0) begin
          release_next <= 1'b1;
        end else if (code == 8'hE0) begin
          // prefix only: the code that follows is decoded like its unprefixed twin
        end else if (release_next) begin
          release_next <= 1'b0;
        end else begin
          key <= dec;
        end
      end
    end
  end

endmodule
