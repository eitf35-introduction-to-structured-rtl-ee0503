// stack_controller: the calculator's memory controller.
//
// Expressions are kept in the single-port RAM as a stack of bytes, filled from address 0 up.
// An entry is first latched (latch_press, BTN[1]) into a data register and then stored
// (store_press, BTN[2]) at the stack pointer, which then moves up by one. A small grammar state
// decides what may be latched: first operand, then operator, then (unless the operator is
// modulo 3 or square root) the second operand. Operands are 0..255 but not the operator codes
// 130..135; anything else is refused and reject pulses. So the RAM only ever holds complete
// groups "a op b" or "a op", bottom to top.
// An Enter key, when no group is half entered and the stack is not empty, pops the top group:
// the top byte is read; if it is a one-operand operator the byte below is the operand,
// otherwise the top byte is b, the next the operator and the third a. The stack pointer drops
// by the group size, the ALU is started, and its result is published with the group in expr for
// the displays. Groups come off in reverse order of entry, and new groups can be entered between
// Enter presses. sqrt_press (BTN[0]) runs the square root of the switch value as a test.
// Storing, popping three locations on Enter, the operator code range, refusing those codes as
// operands, BTN[1]/BTN[2] and testing the root with BTN[0] and the switches follow the project
// description; the grammar check, the order "a op b" within a group and the order of the pops
// are this design's choices. A first operand is stored only if its whole group fits.
// Timing: a store takes one cycle; a pop takes four or five cycles plus the ALU time.
module stack_controller
  import calc_pkg::*;
#(
  parameter int unsigned DEPTH  = 8192,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  key_event_t        key,
  input  entry_t            entry,
  input  logic              latch_press,
  input  logic              store_press,
  input  logic              sqrt_press,
  input  logic [7:0]        sw,
  // RAM port
  output logic              ram_we,
  output logic [ADDR_W-1:0] ram_addr,
  output logic [7:0]        ram_din,
  input  logic [7:0]        ram_dout,
  // ALU port
  output logic              alu_start,
  output alu_op_t           alu_op,
  output logic [7:0]        alu_a,
  output logic [7:0]        alu_b,
  input  logic              alu_done,
  input  alu_result_t       alu_result,
  // status
  output logic              entry_clear,
  output logic              latched,
  output logic [7:0]        latched_data,
  output logic              reject,
  output logic [ADDR_W:0]   sp,
  output logic              busy,
  output expr_t             expr
);

  typedef enum logic [1:0] {EXPECT_A, EXPECT_OP, EXPECT_B} gram_t;
  typedef enum logic [2:0] {S_IDLE, S_POP1, S_POP2, S_POP3, S_POP4, S_ALU, S_WAIT} state_t;

  gram_t      gram;
  state_t     state;
  logic [7:0] top_q, second_q;
  logic [7:0] op_a, op_b;
  alu_op_t    op_q;
  logic       op_has_b;

  // What the current entry would store, and whether the grammar allows it now.
  logic       entry_ok;
  logic [7:0] entry_byte;
  always_comb begin
    entry_ok   = 1'b0;
    entry_byte = entry.value;
    case (gram)
      EXPECT_A:  entry_ok = (entry.kind == ENTRY_NUMBER) && !is_operator_code(entry.value)
                            && (sp <= (ADDR_W+1)'(DEPTH - 3));
      EXPECT_B:  entry_ok = (entry.kind == ENTRY_NUMBER) && !is_operator_code(entry.value);
      EXPECT_OP: begin
        entry_ok   = (entry.kind == ENTRY_OPERATOR);
        entry_byte = op_to_code(entry.op);
      end
      default: ;
    endcase
  end

  logic do_store, do_pop, do_sqrt_test;
  assign do_store     = (state == S_IDLE) && store_press && latched;
  assign do_pop       = (state == S_IDLE) && !do_store && key.valid && (key.kind == KEY_ENTER)
                        && (gram == EXPECT_A) && (sp != '0);
  assign do_sqrt_test = (state == S_IDLE) && !do_store && !do_pop && sqrt_press;

  // RAM address: the stack pointer when idle (write), then the locations below it.
  always_comb begin
    ram_we  = do_store;
    ram_din = latched_data;
    case (state)
      S_POP1:  ram_addr = ADDR_W'(sp - 1);
      S_POP2:  ram_addr = ADDR_W'(sp - 2);
      S_POP3:  ram_addr = ADDR_W'(sp - 3);
      default: ram_addr = ADDR_W'(sp);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      gram         <= EXPECT_A;
      state        <= S_IDLE;
      sp           <= '0;
      latched      <= 1'b0;
      latched_data <= '0;
      reject       <= 1'b0;
      entry_clear  <= 1'b0;
      top_q        <= '0;
      second_q     <= '0;
      op_a         <= '0;
      op_b         <= '0;
      op_q         <= OP_ADD;
      op_has_b     <= 1'b0;
      alu_start    <= 1'b0;
      expr         <= '0;
    end else begin
      reject      <= 1'b0;
      entry_clear <= 1'b0;
      alu_start   <= 1'b0;
      case (state)
        S_IDLE: begin
          if (latch_press) begin
            if (entry_ok) begin
              latched      <= 1'b1;
              latched_data <= entry_byte;
            end else begin
              reject <= 1'b1;
            end
          end
          if (do_store) begin
            sp          <= sp + 1'b1;
            latched     <= 1'b0;
            entry_clear <= 1'b1;
            case (gram)
              EXPECT_A:  gram <= EXPECT_OP;
              EXPECT_OP: gram <= op_is_unary(code_to_op(latched_data)) ? EXPECT_A : EXPECT_B;
              default:   gram <= EXPECT_A;
            endcase
          end else if (do_pop) begin
            state <= S_POP1;
          end else if (do_sqrt_test) begin
            op_a     <= sw;
            op_b     <= '0;
            op_q     <= OP_SQRT;
            op_has_b <= 1'b0;
            state    <= S_ALU;
          end
        end
        // address sp-1 presented; its data appears after this edge
        S_POP1: state <= S_POP2;
        S_POP2: begin
          top_q <= ram_dout;
          state <= S_POP3;
        end
        S_POP3: begin
          second_q <= ram_dout;
          if (is_operator_code(top_q)) begin
            // "a op" with a one-operand operator on top
            op_q     <= code_to_op(top_q);
            op_a     <= ram_dout;
            op_b     <= '0;
            op_has_b <= 1'b0;
            sp       <= sp - (ADDR_W+1)'(2);
            state    <= S_ALU;
          end else begin
            state <= S_POP4;
          end
        end
        S_POP4: begin
          op_q     <= code_to_op(second_q);
          op_a     <= ram_dout;
          op_b     <= top_q;
          op_has_b <= 1'b1;
          sp       <= sp - (ADDR_W+1)'(3);
          state    <= S_ALU;
        end
        S_ALU: begin
          alu_start <= 1'b1;
          state     <= S_WAIT;
        end
        S_WAIT: if (alu_done) begin
          expr.shown <= 1'b1;
          expr.a     <= op_a;
          expr.op    <= op_q;
          expr.has_b <= op_has_b;
          expr.b     <= op_b;
          expr.res   <= alu_result;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign alu_op = op_q;
  assign alu_a  = op_a;
  assign alu_b  = op_b;
  assign busy   = (state != S_IDLE);

  // A store and a pop never happen together, and the stack never grows past the RAM.
  assert property (@(posedge clk) disable iff (rst) !(do_store && do_pop));
  assert property (@(posedge clk) disable iff (rst) sp <= (ADDR_W+1)'(DEPTH));

endmodule
