// tb_stack_controller: the memory controller with the RAM and the ALU around it.
// Stores expression groups through latch and store, pops them with Enter and checks each shown
// expression and result against a stack model in the testbench: groups must come back in reverse
// order, with the right operands, operator and result, and the stack pointer must move by the
// group size. Also checked: refused entries (operator where an operand is due, an operand in
// 130..135, a second operand for modulo 3), Enter ignored in the middle of a group and on an empty
// stack, entering new groups between pops, the switch square-root test, and a full stack (a small
// DEPTH) refusing a first operand whose group would not fit.
module tb_stack_controller;
  import calc_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst = 1;
  key_event_t key = '0;
  entry_t entry = '0;
  logic latch_press = 0, store_press = 0, sqrt_press = 0;
  logic [7:0] sw = 0;
  logic ram_we; logic [3:0] ram_addr; logic [7:0] ram_din, ram_dout;
  logic alu_start, alu_done, alu_busy; alu_op_t alu_op; logic [7:0] alu_a, alu_b;
  alu_result_t alu_result;
  logic entry_clear, latched, reject, busy;
  logic [7:0] latched_data;
  logic [4:0] sp;
  expr_t expr;
  int checks = 0, failures = 0, n_reject = 0;

  stack_controller #(.DEPTH(DEPTH)) dut (.*);
  sp_ram #(.DEPTH(DEPTH), .WIDTH(8)) u_ram (.clk, .we(ram_we), .addr(ram_addr), .din(ram_din), .dout(ram_dout));
  alu u_alu (.clk, .rst, .start(alu_start), .op(alu_op), .a(alu_a), .b(alu_b), .busy(alu_busy),
             .done(alu_done), .result(alu_result));

  always #5 clk = ~clk;
  always @(posedge clk) if (reject) n_reject++;

  typedef struct { int a; alu_op_t op; int b; logic has_b; } grp_t;
  grp_t model [$];

  task automatic do_latch();
    @(posedge clk) latch_press <= 1;
    @(posedge clk) latch_press <= 0;
    repeat (2) @(posedge clk);
  endtask
  task automatic do_store();
    @(posedge clk) store_press <= 1;
    @(posedge clk) store_press <= 0;
    repeat (2) @(posedge clk);
  endtask

  task automatic put_num(input int v);
    entry <= '{kind: ENTRY_NUMBER, ndigits: 3'd3, digits: '0, value: 8'(v), op: OP_ADD};
    do_latch();
    do_store();
    entry <= '0;
  endtask
  task automatic put_op(input alu_op_t o);
    entry <= '{kind: ENTRY_OPERATOR, ndigits: 3'd0, digits: '0, value: 8'd0, op: o};
    do_latch();
    do_store();
    entry <= '0;
  endtask

  task automatic push_group(input int a, input alu_op_t o, input int b);
    grp_t g;
    put_num(a);
    put_op(o);
    if (!op_is_unary(o)) put_num(b);
    g.a = a; g.op = o; g.b = b; g.has_b = !op_is_unary(o);
    model.push_back(g);
  endtask

  task automatic enter();
    @(posedge clk) key <= '{valid: 1'b1, kind: KEY_ENTER, digit: 4'd0, op: OP_ADD};
    @(posedge clk) key <= '0;
    repeat (2) @(posedge clk);
    while (busy) @(posedge clk);
    @(posedge clk);
  endtask

  function automatic int ref_result(input grp_t g, output logic neg);
    neg = 0;
    case (g.op)
      OP_ADD: return g.a + g.b;
      OP_SUB: begin neg = g.a < g.b; return neg ? g.b - g.a : g.a - g.b; end
      OP_MUL: return g.a * g.b;
      OP_MOD3: return g.a % 3;
      default: return int'($floor($sqrt(real'(g.a))));
    endcase
  endfunction

  task automatic pop_and_check();
    grp_t g;
    int r, sp0;
    logic neg;
    g = model.pop_back();
    sp0 = int'(sp);
    expr.shown = 0;
    enter();
    r = ref_result(g, neg);
    checks++;
    if (!expr.shown || int'(expr.a) != g.a || expr.op != g.op || expr.has_b != g.has_b
        || (g.has_b && int'(expr.b) != g.b) || int'(expr.res.mag) != r || expr.res.neg != neg
        || expr.res.overflow != (g.op != OP_SQRT && r > 999)) begin
      failures++;
      $display("FAIL: popped a=%0d op=%s b=%0d res=%0d neg=%0d, expected a=%0d op=%s b=%0d res=%0d",
               expr.a, expr.op.name(), expr.b, expr.res.mag, expr.res.neg, g.a, g.op.name(), g.b, r);
    end
    checks++;
    if (int'(sp) != sp0 - (g.has_b ? 3 : 2)) begin failures++; $display("FAIL: sp %0d after pop from %0d", sp, sp0); end
  endtask

  initial begin
    int r0, sp0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    // Enter on an empty stack does nothing
    enter();
    checks++;
    if (expr.shown || sp != 0) begin failures++; $display("FAIL: pop of empty stack"); end
    // refused entries
    r0 = n_reject;
    put_op(OP_ADD);                 // operator where the first operand is due
    put_num(132);                   // operator code as operand
    checks++;
    if (n_reject != r0 + 2 || sp != 0) begin failures++; $display("FAIL: refusals %0d sp %0d", n_reject - r0, sp); end
    push_group(98, OP_ADD, 99);
    push_group(5, OP_SUB, 200);
    put_num(7); put_op(OP_MOD3);
    r0 = n_reject;
    put_num(9);                     // accepted: "7 mod3" is complete, 9 starts the next group
    checks++;
    if (n_reject != r0 || sp != 9) begin failures++; $display("FAIL: sp %0d after 9", sp); end
    put_op(OP_MOD3);
    model.push_back('{a: 7, op: OP_MOD3, b: 0, has_b: 1'b0});
    model.push_back('{a: 9, op: OP_MOD3, b: 0, has_b: 1'b0});
    checks++;
    if (sp != 10) begin failures++; $display("FAIL: sp %0d, expected 10", sp); end
    // half group: Enter ignored
    put_num(255); put_op(OP_MUL);
    sp0 = int'(sp);
    enter();
    checks++;
    if (int'(sp) != sp0) begin failures++; $display("FAIL: Enter popped a half group"); end
    put_num(255);
    model.push_back('{a: 255, op: OP_MUL, b: 255, has_b: 1'b1});
    checks++;
    if (sp != 13) begin failures++; $display("FAIL: sp %0d, expected 13", sp); end
    // full: 13 + 3 > 16 is fine (16), but then nothing more
    r0 = n_reject;
    push_group(200, OP_SQRT, 0);
    checks++;
    if (sp != 15) begin failures++; $display("FAIL: sp %0d, expected 15", sp); end
    put_num(1);
    checks++;
    if (n_reject != r0 + 1 || sp != 15) begin failures++; $display("FAIL: full stack accepted an operand"); end
    pop_and_check();                // sqrt 200
    pop_and_check();                // 255*255 overflow
    pop_and_check();                // 9 mod 3
    push_group(17, OP_SUB, 4);      // entered between pops
    pop_and_check();
    pop_and_check();                // 7 mod 3
    pop_and_check();                // 5 - 200
    pop_and_check();                // 98 + 99
    checks++;
    if (sp != 0) begin failures++; $display("FAIL: stack not empty at the end"); end
    // square root of the switches
    sw <= 8'd255;
    @(posedge clk) sqrt_press <= 1;
    @(posedge clk) sqrt_press <= 0;
    repeat (2) @(posedge clk);
    while (busy) @(posedge clk);
    @(posedge clk);
    checks++;
    if (expr.op != OP_SQRT || expr.a != 8'd255 || expr.res.mag != 16'd15 || expr.res.frac != 10'd992) begin
      failures++; $display("FAIL: switch square root %0d.%0d", expr.res.mag, expr.res.frac);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
