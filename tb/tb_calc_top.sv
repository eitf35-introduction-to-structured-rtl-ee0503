// tb_calc_top: the whole calculator, driven through its pins.
// A PS/2 keyboard model types operands and operators (make code, then F0 and the make code on
// release), buttons are pressed with bounce, and results are read back from the multiplexed
// board display and the VGA signals. The session stores five expressions, among them a 4-digit
// number saturating to 255, an operand that is an operator code and must be refused, corrections
// with backspace, an Enter in the middle of a group, then pops them in reverse order with a new
// expression entered between pops, evaluates the square root of the switches with BTN[0], and
// checks every shown result. Each mechanism is counted and must have happened at least once.
// The calculator runs with all its default parameters (10 ms debounce window, 17-bit display
// scan counter); DEBOUNCE and REFRESH below only tell the testbench how long to wait.
module tb_calc_top;
  localparam int unsigned DEBOUNCE = 250_000;
  localparam int unsigned REFRESH  = 17;
  import calc_pkg::*;
  logic clk_50 = 0;
  logic [3:0] btn = 4'b1000;
  logic [7:0] sw = 8'd0;
  logic ps2_clk = 1, ps2_data = 1;
  logic vga_r, vga_g, vga_b, vga_hs, vga_vs;
  logic [6:0] seg_n; logic dp_n; logic [3:0] an_n; logic [7:0] led;
  int checks = 0, failures = 0;

  calc_top dut (.*);

  always #10 clk_50 = ~clk_50;   // 50 MHz

  // ---------------- mechanism counters ----------------
  int n_store = 0, n_pop = 0, n_reject = 0, n_backspace = 0, n_saturate = 0, n_overflow = 0;
  int n_negative = 0, n_sqrt = 0, n_unary = 0, n_release = 0, n_enter_ignored = 0;
  int n_switch_sqrt = 0, n_keys = 0;
  always @(posedge dut.clk) begin
    if (dut.ram_we) n_store++;
    if (dut.u_ctrl.reject) n_reject++;
    if (dut.key.valid) n_keys++;
    if (dut.key.valid && dut.key.kind == KEY_BACKSPACE) n_backspace++;
    if (dut.code_valid && dut.code == 8'hF0) n_release++;
    if (dut.u_ctrl.state == 3'd1) n_pop++;           // first pop state
    if (dut.u_ctrl.do_store && dut.entry.kind == ENTRY_NUMBER && dut.entry.ndigits == 3'd4
        && dut.entry.value == 8'd255) n_saturate++;
    if (dut.alu_done && dut.alu_result.overflow) n_overflow++;
    if (dut.alu_done && dut.alu_result.neg) n_negative++;
    if (dut.alu_done && dut.alu_result.has_frac) n_sqrt++;
    if (dut.alu_start && (dut.alu_op == OP_MOD3 || dut.alu_op == OP_SQRT)) n_unary++;
    if (dut.key.valid && dut.key.kind == KEY_ENTER && dut.u_ctrl.gram != 2'd0) n_enter_ignored++;
    if (dut.u_ctrl.do_sqrt_test) n_switch_sqrt++;
  end

  // ---------------- keyboard model ----------------
  localparam int PS2_HALF = 40;   // 50 MHz clocks per half PS/2 clock period
  task automatic ps2_byte(input logic [7:0] c);
    logic [10:0] f;
    f = {1'b1, ~^c, c, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = f[i];
      repeat (PS2_HALF) @(posedge clk_50);
      ps2_clk = 0;
      repeat (PS2_HALF) @(posedge clk_50);
      ps2_clk = 1;
    end
    repeat (4 * PS2_HALF) @(posedge clk_50);
  endtask
  task automatic key(input logic [7:0] c);
    ps2_byte(c); ps2_byte(8'hF0); ps2_byte(c);
  endtask
  function automatic logic [7:0] digit_code(input int d);
    logic [7:0] t [10] = '{8'h45, 8'h16, 8'h1E, 8'h26, 8'h25, 8'h2E, 8'h36, 8'h3D, 8'h3E, 8'h46};
    return t[d];
  endfunction
  task automatic type_num(input string s);
    for (int i = 0; i < s.len(); i++) key(digit_code(s[i] - "0"));
  endtask
  localparam logic [7:0] K_PLUS = 8'h79, K_MINUS = 8'h7B, K_TIMES = 8'h7C, K_MOD = 8'h3A;
  localparam logic [7:0] K_SQRT = 8'h1B, K_ENTER = 8'h5A, K_BKSP = 8'h66;

  // ---------------- buttons, with bounce ----------------
  task automatic button(input int b);
    for (int i = 0; i < 4; i++) begin
      btn[b] = 1; repeat ($urandom_range(1, 8)) @(posedge clk_50);
      btn[b] = 0; repeat ($urandom_range(1, 8)) @(posedge clk_50);
    end
    btn[b] = 1;
    repeat (2 * DEBOUNCE + 20) @(posedge clk_50);
    btn[b] = 0;
    repeat (2 * DEBOUNCE + 20) @(posedge clk_50);
  endtask
  task automatic latch_store();
    button(1); button(2);
  endtask

  // ---------------- board display reader ----------------
  function automatic string seg_char(input logic [6:0] s, input logic dp);
    string c;
    case (~s)
      7'h3F: c = "0"; 7'h06: c = "1"; 7'h5B: c = "2"; 7'h4F: c = "3"; 7'h66: c = "4";
      7'h6D: c = "5"; 7'h7D: c = "6"; 7'h07: c = "7"; 7'h7F: c = "8"; 7'h6F: c = "9";
      7'h40: c = "-"; 7'h71: c = "F"; 7'h00: c = " "; default: c = "?";
    endcase
    if (!dp) c = {c, "."};
    return c;
  endfunction
  task automatic read_board(output string text);
    string d [4];
    for (int c = 0; c < (8 << REFRESH); c++) begin
      @(posedge clk_50);
      for (int i = 0; i < 4; i++) if (!an_n[i]) d[i] = seg_char(seg_n, dp_n);
    end
    text = {d[3], d[2], d[1], d[0]};
  endtask
  task automatic expect_board(input string want);
    string got;
    repeat (200) @(posedge clk_50);
    read_board(got);
    checks++;
    if (got != want) begin failures++; $display("FAIL: board shows \"%s\", expected \"%s\"", got, want); end
  endtask
  task automatic enter_and_expect(input string want);
    key(K_ENTER);
    expect_board(want);
  endtask

  // ---------------- VGA timing ----------------
  int hs_falls = 0, vs_falls = 0, lit_green = 0, lit_yellow = 0;
  longint last_hs = 0, last_vs = 0, hs_period = 0, vs_period = 0, t50 = 0;
  logic hs_q = 1, vs_q = 1;
  always @(posedge clk_50) begin
    t50++;
    hs_q <= vga_hs; vs_q <= vga_vs;
    if (hs_q && !vga_hs) begin hs_period = t50 - last_hs; last_hs = t50; hs_falls++; end
    if (vs_q && !vga_vs) begin vs_period = t50 - last_vs; last_vs = t50; vs_falls++; end
    if ({vga_r, vga_g, vga_b} == 3'b010) lit_green++;
    if ({vga_r, vga_g, vga_b} == 3'b110) lit_yellow++;
  end

  task automatic check_count(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL: %s never happened", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    sw = 8'd255;
    repeat (100) @(posedge clk_50);
    btn[3] = 0;
    repeat (100) @(posedge clk_50);
    expect_board("    ");
    // G1: 098 + 099
    type_num("098"); latch_store();
    key(K_PLUS);     latch_store();
    type_num("099"); latch_store();
    // G2: 005 - 200
    type_num("005"); latch_store();
    key(K_MINUS);    latch_store();
    type_num("200"); latch_store();
    // G3: 1234 saturates to 255, mod 3
    type_num("1234"); latch_store();
    key(K_MOD);       latch_store();
    // G4: 133 refused, corrected to 255, then Enter in the middle of the group, * 255
    type_num("133"); button(1);
    key(K_BKSP); key(K_BKSP); key(K_BKSP);
    type_num("255"); latch_store();
    key(K_TIMES);    latch_store();
    key(K_ENTER);
    type_num("255"); latch_store();
    // G5: 200 square root
    type_num("200"); latch_store();
    key(K_SQRT);     latch_store();
    checks++;
    if (led != 8'd13) begin failures++; $display("FAIL: stack pointer %0d, expected 13", led); end
    enter_and_expect("14.14");
    enter_and_expect("-0F-");     // O is drawn like 0 on seven segments
    // G6 entered between pops: 012 - 012
    type_num("012"); latch_store();
    key(K_MINUS);    latch_store();
    type_num("012"); latch_store();
    enter_and_expect(" 000");
    enter_and_expect(" 000");     // 255 mod 3
    enter_and_expect("-195");
    enter_and_expect(" 197");
    checks++;
    if (led != 8'd0) begin failures++; $display("FAIL: stack pointer %0d at the end", led); end
    enter_and_expect(" 197");     // empty stack: nothing changes
    button(0);                    // square root of the switches
    expect_board("15.96");
    checks++;
    if (dut.expr.res.frac != 10'd992 || dut.expr.res.mag != 16'd15) begin
      failures++; $display("FAIL: sqrt(255) is %0d + %0d/1024", dut.expr.res.mag, dut.expr.res.frac);
    end
    // let two whole frames be drawn
    repeat (4 * 800 * 525 + 1000) @(posedge clk_50);
    checks++;
    if (hs_period != 1600) begin failures++; $display("FAIL: line is %0d clocks of 50 MHz", hs_period); end
    checks++;
    if (vs_falls < 2 || vs_period != 1600 * 525) begin failures++; $display("FAIL: frame %0d clocks (%0d vsyncs)", vs_period, vs_falls); end
    checks++;
    if (lit_green == 0 || lit_yellow == 0) begin failures++; $display("FAIL: nothing drawn on the VGA screen"); end
    $display("mechanisms:");
    check_count("stores", n_store);
    check_count("pops", n_pop);
    check_count("refused entries", n_reject);
    check_count("backspaces", n_backspace);
    check_count("saturations to 255", n_saturate);
    check_count("overflows", n_overflow);
    check_count("negative results", n_negative);
    check_count("square roots", n_sqrt);
    check_count("one-operand operations", n_unary);
    check_count("key releases ignored", n_release);
    check_count("Enter in a half group", n_enter_ignored);
    check_count("switch square roots", n_switch_sqrt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000_000) @(posedge clk_50);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
