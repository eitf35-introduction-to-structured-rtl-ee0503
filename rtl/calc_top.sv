// calc_top: keyboard calculator with stack memory, square root and VGA display.
//
// Operands (0..255, typed as three digits) and operators come from a PS/2 keyboard. Each entry
// is latched with BTN[1] and pushed with BTN[2] into an 8 kB single-port RAM used as a stack;
// Enter pops the top expression, the ALU evaluates it (add, subtract, multiply, modulo 3,
// square root with three decimals) and the expression and its signed result appear as emulated
// seven-segment digits on a 640x480 VGA screen and on the board's four-digit display. BTN[0]
// shows the square root of the switch value; BTN[3] resets. The LEDs show the stack pointer.
// Clocking: the 50 MHz board clock is divided by two to the 25 MHz pixel clock, which runs the
// whole design. Reset is BTN[3] or a clock manager that has not locked yet, synchronised.
// DEBOUNCE_CYCLES (the button debounce window) and REFRESH_W (the width of the board display's
// scan counter) have hardware defaults and are only lowered to shorten simulations. RAM_TEST = 1
// builds the RAM bring-up variant instead of the calculator's memory path: ram_test_ctrl then owns
// the RAM port (keyboard digit latched with BTN[1], written and address stepped with BTN[2],
// SWITCH[0] = 1 steps down), the board display shows the addressed word in decimal and the LEDs
// the address.
// Blocks and their wiring follow the project's overview of the integrated system; pin
// polarities follow the usual Spartan-3 starter board.
module calc_top
  import calc_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 250_000,
  parameter int unsigned REFRESH_W       = 17,
  parameter bit          RAM_TEST        = 1'b0
) (
  input  logic       clk_50,
  input  logic [3:0] btn,
  input  logic [7:0] sw,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic       vga_r,
  output logic       vga_g,
  output logic       vga_b,
  output logic       vga_hs,
  output logic       vga_vs,
  output logic [6:0] seg_n,
  output logic       dp_n,
  output logic [3:0] an_n,
  output logic [7:0] led
);

  localparam int unsigned DEPTH  = 8192;
  localparam int unsigned ADDR_W = $clog2(DEPTH);

  // ---------------- clock and reset ----------------
  logic clk, locked;
  dcm_clkdiv u_dcm (
    .clk_in (clk_50),
    .rst    (btn[3]),
    .clk_div(clk),
    .locked (locked)
  );

  logic [1:0] rst_sync;
  logic       rst;
  always_ff @(posedge clk or negedge locked) begin
    if (!locked) rst_sync <= 2'b11;
    else         rst_sync <= {rst_sync[0], btn[3]};
  end
  assign rst = rst_sync[1];

  // ---------------- buttons ----------------
  logic sqrt_press, latch_press, store_press;
  logic [2:0] btn_level;

  debouncer #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db0 (
    .clk(clk), .rst(rst), .btn_raw(btn[0]), .level(btn_level[0]), .press(sqrt_press));
  debouncer #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db1 (
    .clk(clk), .rst(rst), .btn_raw(btn[1]), .level(btn_level[1]), .press(latch_press));
  debouncer #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db2 (
    .clk(clk), .rst(rst), .btn_raw(btn[2]), .level(btn_level[2]), .press(store_press));

  // ---------------- keyboard ----------------
  logic [7:0] code;
  logic       code_valid, frame_error;
  key_event_t key;
  entry_t     entry;
  logic       entry_clear;

  ps2_receiver u_ps2 (
    .clk(clk), .rst(rst), .ps2_clk(ps2_clk), .ps2_data(ps2_data),
    .code(code), .code_valid(code_valid), .frame_error(frame_error));

  key_decoder u_keys (
    .clk(clk), .rst(rst), .code(code), .code_valid(code_valid), .key(key));

  entry_buffer u_entry (
    .clk(clk), .rst(rst), .key(key), .clear(entry_clear), .entry(entry));

  // ---------------- stack memory and ALU ----------------
  logic              ram_we, ctrl_we;
  logic [ADDR_W-1:0] ram_addr, ctrl_addr;
  logic [7:0]        ram_din, ctrl_din, ram_dout;
  logic              alu_start, alu_busy, alu_done;
  alu_op_t           alu_op;
  logic [7:0]        alu_a, alu_b;
  alu_result_t       alu_result;
  logic              latched, reject, ctrl_busy;
  logic [7:0]        latched_data;
  logic [ADDR_W:0]   sp;
  expr_t             expr;

  stack_controller #(.DEPTH(DEPTH)) u_ctrl (
    .clk(clk), .rst(rst), .key(key), .entry(entry),
    .latch_press(latch_press), .store_press(store_press), .sqrt_press(sqrt_press), .sw(sw),
    .ram_we(ctrl_we), .ram_addr(ctrl_addr), .ram_din(ctrl_din), .ram_dout(ram_dout),
    .alu_start(alu_start), .alu_op(alu_op), .alu_a(alu_a), .alu_b(alu_b),
    .alu_done(alu_done), .alu_result(alu_result),
    .entry_clear(entry_clear), .latched(latched), .latched_data(latched_data),
    .reject(reject), .sp(sp), .busy(ctrl_busy), .expr(expr));

  // RAM port: the calculator's controller, or the bring-up fixture in the RAM_TEST variant.
  logic [3:0] test_kbd;
  logic       test_armed;
  if (RAM_TEST) begin : g_ram_test
    ram_test_ctrl #(.ADDR_W(ADDR_W)) u_test (
      .clk(clk), .rst(rst), .key(key), .latch_press(latch_press), .step_press(store_press),
      .down(sw[0]), .ram_we(ram_we), .ram_addr(ram_addr), .ram_din(ram_din),
      .kbd_data(test_kbd), .armed(test_armed));
  end else begin : g_calc
    assign ram_we     = ctrl_we;
    assign ram_addr   = ctrl_addr;
    assign ram_din    = ctrl_din;
    assign test_kbd   = '0;
    assign test_armed = 1'b0;
  end

  sp_ram #(.DEPTH(DEPTH), .WIDTH(8)) u_ram (
    .clk(clk), .we(ram_we), .addr(ram_addr), .din(ram_din), .dout(ram_dout));

  alu u_alu (
    .clk(clk), .rst(rst), .start(alu_start), .op(alu_op), .a(alu_a), .b(alu_b),
    .busy(alu_busy), .done(alu_done), .result(alu_result));

  // ---------------- displays ----------------
  result_fmt_t fmt;
  result_formatter u_fmt (.res(expr.res), .fmt(fmt));

  logic [9:0] hcount, vcount;
  logic       hsync_raw, vsync_raw, blank, frame_start;
  logic [2:0] rgb;

  vga_controller u_vga (
    .clk(clk), .rst(rst), .hcount(hcount), .vcount(vcount),
    .hsync(hsync_raw), .vsync(vsync_raw), .blank(blank), .frame_start(frame_start));

  display_controller u_disp (
    .clk(clk), .rst(rst), .hcount(hcount), .vcount(vcount),
    .hsync_in(hsync_raw), .vsync_in(vsync_raw), .blank_in(blank),
    .expr(expr), .fmt(fmt), .entry(entry), .latched(latched),
    .rgb(rgb), .hsync(vga_hs), .vsync(vga_vs));

  assign {vga_r, vga_g, vga_b} = rgb;

  // Board display: "-123" style integers, "15.96" style roots, "-OF-" on overflow. In the RAM_TEST
  // variant: the last typed digit (point lit while a value is latched), then the addressed word.
  logic [3:0][3:0] board_chars;
  logic [3:0]      board_dps;
  logic [2:0][3:0] dout_bcd;
  assign dout_bcd = bin_to_bcd3({2'b00, ram_dout});
  always_comb begin
    board_dps = 4'b0000;
    if (RAM_TEST) begin
      board_chars = {test_kbd, dout_bcd[2], dout_bcd[1], dout_bcd[0]};
      board_dps   = {test_armed, 3'b000};
    end else if (!expr.shown) begin
      board_chars = {CH_BLANK, CH_BLANK, CH_BLANK, CH_BLANK};
    end else if (fmt.overflow) begin
      board_chars = {CH_MINUS, CH_O, CH_F, CH_MINUS};
    end else if (fmt.has_frac) begin
      board_chars = {fmt.int_bcd[1], fmt.int_bcd[0], fmt.frac_bcd[2], fmt.frac_bcd[1]};
      board_dps   = 4'b0100;
    end else begin
      board_chars = {fmt.neg ? CH_MINUS : CH_BLANK, fmt.int_bcd[2], fmt.int_bcd[1],
                     fmt.int_bcd[0]};
    end
  end

  board_seg7 #(.REFRESH_W(REFRESH_W)) u_board (
    .clk(clk), .rst(rst), .chars(board_chars), .dps(board_dps),
    .seg_n(seg_n), .dp_n(dp_n), .an_n(an_n));

  assign led = RAM_TEST ? ram_addr[7:0] : sp[7:0];

endmodule
