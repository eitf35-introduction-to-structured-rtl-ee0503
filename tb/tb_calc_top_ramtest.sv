// tb_calc_top_ramtest: the RAM bring-up variant of the top (RAM_TEST = 1), through its pins.
// A keyboard model types digits, bouncing buttons latch them (BTN[1]) and write them while the
// address counts up (BTN[2], SWITCH[0] = 0); then SWITCH[0] = 1 makes BTN[2] count down and the
// board display must show each stored value again, with the LEDs showing the address. The debounce
// window and display scan are shortened.
module tb_calc_top_ramtest;
  import calc_pkg::*;
  localparam int unsigned DEBOUNCE = 20;
  localparam int unsigned REFRESH  = 6;
  logic clk_50 = 0;
  logic [3:0] btn = 4'b1000;
  logic [7:0] sw = 8'd0;
  logic ps2_clk = 1, ps2_data = 1;
  logic vga_r, vga_g, vga_b, vga_hs, vga_vs;
  logic [6:0] seg_n; logic dp_n; logic [3:0] an_n; logic [7:0] led;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_write = 0;

  calc_top #(.DEBOUNCE_CYCLES(DEBOUNCE), .REFRESH_W(REFRESH), .RAM_TEST(1'b1)) dut (.*);

  always #10 clk_50 = ~clk_50;

  logic [7:0] led_q = 0;
  always @(posedge dut.clk) begin
    led_q <= led;
    if (led == led_q + 8'd1) n_up++;
    if (led == led_q - 8'd1) n_down++;
    if (dut.ram_we) n_write++;
  end

  localparam int PS2_HALF = 40;
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
  task automatic type_digit(input int d);
    logic [7:0] t [10] = '{8'h45, 8'h16, 8'h1E, 8'h26, 8'h25, 8'h2E, 8'h36, 8'h3D, 8'h3E, 8'h46};
    ps2_byte(t[d]); ps2_byte(8'hF0); ps2_byte(t[d]);
  endtask
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
  function automatic string seg_char(input logic [6:0] s);
    case (~s)
      7'h3F: return "0"; 7'h06: return "1"; 7'h5B: return "2"; 7'h4F: return "3";
      7'h66: return "4"; 7'h6D: return "5"; 7'h7D: return "6"; 7'h07: return "7";
      7'h7F: return "8"; 7'h6F: return "9"; default: return "?";
    endcase
  endfunction
  task automatic expect_word(input int addr, input int v);
    string d [4];
    repeat (100) @(posedge clk_50);
    for (int c = 0; c < (8 << REFRESH); c++) begin
      @(posedge clk_50);
      for (int i = 0; i < 4; i++) if (!an_n[i]) d[i] = seg_char(seg_n);
    end
    checks++;
    if ({d[2], d[1], d[0]} != $sformatf("%03d", v) || int'(led) != addr) begin
      failures++;
      $display("FAIL: address %0d shows %s%s%s, expected %03d at %0d", led, d[2], d[1], d[0], v, addr);
    end
  endtask

  initial begin
    int vals [4] = '{6, 2, 9, 4};
    repeat (100) @(posedge clk_50);
    btn[3] = 0;
    repeat (100) @(posedge clk_50);
    for (int i = 0; i < 4; i++) begin
      type_digit(vals[i]); button(1); button(2);
    end
    checks++;
    if (led != 8'd4) begin failures++; $display("FAIL: address %0d after four writes", led); end
    sw[0] = 1;
    for (int i = 3; i >= 0; i--) begin
      button(2);
      expect_word(i, vals[i]);
    end
    checks++;
    if (n_up < 4 || n_down < 4 || n_write != 4) begin
      failures++; $display("FAIL: %0d steps up, %0d down, %0d writes", n_up, n_down, n_write);
    end
    $display("  address steps up %0d, down %0d, writes %0d", n_up, n_down, n_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk_50);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
