// tb_ps2_receiver: sends PS/2 frames the way a keyboard does (data changes while the PS/2 clock
// is high, the receiver samples on the falling edge) and checks the received codes.
// Covers 50 random codes, a frame with bad parity (must give frame_error, not a code) and a frame
// broken off half way, after which the timeout must let the next frame through intact.
module tb_ps2_receiver;
  localparam int HALF = 20;   // system clocks per half PS/2 clock period
  logic clk = 0, rst = 1;
  logic ps2_clk = 1, ps2_data = 1;
  logic [7:0] code;
  logic code_valid, frame_error;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  logic [7:0] last_code;

  ps2_receiver #(.TIMEOUT_CYCLES(200)) dut (.clk, .rst, .ps2_clk, .ps2_data, .code, .code_valid, .frame_error);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (code_valid) begin n_valid++; last_code = code; end
    if (frame_error) n_err++;
  end

  task automatic send_bit(input logic b);
    ps2_data = b;
    repeat (HALF) @(posedge clk);
    ps2_clk = 0;
    repeat (HALF) @(posedge clk);
    ps2_clk = 1;
  endtask

  task automatic send_frame(input logic [7:0] c, input logic bad_parity, input int nbits);
    logic [10:0] f;
    f = {1'b1, ~^c ^ bad_parity, c, 1'b0};
    for (int i = 0; i < nbits; i++) send_bit(f[i]);
    ps2_data = 1;
    repeat (4 * HALF) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    for (int i = 0; i < 50; i++) begin
      logic [7:0] c;
      int v0;
      c = 8'($urandom);
      v0 = n_valid;
      send_frame(c, 0, 11);
      checks++;
      if (n_valid != v0 + 1 || last_code != c) begin
        failures++; $display("FAIL: sent %h, got %h (%0d codes)", c, last_code, n_valid - v0);
      end
    end
    begin
      int v0, e0;
      v0 = n_valid; e0 = n_err;
      send_frame(8'h5A, 1, 11);
      checks++;
      if (n_valid != v0 || n_err != e0 + 1) begin failures++; $display("FAIL: bad parity accepted"); end
      send_frame(8'h12, 0, 5);          // broken off; timeout must resynchronise
      repeat (300) @(posedge clk);
      send_frame(8'h66, 0, 11);
      checks++;
      if (n_valid != v0 + 1 || last_code != 8'h66) begin
        failures++; $display("FAIL: no resync after broken frame, got %h", last_code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
