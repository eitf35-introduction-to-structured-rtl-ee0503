// ram_test_ctrl: bring-up fixture for the stack RAM, driven from buttons and switches.
//
// Lets the RAM be written and read by hand before the calculator's controller is used. The
// last digit typed on the keyboard (4 bits, upper 4 bits zero) is the write data. BTN[1]
// (latch_press) registers it into the memory input register. BTN[2] (step_press) writes the
// registered value at the current address, if one was latched since the last write, and then
// moves the address counter: up with SWITCH[0] = 0, down with SWITCH[0] = 1, wrapping at the
// ends. Between presses the RAM reads the addressed word, so ram_dout can be shown on a display
// and the address on the LEDs. Write data from the keyboard, BTN[1] latching, BTN[2] as write
// enable and address step, and the switch choosing the direction follow the project
// description; writing only a freshly latched value is this design's choice, so that the
// counter can step back over stored words to read them without overwriting them.
// Timing: one write and one address step per press; read data one cycle after the address.
module ram_test_ctrl
  import calc_pkg::*;
#(
  parameter int unsigned ADDR_W = 13
) (
  input  logic              clk,
  input  logic              rst,
  input  key_event_t        key,
  input  logic              latch_press,
  input  logic              step_press,
  input  logic              down,       // SWITCH[0]
  output logic              ram_we,
  output logic [ADDR_W-1:0] ram_addr,
  output logic [7:0]        ram_din,
  output logic [3:0]        kbd_data,   // last digit typed
  output logic              armed       // a latched value waits to be written
);

  logic [ADDR_W-1:0] addr;
  logic [7:0]        din_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr     <= '0;
      din_q    <= '0;
      kbd_data <= '0;
      armed    <= 1'b0;
    end else begin
      if (key.valid && key.kind == KEY_DIGIT) kbd_data <= key.digit;
      if (latch_press) begin
        din_q <= {4'd0, kbd_data};
        armed <= 1'b1;
      end
      if (step_press) begin
        addr  <= down ? addr - 1'b1 : addr + 1'b1;
        armed <= 1'b0;
      end
    end
  end

  assign ram_we   = step_press && armed;
  assign ram_addr = addr;
  assign ram_din  = din_q;

endmodule
