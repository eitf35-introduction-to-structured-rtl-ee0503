// vga_controller: sync and blanking for a 640x480, 60 Hz VGA display from a 25 MHz pixel clock.
//
// Two binary counters: hcount steps every clock through the 800 pixel times of a line
// (640 visible, 16 front porch, 96 sync, 48 back porch), vcount steps at the end of every line
// through the 525 lines of a frame (480 visible, 10 front porch, 2 sync, 33 back porch). hsync
// and vsync are low during their sync intervals and blank is high outside the visible area;
// all three are decoded from the counter values of the same cycle, so a pixel computed from
// hcount/vcount one or more cycles later needs the syncs delayed by the same amount. The two
// counters, the syncs and blank follow the project description; the porch and sync lengths are
// the standard 640x480@60 timing.
module vga_controller #(
  parameter int unsigned H_VISIBLE = 640,
  parameter int unsigned H_FRONT   = 16,
  parameter int unsigned H_SYNC    = 96,
  parameter int unsigned H_BACK    = 48,
  parameter int unsigned V_VISIBLE = 480,
  parameter int unsigned V_FRONT   = 10,
  parameter int unsigned V_SYNC    = 2,
  parameter int unsigned V_BACK    = 33
) (
  input  logic       clk,
  input  logic       rst,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       hsync,
  output logic       vsync,
  output logic       blank,
  output logic       frame_start
);

  localparam int unsigned H_TOTAL = H_VISIBLE + H_FRONT + H_SYNC + H_BACK;
  localparam int unsigned V_TOTAL = V_VISIBLE + V_FRONT + V_SYNC + V_BACK;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == 10'(H_TOTAL - 1)) begin
      hcount <= '0;
      vcount <= (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 10'd1;
    end else begin
      hcount <= hcount + 10'd1;
    end
  end

  assign hsync = !((hcount >= 10'(H_VISIBLE + H_FRONT)) &&
                   (hcount <  10'(H_VISIBLE + H_FRONT + H_SYNC)));
  assign vsync = !((vcount >= 10'(V_VISIBLE + V_FRONT)) &&
                   (vcount <  10'(V_VISIBLE + V_FRONT + V_SYNC)));
  assign blank = (hcount >= 10'(H_VISIBLE)) || (vcount >= 10'(V_VISIBLE));
  assign frame_start = (hcount == '0) && (vcount == '0);

endmodule
