// sp_ram: single-port block RAM, 8192 words of 8 bits (8 kB) by default.
//
// Behaves like the single-port block memory the calculator stores its stack in: on a rising clock
// edge with we high, din is written to addr; with we low the word at addr is read and appears on
// dout after that edge (one cycle read latency). Size and port set follow the project
// description; the registered read is how the FPGA's block RAM behaves. The contents start at zero.
module sp_ram #(
  parameter int unsigned DEPTH  = 8192,
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  din,
  output logic [WIDTH-1:0]  dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    else    dout <= mem[addr];
  end

endmodule
