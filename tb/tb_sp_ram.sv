// tb_sp_ram: single-port RAM at its full 8192 x 8 size.
// Writes every address with a value derived from the address, reads all back (data one cycle
// after the address), checks that a write cycle does not change dout, then does 2000 random
// writes and reads against a model array.
module tb_sp_ram;
  logic clk = 0, we = 0;
  logic [12:0] addr = 0;
  logic [7:0] din = 0, dout;
  int checks = 0, failures = 0;
  logic [7:0] model [8192];

  sp_ram dut (.clk, .we, .addr, .din, .dout);

  always #5 clk = ~clk;

  function automatic logic [7:0] pattern(input int a);
    return 8'((a * 37) ^ (a >> 5));
  endfunction

  initial begin
    for (int a = 0; a < 8192; a++) begin
      @(posedge clk); we <= 1; addr <= 13'(a); din <= pattern(a);
      model[a] = pattern(a);
    end
    @(posedge clk); we <= 0; addr <= 0;
    for (int a = 0; a < 8192; a++) begin
      @(posedge clk); addr <= 13'((a + 1) % 8192);
      #1;
      checks++;
      if (dout != model[a]) begin failures++; $display("FAIL: addr %0d read %h", a, dout); end
    end
    // a write keeps dout
    @(posedge clk); we <= 0; addr <= 13'd5;
    @(posedge clk); we <= 1; addr <= 13'd6; din <= ~model[6];
    @(posedge clk); we <= 0; #1;
    checks++;
    if (dout != model[5]) begin failures++; $display("FAIL: dout changed during a write"); end
    model[6] = ~model[6];
    for (int i = 0; i < 2000; i++) begin
      int a;
      a = $urandom_range(0, 8191);
      @(posedge clk);
      if ($urandom_range(0, 1) == 1) begin
        we <= 1; addr <= 13'(a); din <= 8'($urandom);
        @(posedge clk); we <= 0; model[a] = din;
      end else begin
        we <= 0; addr <= 13'(a);
        @(posedge clk); #1;
        checks++;
        if (dout != model[a]) begin failures++; $display("FAIL: random read %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
