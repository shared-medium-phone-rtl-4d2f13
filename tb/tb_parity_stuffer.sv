// tb_parity_stuffer: checks the 14-bit encoding of parity_stuffer against a
// grid-based reference, the worked example 00110110, and the one-cycle
// latency of the block and of WE.
module tb_parity_stuffer;
  import phone_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we_in, we_out;
  logic [7:0] din;
  logic [13:0] dout;

  parity_stuffer dut (.*);

  // reference: lay the byte out as a 2x4 grid and sum rows and columns
  function automatic logic [13:0] ref_enc(logic [7:0] b);
    logic g [2][4];
    logic [13:0] r;
    for (int i = 0; i < 8; i++) g[i/4][i%4] = b[i];
    r[7:0] = b;
    for (int row = 0; row < 2; row++) begin
      int s = 0;
      for (int c = 0; c < 4; c++) s += g[row][c];
      r[8+row] = s % 2;
    end
    for (int c = 0; c < 4; c++) r[10+c] = (g[0][c] + g[1][c]) % 2;
    return r;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_in = 0; din = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // worked example: 00110110 -> rows 0110|0, 1100|0, columns 1010
    we_in <= 1; din <= 8'b0011_0110;
    @(posedge clk);
    we_in <= 0;
    #1;
    check(we_out == 1, "we_out one cycle after we_in");
    check(dout[13:8] == 6'b0101_00, $sformatf("example parity %b", dout[13:8]));
    check(dout[7:0] == 8'b0011_0110, "example data kept");
    @(posedge clk); #1;
    check(we_out == 0, "we_out falls one cycle after we_in");
    for (int n = 0; n < 300; n++) begin
      logic [7:0] b;
      b = $urandom;
      @(negedge clk);
      din = b; we_in = n[0];
      @(posedge clk); #1;
      check(dout == ref_enc(b), $sformatf("encode %h -> %h", b, dout));
      check(we_out == n[0], "we delayed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
