// tb_sync_adder: writes frames of random blocks into sync_adder, holds the
// green light back for a while, and decodes the wire by sampling each bit
// in the middle of its OVERSAMPLE-cycle period. Checks that nothing is
// driven before the green light, the sync word, the length field, every
// data bit, and that DE stays high for exactly (32+11+14*N)*OVERSAMPLE
// cycles.
module tb_sync_adder;
  import phone_pkg::*;
  localparam int OS = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        green_light, we, tx, de, tx_busy;
  logic [13:0] din;

  sync_adder #(.OVERSAMPLE(OS), .MAX_BLOCKS(40)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int de_cycles;
  always @(posedge clk) if (de) de_cycles++;

  initial begin
    logic [13:0] blocks [$];
    green_light = 0; we = 0; din = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 6; f++) begin
      int n, wait_cyc;
      logic [31:0] sync_got;
      logic [10:0] len_got;
      n = (f == 5) ? 40 : 1 + $urandom_range(0, 12);
      blocks.delete();
      @(negedge clk);
      for (int i = 0; i < n; i++) begin
        blocks.push_back(14'($urandom));
        we = 1; din = blocks[i];
        @(negedge clk);
      end
      we = 0; din = 14'h3fff;   // must not be captured
      wait_cyc = 5 + $urandom_range(0, 50);
      for (int i = 0; i < wait_cyc; i++) begin
        @(negedge clk);
        check(!de && tx, "wire idle before the green light");
      end
      check(tx_busy, "frame pending");
      de_cycles = 0;
      green_light = 1;
      @(negedge clk);
      green_light = 0;
      while (!de) @(negedge clk);
      // middle of bit 0
      repeat (OS / 2 - 1) @(negedge clk);
      for (int b = 0; b < 32; b++) begin
        sync_got = {sync_got[30:0], tx};
        repeat (OS) @(negedge clk);
      end
      for (int b = 0; b < 11; b++) begin
        len_got = {len_got[9:0], tx};
        repeat (OS) @(negedge clk);
      end
      check(sync_got == SYNC_WORD, $sformatf("sync word %h", sync_got));
      check(len_got == 11'(14 * n), $sformatf("length %0d for %0d blocks", len_got, n));
      for (int i = 0; i < n; i++) begin
        logic [13:0] g;
        for (int b = 0; b < 14; b++) begin
          g = {g[12:0], tx};
          repeat (OS) @(negedge clk);
        end
        check(g == blocks[i], $sformatf("frame %0d block %0d %h vs %h", f, i, g, blocks[i]));
      end
      while (de) @(negedge clk);
      check(de_cycles == (43 + 14 * n) * OS, $sformatf("DE cycles %0d", de_cycles));
      check(!tx_busy, "idle after the frame");
      repeat (10) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
