// tb_sync_remover: drives the wire with frames sent by a behavioural
// transmitter in the testbench, starting at random clock phases. For one
// clock cycle after every transition the wire level is random, like a
// sample taken on an edge, so a single sampling phase can miss the sync
// word; the two-phase detector must still find every frame. The blocks
// are read back with the FIFO handshake and compared; busy and empty are
// checked, and a frame sent while mute is high must be ignored.
module tb_sync_remover;
  import phone_pkg::*;
  localparam int OS = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rx, mute, re, busy, empty;
  logic [13:0] dout;

  sync_remover #(.OVERSAMPLE(OS), .MAX_BLOCKS(30)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wire with edge noise
  logic level, prev_level;
  always @(negedge clk) begin
    rx <= (level != prev_level) ? 1'($urandom) : level;
    prev_level <= level;
  end

  task automatic send_bit(logic b);
    level = b;
    repeat (OS) @(posedge clk);
  endtask

  task automatic send_frame(input logic [13:0] blocks [$], input int extra_bits);
    logic [10:0] len;
    len = 11'(14 * blocks.size() + extra_bits);
    for (int i = 31; i >= 0; i--) send_bit(SYNC_WORD[i]);
    for (int i = 10; i >= 0; i--) send_bit(len[i]);
    foreach (blocks[k]) for (int i = 13; i >= 0; i--) send_bit(blocks[k][i]);
    for (int i = 0; i < extra_bits; i++) send_bit(1'($urandom));
    level = 1;
  endtask

  int busy_cycles;
  always @(posedge clk) if (busy) busy_cycles++;

  initial begin
    logic [13:0] blocks [$];
    level = 1; prev_level = 1; rx = 1; mute = 0; re = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (20) @(posedge clk);
    for (int f = 0; f < 12; f++) begin
      int n, extra;
      logic [13:0] got [$];
      n = 1 + $urandom_range(0, 20);
      extra = (f % 4 == 3) ? 5 : 0;  // a length that is not a multiple of 14
      blocks.delete();
      got.delete();
      for (int i = 0; i < n; i++) blocks.push_back(14'($urandom));
      // idle time of a random number of clock cycles: random phase
      repeat ($urandom_range(1, 3 * OS)) @(posedge clk);
      if (f == 5) begin
        // muted: our own transmission must be ignored
        mute = 1;
        send_frame(blocks, 0);
        repeat (4) @(posedge clk);
        mute = 0;
        repeat (OS * 20) @(posedge clk);
        check(empty && !busy, "muted frame ignored");
        continue;
      end
      busy_cycles = 0;
      send_frame(blocks, extra);
      repeat (3 * OS) @(posedge clk);
      check(!empty, $sformatf("frame %0d received", f));
      check(busy_cycles >= (11 + 14 * n) * OS - 2 * OS && busy_cycles <= (11 + 14 * n + extra) * OS + 2 * OS,
            $sformatf("busy for %0d cycles", busy_cycles));
      check(!busy, "not busy while holding blocks");
      // first block is already on dout
      check(dout == blocks[0], "first block held before RE");
      @(negedge clk);
      re = 1;
      while (1) begin
        @(posedge clk);
        if (!empty) got.push_back(dout);
        else break;
      end
      @(negedge clk);
      re = 0;
      check(got.size() == n, $sformatf("frame %0d: %0d blocks, expected %0d", f, got.size(), n));
      for (int i = 0; i < n && i < got.size(); i++)
        check(got[i] == blocks[i], $sformatf("frame %0d block %0d %h vs %h", f, i, got[i], blocks[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
