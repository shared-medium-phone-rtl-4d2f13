// tb_voice_buffer: in each playout period (five ready pulses) the testbench
// delivers k voice frames of five random signed samples, k going from 0 to
// 17. In the next period the five samples played must be the per-position
// sums divided (rounding down) by the power of two nearest to k, ties up,
// saturated to 8 bits; at most 15 frames count. Ready pulses come every
// 200 cycles, and each sample must appear right after its pulse.
module tb_voice_buffer;
  import phone_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       we, ready;
  logic [7:0] din, dout;

  voice_buffer dut (.*);

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

  function automatic int nearest_pow2(int k);
    int best = 1;
    for (int p = 1; p <= 64; p *= 2) begin
      int d_new = (k > p) ? k - p : p - k;
      int d_old = (k > best) ? k - best : best - k;
      if (d_new <= d_old) best = p;
    end
    return best;
  endfunction

  function automatic int floor_div(int a, int d);
    int r = a % d;
    if (r < 0) r += d;
    return (a - r) / d;
  endfunction

  task automatic pulse_ready();
    @(negedge clk);
    ready = 1;
    @(negedge clk);
    ready = 0;
  endtask

  initial begin
    int expect_q [5];
    int sums [5];
    bit have_expect;
    we = 0; ready = 0; din = 0;
    have_expect = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    // first period: nothing received yet, playout is silence; the 5th pulse
    // is the first transfer
    for (int per = 0; per <= 18; per++) begin
      int k;
      k = (per == 0) ? 0 : per - 1;    // frames sent in this period
      foreach (sums[i]) sums[i] = 0;
      for (int f = 0; f < k; f++) begin
        @(negedge clk);
        for (int i = 0; i < 5; i++) begin
          logic signed [7:0] s;
          s = 8'($urandom);
          if (f < 15) sums[i] += s;
          we = 1; din = s;
          @(negedge clk);
        end
        we = 0;
      end
      // play the five samples of the previous period
      for (int i = 0; i < 5; i++) begin
        repeat (190 - (i == 0 ? 8 * k : 0)) @(negedge clk);
        pulse_ready();
        if (have_expect)
          check($signed(dout) == expect_q[i],
                $sformatf("period %0d sample %0d: %0d vs %0d", per, i, $signed(dout), expect_q[i]));
        else
          check(dout == 0, "silence before any frame");
      end
      for (int i = 0; i < 5; i++) begin
        int v;
        v = (k == 0) ? 0 : floor_div(sums[i], nearest_pow2(k > 15 ? 15 : k));
        if (v > 127) v = 127;
        if (v < -128) v = -128;
        expect_q[i] = v;
      end
      have_expect = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
