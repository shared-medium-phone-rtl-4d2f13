// tb_ringback_gen: runs the ringback generator with a scaled clock
// (CLK_HZ = 96000: 440 Hz -> half period 109 cycles, 480 Hz -> 100 cycles;
// 2 s on = 192000 cycles, 4 s off = 384000 cycles). Checks that the tone
// toggles only in the on phases, that the on and off phases have the
// right length, and that the output is the OR of the two square waves,
// using a reference model of the two oscillators.
module tb_ringback_gen;
  localparam int CLK_HZ = 96_000;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en, tone;

  ringback_gen #(.CLK_HZ(CLK_HZ)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1_300_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mism, active_on, active_off;
    en = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    @(negedge clk);
    en = 1;
    mism = 0; active_on = 0; active_off = 0;
    // two full cadences
    for (int c = 0; c < 2 * 576000; c++) begin
      int ph, r1, r2, exp_t;
      @(posedge clk); #1;
      // cycles since the cadence (re)started: the cadence counter starts
      // on the edge after en rises, so after edge c it holds c + 1
      ph = (c + 1) % 576000;
      if (ph == 192000) begin
        // the oscillators stop one cycle after the on phase ends
      end else if (ph < 192000) begin
        // each oscillator toggles every half period from the start of the on phase
        r1 = (ph / 109) % 2;
        r2 = (ph / 100) % 2;
        exp_t = r1 | r2;
        if (tone != exp_t[0]) mism++;
        if (tone) active_on++;
      end else begin
        if (tone) active_off++;
      end
    end
    check(mism == 0, $sformatf("%0d cycles differ from 440|480 Hz", mism));
    check(active_on > 2 * 192000 / 2, $sformatf("tone high %0d cycles in on phases", active_on));
    check(active_off == 0, $sformatf("tone high %0d cycles in off phases", active_off));
    en = 0;
    repeat (3) @(posedge clk);
    check(!tone, "silent after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
