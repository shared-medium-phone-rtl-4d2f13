// tb_siren_gen: runs the siren with a scaled clock (CLK_HZ = 140000, so
// 400 Hz is a 350-cycle period and 700 Hz a 200-cycle period, switching 8
// times a second = every 17500 cycles) and measures the period of every
// cycle of the square wave: each must be one of the two, both must occur,
// and the frequency must change at the expected rate. With en low the
// output stays low.
module tb_siren_gen;
  localparam int CLK_HZ = 140_000;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en, tone;

  siren_gen #(.CLK_HZ(CLK_HZ)) dut (.*);

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

  initial begin
    int last_rise, n_low, n_high, switches, prev_per;
    en = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (1000) begin @(posedge clk); if (tone) break; end
    check(!tone, "silent while disabled");
    en = 1;
    last_rise = -1; n_low = 0; n_high = 0; switches = 0; prev_per = 0;
    for (int c = 0; c < 4 * 17500; c++) begin
      logic t_q;
      t_q = tone;
      @(posedge clk); #1;
      if (tone && !t_q) begin
        if (last_rise >= 0) begin
          int per;
          per = c - last_rise;
          if (per == 350) n_low++;
          else if (per == 200) n_high++;
          else if (per > 200 && per < 350) ;  // the cycle in which the frequency changes
          else check(0, $sformatf("period %0d", per));
          if (prev_per != 0 && per != prev_per && (per == 350 || per == 200) &&
              (prev_per == 350 || prev_per == 200)) switches++;
          prev_per = per;
        end
        last_rise = c;
      end
    end
    check(n_low > 50, $sformatf("400 Hz cycles: %0d", n_low));
    check(n_high > 80, $sformatf("700 Hz cycles: %0d", n_high));
    // 4 switch intervals: about 3 frequency changes
    check(switches >= 2 && switches <= 4, $sformatf("frequency changes: %0d", switches));
    en = 0;
    repeat (3) @(posedge clk);
    check(!tone, "silent after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
