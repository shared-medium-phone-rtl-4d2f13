// tb_phone_full: two phones built with every parameter at its default
// (27.5 MHz clock, oversampling 8, 0.1 s timeouts) on a shared wire, with
// AC97 strobes at 48 kHz (every 573 cycles; the two phones half a packet
// period apart, so their frames do not start together). Phone 3 dials 9; 9 rings
// (the siren must toggle at 400/700 Hz), answers, and the two exchange
// voice: each speaker must play the other phone's microphone samples.
// Phone 3 then hangs up and phone 9 drops the call when its 0.1 s timeout
// expires.
module tb_phone_full;
  import phone_pkg::*;
  localparam int RP = 573;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [3:0] NUM [2] = '{4'd3, 4'd9};
  localparam int         OFF [2] = '{0, 1430};

  logic [3:0] dial [2], nconf [2];
  logic       btn [2], ready [2], siren [2], ro, di [2], de [2], in_call [2];
  logic       pend [2], corr [2], drop [2];
  logic [7:0] spk [2], mic [2];
  phone_state_e st [2];

  for (genvar g = 0; g < 2; g++) begin : g_ph
    phone u (
      .clk, .rst, .my_num(NUM[g]), .dial_num(dial[g]), .call_btn(btn[g]),
      .ac97_ready(ready[g]), .mic_data(mic[g]), .spk_data(spk[g]), .siren(siren[g]),
      .rs485_ro(ro), .rs485_di(di[g]), .rs485_de(de[g]), .next_conf(nconf[g]),
      .call_state(st[g]), .in_call(in_call[g]), .tx_pending(pend[g]),
      .rx_corrected(corr[g]), .rx_dropped(drop[g])
    );
    // AC97: strobe every RP cycles; the microphone plays a ramp in a range
    // of its own (phone 3: 0x10..0x1f, phone 9: 0x50..0x5f)
    initial begin
      ready[g] = 0;
      mic[g] = (g == 0) ? 8'h10 : 8'h50;
      @(negedge rst);
      repeat (OFF[g]) @(posedge clk);
      forever begin
        repeat (RP - 1) @(posedge clk);
        ready[g] <= 1;
        @(posedge clk);
        ready[g] <= 0;
        mic[g] <= {mic[g][7:4], mic[g][3:0] + 4'd1};
      end
    end
  end

  // the wire: DI of the driving phone, 1 when idle
  always_comb begin
    ro = 1'b1;
    for (int i = 0; i < 2; i++) if (de[i]) ro = ro & di[i];
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int heard [2], wrong [2], siren_edges;
  logic siren_q;
  always @(posedge clk) if (!rst) begin
    siren_q <= siren[1];
    if (siren[1] != siren_q) siren_edges++;
    for (int i = 0; i < 2; i++)
      if (ready[i] && in_call[i] && in_call[1-i] && spk[i] != 0) begin
        if (spk[i][7:4] == ((i == 0) ? 4'h5 : 4'h1)) heard[i]++;
        else wrong[i]++;
      end
  end

  task automatic press(int i);
    @(negedge clk) btn[i] = 1;
    repeat (5) @(negedge clk);
    btn[i] = 0;
  endtask

  initial begin
    int t;
    dial[0] = 4'd9; dial[1] = 4'd0; btn[0] = 0; btn[1] = 0;
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (1000) @(posedge clk);
    press(0);
    check(st[0] == PH_CALLING, "3 is calling");
    t = 0;
    while (st[1] != PH_RINGING && t < 20000) begin @(posedge clk); t++; end
    check(st[1] == PH_RINGING, "9 rings");
    repeat (150_000) @(posedge clk);   // > one 400 Hz period
    check(siren_edges >= 2, $sformatf("siren toggled %0d times", siren_edges));
    press(1);
    check(st[1] == PH_IN_CALL, "9 answered");
    t = 0;
    while (st[0] != PH_IN_CALL && t < 20000) begin @(posedge clk); t++; end
    check(st[0] == PH_IN_CALL, "3 joined");
    repeat (100_000) @(posedge clk);
    check(heard[0] > 50 && heard[1] > 50, $sformatf("voice carried: %0d / %0d samples", heard[0], heard[1]));
    check(wrong[0] == 0 && wrong[1] == 0, $sformatf("foreign samples: %0d / %0d", wrong[0], wrong[1]));
    press(0);
    check(st[0] == PH_IDLE, "3 hung up");
    t = 0;
    while (st[1] == PH_IN_CALL && t < 3_500_000) begin @(posedge clk); t++; end
    check(st[1] == PH_IDLE, "9 dropped the call");
    check(t > 2_740_000 && t <= 2_750_000, $sformatf("after %0d cycles without voice", t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
