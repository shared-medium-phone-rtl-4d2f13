// tb_phone: three phones (numbers 2, 6 and 11) on one shared wire, with
// short timeouts (RING_TIMEOUT = CALL_TIMEOUT = 12000 cycles) and AC97
// strobes every 800 cycles, so a packet leaves each active phone every
// 4000 cycles. The wire is a behavioural RS-485 bus: the DI of the phone
// whose DE is high, 1 when nobody drives; for one cycle after every
// transition its level is random, like a sample taken on an edge.
//
// Script: phone 2 dials 6, 6 rings and answers, 2 joins the call and the
// two hear each other; a bit error and a double error are injected on the
// wire; phone 11 dials 6 and joins, making a conference in which each
// phone hears the average of the other two; 2 hangs up, 11 hangs up and
// 6 drops the call by timeout; finally 11 dials 2 and hangs up, and 2
// stops ringing by timeout.
//
// Two phones that both wait for the end of a third one's frame start
// together when the green light comes on; such collisions are counted and
// reported but are not failures, since the green light alone does not
// prevent them (the receivers drop the garbled frame).
//
// Each microphone sends a constant (phone 2: 16, phone 6: 100, phone 11:
// 48), so the speaker values prove the path and the mixing. Every
// mechanism is counted, and one that never happened is a failure.
module tb_phone;
  import phone_pkg::*;
  localparam int OS = 8;
  localparam int TO = 12000;
  localparam int RP = 800;               // AC97 strobe period
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [3:0] NUM [3] = '{4'd2, 4'd6, 4'd11};
  localparam logic [7:0] MIC [3] = '{8'd16, 8'd100, 8'd48};
  localparam int         OFF [3] = '{0, 500, 2500};

  logic [3:0] dial [3];
  logic       btn [3], ready [3], siren [3], ro, di [3], de [3], in_call [3];
  logic       pend [3], corr [3], drop [3];
  logic [7:0] spk [3];
  logic [3:0] nconf [3];
  phone_state_e st [3];

  for (genvar g = 0; g < 3; g++) begin : g_ph
    phone #(.OVERSAMPLE(OS), .CLK_HZ(96_000), .RING_TIMEOUT(TO), .CALL_TIMEOUT(TO)) u (
      .clk, .rst, .my_num(NUM[g]), .dial_num(dial[g]), .call_btn(btn[g]),
      .ac97_ready(ready[g]), .mic_data(MIC[g]), .spk_data(spk[g]), .siren(siren[g]),
      .rs485_ro(ro), .rs485_di(di[g]), .rs485_de(de[g]), .next_conf(nconf[g]),
      .call_state(st[g]), .in_call(in_call[g]), .tx_pending(pend[g]),
      .rx_corrected(corr[g]), .rx_dropped(drop[g])
    );
    // AC97 strobes
    initial begin
      ready[g] = 0;
      @(negedge rst);
      repeat (OFF[g]) @(posedge clk);
      forever begin
        repeat (RP - 1) @(posedge clk);
        ready[g] <= 1;
        @(posedge clk);
        ready[g] <= 0;
      end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- the wire ---------------------------------------------------------
  logic line, line_q;
  int   n_drv, frame_no, bit_cyc;
  int   flip_frame1 = -1, flip_frame2 = -1;   // frames to corrupt
  logic any_de_q;
  always_comb begin
    n_drv = 0; line = 1'b1;
    for (int i = 0; i < 3; i++) if (de[i]) begin n_drv++; line = line & di[i]; end
  end
  always @(posedge clk) begin
    any_de_q <= (n_drv != 0);
    if (n_drv != 0 && !any_de_q) begin frame_no++; bit_cyc = 1; end
    else bit_cyc++;
  end
  // data bit 5 of block 1 is bit 43 + 14 + 8 of the frame; bit 4 follows
  function automatic bit in_bit(int cyc, int b);
    return cyc >= b * OS && cyc < (b + 1) * OS;
  endfunction
  logic line_err;
  assign line_err = (frame_no == flip_frame1 && in_bit(bit_cyc, 43 + 14 + 8)) ||
                    (frame_no == flip_frame2 && (in_bit(bit_cyc, 43 + 14 + 8) || in_bit(bit_cyc, 43 + 14 + 9)));
  always @(negedge clk) begin
    line_q <= line ^ line_err;
    ro <= (line ^ line_err) != line_q ? 1'($urandom) : (line ^ line_err);
  end

  // ---- mechanism counters ------------------------------------------------
  int c_collide, c_wait, c_corr, c_drop, c_phase_b, c_mute, c_ring, c_siren;
  int c_ringback, c_mix2, c_mix6, c_mix11, c_hear2, c_hear6;
  always @(posedge clk) if (!rst) begin
    if (n_drv > 1) c_collide++;
    for (int i = 0; i < 3; i++) begin
      if (corr[i]) c_corr++;
      if (drop[i]) c_drop++;
      if (de[i] && n_drv == 1) c_mute++;
    end
    if (g_ph[0].u.u_sadd.state == 2'd2 && !g_ph[0].u.green_light) c_wait++;
    if (g_ph[1].u.u_sadd.state == 2'd2 && !g_ph[1].u.green_light) c_wait++;
    if (g_ph[2].u.u_sadd.state == 2'd2 && !g_ph[2].u.green_light) c_wait++;
    if (g_ph[0].u.u_srem.busy && g_ph[0].u.u_srem.phase) c_phase_b++;
    if (g_ph[1].u.u_srem.busy && g_ph[1].u.u_srem.phase) c_phase_b++;
    if (g_ph[2].u.u_srem.busy && g_ph[2].u.u_srem.phase) c_phase_b++;
    if (st[1] == PH_RINGING && siren[1]) c_siren++;
    if (st[0] == PH_CALLING && spk[0] == 8'd64) c_ringback++;
    if (ready[0] && in_call[0]) begin
      if (spk[0] == 8'd100) c_hear2++;
      if (spk[0] == 8'd74)  c_mix2++;     // (100 + 48) / 2
    end
    if (ready[1] && in_call[1]) begin
      if (spk[1] == 8'd16) c_hear6++;
      if (spk[1] == 8'd32) c_mix6++;      // (16 + 48) / 2
    end
    if (ready[2] && in_call[2] && spk[2] == 8'd58) c_mix11++;  // (16 + 100) / 2
  end

  task automatic press(int i);
    @(negedge clk) btn[i] = 1;
    repeat (5) @(negedge clk);
    btn[i] = 0;
  endtask

  task automatic wait_state(int i, phone_state_e s, int max_cycles, string what);
    int t = 0;
    while (st[i] != s && t < max_cycles) begin @(posedge clk); t++; end
    check(st[i] == s, what);
  endtask

  int t_to;
  initial begin
    for (int i = 0; i < 3; i++) begin dial[i] = 0; btn[i] = 0; end
    frame_no = 0; bit_cyc = 0;
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (2000) @(posedge clk);
    check(st[0] == PH_IDLE && st[1] == PH_IDLE && st[2] == PH_IDLE, "all idle");
    // 2 calls 6
    dial[0] = 4'd6;
    press(0);
    check(st[0] == PH_CALLING, "2 is calling");
    wait_state(1, PH_RINGING, 10000, "6 rings");
    check(st[2] == PH_IDLE, "11 does not ring");
    if (st[1] == PH_RINGING) c_ring++;
    repeat (4 * 4000) @(posedge clk);
    check(st[1] == PH_RINGING, "6 keeps ringing while 2 calls");
    press(1);
    check(st[1] == PH_IN_CALL, "6 answered");
    check(g_ph[1].u.expected_conf == 4'd0, "6 opened conference 0");
    wait_state(0, PH_IN_CALL, 10000, "2 joins the call");
    check(g_ph[0].u.expected_conf == 4'd0, "2 is in conference 0");
    repeat (8 * 4000) @(posedge clk);
    check(nconf[0] == 4'd1 && nconf[2] == 4'd1, "next free conference is 1");
    // a single and a double bit error on the next two frames
    flip_frame1 = frame_no + 1;
    flip_frame2 = frame_no + 2;
    repeat (4 * 4000) @(posedge clk);
    check(st[0] == PH_IN_CALL && st[1] == PH_IN_CALL, "call survives line errors");
    // 11 dials 6 and joins conference 0
    dial[2] = 4'd6;
    press(2);
    wait_state(2, PH_IN_CALL, 12000, "11 joins the conference");
    check(g_ph[2].u.expected_conf == 4'd0, "11 is in conference 0");
    repeat (12 * 4000) @(posedge clk);
    // 2 hangs up, 11 hangs up, 6 times out
    press(0);
    check(st[0] == PH_IDLE, "2 hung up");
    repeat (3 * 4000) @(posedge clk);
    check(st[1] == PH_IN_CALL && st[2] == PH_IN_CALL, "6 and 11 still talk");
    press(2);
    t_to = 0;
    while (st[1] == PH_IN_CALL && t_to < 3 * TO) begin @(posedge clk); t_to++; end
    check(st[1] == PH_IDLE, "6 dropped the call");
    check(t_to >= TO - 4000 && t_to <= TO + 4000, $sformatf("call timeout after %0d cycles", t_to));
    // 11 calls 2, gives up; 2 stops ringing by timeout
    dial[2] = 4'd2;
    press(2);
    wait_state(0, PH_RINGING, 10000, "2 rings");
    press(2);
    check(st[2] == PH_IDLE, "11 gave up");
    t_to = 0;
    while (st[0] == PH_RINGING && t_to < 3 * TO) begin @(posedge clk); t_to++; end
    check(st[0] == PH_IDLE, "2 stopped ringing");
    check(t_to >= TO - 4000 && t_to <= TO, $sformatf("ring timeout after %0d cycles", t_to));
    repeat (100) @(posedge clk);

    $display("mechanisms: ring=%0d siren=%0d ringback=%0d heard(2<-6)=%0d heard(6<-2)=%0d",
             c_ring, c_siren, c_ringback, c_hear2, c_hear6);
    $display("            mix at 2=%0d at 6=%0d at 11=%0d corrected=%0d dropped=%0d",
             c_mix2, c_mix6, c_mix11, c_corr, c_drop);
    $display("            green-light waits=%0d phase-B frames(cycles)=%0d echo muted=%0d collisions=%0d",
             c_wait, c_phase_b, c_mute, c_collide);
    check(c_ring > 0, "ringing happened");
    check(c_siren > 0, "siren sounded");
    check(c_ringback > 0, "ringback sounded");
    check(c_hear2 > 0 && c_hear6 > 0, "both directions of a call carried voice");
    check(c_mix2 > 0 && c_mix6 > 0 && c_mix11 > 0, "conference mixing at every phone");
    check(c_corr > 0, "a bit error was corrected");
    check(c_drop > 0, "a damaged frame was dropped");
    check(c_wait > 0, "a frame waited for the green light");
    check(c_phase_b > 0, "sync found on the second phase");
    check(c_mute > 0, "own echo muted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
