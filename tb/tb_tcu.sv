// tb_tcu: two FIFO-style byte sources stand for the mic wrapper and the
// parity destuffer. Checks that both channels relay every packet intact as
// one WE burst, that RE rises the cycle after empty falls and falls the
// cycle after empty rises, that each byte leaves one cycle after it is
// read, and that next_conf follows the largest 'to' of received voice
// packets (calling packets do not count).
module tb_tcu;
  import phone_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic mic_empty, mic_re, stuf_we, dstf_empty, dstf_re, pa_we;
  logic [7:0] mic_din, stuf_dout, dstf_din, pa_dout;
  logic [3:0] next_conf;

  tcu dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] mq [$], dq [$];
  assign mic_empty  = (mq.size() == 0);
  assign mic_din    = mq.size() ? mq[0] : 8'h00;
  assign dstf_empty = (dq.size() == 0);
  assign dstf_din   = dq.size() ? dq[0] : 8'h00;

  // consumer-side capture, and protocol checks on RE
  logic [7:0] stuf_got [$], pa_got [$];
  logic mic_empty_q, dstf_empty_q;
  int read_lat_fail = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (mic_re !== !mic_empty_q) read_lat_fail++;
      if (dstf_re !== !dstf_empty_q) read_lat_fail++;
    end
    mic_empty_q  <= mic_empty;
    dstf_empty_q <= dstf_empty;
    if (stuf_we) stuf_got.push_back(stuf_dout);
    if (pa_we)   pa_got.push_back(pa_dout);
  end
  // the sources advance just after the edge that read them
  always @(posedge clk) begin
    bit pm, pd;
    pm = mic_re && mq.size() != 0;
    pd = dstf_re && dq.size() != 0;
    #1;
    if (pm) void'(mq.pop_front());
    if (pd) void'(dq.pop_front());
  end

  task automatic run_pkt(bit rx_side, logic [7:0] pkt [$]);
    logic [7:0] got [$];
    int t0;
    if (rx_side) begin pa_got.delete(); foreach (pkt[i]) dq.push_back(pkt[i]); end
    else         begin stuf_got.delete(); foreach (pkt[i]) mq.push_back(pkt[i]); end
    repeat (pkt.size() + 6) @(posedge clk);
    got = rx_side ? pa_got : stuf_got;
    check(got.size() == pkt.size(), $sformatf("burst length %0d vs %0d", got.size(), pkt.size()));
    foreach (pkt[i]) if (i < got.size()) check(got[i] == pkt[i], "byte relayed");
  endtask

  initial begin
    logic [7:0] pkt [$];
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(next_conf == 0, "next_conf starts at 0");
    // latency: empty falls at an edge; RE rises after the next edge; the
    // first byte leaves with WE after the edge after that
    @(negedge clk);
    mq.push_back(8'hA5);
    @(posedge clk); #2 check(mic_re && !stuf_we, "RE at the edge after empty fell");
    @(posedge clk); #2 check(stuf_we && stuf_dout == 8'hA5 && mic_re, "byte out one cycle after read");
    @(posedge clk); #2 check(!stuf_we && !mic_re, "RE and WE fall");
    repeat (3) @(posedge clk);
    // random packets both ways, voice packets to conferences 3, 9, 6
    for (int k = 0; k < 6; k++) begin
      logic [3:0] to;
      logic [7:0] ty;
      to = (k == 0) ? 4'd3 : (k == 1) ? 4'd9 : (k == 2) ? 4'd6 : (k == 3) ? 4'd12 : 4'd2;
      ty = (k == 3) ? PTYPE_CALL : PTYPE_VOICE;   // a calling packet to 12 does not count
      pkt.delete();
      pkt.push_back({4'(k), to});
      pkt.push_back(ty);
      for (int i = 0; i < 5; i++) pkt.push_back(8'($urandom));
      run_pkt(1'b1, pkt);
      run_pkt(1'b0, pkt);
      case (k)
        0: check(next_conf == 4, "next_conf after conf 3");
        1, 2: check(next_conf == 10, "next_conf after conf 9");
        3: check(next_conf == 10, "calling packet ignored");
        default: check(next_conf == 10, "smaller conference ignored");
      endcase
    end
    check(read_lat_fail == 0, $sformatf("RE follows empty by one cycle (%0d misses)", read_lat_fail));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
