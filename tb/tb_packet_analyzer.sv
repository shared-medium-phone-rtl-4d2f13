// tb_packet_analyzer: sends bursts of packets as the TCU does (WE high for
// each byte, gaps between packets): calling packets, voice packets for the
// expected conference and voice packets for another one. Checks one listen
// pulse per packet, one cycle after the type byte, with from/to/type, and
// that exactly the voice samples of matching packets reach the voice
// buffer, in order, each one cycle after it arrived.
module tb_packet_analyzer;
  import phone_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       we_from_tcu, listen, vb_we;
  logic [7:0] din, ptype, vb_data;
  logic [3:0] expected_conf, from_num, to_num;

  packet_analyzer dut (.*);

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

  logic [7:0] vb_got [$];
  int listens = 0;
  logic [3:0] l_from, l_to;
  logic [7:0] l_type;
  always @(posedge clk) begin
    if (vb_we) vb_got.push_back(vb_data);
    if (listen) begin listens++; l_from = from_num; l_to = to_num; l_type = ptype; end
  end

  initial begin
    we_from_tcu = 0; din = 0; expected_conf = 4'd7;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    for (int k = 0; k < 30; k++) begin
      logic [3:0] fr, to;
      logic [7:0] ty;
      logic [7:0] samp [5];
      int n, l0, v0;
      fr = 4'($urandom);
      to = ($urandom_range(0, 2) == 0) ? 4'($urandom) : 4'd7;
      ty = ($urandom_range(0, 3) == 0) ? PTYPE_CALL : PTYPE_VOICE;
      n  = (ty == PTYPE_VOICE) ? 7 : 2;
      foreach (samp[i]) samp[i] = 8'($urandom);
      l0 = listens; vb_got.delete();
      @(negedge clk);
      for (int i = 0; i < n; i++) begin
        we_from_tcu = 1;
        din = (i == 0) ? {fr, to} : (i == 1) ? ty : samp[i-2];
        @(negedge clk);
        if (i == 0) check(!listen, "listen not before the type byte is taken");
        if (i == 1) check(listen, "listen right after the type byte");
        if (i >= 2) check(vb_we == (ty == PTYPE_VOICE && to == 4'd7),
                          "voice forwarded one cycle later");
      end
      we_from_tcu = 0; din = 8'hxx;
      repeat ($urandom_range(2, 6)) @(negedge clk);
      check(listens == l0 + 1, $sformatf("packet %0d: one listen pulse", k));
      check(l_from == fr && l_to == to && l_type == ty, "from/to/type reported");
      if (ty == PTYPE_VOICE && to == 4'd7) begin
        check(vb_got.size() == 5, $sformatf("5 samples forwarded, got %0d", vb_got.size()));
        foreach (samp[i]) if (i < vb_got.size()) check(vb_got[i] == samp[i], "sample value");
      end else begin
        check(vb_got.size() == 0, "nothing forwarded");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
