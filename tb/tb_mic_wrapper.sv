// tb_mic_wrapper: sends microphone samples with ready pulses and reads the
// packets back like the TCU. Checks the voice packet (header, type 1,
// five samples in order), the calling packet (header and type 0 only),
// that the first byte is held until RE, that nothing is built while
// tx_enable is low, and that a packet is built every SAMPLES ready pulses.
module tb_mic_wrapper;
  import phone_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       ready, tx_enable, re, empty;
  logic [7:0] mic_data, ptype, dout;
  logic [3:0] from_num, to_num;

  mic_wrapper dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // AC97 strobe every 40 cycles with a fresh sample
  logic [7:0] sent [$];
  int pulses = 0;
  initial begin
    ready = 0; mic_data = 0;
    forever begin
      repeat (39) @(negedge clk);
      mic_data = 8'($urandom);
      ready = 1;
      @(negedge clk);
      if (!rst) begin sent.push_back(mic_data); pulses++; end
      ready = 0;
    end
  end

  task automatic read_packet(output logic [7:0] got [$]);
    got.delete();
    while (empty) @(posedge clk);
    // hold test: the header stays put for a few cycles without RE
    repeat (3) begin
      @(posedge clk);
      check(!empty && dout == {from_num, to_num}, "header held before RE");
    end
    @(negedge clk);
    re = 1;
    while (1) begin
      @(posedge clk);
      if (!empty) got.push_back(dout);
      else break;
    end
    @(negedge clk);
    re = 0;
  endtask

  initial begin
    logic [7:0] got [$];
    int p0;
    tx_enable = 0; re = 0; from_num = 4'd5; to_num = 4'd9; ptype = PTYPE_VOICE;
    repeat (3) @(posedge clk);
    rst <= 0;
    // nothing while disabled
    repeat (40 * 12) @(posedge clk);
    check(empty, "no packet while tx_enable is low");
    // align to a packet boundary
    while (pulses % 5 != 0) @(posedge clk);
    tx_enable = 1;
    for (int k = 0; k < 6; k++) begin
      sent.delete();
      p0 = pulses;
      ptype = (k % 3 == 2) ? PTYPE_CALL : PTYPE_VOICE;
      to_num = 4'(k + 2);
      read_packet(got);
      check(pulses - p0 == 5, $sformatf("packet after %0d ready pulses", pulses - p0));
      if (ptype == PTYPE_VOICE) begin
        check(got.size() == 7, $sformatf("voice packet of %0d bytes", got.size()));
        if (got.size() == 7) begin
          check(got[0] == {4'd5, 4'(k + 2)}, "from/to byte");
          check(got[1] == 8'h01, "type 1");
          for (int i = 0; i < 5; i++)
            check(got[2+i] == sent[i], $sformatf("sample %0d %h vs %h", i, got[2+i], sent[i]));
        end
      end else begin
        check(got.size() == 2, $sformatf("calling packet of %0d bytes", got.size()));
        if (got.size() == 2) check(got[0] == {4'd5, 4'(k + 2)} && got[1] == 8'h00, "calling packet");
      end
      // wait until the next packet boundary
      while (pulses % 5 != 0 || pulses == p0) @(posedge clk);
    end
    tx_enable = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
