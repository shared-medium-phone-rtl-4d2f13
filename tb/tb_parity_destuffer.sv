// tb_parity_destuffer: feeds frames of 14-bit blocks through a FIFO-style
// source, with no error, one flipped bit per block (data or parity bit) or
// two flipped bits in one block, and reads the result like the TCU does.
// Clean and singly-corrupted frames must come out exactly; frames with a
// double error must vanish with a frame_dropped pulse.
module tb_parity_destuffer;
  import phone_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        empty_from_sync, re_to_sync, re_from_tcu, empty_to_tcu;
  logic [13:0] din;
  logic [7:0]  dout;
  logic        frame_dropped, corrected;

  parity_destuffer #(.MAX_BLOCKS(20)) dut (.*);

  function automatic logic [13:0] enc(logic [7:0] b);
    return {b[3]^b[7], b[2]^b[6], b[1]^b[5], b[0]^b[4], ^b[7:4], ^b[3:0], b};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // FIFO-style source of blocks
  logic [13:0] src [$];
  assign empty_from_sync = (src.size() == 0);
  assign din = (src.size() != 0) ? src[0] : 14'h0;
  always @(posedge clk) begin
    bit pop;
    pop = re_to_sync && src.size() != 0;
    #1;
    if (pop) void'(src.pop_front());
  end

  int drops = 0, fixes = 0;
  always @(posedge clk) begin
    if (frame_dropped) drops++;
    if (corrected) fixes++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // read a frame like the TCU: RE one cycle after empty falls
  task automatic read_frame(output logic [7:0] got [$]);
    got.delete();
    re_from_tcu <= 0;
    while (empty_to_tcu) @(posedge clk);
    @(posedge clk);
    re_from_tcu <= 1;
    forever begin
      @(posedge clk);
      if (!empty_to_tcu && re_from_tcu) got.push_back(dout);
      if (empty_to_tcu) break;
    end
    re_from_tcu <= 0;
  endtask

  initial begin
    logic [7:0] bytes [$];
    logic [7:0] got [$];
    re_from_tcu = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 24; f++) begin
      int mode, n, d0;
      mode = f % 3;           // 0 clean, 1 single errors, 2 one double error
      n = 2 + $urandom_range(0, 12);
      bytes.delete();
      for (int i = 0; i < n; i++) bytes.push_back(8'($urandom));
      d0 = drops;
      @(negedge clk);
      for (int i = 0; i < n; i++) begin
        logic [13:0] b;
        b = enc(bytes[i]);
        if (mode == 1) b[$urandom_range(0, 13)] ^= 1'b1;
        if (mode == 2 && i == n / 2) begin
          int p, q;
          // two different data bits: always seen as more than one error
          // (a data bit together with its own row or column parity bit
          // would look like a single parity error to this code)
          p = $urandom_range(0, 7);
          q = (p + 1 + $urandom_range(0, 6)) % 8;
          b[p] ^= 1'b1; b[q] ^= 1'b1;
        end
        src.push_back(b);
      end
      if (mode == 2) begin
        // wait until the frame has been consumed, then make sure nothing comes out
        while (src.size() != 0) @(posedge clk);
        repeat (5) @(posedge clk);
        check(empty_to_tcu, "double-error frame is not offered");
        check(drops == d0 + 1, "frame_dropped pulses once");
      end else begin
        read_frame(got);
        check(got.size() == n, $sformatf("frame %0d length %0d vs %0d", f, got.size(), n));
        for (int i = 0; i < n && i < got.size(); i++)
          check(got[i] == bytes[i], $sformatf("frame %0d byte %0d %h vs %h", f, i, got[i], bytes[i]));
      end
      repeat (3) @(posedge clk);
    end
    check(fixes > 0, "corrections were reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
