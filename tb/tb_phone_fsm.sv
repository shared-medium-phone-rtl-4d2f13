// tb_phone_fsm: walks the call state machine through every transition
// with short timeouts (RING_TIMEOUT = 50, CALL_TIMEOUT = 60 cycles):
// calling and hanging up, calling and being answered, ringing and timing
// out, ringing kept alive by repeated ringing packets, answering, a call
// kept alive by remote voice, a call dropped by timeout and by the button.
// The outputs to the mic wrapper, packet analyzer and tone generators are
// checked in every state, and the timeouts to the cycle.
module tb_phone_fsm;
  import phone_pkg::*;
  localparam int RT = 50, CT = 60;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] my_num, dial_num, next_conf, pkt_from, pkt_to, tx_to, expected_conf;
  logic       call_btn, listen, tx_enable, siren_on, ringback_on, in_call;
  logic [7:0] pkt_type, tx_type;
  phone_state_e state;

  phone_fsm #(.RING_TIMEOUT(RT), .CALL_TIMEOUT(CT)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %s)", what, state.name()); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic press();
    @(negedge clk) call_btn = 1;
    repeat (3) @(negedge clk);
    call_btn = 0;
    @(negedge clk);
  endtask

  task automatic packet(logic [3:0] f, logic [3:0] t, logic [7:0] ty);
    @(negedge clk);
    listen = 1; pkt_from = f; pkt_to = t; pkt_type = ty;
    @(negedge clk);
    listen = 0;
    @(negedge clk);
  endtask

  task automatic expect_state(phone_state_e s, string what);
    check(state == s, what);
    case (s)
      PH_IDLE:    check(!tx_enable && !siren_on && !ringback_on && !in_call, "IDLE outputs");
      PH_CALLING: check(tx_enable && tx_type == PTYPE_CALL && tx_to == dial_num && ringback_on &&
                        !siren_on && !in_call, "CALLING outputs");
      PH_RINGING: check(!tx_enable && siren_on && !ringback_on && !in_call, "RINGING outputs");
      PH_IN_CALL: check(tx_enable && tx_type == PTYPE_VOICE && in_call && !siren_on && !ringback_on,
                        "IN_CALL outputs");
    endcase
  endtask

  initial begin
    int t;
    my_num = 4'd2; dial_num = 4'd6; next_conf = 4'd9; call_btn = 0;
    listen = 0; pkt_from = 0; pkt_to = 0; pkt_type = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    expect_state(PH_IDLE, "reset to IDLE");
    // a ringing packet for somebody else and a voice packet change nothing
    packet(4'd1, 4'd3, PTYPE_CALL);
    packet(4'd1, 4'd2, PTYPE_VOICE);
    expect_state(PH_IDLE, "foreign packets ignored");
    // call, then hang up while calling; holding the button is one press
    press();
    expect_state(PH_CALLING, "button starts a call");
    repeat (200) @(negedge clk);
    expect_state(PH_CALLING, "calling has no timeout");
    packet(4'd5, 4'd4, PTYPE_VOICE);
    expect_state(PH_CALLING, "voice from another phone does not answer");
    press();
    expect_state(PH_IDLE, "button ends calling");
    // call and get answered: join the conference in the answer's 'to'
    press();
    packet(4'd6, 4'd11, PTYPE_VOICE);
    expect_state(PH_IN_CALL, "answer from the dialled phone");
    check(expected_conf == 4'd11 && tx_to == 4'd11, "joined conference 11");
    // remote voice keeps the call; own echo and other conferences do not
    for (int i = 0; i < 4; i++) begin
      repeat (CT - 10) @(negedge clk);
      packet(4'd6, 4'd11, PTYPE_VOICE);
    end
    expect_state(PH_IN_CALL, "kept alive by remote voice");
    t = 0;
    while (state == PH_IN_CALL && t < 200) begin
      if (t == 10) packet(4'd2, 4'd11, PTYPE_VOICE);  // own number
      if (t == 20) packet(4'd6, 4'd12, PTYPE_VOICE);  // other conference
      @(negedge clk);
      t++;
    end
    check(t >= CT - 3 - 6 && t <= CT + 1, $sformatf("call timeout after %0d cycles", t));
    expect_state(PH_IDLE, "call timed out");
    // ringing and timing out
    packet(4'd7, 4'd2, PTYPE_CALL);
    expect_state(PH_RINGING, "ringing packet for my number");
    t = 0;
    while (state == PH_RINGING && t < 200) begin @(negedge clk); t++; end
    check(t >= RT - 4 && t <= RT, $sformatf("ring timeout after %0d cycles", t));
    expect_state(PH_IDLE, "ring timed out");
    // ringing kept alive, then answered
    packet(4'd7, 4'd2, PTYPE_CALL);
    for (int i = 0; i < 4; i++) begin
      repeat (RT - 10) @(negedge clk);
      packet(4'd7, 4'd2, PTYPE_CALL);
    end
    expect_state(PH_RINGING, "ringing kept alive");
    press();
    expect_state(PH_IN_CALL, "answered");
    check(expected_conf == 4'd9 && tx_to == 4'd9, "answer opens conference next_conf");
    packet(4'd7, 4'd9, PTYPE_VOICE);
    press();
    expect_state(PH_IDLE, "hang up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
