// phone_fsm: the call state of one phone.
//
// States: IDLE, CALLING, RINGING and IN_CALL. Inputs are the phone's own
// number, the number dialled, the call/hang-up button (a clean level; its
// rising edge is a press) and the packet reports of the packet analyzer
// (listen pulse with from, to and type). Outputs tell the mic wrapper what
// to send, tell the packet analyzer which conference to keep, and switch
// the siren and the ringback sound.
//
//   IDLE    --press--------------------------------> CALLING
//   IDLE    --ringing packet to my number-----------> RINGING
//   RINGING --ringing packet to my number: restart the ring timer
//   RINGING --no ringing packet for RING_TIMEOUT----> IDLE
//   RINGING --press: open conference next_conf------> IN_CALL
//   CALLING --voice packet from the dialled number--> IN_CALL (joins the
//             conference named in that packet's 'to')
//   CALLING --press---------------------------------> IDLE
//   IN_CALL --voice packet of my conference from another phone: restart
//             the call timer
//   IN_CALL --press, or no such packet for CALL_TIMEOUT--> IDLE
//
// CALLING sends ringing packets (type 0) to the dialled number; IN_CALL
// sends voice packets (type 1) to the conference. A third phone that dials
// any member of a running call joins it the same way the caller does.
//
// The states, the packet types, the transitions and the timers follow the
// document. The addressing (ringing packets carry the callee's number,
// the answering phone opens conference next_conf), the hang-up from
// CALLING and the timeout lengths are this design's choices.
module phone_fsm
  import phone_pkg::*;
#(
  parameter int unsigned RING_TIMEOUT = 2_750_000,
  parameter int unsigned CALL_TIMEOUT = 2_750_000
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NUM_W-1:0] my_num,
  input  logic [NUM_W-1:0] dial_num,
  input  logic             call_btn,
  input  logic [NUM_W-1:0] next_conf,
  input  logic             listen,
  input  logic [NUM_W-1:0] pkt_from,
  input  logic [NUM_W-1:0] pkt_to,
  input  logic [7:0]       pkt_type,
  output phone_state_e     state,
  output logic             tx_enable,
  output logic [NUM_W-1:0] tx_to,
  output logic [7:0]       tx_type,
  output logic [NUM_W-1:0] expected_conf,
  output logic             siren_on,
  output logic             ringback_on,
  output logic             in_call
);
  localparam int unsigned TMAX = (RING_TIMEOUT > CALL_TIMEOUT) ? RING_TIMEOUT : CALL_TIMEOUT;
  localparam int unsigned TW   = $clog2(TMAX + 1);

  logic             btn_q, press;
  logic [TW-1:0]    timer;
  logic [NUM_W-1:0] conf;

  assign press = call_btn && !btn_q;

  logic ring_pkt, voice_pkt;
  assign ring_pkt  = listen && pkt_type == PTYPE_CALL && pkt_to == my_num;
  assign voice_pkt = listen && pkt_type == PTYPE_VOICE;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= PH_IDLE;
      btn_q <= 1'b0;
      timer <= '0;
      conf  <= '0;
    end else begin
      btn_q <= call_btn;
      timer <= timer + 1'b1;
      unique case (state)
        PH_IDLE: begin
          timer <= '0;
          if (press)         state <= PH_CALLING;
          else if (ring_pkt) state <= PH_RINGING;
        end
        PH_CALLING: begin
          timer <= '0;
          if (press) begin
            state <= PH_IDLE;
          end else if (voice_pkt && pkt_from == dial_num) begin
            state <= PH_IN_CALL;
            conf  <= pkt_to;
          end
        end
        PH_RINGING: begin
          if (press) begin
            state <= PH_IN_CALL;
            conf  <= next_conf;
            timer <= '0;
          end else if (ring_pkt) begin
            timer <= '0;
          end else if (timer >= TW'(RING_TIMEOUT - 1)) begin
            state <= PH_IDLE;
          end
        end
        PH_IN_CALL: begin
          if (press || timer >= TW'(CALL_TIMEOUT - 1)) begin
            state <= PH_IDLE;
          end else if (voice_pkt && pkt_to == conf && pkt_from != my_num) begin
            timer <= '0;
          end
        end
      endcase
    end
  end

  always_comb begin
    tx_enable     = (state == PH_CALLING) || (state == PH_IN_CALL);
    tx_type       = (state == PH_IN_CALL) ? PTYPE_VOICE : PTYPE_CALL;
    tx_to         = (state == PH_IN_CALL) ? conf : dial_num;
    expected_conf = (state == PH_CALLING) ? dial_num : conf;
    siren_on      = (state == PH_RINGING);
    ringback_on   = (state == PH_CALLING);
    in_call       = (state == PH_IN_CALL);
  end
endmodule
