// packet_analyzer: decodes the packets the TCU delivers and routes voice.
//
// A packet arrives as a burst with we_from_tcu high for each byte. The
// first byte gives the sender and the conference ({from, to}), the second
// the packet type. One cycle after the type byte, listen pulses for one
// cycle with from_num, to_num and ptype valid, for every packet, so the
// phone FSM can follow the traffic on the wire.
//
// A voice packet whose 'to' equals expected_conf is passed to the voice
// buffer. Its samples go through a two-entry store: in TRANS_TYPE1_1 the
// incoming byte is written to entry 1 while entry 0 is read out, in
// TRANS_TYPE1_2 the other way round, so vb_data/vb_we follow the input one
// cycle later. Calling packets, and voice packets for another conference,
// are skipped in WAITING_TYPE0_TO_END until the burst ends.
//
// States, the listen pulse and the ping-pong store follow the document;
// leaving WAITING_TYPE0_TO_END only when we_from_tcu falls follows its
// state diagram (the text calls it a one-cycle state).
module packet_analyzer
  import phone_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              we_from_tcu,
  input  logic [DATA_W-1:0] din,
  input  logic [NUM_W-1:0]  expected_conf,
  output logic              listen,
  output logic [NUM_W-1:0]  from_num,
  output logic [NUM_W-1:0]  to_num,
  output logic [7:0]        ptype,
  output logic              vb_we,
  output logic [DATA_W-1:0] vb_data
);
  typedef enum logic [2:0] {
    S_IDLE        = 3'd0,
    S_SAMPLING_PT = 3'd1,
    S_WAIT_END    = 3'd2,
    S_TRANS1_1    = 3'd3,
    S_TRANS1_2    = 3'd4
  } state_e;

  state_e            state;
  logic [DATA_W-1:0] bram [2];
  logic              last_wr;   // entry written last

  assign vb_data = bram[last_wr];

  always_ff @(posedge clk) begin
    if (we_from_tcu && state == S_TRANS1_1) bram[1] <= din;
    if (we_from_tcu && state == S_TRANS1_2) bram[0] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      listen   <= 1'b0;
      from_num <= '0;
      to_num   <= '0;
      ptype    <= '0;
      vb_we    <= 1'b0;
      last_wr  <= 1'b0;
    end else begin
      listen <= 1'b0;
      vb_we  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (we_from_tcu) begin
            from_num <= din[7:4];
            to_num   <= din[3:0];
            state    <= S_SAMPLING_PT;
          end
        end
        S_SAMPLING_PT: begin
          if (!we_from_tcu) begin
            state <= S_IDLE;
          end else begin
            ptype  <= din;
            listen <= 1'b1;
            if (din == PTYPE_VOICE && to_num == expected_conf) state <= S_TRANS1_1;
            else                                               state <= S_WAIT_END;
          end
        end
        S_WAIT_END: begin
          if (!we_from_tcu) state <= S_IDLE;
        end
        S_TRANS1_1: begin
          if (!we_from_tcu) begin
            state <= S_IDLE;
          end else begin
            vb_we   <= 1'b1;
            last_wr <= 1'b1;
            state   <= S_TRANS1_2;
          end
        end
        S_TRANS1_2: begin
          if (!we_from_tcu) begin
            state <= S_IDLE;
          end else begin
            vb_we   <= 1'b1;
            last_wr <= 1'b0;
            state   <= S_TRANS1_1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
