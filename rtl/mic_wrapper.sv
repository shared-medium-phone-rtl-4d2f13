// mic_wrapper: builds the packets a phone sends.
//
// Microphone samples arrive one per AC97 ready pulse. Every SAMPLES pulses
// (5 at the default, 40 bits of voice) a packet is built if tx_enable is
// high:
//     byte 0   {from_num, to_num}
//     byte 1   ptype (0: calling/ringing packet, 1: voice packet)
//     byte 2.. the SAMPLES voice samples, oldest first (voice packets only)
// The packet is offered FIFO style: empty falls with byte 0 on dout, each
// rising edge with re high takes one byte and shows the next, and empty
// rises after the last byte. The header fields and the type codes come
// from the phone FSM and are sampled when the packet is built.
//
// Packet layout, the two packet types and the read handshake follow the
// document. Building calling packets at the voice packet cadence, the
// tx_enable input and dropping a packet that completes while the previous
// one is still being read are this design's choices.
module mic_wrapper
  import phone_pkg::*;
#(
  parameter int unsigned SAMPLES = 5
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ready,
  input  logic [DATA_W-1:0] mic_data,
  input  logic              tx_enable,
  input  logic [NUM_W-1:0]  from_num,
  input  logic [NUM_W-1:0]  to_num,
  input  logic [7:0]        ptype,
  input  logic              re,
  output logic              empty,
  output logic [DATA_W-1:0] dout
);
  localparam int unsigned PKT_BYTES = SAMPLES + 2;
  localparam int unsigned SW = $clog2(SAMPLES + 1);
  localparam int unsigned PW = $clog2(PKT_BYTES + 1);

  logic [DATA_W-1:0] samples [SAMPLES];   // being collected
  logic [SW-1:0]     n_samp;
  logic [DATA_W-1:0] pkt [PKT_BYTES];      // being read out
  logic [PW-1:0]     pkt_len, rd_ptr;
  logic              full;

  logic frame_done;
  assign frame_done = ready && (n_samp == SW'(SAMPLES - 1));

  assign empty = !full;
  assign dout  = pkt[rd_ptr];

  always_ff @(posedge clk) begin
    if (ready) samples[n_samp] <= mic_data;
    if (frame_done && tx_enable && !full) begin
      pkt[0] <= make_header(from_num, to_num);
      pkt[1] <= ptype;
      for (int i = 0; i < SAMPLES - 1; i++) pkt[i+2] <= samples[i];
      pkt[SAMPLES+1] <= mic_data;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      n_samp  <= '0;
      full    <= 1'b0;
      pkt_len <= '0;
      rd_ptr  <= '0;
    end else begin
      if (ready) n_samp <= frame_done ? '0 : n_samp + 1'b1;
      if (full) begin
        if (re) begin
          if (rd_ptr == pkt_len - 1'b1) full   <= 1'b0;
          else                          rd_ptr <= rd_ptr + 1'b1;
        end
      end else if (frame_done && tx_enable) begin
        full    <= 1'b1;
        rd_ptr  <= '0;
        pkt_len <= (ptype == PTYPE_VOICE) ? PW'(PKT_BYTES) : PW'(2);
      end
    end
  end

  // FIFO read handshake: a block offered and not taken stays on dout.
  a_hold_until_read: assert property (@(posedge clk) disable iff (rst)
    (!empty && !re) |=> (!empty && $stable(dout)))
    else $error("mic_wrapper: offered data changed before it was read");
endmodule
