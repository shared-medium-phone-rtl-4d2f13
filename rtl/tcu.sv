// tcu: transmission control unit. Relays packets between the FIFO-style
// producers and the WE-style consumers, and keeps the next free conference
// number.
//
// Each of the two channels (mic wrapper -> parity stuffer, parity destuffer
// -> packet analyzer) works the same way. The TCU raises RE the cycle after
// the producer's empty falls; on every edge where RE is high and empty is
// low it takes the byte on din and, after that edge, shows it on its output
// with WE high. RE falls the cycle after empty rises, so a packet leaves as
// one burst with WE high for each byte, one cycle behind the read.
//
// The receive channel also watches the packet headers: the 'to' field of
// every voice packet is a conference number in use, and next_conf is the
// largest one seen plus one (0 until a voice packet has been seen).
//
// The relaying and the "maximum plus one" rule follow the document; the
// header layout {from, to} and the reset value of next_conf are this
// design's choices.
module tcu
  import phone_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // transmit channel
  input  logic              mic_empty,
  input  logic [DATA_W-1:0] mic_din,
  output logic              mic_re,
  output logic              stuf_we,
  output logic [DATA_W-1:0] stuf_dout,
  // receive channel
  input  logic              dstf_empty,
  input  logic [DATA_W-1:0] dstf_din,
  output logic              dstf_re,
  output logic              pa_we,
  output logic [DATA_W-1:0] pa_dout,
  // conference bookkeeping
  output logic [NUM_W-1:0]  next_conf
);
  logic             seen_any;
  logic [NUM_W-1:0] max_conf;
  logic [1:0]       hdr_pos;    // 0: header byte next, 1: type byte next, 2: payload
  logic [NUM_W-1:0] cur_to;

  always_ff @(posedge clk) begin
    if (rst) begin
      mic_re    <= 1'b0;
      stuf_we   <= 1'b0;
      stuf_dout <= '0;
      dstf_re   <= 1'b0;
      pa_we     <= 1'b0;
      pa_dout   <= '0;
    end else begin
      mic_re    <= !mic_empty;
      stuf_we   <= mic_re && !mic_empty;
      stuf_dout <= mic_din;
      dstf_re   <= !dstf_empty;
      pa_we     <= dstf_re && !dstf_empty;
      pa_dout   <= dstf_din;
    end
  end

  // header tracking on the relayed receive stream
  always_ff @(posedge clk) begin
    if (rst) begin
      seen_any <= 1'b0;
      max_conf <= '0;
      hdr_pos  <= '0;
      cur_to   <= '0;
    end else if (!pa_we) begin
      hdr_pos <= '0;
    end else begin
      unique case (hdr_pos)
        2'd0: begin
          cur_to  <= pa_dout[NUM_W-1:0];
          hdr_pos <= 2'd1;
        end
        2'd1: begin
          hdr_pos <= 2'd2;
          if (pa_dout == PTYPE_VOICE && (!seen_any || cur_to > max_conf)) begin
            seen_any <= 1'b1;
            max_conf <= cur_to;
          end
        end
        default: ;
      endcase
    end
  end

  assign next_conf = seen_any ? max_conf + 1'b1 : '0;
endmodule
