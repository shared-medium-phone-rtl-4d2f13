// phone: one telephone on the shared two-wire medium.
//
// Every phone is both sender and receiver. The transmit path is
//   mic_wrapper -> tcu -> parity_stuffer -> sync_adder -> RS-485 DI/DE
// and the receive path is
//   RS-485 RO -> sync_remover -> parity_destuffer -> tcu -> packet_analyzer
//   -> voice_buffer -> speaker samples.
// The phone FSM follows the packet reports of the packet analyzer and the
// call button, and tells the mic wrapper what to send. A frame is sent
// only when the phone's own sync remover is not busy receiving (green
// light = not busy), and the sync remover ignores the wire while this
// phone's own driver is enabled, which discards the phone's echo.
//
// Speaker output: in a call the voice buffer is played; while calling,
// the ringback tone (+/-64); otherwise silence. The siren is a separate
// one-bit output. The block structure follows the document; the audio
// select and its levels are this design's choices.
//
// Ports: rs485_* connect to a MAX485 transceiver whose RE is tied low;
// ac97_ready is the codec's one-cycle sample strobe, mic_data the sample
// it captured and spk_data the sample to play.
module phone
  import phone_pkg::*;
#(
  parameter int unsigned OVERSAMPLE   = 8,
  parameter int unsigned CLK_HZ       = 27_500_000,
  parameter int unsigned RING_TIMEOUT = 2_750_000,
  parameter int unsigned CALL_TIMEOUT = 2_750_000
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NUM_W-1:0]  my_num,
  input  logic [NUM_W-1:0]  dial_num,
  input  logic              call_btn,
  input  logic              ac97_ready,
  input  logic [DATA_W-1:0] mic_data,
  output logic [DATA_W-1:0] spk_data,
  output logic              siren,
  input  logic              rs485_ro,
  output logic              rs485_di,
  output logic              rs485_de,
  output logic [NUM_W-1:0]  next_conf,
  output phone_state_e      call_state,
  output logic              in_call,
  output logic              tx_pending,    // a frame is buffered or on the wire
  output logic              rx_corrected,  // pulse: a received block was corrected
  output logic              rx_dropped     // pulse: a received frame was discarded
);
  // transmit path
  logic              mw_empty, mw_re;
  logic [DATA_W-1:0] mw_dout;
  logic              st_we_in, st_we_out;
  logic [DATA_W-1:0] st_din;
  logic [BLOCK_W-1:0] st_dout;
  logic              green_light;
  // receive path
  logic              sr_busy, sr_empty, sr_re;
  logic [BLOCK_W-1:0] sr_dout;
  logic              ds_empty, ds_re;
  logic [DATA_W-1:0] ds_dout;
  logic              pa_we;
  logic [DATA_W-1:0] pa_din;
  logic              listen, vb_we;
  logic [NUM_W-1:0]  pkt_from, pkt_to;
  logic [7:0]        pkt_type;
  logic [DATA_W-1:0] vb_din, vb_dout;
  // control
  logic              tx_enable, siren_on, ringback_on, ringback;
  logic [NUM_W-1:0]  tx_to, expected_conf;
  logic [7:0]        tx_type;

  mic_wrapper u_mic (
    .clk, .rst, .ready(ac97_ready), .mic_data, .tx_enable,
    .from_num(my_num), .to_num(tx_to), .ptype(tx_type),
    .re(mw_re), .empty(mw_empty), .dout(mw_dout)
  );

  tcu u_tcu (
    .clk, .rst,
    .mic_empty(mw_empty), .mic_din(mw_dout), .mic_re(mw_re),
    .stuf_we(st_we_in), .stuf_dout(st_din),
    .dstf_empty(ds_empty), .dstf_din(ds_dout), .dstf_re(ds_re),
    .pa_we(pa_we), .pa_dout(pa_din),
    .next_conf
  );

  parity_stuffer u_stuf (
    .clk, .rst, .we_in(st_we_in), .din(st_din), .we_out(st_we_out), .dout(st_dout)
  );

  assign green_light = !sr_busy;

  sync_adder #(.OVERSAMPLE(OVERSAMPLE)) u_sadd (
    .clk, .rst, .green_light, .we(st_we_out), .din(st_dout),
    .tx(rs485_di), .de(rs485_de), .tx_busy(tx_pending)
  );

  sync_remover #(.OVERSAMPLE(OVERSAMPLE)) u_srem (
    .clk, .rst, .rx(rs485_ro), .mute(rs485_de), .re(sr_re),
    .busy(sr_busy), .empty(sr_empty), .dout(sr_dout)
  );

  parity_destuffer u_dstf (
    .clk, .rst, .empty_from_sync(sr_empty), .din(sr_dout), .re_to_sync(sr_re),
    .re_from_tcu(ds_re), .empty_to_tcu(ds_empty), .dout(ds_dout),
    .frame_dropped(rx_dropped), .corrected(rx_corrected)
  );

  packet_analyzer u_pa (
    .clk, .rst, .we_from_tcu(pa_we), .din(pa_din), .expected_conf,
    .listen, .from_num(pkt_from), .to_num(pkt_to), .ptype(pkt_type),
    .vb_we, .vb_data(vb_din)
  );

  voice_buffer u_vb (
    .clk, .rst, .we(vb_we), .din(vb_din), .ready(ac97_ready), .dout(vb_dout)
  );

  phone_fsm #(.RING_TIMEOUT(RING_TIMEOUT), .CALL_TIMEOUT(CALL_TIMEOUT)) u_fsm (
    .clk, .rst, .my_num, .dial_num, .call_btn, .next_conf,
    .listen, .pkt_from, .pkt_to, .pkt_type,
    .state(call_state), .tx_enable, .tx_to, .tx_type, .expected_conf,
    .siren_on, .ringback_on, .in_call
  );

  siren_gen #(.CLK_HZ(CLK_HZ)) u_siren (.clk, .rst, .en(siren_on), .tone(siren));
  ringback_gen #(.CLK_HZ(CLK_HZ)) u_ringback (.clk, .rst, .en(ringback_on), .tone(ringback));

  always_comb begin
    if (in_call)          spk_data = vb_dout;
    else if (ringback_on) spk_data = ringback ? 8'sd64 : -8'sd64;
    else                  spk_data = '0;
  end
endmodule
