// sync_adder: frames buffered blocks and serialises them onto the wire.
//
// Writing: on every rising edge where we is high, din is appended to the
// internal buffer (the first block is the one present at the first edge
// with we high; nothing is taken while we is low). When we falls the frame
// is complete, but it is not sent until green_light is seen high, so that
// the shared wire is not driven while another phone is using it.
//
// Sending: de goes high for the whole frame, which is sent most significant
// bit first as
//     SYNC_WORD (32 bits) | length (11 bits, number of data bits) | blocks
// with every bit held on tx for OVERSAMPLE clock cycles. The frame format,
// the green-light handshake, the 14-bit block and the oversampling factor
// of 8 follow the document; the sync word value, the bit order and the
// idle level (tx = 1, de = 0) are this design's choices.
//
// Blocks written while a frame waits or is being sent are dropped; the
// transmit side produces at most one frame per packet period. tx_busy is high from the first written block until the last
// bit has left.
module sync_adder
  import phone_pkg::*;
#(
  parameter int unsigned OVERSAMPLE = 8,
  parameter int unsigned MAX_BLOCKS = phone_pkg::FRAME_MAX_BLOCKS
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               green_light,
  input  logic               we,
  input  logic [BLOCK_W-1:0] din,
  output logic               tx,
  output logic               de,
  output logic               tx_busy
);
  localparam int unsigned AW  = $clog2(MAX_BLOCKS + 1);
  localparam int unsigned OSW = (OVERSAMPLE > 1) ? $clog2(OVERSAMPLE) : 1;
  localparam int unsigned HDR_W = SYNC_W + LEN_W;

  typedef enum logic [1:0] {
    S_EMPTY   = 2'd0,  // nothing buffered
    S_FILLING = 2'd1,  // we is high, blocks are being stored
    S_WAIT    = 2'd2,  // frame complete, waiting for green light
    S_SEND    = 2'd3   // driving the wire
  } state_e;

  state_e             state;
  logic [BLOCK_W-1:0] buffer [MAX_BLOCKS];
  logic [AW-1:0]      n_blocks;     // blocks in the frame
  logic [AW-1:0]      blk_idx;      // block being sent
  logic [$clog2(BLOCK_W)-1:0] bit_idx;
  logic [HDR_W-1:0]   hdr_shift;    // sync word and length, MSB first
  logic [$clog2(HDR_W+1)-1:0] hdr_left;
  logic [OSW-1:0]     os_cnt;
  logic [LEN_W-1:0]   frame_len;

  assign frame_len = LEN_W'(n_blocks * BLOCK_W);
  assign tx_busy   = (state != S_EMPTY);

  logic store;
  assign store = we && (state == S_EMPTY || state == S_FILLING) && n_blocks < AW'(MAX_BLOCKS);

  always_ff @(posedge clk) begin
    if (store) buffer[n_blocks] <= din;
  end

  // the bit currently on the wire
  logic cur_bit;
  always_comb begin
    if (hdr_left != '0) cur_bit = hdr_shift[HDR_W-1];
    else                cur_bit = buffer[blk_idx][bit_idx];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_EMPTY;
      n_blocks  <= '0;
      blk_idx   <= '0;
      bit_idx   <= '0;
      hdr_shift <= '0;
      hdr_left  <= '0;
      os_cnt    <= '0;
      tx        <= 1'b1;
      de        <= 1'b0;
    end else begin
      unique case (state)
        S_EMPTY, S_FILLING: begin
          if (we) begin
            state <= S_FILLING;
            if (store) n_blocks <= n_blocks + 1'b1;
          end else if (state == S_FILLING) begin
            state <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (green_light) begin
            state     <= S_SEND;
            hdr_shift <= {SYNC_WORD, frame_len};
            hdr_left  <= ($bits(hdr_left))'(HDR_W);
            blk_idx   <= '0;
            bit_idx   <= ($bits(bit_idx))'(BLOCK_W - 1);
            os_cnt    <= '0;
          end
        end
        S_SEND: begin
          de <= 1'b1;
          tx <= cur_bit;
          if (os_cnt == OSW'(OVERSAMPLE - 1)) begin
            os_cnt <= '0;
            if (hdr_left != '0) begin
              hdr_shift <= hdr_shift << 1;
              hdr_left  <= hdr_left - 1'b1;
            end else if (bit_idx != '0) begin
              bit_idx <= bit_idx - 1'b1;
            end else if (blk_idx != n_blocks - 1'b1) begin
              blk_idx <= blk_idx + 1'b1;
              bit_idx <= ($bits(bit_idx))'(BLOCK_W - 1);
            end else begin
              state    <= S_EMPTY;
              n_blocks <= '0;
            end
          end else begin
            os_cnt <= os_cnt + 1'b1;
          end
        end
      endcase
      if (state != S_SEND) begin
        de <= 1'b0;
        tx <= 1'b1;
      end
    end
  end

endmodule
