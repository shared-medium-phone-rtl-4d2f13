// sync_remover: finds frames on the wire and deserialises them.
//
// The asynchronous wire is first passed through two flip-flops. A free
// running counter divides the clock by OVERSAMPLE, the number of clock
// cycles per bit. The wire is sampled twice per bit period, at count 0
// (phase A) and PHASE_OFF cycles later (phase B, 45 degrees of a bit, one
// cycle at the default of 8), and each phase shifts its samples into its
// own 32-bit register. A sample taken on a bit edge may be wrong, but then
// the other phase is not on an edge, so at least one register sees the
// sync word cleanly. The phase that matched is kept for the rest of the
// frame: the 11-bit length field (number of data bits) is read, then the
// data bits, most significant first, packed into 14-bit blocks and stored.
// busy is high from the sync match to the last data bit.
//
// When the frame is in, the blocks are handed out FIFO style: empty falls
// with the first block already on dout, every rising edge with re high
// takes one block and shows the next, and after the last block empty rises
// and the remover hunts for the next sync word. The remover does not listen
// while blocks wait to be read, and it hunts no sync while mute is high
// (the phone's own transmitter is driving the wire).
//
// The two-phase sync detection, the 45 degree offset, the length field and
// the read handshake follow the document. The input synchroniser, the
// mute input and what happens with a length that is not a multiple of 14
// (the partial block is dropped) are this design's choices.
module sync_remover
  import phone_pkg::*;
#(
  parameter int unsigned OVERSAMPLE = 8,
  parameter int unsigned MAX_BLOCKS = phone_pkg::FRAME_MAX_BLOCKS
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               rx,
  input  logic               mute,
  input  logic               re,
  output logic               busy,
  output logic               empty,
  output logic [BLOCK_W-1:0] dout
);
  localparam int unsigned AW        = $clog2(MAX_BLOCKS + 1);
  localparam int unsigned OSW       = (OVERSAMPLE > 1) ? $clog2(OVERSAMPLE) : 1;
  localparam int unsigned PHASE_OFF = (OVERSAMPLE >= 16) ? OVERSAMPLE / 8 : 1;
  localparam int unsigned MAX_BITS  = MAX_BLOCKS * BLOCK_W;

  typedef enum logic [1:0] {
    S_HUNT = 2'd0,  // looking for the sync word
    S_LEN  = 2'd1,  // reading the length field
    S_DATA = 2'd2,  // reading data bits
    S_OUT  = 2'd3   // handing blocks to the reader
  } state_e;

  state_e             state;
  logic               rx_meta, rx_s;
  logic [OSW-1:0]     os_cnt;
  logic [SYNC_W-2:0]  shift_a, shift_b;   // last 31 samples of each phase
  logic               phase;           // 0: phase A, 1: phase B
  logic [LEN_W-2:0]   len_shift;
  logic [$clog2(LEN_W+1)-1:0] len_left;
  logic [LEN_W-1:0]   bits_left;
  logic [BLOCK_W-2:0] blk_shift;
  logic [$clog2(BLOCK_W)-1:0] blk_bits;
  logic [BLOCK_W-1:0] buffer [MAX_BLOCKS];
  logic [AW-1:0]      wr_cnt, rd_ptr;

  logic samp_a, samp_b, samp_sel;
  assign samp_a   = (os_cnt == '0);
  assign samp_b   = (os_cnt == OSW'(PHASE_OFF));
  assign samp_sel = phase ? samp_b : samp_a;

  logic [SYNC_W-1:0] next_a, next_b;
  assign next_a = {shift_a, rx_s};
  assign next_b = {shift_b, rx_s};

  assign busy  = (state == S_LEN) || (state == S_DATA);
  assign empty = (state != S_OUT);
  assign dout  = buffer[rd_ptr];

  // a data bit completes a block
  logic blk_done;
  assign blk_done = (state == S_DATA) && samp_sel &&
                    (blk_bits == ($bits(blk_bits))'(BLOCK_W - 1)) && wr_cnt < AW'(MAX_BLOCKS);

  always_ff @(posedge clk) begin
    if (blk_done) buffer[wr_cnt] <= {blk_shift, rx_s};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_meta   <= 1'b1;
      rx_s      <= 1'b1;
      os_cnt    <= '0;
      state     <= S_HUNT;
      shift_a   <= '0;
      shift_b   <= '0;
      phase     <= 1'b0;
      len_shift <= '0;
      len_left  <= '0;
      bits_left <= '0;
      blk_shift <= '0;
      blk_bits  <= '0;
      wr_cnt    <= '0;
      rd_ptr    <= '0;
    end else begin
      rx_meta <= rx;
      rx_s    <= rx_meta;
      os_cnt  <= (os_cnt == OSW'(OVERSAMPLE - 1)) ? '0 : os_cnt + 1'b1;

      unique case (state)
        S_HUNT: begin
          wr_cnt   <= '0;
          rd_ptr   <= '0;
          blk_bits <= '0;
          len_left <= ($bits(len_left))'(LEN_W);
          if (mute) begin
            shift_a <= '0;
            shift_b <= '0;
          end else begin
            if (samp_a) shift_a <= next_a[SYNC_W-2:0];
            if (samp_b) shift_b <= next_b[SYNC_W-2:0];
            if (samp_a && next_a == SYNC_WORD) begin
              phase <= 1'b0;
              state <= S_LEN;
            end else if (samp_b && next_b == SYNC_WORD) begin
              phase <= 1'b1;
              state <= S_LEN;
            end
          end
        end
        S_LEN: begin
          if (samp_sel) begin
            len_shift <= {len_shift[LEN_W-3:0], rx_s};
            len_left  <= len_left - 1'b1;
            if (len_left == 1) begin
              if ({len_shift, rx_s} < LEN_W'(BLOCK_W)) begin
                state <= S_HUNT;   // no whole block in this frame
              end else begin
                state <= S_DATA;
                if ({len_shift, rx_s} > LEN_W'(MAX_BITS))
                  bits_left <= LEN_W'(MAX_BITS);
                else
                  bits_left <= {len_shift, rx_s};
              end
            end
          end
        end
        S_DATA: begin
          if (samp_sel) begin
            blk_shift <= {blk_shift[BLOCK_W-3:0], rx_s};
            bits_left <= bits_left - 1'b1;
            if (blk_bits == ($bits(blk_bits))'(BLOCK_W - 1)) begin
              blk_bits <= '0;
              if (blk_done) wr_cnt <= wr_cnt + 1'b1;
            end else begin
              blk_bits <= blk_bits + 1'b1;
            end
            if (bits_left == 1) begin
              if (blk_done || wr_cnt != '0) state <= S_OUT;
              else                          state <= S_HUNT;
            end
          end
        end
        S_OUT: begin
          shift_a <= '0;
          shift_b <= '0;
          if (re) begin
            if (rd_ptr == wr_cnt - 1'b1) state  <= S_HUNT;
            else                         rd_ptr <= rd_ptr + 1'b1;
          end
        end
      endcase
    end
  end

  // FIFO read handshake: a block offered and not taken stays on dout.
  a_hold_until_read: assert property (@(posedge clk) disable iff (rst)
    (!empty && !re) |=> (!empty && $stable(dout)))
    else $error("sync_remover: offered data changed before it was read");
endmodule
