// parity_destuffer: checks and corrects the 14-bit blocks of one frame and
// passes the frame on as bytes.
//
// The blocks come from the sync remover (FIFO style: empty low means a
// block is on din, every edge with re_to_sync high takes it). Each block
// is checked against the 2x4 row/column even parity of parity_stuffer:
//   * no parity fails              -> block is good
//   * one row and one column fail  -> the data bit at their crossing is
//                                     flipped (single-bit error)
//   * only one row or one column   -> a parity bit itself was hit; the
//                                     data is good
//   * any other pattern            -> more than one error, the whole frame
//                                     is dropped.
// The corrected bytes are stored in a buffer; when the whole frame is in,
// the bytes are offered to the TCU with the same FIFO convention: the first
// byte is on dout as soon as empty_to_tcu is low, and each edge with
// re_from_tcu high takes one byte.
//
// States and their empty/re outputs follow the document's state diagram
// (IDLE, SAMPLING, SAMPLED_WAITING_FOR_TCU, SENDING_TO_TCU); the return to
// IDLE on a dropped frame follows its text. The error classification and
// the frame_dropped/corrected status pulses are this design's.
module parity_destuffer
  import phone_pkg::*;
#(
  parameter int unsigned MAX_BLOCKS = phone_pkg::FRAME_MAX_BLOCKS
) (
  input  logic               clk,
  input  logic               rst,
  // from the sync remover
  input  logic               empty_from_sync,
  input  logic [BLOCK_W-1:0] din,
  output logic               re_to_sync,
  // to the TCU
  input  logic               re_from_tcu,
  output logic               empty_to_tcu,
  output logic [DATA_W-1:0]  dout,
  // status
  output logic               frame_dropped,
  output logic               corrected
);
  localparam int unsigned AW = $clog2(MAX_BLOCKS + 1);

  typedef enum logic [1:0] {
    S_IDLE     = 2'd0,
    S_SAMPLING = 2'd1,
    S_WAITING  = 2'd2,
    S_SENDING  = 2'd3
  } state_e;

  state_e            state;
  logic [DATA_W-1:0] buffer [MAX_BLOCKS];
  logic [AW-1:0]     wr_cnt, rd_ptr;
  logic              bad_frame;

  // ---- parity check of the block on din --------------------------------
  logic [1:0]        row_fail;
  logic [3:0]        col_fail;
  logic [DATA_W-1:0] fixed;
  logic              uncorrectable, single_fix;

  always_comb begin
    row_fail[0] = ^{din[8], din[3:0]};
    row_fail[1] = ^{din[9], din[7:4]};
    for (int c = 0; c < 4; c++) col_fail[c] = din[10+c] ^ din[c] ^ din[c+4];
    fixed         = din[7:0];
    single_fix    = ($countones(row_fail) == 1) && ($countones(col_fail) == 1);
    uncorrectable = 1'b0;
    if (single_fix) begin
      for (int c = 0; c < 4; c++)
        if (col_fail[c]) fixed[row_fail[1] ? c + 4 : c] = ~fixed[row_fail[1] ? c + 4 : c];
    end else if ($countones({row_fail, col_fail}) > 1) begin
      uncorrectable = 1'b1;
    end
  end

  logic take_in, take_out;
  assign re_to_sync   = (state == S_SAMPLING);
  assign empty_to_tcu = !(state == S_WAITING || state == S_SENDING);
  assign take_in      = re_to_sync && !empty_from_sync;
  assign take_out     = re_from_tcu && !empty_to_tcu;
  assign dout         = buffer[rd_ptr];

  always_ff @(posedge clk) begin
    if (take_in && wr_cnt < AW'(MAX_BLOCKS)) buffer[wr_cnt] <= fixed;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= S_IDLE;
      wr_cnt        <= '0;
      rd_ptr        <= '0;
      bad_frame     <= 1'b0;
      frame_dropped <= 1'b0;
      corrected     <= 1'b0;
    end else begin
      frame_dropped <= 1'b0;
      corrected     <= take_in && single_fix;
      unique case (state)
        S_IDLE: begin
          wr_cnt    <= '0;
          rd_ptr    <= '0;
          bad_frame <= 1'b0;
          if (!empty_from_sync) state <= S_SAMPLING;
        end
        S_SAMPLING: begin
          if (take_in) begin
            if (wr_cnt < AW'(MAX_BLOCKS)) wr_cnt <= wr_cnt + 1'b1;
            if (uncorrectable) bad_frame <= 1'b1;
          end else if (empty_from_sync) begin
            if (bad_frame || wr_cnt == '0) begin
              frame_dropped <= bad_frame;
              state         <= S_IDLE;
            end else begin
              state <= S_WAITING;
            end
          end
        end
        S_WAITING, S_SENDING: begin
          if (take_out) begin
            state <= S_SENDING;
            if (rd_ptr == wr_cnt - 1'b1) state <= S_IDLE;
            else                         rd_ptr <= rd_ptr + 1'b1;
          end
        end
      endcase
    end
  end

  // FIFO read handshake: a block offered and not taken stays on dout.
  a_hold_until_read: assert property (@(posedge clk) disable iff (rst)
    (!empty_to_tcu && !re_from_tcu) |=> (!empty_to_tcu && $stable(dout)))
    else $error("parity_destuffer: offered data changed before it was read");
endmodule
