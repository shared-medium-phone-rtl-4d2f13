// voice_buffer: turns bursts of voice frames into a steady sample stream
// and mixes the frames of a conference.
//
// A frame is a burst of SAMPLES signed 8-bit samples with we high. Every
// frame that arrives is added, sample position by sample position, into a
// running sum, and the frames are counted. A second store, the ready
// frame, is played out one sample per AC97 ready pulse: after the edge
// with ready high, dout holds the next sample. When the last sample of the
// ready frame has been played, the running sum becomes the new ready
// frame, divided by the power of two nearest to the frame count (ties go
// up, so 3 frames are divided by 4) with an arithmetic shift, and the sum
// restarts. With no frame in a period the ready frame is silence.
//
// The running sum, the ready frame and the power-of-two division follow
// the document. The signed sample format, the saturation of the result to
// 8 bits (dividing 5 frames by 4 can exceed the range), the limit of
// MAX_FRAMES frames per period (later ones are ignored) and carrying a
// frame that is still arriving into the new sum are this design's choices.
module voice_buffer
  import phone_pkg::*;
#(
  parameter int unsigned SAMPLES    = 5,
  parameter int unsigned MAX_FRAMES = 15
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we,
  input  logic [DATA_W-1:0] din,
  input  logic              ready,
  output logic [DATA_W-1:0] dout
);
  localparam int unsigned CW = $clog2(MAX_FRAMES + 1);
  localparam int unsigned SUM_W = DATA_W + CW;
  localparam int unsigned PW = (SAMPLES > 1) ? $clog2(SAMPLES) : 1;

  logic signed [SUM_W-1:0]  sum   [SAMPLES];
  logic signed [DATA_W-1:0] ready_frame [SAMPLES];
  logic [CW-1:0]            count;
  logic [PW-1:0]            wr_pos, rd_pos;
  logic                     we_q, accept;

  // shift for the power of two nearest to n (ties up)
  function automatic int unsigned nearest_shift(logic [CW-1:0] n);
    int unsigned p = 0;
    for (int i = 0; i < CW; i++) if (n[i]) p = i;
    if (n == '0) return 0;
    if (2 * int'(n) >= 3 * (1 << p)) return p + 1;
    return p;
  endfunction

  function automatic logic signed [DATA_W-1:0] saturate(logic signed [SUM_W-1:0] v);
    if (v > SUM_W'(2 ** (DATA_W - 1) - 1))      return {1'b0, {(DATA_W-1){1'b1}}};
    if (v < -SUM_W'(2 ** (DATA_W - 1)))         return {1'b1, {(DATA_W-1){1'b0}}};
    return v[DATA_W-1:0];
  endfunction

  logic frame_start, transfer;
  assign frame_start = we && !we_q;
  assign transfer    = ready && (rd_pos == PW'(SAMPLES - 1));

  // does the sample on din go into the sum?
  logic take;
  assign take = we && (frame_start ? (count < CW'(MAX_FRAMES) || transfer) : accept);

  logic [PW-1:0] pos;
  assign pos = frame_start ? '0 : wr_pos;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < SAMPLES; i++) begin
        sum[i]         <= '0;
        ready_frame[i] <= '0;
      end
      count  <= '0;
      wr_pos <= '0;
      rd_pos <= '0;
      we_q   <= 1'b0;
      accept <= 1'b0;
      dout   <= '0;
    end else begin
      we_q <= we;
      if (we) begin
        wr_pos <= (pos == PW'(SAMPLES - 1)) ? '0 : pos + 1'b1;
        if (frame_start) accept <= take;
      end

      if (ready) begin
        dout   <= ready_frame[rd_pos];
        rd_pos <= transfer ? '0 : rd_pos + 1'b1;
      end

      if (transfer) begin
        for (int i = 0; i < SAMPLES; i++) begin
          ready_frame[i] <= saturate(sum[i] >>> nearest_shift(count));
          sum[i]         <= (take && pos == PW'(i)) ? SUM_W'(signed'(din)) : '0;
        end
        count <= (take && (frame_start || accept)) ? CW'(1) : '0;
      end else if (take) begin
        sum[pos] <= sum[pos] + SUM_W'(signed'(din));
        if (frame_start) count <= count + 1'b1;
      end
    end
  end
endmodule
