// siren_gen: the ringing sound of a called phone. A square wave alternates
// between 400 Hz and 700 Hz, switching frequency SWITCH_HZ times a second,
// while en is high; the output is low while en is low. The two
// frequencies follow the document; the switching rate (8 per second, "fast
// alternation") is this design's choice. Frequencies are derived from
// CLK_HZ, the system clock (27.5 MHz, eleven times the 2.5 Mbit/s
// transceiver limit).
module siren_gen #(
  parameter int unsigned CLK_HZ    = 27_500_000,
  parameter int unsigned SWITCH_HZ = 8,
  parameter int unsigned LOW_HZ    = 400,
  parameter int unsigned HIGH_HZ   = 700
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic tone
);
  localparam int unsigned HALF_LOW  = CLK_HZ / (2 * LOW_HZ);
  localparam int unsigned HALF_HIGH = CLK_HZ / (2 * HIGH_HZ);
  localparam int unsigned SW_CYC    = CLK_HZ / SWITCH_HZ;
  localparam int unsigned W  = $clog2(HALF_LOW + 1);
  localparam int unsigned SWW = $clog2(SW_CYC + 1);

  logic [SWW-1:0] sw_cnt;
  logic           high_sel;

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      sw_cnt   <= '0;
      high_sel <= 1'b0;
    end else if (sw_cnt == SWW'(SW_CYC - 1)) begin
      sw_cnt   <= '0;
      high_sel <= !high_sel;
    end else begin
      sw_cnt <= sw_cnt + 1'b1;
    end
  end

  tone_osc #(.W(W)) u_osc (
    .clk, .rst, .en,
    .half_period(high_sel ? W'(HALF_HIGH) : W'(HALF_LOW)),
    .tone
  );
endmodule
