// ringback_gen: the "I'm calling" sound heard by a caller, following the
// North American ringback tone: a 440 Hz and a 480 Hz square wave combined
// with OR, switched on for ON_S seconds and off for OFF_S seconds (2 s on,
// 4 s off). The cadence starts with the on phase when en rises; the output
// is low while en is low. Tones, the OR and the cadence follow the
// document; square waves are this design's choice. CLK_HZ is the system
// clock.
module ringback_gen #(
  parameter int unsigned CLK_HZ = 27_500_000,
  parameter int unsigned ON_S   = 2,
  parameter int unsigned OFF_S  = 4,
  parameter int unsigned F1_HZ  = 440,
  parameter int unsigned F2_HZ  = 480
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic tone
);
  localparam int unsigned HALF1  = CLK_HZ / (2 * F1_HZ);
  localparam int unsigned HALF2  = CLK_HZ / (2 * F2_HZ);
  localparam longint unsigned ON_CYC  = longint'(CLK_HZ) * longint'(ON_S);
  localparam longint unsigned PER_CYC = longint'(CLK_HZ) * (longint'(ON_S) + longint'(OFF_S));
  localparam int unsigned W  = $clog2(HALF1 + 1);
  localparam int unsigned CW = $clog2(PER_CYC + 1);

  logic [CW-1:0] cad_cnt;
  logic          t1, t2, on;

  always_ff @(posedge clk) begin
    if (rst || !en)                     cad_cnt <= '0;
    else if (cad_cnt == CW'(PER_CYC - 1)) cad_cnt <= '0;
    else                                cad_cnt <= cad_cnt + 1'b1;
  end

  assign on = en && (cad_cnt < CW'(ON_CYC));

  tone_osc #(.W(W)) u_osc1 (.clk, .rst, .en(on), .half_period(W'(HALF1)), .tone(t1));
  tone_osc #(.W(W)) u_osc2 (.clk, .rst, .en(on), .half_period(W'(HALF2)), .tone(t2));

  assign tone = t1 | t2;
endmodule
