// tone_osc: square-wave oscillator. The output toggles every half_period
// clock cycles while en is high, and is held low while en is low. A change
// of half_period takes effect at the next toggle. Helper of the siren and
// ringback generators.
module tone_osc #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] half_period,
  output logic         tone
);
  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      cnt  <= '0;
      tone <= 1'b0;
    end else if (cnt >= half_period - 1'b1) begin
      cnt  <= '0;
      tone <= !tone;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
