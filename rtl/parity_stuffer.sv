// parity_stuffer: adds six even-parity bits to every byte.
//
// The byte is viewed as a 2x4 grid, bits 0..3 on the first row and bits
// 4..7 on the second. Bit 8 is the parity of row 0, bit 9 the parity of
// row 1, and bits 10..13 the parities of the four columns (bit i and bit
// i+4). With these bits every row and every column of the 3x5 grid holds
// an even number of ones, so the receiver can locate and flip any single
// wrong data bit. The grid layout and bit numbering follow the document;
// so does the one-cycle delay of WE, which keeps the block and its WE
// aligned after the registered encoding.
//
// Timing: dout and we_out are registered: a byte presented with we_in at
// edge n appears encoded, with we_out high, after edge n.
module parity_stuffer
  import phone_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               we_in,
  input  logic [DATA_W-1:0]  din,
  output logic               we_out,
  output logic [BLOCK_W-1:0] dout
);
  logic [1:0] row_par;
  logic [3:0] col_par;

  always_comb begin
    row_par[0] = ^din[3:0];
    row_par[1] = ^din[7:4];
    for (int c = 0; c < 4; c++) col_par[c] = din[c] ^ din[c+4];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      we_out <= 1'b0;
      dout   <= '0;
    end else begin
      we_out <= we_in;
      dout   <= {col_par, row_par, din};
    end
  end
endmodule
