// qam64_addr: deinterleaver address for 64-QAM.
//
// 64-QAM rotates bit significance over groups of three columns, by one step per
// row. The source column of the bit at row j, column i is
//   c = i - i%3 + (i%3 + j%3) % 3,   Kn = D*c + j,
// which inverts the two-step 802.16e interleaver permutation with s = 3. It is
// written as a column offset chosen from i mod 3 and j mod 3 (supplied by the
// row/column FSM, so no divider is built):
//   j%3 = 0: +0
//   j%3 = 1: +1, +1, -2  for i%3 = 0, 1, 2
//   j%3 = 2: +2, -1, -1  for i%3 = 0, 1, 2
// Combinational. The closed form is derived from the interleaver equations and
// reproduces the reference 64-QAM waveform values.
module qam64_addr
  import wimax_pkg::*;
(
  input  col_t        i,
  input  row_t        j,
  input  logic [1:0]  i_mod3,
  input  logic [1:0]  j_mod3,
  output addr_t       kn
);

  logic signed [2:0] offset;
  col_t col;

  always_comb begin
    unique case ({j_mod3, i_mod3})
      4'b01_00, 4'b01_01: offset = 3'sd1;
      4'b01_10:           offset = -3'sd2;
      4'b10_00:           offset = 3'sd2;
      4'b10_01, 4'b10_10: offset = -3'sd1;
      default:            offset = 3'sd0;
    endcase
    col = i + col_t'(offset);   // sign-extended, wraps modulo 2**COL_W
    kn  = addr_t'(col * D) + addr_t'(j);
  end

endmodule
