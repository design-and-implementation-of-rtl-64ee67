// qam16_addr: deinterleaver address for 16-QAM.
//
// 16-QAM swaps bit significance between neighbouring columns on odd rows:
//   Kn = D*i     + j   for even j,
//   Kn = D*(i+1) + j   for odd j and even i,
//   Kn = D*(i-1) + j   for odd j and odd i.
// i mod 2 and j mod 2 are the index LSBs, so the case split reduces to
// flipping the LSB of i when j is odd: column i XOR j[0]. The column count of
// a 16-QAM block is even, so i+1 never leaves the block. Combinational; the
// equation follows the design's 16-QAM address relation.
module qam16_addr
  import wimax_pkg::*;
(
  input  col_t  i,
  input  row_t  j,
  output addr_t kn
);

  col_t col;

  always_comb begin
    col = i;
    if (j[0]) col[0] = ~i[0];      // odd row: i even -> i+1, i odd -> i-1
    kn = addr_t'(col * D) + addr_t'(j);
  end

endmodule
