// qpsk_addr: deinterleaver address for QPSK.
//
// With two bits per symbol the second interleaver permutation is the identity,
// so the bit received at row j, column i of the D-row block came from original
// position Kn = D*i + j. D is a power of two, so the product is a shift and the
// unit is a wire concatenation plus an adder at most. Combinational; follows
// the QPSK address equation of the design.
module qpsk_addr
  import wimax_pkg::*;
(
  input  col_t  i,
  input  row_t  j,
  output addr_t kn
);

  assign kn = addr_t'(i * D) + addr_t'(j);

endmodule
