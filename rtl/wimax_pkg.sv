// wimax_pkg: constants and types shared by the WiMAX deinterleaver address
// generator.
//
// The deinterleaver block is seen as a matrix of D rows (fixed at 16 for every
// block size) and Ncbps/D columns. Addresses are at most 575 (the largest block
// holds 576 coded bits), so ADDR_W is 10 bits and COL_W 6 bits (up to 36
// columns). The row count of 16 follows the 802.16e interleaver; the widths and
// the encoding of 2'b11 as an unused mod_type are this design's choices.
package wimax_pkg;

  localparam int unsigned D      = 16;          // rows of the block matrix
  localparam int unsigned ROW_W  = $clog2(D);   // row index width
  localparam int unsigned ADDR_W = 10;          // address / position width
  localparam int unsigned COL_W  = 6;           // column index width

  // Modulation select, as applied on the mod_type input.
  typedef enum logic [1:0] {
    MOD_QPSK  = 2'b00,
    MOD_16QAM = 2'b01,
    MOD_64QAM = 2'b10,
    MOD_NONE  = 2'b11
  } mod_t;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [COL_W-1:0]  col_t;
  typedef logic [ROW_W-1:0]  row_t;

endpackage
