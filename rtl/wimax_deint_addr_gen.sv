// wimax_deint_addr_gen: address generator for the 802.16e (WiMAX) block
// deinterleaver, for QPSK, 16-QAM and 64-QAM and every supported block size.
//
// The received block is a matrix of D = 16 rows and Ncbps/16 columns, filled
// row by row. For each received bit, at linear position n, the generator gives
// Kn, the position the bit had before interleaving, so writing bit n to memory
// address Kn (or reading address Kn at step n) undoes the interleaver. Kn comes
// from closed-form, per-modulation relations between row and column indices;
// no floor or modulo of Ncbps is computed and no address table is stored.
//
// Structure: ncbps_decoder turns {mod_type, sel} into the column count;
// addr_counter (an FSM) walks i and j and keeps their residues mod 3;
// qpsk_addr, qam16_addr and qam64_addr compute the three candidate addresses
// in parallel and a multiplexer picks the one for the latched mod_type.
//
// Interface and timing: hold mod_type and sel and pulse start for one clock
// while busy is low, or in the cycle that carries last to chain blocks with no
// idle cycle; start at other times during a block is ignored. If the pair is not a supported size, cfg_err rises for
// one cycle and nothing starts. Otherwise, from the next clock, valid is high
// for exactly Ncbps cycles with one (n, Kn) pair per cycle; last marks the
// final pair. mod_type and sel are latched at start. Synchronous, active-low
// reset. The handshake, the latching and the reset are this design's choices.
module wimax_deint_addr_gen
  import wimax_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [1:0]  mod_type,
  input  logic [2:0]  sel,
  output addr_t       kn,
  output addr_t       n,
  output logic        valid,
  output logic        last,
  output logic        busy,
  output logic        cfg_err
);

  logic [ADDR_W:0] ncbps_unused;
  col_t        cols_m1;
  logic        cfg_ok;
  logic        accept, go;
  mod_t        mod_q;
  col_t        i;
  row_t        j;
  logic [1:0]  i_mod3, j_mod3;
  addr_t       kn_qpsk, kn_16qam, kn_64qam;

  ncbps_decoder u_dec (
    .mod_type (mod_t'(mod_type)),
    .sel      (sel),
    .ncbps    (ncbps_unused),
    .cols_m1  (cols_m1),
    .cfg_ok   (cfg_ok)
  );

  assign accept = start && (!valid || last);   // idle, or chaining after last
  assign go     = accept && cfg_ok;
  assign busy = valid;

  addr_counter u_cnt (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (go),
    .cols_m1 (cols_m1),
    .i       (i),
    .j       (j),
    .i_mod3  (i_mod3),
    .j_mod3  (j_mod3),
    .n       (n),
    .valid   (valid),
    .last    (last)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mod_q   <= MOD_QPSK;
      cfg_err <= 1'b0;
    end else begin
      cfg_err <= accept && !cfg_ok;
      if (go) mod_q <= mod_t'(mod_type);
    end
  end

  qpsk_addr  u_qpsk  (.i(i), .j(j), .kn(kn_qpsk));
  qam16_addr u_16qam (.i(i), .j(j), .kn(kn_16qam));
  qam64_addr u_64qam (.i(i), .j(j), .i_mod3(i_mod3), .j_mod3(j_mod3), .kn(kn_64qam));

  always_comb begin
    unique case (mod_q)
      MOD_16QAM: kn = kn_16qam;
      MOD_64QAM: kn = kn_64qam;
      default:   kn = kn_qpsk;
    endcase
  end

endmodule
