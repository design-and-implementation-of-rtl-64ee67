// ncbps_decoder: turns the modulation type and the 3-bit block-size select into
// the block length Ncbps and the last column index of the D-row block matrix.
//
// Each 802.16e slot carries 48 data subcarriers, so a block of sel slots holds
// Ncbps = 48 * bits_per_symbol * sel coded bits, and with D = 16 rows the
// matrix has 3 * bits_per_symbol * sel columns (6*sel for QPSK, 12*sel for
// 16-QAM, 18*sel for 64-QAM). Supported selects are those that keep the block
// at or below 576 bits: QPSK 1..6, 16-QAM 1..3, 64-QAM 1..2; cfg_ok is low for
// any other combination and for mod_type 2'b11.
//
// Purely combinational. The select-to-size rule comes from the 802.16e
// standard, not from the source description, which only shows a 3-bit sel.
module ncbps_decoder
  import wimax_pkg::*;
(
  input  mod_t                mod_type,
  input  logic [2:0]          sel,
  output logic [ADDR_W:0]     ncbps,
  output col_t                cols_m1,
  output logic                cfg_ok
);

  logic [2:0] max_sel;
  logic [4:0] cols_per_slot;   // columns contributed by one slot
  logic [COL_W:0] cols;

  always_comb begin
    unique case (mod_type)
      MOD_QPSK:  begin cols_per_slot = 5'd6;  max_sel = 3'd6; end
      MOD_16QAM: begin cols_per_slot = 5'd12; max_sel = 3'd3; end
      MOD_64QAM: begin cols_per_slot = 5'd18; max_sel = 3'd2; end
      default:   begin cols_per_slot = 5'd0;  max_sel = 3'd0; end
    endcase
    cfg_ok  = (sel != 3'd0) && (sel <= max_sel);
    cols    = cfg_ok ? (COL_W+1)'(cols_per_slot * sel) : '0;
    cols_m1 = cfg_ok ? col_t'(cols - 1'b1) : '0;
    ncbps   = (ADDR_W+1)'(cols * D);
  end

endmodule
