// tb_ncbps_decoder: applies every mod_type/sel pair and checks the block size,
// last column index and validity flag against a table written out here from
// the 802.16e slot rule (48 data subcarriers per slot), including the
// reference-waveform points QPSK sel 2 -> a = 11 and 64-QAM sel 2 -> 576 bits.
module tb_ncbps_decoder;
  import wimax_pkg::*;

  logic [1:0]       mod_type;
  logic [2:0]       sel;
  logic [ADDR_W:0]  ncbps;
  col_t             cols_m1;
  logic             cfg_ok;
  int checks = 0, failures = 0;

  ncbps_decoder dut (.mod_type(mod_t'(mod_type)), .sel(sel), .ncbps(ncbps),
                     .cols_m1(cols_m1), .cfg_ok(cfg_ok));

  // expected Ncbps per [mod_type][sel], 0 = unsupported
  int exp_ncbps[4][8] = '{
    '{0,  96, 192, 288, 384, 480, 576, 0},
    '{0, 192, 384, 576,   0,   0,   0, 0},
    '{0, 288, 576,   0,   0,   0,   0, 0},
    '{0,   0,   0,   0,   0,   0,   0, 0}
  };

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++)
      for (int s = 0; s < 8; s++) begin
        mod_type = 2'(m); sel = 3'(s); #1;
        checks++;
        if (exp_ncbps[m][s] == 0) begin
          if (cfg_ok) failures++;
        end else if (!cfg_ok || int'(ncbps) != exp_ncbps[m][s] ||
                     int'(cols_m1) != exp_ncbps[m][s] / 16 - 1) begin
          failures++;
          $display("FAIL mod=%0d sel=%0d ncbps=%0d a=%0d ok=%0b", m, s, ncbps, cols_m1, cfg_ok);
        end
      end
    mod_type = 2'b00; sel = 3'b010; #1;
    checks++; if (cols_m1 != 11) failures++;
    mod_type = 2'b10; sel = 3'b010; #1;
    checks++; if (ncbps != 576 || cols_m1 != 35) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
