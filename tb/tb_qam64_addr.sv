// tb_qam64_addr: checks the 64-QAM address unit against the interleaver
// equations (s = 3) for the supported 64-QAM column counts 18 and 36, every
// row and column, and against the reference waveform of a 576-bit block at
// positions 35..45 (560, 17, 33, 1, 65, 81, 49, 113, 129, 97, 161). The mod-3
// residues the unit expects are computed here with the % operator.
module tb_qam64_addr;
  import wimax_pkg::*;
  import tb_ref_pkg::*;

  col_t        i;
  row_t        j;
  logic [1:0]  i_mod3, j_mod3;
  addr_t       kn;
  int checks = 0, failures = 0;

  qam64_addr dut (.i(i), .j(j), .i_mod3(i_mod3), .j_mod3(j_mod3), .kn(kn));

  task automatic apply(int ii, int jj);
    i = col_t'(ii); j = row_t'(jj);
    i_mod3 = 2'(ii % 3); j_mod3 = 2'(jj % 3);
    #1;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fig[11] = '{560, 17, 33, 1, 65, 81, 49, 113, 129, 97, 161};
    for (int cols = 18; cols <= 36; cols += 18)
      for (int jj = 0; jj < 16; jj++)
        for (int ii = 0; ii < cols; ii++) begin
          apply(ii, jj);
          checks++;
          if (int'(kn) != ref_kn(6, cols, jj * cols + ii)) begin
            failures++;
            if (failures < 10) $display("FAIL cols=%0d i=%0d j=%0d kn=%0d exp=%0d",
                                        cols, ii, jj, kn, ref_kn(6, cols, jj * cols + ii));
          end
        end
    for (int p = 35; p <= 45; p++) begin
      apply(p % 36, p / 36);
      checks++;
      if (int'(kn) != fig[p - 35]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
