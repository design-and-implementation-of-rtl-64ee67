// tb_qpsk_addr: checks the QPSK address unit against the interleaver
// equations for every supported QPSK column count (6..36 in steps of 6) and
// every row/column, and against the reference waveform row j = 1 of a
// 12-column block (1, 17, 33, ..., 161).
module tb_qpsk_addr;
  import wimax_pkg::*;
  import tb_ref_pkg::*;

  col_t  i;
  row_t  j;
  addr_t kn;
  int checks = 0, failures = 0;

  qpsk_addr dut (.i(i), .j(j), .kn(kn));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fig[11] = '{1, 17, 33, 49, 65, 81, 97, 113, 129, 145, 161};
    for (int cols = 6; cols <= 36; cols += 6)
      for (int jj = 0; jj < 16; jj++)
        for (int ii = 0; ii < cols; ii++) begin
          i = col_t'(ii); j = row_t'(jj); #1;
          checks++;
          if (int'(kn) != ref_kn(2, cols, jj * cols + ii)) begin
            failures++;
            if (failures < 10) $display("FAIL cols=%0d i=%0d j=%0d kn=%0d exp=%0d",
                                        cols, ii, jj, kn, ref_kn(2, cols, jj * cols + ii));
          end
        end
    for (int ii = 0; ii < 11; ii++) begin
      i = col_t'(ii); j = 1; #1;
      checks++;
      if (int'(kn) != fig[ii]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
