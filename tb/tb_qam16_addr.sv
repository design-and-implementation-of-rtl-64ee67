// tb_qam16_addr: checks the 16-QAM address unit against the interleaver
// equations (s = 2) for column counts 12, 24, 36 (the supported 16-QAM blocks)
// and 18, and against the reference waveform row j = 1 of an 18-column block
// (17, 1, 49, 33, 81, 65, 113, 97, 145, 129, 177).
module tb_qam16_addr;
  import wimax_pkg::*;
  import tb_ref_pkg::*;

  col_t  i;
  row_t  j;
  addr_t kn;
  int checks = 0, failures = 0;

  qam16_addr dut (.i(i), .j(j), .kn(kn));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fig[11] = '{17, 1, 49, 33, 81, 65, 113, 97, 145, 129, 177};
    int colset[4] = '{12, 18, 24, 36};
    foreach (colset[c])
      for (int jj = 0; jj < 16; jj++)
        for (int ii = 0; ii < colset[c]; ii++) begin
          i = col_t'(ii); j = row_t'(jj); #1;
          checks++;
          if (int'(kn) != ref_kn(4, colset[c], jj * colset[c] + ii)) begin
            failures++;
            if (failures < 10) $display("FAIL cols=%0d i=%0d j=%0d kn=%0d exp=%0d",
                                        colset[c], ii, jj, kn,
                                        ref_kn(4, colset[c], jj * colset[c] + ii));
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
