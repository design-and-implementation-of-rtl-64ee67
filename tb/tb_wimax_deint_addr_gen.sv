// tb_wimax_deint_addr_gen: end-to-end test of the address generator at its
// default parameters.
//
// Runs every supported block, QPSK 96..576, 16-QAM 192..576 and 64-QAM 288
// and 576 bits, and for each one checks every (n, Kn) pair against the
// interleaver equations, that the addresses form a permutation of 0..Ncbps-1,
// that valid lasts exactly Ncbps clocks (one address per clock), and that last
// and busy behave. It also checks the reference waveform points (QPSK
// 192-bit row 1, 64-QAM 576-bit positions 35..45), that an unsupported
// mod_type/sel raises cfg_err without starting, that start and a mod_type
// change during a block are ignored, and that blocks can run back to back
// with a modulation switch. Each of these events is counted and a failure is
// recorded for any that never happened.
module tb_wimax_deint_addr_gen;
  import wimax_pkg::*;
  import tb_ref_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [1:0]  mod_type = 0;
  logic [2:0]  sel = 0;
  addr_t       kn, n;
  logic        valid, last, busy, cfg_err;
  int checks = 0, failures = 0;

  // event counters
  int n_blocks[3] = '{0, 0, 0};
  int n_cfg_err = 0, n_ignored_start = 0, n_mode_switch = 0, n_back_to_back = 0;

  wimax_deint_addr_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int bits_of(int m);
    return (m == 0) ? 2 : (m == 1) ? 4 : 6;
  endfunction

  // Capture of the most recent block, for the waveform checks.
  int last_kn[576];

  // Runs one block whose start was applied at the previous negedge.
  // On return the clock is at the negedge after the final address.
  task automatic collect(int m, int s, bit disturb, bit chain_next,
                         int next_m, int next_s);
    int ncbps = 48 * bits_of(m) * s;
    int cols  = ncbps / 16;
    int cycles = 0;
    bit seen[576];
    for (int p = 0; p < ncbps; p++) begin
      check(valid && busy, "valid");
      check(int'(n) == p, "position");
      check(int'(kn) == ref_kn(bits_of(m), cols, p), "address");
      if (int'(kn) < ncbps) begin
        check(!seen[kn], "address repeated");
        seen[kn] = 1;
      end else check(0, "address out of block");
      last_kn[p] = int'(kn);
      check(last == (p == ncbps - 1), "last");
      start = 0;
      if (disturb && p == 3) begin
        start = 1; mod_type = 2'((m + 1) % 3); sel = 3'd1;
        n_ignored_start++;
      end
      if (chain_next && p == ncbps - 1) begin
        start = 1; mod_type = 2'(next_m); sel = 3'(next_s);
      end
      cycles++;
      @(negedge clk);
    end
    check(cycles == ncbps, "one address per clock");
    n_blocks[m]++;
  endtask

  task automatic start_block(int m, int s);
    mod_type = 2'(m); sel = 3'(s); start = 1;
    @(negedge clk);
    start = 0;
  endtask

  initial begin
    int maxsel[3] = '{6, 3, 2};
    int fig_q[11]  = '{1, 17, 33, 49, 65, 81, 97, 113, 129, 145, 161};
    int fig_64[11] = '{560, 17, 33, 1, 65, 81, 49, 113, 129, 97, 161};

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!valid && !busy && !cfg_err, "idle after reset");

    // every supported block, one at a time
    for (int m = 0; m < 3; m++)
      for (int s = 1; s <= maxsel[m]; s++) begin
        start_block(m, s);
        collect(m, s, (m == 0 && s == 4), 0, 0, 0);
        check(!valid, "idle after block");
        if (m == 0 && s == 2)
          for (int p = 0; p < 11; p++) check(last_kn[12 + p] == fig_q[p], "QPSK waveform");
        if (m == 2 && s == 2)
          for (int p = 0; p < 11; p++) check(last_kn[35 + p] == fig_64[p], "64-QAM waveform");
        @(negedge clk);
      end

    // unsupported configurations
    for (int k = 0; k < 4; k++) begin
      int bad_m[4] = '{3, 1, 2, 0};
      int bad_s[4] = '{1, 4, 3, 0};
      mod_type = 2'(bad_m[k]); sel = 3'(bad_s[k]); start = 1;
      @(negedge clk);
      start = 0;
      check(cfg_err && !valid, "cfg_err on unsupported size");
      if (cfg_err) n_cfg_err++;
      @(negedge clk);
      check(!cfg_err && !valid, "cfg_err is one cycle");
    end

    // back-to-back blocks with a modulation switch at each boundary
    start_block(0, 1);
    collect(0, 1, 0, 1, 2, 1);
    n_back_to_back++; n_mode_switch++;
    collect(2, 1, 0, 1, 1, 2);
    n_back_to_back++; n_mode_switch++;
    collect(1, 2, 0, 0, 0, 0);
    check(!valid, "idle after chain");

    check(n_blocks[0] > 0, "QPSK blocks run");
    check(n_blocks[1] > 0, "16-QAM blocks run");
    check(n_blocks[2] > 0, "64-QAM blocks run");
    check(n_cfg_err > 0, "configuration rejected");
    check(n_ignored_start > 0, "start during block ignored");
    check(n_mode_switch > 0 && n_back_to_back > 0, "back-to-back mode switch");
    $display("blocks QPSK=%0d 16QAM=%0d 64QAM=%0d cfg_err=%0d ignored_start=%0d switches=%0d",
             n_blocks[0], n_blocks[1], n_blocks[2], n_cfg_err, n_ignored_start, n_mode_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
