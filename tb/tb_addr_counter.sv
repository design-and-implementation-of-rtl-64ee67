// tb_addr_counter: runs the row/column FSM for several column counts and
// checks, every clock, i, j, their mod-3 residues, the linear position n and
// last against a software counter; checks that a block of 16*(a+1) positions
// takes exactly that many clocks, that start is ignored while a block runs,
// and that a new block can follow directly after last.
module tb_addr_counter;
  import wimax_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0;
  col_t        cols_m1 = '0;
  col_t        i;
  row_t        j;
  logic [1:0]  i_mod3, j_mod3;
  addr_t       n;
  logic        valid, last;
  int checks = 0, failures = 0;

  addr_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // Run one block and check every position.
  task automatic run_block(int a, bit poke_start);
    int cycles = 0;
    int cols = a + 1;
    @(negedge clk);
    cols_m1 = col_t'(a); start = 1;
    @(negedge clk);
    start = 0;
    for (int p = 0; p < 16 * cols; p++) begin
      check(valid, "valid");
      check(int'(i) == p % cols && int'(j) == p / cols, "i/j");
      check(int'(i_mod3) == (p % cols) % 3 && int'(j_mod3) == (p / cols) % 3, "mod3");
      check(int'(n) == p, "n");
      check(last == (p == 16 * cols - 1), "last");
      if (poke_start && p == 5) begin
        start = 1; cols_m1 = col_t'(2);   // must be ignored
      end else begin
        start = 0;
      end
      cycles++;
      @(negedge clk);
    end
    start = 0;
    check(!valid, "idle after block");
    check(cycles == 16 * cols, "cycle count");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!valid, "idle after reset");
    run_block(11, 0);
    run_block(35, 1);
    run_block(17, 0);
    run_block(5, 0);
    // back-to-back: start in the cycle after last
    @(negedge clk);
    cols_m1 = 2; start = 1;
    @(negedge clk);
    start = 0;
    repeat (47) @(negedge clk);
    check(last, "last of short block");
    start = 1; cols_m1 = 3;
    @(negedge clk);
    start = 0;
    check(valid && n == 0 && i == 0 && j == 0, "restart after last");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
