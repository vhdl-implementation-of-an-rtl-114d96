// tb_cavlc_scan: checks the CAVLC counters.
//
// Feeds blocks one coefficient per clock in reverse scan order, back to back, and
// compares the record with statistics computed here from the forward scan sequence
// (TotalCoeff, TrailingOnes and their signs, TotalZeros, levels and runs). The block
// of the design description's example is checked against its printed values
// (TotalCoeff 8, TrailingOnes 3, TotalZeros 4, levels 1 -4 -2 1 1, runs 1 0 0 3).
// Also checks the input stage length: done comes one clock after the last of 16
// (4x4) or 4 (2x2) coefficient cycles.
`timescale 1ns/1ps
module tb_cavlc_scan;
  import cavlc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  coeff_t in_coeff = '0;
  ct_table_e in_tbl = TBL_NC0;
  logic done;
  blk_stats_t stats;

  cavlc_scan dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // s: forward scan order, n coefficients
  task automatic run_block(input int s[16], input int n, input ct_table_e tbl, input bit gap);
    int tc = 0, t1 = 0, tz = 0, last = -1, nl = 0;
    int lev[16], run[16], neg[3];
    int prev;
    int start;
    for (int k = 0; k < n; k++) if (s[k] != 0) begin tc++; last = k; end
    for (int k = 0; k < last; k++) if (s[k] == 0) tz++;
    begin
      bit stop = 0;
      int idx = 0;
      for (int k = n - 1; k >= 0; k--) if (s[k] != 0) begin
        if (!stop && t1 < 3 && (s[k] == 1 || s[k] == -1)) begin neg[t1] = int'(s[k] < 0); t1++; end
        else begin stop = 1; lev[nl] = s[k]; nl++; end
        // run before: zeros below k down to the next non-zero
        prev = k - 1;
        while (prev >= 0 && s[prev] == 0) prev--;
        run[idx] = k - 1 - prev;
        idx++;
      end
    end
    if (gap) @(posedge clk);
    start = int'($time / 10);
    for (int r = 0; r < n; r++) begin
      in_valid <= 1; in_first <= (r == 0); in_last <= (r == n - 1);
      in_coeff <= coeff_t'(s[n - 1 - r]); in_tbl <= tbl;
      @(posedge clk);
    end
    in_valid <= 0; in_first <= 0; in_last <= 0;
    #1;
    check(done, "done one clock after the last coefficient");
    check(int'($time / 10) - start == n, $sformatf("input stage of %0d clocks", n));
    check(stats.tc == 5'(tc), $sformatf("tc %0d exp %0d", stats.tc, tc));
    check(stats.t1 == 2'(t1), $sformatf("t1 %0d exp %0d", stats.t1, t1));
    check(stats.tbl == tbl, "table");
    if (tc > 0) check(stats.tz == 5'(tz), $sformatf("tz %0d exp %0d", stats.tz, tz));
    for (int j = 0; j < t1; j++) check(stats.t1_neg[j] == neg[j][0], "t1 sign");
    for (int j = 0; j < nl; j++) check(stats.levels[j] == COEFF_W'(lev[j]), $sformatf("level %0d", j));
    for (int j = 0; j < tc - 1; j++) check(stats.runs[j] == 4'(run[j]), $sformatf("run %0d: %0d exp %0d", j, stats.runs[j], run[j]));
  endtask

  int ex[16] = '{1, 1, -2, -4, 0, 0, 0, 1, 1, 1, 0, 1, 0, 0, 0, 0};
  int s[16];

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_block(ex, 16, TBL_NC4, 0);
    check(stats.tc == 8 && stats.t1 == 3 && stats.tz == 4, "example counters");
    check(coeff_t'(stats.levels[0]) == 1 && coeff_t'(stats.levels[1]) == -4 && coeff_t'(stats.levels[2]) == -2 &&
          coeff_t'(stats.levels[3]) == 1 && coeff_t'(stats.levels[4]) == 1, "example levels");
    check(stats.runs[0] == 1 && stats.runs[1] == 0 && stats.runs[2] == 0 && stats.runs[3] == 3,
          "example runs");
    for (int b = 0; b < 3000; b++) begin
      int n, dens;
      n = ($urandom_range(0, 3) == 0) ? 4 : 16;
      dens = $urandom_range(0, 6);
      for (int k = 0; k < 16; k++) begin
        s[k] = 0;
        if (k < n && $urandom_range(0, 5) < dens) begin
          int m;
          m = ($urandom_range(0, 2) != 0) ? 1 : $urandom_range(2, 2047);
          s[k] = ($urandom_range(0, 1) != 0) ? -m : m;
        end
      end
      run_block(s, n, (n == 4) ? TBL_CHDC : ct_table_e'($urandom_range(0, 3)), b[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
