// tb_cavlc_code_gen: checks the code generator on its own.
// Block statistics records are built here from random blocks (forward-scan
// arithmetic) and offered to the generator from a queue; every codeword and its state
// tag is compared with cavlc_ref_pkg, which codes the same blocks independently. The
// worked example block must give the 12 codewords of the design description in
// order. Also checks: codewords only on steps (step_en every second clock), out_valid
// one clock long, exactly one stats_pop per block, with the block's last codeword,
// and out_nout = TotalCoeff.
`timescale 1ns/1ps
module tb_cavlc_code_gen;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  logic clk = 0, rst_n = 0, step_en = 0;
  logic stats_valid, stats_pop, out_valid;
  blk_stats_t stats;
  logic [CODE_W-1:0] out_code;
  logic [LEN_W-1:0] out_len;
  out_state_e out_state;
  logic [4:0] out_nout;

  cavlc_code_gen dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  blk_stats_t recs[$];
  ref_code_t exp_q[$];
  int exp_last[$];   // 1 for the last codeword of a block
  int exp_tc[$];
  int pops = 0, blocks = 0, last_step = -1, cyc = 0, pend_last = 0;

  assign stats_valid = (recs.size() != 0);
  assign stats = stats_valid ? recs[0] : '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic blk_stats_t make_rec(input blk_t c, input bit dc, input int tbl);
    blk_stats_t r = '0;
    int n = dc ? 4 : 16;
    int s[16];
    int nz[$];
    int t1 = 0, nl = 0;
    bit stop = 0;
    for (int k = 0; k < n; k++) s[k] = dc ? c[k] : c[ZZ_REF[k]];
    for (int k = 0; k < n; k++) if (s[k] != 0) nz.push_back(k);
    r.tbl = ct_table_e'(tbl);
    r.tc  = 5'(nz.size());
    if (nz.size() > 0) r.tz = 5'(nz[nz.size() - 1] + 1 - nz.size());
    for (int j = nz.size() - 1; j >= 0; j--) begin
      int v = s[nz[j]];
      if (!stop && t1 < 3 && (v == 1 || v == -1)) begin r.t1_neg[t1] = (v < 0); t1++; end
      else begin stop = 1; r.levels[nl] = COEFF_W'(v); nl++; end
      r.runs[nz.size() - 1 - j] = 4'((j > 0) ? nz[j] - nz[j - 1] - 1 : nz[j]);
    end
    r.t1 = 2'(t1);
    return r;
  endfunction

  task automatic add_block(input blk_t c, input bit dc, input int tbl);
    ref_code_t q[$];
    blk_stats_t r;
    r = make_rec(c, dc, tbl);
    encode(c, dc, tbl, q);
    foreach (q[i]) begin
      exp_q.push_back(q[i]);
      exp_last.push_back(int'(i == q.size() - 1));
    end
    exp_tc.push_back(int'(r.tc));
    recs.push_back(r);
    blocks++;
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n) step_en <= ~step_en;
    if (rst_n && stats_pop) begin
      check(step_en, "pop only on a step");
      check(pend_last == 0, "one pop per block");
      pend_last = 1;
      pops++;
    end
    if (rst_n && out_valid) begin
      string got;
      ref_code_t e;
      got = bstr(64'(out_code), int'(out_len));
      check(cyc - last_step >= 2, "one codeword per step");
      last_step = cyc;
      if (exp_q.size() == 0) check(0, "unexpected codeword");
      else begin
        e = exp_q.pop_front();
        check(got == e.bits && int'(out_state) == e.state,
              $sformatf("got %s/%0d exp %s/%0d", got, out_state, e.bits, e.state));
        if (e.state == 1) check(out_nout == 5'(exp_tc.pop_front()), "nout");
        if (exp_last.pop_front() == 1) begin
          check(pend_last == 1, "pop with last codeword");
          pend_last = 0;
        end
      end
    end
  end
  // the pop removes the record after the edge that consumed it
  always @(negedge clk) if (rst_n && stats_pop_q) void'(recs.pop_front());
  logic stats_pop_q = 0;
  always @(posedge clk) stats_pop_q <= stats_pop;

  blk_t ex = '{1, 1, 0, 0, -2, 0, 1, 0, -4, 1, 1, 0, 1, 0, 0, 0};
  string ex_codes [12] = '{"01101", "000", "1", "00011", "111", "100", "100", "11", "10", "11", "11", "00"};

  initial begin
    blk_t c;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    add_block(ex, 0, 2);
    for (int i = 0; i < 12; i++) check(exp_q[i].bits == ex_codes[i], "reference matches the printed example");
    wait (exp_q.size() == 0);
    for (int b = 0; b < 1500; b++) begin
      bit dc;
      int dens;
      dc = ($urandom_range(0, 4) == 0);
      dens = $urandom_range(0, 6);
      for (int k = 0; k < 16; k++) begin
        c[k] = 0;
        if ((!dc || k < 4) && $urandom_range(0, 5) < dens) begin
          int m;
          m = ($urandom_range(0, 2) != 0) ? 1 : $urandom_range(2, ($urandom_range(0, 3) == 0) ? 2047 : 20);
          c[k] = ($urandom_range(0, 1) != 0) ? -m : m;
        end
      end
      add_block(c, dc, dc ? 4 : $urandom_range(0, 3));
      while (recs.size() >= 2) @(posedge clk);
    end
    wait (exp_q.size() == 0);
    repeat (4) @(posedge clk);
    check(pops == blocks, $sformatf("pops %0d blocks %0d", pops, blocks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
