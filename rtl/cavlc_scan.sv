// cavlc_scan: the CAVLC calculation counters (input stage).
//
// Takes one coefficient per clock in reverse scan order (highest frequency first) and
// updates, in that same cycle, every statistic the code generator needs, so that each
// coefficient is read once:
//   TotalCoeff counter   - non-zero coefficients
//   TrailingOnes counter - leading +-1 values in reverse order, at most 3, stopped by the
//                          first other non-zero value
//   T1 sign register     - sign of each trailing one (1 = negative)
//   level register file  - every other non-zero value, in coding order
//   TotalZeros counter   - zeros seen after the first non-zero coefficient
//   run_before file      - for each non-zero coefficient, the zeros met after it
//                          before the next non-zero one
// in_first restarts the counters with the current coefficient; in_tbl is captured with
// it. The cycle after the coefficient flagged in_last, done is high for one cycle and
// stats holds the block's record; stats stays valid until the next block's first
// coefficient has been taken. A 4x4 block takes 16 cycles, a 2x2 block 4, the input
// stage length given in the design description. The counter set follows the
// description; the exact update rules are this design's.
module cavlc_scan
  import cavlc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_first,
  input  logic       in_last,
  input  coeff_t     in_coeff,
  input  ct_table_e  in_tbl,
  output logic       done,
  output blk_stats_t stats
);
  blk_stats_t cur, nxt;
  logic       seen_nz, seen_nz_n;   // a non-zero coefficient has been met
  logic       t1_done, t1_done_n;   // trailing-one counting has stopped
  logic [4:0] nlev, nlev_n;         // entries in the level file

  always_comb begin
    nxt       = cur;
    seen_nz_n = seen_nz;
    t1_done_n = t1_done;
    nlev_n    = nlev;
    if (in_first) begin
      nxt       = '0;
      nxt.tbl   = in_tbl;
      seen_nz_n = 1'b0;
      t1_done_n = 1'b0;
      nlev_n    = '0;
    end
    if (in_coeff != '0) begin
      if (!t1_done_n && (in_coeff == coeff_t'(1) || in_coeff == coeff_t'(-1)) && nxt.t1 != 2'd3) begin
        nxt.t1_neg[nxt.t1] = in_coeff[COEFF_W-1];
        nxt.t1             = nxt.t1 + 2'd1;
      end else begin
        t1_done_n          = 1'b1;
        nxt.levels[nlev_n[3:0]] = in_coeff;
        nlev_n             = nlev_n + 5'd1;
      end
      nxt.runs[nxt.tc[3:0]] = 4'd0;
      nxt.tc                = nxt.tc + 5'd1;
      seen_nz_n             = 1'b1;
    end else if (seen_nz_n) begin
      nxt.tz = nxt.tz + 5'd1;
      nxt.runs[nxt.tc[3:0] - 4'd1] = nxt.runs[nxt.tc[3:0] - 4'd1] + 4'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur     <= '0;
      seen_nz <= 1'b0;
      t1_done <= 1'b0;
      nlev    <= '0;
      done    <= 1'b0;
    end else begin
      done <= in_valid && in_last;
      if (in_valid) begin
        cur     <= nxt;
        seen_nz <= seen_nz_n;
        t1_done <= t1_done_n;
        nlev    <= nlev_n;
      end
    end
  end

  assign stats = cur;
endmodule
