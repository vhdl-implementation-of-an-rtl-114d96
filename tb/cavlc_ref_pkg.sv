// cavlc_ref_pkg: behavioural CAVLC reference encoder for the testbenches.
//
// encode() takes one block in raster order and returns its codewords as strings of
// '0'/'1' characters, each tagged with the element it codes. It works on the forward
// zig-zag sequence with plain loops (find the last non-zero, count trailing ones
// backwards, compute runs as gaps between non-zero positions), a different route
// from the single reverse pass of the hardware. The coeff_token, total_zeros and
// run_before code tables are taken from cavlc_pkg; those tables are checked on their
// own against the printed excerpts and for prefix-freeness by the table testbenches.
package cavlc_ref_pkg;
  import cavlc_pkg::*;

  typedef struct {
    string bits;
    int    state;
  } ref_code_t;

  typedef int blk_t [16];

  localparam int ZZ_REF [16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};

  function automatic string bstr(input longint unsigned val, input int len);
    string s = "";
    for (int i = len - 1; i >= 0; i--) s = {s, (((val >> i) & 64'd1) != 0) ? "1" : "0"};
    return s;
  endfunction

  function automatic string zeros(input int n);
    string s = "";
    for (int i = 0; i < n; i++) s = {s, "0"};
    return s;
  endfunction

  // nC table from the neighbour counts
  function automatic int ref_table(input int nu, input int nl, input bit ua, input bit la,
                                   input bit dc);
    int nc;
    if (dc) return 4;
    if (ua && la) nc = (nu + nl + 1) / 2;
    else if (ua)  nc = nu;
    else if (la)  nc = nl;
    else          nc = 0;
    if (nc < 2) return 0;
    if (nc < 4) return 1;
    if (nc < 8) return 2;
    return 3;
  endfunction

  function automatic string coeff_token_str(input int tbl, input int tc, input int t1);
    int i = tc * 4 + t1;
    case (tbl)
      0, 1, 2: return bstr(64'(CT_VAL[tbl][i]), int'(CT_LEN[tbl][i]));
      3:       return (tc == 0) ? "000011" : bstr(64'(i - 4), 6);
      default: return bstr(64'(CT_DC_VAL[i]), int'(CT_DC_LEN[i]));
    endcase
  endfunction

  // level codeword, built as prefix zeros, a one, and the suffix
  function automatic string level_str(input int lv, input int sl, input bit adj);
    int lc, pre;
    lc = (lv > 0) ? 2 * lv - 2 : -2 * lv - 1;
    if (adj) lc -= 2;
    if (sl == 0) begin
      if (lc < 14) return {zeros(lc), "1"};
      if (lc < 30) return {zeros(14), "1", bstr(64'(lc - 14), 4)};
      return {zeros(15), "1", bstr(64'(lc - 30), 12)};
    end
    pre = lc / (1 << sl);
    if (pre < 15) return {zeros(pre), "1", bstr(64'(lc % (1 << sl)), sl)};
    return {zeros(15), "1", bstr(64'(lc - 15 * (1 << sl)), 12)};
  endfunction

  function automatic void encode(input blk_t c, input bit dc, input int tbl,
                                 ref ref_code_t q[$]);
    int n = dc ? 4 : 16;
    int s[16];          // scan order
    int nzpos[$];       // positions of non-zero coefficients, ascending
    int tc, t1, tz, sl, zl, mag;
    string sg;
    q.delete();
    for (int k = 0; k < n; k++) s[k] = dc ? c[k] : c[ZZ_REF[k]];
    for (int k = 0; k < n; k++) if (s[k] != 0) nzpos.push_back(k);
    tc = nzpos.size();
    t1 = 0;
    for (int j = tc - 1; j >= 0 && t1 < 3; j--) begin
      if (s[nzpos[j]] == 1 || s[nzpos[j]] == -1) t1++;
      else break;
    end
    q.push_back('{coeff_token_str(tbl, tc, t1), 1});
    if (tc == 0) return;
    if (t1 > 0) begin
      sg = "";
      for (int j = 0; j < t1; j++) sg = {sg, (s[nzpos[tc - 1 - j]] < 0) ? "1" : "0"};
      q.push_back('{sg, 2});
    end
    sl = (tc > 10 && t1 < 3) ? 1 : 0;
    for (int j = tc - 1 - t1; j >= 0; j--) begin
      int lv = s[nzpos[j]];
      q.push_back('{level_str(lv, sl, (j == tc - 1 - t1) && t1 < 3), 3});
      mag = (lv < 0) ? -lv : lv;
      if (sl == 0) sl = 1;
      if (sl < 6 && mag > (3 << (sl - 1))) sl++;
    end
    if (tc == n) return;
    tz = nzpos[tc - 1] + 1 - tc;
    if (dc) q.push_back('{bstr(64'(TZ_DC_VAL[tc - 1][tz]), int'(TZ_DC_LEN[tc - 1][tz])), 4});
    else    q.push_back('{bstr(64'(TZ_VAL[tc - 1][tz]), int'(TZ_LEN[tc - 1][tz])), 4});
    zl = tz;
    for (int j = tc - 1; j >= 1 && zl > 0; j--) begin
      int run = nzpos[j] - nzpos[j - 1] - 1;
      int row = (zl > 6) ? 6 : zl - 1;
      q.push_back('{bstr(64'(RB_VAL[row][run]), int'(RB_LEN[row][run])), 5});
      zl -= run;
    end
  endfunction
endpackage
