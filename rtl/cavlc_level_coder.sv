// cavlc_level_coder: level codeword ("coeff prefix & suffix").
//
// Codes one non-trailing-one level. The level is mapped to an unsigned levelCode
// (2L-2 for L > 0, -2L-1 for L < 0), reduced by 2 for the first level of a block that
// has fewer than three trailing ones (its magnitude is then known to exceed 1). The
// codeword is a unary prefix (prefix zeros and a one) followed by a suffix of
// suffix_len bits:
//   suffix_len = 0 : prefix = levelCode for levelCode < 14; prefix 14 with a 4-bit
//                    suffix for 14..29; prefix 15 with a 12-bit escape suffix above.
//   suffix_len > 0 : prefix = levelCode >> suffix_len with the low suffix_len bits as
//                    suffix, or prefix 15 with a 12-bit escape suffix when the prefix
//                    would reach 15.
// next_suffix_len is the suffix length for the following level: 0 becomes 1, and it
// grows by one (up to 6) when |L| exceeds 3, 6, 12, 24 or 48 for suffix lengths 1..5,
// the thresholds of the suffix-length table in the design description. The
// prefix/suffix split and the escape codes are the H.264 rules. Combinational.
module cavlc_level_coder
  import cavlc_pkg::*;
(
  input  coeff_t     level,          // signed level, non-zero
  input  logic [2:0] suffix_len,     // 0..6
  input  logic       first_adj,      // first level and TrailingOnes < 3
  output vlc_t       vlc,
  output logic [2:0] next_suffix_len
);
  int lv, mag, lc, sl, prefix, nsl;

  always_comb begin
    lv  = int'(level);
    mag = (lv < 0) ? -lv : lv;
    lc  = (lv > 0) ? 2 * lv - 2 : -2 * lv - 1;
    if (first_adj) lc = lc - 2;
    sl  = int'(suffix_len);
    prefix = 0;

    if (sl == 0) begin
      if (lc < 14)      vlc = mk_vlc(32'(lc + 1), 1);
      else if (lc < 30) vlc = mk_vlc(19, 32'((1 << 4) | (lc - 14)));
      else              vlc = mk_vlc(28, 32'((1 << 12) | ((lc - 30) & 32'hfff)));
    end else begin
      prefix = lc >> sl;
      if (prefix < 15)
        vlc = mk_vlc(32'(prefix + 1 + sl), 32'((1 << sl) | (lc & ((1 << sl) - 1))));
      else
        vlc = mk_vlc(28, 32'((1 << 12) | ((lc - (15 << sl)) & 32'hfff)));
    end

    nsl = (sl == 0) ? 1 : sl;
    if (mag > (3 << (nsl - 1)) && nsl < 6) nsl = nsl + 1;
    next_suffix_len = 3'(nsl);
  end
endmodule
