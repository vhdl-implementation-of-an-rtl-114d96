// cavlc_coeff_token: coeff_token codeword ("coeff_token & ctoken_length").
//
// coeff_token jointly codes TotalCoeff (0..16) and TrailingOnes (0..3) of a block.
// Five code tables exist: four for 4x4 blocks chosen by nC (see cavlc_nc_select) and
// one for 2x2 chroma DC blocks. The first three 4x4 tables and the chroma DC table
// are read from cavlc_pkg; the nC >= 8 table is a 6-bit fixed-length code that is
// computed: {TotalCoeff-1, TrailingOnes}, with 000011 for an empty block.
// Combinational; the output is only meaningful for TrailingOnes <= min(TotalCoeff,3).
module cavlc_coeff_token
  import cavlc_pkg::*;
(
  input  ct_table_e  tbl,
  input  logic [4:0] tc,   // TotalCoeff
  input  logic [1:0] t1,   // TrailingOnes
  output vlc_t       vlc
);
  int unsigned idx;

  always_comb begin
    idx = 32'(tc) * 4 + 32'(t1);
    unique case (tbl)
      TBL_NC0:  vlc = mk_vlc(32'(CT_LEN[0][idx]), 32'(CT_VAL[0][idx]));
      TBL_NC2:  vlc = mk_vlc(32'(CT_LEN[1][idx]), 32'(CT_VAL[1][idx]));
      TBL_NC4:  vlc = mk_vlc(32'(CT_LEN[2][idx]), 32'(CT_VAL[2][idx]));
      TBL_NC8:  vlc = (tc == 5'd0) ? mk_vlc(6, 3) : mk_vlc(6, (32'(tc) - 1) * 4 + 32'(t1));
      TBL_CHDC: vlc = (idx < 20) ? mk_vlc(32'(CT_DC_LEN[idx]), 32'(CT_DC_VAL[idx]))
                                 : mk_vlc(0, 0);
      default:  vlc = mk_vlc(0, 0);
    endcase
  end
endmodule
