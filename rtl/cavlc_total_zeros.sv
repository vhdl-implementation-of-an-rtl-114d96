// cavlc_total_zeros: total_zeros codeword ("z_token & z_length").
//
// total_zeros is the number of zero coefficients below the highest-frequency non-zero
// coefficient. Its code table depends on TotalCoeff (one table per TotalCoeff value,
// 1..15 for 4x4 blocks, 1..3 for 2x2 chroma DC blocks). The tables are in cavlc_pkg.
// The element is not sent for an empty block or a block with every coefficient
// non-zero; for those inputs the output length is 0. Combinational.
module cavlc_total_zeros
  import cavlc_pkg::*;
(
  input  logic       chroma_dc,
  input  logic [4:0] tc,   // TotalCoeff
  input  logic [4:0] tz,   // TotalZeros
  output vlc_t       vlc
);
  logic [3:0] row;

  always_comb begin
    row = 4'(tc - 5'd1);
    vlc = mk_vlc(0, 0);
    if (chroma_dc) begin
      if (tc >= 5'd1 && tc <= 5'd3 && tz <= 5'd3)
        vlc = mk_vlc(32'(TZ_DC_LEN[row[1:0]][tz[1:0]]), 32'(TZ_DC_VAL[row[1:0]][tz[1:0]]));
    end else begin
      if (tc >= 5'd1 && tc <= 5'd15 && tz <= 5'd15)
        vlc = mk_vlc(32'(TZ_LEN[row][tz[3:0]]), 32'(TZ_VAL[row][tz[3:0]]));
    end
  end
endmodule
