// cavlc_nc_select: coeff_token table selector.
//
// The coeff_token code of a block depends on how busy its neighbours are. nC is
// predicted from the TotalCoeff of the block above (nB, "Nu") and the block to the
// left (nA, "Nl"):
//   both available : nC = round((nA + nB) / 2), computed as (nA + nB + 1) >> 1
//   only one       : nC = that neighbour's count
//   neither        : nC = 0
// and the table is picked by range: 0..1, 2..3, 4..7, 8 and above. A 2x2 chroma DC
// block always uses its own table (nC = -1). The formula, the ranges and the chroma
// DC rule follow the design description; rounding halves upward is the H.264 rule.
// Purely combinational.
module cavlc_nc_select
  import cavlc_pkg::*;
(
  input  logic [4:0] nu,         // TotalCoeff of the upper block (0..16)
  input  logic [4:0] nl,         // TotalCoeff of the left block (0..16)
  input  logic       nu_avail,   // upper block exists
  input  logic       nl_avail,   // left block exists
  input  logic       chroma_dc,  // current block is a 2x2 chroma DC block
  output logic [4:0] nc,         // predicted nC (0 for chroma DC)
  output ct_table_e  tbl         // selected coeff_token table
);
  logic [5:0] sum;

  always_comb begin
    sum = {1'b0, nu} + {1'b0, nl} + 6'd1;
    unique case ({nu_avail, nl_avail})
      2'b11:   nc = 5'(sum >> 1);
      2'b10:   nc = nu;
      2'b01:   nc = nl;
      default: nc = 5'd0;
    endcase
    if (chroma_dc)          tbl = TBL_CHDC;
    else if (nc < 5'd2)     tbl = TBL_NC0;
    else if (nc < 5'd4)     tbl = TBL_NC2;
    else if (nc < 5'd8)     tbl = TBL_NC4;
    else                    tbl = TBL_NC8;
  end
endmodule
