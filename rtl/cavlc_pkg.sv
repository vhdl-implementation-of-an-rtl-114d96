// cavlc_pkg: types, sizes and code tables shared by the CAVLC encoder.
//
// The encoder codes the quantised residual of H.264 4x4 blocks and 2x2 chroma DC
// blocks with Context Adaptive Variable Length Coding. This package holds:
//   * the widths: 12-bit signed coefficients (the width of the input_coeff bus in the
//     timing waveform), 28-bit codewords (the longest CAVLC element, an escaped level,
//     is 28 bits) and 5-bit code lengths (the width of output_code_length in the same
//     waveform);
//   * the block statistics record that the scan stage hands to the code generator;
//   * the 3-bit output state that tags every emitted codeword;
//   * the H.264 (ITU-T H.264 tables 9-5, 9-7, 9-8, 9-9, 9-10) code tables for
//     coeff_token, total_zeros and run_before, stored as (length, value) pairs.
// The excerpts of these tables printed in the design description (the first rows of
// the coeff_token table, the run_before table, the worked example) all agree with the
// entries below; the rest of each table is filled from the standard.
package cavlc_pkg;

  localparam int unsigned COEFF_W = 12;  // signed coefficient width
  localparam int unsigned CODE_W  = 28;  // longest codeword (escaped level)
  localparam int unsigned LEN_W   = 5;   // code length field
  localparam int unsigned NMAX    = 16;  // coefficients in a 4x4 block
  localparam int unsigned NDC     = 4;   // coefficients in a 2x2 chroma DC block

  typedef logic signed [COEFF_W-1:0] coeff_t;

  // One variable-length code: value right-aligned in code, len bits long.
  typedef struct packed {
    logic [CODE_W-1:0] code;
    logic [LEN_W-1:0]  len;
  } vlc_t;

  // coeff_token table choice: the four nC ranges of 4x4 blocks plus chroma DC (nC = -1).
  typedef enum logic [2:0] {
    TBL_NC0   = 3'd0,  // 0 <= nC < 2
    TBL_NC2   = 3'd1,  // 2 <= nC < 4
    TBL_NC4   = 3'd2,  // 4 <= nC < 8
    TBL_NC8   = 3'd3,  // 8 <= nC
    TBL_CHDC  = 3'd4   // 2x2 chroma DC, nC = -1
  } ct_table_e;

  // What the current output codeword is.
  typedef enum logic [2:0] {
    OS_IDLE        = 3'd0,
    OS_COEFF_TOKEN = 3'd1,
    OS_T1_SIGNS    = 3'd2,
    OS_LEVEL       = 3'd3,
    OS_TOTAL_ZEROS = 3'd4,
    OS_RUN_BEFORE  = 3'd5
  } out_state_e;

  // Everything the code generator needs about one block, collected in one scan.
  // Arrays are in coding order: entry 0 belongs to the highest-frequency coefficient.
  typedef struct packed {
    ct_table_e                   tbl;       // coeff_token table (also says chroma DC)
    logic [4:0]                  tc;        // TotalCoeff, 0..16
    logic [1:0]                  t1;        // TrailingOnes, 0..3
    logic [4:0]                  tz;        // TotalZeros, 0..15
    logic [2:0]                  t1_neg;    // sign of each trailing one, bit 0 first coded
    logic [NMAX-1:0][COEFF_W-1:0] levels;   // non-trailing-one levels
    logic [NMAX-1:0][3:0]        runs;      // run_before of every non-zero coefficient
  } blk_stats_t;

  // ---------------------------------------------------------------------------
  // coeff_token, 4x4 blocks: index = TotalCoeff*4 + TrailingOnes.
  localparam byte unsigned CT_LEN [4][68] = '{
    '{ 1, 0, 0, 0,
       6, 2, 0, 0,   8, 6, 3, 0,   9, 8, 7, 5,  10, 9, 8, 6,
      11,10, 9, 7,  13,11,10, 8,  13,13,11, 9,  13,13,13,10,
      14,14,13,11,  14,14,14,13,  15,15,14,14,  15,15,15,14,
      16,15,15,15,  16,16,16,15,  16,16,16,16,  16,16,16,16 },
    '{ 2, 0, 0, 0,
       6, 2, 0, 0,   6, 5, 3, 0,   7, 6, 6, 4,   8, 6, 6, 4,
       8, 7, 7, 5,   9, 8, 8, 6,  11, 9, 9, 6,  11,11,11, 7,
      12,11,11, 9,  12,12,12,11,  12,12,12,11,  13,13,13,12,
      13,13,13,13,  13,14,13,13,  14,14,14,13,  14,14,14,14 },
    '{ 4, 0, 0, 0,
       6, 4, 0, 0,   6, 5, 4, 0,   6, 5, 5, 4,   7, 5, 5, 4,
       7, 5, 5, 4,   7, 6, 6, 4,   7, 6, 6, 4,   8, 7, 7, 5,
       8, 8, 7, 6,   9, 8, 8, 7,   9, 9, 8, 8,   9, 9, 9, 8,
      10, 9, 9, 9,  10,10,10,10,  10,10,10,10,  10,10,10,10 },
    '{ 6, 0, 0, 0,
       6, 6, 0, 0,   6, 6, 6, 0,   6, 6, 6, 6,   6, 6, 6, 6,
       6, 6, 6, 6,   6, 6, 6, 6,   6, 6, 6, 6,   6, 6, 6, 6,
       6, 6, 6, 6,   6, 6, 6, 6,   6, 6, 6, 6,   6, 6, 6, 6,
       6, 6, 6, 6,   6, 6, 6, 6,   6, 6, 6, 6,   6, 6, 6, 6 }
  };

  localparam byte unsigned CT_VAL [3][68] = '{
    '{ 1, 0, 0, 0,
       5, 1, 0, 0,   7, 4, 1, 0,   7, 6, 5, 3,   7, 6, 5, 3,
       7, 6, 5, 4,  15, 6, 5, 4,  11,14, 5, 4,   8,10,13, 4,
      15,14, 9, 4,  11,10,13,12,  15,14, 9,12,  11,10,13, 8,
      15, 1, 9,12,  11,14,13, 8,   7,10, 9,12,   4, 6, 5, 8 },
    '{ 3, 0, 0, 0,
      11, 2, 0, 0,   7, 7, 3, 0,   7,10, 9, 5,   7, 6, 5, 4,
       4, 6, 5, 6,   7, 6, 5, 8,  15, 6, 5, 4,  11,14,13, 4,
      15,10, 9, 4,  11,14,13,12,   8,10, 9, 8,  15,14,13,12,
      11,10, 9,12,   7,11, 6, 8,   9, 8,10, 1,   7, 6, 5, 4 },
    '{15, 0, 0, 0,
      15,14, 0, 0,  11,15,13, 0,   8,12,14,12,  15,10,11,11,
      11, 8, 9,10,   9,14,13, 9,   8,10, 9, 8,  15,14,13,13,
      11,14,10,12,  15,10,13,12,  11,14, 9,12,   8,10,13, 8,
      13, 7, 9,12,   9,12,11,10,   5, 8, 7, 6,   1, 4, 3, 2 }
  };

  // coeff_token, chroma DC (nC = -1): index = TotalCoeff*4 + TrailingOnes.
  localparam byte unsigned CT_DC_LEN [20] = '{
    2, 0, 0, 0,   6, 1, 0, 0,   6, 6, 3, 0,   6, 7, 7, 6,   6, 8, 8, 7 };
  localparam byte unsigned CT_DC_VAL [20] = '{
    1, 0, 0, 0,   7, 1, 0, 0,   4, 6, 1, 0,   3, 3, 2, 5,   2, 3, 2, 0 };

  // total_zeros, 4x4 blocks: row TotalCoeff-1 (1..15), column total_zeros (0..15).
  localparam byte unsigned TZ_LEN [15][16] = '{
    '{1,3,3,4,4,5,5,6,6,7,7,8,8,9,9,9},
    '{3,3,3,3,3,4,4,4,4,5,5,6,6,6,6,0},
    '{4,3,3,3,4,4,3,3,4,5,5,6,5,6,0,0},
    '{5,3,4,4,3,3,3,4,3,4,5,5,5,0,0,0},
    '{4,4,4,3,3,3,3,3,4,5,4,5,0,0,0,0},
    '{6,5,3,3,3,3,3,3,4,3,6,0,0,0,0,0},
    '{6,5,3,3,3,2,3,4,3,6,0,0,0,0,0,0},
    '{6,4,5,3,2,2,3,3,6,0,0,0,0,0,0,0},
    '{6,6,4,2,2,3,2,5,0,0,0,0,0,0,0,0},
    '{5,5,3,2,2,2,4,0,0,0,0,0,0,0,0,0},
    '{4,4,3,3,1,3,0,0,0,0,0,0,0,0,0,0},
    '{4,4,2,1,3,0,0,0,0,0,0,0,0,0,0,0},
    '{3,3,1,2,0,0,0,0,0,0,0,0,0,0,0,0},
    '{2,2,1,0,0,0,0,0,0,0,0,0,0,0,0,0},
    '{1,1,0,0,0,0,0,0,0,0,0,0,0,0,0,0}
  };
  localparam byte unsigned TZ_VAL [15][16] = '{
    '{1,3,2,3,2,3,2,3,2,3,2,3,2,3,2,1},
    '{7,6,5,4,3,5,4,3,2,3,2,3,2,1,0,0},
    '{5,7,6,5,4,3,4,3,2,3,2,1,1,0,0,0},
    '{3,7,5,4,6,5,4,3,3,2,2,1,0,0,0,0},
    '{5,4,3,7,6,5,4,3,2,1,1,0,0,0,0,0},
    '{1,1,7,6,5,4,3,2,1,1,0,0,0,0,0,0},
    '{1,1,5,4,3,3,2,1,1,0,0,0,0,0,0,0},
    '{1,1,1,3,3,2,2,1,0,0,0,0,0,0,0,0},
    '{1,0,1,3,2,1,1,1,0,0,0,0,0,0,0,0},
    '{1,0,1,3,2,1,1,0,0,0,0,0,0,0,0,0},
    '{0,1,1,2,1,3,0,0,0,0,0,0,0,0,0,0},
    '{0,1,1,1,1,0,0,0,0,0,0,0,0,0,0,0},
    '{0,1,1,1,0,0,0,0,0,0,0,0,0,0,0,0},
    '{0,1,1,0,0,0,0,0,0,0,0,0,0,0,0,0},
    '{0,1,0,0,0,0,0,0,0,0,0,0,0,0,0,0}
  };

  // total_zeros, chroma DC: row TotalCoeff-1 (1..3), column total_zeros (0..3).
  localparam byte unsigned TZ_DC_LEN [3][4] = '{'{1,2,3,3}, '{1,2,2,0}, '{1,1,0,0}};
  localparam byte unsigned TZ_DC_VAL [3][4] = '{'{1,1,1,0}, '{1,1,0,0}, '{1,0,0,0}};

  // run_before: row min(zerosLeft,7)-1, column run_before (0..14).
  localparam byte unsigned RB_LEN [7][15] = '{
    '{1,1,0,0,0,0,0,0,0,0,0,0,0,0,0},
    '{1,2,2,0,0,0,0,0,0,0,0,0,0,0,0},
    '{2,2,2,2,0,0,0,0,0,0,0,0,0,0,0},
    '{2,2,2,3,3,0,0,0,0,0,0,0,0,0,0},
    '{2,2,3,3,3,3,0,0,0,0,0,0,0,0,0},
    '{2,3,3,3,3,3,3,0,0,0,0,0,0,0,0},
    '{3,3,3,3,3,3,3,4,5,6,7,8,9,10,11}
  };
  localparam byte unsigned RB_VAL [7][15] = '{
    '{1,0,0,0,0,0,0,0,0,0,0,0,0,0,0},
    '{1,1,0,0,0,0,0,0,0,0,0,0,0,0,0},
    '{3,2,1,0,0,0,0,0,0,0,0,0,0,0,0},
    '{3,2,1,1,0,0,0,0,0,0,0,0,0,0,0},
    '{3,2,3,2,1,0,0,0,0,0,0,0,0,0,0},
    '{3,0,1,3,2,5,4,0,0,0,0,0,0,0,0},
    '{7,6,5,4,3,2,1,1,1,1,1,1,1,1,1}
  };

  // Packs a (length, value) pair into a vlc_t.
  function automatic vlc_t mk_vlc(input int unsigned len, input int unsigned val);
    vlc_t v;
    v.len  = LEN_W'(len);
    v.code = CODE_W'(val);
    return v;
  endfunction

endpackage
