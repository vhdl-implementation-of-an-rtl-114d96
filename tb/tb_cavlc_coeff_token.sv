// tb_cavlc_coeff_token: checks the coeff_token codes.
// 1. The 24 entries of the coeff_token table excerpt printed in the design
//    description (TotalCoeff 0..2, all four nC ranges), typed in here as bit strings.
// 2. The whole chroma DC table, typed in from H.264 table 9-5.
// 3. The worked example: TotalCoeff 8, TrailingOnes 3, 4 <= nC < 8 gives 01101.
// 4. Every table is prefix-free over its valid (TotalCoeff, TrailingOnes) pairs, which
//    catches most mistyped entries in the parts of the tables not printed.
`timescale 1ns/1ps
module tb_cavlc_coeff_token;
  import cavlc_pkg::*;
  ct_table_e tbl;
  logic [4:0] tc;
  logic [1:0] t1;
  vlc_t vlc;
  int checks = 0, failures = 0;

  cavlc_coeff_token dut (.*);

  function automatic string bits(input vlc_t v);
    string s = "";
    for (int i = int'(v.len) - 1; i >= 0; i--) s = {s, v.code[i] ? "1" : "0"};
    return s;
  endfunction

  task automatic expect_code(input ct_table_e tb_, input int c, input int o, input string e);
    tbl = tb_; tc = 5'(c); t1 = 2'(o); #1;
    checks++;
    if (bits(vlc) != e) begin
      failures++;
      $display("FAIL tbl=%0d tc=%0d t1=%0d got %s exp %s", tb_, c, o, bits(vlc), e);
    end
  endtask

  // rows: T1, TC, then the four columns
  string printed [6][4] = '{
    '{"1",        "11",     "1111",   "000011"},
    '{"000101",   "001011", "001111", "000000"},
    '{"01",       "10",     "1110",   "000001"},
    '{"00000111", "000111", "001011", "000100"},
    '{"000100",   "00111",  "01111",  "000101"},
    '{"001",      "011",    "1101",   "000110"}};
  int prow_t1 [6] = '{0, 0, 1, 0, 1, 2};
  int prow_tc [6] = '{0, 1, 1, 2, 2, 2};

  string dc [5][4] = '{
    '{"01",     "",        "",        ""},
    '{"000111", "1",       "",        ""},
    '{"000100", "000110",  "001",     ""},
    '{"000011", "0000011", "0000010", "000101"},
    '{"000010", "00000011","00000010","0000000"}};

  initial begin
    string codes[$];
    for (int r = 0; r < 6; r++)
      for (int t = 0; t < 4; t++) expect_code(ct_table_e'(t), prow_tc[r], prow_t1[r], printed[r][t]);
    for (int c = 0; c <= 4; c++)
      for (int o = 0; o <= 3 && o <= c; o++) expect_code(TBL_CHDC, c, o, dc[c][o]);
    expect_code(TBL_NC4, 8, 3, "01101");
    for (int t = 0; t <= 4; t++) begin
      int maxc;
      maxc = (t == 4) ? 4 : 16;
      codes.delete();
      for (int c = 0; c <= maxc; c++)
        for (int o = 0; o <= 3 && o <= c; o++) begin
          tbl = ct_table_e'(t); tc = 5'(c); t1 = 2'(o); #1;
          codes.push_back(bits(vlc));
        end
      for (int i = 0; i < codes.size(); i++)
        for (int j = 0; j < codes.size(); j++) if (i != j) begin
          checks++;
          if (codes[i].len() == 0 || (codes[i].len() <= codes[j].len() &&
              codes[j].substr(0, codes[i].len() - 1) == codes[i])) begin
            failures++;
            if (failures < 10) $display("FAIL table %0d not prefix-free: %s %s", t, codes[i], codes[j]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
