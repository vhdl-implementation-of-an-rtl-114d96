// tb_cavlc_run_before: checks the run_before codes against the run_before table of
// the design description (zerosLeft 1..6 and > 6, run_before 0..5), typed in here,
// the long-run codes of the > 6 column (run r >= 7 is r-4 zeros and a one, so run 14
// is 00000000001), the worked example's four runs, and prefix-freeness of each column.
`timescale 1ns/1ps
module tb_cavlc_run_before;
  import cavlc_pkg::*;
  logic [3:0] zeros_left, run;
  vlc_t vlc;
  int checks = 0, failures = 0;

  cavlc_run_before dut (.*);

  function automatic string bits(input vlc_t v);
    string s = "";
    for (int i = int'(v.len) - 1; i >= 0; i--) s = {s, v.code[i] ? "1" : "0"};
    return s;
  endfunction

  task automatic expect_code(input int z, input int r, input string e);
    zeros_left = 4'(z); run = 4'(r); #1;
    checks++;
    if (bits(vlc) != e) begin
      failures++;
      $display("FAIL zl=%0d run=%0d got %s exp %s", z, r, bits(vlc), e);
    end
  endtask

  // printed table: row run_before 0..5, column zerosLeft 1..6, >6
  string tbl [6][7] = '{
    '{"1", "1",  "11", "11",  "11",  "11",  "111"},
    '{"0", "01", "10", "10",  "10",  "000", "110"},
    '{"",  "00", "01", "01",  "011", "001", "101"},
    '{"",  "",   "00", "001", "010", "011", "100"},
    '{"",  "",   "",   "000", "001", "010", "011"},
    '{"",  "",   "",   "",    "000", "101", "010"}};

  initial begin
    string codes[$];
    for (int r = 0; r < 6; r++)
      for (int z = 1; z <= 7; z++)
        if (r <= z) begin
          expect_code(z, r, tbl[r][z - 1]);
          if (z == 7) for (int zz = 8; zz <= 15; zz++) expect_code(zz, r, tbl[r][6]);
        end
    expect_code(7, 6, "001");
    for (int r = 7; r <= 14; r++) begin
      string e;
      e = "";
      for (int i = 0; i < r - 4; i++) e = {e, "0"};
      expect_code(15, r, {e, "1"});
    end
    expect_code(14, 14, "00000000001");
    // worked example: zerosLeft 4 run 1, zerosLeft 3 runs 0, 0, 3
    expect_code(4, 1, "10"); expect_code(3, 0, "11"); expect_code(3, 3, "00");
    for (int z = 1; z <= 15; z++) begin
      codes.delete();
      for (int r = 0; r <= z && r <= 14; r++) begin
        zeros_left = 4'(z); run = 4'(r); #1;
        codes.push_back(bits(vlc));
      end
      for (int i = 0; i < codes.size(); i++)
        for (int j = 0; j < codes.size(); j++) if (i != j) begin
          checks++;
          if (codes[i].len() == 0 || (codes[i].len() <= codes[j].len() &&
              codes[j].substr(0, codes[i].len() - 1) == codes[i])) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
