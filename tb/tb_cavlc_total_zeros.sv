// tb_cavlc_total_zeros: checks the total_zeros codes.
// The worked example (TotalCoeff 8, total_zeros 4 -> 11), a few entries typed in from
// H.264 tables 9-7/9-8/9-9, lengths of zero for the cases that send nothing, and
// prefix-freeness of every per-TotalCoeff table.
`timescale 1ns/1ps
module tb_cavlc_total_zeros;
  import cavlc_pkg::*;
  logic chroma_dc;
  logic [4:0] tc, tz;
  vlc_t vlc;
  int checks = 0, failures = 0;

  cavlc_total_zeros dut (.*);

  function automatic string bits(input vlc_t v);
    string s = "";
    for (int i = int'(v.len) - 1; i >= 0; i--) s = {s, v.code[i] ? "1" : "0"};
    return s;
  endfunction

  task automatic expect_code(input bit d, input int c, input int z, input string e);
    chroma_dc = d; tc = 5'(c); tz = 5'(z); #1;
    checks++;
    if (bits(vlc) != e) begin
      failures++;
      $display("FAIL dc=%0d tc=%0d tz=%0d got %s exp %s", d, c, z, bits(vlc), e);
    end
  endtask

  initial begin
    string codes[$];
    expect_code(0, 8, 4, "11");
    expect_code(0, 1, 0, "1");
    expect_code(0, 1, 15, "000000001");
    expect_code(0, 1, 14, "000000010");
    expect_code(0, 2, 0, "111");
    expect_code(0, 3, 6, "100");
    expect_code(0, 15, 0, "0");
    expect_code(0, 15, 1, "1");
    expect_code(0, 11, 4, "1");
    expect_code(1, 1, 0, "1");
    expect_code(1, 1, 3, "000");
    expect_code(1, 2, 2, "00");
    expect_code(1, 3, 1, "0");
    expect_code(0, 0, 0, "");
    expect_code(0, 16, 0, "");
    expect_code(1, 4, 0, "");
    for (int d = 0; d < 2; d++) begin
      int n;
      n = (d != 0) ? 4 : 16;
      for (int c = 1; c < n; c++) begin
        codes.delete();
        for (int z = 0; z <= n - c; z++) begin
          chroma_dc = d[0]; tc = 5'(c); tz = 5'(z); #1;
          codes.push_back(bits(vlc));
        end
        for (int i = 0; i < codes.size(); i++)
          for (int j = 0; j < codes.size(); j++) if (i != j) begin
            checks++;
            if (codes[i].len() == 0 || (codes[i].len() <= codes[j].len() &&
                codes[j].substr(0, codes[i].len() - 1) == codes[i])) begin
              failures++;
              if (failures < 10) $display("FAIL dc=%0d tc=%0d: %s %s", d, c, codes[i], codes[j]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
