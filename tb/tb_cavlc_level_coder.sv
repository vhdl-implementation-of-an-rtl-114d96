// tb_cavlc_level_coder: checks level codewords by decoding them.
// 1. The five levels of the worked example, with the suffix lengths the example
//    implies: 1 (sl 0) -> 1, -4 (sl 1) -> 00011, -2 (sl 2) -> 111, 1 (sl 2) -> 100.
// 2. Random levels over the whole 12-bit range, every suffix length 0..6, with and
//    without the first-level adjustment: the codeword is parsed here as H.264 decoders
//    do (prefix zeros, suffix size, escape rules) and must give the level back with
//    exactly the produced length.
// 3. next_suffix_len against the thresholds of the suffix-length table (3, 6, 12, 24,
//    48 for suffix lengths 1..5), with 0 always moving to 1 first.
`timescale 1ns/1ps
module tb_cavlc_level_coder;
  import cavlc_pkg::*;
  coeff_t level;
  logic [2:0] suffix_len, next_suffix_len;
  logic first_adj;
  vlc_t vlc;
  int checks = 0, failures = 0;

  cavlc_level_coder dut (.*);

  function automatic string bits(input vlc_t v);
    string s = "";
    for (int i = int'(v.len) - 1; i >= 0; i--) s = {s, v.code[i] ? "1" : "0"};
    return s;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic expect_code(input int lv, input int sl, input bit adj, input string e);
    level = coeff_t'(lv); suffix_len = 3'(sl); first_adj = adj; #1;
    check(bits(vlc) == e, $sformatf("level %0d sl %0d: %s exp %s", lv, sl, bits(vlc), e));
  endtask

  int thr [7] = '{0, 3, 6, 12, 24, 48, 0};

  initial begin
    expect_code(1, 0, 0, "1");
    expect_code(-4, 1, 0, "00011");
    expect_code(-2, 2, 0, "111");
    expect_code(1, 2, 0, "100");
    for (int n = 0; n < 40000; n++) begin
      int lv, sl, pre, ssz, lc, dec, mag, esl;
      bit adj;
      string s;
      sl  = $urandom_range(0, 6);
      adj = 1'($urandom_range(0, 1));
      case ($urandom_range(0, 3))
        0: mag = $urandom_range(1, 4);
        1: mag = $urandom_range(1, 40);
        2: mag = $urandom_range(1, 400);
        default: mag = $urandom_range(1, 2047);
      endcase
      if (adj && mag < 2) mag = 2;
      lv = ($urandom_range(0, 1) != 0) ? -mag : mag;
      if (n % 97 == 0) begin lv = -2048; mag = 2048; end
      level = coeff_t'(lv); suffix_len = 3'(sl); first_adj = adj; #1;
      s = bits(vlc);
      pre = 0;
      while (pre < s.len() && s[pre] == "0") pre++;
      if (pre >= 15)                ssz = 12;
      else if (pre == 14 && sl == 0) ssz = 4;
      else                          ssz = sl;
      check(s.len() == pre + 1 + ssz, $sformatf("length of %s for %0d sl %0d", s, lv, sl));
      lc = ((pre < 15 ? pre : 15) << sl);
      if (pre == 14 && sl == 0) lc = 14;
      for (int i = 0; i < ssz; i++) lc += int'(s[pre + 1 + i] == "1") << (ssz - 1 - i);
      if (pre >= 15 && sl == 0) lc += 15;
      if (adj) lc += 2;
      dec = (lc % 2 == 0) ? (lc + 2) / 2 : -(lc + 1) / 2;
      check(dec == lv, $sformatf("decode %s sl %0d adj %0d -> %0d, exp %0d", s, sl, adj, dec, lv));
      esl = (sl == 0) ? 1 : sl;
      if (esl < 6 && mag > thr[esl]) esl++;
      check(int'(next_suffix_len) == esl, $sformatf("next sl %0d exp %0d", next_suffix_len, esl));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
