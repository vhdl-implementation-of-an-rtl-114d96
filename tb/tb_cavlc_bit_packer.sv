// tb_cavlc_bit_packer: checks the bit-stream packer.
// Random codewords of 1..28 bits (with garbage above their length) arrive on random
// cycles; the words that come out, concatenated, must equal the codewords'
// concatenation. The worked example's codewords must give the 33-bit stream
// 01101000100011111100100111011110 0 as one full word and a 1-bit flushed word.
`timescale 1ns/1ps
module tb_cavlc_bit_packer;
  import cavlc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, flush = 0, out_valid;
  logic [CODE_W-1:0] in_code = '0;
  logic [LEN_W-1:0] in_len = '0;
  logic [31:0] out_word;
  logic [6:0] out_bits;

  cavlc_bit_packer dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, words = 0, partial = 0;
  string exp_s = "", got_s = "";

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    check(out_bits >= 1 && out_bits <= 32, "word size");
    for (int i = 31; i > 31 - int'(out_bits); i--) got_s = {got_s, out_word[i] ? "1" : "0"};
    for (int i = 31 - int'(out_bits); i >= 0; i--) check(!out_word[i], "padding is zero");
    words++;
    if (out_bits != 32) partial++;
  end

  task automatic send(input int len, input logic [CODE_W-1:0] code);
    in_valid <= 1; in_len <= LEN_W'(len); in_code <= code;
    for (int i = len - 1; i >= 0; i--) exp_s = {exp_s, code[i] ? "1" : "0"};
    @(posedge clk);
  endtask

  task automatic do_flush();
    in_valid <= 0;
    flush <= 1;
    repeat (2) @(posedge clk);
    flush <= 0;
    @(posedge clk);
  endtask

  int ex_len [12] = '{5, 3, 1, 5, 3, 3, 3, 2, 2, 2, 2, 2};
  int ex_val [12] = '{'b01101, 0, 1, 'b00011, 'b111, 'b100, 'b100, 'b11, 'b10, 'b11, 'b11, 0};

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 12; i++) send(ex_len[i], CODE_W'(ex_val[i]));
    do_flush();
    check(got_s == "011010001000111111001001110111100", {"example stream ", got_s});
    check(words == 2 && partial == 1, "example: one full and one flushed word");
    for (int n = 0; n < 5000; n++) begin
      int len;
      len = $urandom_range(1, 28);
      if ($urandom_range(0, 2) == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
      send(len, CODE_W'({$urandom, $urandom}));
      if (n % 500 == 499) do_flush();
    end
    do_flush();
    check(got_s == exp_s, $sformatf("stream %0d bits vs %0d", got_s.len(), exp_s.len()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
