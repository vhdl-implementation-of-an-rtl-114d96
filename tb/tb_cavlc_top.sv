// tb_cavlc_top: end-to-end test of the CAVLC encoder at its default sizes.
//
// 1. Codes the 4x4 example block whose codewords are known from the design
//    description (TotalCoeff 8, TrailingOnes 3, nC = 5) and compares every codeword,
//    its element tag, nout and the packed bit stream with the known answer
//    01101 000 1 00011 111 100 100 11 10 11 11 00.
// 2. Streams a long run of random 4x4 and 2x2 chroma DC blocks with random neighbour
//    contexts back to back, compares every codeword with cavlc_ref_pkg, and checks
//    that the packed 32-bit words equal the concatenated reference bits.
// It also times both examples from the first reverse-scan read of the coefficient
// buffer to the last codeword: the 4x4 example must take 40 to 46 clocks, near the
// 42 to 44 of the original design, and a six-codeword 2x2 chroma DC block at most 21.
// It checks that a block's codewords come two clocks apart (one per CLOCK_1 cycle),
// and counts how often each mechanism occurred: input stall, scan overlapping the
// code generator, each coeff_token table, chroma DC, empty and full blocks, escaped
// levels, suffix length 6, long zero runs (zerosLeft > 6), flush of a partial word.
// A mechanism that never occurs counts as a failure.
`timescale 1ns/1ps
module tb_cavlc_top;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  localparam int NBLK = 600;

  logic clk = 0, rst_n = 0;
  logic enable_input = 0, ready;
  coeff_t input_coeff = '0;
  logic chroma_dc = 0, nu_avail = 0, nl_avail = 0;
  logic [4:0] nu = '0, nl = '0;
  logic valid_output;
  logic [CODE_W-1:0] output_code;
  logic [LEN_W-1:0] output_code_length;
  out_state_e output_state;
  logic [4:0] nout;
  logic flush = 0;
  logic bs_valid;
  logic [31:0] bs_word;
  logic [6:0] bs_bits;

  cavlc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  ref_code_t exp_q[$];
  int exp_tc[$];
  string exp_stream = "", got_stream = "";
  int last_valid_cyc = -10, cyc = 0;
  int cnt_stall = 0, cnt_overlap = 0, cnt_dc = 0, cnt_empty = 0, cnt_full = 0;
  int cnt_esc = 0, cnt_sl6 = 0, cnt_longrun = 0, cnt_flush = 0;
  int cnt_tbl [5] = '{0, 0, 0, 0, 0};
  int blk_codes = 0;
  int scan_cyc = -1;  // clock on which the coefficient buffer read (the scan) of a block begins

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n && enable_input && !ready) cnt_stall++;
    if (rst_n && dut.u_buf.rd_valid && dut.u_cg.st != OS_IDLE) cnt_overlap++;
    if (rst_n && dut.u_buf.rd_valid && dut.u_buf.rd_first && scan_cyc < 0) scan_cyc = cyc;
  end

  // codeword checker
  always @(posedge clk) if (rst_n && valid_output) begin
    string got;
    ref_code_t e;
    got = bstr(64'(output_code), int'(output_code_length));
    if (exp_q.size() == 0) begin
      check(0, "unexpected codeword");
    end else begin
      e = exp_q.pop_front();
      check(got == e.bits && int'(output_state) == e.state,
            $sformatf("codeword got %s/%0d exp %s/%0d", got, output_state, e.bits, e.state));
      if (e.state == 1) begin
        check(nout == 5'(exp_tc.pop_front()), "nout");
        blk_codes = 0;
      end else begin
        check(cyc - last_valid_cyc == 2, "one codeword per CLOCK_1 cycle");
      end
      if (got.len() >= 19 && e.state == 3) cnt_esc++;
    end
    last_valid_cyc = cyc;
  end

  // bit-stream collector
  always @(posedge clk) if (rst_n && bs_valid) begin
    got_stream = {got_stream, bstr(64'(bs_word >> (32 - int'(bs_bits))), int'(bs_bits))};
    if (bs_bits != 7'd32) cnt_flush++;
  end

  // Sends one block (raster order) with its context and records what to expect.
  task automatic send_block(input blk_t c, input bit dc, input int u, input int l,
                            input bit ua, input bit la);
    ref_code_t q[$];
    int tbl, n, tc, sl, mag;
    tbl = ref_table(u, l, ua, la, dc);
    encode(c, dc, tbl, q);
    n = dc ? 4 : 16;
    tc = 0;
    for (int k = 0; k < n; k++) if (c[k] != 0) tc++;
    exp_tc.push_back(tc);
    foreach (q[i]) begin
      exp_q.push_back(q[i]);
      exp_stream = {exp_stream, q[i].bits};
      if (q[i].state == 5 && q[i].bits.len() >= 4 && q[i].bits.substr(0, 2) == "000") cnt_longrun++;
    end
    cnt_tbl[tbl]++;
    if (dc) cnt_dc++;
    if (tc == 0) cnt_empty++;
    if (tc == n) cnt_full++;
    // suffix length 6 reached: a level of magnitude above 48 after earlier levels
    sl = 0;
    for (int k = 0; k < n; k++) begin
      mag = (c[k] < 0) ? -c[k] : c[k];
      if (mag > 48) sl = 1;
    end
    if (sl != 0 && tc >= 6) cnt_sl6++;
    for (int k = 0; k < n; k++) begin
      enable_input <= 1'b1;
      input_coeff  <= coeff_t'(c[k]);
      chroma_dc    <= dc;
      nu <= 5'(u); nl <= 5'(l); nu_avail <= ua; nl_avail <= la;
      @(negedge clk);
      while (!ready) @(negedge clk);
      @(posedge clk);
    end
  endtask

  function automatic blk_t rand_block(input bit dc);
    blk_t c;
    int dens = $urandom_range(0, 5);
    for (int k = 0; k < 16; k++) begin
      int r = $urandom_range(0, 99);
      int m;
      c[k] = 0;
      if (dc && k >= 4) continue;
      if (dens == 5 || r < dens * 18) begin
        int kind = $urandom_range(0, 19);
        if (kind < 12)      m = 1;
        else if (kind < 16) m = $urandom_range(2, 6);
        else if (kind < 18) m = $urandom_range(7, 60);
        else                m = $urandom_range(61, 2047);
        c[k] = ($urandom_range(0, 1) != 0) ? -m : m;
      end
    end
    return c;
  endfunction

  blk_t ex;
  int   first_cyc, done_cyc;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1. worked example, nA = nB = 5 -> nC = 5
    ex = '{1, 1, 0, 0, -2, 0, 1, 0, -4, 1, 1, 0, 1, 0, 0, 0};
    first_cyc = cyc;
    send_block(ex, 0, 5, 5, 1, 1);
    enable_input <= 1'b0;
    check(exp_q.size() == 12, "example has 12 codewords");
    wait (exp_q.size() == 0);
    done_cyc = cyc;
    $display("example block: first coefficient to last codeword = %0d clocks, scan start to last codeword = %0d clocks",
             done_cyc - first_cyc, done_cyc - scan_cyc);
    // reverse zig-zag read, counters and output of a 4x4 block: 42 to 44 clocks in the original
    check(done_cyc - scan_cyc >= 40 && done_cyc - scan_cyc <= 46, "4x4 example latency near 42-44 clocks");
    check(exp_stream == "011010001000111111001001110111100", "example reference stream");
    repeat (4) @(posedge clk);
    flush <= 1'b1;
    @(posedge clk);
    flush <= 1'b0;
    repeat (3) @(posedge clk);
    check(got_stream == "011010001000111111001001110111100", "example packed stream");
    exp_stream = "";
    got_stream = "";

    // 2x2 chroma DC block on its own: 20 to 21 clocks in the original; this one has six codewords
    ex = '{3, 0, 1, -1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
    scan_cyc = -1;
    send_block(ex, 1, 0, 0, 0, 0);
    enable_input <= 1'b0;
    check(exp_q.size() == 6, "2x2 example has 6 codewords");
    wait (exp_q.size() == 0);
    done_cyc = cyc;
    $display("2x2 block: scan start to last codeword = %0d clocks", done_cyc - scan_cyc);
    check(done_cyc - scan_cyc <= 21, "2x2 example latency within 21 clocks");
    repeat (4) @(posedge clk);

    // 2. random stream
    for (int b = 0; b < NBLK; b++) begin
      bit dc;
      dc = ($urandom_range(0, 5) == 0);
      send_block(rand_block(dc), dc, $urandom_range(0, 16), $urandom_range(0, 16),
                 1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
    end
    enable_input <= 1'b0;
    wait (exp_q.size() == 0);
    repeat (4) @(posedge clk);
    flush <= 1'b1;
    repeat (3) @(posedge clk);
    flush <= 1'b0;
    repeat (3) @(posedge clk);
    check(got_stream == exp_stream, $sformatf("packed stream (%0d vs %0d bits)",
                                               got_stream.len(), exp_stream.len()));

    $display("mechanisms: stall=%0d overlap=%0d tbl=%0d/%0d/%0d/%0d/%0d dc=%0d empty=%0d full=%0d esc=%0d sl6=%0d longrun=%0d flush=%0d",
             cnt_stall, cnt_overlap, cnt_tbl[0], cnt_tbl[1], cnt_tbl[2], cnt_tbl[3], cnt_tbl[4],
             cnt_dc, cnt_empty, cnt_full, cnt_esc, cnt_sl6, cnt_longrun, cnt_flush);
    check(cnt_stall > 0, "input stall seen");
    check(cnt_overlap > 0, "scan/code overlap seen");
    foreach (cnt_tbl[i]) check(cnt_tbl[i] > 0, "every coeff_token table used");
    check(cnt_dc > 0 && cnt_empty > 0 && cnt_full > 0, "chroma DC, empty and full blocks seen");
    check(cnt_esc > 0, "escaped level seen");
    check(cnt_sl6 > 0, "large levels seen");
    check(cnt_longrun > 0, "zerosLeft > 6 run seen");
    check(cnt_flush > 0, "flush seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
