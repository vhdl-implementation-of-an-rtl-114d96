// tb_cavlc_frame: codes the residual blocks of one synthetic CIF frame (352x288).
//
// The frame has 22x18 = 396 macroblocks in raster order. Each macroblock sends its 16
// luma 4x4 blocks in H.264 block order (8x8 quadrants in Z order, 4x4 blocks in Z order
// inside each), then its Cb and Cr 2x2 chroma DC blocks. Chroma AC blocks are left out,
// because the encoder has no 15-coefficient block mode. The coefficients are generated,
// since no video is at hand. Each macroblock gets an activity level that varies smoothly
// over the frame, so that flat and busy areas alternate. The chance that a coefficient
// is non-zero falls with its zig-zag position, as in quantised residuals.
//
// The testbench keeps the TotalCoeff of every 4x4 luma position, as an H.264 encoder
// does. It gives each block the counts of its upper and left neighbours, and marks a
// neighbour unavailable at the frame edge. Every codeword, every nout and the packed
// bit stream are compared with cavlc_ref_pkg. Each coeff_token table and the chroma DC
// table must be used at least once. At the end it prints the clocks and bits the frame
// took.
`timescale 1ns/1ps
module tb_cavlc_frame;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  localparam int MBW = 22, MBH = 18;          // CIF in macroblocks
  localparam int BW = MBW * 4, BH = MBH * 4;  // CIF in 4x4 luma blocks

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
  bit exp_bits[$];
  longint total_bits = 0;
  int cyc = 0;
  int cnt_tbl [5] = '{0, 0, 0, 0, 0};
  int tc_map [BH][BW];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  always @(posedge clk) cyc++;

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
      if (e.state == 1) check(nout == 5'(exp_tc.pop_front()), "nout");
    end
  end

  // bit-stream checker: each word's bits against the expected bit queue
  always @(posedge clk) if (rst_n && bs_valid) begin
    bit ok;
    ok = 1'b1;
    for (int i = 0; i < int'(bs_bits); i++) begin
      if (exp_bits.size() == 0) ok = 1'b0;
      else if (exp_bits.pop_front() != bs_word[31 - i]) ok = 1'b0;
    end
    check(ok, "packed bit-stream word");
  end

  function automatic int act_of(input int mx, input int my);
    int a;
    // smooth pattern plus a little noise: 0 (flat) .. 4 (busy)
    a = ((mx * 3 + my * 5) % 11 + (mx * my) % 7) / 3 + $urandom_range(0, 1) - 1;
    if (a < 0) a = 0;
    if (a > 4) a = 4;
    return a;
  endfunction

  // Quantised-residual-like block in raster order.
  function automatic blk_t gen_block(input int act, input bit dc);
    blk_t c;
    int n, p, r, m;
    n = dc ? 4 : 16;
    for (int k = 0; k < 16; k++) c[k] = 0;
    for (int k = 0; k < n; k++) begin
      // raster index whose zig-zag position is k
      int pos;
      pos = dc ? k : ZZ_REF[k];
      p = act * 24 - k * (dc ? 4 : act + 2);
      if (act == 4) p = p + 10;
      r = $urandom_range(0, 99);
      if (r < p) begin
        r = $urandom_range(0, 99);
        if (r < 60 - act * 5)      m = 1;
        else if (r < 85)           m = $urandom_range(2, 3 + act * 2);
        else if (r < 97)           m = $urandom_range(4, 10 + act * 12);
        else                       m = $urandom_range(40, 200 + act * 400);
        c[pos] = ($urandom_range(0, 1) != 0) ? -m : m;
      end
    end
    return c;
  endfunction

  task automatic send_block(input blk_t c, input bit dc, input int u, input int l,
                            input bit ua, input bit la, output int tc);
    ref_code_t q[$];
    int tbl, n;
    string s;
    tbl = ref_table(u, l, ua, la, dc);
    encode(c, dc, tbl, q);
    n = dc ? 4 : 16;
    tc = 0;
    for (int k = 0; k < n; k++) if (c[k] != 0) tc++;
    exp_tc.push_back(tc);
    foreach (q[i]) begin
      exp_q.push_back(q[i]);
      s = q[i].bits;
      for (int j = 0; j < s.len(); j++) exp_bits.push_back(s[j] == "1");
      total_bits += longint'(s.len());
    end
    cnt_tbl[tbl]++;
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

  int start_cyc, frame_cyc;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    start_cyc = cyc;
    for (int my = 0; my < MBH; my++) begin
      for (int mx = 0; mx < MBW; mx++) begin
        int act, bx, by, u, l, tc;
        bit ua, la;
        act = act_of(mx, my);
        for (int b = 0; b < 16; b++) begin
          bx = mx * 4 + ((b >> 2) & 1) * 2 + (b & 1);
          by = my * 4 + ((b >> 3) & 1) * 2 + ((b >> 1) & 1);
          ua = (by > 0);
          la = (bx > 0);
          u  = ua ? tc_map[by - 1][bx] : 0;
          l  = la ? tc_map[by][bx - 1] : 0;
          send_block(gen_block(act, 1'b0), 1'b0, u, l, ua, la, tc);
          tc_map[by][bx] = tc;
        end
        send_block(gen_block(act, 1'b1), 1'b1, 0, 0, 1'b0, 1'b0, tc);  // Cb DC
        send_block(gen_block(act, 1'b1), 1'b1, 0, 0, 1'b0, 1'b0, tc);  // Cr DC
      end
    end
    enable_input <= 1'b0;
    wait (exp_q.size() == 0);
    frame_cyc = cyc - start_cyc;
    repeat (4) @(posedge clk);
    flush <= 1'b1;
    repeat (3) @(posedge clk);
    flush <= 1'b0;
    repeat (3) @(posedge clk);
    check(exp_bits.size() == 0, $sformatf("whole bit stream packed (%0d bits left)", exp_bits.size()));
    $display("frame: %0d blocks, %0d bits, %0d clocks (%0d us at 100 MHz); tables %0d/%0d/%0d/%0d/%0d",
             MBW * MBH * 18, total_bits, frame_cyc, frame_cyc / 100,
             cnt_tbl[0], cnt_tbl[1], cnt_tbl[2], cnt_tbl[3], cnt_tbl[4]);
    foreach (cnt_tbl[i]) check(cnt_tbl[i] > 0, $sformatf("coeff_token table %0d used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
