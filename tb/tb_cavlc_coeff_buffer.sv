// tb_cavlc_coeff_buffer: checks the two-bank coefficient buffer.
// A producer writes random 4x4 and 2x2 blocks in raster order with random idle
// cycles; the reader side grants block starts at random. Every block must come out
// whole, in reverse zig-zag order (4x4) or reverse raster order (2x2), with first/last
// marks and its table tag, and blocks must keep their order. Also checks that a block
// streams without gaps once started, that writing fills the second bank while the
// first is read (overlap), and that the producer is held off when both banks are full.
`timescale 1ns/1ps
module tb_cavlc_coeff_buffer;
  import cavlc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, wr_ready, wr_chroma_dc = 0;
  coeff_t wr_coeff = '0;
  ct_table_e wr_tbl = TBL_NC0;
  logic rd_start_ok = 0, rd_valid, rd_first, rd_last;
  coeff_t rd_coeff;
  ct_table_e rd_tbl;

  cavlc_coeff_buffer dut (.*);
  always #5 clk = ~clk;

  localparam int NB = 400;
  localparam int ZZ [16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};

  int checks = 0, failures = 0;
  int blk [NB][16];
  bit isdc [NB];
  int tbl_of [NB];
  int wb = 0, wk = 0, rb = 0, rk = 0;
  int overlap = 0, held = 0;
  bit in_block = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int b = 0; b < NB; b++) begin
      isdc[b] = ($urandom_range(0, 3) == 0);
      tbl_of[b] = isdc[b] ? 4 : $urandom_range(0, 3);
      for (int k = 0; k < 16; k++) blk[b][k] = $urandom_range(0, 4095) - 2048;
    end
  end

  // producer: decide the next cycle's drive from what happened at this edge
  always @(posedge clk) if (rst_n) begin
    int n;
    if (wr_valid && wr_ready) begin
      n = isdc[wb] ? 4 : 16;
      wk++;
      if (wk == n) begin wk = 0; wb++; end
    end
    if (wr_valid && !wr_ready) held++;
    if (wb < NB && $urandom_range(0, 4) != 0) begin
      wr_valid     <= 1'b1;
      wr_coeff     <= coeff_t'(blk[wb][wk]);
      wr_chroma_dc <= isdc[wb];
      wr_tbl       <= ct_table_e'(tbl_of[wb]);
    end else begin
      wr_valid <= 1'b0;
    end
    rd_start_ok <= ($urandom_range(0, 2) == 0);
  end

  // consumer checks
  always @(posedge clk) if (rst_n) begin
    int n, exp;
    if (in_block) check(rd_valid, "block streams without gaps");
    if (rd_valid) begin
      n = isdc[rb] ? 4 : 16;
      exp = isdc[rb] ? blk[rb][n - 1 - rk] : blk[rb][ZZ[15 - rk]];
      check(rd_coeff == coeff_t'(exp), $sformatf("block %0d read %0d: %0d exp %0d", rb, rk, rd_coeff, exp));
      check(rd_first == (rk == 0) && rd_last == (rk == n - 1), "first/last marks");
      check(int'(rd_tbl) == tbl_of[rb], "table tag");
      if (wr_valid && wr_ready) overlap++;
      in_block = !rd_last;
      rk++;
      if (rk == n) begin rk = 0; rb++; end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    wait (rb == NB);
    repeat (2) @(posedge clk);
    check(overlap > 0, "write during read");
    check(held > 0, "producer held off");
    $display("overlap=%0d held=%0d", overlap, held);
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
