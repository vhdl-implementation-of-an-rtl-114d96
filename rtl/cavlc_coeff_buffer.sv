// cavlc_coeff_buffer: input coefficient memory with reverse-scan read-out.
//
// Two banks of 16 x 12-bit coefficients (384 bits). The producer writes one block at
// a time, one coefficient per cycle in raster order (row by row): 16 words for a 4x4
// block, 4 for a 2x2 chroma DC block. The block kind and the coeff_token table are
// captured with the block's first word. A full bank is read out, one word per cycle,
// in reverse zig-zag order for a 4x4 block (scan positions 15 down to 0) and in
// reverse raster order for a 2x2 block, which is the order the CAVLC counters need.
// While one bank is read the other can be filled, so the next block is loaded while
// the current one is scanned.
//
// Write side: wr_valid/wr_ready handshake; a word is taken when both are high.
// Read side: a block starts only when rd_start_ok is high (a free block statistics
// buffer exists); once started it streams without stalls, rd_first and rd_last mark
// its ends. A bank is released after its last word is read.
// The two banks and the reverse-order read follow the design description; the
// handshake and the raster write order are this design's choices.
module cavlc_coeff_buffer
  import cavlc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // producer
  input  logic       wr_valid,
  output logic       wr_ready,
  input  coeff_t     wr_coeff,
  input  logic       wr_chroma_dc,
  input  ct_table_e  wr_tbl,
  // CAVLC counters
  input  logic       rd_start_ok,
  output logic       rd_valid,
  output logic       rd_first,
  output logic       rd_last,
  output coeff_t     rd_coeff,
  output ct_table_e  rd_tbl
);
  // raster index of zig-zag scan position k
  localparam logic [3:0] ZZ [16] = '{4'd0, 4'd1, 4'd4, 4'd8, 4'd5, 4'd2, 4'd3, 4'd6,
                                     4'd9, 4'd12, 4'd13, 4'd10, 4'd7, 4'd11, 4'd14, 4'd15};

  coeff_t     mem [2][NMAX];
  logic [1:0] full;
  logic [1:0] is_dc;
  ct_table_e  tbl_q [2];
  logic       wbank, rbank;
  logic [3:0] widx, ridx;
  logic [3:0] wlast_idx, rlast_idx, raddr;
  logic       wdc;

  assign wdc       = (widx == 4'd0) ? wr_chroma_dc : is_dc[wbank];
  assign wlast_idx = wdc ? 4'(NDC - 1) : 4'(NMAX - 1);
  assign rlast_idx = is_dc[rbank] ? 4'(NDC - 1) : 4'(NMAX - 1);
  assign wr_ready  = !full[wbank];

  assign raddr    = is_dc[rbank] ? (rlast_idx - ridx) : ZZ[4'd15 - ridx];
  assign rd_valid = full[rbank] && (ridx != 4'd0 || rd_start_ok);
  assign rd_first = (ridx == 4'd0);
  assign rd_last  = (ridx == rlast_idx);
  assign rd_coeff = mem[rbank][raddr];
  assign rd_tbl   = tbl_q[rbank];

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready) mem[wbank][widx] <= wr_coeff;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full  <= '0;
      is_dc <= '0;
      tbl_q <= '{TBL_NC0, TBL_NC0};
      wbank <= 1'b0;
      rbank <= 1'b0;
      widx  <= '0;
      ridx  <= '0;
    end else begin
      if (wr_valid && wr_ready) begin
        if (widx == 4'd0) begin
          is_dc[wbank] <= wr_chroma_dc;
          tbl_q[wbank] <= wr_tbl;
        end
        if (widx == wlast_idx) begin
          full[wbank] <= 1'b1;
          wbank       <= ~wbank;
          widx        <= '0;
        end else begin
          widx <= widx + 4'd1;
        end
      end
      if (rd_valid) begin
        if (rd_last) begin
          full[rbank] <= 1'b0;
          rbank       <= ~rbank;
          ridx        <= '0;
        end else begin
          ridx <= ridx + 4'd1;
        end
      end
    end
  end
endmodule
