// cavlc_stats_buffer: the two block statistics buffers.
//
// A two-entry first-in first-out store of blk_stats_t records between the CAVLC
// counters and the code generator. The counters write a block's record when its scan
// ends (wr_valid); the code generator reads the oldest record (rd_data while rd_valid)
// for as long as it codes that block and releases it with rd_pop. With two entries the
// counters can collect the next block while the current one is being coded, the
// double buffering the design description calls for. Writing when full is a protocol
// error, checked by an assertion; the scan stage avoids it by starting a block only
// when `space` is high: an entry is free and not about to be taken by a record being
// written in this cycle. A block started then finds its entry still free when it ends,
// since only the scan stage writes.
module cavlc_stats_buffer
  import cavlc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_valid,
  input  blk_stats_t wr_data,
  output logic       full,
  output logic       space,
  output logic       rd_valid,
  output blk_stats_t rd_data,
  input  logic       rd_pop
);
  blk_stats_t buf_q [2];
  logic       wptr, rptr;
  logic [1:0] count;

  assign full     = (count == 2'd2);
  assign space    = (count == 2'd0) || (count == 2'd1 && !wr_valid);
  assign rd_valid = (count != 2'd0);
  assign rd_data  = buf_q[rptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '{'0, '0};
      wptr  <= 1'b0;
      rptr  <= 1'b0;
      count <= '0;
    end else begin
      if (wr_valid) begin
        buf_q[wptr] <= wr_data;
        wptr        <= ~wptr;
      end
      if (rd_pop && rd_valid) rptr <= ~rptr;
      count <= count + 2'(wr_valid) - 2'(rd_pop && rd_valid);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr_valid |-> (!full || rd_pop));
endmodule
