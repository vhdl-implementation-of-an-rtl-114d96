// cavlc_top: CAVLC entropy encoder for H.264 residual blocks.
//
// The encoder turns quantised transform coefficients of 4x4 blocks (luma) and 2x2
// chroma DC blocks into H.264 CAVLC codewords. It is a three-stage pipeline:
//   load    - the producer writes a block, one coefficient per clock in raster order,
//             into one bank of the two-bank coefficient buffer (cavlc_coeff_buffer),
//             giving with the first coefficient the block kind and the TotalCoeff of
//             its upper and left neighbours; cavlc_nc_select turns those into the
//             coeff_token table choice.
//   scan    - the CAVLC counters (cavlc_scan) read a full bank in reverse zig-zag order,
//             one coefficient per clock (16 clocks for 4x4, 4 for 2x2), and write the
//             block's statistics into one of two statistics buffers (cavlc_stats_buffer).
//   output  - the code generator (cavlc_code_gen) turns a statistics record into
//             coeff_token, trailing-one signs, levels, total_zeros and run_before
//             codewords, one per CLOCK_1 cycle, and the packer (cavlc_bit_packer)
//             joins them into 32-bit bit-stream words.
// Because each stage has two buffers in front of it, the next block is loaded and
// scanned while the current one is being coded.
//
// Clocking: a single clock, clk, is the design description's CLOCK_2 (coefficient
// rate). CLOCK_1, at half that rate, is made here as a clock enable that is high on
// every second clk edge, and paces the code generator. Reset is asynchronous, active
// low.
//
// Interface: a coefficient is taken on a clock where enable_input and ready are both
// high. chroma_dc, nu, nl, nu_avail and nl_avail are sampled with the first
// coefficient of each block. Every codeword appears on output_code/output_code_length
// with output_state naming the element, and valid_output high for one clock; nout is
// the TotalCoeff of the block being coded. bs_word/bs_bits/bs_valid give the packed
// bit stream; flush pushes out a partial last word.
//
// Timing: a block's scan starts the clock after its bank is full (if a statistics
// buffer is free); its codewords follow two clocks apart. The 4x4 example block with
// 12 codewords takes 41 clocks from its first scan read to its last codeword, close to
// the 42 to 44 clocks of the original design; the raster load adds 16 clocks before.
//
// Taken from the original design: the three stages, the half-rate output clock, the
// two statistics buffers, the table choice from the upper/left neighbour counts, and
// the port names enable_input, ready, input_coeff, output_code, output_code_length,
// valid_output, output_state and nout. This design's own choices: raster-order
// loading with the reorder done by the buffer, the availability flags, the numbering
// of output_state, the handshakes and the 32-bit bit-stream packer.
module cavlc_top
  import cavlc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // coefficient input
  input  logic              enable_input,
  output logic              ready,
  input  coeff_t            input_coeff,
  input  logic              chroma_dc,
  input  logic [4:0]        nu,
  input  logic [4:0]        nl,
  input  logic              nu_avail,
  input  logic              nl_avail,
  // codeword output
  output logic              valid_output,
  output logic [CODE_W-1:0] output_code,
  output logic [LEN_W-1:0]  output_code_length,
  output out_state_e        output_state,
  output logic [4:0]        nout,
  // packed bit stream
  input  logic              flush,
  output logic              bs_valid,
  output logic [31:0]       bs_word,
  output logic [6:0]        bs_bits
);
  ct_table_e  wr_tbl, rd_tbl;
  logic [4:0] nc_unused;
  logic       rd_valid, rd_first, rd_last;
  coeff_t     rd_coeff;
  logic       scan_done;
  blk_stats_t scan_stats, cg_stats;
  logic       sb_space, sb_valid, sb_pop;
  logic       clk1_en;

  cavlc_nc_select u_nc (
    .nu(nu), .nl(nl), .nu_avail(nu_avail), .nl_avail(nl_avail), .chroma_dc(chroma_dc),
    .nc(nc_unused), .tbl(wr_tbl));

  cavlc_coeff_buffer u_buf (
    .clk(clk), .rst_n(rst_n),
    .wr_valid(enable_input), .wr_ready(ready), .wr_coeff(input_coeff),
    .wr_chroma_dc(chroma_dc), .wr_tbl(wr_tbl),
    .rd_start_ok(sb_space), .rd_valid(rd_valid), .rd_first(rd_first), .rd_last(rd_last),
    .rd_coeff(rd_coeff), .rd_tbl(rd_tbl));

  cavlc_scan u_scan (
    .clk(clk), .rst_n(rst_n),
    .in_valid(rd_valid), .in_first(rd_first), .in_last(rd_last), .in_coeff(rd_coeff),
    .in_tbl(rd_tbl), .done(scan_done), .stats(scan_stats));

  cavlc_stats_buffer u_sb (
    .clk(clk), .rst_n(rst_n),
    .wr_valid(scan_done), .wr_data(scan_stats), .full(), .space(sb_space),
    .rd_valid(sb_valid), .rd_data(cg_stats), .rd_pop(sb_pop));

  // CLOCK_1 = CLOCK_2 / 2, as an enable
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) clk1_en <= 1'b0;
    else        clk1_en <= ~clk1_en;
  end

  cavlc_code_gen u_cg (
    .clk(clk), .rst_n(rst_n), .step_en(clk1_en),
    .stats_valid(sb_valid), .stats(cg_stats), .stats_pop(sb_pop),
    .out_valid(valid_output), .out_code(output_code), .out_len(output_code_length),
    .out_state(output_state), .out_nout(nout));

  cavlc_bit_packer #(.WORD_W(32)) u_pk (
    .clk(clk), .rst_n(rst_n),
    .in_valid(valid_output), .in_code(output_code), .in_len(output_code_length),
    .flush(flush), .out_valid(bs_valid), .out_word(bs_word), .out_bits(bs_bits));
endmodule
