// cavlc_code_gen: state generator and code generator (output stage).
//
// Walks through the syntax elements of one block and emits one variable-length
// codeword per output step, in the order H.264 transmits them:
//   coeff_token      - TotalCoeff and TrailingOnes (cavlc_coeff_token)
//   trailing-one signs, all in one codeword of TrailingOnes bits, 1 = negative,
//                      highest-frequency one first
//   levels           - one codeword per remaining non-zero coefficient, highest
//                      frequency first, with the suffix length carried from level to
//                      level (cavlc_level_coder)
//   total_zeros      - unless the block is empty or completely non-zero
//                      (cavlc_total_zeros)
//   run_before       - for each non-zero coefficient but the last, while zeros remain
//                      unaccounted for (cavlc_run_before)
// An empty block sends only its coeff_token.
//
// Timing: the generator moves only on cycles with step_en high. In the full encoder
// step_en is high every second clock, so one codeword is produced per CLOCK_1 cycle
// where CLOCK_1 is half the rate of the input clock (CLOCK_2), as in the design
// description. The codeword (out_code, right-aligned, out_len bits) and out_state are
// registered and held until the next step; out_valid is high for the one clock after a
// step that produced a codeword. A block is taken from the statistics buffer when
// its record is valid and the generator is idle, and released (stats_pop) with its
// last codeword. out_nout gives the block's TotalCoeff, which the producer keeps as
// the neighbour count for later blocks.
// The element order and codes are H.264's; the one-codeword-per-step schedule and the
// output state numbering are this design's.
module cavlc_code_gen
  import cavlc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step_en,
  input  logic       stats_valid,
  input  blk_stats_t stats,
  output logic       stats_pop,
  output logic       out_valid,
  output logic [CODE_W-1:0] out_code,
  output logic [LEN_W-1:0]  out_len,
  output out_state_e out_state,
  output logic [4:0] out_nout
);
  out_state_e st;           // element to emit at the next step (OS_IDLE: none)
  logic [3:0] idx;          // level or run index
  logic [2:0] sl;           // current level suffix length
  logic [3:0] zl;           // zerosLeft

  logic       is_dc;
  logic [4:0] nlev;
  logic [4:0] maxc;
  vlc_t       ct_vlc, lv_vlc, tz_vlc, rb_vlc, t1_vlc, cur_vlc;
  logic [2:0] lv_next_sl;
  out_state_e after_ct, after_t1, after_lv, after_tz, after_rb, nxt_st;
  logic       emit;
  logic [3:0] zl_after;

  assign is_dc = (stats.tbl == TBL_CHDC);
  assign nlev  = stats.tc - 5'(stats.t1);
  assign maxc  = is_dc ? 5'(NDC) : 5'(NMAX);

  cavlc_coeff_token u_ct (.tbl(stats.tbl), .tc(stats.tc), .t1(stats.t1), .vlc(ct_vlc));

  cavlc_level_coder u_lv (
    .level(coeff_t'(stats.levels[idx])), .suffix_len(sl),
    .first_adj(idx == 4'd0 && stats.t1 != 2'd3),
    .vlc(lv_vlc), .next_suffix_len(lv_next_sl));

  cavlc_total_zeros u_tz (.chroma_dc(is_dc), .tc(stats.tc), .tz(stats.tz), .vlc(tz_vlc));

  cavlc_run_before u_rb (.zeros_left(zl), .run(stats.runs[idx]), .vlc(rb_vlc));

  // trailing-one signs, first coded sign in the most significant position
  always_comb begin
    unique case (stats.t1)
      2'd1:    t1_vlc = mk_vlc(1, 32'(stats.t1_neg[0]));
      2'd2:    t1_vlc = mk_vlc(2, 32'({stats.t1_neg[0], stats.t1_neg[1]}));
      2'd3:    t1_vlc = mk_vlc(3, 32'({stats.t1_neg[0], stats.t1_neg[1], stats.t1_neg[2]}));
      default: t1_vlc = mk_vlc(0, 0);
    endcase
  end

  // what follows each element
  always_comb begin
    zl_after = zl - stats.runs[idx];
    after_tz = (stats.tc < maxc) ? OS_TOTAL_ZEROS : OS_IDLE;
    after_lv = (5'(idx) + 5'd1 < nlev) ? OS_LEVEL : after_tz;
    after_t1 = (nlev != 5'd0) ? OS_LEVEL : after_tz;
    after_ct = (stats.tc == 5'd0) ? OS_IDLE
             : (stats.t1 != 2'd0) ? OS_T1_SIGNS : after_t1;
    after_rb = (zl_after != 4'd0 && 5'(idx) + 5'd2 < stats.tc) ? OS_RUN_BEFORE : OS_IDLE;
  end

  always_comb begin
    emit    = 1'b1;
    cur_vlc = mk_vlc(0, 0);
    nxt_st  = OS_IDLE;
    unique case (st)
      OS_IDLE: begin
        emit    = stats_valid;
        cur_vlc = ct_vlc;
        nxt_st  = stats_valid ? after_ct : OS_IDLE;
      end
      OS_T1_SIGNS:    begin cur_vlc = t1_vlc; nxt_st = after_t1; end
      OS_LEVEL:       begin cur_vlc = lv_vlc; nxt_st = after_lv; end
      OS_TOTAL_ZEROS: begin
        cur_vlc = tz_vlc;
        nxt_st  = (stats.tz != 5'd0 && stats.tc > 5'd1) ? OS_RUN_BEFORE : OS_IDLE;
      end
      OS_RUN_BEFORE:  begin cur_vlc = rb_vlc; nxt_st = after_rb; end
      default:        begin emit = 1'b0; nxt_st = OS_IDLE; end
    endcase
  end

  assign stats_pop = step_en && emit && (nxt_st == OS_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= OS_IDLE;
      idx       <= '0;
      sl        <= '0;
      zl        <= '0;
      out_valid <= 1'b0;
      out_code  <= '0;
      out_len   <= '0;
      out_state <= OS_IDLE;
      out_nout  <= '0;
    end else begin
      out_valid <= step_en && emit;
      if (step_en) begin
        st <= nxt_st;
        if (emit) begin
          out_code  <= cur_vlc.code;
          out_len   <= cur_vlc.len;
          out_state <= (st == OS_IDLE) ? OS_COEFF_TOKEN : st;
        end
        unique case (st)
          OS_IDLE: if (stats_valid) begin
            out_nout <= stats.tc;
            idx      <= '0;
            sl       <= (stats.tc > 5'd10 && stats.t1 != 2'd3) ? 3'd1 : 3'd0;
          end
          OS_LEVEL: begin
            sl  <= lv_next_sl;
            idx <= (nxt_st == OS_LEVEL) ? idx + 4'd1 : 4'd0;
          end
          OS_TOTAL_ZEROS: begin
            zl  <= stats.tz[3:0];
            idx <= '0;
          end
          OS_RUN_BEFORE: begin
            zl  <= zl_after;
            idx <= idx + 4'd1;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
