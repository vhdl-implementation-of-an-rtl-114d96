// cavlc_bit_packer: bit-stream output buffer.
//
// Concatenates the variable-length codewords of the code generator, first codeword
// first and each codeword most significant bit first, into 32-bit bit-stream words.
// A 64-bit accumulator holds the bits not yet sent; whenever 32 or more are pending,
// the oldest 32 leave as out_word with out_bits = 32. flush sends whatever is pending
// (1..31 bits) left-aligned and zero-padded, with out_bits giving the number of real
// bits; a codeword arriving in the same cycle as flush is included. If that cycle
// already completes a 32-bit word, the word leaves and flush must be repeated for the
// remainder (flush can simply be held high until out_bits < 32). One codeword per
// cycle at most, one word out per cycle at most (a codeword is at most 28 bits, so
// the accumulator never holds more than 59 bits).
// The design description names a bit-stream memory as the encoder's output buffer
// but gives no organisation; the word width and flush behaviour are this design's.
module cavlc_bit_packer
  import cavlc_pkg::*;
#(
  parameter int unsigned WORD_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [CODE_W-1:0] in_code,
  input  logic [LEN_W-1:0]  in_len,
  input  logic              flush,
  output logic              out_valid,
  output logic [WORD_W-1:0] out_word,
  output logic [6:0]        out_bits
);
  localparam int unsigned ACC_W = 2 * WORD_W;

  logic [ACC_W-1:0] acc, acc_n, masked;
  logic [6:0]       cnt, cnt_n;

  always_comb begin
    masked = ACC_W'(in_code) & ((ACC_W'(1) << in_len) - ACC_W'(1));
    acc_n  = acc;
    cnt_n  = cnt;
    if (in_valid) begin
      acc_n = (acc << in_len) | masked;
      cnt_n = cnt + 7'(in_len);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_word  <= '0;
      out_bits  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (cnt_n >= 7'(WORD_W)) begin
        out_valid <= 1'b1;
        out_word  <= WORD_W'(acc_n >> (cnt_n - 7'(WORD_W)));
        out_bits  <= 7'(WORD_W);
        acc       <= acc_n;
        cnt       <= cnt_n - 7'(WORD_W);
      end else if (flush && cnt_n != 7'd0) begin
        out_valid <= 1'b1;
        out_word  <= WORD_W'(acc_n << (7'(WORD_W) - cnt_n));
        out_bits  <= cnt_n;
        acc       <= '0;
        cnt       <= '0;
      end else begin
        acc <= acc_n;
        cnt <= cnt_n;
      end
    end
  end
endmodule
