// cavlc_run_before: run_before codeword ("runb").
//
// run_before is the number of zeros directly below (in scan order) a non-zero
// coefficient. Its code depends on zerosLeft, the zeros not yet accounted for: one
// table each for zerosLeft = 1..6 and a shared one for zerosLeft > 6, in which runs of
// 7 and more are coded as (run - 4) zeros followed by a one. Tables are in cavlc_pkg.
// Combinational; length 0 for zerosLeft = 0 or run > zerosLeft.
// The output uses the shared 28-bit codeword type, but run_before codes are at most
// 11 bits, so the upper code bits are always zero and fold away in synthesis.
// The table layout and the entries for runs 0..5 follow the original design; the
// other entries are H.264's, including the 11-bit code 00000000001 for run 14.
module cavlc_run_before
  import cavlc_pkg::*;
(
  input  logic [3:0] zeros_left,  // 0..15
  input  logic [3:0] run,         // 0..14
  output vlc_t       vlc
);
  logic [2:0] row;

  always_comb begin
    row = (zeros_left > 4'd6) ? 3'd6 : 3'(zeros_left - 4'd1);
    if (zeros_left == 4'd0 || run > zeros_left || run == 4'd15)
      vlc = mk_vlc(0, 0);
    else
      vlc = mk_vlc(32'(RB_LEN[row][run]), 32'(RB_VAL[row][run]));
  end
endmodule
