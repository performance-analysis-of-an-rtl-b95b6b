// module_a -- inversion decision of the scheme II encoder (odd, full or none).
//
// Inputs are the ones counts over the N = W-1 adjacent pairs. With coupling weights
// Type I = 1 and Type II = 2, odd inversion saves 2*Ty - N cost units (positive exactly
// when Ty > (W-1)/2) and full inversion saves 2*(T2 - T4**) (positive when T2 > T4**).
// The larger positive saving wins; on a tie odd inversion is taken.
//
// Full inversion is only allowed when the receiver can tell it from odd inversion: both
// set the inversion bit, and the shared scheme II/III decoder separates them by running
// the TY majority vote on the received word. After odd inversion that vote is always
// 0; after full inversion it equals 2*(T4** + Te - T2) > N in terms of the transmit-side
// counts. That is why this block also receives the Te count, which the scheme II
// datapath would otherwise not need. This restriction is a choice of this design that
// makes the code decodable. Combinational.
module module_a
  import gray_enc_pkg::*;
#(
  parameter int unsigned N  = 7,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic [CW-1:0] ty_cnt_i,
  input  logic [CW-1:0] t2_cnt_i,
  input  logic [CW-1:0] t4s_cnt_i,
  input  logic [CW-1:0] te_cnt_i,
  output inv_mode_e     mode_o
);
  int gain_odd, gain_full;
  logic odd_ok, full_ok, full_decodable;

  always_comb begin
    gain_odd       = 2 * int'(ty_cnt_i) - int'(N);
    gain_full      = 2 * (int'(t2_cnt_i) - int'(t4s_cnt_i));
    full_decodable = 2 * (int'(t4s_cnt_i) + int'(te_cnt_i) - int'(t2_cnt_i)) > int'(N);
    odd_ok         = gain_odd > 0;
    full_ok        = (gain_full > 0) && full_decodable;
    if (odd_ok && (!full_ok || gain_odd >= gain_full)) mode_o = INV_ODD;
    else if (full_ok)                                  mode_o = INV_FULL;
    else                                               mode_o = INV_NONE;
  end
endmodule
