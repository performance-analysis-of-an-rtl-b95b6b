// module_c -- inversion decision of the scheme III encoder (odd, even, full or none).
//
// Inputs are the ones counts of the TY, Te, T2 and T4** flags over the N = W-1 adjacent
// pairs. Savings in coupling cost (Type I = 1, Type II = 2): odd inversion 2*Ty - N,
// even inversion 2*Te - N, full inversion 2*(T2 - T4**). The output code is odd '10',
// even '01', full '11', none '00'.
//
// Decodability: the link has a single inversion bit, set by odd and full inversion and
// left 0 by even and no inversion (bit W-1 is an odd position). The receiver separates
// each pair by the TY majority vote on the received word. That vote reads 0 after no
// and after odd inversion, 1 after full inversion exactly when
// 2*(T4** + Te - T2) > N, and 1 after even inversion exactly when that condition is
// false. So for every word exactly one of full and even inversion is decodable; this
// block offers that one besides odd and no inversion and takes the largest positive
// saving, odd inversion winning ties. The decodability rule is this design's own.
// Combinational.
module module_c
  import gray_enc_pkg::*;
#(
  parameter int unsigned N  = 7,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic [CW-1:0] ty_cnt_i,
  input  logic [CW-1:0] te_cnt_i,
  input  logic [CW-1:0] t2_cnt_i,
  input  logic [CW-1:0] t4s_cnt_i,
  output inv_mode_e     mode_o
);
  int gain_odd, gain_alt;
  logic full_decodable, odd_ok, alt_ok;
  inv_mode_e alt_mode;

  always_comb begin
    gain_odd       = 2 * int'(ty_cnt_i) - int'(N);
    full_decodable = 2 * (int'(t4s_cnt_i) + int'(te_cnt_i) - int'(t2_cnt_i)) > int'(N);
    if (full_decodable) begin
      alt_mode = INV_FULL;
      gain_alt = 2 * (int'(t2_cnt_i) - int'(t4s_cnt_i));
    end else begin
      alt_mode = INV_EVEN;
      gain_alt = 2 * int'(te_cnt_i) - int'(N);
    end
    odd_ok = gain_odd > 0;
    alt_ok = gain_alt > 0;
    if (odd_ok && (!alt_ok || gain_odd >= gain_alt)) mode_o = INV_ODD;
    else if (alt_ok)                                 mode_o = alt_mode;
    else                                             mode_o = INV_NONE;
  end
endmodule
