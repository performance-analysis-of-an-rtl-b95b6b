// scheme2_encoder -- encoder block E of scheme II (odd, full or no inversion).
//
// Compares the new Gray-coded word z_i (bit W-1 = 0) with r_i, the word the link
// carried last. One detector per adjacent pair raises the TY, Te, T2 and T4** flags;
// four ones counters (clog2(W) bits each) count them and module_a picks the inversion,
// which the XOR stage applies to the whole W-bit word. Besides the TY, T2 and T4** counts of the scheme, the Te count is formed too: the decision block needs it to allow full inversion only when the receiver can recognise it (see module_a).
// Bit W-1 is an odd position, so odd and full inversion set it (the inversion bit) and
// even inversion leaves it 0. Combinational; W must be even.
module scheme2_encoder
  import gray_enc_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] z_i,
  input  logic [W-1:0] r_i,
  output logic [W-1:0] x_o,
  output inv_mode_e    mode_o
);
  if (W % 2 != 0 || W < 4) begin : g_bad_w
    $error("scheme2_encoder: W must be even and at least 4");
  end

  localparam int unsigned CW = $clog2(W);

  logic [W-2:0]  ty, te, t2, t4s;
  logic [CW-1:0] ty_cnt, te_cnt, t2_cnt, t4s_cnt;

  pair_type_array #(.W(W)) u_pairs (
    .prev_i(r_i), .cur_i(z_i), .ty_o(ty), .te_o(te), .t2_o(t2), .t4s_o(t4s)
  );

  ones_count #(.N(W - 1), .CW(CW)) u_ty_cnt  (.bits_i(ty),  .count_o(ty_cnt));
  ones_count #(.N(W - 1), .CW(CW)) u_te_cnt  (.bits_i(te),  .count_o(te_cnt));
  ones_count #(.N(W - 1), .CW(CW)) u_t2_cnt  (.bits_i(t2),  .count_o(t2_cnt));
  ones_count #(.N(W - 1), .CW(CW)) u_t4s_cnt (.bits_i(t4s), .count_o(t4s_cnt));

  module_a #(.N(W - 1), .CW(CW)) u_decide (
    .ty_cnt_i(ty_cnt), .te_cnt_i(te_cnt), .t2_cnt_i(t2_cnt), .t4s_cnt_i(t4s_cnt),
    .mode_o(mode_o)
  );

  inv_apply #(.W(W)) u_xor (.word_i(z_i), .mode_i(mode_o), .word_o(x_o));
endmodule
