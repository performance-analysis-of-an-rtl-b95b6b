// scheme1_encoder -- encoder block E of scheme I (odd inversion or none).
//
// Compares the new Gray-coded word z_i (bit W-1 = 0) with r_i, the word the link
// carried last. One TY detector per adjacent pair flags pairs whose coupling cost odd
// inversion lowers; a majority voter checks Ty > (W-1)/2 and, if so, the XOR stage
// inverts every odd-position bit. Bit W-1 is odd (W even), so it becomes the inversion
// bit on the link. Combinational; W must be even.
module scheme1_encoder
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
    $error("scheme1_encoder: W must be even and at least 4");
  end

  logic [W-2:0] ty, te, t2, t4s;
  logic         odd;

  pair_type_array #(.W(W)) u_pairs (
    .prev_i(r_i), .cur_i(z_i), .ty_o(ty), .te_o(te), .t2_o(t2), .t4s_o(t4s)
  );
  majority_voter #(.N(W - 1)) u_maj (.votes_i(ty), .maj_o(odd));

  always_comb mode_o = odd ? INV_ODD : INV_NONE;

  inv_apply #(.W(W)) u_xor (.word_i(z_i), .mode_i(mode_o), .word_o(x_o));
endmodule
