// scheme23_decoder -- decoder block D shared by schemes II and III.
//
// Inputs are the received word y_i and r_i, the word the link carried before it. One
// TY detector per adjacent pair and a majority voter evaluate Ty > (W-1)/2 on (r_i, y_i).
// Together with the inversion bit y_i[W-1] this identifies the inversion the encoder
// applied: {inv, vote} = 00 none, 10 odd (half), 11 full, 01 even. The scheme II and III
// encoders only choose inversions for which this holds (see module_a and module_c); a
// scheme II encoder never produces 01. The XOR stage undoes the inversion, bringing bit
// W-1 back to 0. Combinational; W must be even.
module scheme23_decoder
  import gray_enc_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] y_i,
  input  logic [W-1:0] r_i,
  output logic [W-1:0] z_o,
  output inv_mode_e    mode_o
);
  if (W % 2 != 0 || W < 4) begin : g_bad_w
    $error("scheme23_decoder: W must be even and at least 4");
  end

  logic [W-2:0] ty, te, t2, t4s;
  logic         vote;

  pair_type_array #(.W(W)) u_pairs (
    .prev_i(r_i), .cur_i(y_i), .ty_o(ty), .te_o(te), .t2_o(t2), .t4s_o(t4s)
  );
  majority_voter #(.N(W - 1)) u_maj (.votes_i(ty), .maj_o(vote));

  always_comb mode_o = inv_mode_e'({y_i[W-1], vote});

  inv_apply #(.W(W)) u_xor (.word_i(y_i), .mode_i(mode_o), .word_o(z_o));
endmodule
