// scheme1_decoder -- decoder block D of scheme I.
//
// The scheme I encoder only ever odd-inverts, and the inversion bit (bit W-1, an odd
// position) tells when it did. The decoder odd-inverts the received word back when that
// bit is 1, which also returns bit W-1 to 0. Combinational; W must be even.
module scheme1_decoder
  import gray_enc_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] y_i,     // word received from the link
  output logic [W-1:0] z_o,     // Gray-coded word, bit W-1 = 0
  output inv_mode_e    mode_o   // inversion that was undone
);
  always_comb mode_o = y_i[W-1] ? INV_ODD : INV_NONE;

  inv_apply #(.W(W)) u_xor (.word_i(y_i), .mode_i(mode_o), .word_o(z_o));
endmodule
