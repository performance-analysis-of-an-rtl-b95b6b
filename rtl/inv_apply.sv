// inv_apply -- the XOR stage of the encoders and decoders.
//
// Inverts the odd-position bits of word_i when mode_i[1] is set and the even-position
// bits when mode_i[0] is set, so INV_ODD, INV_EVEN, INV_FULL and INV_NONE give odd,
// even, full and no inversion. Inversion is its own inverse, so the same stage undoes
// it at the receiver. Combinational.
module inv_apply
  import gray_enc_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] word_i,
  input  inv_mode_e    mode_i,
  output logic [W-1:0] word_o
);
  always_comb
    for (int unsigned i = 0; i < W; i++)
      word_o[i] = word_i[i] ^ ((i % 2 == 1) ? mode_i[1] : mode_i[0]);
endmodule
