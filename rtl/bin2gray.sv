// bin2gray -- binary to reflected-binary (Gray) code converter.
//
// Purely combinational: gray_o[W-1] = bin_i[W-1] and gray_o[i] = bin_i[i+1] ^ bin_i[i].
// Consecutive binary values map to code words that differ in exactly one bit (the
// 4-bit table of the design is reproduced by W = 4). At the transmitting network
// interface the input is the body flit with a 0 appended as bit W-1, which therefore
// stays 0 at the output and is later used as the inversion bit. W defaults to the 8-bit
// link of the design.
module bin2gray #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] bin_i,
  output logic [W-1:0] gray_o
);
  always_comb gray_o = bin_i ^ (bin_i >> 1);
endmodule
