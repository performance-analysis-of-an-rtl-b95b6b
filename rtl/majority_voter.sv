// majority_voter -- asserts maj_o when more than half of the N inputs are 1.
//
// Used with the TY flags of the N = W-1 adjacent pairs, it evaluates the odd-inversion
// condition Ty > Tx, equivalently Ty > (W-1)/2. With W even, N is odd and there is no
// tie. Built as a ones count compared against N/2; combinational.
module majority_voter #(
  parameter int unsigned N = 7
) (
  input  logic [N-1:0] votes_i,
  output logic         maj_o
);
  localparam int unsigned CW = $clog2(N + 1);
  logic [CW-1:0] count;

  ones_count #(.N(N), .CW(CW)) u_count (.bits_i(votes_i), .count_o(count));

  always_comb maj_o = (32'(count) * 2) > N;
endmodule
