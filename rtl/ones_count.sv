// ones_count -- population count of N flag bits (the "Ones" blocks of the encoders).
//
// Combinational adder tree written as a loop; the result is CW = clog2(N+1) bits wide,
// enough for the value N. With the 8-bit link there are N = 7 adjacent line pairs and a
// 3-bit count.
module ones_count #(
  parameter int unsigned N  = 7,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  bits_i,
  output logic [CW-1:0] count_o
);
  always_comb begin
    count_o = '0;
    for (int unsigned i = 0; i < N; i++) count_o = count_o + CW'(bits_i[i]);
  end
endmodule
