// gray2bin -- reflected-binary (Gray) to binary code converter.
//
// Purely combinational inverse of bin2gray: bin_o[W-1] = gray_i[W-1] and
// bin_o[i] = bin_o[i+1] ^ gray_i[i], i.e. each binary bit is the XOR of all Gray bits at
// and above its position. Used at the receiving network interface after the decoder.
// W defaults to the 8-bit link of the design.
module gray2bin #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] gray_i,
  output logic [W-1:0] bin_o
);
  always_comb begin
    bin_o[W-1] = gray_i[W-1];
    for (int i = int'(W) - 2; i >= 0; i--) bin_o[i] = bin_o[i+1] ^ gray_i[i];
  end
endmodule
