// ni_encoder -- transmit side of a network interface with Gray coding and
// coupling-aware inversion coding.
//
// A body flit of W-1 bits gets a 0 appended as bit W-1, is converted to Gray code and
// handed to encoder E of the selected scheme (1, 2 or 3), which compares it with the
// previous encoded word and inverts odd, even, all or no positions. The result goes to
// the link register, which is also the "previous encoded" register E compares against.
// Header flits are not coded: they go on the link as {1'b0, data_i} so routers can read
// them, and still become the reference for the next flit.
//
// Interface: one flit per cycle when valid_i (the enable) is high; link_o, link_valid_o,
// link_head_o and mode_o (inversion applied, INV_NONE for a header) appear one clock
// later. While valid_i is low the link holds its value, so it does not toggle.
// rst_n is an active-low synchronous reset that clears the link word to 0; the receiver
// resets its reference to the same value. The flit framing (head/valid sideband), the
// register stage and the reset are this design's choices. An assertion checks that the
// chosen inversion is one the scheme offers.
module ni_encoder
  import gray_enc_pkg::*;
#(
  parameter int unsigned W      = 8,
  parameter int unsigned SCHEME = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_i,
  input  logic         head_i,
  input  logic [W-2:0] data_i,
  output logic [W-1:0] link_o,
  output logic         link_valid_o,
  output logic         link_head_o,
  output inv_mode_e    mode_o
);
  logic [W-1:0] gray_word, coded;
  inv_mode_e    coded_mode;

  bin2gray #(.W(W)) u_b2g (.bin_i({1'b0, data_i}), .gray_o(gray_word));

  if (SCHEME == 1) begin : g_s1
    scheme1_encoder #(.W(W)) u_enc (
      .z_i(gray_word), .r_i(link_o), .x_o(coded), .mode_o(coded_mode));
  end else if (SCHEME == 2) begin : g_s2
    scheme2_encoder #(.W(W)) u_enc (
      .z_i(gray_word), .r_i(link_o), .x_o(coded), .mode_o(coded_mode));
  end else if (SCHEME == 3) begin : g_s3
    scheme3_encoder #(.W(W)) u_enc (
      .z_i(gray_word), .r_i(link_o), .x_o(coded), .mode_o(coded_mode));
  end else begin : g_bad_scheme
    $error("ni_encoder: SCHEME must be 1, 2 or 3");
  end

  // The encoder may only choose inversions its scheme offers.
  a_mode_allowed: assert property (@(posedge clk) disable iff (!rst_n)
    valid_i && !head_i |-> (SCHEME == 3) ||
                           (coded_mode != INV_EVEN && (SCHEME == 2 || coded_mode != INV_FULL)));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      link_o       <= '0;
      link_valid_o <= 1'b0;
      link_head_o  <= 1'b0;
      mode_o       <= INV_NONE;
    end else begin
      link_valid_o <= valid_i;
      if (valid_i) begin
        link_head_o <= head_i;
        link_o      <= head_i ? {1'b0, data_i} : coded;
        mode_o      <= head_i ? INV_NONE : coded_mode;
      end
    end
  end
endmodule
