// ni_decoder -- receive side of a network interface with Gray coding and
// coupling-aware inversion coding.
//
// Decoder D of the selected scheme compares the received link word with the word the
// link carried before it, undoes the inversion the encoder applied and returns the
// Gray-coded word with bit W-1 = 0; gray2bin then restores the binary body flit. The
// reference register takes every valid link word, header flits included, exactly as
// the transmitter's previous-encoded register does. Header flits are passed through
// uncoded.
//
// Interface: link_i is sampled when link_valid_i is high; data_o, valid_o, head_o and
// mode_o (the inversion detected, INV_NONE for a header) appear one clock later.
// rst_n is an active-low synchronous reset that clears the reference to 0, matching the
// transmitter's reset link value. Keeping the previous received (still encoded) word
// as the reference, rather than the previous decoded one, is this design's choice: it
// is the word the encoder compared against. With SCHEME = 2 an assertion flags a
// received word that decodes as even inversion, which that transmitter never sends.
module ni_decoder
  import gray_enc_pkg::*;
#(
  parameter int unsigned W      = 8,
  parameter int unsigned SCHEME = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] link_i,
  input  logic         link_valid_i,
  input  logic         link_head_i,
  output logic [W-2:0] data_o,
  output logic         valid_o,
  output logic         head_o,
  output inv_mode_e    mode_o
);
  logic [W-1:0] prev_word, gray_word, bin_word;
  inv_mode_e    dec_mode;

  if (SCHEME == 1) begin : g_s1
    scheme1_decoder #(.W(W)) u_dec (.y_i(link_i), .z_o(gray_word), .mode_o(dec_mode));
  end else if (SCHEME == 2 || SCHEME == 3) begin : g_s23
    scheme23_decoder #(.W(W)) u_dec (
      .y_i(link_i), .r_i(prev_word), .z_o(gray_word), .mode_o(dec_mode));
  end else begin : g_bad_scheme
    $error("ni_decoder: SCHEME must be 1, 2 or 3");
  end

  // A scheme II transmitter never uses even inversion, so seeing its code means the two
  // ends have lost step (for example a dropped or reordered link word).
  a_no_even_in_scheme2: assert property (@(posedge clk) disable iff (!rst_n)
    link_valid_i && !link_head_i && SCHEME == 2 |-> dec_mode != INV_EVEN);

  gray2bin #(.W(W)) u_g2b (.gray_i(gray_word), .bin_o(bin_word));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_word <= '0;
      data_o    <= '0;
      valid_o   <= 1'b0;
      head_o    <= 1'b0;
      mode_o    <= INV_NONE;
    end else begin
      valid_o <= link_valid_i;
      if (link_valid_i) begin
        prev_word <= link_i;
        head_o    <= link_head_i;
        data_o    <= link_head_i ? link_i[W-2:0] : bin_word[W-2:0];
        mode_o    <= link_head_i ? INV_NONE : dec_mode;
      end
    end
  end
endmodule
