// gray_noc_top -- three end-to-end coded NoC channels, one per coding scheme.
//
// Channel s (index 0, 1, 2 for schemes I, II, III) is a transmitting network interface
// (ni_encoder) and a receiving one (ni_decoder). The routers and links between them are
// outside this design: the coding needs no change to them, since with wormhole
// switching every link on the route sees the same flit sequence. So the encoded link
// word of each channel leaves the top on link_o and the receiving side is fed from
// link_i; connecting link_o straight to link_i (or through any number of pipeline
// stages) closes a channel.
//
// Timing per channel: a flit accepted with tx_valid_i appears on link_o one clock later,
// and a link word accepted with link_valid_i appears on rx_data_o one clock later.
// tx_mode_o and rx_mode_o report the inversion applied and the one detected.
// rst_n: active-low synchronous reset of all six interfaces.
module gray_noc_top
  import gray_enc_pkg::*;
#(
  parameter int unsigned W = LINK_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // transmit side
  input  logic [2:0]           tx_valid_i,
  input  logic [2:0]           tx_head_i,
  input  logic [2:0][W-2:0]    tx_data_i,
  output logic [2:0][W-1:0]    link_o,
  output logic [2:0]           link_valid_o,
  output logic [2:0]           link_head_o,
  output logic [2:0][1:0]      tx_mode_o,
  // receive side
  input  logic [2:0][W-1:0]    link_i,
  input  logic [2:0]           link_valid_i,
  input  logic [2:0]           link_head_i,
  output logic [2:0][W-2:0]    rx_data_o,
  output logic [2:0]           rx_valid_o,
  output logic [2:0]           rx_head_o,
  output logic [2:0][1:0]      rx_mode_o
);
  for (genvar s = 0; s < 3; s++) begin : g_ch
    inv_mode_e tx_mode, rx_mode;

    ni_encoder #(.W(W), .SCHEME(s + 1)) u_tx (
      .clk, .rst_n,
      .valid_i(tx_valid_i[s]), .head_i(tx_head_i[s]), .data_i(tx_data_i[s]),
      .link_o(link_o[s]), .link_valid_o(link_valid_o[s]), .link_head_o(link_head_o[s]),
      .mode_o(tx_mode)
    );

    ni_decoder #(.W(W), .SCHEME(s + 1)) u_rx (
      .clk, .rst_n,
      .link_i(link_i[s]), .link_valid_i(link_valid_i[s]), .link_head_i(link_head_i[s]),
      .data_o(rx_data_o[s]), .valid_o(rx_valid_o[s]), .head_o(rx_head_o[s]),
      .mode_o(rx_mode)
    );

    assign tx_mode_o[s] = tx_mode;
    assign rx_mode_o[s] = rx_mode;
  end
endmodule
