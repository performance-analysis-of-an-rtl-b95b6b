// pair_type_array -- one pair_type_detector per adjacent pair of a W-bit link word.
//
// Pair k covers lines k and k+1 (k = 0 .. W-2), so there are W-1 pairs, the last one
// including the inversion bit. Exactly one line of each pair has an odd index; it is
// routed to the detector's odd-position inputs. The four flag vectors feed the ones
// counters and the majority voter. Combinational.
module pair_type_array #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] prev_i,   // word the link carried last
  input  logic [W-1:0] cur_i,    // new word, before inversion
  output logic [W-2:0] ty_o,
  output logic [W-2:0] te_o,
  output logic [W-2:0] t2_o,
  output logic [W-2:0] t4s_o
);
  for (genvar k = 0; k < int'(W) - 1; k++) begin : g_pair
    localparam int unsigned KE = (k % 2 == 0) ? k : k + 1;  // even-position line
    localparam int unsigned KO = (k % 2 == 0) ? k + 1 : k;  // odd-position line
    pair_type_detector u_det (
      .prev_e_i (prev_i[KE]),
      .prev_o_i (prev_i[KO]),
      .cur_e_i  (cur_i[KE]),
      .cur_o_i  (cur_i[KO]),
      .ty_o     (ty_o[k]),
      .te_o     (te_o[k]),
      .t2_o     (t2_o[k]),
      .t4s_o    (t4s_o[k])
    );
  end
endmodule
