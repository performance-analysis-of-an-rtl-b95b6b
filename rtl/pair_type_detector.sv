// pair_type_detector -- classifies the transition on two adjacent link lines.
//
// One line of each adjacent pair sits at an even bit position (suffix _e) and one at an
// odd position (suffix _o). From the previous link values and the new, not yet inverted
// values it raises four flags, the per-pair outputs of the TY, Te, T2 and T4** blocks:
//   t2_o  : Type II, both lines switch in opposite directions (01 <-> 10).
//   t4s_o : Type IV with unequal line values, i.e. neither line switches and the two
//           hold different values (01 -> 01, 10 -> 10). Full inversion turns exactly
//           these into Type II, and Type II into these.
//   ty_o  : odd inversion lowers the coupling cost of the pair: a Type II, a Type I in
//           which the odd line switches, or a Type I in which the even line switches
//           while the previous values were equal. Every other pair costs one unit more
//           after odd inversion, so odd inversion pays off when most pairs are TY.
//   te_o  : the same for even inversion (even and odd roles swapped).
// The grouping follows the transition-type table of the design; which Type I
// sub-class maps to which type after inversion is worked out here from the
// definitions of the types. Purely combinational.
module pair_type_detector (
  input  logic prev_e_i,   // previous link value, even-position line
  input  logic prev_o_i,   // previous link value, odd-position line
  input  logic cur_e_i,    // new value, even-position line
  input  logic cur_o_i,    // new value, odd-position line
  output logic ty_o,
  output logic te_o,
  output logic t2_o,
  output logic t4s_o
);
  logic sw_e, sw_o, prev_same;

  always_comb begin
    sw_e      = prev_e_i ^ cur_e_i;
    sw_o      = prev_o_i ^ cur_o_i;
    prev_same = ~(prev_e_i ^ prev_o_i);
    t2_o      = sw_e & sw_o & ~prev_same;
    t4s_o     = ~sw_e & ~sw_o & ~prev_same;
    ty_o      = t2_o | (~sw_e & sw_o) | (sw_e & ~sw_o & prev_same);
    te_o      = t2_o | (sw_e & ~sw_o) | (~sw_e & sw_o & prev_same);
  end
endmodule
