// tb_ref_pkg -- reference model for the testbenches of the 8-bit coded link.
//
// Works directly from coupling costs, not from the transition-class flags the RTL
// counts: the cost of a link transition is the sum over the 7 adjacent line pairs of 2
// when both lines switch in opposite directions, 1 when exactly one switches, else 0.
// The inversion rule is then stated in terms of savings:
//   odd  saving gO = cost(p,z) - cost(p, z ^ ODD_MASK)
//   even saving gE = cost(p,z) - cost(p, z ^ EVEN_MASK)
//   full saving gF = cost(p,z) - cost(p, ~z)
// Scheme I takes odd inversion when gO > 0. Full inversion is recognisable by the
// receiver exactly when gE > gF; scheme II may then use it, and scheme III offers full
// inversion when gE > gF and even inversion otherwise. The largest positive saving
// wins, odd inversion on ties.
package tb_ref_pkg;
  localparam int TW = 8;
  localparam logic [TW-1:0] ODD_MASK  = 8'hAA;
  localparam logic [TW-1:0] EVEN_MASK = 8'h55;

  function automatic int pair_cost(logic pa, logic pb, logic na, logic nb);
    logic sa = pa ^ na;
    logic sb = pb ^ nb;
    if (sa && sb) return (na != nb) ? 2 : 0;
    return (sa || sb) ? 1 : 0;
  endfunction

  function automatic int cost(logic [TW-1:0] p, logic [TW-1:0] n);
    int c = 0;
    for (int k = 0; k < TW - 1; k++) c += pair_cost(p[k], p[k+1], n[k], n[k+1]);
    return c;
  endfunction

  // returns 2-bit mode code: 00 none, 01 even, 10 odd, 11 full
  function automatic logic [1:0] ref_mode(int scheme, logic [TW-1:0] p, logic [TW-1:0] z);
    int c0 = cost(p, z);
    int go = c0 - cost(p, z ^ ODD_MASK);
    int ge = c0 - cost(p, z ^ EVEN_MASK);
    int gf = c0 - cost(p, ~z);
    int galt;
    logic [1:0] alt;
    if (scheme == 1) return (go > 0) ? 2'b10 : 2'b00;
    if (scheme == 2) begin
      galt = (ge > gf) ? gf : -1;
      alt  = 2'b11;
    end else begin
      galt = (ge > gf) ? gf : ge;
      alt  = (ge > gf) ? 2'b11 : 2'b01;
    end
    if (go > 0 && go >= galt) return 2'b10;
    if (galt > 0) return alt;
    return 2'b00;
  endfunction

  function automatic logic [TW-1:0] mask_of(logic [1:0] mode);
    return (mode[1] ? ODD_MASK : '0) | (mode[0] ? EVEN_MASK : '0);
  endfunction

  function automatic logic [TW-1:0] to_gray(logic [TW-1:0] b);
    logic [TW-1:0] g;
    for (int i = 0; i < TW; i++) g[i] = (i == TW - 1) ? b[i] : (b[i] ^ b[i+1]);
    return g;
  endfunction
  // Counts of the four transition classes over the 7 pairs, each class found from its
  // effect on the pair cost (TY/TE: odd/even inversion lowers it; T2: cost 2; T4**:
  // no switching, unequal lines). Even/odd position follows the bit index.
  function automatic void class_counts(logic [TW-1:0] p, logic [TW-1:0] z,
                                       output int ty, output int te, output int t2,
                                       output int t4s);
    ty = 0; te = 0; t2 = 0; t4s = 0;
    for (int k = 0; k < TW - 1; k++) begin
      int c0 = pair_cost(p[k], p[k+1], z[k], z[k+1]);
      int co = (k % 2 == 0) ? pair_cost(p[k], p[k+1], z[k], ~z[k+1])
                            : pair_cost(p[k], p[k+1], ~z[k], z[k+1]);
      int ce = (k % 2 == 0) ? pair_cost(p[k], p[k+1], ~z[k], z[k+1])
                            : pair_cost(p[k], p[k+1], z[k], ~z[k+1]);
      if (co < c0) ty++;
      if (ce < c0) te++;
      if (c0 == 2) t2++;
      if (p[k] == z[k] && p[k+1] == z[k+1] && p[k] != p[k+1]) t4s++;
    end
  endfunction
endpackage
