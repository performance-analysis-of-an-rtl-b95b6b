// tb_pair_type_detector -- all 16 combinations of previous and new values of a line
// pair. Reference: TY (TE) is set when inverting the odd (even) line of the new value
// lowers the pair's coupling cost; T2 when both lines switch in opposite directions;
// T4** when neither switches and the two lines differ.
module tb_pair_type_detector;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic pe, po, ce, co, ty, te, t2, t4s;

  pair_type_detector dut (.prev_e_i(pe), .prev_o_i(po), .cur_e_i(ce), .cur_o_i(co),
                          .ty_o(ty), .te_o(te), .t2_o(t2), .t4s_o(t4s));

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0;
    for (int i = 0; i < 16; i++) begin
      {pe, po, ce, co} = 4'(i); #1;
      c0 = pair_cost(pe, po, ce, co);
      check(ty  == (pair_cost(pe, po, ce, ~co) < c0), $sformatf("ty  case %b", 4'(i)));
      check(te  == (pair_cost(pe, po, ~ce, co) < c0), $sformatf("te  case %b", 4'(i)));
      check(t2  == (c0 == 2), $sformatf("t2  case %b", 4'(i)));
      check(t4s == (pe == ce && po == co && pe != po), $sformatf("t4s case %b", 4'(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
