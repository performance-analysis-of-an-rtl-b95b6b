// tb_majority_voter -- all 128 inputs of the 7-input voter (more ones than zeros).
module tb_majority_voter;
  int checks = 0, failures = 0;
  logic [6:0] v;
  logic       m;

  majority_voter dut (.votes_i(v), .maj_o(m));

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
    int ones;
    for (int i = 0; i < 128; i++) begin
      v = 7'(i); #1;
      ones = 0;
      for (int b = 0; b < 7; b++) ones += v[b];
      check(m == (ones > 7 - ones), $sformatf("input %b", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
