// tb_scheme1_encoder -- every previous link word (256) against every new Gray word
// with bit 7 = 0 (128). The encoded word must be the new word with the inversion the
// cost-based reference model picks for scheme 1, and its coupling cost must never
// exceed that of the uncoded word.
module tb_scheme1_encoder;
  import tb_ref_pkg::*;
  import gray_enc_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] z, r, x;
  inv_mode_e  mode;
  longint     cost_plain = 0, cost_coded = 0;

  scheme1_encoder dut (.z_i(z), .r_i(r), .x_o(x), .mode_o(mode));

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] m;
    for (int p = 0; p < 256; p++)
      for (int d = 0; d < 128; d++) begin
        r = 8'(p); z = 8'(d); #1;
        m = ref_mode(1, r, z);
        check(mode == inv_mode_e'(m), $sformatf("mode r=%h z=%h got %b exp %b", r, z, mode, m));
        check(x == (z ^ mask_of(m)), $sformatf("word r=%h z=%h got %h", r, z, x));
        check(cost(r, x) <= cost(r, z), $sformatf("cost r=%h z=%h", r, z));
        cost_plain += cost(r, z);
        cost_coded += cost(r, x);
      end
    $display("coupling cost over all cases: uncoded %0d coded %0d", cost_plain, cost_coded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
