// tb_module_c -- drives module_c with the class counts of every pair of previous
// link word (256 values) and new Gray word (128 values, bit 7 = 0) and compares the
// decision with the scheme 3 rule of the cost-based reference model.
module tb_module_c;
  import tb_ref_pkg::*;
  import gray_enc_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0] ty_c, te_c, t2_c, t4s_c;
  inv_mode_e  mode;
  int         seen [4];

  module_c dut (.ty_cnt_i(ty_c), .te_cnt_i(te_c), .t2_cnt_i(t2_c), .t4s_cnt_i(t4s_c),
                 .mode_o(mode));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ty, te, t2, t4s;
    logic [1:0] exp_mode;
    for (int p = 0; p < 256; p++)
      for (int z = 0; z < 128; z++) begin
        class_counts(8'(p), 8'(z), ty, te, t2, t4s);
        ty_c = 3'(ty); te_c = 3'(te); t2_c = 3'(t2); t4s_c = 3'(t4s);
        #1;
        exp_mode = ref_mode(3, 8'(p), 8'(z));
        checks++;
        if (mode != inv_mode_e'(exp_mode)) begin
          failures++;
          if (failures < 10) $display("FAIL p=%h z=%h got %b exp %b", p, z, mode, exp_mode);
        end
        seen[int'(mode)]++;
      end
    $display("modes chosen: none=%0d even=%0d odd=%0d full=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
