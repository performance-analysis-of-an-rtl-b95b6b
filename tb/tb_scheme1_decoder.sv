// tb_scheme1_decoder -- for every previous link word and every Gray word with bit 7 = 0,
// encodes with the scheme I reference rule and checks that the decoder returns the
// original word and reports the inversion that was applied.
module tb_scheme1_decoder;
  import tb_ref_pkg::*;
  import gray_enc_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] y, z;
  inv_mode_e  mode;

  scheme1_decoder dut (.y_i(y), .z_o(z), .mode_o(mode));

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
        m = ref_mode(1, 8'(p), 8'(d));
        y = 8'(d) ^ mask_of(m); #1;
        checks++;
        if (z != 8'(d) || mode != inv_mode_e'(m)) begin
          failures++;
          if (failures < 10) $display("FAIL p=%h d=%h y=%h got %h/%b", p, d, y, z, mode);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
