// tb_scheme23_decoder -- for every previous link word and every Gray word with bit 7 = 0,
// encodes with the scheme II and the scheme III reference rules and checks that the
// shared decoder returns the original word and reports the inversion applied. All four
// inversions occur, so this also shows the code is uniquely decodable.
module tb_scheme23_decoder;
  import tb_ref_pkg::*;
  import gray_enc_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] y, r, z;
  inv_mode_e  mode;
  int         seen [4];

  scheme23_decoder dut (.y_i(y), .r_i(r), .z_o(z), .mode_o(mode));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] m;
    for (int s = 2; s <= 3; s++)
      for (int p = 0; p < 256; p++)
        for (int d = 0; d < 128; d++) begin
          m = ref_mode(s, 8'(p), 8'(d));
          r = 8'(p);
          y = 8'(d) ^ mask_of(m); #1;
          checks++;
          seen[m]++;
          if (z != 8'(d) || mode != inv_mode_e'(m)) begin
            failures++;
            if (failures < 10) $display("FAIL s=%0d p=%h d=%h y=%h got %h/%b", s, p, d, y, z, mode);
          end
        end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL mode %0d never exercised", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
