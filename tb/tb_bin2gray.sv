// tb_bin2gray -- checks bin2gray against the 4-bit conversion table of the design
// (all 16 rows, written out below) and, at the default 8-bit width, against the
// single-bit-change property and an independent bitwise formula for all 256 inputs.
module tb_bin2gray;
  int checks = 0, failures = 0;

  logic [3:0] b4, g4;
  logic [7:0] b8, g8, g8_prev;
  bin2gray #(.W(4)) u4 (.bin_i(b4), .gray_o(g4));
  bin2gray          u8 (.bin_i(b8), .gray_o(g8));

  // Gray column of the 4-bit table, rows 0..15
  localparam logic [3:0] TABLE [16] = '{4'b0000, 4'b0001, 4'b0011, 4'b0010,
                                        4'b0110, 4'b0111, 4'b0101, 4'b0100,
                                        4'b1100, 4'b1101, 4'b1111, 4'b1110,
                                        4'b1010, 4'b1011, 4'b1001, 4'b1000};

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
    for (int i = 0; i < 16; i++) begin
      b4 = 4'(i); #1;
      check(g4 == TABLE[i], $sformatf("table row %0d: got %b", i, g4));
    end
    for (int i = 0; i < 256; i++) begin
      b8 = 8'(i); #1;
      check(g8 == tb_ref_pkg::to_gray(b8), $sformatf("8-bit value %0d", i));
      if (i > 0) check($countones(g8 ^ g8_prev) == 1, $sformatf("one-bit step at %0d", i));
      g8_prev = g8;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
