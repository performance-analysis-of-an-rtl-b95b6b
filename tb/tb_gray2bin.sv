// tb_gray2bin -- checks gray2bin: every 4-bit Gray code of the design's conversion table
// must return its row number, and at 8 bits every Gray word must convert back to the
// binary value whose independently computed Gray code it is.
module tb_gray2bin;
  int checks = 0, failures = 0;

  logic [3:0] g4, b4;
  logic [7:0] g8, b8;
  gray2bin #(.W(4)) u4 (.gray_i(g4), .bin_o(b4));
  gray2bin          u8 (.gray_i(g8), .bin_o(b8));

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
      g4 = TABLE[i]; #1;
      check(b4 == 4'(i), $sformatf("table row %0d: got %0d", i, b4));
    end
    for (int i = 0; i < 256; i++) begin
      g8 = tb_ref_pkg::to_gray(8'(i)); #1;
      check(b8 == 8'(i), $sformatf("8-bit value %0d: got %0d", i, b8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
