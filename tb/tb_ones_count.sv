// tb_ones_count -- all 128 inputs of the 7-input counter used with the 8-bit link,
// and 2000 random inputs of a 16-input instance.
module tb_ones_count;
  int checks = 0, failures = 0;
  logic [6:0]  b7;
  logic [2:0]  c7;
  logic [15:0] b16;
  logic [4:0]  c16;

  ones_count          u7  (.bits_i(b7),  .count_o(c7));
  ones_count #(.N(16)) u16 (.bits_i(b16), .count_o(c16));

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int ref_count(logic [15:0] v);
    int n = 0;
    for (int i = 0; i < 16; i++) if (v[i]) n++;
    return n;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      b7 = 7'(i); #1;
      check(int'(c7) == ref_count(16'(i)), $sformatf("N=7 input %b", b7));
    end
    for (int i = 0; i < 2000; i++) begin
      b16 = 16'($urandom); #1;
      check(int'(c16) == ref_count(b16), $sformatf("N=16 input %h", b16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
