// tb_gray_noc_top_widths -- runs the three coded channels at link widths 4 and 16
// (besides the default 8 covered by tb_gray_noc_top) to show that the width parameter
// works: see tb_top_width_run for what is checked.
module tb_gray_noc_top_widths;
  logic clk = 0;
  int   c4, f4, c16, f16;
  logic d4, d16;

  always #5 clk = ~clk;

  tb_top_width_run #(.W(4))  u_w4  (.clk, .checks(c4),  .failures(f4),  .done(d4));
  tb_top_width_run #(.W(16)) u_w16 (.clk, .checks(c16), .failures(f16), .done(d16));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c16, f4 + f16 + 1);
    $finish;
  end

  initial begin
    wait (d4 && d16);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c16, f4 + f16);
    $finish;
  end
endmodule
