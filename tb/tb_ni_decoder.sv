// tb_ni_decoder -- feeds the scheme III receive interface a link stream produced by the
// cost-based reference encoder (5000 flits, headers and idle cycles mixed in) and checks
// that every body flit comes back as the original binary data one clock later, headers
// pass unchanged, and the reported inversion is the one the reference applied.
module tb_ni_decoder;
  import tb_ref_pkg::*;
  import gray_enc_pkg::*;
  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0;
  logic [7:0] link = '0;
  logic       link_valid = 0, link_head = 0;
  logic [6:0] data;
  logic       valid, head;
  inv_mode_e  mode;
  int         seen [4];

  ni_decoder dut (.clk, .rst_n, .link_i(link), .link_valid_i(link_valid),
                  .link_head_i(link_head), .data_o(data), .valid_o(valid), .head_o(head),
                  .mode_o(mode));

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] prev = '0, g;
    logic [6:0] d;
    logic [1:0] m;
    logic       v, h;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!valid, "reset state");
    for (int n = 0; n < 5000; n++) begin
      v = ($urandom_range(0, 3) != 0);
      h = ($urandom_range(0, 7) == 0);
      d = 7'($urandom);
      g = to_gray({1'b0, d});
      m = h ? 2'b00 : ref_mode(3, prev, g);
      link_valid = v;
      link_head  = h;
      if (v) link = h ? {1'b0, d} : (g ^ mask_of(m));
      @(negedge clk);
      check(valid == v, $sformatf("valid latency at %0d", n));
      if (v) begin
        check(data == d, $sformatf("flit %0d: got %h exp %h", n, data, d));
        check(head == h, "head flag");
        check(mode == inv_mode_e'(m), $sformatf("mode at %0d: got %b exp %b", n, mode, m));
        if (!h) seen[m]++;
        prev = link;
      end
    end
    for (int i = 0; i < 4; i++) check(seen[i] > 0, $sformatf("mode %0d exercised", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
