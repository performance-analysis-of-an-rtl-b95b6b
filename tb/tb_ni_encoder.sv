// tb_ni_encoder -- streams 5000 random flits (about 1 in 8 a header, random idle
// cycles) through the scheme III transmit interface. A reference model keeps its own
// copy of the last link word and predicts every link word: headers as {0, data}, body
// flits as the Gray code of {0, data} with the reference inversion. Also checks the
// reset value, the one-cycle latency and that the link holds its value while idle.
module tb_ni_encoder;
  import tb_ref_pkg::*;
  import gray_enc_pkg::*;
  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0;
  logic       valid = 0, head = 0;
  logic [6:0] data = '0;
  logic [7:0] link;
  logic       link_valid, link_head;
  inv_mode_e  mode;
  int         seen [4];

  ni_encoder dut (.clk, .rst_n, .valid_i(valid), .head_i(head), .data_i(data),
                  .link_o(link), .link_valid_o(link_valid), .link_head_o(link_head),
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
    logic [7:0] prev = '0, exp_word, g;
    logic [1:0] m;
    logic       was_valid, was_head;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(link == '0 && !link_valid, "reset state");
    for (int n = 0; n < 5000; n++) begin
      valid = ($urandom_range(0, 3) != 0);
      head  = ($urandom_range(0, 7) == 0);
      data  = 7'($urandom);
      was_valid = valid;
      was_head  = head;
      g = to_gray({1'b0, data});
      m = was_head ? 2'b00 : ref_mode(3, prev, g);
      exp_word = !was_valid ? prev : was_head ? {1'b0, data} : (g ^ mask_of(m));
      @(negedge clk);
      check(link_valid == was_valid, $sformatf("valid latency at flit %0d", n));
      check(link == exp_word, $sformatf("link word %0d: got %h exp %h", n, link, exp_word));
      if (was_valid) begin
        check(link_head == was_head, "head flag");
        check(mode == inv_mode_e'(m), "mode");
        if (!was_head) seen[m]++;
      end
      prev = exp_word;
    end
    for (int i = 0; i < 4; i++) check(seen[i] > 0, $sformatf("mode %0d exercised", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
