// tb_gray_noc_top -- end-to-end test of the three coded channels at default width.
//
// Each channel's link output is wired straight back to its link input, standing in for
// the routers and links of the network. 12000 flits per channel are sent in packets
// (one header, then 1 to 8 body flits) with random idle cycles; half of the packets
// carry random data and half a counting sequence (correlated data). Checks, per channel:
// every flit arrives in order and unchanged exactly two clocks after it was sent,
// headers arrive uncoded and flagged, the inversion detected by the receiver equals the
// one the transmitter applied, and no coded link word has a higher coupling cost than
// the uncoded Gray word would have had. Each mechanism must occur at least once: header
// bypass, idle link, and every inversion the scheme can choose (scheme I: none and odd;
// II: none, odd, full; III: none, odd, even, full). Coupling-cost totals of plain
// binary, Gray and coded transfer are printed per scheme.
module tb_gray_noc_top;
  import tb_ref_pkg::*;
  import gray_enc_pkg::*;
  int checks = 0, failures = 0;

  localparam int FLITS = 12000;

  logic             clk = 0, rst_n = 0;
  logic [2:0]       tx_valid = '0, tx_head = '0;
  logic [2:0][6:0]  tx_data = '0;
  logic [2:0][7:0]  link;
  logic [2:0]       link_valid, link_head;
  logic [2:0][1:0]  tx_mode, rx_mode;
  logic [2:0][6:0]  rx_data;
  logic [2:0]       rx_valid, rx_head;

  gray_noc_top dut (
    .clk, .rst_n,
    .tx_valid_i(tx_valid), .tx_head_i(tx_head), .tx_data_i(tx_data),
    .link_o(link), .link_valid_o(link_valid), .link_head_o(link_head), .tx_mode_o(tx_mode),
    .link_i(link), .link_valid_i(link_valid), .link_head_i(link_head),
    .rx_data_o(rx_data), .rx_valid_o(rx_valid), .rx_head_o(rx_head), .rx_mode_o(rx_mode)
  );

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per channel: expected data/head with the cycle it was sent
  typedef struct packed { logic head; logic [6:0] data; longint cyc; } flit_t;
  flit_t  sent [3][$];
  longint cycle = 0;
  int     mode_seen [3][4];
  int     heads_seen [3], idle_seen [3], received [3];
  longint cost_bin [3], cost_gray [3], cost_coded [3];
  logic [7:0] prev_link [3] = '{default: '0};
  logic [7:0] prev_bin  [3] = '{default: '0};
  logic [7:0] prev_gray [3] = '{default: '0};
  logic [1:0] link_mode [3];

  always @(posedge clk) cycle <= cycle + 1;

  // receiver checks first (they refer to the link word of the previous cycle), then
  // the link monitor: cost accounting, coded-vs-uninverted cost bound, mode capture
  always @(negedge clk) if (rst_n) begin
    for (int s = 0; s < 3; s++) if (rx_valid[s]) begin
      flit_t f;
      if (sent[s].size() == 0) begin
        check(0, $sformatf("channel %0d: flit with nothing sent", s));
      end else begin
        f = sent[s].pop_front();
        received[s]++;
        check(rx_data[s] == f.data, $sformatf("ch %0d data got %h exp %h", s, rx_data[s], f.data));
        check(rx_head[s] == f.head, $sformatf("ch %0d head flag", s));
        check(cycle - f.cyc == 2, $sformatf("ch %0d latency %0d", s, cycle - f.cyc));
        if (!f.head) check(rx_mode[s] == link_mode[s], $sformatf("ch %0d mode tx %b rx %b", s, link_mode[s], rx_mode[s]));
      end
    end
    for (int s = 0; s < 3; s++) begin
      if (!link_valid[s]) idle_seen[s]++;
      else begin
        link_mode[s] = tx_mode[s];
        if (link_head[s]) heads_seen[s]++;
        else begin
          logic [7:0] g;
          g = link[s] ^ mask_of(tx_mode[s]);
          mode_seen[s][tx_mode[s]]++;
          check(cost(prev_link[s], link[s]) <= cost(prev_link[s], g), "coded cost bound");
          cost_coded[s] += cost(prev_link[s], link[s]);
        end
        prev_link[s] = link[s];
      end
    end
  end

  // one driver per channel
  for (genvar s = 0; s < 3; s++) begin : g_drv
    initial begin
      int left, n = 0;
      logic [6:0] cnt;
      logic       counting;
      @(posedge rst_n);
      @(negedge clk);
      while (n < FLITS) begin
        counting = $urandom_range(0, 1);
        cnt      = 7'($urandom);
        left     = $urandom_range(2, 9);
        while (left > 0 && n < FLITS) begin
          if ($urandom_range(0, 4) == 0) begin
            tx_valid[s] = 0;
          end else begin
            tx_valid[s] = 1;
            tx_head[s]  = (left == 9) || (n == 0) || ($urandom_range(0, 9) == 0 && left == 1);
            tx_head[s]  = (left == 0) ? 1'b0 : tx_head[s];
            if (tx_head[s]) tx_data[s] = 7'($urandom);
            else if (counting) begin cnt = cnt + 1; tx_data[s] = cnt; end
            else tx_data[s] = 7'($urandom);
            if (!tx_head[s]) begin
              cost_bin[s] += cost(prev_bin[s], {1'b0, tx_data[s]});
              prev_bin[s]  = {1'b0, tx_data[s]};
              cost_gray[s] += cost(prev_gray[s], to_gray({1'b0, tx_data[s]}));
              prev_gray[s]  = to_gray({1'b0, tx_data[s]});
            end
            sent[s].push_back('{head: tx_head[s], data: tx_data[s], cyc: cycle});
            left--;
            n++;
          end
          @(negedge clk);
        end
        tx_head[s] = 0;
        tx_valid[s] = 0;
        @(negedge clk);
      end
      tx_valid[s] = 0;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (received[0] == FLITS && received[1] == FLITS && received[2] == FLITS);
    repeat (2) @(negedge clk);
    for (int s = 0; s < 3; s++) begin
      check(sent[s].size() == 0, $sformatf("ch %0d flits lost", s));
      check(heads_seen[s] > 0, $sformatf("ch %0d header bypass never happened", s));
      check(idle_seen[s] > 0, $sformatf("ch %0d idle link never happened", s));
      check(mode_seen[s][0] > 0 && mode_seen[s][2] > 0, $sformatf("ch %0d none/odd", s));
      if (s >= 1) check(mode_seen[s][3] > 0, $sformatf("ch %0d full inversion never happened", s));
      if (s == 2) check(mode_seen[s][1] > 0, $sformatf("ch %0d even inversion never happened", s));
      if (s <= 1) check(mode_seen[s][1] == 0, $sformatf("ch %0d even inversion not allowed", s));
      if (s == 0) check(mode_seen[s][3] == 0, $sformatf("ch %0d full inversion not allowed", s));
      $display("scheme %0d: headers %0d idle %0d none %0d odd %0d even %0d full %0d",
               s + 1, heads_seen[s], idle_seen[s], mode_seen[s][0], mode_seen[s][2],
               mode_seen[s][1], mode_seen[s][3]);
      $display("scheme %0d: coupling cost binary %0d gray %0d coded %0d",
               s + 1, cost_bin[s], cost_gray[s], cost_coded[s]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
