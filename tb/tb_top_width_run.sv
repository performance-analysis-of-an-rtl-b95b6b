// tb_top_width_run -- drives one gray_noc_top of link width W with FLITS random flits per
// channel (headers and idle cycles mixed in, links looped back) and checks without a
// reference encoder: every flit returns unchanged two clocks later, the receiver detects
// the inversion the transmitter applied, no coded word costs more than the same word
// uninverted, and each channel uses every inversion its scheme allows. Results are
// returned through checks/failures once done is set. Used by tb_gray_noc_top_widths.
module tb_top_width_run #(
  parameter int W     = 16,
  parameter int FLITS = 6000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  logic                rst_n = 0;
  logic [2:0]          tx_valid = '0, tx_head = '0;
  logic [2:0][W-2:0]   tx_data = '0;
  logic [2:0][W-1:0]   link;
  logic [2:0]          link_valid, link_head;
  logic [2:0][1:0]     tx_mode, rx_mode;
  logic [2:0][W-2:0]   rx_data;
  logic [2:0]          rx_valid, rx_head;

  gray_noc_top #(.W(W)) dut (
    .clk, .rst_n,
    .tx_valid_i(tx_valid), .tx_head_i(tx_head), .tx_data_i(tx_data),
    .link_o(link), .link_valid_o(link_valid), .link_head_o(link_head), .tx_mode_o(tx_mode),
    .link_i(link), .link_valid_i(link_valid), .link_head_i(link_head),
    .rx_data_o(rx_data), .rx_valid_o(rx_valid), .rx_head_o(rx_head), .rx_mode_o(rx_mode)
  );

  function automatic int cost(logic [W-1:0] p, logic [W-1:0] n);
    int c = 0;
    for (int k = 0; k < W - 1; k++) begin
      logic sa = p[k] ^ n[k];
      logic sb = p[k+1] ^ n[k+1];
      if (sa && sb) c += (n[k] != n[k+1]) ? 2 : 0;
      else if (sa || sb) c += 1;
    end
    return c;
  endfunction

  function automatic logic [W-1:0] mask_of(logic [1:0] m);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = (i % 2 == 1) ? m[1] : m[0];
    return r;
  endfunction

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL W=%0d %s", W, what);
    end
  endtask

  typedef struct { logic head; logic [W-2:0] data; longint cyc; } flit_t;
  flit_t      sent [3][$];
  longint     cycle = 0;
  int         mode_seen [3][4];
  int         received [3];
  logic [W-1:0] prev_link [3];
  logic [1:0] link_mode [3];

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int s = 0; s < 3; s++) prev_link[s] = '0;
  end

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n) begin
    for (int s = 0; s < 3; s++) begin
      if (rx_valid[s]) begin
        flit_t f;
        if (sent[s].size() == 0) check(0, "unexpected flit");
        else begin
          f = sent[s].pop_front();
          received[s]++;
          check(rx_data[s] == f.data && rx_head[s] == f.head, $sformatf("ch %0d data", s));
          check(cycle - f.cyc == 2, $sformatf("ch %0d latency", s));
          if (!f.head) check(rx_mode[s] == link_mode[s], $sformatf("ch %0d mode", s));
        end
      end
      if (link_valid[s]) begin
        link_mode[s] = tx_mode[s];
        if (!link_head[s]) begin
          mode_seen[s][tx_mode[s]]++;
          check(cost(prev_link[s], link[s]) <= cost(prev_link[s], link[s] ^ mask_of(tx_mode[s])),
                "cost bound");
        end
        prev_link[s] = link[s];
      end
    end
  end

  for (genvar s = 0; s < 3; s++) begin : g_drv
    initial begin
      @(posedge rst_n);
      @(negedge clk);
      for (int n = 0; n < FLITS; n++) begin
        while ($urandom_range(0, 4) == 0) begin
          tx_valid[s] = 0;
          @(negedge clk);
        end
        tx_valid[s] = 1;
        tx_head[s]  = (n % 8 == 0);
        tx_data[s]  = (W - 1)'({$urandom, $urandom});
        sent[s].push_back('{head: tx_head[s], data: tx_data[s], cyc: cycle});
        @(negedge clk);
      end
      tx_valid[s] = 0;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (received[0] == FLITS && received[1] == FLITS && received[2] == FLITS);
    @(negedge clk);
    for (int s = 0; s < 3; s++) begin
      check(mode_seen[s][0] > 0 && mode_seen[s][2] > 0, $sformatf("ch %0d none/odd", s));
      check((mode_seen[s][3] > 0) == (s >= 1), $sformatf("ch %0d full inversion", s));
      check((mode_seen[s][1] > 0) == (s == 2), $sformatf("ch %0d even inversion", s));
      $display("W=%0d scheme %0d: none %0d odd %0d even %0d full %0d", W, s + 1,
               mode_seen[s][0], mode_seen[s][2], mode_seen[s][1], mode_seen[s][3]);
    end
    done = 1;
  end
endmodule
