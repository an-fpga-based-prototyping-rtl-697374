// tb_bxbar_switch: a 4-port switch with a host on every port. Each host
// frames its packets with a link framer and decodes what it receives with a
// deframer; its credit bookkeeping is written here: it sends to destination
// o only while its count of words in crosspoint (i, o) fits the crosspoint,
// and returns credits for its own receive buffer as it drains it (host 0
// drains slowly, so output 0 runs out of credit and stalls). Buffers must
// hold a largest packet plus 31 words, since credits count whole 32-word
// units.
// Checks: every packet arrives once, intact, at the host named by its flow,
// in order per source; per-output packet counts; no overflow or receive
// error; output credit stalls happen.
module tb_bxbar_switch;
  import ipc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int N = 4, XPD = 256, DBUF = 256, NPKT = 60;

  logic [7:0]   h2s_d [N], s2h_d [N];
  logic         h2s_k [N], s2h_k [N];
  logic [N-1:0] pkt_out, credit_stall, xp_overflow, rx_error;
  bxbar_switch #(.N(N), .XP_DEPTH(XPD), .DOWN_BUF_WORDS(DBUF), .REFRESH_CYCLES(3000)) dut (
    .clk, .rst_n, .rx_data(h2s_d), .rx_k(h2s_k), .tx_data(s2h_d), .tx_k(s2h_k),
    .pkt_out, .credit_stall, .xp_overflow, .rx_error);

  int checks = 0, failures = 0;
  // host side signals
  logic        t_valid [N], t_last [N], t_ready [N], c_valid [N], c_ready [N];
  logic [31:0] t_data [N];
  logic [15:0] c_data [N];
  logic        r_valid [N], r_last [N], r_err [N], r_cv [N], r_hcrc [N], r_par [N];
  logic [31:0] r_data [N];
  logic [15:0] r_cd [N];
  pkt_hdr_t    r_hdr [N];

  for (genvar h = 0; h < N; h++) begin : g_host
    link_tx #(.DATA_W(32)) u_tx (
      .clk, .rst_n, .in_valid(t_valid[h]), .in_data(t_data[h]), .in_last(t_last[h]),
      .in_ready(t_ready[h]), .cr_valid(c_valid[h]), .cr_data(c_data[h]), .cr_ready(c_ready[h]),
      .tx_data(h2s_d[h]), .tx_k(h2s_k[h]), .pkt_done(), .credit_sent());
    link_rx #(.DATA_W(32)) u_rx (
      .clk, .rst_n, .rx_data(s2h_d[h]), .rx_k(s2h_k[h]), .out_valid(r_valid[h]),
      .out_data(r_data[h]), .out_last(r_last[h]), .out_err(r_err[h]), .out_hdr(r_hdr[h]),
      .cr_valid(r_cv[h]), .cr_data(r_cd[h]), .hdr_crc_err(r_hcrc[h]), .cr_parity_err(r_par[h]));
  end

  // Host state.
  logic [31:0] txq [N][$];      // words of packets handed to the framer
  logic [15:0] crq [N][$];      // credits waiting for the framer
  int          sent [N][N];     // words sent by host i towards output o
  int          xcr  [N][N];     // last credit value (words/32 mod 128) from the switch
  int          held [N], fwd [N], last_fwd_cr [N];
  logic [31:0] rxw [N][$];      // words of the packet being received
  logic [31:0] expect_q [N][N][$];  // [src][dst] packets expected, as word0 of each
  int          n_rx [N], n_sent_pkts [N], n_out [N], n_stall = 0, n_ovf = 0, n_rxe = 0, n_bad = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    for (int h = 0; h < N; h++)
      $display("FAIL: watchdog: host %0d sent %0d received %0d held %0d txq %0d room %0d %0d %0d %0d", h, n_sent_pkts[h], n_rx[h], held[h], txq[h].size(), room(h,0), room(h,1), room(h,2), room(h,3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] credit(input int val);
    logic [15:0] c;
    c = {1'b1, 7'd0, 7'(val), 1'b0};
    c[0] = ^c[15:1];
    return c;
  endfunction

  function automatic int room(input int i, input int o);
    return XPD - ((sent[i][o] - 32 * xcr[i][o]) & 4095);
  endfunction

  // Per-clock host behaviour: framer inputs are set at the falling edge and
  // retired after the rising edge; received words are sampled at the
  // falling edge.
  initial begin
    for (int h = 0; h < N; h++) begin
      t_valid[h] = 0; t_data[h] = 0; t_last[h] = 0; c_valid[h] = 0; c_data[h] = 0;
    end
    forever begin
      logic ft [N], fc [N];
      @(negedge clk);
      for (int h = 0; h < N; h++) begin
        if (rst_n) begin
          if (pkt_out[h]) n_out[h]++;
          if (credit_stall[h]) n_stall++;
          if (xp_overflow[h]) n_ovf++;
          if (rx_error[h] || r_hcrc[h] || r_par[h]) n_rxe++;
        end
        // credits from the switch
        if (r_cv[h]) xcr[h][r_cd[h][14:8] % N] = r_cd[h][7:1];
        // received packet words
        if (r_valid[h]) begin
          rxw[h].push_back(r_data[h]);
          if (r_last[h]) begin
            int src, sz;
            src = rxw[h][1][7:0];
            sz  = rxw[h][0][31:22];
            checks++;
            if (r_err[h] || rxw[h].size() != sz + 2 || rxw[h][0][21:15] != 7'(h) ||
                src >= N || expect_q[src][h].size() == 0 || expect_q[src][h][0] != rxw[h][0]) begin
              failures++; n_bad++;
              $display("FAIL: host %0d got bad packet %h from %0d", h, rxw[h][0], src);
            end else begin
              for (int k = 2; k < rxw[h].size(); k++)
                if (rxw[h][k] != rxw[h][0] + 32'(k)) begin
                  failures++;
                  $display("FAIL: host %0d payload word %0d", h, k);
                  break;
                end
              void'(expect_q[src][h].pop_front());
            end
            held[h] += rxw[h].size();
            n_rx[h]++;
            rxw[h] = {};
          end
        end
        // drain the receive buffer; host 0 slowly
        if (held[h] > 0 && (h != 0 || $urandom_range(0, 15) == 0)) begin
          held[h]--; fwd[h]++;
          if ((fwd[h] / 32) % 128 != last_fwd_cr[h]) begin
            last_fwd_cr[h] = (fwd[h] / 32) % 128;
            crq[h].push_back(credit(last_fwd_cr[h]));
          end
        end
        t_valid[h] = txq[h].size() != 0;
        t_data[h]  = t_valid[h] ? txq[h][0] : 32'h0;
        t_last[h]  = txq[h].size() == 1;
        c_valid[h] = crq[h].size() != 0;
        c_data[h]  = c_valid[h] ? crq[h][0] : 16'h0;
      end
      #1;
      for (int h = 0; h < N; h++) begin
        ft[h] = t_ready[h] && t_valid[h];
        fc[h] = c_ready[h] && c_valid[h];
      end
      @(posedge clk);
      #1;
      for (int h = 0; h < N; h++) begin
        if (ft[h]) void'(txq[h].pop_front());
        if (fc[h]) void'(crq[h].pop_front());
      end
    end
  end

  // Packet generators: one packet in the framer queue at a time (the framer
  // needs whole packets, and t_last is the end of the queue).
  for (genvar h = 0; h < N; h++) begin : g_gen
    initial begin
      @(posedge rst_n);
      repeat (5) @(negedge clk);
      for (int p = 0; p < NPKT; p++) begin
        int o, sz;
        logic [31:0] w0;
        o  = (h == 0) ? (1 + p % (N - 1)) : ((p % 2 == 0) ? 0 : $urandom_range(0, N - 1));
        sz = $urandom_range(1, 126);
        w0 = {10'(sz), 7'(o), 5'd0, 10'(p)};
        while (room(h, o) < sz + 2 || txq[h].size() != 0) @(negedge clk);
        sent[h][o] += sz + 2;
        expect_q[h][o].push_back(w0);
        txq[h].push_back(w0);
        txq[h].push_back(32'(h));
        for (int k = 2; k < sz + 2; k++) txq[h].push_back(w0 + 32'(k));
        n_sent_pkts[h]++;
      end
    end
  end

  initial begin
    int total_rx, total_out;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_rx[0] + n_rx[1] + n_rx[2] + n_rx[3] == N * NPKT);
    repeat (2000) @(negedge clk);
    total_rx = 0; total_out = 0;
    for (int h = 0; h < N; h++) begin
      total_out += n_out[h];
      check(n_out[h] == n_rx[h], $sformatf("output %0d packet count %0d vs %0d", h, n_out[h], n_rx[h]));
      for (int s = 0; s < N; s++) check(expect_q[s][h].size() == 0, "all packets delivered");
    end
    check(total_out == N * NPKT, "total packets");
    check(n_bad == 0, "no bad packets");
    check(n_ovf == 0, "no crosspoint overflow");
    check(n_rxe == 0, "no link errors");
    check(n_stall > 0, $sformatf("output credit stalls: %0d", n_stall));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
