// tb_ipc_platform: end-to-end test of the whole network at its default size
// (8 NICs, 4 parallel 8x8 switches).
//
// Nodes 1..7 each post three clustered 4 KB RDMA writes to node 0 (released
// together by the Start Flag on the third; the third asks for local
// notification, remote notification and remote interrupt). Node 0 posts one
// benchmark-mode (zero payload) 512-byte write to node 5 with a remote
// notification. The 7-to-1 traffic overloads the crosspoints of output 0, so
// the senders must wait for credits; packets of each transfer spread over
// the 4 switches and may arrive out of order.
// Checks: every destination word, the notification counts written at the
// receivers, the queue pointers written home by local notification, the
// interrupt counts, and that each mechanism (segmentation, multipath,
// credit stall, clustering, out-of-order arrival, benchmark mode,
// notifications) occurred at least once.
module tb_ipc_platform;
  localparam int NN = 8, NL = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        tgt_wr_en [NN];
  logic [15:0] tgt_addr [NN];
  logic [63:0] tgt_wdata [NN];
  logic        tgt_rd_en [NN];
  logic [15:0] tgt_rd_addr [NN];
  logic [63:0] tgt_rd_data [NN];
  logic        mem_req_valid [NN], mem_req_ready [NN], mem_req_we [NN];
  logic [63:0] mem_req_addr [NN];
  logic [9:0]  mem_req_len [NN];
  logic        mem_wvalid [NN], mem_wlast [NN], mem_wready [NN], mem_rvalid [NN], mem_rready [NN];
  logic [63:0] mem_wdata [NN], mem_rdata [NN];
  logic        irq [NN];
  logic [11:0] nic_events [NN];
  logic [NN-1:0] sw_pkt_out [NL], sw_credit_stall [NL], sw_overflow [NL], sw_rx_error [NL];

  logic [63:0] loc_notify [NN];   // word at byte 0x8000 of each host

  ipc_platform dut (.*);

  for (genvar n = 0; n < NN; n++) begin : g_host
    tb_host_mem #(.AW(16)) u_mem (
      .clk, .rst_n,
      .req_valid(mem_req_valid[n]), .req_ready(mem_req_ready[n]), .req_we(mem_req_we[n]),
      .req_addr(mem_req_addr[n]), .req_len(mem_req_len[n]),
      .wvalid(mem_wvalid[n]), .wdata(mem_wdata[n]), .wlast(mem_wlast[n]), .wready(mem_wready[n]),
      .rvalid(mem_rvalid[n]), .rdata(mem_rdata[n]), .rready(mem_rready[n])
    );
    assign loc_notify[n] = u_mem.mem[16'h1000];
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Mechanism counters.
  int n_irq [NN];
  int n_sw_pkts [NL];
  int n_stall, n_ooo, n_overflow, n_rxerr;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) if (irq[n]) n_irq[n]++;
    for (int k = 0; k < NL; k++) begin
      n_sw_pkts[k] += $countones(sw_pkt_out[k]);
      n_overflow   += $countones(sw_overflow[k]);
      n_rxerr      += $countones(sw_rx_error[k]);
    end
  end
  // Credit stall: a NIC's VOQ 0 holds a whole packet but the link lacks credit.
  for (genvar n = 1; n < NN; n++) begin : g_probe
    always @(posedge clk)
      if (rst_n && dut.g_nic[n].u_nic.u_voq.in_xfer[0] &&
          32'(dut.g_nic[n].u_nic.u_voq.stored[0]) >= 32'(dut.g_nic[n].u_nic.u_voq.pw[0]) &&
          !dut.g_nic[n].u_nic.u_voq.elig[0])
        n_stall++;
  end
  // Out-of-order arrival: a header reaches a resequencer on a path other than
  // the one its sender's next in-order header uses.
  for (genvar n = 0; n < NN; n++) begin : g_ooo
    always @(posedge clk)
      if (rst_n && dut.g_nic[n].u_nic.u_rs.in_valid && dut.g_nic[n].u_nic.u_rs.in_ready &&
          dut.g_nic[n].u_nic.u_rs.in_p !=
            dut.g_nic[n].u_nic.u_rs.exp_path[dut.g_nic[n].u_nic.u_rs.in_s])
        n_ooo++;
  end

  task automatic wr(input int n, input logic [15:0] a, input logic [63:0] d);
    @(negedge clk);
    tgt_wr_en[n] = 1; tgt_addr[n] = a; tgt_wdata[n] = d;
    @(negedge clk);
    tgt_wr_en[n] = 0;
  endtask

  task automatic rd(input int n, input logic [15:0] a, output logic [63:0] d);
    @(negedge clk);
    tgt_rd_en[n] = 1; tgt_rd_addr[n] = a;
    @(negedge clk);
    tgt_rd_en[n] = 0;
    d = tgt_rd_data[n];
  endtask

  function automatic logic [63:0] w1(input bit start, input logic [4:0] op,
                                     input logic [6:0] flow, input logic [9:0] size,
                                     input logic [31:0] dst);
    return {start, 9'd0, op, flow, size, dst};
  endfunction

  task automatic post(input int n, input int q, input int slot, input logic [63:0] src,
                      input logic [63:0] word1);
    wr(n, 16'((q << 11) | (slot << 4)), src);
    wr(n, 16'((q << 11) | (slot << 4) | 8), word1);
  endtask

  function automatic logic [63:0] pat(input int n, input int t, input int i);
    return {8'hA5, 8'(n), 16'(t), 32'(i * 32'h9E37 + 7)};
  endfunction

  // Transfer sizes in 64-bit words; the 450-word transfer ends in a 2-word
  // packet that overtakes the full packet sent just before it.
  int sz [3] = '{512, 450, 512};
  int cyc = 0;
  always @(posedge clk) cyc++;
  localparam int WATCHDOG = 400000;
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("node0 irq %0d notify %0d; node5 notify %0d", n_irq[0], g_host[0].u_mem.mem[16'h1200], g_host[5].u_mem.mem[16'h1200]);
    for (int k = 0; k < NL; k++) $display("switch %0d packets %0d", k, n_sw_pkts[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    int t0;
    int order [3] = '{1, 0, 2};
    n_stall = 0; n_ooo = 0; n_overflow = 0; n_rxerr = 0;
    for (int k = 0; k < NL; k++) n_sw_pkts[k] = 0;
    for (int n = 0; n < NN; n++) begin
      n_irq[n] = 0;
      tgt_wr_en[n] = 0; tgt_addr[n] = 0; tgt_wdata[n] = 0;
      tgt_rd_en[n] = 0; tgt_rd_addr[n] = 0;
    end
    // Host memory contents.
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Source data of each node at byte 0x40000 (word 0x8000), garbage at
    // node 5's destination.
    fill_all();
    for (int n = 0; n < NN; n++) begin
      wr(n, 16'h4010, 64'(n));
      wr(n, 16'h4000, 64'h8000);
      wr(n, 16'h4008, 64'h9000);
    end
    // Nodes 1..7: three clustered 4 KB transfers to node 0, released by the
    // start flag of the third, written out of order (1, 0, 2).
    for (int n = 1; n < NN; n++)
      foreach (order[j]) begin
        int t;
        t = order[j];
        if (t == 2) continue;
        post(n, 0, t, 64'h40000 + 64'(t * 4096),
             w1(1'b0, 5'b00000, 7'd0, 10'(sz[t]),
                32'h20000 + 32'(n * 32'h3000) + 32'(t * 4096)));
      end
    // Nothing may leave before the start flag: the queue still holds.
    repeat (50) @(posedge clk);
    rd(1, 16'h4200, d);
    check(d == 0, "clustered requests held back until the start flag");
    rd(1, 16'h4100, d);
    check(d == 0, "no transfer before the start flag");
    for (int n = 1; n < NN; n++)
      post(n, 0, 2, 64'h40000 + 64'(2 * 4096),
           w1(1'b1, 5'b00111, 7'd0, 10'd512, 32'h20000 + 32'(n * 32'h3000) + 32'(2 * 4096)));
    // Node 0: benchmark-mode transfer of 64 zero words to node 5.
    post(0, 5, 0, 64'h40000, w1(1, 5'b01100, 7'd5, 10'd64, 32'h20000));
    // Wait for completion.
    t0 = cyc;
    wait (n_irq[0] == 7 && g_host[5].u_mem.mem[16'h1200] == 1);
    repeat (200) @(posedge clk);
    $display("completed in %0d cycles", cyc - t0);
    // Light load: node 3 sends 66 words to node 6; the second, 2-word packet
    // takes the next link and overtakes the first, full one.
    g_host[6].u_mem.mem[16'h1200] = 0;
    post(3, 6, 0, 64'h40000, w1(1'b1, 5'b00110, 7'd6, 10'd66, 32'h30000));
    wait (g_host[6].u_mem.mem[16'h1200] == 1);
    repeat (50) @(posedge clk);
    begin
      int bad = 0;
      for (int i = 0; i < 66; i++) if (g_host[6].u_mem.mem[16'h6000 + i] != pat(3, 0, i)) bad++;
      check(bad == 0, "light-load transfer from node 3 to node 6");
    end
    // Data at node 0.
    for (int n = 1; n < NN; n++)
      for (int t = 0; t < 3; t++) begin
        int bad = 0;
        for (int i = 0; i < sz[t]; i++)
          if (g_host[0].u_mem.mem[(32'h20000 + n * 32'h3000 + t * 4096) / 8 + i] != pat(n, t, i)) bad++;
        check(bad == 0, $sformatf("data from node %0d transfer %0d (%0d bad words)", n, t, bad));
      end
    // Benchmark-mode zeros at node 5.
    begin
      int bad = 0;
      for (int i = 0; i < 64; i++) if (g_host[5].u_mem.mem[16'h4000 + i] != 0) bad++;
      check(bad == 0, "benchmark-mode payload of zeros at node 5");
    end
    check(g_host[0].u_mem.mem[16'h1200] == 7, "node 0 remote notification count = 7");
    check(n_irq[0] == 7, "node 0 received 7 remote interrupts");
    check(g_host[5].u_mem.mem[16'h1200] == 1, "node 5 remote notification count = 1");
    for (int n = 1; n < NN; n++)
      check(loc_notify[n] == 3,
            $sformatf("node %0d local notification wrote queue pointer 3", n));
    for (int n = 1; n < NN; n++) begin
      rd(n, 16'h4100, d);
      check(d == ((n == 3) ? 4 : 3), $sformatf("node %0d transfer counter", n));
    end
    rd(0, 16'h4108, d);
    check(d == 21 * 8, $sformatf("node 0 received 168 packets (%0d)", d));
    // Mechanisms.
    for (int k = 0; k < NL; k++) begin
      $display("switch %0d forwarded %0d packets", k, n_sw_pkts[k]);
      check(n_sw_pkts[k] > 0, $sformatf("multipath: switch %0d used", k));
    end
    $display("credit-stall cycles %0d, out-of-order headers %0d", n_stall, n_ooo);
    check(n_stall > 0, "credit-based backpressure stalled a VOQ");
    check(n_ooo > 0, "out-of-order packet arrival resequenced");
    check(n_overflow == 0, "no crosspoint overflow (credits hold)");
    check(n_rxerr == 0, "no link errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill_all();
    for (int t = 0; t < 3; t++)
      for (int i = 0; i < 512; i++) begin
        g_host[1].u_mem.mem[16'h8000 + t * 512 + i] = pat(1, t, i);
        g_host[2].u_mem.mem[16'h8000 + t * 512 + i] = pat(2, t, i);
        g_host[3].u_mem.mem[16'h8000 + t * 512 + i] = pat(3, t, i);
        g_host[4].u_mem.mem[16'h8000 + t * 512 + i] = pat(4, t, i);
        g_host[5].u_mem.mem[16'h8000 + t * 512 + i] = pat(5, t, i);
        g_host[6].u_mem.mem[16'h8000 + t * 512 + i] = pat(6, t, i);
        g_host[7].u_mem.mem[16'h8000 + t * 512 + i] = pat(7, t, i);
      end
    for (int i = 0; i < 64; i++) g_host[5].u_mem.mem[16'h4000 + i] = 64'hDEAD_BEEF;
    g_host[0].u_mem.mem[16'h1200] = 0;
    g_host[5].u_mem.mem[16'h1200] = 0;
  endtask
endmodule
