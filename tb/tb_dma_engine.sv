// tb_dma_engine: the DMA engine with a request-queue block and a behavioural
// host memory. Checks an outgoing transfer (header fields from the
// descriptor, payload read from the source address, last flag) with a
// random stall on the VOQ side, the local notification write of the queue
// pointer, benchmark mode (zero payload, no memory read), that a queue whose
// VOQ is full is not served, an incoming packet written in place and its
// header handed to the resequencer, a damaged incoming packet counted bad
// and not handed on, and two remote notification writes of a running count.
// Also checks the start latency: three clocks from release to header (two
// descriptor reads and one clock to start).
module tb_dma_engine;
  import ipc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int NQ = 4;

  logic        wr_en = 0, wr_word = 0;
  logic [1:0]  wr_q = 0;
  logic [6:0]  wr_slot = 0;
  logic [63:0] wr_data = 0;
  logic [NQ-1:0] q_pending, dest_ready = '1;
  logic        q_rd_en, q_rd_word, q_pop;
  logic [1:0]  q_rd_q;
  logic [63:0] q_rd_data;
  logic [7:0]  q_head_ptr [NQ];
  logic        vo_valid, vo_ready = 0;
  logic [65:0] vo_data;
  logic        mem_req_valid, mem_req_ready, mem_req_we, mem_wvalid, mem_wlast, mem_wready;
  logic        mem_rvalid, mem_rready;
  logic [63:0] mem_req_addr, mem_wdata, mem_rdata;
  logic [9:0]  mem_req_len;
  logic        rx_valid = 0, rx_last = 0, rx_err = 0, rx_ready;
  logic [63:0] rx_data = 0;
  logic        rs_valid, rs_ready = 0, nt_valid = 0, nt_ready;
  pkt_hdr_t    rs_hdr;
  logic [63:0] local_notify_base = 64'h8000, remote_notify_addr = 64'h9000;
  logic        ev_tx_transfer, ev_rx_packet, ev_rx_bad, ev_local_notify, ev_remote_notify;

  dma_req_queue #(.NQ(NQ), .QDEPTH(128)) u_q (
    .clk, .rst_n, .wr_en, .wr_q, .wr_slot, .wr_word, .wr_data, .pending(q_pending),
    .rd_en(q_rd_en), .rd_q(q_rd_q), .rd_word(q_rd_word), .rd_data(q_rd_data),
    .pop(q_pop), .pop_q(q_rd_q), .head_ptr(q_head_ptr));
  dma_engine #(.NQ(NQ)) dut (.*);
  tb_host_mem #(.AW(14)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_len(mem_req_len), .wvalid(mem_wvalid), .wdata(mem_wdata),
    .wlast(mem_wlast), .wready(mem_wready), .rvalid(mem_rvalid), .rdata(mem_rdata),
    .rready(mem_rready));

  int cyc = 0, t_pend = -1, t_hdr = -1;
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    if (t_pend < 0 && q_pending[1]) t_pend = cyc;
    if (t_hdr < 0 && vo_valid) t_hdr = cyc;
  end
  int checks = 0, failures = 0, n_tx = 0, n_rxp = 0, n_bad = 0, n_ln = 0, n_rn = 0;
  logic [65:0] vo_got [$];
  pkt_hdr_t    rs_got [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // VOQ side and resequencer side: random ready, sampled at the falling edge.
  initial forever begin
    @(negedge clk);
    vo_ready = ($urandom_range(0, 2) != 0);
    rs_ready = ($urandom_range(0, 1) != 0);
    #1;
    if (vo_valid && vo_ready) vo_got.push_back(vo_data);
    if (rs_valid && rs_ready) rs_got.push_back(rs_hdr);
    if (ev_tx_transfer) n_tx++;
    if (ev_rx_packet) n_rxp++;
    if (ev_rx_bad) n_bad++;
    if (ev_local_notify) n_ln++;
    if (ev_remote_notify) n_rn++;
  end

  task automatic post(input int q, input int slot, input logic [63:0] src, input desc_w1_t w1);
    @(negedge clk);
    wr_en = 1; wr_q = 2'(q); wr_slot = 7'(slot); wr_word = 0; wr_data = src;
    @(negedge clk);
    wr_word = 1; wr_data = w1;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic rx_packet(input pkt_hdr_t h, input int n64, input logic err);
    for (int i = 0; i <= n64; i++) begin
      @(negedge clk);
      rx_valid = 1;
      rx_data  = (i == 0) ? 64'(h) : {32'hBEEF_0000, 32'(i)};
      rx_last  = (i == n64);
      rx_err   = err && (i == n64);
      #2;
      while (!rx_ready) begin @(negedge clk); #2; end
    end
    @(negedge clk);
    rx_valid = 0; rx_last = 0; rx_err = 0;
  endtask

  initial begin
    desc_w1_t w1;
    pkt_hdr_t h;
    for (int i = 0; i < 64; i++) u_mem.mem[12'h200 + i] = {32'h5A5A_0000, 32'(i)};
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Outgoing transfer from queue 1 with local notification.
    w1 = '0;
    w1.start = 1; w1.size = 10'd8; w1.flow = 7'd1; w1.op = 5'b00001; w1.dst_addr = 32'hABC0_0000;
    post(1, 0, 64'h1000, w1);
    wait (n_ln == 1);
    repeat (5) @(negedge clk);
    check(vo_got.size() == 9, $sformatf("transfer words %0d", vo_got.size()));
    if (vo_got.size() == 9) begin
      h = pkt_hdr_t'(vo_got[0][63:0]);
      check(vo_got[0][65:64] == 2'b10 && h.size == 10'd8 && h.flow == 7'd1 &&
            h.op == 5'b00001 && h.addr == 32'hABC0_0000, "transfer header");
      for (int i = 1; i <= 8; i++)
        check(vo_got[i] == {1'b0, i == 8, 32'h5A5A_0000, 32'(i - 1)}, $sformatf("transfer word %0d", i));
    end
    check(u_mem.mem[(64'h8000 >> 3) + 1] == 64'd1, "local notification: queue 1 pointer");
    check(n_tx == 1, "one transfer counted");
    // Two descriptor reads plus one clock to start: the header is offered
    // three clocks after the descriptor is released.
    check(t_hdr - t_pend == 3, $sformatf("descriptor-to-header latency %0d clocks", t_hdr - t_pend));
    // Benchmark mode: zero payload, host memory not read.
    vo_got = {};
    begin
      int reads0;
      reads0 = u_mem.reads;
      w1 = '0;
      w1.start = 1; w1.size = 10'd5; w1.flow = 7'd2; w1.op = 5'b01000; w1.dst_addr = 32'h10;
      post(2, 0, 64'h1000, w1);
      wait (n_tx == 2);
      repeat (3) @(negedge clk);
      check(vo_got.size() == 6 && u_mem.reads == reads0, "zero payload without memory reads");
      for (int i = 1; i < vo_got.size(); i++) check(vo_got[i][63:0] == 0, "zero payload word");
    end
    // A queue whose VOQ is full waits.
    dest_ready[3] = 0;
    w1 = '0; w1.start = 1; w1.size = 10'd2; w1.flow = 7'd3;
    post(3, 0, 64'h1000, w1);
    repeat (50) @(negedge clk);
    check(n_tx == 2 && q_pending[3], "no transfer while the VOQ is full");
    dest_ready[3] = 1;
    wait (n_tx == 3);
    // Incoming packet: 6 words of 32 bits = 3 words of 64 bits at 0x2000.
    h = '0; h.size = 10'd6; h.flow = 7'd0; h.op = 5'b00100; h.reseq = 10'h1A5; h.addr = 32'h2000;
    rx_packet(h, 3, 0);
    wait (rs_got.size() == 1);
    check(rs_got[0] == h, "header to resequencer");
    for (int i = 1; i <= 3; i++)
      check(u_mem.mem[(32'h2000 >> 3) + i - 1] == {32'hBEEF_0000, 32'(i)}, $sformatf("written in place %0d", i));
    // Damaged packet: counted bad, not handed on.
    h.addr = 32'h3000;
    rx_packet(h, 3, 1);
    repeat (20) @(negedge clk);
    check(n_bad == 1 && n_rxp == 1 && rs_got.size() == 1, "bad packet not handed on");
    // Two remote notifications.
    for (int k = 1; k <= 2; k++) begin
      @(negedge clk);
      nt_valid = 1;
      #1;
      while (!nt_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      nt_valid = 0;
      wait (n_rn == k);
      @(negedge clk);
      check(u_mem.mem[64'h9000 >> 3] == 64'(k), $sformatf("remote notification %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
