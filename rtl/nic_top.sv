// nic_top: the network interface card (NIC).
//
// Outgoing path: the host writes transfer descriptors through the target
// port (nic_csr) into the per-destination DMA request queues; the DMA engine
// fetches each transfer's data over the host memory port and passes it
// through a FIFO to the VOQ block, which cuts it into independent packets of
// at most 512 bytes and sends them, when the chosen link has credits, to the
// multipath stage. That stage spreads each destination's packets over the
// NLINK links and stamps resequencing data; each link has a packet FIFO and a
// framer (link_tx), which also carries credits for the link's receive queue.
// Incoming path: each link's deframer (link_rx) feeds its own reception queue
// (RXQ_DEPTH 64-bit words, one quarter of the 8 KB incoming buffer). Words
// leaving a reception queue are reported to the link's credit scheduler,
// which returns single-lane credits to the sender. A round-robin arbiter
// passes whole packets from the reception queues to the DMA engine, which
// writes them in place in host memory and hands their headers to the
// resequencer; notifications (interrupt on irq, or a flag write) are given
// only in send order.
// All of it runs from one clock. Host-side ports are simple request/response
// ports standing for the PCI-X target and initiator; the links are byte-wide
// symbol streams standing for the RocketIO transceivers.
// events (pulses, also counted in nic_csr): 0 transfer sent to VOQ, 1 packet
// received, 2 packet received with bad payload CRC, 3 local notification,
// 4 remote notification, 5 remote interrupt, 6 resequencing sequence error,
// 7 header CRC error, 8 packet sent on a link, 9 credit parity error,
// 10 header released by the resequencer, 11 credit sent on a link.
module nic_top
  import ipc_pkg::*;
#(
  parameter int NQ          = 8,
  parameter int NLINK       = 4,
  parameter int QDEPTH      = 128,
  parameter int VDEPTH      = 1024,
  parameter int RXQ_DEPTH   = 256,
  parameter int NET_BUF_W32 = 512,   // downstream buffer per flow (crosspoint), 32-bit words
  parameter int REFRESH_CYCLES = 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  // target (memory-mapped) port
  input  logic        tgt_wr_en,
  input  logic [15:0] tgt_addr,
  input  logic [63:0] tgt_wdata,
  input  logic        tgt_rd_en,
  input  logic [15:0] tgt_rd_addr,
  output logic [63:0] tgt_rd_data,
  // host memory (DMA) port
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output logic        mem_req_we,
  output logic [63:0] mem_req_addr,
  output logic [9:0]  mem_req_len,
  output logic        mem_wvalid,
  output logic [63:0] mem_wdata,
  output logic        mem_wlast,
  input  logic        mem_wready,
  input  logic        mem_rvalid,
  input  logic [63:0] mem_rdata,
  output logic        mem_rready,
  // links
  output logic [7:0]  tx_data [NLINK],
  output logic        tx_k    [NLINK],
  input  logic [7:0]  rx_data [NLINK],
  input  logic        rx_k    [NLINK],
  output logic        irq,
  output logic [11:0] events
);
  localparam int QW = $clog2(NQ);
  localparam int PW = $clog2(NLINK);

  // ---------------- target port, request queues ----------------
  logic        desc_wr_en, desc_word;
  logic [2:0]  desc_q;
  logic [6:0]  desc_slot;
  logic [63:0] desc_data;
  logic [63:0] local_notify_base, remote_notify_addr;
  logic [2:0]  node_id;
  logic [7:0]  q_head_ptr [NQ];
  logic [NQ-1:0] q_pending;
  logic        q_rd_en, q_rd_word, q_pop;
  logic [QW-1:0] q_rd_q;
  logic [63:0] q_rd_data;

  nic_csr #(.NEV(12), .NQ(NQ)) u_csr (
    .clk, .rst_n, .tgt_wr_en, .tgt_addr, .tgt_wdata, .tgt_rd_en, .tgt_rd_addr, .tgt_rd_data,
    .desc_wr_en, .desc_q, .desc_slot, .desc_word, .desc_data,
    .local_notify_base, .remote_notify_addr, .node_id, .ev(events), .q_head_ptr
  );

  dma_req_queue #(.NQ(NQ), .QDEPTH(QDEPTH)) u_rq (
    .clk, .rst_n,
    .wr_en(desc_wr_en), .wr_q(QW'(desc_q)), .wr_slot($clog2(QDEPTH)'(desc_slot)),
    .wr_word(desc_word), .wr_data(desc_data),
    .pending(q_pending), .rd_en(q_rd_en), .rd_q(q_rd_q), .rd_word(q_rd_word), .rd_data(q_rd_data),
    .pop(q_pop), .pop_q(q_rd_q), .head_ptr(q_head_ptr)
  );

  // ---------------- DMA engine ----------------
  logic        vo_valid, vo_ready;
  logic [65:0] vo_data;
  logic [NQ-1:0] dest_ready;
  logic        rx_valid, rx_last, rx_err, rx_ready;
  logic [63:0] rx_word;
  logic        rs_valid, rs_ready, nt_valid, nt_ready;
  pkt_hdr_t    rs_hdr;
  logic        ev_tx, ev_rx, ev_bad, ev_ln, ev_rn;

  dma_engine #(.NQ(NQ)) u_dma (
    .clk, .rst_n,
    .q_pending, .q_rd_en, .q_rd_q, .q_rd_word, .q_rd_data, .q_pop, .q_head_ptr, .dest_ready,
    .vo_valid, .vo_data, .vo_ready,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_len,
    .mem_wvalid, .mem_wdata, .mem_wlast, .mem_wready, .mem_rvalid, .mem_rdata, .mem_rready,
    .rx_valid, .rx_data(rx_word), .rx_last, .rx_err, .rx_ready,
    .rs_valid, .rs_hdr, .rs_ready, .nt_valid, .nt_ready,
    .local_notify_base, .remote_notify_addr,
    .ev_tx_transfer(ev_tx), .ev_rx_packet(ev_rx), .ev_rx_bad(ev_bad),
    .ev_local_notify(ev_ln), .ev_remote_notify(ev_rn)
  );

  // ---------------- synchronization FIFO to the VOQs ----------------
  logic        sf_valid, sf_rd;
  logic [65:0] sf_data;
  pkt_hdr_t    vo_hdr;
  assign vo_hdr = pkt_hdr_t'(vo_data[63:0]);

  sync_fifo #(.W(66), .DEPTH(16)) u_sf (
    .clk, .rst_n, .wr_en(vo_valid), .wr_data(vo_data), .wr_ready(vo_ready),
    .rd_en(sf_rd && sf_valid), .rd_data(sf_data), .rd_valid(sf_valid), .count()
  );

  // ---------------- VOQs, multipath ----------------
  logic [12:0] cr_avail [NLINK][NQ];
  logic [12:0] voq_avail [NQ];
  logic        v_cons;
  logic [QW-1:0] v_cons_q;
  logic [8:0]  v_cons_w;
  logic        v_out_valid, v_out_ready;
  logic [65:0] v_out_data;
  logic [QW-1:0] v_out_q;
  logic [PW-1:0] path_next [NQ];

  always_comb
    for (int v = 0; v < NQ; v++) voq_avail[v] = cr_avail[path_next[v]][v];

  voq_block #(.NV(NQ), .VDEPTH(VDEPTH), .PKT_W64(MAX_PKT_W32 / 2)) u_voq (
    .clk, .rst_n,
    .in_valid(sf_valid), .in_data(sf_data), .in_ready(sf_rd),
    .reserve_valid(vo_valid && vo_ready && vo_data[65]),
    .reserve_q(QW'(32'(vo_hdr.flow) % NQ)), .reserve_words(11'(vo_hdr.size) + 11'd1),
    .dest_ready, .credit_avail(voq_avail),
    .consume(v_cons), .consume_q(v_cons_q), .consume_words(v_cons_w),
    .out_valid(v_out_valid), .out_data(v_out_data), .out_q(v_out_q), .out_ready(v_out_ready)
  );

  logic [NLINK-1:0] mp_valid, mp_ready;
  logic [65:0]      mp_data;

  multipath_tx #(.NV(NQ), .NPATH(NLINK)) u_mp (
    .clk, .rst_n, .node_id,
    .in_valid(v_out_valid), .in_data(v_out_data), .in_q(v_out_q), .in_ready(v_out_ready),
    .path_next, .out_valid(mp_valid), .out_data(mp_data), .out_ready(mp_ready)
  );

  // ---------------- links ----------------
  logic [NLINK-1:0] rq_valid, rq_pop, l_sent, l_hdr_e, l_par_e, l_cr_sent;
  logic [65:0]      rq_data [NLINK];

  for (genvar p = 0; p < NLINK; p++) begin : g_link
    logic        tf_valid, tf_rd;
    logic [65:0] tf_data;
    logic        cs_valid, cs_ready;
    logic [15:0] cs_data;
    logic        r_valid, r_last, r_err, r_cr_v;
    logic [63:0] r_data;
    logic [15:0] r_cr_d;
    logic        dep_v [1];
    logic [8:0]  dep_w [1];
    logic [12:0] av [NQ];

    sync_fifo #(.W(66), .DEPTH(128)) u_tf (
      .clk, .rst_n, .wr_en(mp_valid[p]), .wr_data(mp_data), .wr_ready(mp_ready[p]),
      .rd_en(tf_rd), .rd_data(tf_data), .rd_valid(tf_valid), .count()
    );

    link_tx #(.DATA_W(64)) u_tx (
      .clk, .rst_n,
      .in_valid(tf_valid), .in_data(tf_data[63:0]), .in_last(tf_data[64]), .in_ready(tf_rd),
      .cr_valid(cs_valid), .cr_data(cs_data), .cr_ready(cs_ready),
      .tx_data(tx_data[p]), .tx_k(tx_k[p]), .pkt_done(l_sent[p]), .credit_sent(l_cr_sent[p])
    );

    link_rx #(.DATA_W(64)) u_rx (
      .clk, .rst_n, .rx_data(rx_data[p]), .rx_k(rx_k[p]),
      .out_valid(r_valid), .out_data(r_data), .out_last(r_last), .out_err(r_err), .out_hdr(),
      .cr_valid(r_cr_v), .cr_data(r_cr_d), .hdr_crc_err(l_hdr_e[p]), .cr_parity_err(l_par_e[p])
    );

    sync_fifo #(.W(66), .DEPTH(RXQ_DEPTH)) u_rq (
      .clk, .rst_n, .wr_en(r_valid), .wr_data({r_err, r_last, r_data}), .wr_ready(),
      .rd_en(rq_pop[p]), .rd_data(rq_data[p]), .rd_valid(rq_valid[p]), .count()
    );

    // Each 64-bit word leaving the reception queue frees two 32-bit words.
    assign dep_v[0] = rq_pop[p];
    assign dep_w[0] = 9'd2;
    credit_scheduler #(.NFLOW(1), .REFRESH_CYCLES(REFRESH_CYCLES)) u_cs (
      .clk, .rst_n, .dep_valid(dep_v), .dep_words(dep_w),
      .cr_valid(cs_valid), .cr_data(cs_data), .cr_ready(cs_ready)
    );

    qfc_tx_credit #(.NFLOW(NQ), .BUF_WORDS(NET_BUF_W32)) u_qfc (
      .clk, .rst_n,
      .consume(v_cons && path_next[v_cons_q] == PW'(p)),
      .consume_flow(($clog2(NQ+1))'(v_cons_q)), .consume_words(v_cons_w),
      .cr_valid(r_cr_v), .cr_data(r_cr_d), .avail(av)
    );
    always_comb for (int v = 0; v < NQ; v++) cr_avail[p][v] = av[v];
  end

  // ---------------- reception arbiter: whole packets, round robin ----------------
  logic [PW-1:0] ra_sel, ra_rr;
  logic          ra_busy;
  logic [PW-1:0] cand;
  always_comb begin
    cand = ra_rr;
    for (int k = NLINK - 1; k >= 0; k--)
      if (rq_valid[(int'(ra_rr) + k) % NLINK]) cand = PW'((int'(ra_rr) + k) % NLINK);
    rx_valid = ra_busy ? rq_valid[ra_sel] : rq_valid[cand];
    rx_word  = ra_busy ? rq_data[ra_sel][63:0] : rq_data[cand][63:0];
    rx_last  = ra_busy ? rq_data[ra_sel][64] : rq_data[cand][64];
    rx_err   = ra_busy ? rq_data[ra_sel][65] : rq_data[cand][65];
    rq_pop   = '0;
    rq_pop[ra_busy ? ra_sel : cand] = rx_valid && rx_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra_busy <= 1'b0;
      ra_sel  <= '0;
      ra_rr   <= '0;
    end else if (rx_valid && rx_ready) begin
      ra_sel  <= ra_busy ? ra_sel : cand;
      ra_busy <= !rx_last;
      if (rx_last) ra_rr <= (ra_busy ? ra_sel : cand) + 1'b1;
    end
  end

  // ---------------- resequencer ----------------
  logic irq_i, rs_rel, rs_seqerr;
  resequencer #(.NSRC(8), .NPATH(NLINK)) u_rs (
    .clk, .rst_n, .in_valid(rs_valid), .in_hdr(rs_hdr), .in_ready(rs_ready),
    .irq(irq_i), .nt_valid, .nt_ready, .released(rs_rel), .seq_error(rs_seqerr)
  );
  assign irq = irq_i;

  assign events = {|l_cr_sent, rs_rel, |l_par_e, |l_sent, |l_hdr_e, rs_seqerr,
                   irq_i, ev_rn, ev_ln, ev_bad, ev_rx, ev_tx};
endmodule
