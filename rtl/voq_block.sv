// voq_block: the NIC's on-chip virtual output queues (VOQs), with the packet
// sorter, the credit-gated scheduler and the packet processor.
//
// Input (from the DMA engine's synchronization FIFO): transfers, each a
// transfer header word (first = 1; pkt_hdr_t whose size counts 64-bit words,
// up to 512) followed by its data words. The packet sorter writes each
// transfer, header included, into VOQ (flow mod NV). The VOQs are circular
// buffers of VDEPTH 64-bit words (8 KB each by default) in one statically
// partitioned memory. The DMA engine reserves room before it starts a
// transfer (reserve_*), and dest_ready[v] tells it that VOQ v can take a
// further maximum-size transfer.
// Packet processor: a VOQ is eligible when its head is a transfer header not
// yet loaded, or when the next packet of the current transfer (at most
// PKT_W64 words) is fully stored and credit_avail[v] (downstream space on the
// link the packet will take) covers it. Eligible VOQs are served round robin.
// Serving a header loads the transfer state (remaining words, address, flow,
// op) in one clock. Serving a packet sends, on out_*, a packet header (size in
// 32-bit words, address advanced by the bytes already sent, notification
// bits only on the transfer's last packet) and then the packet's words, one
// per clock, and takes the credit (consume_*). Every packet is therefore an
// independent RDMA write that the receiver can place without reassembly.
// On-chip VOQs, segmentation into independent packets and the credit-driven
// scheduler follow the platform. Off-chip VOQ bodies (DRAM and linked-list
// manager) are not built: each VOQ lives wholly on chip.
module voq_block
  import ipc_pkg::*;
#(
  parameter int NV      = 8,
  parameter int VDEPTH  = 1024,
  parameter int PKT_W64 = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [65:0]           in_data,     // {first, last, data}
  output logic                  in_ready,
  input  logic                  reserve_valid,
  input  logic [$clog2(NV)-1:0] reserve_q,
  input  logic [10:0]           reserve_words,
  output logic [NV-1:0]         dest_ready,
  input  logic [12:0]           credit_avail [NV],
  output logic                  consume,
  output logic [$clog2(NV)-1:0] consume_q,
  output logic [8:0]            consume_words,
  output logic                  out_valid,
  output logic [65:0]           out_data,    // {first, last, data}
  output logic [$clog2(NV)-1:0] out_q,
  input  logic                  out_ready
);
  localparam int VW = $clog2(NV);
  localparam int AW = $clog2(VDEPTH);

  typedef enum logic [1:0] {P_IDLE, P_LOAD, P_HDR, P_DATA} pstate_t;

  logic [63:0]   mem [NV*VDEPTH];
  logic [AW:0]   wptr [NV];
  logic [AW:0]   rptr [NV];
  logic [AW+1:0] resv [NV];
  logic [AW:0]   stored [NV];
  logic          in_xfer [NV];
  logic [9:0]    rem  [NV];
  logic [31:0]   xaddr [NV];
  logic [FLOW_W-1:0] xflow [NV];
  logic [OP_W-1:0]   xop [NV];

  // Sorter.
  logic [VW-1:0] wq, cur_wq;
  pkt_hdr_t      in_hdr;
  logic          do_wr;
  assign in_hdr   = pkt_hdr_t'(in_data[63:0]);
  assign wq       = in_data[65] ? VW'(32'(in_hdr.flow) % NV) : cur_wq;
  assign in_ready = (stored[wq] != (AW+1)'(VDEPTH));
  assign do_wr    = in_valid && in_ready;

  // Reservations grow when the DMA engine starts a transfer and shrink as
  // its words are written.
  logic [AW+1:0] resv_nx [NV];
  always_comb
    for (int v = 0; v < NV; v++) begin
      resv_nx[v] = resv[v];
      if (reserve_valid && reserve_q == VW'(v)) resv_nx[v] = resv_nx[v] + (AW+2)'(reserve_words);
      if (do_wr && wq == VW'(v) && resv_nx[v] != '0) resv_nx[v] = resv_nx[v] - 1'b1;
    end

  always_comb
    for (int v = 0; v < NV; v++) begin
      stored[v]     = wptr[v] - rptr[v];
      dest_ready[v] = (32'(stored[v]) + 32'(resv[v]) + 513) <= VDEPTH;
    end

  // Packet processor.
  pstate_t       ps;
  logic [VW-1:0] sel, pick, rr;
  logic          pick_v;
  logic [9:0]    pw [NV];          // words of the next packet of each VOQ
  logic [NV-1:0] elig;
  logic [9:0]    cnt;
  logic [63:0]   head_word;
  pkt_hdr_t      ph;

  always_comb begin
    for (int v = 0; v < NV; v++) begin
      pw[v]   = (rem[v] > 10'(PKT_W64)) ? 10'(PKT_W64) : rem[v];
      elig[v] = in_xfer[v] ? (32'(stored[v]) >= 32'(pw[v]) &&
                              32'(credit_avail[v]) >= 2 * 32'(pw[v]) + 2)
                           : (stored[v] != '0);
    end
    pick   = rr;
    pick_v = 1'b0;
    for (int k = NV - 1; k >= 0; k--) begin
      if (elig[((int'(rr) + k) % NV)]) begin
        pick   = VW'(((int'(rr) + k) % NV));
        pick_v = 1'b1;
      end
    end
  end

  pkt_hdr_t      lh;             // transfer header at the head of VOQ sel
  assign head_word = mem[{sel, rptr[sel][AW-1:0]}];
  assign lh        = pkt_hdr_t'(head_word);

  always_comb begin
    ph        = '0;
    ph.size   = {pw[sel][8:0], 1'b0};
    ph.flow   = xflow[sel];
    ph.op     = xop[sel];
    if (rem[sel] > 10'(PKT_W64)) begin
      ph.op[OP_REMOTE_IRQ]    = 1'b0;
      ph.op[OP_REMOTE_NOTIFY] = 1'b0;
    end
    ph.addr   = xaddr[sel];
    out_q         = sel;
    out_valid     = (ps == P_HDR) || (ps == P_DATA);
    out_data      = (ps == P_HDR) ? {1'b1, 1'b0, ph} : {1'b0, cnt == 10'd1, head_word};
    consume       = (ps == P_HDR) && out_ready;
    consume_q     = sel;
    consume_words = {pw[sel][7:0], 1'b0} + 9'd2;
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[{wq, wptr[wq][AW-1:0]}] <= in_data[63:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NV; v++) begin
        wptr[v]    <= '0;
        rptr[v]    <= '0;
        resv[v]    <= '0;
        in_xfer[v] <= 1'b0;
        rem[v]     <= '0;
        xaddr[v]   <= '0;
        xflow[v]   <= '0;
        xop[v]     <= '0;
      end
      cur_wq <= '0;
      ps     <= P_IDLE;
      sel    <= '0;
      rr     <= '0;
      cnt    <= '0;
    end else begin
      // sorter
      if (do_wr) begin
        wptr[wq] <= wptr[wq] + 1'b1;
        cur_wq   <= wq;
      end
      for (int v = 0; v < NV; v++) resv[v] <= resv_nx[v];
      // packet processor
      unique case (ps)
        P_IDLE: if (pick_v) begin
          sel <= pick;
          rr  <= (32'(pick) == NV - 1) ? '0 : pick + 1'b1;
          ps  <= in_xfer[pick] ? P_HDR : P_LOAD;
        end
        P_LOAD: begin
          in_xfer[sel]   <= (lh.size != '0);
          rem[sel]       <= lh.size;
          xaddr[sel]     <= lh.addr;
          xflow[sel]     <= lh.flow;
          xop[sel]       <= lh.op;
          rptr[sel]      <= rptr[sel] + 1'b1;
          ps             <= P_IDLE;
        end
        P_HDR: if (out_ready) begin
          cnt <= pw[sel];
          ps  <= P_DATA;
        end
        P_DATA: if (out_ready) begin
          rptr[sel] <= rptr[sel] + 1'b1;
          cnt       <= cnt - 1'b1;
          if (cnt == 10'd1) begin
            rem[sel]     <= rem[sel] - pw[sel];
            xaddr[sel]   <= xaddr[sel] + {19'd0, pw[sel], 3'b000};
            in_xfer[sel] <= (rem[sel] != pw[sel]);
            ps           <= P_IDLE;
          end
        end
        default: ps <= P_IDLE;
      endcase
    end
  end
endmodule
