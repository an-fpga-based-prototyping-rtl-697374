// dma_engine: the NIC's DMA engine, serving both the outgoing (remote write)
// and the incoming path, one packet or transfer at a time.
//
// Outgoing: it picks, round robin, a request queue that has released
// descriptors and whose VOQ has room (dest_ready), reads the descriptor in
// two memory accesses and starts on the third clock: it removes the
// descriptor, sends a transfer header word (ipc_pkg::pkt_hdr_t with size in
// 64-bit words, flow, op, destination address) into the FIFO towards the VOQ
// block, requests size words from host memory at the source address, and
// forwards the returned words, marking the last one. With the op bit
// OP_ZERO_PAYLOAD (benchmark mode) host memory is not read and zero words are
// sent. If the descriptor asks for a local notification, the queue's
// consumed-descriptor pointer is then written, as one word, to
// local_notify_base + 8*queue.
// Incoming: a packet from the reception queues (header word, then payload)
// is written to host memory at the header's address, in place. If it arrived
// intact its header goes to the resequencer, which later requests remote
// notifications; each is a one-word write of a running count to
// remote_notify_addr.
// Arbitration: pending notification writes first, then incoming and outgoing
// work alternate, one packet/transfer per turn.
// Host memory port: mem_req_* (we, 64-bit address, length in 64-bit words),
// write data on mem_w*, read data on mem_r* (in order, length words).
// The split into these simple ports, in place of the PCI-X initiator, is this
// design's choice.
module dma_engine
  import ipc_pkg::*;
#(
  parameter int NQ = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // request queues
  input  logic [NQ-1:0]         q_pending,
  output logic                  q_rd_en,
  output logic [$clog2(NQ)-1:0] q_rd_q,
  output logic                  q_rd_word,
  input  logic [63:0]           q_rd_data,
  output logic                  q_pop,
  input  logic [7:0]            q_head_ptr [NQ],
  input  logic [NQ-1:0]         dest_ready,
  // towards the VOQs: {first, last, data}
  output logic                  vo_valid,
  output logic [65:0]           vo_data,
  input  logic                  vo_ready,
  // host memory
  output logic                  mem_req_valid,
  input  logic                  mem_req_ready,
  output logic                  mem_req_we,
  output logic [63:0]           mem_req_addr,
  output logic [9:0]            mem_req_len,
  output logic                  mem_wvalid,
  output logic [63:0]           mem_wdata,
  output logic                  mem_wlast,
  input  logic                  mem_wready,
  input  logic                  mem_rvalid,
  input  logic [63:0]           mem_rdata,
  output logic                  mem_rready,
  // from the reception queues: header word, then payload
  input  logic                  rx_valid,
  input  logic [63:0]           rx_data,
  input  logic                  rx_last,
  input  logic                  rx_err,
  output logic                  rx_ready,
  // to / from the resequencer
  output logic                  rs_valid,
  output pkt_hdr_t              rs_hdr,
  input  logic                  rs_ready,
  input  logic                  nt_valid,
  output logic                  nt_ready,
  // configuration
  input  logic [63:0]           local_notify_base,
  input  logic [63:0]           remote_notify_addr,
  // event pulses
  output logic                  ev_tx_transfer,
  output logic                  ev_rx_packet,
  output logic                  ev_rx_bad,
  output logic                  ev_local_notify,
  output logic                  ev_remote_notify
);
  localparam int QW = $clog2(NQ);

  typedef enum logic [3:0] {
    S_IDLE, T_RD0, T_RD1, T_START, T_REQ, T_DATA,
    R_HDR, R_REQ, R_DATA, R_RS, W_REQ, W_DATA
  } state_t;

  state_t     state;
  logic [QW-1:0] q_sel, q_pick;
  logic       q_pick_v;
  logic       last_was_rx;
  logic [63:0] src_addr;
  desc_w1_t   d1;
  logic [9:0] words_left;
  pkt_hdr_t   rhdr;
  logic       ln_pend;
  logic [QW-1:0] ln_q;
  logic       rn_pend;
  logic [31:0] rn_count;
  logic [63:0] w_addr, w_data;
  logic       w_is_local;
  pkt_hdr_t   th;          // transfer header built from descriptor word 1
  desc_w1_t   w1;

  // Round robin over the queues that can go.
  logic [NQ-1:0] q_ok;
  assign q_ok = q_pending & dest_ready;
  always_comb begin
    q_pick   = q_sel;
    q_pick_v = 1'b0;
    for (int k = NQ; k >= 1; k--) begin
      if (q_ok[((int'(q_sel) + k) % NQ)]) begin
        q_pick   = QW'(((int'(q_sel) + k) % NQ));
        q_pick_v = 1'b1;
      end
    end
  end

  always_comb begin
    q_rd_en       = (state == T_RD0) || (state == T_RD1);
    q_rd_q        = q_sel;
    q_rd_word     = (state == T_RD1);
    q_pop         = (state == T_START) && vo_ready;
    vo_valid      = 1'b0;
    vo_data       = '0;
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = '0;
    mem_req_len   = '0;
    mem_wvalid    = 1'b0;
    mem_wdata     = '0;
    mem_wlast     = 1'b0;
    mem_rready    = 1'b0;
    rx_ready      = 1'b0;
    rs_valid      = 1'b0;
    rs_hdr        = rhdr;
    w1            = desc_w1_t'(q_rd_data);
    th            = '0;
    unique case (state)
      T_START: begin
        th.size  = w1.size;
        th.flow  = w1.flow;
        th.op    = w1.op;
        th.addr  = w1.dst_addr;
        vo_valid = 1'b1;
        vo_data  = {1'b1, 1'b0, th};
      end
      T_REQ: begin
        mem_req_valid = !d1.op[OP_ZERO_PAYLOAD];
        mem_req_addr  = src_addr;
        mem_req_len   = d1.size;
      end
      T_DATA: begin
        if (d1.op[OP_ZERO_PAYLOAD]) begin
          vo_valid = 1'b1;
          vo_data  = {1'b0, words_left == 10'd1, 64'd0};
        end else begin
          vo_valid   = mem_rvalid;
          vo_data    = {1'b0, words_left == 10'd1, mem_rdata};
          mem_rready = vo_ready;
        end
      end
      R_HDR: rx_ready = 1'b1;
      R_REQ: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        mem_req_addr  = {32'd0, rhdr.addr};
        mem_req_len   = {1'b0, rhdr.size[9:1]};
      end
      R_DATA: begin
        mem_wvalid = rx_valid;
        mem_wdata  = rx_data;
        mem_wlast  = rx_last;
        rx_ready   = mem_wready;
      end
      R_RS: rs_valid = 1'b1;
      W_REQ: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        mem_req_addr  = w_addr;
        mem_req_len   = 10'd1;
      end
      W_DATA: begin
        mem_wvalid = 1'b1;
        mem_wdata  = w_data;
        mem_wlast  = 1'b1;
      end
      default: ;
    endcase
  end

  assign nt_ready = (state == S_IDLE) && !ln_pend && !rn_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      q_sel            <= '0;
      last_was_rx      <= 1'b0;
      src_addr         <= '0;
      d1               <= '0;
      words_left       <= '0;
      rhdr             <= '0;
      ln_pend          <= 1'b0;
      ln_q             <= '0;
      rn_pend          <= 1'b0;
      rn_count         <= '0;
      w_addr           <= '0;
      w_data           <= '0;
      w_is_local       <= 1'b0;
      ev_tx_transfer   <= 1'b0;
      ev_rx_packet     <= 1'b0;
      ev_rx_bad        <= 1'b0;
      ev_local_notify  <= 1'b0;
      ev_remote_notify <= 1'b0;
    end else begin
      ev_tx_transfer   <= 1'b0;
      ev_rx_packet     <= 1'b0;
      ev_rx_bad        <= 1'b0;
      ev_local_notify  <= 1'b0;
      ev_remote_notify <= 1'b0;
      if (nt_valid && nt_ready) rn_pend <= 1'b1;

      unique case (state)
        S_IDLE: begin
          if (ln_pend) begin
            w_addr     <= local_notify_base + {58'd0, ln_q, 3'b000};
            w_data     <= {56'd0, q_head_ptr[ln_q]};
            w_is_local <= 1'b1;
            ln_pend    <= 1'b0;
            state      <= W_REQ;
          end else if (rn_pend) begin
            w_addr     <= remote_notify_addr;
            w_data     <= {32'd0, rn_count + 1'b1};
            rn_count   <= rn_count + 1'b1;
            w_is_local <= 1'b0;
            rn_pend    <= 1'b0;
            state      <= W_REQ;
          end else if (rx_valid && (last_was_rx == 1'b0 || !q_pick_v)) begin
            last_was_rx <= 1'b1;
            state       <= R_HDR;
          end else if (q_pick_v) begin
            last_was_rx <= 1'b0;
            q_sel       <= q_pick;
            state       <= T_RD0;
          end
        end
        T_RD0: state <= T_RD1;
        T_RD1: begin
          src_addr <= q_rd_data;
          state    <= T_START;
        end
        T_START: begin
          d1 <= desc_w1_t'(q_rd_data);
          if (vo_ready) state <= T_REQ;
        end
        T_REQ: begin
          words_left <= d1.size;
          if (d1.op[OP_ZERO_PAYLOAD]) state <= T_DATA;
          else if (mem_req_ready)     state <= T_DATA;
        end
        T_DATA: begin
          if (vo_valid && vo_ready) begin
            words_left <= words_left - 1'b1;
            if (words_left == 10'd1) begin
              ev_tx_transfer <= 1'b1;
              if (d1.op[OP_LOCAL_NOTIFY]) begin
                ln_pend <= 1'b1;
                ln_q    <= q_sel;
              end
              state <= S_IDLE;
            end
          end
        end
        R_HDR: begin
          rhdr  <= pkt_hdr_t'(rx_data);
          state <= R_REQ;
        end
        R_REQ: if (mem_req_ready) state <= R_DATA;
        R_DATA: if (rx_valid && mem_wready && rx_last) begin
          if (rx_err) begin
            ev_rx_bad <= 1'b1;
            state     <= S_IDLE;
          end else begin
            ev_rx_packet <= 1'b1;
            state        <= R_RS;
          end
        end
        R_RS: if (rs_ready) state <= S_IDLE;
        W_REQ: if (mem_req_ready) state <= W_DATA;
        W_DATA: if (mem_wready) begin
          if (w_is_local) ev_local_notify <= 1'b1;
          else            ev_remote_notify <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
