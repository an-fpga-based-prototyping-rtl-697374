// bxbar_switch: N x N buffered crossbar (combined input-crosspoint queuing)
// switch for variable-size packets, with credit-based flow control.
//
// Each port has a link deframer (link_rx) and a link framer (link_tx) with a
// 32-bit datapath. An incoming packet is written into crosspoint (i, o), where
// i is the arrival port and o = header flow mod N (flow = destination host);
// the whole column o is served by output scheduler o, which sends the packet
// out of port o when its single-lane credit counter (qfc_tx_credit) shows
// room in the downstream receive buffer. When a packet starts to leave,
// output scheduler o reports its size to credit scheduler i, which returns
// credits for flow o to the source on port i's framer, interleaved with the
// packets leaving through port i. Credits arriving on port o refill output
// o's credit counter.
// Structure (crosspoints, per-column OS, per-input CS, credits multiplexed
// with packets to the source) follows the platform. Routing by flow number,
// one clock domain and DOWN_BUF_WORDS (the receive buffer behind each output)
// are this design's choices.
module bxbar_switch #(
  parameter int N              = 8,
  parameter int XP_DEPTH       = 512,   // 2 KB crosspoint buffers
  parameter int DOWN_BUF_WORDS = 512,   // 32-bit words downstream of each output
  parameter int REFRESH_CYCLES = 65536
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [7:0]   rx_data [N],
  input  logic         rx_k    [N],
  output logic [7:0]   tx_data [N],
  output logic         tx_k    [N],
  output logic [N-1:0] pkt_out,       // pulse per packet sent on each output
  output logic [N-1:0] credit_stall,  // output waits for downstream credits
  output logic [N-1:0] xp_overflow,   // a crosspoint of this input dropped a packet
  output logic [N-1:0] rx_error       // header CRC, payload CRC or credit parity error
);
  import ipc_pkg::*;

  // Port receive side.
  logic             r_valid [N];
  logic [31:0]      r_data  [N];
  logic             r_last  [N];
  logic             r_err   [N];
  pkt_hdr_t         r_hdr   [N];
  logic             r_cr_v  [N];
  logic [15:0]      r_cr_d  [N];
  logic             r_hdr_e [N];
  logic             r_par_e [N];

  // Crosspoints, indexed [input][output].
  logic [31:0]      xp_data [N][N];
  logic             xp_last [N][N];
  logic             xp_pop  [N][N];
  logic [9:0]       xp_cnt  [N][N];
  logic             xp_ovf  [N][N];

  // Output schedulers.
  logic             os_valid [N];
  logic [31:0]      os_data  [N];
  logic             os_last  [N];
  logic             os_ready [N];
  logic [N-1:0]     os_dep_v [N];
  logic [8:0]       os_dep_w [N];
  logic             os_cons  [N];
  logic [8:0]       os_cons_w[N];
  logic [12:0]      os_avail [N][1];

  // Credit schedulers.
  logic             cs_dep_v [N][N];
  logic [8:0]       cs_dep_w [N][N];
  logic             cs_valid [N];
  logic [15:0]      cs_data  [N];
  logic             cs_ready [N];

  for (genvar i = 0; i < N; i++) begin : g_port
    link_rx #(.DATA_W(32)) u_rx (
      .clk, .rst_n,
      .rx_data(rx_data[i]), .rx_k(rx_k[i]),
      .out_valid(r_valid[i]), .out_data(r_data[i]), .out_last(r_last[i]),
      .out_err(r_err[i]), .out_hdr(r_hdr[i]),
      .cr_valid(r_cr_v[i]), .cr_data(r_cr_d[i]),
      .hdr_crc_err(r_hdr_e[i]), .cr_parity_err(r_par_e[i])
    );

    logic [N-1:0] ovf_row;
    for (genvar o = 0; o < N; o++) begin : g_xp
      xpoint_buffer #(.DEPTH(XP_DEPTH)) u_xp (
        .clk, .rst_n,
        .wr_valid(r_valid[i] && (32'(r_hdr[i].flow) % N == o)),
        .wr_data(r_data[i]), .wr_last(r_last[i]), .wr_err(r_err[i]),
        .rd_data(xp_data[i][o]), .rd_last(xp_last[i][o]), .rd_pop(xp_pop[i][o]),
        .pkt_count(xp_cnt[i][o]), .overflow(xp_ovf[i][o])
      );
      assign ovf_row[o] = xp_ovf[i][o];
    end
    assign xp_overflow[i] = |ovf_row;
    assign rx_error[i]    = r_hdr_e[i] || r_par_e[i] || (r_valid[i] && r_last[i] && r_err[i]);
  end

  for (genvar o = 0; o < N; o++) begin : g_out
    logic [N-1:0] avail_col, last_col, pop_col;
    logic [31:0]  data_col [N];
    for (genvar i = 0; i < N; i++) begin : g_col
      assign avail_col[i]  = (xp_cnt[i][o] != '0);
      assign data_col[i]   = xp_data[i][o];
      assign last_col[i]   = xp_last[i][o];
      assign xp_pop[i][o]  = pop_col[i];
      assign cs_dep_v[i][o] = os_dep_v[o][i];
      assign cs_dep_w[i][o] = os_dep_w[o];
    end

    output_scheduler #(.N(N)) u_os (
      .clk, .rst_n,
      .pkt_avail(avail_col), .head_data(data_col), .head_last(last_col), .pop(pop_col),
      .out_valid(os_valid[o]), .out_data(os_data[o]), .out_last(os_last[o]),
      .out_ready(os_ready[o]), .credit_avail(os_avail[o][0]),
      .consume(os_cons[o]), .consume_words(os_cons_w[o]),
      .dep_valid(os_dep_v[o]), .dep_words(os_dep_w[o]), .credit_stall(credit_stall[o])
    );

    qfc_tx_credit #(.NFLOW(1), .BUF_WORDS(DOWN_BUF_WORDS), .SINGLE_LANE(1)) u_cred (
      .clk, .rst_n,
      .consume(os_cons[o]), .consume_flow(1'b0), .consume_words(os_cons_w[o]),
      .cr_valid(r_cr_v[o]), .cr_data(r_cr_d[o]), .avail(os_avail[o])
    );

    credit_scheduler #(.NFLOW(N), .REFRESH_CYCLES(REFRESH_CYCLES)) u_cs (
      .clk, .rst_n,
      .dep_valid(cs_dep_v[o]), .dep_words(cs_dep_w[o]),
      .cr_valid(cs_valid[o]), .cr_data(cs_data[o]), .cr_ready(cs_ready[o])
    );

    link_tx #(.DATA_W(32)) u_tx (
      .clk, .rst_n,
      .in_valid(os_valid[o]), .in_data(os_data[o]), .in_last(os_last[o]), .in_ready(os_ready[o]),
      .cr_valid(cs_valid[o]), .cr_data(cs_data[o]), .cr_ready(cs_ready[o]),
      .tx_data(tx_data[o]), .tx_k(tx_k[o]), .pkt_done(pkt_out[o]), .credit_sent()
    );
  end
endmodule
