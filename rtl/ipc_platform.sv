// ipc_platform: the whole prototyping network.
//
// N_NODES network interface cards (nic_top) and N_LINKS parallel buffered
// crossbar switches (bxbar_switch, N_NODES x N_NODES each). Link k of NIC n
// is wired to port n of switch k in both directions, so every NIC reaches
// every other NIC over N_LINKS disjoint paths; the NICs spread each
// destination's packets over those paths and resequence the headers on
// arrival. The default of 8 hosts, 4 links per NIC and 4 switches follows the
// platform; the wiring is this design's choice.
// The host side of each NIC (target register port, DMA memory port,
// interrupt) is brought out as arrays indexed by node. Links are byte-wide
// symbol streams (tx_data/tx_k), joined directly without transceivers.
// sw_* outputs give per-switch, per-output status pulses.
module ipc_platform #(
  parameter int N_NODES = 8,
  parameter int N_LINKS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tgt_wr_en   [N_NODES],
  input  logic [15:0] tgt_addr    [N_NODES],
  input  logic [63:0] tgt_wdata   [N_NODES],
  input  logic        tgt_rd_en   [N_NODES],
  input  logic [15:0] tgt_rd_addr [N_NODES],
  output logic [63:0] tgt_rd_data [N_NODES],
  output logic        mem_req_valid [N_NODES],
  input  logic        mem_req_ready [N_NODES],
  output logic        mem_req_we    [N_NODES],
  output logic [63:0] mem_req_addr  [N_NODES],
  output logic [9:0]  mem_req_len   [N_NODES],
  output logic        mem_wvalid    [N_NODES],
  output logic [63:0] mem_wdata     [N_NODES],
  output logic        mem_wlast     [N_NODES],
  input  logic        mem_wready    [N_NODES],
  input  logic        mem_rvalid    [N_NODES],
  input  logic [63:0] mem_rdata     [N_NODES],
  output logic        mem_rready    [N_NODES],
  output logic        irq           [N_NODES],
  output logic [11:0] nic_events    [N_NODES],
  output logic [N_NODES-1:0] sw_pkt_out      [N_LINKS],
  output logic [N_NODES-1:0] sw_credit_stall [N_LINKS],
  output logic [N_NODES-1:0] sw_overflow     [N_LINKS],
  output logic [N_NODES-1:0] sw_rx_error     [N_LINKS]
);
  // nic -> switch and switch -> nic symbol streams, [node][link]
  logic [7:0] n2s_d [N_NODES][N_LINKS];
  logic       n2s_k [N_NODES][N_LINKS];
  logic [7:0] s2n_d [N_NODES][N_LINKS];
  logic       s2n_k [N_NODES][N_LINKS];

  for (genvar n = 0; n < N_NODES; n++) begin : g_nic
    nic_top #(.NQ(N_NODES), .NLINK(N_LINKS)) u_nic (
      .clk, .rst_n,
      .tgt_wr_en(tgt_wr_en[n]), .tgt_addr(tgt_addr[n]), .tgt_wdata(tgt_wdata[n]),
      .tgt_rd_en(tgt_rd_en[n]), .tgt_rd_addr(tgt_rd_addr[n]), .tgt_rd_data(tgt_rd_data[n]),
      .mem_req_valid(mem_req_valid[n]), .mem_req_ready(mem_req_ready[n]),
      .mem_req_we(mem_req_we[n]), .mem_req_addr(mem_req_addr[n]), .mem_req_len(mem_req_len[n]),
      .mem_wvalid(mem_wvalid[n]), .mem_wdata(mem_wdata[n]), .mem_wlast(mem_wlast[n]),
      .mem_wready(mem_wready[n]), .mem_rvalid(mem_rvalid[n]), .mem_rdata(mem_rdata[n]),
      .mem_rready(mem_rready[n]),
      .tx_data(n2s_d[n]), .tx_k(n2s_k[n]), .rx_data(s2n_d[n]), .rx_k(s2n_k[n]),
      .irq(irq[n]), .events(nic_events[n])
    );
  end

  for (genvar k = 0; k < N_LINKS; k++) begin : g_sw
    logic [7:0] sw_rx_d [N_NODES];
    logic       sw_rx_k [N_NODES];
    logic [7:0] sw_tx_d [N_NODES];
    logic       sw_tx_k [N_NODES];
    for (genvar n = 0; n < N_NODES; n++) begin : g_port
      assign sw_rx_d[n]   = n2s_d[n][k];
      assign sw_rx_k[n]   = n2s_k[n][k];
      assign s2n_d[n][k]  = sw_tx_d[n];
      assign s2n_k[n][k]  = sw_tx_k[n];
    end
    bxbar_switch #(.N(N_NODES)) u_sw (
      .clk, .rst_n,
      .rx_data(sw_rx_d), .rx_k(sw_rx_k), .tx_data(sw_tx_d), .tx_k(sw_tx_k),
      .pkt_out(sw_pkt_out[k]), .credit_stall(sw_credit_stall[k]),
      .xp_overflow(sw_overflow[k]), .rx_error(sw_rx_error[k])
    );
  end
endmodule
