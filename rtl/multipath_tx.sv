// multipath_tx: packet-by-packet link bundling with resequencing information
// (sender side of the NIC's multipath support).
//
// Packets (header word with first = 1, then payload words) arrive from the
// VOQ block together with their VOQ (destination) number. Each destination's
// packets are spread over the NPATH links in strict rotation, so every link
// carries an equal share of every destination's traffic. The header's reseq
// field is stamped with {source node, path, per-destination per-path
// sequence number mod 32}; the receiver's resequencer uses it to restore the
// send order. The whole packet follows its header to the chosen link's FIFO.
// path_next[v] shows where destination v's next packet will go, so that the
// VOQ scheduler can check that link's credits beforehand.
// Per-destination load balancing and the insertion of resequencing data
// follow the platform; the strict rotation and the field layout are this
// design's choices.
module multipath_tx
  import ipc_pkg::*;
#(
  parameter int NV    = 8,
  parameter int NPATH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [2:0]               node_id,
  input  logic                     in_valid,
  input  logic [65:0]              in_data,    // {first, last, data}
  input  logic [$clog2(NV)-1:0]    in_q,
  output logic                     in_ready,
  output logic [$clog2(NPATH)-1:0] path_next [NV],
  output logic [NPATH-1:0]         out_valid,
  output logic [65:0]              out_data,
  input  logic [NPATH-1:0]         out_ready
);
  localparam int PW = $clog2(NPATH);

  logic [PW-1:0] ptr [NV];
  logic [4:0]    seq [NV][NPATH];
  logic [PW-1:0] cur_path, path;
  logic          is_hdr;
  pkt_hdr_t      h;

  assign is_hdr = in_data[65];
  assign path   = is_hdr ? ptr[in_q] : cur_path;

  always_comb begin
    h       = pkt_hdr_t'(in_data[63:0]);
    h.reseq = {node_id, 2'(path), seq[in_q][path]};
    out_data = is_hdr ? {in_data[65:64], h} : in_data;
    out_valid = '0;
    out_valid[path] = in_valid;
    in_ready = out_ready[path];
    for (int v = 0; v < NV; v++) path_next[v] = ptr[v];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_path <= '0;
      for (int v = 0; v < NV; v++) begin
        ptr[v] <= '0;
        for (int p = 0; p < NPATH; p++) seq[v][p] <= '0;
      end
    end else if (in_valid && in_ready && is_hdr) begin
      cur_path          <= path;
      seq[in_q][path]   <= seq[in_q][path] + 1'b1;
      ptr[in_q]         <= (32'(ptr[in_q]) == NPATH - 1) ? '0 : ptr[in_q] + 1'b1;
    end
  end
endmodule
