// resequencer: the NIC's header resequencing for completion notification
// under multipath routing.
//
// Packet data have already been written in place in host memory; only the
// header of each intact packet arrives here (in_valid/in_hdr). It is queued
// by sender and by path, taken from the reseq field {source, path, seq}
// stamped by multipath_tx. Because each sender rotates its packets over the
// paths in a fixed order, the receiver restores the send order by taking, per
// sender, the head of the queue of the path expected next. Headers leave in
// that order and are discarded, except that a header carrying
// OP_REMOTE_IRQ raises irq, and one carrying OP_REMOTE_NOTIFY requests a
// notification write from the DMA engine (nt_valid/nt_ready). A notification
// is thus delivered only once every earlier packet of the same sender has
// arrived. A sequence number that differs from the one expected is counted
// on seq_error and accepted (the platform recovers from single losses with
// the protocol of Khotimsky et al., which is not reproduced here).
// One header is released per clock, senders served round robin. Per-sender
// per-path queues follow the platform; their fixed depth QD (instead of
// shared space) is this design's choice.
module resequencer
  import ipc_pkg::*;
#(
  parameter int NSRC  = 8,
  parameter int NPATH = 4,
  parameter int QD    = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  pkt_hdr_t   in_hdr,
  output logic       in_ready,
  output logic       irq,
  output logic       nt_valid,
  input  logic       nt_ready,
  output logic       released,    // pulse per header released in order
  output logic       seq_error
);
  localparam int SW = $clog2(NSRC);
  localparam int PW = $clog2(NPATH);
  localparam int DW = $clog2(QD);

  typedef struct packed {
    logic [OP_W-1:0] op;
    logic [4:0]      seq;
  } entry_t;

  entry_t        q    [NSRC][NPATH][QD];
  logic [DW:0]   qh   [NSRC][NPATH];
  logic [DW:0]   qt   [NSRC][NPATH];
  logic [PW-1:0] exp_path [NSRC];
  logic [4:0]    exp_seq  [NSRC][NPATH];

  logic [SW-1:0] in_s;
  logic [PW-1:0] in_p;
  assign in_s     = in_hdr.reseq[9:7];
  assign in_p     = in_hdr.reseq[6:5];
  assign in_ready = (qt[in_s][in_p] - qh[in_s][in_p]) != (DW+1)'(QD);

  // Choose a sender whose expected path has a header.
  logic [SW-1:0] rr, s_pick;
  logic          s_v;
  logic [NSRC-1:0] ready_s;
  entry_t        head_e;
  logic [PW-1:0] hp;
  logic          go;

  always_comb begin
    for (int s = 0; s < NSRC; s++)
      ready_s[s] = qt[s][exp_path[s]] != qh[s][exp_path[s]];
    s_pick = rr;
    s_v    = 1'b0;
    for (int k = NSRC - 1; k >= 0; k--) begin
      if (ready_s[((int'(rr) + k) % NSRC)]) begin
        s_pick = SW'(((int'(rr) + k) % NSRC));
        s_v    = 1'b1;
      end
    end
    hp       = exp_path[s_pick];
    head_e   = q[s_pick][hp][qh[s_pick][hp][DW-1:0]];
    nt_valid = s_v && head_e.op[OP_REMOTE_NOTIFY];
    go       = s_v && (!head_e.op[OP_REMOTE_NOTIFY] || nt_ready);
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready)
      q[in_s][in_p][qt[in_s][in_p][DW-1:0]] <= '{op: in_hdr.op, seq: in_hdr.reseq[4:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSRC; s++) begin
        exp_path[s] <= '0;
        for (int p = 0; p < NPATH; p++) begin
          qh[s][p]      <= '0;
          qt[s][p]      <= '0;
          exp_seq[s][p] <= '0;
        end
      end
      rr        <= '0;
      irq       <= 1'b0;
      released  <= 1'b0;
      seq_error <= 1'b0;
    end else begin
      irq       <= 1'b0;
      released  <= 1'b0;
      seq_error <= 1'b0;
      if (in_valid && in_ready) qt[in_s][in_p] <= qt[in_s][in_p] + 1'b1;
      if (go) begin
        qh[s_pick][hp]      <= qh[s_pick][hp] + 1'b1;
        exp_seq[s_pick][hp] <= head_e.seq + 1'b1;
        exp_path[s_pick]    <= (32'(hp) == NPATH - 1) ? '0 : hp + 1'b1;
        rr                  <= (32'(s_pick) == NSRC - 1) ? '0 : s_pick + 1'b1;
        released            <= 1'b1;
        irq                 <= head_e.op[OP_REMOTE_IRQ];
        seq_error           <= (head_e.seq != exp_seq[s_pick][hp]);
      end
    end
  end
endmodule
