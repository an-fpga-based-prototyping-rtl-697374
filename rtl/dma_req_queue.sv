// dma_req_queue: the NIC's memory-mapped DMA request queues.
//
// NQ per-destination circular queues of QDEPTH transfer descriptors each,
// held in one statically partitioned memory of NQ*QDEPTH descriptors (two
// 64-bit words per descriptor; the default 8 x 128 = 1024 follows the
// platform). The host writes descriptor words at any slot and in any order
// (wr_en, wr_q, wr_slot, wr_word). Written descriptors stay held back until
// a second word with the Start Flag (bit 63) arrives: then every descriptor
// from the queue head up to and including that slot is released to the DMA
// engine at once (clustering of requests).
// The DMA engine sees pending[q] for queues with released descriptors, reads
// the head descriptor of a queue one word per clock (rd_en, rd_q, rd_word;
// rd_data is valid the clock after), and removes it with pop/pop_q.
// head_ptr[q] counts descriptors taken from queue q (8 bits, wrapping); the
// local notification writes it to host memory so the host can recycle slots.
// Slot addressing and the release rule are this design's reading of the
// platform's description.
module dma_req_queue #(
  parameter int NQ     = 8,
  parameter int QDEPTH = 128
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wr_en,
  input  logic [$clog2(NQ)-1:0]     wr_q,
  input  logic [$clog2(QDEPTH)-1:0] wr_slot,
  input  logic                      wr_word,
  input  logic [63:0]               wr_data,
  output logic [NQ-1:0]             pending,
  input  logic                      rd_en,
  input  logic [$clog2(NQ)-1:0]     rd_q,
  input  logic                      rd_word,
  output logic [63:0]               rd_data,
  input  logic                      pop,
  input  logic [$clog2(NQ)-1:0]     pop_q,
  output logic [$clog2(QDEPTH):0]   head_ptr [NQ]
);
  localparam int SW = $clog2(QDEPTH);
  localparam int QW = $clog2(NQ);

  logic [63:0] mem [NQ*QDEPTH*2];
  logic [SW:0] head [NQ];
  logic [SW:0] rel  [NQ];

  // Release point for a start flag written at wr_slot.
  logic [SW:0] dist_new, dist_old;
  logic        start_wr;

  assign start_wr = wr_en && wr_word && wr_data[63];

  always_comb begin
    dist_new = {1'b0, wr_slot + 1'b1 - head[wr_q][SW-1:0]};
    if (dist_new == '0) dist_new = (SW+1)'(QDEPTH);
    dist_old = rel[wr_q] - head[wr_q];
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_q, wr_slot, wr_word}] <= wr_data;
    if (rd_en) rd_data <= mem[{rd_q, head[rd_q][SW-1:0], rd_word}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < NQ; q++) begin
        head[q] <= '0;
        rel[q]  <= '0;
      end
    end else begin
      if (start_wr && dist_new > dist_old) rel[wr_q] <= head[wr_q] + dist_new;
      if (pop) head[pop_q] <= head[pop_q] + 1'b1;
    end
  end

  always_comb begin
    for (int q = 0; q < NQ; q++) begin
      pending[q]  = (head[q] != rel[q]);
      head_ptr[q] = head[q];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pop |-> pending[pop_q])
    else $error("dma_req_queue: pop of an empty queue");
endmodule
