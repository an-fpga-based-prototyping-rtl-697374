// sync_fifo: show-ahead FIFO used for the synchronization FIFOs of the NIC
// (DMA engine -> VOQs, VOQs -> link interface) and for its reception queues.
//
// The head entry is always visible on rd_data while rd_valid is high; rd_en
// pops it. wr_en writes when wr_ready is high. Storage is an array with
// binary head/tail pointers and an occupancy count, one write and one read per
// cycle. The platform crosses clock domains in these FIFOs; this design runs
// from one clock, so the FIFO is single-clock (this design's choice).
module sync_fifo #(
  parameter int W     = 66,
  parameter int DEPTH = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         wr_ready,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         rd_valid,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] head, tail;
  logic          do_wr, do_rd;

  assign wr_ready = (count != DEPTH[AW:0]);
  assign rd_valid = (count != '0);
  assign do_wr    = wr_en && wr_ready;
  assign do_rd    = rd_en && rd_valid;
  assign rd_data  = mem[head];

  always_ff @(posedge clk) begin
    if (do_wr) mem[tail] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (do_wr) tail <= (tail == AW'(DEPTH - 1)) ? '0 : tail + 1'b1;
      if (do_rd) head <= (head == AW'(DEPTH - 1)) ? '0 : head + 1'b1;
      count <= count + (do_wr ? 1'b1 : 1'b0) - (do_rd ? 1'b1 : 1'b0);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> rd_valid)
    else $error("sync_fifo: read while empty");
endmodule
