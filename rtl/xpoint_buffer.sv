// xpoint_buffer: one crosspoint buffer of the buffered crossbar switch.
//
// A show-ahead FIFO of DEPTH 32-bit words (2 KB by default, as in the
// platform) with a head pointer, a tail pointer and a small packet FSM. Words
// of a packet are written at wr_ptr; the tail pointer, and the packet count
// seen by the output scheduler, advance only when the packet's last word
// arrives with wr_err low. A packet ending with wr_err (payload CRC error or
// aborted frame), or one that does not fit, is discarded by rewinding wr_ptr
// to the tail; a packet that did not fit is reported on overflow.
// The head word and its last flag are always visible on rd_data/rd_last;
// rd_pop removes it (one word per clock in and out).
// Notifying the scheduler at the end of the packet (store and forward) rather
// than at its start, and the single clock domain, are this design's choices.
module xpoint_buffer #(
  parameter int DEPTH = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_valid,
  input  logic [31:0] wr_data,
  input  logic        wr_last,
  input  logic        wr_err,
  output logic [31:0] rd_data,
  output logic        rd_last,
  input  logic        rd_pop,
  output logic [9:0]  pkt_count,
  output logic        overflow
);
  localparam int AW = $clog2(DEPTH);

  logic [32:0]   mem [DEPTH];
  logic [AW:0]   head, tail, wr_ptr;   // extra bit tells full from empty
  logic          dropping;             // rest of the current packet is discarded
  logic          full;
  logic          pkt_done_ok;

  assign full        = (wr_ptr[AW-1:0] == head[AW-1:0]) && (wr_ptr[AW] != head[AW]);
  assign {rd_last, rd_data} = mem[head[AW-1:0]];
  assign pkt_done_ok = wr_valid && wr_last && !wr_err && !dropping && !full;

  always_ff @(posedge clk) begin
    if (wr_valid && !dropping && !full) mem[wr_ptr[AW-1:0]] <= {wr_last, wr_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head      <= '0;
      tail      <= '0;
      wr_ptr    <= '0;
      dropping  <= 1'b0;
      pkt_count <= '0;
      overflow  <= 1'b0;
    end else begin
      overflow <= 1'b0;
      if (wr_valid) begin
        if (wr_last) begin
          dropping <= 1'b0;
          if (pkt_done_ok) begin
            wr_ptr <= wr_ptr + 1'b1;
            tail   <= wr_ptr + 1'b1;
          end else begin
            wr_ptr   <= tail;
            overflow <= full && !dropping;
          end
        end else if (dropping) begin
          // discard
        end else if (full) begin
          dropping <= 1'b1;
          wr_ptr   <= tail;
          overflow <= 1'b1;
        end else wr_ptr <= wr_ptr + 1'b1;
      end
      if (rd_pop) head <= head + 1'b1;
      pkt_count <= pkt_count + (pkt_done_ok ? 10'd1 : 10'd0)
                             - ((rd_pop && rd_last) ? 10'd1 : 10'd0);
    end
  end

  // The output scheduler pops only complete packets.
  assert property (@(posedge clk) disable iff (!rst_n) rd_pop |-> (pkt_count != 0))
    else $error("xpoint_buffer: pop with no complete packet");
endmodule
