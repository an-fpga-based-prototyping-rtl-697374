// output_scheduler: Output Scheduler (OS) of one switch output (one column of
// crosspoints).
//
// In S_IDLE a one-clock priority enforcer picks, round robin from the input
// after the one served last, a crosspoint of the column that holds at least
// one complete packet. In S_SEL the packet's first word is on the column
// multiplexer and the OS reads the size field from it (header bits 63:54,
// i.e. bits 31:22 of the first 32-bit word). The packet needs size + 2 words
// of credit (payload plus the two header words) for the single-lane outgoing
// path; once credit_avail covers that, the OS takes the credit (consume),
// reports the packet's words to the credit scheduler of the input it came
// from (dep_valid one-hot by input, dep_words), and in S_XMIT streams the
// words to the link framer, popping the crosspoint on each out_ready.
// Round robin, the size read from the first word, the credit check and the
// report to the input's CS follow the platform. Because the framer takes a
// 32-bit word only every fourth clock, the two-clock decision is hidden behind
// the previous packet's CRC and framing bytes; this design does not start
// scheduling early as the platform does.
module output_scheduler #(
  parameter int N = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      pkt_avail,
  input  logic [31:0]       head_data [N],
  input  logic [N-1:0]      head_last,
  output logic [N-1:0]      pop,
  output logic              out_valid,
  output logic [31:0]       out_data,
  output logic              out_last,
  input  logic              out_ready,
  input  logic [12:0]       credit_avail,
  output logic              consume,
  output logic [8:0]        consume_words,
  output logic [N-1:0]      dep_valid,
  output logic [8:0]        dep_words,
  output logic              credit_stall   // waiting for credits (for counters)
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  typedef enum logic [1:0] {S_IDLE, S_SEL, S_XMIT} state_t;

  state_t        state;
  logic [IW-1:0] ptr, sel, pick;
  logic          pick_v;
  logic [8:0]    need;

  // Priority enforcer starting at ptr.
  always_comb begin
    pick   = ptr;
    pick_v = 1'b0;
    for (int k = N - 1; k >= 0; k--) begin
      if (pkt_avail[((int'(ptr) + k) % N)]) begin
        pick   = IW'(((int'(ptr) + k) % N));
        pick_v = 1'b1;
      end
    end
  end

  assign need          = 9'(head_data[sel][31:22]) + 9'd2;
  assign consume       = (state == S_SEL) && (13'(need) <= credit_avail);
  assign consume_words = need;
  assign dep_words     = need;
  assign credit_stall  = (state == S_SEL) && !consume;
  assign out_valid     = (state == S_XMIT);
  assign out_data      = head_data[sel];
  assign out_last      = head_last[sel];

  always_comb begin
    dep_valid = '0;
    pop       = '0;
    if (consume) dep_valid[sel] = 1'b1;
    if (out_valid && out_ready) pop[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ptr   <= '0;
      sel   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (pick_v) begin
          sel   <= pick;
          state <= S_SEL;
        end
        S_SEL: if (consume) state <= S_XMIT;
        S_XMIT: if (out_ready && out_last) begin
          state <= S_IDLE;
          ptr   <= (32'(sel) == N - 1) ? '0 : sel + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
