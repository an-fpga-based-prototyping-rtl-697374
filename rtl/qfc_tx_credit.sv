// qfc_tx_credit: sender side of the QFC-like credit protocol for NFLOW flows
// sharing one link.
//
// Per flow it keeps a 12-bit count of the words sent since reset and the last
// credit received. A credit carries the 7 most significant bits of the
// receiver's 12-bit count of words forwarded out of its buffer since reset,
// so the sender knows the forwarded count to within 32 words (rounded down,
// which is safe). Free space downstream is
//   avail = BUF_WORDS - ((sent - {credit, 5'b0}) mod 4096).
// Counters wrap, and a lost credit is repaired by any later one, as in the
// platform's protocol. Counts are in 32-bit words of header plus payload.
// BUF_WORDS must stay below 4096 - 32.
// Timing: consume and credit take effect on the next clock; avail is
// combinational from the registers. Credits with a flow number >= NFLOW are
// ignored; a single-lane user (NFLOW = 1) takes every credit as flow 0.
module qfc_tx_credit #(
  parameter int NFLOW     = 8,
  parameter int BUF_WORDS = 512,
  parameter int SINGLE_LANE = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     consume,
  input  logic [$clog2(NFLOW+1)-1:0] consume_flow,
  input  logic [8:0]               consume_words,
  input  logic                     cr_valid,
  input  logic [15:0]              cr_data,
  output logic [12:0]              avail [NFLOW]
);
  logic [11:0] sent [NFLOW];
  logic [6:0]  fwd  [NFLOW];
  logic [6:0]  cr_flow;

  assign cr_flow = cr_data[14:8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < NFLOW; f++) begin
        sent[f] <= '0;
        fwd[f]  <= '0;
      end
    end else begin
      if (consume) sent[consume_flow] <= sent[consume_flow] + 12'(consume_words);
      if (cr_valid) begin
        if (SINGLE_LANE != 0)             fwd[0]       <= cr_data[7:1];
        else if (32'(cr_flow) < NFLOW)    fwd[cr_flow] <= cr_data[7:1];
      end
    end
  end

  always_comb begin
    for (int f = 0; f < NFLOW; f++) begin
      logic [11:0] used;
      used     = sent[f] - {fwd[f], 5'b0};
      avail[f] = (13'(used) > 13'(BUF_WORDS)) ? 13'd0 : 13'(BUF_WORDS) - 13'(used);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   consume |-> (32'(consume_flow) < NFLOW))
    else $error("qfc_tx_credit: bad flow");
endmodule
