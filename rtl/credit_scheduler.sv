// credit_scheduler: receiver side of the QFC-like credit protocol (the
// switch's Credit Scheduler, CS, and the NIC's reception-queue credit source).
//
// Per flow it counts, in a 12-bit wrapping counter, the words that have left
// the receive buffer (dep_valid/dep_words, one event per flow per clock, so
// all output schedulers of a switch can report in the same clock). A flow is
// active when the 7 most significant bits of its counter differ from the
// value last sent. Credits (ipc_pkg::credit_t, flow number = flow index) are
// offered one at a time on cr_valid/cr_data and taken by the link framer with
// cr_ready, on packet boundaries. Active flows are served round robin; every
// REFRESH_CYCLES clocks all flows are marked for one more transmission, to
// repair credits lost on the wire. Round robin, the active-first rule and the
// periodic refresh follow the platform; the refresh period is this design's.
module credit_scheduler
  import ipc_pkg::*;
#(
  parameter int NFLOW          = 8,
  parameter int REFRESH_CYCLES = 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dep_valid [NFLOW],
  input  logic [8:0]  dep_words [NFLOW],
  output logic        cr_valid,
  output logic [15:0] cr_data,
  input  logic        cr_ready
);
  localparam int FW = (NFLOW > 1) ? $clog2(NFLOW) : 1;

  logic [11:0]      fwd      [NFLOW];
  logic [6:0]       last_val [NFLOW];
  logic [NFLOW-1:0] refresh_pend;
  logic [NFLOW-1:0] active;
  logic [FW-1:0]    ptr, sel;
  logic [31:0]      timer;

  always_comb begin
    for (int f = 0; f < NFLOW; f++)
      active[f] = (fwd[f][11:5] != last_val[f]) || refresh_pend[f];
    // Round robin: first active flow at or after ptr.
    sel      = ptr;
    cr_valid = 1'b0;
    for (int k = NFLOW - 1; k >= 0; k--) begin
      if (active[((int'(ptr) + k) % NFLOW)]) begin
        sel      = FW'(((int'(ptr) + k) % NFLOW));
        cr_valid = 1'b1;
      end
    end
    cr_data = make_credit(FLOW_W'(sel), fwd[sel][11:5]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < NFLOW; f++) begin
        fwd[f]      <= '0;
        last_val[f] <= '0;
      end
      refresh_pend <= '0;
      ptr          <= '0;
      timer        <= '0;
    end else begin
      for (int f = 0; f < NFLOW; f++)
        if (dep_valid[f]) fwd[f] <= fwd[f] + 12'(dep_words[f]);
      if (timer == 32'(REFRESH_CYCLES - 1)) begin
        timer        <= '0;
        refresh_pend <= '1;
      end else timer <= timer + 1'b1;
      if (cr_valid && cr_ready) begin
        last_val[sel] <= fwd[sel][11:5];
        if (timer != 32'(REFRESH_CYCLES - 1)) refresh_pend[sel] <= 1'b0;
        ptr <= (32'(sel) == NFLOW - 1) ? '0 : sel + 1'b1;
      end
    end
  end
endmodule
