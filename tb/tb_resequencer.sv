// tb_resequencer: eight senders each send a stream of headers rotated over
// four paths; the paths deliver them with independent random delays, so
// headers of one sender arrive out of order. The release order (observed
// through the selected sender, path and sequence number at each release) is
// checked against the send order per sender. Some headers ask for an
// interrupt or a remote notification; interrupt pulses and notification
// requests must come in send order, and a notification waits for
// nt_ready. A header with a wrong sequence number must raise seq_error.
module tb_resequencer;
  import ipc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int NS = 8, NP = 4, NPK = 120;
  logic     in_valid = 0, in_ready, irq, nt_valid, nt_ready = 0, released, seq_error;
  pkt_hdr_t in_hdr = '0;
  resequencer #(.NSRC(NS), .NPATH(NP), .QD(8)) dut (.*);

  int checks = 0, failures = 0;
  pkt_hdr_t pathq [NS][NP][$];   // headers in flight on each path, per sender
  int       rel_n [NS];          // headers of each sender released so far
  logic [4:0] ops [NS][$];       // op of each sent header, in send order
  int n_irq_exp = 0, n_irq = 0, n_nt_exp = 0, n_nt = 0, n_seqerr = 0, n_rel = 0, n_ooo = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Release monitor: a header leaves when the sender it picked has a head
  // header and is not blocked on a notification.
  initial forever begin
    @(negedge clk);
    nt_ready = ($urandom_range(0, 2) == 0);
    #1;
    if (irq) n_irq++;
    if (seq_error) n_seqerr++;
    if (dut.go) begin
      int s, k;
      s = dut.s_pick;
      k = rel_n[s];
      // (the last, deliberately wrong header is checked through seq_error)
      if (k < NPK) checks++;
      if (k < NPK && (int'(dut.hp) != k % NP || int'(dut.head_e.seq) != (k / NP) % 32 ||
          dut.head_e.op != ops[s][k])) begin
        failures++;
        $display("FAIL: sender %0d release %0d path %0d seq %0d", s, k, dut.hp, dut.head_e.seq);
      end
      if (nt_valid) n_nt++;
      rel_n[s]++;
      n_rel++;
    end
  end

  initial begin
    int sent [NS];
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Fill the paths: sender s sends NPK headers rotated over the paths.
    for (int s = 0; s < NS; s++)
      for (int k = 0; k < NPK; k++) begin
        pkt_hdr_t h;
        h = pkt_hdr_t'({$urandom, $urandom});
        h.op = '0;
        if (k % 7 == 3) begin h.op[OP_REMOTE_IRQ] = 1; n_irq_exp++; end
        if (k % 11 == 5) begin h.op[OP_REMOTE_NOTIFY] = 1; n_nt_exp++; end
        h.reseq = {3'(s), 2'(k % NP), 5'((k / NP) % 32)};
        pathq[s][k % NP].push_back(h);
        ops[s].push_back(h.op);
      end
    // Deliver: a random sender and path each time, in FIFO order per path.
    for (int n = 0; n < NS * NPK; ) begin
      int s, p;
      s = $urandom_range(0, NS - 1);
      p = $urandom_range(0, NP - 1);
      if (pathq[s][p].size() == 0) continue;
      @(negedge clk);
      in_valid = 1; in_hdr = pathq[s][p][0];
      #2;
      // A full path queue: try another path (that path's link would stall).
      if (!in_ready) begin
        @(negedge clk);
        in_valid = 0;
        continue;
      end
      if (int'(in_hdr.reseq[6:5]) != sent[s] % NP) n_ooo++;
      @(negedge clk);
      in_valid = 0;
      void'(pathq[s][p].pop_front());
      sent[s]++;
      n++;
    end
    repeat (2000) @(negedge clk);
    for (int s = 0; s < NS; s++) check(rel_n[s] == NPK, $sformatf("sender %0d released %0d", s, rel_n[s]));
    check(n_irq == n_irq_exp, $sformatf("irq %0d of %0d", n_irq, n_irq_exp));
    check(n_nt == n_nt_exp, $sformatf("notifications %0d of %0d", n_nt, n_nt_exp));
    check(n_seqerr == 0, "no sequence errors");
    check(n_ooo > 100, $sformatf("out-of-order arrivals %0d", n_ooo));
    // A header whose sequence number skips one is reported.
    @(negedge clk);
    in_valid = 1;
    in_hdr = '0;
    in_hdr.reseq = {3'd2, 2'((NPK) % NP), 5'(((NPK / NP) + 1) % 32)};
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(negedge clk);
    check(n_seqerr == 1, "sequence error reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
