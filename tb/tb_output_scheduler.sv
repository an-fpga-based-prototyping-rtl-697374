// tb_output_scheduler: four crosspoint queues modelled in the testbench feed
// one output scheduler; the link takes a word every fourth clock and credits
// come back at random. Checks the round-robin service order with all inputs
// busy, that each packet leaves whole and unmixed, that credit is taken
// (size + 2 words) only when available and reported to the right input, and
// that a credit shortage stalls the output until credit returns.
module tb_output_scheduler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int N = 4;
  logic [N-1:0] pkt_avail = '0, head_last = '0, pop, dep_valid;
  logic [31:0]  head_data [N];
  logic         out_valid, out_last, out_ready = 0, consume, credit_stall;
  logic [31:0]  out_data;
  logic [12:0]  credit_avail = 13'd512;
  logic [8:0]   consume_words, dep_words;
  output_scheduler #(.N(N)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  logic [32:0] q [N][$];          // {last, word}
  int          npk [N];           // complete packets queued per input
  int          avail = 512, outstanding = 0, n_stall = 0, n_served = 0;
  int          order [$];         // inputs in service order
  logic [32:0] cur [$];           // packet being sent, expected words
  logic        give_credit = 1;

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

  task automatic refresh_heads();
    for (int i = 0; i < N; i++) begin
      pkt_avail[i] = npk[i] != 0;
      head_data[i] = q[i].size() ? q[i][0][31:0] : 32'h0;
      head_last[i] = q[i].size() ? q[i][0][32] : 1'b0;
    end
  endtask

  task automatic add_packet(input int i, input int size);
    q[i].push_back({1'b0, 10'(size), 22'($urandom)});
    q[i].push_back({1'b0, 32'(i)});
    for (int k = 0; k < size; k++) q[i].push_back({k == size - 1, $urandom});
    npk[i]++;
  endtask

  // One loop per clock: drive at the falling edge, sample the settled
  // combinational outputs, apply the effect after the rising edge.
  initial begin
    for (int i = 0; i < N; i++) head_data[i] = 0;
    forever begin
      logic [N-1:0] p;
      logic c;
      int cw;
      @(negedge clk);
      cyc++;
      out_ready = (cyc % 4 == 0);
      if (give_credit && outstanding > 0 && $urandom_range(0, 3) == 0) begin
        int r;
        r = $urandom_range(1, outstanding);
        outstanding -= r; avail += r;
      end
      credit_avail = 13'(avail);
      #1;
      p = pop; c = consume; cw = consume_words;
      if (credit_stall) n_stall++;
      if (c) begin
        int src;
        src = -1;
        for (int i = 0; i < N; i++) if (dep_valid[i]) src = i;
        check(cw <= avail, "consume only with credit");
        check($countones(dep_valid) == 1 && dep_words == cw, "one departure report");
        check(src >= 0 && cw == int'(head_data[src][31:22]) + 2, "credit of size + 2");
        order.push_back(src);
        cur = {};
        if (src >= 0) for (int k = 0; k < int'(head_data[src][31:22]) + 2; k++) cur.push_back(q[src][k]);
        avail -= cw; outstanding += cw;
      end
      if (p != 0) begin
        int i;
        i = $clog2(p);
        check($countones(p) == 1 && out_valid && cur.size() && {out_last, out_data} == cur[0],
              $sformatf("word out at %0d", cyc));
        if (cur.size()) void'(cur.pop_front());
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) if (p[i]) begin
        if (q[i][0][32]) begin npk[i]--; n_served++; end
        void'(q[i].pop_front());
      end
      refresh_heads();
    end
  end

  initial begin
    int n_expect;
    // Phase 1: three packets per input before reset: strict rotation.
    for (int r = 0; r < 3; r++) for (int i = 0; i < N; i++) add_packet(i, $urandom_range(1, 16));
    refresh_heads();
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_served == 3 * N);
    foreach (order[k]) check(order[k] == k % N, $sformatf("service %0d from input %0d", k, order[k]));
    // Phase 2: credit cut off: the output stalls.
    give_credit = 0;
    @(negedge clk);
    for (int i = 0; i < N; i++) add_packet(i, 250);
    n_expect = n_served + N;
    repeat (3000) @(negedge clk);
    check(n_stall > 100, $sformatf("stalled without credit (%0d clocks)", n_stall));
    check(n_served < n_expect, "not all served without credit");
    give_credit = 1;
    // Phase 3: random arrivals.
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      add_packet($urandom_range(0, N - 1), $urandom_range(1, 128));
      n_expect++;
      repeat ($urandom_range(0, 150)) @(negedge clk);
    end
    wait (n_served == n_expect);
    repeat (10) @(negedge clk);
    check(cur.size() == 0, "last packet complete");
    for (int i = 0; i < N; i++) check(q[i].size() == 0, "queues drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
