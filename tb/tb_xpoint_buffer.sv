// tb_xpoint_buffer: a 64-word crosspoint buffer written with random packets
// (some ending with the error flag) while a reader pops complete packets at
// random. Checks that exactly the error-free packets come out, in order and
// with their last flags, that pkt_count matches when the buffer is quiet,
// and, with the reader stopped, that a packet that does not fit raises
// overflow once and is dropped while the buffer keeps its earlier packets.
module tb_xpoint_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int DEPTH = 64;
  logic        wr_valid = 0, wr_last = 0, wr_err = 0, rd_pop = 0, rd_last, overflow;
  logic [31:0] wr_data = 0, rd_data;
  logic [9:0]  pkt_count;
  xpoint_buffer #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_ovf = 0, n_pkts_out = 0;
  logic [32:0] expq [$];    // {last, data} of committed packets, in order
  int          occ = 0;     // words committed and not yet popped, plus in writing
  logic        reading = 1, in_pkt = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n && overflow) n_ovf++;

  // Reader: decide a pop at the falling edge, check the word it takes.
  initial forever begin
    @(negedge clk);
    rd_pop = 0;
    if (reading && (in_pkt || pkt_count != 0) && $urandom_range(0, 2) != 0) begin
      rd_pop = 1;
      checks++;
      if (expq.size() == 0 || {rd_last, rd_data} != expq[0]) begin
        failures++;
        $display("FAIL: read %h expected %h", {rd_last, rd_data},
                 expq.size() ? expq[0] : 33'h0);
      end
      if (expq.size()) void'(expq.pop_front());
      occ--;
      in_pkt = !rd_last;
      if (rd_last) n_pkts_out++;
    end
  end

  task automatic send(input int len, input logic err, input logic commit);
    logic [32:0] w [$];
    for (int i = 0; i < len; i++) w.push_back({i == len - 1, $urandom});
    occ += len;
    foreach (w[i]) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin wr_valid = 0; @(negedge clk); end
      wr_valid = 1; wr_data = w[i][31:0]; wr_last = w[i][32]; wr_err = err && w[i][32];
      // The packet is readable after the edge that takes its last word.
      if (w[i][32] && commit && !err) foreach (w[j]) expq.push_back(w[j]);
    end
    @(negedge clk);
    wr_valid = 0; wr_last = 0; wr_err = 0;
    if (!commit || err) occ -= len;
  endtask

  initial begin
    int n_good = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Random phase: only packets that fit.
    for (int p = 0; p < 300; p++) begin
      int len;
      logic err;
      len = $urandom_range(1, 20);
      err = ($urandom_range(0, 5) == 0);
      while (occ + len > DEPTH) @(negedge clk);
      send(len, err, 1);
      if (!err) n_good++;
    end
    repeat (200) @(negedge clk);
    check(expq.size() == 0 && pkt_count == 0, "all good packets read");
    check(n_pkts_out == n_good, $sformatf("packets out %0d good %0d", n_pkts_out, n_good));
    check(n_ovf == 0, "no overflow while packets fit");
    // Overflow phase: reader stopped.
    reading = 0;
    send(30, 0, 1);
    send(30, 0, 1);
    repeat (2) @(negedge clk);
    check(pkt_count == 2, "two packets held");
    send(10, 0, 0);            // 70 > 64 words: dropped
    repeat (2) @(negedge clk);
    check(n_ovf == 1, $sformatf("overflow pulses %0d", n_ovf));
    check(pkt_count == 2, "dropped packet not counted");
    send(4, 0, 1);             // 64 words exactly: fits
    repeat (2) @(negedge clk);
    check(pkt_count == 3, "packet filling the buffer exactly");
    reading = 1;
    repeat (200) @(negedge clk);
    check(expq.size() == 0 && pkt_count == 0, "buffer drained after overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
