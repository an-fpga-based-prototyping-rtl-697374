// tb_wl_link_rate: link throughput workload. One link framer at its default
// sizes (64-bit words, up to four credits per frame) is fed back-to-back
// packets from a source that always has the next packet ready, first of the
// maximum size (512 B payload) and then of the minimum size (24 B payload).
// The clocks between successive pkt_done pulses give the symbols each packet
// occupies on the wire: 1 sop + 8 header + 2 CRC-16 + payload + 4 CRC-32 +
// 1 comma, i.e. 528 symbols for a maximum and 40 for a minimum packet. With
// one byte per clock at the 2.5 Gb/s line rate, a maximum packet carries
// 512/528 of it, 2.42 Gb/s, at least the 2.4 Gb/s measured for one flow on
// the reference platform. A final run adds four credits to every frame and
// checks that each costs exactly two symbols. Credits, headers and payload
// contents are not checked here (tb_link_tx does that).
module tb_wl_link_rate;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        in_valid, in_last, in_ready, cr_valid, cr_ready, tx_k, pkt_done, credit_sent;
  logic [63:0] in_data;
  logic [15:0] cr_data;
  logic [7:0]  tx_data;
  link_tx dut (.*);

  int checks = 0, failures = 0;
  int pay_w = 64;            // payload words of every packet sent
  int wleft = 0;             // words of the current packet still to send
  bit with_credits = 0;
  int ncred_sent = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Source: a new packet is ready as soon as the previous one is taken.
  always_comb begin
    in_valid = 1'b1;
    in_data  = {$bits(in_data){1'b0}};
    if (wleft == 0) begin
      in_data[63:54] = 10'(2 * pay_w);   // header: size in 32-bit words
    end else
      in_data = {32'(wleft), 32'hA5A5_0000};
    in_last  = (wleft == pay_w);
    cr_valid = with_credits;
    cr_data  = 16'h8001;
  end
  initial forever begin
    logic fi;
    @(negedge clk);
    fi = in_ready && in_valid && rst_n;
    @(posedge clk);
    #1;
    if (fi) wleft = (wleft == pay_w) ? 0 : wleft + 1;
  end

  // Clocks between pkt_done pulses.
  int t = 0, t_last = -1, gaps [$];
  always @(negedge clk) if (rst_n) begin
    t++;
    if (credit_sent) ncred_sent++;
    if (pkt_done) begin
      if (t_last >= 0) gaps.push_back(t - t_last);
      t_last = t;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int words, input int n, input int expect_gap, input string what);
    int lo, hi;
    @(negedge clk);
    wait (wleft == 0);
    pay_w = words;
    gaps.delete();
    t_last = -1;
    // Skip the first gaps: the packet under way when the size changed.
    wait (gaps.size() == n + 2);
    lo = gaps[2]; hi = gaps[2];
    for (int i = 2; i < gaps.size(); i++) begin
      if (gaps[i] < lo) lo = gaps[i];
      if (gaps[i] > hi) hi = gaps[i];
    end
    check(lo == expect_gap && hi == expect_gap,
          $sformatf("%s: %0d..%0d symbols per packet, expected %0d", what, lo, hi, expect_gap));
    $display("%s: %0d symbols per packet of %0d payload bytes, payload share %0d/1000",
             what, hi, 8 * words, 8000 * words / hi);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(64, 20, 528, "maximum packets");
    check(8000 * 64 / 528 >= 960, "maximum packets carry at least 96% of the line rate");
    run(3, 50, 40, "minimum packets");
    with_credits = 1;
    run(64, 20, 536, "maximum packets with four credits each");
    check(ncred_sent >= 4 * 20, $sformatf("credits sent %0d", ncred_sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
