// tb_wl_fanin: many-to-one workload on one switch output. Three of the eight
// inputs of a default-size output scheduler always hold maximum packets
// (512 B payload, 130 32-bit words with the header) for the same output, as
// when three nodes send to one destination. The link takes one word every
// fourth clock (one byte per clock) and has ample credit. The testbench
// counts the packets each input gets out over 90 packets and the clocks the
// output spends between packets. Round robin must give each input a third
// of the output (the reference platform measured 0.79 Gb/s per flow, 2.37
// Gb/s together), and the scheduling decision between packets must cost at
// most three clocks, less than the framing bytes the link adds anyway, so the
// output link stays fully used. The words must arrive whole and in order per
// input.
module tb_wl_fanin;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int N = 8, PW = 130, NPKT = 90;
  localparam int SRC [3] = '{1, 4, 6};
  logic [N-1:0] pkt_avail, head_last, pop, dep_valid;
  logic [31:0]  head_data [N];
  logic         out_valid, out_last, out_ready, consume, credit_stall;
  logic [31:0]  out_data;
  logic [12:0]  credit_avail = 13'd4095;
  logic [8:0]   consume_words, dep_words;
  output_scheduler dut (.*);

  int checks = 0, failures = 0;
  int widx [N];        // next word index of each input's current packet
  int got [N];         // packets sent by each input
  int npkt = 0, gap = 0, max_gap = 0, t = 0;
  int exp_w = 0;       // expected word index on the output

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Crosspoint models: the sources always have the next packet stored.
  // Word 0 carries the size (128 payload words) in bits 31:22; every word
  // also carries {input, word index} in its low bits.
  always_comb
    for (int i = 0; i < N; i++) begin
      pkt_avail[i] = (i == SRC[0]) || (i == SRC[1]) || (i == SRC[2]);
      head_data[i] = {10'(widx[i] == 0 ? PW - 2 : 0), 6'd0, 8'(i), 8'(widx[i])};
      head_last[i] = (widx[i] == PW - 1);
    end
  assign out_ready = (t % 4 == 3);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial forever begin
    logic [N-1:0] p;
    logic         v, last;
    logic [31:0]  d;
    @(negedge clk);
    #1;
    p = pop; v = out_valid && out_ready; last = out_last; d = out_data;
    if (rst_n && npkt > 0 && !out_valid) gap++;
    @(posedge clk);
    #1;
    t++;
    if (v) begin
      if (int'(d[7:0]) != exp_w) begin
        failures++;
        $display("FAIL: word %0d of a packet from input %0d, expected %0d", d[7:0], d[15:8], exp_w);
      end
      exp_w = last ? 0 : exp_w + 1;
      if (last) begin
        got[d[15:8]]++;
        npkt++;
        if (gap > max_gap) max_gap = gap;
        gap = 0;
      end
    end
    for (int i = 0; i < N; i++)
      if (p[i]) widx[i] = (widx[i] == PW - 1) ? 0 : widx[i] + 1;
  end

  initial begin
    int total;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (npkt == NPKT);
    total = 0;
    for (int i = 0; i < N; i++) total += got[i];
    check(total == NPKT, $sformatf("%0d packets", total));
    for (int k = 0; k < 3; k++)
      check(got[SRC[k]] == NPKT / 3, $sformatf("input %0d sent %0d of %0d packets",
                                               SRC[k], got[SRC[k]], NPKT));
    check(max_gap <= 3, $sformatf("at most 3 clocks between packets, saw %0d", max_gap));
    $display("fan-in 3 to 1: packets per input %0d/%0d/%0d, longest gap %0d clocks",
             got[SRC[0]], got[SRC[1]], got[SRC[2]], max_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
