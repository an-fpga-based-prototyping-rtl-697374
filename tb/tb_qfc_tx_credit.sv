// tb_qfc_tx_credit: random word consumption and credits on 4 flows, checked
// against a reference count of words in flight per flow, plus directed
// cases: the buffer filling to zero space, a credit reopening it, counter
// wrap-around, a lost credit repaired by a later one, and a single-lane
// instance taking every credit whatever its flow number.
module tb_qfc_tx_credit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int NF = 4, BUF = 512;
  logic        consume = 0, cr_valid = 0, consume1 = 0, cr_valid1 = 0;
  logic [2:0]  consume_flow = 0;
  logic [8:0]  consume_words = 0;
  logic [15:0] cr_data = 0;
  logic [12:0] avail [NF];
  logic [12:0] avail1 [1];
  logic [0:0]  cf1 = 0;
  qfc_tx_credit #(.NFLOW(NF), .BUF_WORDS(BUF)) dut (.*);
  qfc_tx_credit #(.NFLOW(1), .BUF_WORDS(BUF), .SINGLE_LANE(1)) dut1 (
    .clk, .rst_n, .consume(consume1), .consume_flow(cf1), .consume_words(consume_words),
    .cr_valid(cr_valid1), .cr_data(cr_data), .avail(avail1));

  int checks = 0, failures = 0;
  int sent [NF], fwd [NF];   // fwd: receiver's forwarded words, multiple of 32

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] credit(input int flow, input int val);
    logic [15:0] c;
    c = {1'b1, 7'(flow), 7'(val), 1'b0};
    c[0] = ^c[15:1];
    return c;
  endfunction

  function automatic int model_avail(input int f);
    int inflight;
    inflight = sent[f] - fwd[f];
    return (inflight >= BUF) ? 0 : BUF - inflight;
  endfunction

  task automatic step_consume(input int f, input int n);
    @(negedge clk);
    consume = 1; consume_flow = 3'(f); consume_words = 9'(n);
    @(negedge clk);
    consume = 0;
    sent[f] += n;
  endtask

  task automatic step_credit(input int f);
    @(negedge clk);
    cr_valid = 1; cr_data = credit(f, (fwd[f] / 32) % 128);
    @(negedge clk);
    cr_valid = 0;
  endtask

  task automatic compare(input string what);
    for (int f = 0; f < NF; f++)
      check(int'(avail[f]) == model_avail(f),
            $sformatf("%s flow %0d avail %0d model %0d", what, f, avail[f], model_avail(f)));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare("reset");
    // Fill flow 2 exactly.
    step_consume(2, 258); step_consume(2, 254);
    check(avail[2] == 0, "flow 2 full");
    compare("fill");
    // Receiver forwarded 100 words: credit says 96 (rounded down).
    fwd[2] = 96; step_credit(2);
    check(avail[2] == 96, "credit rounds down");
    // Random traffic with wrap-around: many thousand words per flow.
    for (int it = 0; it < 3000; it++) begin
      int f, n;
      f = $urandom_range(0, NF - 1);
      if ($urandom_range(0, 1) == 0) begin
        n = $urandom_range(2, 258);
        if (n <= model_avail(f)) step_consume(f, n);
      end else begin
        // The receiver forwards some words it holds; the credit may be lost.
        int held;
        held = sent[f] - fwd[f];
        fwd[f] += (held / 32 > 0) ? 32 * $urandom_range(0, held / 32) : 0;
        // One credit in four is lost on the wire; the next one repairs it.
        if ($urandom_range(0, 3) != 0) step_credit(f);
      end
      if (it % 50 == 0) begin
        // Repair lost credits before comparing.
        for (int g = 0; g < NF; g++) step_credit(g);
        compare("random");
      end
    end
    for (int g = 0; g < NF; g++) check(sent[g] > 4096, "counters wrapped");
    // Single lane: a credit for flow 9 still counts.
    @(negedge clk); consume1 = 1; consume_words = 9'd300;
    @(negedge clk); consume1 = 0;
    check(avail1[0] == 212, "single lane consume");
    @(negedge clk); cr_valid1 = 1; cr_data = credit(9, 8);
    @(negedge clk); cr_valid1 = 0;
    check(avail1[0] == 468, "single lane credit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
