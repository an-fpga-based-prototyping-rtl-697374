// tb_dma_req_queue: four queues of eight descriptors. The host writes
// descriptors at each queue's tail, some with the start flag; a reader
// model takes released descriptors. A reference model of slots, head and
// release point checks pending, the descriptor words read, the head
// pointers, that nothing is released before a start flag (clustering), that
// a start flag releases every descriptor up to its slot at once, and
// wrap-around of the circular queues.
module tb_dma_req_queue;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int NQ = 4, QD = 8;
  logic          wr_en = 0, wr_word = 0, rd_en = 0, rd_word = 0, pop = 0;
  logic [1:0]    wr_q = 0, rd_q = 0, pop_q = 0;
  logic [2:0]    wr_slot = 0;
  logic [63:0]   wr_data = 0, rd_data;
  logic [NQ-1:0] pending;
  logic [3:0]    head_ptr [NQ];
  dma_req_queue #(.NQ(NQ), .QDEPTH(QD)) dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] slot_w [NQ][QD][2];
  int head [NQ], tail [NQ], rel [NQ], n_taken = 0, n_written = 0;

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

  task automatic compare();
    for (int q = 0; q < NQ; q++) begin
      check(pending[q] == (rel[q] != head[q]), $sformatf("pending %0d", q));
      check(head_ptr[q] == 4'(head[q]), $sformatf("head_ptr %0d", q));
    end
  endtask

  // Writes descriptor at queue q's tail; word 1 is written last.
  task automatic put(input int q, input logic start);
    logic [63:0] w0, w1;
    w0 = {$urandom, $urandom};
    w1 = {start, 31'($urandom), $urandom};
    for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      wr_en = 1; wr_q = 2'(q); wr_slot = 3'(tail[q] % QD); wr_word = k[0];
      wr_data = k ? w1 : w0;
    end
    @(negedge clk);
    wr_en = 0;
    slot_w[q][tail[q] % QD][0] = w0;
    slot_w[q][tail[q] % QD][1] = w1;
    tail[q]++;
    if (start) rel[q] = tail[q];
    n_written++;
  endtask

  task automatic take(input int q);
    for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      rd_en = 1; rd_q = 2'(q); rd_word = k[0];
      @(negedge clk);
      rd_en = 0;
      check(rd_data == slot_w[q][head[q] % QD][k], $sformatf("queue %0d descriptor word %0d", q, k));
    end
    @(negedge clk);
    pop = 1; pop_q = 2'(q);
    @(negedge clk);
    pop = 0;
    head[q]++;
    n_taken++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Clustering: three descriptors without start are not released.
    put(1, 0); put(1, 0); put(1, 0);
    repeat (3) @(negedge clk);
    check(pending == '0, "held before start flag");
    put(1, 1);
    @(negedge clk);
    compare();
    for (int k = 0; k < 4; k++) take(1);
    compare();
    // Random traffic with wrap-around.
    for (int it = 0; it < 2000; it++) begin
      int q;
      q = $urandom_range(0, NQ - 1);
      if ($urandom_range(0, 1) == 0) begin
        if (tail[q] - head[q] < QD) put(q, $urandom_range(0, 2) == 0 || tail[q] - head[q] == QD - 1);
      end else if (rel[q] != head[q]) take(q);
      @(negedge clk);
      compare();
    end
    check(n_taken > 4 * QD && n_written > 4 * QD, "queues wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
