// tb_multipath_tx: random packets for four destinations pass through the
// multipath stage while the four links accept words at random. Checks that
// destination v's n-th packet goes whole to path n mod 4, that path_next
// predicts it, that the header's reseq field is {node, path, sequence per
// destination and path} and that all other fields and words are unchanged.
module tb_multipath_tx;
  import ipc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int NV = 4, NP = 4;
  logic [2:0]  node_id = 3'd6;
  logic        in_valid = 0, in_ready;
  logic [65:0] in_data = 0, out_data;
  logic [1:0]  in_q = 0;
  logic [1:0]  path_next [NV];
  logic [NP-1:0] out_valid, out_ready = '0;
  multipath_tx #(.NV(NV), .NPATH(NP)) dut (.*);

  int checks = 0, failures = 0;
  int npkt [NV], nseq [NV][NP];
  logic [65:0] expq [NP][$];

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

  // Output checker: words leaving each path must match that path's queue.
  initial forever begin
    @(negedge clk);
    out_ready = NP'($urandom);
    #1;
    for (int p = 0; p < NP; p++)
      if (out_valid[p] && out_ready[p]) begin
        checks++;
        if (expq[p].size() == 0 || out_data != expq[p][0]) begin
          failures++;
          $display("FAIL: path %0d got %h expected %h", p, out_data, expq[p].size() ? expq[p][0] : 66'h0);
        end
        if (expq[p].size()) void'(expq[p].pop_front());
      end
    check($countones(out_valid) <= 1, "one path at a time");
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 800; k++) begin
      int v, p, len;
      pkt_hdr_t h, he;
      v   = $urandom_range(0, NV - 1);
      len = $urandom_range(0, 6);
      p   = npkt[v] % NP;
      h   = pkt_hdr_t'({$urandom, $urandom});
      he  = h;
      he.reseq = {node_id, 2'(p), 5'(nseq[v][p] % 32)};
      check(path_next[v] == 2'(p), $sformatf("path_next of %0d", v));
      expq[p].push_back({1'b1, len == 0, he});
      for (int i = 0; i < len; i++) expq[p].push_back({1'b0, i == len - 1, $urandom, $urandom});
      // Drive header and payload (payload values from the expected queue).
      for (int i = 0; i <= len; i++) begin
        @(negedge clk);
        in_valid = 1; in_q = 2'(v);
        in_data = (i == 0) ? {1'b1, len == 0, h} : expq[p][expq[p].size() - len + i - 1];
        #2;
        while (!in_ready) begin @(negedge clk); #2; end
      end
      @(negedge clk);
      in_valid = 0;
      npkt[v]++; nseq[v][p]++;
      @(posedge clk);
    end
    repeat (100) @(negedge clk);
    for (int p = 0; p < NP; p++) check(expq[p].size() == 0, "all words delivered");
    for (int v = 0; v < NV; v++) check(nseq[v][0] > 32, "sequence numbers wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
