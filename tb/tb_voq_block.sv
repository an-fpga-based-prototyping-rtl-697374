// tb_voq_block: four VOQs of 1024 words. Transfers of random size (up to
// 512 words) and random flow are written with reservations as the DMA
// engine makes them; the output takes words at random and credits per VOQ
// come back at random. A reference segmentation checks every packet:
// header size (32-bit words), flow, address advanced per packet,
// notification bits only on a transfer's last packet, payload words in
// order, last flag, credit taken (2*words + 2) only when available. Also
// checks that a VOQ without credit stalls while the others go on (no
// head-of-line blocking), and that dest_ready falls when a VOQ cannot take
// another maximum-size transfer.
module tb_voq_block;
  import ipc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int NV = 4, VD = 1024, PW = 64;
  logic          in_valid = 0, in_ready, reserve_valid = 0, consume, out_valid, out_ready = 0;
  logic [65:0]   in_data = 0, out_data;
  logic [1:0]    reserve_q = 0, consume_q, out_q;
  logic [10:0]   reserve_words = 0;
  logic [NV-1:0] dest_ready;
  logic [12:0]   credit_avail [NV];
  logic [8:0]    consume_words;
  voq_block #(.NV(NV), .VDEPTH(VD), .PKT_W64(PW)) dut (.*);

  int checks = 0, failures = 0;
  logic [65:0] expq [NV][$];   // expected output words per VOQ
  int  avail [NV], outstanding [NV], n_pk [NV], n_out_words = 0;
  logic cr_block [NV];

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Output side and credit model, one step per clock.
  initial begin
    for (int v = 0; v < NV; v++) begin avail[v] = 600; cr_block[v] = 0; credit_avail[v] = 13'd600; end
    forever begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 3) != 0);
      for (int v = 0; v < NV; v++) begin
        if (!cr_block[v] && outstanding[v] > 0 && $urandom_range(0, 7) == 0) begin
          int r;
          r = $urandom_range(1, outstanding[v]);
          outstanding[v] -= r; avail[v] += r;
        end
        credit_avail[v] = 13'(avail[v]);
      end
      #1;
      if (consume) begin
        check(int'(consume_words) <= avail[consume_q], "credit taken only when available");
        avail[consume_q] -= consume_words; outstanding[consume_q] += consume_words;
      end
      if (out_valid && out_ready) begin
        checks++;
        n_out_words++;
        if (expq[out_q].size() == 0 || out_data != expq[out_q][0]) begin
          failures++;
          $display("FAIL: VOQ %0d out %h expected %h", out_q, out_data,
                   expq[out_q].size() ? expq[out_q][0] : 66'h0);
        end else if (out_data[65]) begin
          check(consume && consume_q == out_q &&
                int'(consume_words) == 2 * (int'(out_data[63:54]) / 2) + 2, "credit of packet");
          n_pk[out_q]++;
        end
        if (expq[out_q].size()) void'(expq[out_q].pop_front());
      end
    end
  end

  // Writes a transfer as the DMA engine does, expecting its packets.
  task automatic transfer(input int v, input int size, input logic [4:0] op);
    pkt_hdr_t th, ph;
    logic [63:0] d [$];
    th = pkt_hdr_t'({$urandom, $urandom});
    th.size = 10'(size); th.flow = 7'(v + NV * $urandom_range(0, 3)); th.op = op;
    for (int i = 0; i < size; i++) d.push_back({$urandom, $urandom});
    // expected packets
    for (int s = 0; s < size; s += PW) begin
      int n;
      n = (size - s > PW) ? PW : size - s;
      ph = '0;
      ph.size = 10'(2 * n); ph.flow = th.flow; ph.op = op; ph.addr = th.addr + 32'(8 * s);
      if (s + n < size) begin ph.op[OP_REMOTE_IRQ] = 0; ph.op[OP_REMOTE_NOTIFY] = 0; end
      expq[v].push_back({1'b1, 1'b0, ph});
      for (int i = 0; i < n; i++) expq[v].push_back({1'b0, i == n - 1, d[s + i]});
    end
    // write: header with reservation, then the words
    @(negedge clk);
    while (!dest_ready[v]) @(negedge clk);
    in_valid = 1; in_data = {1'b1, 1'b0, th};
    reserve_valid = 1; reserve_q = 2'(v); reserve_words = 11'(size + 1);
    #2;
    while (!in_ready) begin @(negedge clk); reserve_valid = 0; #2; end
    for (int i = 0; i < size; i++) begin
      @(negedge clk);
      reserve_valid = 0;
      in_data = {1'b0, i == size - 1, d[i]};
      in_valid = ($urandom_range(0, 4) != 0);
      #2;
      while (!(in_valid && in_ready)) begin
        @(negedge clk); in_valid = 1; #2;
      end
    end
    @(negedge clk);
    in_valid = 0; reserve_valid = 0;
  endtask

  initial begin
    int total;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Head-of-line: VOQ 1 has no credit; a transfer for VOQ 2 still goes.
    cr_block[1] = 1;
    @(negedge clk); avail[1] = 0;
    transfer(1, 100, 5'b00110);
    transfer(2, 70, 5'b00010);
    repeat (600) @(negedge clk);
    check(n_pk[2] == 2 && n_pk[1] == 0, $sformatf("VOQ 2 passes blocked VOQ 1 (%0d, %0d)", n_pk[2], n_pk[1]));
    // dest_ready: with 101 + 451 words held, another 512 + 1 do not fit.
    transfer(1, 450, 5'b00000);
    @(negedge clk);
    check(!dest_ready[1] && dest_ready[0], "dest_ready falls on a filling VOQ");
    cr_block[1] = 0;
    @(negedge clk); avail[1] = 600;
    // Random transfers.
    for (int k = 0; k < 40; k++)
      transfer($urandom_range(0, NV - 1), $urandom_range(1, 512), 5'($urandom_range(0, 7)));
    total = 0;
    repeat (20000) @(negedge clk);
    for (int v = 0; v < NV; v++) check(expq[v].size() == 0, $sformatf("VOQ %0d drained", v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
