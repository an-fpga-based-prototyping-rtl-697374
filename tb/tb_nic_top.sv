// tb_nic_top: one NIC (node 0, defaults except a short credit refresh
// period) with its four links looped back to its own inputs, so that it
// sends to itself over four paths, and a behavioural host memory. Posts a
// 512-word transfer with local notification, remote interrupt and remote
// notification, then a benchmark-mode transfer; checks the data written in
// place, the interrupt, both notification words, the event counters read
// over the target port, and that all four links carried packets.
module tb_nic_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        tgt_wr_en = 0, tgt_rd_en = 0;
  logic [15:0] tgt_addr = 0, tgt_rd_addr = 0;
  logic [63:0] tgt_wdata = 0, tgt_rd_data;
  logic        mem_req_valid, mem_req_ready, mem_req_we, mem_wvalid, mem_wlast, mem_wready;
  logic        mem_rvalid, mem_rready;
  logic [63:0] mem_req_addr, mem_wdata, mem_rdata;
  logic [9:0]  mem_req_len;
  logic [7:0]  lnk_d [4];
  logic        lnk_k [4];
  logic        irq;
  logic [11:0] events;

  nic_top #(.REFRESH_CYCLES(4096)) dut (
    .clk, .rst_n, .tgt_wr_en, .tgt_addr, .tgt_wdata, .tgt_rd_en, .tgt_rd_addr, .tgt_rd_data,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_len,
    .mem_wvalid, .mem_wdata, .mem_wlast, .mem_wready, .mem_rvalid, .mem_rdata, .mem_rready,
    .tx_data(lnk_d), .tx_k(lnk_k), .rx_data(lnk_d), .rx_k(lnk_k), .irq, .events);
  tb_host_mem #(.AW(16)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_len(mem_req_len), .wvalid(mem_wvalid), .wdata(mem_wdata),
    .wlast(mem_wlast), .wready(mem_wready), .rvalid(mem_rvalid), .rdata(mem_rdata),
    .rready(mem_rready));

  int checks = 0, failures = 0, n_irq = 0, sops [4];

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

  always @(negedge clk) if (rst_n) begin
    if (irq) n_irq++;
    for (int k = 0; k < 4; k++) if (lnk_k[k] && lnk_d[k] == 8'hFB) sops[k]++;
  end

  task automatic wr(input logic [15:0] a, input logic [63:0] d);
    @(negedge clk);
    tgt_wr_en = 1; tgt_addr = a; tgt_wdata = d;
    @(negedge clk);
    tgt_wr_en = 0;
  endtask

  task automatic rd(input logic [15:0] a, output logic [63:0] d);
    @(negedge clk);
    tgt_rd_en = 1; tgt_rd_addr = a;
    @(negedge clk);
    tgt_rd_en = 0;
    d = tgt_rd_data;
  endtask

  // descriptor word 1: start, op, flow, size (64-bit words), destination
  function automatic logic [63:0] w1(input bit start, input logic [4:0] op,
                                     input logic [6:0] flow, input logic [9:0] size,
                                     input logic [31:0] dst);
    return {start, 9'd0, op, flow, size, dst};
  endfunction

  initial begin
    logic [63:0] d;
    for (int i = 0; i < 512; i++) u_mem.mem[16'h0200 + i] = {32'hC0DE_0000 + 32'(i), $urandom};
    for (int i = 0; i < 600; i++) u_mem.mem[16'h2000 + i] = '1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(16'h4000, 64'h0001_8000);   // local notification base
    wr(16'h4008, 64'h0001_9000);   // remote notification flag
    wr(16'h4010, 64'h0);           // node 0
    // 512 words from 0x1000 to 0x10000, flow 0 (this node): local notify,
    // remote irq, remote notify.
    wr(16'h0000, 64'h1000);
    wr(16'h0008, w1(1, 5'b00111, 7'd0, 10'd512, 32'h0001_0000));
    wait (u_mem.mem[32'h1_9000 >> 3] == 64'd1);
    repeat (20) @(negedge clk);
    begin
      int bad = 0;
      for (int i = 0; i < 512; i++) if (u_mem.mem[16'h2000 + i] != u_mem.mem[16'h0200 + i]) bad++;
      check(bad == 0, $sformatf("%0d words wrong at the destination", bad));
    end
    check(n_irq == 1, $sformatf("interrupts %0d", n_irq));
    check(u_mem.mem[32'h1_8000 >> 3] == 64'd1, "local notification: queue 0 pointer");
    for (int k = 0; k < 4; k++) check(sops[k] >= 2, $sformatf("link %0d used", k));
    // Benchmark mode: 64 zero words to 0x11000 with remote notify.
    wr(16'h0010, 64'h1000);
    wr(16'h0018, w1(1, 5'b01100, 7'd0, 10'd64, 32'h0001_1000));
    wait (u_mem.mem[32'h1_9000 >> 3] == 64'd2);
    repeat (20) @(negedge clk);
    begin
      int bad = 0;
      for (int i = 0; i < 64; i++) if (u_mem.mem[16'h2200 + i] != 0) bad++;
      check(bad == 0, "zero payload written");
    end
    // Event counters: 2 transfers, 8 + 1 packets, 2 remote notifications.
    rd(16'h4100, d); check(d == 2, $sformatf("transfer counter %0d", d));
    rd(16'h4108, d); check(d == 9, $sformatf("received packet counter %0d", d));
    rd(16'h4110, d); check(d == 0, "bad packet counter");
    rd(16'h4118, d); check(d == 1, "local notification counter");
    rd(16'h4120, d); check(d == 2, "remote notification counter");
    rd(16'h4128, d); check(d == 1, "interrupt counter");
    rd(16'h4130, d); check(d == 0, "sequence error counter");
    rd(16'h4140, d); check(d == 9, $sformatf("packets sent counter %0d", d));
    rd(16'h4150, d); check(d == 9, "headers released");
    rd(16'h4200, d); check(d == 2, "queue 0 pointer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
