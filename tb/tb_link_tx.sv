// tb_link_tx: drives packets (32-bit datapath) and credits into the framer,
// captures the symbol stream and compares it byte for byte with a frame
// built here: sop, credits, header, CRC-16, payload, CRC-32, comma. Also
// checks a credit-only frame and that at most MAX_CREDITS ride in one frame.
module tb_link_tx;
  `include "tb_crc.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        in_valid, in_last, in_ready, cr_valid, cr_ready, tx_k, pkt_done, credit_sent;
  logic [31:0] in_data;
  logic [15:0] cr_data;
  logic [7:0]  tx_data;
  link_tx #(.DATA_W(32), .MAX_CREDITS(2)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] words [$];
  logic [15:0] creds [$];
  logic [8:0]  sym [$];      // captured {k, byte}

  // Symbols are sampled mid-cycle, where the registered outputs are stable.
  always @(negedge clk) if (rst_n) sym.push_back({tx_k, tx_data});

  // Packet source: whole packet available, pop on in_ready.
  always_comb begin
    in_valid = words.size() != 0;
    in_data  = in_valid ? words[0] : '0;
    in_last  = words.size() == 1;
    cr_valid = creds.size() != 0;
    cr_data  = cr_valid ? creds[0] : '0;
  end
  // Handshakes are decided at the falling edge and retired after the rising one.
  initial forever begin
    logic fi, fc;
    @(negedge clk);
    fi = in_ready && in_valid;
    fc = cr_ready && cr_valid;
    @(posedge clk);
    #1;
    if (fi) void'(words.pop_front());
    if (fc) void'(creds.pop_front());
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_frame(input logic [15:0] c [$], input logic [31:0] w [$]);
    logic [8:0] e [$];
    logic [7:0] hb [$], pb [$];
    logic [15:0] h16;
    logic [31:0] p32;
    int start, ok;
    e.push_back({1'b1, 8'hFB});
    foreach (c[i]) begin e.push_back({1'b0, c[i][15:8]}); e.push_back({1'b0, c[i][7:0]}); end
    if (w.size() > 0) begin
      for (int i = 0; i < 2; i++) for (int b = 3; b >= 0; b--) hb.push_back(w[i][8*b +: 8]);
      for (int i = 2; i < w.size(); i++) for (int b = 3; b >= 0; b--) pb.push_back(w[i][8*b +: 8]);
      h16 = ref_crc16(hb);
      p32 = ref_crc32(pb);
      foreach (hb[i]) e.push_back({1'b0, hb[i]});
      e.push_back({1'b0, h16[15:8]}); e.push_back({1'b0, h16[7:0]});
      foreach (pb[i]) e.push_back({1'b0, pb[i]});
      for (int b = 3; b >= 0; b--) e.push_back({1'b0, p32[8*b +: 8]});
    end
    e.push_back({1'b1, 8'hBC});
    // find the sop
    start = -1;
    foreach (sym[i]) if (start < 0 && sym[i] == {1'b1, 8'hFB}) start = i;
    ok = (start >= 0) && (sym.size() >= start + e.size());
    if (ok) foreach (e[i]) if (sym[start + i] != e[i]) begin
      ok = 0;
      $display("FAIL byte %0d: got %h expected %h", i, sym[start + i], e[i]);
      break;
    end
    checks++;
    if (!ok) begin failures++; $display("FAIL frame (start %0d, %0d symbols)", start, sym.size()); end
    if (start >= 0) repeat (start + e.size() - 1) void'(sym.pop_front());
  endtask

  initial begin
    logic [31:0] w [$];
    logic [15:0] c [$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Packet of 6 payload words with 3 credits queued (2 fit this frame).
    w = {32'h0180_1234, 32'hA000_0040};   // header: size 6, flow 3
    for (int i = 0; i < 6; i++) w.push_back(32'h1111_1111 * (i + 1));
    c = {16'h8302, 16'h8405, 16'h8507};
    foreach (w[i]) words.push_back(w[i]);
    foreach (c[i]) creds.push_back(c[i]);
    wait (pkt_done);
    repeat (3) @(posedge clk);
    expect_frame(c[0:1], w);
    // Third credit follows in a credit-only frame.
    repeat (20) @(posedge clk);
    begin logic [31:0] nw [$]; expect_frame({16'h8507}, nw); end
    checks++;
    if (words.size() != 0 || creds.size() != 0) begin failures++; $display("FAIL: leftovers"); end
    // Minimum-size packet (24-byte payload), no credits: 40 bytes on the wire.
    sym = {};
    w = {32'h0180_0000, 32'h0000_0100};
    for (int i = 0; i < 6; i++) w.push_back(32'hCAFE_0000 + i);
    foreach (w[i]) words.push_back(w[i]);
    wait (pkt_done);
    repeat (3) @(posedge clk);
    begin
      int n_sop = -1, n_end = -1;
      foreach (sym[i]) if (n_sop < 0 && sym[i] == {1'b1, 8'hFB}) n_sop = i;
      for (int i = n_sop + 1; i < sym.size(); i++) if (n_end < 0 && sym[i][8]) n_end = i;
      checks++;
      if (n_end - n_sop + 1 != 40) begin failures++; $display("FAIL: min packet %0d bytes on wire", n_end - n_sop + 1); end
    end
    begin logic [15:0] nc [$]; expect_frame(nc, w); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
