// tb_link_rx: feeds hand-built frames (32-bit datapath) into the deframer and
// checks the words, header, credits and error flags it reports: a clean
// packet with two credits, a credit with bad parity, a payload bit error, a
// header CRC error (packet dropped), a frame cut by a control symbol, and a
// clean packet afterwards. Also checks that the last word leaves a fixed
// few clocks after the frame's last CRC byte.
module tb_link_rx;
  `include "tb_crc.svh"
  import ipc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0]  rx_data = 8'hBC;
  logic        rx_k = 1'b1;
  logic        out_valid, out_last, out_err, cr_valid, hdr_crc_err, cr_parity_err;
  logic [31:0] out_data;
  pkt_hdr_t    out_hdr;
  logic [15:0] cr_data;
  link_rx #(.DATA_W(32)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] got [$];
  logic        got_err [$];
  logic [15:0] got_cr [$];
  int n_hcrc = 0, n_par = 0, last_cyc = 0, cyc = 0;

  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      got.push_back(out_data);
      if (out_last) begin got_err.push_back(out_err); last_cyc = cyc; end
    end
    if (cr_valid) got_cr.push_back(cr_data);
    if (hdr_crc_err) n_hcrc++;
    if (cr_parity_err) n_par++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] credit(input int flow, input int val, input logic bad);
    logic [15:0] c;
    c = {1'b1, 7'(flow), 7'(val), 1'b0};
    c[0] = ^c[15:1];
    if (bad) c[0] = ~c[0];
    return c;
  endfunction

  task automatic sym(input logic k, input logic [7:0] d);
    @(negedge clk);
    rx_k = k; rx_data = d;
  endtask

  // Sends a frame; flip_at >= 0 inverts bit 0 of that frame byte (counted
  // from the first byte after sop); cut_at >= 0 ends the frame early with a
  // comma before that byte.
  task automatic frame(input logic [15:0] cr [$], input logic [31:0] w [$],
                       input int flip_at, input int cut_at, output int sent);
    logic [7:0] b [$], hb [$], pb [$];
    logic [15:0] h16;
    logic [31:0] p32;
    foreach (cr[i]) begin b.push_back(cr[i][15:8]); b.push_back(cr[i][7:0]); end
    if (w.size() > 0) begin
      for (int i = 0; i < 2; i++) for (int k = 3; k >= 0; k--) hb.push_back(w[i][8*k +: 8]);
      for (int i = 2; i < w.size(); i++) for (int k = 3; k >= 0; k--) pb.push_back(w[i][8*k +: 8]);
      h16 = ref_crc16(hb);
      p32 = ref_crc32(pb);
      foreach (hb[i]) b.push_back(hb[i]);
      b.push_back(h16[15:8]); b.push_back(h16[7:0]);
      foreach (pb[i]) b.push_back(pb[i]);
      for (int k = 3; k >= 0; k--) b.push_back(p32[8*k +: 8]);
    end
    if (flip_at >= 0) b[flip_at] ^= 8'h01;
    sym(1'b1, K_SOP);
    sent = 0;
    foreach (b[i]) begin
      if (i == cut_at) break;
      sym(1'b0, b[i]);
      sent = cyc;
    end
    sym(1'b1, K_COMMA);
    repeat (4) sym(1'b1, K_COMMA);
  endtask

  initial begin
    logic [31:0] w [$], w2 [$], nw [$];
    logic [15:0] c [$], nc [$];
    int t_end;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    // 1: clean packet of 6 payload words with two credits.
    w = {32'h0180_1A2B, 32'hDEAD_0040};
    for (int i = 0; i < 6; i++) w.push_back($urandom);
    c = {credit(3, 17, 0), credit(5, 100, 0)};
    frame(c, w, -1, -1, t_end);
    check(got.size() == w.size(), "clean packet word count");
    foreach (w[i]) if (i < got.size()) check(got[i] == w[i], $sformatf("clean word %0d", i));
    check(got_err.size() == 1 && got_err[0] == 0, "clean packet flagged");
    check(out_hdr == pkt_hdr_t'({w[0], w[1]}), "out_hdr");
    check(got_cr.size() == 2 && got_cr[0] == c[0] && got_cr[1] == c[1], "credits");
    check(last_cyc - t_end <= 3 && last_cyc > t_end, $sformatf("last word latency %0d", last_cyc - t_end));
    // 2: credit-only frame with a parity error.
    got_cr = {};
    frame({credit(1, 2, 1)}, nw, -1, -1, t_end);
    check(got_cr.size() == 0 && n_par == 1, "bad credit parity");
    // 3: payload bit error.
    got = {}; got_err = {};
    frame(nc, w, 8 + 2 + 5, -1, t_end);
    check(got.size() == w.size() && got_err.size() == 1 && got_err[0] == 1, "payload error flagged");
    // 4: header CRC error: dropped.
    got = {}; got_err = {};
    frame(nc, w, 3, -1, t_end);
    check(got.size() == 0 && n_hcrc == 1, "header CRC error drops packet");
    // 5: frame cut in the payload.
    frame(nc, w, -1, 8 + 2 + 9, t_end);
    check(got_err.size() == 1 && got_err[0] == 1, "cut frame ends with error");
    // 6: clean packet again, 1 word payload.
    got = {}; got_err = {};
    w2 = {32'h0040_0000, 32'h0000_1000, 32'h1234_5678};
    frame(nc, w2, -1, -1, t_end);
    check(got.size() == 3 && got[2] == 32'h1234_5678 && got_err.size() == 1 && got_err[0] == 0,
          "packet after errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
