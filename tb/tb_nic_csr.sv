// tb_nic_csr: writes and reads back the control registers, checks the
// decoding of the descriptor window against the address map, counts random
// event pulses in the testbench and compares every counter, and reads the
// consumed-descriptor pointers.
module tb_nic_csr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int NEV = 12, NQ = 8;
  logic        tgt_wr_en = 0, tgt_rd_en = 0, desc_wr_en, desc_word;
  logic [15:0] tgt_addr = 0, tgt_rd_addr = 0;
  logic [63:0] tgt_wdata = 0, tgt_rd_data, desc_data, local_notify_base, remote_notify_addr;
  logic [2:0]  desc_q, node_id;
  logic [6:0]  desc_slot;
  logic [NEV-1:0] ev = '0;
  logic [7:0]  q_head_ptr [NQ];
  nic_csr #(.NEV(NEV), .NQ(NQ)) dut (.*);

  int checks = 0, failures = 0;
  int cnt [NEV];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

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

  initial begin
    logic [63:0] d;
    for (int q = 0; q < NQ; q++) q_head_ptr[q] = 8'(3 * q + 1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(16'h4000, 64'h0000_0001_2345_6780);
    wr(16'h4008, 64'h0000_0002_0000_1000);
    wr(16'h4010, 64'h5);
    rd(16'h4000, d); check(d == 64'h0000_0001_2345_6780 && local_notify_base == d, "local notify base");
    rd(16'h4008, d); check(d == 64'h0000_0002_0000_1000 && remote_notify_addr == d, "remote notify addr");
    rd(16'h4010, d); check(d == 64'h5 && node_id == 3'd5, "node id");
    // Descriptor window decode.
    for (int k = 0; k < 50; k++) begin
      logic [2:0] q; logic [6:0] s; logic w; logic [15:0] a;
      q = 3'($urandom); s = 7'($urandom); w = 1'($urandom);
      a = {2'b00, q, s, w, 3'b000};
      @(negedge clk);
      tgt_wr_en = 1; tgt_addr = a; tgt_wdata = {$urandom, $urandom};
      #1;
      check(desc_wr_en && desc_q == q && desc_slot == s && desc_word == w && desc_data == tgt_wdata,
            $sformatf("descriptor window %h", a));
    end
    @(negedge clk); tgt_wr_en = 1; tgt_addr = 16'h4000; #1;
    check(!desc_wr_en, "register write is not a descriptor write");
    @(negedge clk); tgt_wr_en = 0;
    rd(16'h4000, d); check(d == {32'h0, tgt_wdata[31:0]} || d == tgt_wdata, "last register write kept");
    // Event counters.
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      ev = NEV'({$urandom, $urandom});
      for (int i = 0; i < NEV; i++) if (ev[i]) cnt[i]++;
    end
    @(negedge clk); ev = '0;
    for (int i = 0; i < NEV; i++) begin
      rd(16'h4100 + 16'(8 * i), d);
      check(d == 64'(cnt[i]), $sformatf("counter %0d = %0d, expected %0d", i, d, cnt[i]));
    end
    for (int q = 0; q < NQ; q++) begin
      rd(16'h4200 + 16'(8 * q), d);
      check(d == 64'(3 * q + 1), $sformatf("head pointer %0d", q));
    end
    rd(16'h4300, d); check(d == 0, "unmapped address reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
