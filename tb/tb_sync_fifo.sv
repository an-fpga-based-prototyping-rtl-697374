// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, show-ahead head word, count, full and empty flags.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        wr_en, wr_ready, rd_en, rd_valid;
  logic [15:0] wr_data, rd_data;
  logic [3:0]  count;
  sync_fifo #(.W(16), .DEPTH(8)) dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] model [$];
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (rd_valid != (model.size() != 0) || wr_ready != (model.size() != 8) ||
          count != 4'(model.size()) || (rd_valid && rd_data != model[0])) begin
        failures++;
        $display("FAIL at %0d: size %0d count %0d rd %h", i, model.size(), count, rd_data);
      end
      wr_en   = ($urandom % 100) < ((i / 500) % 2 ? 70 : 30);
      rd_en   = rd_valid && (($urandom % 100) < ((i / 500) % 2 ? 30 : 70));
      wr_data = 16'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en && model.size() + (rd_en ? 1 : 0) <= 8 && wr_ready) model.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
