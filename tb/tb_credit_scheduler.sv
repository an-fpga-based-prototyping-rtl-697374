// tb_credit_scheduler: random departures on 4 flows with a link that takes
// credits irregularly. Every credit must have correct parity and a flow in
// range and carry the flow's current 7-bit count of forwarded words / 32;
// once departures stop, the last credit of each flow must equal its final
// count, no credit may be sent while nothing changes, and the periodic
// refresh must resend every flow once per period.
module tb_credit_scheduler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int NF = 4, REF = 400;
  logic        dep_valid [NF];
  logic [8:0]  dep_words [NF];
  logic        cr_valid, cr_ready = 0;
  logic [15:0] cr_data;
  credit_scheduler #(.NFLOW(NF), .REFRESH_CYCLES(REF)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int total [NF], last_cr [NF], n_cr [NF];
  logic running = 1;

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

  // Decide inputs at the falling edge, account for them after the rising one.
  initial begin
    for (int f = 0; f < NF; f++) begin dep_valid[f] = 0; dep_words[f] = 0; last_cr[f] = 0; end
    forever begin
      @(negedge clk);
      for (int f = 0; f < NF; f++) if (dep_valid[f]) total[f] += dep_words[f];
      cr_ready = ($urandom_range(0, 3) == 0);
      // The credit on offer now is taken at the next rising edge.
      if (rst_n && cr_valid && cr_ready) begin
        int f;
        f = cr_data[14:8];
        checks++;
        if (^cr_data != 1'b0 || !cr_data[15] || f >= NF ||
            cr_data[7:1] != 7'((total[f] / 32) % 128)) begin
          failures++;
          $display("FAIL: credit %h at %0d (flow total %0d)", cr_data, cyc, total[f]);
        end
        if (f < NF) begin last_cr[f] = cr_data[7:1]; n_cr[f]++; end
      end
      for (int f = 0; f < NF; f++) begin
        dep_valid[f] = rst_n && running && ($urandom_range(0, 5) == 0);
        dep_words[f] = 9'($urandom_range(2, 258));
      end
      cyc++;
    end
  end

  initial begin
    int prev [NF];
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3000) @(negedge clk);
    running = 0;
    repeat (60) @(negedge clk);
    for (int f = 0; f < NF; f++)
      check(last_cr[f] == (total[f] / 32) % 128, $sformatf("final credit flow %0d", f));
    // Quiet: only refreshes. Over 4 periods each flow is resent about 4 times.
    for (int f = 0; f < NF; f++) prev[f] = n_cr[f];
    repeat (4 * REF) @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      int d;
      d = n_cr[f] - prev[f];
      check(d >= 3 && d <= 5, $sformatf("refresh count flow %0d = %0d", f, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
