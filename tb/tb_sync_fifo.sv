// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, the count, full (no push accepted at DEPTH) and empty behaviour.
module tb_sync_fifo;
  localparam int W = 9, D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [W-1:0] q[$];
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 9) < ((t / 500) % 2 ? 3 : 7));
      out_ready = ($urandom_range(0, 9) < ((t / 500) % 2 ? 7 : 3));
      in_data   = W'($urandom);
      #1;
      checks++;
      if (int'(count) != q.size() || in_ready != (q.size() < D) || out_valid != (q.size() > 0)) begin
        failures++; $display("FAIL flags count=%0d model=%0d", count, q.size());
      end
      if (q.size() == D) n_full++;
      if (q.size() == 0) n_empty++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== q[0]) begin failures++; $display("FAIL data"); end
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("FAIL full/empty never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
