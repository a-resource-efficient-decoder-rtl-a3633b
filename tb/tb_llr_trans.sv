// tb_llr_trans: random hard-bit beats with random stalls on both sides; each
// output beat must carry +32 for a 0 and -32 for a 1 in every LLR, in order,
// with tlast passed through.
module tb_llr_trans;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic h_valid, h_ready, h_last, l_valid, l_ready, l_last;
  logic [7:0] h_bits;
  logic [63:0] l_data;
  int checks = 0, failures = 0;
  llr_trans dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [8:0] q[$];
  initial begin
    int sent = 0;
    h_valid = 0; h_bits = '0; h_last = 0; l_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (sent < 500) begin
      @(negedge clk);
      if (!(h_valid && !h_ready)) begin
        h_valid = ($urandom_range(0, 3) != 0);
        h_bits  = 8'($urandom);
        h_last  = 1'($urandom);
      end
      l_ready = ($urandom_range(0, 3) != 0);
      if (l_valid && l_ready) begin
        logic [8:0] e;
        e = q.pop_front();
        for (int k = 0; k < 8; k++) begin
          checks++;
          if ($signed(l_data[8*k +: 8]) != (e[k] ? -32 : 32)) begin failures++; $display("FAIL llr %0d", k); end
        end
        checks++;
        if (l_last !== e[8]) begin failures++; $display("FAIL last"); end
      end
      @(posedge clk);
      if (h_valid && h_ready) begin q.push_back({h_last, h_bits}); sent++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
