// tb_data_rom: reads every word on both ports and compares it with the
// xorshift sequence computed here; checks the one-cycle read latency.
module tb_data_rom;
  localparam int D = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [5:0] addr_a, addr_b;
  logic [31:0] data_a, data_b;
  int checks = 0, failures = 0;
  data_rom #(.DEPTH(D)) dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] w [D];
    logic [31:0] v;
    v = 32'h5ea0_d236;
    for (int i = 0; i < D; i++) begin
      w[i] = v;
      v = v ^ (v << 13); v = v ^ (v >> 17); v = v ^ (v << 5);
    end
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      addr_a = 6'(i); addr_b = 6'(D - 1 - i);
      @(posedge clk); #1;
      checks += 2;
      if (data_a !== w[i])         begin failures++; $display("FAIL a %0d", i); end
      if (data_b !== w[D - 1 - i]) begin failures++; $display("FAIL b %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
