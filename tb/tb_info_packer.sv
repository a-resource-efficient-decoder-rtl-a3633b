// tb_info_packer: random chunks with random allocation masks, frames of 2 to
// 64 chunks; the output words must hold the information bits in order, bit 0
// first, with the last word zero-padded and flagged, under random back-pressure.
module tb_info_packer;
  import polar_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic c_valid, c_ready, c_last, m_valid, m_ready, m_last;
  logic [15:0] c_u, c_info;
  logic [31:0] m_data;
  int checks = 0, failures = 0;
  info_packer dut (.*);
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  bit expq[$];
  int nwords_exp[$];
  // consumer
  initial begin
    bit b;
    m_ready = 0;
    forever begin
      @(negedge clk);
      m_ready = ($urandom_range(0, 3) != 0);
      if (m_valid && m_ready) begin
        for (int i = 0; i < 32; i++) begin
          b = (expq.size() > 0) ? expq.pop_front() : 1'b0;
          checks++;
          if (m_data[i] !== b) begin failures++; $display("FAIL bit %0d", i); end
        end
        checks++;
        if (m_last !== (expq.size() == 0)) begin failures++; $display("FAIL last flag"); end
      end
    end
  end
  initial begin
    int nch;
    c_valid = 0; c_last = 0; c_u = '0; c_info = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      logic [15:0] us[], ms[];
      nch = 2 << (f % 6);
      us = new[nch]; ms = new[nch];
      // the whole frame's expected bits are queued before it is sent
      for (int c = 0; c < nch; c++) begin
        us[c] = 16'($urandom);
        ms[c] = (f % 3 == 0) ? 16'hff00 : 16'($urandom);
        for (int i = 0; i < 16; i++) if (ms[c][i]) expq.push_back(us[c][i]);
      end
      for (int c = 0; c < nch; c++) begin
        @(negedge clk);
        c_valid = 1;
        c_u = us[c];
        c_info = ms[c];
        c_last = (c == nch - 1);
        @(posedge clk);
        while (!c_ready) @(posedge clk);
        #1 c_valid = 0;
      end
      while (expq.size() > 0 || m_valid) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
