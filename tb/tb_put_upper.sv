// tb_put_upper: drives the upper tree with random channel LLRs for every code
// length from 32 to 1024, plays the part of the chunk decoder by returning
// random chunk decisions, and checks every rank-4 chunk LLR vector against a
// recursive software SC computation given the same decisions. Also checks
// that chunks come out in order and that done follows the last chunk.
module tb_put_upper;
  import polar_pkg::*;
  import tb_ref_pkg::*;

  localparam int BEAT = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] log_n;
  logic ld_we, start, busy, ch_valid, ch_ready, x_valid, x_ready, done;
  logic [$clog2(NMAX/BEAT)-1:0] ld_idx;
  llr_t ld_llr [BEAT];
  llr_t ch_llr [CHUNK];
  logic [LOG_NMAX-5:0] ch_idx;
  logic [CHUNK-1:0] x_cw;
  int checks = 0, failures = 0;

  put_upper dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    int lin[], exp_l[];
    bit u[], xb[];
    int N, cnt, cyc;
    ld_we = 0; start = 0; ch_ready = 0; x_valid = 0; x_cw = '0; log_n = 4'd5; ld_idx = '0;
    for (int b = 0; b < BEAT; b++) ld_llr[b] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int rep = 0; rep < 2; rep++)
    for (int n = 5; n <= 10; n++) begin
      N = 1 << n;
      log_n = 4'(n);
      lin = new[N]; u = new[N];
      for (int k = 0; k < N; k++) lin[k] = int'($urandom_range(0, 254)) - 127;
      for (int k = 0; k < N; k++) u[k] = 0;
      for (int w = 0; w < N / BEAT; w++) begin
        ld_we = 1; ld_idx = 7'(w);
        for (int b = 0; b < BEAT; b++) ld_llr[b] = llr_t'(lin[w*BEAT + b]);
        @(posedge clk); #1;
      end
      ld_we = 0;
      start = 1; @(posedge clk); #1; start = 0;
      cyc = 0;
      for (int c = 0; c < N / 16; c++) begin
        while (!ch_valid) begin @(posedge clk); #1; cyc++; end
        chunk_llrs(lin, u, N, c, exp_l);
        checks++;
        if (int'(ch_idx) != c) begin failures++; $display("FAIL chunk index %0d exp %0d", ch_idx, c); end
        for (int k = 0; k < 16; k++) begin
          checks++;
          if (int'(ch_llr[k]) != exp_l[k]) begin
            failures++;
            $display("FAIL N=%0d chunk %0d llr[%0d] got %0d exp %0d", N, c, k, ch_llr[k], exp_l[k]);
          end
        end
        ch_ready = 1; @(posedge clk); #1; ch_ready = 0;
        // random decisions for this chunk
        xb = new[16];
        for (int k = 0; k < 16; k++) begin
          u[c*16 + k] = 1'($urandom);
          xb[k] = u[c*16 + k];
        end
        encode(xb, 16);
        for (int k = 0; k < 16; k++) x_cw[k] = xb[k];
        x_valid = 1;
        while (!x_ready) @(posedge clk);
        @(posedge clk); #1; x_valid = 0;
      end
      cnt = 0;
      while (!done && cnt < 100) begin @(posedge clk); #1; cnt++; end
      checks++;
      if (!done) begin failures++; $display("FAIL no done for N=%0d", N); end
      $display("N=%0d decoded tree in %0d cycles", N, cyc);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
