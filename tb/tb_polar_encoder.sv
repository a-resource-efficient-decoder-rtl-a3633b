// tb_polar_encoder: configures code lengths 32..1024 with polarization-weight
// allocation tables (K = N/2 and K = N/4 + 3), feeds ROM words from a model,
// and checks every code bit against u F^{(x)n} computed here, u built from
// the word stream (a partly used word dropped at the end of a frame).
module tb_polar_encoder;
  import polar_pkg::*;
  import tb_ref_pkg::*;
  localparam int FR = 2, RD = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, h_valid, h_ready, h_last, busy;
  logic [3:0] log_n;
  logic [NMAX-1:0] info_mask;
  logic [5:0] rom_addr;
  logic [31:0] rom_data;
  logic [7:0] h_bits;
  logic [31:0] rom [RD];
  int checks = 0, failures = 0;
  polar_encoder #(.FRAMES(FR), .ROM_DEPTH(RD)) dut (.*);
  always_ff @(posedge clk) rom_data <= rom[rom_addr];
  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    bit info[], x[];
    int N, K, widx, bp;
    for (int i = 0; i < RD; i++) rom[i] = $urandom;
    start = 0; h_ready = 0; log_n = 4'd5; info_mask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cfg = 0; cfg < 12; cfg++) begin
      N = 32 << (cfg % 6);
      K = (cfg < 6) ? N / 2 : N / 4 + 3;
      make_info(info, N, K);
      log_n = 4'($clog2(N));
      info_mask = '0;
      for (int i = 0; i < N; i++) info_mask[i] = info[i];
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      widx = 0;
      for (int f = 0; f < FR; f++) begin
        x = new[N];
        bp = 32;
        for (int i = 0; i < N; i++) begin
          x[i] = 0;
          if (info[i]) begin
            if (bp == 32) begin bp = 0; widx++; end
            x[i] = rom[(widx - 1) % RD][bp];
            bp++;
          end
        end
        encode(x, N);
        for (int b = 0; b < N / 8; b++) begin
          @(negedge clk);
          h_ready = ($urandom_range(0, 3) != 0);
          while (!(h_valid && h_ready)) begin
            @(negedge clk);
            h_ready = ($urandom_range(0, 3) != 0);
          end
          for (int k = 0; k < 8; k++) begin
            checks++;
            if (h_bits[k] !== x[8*b + k]) begin failures++; $display("FAIL N=%0d frame %0d bit %0d", N, f, 8*b+k); end
          end
          checks++;
          if (h_last !== (b == N / 8 - 1)) begin failures++; $display("FAIL last"); end
          @(posedge clk); #1 h_ready = 0;
        end
      end
      while (busy) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
