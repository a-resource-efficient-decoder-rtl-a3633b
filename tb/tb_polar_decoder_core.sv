// tb_polar_decoder_core: decodes noiseless and noisy frames of every code
// length from 32 to 1024 (rate 1/2, information positions by polarization
// weight) and compares each decided bit with the software reference decoder;
// noiseless frames must also return the transmitted bits. Checks the frame
// length error flag with a short frame and counts list splits, chunk stalls
// on the output and frames.
module tb_polar_decoder_core;
  import polar_pkg::*;
  import tb_ref_pkg::*;

  localparam int BEAT = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] log_n;
  logic [NMAX-1:0] info_mask;
  logic s_valid, s_ready, s_last, o_valid, o_ready, o_last, busy, frame_done, len_err;
  llr_t s_llr [BEAT];
  logic [CHUNK-1:0] o_u, o_info;
  int checks = 0, failures = 0;
  int n_stall = 0, n_split = 0, n_frames = 0, n_lenerr = 0;

  polar_decoder_core dut (.*);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input int lin[], input int nbeats, input bit last_ok);
    for (int w = 0; w < nbeats; w++) begin
      s_valid = 1;
      s_last  = last_ok ? (w == nbeats - 1) : 1'b0;
      for (int b = 0; b < BEAT; b++) s_llr[b] = llr_t'(lin[w*BEAT + b]);
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      #1;
    end
    s_valid = 0; s_last = 0;
  endtask

  task automatic frame(input int n, input bit noisy);
    int N, sp, cyc;
    bit info[], u[], x[], ref_u[];
    int lin[];
    N = 1 << n;
    make_info(info, N, N / 2);
    log_n = 4'(n);
    info_mask = '0;
    for (int i = 0; i < N; i++) info_mask[i] = info[i];
    u = new[N]; x = new[N]; lin = new[N];
    for (int i = 0; i < N; i++) begin u[i] = info[i] ? 1'($urandom) : 1'b0; x[i] = u[i]; end
    encode(x, N);
    for (int i = 0; i < N; i++) lin[i] = noisy ? chan_llr(x[i], 16, 14) : (x[i] ? -16 : 16);
    decode_frame(lin, info, N, ref_u, sp);
    n_split += sp;
    fork
      send(lin, N / BEAT, 1);
      begin
        for (int c = 0; c < N / 16; c++) begin
          // hold the output back now and then
          forever begin
            @(negedge clk);
            o_ready = ($urandom_range(0, 3) != 0);
            if (o_valid && !o_ready) n_stall++;
            if (o_valid && o_ready) break;
          end
          // o_valid && o_ready at this point, sampled at the next edge
          for (int k = 0; k < 16; k++) begin
            checks++;
            if (o_u[k] !== ref_u[c*16 + k]) begin
              failures++;
              $display("FAIL N=%0d bit %0d got %0d ref %0d", N, c*16+k, o_u[k], ref_u[c*16+k]);
            end
            if (!noisy) begin
              checks++;
              if (o_u[k] !== u[c*16 + k]) begin failures++; $display("FAIL N=%0d bit %0d vs sent", N, c*16+k); end
            end
            checks++;
            if (o_info[k] !== info[c*16 + k]) begin failures++; $display("FAIL info flag"); end
          end
          checks++;
          if (o_last !== (c == N / 16 - 1)) begin failures++; $display("FAIL o_last"); end
          @(posedge clk); #1;
          o_ready = 0;
        end
      end
    join
    cyc = 0;
    while (busy && cyc < 1000) begin @(posedge clk); #1; cyc++; end
    n_frames++;
  endtask

  initial begin
    int lin[];
    s_valid = 0; s_last = 0; o_ready = 0; log_n = 4'd5; info_mask = '0;
    for (int b = 0; b < BEAT; b++) s_llr[b] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 5; n <= 10; n++) begin
      frame(n, 0);
      frame(n, 1);
      if (n <= 7) frame(n, 1);
      checks++;
      if (len_err) begin failures++; $display("FAIL len_err set on a good frame"); end
    end
    // a frame whose tlast comes early: the length error must be flagged
    log_n = 4'd5;
    lin = new[32];
    foreach (lin[i]) lin[i] = 20;
    fork
      begin
        s_valid = 1;
        for (int w = 0; w < 4; w++) begin
          s_last = (w == 1);
          for (int b = 0; b < BEAT; b++) s_llr[b] = 8'sd20;
          @(posedge clk);
          while (!s_ready) @(posedge clk);
          #1;
        end
        s_valid = 0; s_last = 0;
      end
      begin
        o_ready = 1;
      end
    join
    repeat (200) @(posedge clk);
    #1;
    checks++;
    if (!len_err) begin failures++; $display("FAIL len_err not flagged"); end
    else n_lenerr++;
    $display("frames=%0d list_splits=%0d output_stalls=%0d length_errors=%0d",
             n_frames, n_split, n_stall, n_lenerr);
    checks++;
    if (n_split == 0 || n_stall == 0 || n_lenerr == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
