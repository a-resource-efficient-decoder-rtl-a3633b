// tb_polar_ber: bit error rate run of the decoder core on the two codes whose
// error-rate curves the design is characterised with, Polar(256,128) and
// Polar(1024,512), over a BPSK/AWGN-like channel at Eb/N0 = 1, 2 and 3 dB.
//
// For every frame, random information bits are placed on the K most reliable
// positions (polarization-weight order), encoded, and sent through the
// channel model of the reference package: amplitude 16 plus the sum of four
// uniform samples, whose standard deviation is chosen as
// 16 / sqrt(2 R Eb/N0) for rate R = 1/2. The decoder core (with list size 8)
// decodes the frame with no output back-pressure. Each decided bit is checked
// against the software reference decoder, which follows the same arithmetic,
// so the hardware must match it bit for bit. Bit errors against the sent bits
// are counted and printed per point as the measured BER. The error count must
// not grow from the lowest to the highest Eb/N0, and the low-noise point must
// decode at least some frames without error. The number of frames is small
// so that the run stays short; the printed BER is a rough estimate, not a
// curve.
module tb_polar_ber;
  import polar_pkg::*;
  import tb_ref_pkg::*;

  localparam int BEAT   = 8;
  localparam int FRAMES = 4;   // frames per Eb/N0 point
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] log_n;
  logic [NMAX-1:0] info_mask;
  logic s_valid, s_ready, s_last, o_valid, o_ready, o_last, busy, frame_done, len_err;
  llr_t s_llr [BEAT];
  logic [CHUNK-1:0] o_u, o_info;
  int checks = 0, failures = 0;

  polar_decoder_core dut (.*);

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input int lin[], input int nbeats);
    for (int w = 0; w < nbeats; w++) begin
      s_valid = 1;
      s_last  = (w == nbeats - 1);
      for (int b = 0; b < BEAT; b++) s_llr[b] = llr_t'(lin[w*BEAT + b]);
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      #1;
    end
    s_valid = 0; s_last = 0;
  endtask

  // decode one noisy frame; returns the bit errors against the sent bits
  task automatic frame(input int n, input int sigma, output int errs);
    int N, sp;
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
    for (int i = 0; i < N; i++) lin[i] = chan_llr(x[i], 16, sigma);
    decode_frame(lin, info, N, ref_u, sp);
    errs = 0;
    fork
      send(lin, N / BEAT);
      begin
        for (int c = 0; c < N / 16; c++) begin
          @(negedge clk);
          while (!o_valid) @(negedge clk);
          for (int k = 0; k < 16; k++) begin
            checks++;
            if (o_u[k] !== ref_u[c*16 + k]) begin
              failures++;
              $display("FAIL N=%0d bit %0d differs from the reference", N, c*16 + k);
            end
            if (info[c*16 + k] && o_u[k] !== u[c*16 + k]) errs++;
          end
          @(posedge clk); #1;
        end
      end
    join
    while (busy) begin @(posedge clk); #1; end
  endtask

  initial begin
    // noise parameter of chan_llr per Eb/N0 point: the sum of four uniform
    // samples in [-s, s] has standard deviation 1.155 s, and the wanted
    // deviation is 16 / sqrt(10^(dB/10)) for rate 1/2: 14.3, 12.7, 11.3
    int sig [3], db [3];
    int errs, e, ok, tot [3], clean [3];
    sig = '{12, 11, 10};
    db  = '{1, 2, 3};
    s_valid = 0; s_last = 0; o_ready = 1; log_n = 4'd8; info_mask = '0;
    for (int b = 0; b < BEAT; b++) s_llr[b] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    foreach (db[p]) begin tot[p] = 0; clean[p] = 0; end
    for (int n = 8; n <= 10; n += 2) begin
      foreach (db[p]) begin
        e = 0; ok = 0;
        for (int f = 0; f < FRAMES; f++) begin
          frame(n, sig[p], errs);
          e += errs;
          if (errs == 0) ok++;
        end
        tot[p] += e; clean[p] += ok;
        $display("Polar(%0d,%0d) Eb/N0=%0d dB: %0d frames, %0d bit errors, BER=%f, error-free frames %0d",
                 1 << n, 1 << (n - 1), db[p], FRAMES, e,
                 real'(e) / real'(FRAMES * (1 << (n - 1))), ok);
      end
    end
    checks++;
    if (tot[2] > tot[0]) begin
      failures++;
      $display("FAIL more bit errors at 3 dB (%0d) than at 1 dB (%0d)", tot[2], tot[0]);
    end
    checks++;
    if (clean[2] == 0) begin
      failures++;
      $display("FAIL no error-free frame at 3 dB");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
