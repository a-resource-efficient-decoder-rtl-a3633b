// tb_polar_platform: end-to-end run of the whole system at its default sizes.
// Configures the decoder over AXI-Lite for N = 1024 (K = 512), then N = 128
// (K = 69, so frames end in a partly filled word) and N = 32 (K = 16), information positions by polarization
// weight, and lets the platform encode, convert, decode and check FRAMES
// frames each time. Every run must end with done, zero bit errors, the right
// word and frame counts and no framing or length error. Counts how often
// each mechanism happened: code-length switches, list splits in layer 3,
// encoder-FIFO back-pressure, decoder input back-pressure, decoder output
// stalls, G-function tree steps, and fails if any never did. Prints the
// cycles per frame of the decoder.
module tb_polar_platform;
  import polar_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  tb_axil_master axm (clk);
  logic start, done, frame_err, len_err, dec_busy, enc_busy, dec_frame_done;
  logic [31:0] bit_errors, words;
  logic [15:0] frames;
  int checks = 0, failures = 0;
  int n_switch = 0, n_split = 0, n_fifo_full = 0, n_in_bp = 0, n_out_stall = 0, n_gstep = 0;
  longint cyc = 0, last_done = 0, per_frame = 0;

  polar_platform dut (
    .clk, .rst_n,
    .awvalid(axm.awvalid), .awready(axm.awready), .awaddr(axm.awaddr),
    .wvalid(axm.wvalid), .wready(axm.wready), .wdata(axm.wdata),
    .bvalid(axm.bvalid), .bready(axm.bready), .bresp(axm.bresp),
    .arvalid(axm.arvalid), .arready(axm.arready), .araddr(axm.araddr),
    .rvalid(axm.rvalid), .rready(axm.rready), .rdata(axm.rdata), .rresp(axm.rresp),
    .start, .done, .bit_errors, .words, .frames, .frame_err, .len_err,
    .dec_busy, .enc_busy, .dec_frame_done
  );

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, read from inside the design
  always @(posedge clk) begin
    cyc++;
    if (dut.u_dec.u_core.u_scl.state == 2'd1 &&
        dut.u_dec.u_core.u_scl.info_q[dut.u_dec.u_core.u_scl.bit_i]) n_split++;
    if (dut.h_valid && !dut.h_ready) n_fifo_full++;
    if (dut.l_valid && !dut.l_ready) n_in_bp++;
    if (dut.m_valid && !dut.m_ready) n_out_stall++;
    if (dut.u_dec.u_core.u_put.state == 3'd1 && dut.u_dec.u_core.u_put.fsel) n_gstep++;
    if (dec_frame_done) begin
      per_frame = cyc - last_done;
      last_done = cyc;
    end
  end

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    int logs [3] = '{10, 7, 5};
    int N, K;
    bit info[];
    logic [1:0] r;
    logic [31:0] w, d;
    axm.init();
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    axm.read(12'h000, d);
    chk(d, 10, "reset code length");
    for (int c = 0; c < 3; c++) begin
      N = 1 << logs[c];
      K = (N == 128) ? N / 2 + 5 : N / 2;   // K = 69 forces a padded, flushed last word
      make_info(info, N, K);
      if (c > 0) begin
        axm.write(12'h000, 32'(logs[c]), r);
        chk(r, 0, "bresp");
        n_switch++;
      end
      for (int wd = 0; wd < NMAX / 32; wd++) begin
        w = '0;
        for (int b = 0; b < 32; b++) if (32*wd + b < N) w[b] = info[32*wd + b];
        axm.write(12'(32'h100 + 4 * wd), w, r);
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (!done) @(posedge clk);
      repeat (5) @(posedge clk);
      $display("N=%0d K=%0d: frames=%0d words=%0d bit_errors=%0d, %0d cycles per frame",
               N, K, frames, words, bit_errors, per_frame);
      chk(bit_errors, 0, "bit errors");
      chk(frames, 4, "frames");
      chk(words, 4 * ((K + 31) / 32), "words");
      chk(frame_err, 0, "framing error");
      chk(len_err, 0, "length error");
    end
    $display("mechanisms: switches=%0d list_splits=%0d enc_fifo_full=%0d dec_in_backpressure=%0d dec_out_stalls=%0d g_steps=%0d",
             n_switch, n_split, n_fifo_full, n_in_bp, n_out_stall, n_gstep);
    chk(n_switch > 0, 1, "code length switch exercised");
    chk(n_split > 0, 1, "list split exercised");
    chk(n_fifo_full > 0, 1, "encoder FIFO back-pressure exercised");
    chk(n_in_bp > 0, 1, "decoder input back-pressure exercised");
    chk(n_out_stall > 0, 1, "decoder output stall exercised");
    chk(n_gstep > 0, 1, "G steps exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
