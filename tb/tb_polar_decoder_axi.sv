// tb_polar_decoder_axi: configures the wrapped decoder over AXI-Lite, streams
// noisy frames of several code lengths over AXI-Stream with random gaps, and
// compares every output word with the information bits of the software
// reference decoder packed 32 to a word; checks tlast, the status register
// (frame count) and that input back-pressure and output stalls both happen.
module tb_polar_decoder_axi;
  import polar_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  tb_axil_master axm (clk);
  logic s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;
  logic [63:0] s_tdata;
  logic [31:0] m_tdata;
  logic st_busy, st_frame_done, st_len_err;
  logic [3:0] cfg_log_n;
  logic [NMAX-1:0] cfg_info;
  int checks = 0, failures = 0, n_bp = 0, n_stall = 0;

  polar_decoder_axi dut (
    .clk, .rst_n,
    .awvalid(axm.awvalid), .awready(axm.awready), .awaddr(axm.awaddr),
    .wvalid(axm.wvalid), .wready(axm.wready), .wdata(axm.wdata),
    .bvalid(axm.bvalid), .bready(axm.bready), .bresp(axm.bresp),
    .arvalid(axm.arvalid), .arready(axm.arready), .araddr(axm.araddr),
    .rvalid(axm.rvalid), .rready(axm.rready), .rdata(axm.rdata), .rresp(axm.rresp),
    .s_tvalid, .s_tready, .s_tdata, .s_tlast,
    .m_tvalid, .m_tready, .m_tdata, .m_tlast,
    .st_busy, .st_frame_done, .st_len_err, .cfg_log_n, .cfg_info
  );

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (s_tvalid && !s_tready) n_bp++;
    if (m_tvalid && !m_tready) n_stall++;
  end

  initial begin
    int sizes [4] = '{5, 8, 10, 6};
    int N, sp, nfr, nw;
    bit info[], u[], x[], ref_u[];
    int lin[];
    logic [1:0] r;
    logic [31:0] d, w;
    axm.init();
    s_tvalid = 0; s_tlast = 0; s_tdata = '0; m_tready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    nfr = 0;
    for (int c = 0; c < 4; c++) begin
      N = 1 << sizes[c];
      make_info(info, N, N / 2);
      axm.write(12'h000, 32'(sizes[c]), r);
      for (int wd = 0; wd < NMAX / 32; wd++) begin
        w = '0;
        for (int b = 0; b < 32; b++) if (32*wd + b < N) w[b] = info[32*wd + b];
        axm.write(12'(32'h100 + 4 * wd), w, r);
      end
      // two frames per configuration, the second streamed while the first decodes
      begin
        int lins [2][];
        bit ibs [2][$];
        for (int f = 0; f < 2; f++) begin
          u = new[N]; x = new[N]; lin = new[N];
          for (int i = 0; i < N; i++) begin u[i] = info[i] ? 1'($urandom) : 1'b0; x[i] = u[i]; end
          encode(x, N);
          for (int i = 0; i < N; i++) lin[i] = chan_llr(x[i], 16, 14);
          decode_frame(lin, info, N, ref_u, sp);
          lins[f] = lin;
          ibs[f].delete();
          for (int i = 0; i < N; i++) if (info[i]) ibs[f].push_back(ref_u[i]);
        end
        fork
          for (int f = 0; f < 2; f++) begin
            for (int bt = 0; bt < N / 8; bt++) begin
              @(negedge clk);
              while ($urandom_range(0, 4) == 0) @(negedge clk);
              s_tvalid = 1; s_tlast = (bt == N / 8 - 1);
              for (int k = 0; k < 8; k++) s_tdata[8*k +: 8] = 8'(lins[f][8*bt + k]);
              @(posedge clk);
              while (!s_tready) @(posedge clk);
              #1 s_tvalid = 0; s_tlast = 0;
            end
          end
          for (int f = 0; f < 2; f++) begin
            nw = (ibs[f].size() + 31) / 32;
            for (int wi = 0; wi < nw; wi++) begin
              forever begin
                @(negedge clk);
                m_tready = ($urandom_range(0, 2) != 0);
                if (m_tvalid && m_tready) break;
              end
              for (int b = 0; b < 32; b++) begin
                checks++;
                if (m_tdata[b] !== ((32*wi + b < ibs[f].size()) ? ibs[f][32*wi + b] : 1'b0)) begin
                  failures++; $display("FAIL N=%0d frame %0d word %0d bit %0d", N, f, wi, b);
                end
              end
              checks++;
              if (m_tlast !== (wi == nw - 1)) begin failures++; $display("FAIL tlast"); end
              @(posedge clk); #1 m_tready = 0;
            end
            nfr++;
          end
        join
      end
    end
    repeat (50) @(posedge clk);
    axm.read(12'h004, d);
    checks++;
    if (int'(d[31:16]) != nfr || d[1] !== 1'b0) begin failures++; $display("FAIL status %h", d); end
    $display("frames=%0d input_backpressure=%0d output_stalls=%0d", nfr, n_bp, n_stall);
    checks++;
    if (n_bp == 0 || n_stall == 0) begin failures++; $display("FAIL mechanism not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
