// tb_scl_chunk_decoder: checks the layer-3 list decoder against the software
// list decoder of tb_ref_pkg on random LLRs and random information masks,
// checks that noiseless codewords decode to their own bits, and checks the
// 16-cycle latency from the accepted chunk to out_valid.
module tb_scl_chunk_decoder;
  import polar_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  llr_t in_llr [CHUNK];
  logic [CHUNK-1:0] in_info, out_u, out_x;
  int checks = 0, failures = 0;

  scl_chunk_decoder dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int lv[16], input bit [15:0] info, input bit [15:0] exp_u);
    int cyc;
    bit xb[];
    bit [15:0] xe;
    for (int k = 0; k < 16; k++) in_llr[k] = llr_t'(lv[k]);
    in_info  = info;
    in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
    cyc = 0;
    while (!out_valid) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (out_u !== exp_u) begin
      failures++;
      $display("FAIL u got %h exp %h info %h", out_u, exp_u, info);
    end
    xb = new[16];
    for (int k = 0; k < 16; k++) xb[k] = exp_u[k];
    encode(xb, 16);
    for (int k = 0; k < 16; k++) xe[k] = xb[k];
    checks++;
    if (out_x !== xe) begin failures++; $display("FAIL x got %h exp %h", out_x, xe); end
    checks++;
    if (cyc != 16) begin failures++; $display("FAIL latency %0d", cyc); end
    out_ready = 1;
    @(posedge clk);
    #1 out_ready = 0;
  endtask

  initial begin
    int lv[16];
    bit [15:0] info, u, x, refu;
    bit xb[];
    int sp, total_sp;
    in_valid = 0; out_ready = 0;
    for (int k = 0; k < 16; k++) in_llr[k] = '0;
    in_info = '0;
    total_sp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // noiseless codewords: decoded bits must equal the transmitted bits
    for (int t = 0; t < 20; t++) begin
      info = 16'($urandom);
      u = 16'($urandom) & info;
      xb = new[16];
      for (int k = 0; k < 16; k++) xb[k] = u[k];
      encode(xb, 16);
      for (int k = 0; k < 16; k++) lv[k] = xb[k] ? -(20 + int'($urandom_range(0, 60))) : (20 + int'($urandom_range(0, 60)));
      run(lv, info, u);
    end
    // random noisy LLRs against the reference list decoder
    for (int t = 0; t < 200; t++) begin
      info = 16'($urandom);
      if (t % 4 == 0) info = 16'hffff;
      for (int k = 0; k < 16; k++) lv[k] = int'($urandom_range(0, 254)) - 127;
      if (t % 3 == 0) for (int k = 0; k < 16; k++) lv[k] = int'($urandom_range(0, 14)) - 7;
      refu = scl16(lv, info, 8, sp);
      total_sp += sp;
      run(lv, info, refu);
    end
    checks++;
    if (total_sp == 0) begin failures++; $display("FAIL no path split happened"); end
    $display("path splits exercised: %0d", total_sp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
