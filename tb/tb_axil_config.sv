// tb_axil_config: AXI-Lite writes and reads of the code length and of every
// word of the allocation table, checked on the read data and on the cfg
// outputs; an out-of-range code length and an unmapped address must answer
// SLVERR and leave the configuration alone; the status register must show
// busy, the length error and the frame count.
module tb_axil_config;
  import polar_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [11:0] awaddr, araddr;
  logic [31:0] wdata, rdata;
  logic [1:0] bresp, rresp;
  logic [3:0] cfg_log_n;
  logic [NMAX-1:0] cfg_info;
  logic st_busy, st_len_err, st_frame_done;
  int checks = 0, failures = 0;
  axil_config dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic wr(input logic [11:0] a, input logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    awvalid = 1; wvalid = 1; awaddr = a; wdata = d;
    @(posedge clk);
    while (!awready) @(posedge clk);
    #1 awvalid = 0; wvalid = 0; bready = 1;
    while (!bvalid) @(posedge clk);
    resp = bresp;
    @(posedge clk); #1 bready = 0;
  endtask
  task automatic rd(input logic [11:0] a, output logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    arvalid = 1; araddr = a;
    @(posedge clk);
    while (!arready) @(posedge clk);
    #1 arvalid = 0; rready = 1;
    while (!rvalid) @(posedge clk);
    d = rdata; resp = rresp;
    @(posedge clk); #1 rready = 0;
  endtask
  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  initial begin
    logic [1:0] r;
    logic [31:0] d;
    logic [31:0] tab [NMAX/32];
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0; awaddr = '0; araddr = '0; wdata = '0;
    st_busy = 0; st_len_err = 0; st_frame_done = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    rd(12'h000, d, r); chk(d, 32'd10, "reset log_n");
    wr(12'h000, 32'd7, r); chk(32'(r), 0, "bresp");
    chk(32'(cfg_log_n), 7, "cfg_log_n");
    wr(12'h000, 32'd11, r); chk(32'(r), 2, "bresp range");
    chk(32'(cfg_log_n), 7, "cfg_log_n kept");
    wr(12'h000, 32'd4, r); chk(32'(r), 2, "bresp range low");
    for (int w = 0; w < NMAX / 32; w++) begin
      tab[w] = $urandom;
      wr(12'(32'h100 + 4 * w), tab[w], r); chk(32'(r), 0, "bresp tab");
    end
    for (int w = 0; w < NMAX / 32; w++) begin
      rd(12'(32'h100 + 4 * w), d, r); chk(d, tab[w], "tab read");
      chk(cfg_info[32*w +: 32], tab[w], "cfg_info");
    end
    wr(12'h010, 32'h1234, r); chk(32'(r), 2, "bresp unmapped");
    rd(12'h200, d, r); chk(32'(r), 2, "rresp unmapped");
    @(negedge clk); st_frame_done = 1; @(negedge clk); @(negedge clk); st_frame_done = 0;
    st_busy = 1; st_len_err = 1;
    rd(12'h004, d, r); chk(d, {16'd2, 14'd0, 2'b11}, "status");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
