// tb_axil_master: AXI-Lite master for testbenches (write with AW and W
// together, then a single read), driving the signals of the enclosing bus.
interface tb_axil_master (input logic clk);
  logic        awvalid, awready, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rvalid, rready;
  logic [11:0] awaddr, araddr;
  logic [31:0] wdata, rdata;
  logic [1:0]  bresp, rresp;

  task automatic init();
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = '0; araddr = '0; wdata = '0;
  endtask
  task automatic write(input logic [11:0] a, input logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    awvalid = 1; wvalid = 1; awaddr = a; wdata = d;
    @(posedge clk);
    while (!awready) @(posedge clk);
    #1 awvalid = 0; wvalid = 0; bready = 1;
    while (!bvalid) @(posedge clk);
    resp = bresp;
    @(posedge clk); #1 bready = 0;
  endtask
  task automatic read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    arvalid = 1; araddr = a;
    @(posedge clk);
    while (!arready) @(posedge clk);
    #1 arvalid = 0; rready = 1;
    while (!rvalid) @(posedge clk);
    d = rdata;
    @(posedge clk); #1 rready = 0;
  endtask
endinterface
