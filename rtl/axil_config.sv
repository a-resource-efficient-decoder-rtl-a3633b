// axil_config: AXI-Lite register file that configures the decoder before
// data is sent, and reports its status.
//
// Register map (32-bit registers, byte addresses):
//   0x000  CFG     [3:0] log2 of the code length N (5..10, reset 10)
//   0x004  STATUS  read only: [0] decoder busy, [1] frame length error,
//                  [31:16] frames decoded since reset (wraps)
//   0x100 + 4w     bit allocation table word w, w = 0..NMAX/32-1: bit b is
//                  1 when u_(32w+b) is an information bit (reset: all frozen)
// Writes need AW and W together; one write and one read may be in flight.
// BRESP/RRESP are OKAY, except SLVERR for a write of an out-of-range log2 N or
// an access to an unmapped address. The protocol and the configurable
// allocation table follow the design; the register map is this
// implementation's choice.
// The reset also disables the assertions (disable iff), so lint sees rst_n
// used both as an asynchronous reset and as a plain signal; that is intended.
module axil_config
  import polar_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI-Lite slave
  input  logic              awvalid,
  output logic              awready,
  input  logic [AW-1:0]     awaddr,
  input  logic              wvalid,
  output logic              wready,
  input  logic [31:0]       wdata,
  output logic              bvalid,
  input  logic              bready,
  output logic [1:0]        bresp,
  input  logic              arvalid,
  output logic              arready,
  input  logic [AW-1:0]     araddr,
  output logic              rvalid,
  input  logic              rready,
  output logic [31:0]       rdata,
  output logic [1:0]        rresp,
  // configuration out, status in
  output logic [3:0]        cfg_log_n,
  output logic [NMAX-1:0]   cfg_info,
  input  logic              st_busy,
  input  logic              st_len_err,
  input  logic              st_frame_done
);
  localparam int unsigned NW = NMAX / 32;
  localparam logic [1:0] OKAY = 2'b00, SLVERR = 2'b10;

  logic [15:0] frames;
  logic        wr_go;

  assign awready = wr_go;
  assign wready  = wr_go;
  assign wr_go   = awvalid && wvalid && !bvalid;
  assign arready = !rvalid;

  function automatic logic is_tab(input logic [AW-1:0] a);
    return (32'(a) >= 32'h100) && (32'(a) < 32'h100 + 4 * NW);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_log_n <= 4'(LOG_NMAX);
      cfg_info  <= '0;
      frames    <= '0;
      bvalid    <= 1'b0;
      bresp     <= OKAY;
      rvalid    <= 1'b0;
      rdata     <= '0;
      rresp     <= OKAY;
    end else begin
      if (st_frame_done) frames <= frames + 16'd1;
      // write channel
      if (bvalid && bready) bvalid <= 1'b0;
      if (wr_go) begin
        bvalid <= 1'b1;
        bresp  <= OKAY;
        if (awaddr == AW'(0)) begin
          if (wdata[3:0] >= 4'(LOG_NMIN) && wdata[3:0] <= 4'(LOG_NMAX)) cfg_log_n <= wdata[3:0];
          else bresp <= SLVERR;
        end else if (is_tab(awaddr)) begin
          cfg_info[(32'(awaddr) - 32'h100) / 4 * 32 +: 32] <= wdata;
        end else begin
          bresp <= SLVERR;
        end
      end
      // read channel
      if (rvalid && rready) rvalid <= 1'b0;
      if (arvalid && arready) begin
        rvalid <= 1'b1;
        rresp  <= OKAY;
        if (araddr == AW'(0))      rdata <= {28'd0, cfg_log_n};
        else if (araddr == AW'(4)) rdata <= {frames, 14'd0, st_len_err, st_busy};
        else if (is_tab(araddr))   rdata <= cfg_info[(32'(araddr) - 32'h100) / 4 * 32 +: 32];
        else begin
          rdata <= '0;
          rresp <= SLVERR;
        end
      end
    end
  end

  // AXI rule: a master keeps valid and its payload until the handshake
  property p_aw_hold;
    @(posedge clk) disable iff (!rst_n) (awvalid && !awready) |=> awvalid;
  endproperty
  property p_ar_hold;
    @(posedge clk) disable iff (!rst_n) (arvalid && !arready) |=> (arvalid && $stable(araddr));
  endproperty
  assert property (p_aw_hold);
  assert property (p_ar_hold);
endmodule
