// polar_decoder_axi: the decoder wrapped for use in a system.
//
// Configuration (code length, bit allocation table) comes over AXI-Lite
// (axil_config) before data is sent. Channel LLRs come on a 64-bit
// AXI-Stream, BEAT = 8 LLRs of 8 bits per beat (LLR k of the frame in bits
// [8(k mod 8) +: 8] of beat k/8), tlast on the frame's last beat; the stream
// goes through an input FIFO (sync_fifo) into the decoder core. The decided
// information bits leave on a 32-bit AXI-Stream (info_packer), tlast on each
// frame's last word. Status: busy, a frame-done pulse and the frame length
// error flag, also readable over AXI-Lite. The configuration currently in
// force is also brought out (cfg_log_n, cfg_info) for neighbouring logic such
// as a test encoder. The use of AXI-Lite and AXI-Stream, the input FIFO and
// the block-by-block operation follow the design; widths, FIFO depth, the
// register map and the configuration outputs are this implementation's
// choices.
// Lint reports rst_n as both an asynchronous and a synchronous signal here
// because the sub-blocks disable their assertions with it; that is intended.
module polar_decoder_axi
  import polar_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  // AXI-Lite configuration
  input  logic            awvalid,
  output logic            awready,
  input  logic [11:0]     awaddr,
  input  logic            wvalid,
  output logic            wready,
  input  logic [31:0]     wdata,
  output logic            bvalid,
  input  logic            bready,
  output logic [1:0]      bresp,
  input  logic            arvalid,
  output logic            arready,
  input  logic [11:0]     araddr,
  output logic            rvalid,
  input  logic            rready,
  output logic [31:0]     rdata,
  output logic [1:0]      rresp,
  // AXI-Stream LLR input
  input  logic            s_tvalid,
  output logic            s_tready,
  input  logic [63:0]     s_tdata,
  input  logic            s_tlast,
  // AXI-Stream decoded output
  output logic            m_tvalid,
  input  logic            m_tready,
  output logic [31:0]     m_tdata,
  output logic            m_tlast,
  // status and configuration in force
  output logic            st_busy,
  output logic            st_frame_done,
  output logic            st_len_err,
  output logic [3:0]      cfg_log_n,
  output logic [NMAX-1:0] cfg_info
);
  localparam int unsigned BEAT = 8;

  logic        f_valid, f_ready;
  logic [64:0] f_data;
  llr_t        f_llr [BEAT];
  logic        o_valid, o_ready, o_last;
  logic [CHUNK-1:0] o_u, o_info;

  axil_config #(.AW(12)) u_cfg (
    .clk, .rst_n,
    .awvalid, .awready, .awaddr, .wvalid, .wready, .wdata, .bvalid, .bready, .bresp,
    .arvalid, .arready, .araddr, .rvalid, .rready, .rdata, .rresp,
    .cfg_log_n, .cfg_info,
    .st_busy, .st_len_err, .st_frame_done
  );

  sync_fifo #(.WIDTH(65), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid(s_tvalid), .in_ready(s_tready), .in_data({s_tlast, s_tdata}),
    .out_valid(f_valid), .out_ready(f_ready), .out_data(f_data),
    .count()
  );

  for (genvar b = 0; b < BEAT; b++) begin : g_unpack
    assign f_llr[b] = llr_t'(f_data[8*b +: 8]);
  end

  polar_decoder_core #(.P(64), .BEAT(BEAT), .L(LIST_L)) u_core (
    .clk, .rst_n,
    .log_n(cfg_log_n), .info_mask(cfg_info),
    .s_valid(f_valid), .s_ready(f_ready), .s_llr(f_llr), .s_last(f_data[64]),
    .o_valid, .o_ready, .o_u, .o_info, .o_last,
    .busy(st_busy), .frame_done(st_frame_done), .len_err(st_len_err)
  );

  info_packer u_pack (
    .clk, .rst_n,
    .c_valid(o_valid), .c_ready(o_ready), .c_u(o_u), .c_info(o_info), .c_last(o_last),
    .m_valid(m_tvalid), .m_ready(m_tready), .m_data(m_tdata), .m_last(m_tlast)
  );
endmodule
