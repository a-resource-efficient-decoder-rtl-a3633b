// polar_platform: the complete system, a self-checking loop around the
// encapsulated polar decoder.
//
// Data path: a two-port ROM of information words feeds the polar encoder;
// its code bits are queued in the encoder FIFO, turned into LLRs (llr_trans)
// and streamed into the decoder (polar_decoder_axi). The decoder's output
// words go to the checker, which compares them with the same ROM words and
// counts bit errors. The decoder is configured over the AXI-Lite port of
// this module (code length, bit allocation table); the encoder and the
// checker use the configuration the decoder reports, so the loop always
// agrees on N and on the information positions. A start pulse clears the
// checker and sends FRAMES frames; done rises when all of them are checked.
// The chain ROM -> encoder -> FIFO -> LLR conversion -> decoder -> checker
// follows the design's verification platform; sizes, the shared
// configuration and the start/done protocol are this implementation's
// choices.
// Lint reports rst_n as both an asynchronous and a synchronous signal here
// because the sub-blocks disable their assertions with it; that is intended.
module polar_platform
  import polar_pkg::*;
#(
  parameter int unsigned FRAMES    = 4,
  parameter int unsigned ROM_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI-Lite configuration of the decoder
  input  logic        awvalid,
  output logic        awready,
  input  logic [11:0] awaddr,
  input  logic        wvalid,
  output logic        wready,
  input  logic [31:0] wdata,
  output logic        bvalid,
  input  logic        bready,
  output logic [1:0]  bresp,
  input  logic        arvalid,
  output logic        arready,
  input  logic [11:0] araddr,
  output logic        rvalid,
  input  logic        rready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  // run control and results
  input  logic        start,
  output logic        done,
  output logic [31:0] bit_errors,
  output logic [31:0] words,
  output logic [15:0] frames,
  output logic        frame_err,
  output logic        len_err,
  output logic        dec_busy,
  output logic        enc_busy,
  output logic        dec_frame_done
);
  localparam int unsigned RA = $clog2(ROM_DEPTH);

  logic [RA-1:0]     rom_a_addr, rom_b_addr;
  logic [31:0]       rom_a_data, rom_b_data;
  logic [3:0]        cfg_log_n;
  logic [NMAX-1:0]   cfg_info;
  logic [LOG_NMAX:0] k_info;

  logic        h_valid, h_ready, h_last;
  logic [7:0]  h_bits;
  logic        q_valid, q_ready;
  logic [8:0]  q_data;
  logic        l_valid, l_ready, l_last;
  logic [63:0] l_data;
  logic        m_valid, m_ready, m_last;
  logic [31:0] m_data;

  // number of information bits among the first N positions
  always_comb begin
    k_info = '0;
    for (int i = 0; i < NMAX; i++)
      if (i < (1 << cfg_log_n)) k_info = k_info + (LOG_NMAX+1)'(cfg_info[i]);
  end

  data_rom #(.DEPTH(ROM_DEPTH)) u_rom (
    .clk, .addr_a(rom_a_addr), .data_a(rom_a_data), .addr_b(rom_b_addr), .data_b(rom_b_data)
  );

  polar_encoder #(.FRAMES(FRAMES), .ROM_DEPTH(ROM_DEPTH)) u_enc (
    .clk, .rst_n, .start, .log_n(cfg_log_n), .info_mask(cfg_info),
    .rom_addr(rom_a_addr), .rom_data(rom_a_data),
    .h_valid, .h_ready, .h_bits, .h_last, .busy(enc_busy)
  );

  sync_fifo #(.WIDTH(9), .DEPTH(32)) u_enc_fifo (
    .clk, .rst_n,
    .in_valid(h_valid), .in_ready(h_ready), .in_data({h_last, h_bits}),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_data),
    .count()
  );

  llr_trans u_llr (
    .clk, .rst_n,
    .h_valid(q_valid), .h_ready(q_ready), .h_bits(q_data[7:0]), .h_last(q_data[8]),
    .l_valid, .l_ready, .l_data, .l_last
  );

  polar_decoder_axi u_dec (
    .clk, .rst_n,
    .awvalid, .awready, .awaddr, .wvalid, .wready, .wdata, .bvalid, .bready, .bresp,
    .arvalid, .arready, .araddr, .rvalid, .rready, .rdata, .rresp,
    .s_tvalid(l_valid), .s_tready(l_ready), .s_tdata(l_data), .s_tlast(l_last),
    .m_tvalid(m_valid), .m_tready(m_ready), .m_tdata(m_data), .m_tlast(m_last),
    .st_busy(dec_busy), .st_frame_done(dec_frame_done), .st_len_err(len_err),
    .cfg_log_n, .cfg_info
  );

  ber_checker #(.FRAMES(FRAMES), .ROM_DEPTH(ROM_DEPTH)) u_chk (
    .clk, .rst_n, .clear(start), .k_info,
    .m_valid, .m_ready, .m_data, .m_last,
    .rom_addr(rom_b_addr), .rom_data(rom_b_data),
    .bit_errors, .words, .frames, .frame_err, .done
  );
endmodule
