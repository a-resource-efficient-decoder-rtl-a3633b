// ber_checker: compares the decoder's output words with the ROM words that
// were encoded and counts bit errors.
//
// It reads the ROM at its own word counter (one cycle latency) and takes an
// output word only when the matching ROM word is ready. Per frame it expects
// ceil(K/32) words, K = number of information bits; in the last word of a
// frame only the low K mod 32 bits are compared (all 32 when K is a multiple
// of 32), and a ROM word is used once, matching the encoder. It counts bit
// errors, words and frames, flags a tlast on the wrong word (framing error),
// and raises done after FRAMES frames. The comparison with the ROM data and
// the error count follow the platform of the design; the rest is this
// implementation's choice.
module ber_checker
  import polar_pkg::*;
#(
  parameter int unsigned FRAMES    = 4,
  parameter int unsigned ROM_DEPTH = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic [LOG_NMAX:0]            k_info,
  input  logic                         m_valid,
  output logic                         m_ready,
  input  logic [31:0]                  m_data,
  input  logic                         m_last,
  output logic [$clog2(ROM_DEPTH)-1:0] rom_addr,
  input  logic [31:0]                  rom_data,
  output logic [31:0]                  bit_errors,
  output logic [31:0]                  words,
  output logic [15:0]                  frames,
  output logic                         frame_err,
  output logic                         done
);
  logic                         ok;
  logic [LOG_NMAX-5:0]          wif;          // word within frame
  logic [LOG_NMAX-5:0]          wpf;          // words per frame - 1
  logic                         lastw;
  logic [31:0]                  cmp_mask, diff;
  logic [5:0]                   nerr;

  assign wpf      = (LOG_NMAX-4)'((int'(k_info) + 31) / 32 - 1);
  assign lastw    = (wif == wpf);
  assign cmp_mask = (lastw && k_info[4:0] != 5'd0) ? ((32'd1 << k_info[4:0]) - 32'd1) : '1;
  assign diff     = (m_data ^ rom_data) & cmp_mask;
  assign m_ready  = ok && !done;
  assign rom_addr = words[$clog2(ROM_DEPTH)-1:0];

  always_comb begin
    nerr = '0;
    for (int i = 0; i < 32; i++) nerr = nerr + 6'(diff[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ok         <= 1'b0;
      wif        <= '0;
      bit_errors <= '0;
      words      <= '0;
      frames     <= '0;
      frame_err  <= 1'b0;
      done       <= 1'b0;
    end else if (clear) begin
      ok         <= 1'b0;
      wif        <= '0;
      bit_errors <= '0;
      words      <= '0;
      frames     <= '0;
      frame_err  <= 1'b0;
      done       <= 1'b0;
    end else if (m_valid && m_ready) begin
      ok         <= 1'b0;
      words      <= words + 32'd1;
      bit_errors <= bit_errors + 32'(nerr);
      if (m_last != lastw) frame_err <= 1'b1;
      if (lastw) begin
        wif    <= '0;
        frames <= frames + 16'd1;
        if (32'(frames) == FRAMES - 1) done <= 1'b1;
      end else begin
        wif <= wif + 1'b1;
      end
    end else begin
      ok <= 1'b1;
    end
  end
endmodule
