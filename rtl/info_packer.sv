// info_packer: turns decided chunks into the decoder's output stream.
//
// For each chunk it keeps only the bits whose allocation bit is set (the
// information bits, in index order), appends them to a bit accumulator and
// emits a 32-bit word (bit 0 first) each time 32 bits have gathered. The
// last chunk of a frame flushes what is left as a final, zero-padded word;
// m_last marks the frame's last word. A chunk is taken only while no word is
// waiting, so the accumulator never holds more than 47 bits.
// The stream carries information bits only; that, the 32-bit word and the
// bit order are this implementation's choices.
module info_packer
  import polar_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             c_valid,
  output logic             c_ready,
  input  logic [CHUNK-1:0] c_u,
  input  logic [CHUNK-1:0] c_info,
  input  logic             c_last,
  output logic             m_valid,
  input  logic             m_ready,
  output logic [31:0]      m_data,
  output logic             m_last
);
  logic [47:0] acc;
  logic [5:0]  fill;
  logic        flush_pend;
  logic [15:0] comp;
  logic [4:0]  cnt;
  logic [47:0] nacc;
  logic [5:0]  nfill;

  // compaction of the information bits of the chunk
  always_comb begin
    comp = '0;
    cnt  = '0;
    for (int i = 0; i < CHUNK; i++)
      if (c_info[i]) begin
        comp[cnt[3:0]] = c_u[i];
        cnt = cnt + 5'd1;
      end
    nacc  = acc | (48'(comp) << fill);
    nfill = fill + 6'(cnt);
  end

  assign c_ready = !m_valid && !flush_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      fill       <= '0;
      flush_pend <= 1'b0;
      m_valid    <= 1'b0;
      m_data     <= '0;
      m_last     <= 1'b0;
    end else begin
      if (m_valid && m_ready) begin
        m_valid <= 1'b0;
        if (flush_pend) begin
          m_valid    <= 1'b1;
          m_data     <= acc[31:0];
          m_last     <= 1'b1;
          acc        <= '0;
          fill       <= '0;
          flush_pend <= 1'b0;
        end
      end else if (c_valid && c_ready) begin
        if (nfill >= 6'd32) begin
          m_valid    <= 1'b1;
          m_data     <= nacc[31:0];
          m_last     <= c_last && (nfill == 6'd32);
          acc        <= nacc >> 32;
          fill       <= nfill - 6'd32;
          flush_pend <= c_last && (nfill != 6'd32);
        end else if (c_last && nfill != 6'd0) begin
          m_valid <= 1'b1;
          m_data  <= nacc[31:0];
          m_last  <= 1'b1;
          acc     <= '0;
          fill    <= '0;
        end else begin
          acc  <= nacc;
          fill <= nfill;
        end
      end
    end
  end
endmodule
