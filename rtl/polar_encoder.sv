// polar_encoder: the encoder of the verification platform.
//
// On start it encodes FRAMES frames back to back. For each frame it walks
// the N = 2^log_n bit positions, one per cycle, putting the next bit of the
// information-word stream (read from the ROM, bit 0 first) on every position
// whose allocation bit is set and 0 on the frozen ones; a word whose bits are
// not all used at the end of a frame is dropped. The bit vector u is then
// transformed in one cycle into x = u F^{(x)n}, F = [1 0; 1 1], natural order
// (the NMAX-point butterfly applied to u padded with zeros gives the N-point
// transform in its low N bits), and sent as N/8 beats of 8 code bits, bit k
// of the frame in bit k mod 8 of beat k/8, with h_last on the last beat.
// ROM words are read through rom_addr/rom_data with one cycle of latency.
// The encoder's place in the platform follows the design; its schedule and
// interfaces are this implementation's choices.
module polar_encoder
  import polar_pkg::*;
#(
  parameter int unsigned FRAMES    = 4,
  parameter int unsigned ROM_DEPTH = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [3:0]                   log_n,
  input  logic [NMAX-1:0]              info_mask,
  output logic [$clog2(ROM_DEPTH)-1:0] rom_addr,
  input  logic [31:0]                  rom_data,
  output logic                         h_valid,
  input  logic                         h_ready,
  output logic [7:0]                   h_bits,
  output logic                         h_last,
  output logic                         busy
);
  typedef enum logic [2:0] {E_IDLE, E_FETCH, E_CAPT, E_FILL, E_ENC, E_OUT} estate_t;
  estate_t state;

  logic [NMAX-1:0]             u, x;
  logic [31:0]                 wbuf;
  logic [5:0]                  bitptr;      // next unused bit of wbuf, 32 = empty
  logic [LOG_NMAX-1:0]         pos;
  logic [$clog2(ROM_DEPTH)-1:0] word;
  logic [$clog2(NMAX/8)-1:0]   beat;
  logic [$clog2(FRAMES+1)-1:0] frame;

  // butterfly network: stage s XORs bit k+2^s into bit k when bit s of k is 0
  logic [NMAX-1:0] stg [LOG_NMAX+1];
  assign stg[0] = u;
  for (genvar s = 0; s < LOG_NMAX; s++) begin : g_stage
    for (genvar k = 0; k < NMAX; k++) begin : g_bit
      if (((k >> s) & 1) == 0) begin : g_xor
        assign stg[s+1][k] = stg[s][k] ^ stg[s][k + (1 << s)];
      end else begin : g_pass
        assign stg[s+1][k] = stg[s][k];
      end
    end
  end

  assign rom_addr = word;
  assign busy     = (state != E_IDLE);
  assign h_valid  = (state == E_OUT);
  assign h_bits   = x[int'(beat) * 8 +: 8];
  assign h_last   = (32'(beat) == ((1 << log_n) / 8) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= E_IDLE;
      u      <= '0;
      x      <= '0;
      wbuf   <= '0;
      bitptr <= 6'd32;
      pos    <= '0;
      word   <= '0;
      beat   <= '0;
      frame  <= '0;
    end else begin
      case (state)
        E_IDLE: if (start) begin
          frame  <= '0;
          word   <= '0;
          pos    <= '0;
          u      <= '0;
          bitptr <= 6'd32;
          state  <= E_FILL;
        end
        E_FETCH: state <= E_CAPT;          // address presented this cycle
        E_CAPT: begin
          wbuf   <= rom_data;
          bitptr <= '0;
          word   <= (32'(word) == ROM_DEPTH - 1) ? '0 : word + 1'b1;
          state  <= E_FILL;
        end
        E_FILL: begin
          if (info_mask[pos] && bitptr == 6'd32) begin
            state <= E_FETCH;              // need a fresh word first
          end else begin
            if (info_mask[pos]) begin
              u[pos] <= wbuf[bitptr[4:0]];
              bitptr <= bitptr + 6'd1;
            end
            if (32'(pos) == (1 << log_n) - 1) begin
              pos    <= '0;
              bitptr <= 6'd32;             // rest of a partly used word is dropped
              state  <= E_ENC;
            end else begin
              pos <= pos + 1'b1;
            end
          end
        end
        E_ENC: begin
          x     <= stg[LOG_NMAX];
          beat  <= '0;
          state <= E_OUT;
        end
        E_OUT: if (h_ready) begin
          if (h_last) begin
            u <= '0;
            if (32'(frame) == FRAMES - 1) state <= E_IDLE;
            else begin
              frame <= frame + 1'b1;
              state <= E_FILL;
            end
          end else begin
            beat <= beat + 1'b1;
          end
        end
        default: state <= E_IDLE;
      endcase
    end
  end
endmodule
