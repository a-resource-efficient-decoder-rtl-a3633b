// polar_decoder_core: the SCL polar decoder, layers 1-3 under one frame
// controller.
//
// A frame of N = 2^log_n channel LLRs arrives as N/BEAT beats of BEAT LLRs
// on s_*; they are written straight into the upper tree's LLR memory. The
// upper tree (put_upper) then produces the rank-4 LLRs of each 16-bit chunk
// in order; the chunk goes to the list decoder (scl_chunk_decoder) together
// with its 16 entries of the bit allocation table (info_mask, bit i = 1 when
// u_i carries data). The chunk's best-path bits leave on o_* with their
// allocation bits, and at the same moment its codeword goes back up the tree
// as the partial sum. s_ready is low while a frame is being decoded, so one
// frame is decoded at a time. The code length and the allocation table are
// sampled with a frame's first beat and held for that frame, so they may be
// rewritten while the previous frame is still decoding. s_last is checked against the beat count:
// a mismatch sets the sticky len_err flag (cleared by the next frame that
// matches). frame_done pulses when the last chunk's partial sum is absorbed.
// The layer split, the list size and the configurable allocation table
// follow the design, as does taking the configuration block by block; the
// load-then-decode frame schedule and the length check are this
// implementation's choices.
// The reset also disables the assertions (disable iff), so lint sees rst_n
// used both as an asynchronous reset and as a plain signal; that is intended.
module polar_decoder_core
  import polar_pkg::*;
#(
  parameter int unsigned P    = 64,
  parameter int unsigned BEAT = 8,
  parameter int unsigned L    = LIST_L
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       log_n,       // sampled at the first beat of a frame
  input  logic [NMAX-1:0]  info_mask,   // sampled at the first beat of a frame
  // channel LLR input
  input  logic             s_valid,
  output logic             s_ready,
  input  llr_t             s_llr [BEAT],
  input  logic             s_last,
  // decided chunks
  output logic             o_valid,
  input  logic             o_ready,
  output logic [CHUNK-1:0] o_u,
  output logic [CHUNK-1:0] o_info,
  output logic             o_last,
  // status
  output logic             busy,
  output logic             frame_done,
  output logic             len_err
);
  localparam int unsigned BW = $clog2(NMAX / BEAT);

  logic [BW-1:0]        beat_cnt;
  logic [3:0]           log_q, log_eff;
  logic [NMAX-1:0]      info_q;
  logic                 decoding;
  logic                 ld_we, start, last_beat;
  logic                 pu_busy;
  logic                 ch_valid, ch_ready, x_valid, x_ready;
  llr_t                 ch_llr [CHUNK];
  logic [LOG_NMAX-5:0]  ch_idx, c_q;
  logic [CHUNK-1:0]     x_u, x_cw;
  logic                 d_valid, d_ready;

  assign s_ready   = !decoding && !pu_busy;
  assign ld_we     = s_valid && s_ready;
  // the frame's configuration is taken with its first beat and held
  assign log_eff   = (beat_cnt == '0 && !busy) ? log_n : log_q;
  assign last_beat = (32'(beat_cnt) == ((1 << log_eff) / BEAT) - 1);
  assign start     = ld_we && last_beat;
  assign busy      = decoding || pu_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat_cnt <= '0;
      decoding <= 1'b0;
      len_err  <= 1'b0;
      c_q      <= '0;
      log_q    <= 4'(LOG_NMAX);
      info_q   <= '0;
    end else begin
      if (ld_we && beat_cnt == '0) begin
        log_q  <= log_n;
        info_q <= info_mask;
      end
      if (ld_we) begin
        beat_cnt <= last_beat ? '0 : beat_cnt + 1'b1;
        if (last_beat)   len_err <= !s_last;
        else if (s_last) len_err <= 1'b1;
      end
      if (start)      decoding <= 1'b1;
      if (frame_done) decoding <= 1'b0;
      if (ch_valid && ch_ready) c_q <= ch_idx;
    end
  end

  put_upper #(.P(P), .BEAT(BEAT)) u_put (
    .clk, .rst_n, .log_n(log_eff),
    .ld_we, .ld_idx(beat_cnt), .ld_llr(s_llr),
    .start, .busy(pu_busy),
    .ch_valid, .ch_ready, .ch_llr, .ch_idx,
    .x_valid, .x_ready, .x_cw,
    .done(frame_done)
  );

  scl_chunk_decoder #(.L(L)) u_scl (
    .clk, .rst_n,
    .in_valid(ch_valid), .in_ready(ch_ready),
    .in_llr(ch_llr), .in_info(info_q[int'(ch_idx) * CHUNK +: CHUNK]),
    .out_valid(d_valid), .out_ready(d_ready),
    .out_u(x_u), .out_x(x_cw)
  );

  // a chunk result leaves only when both the output and the tree take it
  assign o_valid = d_valid && x_ready;
  assign x_valid = d_valid && o_ready;
  assign d_ready = o_ready && x_ready;
  assign o_u     = x_u;
  assign o_info  = info_q[int'(c_q) * CHUNK +: CHUNK];
  assign o_last  = (32'(c_q) == ((1 << log_q) / CHUNK) - 1);

  // handshake rule of the chunk output: data held while waiting
  property p_o_stable;
    @(posedge clk) disable iff (!rst_n) (o_valid && !o_ready) |=> (o_valid && $stable(o_u));
  endproperty
  assert property (p_o_stable);
endmodule
