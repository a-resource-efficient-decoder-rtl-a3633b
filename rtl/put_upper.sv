// put_upper: layers 1 and 2 of the Processing Unit Tree, from the channel LLRs
// (rank n, N = 2^n) down to the 16 rank-4 LLRs of each chunk, plus the
// partial-sum back-propagation from the chunks.
//
// LLR storage is one heap-ordered memory of 2*NMAX LLRs in rows of P: the
// LLRs of rank j sit at flat indices [2^j, 2^(j+1)), so the channel LLRs of
// any code length N land at [N, 2N) and a rank of at least P LLRs fills whole
// rows. A single line decoder of P processing units computes one rank from
// the rank above it, ceil(2^j / P) cycles for rank j: every rank-j LLR k
// combines LLRs k and k + 2^j of rank j+1. For chunk c the ranks from
// 4 + ctz(c) down to 4 are recomputed (all ranks for c = 0), the first with
// the G function and the rest with the F function; the rank-4 LLRs are then
// offered on the ch_* port. When the chunk's codeword x comes back on x_*, it
// climbs the tree one rank per cycle: at a left child it is stored as the
// partial sum of that rank (psum buffer, rank j at bits [2^j, 2^(j+1))),
// at a right child it is merged with the stored left sibling into the
// parent's codeword {left ^ x, x}. Reaching rank n ends the frame (done).
//
// Interface: ld_we writes BEAT channel LLRs at LLR index ld_idx*BEAT while
// idle; start begins a frame of code length 2^log_n (5 <= log_n <= log2 NMAX);
// ch_valid/ch_ready hands out a chunk, x_valid/x_ready takes its codeword.
// The tree split into layers, the 64-PU line decoder and the chunk size 16
// follow the design; the heap memory layout, the reuse of one line decoder
// for every rank (instead of a pipeline of narrower tiers) and the
// one-rank-per-cycle partial-sum climb are this implementation's choices.
module put_upper
  import polar_pkg::*;
#(
  parameter int unsigned P    = 64,   // processing units in the line decoder
  parameter int unsigned BEAT = 8     // channel LLRs per load write
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [3:0]                        log_n,
  input  logic                              ld_we,
  input  logic [$clog2(NMAX/BEAT)-1:0]      ld_idx,
  input  llr_t                              ld_llr [BEAT],
  input  logic                              start,
  output logic                              busy,
  output logic                              ch_valid,
  input  logic                              ch_ready,
  output llr_t                              ch_llr [CHUNK],
  output logic [LOG_NMAX-5:0]               ch_idx,
  input  logic                              x_valid,
  output logic                              x_ready,
  input  logic [CHUNK-1:0]                  x_cw,
  output logic                              done
);
  localparam int unsigned LOGP = $clog2(P);
  localparam int unsigned ROWS = 2 * NMAX / P;
  localparam int unsigned RW   = $clog2(ROWS);
  localparam int unsigned CIW  = LOG_NMAX - 4;

  initial begin
    assert (P >= 2 * CHUNK && (1 << LOGP) == P && P <= NMAX / 2)
      else $error("P must be a power of two between 32 and NMAX/2");
  end

  typedef enum logic [2:0] {S_IDLE, S_LVL, S_OUT, S_WAITX, S_PROP} state_t;
  state_t state;

  logic [P*LLR_W-1:0]   mem [ROWS];     // row r, LLR t at bits [t*LLR_W +: LLR_W]
  logic [2*NMAX-1:0]   psum_flat;
  // codeword climbing the tree; it is at most NMAX/2 bits wide while it is
  // still read (the merge at rank n ends the frame), so the upper half stays
  // unused
  logic [NMAX-1:0]     cw_cur;
  logic [CIW-1:0]      chunk;
  logic [3:0]          lvl;        // target rank (S_LVL) or climbing rank (S_PROP)
  logic [LOG_NMAX-LOGP:0] q;       // row step within a rank

  // ------------------------------------------------------------ rank step
  logic            big;            // rank lvl has at least P LLRs
  logic [RW-1:0]   ra, rb, rd;
  llr_t            row_a [P];
  llr_t            row_b [P];
  llr_t            op_a  [P];
  llr_t            op_b  [P];
  llr_t            op_o  [P];
  logic [P-1:0]    op_ps;
  logic [P-1:0]    psum_row;
  logic            fsel;
  logic [LOGP:0]   n_act;

  always_comb begin
    big = (lvl >= 4'(LOGP));
    rd  = big ? RW'(((1 << lvl) >> LOGP) + int'(q)) : '0;
    ra  = big ? RW'(((2 << lvl) >> LOGP) + int'(q)) : '0;
    rb  = big ? RW'(((3 << lvl) >> LOGP) + int'(q)) : RW'(1);
    for (int t = 0; t < P; t++) begin
      row_a[t] = mem[ra][t*LLR_W +: LLR_W];
      row_b[t] = mem[rb][t*LLR_W +: LLR_W];
    end
    n_act = big ? (LOGP+1)'(P) : (LOGP+1)'(1 << lvl);
    fsel  = chunk[lvl - 4];
    psum_row = psum_flat[(1 << lvl) + int'(q) * P +: P];
    for (int t = 0; t < P; t++) begin
      op_a[t]  = row_a[t];
      op_b[t]  = row_b[t];
      op_ps[t] = psum_row[t];
      // narrow ranks: rank lvl+1 lies in rows 0 and 1 at [2^(lvl+1), 2^(lvl+2))
      for (int jj = 4; jj < LOGP; jj++)
        if (!big && int'(lvl) == jj && t < (1 << jj)) begin
          op_a[t] = ((2 << jj) + t < P)        ? row_a[(2 << jj) + t]
                                               : row_b[(2 << jj) + t - P];
          op_b[t] = ((2 << jj) + (1 << jj) + t < P) ? row_a[(2 << jj) + (1 << jj) + t]
                                               : row_b[(2 << jj) + (1 << jj) + t - P];
        end
    end
  end

  line_decoder #(.P(P)) u_line (
    .fsel(fsel), .n_active(n_act), .llr_a(op_a), .llr_b(op_b),
    .psum(op_ps), .llr_out(op_o)
  );

  // first rank recomputed for a chunk: 4 + ctz(chunk), or n-1 for chunk 0
  function automatic logic [3:0] first_rank(input logic [CIW-1:0] c, input logic [3:0] n);
    logic [3:0] r;
    r = n - 4'd1;
    for (int b = CIW - 1; b >= 0; b--)
      if (c[b]) r = 4'(b + 4);
    return r;
  endfunction

  // ------------------------------------------------------- partial sums
  // merged codeword of a right child at rank j with its stored left sibling
  // rank j's buffer is written when a left child of rank j completes
  logic [NMAX-1:0] merged [LOG_NMAX];
  assign psum_flat[15:0] = '0;
  for (genvar j = 0; j < LOG_NMAX; j++) begin : g_merge
    if (j < 4) begin : g_none
      assign merged[j] = '0;
    end else begin : g_rank
      logic [(1<<j)-1:0] xr, ps;
      assign xr = cw_cur[(1<<j)-1:0];
      assign merged[j] = NMAX'({xr, ps ^ xr});
      assign psum_flat[(1<<j) +: (1<<j)] = ps;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)
          ps <= '0;
        else if (state == S_PROP && int'(lvl) == j && lvl != log_n && !chunk[j - 4])
          ps <= xr;
      end
    end
  end
  assign psum_flat[2*NMAX-1 -: NMAX] = '0;

  // ------------------------------------------------------------- outputs
  assign busy     = (state != S_IDLE);
  assign ch_valid = (state == S_OUT);
  assign ch_idx   = chunk;
  assign x_ready  = (state == S_WAITX);
  for (genvar k = 0; k < CHUNK; k++) begin : g_ch
    assign ch_llr[k] = mem[0][(CHUNK + k)*LLR_W +: LLR_W];
  end

  // LLR memory writes, one enable and one value per entry: a channel load
  // (BEAT lanes of one row), a full row of a wide rank, or the lanes
  // [2^lvl, 2^(lvl+1)) of row 0 for a narrow rank
  logic [$clog2(NMAX)+1:0] ld_base;
  logic [RW-1:0]           ld_row;
  logic [LOGP-1:0]         ld_lane;
  logic                    wr_big, wr_nar;
  llr_t                    nar_val [P];
  logic [P-1:0]            nar_en;

  assign ld_base = ($clog2(NMAX)+2)'((1 << log_n) + int'(ld_idx) * BEAT);
  assign ld_row  = RW'(ld_base >> LOGP);
  assign ld_lane = LOGP'(ld_base);
  assign wr_big  = (state == S_LVL) && big;
  assign wr_nar  = (state == S_LVL) && !big;

  always_comb begin
    for (int t = 0; t < P; t++) begin
      nar_en[t]  = 1'b0;
      nar_val[t] = op_o[t % (P / 2)];
      for (int jj = 4; jj < LOGP; jj++)
        if (int'(lvl) == jj && t >= (1 << jj) && t < (2 << jj)) begin
          nar_en[t]  = wr_nar;
          nar_val[t] = op_o[t - (1 << jj)];
        end
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic [P*LLR_W-1:0] row_q;
    assign mem[r] = row_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        row_q <= '0;
      else
        for (int t = 0; t < P; t++) begin
          if (state == S_IDLE && ld_we && ld_row == RW'(r) &&
              int'(ld_lane) / BEAT == t / BEAT)
            row_q[t*LLR_W +: LLR_W] <= ld_llr[t % BEAT];
          else if (wr_big && rd == RW'(r))
            row_q[t*LLR_W +: LLR_W] <= op_o[t];
          else if (r == 0 && nar_en[t])
            row_q[t*LLR_W +: LLR_W] <= nar_val[t];
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      chunk     <= '0;
      lvl       <= '0;
      q         <= '0;
      done      <= 1'b0;
      cw_cur    <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start) begin
            chunk <= '0;
            lvl   <= log_n - 4'd1;
            q     <= '0;
            state <= S_LVL;
          end
        end
        S_LVL: begin
          if (big && int'(q) + 1 < ((1 << lvl) >> LOGP)) begin
            q <= q + 1'b1;
          end else begin
            q <= '0;
            if (lvl == 4'd4) state <= S_OUT;
            else             lvl   <= lvl - 4'd1;
          end
        end
        S_OUT: if (ch_ready) state <= S_WAITX;
        S_WAITX: if (x_valid) begin
          cw_cur <= NMAX'(x_cw);
          lvl    <= 4'd4;
          state  <= S_PROP;
        end
        S_PROP: begin
          if (lvl == log_n) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (!chunk[lvl - 4]) begin
            // left child: keep as the partial sum of this rank, next chunk
            chunk <= chunk + 1'b1;
            lvl   <= first_rank(chunk + 1'b1, log_n);
            q     <= '0;
            state <= S_LVL;
          end else begin
            cw_cur <= merged[lvl];
            lvl    <= lvl + 4'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
