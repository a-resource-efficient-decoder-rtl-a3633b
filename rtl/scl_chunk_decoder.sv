// scl_chunk_decoder: layer 3 of the decoder, a list decoder (list size L)
// for one 16-bit chunk, from the 16 rank-4 LLRs down to the decided bits.
//
// Each of the L paths keeps its own intermediate LLR registers for ranks 3,
// 2 and 1 (8 + 4 + 2 LLRs), its decided bits and a path metric (PM). One bit
// is decided per cycle. For bit i a path recomputes the ranks that change
// (rank j for every j up to the number of trailing zeros of i): the first of
// them with the G function, using as partial sum the polar transform of the
// left sibling's decided bits, the rest with the F function, through one
// processing unit per LLR. Path 0 starts alone; at an information bit every
// active path splits into a 0- and a 1-extension, a frozen bit extends it by
// 0 only. A candidate's PM grows by |LLR| when its bit disagrees with the
// LLR's hard decision, and the L candidates with the smallest PM survive
// (scl_path_select), each copying its parent's registers. After bit 15 the
// best path (smallest PM, which the selector puts in slot 0) is returned as
// the decided bits u and as their codeword x, the partial sum that the upper
// layers need.
//
// Interface: in_valid/in_ready accept 16 LLRs and the information-bit mask
// (bit i = 1: u_i carries data). out_valid stays high with out_u/out_x until
// out_ready. Timing: out_valid rises 16 cycles after the accepting edge.
// The list size, the path splitting, the PM comparison and the best-path
// output follow the design; the one-bit-per-cycle schedule, the PM reset per
// chunk and the tie-break by index are this implementation's choices.
// The reset also disables the assertions (disable iff), so lint sees rst_n
// used both as an asynchronous reset and as a plain signal; that is intended.
module scl_chunk_decoder
  import polar_pkg::*;
#(
  parameter int unsigned L = LIST_L
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  llr_t             in_llr [CHUNK],
  input  logic [CHUNK-1:0] in_info,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [CHUNK-1:0] out_u,
  output logic [CHUNK-1:0] out_x
);
  localparam int unsigned CW = $clog2(2*L);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;
  state_t state;

  llr_t             llr4  [CHUNK];     // rank-4 LLRs, shared by all paths
  logic [CHUNK-1:0] info_q;
  logic [3:0]       bit_i;

  llr_t             lv3 [L][8];
  llr_t             lv2 [L][4];
  llr_t             lv1 [L][2];
  logic [CHUNK-1:0] u_q    [L];
  pm_t              pm_q   [L];
  logic [L-1:0]     active;

  // ranks recomputed for this bit: rank j is recomputed when j <= ctz(bit_i)
  // (rank 0, the decision itself, is computed for every bit)
  logic [3:1] recompute;
  always_comb begin
    recompute[1] = (bit_i[0]   == 1'b0);
    recompute[2] = (bit_i[1:0] == 2'b0);
    recompute[3] = (bit_i[2:0] == 3'b0);
  end

  // ---------------------------------------------------------------- per path
  llr_t             n3 [L][8];
  llr_t             n2 [L][4];
  llr_t             n1 [L][2];
  llr_t             lam [L];

  for (genvar l = 0; l < L; l++) begin : g_path
    logic [CHUNK-1:0] ps3, ps2, ps1;
    llr_t             c3 [8];
    llr_t             c2 [4];
    llr_t             c1 [2];

    // partial sums: polar transform of the decided bits at and above the
    // left sibling's start (bits at and above bit_i are still zero)
    always_comb begin
      ps3 = encode16(u_q[l] & ~((16'd1 << (bit_i - 4'd8)) - 16'd1));
      ps2 = encode16(u_q[l] & ~((16'd1 << (bit_i - 4'd4)) - 16'd1));
      ps1 = encode16(u_q[l] & ~((16'd1 << (bit_i - 4'd2)) - 16'd1));
    end

    for (genvar k = 0; k < 8; k++) begin : g_r3
      polar_pu u_pu (.fsel(bit_i[3]), .llr_a(llr4[k]), .llr_b(llr4[k+8]),
                     .psum(ps3[(32'(bit_i) - 8 + k) % 16]), .llr_out(c3[k]));
      assign n3[l][k] = recompute[3] ? c3[k] : lv3[l][k];
    end
    for (genvar k = 0; k < 4; k++) begin : g_r2
      polar_pu u_pu (.fsel(bit_i[2]), .llr_a(n3[l][k]), .llr_b(n3[l][k+4]),
                     .psum(ps2[(32'(bit_i) - 4 + k) % 16]), .llr_out(c2[k]));
      assign n2[l][k] = recompute[2] ? c2[k] : lv2[l][k];
    end
    for (genvar k = 0; k < 2; k++) begin : g_r1
      polar_pu u_pu (.fsel(bit_i[1]), .llr_a(n2[l][k]), .llr_b(n2[l][k+2]),
                     .psum(ps1[(32'(bit_i) - 2 + k) % 16]), .llr_out(c1[k]));
      assign n1[l][k] = recompute[1] ? c1[k] : lv1[l][k];
    end
    polar_pu u_pu0 (.fsel(bit_i[0]), .llr_a(n1[l][0]), .llr_b(n1[l][1]),
                    .psum(u_q[l][(32'(bit_i) - 1) % 16]), .llr_out(lam[l]));
  end

  // ------------------------------------------------------------- candidates
  logic [2*L-1:0] cand_valid;
  pm_t            cand_pm [2*L];
  logic [L-1:0]   sel_valid;
  logic [CW-1:0]  sel_idx [L];
  logic [CW-2:0]  par [L];          // parent path of each surviving candidate
  pm_t            sel_pm  [L];

  always_comb begin
    for (int l = 0; l < L; l++) begin
      pm_t pen;
      pen = pm_t'(llr_abs(lam[l]));
      // bit 0 disagrees with a negative LLR, bit 1 with a non-negative one
      cand_valid[2*l]   = active[l];
      cand_pm[2*l]      = pm_q[l] + (lam[l][LLR_W-1] ? pen : '0);
      cand_valid[2*l+1] = active[l] & info_q[bit_i];
      cand_pm[2*l+1]    = pm_q[l] + (lam[l][LLR_W-1] ? '0 : pen);
    end
  end

  scl_path_select #(.L(L)) u_sel (
    .cand_valid(cand_valid), .cand_pm(cand_pm),
    .out_valid(sel_valid), .out_idx(sel_idx), .out_pm(sel_pm)
  );
  always_comb
    for (int r = 0; r < L; r++) par[r] = sel_idx[r][CW-1:1];

  // ---------------------------------------------------------------- control
  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_DONE);
  assign out_u     = u_q[0];
  assign out_x     = encode16(u_q[0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      bit_i  <= '0;
      info_q <= '0;
      active <= '0;
      for (int k = 0; k < CHUNK; k++) llr4[k] <= '0;
      for (int l = 0; l < L; l++) begin
        u_q[l]  <= '0;
        pm_q[l] <= '0;
        for (int k = 0; k < 8; k++) lv3[l][k] <= '0;
        for (int k = 0; k < 4; k++) lv2[l][k] <= '0;
        for (int k = 0; k < 2; k++) lv1[l][k] <= '0;
      end
    end else begin
      case (state)
        S_IDLE: if (in_valid) begin
          llr4   <= in_llr;
          info_q <= in_info;
          bit_i  <= '0;
          active <= L'(1);
          for (int l = 0; l < L; l++) begin
            u_q[l]  <= '0;
            pm_q[l] <= '0;
          end
          state <= S_RUN;
        end
        S_RUN: begin
          for (int r = 0; r < L; r++) begin
            active[r] <= sel_valid[r];
            pm_q[r]   <= sel_pm[r];
            u_q[r]    <= u_q[par[r]] | (CHUNK'(sel_idx[r][0]) << bit_i);
            lv3[r]    <= n3[par[r]];
            lv2[r]    <= n2[par[r]];
            lv1[r]    <= n1[par[r]];
          end
          bit_i <= bit_i + 4'd1;
          if (bit_i == 4'd15) state <= S_DONE;
        end
        S_DONE: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // an accepted chunk always has exactly one active path at its start
  property p_one_path;
    @(posedge clk) disable iff (!rst_n) (state == S_RUN && bit_i == 4'd0) |-> active == L'(1);
  endproperty
  assert property (p_one_path);
endmodule
