// scl_path_select: list pruning of the layer-3 SCL decoder.
//
// Takes the 2L candidate paths (path l extended by bit 0 is candidate 2l,
// by bit 1 candidate 2l+1), each with a valid flag and a path metric, and
// keeps the L candidates with the smallest metrics. Every candidate gets a
// rank = number of valid candidates that beat it (smaller metric, or equal
// metric and lower index); those with rank < L survive and survivor r is
// written to output slot r. Combinational. Ties broken by index and the
// rank-based comparison network are this implementation's choices; the
// selection of the L smallest metrics follows the design.
module scl_path_select
  import polar_pkg::*;
#(
  parameter int unsigned L = 8
) (
  input  logic [2*L-1:0]         cand_valid,
  input  pm_t                    cand_pm  [2*L],
  output logic [L-1:0]           out_valid,
  output logic [$clog2(2*L)-1:0] out_idx  [L],  // winning candidate index
  output pm_t                    out_pm   [L]
);
  localparam int unsigned CW = $clog2(2*L);
  logic [CW:0] rank [2*L];

  always_comb begin
    for (int i = 0; i < 2*L; i++) begin
      rank[i] = '0;
      for (int j = 0; j < 2*L; j++)
        if (j != i && cand_valid[j] &&
            ((cand_pm[j] < cand_pm[i]) || (cand_pm[j] == cand_pm[i] && j < i)))
          rank[i] = rank[i] + 1'b1;
    end
    for (int r = 0; r < L; r++) begin
      out_valid[r] = 1'b0;
      out_idx[r]   = '0;
      out_pm[r]    = '0;
      for (int i = 0; i < 2*L; i++)
        if (cand_valid[i] && rank[i] == (CW+1)'(r)) begin
          out_valid[r] = 1'b1;
          out_idx[r]   = CW'(i);
          out_pm[r]    = cand_pm[i];
        end
    end
  end
endmodule
