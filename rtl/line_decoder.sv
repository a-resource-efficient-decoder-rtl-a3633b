// line_decoder: one tier of the Processing Unit Tree, P processing units side
// by side.
//
// Lane t combines llr_a[t] and llr_b[t] (the LLR pair that is half a node
// apart) into llr_out[t], with a shared F/G select and a per-lane partial-sum
// bit. Lanes at or above n_active produce zero, so the same row serves nodes
// narrower than P (the 32- and 16-wide tiers). Combinational.
// The default P = 64 is the widest line decoder of the design; the
// active-lane count input is this implementation's way of reusing one row.
module line_decoder
  import polar_pkg::*;
#(
  parameter int unsigned P = 64
) (
  input  logic                   fsel,
  input  logic [$clog2(P+1)-1:0] n_active,
  input  llr_t                   llr_a   [P],
  input  llr_t                   llr_b   [P],
  input  logic [P-1:0]           psum,
  output llr_t                   llr_out [P]
);
  for (genvar t = 0; t < P; t++) begin : g_lane
    llr_t pu_out;
    polar_pu u_pu (
      .fsel   (fsel),
      .llr_a  (llr_a[t]),
      .llr_b  (llr_b[t]),
      .psum   (psum[t]),
      .llr_out(pu_out)
    );
    assign llr_out[t] = (t < n_active) ? pu_out : '0;
  end
endmodule
