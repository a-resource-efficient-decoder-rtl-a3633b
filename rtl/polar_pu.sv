// polar_pu: Processing Unit, the basic SC decoding element.
//
// With fsel = 0 the unit computes the min-sum F function of llr_a and llr_b;
// with fsel = 1 it computes the G function, taking the partial-sum bit psum of
// the already decoded lower half as the decision bit. Each function sees its
// inputs only when selected (the other side is held at zero), and an output
// multiplexer picks the result, as in the processing-unit structure of the
// design. Purely combinational: llr_out is valid in the same cycle.
// The saturation of the G sum to the LLR range is this implementation's choice.
module polar_pu
  import polar_pkg::*;
(
  input  logic fsel,     // 0: F function, 1: G function
  input  llr_t llr_a,    // LLR of the upper (first-half) branch
  input  llr_t llr_b,    // LLR of the lower (second-half) branch
  input  logic psum,     // partial sum for the G function
  output llr_t llr_out   // LLR passed to the next rank
);
  llr_t fa, fb, ga, gb, f_out, g_out;

  // input gating: F sees its operands when fsel = 0, G when fsel = 1
  assign fa = fsel ? '0 : llr_a;
  assign fb = fsel ? '0 : llr_b;
  assign ga = fsel ? llr_a : '0;
  assign gb = fsel ? llr_b : '0;

  assign f_out   = f_minsum(fa, fb);
  assign g_out   = g_func(psum, ga, gb);
  assign llr_out = fsel ? g_out : f_out;
endmodule
