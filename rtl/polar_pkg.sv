// polar_pkg: types, sizes and arithmetic shared by the polar SCL decoder.
//
// LLRs are signed two's-complement numbers of LLR_W bits, kept symmetric in
// [-LLR_MAX, +LLR_MAX] by saturation. The F function is the min-sum
// approximation sign(a)sign(b)min(|a|,|b|); the G function is (1-2u)a + b.
// Both follow the decoding equations of the design; the LLR width, the
// saturation and the path-metric width are this implementation's choices.
// Bit order is natural (no bit-reversal): at every tree node the F function
// pairs LLR k with LLR k+half, the left child decodes the lower half of the
// bit indices, and a node's codeword is {x_left ^ x_right, x_right}.
package polar_pkg;

  localparam int unsigned LLR_W   = 8;                         // LLR word width
  localparam int unsigned PM_W    = 12;                        // path metric width
  localparam int unsigned NMAX    = 1024;                      // largest code length
  localparam int unsigned LOG_NMAX = 10;
  localparam int unsigned LOG_NMIN = 5;                        // N = 32 smallest
  localparam int unsigned CHUNK   = 16;                        // bits per layer-3 chunk (rank 4)
  localparam int unsigned LIST_L  = 8;                         // list size

  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic [PM_W-1:0]         pm_t;

  localparam llr_t LLR_MAX = llr_t'((1 << (LLR_W-1)) - 1);

  // Saturate a wider signed sum back into [-LLR_MAX, LLR_MAX].
  function automatic llr_t llr_sat(input logic signed [LLR_W:0] v);
    if (v > $signed({1'b0, LLR_MAX}))       return LLR_MAX;
    else if (v < -$signed({1'b0, LLR_MAX})) return -LLR_MAX;
    else                                    return llr_t'(v);
  endfunction

  function automatic logic [LLR_W-1:0] llr_abs(input llr_t a);
    return a[LLR_W-1] ? -a : a;
  endfunction

  // Min-sum F function, eq. (1).
  function automatic llr_t f_minsum(input llr_t a, input llr_t b);
    logic [LLR_W-1:0] ma, mb, m;
    ma = llr_abs(a);
    mb = llr_abs(b);
    m  = (ma < mb) ? ma : mb;
    return (a[LLR_W-1] ^ b[LLR_W-1]) ? -llr_t'(m) : llr_t'(m);
  endfunction

  // G function, eq. (3): (1 - 2u) a + b, saturated.
  function automatic llr_t g_func(input logic u, input llr_t a, input llr_t b);
    logic signed [LLR_W:0] s;
    s = u ? ($signed({b[LLR_W-1], b}) - $signed({a[LLR_W-1], a}))
          : ($signed({b[LLR_W-1], b}) + $signed({a[LLR_W-1], a}));
    return llr_sat(s);
  endfunction

  // Polar transform x = u F^{(x)4} of one 16-bit chunk, natural order.
  function automatic logic [CHUNK-1:0] encode16(input logic [CHUNK-1:0] u);
    logic [CHUNK-1:0] x;
    x = u;
    for (int s = 0; s < 4; s++)
      for (int k = 0; k < CHUNK; k++)
        if (((k >> s) & 1) == 0) x[k] = x[k] ^ x[k + (1 << s)];
    return x;
  endfunction

endpackage
