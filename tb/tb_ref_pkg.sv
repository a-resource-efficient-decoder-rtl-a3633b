// tb_ref_pkg: bit-exact software reference for the testbenches.
//
// Integer min-sum F and saturating G functions, the natural-order polar
// transform, a recursive successive-cancellation LLR computation and the
// chunk list decoder (list L, PM penalty |LLR| on disagreement, the L
// smallest metrics kept, ties to the lower candidate index), written
// independently of the RTL. Also the polarization-weight ordering used to
// build information-bit masks.
package tb_ref_pkg;
  localparam int LMAX = 127;

  function automatic int sat(input int v);
    return (v > LMAX) ? LMAX : (v < -LMAX) ? -LMAX : v;
  endfunction
  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction
  function automatic int ff(input int a, input int b);
    int m;
    m = iabs(a) < iabs(b) ? iabs(a) : iabs(b);
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction
  function automatic int gg(input bit u, input int a, input int b);
    return sat(u ? b - a : b + a);
  endfunction

  // x = u F^{(x)n} on the first n entries
  function automatic void encode(ref bit v[], input int n);
    for (int h = 1; h < n; h = h * 2)
      for (int k = 0; k < n; k++)
        if ((k & h) == 0) v[k] = v[k] ^ v[k + h];
  endfunction

  // LLR of bit i of a node with LLRs lin[0..n-1] given decided bits u[0..i-1]
  function automatic int sc_llr(input int lin[], input bit u[], input int n, input int i);
    int  half;
    int  lo[];
    bit  us[];
    bit  x[];
    if (n == 1) return lin[0];
    half = n / 2;
    lo = new[half];
    if (i < half) begin
      us = new[half];
      for (int k = 0; k < half; k++) begin
        lo[k] = ff(lin[k], lin[k + half]);
        us[k] = u[k];
      end
      return sc_llr(lo, us, half, i);
    end
    x  = new[half];
    us = new[half];
    for (int k = 0; k < half; k++) begin
      x[k]  = u[k];
      us[k] = u[k + half];
    end
    encode(x, half);
    for (int k = 0; k < half; k++) lo[k] = gg(x[k], lin[k], lin[k + half]);
    return sc_llr(lo, us, half, i - half);
  endfunction

  // list decoding of one 16-bit chunk; returns the best path's bits
  function automatic bit [15:0] scl16(input int lin[16], input bit [15:0] info, input int L,
                                      output int splits);
    bit [15:0] pu[], nu[];
    int        pm[], npm[];
    bit        pv[], nv[];
    int        cpm[];
    bit        cv[];
    int        lam, rank;
    int        llr_d[];
    bit        ub[];
    pu = new[L]; nu = new[L]; pm = new[L]; npm = new[L]; pv = new[L]; nv = new[L];
    cpm = new[2*L]; cv = new[2*L];
    llr_d = new[16]; ub = new[16];
    foreach (llr_d[k]) llr_d[k] = lin[k];
    splits = 0;
    for (int l = 0; l < L; l++) begin pu[l] = 0; pm[l] = 0; pv[l] = (l == 0); end
    for (int i = 0; i < 16; i++) begin
      for (int l = 0; l < L; l++) begin
        for (int k = 0; k < 16; k++) ub[k] = pu[l][k];
        lam = sc_llr(llr_d, ub, 16, i);
        cv[2*l]    = pv[l];
        cpm[2*l]   = pm[l] + ((lam < 0) ? -lam : 0);
        cv[2*l+1]  = pv[l] && info[i];
        cpm[2*l+1] = pm[l] + ((lam < 0) ? 0 : lam);
        if (cv[2*l+1]) splits++;
      end
      for (int r = 0; r < L; r++) nv[r] = 0;
      for (int c = 0; c < 2*L; c++) begin
        if (!cv[c]) continue;
        rank = 0;
        for (int d = 0; d < 2*L; d++)
          if (d != c && cv[d] && (cpm[d] < cpm[c] || (cpm[d] == cpm[c] && d < c))) rank++;
        if (rank < L) begin
          nv[rank]  = 1;
          npm[rank] = cpm[c];
          nu[rank]  = pu[c/2] | (16'(c % 2) << i);
        end
      end
      for (int r = 0; r < L; r++) begin pv[r] = nv[r]; pm[r] = npm[r]; pu[r] = nu[r]; end
    end
    return pu[0];
  endfunction

  // polarization weight of bit index i (n bits): sum of 2^(j/4) over set bits j
  function automatic real pw(input int i, input int n);
    real s;
    s = 0.0;
    for (int j = 0; j < n; j++) if (((i >> j) & 1) != 0) s += 2.0 ** (real'(j) / 4.0);
    return s;
  endfunction

  // information mask of the K most reliable of N bits (largest weight)
  function automatic void make_info(ref bit info[], input int N, input int K);
    int logn, better;
    logn = $clog2(N);
    info = new[N];
    for (int i = 0; i < N; i++) begin
      better = 0;
      for (int j = 0; j < N; j++)
        if (pw(j, logn) > pw(i, logn) || (pw(j, logn) == pw(i, logn) && j > i)) better++;
      info[i] = (better < K);
    end
  endfunction

  // rank-4 LLRs of chunk c of a node of size n given the decided bits u
  function automatic void chunk_llrs(input int lin[], input bit u[], input int n,
                                     input int c, ref int res[]);
    int half;
    int lo[];
    bit us[], x[];
    if (n == 16) begin
      res = new[16];
      for (int k = 0; k < 16; k++) res[k] = lin[k];
      return;
    end
    half = n / 2;
    lo = new[half]; us = new[half]; x = new[half];
    if (c * 16 < half) begin
      for (int k = 0; k < half; k++) begin lo[k] = ff(lin[k], lin[k+half]); us[k] = u[k]; end
      chunk_llrs(lo, us, half, c, res);
    end else begin
      for (int k = 0; k < half; k++) begin x[k] = u[k]; us[k] = u[k+half]; end
      encode(x, half);
      for (int k = 0; k < half; k++) lo[k] = gg(x[k], lin[k], lin[k+half]);
      chunk_llrs(lo, us, half, c - half / 16, res);
    end
  endfunction

  // whole-frame reference: upper ranks by SC, each 16-bit chunk by list decoding
  function automatic void decode_frame(input int lin[], input bit info[], input int n,
                                       ref bit u[], output int splits);
    int res[];
    int l16[16];
    bit [15:0] inf, d;
    int sp;
    u = new[n];
    splits = 0;
    for (int k = 0; k < n; k++) u[k] = 0;
    for (int c = 0; c < n / 16; c++) begin
      chunk_llrs(lin, u, n, c, res);
      for (int k = 0; k < 16; k++) begin l16[k] = res[k]; inf[k] = info[c*16 + k]; end
      d = scl16(l16, inf, 8, sp);
      splits += sp;
      for (int k = 0; k < 16; k++) u[c*16 + k] = d[k];
    end
  endfunction

  // noisy channel LLR of code bit b: +-mag plus roughly Gaussian noise, saturated
  function automatic int chan_llr(input bit b, input int mag, input int sigma);
    int s;
    s = 0;
    for (int k = 0; k < 4; k++) s += int'($urandom_range(0, 2 * sigma)) - sigma;
    return sat((b ? -mag : mag) + s);
  endfunction
endpackage
