// Reference model of the turbo decoder's fixed-point arithmetic, written
// directly from the equations with plain integers, for the testbenches.
// It also holds the encoder used to make test data.
package torbo_ref_pkg;

  int unsigned n_sat;     // how often a metric addition saturated
  int unsigned n_corr;    // how often the MAX* correction was applied

  function automatic int clip(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int s8(int v);
    if (v > 127 || v < -128) n_sat++;
    return clip(v, -128, 127);
  endfunction

  function automatic int mstar(int x, int y);
    int m, c;
    m = (x >= y) ? x : y;
    c = (x - y >= -16 && x - y < 16) ? 3 : 0;
    if (c != 0) n_corr++;
    return s8(m + c);
  endfunction

  function automatic int widen(int s6);     // 6-bit (2 frac) -> 8-bit (3 frac)
    return 2 * s6;
  endfunction

  function automatic int narrow(int m8);    // 8-bit -> 6-bit, floor then clip
    int h;
    h = (m8 >= 0) ? m8 / 2 : -((-m8 + 1) / 2);
    return clip(h, -32, 31);
  endfunction

  typedef int met4_t [4];
  typedef int eta8_t [8];

  function automatic void bms(input int x6, input int z6, input int y6,
                              output int p, output int q, output int y);
    p = s8(widen(x6) + widen(z6));
    y = widen(y6);
    q = s8(p + y);
  endfunction

  function automatic met4_t normalise(met4_t v);
    int mx;
    met4_t r;
    mx = v[0];
    for (int i = 1; i < 4; i++) if (v[i] > mx) mx = v[i];
    for (int i = 0; i < 4; i++) r[i] = s8(v[i] - mx);
    return r;
  endfunction

  function automatic met4_t fwd_step(met4_t a, int p, int q, int y);
    met4_t n;
    n[0] = mstar(a[0], s8(a[2] + q));
    n[1] = mstar(s8(a[0] + q), a[2]);
    n[2] = mstar(s8(a[1] + p), s8(a[3] + y));
    n[3] = mstar(s8(a[1] + y), s8(a[3] + p));
    return normalise(n);
  endfunction

  // eta order: (0,0) (0,1) (1,2) (1,3) (2,0) (2,1) (3,2) (3,3)
  function automatic eta8_t etas(met4_t b, int p, int q, int y);
    eta8_t e;
    e[0] = b[0];          e[1] = s8(b[1] + q);
    e[2] = s8(b[2] + p);  e[3] = s8(b[3] + y);
    e[4] = s8(b[0] + q);  e[5] = b[1];
    e[6] = s8(b[2] + y);  e[7] = s8(b[3] + p);
    return e;
  endfunction

  function automatic met4_t bwd_step(met4_t b, int p, int q, int y);
    eta8_t e;
    met4_t n;
    e = etas(b, p, q, y);
    n[0] = mstar(e[0], e[1]);
    n[1] = mstar(e[2], e[3]);
    n[2] = mstar(e[4], e[5]);
    n[3] = mstar(e[6], e[7]);
    return normalise(n);
  endfunction

  function automatic int llr(met4_t a, eta8_t e);
    int l [8];
    int num, den;
    for (int i = 0; i < 8; i++) l[i] = s8(a[i/2] + e[i]);
    num = mstar(mstar(l[1], l[4]), mstar(l[2], l[7]));
    den = mstar(mstar(l[0], l[5]), mstar(l[3], l[6]));
    return s8(num - den);
  endfunction

  function automatic met4_t init_met();
    met4_t r;
    r[0] = 0; r[1] = -128; r[2] = -128; r[3] = -128;
    return r;
  endfunction

  // One forward-backward pass over k = 1..n+2. x, z, y are 6-bit inputs
  // (index 1..n+2). Returns the 6-bit values L - z (sub) for k = 1..n in
  // wout and the LLRs in lout.
  function automatic void fb_pass(input int n, input int x[], input int z[],
                                  input int y[], input int sub[],
                                  output int wout[], output int lout[]);
    met4_t a, b;
    met4_t astore [];
    int p, q, yy, l;
    astore = new[n + 3];
    wout = new[n + 1];
    lout = new[n + 1];
    a = init_met();
    for (int k = 1; k <= n + 2; k++) begin
      astore[k] = a;
      bms(x[k], z[k], y[k], p, q, yy);
      a = fwd_step(a, p, q, yy);
    end
    b = init_met();
    for (int k = n + 2; k >= 1; k--) begin
      bms(x[k], z[k], y[k], p, q, yy);
      l = llr(astore[k], etas(b, p, q, yy));
      b = bwd_step(b, p, q, yy);
      if (k <= n) begin
        lout[k] = l;
        wout[k] = narrow(s8(l - widen(sub[k])));
      end
    end
  endfunction

  // Whole turbo decoder. Arrays indexed from 1. Returns the error count of
  // the last iteration; zfinal holds Z after the last iteration.
  function automatic int decode(input int n, input int iters,
                                input int x1[], input int y1[], input int y2[],
                                input int x2t[], input int u[],
                                input int perm[], input int iperm[],
                                output int zfinal[]);
    int z [], xu [], zu [], xl [], zl [], sl [], w [], l [], wint [], uint_ [];
    int err;
    z = new[n + 3]; xu = new[n + 3]; zu = new[n + 3];
    xl = new[n + 3]; zl = new[n + 3]; sl = new[n + 3];
    wint = new[n + 3]; uint_ = new[n + 3];
    for (int k = 0; k <= n + 2; k++) begin z[k] = 0; zl[k] = 0; end
    err = 0;
    for (int it = 1; it <= iters; it++) begin
      for (int k = 1; k <= n + 2; k++) begin
        xu[k] = x1[k];
        zu[k] = (k <= n) ? z[k] : 0;
      end
      fb_pass(n, xu, zu, y1, zu, w, l);
      for (int k = 1; k <= n; k++) begin
        wint[iperm[k]] = w[k];
        uint_[iperm[k]] = u[k];
      end
      for (int k = 1; k <= n + 2; k++) xl[k] = (k <= n) ? wint[k] : x2t[k];
      fb_pass(n, xl, zl, y2, xl, w, l);
      for (int k = 1; k <= n; k++) begin
        z[perm[k]] = w[k];
        if (it == iters && ((l[k] >= 0) ? 1 : 0) != uint_[k]) err++;
      end
    end
    zfinal = z;
    return err;
  endfunction

  // Recursive systematic 7/5 encoder with two tail bits. u[1..n] in;
  // sys[1..n+2] and par[1..n+2] out (bits).
  function automatic void rsc_encode(input int n, input int u[],
                                     output int sys[], output int par[]);
    int a1, a2, a, b;
    sys = new[n + 3];
    par = new[n + 3];
    a1 = 0; a2 = 0;
    for (int k = 1; k <= n + 2; k++) begin
      b = (k <= n) ? u[k] : (a1 ^ a2);
      a = b ^ a1 ^ a2;
      sys[k] = b;
      par[k] = a ^ a2;
      a2 = a1;
      a1 = a;
    end
  endfunction

  // Random permutation of 1..n (Fisher-Yates) and its inverse.
  function automatic void make_perm(input int n, output int perm[], output int iperm[]);
    int t, j;
    perm = new[n + 1];
    iperm = new[n + 1];
    for (int k = 1; k <= n; k++) perm[k] = k;
    for (int k = n; k >= 2; k--) begin
      j = 1 + int'($urandom_range(k - 1));
      t = perm[k]; perm[k] = perm[j]; perm[j] = t;
    end
    for (int k = 1; k <= n; k++) iperm[perm[k]] = k;
  endfunction

  // Bit to quantised soft sample: +-amp (in 1/4 units) plus noise of
  // roughly Gaussian shape with standard deviation sd (1/4 units).
  function automatic int channel(int bit_, real amp, real sd);
    real nz, v;
    nz = 0.0;
    for (int i = 0; i < 12; i++) nz += real'($urandom_range(65535)) / 65536.0;
    nz = (nz - 6.0) * sd;
    v = (bit_ != 0 ? amp : -amp) + nz;
    return clip(int'(v), -32, 31);
  endfunction

  // A test block: random bits, both encoders, a random interleaver, the
  // channel, optional puncturing to rate 1/2, and the host words.
  class torbo_block;
    int n;
    int u [], x1 [], y1 [], y2 [], x2t [], perm [], iperm [];

    function void make(int n_, real amp, real sd, bit punct);
      n = n_;
      make_perm(n, perm, iperm);
      make_keep_perm(amp, sd, punct);
    endfunction

    // new bits and channel samples with the present interleaver
    function void make_keep_perm(real amp, real sd, bit punct);
      int sys1 [], par1 [], sys2 [], par2 [], ui [];
      u = new[n + 3];
      ui = new[n + 3];
      for (int k = 1; k <= n; k++) u[k] = int'($urandom_range(1));
      for (int j = 1; j <= n; j++) ui[j] = u[perm[j]];
      rsc_encode(n, u, sys1, par1);
      rsc_encode(n, ui, sys2, par2);
      x1 = new[n + 3]; y1 = new[n + 3]; y2 = new[n + 3]; x2t = new[n + 3];
      for (int k = 1; k <= n + 2; k++) begin
        x1[k]  = channel(sys1[k], amp, sd);
        y1[k]  = channel(par1[k], amp, sd);
        y2[k]  = channel(par2[k], amp, sd);
        x2t[k] = (k > n) ? channel(sys2[k], amp, sd) : 0;
        if (punct && k <= n) begin
          if (k % 2 == 0) y1[k] = 0;
          else            y2[k] = 0;
        end
      end
    endfunction

    function logic [31:0] perm_word(int k);
      return {iperm[k][15:0], perm[k][15:0]};
    endfunction

    function logic [31:0] data_word(int k);
      logic [31:0] w;
      w = '0;
      w[5:0]   = 6'(x1[k]);
      w[11:6]  = 6'(y1[k]);
      w[17:12] = 6'(y2[k]);
      w[23:18] = 6'(x2t[k]);
      w[24]    = (k <= n) ? u[k][0] : 1'b0;
      return w;
    endfunction

    function int ref_decode(int iters, output int z[]);
      return decode(n, iters, x1, y1, y2, x2t, u, perm, iperm, z);
    endfunction
  endclass

endpackage
