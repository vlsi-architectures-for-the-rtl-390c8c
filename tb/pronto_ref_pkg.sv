// Reference model of the MAX-DMFB detector for the testbenches, written
// from the recursions with integers in 1/16 units: forward limiter with
// thresholds y-1, y+1; backward limiter with thresholds -(y+1), -(y-1)
// starting from 0 at the end of the window; soft output A + B.
package pronto_ref_pkg;
  int unsigned n_init, n_lo, n_hi, n_pass;

  function automatic int clip6(int v);
    return (v < -32) ? -32 : (v > 31) ? 31 : v;
  endfunction

  function automatic int lim(int x, int lo, int hi);
    if (lo > x) begin n_lo++; return lo; end
    if (x > hi) begin n_hi++; return hi; end
    n_pass++;
    return x;
  endfunction

  // y[0..n-1], reset flags rs[0..n-1]; soft outputs for k with a defined
  // forward metric and a full window; valid[k] marks them.
  function automatic void run(input int n, input int L, input int y[], input bit rs[],
                              output int llr[], output bit valid[]);
    int a, b;
    bit have_a;
    llr = new[n];
    valid = new[n];
    have_a = 0;
    a = 0;
    for (int k = 0; k < n; k++) begin
      if (rs[k]) begin
        a = clip6(y[k] - 16);
        have_a = 1;
        n_init++;
      end else if (have_a) begin
        a = lim(a, clip6(y[k] - 16), clip6(y[k] + 16));
      end
      valid[k] = have_a && (k + L < n);
      llr[k] = 0;
      if (valid[k]) begin
        b = 0;
        for (int j = k + L; j >= k + 1; j--)
          b = lim(b, clip6(-clip6(y[j] + 16)), clip6(-clip6(y[j] - 16)));
        llr[k] = clip6(a + b);
      end
    end
  endfunction

  // sample of the 1-D channel for u = +/-1: level (u_k - u_{k-1}), i.e. 0 or
  // +/-2, in 1/16 units plus noise, clipped to the 6-bit range
  function automatic int channel(int u, int u_prev, real sd);
    real nz;
    nz = 0.0;
    for (int i = 0; i < 12; i++) nz += real'($urandom_range(65535)) / 65536.0;
    nz = (nz - 6.0) * sd;
    return clip6(int'(real'(16 * (u - u_prev)) + nz));
  endfunction
endpackage
