// Reference arithmetic shared by the testbenches of the decimation chain.
// Everything is computed in 64-bit integers straight from the definitions
// (convolution sums, moving sums, binomial differences), independently of
// the hardware structure under test.
package tb_ref_pkg;

  // floor(v / 2^s), saturated to a signed w-bit range.
  function automatic longint scale_sat(longint v, int s, int w);
    longint q, mx, mn;
    q  = v >>> s;
    mx = (64'sd1 <<< (w - 1)) - 1;
    mn = -(64'sd1 <<< (w - 1));
    if (q > mx) return mx;
    if (q < mn) return mn;
    return q;
  endfunction

  // Low w bits of v read as a signed number.
  function automatic longint wrap(longint v, int w);
    longint m;
    m = v & ((64'sd1 <<< w) - 1);
    if (m >= (64'sd1 <<< (w - 1))) m -= (64'sd1 <<< w);
    return m;
  endfunction

  // sum_k c[k] * x[n-k], samples before index 0 are zero.
  function automatic longint fir_at(input longint x[$], input int c[$], input int n);
    longint s = 0;
    for (int k = 0; k < c.size(); k++)
      if (n - k >= 0 && n - k < x.size()) s += longint'(c[k]) * x[n - k];
    return s;
  endfunction

  // Moving sum of length m (x before index 0 is zero).
  function automatic void moving_sum(ref longint x[$], input int m);
    longint y[$];
    longint run = 0;
    for (int i = 0; i < x.size(); i++) begin
      run += x[i];
      if (i >= m) run -= x[i - m];
      y.push_back(run);
    end
    x = y;
  endfunction

  function automatic longint binom(int n, int k);
    longint r = 1;
    for (int i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return r;
  endfunction

endpackage
