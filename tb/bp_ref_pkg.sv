// bp_ref_pkg: behavioural reference for the testbenches of the BP decoder.
//
// Works on plain integer arrays indexed by factor-graph column and natural
// element position, with none of the vector layout, address rotation or
// transposes of the hardware, so agreement with the RTL checks those.
// Arithmetic: Q-bit symmetric saturation, min-sum scaled by 29/32 with the
// magnitude rounded down.  Also holds a polar encoder x = u * F^(x)n and a
// frozen-set choice (positions of smallest row weight frozen first).
package bp_ref_pkg;

  function automatic int maxv(int q);
    return (1 << (q - 1)) - 1;
  endfunction

  function automatic int sat(int x, int q);
    if (x > maxv(q))  return maxv(q);
    if (x < -maxv(q)) return -maxv(q);
    return x;
  endfunction

  function automatic int fmin(int a, int b, int q);
    int ma, mb, m;
    ma = (a < 0) ? -a : a;
    mb = (b < 0) ? -b : b;
    if (ma > maxv(q)) ma = maxv(q);
    if (mb > maxv(q)) mb = maxv(q);
    m = (ma < mb) ? ma : mb;
    m = (m * 29) / 32;
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  // CU of Fig.-4 type: a,b left terminals (R), c,d right terminals (L).
  function automatic void cu_right(int ra, int rb, int lc, int ld, int q,
                                   output int rc, output int rd);
    rc = fmin(ra, sat(ld + rb, q), q);
    rd = sat(fmin(ra, lc, q) + rb, q);
  endfunction

  function automatic void cu_left(int ra, int rb, int lc, int ld, int q,
                                  output int la, output int lb);
    la = fmin(lc, sat(ld + rb, q), q);
    lb = sat(fmin(ra, lc, q) + ld, q);
  endfunction

  function automatic int log2i(int x);
    int k = 0;
    while ((1 << k) < x) k++;
    return k;
  endfunction

  // BP decoding, same stage order as the hardware: right-bound stages
  // 0..n-2, left-bound stages n-1..1, final stage with hard decisions.
  function automatic void decode(int nn, int q, int iters, const ref int chan[],
                                 const ref int prior[], ref bit uhat[]);
    int n = log2i(nn);
    int rr[][];
    int ll[][];
    int l0[];
    rr = new[n];
    ll = new[n + 1];
    foreach (rr[k]) rr[k] = new[nn];
    foreach (ll[k]) ll[k] = new[nn];
    l0 = new[nn];
    for (int p = 0; p < nn; p++) begin
      for (int k = 0; k < n; k++) rr[k][p] = 0;
      for (int k = 0; k <= n; k++) ll[k][p] = 0;
      rr[0][p] = prior[p];
      ll[n][p] = chan[p];
    end
    uhat = new[nn];
    if (iters < 1) iters = 1;
    for (int it = 0; it < iters; it++) begin
      for (int s = 0; s <= n - 2; s++)
        for (int p = 0; p < nn; p++)
          if (((p >> s) & 1) == 0) begin
            int qq = p + (1 << s);
            int o0, o1;
            cu_right(rr[s][p], rr[s][qq], ll[s+1][p], ll[s+1][qq], q, o0, o1);
            rr[s+1][p] = o0; rr[s+1][qq] = o1;
          end
      for (int s = n - 1; s >= 0; s--)
        for (int p = 0; p < nn; p++)
          if (((p >> s) & 1) == 0) begin
            int qq = p + (1 << s);
            int o0, o1;
            cu_left(rr[s][p], rr[s][qq], ll[s+1][p], ll[s+1][qq], q, o0, o1);
            if (s == 0) begin l0[p] = o0; l0[qq] = o1; end
            else begin ll[s][p] = o0; ll[s][qq] = o1; end
          end
      for (int p = 0; p < nn; p++) uhat[p] = (l0[p] + rr[0][p]) < 0;
    end
  endfunction

  function automatic void encode(int nn, const ref bit u[], ref bit x[]);
    x = new[nn];
    foreach (u[p]) x[p] = u[p];
    for (int h = 1; h < nn; h = h * 2)
      for (int p = 0; p < nn; p++)
        if ((p & h) == 0) x[p] = x[p] ^ x[p + h];
  endfunction

  // frozen[p] = 1 for the nn-k positions with the smallest row weight
  // (popcount of p), ties broken towards smaller p.
  function automatic void frozen_set(int nn, int k, ref bit frozen[]);
    int cnt = 0;
    frozen = new[nn];
    foreach (frozen[p]) frozen[p] = 0;
    for (int w = 0; w <= log2i(nn) && cnt < nn - k; w++)
      for (int p = 0; p < nn && cnt < nn - k; p++)
        if ($countones(p) == w) begin frozen[p] = 1; cnt++; end
  endfunction

endpackage
