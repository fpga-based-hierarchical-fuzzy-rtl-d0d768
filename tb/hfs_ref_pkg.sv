// hfs_ref_pkg: behavioural reference model of the hierarchical fuzzy system,
// for the testbenches.
//
// The model is written independently of the RTL. It works on plain int
// arrays and describes each membership function as its own triangle or
// shoulder. Besides the hierarchical path it models the flat single-layer
// system: 625 four-input rules whose consequent is the composed table
// T[T[i1][i2]][T[i3][i4]], with strength = min of four grades and max
// aggregation. The hierarchical design must match it exactly. The crisp
// output is the weighted average of the singletons -170, -85, 0, 85, 170,
// truncated toward zero, as sign and magnitude.
package hfs_ref_pkg;

  typedef int grades_t [5];

  const int T [5][5] = '{
    '{0, 0, 0, 1, 2},
    '{0, 1, 1, 2, 3},
    '{0, 1, 2, 3, 4},
    '{1, 2, 3, 3, 4},
    '{2, 3, 4, 4, 4}
  };

  const int WEIGHT [5] = '{-170, -85, 0, 85, 170};

  function automatic int tri_mu(int xv, int lf, int pk, int rf, int sl, int sr);
    int v;
    if (xv < lf || xv >= rf) return 0;
    if (xv < pk) v = sl * (xv - lf);
    else         v = sr * (rf - xv);
    if (lf < 0 && xv < pk) v = 255;
    if (rf > 255 && xv >= pk) v = 255;
    return (v > 255) ? 255 : v;
  endfunction

  function automatic grades_t fuzzify(int xv);
    grades_t g;
    g[0] = tri_mu(xv, -1,   'h2A, 'h55, 0, 6);
    g[1] = tri_mu(xv, 'h2A, 'h55, 'h7F, 6, 5);
    g[2] = tri_mu(xv, 'h55, 'h7F, 'hAA, 5, 6);
    g[3] = tri_mu(xv, 'h7F, 'hAA, 'hDA, 6, 5);
    g[4] = tri_mu(xv, 'hAA, 'hDA, 256, 5, 0);
    return g;
  endfunction

  function automatic int imin(int p, int q);
    return (p < q) ? p : q;
  endfunction

  // two-input rule base
  function automatic grades_t infer2(grades_t ga, grades_t gb);
    grades_t r = '{0, 0, 0, 0, 0};
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++)
        if (imin(ga[i], gb[j]) > r[T[i][j]]) r[T[i][j]] = imin(ga[i], gb[j]);
    return r;
  endfunction

  // flat single-layer system: 625 four-input rules
  function automatic grades_t infer_flat(int x1, int x2, int x3, int x4);
    grades_t r = '{0, 0, 0, 0, 0};
    grades_t g1, g2, g3, g4;
    int s, k;
    g1 = fuzzify(x1); g2 = fuzzify(x2); g3 = fuzzify(x3); g4 = fuzzify(x4);
    for (int i1 = 0; i1 < 5; i1++)
      for (int i2 = 0; i2 < 5; i2++)
        for (int i3 = 0; i3 < 5; i3++)
          for (int i4 = 0; i4 < 5; i4++) begin
            s = imin(imin(g1[i1], g2[i2]), imin(g3[i3], g4[i4]));
            k = T[T[i1][i2]][T[i3][i4]];
            if (s > r[k]) r[k] = s;
          end
    return r;
  endfunction

  // weighted average; returns magnitude, sets neg
  function automatic int defuzz(grades_t g, output bit neg);
    int num = 0, den = 0, mag;
    for (int k = 0; k < 5; k++) begin
      num += WEIGHT[k] * g[k];
      den += g[k];
    end
    neg = (num < 0);
    mag = (num < 0) ? -num : num;
    return (den == 0) ? 0 : mag / den;
  endfunction

endpackage
