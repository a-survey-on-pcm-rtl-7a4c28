// tb_ols_ref_pkg: reference model of the non-binary OLS code for the
// testbenches, written independently of the RTL.
//
// Symbols are plain ints in dynamic arrays. The Latin squares are
// L_l(a, c) = l*a + c over GF(m) (m a power of two, multiplication done with
// log / antilog tables built from a generator) or modulo m (m prime), which
// is the same square set the RTL uses, computed a different way. Also holds
// the brute-force checks of the code's structure (column weight 2t and the
// row-column constraint) and a symbol-error injector.
package tb_ols_ref_pkg;

  function automatic int ref_isqrt(input int k);
    int m = 1;
    while (m * m < k) m++;
    return m;
  endfunction

  function automatic int poly_of(input int p);
    int polys[9] = '{0, 'h3, 'h7, 'hB, 'h13, 'h25, 'h43, 'h89, 'h11D};
    return polys[p];
  endfunction

  // a*b in GF(m), m = 2^p, via log / antilog of the generator x.
  function automatic int gf_mul_ref(input int a, input int b, input int m);
    int p, e, alog[], lg[];
    if (a == 0 || b == 0) return 0;
    p = $clog2(m);
    alog = new[m];
    lg = new[m];
    e = 1;
    for (int i = 0; i < m - 1; i++) begin
      alog[i] = e;
      lg[e] = i;
      e = e << 1;
      if (e >= m) e = e ^ poly_of(p);
    end
    return alog[(lg[a] + lg[b]) % (m - 1)];
  endfunction

  function automatic int ref_row(input int g, input int a, input int c, input int m);
    if (g == 0) return a;
    if (g == 1) return c;
    if ((m & (m - 1)) == 0) return gf_mul_ref(g - 1, a, m) ^ c;
    return ((g - 1) * a + c) % m;
  endfunction

  // Check symbols of a data word.
  function automatic void ref_encode(input int data[], input int t, output int chk[]);
    int k = data.size();
    int m = ref_isqrt(k);
    chk = new[2 * t * m];
    foreach (chk[i]) chk[i] = 0;
    for (int j = 0; j < k; j++)
      for (int g = 0; g < 2 * t; g++)
        chk[g * m + ref_row(g, j / m, j % m, m)] ^= data[j];
  endfunction

  // Number of check rows two distinct data symbols share (must be <= 1).
  function automatic int shared_rows(input int j1, input int j2, input int t, input int m);
    int n = 0;
    for (int g = 0; g < 2 * t; g++)
      if (ref_row(g, j1 / m, j1 % m, m) == ref_row(g, j2 / m, j2 % m, m)) n++;
    return n;
  endfunction

  // Add nonzero random errors to nerr distinct random symbols of a word.
  function automatic void inject(ref int word[], input int nerr, input int b);
    int pos[$];
    int p;
    bit dup;
    while (pos.size() < nerr) begin
      p = $urandom_range(word.size() - 1);
      dup = 0;
      foreach (pos[i]) if (pos[i] == p) dup = 1;
      if (!dup) pos.push_back(p);
    end
    foreach (pos[i]) word[pos[i]] ^= $urandom_range((1 << b) - 1, 1);
  endfunction

endpackage
