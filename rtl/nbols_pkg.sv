// nbols_pkg: shared constants and the parity-check matrix of the
// non-binary orthogonal Latin square (OLS) code.
//
// The code protects k = m*m information symbols of b bits each (one symbol per
// multilevel PCM cell, 2^b levels) with r = 2*t*m check symbols and corrects
// any t erroneous symbols. Its parity-check matrix H is the 0/1 matrix of the
// binary t-error-correcting OLS code of the same k; only the alphabet changes:
// additions are done in GF(2^b), which is a bitwise XOR of b-bit symbols.
//
// H is made of 2t groups of m rows. Data symbol j sits at row a = j / m and
// column c = j % m of an m x m square. In group g it takes part in check row
//   g = 0      : a                      (row parity)
//   g = 1      : c                      (column parity)
//   g >= 2     : L_(g-1)(a, c)          (Latin square number g-1)
// The Latin squares are L_l(a, c) = l*a + c, computed in GF(m) when m is a
// power of two and modulo m when m is prime; for l = 1 .. m-1 these squares
// and the row and column partitions are mutually orthogonal, so any two data
// symbols share at most one check row (the row-column constraint). This
// construction of the squares is this design's choice; the code only needs
// 2t-2 mutually orthogonal squares of order m, which limits t to (m+1)/2.
//
// Everything here is constant: the functions are evaluated at elaboration
// and cost no logic.
package nbols_pkg;

  // Defaults of the main configuration: 64 data symbols of 3 bits (octal
  // cells), double-symbol correction, giving r = 2*2*8 = 32 check symbols.
  localparam int unsigned DEF_K = 64;
  localparam int unsigned DEF_T = 2;
  localparam int unsigned DEF_B = 3;

  // Integer square root (m such that m*m <= k < (m+1)*(m+1)).
  function automatic int unsigned isqrt(input int unsigned k);
    int unsigned m;
    m = 0;
    while ((m + 1) * (m + 1) <= k) m++;
    return m;
  endfunction

  function automatic bit is_pow2(input int unsigned v);
    return (v != 0) && ((v & (v - 1)) == 0);
  endfunction

  function automatic bit is_prime(input int unsigned v);
    if (v < 2) return 0;
    for (int unsigned d = 2; d * d <= v; d++) if (v % d == 0) return 0;
    return 1;
  endfunction

  // Primitive polynomial (with the x^p term) of GF(2^p), p = 1 .. 8.
  function automatic int unsigned prim_poly(input int unsigned p);
    case (p)
      1: return 'h3;
      2: return 'h7;
      3: return 'hB;
      4: return 'h13;
      5: return 'h25;
      6: return 'h43;
      7: return 'h89;
      default: return 'h11D;
    endcase
  endfunction

  // Product of x and y in GF(m), m = 2^p.
  function automatic int unsigned gf_mul(input int unsigned x, input int unsigned y,
                                         input int unsigned m);
    int unsigned p, acc, xs;
    p = $clog2(m);
    acc = 0;
    xs = x;
    for (int unsigned i = 0; i < p; i++) begin
      if (((y >> i) & 1) != 0) acc ^= xs;
      xs = xs << 1;
      if ((xs & m) != 0) xs ^= prim_poly(p);
    end
    return acc;
  endfunction

  // Check row, within group g, that data symbol (a, c) of an m x m square uses.
  function automatic int unsigned ols_row(input int unsigned g, input int unsigned a,
                                          input int unsigned c, input int unsigned m);
    if (g == 0) return a;
    if (g == 1) return c;
    if (is_pow2(m)) return gf_mul(g - 1, a, m) ^ c;
    return ((g - 1) * a + c) % m;
  endfunction

  // Index (0 .. 2tm-1) of the check symbol of group g that data symbol j uses.
  function automatic int unsigned chk_index(input int unsigned g, input int unsigned j,
                                            input int unsigned m);
    return g * m + ols_row(g, j / m, j % m, m);
  endfunction

  // Entry h(i, j) of the data part of H: 1 when check symbol i covers data symbol j.
  function automatic bit h_bit(input int unsigned i, input int unsigned j,
                               input int unsigned m);
    return chk_index(i / m, j, m) == i;
  endfunction

endpackage
