// dct_pkg: constants and elaboration-time table builders shared by the
// prime-length DCT datapath.
//
// For an odd prime length N with primitive root G, the index map
// v -> <G^v>_N permutes 1..N-1.  The tables computed here are:
//   * the input permutation table  v -> <G^v>_N  (ROM of the input network),
//   * the two output permutation tables that put the correlation outputs
//     T'(k) and T''(k) back into natural order T(2j) and T(2j-1),
//   * the distributed-arithmetic ROM of 2^L words (L = (N-1)/2), where
//     word a = round(2^F * sum_p a[p] * C(p+2)) and C(n) = cos(2*pi*<G^n>_N / N),
//   * the scaling table cos(k*pi/(2N)) of stage 3.
// Every table is computed from N and G while the design elaborates, so
// changing the transform length means changing two parameters.  All real
// arithmetic is confined to constant functions; no real value reaches logic.
// The tables and their index conventions follow the algorithm; the rounding
// (round to nearest) and the fraction widths are this design's own choices.
package dct_pkg;

  localparam real PI = 3.14159265358979323846;

  // Which table a permutation network holds.
  typedef enum logic [1:0] {
    PERM_PRE       = 2'd0,  // index v -> address <G^v>_N   (x'(v) = x(<G^v>_N))
    PERM_POST_EVEN = 2'd1,  // index j -> address k with T'(k)  = T(2j)
    PERM_POST_ODD  = 2'd2   // index j -> address k with T''(k) = T(2j-1)
  } perm_mode_e;

  // <g^e>_n
  function automatic int pow_mod(int g, int e, int n);
    int r;
    r = 1;
    for (int i = 0; i < e; i++) r = (r * g) % n;
    return r;
  endfunction

  // True when g is a primitive root of the prime n.
  function automatic bit is_prim_root(int g, int n);
    for (int e = 1; e < n - 1; e++)
      if (pow_mod(g, e, n) == 1) return 1'b0;
    return (n > 2) && (pow_mod(g, n - 1, n) == 1);
  endfunction

  // T(m) = T(2N - m): fold an index of the even branch back into 0..N.
  function automatic int fold_2n(int m, int n);
    return (m > n) ? 2 * n - m : m;
  endfunction

  // ROM word of a permutation network.  Index 0 is unused by the datapath and
  // maps to address 0.
  function automatic int perm_entry(perm_mode_e mode, int idx, int n, int g);
    int l;
    l = (n - 1) / 2;
    if (idx == 0) return 0;
    case (mode)
      PERM_PRE: return pow_mod(g, idx, n);
      PERM_POST_EVEN:
        for (int k = 1; k <= l; k++)
          if (fold_2n(2 * pow_mod(g, k, n), n) == 2 * idx) return k;
      PERM_POST_ODD:
        for (int k = 1; k <= l; k++) begin
          int d;
          d = n - 2 * pow_mod(g, k, n);
          if (d < 0) d = -d;
          if (d == 2 * idx - 1) return k;
        end
      default: return 0;
    endcase
    return 0;
  endfunction

  // Correlation coefficient C(i) = cos(2*pi*<G^i>_N / N), eqn (14).
  function automatic real corr_coef(int i, int n, int g);
    return $cos(2.0 * PI * real'(pow_mod(g, i, n)) / real'(n));
  endfunction

  // Distributed-arithmetic ROM word for address a.  Bit p of the address
  // comes from shift-register position p, which holds x''(p+1) when T'(1) is
  // computed, so it weighs C(p+2) (T'(k) = sum_i x''(i) C(i+k)).
  function automatic longint da_rom_word(int a, int n, int g, int frac);
    real s;
    int l;
    l = (n - 1) / 2;
    s = 0.0;
    for (int p = 0; p < l; p++)
      if (((a >> p) & 1) != 0) s += corr_coef(p + 2, n, g);
    return longint'(s * (2.0 ** frac));
  endfunction

  // Stage-3 scaling word round(2^frac * cos(k*pi/(2N))).
  function automatic longint cos_word(int k, int n, int frac);
    return longint'($cos(PI * real'(k) / (2.0 * real'(n))) * (2.0 ** frac));
  endfunction

endpackage
