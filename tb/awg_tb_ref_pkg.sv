// awg_tb_ref_pkg: reference arithmetic for the resampler testbenches.
//
// farrow_ref evaluates one output sample straight from the resampling
// formula y = sum_m u^m sum_t a(m,t) x'[J-N+t] in 64-bit integers, using
// the fixed-point rules the filter bank uses: each sub-filter sum
// floored to ACC_GUARD fractional bits, Horner steps floored after a shift
// by U_W, result rounded to an integer and saturated to 16 bits. lagrange3 gives the cubic Lagrange
// interpolator as Farrow coefficients (taps J-1..J+2), used to check that
// resampled sine waves stay on the ideal curve; lagrange_n gives the
// NP-point Lagrange interpolator in the same form.
package awg_tb_ref_pkg;
  import awg_pkg::*;

  function automatic longint floor_shift(longint v, int sh);
    return v >>> sh;   // arithmetic shift is a floor division by 2**sh
  endfunction

  // coef: flattened m*T+t; win: T samples; u: U_W-bit fraction
  function automatic int farrow_ref(int M, int T, longint coef[$], longint win[$], longint u);
    longint h [$];
    longint acc;
    for (int m = 0; m < M; m++) begin
      longint s = 0;
      for (int t = 0; t < T; t++) s += coef[m*T+t] * win[t];
      h.push_back(floor_shift(s, COEF_FRAC - ACC_GUARD));
    end
    acc = h[M-1];
    for (int m = M-2; m >= 0; m--) acc = floor_shift(acc * u, U_W) + h[m];
    acc = floor_shift(acc + (longint'(1) << (ACC_GUARD - 1)), ACC_GUARD);
    if (acc > 32767)  acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  // Cubic Lagrange interpolation through x[J-1], x[J], x[J+1], x[J+2]
  // as polynomials in u (coefficients of u^0..u^3), placed on taps
  // N-1..N+2 of a (2N+1)-tap Farrow bank with M >= 4 sub-filters.
  function automatic void lagrange3(int M, int N, ref longint coef[$]);
    real c [4][4];   // [tap offset -1..2][power]
    int T = 2*N + 1;
    c[0] = '{0.0, -1.0/3.0,  0.5, -1.0/6.0};
    c[1] = '{1.0, -0.5,     -1.0,  0.5};
    c[2] = '{0.0,  1.0,      0.5, -0.5};
    c[3] = '{0.0, -1.0/6.0,  0.0,  1.0/6.0};
    coef.delete();
    for (int i = 0; i < M*T; i++) coef.push_back(0);
    for (int d = 0; d < 4; d++)
      for (int m = 0; m < 4; m++)
        coef[m*T + N - 1 + d] = longint'($rtoi(c[d][m] * real'(longint'(1) << COEF_FRAC)
                                  + ((c[d][m] >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // Lagrange interpolation through NP points x[J-NP/2+1] .. x[J+NP/2]
  // (NP even, NP <= 2N, NP <= M) written as Farrow coefficients: the basis
  // polynomial of each point is multiplied out into powers of u.
  function automatic void lagrange_n(int NP, int M, int N, ref longint coef[$]);
    int T = 2*N + 1;
    int lo = -(NP/2 - 1);
    coef.delete();
    for (int i = 0; i < M*T; i++) coef.push_back(0);
    for (int a = 0; a < NP; a++) begin
      real p [$];
      p.push_back(1.0);                    // p[k] is the coefficient of u^k
      for (int b = 0; b < NP; b++) if (b != a) begin
        real q [$];
        real den = real'(a - b);
        for (int k = 0; k <= p.size(); k++) q.push_back(0.0);
        for (int k = 0; k < p.size(); k++) begin
          q[k+1] += p[k] / den;            // u * p
          q[k]   -= p[k] * real'(lo + b) / den;
        end
        p = q;
      end
      for (int m = 0; m < NP; m++)
        coef[m*T + N + lo + a] = longint'($rtoi(p[m] * real'(longint'(1) << COEF_FRAC)
                                    + ((p[m] >= 0.0) ? 0.5 : -0.5)));
    end
  endfunction

endpackage
