// tdc_pkg: types and elaboration-time helpers shared by the TDC designs.
//
// - stoch_mode_e: operating mode of the stochastic TDC back end. The
//   calibration and measurement modes are the two modes the design is built
//   around; IDLE and BUILD (computing the correction table from the
//   histogram) are states this implementation adds around them.
// - crt_weight(): Chinese-remainder weight w_k = M_k * (M_k^-1 mod m_k) with
//   M_k = N / m_k, so that x = (sum a_k * w_k) mod N for coprime moduli.
package tdc_pkg;

  typedef enum logic [1:0] {
    MODE_IDLE    = 2'd0,
    MODE_CALIB   = 2'd1,
    MODE_BUILD   = 2'd2,
    MODE_MEASURE = 2'd3
  } stoch_mode_e;

  // Modular inverse of a modulo m by exhaustive search (m is small).
  function automatic int unsigned mod_inverse(int unsigned a, int unsigned m);
    for (int unsigned i = 1; i < m; i++)
      if (((a % m) * i) % m == 1) return i;
    return (m == 1) ? 0 : 1;
  endfunction

  function automatic int unsigned crt_weight(int unsigned n_prod, int unsigned m);
    int unsigned mk;
    mk = n_prod / m;
    return (mk * mod_inverse(mk, m)) % n_prod;
  endfunction

endpackage
