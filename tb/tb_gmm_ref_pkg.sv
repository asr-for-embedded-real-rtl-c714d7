// Reference model of the GMM arithmetic for the testbenches, written straight from the
// equations with 64-bit integers and real numbers (independent of the RTL and of the
// lookup-table file):
//   term_d   = ((o_d - mu_d)^2 * v_d) >>> (2*FEAT_FRAC + VAR_FRAC - LOG_FRAC)
//   log b_m  = sat16(C + g + sum_d term_d)
//   x (+) y  = piecewise rule with threshold 16 and round(8 ln(1 + exp(-|z|/8)))
package tb_gmm_ref_pkg;
  import asr_gmm_pkg::*;

  localparam int SHIFT = 2*FEAT_FRAC + VAR_FRAC - LOG_FRAC;

  function automatic longint ref_term(int o, int mu, int v);
    longint d = longint'(o) - longint'(mu);
    return (d * d * longint'(v)) >>> SHIFT;
  endfunction

  function automatic int ref_sat16(longint x);
    if (x > 32767)  return 32767;
    if (x < -32768) return -32768;
    return int'(x);
  endfunction

  function automatic int ref_lut(int i);
    real s = real'(1 << LOG_FRAC);
    return int'($floor(s * $ln(1.0 + $exp(-real'(i) / s)) + 0.5));
  endfunction

  function automatic int ref_logadd(int x, int y);
    int z  = x - y;
    int th = LOGADD_TH << LOG_FRAC;
    int r;
    if (z < -th)     r = y;
    else if (z < 0)  r = y + ref_lut(-z);
    else if (z < th) r = x + ref_lut(z);
    else             r = x;
    return ref_sat16(r);
  endfunction

  // which of the four log-add cases a pair falls in: 0 y only, 1 y+corr, 2 x+corr, 3 x only
  function automatic int ref_logadd_case(int x, int y);
    int z  = x - y;
    int th = LOGADD_TH << LOG_FRAC;
    if (z < -th)    return 0;
    if (z < 0)      return 1;
    if (z < th)     return 2;
    return 3;
  endfunction

  // log b_jm of one mixture; arrays hold the D dimensions
  function automatic int ref_mix(int o[D_DIM], int mu[D_DIM], int v[D_DIM], int c, int g);
    longint acc = 0;
    for (int d = 0; d < D_DIM; d++) acc += ref_term(o[d], mu[d], v[d]);
    // the hardware accumulates in ACC_W = 32 bits
    acc = longint'(int'(acc));
    return ref_sat16(acc + c + g);
  endfunction

  // random 16-bit value in [lo, hi]
  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(hi - lo));
  endfunction
endpackage
