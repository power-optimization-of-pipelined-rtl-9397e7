// cal_ref_pkg: bit-exact reference model of the calibration unit, plus a
// behavioural model of the analogue first pipeline stage, for the testbenches.
//
// The reference is written with 64-bit integers, floor division by powers of
// two and explicit range clamping, independently of the RTL's shift and
// slicing formulation. cal_ref models every register of cal_top so it can be
// compared clock by clock. stage1_sample() models the 1.5-bit first stage:
// sub-ADC thresholds at +-1/4 with the dither PN/8 added to its input, the
// residue y = (1 - dg)(2x - D) with a level-dependent gain error
// dg = G0 + G2*y^2 (solved by fixed-point iteration), and an ideal back end
// that digitises y to Y_W bits.
package cal_ref_pkg;

  // floor(a / 2^k)
  function automatic longint fdiv(longint a, int k);
    longint p;
    p = longint'(1) << k;
    if (a >= 0) return a / p;
    else        return -((-a + p - 1) / p);
  endfunction

  function automatic longint clamp(longint v, int w);
    longint hi, lo;
    hi = (longint'(1) << (w - 1)) - 1;
    lo = -(longint'(1) << (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // Reference for the correction block: returns Y_cal for one sample
  function automatic longint ref_correct(longint y, longint dg0c, longint dg2c,
                                         int ysq_bits, int coef_frac);
    longint yt, dgh;
    yt  = fdiv(y, 13 - ysq_bits);
    dgh = dg0c + fdiv(dg2c * yt * yt, 2 * (ysq_bits - 1));
    return clamp(y + fdiv(y * dgh, coef_frac), 13);
  endfunction

  // First-stage behavioural model: analogue input x, dither pn -> (Y code, D)
  function automatic void stage1_sample(real x, bit pn, real g0, real g2,
                                        output longint ycode, output int d);
    real xd, v, y;
    xd = x + (pn ? 0.125 : -0.125);
    d  = (xd > 0.25) ? 1 : (xd < -0.25) ? -1 : 0;
    v  = 2.0 * x - real'(d);
    y  = v;
    for (int i = 0; i < 8; i++) y = (1.0 - (g0 + g2 * y * y)) * v;
    ycode = clamp(longint'($floor(y * 4096.0)), 13);
  endfunction

  class cal_ref;
    int ysq, ypn_bits, k0, k2, ke, cf, lat;
    int dg0_frac, dg2_frac, dg0_w, dg2_w;
    // registers
    bit     [30:0] lfsr;
    bit            pn_q[$];
    longint c_ycal; int c_d; bit c_pn;
    longint o_out, o_ypn; bit o_pn;
    longint dg0, dg2, s1, s2, s3;
    longint dg0c, dg2c;

    function new(int ysq_i, int ypn_i, int k0_i, int k2_i, int ke_i, int cf_i, int lat_i, bit [30:0] seed);
      ysq = ysq_i; ypn_bits = ypn_i; k0 = k0_i; k2 = k2_i; ke = ke_i;
      cf = cf_i; lat = lat_i;
      dg0_frac = ypn_bits - 1 + k0;
      dg2_frac = 3 * (ypn_bits - 1) + k2;
      dg0_w = 2 + dg0_frac;
      dg2_w = 2 + dg2_frac;
      lfsr = seed;
      pn_q.delete();
      for (int i = 0; i < lat; i++) pn_q.push_back(1'b0);
      c_ycal = 0; c_d = 0; c_pn = 0; o_out = 0; o_ypn = 0; o_pn = 0;
      dg0 = 0; dg2 = 0; s1 = 0; s2 = 0; s3 = 0; dg0c = 0; dg2c = 0;
    endfunction

    function bit pn_dither();
      return lfsr[30];
    endfunction

    // PN value that goes with the (y, d) presented in this clock
    function bit pn_for_sample();
      return (lat == 0) ? lfsr[30] : pn_q[0];
    endfunction

    // Advance one clock with the sample (y, d) at the inputs
    function void step(longint y, int d);
      longint yt, a1, y2, a3, e1, e2, e3, g, ycal_n, s;
      bit pn_s;
      // estimation (uses the ypn-stage registers)
      yt = fdiv(o_ypn, 13 - ypn_bits);
      a1 = o_pn ? yt : -yt;
      y2 = yt * yt;
      a3 = o_pn ? yt * yt * yt : -(yt * yt * yt);
      e1 = fdiv(s1, ke); e2 = fdiv(s2, ke); e3 = fdiv(s3, ke);
      g  = e3 - 3 * e1 * e2;
      // correction of the incoming sample
      pn_s   = pn_for_sample();
      ycal_n = ref_correct(y, dg0c, dg2c, ysq, cf);
      // Y_PN stage (uses the correction-stage registers)
      s = c_ycal + (c_pn ? 2048 : -2048);
      o_out = longint'(c_d) * 8192 / 2 + c_ycal;
      o_ypn = fdiv(s, 1);
      o_pn  = c_pn;
      // coefficient delay (uses the old estimates)
      dg0c = (dg0_frac >= cf) ? fdiv(dg0, dg0_frac - cf) : dg0 * (longint'(1) << (cf - dg0_frac));
      dg2c = (dg2_frac >= cf) ? fdiv(dg2, dg2_frac - cf) : dg2 * (longint'(1) << (cf - dg2_frac));
      // estimator registers
      s1 = s1 + a1 - e1; s2 = s2 + y2 - e2; s3 = s3 + a3 - e3;
      dg0 = clamp(dg0 + a1, dg0_w);
      dg2 = clamp(dg2 + g, dg2_w);
      // correction-stage registers
      c_ycal = ycal_n; c_d = d; c_pn = pn_s;
      // dither alignment and generator
      if (lat > 0) begin
        void'(pn_q.pop_front());
        pn_q.push_back(lfsr[30]);
      end
      lfsr = {lfsr[29:0], lfsr[30] ^ lfsr[27]};
    endfunction
  endclass

endpackage
