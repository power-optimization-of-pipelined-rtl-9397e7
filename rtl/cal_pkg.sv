// cal_pkg: constants, types and helper functions shared by the second-order
// digital gain-calibration unit of a pipelined ADC.
//
// Number formats (all two's complement, fixed point):
//   * Y, Y_cal      : Y_W = M-m = 13 bits, value = code * 2^-(Y_W-1), range [-1,1).
//   * OUT_cal       : M = 14 bits,         value = code * 2^-(M-1),   range [-1,1).
//   * Y_PN          : Y_W bits, same scale as Y.
//   * D             : 2-bit signed digit of the first-stage sub-ADC, -1, 0 or +1.
//   * PN            : one bit, 1 stands for +1 and 0 for -1.
// The resolution (M = 14, m = 1), the step sizes mu0 = 2^-23, mu2 = 2^-17 and
// mu_e = 2^-19, and the reduced 7-bit precisions of Y (for Y^2) and of Y_PN are
// the values of the evaluated design. COEF_FRAC, the fraction width of the
// coefficients handed to the correction block, is this design's own choice.
package cal_pkg;

  // ADC resolution and first-stage effective resolution
  localparam int unsigned M_BITS    = 14;
  localparam int unsigned M_STAGE1  = 1;
  localparam int unsigned Y_W       = M_BITS - M_STAGE1;  // 13: width of Y, Y_cal, Y_PN

  // Reduced data precisions of the optimised design (full precision is Y_W)
  localparam int unsigned YSQ_BITS_DEF = 7;   // bits of Y used to form Y^2
  localparam int unsigned YPN_BITS_DEF = 7;   // bits of Y_PN used in estimation

  // Step sizes as powers of two: mu = 2^-K
  localparam int unsigned K0_DEF = 23;        // mu0
  localparam int unsigned K2_DEF = 17;        // mu2
  localparam int unsigned KE_DEF = 19;        // mu_e of the low-pass filters

  // Fraction bits of dg0 / dg2 as seen by the correction block (assumed)
  localparam int unsigned COEF_FRAC_DEF = 16;
  // Integer bits (sign included) kept above the binary point in dg0 / dg2
  localparam int unsigned COEF_INT = 2;

  // First-stage sub-ADC digit D in {-1, 0, +1}
  typedef logic signed [1:0] digit_t;

  // Saturate a wide signed value to a signed field of width W (returned
  // sign-extended in 64 bits so that callers can slice it).
  function automatic logic signed [63:0] sat_s(input logic signed [63:0] v, input int unsigned w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (w - 1));
    if (v > hi)      return hi;
    else if (v < lo) return lo;
    else             return v;
  endfunction

endpackage
