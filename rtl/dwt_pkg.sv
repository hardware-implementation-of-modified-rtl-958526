// dwt_pkg: integer constants of the modified 9/7 lifting wavelet.
//
// The lifting constants a, b, c, d and the scale K are multiplied by 256 and
// rounded to integers, so that every lifting step is an integer multiply, an
// add and an arithmetic right shift by 8 (with rounding), and no fractional
// arithmetic is needed. b = -14/256 and d = -114/256 are the rounded values
// given for the design; a, c, K and 1/K are rounded the same way from the
// real-valued constants a = -1.586134342, c = 0.882911076 and
// K = 1.149604398. The sign of d follows the design's value d = -0.443506852.
// Coefficients are kept in CW-bit two's complement words.
package dwt_pkg;

  localparam int signed LIFT_A     = -406;  // round(256 * -1.586134342)
  localparam int signed LIFT_B     = -14;   // round(256 * -0.0529801185)
  localparam int signed LIFT_C     = 226;   // round(256 *  0.882911076)
  localparam int signed LIFT_D     = -114;  // round(256 * -0.443506852)
  localparam int signed LIFT_K     = 294;   // round(256 *  1.149604398)
  localparam int signed LIFT_KINV  = 223;   // round(256 /  1.149604398)
  localparam int        LIFT_SHIFT = 8;     // every constant is x/256

  // round(coef * v / 256) with v a sum of samples
  function automatic int signed lift_mul(int signed coef, int signed v);
    int signed p;
    p = coef * v;
    return (p + (1 <<< (LIFT_SHIFT - 1))) >>> LIFT_SHIFT;
  endfunction

endpackage
