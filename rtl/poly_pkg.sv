// poly_pkg: fixed-point formats and coefficient sets shared by the polynomial
// operators.
//
// Two operators are built from these constants:
//   * 2^x on [0,1], degree-3 Horner evaluation. The coefficients are the
//     result of the rounding-mode search: 8191/8192, 2853/4096, 1837/8192 and
//     649/8192, stored in two's complement with one integer (sign) bit and
//     14 fractional bits (n = 15). The datapath keeps 16 fractional bits
//     (n' = 16), so the stored coefficients gain 2 guard bits when aligned.
//   * sqrt(1+x) on [0,1], degree 2 with recoded coefficients
//     p0 = 1, p1 = 2^-1 - 2^-6, p2 = -(2^-4 + 2^-7), 13 fractional bits.
// The argument widths (n_x) and the number of integer bits in the datapath are
// this design's own choices; the coefficient values and fractional widths
// follow the method's results.
package poly_pkg;

  // ---- 2^x operator ---------------------------------------------------
  localparam int unsigned EXP2_DEGREE = 3;   // d
  localparam int unsigned EXP2_CF     = 14;  // coefficient fractional bits (n-1)
  localparam int unsigned EXP2_CW     = 15;  // coefficient width n (1 integer bit)
  localparam int unsigned EXP2_NP     = 16;  // datapath fractional bits n'
  localparam int unsigned EXP2_XF     = 16;  // argument fractional bits
  localparam int unsigned EXP2_XW     = 17;  // argument width (1 integer bit, x in [0,1])
  localparam int unsigned EXP2_AI     = 2;   // accumulator integer bits incl. sign
  localparam int unsigned EXP2_AW     = EXP2_AI + EXP2_NP;

  // p_i scaled by 2^14, index i = power of x
  localparam logic signed [EXP2_CW-1:0] EXP2_COEF [EXP2_DEGREE+1] = '{
    15'sd16382,   // p0 = 8191/8192
    15'sd11412,   // p1 = 2853/4096
    15'sd3674,    // p2 = 1837/8192
    15'sd1298     // p3 = 649/8192
  };

  // ---- sqrt(1+x) operator ----------------------------------------------
  localparam int unsigned SQRT_NP = 13;  // datapath fractional bits n'
  localparam int unsigned SQRT_XF = 13;  // argument fractional bits
  localparam int unsigned SQRT_XW = 14;  // argument width (x in [0,1])
  localparam int unsigned SQRT_YW = 14;  // result width: 1 integer bit, result in [1,1.5)

endpackage
