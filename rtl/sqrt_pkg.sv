// sqrt_pkg: types and constants shared by the floating-point square-root /
// inverse-square-root core.
//
// The core computes either sqrt(x) or 1/sqrt(x) of an IEEE 754 binary number
// (half precision by default) on one shared datapath. The operation is picked
// per operand with an sqrt_op_e value. Each operand is first sorted into an
// fp_class_e class; only NORMAL operands go through the polynomial datapath,
// the other classes produce fixed IEEE 754 results.
//
// The coefficient-word layout is fixed here so that the ROM image, the ROM
// and the Horner engine agree: a ROM word holds the DEGREE+1 coefficients of
// one sub-interval, coefficient j in bits [j*CW +: CW], each a two's-complement
// fixed-point number with COEF_FRAC fraction bits. The ROM address is
// {op, exponent_is_odd, sub_interval_index}.
package sqrt_pkg;

  // Operation select. SQRT and ISQRT share every resource of the core.
  typedef enum logic {
    OP_SQRT  = 1'b0,
    OP_ISQRT = 1'b1
  } sqrt_op_e;

  // Class of an input operand. Subnormals are treated as zeros.
  typedef enum logic [2:0] {
    CLS_NORMAL = 3'd0,
    CLS_ZERO   = 3'd1,   // +/-0 and +/- subnormal
    CLS_INF    = 3'd2,   // +inf
    CLS_NEG    = 3'd3,   // negative normal or -inf
    CLS_NAN    = 3'd4
  } fp_class_e;

  // Default format: IEEE 754 binary16.
  localparam int unsigned DEF_EXP_W  = 5;
  localparam int unsigned DEF_FRAC_W = 10;

  // Default approximation: quadratic polynomials on 8 equal sub-intervals of [1,2).
  localparam int unsigned DEF_DEGREE = 2;
  localparam int unsigned DEF_NSUB   = 8;

  // Default coefficient format: signed, 2 integer bits, 18 fraction bits.
  localparam int unsigned DEF_COEF_FRAC = 18;
  localparam int unsigned DEF_COEF_W    = 21;

endpackage
