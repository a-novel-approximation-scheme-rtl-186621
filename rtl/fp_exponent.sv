// fp_exponent: exponent path of the SQRT/ISQRT core.
//
// With x = 2^eu * m, m in [1,2), and eu = e - BIAS:
//   sqrt(x)   = 2^floor(eu/2)      * sqrt(m * 2^(eu mod 2))
//   1/sqrt(x) = 2^(-floor(eu/2)-1) * 2/sqrt(m * 2^(eu mod 2))
// The mantissa factors on the right lie in [1,2] and come from polyroot; this
// block produces the biased exponent that goes with them and the parity of eu
// that selects the coefficient set. Because BIAS = 2^(EXP_W-1)-1 is odd,
// floor(eu/2) + BIAS = floor((e + BIAS)/2), so
//   SQRT:  exp_out = (e + BIAS) >> 1
//   ISQRT: exp_out = 2*BIAS - 1 - ((e + BIAS) >> 1)
// The core adds one afterwards when the rounded mantissa reaches 2.
// Splitting the result by exponent parity follows the four cases of the
// method; writing the ISQRT mantissa as 2/sqrt(.) (so that it stays in [1,2])
// is this design's choice. For every normal input e in [1, 2^EXP_W-2] the
// result is a normal exponent, so no overflow or underflow can occur.
//
// Purely combinational; exp_in is the biased exponent field of a normal operand.
module fp_exponent
  import sqrt_pkg::*;
#(
  parameter int unsigned EXP_W = DEF_EXP_W
) (
  input  sqrt_op_e         op,
  input  logic [EXP_W-1:0] exp_in,
  output logic [EXP_W-1:0] exp_out,
  output logic             odd       // unbiased exponent is odd
);

  localparam logic [EXP_W:0] BIAS = (EXP_W+1)'(2**(EXP_W-1) - 1);

  logic [EXP_W:0] half_sum;

  always_comb begin
    half_sum = ({1'b0, exp_in} + BIAS) >> 1;
    if (op == OP_SQRT) exp_out = half_sum[EXP_W-1:0];
    else               exp_out = EXP_W'((BIAS << 1) - 1'b1 - half_sum);
    odd = exp_in[0] ^ BIAS[0];
  end

endmodule
