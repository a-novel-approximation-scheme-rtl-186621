// fp_sqrt_isqrt: shared floating-point square root and inverse square root.
//
// One datapath computes either sqrt(x) or 1/sqrt(x) of an IEEE 754 operand
// (binary16 by default), without any iteration: the mantissa result comes
// from a quadratic min-max polynomial chosen by the top bits of the mantissa,
// the exponent from a few additions. Writing x = 2^eu * m, m in [1,2):
//   sqrt(x)   = 2^floor(eu/2)      * g,  g = sqrt(m) or sqrt(2m)          (eu even / odd)
//   1/sqrt(x) = 2^(-floor(eu/2)-1) * g,  g = 2/sqrt(m) or sqrt(2)/sqrt(m) (eu even / odd)
// with g in [1,2]. fp_exponent gives the exponent and the parity of eu,
// polyroot evaluates g on one multiplier, one adder and a coefficient ROM,
// and this module classifies the operand, rounds g to FRAC_W fraction bits
// (round half up), renormalises when it rounds up to 2, and packs the result.
//
// Special operands follow IEEE 754: sqrt(+-0) = +-0, sqrt(+inf) = +inf,
// 1/sqrt(+-0) = +-inf, 1/sqrt(+inf) = +0, and any negative operand or NaN
// gives the quiet NaN with a zero sign, MSB of the fraction set and the rest
// zero. Subnormal operands are treated as zeros of the same sign. Results are
// never subnormal, so nothing is flushed on the output side.
//
// Interface and timing: an operand is accepted on a rising edge where
// in_valid and in_ready are both high. out_valid pulses for one cycle
// exactly 7 cycles later (2*DEGREE + 3 in general) with result; result then
// holds until the next one. The core handles one operand at a time (the
// multiplier and adder are reused by the Horner steps), so in_ready is low
// from the accepting edge until the edge that raises out_valid; a new operand
// can therefore be accepted in the cycle in which out_valid is high, which
// gives one result every 7 cycles. rst_n is an active-low asynchronous reset.
//
// From the method: the exponent/parity split, the per-parity coefficient
// sets, Horner evaluation on one multiplier and adder, n = 2 with N = 8
// sub-intervals, half precision and the 7-cycle latency. This design's own
// choices: the valid/ready handshake, rounding, special-operand handling,
// subnormal flushing and the fixed-point widths.
module fp_sqrt_isqrt
  import sqrt_pkg::*;
#(
  parameter int unsigned EXP_W     = DEF_EXP_W,
  parameter int unsigned FRAC_W    = DEF_FRAC_W,
  parameter int unsigned DEGREE    = DEF_DEGREE,
  parameter int unsigned NSUB      = DEF_NSUB,
  parameter int unsigned COEF_W    = DEF_COEF_W,
  parameter int unsigned COEF_FRAC = DEF_COEF_FRAC,
  localparam int unsigned W        = 1 + EXP_W + FRAC_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  sqrt_op_e     op,
  input  logic [W-1:0] x,
  output logic         out_valid,
  output logic [W-1:0] result
);

  localparam int unsigned SH   = COEF_FRAC - FRAC_W;  // bits dropped by rounding
  localparam int unsigned RW   = COEF_W - SH;         // width of the rounded value
  localparam logic [EXP_W-1:0] EXP_MAX = '1;
  localparam logic [W-1:0] QNAN = {1'b0, EXP_MAX, 1'b1, (FRAC_W-1)'(0)};

  // Operand register, held for the whole operation.
  logic              busy;
  logic              start_q;
  sqrt_op_e          op_q;
  logic              sign_q;
  logic [EXP_W-1:0]  exp_q;
  logic [FRAC_W-1:0] frac_q;
  fp_class_e         cls;

  logic              accept;
  assign in_ready = !busy;
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q <= 1'b0;
      op_q    <= OP_SQRT;
      sign_q  <= 1'b0;
      exp_q   <= '0;
      frac_q  <= '0;
    end else begin
      start_q <= accept;
      if (accept) begin
        op_q   <= op;
        sign_q <= x[W-1];
        exp_q  <= x[W-2 -: EXP_W];
        frac_q <= x[FRAC_W-1:0];
      end
    end
  end

  // Operand class.
  always_comb begin
    if (exp_q == '0)            cls = CLS_ZERO;
    else if (exp_q == EXP_MAX)  cls = (frac_q != '0) ? CLS_NAN : (sign_q ? CLS_NEG : CLS_INF);
    else                        cls = sign_q ? CLS_NEG : CLS_NORMAL;
  end

  // Exponent path.
  logic [EXP_W-1:0] exp_r;
  logic             odd;

  fp_exponent #(.EXP_W(EXP_W)) u_exp (
    .op     (op_q),
    .exp_in (exp_q),
    .exp_out(exp_r),
    .odd    (odd)
  );

  // Mantissa path.
  logic              poly_busy;
  logic              poly_done;
  logic [COEF_W-1:0] poly_y;

  polyroot #(
    .DEGREE   (DEGREE),
    .NSUB     (NSUB),
    .FRAC_W   (FRAC_W),
    .COEF_W   (COEF_W),
    .COEF_FRAC(COEF_FRAC)
  ) u_poly (
    .clk  (clk),
    .rst_n(rst_n),
    .start(start_q),
    .op   (op_q),
    .odd  (odd),
    .frac (frac_q),
    .busy (poly_busy),
    .done (poly_done),
    .y    (poly_y)
  );

  // Round g to FRAC_W fraction bits and renormalise.
  logic [RW-1:0]     y_rnd;
  logic [FRAC_W-1:0] frac_o;
  logic [EXP_W-1:0]  exp_o;
  logic [W-1:0]      packed_o;

  always_comb begin
    y_rnd = RW'((poly_y + (COEF_W'(1) << (SH - 1))) >> SH);
    if (poly_y[COEF_W-1] || y_rnd < RW'(1 << FRAC_W)) begin
      // below 1: cannot happen beyond rounding, clamp to 1.0
      frac_o = '0;
      exp_o  = exp_r;
    end else if (y_rnd >= RW'(2 << FRAC_W)) begin
      // rounded up to 2 (or above): shift right, exponent + 1
      frac_o = y_rnd[FRAC_W:1];
      exp_o  = exp_r + 1'b1;
    end else begin
      frac_o = y_rnd[FRAC_W-1:0];
      exp_o  = exp_r;
    end

    unique case (cls)
      CLS_NORMAL: packed_o = {1'b0, exp_o, frac_o};
      CLS_ZERO:   packed_o = (op_q == OP_SQRT) ? {sign_q, (EXP_W+FRAC_W)'(0)}
                                                : {sign_q, EXP_MAX, FRAC_W'(0)};
      CLS_INF:    packed_o = (op_q == OP_SQRT) ? {1'b0, EXP_MAX, FRAC_W'(0)}
                                                : '0;
      default:    packed_o = QNAN;
    endcase
  end

  // Output register and busy flag.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= poly_done;
      if (poly_done) result <= packed_o;
      if (accept)         busy <= 1'b1;
      else if (poly_done) busy <= 1'b0;
    end
  end

  // The Horner engine is only started when it is free, and finishes only
  // while an operand is in flight.
  a_start_free: assert property (@(posedge clk) disable iff (!rst_n) start_q |-> !poly_busy);
  a_done_busy:  assert property (@(posedge clk) disable iff (!rst_n) poly_done |-> busy);
  // A result is announced for exactly one cycle.
  a_out_pulse:  assert property (@(posedge clk) disable iff (!rst_n) out_valid |=> !out_valid);

endmodule
