// table1_probe: measures the maximum relative error of one (degree, number
// of sub-intervals) configuration of the mantissa engine, for the testbench
// that reproduces the accuracy table of the method.
//
// It instantiates polyroot with wide formats (23-bit fraction as in single
// precision, coefficients with 40 fraction bits, so that fixed-point
// rounding stays far below the approximation error), runs SAMPLES fractions
// spread evenly over [1,2) for each of the four target functions, and takes
// the largest relative error against $sqrt. Both operations share the
// engine; the even-exponent sets (sqrt(m) and 2/sqrt(m)) are the ones the
// table lists. The result is checked against the expected values MRE_ISQRT
// and MRE_SQRT: the measured error must lie between 0.97 and 1.01 times them.
// It also checks the engine latency of 1 + 2*DEGREE cycles.
module table1_probe #(
  parameter int  DEGREE    = 2,
  parameter int  NSUB      = 8,
  parameter real MRE_ISQRT = 1.6430e-05,
  parameter real MRE_SQRT  = 3.2855e-06,
  parameter int  SAMPLES   = 2048
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  import sqrt_pkg::*;

  localparam int FRAC_W = 23;
  localparam int CW     = 43;
  localparam int CF     = 40;

  logic              start = 1'b0;
  sqrt_op_e          op = OP_SQRT;
  logic              odd = 1'b0;
  logic [FRAC_W-1:0] frac = '0;
  logic              busy, done;
  logic [CW-1:0]     y;

  polyroot #(
    .DEGREE(DEGREE), .NSUB(NSUB), .FRAC_W(FRAC_W), .COEF_W(CW), .COEF_FRAC(CF)
  ) dut (.clk, .rst_n, .start, .op, .odd, .frac, .busy, .done, .y);

  real mre [4];

  function automatic real target(int s, real m);
    case (s)
      0:       return $sqrt(m);
      1:       return $sqrt(2.0 * m);
      2:       return 2.0 / $sqrt(m);
      default: return $sqrt(2.0) / $sqrt(m);
    endcase
  endfunction

  initial begin
    checks = 0;
    failures = 0;
    finished = 1'b0;
    foreach (mre[s]) mre[s] = 0.0;
    @(posedge rst_n);
    for (int s = 0; s < 4; s++) begin
      for (int k = 0; k < SAMPLES; k++) begin
        automatic int n = 1;
        // spread samples evenly, and hit the top of [1,2) with the last one
        automatic logic [FRAC_W-1:0] f =
          (k == SAMPLES - 1) ? '1 : FRAC_W'((longint'(k) << FRAC_W) / SAMPLES + k);
        automatic real m, t, v, rel;
        @(negedge clk);
        start = 1'b1;
        op    = sqrt_op_e'(s / 2);
        odd   = s[0];
        frac  = f;
        @(negedge clk);
        start = 1'b0;
        while (!done && n < 40) begin
          @(negedge clk);
          n++;
        end
        checks++;
        if (n != 1 + 2 * DEGREE) begin
          failures++;
          $display("FAIL n=%0d N=%0d latency %0d", DEGREE, NSUB, n);
        end
        m   = 1.0 + real'(f) / (2.0 ** FRAC_W);
        t   = target(s, m);
        v   = real'($signed(y)) / (2.0 ** CF);
        rel = (v > t ? v - t : t - v) / t;
        if (rel > mre[s]) mre[s] = rel;
      end
    end
    $display("n=%0d N=%0d  MRE 1/sqrt: %e (table %e)  sqrt: %e (table %e)",
             DEGREE, NSUB, mre[2], MRE_ISQRT, mre[0], MRE_SQRT);
    for (int s = 0; s < 4; s++) begin
      automatic real want = (s < 2) ? MRE_SQRT : MRE_ISQRT;
      checks++;
      if (mre[s] > 1.01 * want || mre[s] < 0.97 * want) begin
        failures++;
        $display("FAIL n=%0d N=%0d set %0d: MRE %e, table %e", DEGREE, NSUB, s, mre[s], want);
      end
    end
    finished = 1'b1;
  end

endmodule
