// tb_polyroot: tests the Horner mantissa engine on its own.
//
// For every ROM set (SQRT/ISQRT, even/odd exponent) and every 10-bit
// fraction it starts the engine, waits for done and checks
//   - that done comes exactly 1 + 2*DEGREE = 5 cycles after start, and that
//     busy is high in between and start is ignored while busy;
//   - that y is within 2^-15 (relative) of the target function, computed
//     with $sqrt: sqrt(m), sqrt(2m), 2/sqrt(m) or sqrt(2)/sqrt(m).
// The bound covers the min-max error of the quadratic (1.64e-5 at most) plus
// the fixed-point truncations.
module tb_polyroot;
  import sqrt_pkg::*;

  localparam int LAT = 5;
  localparam int CW  = 21;
  localparam int CF  = 18;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  sqrt_op_e      op = OP_SQRT;
  logic          odd = 1'b0;
  logic [9:0]    frac = '0;
  logic          busy, done;
  logic [CW-1:0] y;

  polyroot dut (.clk, .rst_n, .start, .op, .odd, .frac, .busy, .done, .y);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real max_rel = 0.0;

  function automatic real target(int s, real m);
    case (s)
      0:       return $sqrt(m);
      1:       return $sqrt(2.0 * m);
      2:       return 2.0 / $sqrt(m);
      default: return $sqrt(2.0) / $sqrt(m);
    endcase
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 4; s++) begin
      for (int f = 0; f < 1024; f++) begin
        automatic int n = 0;
        @(negedge clk);
        start = 1'b1;
        op    = sqrt_op_e'(s / 2);
        odd   = s[0];
        frac  = 10'(f);
        @(negedge clk);
        // keep start high with another operand: it must be ignored
        frac = 10'(f ^ 10'h3ff);
        n = 1;
        while (!done && n < 20) begin
          checks++;
          if (!busy) begin
            failures++;
            $display("FAIL busy low before done");
          end
          @(negedge clk);
          n++;
        end
        start = 1'b0;
        checks++;
        if (n != LAT) begin
          failures++;
          $display("FAIL latency %0d", n);
        end
        begin
          automatic real m = 1.0 + real'(f) / 1024.0;
          automatic real t = target(s, m);
          automatic real v = real'($signed(y)) / real'(1 << CF);
          automatic real rel = (v > t ? v - t : t - v) / t;
          if (rel > max_rel) max_rel = rel;
          checks++;
          if (rel > 2.0 ** -15) begin
            failures++;
            if (failures < 20) $display("FAIL set %0d f=%0d: y=%f target=%f", s, f, v, t);
          end
        end
        // engine back to idle before the next start
        @(negedge clk);
      end
    end
    $display("max relative error %e", max_rel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
