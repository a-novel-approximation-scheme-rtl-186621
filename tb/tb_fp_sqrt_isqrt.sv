// tb_fp_sqrt_isqrt: end-to-end test of the SQRT/ISQRT core at its default
// (binary16) configuration.
//
// Every one of the 65536 half-precision bit patterns goes through the core
// once as SQRT and once as ISQRT. The driver keeps in_valid high all the
// time, so each new operand waits while the core is busy (stall). A monitor
// matches each out_valid with the operand it belongs to and checks:
//   - latency: out_valid exactly 7 cycles after the accepting cycle, and
//     operands accepted every 7 cycles;
//   - normal positive operands: the result is within 0.55 ulp of the exact
//     value computed with $sqrt on reals (the polynomial error adds a few
//     hundredths of an ulp to the 0.5 ulp of rounding);
//   - special operands: the exact IEEE 754 result (zeros, infinities,
//     negatives, NaNs; subnormals are treated as zeros).
// It also counts how often each mechanism of the design was exercised and
// fails if one never was: both operations, even and odd exponents, each
// special class, a mantissa that rounds up to 2, and input stalls.
module tb_fp_sqrt_isqrt;
  import sqrt_pkg::*;

  localparam int EXP_W  = 5;
  localparam int FRAC_W = 10;
  localparam int BIAS   = 15;
  localparam int LAT    = 7;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic        in_ready;
  sqrt_op_e    op = OP_SQRT;
  logic [15:0] x = '0;
  logic        out_valid;
  logic [15:0] result;

  fp_sqrt_isqrt dut (
    .clk, .rst_n, .in_valid, .in_ready, .op, .x, .out_valid, .result
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_sqrt = 0, n_isqrt = 0, n_even = 0, n_odd = 0, n_zero = 0, n_sub = 0;
  int n_inf = 0, n_neg = 0, n_nan = 0, n_carry = 0, n_stall = 0;
  int n_exact = 0, n_normal = 0;
  int mech[11];
  real max_ulp = 0.0, max_rel = 0.0;

  typedef struct {
    logic [15:0] x;
    sqrt_op_e    op;
    longint      cyc;
  } job_t;
  job_t jobs[$];
  longint last_accept = -1;

  function automatic real h2r(logic [15:0] h);
    int e = int'(h[14:10]);
    real m = 1.0 + real'(h[9:0]) / 1024.0;
    real v = m * (2.0 ** (e - BIAS));
    return h[15] ? -v : v;
  endfunction

  task automatic fail(string what, job_t j, logic [15:0] got, logic [15:0] exp_v);
    failures++;
    if (failures <= 20)
      $display("FAIL %s: op=%s x=%h got=%h expected=%h", what, j.op.name(), j.x, got, exp_v);
  endtask

  task automatic check_result(job_t j, logic [15:0] r, longint c);
    logic [4:0] e = j.x[14:10];
    logic [9:0] f = j.x[9:0];
    logic       s = j.x[15];
    logic [15:0] want;
    bit special = 1'b1;
    checks++;
    if (c - j.cyc != longint'(LAT)) begin
      failures++;
      $display("FAIL latency %0d for x=%h", c - j.cyc, j.x);
    end
    if (e == 5'h1f && f != 0) begin n_nan++; want = 16'h7e00; end
    else if (e == 5'h1f && s) begin n_neg++; want = 16'h7e00; end
    else if (e == 5'h1f) begin n_inf++; want = (j.op == OP_SQRT) ? 16'h7c00 : 16'h0000; end
    else if (e == 0) begin
      if (f != 0) n_sub++; else n_zero++;
      want = (j.op == OP_SQRT) ? {s, 15'h0} : {s, 15'h7c00};
    end
    else if (s) begin n_neg++; want = 16'h7e00; end
    else special = 1'b0;
    checks++;
    if (special) begin
      if (r !== want) fail("special", j, r, want);
    end else begin
      real v = h2r(j.x);
      real ref_v = (j.op == OP_SQRT) ? $sqrt(v) : 1.0 / $sqrt(v);
      real got = h2r(r);
      int  er = int'(r[14:10]);
      real ulp, err;
      n_normal++;
      if (((int'(e) - BIAS) % 2) != 0) n_odd++; else n_even++;
      if (r[15] || er == 0 || er == 31) begin
        fail("not a positive normal", j, r, 16'h0);
      end else begin
        ulp = 2.0 ** (er - BIAS - FRAC_W);
        if (ref_v < 2.0 ** (er - BIAS)) ulp = ulp / 2.0;   // exact value in the binade below
        err = (got > ref_v ? got - ref_v : ref_v - got) / ulp;
        if (err > max_ulp) max_ulp = err;
        if ((err * ulp / ref_v) > max_rel) max_rel = err * ulp / ref_v;
        if (err <= 0.5) n_exact++;
        if (err > 0.55) fail($sformatf("error %f ulp", err), j, r, 16'h0);
        // the mantissa rounded up to 2 and the exponent was incremented
        if (j.op == OP_ISQRT && f == 0 && ((int'(e) - BIAS) % 2) == 0) n_carry++;
      end
    end
  endtask

  // monitor
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (jobs.size() == 0) begin
        failures++;
        $display("FAIL out_valid without an operand");
      end else begin
        check_result(jobs.pop_front(), result, cyc);
      end
    end
  end

  // driver: in_valid stays high, operands wait while the core is busy
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int o = 0; o < 2; o++) begin
      for (int i = 0; i < 65536; i++) begin
        @(negedge clk);
        in_valid = 1'b1;
        op = sqrt_op_e'(o);
        x  = 16'(i);
        while (!in_ready) begin
          n_stall++;
          @(negedge clk);
        end
        if (op == OP_SQRT) n_sqrt++; else n_isqrt++;
        // accepted on the coming edge
        if (last_accept >= 0) begin
          checks++;
          if (cyc - last_accept != longint'(LAT)) begin
            failures++;
            $display("FAIL initiation interval %0d", cyc - last_accept);
          end
        end
        last_accept = cyc;
        jobs.push_back('{x: x, op: op, cyc: cyc});
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (jobs.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", jobs.size());
    end
    $display("normal operands %0d, correctly rounded %0d, max error %f ulp, max relative error %e",
             n_normal, n_exact, max_ulp, max_rel);
    $display("mechanisms: sqrt=%0d isqrt=%0d even=%0d odd=%0d zero=%0d subnormal=%0d inf=%0d neg=%0d nan=%0d carry=%0d stall=%0d",
             n_sqrt, n_isqrt, n_even, n_odd, n_zero, n_sub, n_inf, n_neg, n_nan, n_carry, n_stall);
    mech = '{n_sqrt, n_isqrt, n_even, n_odd, n_zero, n_sub, n_inf, n_neg, n_nan, n_carry, n_stall};
    begin
      foreach (mech[k]) begin
        checks++;
        if (mech[k] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never exercised", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
