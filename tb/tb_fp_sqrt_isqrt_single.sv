// tb_fp_sqrt_isqrt_single: the SQRT/ISQRT core configured for IEEE 754
// binary32.
//
// The exponent path and the datapath widths follow the format parameters;
// the approximation must then be accurate to about 2^-25, so this
// configuration uses cubic polynomials on 32 sub-intervals (largest relative
// error about 1.9e-9) with 30 coefficient fraction bits. The testbench sends
// 100000 random positive normal operands plus every exact power of two and a
// set of special operands through both operations, checks each normal
// result to within 0.55 ulp of the $sqrt reference, special results exactly,
// and the latency of 2*3 + 3 = 9 cycles.
module tb_fp_sqrt_isqrt_single;
  import sqrt_pkg::*;

  localparam int BIAS   = 127;
  localparam int FRAC_W = 23;
  localparam int LAT    = 9;
  localparam int NRAND  = 100000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic        in_ready;
  sqrt_op_e    op = OP_SQRT;
  logic [31:0] x = '0;
  logic        out_valid;
  logic [31:0] result;

  fp_sqrt_isqrt #(
    .EXP_W(8), .FRAC_W(FRAC_W), .DEGREE(3), .NSUB(32), .COEF_W(33), .COEF_FRAC(30)
  ) dut (.clk, .rst_n, .in_valid, .in_ready, .op, .x, .out_valid, .result);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_exact = 0, n_normal = 0, n_carry = 0;
  real max_ulp = 0.0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // value of a positive normal binary32 number with biased exponent e and fraction f
  function automatic real s2r(int e, int f);
    return (1.0 + real'(f) / 8388608.0) * (2.0 ** (e - BIAS));
  endfunction

  // one operand: wait until accepted, then until the result, and check it
  task automatic run(sqrt_op_e o, logic [31:0] v);
    longint t0;
    real xv, ref_v, got, ulp, err;
    int  er;
    @(negedge clk);
    in_valid = 1'b1;
    op = o;
    x  = v;
    while (!in_ready) @(negedge clk);
    t0 = cyc;
    @(negedge clk);
    in_valid = 1'b0;
    while (!out_valid && cyc - t0 < 40) @(negedge clk);
    checks++;
    if (cyc - t0 != longint'(LAT)) begin
      failures++;
      $display("FAIL latency %0d", cyc - t0);
    end
    checks++;
    if (v[30:23] == 8'hff || v[30:23] == 8'h00 || v[31]) begin
      logic [31:0] want;
      want = '0;
      if (v[30:23] == 8'hff && v[22:0] != 0) want = 32'h7fc00000;
      else if (v[31] && v[30:23] != 8'h00)   want = 32'h7fc00000;
      else if (v[30:23] == 8'hff)            want = (o == OP_SQRT) ? 32'h7f800000 : 32'h0;
      else                                   want = (o == OP_SQRT) ? {v[31], 31'h0} : {v[31], 31'h7f800000};
      if (result !== want) begin
        failures++;
        $display("FAIL special op=%s x=%h got %h want %h", o.name(), v, result, want);
      end
    end else begin
      xv    = s2r(int'(v[30:23]), int'(v[22:0]));
      ref_v = (o == OP_SQRT) ? $sqrt(xv) : 1.0 / $sqrt(xv);
      got   = s2r(int'(result[30:23]), int'(result[22:0]));
      er    = int'(result[30:23]);
      ulp   = 2.0 ** (er - BIAS - FRAC_W);
      if (ref_v < 2.0 ** (er - BIAS)) ulp = ulp / 2.0;
      err = (got > ref_v ? got - ref_v : ref_v - got) / ulp;
      n_normal++;
      if (err <= 0.5) n_exact++;
      if (err > max_ulp) max_ulp = err;
      if (o == OP_ISQRT && v[22:0] == 0 && result[22:0] == 0) n_carry++;
      if (result[31] || er == 0 || er == 255 || err > 0.55) begin
        failures++;
        if (failures < 20)
          $display("FAIL op=%s x=%h got %h (%e) want %e, %f ulp", o.name(), v, result, got, ref_v, err);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int o = 0; o < 2; o++) begin
      // every power of two: both exponent parities, mantissa rounding to 2 for ISQRT
      for (int e = 1; e < 255; e++) run(sqrt_op_e'(o), {1'b0, 8'(e), 23'h0});
      run(sqrt_op_e'(o), 32'h00000000);
      run(sqrt_op_e'(o), 32'h80000000);
      run(sqrt_op_e'(o), 32'h00000001);
      run(sqrt_op_e'(o), 32'h7f800000);
      run(sqrt_op_e'(o), 32'hff800000);
      run(sqrt_op_e'(o), 32'h7fc00001);
      run(sqrt_op_e'(o), 32'hbf800000);
      run(sqrt_op_e'(o), 32'h7f7fffff);
      run(sqrt_op_e'(o), 32'h00800000);
      for (int i = 0; i < NRAND / 2; i++) begin
        logic [7:0] e;
        e = 8'($urandom_range(1, 254));
        run(sqrt_op_e'(o), {1'b0, e, 23'($urandom())});
      end
    end
    $display("normal operands %0d, correctly rounded %0d, max error %f ulp, rounded-up mantissas %0d",
             n_normal, n_exact, max_ulp, n_carry);
    checks++;
    if (n_carry == 0) begin
      failures++;
      $display("FAIL mantissa carry never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
