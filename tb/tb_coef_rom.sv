// tb_coef_rom: checks the coefficient ROM image and its read timing.
//
// For each of the 32 words it reads the three coefficients, evaluates the
// quadratic at several points u of its sub-interval with real arithmetic and
// compares with the target function computed with $sqrt: the relative error
// must stay below 2e-5, a little above the min-max error of the quadratic
// fit (1.64e-5 for ISQRT, 3.29e-6 for SQRT). It also checks that the
// data changes one cycle after the address and holds while en is low.
module tb_coef_rom;

  localparam int CW = 21;
  localparam int CF = 18;

  logic        clk = 1'b0;
  logic        en = 1'b0;
  logic [4:0]  addr = '0;
  logic [62:0] data;

  coef_rom dut (.clk, .en, .addr, .data);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic real coef(logic [62:0] w, int j);
    logic signed [CW-1:0] c = w[j*CW +: CW];
    return real'(c) / real'(1 << CF);
  endfunction

  function automatic real target(int a, real m);
    case (a[4:3])
      2'b00:   return $sqrt(m);
      2'b01:   return $sqrt(2.0 * m);
      2'b10:   return 2.0 / $sqrt(m);
      default: return $sqrt(2.0) / $sqrt(m);
    endcase
  endfunction

  initial begin
    logic [62:0] held;
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      en = 1'b1;
      addr = 5'(a);
      @(negedge clk);
      en = 1'b0;
      for (int k = 0; k <= 8; k++) begin
        automatic real u = real'(k) / 8.0;
        automatic real m = 1.0 + (real'(a % 8) + u) / 8.0;
        automatic real p = coef(data, 0) + u * (coef(data, 1) + u * coef(data, 2));
        automatic real t = target(a, m);
        automatic real rel = (p > t ? p - t : t - p) / t;
        checks++;
        if (rel > 2.0e-5) begin
          failures++;
          $display("FAIL word %0d u=%f: p=%f target=%f rel=%e", a, u, p, t, rel);
        end
      end
      // read timing: data holds while en is low, whatever addr does
      held = data;
      addr = 5'(a + 1);
      @(negedge clk);
      checks++;
      if (data !== held) begin
        failures++;
        $display("FAIL data changed while en was low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
