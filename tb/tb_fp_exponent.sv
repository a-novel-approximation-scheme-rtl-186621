// tb_fp_exponent: exhaustive test of the exponent path.
//
// For every normal biased exponent and both operations it derives the
// expected result exponent from the defining equations with real
// arithmetic: floor(eu/2) for SQRT and -floor(eu/2) - 1 for ISQRT (whose
// mantissa factor is scaled into [1,2]), plus the bias, and the parity of
// the unbiased exponent eu. It runs for binary16 (5-bit exponent) and, in a
// second instance, binary32 (8-bit exponent).
module tb_fp_exponent;
  import sqrt_pkg::*;

  int checks = 0, failures = 0;

  sqrt_op_e   op;
  logic [4:0] e5, r5;
  logic [7:0] e8, r8;
  logic       odd5, odd8;

  fp_exponent #(.EXP_W(5)) dut5 (.op, .exp_in(e5), .exp_out(r5), .odd(odd5));
  fp_exponent #(.EXP_W(8)) dut8 (.op, .exp_in(e8), .exp_out(r8), .odd(odd8));

  function automatic int expected(sqrt_op_e o, int e, int bias);
    int eu = e - bias;
    int hf = int'($floor(real'(eu) / 2.0));
    return (o == OP_SQRT) ? hf + bias : -hf - 1 + bias;
  endfunction

  initial begin
    for (int o = 0; o < 2; o++) begin
      op = sqrt_op_e'(o);
      for (int e = 1; e < 255; e++) begin
        e5 = 5'(e % 31);
        e8 = 8'(e);
        #1;
        if (e < 31) begin
          checks += 2;
          if (int'(r5) != expected(op, e, 15)) begin
            failures++;
            $display("FAIL half op=%0d e=%0d got %0d want %0d", o, e, r5, expected(op, e, 15));
          end
          if (odd5 != ((e - 15) % 2 != 0)) begin
            failures++;
            $display("FAIL half parity e=%0d", e);
          end
        end
        checks += 2;
        if (int'(r8) != expected(op, e, 127)) begin
          failures++;
          $display("FAIL single op=%0d e=%0d got %0d want %0d", o, e, r8, expected(op, e, 127));
        end
        if (odd8 != ((e - 127) % 2 != 0)) begin
          failures++;
          $display("FAIL single parity e=%0d", e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
