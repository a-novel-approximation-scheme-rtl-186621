// tb_table1: reproduces the accuracy table of the approximation method.
//
// The table lists, for polynomial degree n = 2..4 and N equal sub-intervals
// of [1,2), the maximum relative error of the min-max approximation of
// 1/sqrt(m) and sqrt(m). This testbench elaborates the mantissa engine with
// each of the 17 (n, N) pairs, so that the coefficient ROM is computed for
// each of them, measures the error in simulation (table1_probe) and checks
// it against the table's value. The core's own configuration is n=2, N=8.
module tb_table1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 17;
  localparam int  DEG [NCFG] = '{2, 2, 2, 2, 2, 2, 2, 3, 3, 3, 3, 3, 3, 4, 4, 4, 4};
  localparam int  NS  [NCFG] = '{1, 2, 4, 8, 16, 32, 64, 1, 2, 4, 8, 16, 32, 1, 2, 4, 8};
  localparam real MI  [NCFG] = '{3.8335e-03, 7.1823e-04, 1.1463e-04, 1.6430e-05, 2.2090e-06,
                                 2.8674e-07, 3.6537e-08, 5.7648e-04, 6.3523e-05, 5.5903e-06,
                                 4.2321e-07, 2.9293e-08, 1.9301e-09, 8.9120e-05, 5.7777e-06,
                                 2.8042e-07, 1.1213e-08};
  localparam real MS  [NCFG] = '{7.6384e-04, 1.4346e-04, 2.2916e-05, 3.2855e-06, 4.4179e-07,
                                 5.7347e-08, 7.3073e-09, 8.2059e-05, 9.0636e-06, 7.9832e-07,
                                 6.0452e-08, 4.1847e-09, 2.7573e-10, 9.8694e-06, 6.4124e-07,
                                 3.1147e-08, 1.2457e-09};

  int   pc [NCFG];
  int   pf [NCFG];
  logic fin [NCFG];

  for (genvar k = 0; k < NCFG; k++) begin : g_cfg
    table1_probe #(
      .DEGREE(DEG[k]), .NSUB(NS[k]), .MRE_ISQRT(MI[k]), .MRE_SQRT(MS[k])
    ) u_probe (.clk, .rst_n, .checks(pc[k]), .failures(pf[k]), .finished(fin[k]));
  end

  int checks = 0, failures = 0;

  initial begin
    bit all_done;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all_done = 1'b1;
      foreach (fin[k]) if (!fin[k]) all_done = 1'b0;
    end while (!all_done);
    foreach (pc[k]) begin
      checks += pc[k];
      failures += pf[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
