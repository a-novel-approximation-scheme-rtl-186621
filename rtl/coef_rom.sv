// coef_rom: coefficient ROM of the polynomial mantissa approximation.
//
// What it holds: for every (operation, exponent parity, sub-interval) the
// DEGREE+1 coefficients of the min-max (least maximum absolute error) polynomial
//   p(u) = c0 + c1*u + ... + cn*u^n,   u in [0,1),
// where u is the position of the mantissa m inside its sub-interval
// [1+i/NSUB, 1+(i+1)/NSUB). The four target functions, all in [1,2], are
//   sel 0  SQRT,  even exponent: sqrt(m)      sel 1  SQRT,  odd exponent: sqrt(2m)
//   sel 2  ISQRT, even exponent: 2/sqrt(m)    sel 3  ISQRT, odd exponent: sqrt(2)/sqrt(m)
// Keeping one table per exponent parity folds the sqrt(2) factor of the odd
// case into the coefficients, so the datapath never multiplies by sqrt(2).
// The address is {sel, i}; word bits [j*COEF_W +: COEF_W] hold cj as a two's
// complement number with COEF_FRAC fraction bits.
//
// How the table is made: it is computed during elaboration by build_table(),
// a Remez exchange on each sub-interval. Starting from the Chebyshev extrema
// of degree n+1, it solves the n+2 equioscillation equations
//   p(u_j) + (-1)^j * E = g(u_j)
// for c0..cn and E (Gaussian elimination), then moves the reference points
// u_j to the alternating extrema of the error p-g found on a
// grid of GRID+1 points (257 for the default table), and solves again. For
// these smooth functions one exchange already gives the min-max polynomial
// (Chebyshev criterion) to about 1e-4 of its error, and further exchanges
// change nothing measurable. Each coefficient is then rounded to
// COEF_FRAC fraction bits. For n = 2, NSUB = 8 the maximum relative errors
// are 3.29e-6 (SQRT) and 1.64e-5 (ISQRT). Any DEGREE and power-of-two NSUB
// can be elaborated. Minimising the absolute error follows the method;
// the ISQRT scaling by 2 and the per-parity tables are this design's.
//
// How it works in hardware: an array initialised with that table and read
// synchronously, so that it maps to an FPGA block RAM.
// Interface/timing: when en is high, addr is sampled on the rising clock
// edge and data holds that word from the next cycle on; while en is low,
// data keeps its value (block RAM clock enable). No reset.
module coef_rom #(
  parameter int unsigned DEGREE    = 2,
  parameter int unsigned NSUB      = 8,
  parameter int unsigned COEF_W    = 21,
  parameter int unsigned COEF_FRAC = 18,
  localparam int unsigned ADDR_W   = $clog2(NSUB) + 2,
  localparam int unsigned DATA_W   = (DEGREE + 1) * COEF_W
) (
  input  logic              clk,
  input  logic              en,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  localparam int unsigned DEPTH = 2**ADDR_W;
  localparam int unsigned K     = DEGREE + 2;   // reference points
  // Error search grid: 256 points per sub-interval, fewer for large tables so
  // that elaboration stays within the tools' constant-evaluation limits.
  localparam int unsigned GRID  = (8192 / DEPTH > 256) ? 256 :
                                  (8192 / DEPTH < 16)  ? 16 : 8192 / DEPTH;
  localparam int unsigned ITERS = 2;            // solve, exchange, solve
  localparam int unsigned MAXE  = 64;           // extrema kept per scan
  localparam real         PI    = 3.141592653589793;

  function automatic real target(int sel, real m);
    case (sel)
      0:       return $sqrt(m);
      1:       return $sqrt(2.0 * m);
      2:       return 2.0 / $sqrt(m);
      default: return $sqrt(2.0) / $sqrt(m);
    endcase
  endfunction

  function automatic logic [DEPTH*DATA_W-1:0] build_table();
    logic [DEPTH*DATA_W-1:0] tbl;
    real M [K*(K+1)];   // augmented equation matrix, row-major
    real u [K];         // reference points
    real c [K];         // solution: c0..cn, E
    int  ext [MAXE];    // grid index of each error extremum
    real exv [MAXE];    // size of the error there
    tbl = '0;
    for (int a = 0; a < int'(DEPTH); a++) begin
      int  sel, idx;
      real lo, h;
      sel = a / int'(NSUB);
      idx = a % int'(NSUB);
      lo  = 1.0 + real'(idx) / real'(NSUB);
      h   = 1.0 / real'(NSUB);
      for (int j = 0; j < int'(K); j++)
        u[j] = (1.0 - $cos(PI * real'(j) / real'(K - 1))) / 2.0;
      for (int it = 0; it < int'(ITERS); it++) begin
        int  ne, seg_start, best;
        real prev_e;
        // equioscillation equations
        for (int j = 0; j < int'(K); j++) begin
          real g, pw;
          g  = target(sel, lo + h * u[j]);
          pw = 1.0;
          for (int i = 0; i <= int'(DEGREE); i++) begin
            M[j*(K+1) + i] = pw;
            pw = pw * u[j];
          end
          M[j*(K+1) + K - 1] = (j % 2 == 0) ? 1.0 : -1.0;
          M[j*(K+1) + K]     = g;
        end
        // Gaussian elimination with partial pivoting
        for (int col = 0; col < int'(K); col++) begin
          int  piv;
          real mx;
          piv = col;
          mx  = (M[col*(K+1)+col] < 0.0) ? -M[col*(K+1)+col] : M[col*(K+1)+col];
          for (int r = col + 1; r < int'(K); r++) begin
            real v;
            v = (M[r*(K+1)+col] < 0.0) ? -M[r*(K+1)+col] : M[r*(K+1)+col];
            if (v > mx) begin
              mx  = v;
              piv = r;
            end
          end
          for (int i = 0; i <= int'(K); i++) begin
            real t;
            t = M[col*(K+1)+i];
            M[col*(K+1)+i] = M[piv*(K+1)+i];
            M[piv*(K+1)+i] = t;
          end
          for (int r = col + 1; r < int'(K); r++) begin
            real f;
            f = M[r*(K+1)+col] / M[col*(K+1)+col];
            for (int i = col; i <= int'(K); i++)
              M[r*(K+1)+i] = M[r*(K+1)+i] - f * M[col*(K+1)+i];
          end
        end
        for (int r = int'(K) - 1; r >= 0; r--) begin
          real s;
          s = M[r*(K+1)+K];
          for (int i = r + 1; i < int'(K); i++) s = s - M[r*(K+1)+i] * c[i];
          c[r] = s / M[r*(K+1)+r];
        end
        // exchange: alternating extrema of the error on the grid
        if (it < int'(ITERS) - 1) begin
          ne = 0;
          seg_start = 1;
          best = 0;
          prev_e = 0.0;
          for (int gi = 0; gi <= int'(GRID); gi++) begin
            real uu, p, g, e, ae;
            uu = real'(gi) / real'(GRID);
            p  = c[DEGREE];
            for (int i = int'(DEGREE) - 1; i >= 0; i--) p = p * uu + c[i];
            g  = target(sel, lo + h * uu);
            e  = p - g;
            ae = (e < 0.0) ? -e : e;
            if (seg_start == 1 || ((e < 0.0) != (prev_e < 0.0))) begin
              if (ne < int'(MAXE)) begin
                ext[ne] = gi;
                exv[ne] = ae;
                ne++;
              end
              seg_start = 0;
              prev_e = e;
            end else if (ne > 0 && ne <= int'(MAXE) && ae > exv[ne-1]) begin
              ext[ne-1] = gi;
              exv[ne-1] = ae;
            end
          end
          // keep K alternating points, dropping the smaller end point
          best = 0;
          while (ne - best > int'(K)) begin
            if (exv[best] < exv[ne-1]) best++;
            else                       ne--;
          end
          if (ne - best == int'(K))
            for (int j = 0; j < int'(K); j++) u[j] = real'(ext[best + j]) / real'(GRID);
        end
      end
      // round to the fixed-point format
      for (int i = 0; i <= int'(DEGREE); i++) begin
        tbl[a*DATA_W + i*COEF_W +: COEF_W] = COEF_W'(longint'($floor(c[i] * (2.0 ** COEF_FRAC) + 0.5)));
      end
    end
    return tbl;
  endfunction

  localparam logic [DEPTH*DATA_W-1:0] TABLE = build_table();

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int a = 0; a < int'(DEPTH); a++) mem[a] = TABLE[a*DATA_W +: DATA_W];
  end

  always_ff @(posedge clk) begin
    if (en) data <= mem[addr];
  end

endmodule
