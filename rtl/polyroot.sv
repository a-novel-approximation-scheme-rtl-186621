// polyroot: mantissa computation of the SQRT/ISQRT core.
//
// Evaluates p(u) = c0 + c1*u + ... + cn*u^n with Horner's scheme,
//   acc = cn;  for j = n-1 .. 0:  acc = acc*u + cj,
// on a single multiplier and a single adder that are reused for every step,
// with the coefficients of the selected sub-interval read from coef_rom. The
// sub-interval index is the top log2(NSUB) bits of the mantissa fraction and
// u is the rest of the fraction, read as a number in [0,1). The ROM address
// is {op, odd, index}, so the same hardware serves SQRT and ISQRT and both
// exponent parities; the result y approximates sqrt(m), sqrt(2m), 2/sqrt(m)
// or sqrt(2)/sqrt(m) (see coef_rom) and lies in [1,2].
//
// Fixed point: coefficients and the accumulator are COEF_W-bit two's
// complement with COEF_FRAC fraction bits; u has UW = FRAC_W - log2(NSUB)
// bits. Each product acc*u is truncated (floor) back to COEF_FRAC bits
// before the addition.
//
// Timing: start is accepted when busy is low. The operand is sampled on that
// edge together with the ROM read, then each Horner step takes two cycles
// (multiply into a product register, then add into the accumulator). done
// pulses for one cycle 1 + 2*DEGREE cycles after start (5 for the quadratic
// default); y holds the result from then until the next start.
//
// Horner evaluation on one multiplier, one adder and a coefficient ROM is the
// structure the architecture prescribes; the two-cycle step, the fixed-point
// widths and the start/done handshake are this design's choices.
module polyroot
  import sqrt_pkg::*;
#(
  parameter int unsigned DEGREE    = DEF_DEGREE,
  parameter int unsigned NSUB      = DEF_NSUB,
  parameter int unsigned FRAC_W    = DEF_FRAC_W,
  parameter int unsigned COEF_W    = DEF_COEF_W,
  parameter int unsigned COEF_FRAC = DEF_COEF_FRAC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  sqrt_op_e          op,
  input  logic              odd,      // unbiased input exponent is odd
  input  logic [FRAC_W-1:0] frac,     // fraction field of the operand
  output logic              busy,
  output logic              done,
  output logic [COEF_W-1:0] y         // signed, COEF_FRAC fraction bits
);

  localparam int unsigned IDX_W  = $clog2(NSUB);
  localparam int unsigned UW     = FRAC_W - IDX_W;
  localparam int unsigned ADDR_W = IDX_W + 2;
  localparam int unsigned WORD_W = (DEGREE + 1) * COEF_W;
  localparam int unsigned PROD_W = COEF_W + UW + 1;
  localparam int unsigned CNT_W  = $clog2(DEGREE + 1);

  typedef enum logic [1:0] {
    S_IDLE,
    S_MUL,
    S_ADD
  } state_e;

  state_e state;

  logic [WORD_W-1:0] rom_word;
  logic [ADDR_W-1:0] rom_addr;
  logic              accept;

  logic [UW-1:0]            u_q;
  logic [CNT_W-1:0]         j_q;      // index of the coefficient added next
  logic                     first_q;  // first multiply uses c_n from the ROM
  logic signed [COEF_W-1:0] acc_q;
  logic signed [PROD_W-1:0] prod_q;

  logic signed [COEF_W-1:0] mul_a;
  logic signed [COEF_W-1:0] coef_j;
  logic signed [PROD_W-1:0] mul_p;
  logic signed [COEF_W-1:0] sum;

  assign accept   = start && (state == S_IDLE);
  if (IDX_W > 0) begin : g_idx
    assign rom_addr = {op, odd, frac[FRAC_W-1 -: (IDX_W > 0 ? IDX_W : 1)]};
  end else begin : g_no_idx
    assign rom_addr = {op, odd};   // one sub-interval covers all of [1,2)
  end

  coef_rom #(
    .DEGREE   (DEGREE),
    .NSUB     (NSUB),
    .COEF_W   (COEF_W),
    .COEF_FRAC(COEF_FRAC)
  ) u_rom (
    .clk (clk),
    .en  (accept),
    .addr(rom_addr),
    .data(rom_word)
  );

  // The one multiplier and the one adder.
  assign mul_a  = first_q ? $signed(rom_word[DEGREE*COEF_W +: COEF_W]) : acc_q;
  assign coef_j = $signed(rom_word[j_q*COEF_W +: COEF_W]);
  assign mul_p  = mul_a * $signed({1'b0, u_q});
  assign sum    = COEF_W'((prod_q >>> UW) + PROD_W'(coef_j));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      u_q     <= '0;
      j_q     <= '0;
      first_q <= 1'b0;
      acc_q   <= '0;
      prod_q  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (accept) begin
          u_q     <= frac[UW-1:0];
          j_q     <= CNT_W'(DEGREE - 1);
          first_q <= 1'b1;
          state   <= S_MUL;
        end
        S_MUL: begin
          prod_q  <= mul_p;
          first_q <= 1'b0;
          state   <= S_ADD;
        end
        S_ADD: begin
          acc_q <= sum;
          if (j_q == '0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            j_q   <= j_q - 1'b1;
            state <= S_MUL;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign y    = acc_q;

  // The coefficient index never runs past the ROM word.
  a_j_in_range: assert property (@(posedge clk) disable iff (!rst_n) j_q < CNT_W'(DEGREE));

endmodule
