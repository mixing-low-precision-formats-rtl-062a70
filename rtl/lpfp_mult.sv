// lpfp_mult: exact low-precision floating-point multiplier (CFG5 policy by default).
//
// Multiplies two EeMm operands (default E5M2) and returns the product exactly, in
// E(e+1)M(2m+1) (default E6M5), so no output rounding logic exists: the (m+1)x(m+1)
// significand product has 2m+2 bits, and at most one normalising shift is needed.
// Exceptional values follow the reduced policy of the design:
//   * no NaN codes: infinity is the all-ones exponent with an all-ones mantissa;
//   * CFG=5: an exponent-0 operand with a non-zero mantissa is read as a normal
//     number 1.m*2^(-bias), so no subnormal shifter is needed; CFG=6: every
//     exponent-0 operand is zero;
//   * a product too large for the output format saturates to infinity.
// The output exponent bias is 2^e-1, so the smallest product still has a biased
// exponent of 1 and the output never needs a subnormal code. An all-ones product
// mantissa can never occur, so the output infinity code never collides with a
// finite product.
// The multiplier is purely combinational. Infinity times zero gives infinity, a
// choice of this design (the operation has no NaN to return).
module lpfp_mult
  import lpfp_pkg::*;
#(
  parameter int unsigned IN_E = IN_E_DEF,
  parameter int unsigned IN_M = IN_M_DEF,
  parameter int unsigned CFG  = CFG_DEF,
  localparam int unsigned PE  = IN_E + 1,
  localparam int unsigned PM  = 2 * IN_M + 1
) (
  input  logic [IN_E+IN_M:0] a,
  input  logic [IN_E+IN_M:0] b,
  output logic [PE+PM:0]     p,
  output logic               p_inf   // product is infinity
);

  initial assert (CFG == 5 || CFG == 6) else $error("lpfp_mult: CFG must be 5 or 6");

  localparam int unsigned SW = 2 * IN_M + 2;

  logic              sa, sb;
  logic [IN_E-1:0]   ea, eb;
  logic [IN_M-1:0]   fa, fb;
  logic              zero_a, zero_b, inf_a, inf_b;
  logic [SW-1:0]     sig_prod;
  logic [PE:0]       exp_sum;          // one spare bit to see overflow
  logic [PM-1:0]     frac;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    inf_a  = (ea == '1) && (fa == '1);
    inf_b  = (eb == '1) && (fb == '1);
    zero_a = (ea == '0) && ((CFG == 6) || (fa == '0));
    zero_b = (eb == '0) && ((CFG == 6) || (fb == '0));

    sig_prod = SW'({1'b1, fa}) * SW'({1'b1, fb});
    // biased output exponent: ea + eb - 2*bias_in + bias_out + norm, with
    // bias_out = 2*bias_in + 1
    exp_sum  = (PE+1)'(ea) + (PE+1)'(eb) + (PE+1)'(1) + (PE+1)'(sig_prod[SW-1]);
    if (sig_prod[SW-1]) frac = sig_prod[SW-2:0];
    else                frac = {sig_prod[SW-3:0], 1'b0};

    p_inf = 1'b0;
    p     = '0;
    if (inf_a || inf_b) begin
      p_inf = 1'b1;
    end else if (zero_a || zero_b) begin
      p = {sa ^ sb, {(PE+PM){1'b0}}};
    end else if (exp_sum > (PE+1)'({PE{1'b1}}) ||
                 (exp_sum == (PE+1)'({PE{1'b1}}) && frac == '1)) begin
      p_inf = 1'b1;
    end else begin
      p = {sa ^ sb, exp_sum[PE-1:0], frac};
    end
    if (p_inf) p = {sa ^ sb, {(PE+PM){1'b1}}};
  end

endmodule
