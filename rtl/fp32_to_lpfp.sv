// fp32_to_lpfp: converts an IEEE-754 single-precision operand to the low-precision
// multiplier input format (default E5M2 with the CFG5 encoding) on the way into the
// array (the "A read" and "B read" side).
//
// Rounding is to nearest, ties to even. Magnitudes beyond the largest finite value
// become +/-infinity (all-ones exponent and mantissa), and FP32 infinities and NaNs
// map to infinity as well, the format having no NaN. With CFG=5 the smallest
// exponent field (0) still holds normal numbers 1.m*2^(-bias) except for the zero
// code 0; a value that would round onto that zero code is moved up to the smallest
// non-zero code, and anything below 2^(-bias) is flushed to zero. With CFG=6 the
// exponent-0 codes are all zero, so values below 2^(1-bias) flush to zero. These
// underflow rules are choices of this design. Purely combinational.
module fp32_to_lpfp
  import lpfp_pkg::*;
#(
  parameter int unsigned IN_E = IN_E_DEF,
  parameter int unsigned IN_M = IN_M_DEF,
  parameter int unsigned CFG  = CFG_DEF
) (
  input  logic [31:0]        x,
  output logic [IN_E+IN_M:0] y
);

  localparam int BIAS = (1 << (IN_E - 1)) - 1;
  localparam int EMIN = (CFG == 6) ? 1 - BIAS : -BIAS;
  localparam int EMAX = (1 << IN_E) - 1 - BIAS;

  logic          s;
  logic [7:0]    e8;
  logic [22:0]   f23;
  int            ue;
  logic          g, st, lsb, up;
  logic [IN_M:0] m;          // one extra bit for the rounding carry
  logic [IN_E-1:0] field;
  logic          inf;

  always_comb begin
    {s, e8, f23} = x;
    ue    = int'(e8) - 127;
    g     = f23[22-IN_M];
    st    = |(f23 & ((23'd1 << (22 - IN_M)) - 1));
    lsb   = f23[23-IN_M];
    up    = g & (st | lsb);
    m     = {1'b0, f23[22 -: IN_M]} + (IN_M+1)'(up);
    if (m[IN_M]) ue = ue + 1;   // 1.11..1 rounded up to 10.0
    field = IN_E'(ue + BIAS);
    inf   = 1'b0;
    y     = '0;

    if (e8 == 8'hFF) begin
      inf = 1'b1;
    end else if (e8 == 8'h00 || int'(e8) - 127 < EMIN) begin
      y = {s, {(IN_E+IN_M){1'b0}}};
    end else if (ue > EMAX || (ue == EMAX && m[IN_M-1:0] == '1)) begin
      inf = 1'b1;
    end else begin
      y = {s, field, m[IN_M-1:0]};
      if (CFG == 5 && field == '0 && m[IN_M-1:0] == '0)
        y = {s, {IN_E{1'b0}}, IN_M'(1)};
    end
    if (inf) y = {s, {(IN_E+IN_M){1'b1}}};
  end

endmodule
