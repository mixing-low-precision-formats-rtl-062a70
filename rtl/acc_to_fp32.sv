// acc_to_fp32: converts an accumulator result to IEEE-754 single precision on the
// way out of the array (the "C write" side).
//
// ACC_FIXED=0: the input is an EeMm float (default E6M5; exponent 0 = zero or
// subnormal, all-ones exponent and mantissa = infinity). Every such value is exactly
// representable in FP32, so the conversion only rebiases the exponent and
// normalises subnormals.
// ACC_FIXED=1: the input is a two's complement Qi.f number (default Q8.13); its
// magnitude fits the 24-bit FP32 significand, so this conversion is exact as well.
// Only the low ACC_W bits of the input are used. Purely combinational.
module acc_to_fp32
  import lpfp_pkg::*;
#(
  parameter bit          ACC_FIXED = 1'b0,
  parameter int unsigned E    = IN_E_DEF + 1,
  parameter int unsigned M    = 2 * IN_M_DEF + 1,
  parameter int unsigned FX_I = FX_I_DEF,
  parameter int unsigned FX_F = FX_F_DEF,
  localparam int unsigned ACC_W = ACC_FIXED ? (FX_I + FX_F) : (E + M + 1)
) (
  input  logic [ACC_W-1:0] x,
  output logic [31:0]      y
);

  initial assert (FX_I + FX_F <= 25 && E <= 8 && M <= 23)
    else $error("acc_to_fp32: format does not fit FP32 exactly");

  localparam int BIAS = (1 << (E - 1)) - 1;

  logic        s;
  logic [31:0] mag;     // integer magnitude to normalise
  int          msb;
  int          scale;   // value = mag * 2^scale
  logic [7:0]  fexp;
  logic [22:0] ffrac;
  logic [31:0] shifted;
  logic [ACC_W-1:0] neg;

  assign neg = ~x + 1'b1;

  always_comb begin
    y     = '0;
    mag   = '0;
    scale = 0;
    s     = x[ACC_W-1];
    if (ACC_FIXED) begin
      mag   = 32'(s ? neg : x);
      scale = -int'(FX_F);
    end else begin
      mag   = 32'({x[E+M-1:M] != '0, x[M-1:0]});
      scale = ((x[E+M-1:M] == '0) ? 1 : int'(x[E+M-1:M])) - BIAS - int'(M);
    end

    msb = 0;
    for (int i = 0; i < 32; i++) if (mag[i]) msb = i;
    fexp    = 8'(msb + scale + 127);
    shifted = mag << (31 - msb);
    ffrac   = shifted[30:8];

    if (!ACC_FIXED && x[E+M-1:0] == '1)
      y = {s, 8'hFF, 23'd0};
    else if (mag == '0)
      y = {ACC_FIXED ? 1'b0 : s, 31'd0};
    else
      y = {s, fexp, ffrac};
  end

endmodule
