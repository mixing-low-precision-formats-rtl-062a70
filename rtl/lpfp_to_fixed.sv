// lpfp_to_fixed: float-to-fixed converter between the multiplier and a
// fixed-point accumulator.
//
// Converts an EeMm value (default the E6M5 product) to a two's complement Qi.f
// number (default Q8.13, 21 bits, i counting the sign bit). The significand is
// placed by a barrel shift selected by the exponent; bits below 2^-f are dropped
// (truncation toward zero, a choice of this design), and magnitudes that do not fit,
// infinity included, saturate to the largest value of that sign. Exponent-0 codes
// are zero or subnormal, as in the accumulator format. Purely combinational.
module lpfp_to_fixed
  import lpfp_pkg::*;
#(
  parameter int unsigned E    = 6,
  parameter int unsigned M    = 5,
  parameter int unsigned FX_I = FX_I_DEF,
  parameter int unsigned FX_F = FX_F_DEF,
  localparam int unsigned W   = FX_I + FX_F
) (
  input  logic [E+M:0] x,
  output logic [W-1:0] q,
  output logic         sat     // the value was clipped (or was infinity)
);

  localparam int BIAS = (1 << (E - 1)) - 1;
  // value = sig * 2^(e_eff - BIAS - M); fixed code = value * 2^FX_F
  // => code = sig << (e_eff - SHIFT0) with SHIFT0 = BIAS + M - FX_F
  localparam int SHIFT0 = BIAS + int'(M) - int'(FX_F);
  localparam int XW     = W + M + 2;   // wide enough to see any overflow bit

  logic          s;
  logic [E-1:0]  e;
  logic [M-1:0]  f;
  logic [M:0]    sig;
  int            e_eff, sh;
  logic [XW-1:0] mag_wide;
  logic [W-1:0]  mag;
  logic          ovf;

  always_comb begin
    {s, e, f} = x;
    sig   = {e != '0, f};
    e_eff = (e == '0) ? 1 : int'(e);
    sh    = e_eff - SHIFT0;
    mag_wide = '0;
    ovf      = 1'b0;
    if (sh >= 0) begin
      if (sh > W) ovf = (sig != '0);
      else        mag_wide = XW'(sig) << sh;
    end else begin
      if (-sh <= int'(M)) mag_wide = XW'(sig) >> (-sh);
    end
    // largest magnitude is 2^(W-1)-1 for both signs (symmetric saturation)
    if (mag_wide >= XW'(1) << (W - 1)) ovf = 1'b1;
    if ((e == '1) && (f == '1)) ovf = 1'b1;
    mag = ovf ? W'((1 << (W - 1)) - 1) : mag_wide[W-1:0];
    sat = ovf;
    q   = s ? (~mag + 1'b1) : mag;
  end

endmodule
