// lpfp_pkg: shared constants of the low-precision GEMM datapath.
//
// The default configuration is the one the design is built around: operands are
// converted from FP32 to an 8-bit E5M2 format using the "CFG5" multiplier policy,
// products are kept exact in E6M5, and dot products are summed either in an E6M5
// floating-point accumulator (default) or in a Q8.13 fixed-point accumulator.
// The array is a linear chain of 16 processing elements with 4 MACs each.
//
// CFG5 encoding of an EeMm operand (bias 2^(e-1)-1):
//   exponent field 0, mantissa 0      -> +/-0
//   exponent field 0, mantissa != 0   -> 1.m * 2^(0-bias)  (read as a normal number)
//   exponent field all ones, mantissa all ones -> +/-infinity
//   every other code                  -> 1.m * 2^(field-bias)  (no NaN codes)
// CFG6 differs only in reading every exponent-0 code as zero.
package lpfp_pkg;

  // operand (multiplier input) format
  localparam int unsigned IN_E_DEF = 5;
  localparam int unsigned IN_M_DEF = 2;
  // multiplier policy (5 or 6)
  localparam int unsigned CFG_DEF  = 5;

  // fixed-point accumulator format Qi.f, i including the sign bit
  localparam int unsigned FX_I_DEF = 8;
  localparam int unsigned FX_F_DEF = 13;

  // array shape
  localparam int unsigned N_PE_DEF  = 16;
  localparam int unsigned N_MAC_DEF = 4;
  // column blocks held per MAC (tile width = TN_DEF * N_MAC_DEF columns)
  localparam int unsigned TN_DEF    = 16;

  // exact product format of an EeMm x EeMm multiply: E(e+1) M(2m+1)
  function automatic int unsigned prod_e(int unsigned e);
    return e + 1;
  endfunction
  function automatic int unsigned prod_m(int unsigned m);
    return 2 * m + 1;
  endfunction

endpackage
