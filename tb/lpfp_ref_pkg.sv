// lpfp_ref_pkg: reference arithmetic for the testbenches, written independently
// of the RTL. E6M5 values are handled as exact integers scaled by 2^35 (the weight
// of the smallest subnormal), E5M2 values as reals, and rounding is done on those
// exact numbers rather than with guard/round/sticky bits.
package lpfp_ref_pkg;

  typedef logic signed [95:0] wide_t;

  localparam logic [11:0] E6M5_INF = 12'h7FF;


  function automatic real pow2(int n);
    real r = 1.0;
    if (n >= 0) for (int i = 0; i < n; i++) r = r * 2.0;
    else        for (int i = 0; i < -n; i++) r = r / 2.0;
    return r;
  endfunction

  // FP32 bit patterns <-> real, written out by hand
  function automatic real fp32_real(logic [31:0] x);
    real v;
    if (x[30:23] == 0) v = real'(x[22:0]) * (pow2(-149));
    else v = (1.0 + real'(x[22:0]) / 8388608.0) * (pow2(int'(x[30:23]) - 127));
    return x[31] ? -v : v;
  endfunction

  // exact encoding of a real that fits FP32 (normal range only)
  function automatic logic [31:0] real_fp32(real v);
    logic s = v < 0.0;
    real a = s ? -v : v;
    int e = 0;
    if (a == 0.0) return {s, 31'd0};
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0) begin a = a * 2.0; e--; end
    return {s, 8'(e + 127), 23'(longint'((a - 1.0) * 8388608.0))};
  endfunction

  // ---- E5M2 operand format, CFG5 (cfg=5) or CFG6 (cfg=6) reading ----
  function automatic real e5m2_val(logic [7:0] c, int cfg);
    int e = c[6:2];
    int m = c[1:0];
    real v;
    if (e == 0 && (cfg == 6 || m == 0)) v = 0.0;
    else v = (1.0 + m / 4.0) * (pow2(e - 15));
    return c[7] ? -v : v;
  endfunction

  function automatic bit e5m2_is_inf(logic [7:0] c);
    return c[6:0] == 7'h7F;
  endfunction

  // nearest-even rounding of an FP32 value to E5M2 by search over the codes
  function automatic logic [7:0] fp32_to_e5m2(logic [31:0] x, int cfg);
    real v, a, best, d, bd;
    logic [7:0] bc;
    int emin;
    logic s = x[31];
    emin = (cfg == 6) ? -14 : -15;
    if (x[30:23] == 8'hFF) return {s, 7'h7F};
    v = fp32_real(x);
    a = (v < 0.0) ? -v : v;
    if (a < pow2(emin)) return {s, 7'h00};
    if (a >= pow2(17)) return {s, 7'h7F};
    bc = 8'h00; bd = 1.0e30;
    for (int c = 1; c < 128; c++) begin
      if (cfg == 6 && c < 4) continue;
      best = (1.0 + (c % 4) / 4.0) * (pow2((c / 4) - 15));
      d = (best > a) ? best - a : a - best;
      if (d < bd || (d == bd && (c % 2) == 0)) begin
        bd = d; bc = 8'(c);
      end
    end
    return {s, bc[6:0]};
  endfunction

  // ---- E6M5 accumulator format ----
  function automatic wide_t e6m5_int(logic [11:0] c);   // value * 2^35
    int e = c[10:5];
    int f = c[4:0];
    wide_t mag;
    if (e == 0) mag = wide_t'(f);
    else        mag = wide_t'(32 + f) <<< (e - 1);
    return c[11] ? -mag : mag;
  endfunction

  // round an exact value (times 2^35) to E6M5, nearest-even, overflow -> infinity
  function automatic logic [11:0] int_to_e6m5(wide_t v, logic zero_sign);
    logic s = v < 0;
    wide_t a = s ? -v : v;
    int p, sh, e;
    wide_t q, rem, half;
    if (a == 0) return {zero_sign, 11'd0};
    if (a < 64) return {s, (a >= 32) ? 6'd1 : 6'd0, a[4:0]};
    p = 0;
    for (int i = 0; i < 96; i++) if (a[i]) p = i;
    sh   = p - 5;
    q    = a >>> sh;
    rem  = a - (q <<< sh);
    half = wide_t'(1) <<< (sh - 1);
    if (rem > half || (rem == half && q[0])) q = q + 1;
    if (q == 64) begin q = 32; sh = sh + 1; end
    e = sh + 1;
    if (e > 63 || (e == 63 && q[4:0] == 5'h1F)) return {s, 11'h7FF};
    return {s, 6'(e), q[4:0]};
  endfunction

  function automatic bit e6m5_is_inf(logic [11:0] c);
    return c[10:0] == 11'h7FF;
  endfunction

  function automatic logic [11:0] e6m5_add(logic [11:0] acc, logic [11:0] add);
    if (e6m5_is_inf(acc)) return acc;
    if (e6m5_is_inf(add)) return add;
    return int_to_e6m5(e6m5_int(acc) + e6m5_int(add), acc[11] & add[11]);
  endfunction

  // exact product of two E5M2 codes, in E6M5
  function automatic logic [11:0] e5m2_mul(logic [7:0] a, logic [7:0] b, int cfg);
    logic s = a[7] ^ b[7];
    int ea = a[6:2], eb = b[6:2];
    wide_t v;
    if (e5m2_is_inf(a) || e5m2_is_inf(b)) return {s, 11'h7FF};
    if (e5m2_val(a, cfg) == 0.0 || e5m2_val(b, cfg) == 0.0) return {s, 11'd0};
    // (4+ma)/4*2^(ea-15) * (4+mb)/4*2^(eb-15) * 2^35
    v = wide_t'((4 + a[1:0]) * (4 + b[1:0])) <<< (ea + eb + 1);
    return int_to_e6m5(s ? -v : v, s);
  endfunction

  // E6M5 to Q8.13, truncating toward zero, symmetric saturation
  function automatic logic [20:0] e6m5_to_q813(logic [11:0] c, output bit sat);
    wide_t v, a;
    sat = 1'b0;
    if (e6m5_is_inf(c)) begin
      sat = 1'b1;
      return c[11] ? -21'sd1048575 : 21'sd1048575;
    end
    v = e6m5_int(c);
    a = (v < 0) ? -v : v;
    a = a >>> 22;                       // 2^35 -> 2^13 scale
    if (a > 1048575) begin a = 1048575; sat = 1'b1; end
    return (v < 0) ? 21'(-a) : 21'(a);
  endfunction

  function automatic logic [20:0] q813_add(logic [20:0] x, logic [20:0] y);
    int s = int'($signed(x)) + int'($signed(y));
    if (s > 1048575) s = 1048575;
    if (s < -1048576) s = -1048576;
    return 21'(s);
  endfunction

  function automatic logic [31:0] e6m5_to_fp32(logic [11:0] c);
    real v;
    if (e6m5_is_inf(c)) return {c[11], 31'h7F800000};
    v = (c[10:5] == 0) ? real'(c[4:0]) * (pow2(-35))
                         : real'(32 + c[4:0]) * (pow2(int'(c[10:5]) - 36));
    if (c[11]) v = -v;
    if (v == 0.0) return {c[11], 31'd0};
    return real_fp32(v);
  endfunction

  function automatic logic [31:0] q813_to_fp32(logic [20:0] q);
    real v = real'(int'($signed(q))) / 8192.0;
    if (q == 0) return 32'd0;
    return real_fp32(v);
  endfunction

endpackage
