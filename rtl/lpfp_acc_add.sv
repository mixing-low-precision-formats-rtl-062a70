// lpfp_acc_add: low-precision floating-point adder used as the MAC accumulator.
//
// Adds an EeMm addend (the exact multiplier product, default E6M5) to an EeMm
// running sum and rounds the result to nearest, ties to even. It follows the
// textbook structure: the operands are swapped so the larger magnitude comes
// first, the smaller significand is shifted right by the exponent difference into
// guard, round and sticky positions, and an (m+4)-bit adder (implicit bit, m
// mantissa bits, guard, round, sticky) adds or subtracts them. The sum is then
// normalised (one right shift on carry, or a left shift limited by the minimum
// exponent) and rounded.
// Encoding (bias 2^(e-1)-1): exponent 0 holds zero and subnormals 0.m*2^(1-bias);
// the all-ones exponent with an all-ones mantissa is infinity and there is no NaN,
// so the largest finite value has mantissa 1...10 at the top exponent. A result
// beyond it saturates to infinity, and an infinite operand propagates. For the
// sum of two opposite infinities the running sum's infinity is kept, and an exact
// zero result is +0 unless both operands are negative; these are choices of this
// design. Purely combinational.
module lpfp_acc_add #(
  parameter int unsigned E = 6,
  parameter int unsigned M = 5
) (
  input  logic [E+M:0] acc,     // running sum
  input  logic [E+M:0] addend,  // product to add
  output logic [E+M:0] sum,
  output logic         sum_inf  // result is infinity
);

  localparam int unsigned SW = M + 4;  // implicit, M fraction, guard, round, sticky

  logic            sx, sy, sb, ss;
  logic [E-1:0]    ex, ey;
  logic [M-1:0]    fx, fy;
  logic            inf_x, inf_y, x_big;
  logic [E-1:0]    eb_eff, es_eff, diff;
  logic [M:0]      sig_b, sig_s;
  logic [SW-1:0]   big_ext, small_ext, aligned, mask;
  logic            sticky;
  logic [SW:0]     raw;
  logic [SW-1:0]   norm;
  logic [E+1:0]    exp_r;            // room for carry out of the top exponent
  logic [$clog2(SW+1)-1:0] lz, sh;
  logic            rnd_up;
  logic [M+1:0]    mant;

  always_comb begin
    mask    = '0;
    aligned = '0;
    sticky  = 1'b0;
    raw     = '0;
    norm    = '0;
    mant    = '0;
    rnd_up  = 1'b0;
    sum     = '0;
    sum_inf = 1'b0;
    {sx, ex, fx} = acc;
    {sy, ey, fy} = addend;
    inf_x = (ex == '1) && (fx == '1);
    inf_y = (ey == '1) && (fy == '1);

    // swap: the encoding without the sign is monotonic in magnitude
    x_big  = {ex, fx} >= {ey, fy};
    sb     = x_big ? sx : sy;
    ss     = x_big ? sy : sx;
    eb_eff = x_big ? ((ex == '0) ? E'(1) : ex) : ((ey == '0) ? E'(1) : ey);
    es_eff = x_big ? ((ey == '0) ? E'(1) : ey) : ((ex == '0) ? E'(1) : ex);
    sig_b  = x_big ? {ex != '0, fx} : {ey != '0, fy};
    sig_s  = x_big ? {ey != '0, fy} : {ex != '0, fx};
    diff   = eb_eff - es_eff;

    // alignment with sticky collection
    big_ext   = {sig_b, 3'b000};
    small_ext = {sig_s, 3'b000};
    if (diff >= E'(SW)) begin
      aligned = '0;
      sticky  = |sig_s;
    end else begin
      mask    = ~({SW{1'b1}} << diff);
      aligned = small_ext >> diff;
      sticky  = |(small_ext & mask);
    end
    aligned[0] = aligned[0] | sticky;

    // (m+4)-bit add or subtract
    if (sb == ss) raw = {1'b0, big_ext} + {1'b0, aligned};
    else          raw = {1'b0, big_ext} - {1'b0, aligned};

    // normalise
    exp_r = (E+2)'(eb_eff);
    lz    = '0;
    sh    = '0;
    if (raw[SW]) begin
      norm  = raw[SW:1];
      norm[0] = norm[0] | raw[0];
      exp_r = exp_r + 1'b1;
    end else begin
      for (int i = 0; i < SW; i++) begin
        if (raw[i]) lz = ($clog2(SW+1))'(SW - 1 - i);
      end
      if (raw[SW-1:0] == '0) lz = ($clog2(SW+1))'(SW);
      // never shift below the minimum exponent: the result becomes subnormal
      if ((E+2)'(lz) > exp_r - 1'b1) sh = ($clog2(SW+1))'(exp_r - 1'b1);
      else                           sh = lz;
      norm  = raw[SW-1:0] << sh;
      exp_r = exp_r - (E+2)'(sh);
    end

    // round to nearest, ties to even
    rnd_up = norm[2] & (norm[1] | norm[0] | norm[3]);
    mant   = {1'b0, norm[SW-1:3]} + (M+2)'(rnd_up);
    if (mant[M+1]) begin
      mant  = mant >> 1;
      exp_r = exp_r + 1'b1;
    end

    sum_inf = 1'b0;
    if (inf_x) begin
      sum_inf = 1'b1;
      sum = {sx, {(E+M){1'b1}}};
    end else if (inf_y) begin
      sum_inf = 1'b1;
      sum = {sy, {(E+M){1'b1}}};
    end else if (raw == '0) begin
      sum = {sx & sy, {(E+M){1'b0}}};
    end else if (exp_r > (E+2)'({E{1'b1}}) ||
                 (exp_r == (E+2)'({E{1'b1}}) && mant[M-1:0] == '1)) begin
      sum_inf = 1'b1;
      sum = {sb, {(E+M){1'b1}}};
    end else begin
      // a result without its implicit bit is subnormal (exp_r is 1 then)
      sum = {sb, mant[M] ? exp_r[E-1:0] : E'(0), mant[M-1:0]};
    end
  end

endmodule
