// fixed_acc_add: saturating two's complement adder used as a fixed-point
// MAC accumulator (default Q8.13, 21 bits).
//
// Adds the converted product to the running sum. On overflow the result clips to
// the most positive or most negative code instead of wrapping. Purely
// combinational; the binary point plays no part in the addition.
module fixed_acc_add
  import lpfp_pkg::*;
#(
  parameter int unsigned W = FX_I_DEF + FX_F_DEF
) (
  input  logic [W-1:0] acc,
  input  logic [W-1:0] addend,
  output logic [W-1:0] sum,
  output logic         sat      // the sum was clipped
);

  logic [W:0] wide;

  always_comb begin
    wide = {acc[W-1], acc} + {addend[W-1], addend};
    sat  = wide[W] != wide[W-1];
    if (!sat)          sum = wide[W-1:0];
    else if (wide[W])  sum = {1'b1, {(W-1){1'b0}}};
    else               sum = {1'b0, {(W-1){1'b1}}};
  end

endmodule
