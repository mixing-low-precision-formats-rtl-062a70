// mac_unit: one multiply-accumulate unit of a processing element.
//
// The product of the low-precision operands a and b (lpfp_mult, exact E6M5 result)
// is added to one of TN running sums kept in a small register file, the one
// selected by blk (the column block of the output tile). Two accumulators are
// available, chosen at elaboration time:
//   ACC_FIXED=0  E6M5 floating-point accumulator (lpfp_acc_add), the default;
//   ACC_FIXED=1  float-to-Q8.13 converter (lpfp_to_fixed) followed by a Q8.13
//                saturating fixed-point accumulator (fixed_acc_add).
// Each running sum covers a whole dot product. When first is set the product starts
// a new sum instead of being added to the stored one, so no clearing pass is needed.
// Timing: the multiply and add are combinational and the selected sum is written at
// the clock edge where en and valid are both high, so one product per cycle is taken.
// rd_data shows sum rd_blk combinationally, for draining the tile. ovf pulses with
// a write whose result is infinity (float) or clipped (fixed).
module mac_unit
  import lpfp_pkg::*;
#(
  parameter int unsigned IN_E      = IN_E_DEF,
  parameter int unsigned IN_M      = IN_M_DEF,
  parameter int unsigned CFG       = CFG_DEF,
  parameter bit          ACC_FIXED = 1'b0,
  parameter int unsigned FX_I      = FX_I_DEF,
  parameter int unsigned FX_F      = FX_F_DEF,
  parameter int unsigned TN        = TN_DEF,
  localparam int unsigned PE    = IN_E + 1,
  localparam int unsigned PM    = 2 * IN_M + 1,
  localparam int unsigned ACC_W = ACC_FIXED ? (FX_I + FX_F) : (PE + PM + 1),
  localparam int unsigned BLK_W = (TN > 1) ? $clog2(TN) : 1
) (
  input  logic               clk,
  input  logic               en,
  input  logic               valid,
  input  logic               first,
  input  logic [BLK_W-1:0]   blk,
  input  logic [IN_E+IN_M:0] a,
  input  logic [IN_E+IN_M:0] b,
  input  logic [BLK_W-1:0]   rd_blk,
  output logic [ACC_W-1:0]   rd_data,
  output logic               ovf
);

  logic [ACC_W-1:0] acc_mem [TN];
  logic [PE+PM:0]   prod;
  logic             prod_inf;
  logic [ACC_W-1:0] old_sum, new_sum;
  logic             new_ovf;

  lpfp_mult #(.IN_E(IN_E), .IN_M(IN_M), .CFG(CFG)) u_mult (
    .a(a), .b(b), .p(prod), .p_inf(prod_inf)
  );

  assign old_sum = first ? '0 : acc_mem[blk];

  if (ACC_FIXED) begin : g_fixed
    logic [ACC_W-1:0] prod_fx;
    logic             cvt_sat, add_sat;
    lpfp_to_fixed #(.E(PE), .M(PM), .FX_I(FX_I), .FX_F(FX_F)) u_cvt (
      .x(prod), .q(prod_fx), .sat(cvt_sat)
    );
    fixed_acc_add #(.W(ACC_W)) u_add (
      .acc(old_sum), .addend(prod_fx), .sum(new_sum), .sat(add_sat)
    );
    assign new_ovf = cvt_sat | add_sat | prod_inf;
  end else begin : g_float
    logic sum_inf;
    lpfp_acc_add #(.E(PE), .M(PM)) u_add (
      .acc(old_sum), .addend(prod), .sum(new_sum), .sum_inf(sum_inf)
    );
    assign new_ovf = sum_inf | prod_inf;
  end

  always_ff @(posedge clk) begin
    if (en && valid) acc_mem[blk] <= new_sum;
  end

  assign rd_data = acc_mem[rd_blk];
  assign ovf     = en & valid & new_ovf;

endmodule
