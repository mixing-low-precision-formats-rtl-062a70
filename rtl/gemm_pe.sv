// gemm_pe: one processing element of the linear GEMM array.
//
// A PE holds one operand of A and N_MAC MAC units that all multiply it, each by its
// own element of the B vector passing through, so the PE works on one row of the
// output tile and N_MAC of its columns per cycle. Three chains run through the PE:
//   A chain  : a register stage (valid, target-PE tag, value) passed on to the next
//              PE. The PE copies the value whose tag equals PE_IDX into a_next. When
//              the first B vector of a new k step enters the PE, a_next moves to
//              a_cur, the operand the MACs use. This double buffering lets the
//              next column of A be loaded while the current one is in use.
//   B chain  : a register stage holding N_MAC operands with their control (valid,
//              first = first vector of a k step, k0 = step k==0, blk = column
//              block). The MACs use this stage, then it is passed on.
//   C chain  : N_MAC result registers. c_load copies sum c_blk of every MAC into
//              them; c_shift takes the neighbour's registers instead, so results
//              flow towards PE 0 and out of the array.
// All A/B state advances only when en is high (a global stall); the C chain has its
// own controls. The split into a forwarding stage and a held copy of A, the tags
// and the drain protocol are choices of this design.
module gemm_pe
  import lpfp_pkg::*;
#(
  parameter int unsigned IN_E      = IN_E_DEF,
  parameter int unsigned IN_M      = IN_M_DEF,
  parameter int unsigned CFG       = CFG_DEF,
  parameter bit          ACC_FIXED = 1'b0,
  parameter int unsigned FX_I      = FX_I_DEF,
  parameter int unsigned FX_F      = FX_F_DEF,
  parameter int unsigned N_MAC     = N_MAC_DEF,
  parameter int unsigned TN        = TN_DEF,
  parameter int unsigned N_PE      = N_PE_DEF,
  parameter int unsigned PE_IDX    = 0,
  localparam int unsigned DW    = IN_E + IN_M + 1,
  localparam int unsigned ACC_W = ACC_FIXED ? (FX_I + FX_F) : (IN_E + 2 * IN_M + 3),
  localparam int unsigned BLK_W = (TN > 1) ? $clog2(TN) : 1,
  localparam int unsigned TAG_W = (N_PE > 1) ? $clog2(N_PE) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  // A chain
  input  logic                        a_in_valid,
  input  logic [TAG_W-1:0]            a_in_tag,
  input  logic [DW-1:0]               a_in_data,
  output logic                        a_out_valid,
  output logic [TAG_W-1:0]            a_out_tag,
  output logic [DW-1:0]               a_out_data,
  // B chain
  input  logic                        b_in_valid,
  input  logic                        b_in_first,
  input  logic                        b_in_k0,
  input  logic [BLK_W-1:0]            b_in_blk,
  input  logic [N_MAC-1:0][DW-1:0]    b_in_data,
  output logic                        b_out_valid,
  output logic                        b_out_first,
  output logic                        b_out_k0,
  output logic [BLK_W-1:0]            b_out_blk,
  output logic [N_MAC-1:0][DW-1:0]    b_out_data,
  // C chain
  input  logic                        c_load,
  input  logic                        c_shift,
  input  logic [BLK_W-1:0]            c_blk,
  input  logic [N_MAC-1:0][ACC_W-1:0] c_in,
  output logic [N_MAC-1:0][ACC_W-1:0] c_out,
  // any MAC result was infinity / clipped this cycle
  output logic                        ovf
);

  logic [DW-1:0]      a_next, a_cur;
  logic [N_MAC-1:0]   mac_ovf;
  logic [N_MAC-1:0][ACC_W-1:0] mac_rd;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_out_valid <= 1'b0;
      b_out_valid <= 1'b0;
      b_out_first <= 1'b0;
      b_out_k0    <= 1'b0;
      a_out_tag   <= '0;
      a_out_data  <= '0;
      b_out_blk   <= '0;
      b_out_data  <= '0;
      a_next      <= '0;
      a_cur       <= '0;
    end else if (en) begin
      a_out_valid <= a_in_valid;
      a_out_tag   <= a_in_tag;
      a_out_data  <= a_in_data;
      if (a_in_valid && a_in_tag == TAG_W'(PE_IDX)) a_next <= a_in_data;
      if (b_in_valid && b_in_first) a_cur <= a_next;
      b_out_valid <= b_in_valid;
      b_out_first <= b_in_first;
      b_out_k0    <= b_in_k0;
      b_out_blk   <= b_in_blk;
      b_out_data  <= b_in_data;
    end
  end

  for (genvar j = 0; j < N_MAC; j++) begin : g_mac
    mac_unit #(
      .IN_E(IN_E), .IN_M(IN_M), .CFG(CFG), .ACC_FIXED(ACC_FIXED),
      .FX_I(FX_I), .FX_F(FX_F), .TN(TN)
    ) u_mac (
      .clk    (clk),
      .en     (en),
      .valid  (b_out_valid),
      .first  (b_out_k0),
      .blk    (b_out_blk),
      .a      (a_cur),
      .b      (b_out_data[j]),
      .rd_blk (c_blk),
      .rd_data(mac_rd[j]),
      .ovf    (mac_ovf[j])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       c_out <= '0;
    else if (c_load)  c_out <= mac_rd;
    else if (c_shift) c_out <= c_in;
  end

  assign ovf = |mac_ovf;

endmodule
