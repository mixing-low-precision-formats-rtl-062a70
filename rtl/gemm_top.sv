// gemm_top: low-precision GEMM kernel with mixed-format multiply-accumulate units.
//
// Computes one output tile C (N_PE rows x TN*N_MAC columns) = A (N_PE x K) * B
// (K x TN*N_MAC) from FP32 operands. On the way in, every A and B element is rounded
// to E5M2 (CFG5 encoding); the MACs multiply exactly into E6M5 and accumulate in
// E6M5 (ACC_FIXED=0) or, through a float-to-fixed converter, in Q8.13
// (ACC_FIXED=1); on the way out every sum is converted exactly back to FP32.
//
// Array: N_PE processing elements (gemm_pe) in a line, each with N_MAC MACs. A
// and B enter at PE 0 and travel up the line one PE per cycle; results are
// drained back down through PE 0. For each k, PE p multiplies A[p][k] by every B
// vector B[k][blk*N_MAC +: N_MAC], blk = 0..TN-1, and MAC j of PE p keeps sum
// C[p][blk*N_MAC+j] for every blk.
//
// Streams (valid/ready, a beat moves when both are high):
//   A  one FP32 value per beat, column by column: A[0][k], A[1][k], .. A[N_PE-1][k]
//      for k = 0..K-1.
//   B  N_MAC FP32 values per beat, row by row: B[k][blk*N_MAC +: N_MAC] for blk =
//      0..TN-1, for k = 0..K-1.
//   C  N_MAC FP32 values per beat with their row (c_row) and column block (c_blk):
//      for blk = 0..TN-1, rows 0..N_PE-1.
// Sequence after start (k_len = K >= 1 is sampled then):
//   preload  N_PE A beats (column 0);
//   run      K*TN beats; each takes one B vector and, during the first N_PE beats
//            of step k < K-1, one A value of column k+1 (loaded behind the current
//            column, so A and B stream together); when an input is needed but not
//            valid the whole array stalls;
//   flush    N_PE cycles for the last B vector to reach the last PE;
//   drain    per column block: one cycle to copy the sums into the C chain, then
//            N_PE output beats (stalled by c_ready low); done pulses with the last.
// With TN >= N_PE, streaming sustains N_PE*N_MAC multiply-accumulates per cycle.
// inf_seen is a sticky flag, cleared by start, set when any MAC produced infinity
// (float) or clipped (fixed); host software can use it to detect the overflow that
// adaptive loss scaling reacts to.
// The array shape (16 PEs x 4 MACs) and the formats are those of the design; the
// stream order, tile shape TN, the double-buffered A operand and the drain protocol
// are this implementation's own.
module gemm_top
  import lpfp_pkg::*;
#(
  parameter int unsigned N_PE      = N_PE_DEF,
  parameter int unsigned N_MAC     = N_MAC_DEF,
  parameter int unsigned TN        = TN_DEF,
  parameter int unsigned K_W       = 24,
  parameter int unsigned IN_E      = IN_E_DEF,
  parameter int unsigned IN_M      = IN_M_DEF,
  parameter int unsigned CFG       = CFG_DEF,
  parameter bit          ACC_FIXED = 1'b0,
  parameter int unsigned FX_I      = FX_I_DEF,
  parameter int unsigned FX_F      = FX_F_DEF,
  localparam int unsigned DW    = IN_E + IN_M + 1,
  localparam int unsigned ACC_W = ACC_FIXED ? (FX_I + FX_F) : (IN_E + 2 * IN_M + 3),
  localparam int unsigned BLK_W = (TN > 1) ? $clog2(TN) : 1,
  localparam int unsigned TAG_W = (N_PE > 1) ? $clog2(N_PE) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [K_W-1:0]           k_len,
  output logic                     busy,
  output logic                     done,
  output logic                     inf_seen,
  input  logic                     a_valid,
  output logic                     a_ready,
  input  logic [31:0]              a_data,
  input  logic                     b_valid,
  output logic                     b_ready,
  input  logic [N_MAC-1:0][31:0]   b_data,
  output logic                     c_valid,
  input  logic                     c_ready,
  output logic [N_MAC-1:0][31:0]   c_data,
  output logic [TAG_W-1:0]         c_row,
  output logic [BLK_W-1:0]         c_blk
);

  initial assert (TN >= N_PE) else $error("gemm_top: TN must be at least N_PE");

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_RUN, S_FLUSH, S_LOAD, S_OUT} state_t;
  state_t state;

  logic [K_W-1:0]  k_cnt, k_last;
  logic [BLK_W:0]  beat;        // beat within a k step (also preload / flush count)
  logic [BLK_W-1:0] blk;
  logic [TAG_W-1:0] row;

  logic need_a, step, en;
  logic c_load, c_shift;

  // ---- input conversion (A read / B read) ----
  logic [DW-1:0]            a_lp;
  logic [N_MAC-1:0][DW-1:0] b_lp;

  fp32_to_lpfp #(.IN_E(IN_E), .IN_M(IN_M), .CFG(CFG)) u_cvt_a (.x(a_data), .y(a_lp));
  for (genvar j = 0; j < N_MAC; j++) begin : g_cvt_b
    fp32_to_lpfp #(.IN_E(IN_E), .IN_M(IN_M), .CFG(CFG)) u_cvt_b (.x(b_data[j]), .y(b_lp[j]));
  end

  // ---- sequencing ----
  always_comb begin
    need_a  = 1'b0;
    step    = 1'b0;
    a_ready = 1'b0;
    b_ready = 1'b0;
    case (state)
      S_PRE: begin
        a_ready = 1'b1;
        step    = a_valid;
      end
      S_RUN: begin
        need_a  = (beat < (BLK_W+1)'(N_PE)) && (k_cnt != k_last);
        a_ready = need_a & b_valid;
        b_ready = need_a ? a_valid : 1'b1;
        step    = b_valid & (a_valid | ~need_a);
      end
      S_FLUSH: step = 1'b1;
      default: ;
    endcase
    en      = step;
    c_load  = (state == S_LOAD);
    c_shift = (state == S_OUT) && c_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      k_cnt  <= '0;
      k_last <= '0;
      beat   <= '0;
      blk    <= '0;
      row    <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state  <= S_PRE;
          k_last <= k_len - 1'b1;
          k_cnt  <= '0;
          beat   <= '0;
        end
        S_PRE: if (step) begin
          if (beat == (BLK_W+1)'(N_PE - 1)) begin
            beat  <= '0;
            state <= S_RUN;
          end else beat <= beat + 1'b1;
        end
        S_RUN: if (step) begin
          if (beat == (BLK_W+1)'(TN - 1)) begin
            beat <= '0;
            if (k_cnt == k_last) state <= S_FLUSH;
            else                 k_cnt <= k_cnt + 1'b1;
          end else beat <= beat + 1'b1;
        end
        S_FLUSH: begin
          if (beat == (BLK_W+1)'(N_PE - 1)) begin
            beat  <= '0;
            blk   <= '0;
            state <= S_LOAD;
          end else beat <= beat + 1'b1;
        end
        S_LOAD: begin
          row   <= '0;
          state <= S_OUT;
        end
        S_OUT: if (c_ready) begin
          if (row == TAG_W'(N_PE - 1)) begin
            if (blk == BLK_W'(TN - 1)) state <= S_IDLE;
            else begin
              blk   <= blk + 1'b1;
              state <= S_LOAD;
            end
          end else row <= row + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_OUT) && c_ready && (row == TAG_W'(N_PE - 1)) &&
                (blk == BLK_W'(TN - 1));

  // ---- PE chain ----
  logic [N_PE:0]                    a_v, b_v, b_f, b_k0;
  logic [N_PE:0][TAG_W-1:0]         a_t;
  logic [N_PE:0][DW-1:0]            a_d;
  logic [N_PE:0][BLK_W-1:0]         b_blk;
  logic [N_PE:0][N_MAC-1:0][DW-1:0] b_d;
  logic [N_PE:0][N_MAC-1:0][ACC_W-1:0] c_d;
  logic [N_PE-1:0]                  pe_ovf;

  assign a_v[0]   = (state == S_PRE || state == S_RUN) && step && (state == S_PRE || need_a);
  assign a_t[0]   = TAG_W'(beat);
  assign a_d[0]   = a_lp;
  assign b_v[0]   = (state == S_RUN) && step;
  assign b_f[0]   = (beat == '0);
  assign b_k0[0]  = (k_cnt == '0);
  assign b_blk[0] = BLK_W'(beat);
  assign b_d[0]   = b_lp;
  assign c_d[N_PE] = '0;

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    gemm_pe #(
      .IN_E(IN_E), .IN_M(IN_M), .CFG(CFG), .ACC_FIXED(ACC_FIXED),
      .FX_I(FX_I), .FX_F(FX_F), .N_MAC(N_MAC), .TN(TN), .N_PE(N_PE), .PE_IDX(p)
    ) u_pe (
      .clk        (clk),
      .rst_n      (rst_n),
      .en         (en),
      .a_in_valid (a_v[p]),
      .a_in_tag   (a_t[p]),
      .a_in_data  (a_d[p]),
      .a_out_valid(a_v[p+1]),
      .a_out_tag  (a_t[p+1]),
      .a_out_data (a_d[p+1]),
      .b_in_valid (b_v[p]),
      .b_in_first (b_f[p]),
      .b_in_k0    (b_k0[p]),
      .b_in_blk   (b_blk[p]),
      .b_in_data  (b_d[p]),
      .b_out_valid(b_v[p+1]),
      .b_out_first(b_f[p+1]),
      .b_out_k0   (b_k0[p+1]),
      .b_out_blk  (b_blk[p+1]),
      .b_out_data (b_d[p+1]),
      .c_load     (c_load),
      .c_shift    (c_shift),
      .c_blk      (blk),
      .c_in       (c_d[p+1]),
      .c_out      (c_d[p]),
      .ovf        (pe_ovf[p])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                          inf_seen <= 1'b0;
    else if (state == S_IDLE && start)   inf_seen <= 1'b0;
    else if (|pe_ovf)                    inf_seen <= 1'b1;
  end

  // ---- output conversion (C write) ----
  for (genvar j = 0; j < N_MAC; j++) begin : g_cvt_c
    acc_to_fp32 #(
      .ACC_FIXED(ACC_FIXED), .E(IN_E + 1), .M(2 * IN_M + 1), .FX_I(FX_I), .FX_F(FX_F)
    ) u_cvt_c (.x(c_d[0][j]), .y(c_data[j]));
  end

  assign c_valid = (state == S_OUT);
  assign c_row   = row;
  assign c_blk   = blk;

endmodule
