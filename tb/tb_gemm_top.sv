// tb_gemm_top: end-to-end test of the GEMM kernel at its default size (16 PEs x
// 4 MACs, 16 column blocks: a 16 x 64 output tile). Three tiles are computed from
// random FP32 operands and every output element is compared with a reference that
// rounds the operands to E5M2, multiplies exactly and accumulates in the MAC's
// order and format:
//   tile 1: K=6 with random gaps on the A and B streams and random c_ready;
//   tile 2: K=3 with one huge A value, so a row overflows to infinity and
//           inf_seen must rise;
//   tile 3: K=4 with no gaps, to check the cycle count of preload, streaming,
//           flush and drain.
// Counted mechanisms: input stalls, output back-pressure, A double-buffer swaps
// (k steps after the first), overflow to infinity.
module tb_gemm_top;
  import lpfp_ref_pkg::*;

  localparam bit FIXED = 1'b0;
  localparam int N_PE  = 16;
  localparam int N_MAC = 4;
  localparam int TN    = 16;
  localparam int NCOL  = N_MAC * TN;
  localparam int KMAX  = 8;

  logic clk = 0;
  logic rst_n, start, busy, done, inf_seen;
  logic [23:0] k_len;
  logic a_valid, a_ready, b_valid, b_ready, c_valid, c_ready;
  logic [31:0] a_data;
  logic [N_MAC-1:0][31:0] b_data, c_data;
  logic [3:0] c_row;
  logic [3:0] c_blk;

  gemm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_bp = 0, n_swap = 0, n_inf_tiles = 0, n_inf_out = 0;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] A [N_PE][KMAX];
  logic [31:0] B [KMAX][NCOL];
  logic [31:0] C_exp [N_PE][NCOL];
  bit          seen [N_PE][TN];

  function automatic logic [31:0] rnd_fp32();
    logic [31:0] x = $urandom;
    x[30:23] = 8'($urandom_range(127 - 6, 127 + 1));
    return x;
  endfunction

  task automatic make_ref(int K);
    logic [11:0] p, accf;
    logic [20:0] accq;
    bit sat;
    for (int i = 0; i < N_PE; i++)
      for (int j = 0; j < NCOL; j++) begin
        accf = 12'h000; accq = '0;
        for (int k = 0; k < K; k++) begin
          p = e5m2_mul(fp32_to_e5m2(A[i][k], 5), fp32_to_e5m2(B[k][j], 5), 5);
          accf = e6m5_add((k == 0) ? 12'h000 : accf, p);
          accq = q813_add((k == 0) ? 21'd0 : accq, e6m5_to_q813(p, sat));
        end
        C_exp[i][j] = FIXED ? q813_to_fp32(accq) : e6m5_to_fp32(accf);
      end
  endtask

  // stream drivers: valid never depends on ready
  int gap_pct;
  int a_idx, b_idx, K_cur;
  logic fire_a = 0, fire_b = 0, done_q = 0;
  int busy_cnt = 0;
  always @(posedge clk) begin
    done_q <= done;
    if (busy) busy_cnt <= busy_cnt + 1;
    fire_a <= a_valid && a_ready;
    fire_b <= b_valid && b_ready;
  end
  always @(negedge clk) begin
    if (fire_a) a_idx++;
    if (fire_b) b_idx++;
  end
  always @(negedge clk) begin
    #1;
    a_valid = (a_idx < N_PE * K_cur) && ($urandom_range(0, 99) >= gap_pct);
    a_data  = (a_idx < N_PE * K_cur) ? A[a_idx % N_PE][a_idx / N_PE] : 32'd0;
    b_valid = (b_idx < TN * K_cur) && ($urandom_range(0, 99) >= gap_pct);
    for (int j = 0; j < N_MAC; j++)
      b_data[j] = (b_idx < TN * K_cur) ? B[b_idx / TN][(b_idx % TN) * N_MAC + j] : 32'd0;
    c_ready = ($urandom_range(0, 99) >= gap_pct);
  end

  // mechanism counters, from the ports only: a stall is a cycle of the input
  // phase in which neither stream moved; a swap is a B beat that starts a k step
  // after the first (the held A operand changes there)
  always @(posedge clk) if (rst_n) begin
    if (busy && (a_idx < N_PE * K_cur || b_idx < TN * K_cur) &&
        !(a_valid && a_ready) && !(b_valid && b_ready)) n_stall++;
    if (c_valid && !c_ready) n_bp++;
    if (b_valid && b_ready && b_idx % TN == 0 && b_idx >= TN) n_swap++;
  end

  // output checker
  always @(posedge clk) if (rst_n && c_valid && c_ready) begin
    for (int j = 0; j < N_MAC; j++) begin
      checks++;
      if (c_data[j][30:0] == 31'h7F800000) n_inf_out++;
      if (c_data[j] !== C_exp[c_row][c_blk * N_MAC + j]) begin
        failures++;
        if (failures < 10)
          $display("C[%0d][%0d] got %h exp %h", c_row, c_blk * N_MAC + j, c_data[j],
                   C_exp[c_row][c_blk * N_MAC + j]);
      end
    end
    if (seen[c_row][c_blk]) failures++;
    seen[c_row][c_blk] = 1'b1;
  end

  task automatic run_tile(int K, int gaps, output int cycles);
    for (int i = 0; i < N_PE; i++) for (int b = 0; b < TN; b++) seen[i][b] = 1'b0;
    make_ref(K);
    @(negedge clk);
    a_idx = 0; b_idx = 0; K_cur = K; gap_pct = gaps;
    k_len = 24'(K); start = 1'b1; busy_cnt = 0;
    @(negedge clk);
    start = 1'b0;
    while (!done_q) @(negedge clk);
    cycles = busy_cnt;
    for (int i = 0; i < N_PE; i++) for (int b = 0; b < TN; b++) begin
      checks++;
      if (!seen[i][b]) failures++;
    end
  endtask

  initial begin
    int cyc, expect_cyc;
    rst_n = 0; start = 0; k_len = 0; K_cur = 0; gap_pct = 0;
    a_idx = 0; b_idx = 0; a_valid = 0; b_valid = 0; c_ready = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // tile 1: random data, stalls and back-pressure
    for (int i = 0; i < N_PE; i++) for (int k = 0; k < KMAX; k++) A[i][k] = rnd_fp32();
    for (int k = 0; k < KMAX; k++) for (int j = 0; j < NCOL; j++) B[k][j] = rnd_fp32();
    run_tile(6, 25, cyc);
    checks++;
    if (inf_seen) failures++;

    // tile 2: overflow in row 5
    for (int i = 0; i < N_PE; i++) for (int k = 0; k < KMAX; k++) A[i][k] = rnd_fp32();
    A[5][1] = 32'h47C00000;   // 98304, the largest finite E5M2 value
    for (int k = 0; k < KMAX; k++) for (int j = 0; j < NCOL; j++) B[k][j] = rnd_fp32();
    for (int j = 0; j < NCOL; j++) B[1][j] = 32'h47C00000 | ($urandom & 32'h80000000); // +/-98304
    run_tile(3, 10, cyc);
    checks++;
    if (!inf_seen) failures++;
    else n_inf_tiles++;

    // tile 3: no gaps, cycle count
    for (int i = 0; i < N_PE; i++) for (int k = 0; k < KMAX; k++) A[i][k] = rnd_fp32();
    for (int k = 0; k < KMAX; k++) for (int j = 0; j < NCOL; j++) B[k][j] = rnd_fp32();
    run_tile(4, 0, cyc);
    expect_cyc = N_PE + 4 * TN + N_PE + TN * (N_PE + 1);
    checks++;
    if (cyc != expect_cyc) begin
      failures++;
      $display("tile cycles %0d, expected %0d", cyc, expect_cyc);
    end

    $display("mechanisms: stalls=%0d backpressure=%0d a_swaps=%0d overflow_tiles=%0d inf_outputs=%0d",
             n_stall, n_bp, n_swap, n_inf_tiles, n_inf_out);
    if (n_stall == 0) failures++;
    if (n_bp == 0) failures++;
    if (n_swap == 0) failures++;
    if (n_inf_tiles == 0 || n_inf_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
