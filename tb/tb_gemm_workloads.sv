// tb_gemm_workloads: runs the default-size kernel on tiles shaped like the GEMMs of
// the evaluated training workloads, with no stream gaps, and checks every output
// element and the cycle count (16 + 16*K + 16 + 16*17) of each tile:
//   K = 576   3x3 convolution over 64 channels (largest ResNet-20 layer, forward)
//   K = 2048  one 16x64 tile of a 2048 x 2048 x 2048 GEMM
//   K = 4608  3x3 convolution over 512 channels (VGG16 / ResNet-50, forward)
// Operands are drawn like training data: activations of magnitude 2^-8..2^2,
// weights of magnitude 2^-10..2^-3, both signs. The K values follow from the layer
// shapes of those networks; the operand ranges are this testbench's own choice. The MAC
// utilisation of each tile is printed.
module tb_gemm_workloads;
  import lpfp_ref_pkg::*;

  localparam int N_PE  = 16;
  localparam int N_MAC = 4;
  localparam int TN    = 16;
  localparam int NCOL  = N_MAC * TN;
  localparam int KMAX  = 4608;

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

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] A  [N_PE][KMAX];
  logic [31:0] B  [KMAX][NCOL];
  logic [7:0]  Aq [N_PE][KMAX];
  logic [7:0]  Bq [KMAX][NCOL];
  logic [31:0] C_exp [N_PE][NCOL];
  bit          seen [N_PE][TN];

  function automatic logic [31:0] rnd_val(int lo, int hi);
    logic [31:0] x = $urandom;
    x[30:23] = 8'($urandom_range(127 + lo, 127 + hi));
    return x;
  endfunction

  task automatic make_data(int K);
    logic [11:0] acc;
    for (int i = 0; i < N_PE; i++) for (int k = 0; k < K; k++) begin
      A[i][k]  = rnd_val(-8, 1);
      Aq[i][k] = fp32_to_e5m2(A[i][k], 5);
    end
    for (int k = 0; k < K; k++) for (int j = 0; j < NCOL; j++) begin
      B[k][j]  = rnd_val(-10, -4);
      Bq[k][j] = fp32_to_e5m2(B[k][j], 5);
    end
    for (int i = 0; i < N_PE; i++) for (int j = 0; j < NCOL; j++) begin
      acc = 12'h000;
      for (int k = 0; k < K; k++) acc = e6m5_add(acc, e5m2_mul(Aq[i][k], Bq[k][j], 5));
      C_exp[i][j] = e6m5_to_fp32(acc);
    end
  endtask

  logic fire_a = 0, fire_b = 0, done_q = 0;
  int busy_cnt = 0, a_idx = 0, b_idx = 0, K_cur = 0;
  always @(posedge clk) begin
    fire_a <= a_valid && a_ready;
    fire_b <= b_valid && b_ready;
    done_q <= done;
    if (busy) busy_cnt <= busy_cnt + 1;
  end
  always @(negedge clk) begin
    if (fire_a) a_idx++;
    if (fire_b) b_idx++;
    #1;
    a_valid = (a_idx < N_PE * K_cur);
    a_data  = a_valid ? A[a_idx % N_PE][a_idx / N_PE] : 32'd0;
    b_valid = (b_idx < TN * K_cur);
    for (int j = 0; j < N_MAC; j++)
      b_data[j] = b_valid ? B[b_idx / TN][(b_idx % TN) * N_MAC + j] : 32'd0;
    c_ready = 1'b1;
  end

  always @(posedge clk) if (rst_n && c_valid && c_ready) begin
    for (int j = 0; j < N_MAC; j++) begin
      checks++;
      if (c_data[j] !== C_exp[c_row][c_blk * N_MAC + j]) begin
        failures++;
        if (failures < 10)
          $display("C[%0d][%0d] got %h exp %h", c_row, c_blk * N_MAC + j, c_data[j],
                   C_exp[c_row][c_blk * N_MAC + j]);
      end
    end
    seen[c_row][c_blk] = 1'b1;
  end

  task automatic run_tile(int K);
    int expect_cyc;
    make_data(K);
    for (int i = 0; i < N_PE; i++) for (int b = 0; b < TN; b++) seen[i][b] = 1'b0;
    @(negedge clk);
    K_cur = K; k_len = 24'(K); start = 1'b1; busy_cnt = 0;
    @(negedge clk);
    start = 1'b0;
    while (!done_q) @(negedge clk);
    expect_cyc = N_PE + TN * K + N_PE + TN * (N_PE + 1);
    checks++;
    if (busy_cnt != expect_cyc) begin
      failures++;
      $display("K=%0d: %0d cycles, expected %0d", K, busy_cnt, expect_cyc);
    end
    for (int i = 0; i < N_PE; i++) for (int b = 0; b < TN; b++) begin
      checks++;
      if (!seen[i][b]) failures++;
    end
    checks++;
    if (inf_seen) failures++;
    $display("K=%0d: %0d cycles, %0d MACs, %.1f MAC/cycle of %0d", K, busy_cnt,
             N_PE * NCOL * K, real'(N_PE * NCOL * K) / real'(busy_cnt), N_PE * N_MAC);
    a_idx = 0; b_idx = 0; K_cur = 0;
  endtask

  initial begin
    rst_n = 0; start = 0; k_len = 0;
    a_valid = 0; b_valid = 0; c_ready = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run_tile(576);
    run_tile(2048);
    run_tile(4608);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
