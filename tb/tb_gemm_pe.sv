// tb_gemm_pe: checks one processing element (PE_IDX=2 of 4, TN=4) in isolation:
// the A and B chains forward their inputs with one cycle of delay and hold under
// stall; the PE keeps only the A value tagged with its index, and the held operand
// changes only with the first B vector of a k step, even when the next A value
// arrives in the middle of the current step; the MAC sums match a reference; and
// the C chain loads the sums and shifts in its neighbour's values.
module tb_gemm_pe;
  import lpfp_ref_pkg::*;

  localparam int N_MAC = 4, TN = 4, N_PE = 4, IDX = 2, K = 5;

  logic clk = 0, rst_n, en;
  logic a_in_valid, a_out_valid;
  logic [1:0] a_in_tag, a_out_tag;
  logic [7:0] a_in_data, a_out_data;
  logic b_in_valid, b_in_first, b_in_k0, b_out_valid, b_out_first, b_out_k0;
  logic [1:0] b_in_blk, b_out_blk;
  logic [N_MAC-1:0][7:0] b_in_data, b_out_data;
  logic c_load, c_shift;
  logic [1:0] c_blk;
  logic [N_MAC-1:0][11:0] c_in, c_out;
  logic ovf;

  gemm_pe #(.N_MAC(N_MAC), .TN(TN), .N_PE(N_PE), .PE_IDX(IDX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_stall = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]  A [K];
  logic [7:0]  B [K][TN][N_MAC];
  logic [11:0] S [TN][N_MAC];

  function automatic logic [7:0] rnd_op();
    logic [7:0] c = 8'($urandom);
    c[6:2] = 5'($urandom_range(10, 20));
    return c;
  endfunction

  // one enabled beat; stalls with scrambled inputs are inserted at random and the
  // chain outputs are checked after every beat
  task automatic beat(logic av, logic [1:0] at, logic [7:0] ad,
                      logic bv, logic bf, logic bk0, logic [1:0] bb,
                      logic [N_MAC-1:0][7:0] bd);
    logic [7:0] pa_d, pb0;
    logic       pa_v;
    while ($urandom_range(0, 3) == 0) begin
      @(negedge clk);
      pa_v = a_out_valid; pa_d = a_out_data; pb0 = b_out_data[0];
      en = 0; a_in_valid = 1; a_in_tag = 2'(IDX); a_in_data = 8'($urandom);
      b_in_valid = 1; b_in_first = 1; b_in_data = {N_MAC{8'($urandom)}};
      n_stall++;
      @(posedge clk); #1;
      checks++;
      if (a_out_valid !== pa_v || a_out_data !== pa_d || b_out_data[0] !== pb0) failures++;
    end
    @(negedge clk);
    en = 1;
    a_in_valid = av; a_in_tag = at; a_in_data = ad;
    b_in_valid = bv; b_in_first = bf; b_in_k0 = bk0; b_in_blk = bb; b_in_data = bd;
    @(posedge clk); #1;
    checks++;
    if (a_out_valid !== av || a_out_tag !== at || a_out_data !== ad ||
        b_out_valid !== bv || b_out_first !== bf || b_out_blk !== bb || b_out_data !== bd)
      failures++;
  endtask

  initial begin
    logic [N_MAC-1:0][7:0] v;
    logic [11:0] p;
    rst_n = 0; en = 0; c_load = 0; c_shift = 0; c_blk = 0; c_in = '0;
    a_in_valid = 0; a_in_tag = 0; a_in_data = 0;
    b_in_valid = 0; b_in_first = 0; b_in_k0 = 0; b_in_blk = 0; b_in_data = '0;
    for (int k = 0; k < K; k++) begin
      A[k] = rnd_op();
      for (int t = 0; t < TN; t++) for (int j = 0; j < N_MAC; j++) B[k][t][j] = rnd_op();
    end
    // reference sums in MAC order
    for (int t = 0; t < TN; t++) for (int j = 0; j < N_MAC; j++)
      for (int k = 0; k < K; k++) begin
        p = e5m2_mul(A[k], B[k][t][j], 5);
        S[t][j] = e6m5_add((k == 0) ? 12'h000 : S[t][j], p);
      end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // preload column 0: tags 0..3, only tag IDX is ours
    for (int t = 0; t < N_PE; t++)
      beat(1, 2'(t), (t == IDX) ? A[0] : 8'($urandom), 0, 0, 0, 0, '0);
    for (int k = 0; k < K; k++)
      for (int t = 0; t < TN; t++) begin
        for (int j = 0; j < N_MAC; j++) v[j] = B[k][t][j];
        // the next column's A value arrives at beat 1, inside the current step
        beat((k < K - 1), 2'(t == 1 ? IDX : (IDX + 1 + t % 3) % 4),
             (t == 1 && k < K - 1) ? A[k + 1] : 8'($urandom),
             1, (t == 0), (k == 0), 2'(t), v);
      end
    beat(0, 0, 0, 0, 0, 0, 0, '0);   // last B vector reaches the MACs

    @(negedge clk) en = 0;
    for (int t = 0; t < TN; t++) begin
      @(negedge clk);
      c_load = 1; c_blk = 2'(t);
      @(posedge clk); #1;
      c_load = 0;
      for (int j = 0; j < N_MAC; j++) begin
        checks++;
        if (c_out[j] !== S[t][j]) begin
          failures++;
          if (failures < 10) $display("blk%0d mac%0d got %h exp %h", t, j, c_out[j], S[t][j]);
        end
      end
    end
    // C chain shift
    @(negedge clk);
    c_in = {12'h123, 12'h456, 12'h789, 12'hABC}; c_shift = 1;
    @(posedge clk); #1;
    c_shift = 0;
    checks++;
    if (c_out !== {12'h123, 12'h456, 12'h789, 12'hABC}) failures++;
    if (n_stall == 0) failures++;
    $display("stalls=%0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
