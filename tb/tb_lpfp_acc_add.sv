// tb_lpfp_acc_add: checks the E6M5 accumulator adder against exact integer sums
// rounded to nearest-even: random operand pairs, pairs with close exponents (deep
// cancellation), subnormals, overflow to infinity and infinite operands.
module tb_lpfp_acc_add;
  import lpfp_ref_pkg::*;

  logic [11:0] x, y, s;
  logic        si;
  int checks = 0, failures = 0;
  int n_inf = 0, n_sub = 0, n_rnd = 0;

  lpfp_acc_add dut (.acc(x), .addend(y), .sum(s), .sum_inf(si));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [11:0] r;
    #1;
    r = e6m5_add(x, y);
    checks++;
    if (e6m5_is_inf(r)) n_inf++;
    if (r[10:5] == 0 && r[4:0] != 0) n_sub++;
    if (!e6m5_is_inf(r) && e6m5_int(r) != e6m5_int(x) + e6m5_int(y)) n_rnd++;
    if (s !== r || si !== e6m5_is_inf(r)) begin
      failures++;
      if (failures < 10) $display("%h + %h got %h exp %h", x, y, s, r);
    end
  endtask

  initial begin
    for (int i = 0; i < 200000; i++) begin
      x = 12'($urandom);
      y = 12'($urandom);
      if (i % 4 == 1) y[10:5] = x[10:5] + 6'($urandom_range(0, 2)) - 6'd1;
      if (i % 4 == 2) begin x[10:5] = 6'($urandom_range(0, 2)); y[10:5] = 6'($urandom_range(0, 2)); end
      if (i % 4 == 3) begin x[10:5] = 6'($urandom_range(60, 63)); y[10:5] = 6'($urandom_range(58, 63)); end
      check();
    end
    // exact cancellation and signed zeros
    x = 12'h3A5; y = 12'hBA5; check();
    x = 12'h800; y = 12'h800; check();
    x = 12'h7FF; y = 12'hFFF; check();
    x = 12'h000; y = 12'h7FF; check();
    if (n_inf == 0 || n_sub == 0 || n_rnd == 0) failures++;
    $display("cases: inf=%0d subnormal=%0d rounded=%0d", n_inf, n_sub, n_rnd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
