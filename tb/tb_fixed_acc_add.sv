// tb_fixed_acc_add: checks the Q8.13 saturating adder with random operands and
// with sums that overflow in both directions.
module tb_fixed_acc_add;
  import lpfp_ref_pkg::*;

  logic [20:0] x, y, s;
  logic        sat;
  int checks = 0, failures = 0, n_sat = 0;

  fixed_acc_add dut (.acc(x), .addend(y), .sum(s), .sat(sat));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [20:0] r;
    int exact;
    for (int i = 0; i < 50000; i++) begin
      x = 21'($urandom);
      y = 21'($urandom);
      if (i % 2 == 0) y = 21'($signed(y) >>> 6);
      #1;
      r = q813_add(x, y);
      exact = int'($signed(x)) + int'($signed(y));
      checks++;
      if (exact != int'($signed(r))) n_sat++;
      if (s !== r || sat !== (exact != int'($signed(r)))) begin
        failures++;
        if (failures < 10) $display("%h + %h got %h exp %h", x, y, s, r);
      end
    end
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
