// tb_lpfp_to_fixed: exhaustive check of the E6M5 -> Q8.13 converter (truncation
// toward zero, symmetric saturation) against an exact integer reference.
module tb_lpfp_to_fixed;
  import lpfp_ref_pkg::*;

  logic [11:0] x;
  logic [20:0] q;
  logic        sat;
  int checks = 0, failures = 0, n_sat = 0;

  lpfp_to_fixed dut (.x(x), .q(q), .sat(sat));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [20:0] r;
    bit rs;
    for (int c = 0; c < 4096; c++) begin
      x = 12'(c);
      #1;
      r = e6m5_to_q813(x, rs);
      checks++;
      if (rs) n_sat++;
      if (q !== r || sat !== rs) begin
        failures++;
        if (failures < 10) $display("%h got %h/%b exp %h/%b", x, q, sat, r, rs);
      end
    end
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
