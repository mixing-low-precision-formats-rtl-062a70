// tb_fp32_to_lpfp: checks FP32 -> E5M2 conversion (CFG5 and CFG6 encodings)
// against a nearest-even search over all codes: every code value and its
// neighbourhood, exact midpoints, random values across the range, overflow,
// underflow, infinities and NaNs.
module tb_fp32_to_lpfp;
  import lpfp_ref_pkg::*;

  logic [31:0] x;
  logic [7:0]  y5, y6;
  int checks = 0, failures = 0;

  fp32_to_lpfp dut5 (.x(x), .y(y5));
  fp32_to_lpfp #(.CFG(6)) dut6 (.x(x), .y(y6));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [7:0] r5, r6;
    #1;
    r5 = fp32_to_e5m2(x, 5);
    r6 = fp32_to_e5m2(x, 6);
    checks += 2;
    if (y5 !== r5) begin failures++; if (failures < 10) $display("CFG5 %h got %h exp %h", x, y5, r5); end
    if (y6 !== r6) begin failures++; if (failures < 10) $display("CFG6 %h got %h exp %h", x, y6, r6); end
  endtask

  initial begin
    real v;
    for (int c = 0; c < 256; c++) begin
      v = e5m2_val(8'(c), 5);
      x = real_fp32(v); check();
      x = x + 32'h0010_0000; check();          // a bit above
      x = x - 32'h0020_0000; check();          // a bit below
      // midpoint to the next code up (tie)
      v = v * (1.0 + 1.0 / 8.0 / (1.0 + (c % 4) / 4.0));
      x = real_fp32(v); check();
    end
    for (int i = 0; i < 20000; i++) begin
      x = $urandom;
      x[30:23] = 8'($urandom_range(127 - 18, 127 + 18));
      check();
    end
    x = 32'h7F800000; check();
    x = 32'hFF800000; check();
    x = 32'h7FC00000; check();
    x = 32'h00000001; check();
    x = 32'h80000000; check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
