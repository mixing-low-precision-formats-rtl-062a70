// tb_acc_to_fp32: exhaustive check of E6M5 -> FP32 and a random plus edge check of
// Q8.13 -> FP32; both conversions must be exact.
module tb_acc_to_fp32;
  import lpfp_ref_pkg::*;

  logic [11:0] xf;
  logic [20:0] xq;
  logic [31:0] yf, yq;
  int checks = 0, failures = 0;

  acc_to_fp32 dut_f (.x(xf), .y(yf));
  acc_to_fp32 #(.ACC_FIXED(1'b1)) dut_q (.x(xq), .y(yq));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_q(logic [20:0] v);
    xq = v;
    #1;
    checks++;
    if (yq !== q813_to_fp32(xq)) begin
      failures++;
      if (failures < 10) $display("Q %h got %h exp %h", xq, yq, q813_to_fp32(xq));
    end
  endtask

  initial begin
    for (int c = 0; c < 4096; c++) begin
      xf = 12'(c);
      #1;
      checks++;
      if (yf !== e6m5_to_fp32(xf)) begin
        failures++;
        if (failures < 10) $display("F %h got %h exp %h", xf, yf, e6m5_to_fp32(xf));
      end
    end
    for (int i = 0; i < 20000; i++) check_q(21'($urandom));
    check_q(21'h000000); check_q(21'h000001); check_q(21'h1FFFFF);
    check_q(21'h0FFFFF); check_q(21'h100000); check_q(21'h100001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
