// tb_lpfp_mult: exhaustive check of the E5M2 x E5M2 -> E6M5 multiplier, with the
// CFG5 (default) and CFG6 readings of exponent-0 operands, against an exact
// integer reference product.
module tb_lpfp_mult;
  import lpfp_ref_pkg::*;

  logic [7:0]  a, b;
  logic [11:0] p5, p6;
  logic        i5, i6;
  int checks = 0, failures = 0;

  lpfp_mult dut5 (.a(a), .b(b), .p(p5), .p_inf(i5));
  lpfp_mult #(.CFG(6)) dut6 (.a(a), .b(b), .p(p6), .p_inf(i6));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] r5, r6;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        r5 = e5m2_mul(a, b, 5);
        r6 = e5m2_mul(a, b, 6);
        checks += 2;
        if (p5 !== r5 || i5 !== e6m5_is_inf(r5)) begin
          failures++;
          if (failures < 10) $display("CFG5 %h*%h got %h exp %h", a, b, p5, r5);
        end
        if (p6 !== r6 || i6 !== e6m5_is_inf(r6)) begin
          failures++;
          if (failures < 10) $display("CFG6 %h*%h got %h exp %h", a, b, p6, r6);
        end
      end
    end
    // spot values of the encoding: 0x01 = 1.25*2^-15, 0x7E = 98304
    a = 8'h01; b = 8'h3C; #1; checks++;            // times 1.0
    if (e6m5_int(p5) != (wide_t'(40) <<< 15)) failures++;  // 1.25*2^-15 * 2^35 = 40*2^15
    a = 8'h7E; b = 8'h3C; #1; checks++;
    if (fp32_real(e6m5_to_fp32(p5)) != 98304.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
