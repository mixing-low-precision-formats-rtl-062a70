// tb_mac_unit: drives a float-accumulating and a fixed-accumulating MAC with the
// same random operand stream spread over TN=4 running sums, including stall cycles
// (en low) and restarts (first), and compares every stored sum with a reference
// that accumulates in the same order.
module tb_mac_unit;
  import lpfp_ref_pkg::*;

  localparam int TN = 4;
  logic clk = 0;
  logic en, valid, first;
  logic [1:0]  blk, rd_blk;
  logic [7:0]  a, b;
  logic [11:0] rd_f;
  logic [20:0] rd_q;
  logic        ovf_f, ovf_q;
  int checks = 0, failures = 0, n_ovf = 0, n_stall = 0;

  mac_unit #(.TN(TN)) dut_f (
    .clk(clk), .en(en), .valid(valid), .first(first), .blk(blk), .a(a), .b(b),
    .rd_blk(rd_blk), .rd_data(rd_f), .ovf(ovf_f));
  mac_unit #(.TN(TN), .ACC_FIXED(1'b1)) dut_q (
    .clk(clk), .en(en), .valid(valid), .first(first), .blk(blk), .a(a), .b(b),
    .rd_blk(rd_blk), .rd_data(rd_q), .ovf(ovf_q));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [11:0] ref_f [TN];
  logic [20:0] ref_q [TN];

  function automatic logic [7:0] rnd_op();
    logic [7:0] c = 8'($urandom);
    c[6:2] = 5'($urandom_range(8, 22));     // moderate magnitudes
    return c;
  endfunction

  initial begin
    logic [11:0] p;
    bit sat;
    en = 0; valid = 0; first = 0; blk = 0; a = 0; b = 0; rd_blk = 0;
    for (int round = 0; round < 200; round++) begin
      for (int i = 0; i < 40; i++) begin
        @(negedge clk);
        en    = (i < TN) || ($urandom_range(0, 7) != 0);
        valid = 1'b1;
        blk   = 2'(i % TN);
        first = (i < TN);
        a = rnd_op(); b = rnd_op();
        if (round % 50 == 49 && i == 39) begin a = 8'h7A; b = 8'h7A; end   // overflow
        if (!en) n_stall++;
        if (en) begin
          p = e5m2_mul(a, b, 5);
          ref_f[blk] = first ? e6m5_add(12'h000, p) : e6m5_add(ref_f[blk], p);
          ref_q[blk] = q813_add(first ? 21'd0 : ref_q[blk], e6m5_to_q813(p, sat));
        end
        #1;
        if ((ovf_f | ovf_q) && en) n_ovf++;
      end
      @(negedge clk);
      en = 0; valid = 0;
      for (int j = 0; j < TN; j++) begin
        rd_blk = 2'(j);
        #1;
        checks += 2;
        if (rd_f !== ref_f[j]) begin failures++; if (failures < 10) $display("F blk%0d got %h exp %h", j, rd_f, ref_f[j]); end
        if (rd_q !== ref_q[j]) begin failures++; if (failures < 10) $display("Q blk%0d got %h exp %h", j, rd_q, ref_q[j]); end
      end
    end
    if (n_ovf == 0 || n_stall == 0) failures++;
    $display("stalls=%0d overflow events=%0d", n_stall, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
