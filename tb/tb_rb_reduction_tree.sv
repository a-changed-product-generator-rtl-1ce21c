// tb_rb_reduction_tree: checks the RB reduction tree with 8 rows of 64
// digits and with 2 rows of 16 digits. The RB result must equal the sum of
// the row values modulo 2^W for random rows.
module tb_rb_reduction_tree;
  logic [63:0] rp [8];
  logic [63:0] rn [8];
  logic [63:0] sp, sn;
  logic [15:0] rp2 [2];
  logic [15:0] rn2 [2];
  logic [15:0] sp2, sn2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  rb_reduction_tree #(.ROWS(8), .W(64)) dut  (.rows_pos(rp),  .rows_neg(rn),  .sum_pos(sp),  .sum_neg(sn));
  rb_reduction_tree #(.ROWS(2), .W(16)) dut2 (.rows_pos(rp2), .rows_neg(rn2), .sum_pos(sp2), .sum_neg(sn2));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3000; r++) begin
      logic [63:0] exp;
      logic [15:0] exp2;
      exp = '0; exp2 = '0;
      foreach (rp[k]) begin
        rp[k] = {$urandom, $urandom};
        rn[k] = (r % 3 == 0) ? '0 : {$urandom, $urandom};
        exp += rp[k] - rn[k];
      end
      foreach (rp2[k]) begin
        rp2[k] = 16'($urandom);
        rn2[k] = 16'($urandom);
        exp2 += rp2[k] - rn2[k];
      end
      @(posedge clk);
      checks++;
      if ((sp - sn) !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL 8 rows got=%h exp=%h", sp - sn, exp);
      end
      checks++;
      if (16'(sp2 - sn2) !== exp2) begin
        failures++;
        if (failures < 10) $display("FAIL 2 rows got=%h exp=%h", sp2 - sn2, exp2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
