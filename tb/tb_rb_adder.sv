// tb_rb_adder: checks one RB accumulation stage at W = 64 and W = 16.
// Operands are random RB numbers using all four digit encodings, including
// (1,1) for zero. The result value must be (X + Y) modulo 2^W, and every
// output digit must use a canonical encoding (never both bits set).
// Digit sums of +-2 and carries into a digit are counted.
module tb_rb_adder;
  logic [63:0] xp, xn, yp, yn, sp, sn;
  logic [15:0] sp16, sn16;
  int checks = 0, failures = 0;
  int n_twos = 0;
  logic clk = 1'b0;

  rb_adder #(.W(64)) dut   (.x_pos(xp), .x_neg(xn), .y_pos(yp), .y_neg(yn), .s_pos(sp), .s_neg(sn));
  rb_adder #(.W(16)) dut16 (.x_pos(xp[15:0]), .x_neg(xn[15:0]), .y_pos(yp[15:0]), .y_neg(yn[15:0]),
                            .s_pos(sp16), .s_neg(sn16));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 5000; r++) begin
      xp = {$urandom, $urandom}; xn = {$urandom, $urandom};
      yp = {$urandom, $urandom}; yn = {$urandom, $urandom};
      if (r % 4 == 1) begin xn = '0; yn = '0; end   // all-positive operands
      if (r % 4 == 2) begin xp = '0; yp = '0; end   // all-negative operands
      @(posedge clk);
      if (((xp & ~xn) & (yp & ~yn)) != 0 || ((xn & ~xp) & (yn & ~yp)) != 0) n_twos++;
      checks++;
      if ((sp - sn) !== (xp - xn) + (yp - yn)) begin
        failures++;
        if (failures < 10) $display("FAIL W=64 got=%h exp=%h", sp - sn, (xp - xn) + (yp - yn));
      end
      checks++;
      if ((sp & sn) != 0 || (sp16 & sn16) != 0) begin
        failures++;
        $display("FAIL non-canonical output digit");
      end
      checks++;
      if (16'(sp16 - sn16) !== 16'((xp - xn) + (yp - yn))) begin
        failures++;
        if (failures < 10) $display("FAIL W=16");
      end
    end
    checks++;
    if (n_twos == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
