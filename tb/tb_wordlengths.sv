// tb_wordlengths: runs the multiplier at the four word lengths of the
// published delay comparison, N = 8, 16, 32 and 64 (2, 4, 8 and 16 RB
// rows; 1, 2, 3 and 4 accumulation stages). N = 8 is checked exhaustively
// over all 65536 operand pairs; the others with corner and random operands.
// Every product is compared with a * b computed here at full width.
module tb_wordlengths;
  logic [63:0]  a, b;
  logic [15:0]  p8;
  logic [31:0]  p16;
  logic [63:0]  p32;
  logic [127:0] p64;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  rb_mbe_multiplier #(.N(8))  m8  (.a(a[7:0]),  .b(b[7:0]),  .p(p8));
  rb_mbe_multiplier #(.N(16)) m16 (.a(a[15:0]), .b(b[15:0]), .p(p16));
  rb_mbe_multiplier #(.N(32)) m32 (.a(a[31:0]), .b(b[31:0]), .p(p32));
  rb_mbe_multiplier #(.N(64)) m64 (.a(a),       .b(b),       .p(p64));

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [63:0] av, input logic [63:0] bv, input bit all);
    logic signed [127:0] e64;
    a = av; b = bv;
    @(posedge clk);
    checks++;
    if (p8 !== 16'(int'(signed'(av[7:0])) * int'(signed'(bv[7:0])))) begin
      failures++;
      if (failures < 10) $display("FAIL N=8 a=%h b=%h p=%h", av[7:0], bv[7:0], p8);
    end
    if (all) begin
      checks += 3;
      if (p16 !== 32'(int'(signed'(av[15:0])) * int'(signed'(bv[15:0])))) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 a=%h b=%h p=%h", av[15:0], bv[15:0], p16);
      end
      if (p32 !== 64'(longint'(signed'(av[31:0])) * longint'(signed'(bv[31:0])))) begin
        failures++;
        if (failures < 10) $display("FAIL N=32 a=%h b=%h p=%h", av[31:0], bv[31:0], p32);
      end
      e64 = 128'(signed'(av)) * 128'(signed'(bv));
      if (p64 !== e64) begin
        failures++;
        if (failures < 10) $display("FAIL N=64 a=%h b=%h p=%h exp=%h", av, bv, p64, e64);
      end
    end
  endtask

  initial begin
    logic [63:0] corners [6] = '{64'h0, 64'h1, '1, 64'h8000_0000_0000_0000,
                                 64'h7FFF_FFFF_FFFF_FFFF, 64'h8000_8000_8000_8080};
    foreach (corners[i])
      foreach (corners[j]) apply(corners[i], corners[j], 1'b1);
    for (int r = 0; r < 65536; r++)
      apply({$urandom, $urandom, 8'(r)} , {$urandom, $urandom, 8'(r >> 8)}, (r % 4) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
