// tb_rb_mbe_multiplier: end-to-end test of the multiplier at its default
// size (N = 32, 8 RB rows, 3 accumulation stages, 64-bit product).
// Operands are corner values (0, +-1, most negative, most positive, Booth
// patterns) and random values; every product is compared with a * b
// computed here in 64-bit signed arithmetic. The test also counts how often
// each mechanism of the design occurs and fails if one never does:
//   - negative Booth digits (inverted rows whose +1 becomes a correction bit)
//   - digits of magnitude 2 (shifted multiplicand)
//   - correction bits handed from one RB block to the next (non-zero)
//   - the last block's modified high row being all ones (zero high digit,
//     non-negative low digit) and the last block absorbing a negative low digit
//   - carries produced inside the first and the last accumulation stage.
module tb_rb_mbe_multiplier;
  logic [31:0] a, b;
  logic [63:0] p;
  int checks = 0, failures = 0;
  int n_negdig = 0, n_twodig = 0, n_handed = 0, n_allones = 0, n_lastneg = 0;
  int n_carry_first = 0, n_carry_last = 0;
  logic clk = 1'b0;

  rb_mbe_multiplier dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit(input logic [32:0] bext, input int j);
    return -2 * int'(bext[2*j+2]) + int'(bext[2*j+1]) + int'(bext[2*j]);
  endfunction

  task automatic apply(input logic [31:0] av, input logic [31:0] bv);
    logic [32:0] bext;
    int dl, dh;
    a = av; b = bv;
    @(posedge clk);
    checks++;
    if (p !== 64'(longint'(signed'(av)) * longint'(signed'(bv)))) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h p=%h exp=%h", av, bv, p,
                                  64'(longint'(signed'(av)) * longint'(signed'(bv))));
    end
    // mechanism counters, from the operands
    bext = {bv, 1'b0};
    for (int j = 0; j < 16; j++) begin
      if (digit(bext, j) < 0) n_negdig++;
      if (digit(bext, j) == 2 || digit(bext, j) == -2) n_twodig++;
    end
    for (int i = 0; i < 7; i++)
      if (digit(bext, 2*i) < 0 || digit(bext, 2*i+1) >= 0) n_handed++;
    dl = digit(bext, 14); dh = digit(bext, 15);
    if (dh == 0 && dl >= 0) n_allones++;
    if (dl < 0) n_lastneg++;
    // carries inside the tree, from the design's internal adders
    if ((dut.u_tree.g_add[3].u_add.c_pos | dut.u_tree.g_add[3].u_add.c_neg) != 0) n_carry_first++;
    if ((dut.u_tree.g_add[0].u_add.c_pos | dut.u_tree.g_add[0].u_add.c_neg) != 0) n_carry_last++;
  endtask

  initial begin
    logic [31:0] corners [10] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF,
                                  32'h5555_5555, 32'hAAAA_AAAA, 32'h3333_3333, 32'hCCCC_CCCC,
                                  32'h0000_8001};
    foreach (corners[i])
      foreach (corners[j]) apply(corners[i], corners[j]);
    for (int r = 0; r < 20000; r++) apply($urandom, $urandom);
    $display("negative digits=%0d magnitude-2 digits=%0d handed-on corrections=%0d",
             n_negdig, n_twodig, n_handed);
    $display("last block: all-ones high row=%0d negative low digit=%0d", n_allones, n_lastneg);
    $display("tree carries: first stage=%0d last stage=%0d", n_carry_first, n_carry_last);
    if (n_negdig == 0 || n_twodig == 0 || n_handed == 0 || n_allones == 0 ||
        n_lastneg == 0 || n_carry_first == 0 || n_carry_last == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
