// tb_rb_nb_converter: checks the RB-to-binary converter at W = 64: the
// binary output must equal pos - neg modulo 2^64, for corners and random
// inputs.
module tb_rb_nb_converter;
  logic [63:0] rp, rn, nb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  rb_nb_converter #(.W(64)) dut (.rb_pos(rp), .rb_neg(rn), .nb(nb));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [63:0] p, input logic [63:0] n);
    rp = p; rn = n;
    @(posedge clk);
    checks++;
    if (nb !== p - n) begin
      failures++;
      $display("FAIL pos=%h neg=%h nb=%h", p, n, nb);
    end
  endtask

  initial begin
    check('0, '0);
    check('0, 64'h1);
    check(64'h1, '0);
    check('1, '1);
    check(64'h8000_0000_0000_0000, 64'h1);
    check('0, 64'h8000_0000_0000_0000);
    for (int r = 0; r < 2000; r++) check({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
