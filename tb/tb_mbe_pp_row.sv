// tb_mbe_pp_row: checks the Booth partial-product decoder at N = 32 and N = 8.
// For random and corner multiplicands and every digit d in -2..2, the row read
// as a signed N+1-bit number, plus neg, must equal d*A.
module tb_mbe_pp_row;
  import rb_pkg::*;

  localparam int N = 32;
  logic [N-1:0] a;
  logic [7:0]   a8;
  booth_sel_t   sel;
  logic [N:0]   pp;
  logic [8:0]   pp8;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  mbe_pp_row #(.N(N)) dut   (.a(a),  .sel(sel), .pp(pp));
  mbe_pp_row #(.N(8)) dut8  (.a(a8), .sel(sel), .pp(pp8));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] av, input int d);
    longint exp, got;
    a   = av;
    a8  = av[7:0];
    sel.neg = (d < 0);
    sel.one = (d == 1 || d == -1);
    sel.two = (d == 2 || d == -2);
    @(posedge clk);
    exp = longint'(d) * longint'(signed'(av));
    got = longint'(signed'(pp)) + longint'(sel.neg);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL N=32 a=%h d=%0d pp=%h", av, d, pp);
    end
    exp = longint'(d) * longint'(signed'(av[7:0]));
    got = longint'(signed'(pp8)) + longint'(sel.neg);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL N=8 a=%h d=%0d pp=%h", av[7:0], d, pp8);
    end
  endtask

  initial begin
    logic [N-1:0] corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000,
                                  32'h7FFF_FFFF, 32'h8000_0080};
    foreach (corners[k])
      for (int d = -2; d <= 2; d++) check(corners[k], d);
    for (int r = 0; r < 2000; r++)
      check($urandom, int'($urandom_range(4)) - 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
