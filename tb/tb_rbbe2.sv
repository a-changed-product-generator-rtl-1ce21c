// tb_rbbe2: checks the RB Booth encoder block at N = 32 for blocks 0 and 3.
// The RB row value (pos - neg, modulo 2^64) must equal the exact sum of the
// two Booth rows, d_lo*A*16^i + d_hi*A*4*16^i, minus this block's
// correction word c_i = neg_lo*2^(4i) - (1 - neg_hi)*2^(4i+2), plus the
// previous block's correction word rebuilt from ecw_in. The correction bits
// handed on (ecw_out) are checked against the digits too.
module tb_rbbe2;
  localparam int N = 32;
  localparam int W = 64;

  logic [N-1:0] a;
  logic [2:0]   tlo, thi;
  logic [1:0]   ecw_in;
  logic [1:0]   ecw0, ecw3;
  logic [W-1:0] p0, n0, p3, n3;
  int checks = 0, failures = 0;
  int n_handed = 0;
  logic clk = 1'b0;

  rbbe2 #(.N(N), .IDX(0)) dut0 (.a(a), .trip_lo(tlo), .trip_hi(thi), .ecw_in(2'b00),
                                .ecw_out(ecw0), .rb_pos(p0), .rb_neg(n0));
  rbbe2 #(.N(N), .IDX(3)) dut3 (.a(a), .trip_lo(tlo), .trip_hi(thi), .ecw_in(ecw_in),
                                .ecw_out(ecw3), .rb_pos(p3), .rb_neg(n3));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit(input logic [2:0] t);
    return -2 * int'(t[2]) + int'(t[1]) + int'(t[0]);
  endfunction

  task automatic check_row(input int idx, input logic [W-1:0] pos, input logic [W-1:0] neg,
                           input logic [1:0] eo, input logic [1:0] ei);
    logic [W-1:0] exp, got, truev;
    int dl, dh;
    logic nl, nh;
    dl = digit(tlo); dh = digit(thi);
    nl = (dl < 0); nh = (dh < 0);
    truev = (W'(longint'(dl) * longint'(signed'(a))) << (4*idx))
          + (W'(longint'(dh) * longint'(signed'(a))) << (4*idx + 2));
    exp = truev - (W'(nl) << (4*idx)) + (W'(!nh) << (4*idx + 2));
    if (idx > 0)
      exp = exp + (W'(ei[0]) << (4*idx - 4)) - (W'(ei[1]) << (4*idx - 2));
    got = pos - neg;
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL idx=%0d a=%h tlo=%b thi=%b ecw_in=%b got=%h exp=%h", idx, a, tlo, thi, ei, got, exp);
    end
    checks++;
    if (eo !== {!nh, nl}) begin
      failures++;
      $display("FAIL idx=%0d ecw_out=%b", idx, eo);
    end
  endtask

  initial begin
    for (int r = 0; r < 3000; r++) begin
      a      = (r < 64) ? ((r % 2) ? 32'h8000_0000 : 32'hFFFF_FFFF) : $urandom;
      tlo    = (r < 64) ? 3'(r % 8) : 3'($urandom);
      thi    = (r < 64) ? 3'(r / 8) : 3'($urandom);
      ecw_in = 2'($urandom);
      @(posedge clk);
      check_row(0, p0, n0, ecw0, 2'b00);
      check_row(3, p3, n3, ecw3, ecw_in);
      if (ecw_in != 2'b00) n_handed++;
    end
    checks++;
    if (n_handed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
