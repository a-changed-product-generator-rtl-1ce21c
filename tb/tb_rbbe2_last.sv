// tb_rbbe2_last: checks the modified last RB Booth block at N = 32 and N = 8.
// The row value (pos - neg modulo 2^(2N)) must equal the exact value of the
// last two Booth rows, d_lo*A*2^(N-4) + d_hi*A*2^(N-2), plus the previous
// block's correction word rebuilt from ecw_in: the block leaves no
// correction of its own behind. All 64 digit pairs are covered, and the
// cases where the modified high row is all ones (zero high digit, low digit
// not negative) are counted.
module tb_rbbe2_last;
  logic [31:0] a;
  logic [2:0]  tlo, thi;
  logic [1:0]  ecw_in;
  logic [63:0] p32, n32;
  logic [15:0] p8, n8;
  int checks = 0, failures = 0;
  int n_allones = 0, n_neglo = 0;
  logic clk = 1'b0;

  rbbe2_last #(.N(32)) dut32 (.a(a), .trip_lo(tlo), .trip_hi(thi), .ecw_in(ecw_in),
                              .rb_pos(p32), .rb_neg(n32));
  rbbe2_last #(.N(8))  dut8  (.a(a[7:0]), .trip_lo(tlo), .trip_hi(thi), .ecw_in(ecw_in),
                              .rb_pos(p8), .rb_neg(n8));

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

  initial begin
    for (int r = 0; r < 4000; r++) begin
      logic [63:0] exp32, got32;
      logic [15:0] exp8, got8;
      int dl, dh;
      a      = (r < 128) ? ((r % 2) ? 32'h8000_0080 : 32'hFFFF_FF7F) : $urandom;
      tlo    = (r < 128) ? 3'((r / 2) % 8) : 3'($urandom);
      thi    = (r < 128) ? 3'(r / 16) : 3'($urandom);
      ecw_in = 2'($urandom);
      @(posedge clk);
      dl = digit(tlo); dh = digit(thi);
      if (dh == 0 && dl >= 0) n_allones++;
      if (dl < 0) n_neglo++;
      exp32 = (64'(longint'(dl) * longint'(signed'(a))) << 28)
            + (64'(longint'(dh) * longint'(signed'(a))) << 30)
            + (64'(ecw_in[0]) << 24) - (64'(ecw_in[1]) << 26);
      got32 = p32 - n32;
      checks++;
      if (got32 !== exp32) begin
        failures++;
        $display("FAIL N=32 a=%h tlo=%b thi=%b ecw=%b got=%h exp=%h", a, tlo, thi, ecw_in, got32, exp32);
      end
      exp8 = (16'(dl * int'(signed'(a[7:0]))) << 4)
           + (16'(dh * int'(signed'(a[7:0]))) << 6)
           + (16'(ecw_in[0]) << 0) - (16'(ecw_in[1]) << 2);
      got8 = p8 - n8;
      checks++;
      if (got8 !== exp8) begin
        failures++;
        $display("FAIL N=8 a=%h tlo=%b thi=%b ecw=%b got=%h exp=%h", a[7:0], tlo, thi, ecw_in, got8, exp8);
      end
    end
    checks++;
    if (n_allones == 0 || n_neglo == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: allones=%0d neglo=%0d", n_allones, n_neglo);
    end
    $display("all-ones high rows: %0d, negative low digits: %0d", n_allones, n_neglo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
