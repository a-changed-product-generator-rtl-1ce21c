// tb_rbmppg2: checks the RB partial product generator at N = 32 (8 rows)
// and N = 8 (2 rows, exhaustively over all operand pairs). The sum of the
// row values, each pos - neg, modulo 2^(2N), must equal the signed product.
module tb_rbmppg2;
  logic [31:0] a, b;
  logic [63:0] rp [8];
  logic [63:0] rn [8];
  logic [7:0]  a8, b8;
  logic [15:0] rp8 [2];
  logic [15:0] rn8 [2];
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  rbmppg2 #(.N(32)) dut   (.a(a),  .b(b),  .rows_pos(rp),  .rows_neg(rn));
  rbmppg2 #(.N(8))  dut8  (.a(a8), .b(b8), .rows_pos(rp8), .rows_neg(rn8));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 65536; r++) begin
      logic [63:0] sum;
      logic [15:0] sum8;
      a8 = 8'(r); b8 = 8'(r >> 8);
      a  = (r < 16) ? {r[0], 31'(r[1] ? 0 : -1)} : $urandom;
      b  = (r < 16) ? {r[2], 31'(r[3] ? 0 : -1)} : $urandom;
      @(posedge clk);
      sum8 = '0;
      foreach (rp8[k]) sum8 += rp8[k] - rn8[k];
      checks++;
      if (sum8 !== 16'(int'(signed'(a8)) * int'(signed'(b8)))) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 a=%h b=%h sum=%h", a8, b8, sum8);
      end
      if (r % 8 == 0) begin
        sum = '0;
        foreach (rp[k]) sum += rp[k] - rn[k];
        checks++;
        if (sum !== 64'(longint'(signed'(a)) * longint'(signed'(b)))) begin
          failures++;
          if (failures < 10) $display("FAIL N=32 a=%h b=%h sum=%h", a, b, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
