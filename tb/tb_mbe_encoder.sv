// tb_mbe_encoder: exhaustive check of the radix-4 Booth encoder.
// For all 8 triplets the digit d = -2*b2 + b1 + b0 is computed here and the
// select lines must satisfy one = (|d| == 1), two = (|d| == 2), neg = (d < 0).
module tb_mbe_encoder;
  import rb_pkg::*;

  logic [2:0] triplet;
  booth_sel_t sel;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  mbe_encoder dut (.triplet(triplet), .sel(sel));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      int d;
      triplet = 3'(t);
      @(posedge clk);
      d = -2 * t[2] + t[1] + t[0];
      checks++;
      if (sel.one !== (d == 1 || d == -1) || sel.two !== (d == 2 || d == -2) ||
          sel.neg !== (d < 0)) begin
        failures++;
        $display("FAIL triplet=%b d=%0d sel=%b", triplet, d, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
