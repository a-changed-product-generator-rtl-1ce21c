// rb_adder: one RBPP accumulation stage, a carry-free adder of two
// W-digit redundant-binary numbers.
//
// Digit i of an operand is pos[i] - neg[i] in {-1, 0, 1}. Step 1 forms the
// digit sum z_i = x_i + y_i in {-2..2} and splits it into an intermediate
// carry c_i and sum s_i with z_i = 2*c_i + s_i, looking at whether both
// operand digits at position i-1 are non-negative (h_{i-1}):
//   z = +2 -> c = +1, s = 0        z = -2 -> c = -1, s = 0
//   z = +1 -> h ? (c = +1, s = -1) : (c = 0, s = +1)
//   z = -1 -> h ? (c = 0, s = -1)  : (c = -1, s = +1)
// Step 2 adds t_i = s_i + c_{i-1}, which always stays in {-1, 0, 1}, so no
// carry travels further than one position: each output digit depends only
// on operand digits i, i-1 and i-2, whatever W is. The carry out of the top
// digit is dropped (result modulo 2^W). Output digits use the encodings
// (1,0) = +1, (0,1) = -1, (0,0) = 0. The top intermediate carry is
// therefore computed but not used. This is the standard RB addition rule;
// the published design uses such adders but gives no gate equations.
// Purely combinational.
module rb_adder #(
  parameter int W = 64                  // number of RB digits
) (
  input  logic [W-1:0] x_pos,
  input  logic [W-1:0] x_neg,
  input  logic [W-1:0] y_pos,
  input  logic [W-1:0] y_neg,
  output logic [W-1:0] s_pos,
  output logic [W-1:0] s_neg
);

  logic [W-1:0] h;                      // both operand digits >= 0
  logic [W-1:0] c_pos, c_neg;           // intermediate carry c_i
  logic [W-1:0] m_pos, m_neg;           // intermediate sum s_i

  always_comb begin
    for (int i = 0; i < W; i++) begin
      logic signed [2:0] z;
      logic              h_lo;
      z    = 3'(signed'({1'b0, x_pos[i]})) - 3'(signed'({1'b0, x_neg[i]}))
           + 3'(signed'({1'b0, y_pos[i]})) - 3'(signed'({1'b0, y_neg[i]}));
      h[i] = ~(x_neg[i] & ~x_pos[i]) & ~(y_neg[i] & ~y_pos[i]);
      h_lo = (i == 0) ? 1'b1 : h[(i == 0) ? 0 : i-1];
      c_pos[i] = 1'b0; c_neg[i] = 1'b0;
      m_pos[i] = 1'b0; m_neg[i] = 1'b0;
      case (z)
        3'sd2:  c_pos[i] = 1'b1;
        -3'sd2: c_neg[i] = 1'b1;
        3'sd1:  if (h_lo) begin c_pos[i] = 1'b1; m_neg[i] = 1'b1; end
                else      m_pos[i] = 1'b1;
        -3'sd1: if (h_lo) m_neg[i] = 1'b1;
                else begin c_neg[i] = 1'b1; m_pos[i] = 1'b1; end
        default: ;
      endcase
    end
  end

  // t_i = s_i + c_{i-1}; the two never have the same non-zero sign
  logic [W-1:0] cin_pos, cin_neg;
  assign cin_pos = {c_pos[W-2:0], 1'b0};
  assign cin_neg = {c_neg[W-2:0], 1'b0};

  always_comb begin
    for (int i = 0; i < W; i++) begin
      logic signed [2:0] t;
      t = 3'(signed'({1'b0, m_pos[i]})) - 3'(signed'({1'b0, m_neg[i]}))
        + 3'(signed'({1'b0, cin_pos[i]})) - 3'(signed'({1'b0, cin_neg[i]}));
      s_pos[i] = (t > 0);
      s_neg[i] = (t < 0);
    end
  end

endmodule
