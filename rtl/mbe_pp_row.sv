// mbe_pp_row: modified Booth partial-product decoder for one Booth row.
//
// Given the multiplicand A (N-bit two's complement) and the select lines of
// one Booth digit d, it produces the N+1-bit two's complement row
//   pp = (|d| * A) xor {N+1{neg}},
// i.e. |d|*A, bit-inverted when d is negative. The +1 that would complete
// the negation is not added here: it is left as an error-correcting bit
// (neg) that the RB row generator places elsewhere, as in all modified Booth
// multipliers. Bit k is ((one & a[k]) | (two & a[k-1])) ^ neg, with A
// sign-extended to N+1 bits. Purely combinational.
module mbe_pp_row
  import rb_pkg::*;
#(
  parameter int N = 32              // operand width
) (
  input  logic [N-1:0] a,           // multiplicand
  input  booth_sel_t   sel,         // Booth select lines of this row
  output logic [N:0]   pp           // N+1-bit partial product, sign at bit N
);

  logic [N:0] a_ext;   // A sign-extended to N+1 bits
  logic [N:0] a_dbl;   // 2*A in N+1 bits

  assign a_ext = {a[N-1], a};
  assign a_dbl = {a, 1'b0};

  always_comb begin
    for (int k = 0; k <= N; k++)
      pp[k] = ((sel.one & a_ext[k]) | (sel.two & a_dbl[k])) ^ sel.neg;
  end

endmodule
