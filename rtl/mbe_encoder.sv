// mbe_encoder: radix-4 modified Booth encoder for one multiplier triplet.
//
// The triplet {b[2j+1], b[2j], b[2j-1]} stands for the digit
// d = -2*b[2j+1] + b[2j] + b[2j-1]. The encoder reduces it to the select
// lines of rb_pkg::booth_sel_t: one = (|d| == 1), two = (|d| == 2) and
// neg = (d < 0). The triplet 111 (d = 0) gives neg = 0, so a zero digit
// always yields an all-zero partial product row and no correction bit; this
// is a choice of this design that the later correction logic relies on.
// The encoding itself is the standard modified Booth encoding that the
// published design builds on. Purely combinational.
module mbe_encoder
  import rb_pkg::*;
(
  input  logic [2:0]  triplet,  // {b[2j+1], b[2j], b[2j-1]}
  output booth_sel_t  sel
);

  always_comb begin
    sel.one = triplet[1] ^ triplet[0];
    sel.two = (triplet[2] & ~triplet[1] & ~triplet[0]) |
              (~triplet[2] & triplet[1] & triplet[0]);
    sel.neg = triplet[2] & ~(triplet[1] & triplet[0]);
  end

endmodule
