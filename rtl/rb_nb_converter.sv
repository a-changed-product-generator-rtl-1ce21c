// rb_nb_converter: redundant-binary to normal-binary converter.
//
// The value of an RB number is pos - neg, so conversion is one W-bit
// subtraction, written as pos + ~neg + 1 and left to synthesis to map onto
// a carry-propagate adder. The result is the two's complement value modulo
// 2^W. This is the only carry-propagating step of the multiplier. The
// adder architecture is this design's choice. Purely combinational.
module rb_nb_converter #(
  parameter int W = 64                  // number of digits / result bits
) (
  input  logic [W-1:0] rb_pos,
  input  logic [W-1:0] rb_neg,
  output logic [W-1:0] nb
);

  assign nb = rb_pos + ~rb_neg + W'(1);

endmodule
