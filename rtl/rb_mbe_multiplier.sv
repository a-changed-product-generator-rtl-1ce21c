// rb_mbe_multiplier: N x N signed redundant-binary modified-Booth multiplier.
//
// The product p = a * b (two's complement, 2N bits) is formed in three
// steps. rbmppg2 turns the N/2 radix-4 Booth rows into N/4 redundant-binary
// partial product rows, with the Booth and RB-coding corrections folded into
// the rows, so no extra correction row exists. rb_reduction_tree adds the
// rows in log2(N/4) carry-free stages (3 stages for N = 32). rb_nb_converter
// turns the final RB number into binary with one carry-propagate adder.
// The default N = 32 is the worked example of the published design; any
// power of two from 8 up works. Purely combinational: no clock, no reset,
// the product is valid one combinational delay after the operands.
module rb_mbe_multiplier #(
  parameter int N = 32                  // operand width (power of two, >= 8)
) (
  input  logic [N-1:0]   a,             // multiplicand, two's complement
  input  logic [N-1:0]   b,             // multiplier, two's complement
  output logic [2*N-1:0] p              // product a*b
);

  localparam int ROWS = N / 4;
  localparam int W    = 2 * N;

  logic [W-1:0] rows_pos [ROWS];
  logic [W-1:0] rows_neg [ROWS];
  logic [W-1:0] sum_pos, sum_neg;

  rbmppg2 #(.N(N)) u_ppg (
    .a        (a),
    .b        (b),
    .rows_pos (rows_pos),
    .rows_neg (rows_neg)
  );

  rb_reduction_tree #(.ROWS(ROWS), .W(W)) u_tree (
    .rows_pos (rows_pos),
    .rows_neg (rows_neg),
    .sum_pos  (sum_pos),
    .sum_neg  (sum_neg)
  );

  rb_nb_converter #(.W(W)) u_conv (
    .rb_pos (sum_pos),
    .rb_neg (sum_neg),
    .nb     (p)
  );

endmodule
