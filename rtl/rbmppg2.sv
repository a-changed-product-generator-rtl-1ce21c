// rbmppg2: redundant-binary modified partial product generator (RBMPPG-2).
//
// For N-bit signed operands A (multiplicand) and B (multiplier) it produces
// ROWS = N/4 redundant-binary partial product rows whose sum, modulo
// 2^(2N), is A*B. Booth triplet j is {b[2j+1], b[2j], b[2j-1]} with
// b[-1] = 0. Block i (an rbbe2) pairs Booth rows 2i and 2i+1; each block
// passes its two error-correcting bits to the next block, and the last block
// (rbbe2_last) absorbs its own, so there is no separate error-correcting
// word (ECW) row: N/4 rows, where a conventional RB Booth generator needs
// N/4 + 1. That row count is the point of the design; which positions carry
// the correction bits is this implementation's choice (see rbbe2).
// Row r is given as absolute-weight 2N-bit positive and negative vectors.
// N must be a power of two, at least 8. Purely combinational.
module rbmppg2 #(
  parameter int N = 32                          // operand width
) (
  input  logic [N-1:0]   a,                     // multiplicand
  input  logic [N-1:0]   b,                     // multiplier
  output logic [2*N-1:0] rows_pos [N/4],        // RB rows, positive bits
  output logic [2*N-1:0] rows_neg [N/4]         // RB rows, negative bits
);

  localparam int ROWS = N / 4;

  logic [N:0] b_ext;                            // {b, b[-1] = 0}
  logic [1:0] ecw [ROWS-1];                     // correction bits per block

  assign b_ext = {b, 1'b0};

  for (genvar i = 0; i < ROWS - 1; i++) begin : g_blk
    rbbe2 #(.N(N), .IDX(i)) u_rbbe2 (
      .a       (a),
      .trip_lo (b_ext[4*i+2 -: 3]),
      .trip_hi (b_ext[4*i+4 -: 3]),
      .ecw_in  (i == 0 ? 2'b00 : ecw[i == 0 ? 0 : i-1]),
      .ecw_out (ecw[i]),
      .rb_pos  (rows_pos[i]),
      .rb_neg  (rows_neg[i])
    );
  end

  rbbe2_last #(.N(N)) u_last (
    .a       (a),
    .trip_lo (b_ext[N-2 -: 3]),
    .trip_hi (b_ext[N   -: 3]),
    .ecw_in  (ecw[ROWS-2]),
    .rb_pos  (rows_pos[ROWS-1]),
    .rb_neg  (rows_neg[ROWS-1])
  );

  initial assert (N >= 8 && (N & (N - 1)) == 0)
    else $error("rbmppg2: N must be a power of two, at least 8");

endmodule
