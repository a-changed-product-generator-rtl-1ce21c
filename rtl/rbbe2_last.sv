// rbbe2_last: modified RB Booth encoder block for the last pair of Booth rows
// (rows N/2-2 and N/2-1), which absorbs its own error-correcting word so the
// whole generator has exactly N/4 RB rows.
//
// Like rbbe2, the low Booth row X supplies the positive bits at weight
// 2^(N-4) and the previous block's correction bits go into the empty low
// positions (positive bit at 2^(N-8), negative bit at 2^(N-6)). The high row
// is modified: instead of the plain decoder output Y it uses
//   Y' = Y + neg_hi + neg_lo - 1 = d_hi*A - (1 - neg_lo),
// whose complement is placed as negative bits from weight 2^(N-2) upward.
// When the high digit is zero and neg_lo is 0, Y' is the all-ones row. The
// two empty negative positions 2^(N-4) and 2^(N-3) both carry neg_lo
// (value -3*neg_lo there, which with the 4*neg_lo inside Y' leaves +neg_lo).
// The row's value is then exactly X*2^(N-4) + Y*2^(N-2) plus both +1
// corrections. The modified row is formed by one short (N+2)-bit addition;
// that arithmetic is this design's own exact solution. The published
// circuit reaches the same goal with a few gates on the row's low-order
// bits, and those gate equations are not used here. Purely combinational.
module rbbe2_last
  import rb_pkg::*;
#(
  parameter int N = 32              // operand width
) (
  input  logic [N-1:0]   a,         // multiplicand
  input  logic [2:0]     trip_lo,   // triplet of Booth row N/2-2
  input  logic [2:0]     trip_hi,   // triplet of Booth row N/2-1
  input  logic [1:0]     ecw_in,    // {~neg_hi, neg_lo} of the previous block
  output logic [2*N-1:0] rb_pos,
  output logic [2*N-1:0] rb_neg
);

  localparam int W    = 2 * N;
  localparam int BASE = N - 4;      // weight of the low Booth row
  localparam int YW   = N + 2;      // width of the modified high row

  booth_sel_t sel_lo, sel_hi;
  logic [N:0] pp_lo, pp_hi;

  mbe_encoder u_enc_lo (.triplet(trip_lo), .sel(sel_lo));
  mbe_encoder u_enc_hi (.triplet(trip_hi), .sel(sel_hi));
  mbe_pp_row #(.N(N)) u_dec_lo (.a(a), .sel(sel_lo), .pp(pp_lo));
  mbe_pp_row #(.N(N)) u_dec_hi (.a(a), .sel(sel_hi), .pp(pp_hi));

  logic signed [W-1:0]  lo_ext;
  logic signed [YW-1:0] y_mod;      // Y' = d_hi*A - (1 - neg_lo)

  assign lo_ext = W'(signed'(pp_lo));
  assign y_mod  = YW'(signed'(pp_hi)) + YW'(sel_hi.neg) + YW'(sel_lo.neg) - YW'(1);

  always_comb begin
    rb_pos = lo_ext << BASE;
    rb_neg = '0;
    rb_neg[W-1:BASE+2] = ~y_mod;
    rb_neg[BASE]       = sel_lo.neg;
    rb_neg[BASE+1]     = sel_lo.neg;
    rb_pos[BASE-4]     = ecw_in[0];
    rb_neg[BASE-2]     = ecw_in[1];
  end

  initial assert (N >= 8 && (N % 4) == 0)
    else $error("rbbe2_last: N must be a multiple of 4 and at least 8");

endmodule
