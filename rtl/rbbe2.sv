// rbbe2: RB Booth encoder block, producing one redundant-binary partial
// product (RBPP) row from two adjacent radix-4 Booth rows.
//
// Block IDX handles Booth rows 2*IDX (the "low" row, weight 4^(2*IDX)) and
// 2*IDX+1 (the "high" row, weight 4^(2*IDX+1)). The low row's bits become the
// positive bits of the RB row; the high row is bit-inverted and becomes the
// negative bits. Because X + Y = X - ~Y - 1, this coding, together with the
// missing +1 of every negative Booth row, leaves a correction word of this
// block equal to
//   neg_lo * 2^(4*IDX)  -  (1 - neg_hi) * 2^(4*IDX+2).
// Instead of summing those corrections as an extra row, block IDX hands its
// two correction bits on (ecw_out = {~neg_hi, neg_lo}) and the next block
// drops them into positions of its own row that are empty: positive bit at
// 2^(4*IDX-4) and negative bit at 2^(4*IDX-2). The last block absorbs its
// own correction (see rbbe2_last), so the generator needs no extra row.
// Rows are 2N digits wide with full sign extension; the tree sums them
// modulo 2^(2N). Where the corrections go is this design's choice; the
// pairing of Booth rows and the row count follow the published design.
// Block 0 has no predecessor and leaves ecw_in unconnected.
// Purely combinational.
module rbbe2
  import rb_pkg::*;
#(
  parameter int N   = 32,           // operand width
  parameter int IDX = 1             // block index, 0 .. N/4-2
) (
  input  logic [N-1:0]   a,         // multiplicand
  input  logic [2:0]     trip_lo,   // triplet of Booth row 2*IDX
  input  logic [2:0]     trip_hi,   // triplet of Booth row 2*IDX+1
  input  logic [1:0]     ecw_in,    // {~neg_hi, neg_lo} of block IDX-1
  output logic [1:0]     ecw_out,   // {~neg_hi, neg_lo} of this block
  output logic [2*N-1:0] rb_pos,    // RB row, positive bits (absolute weight)
  output logic [2*N-1:0] rb_neg     // RB row, negative bits
);

  localparam int W    = 2 * N;
  localparam int BASE = 4 * IDX;    // weight of the low Booth row

  booth_sel_t sel_lo, sel_hi;
  logic [N:0] pp_lo, pp_hi;

  mbe_encoder u_enc_lo (.triplet(trip_lo), .sel(sel_lo));
  mbe_encoder u_enc_hi (.triplet(trip_hi), .sel(sel_hi));
  mbe_pp_row #(.N(N)) u_dec_lo (.a(a), .sel(sel_lo), .pp(pp_lo));
  mbe_pp_row #(.N(N)) u_dec_hi (.a(a), .sel(sel_hi), .pp(pp_hi));

  logic signed [W-1:0] lo_ext, hi_ext;
  assign lo_ext = W'(signed'(pp_lo));
  assign hi_ext = W'(signed'(pp_hi));

  logic [W-1:0] row_pos, row_neg;   // the two Booth rows in RB form
  assign row_pos = lo_ext << BASE;
  assign row_neg = (~hi_ext) << (BASE + 2);

  if (IDX > 0) begin : g_ecw
    // previous block's corrections go into this row's empty low positions
    always_comb begin
      rb_pos = row_pos;
      rb_neg = row_neg;
      rb_pos[BASE-4] = ecw_in[0];
      rb_neg[BASE-2] = ecw_in[1];
    end
  end else begin : g_first
    // block 0 has no predecessor; ecw_in is not used
    assign rb_pos = row_pos;
    assign rb_neg = row_neg;
  end

  assign ecw_out = {~sel_hi.neg, sel_lo.neg};

endmodule
