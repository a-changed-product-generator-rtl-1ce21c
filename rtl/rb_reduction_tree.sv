// rb_reduction_tree: RBPP reduction tree.
//
// Sums ROWS redundant-binary rows of W digits into one RB number with a
// balanced binary tree of rb_adder stages: ROWS/2 adders in the first
// accumulation stage, ROWS/4 in the second, and so on, log2(ROWS) stages in
// all (3 for the 8 rows of a 32-bit multiplier). Nodes are numbered as a
// heap: node k adds nodes 2k+1 and 2k+2, the rows are nodes ROWS-1 ..
// 2*ROWS-2 and node 0 is the result. ROWS must be a power of two. The sum
// is modulo 2^W. Purely combinational; the delay of every stage is a few
// gate levels, independent of W.
module rb_reduction_tree #(
  parameter int ROWS = 8,               // number of RB rows (power of two)
  parameter int W    = 64               // digits per row
) (
  input  logic [W-1:0] rows_pos [ROWS],
  input  logic [W-1:0] rows_neg [ROWS],
  output logic [W-1:0] sum_pos,
  output logic [W-1:0] sum_neg
);

  localparam int NODES = 2 * ROWS - 1;

  logic [W-1:0] node_pos [NODES];
  logic [W-1:0] node_neg [NODES];

  for (genvar r = 0; r < ROWS; r++) begin : g_leaf
    assign node_pos[ROWS-1+r] = rows_pos[r];
    assign node_neg[ROWS-1+r] = rows_neg[r];
  end

  for (genvar k = 0; k < ROWS - 1; k++) begin : g_add
    rb_adder #(.W(W)) u_add (
      .x_pos (node_pos[2*k+1]), .x_neg (node_neg[2*k+1]),
      .y_pos (node_pos[2*k+2]), .y_neg (node_neg[2*k+2]),
      .s_pos (node_pos[k]),     .s_neg (node_neg[k])
    );
  end

  assign sum_pos = node_pos[0];
  assign sum_neg = node_neg[0];

  initial assert (ROWS >= 1 && (ROWS & (ROWS - 1)) == 0)
    else $error("rb_reduction_tree: ROWS must be a power of two");

endmodule
