// rb_adder_tree: sums R rows of W-digit RBSD partial products with a tree of
// carry-free redundant binary adders (rba_word).
//
// Nodes 0..R-1 are the input rows; adder j adds nodes 2j and 2j+1 and
// produces node R+j, so the R-1 adders form a binary tree of ceil(log2 R)
// levels and node 2R-2 is the sum. Because every adder is carry-free the
// delay is a few gates per level, independent of W.
//
// Each adder's lowest digit has a free carry input, since the columns below
// it have been cut away in a truncated multiplier; cin[j] feeds adder j.
// The multiplier uses these inputs for its compensation carries. The sum is
// exact modulo 2^W. Combinational.
module rb_adder_tree
  import rbsd_pkg::rbsd_t;
#(
  parameter int unsigned R = 4,
  parameter int unsigned W = 8
) (
  input  rbsd_t [W-1:0] rows [R],
  input  rbsd_t         cin  [R-1],
  output rbsd_t [W-1:0] sum
);

  rbsd_t [W-1:0] node [2*R-1];

  for (genvar i = 0; i < R; i++) begin : g_leaf
    assign node[i] = rows[i];
  end

  for (genvar j = 0; j < R - 1; j++) begin : g_add
    rba_word #(.W(W)) u_add (
      .a  (node[2*j]),
      .b  (node[2*j+1]),
      .cin(cin[j]),
      .z  (node[R+j])
    );
  end

  assign sum = node[2*R-2];

endmodule
