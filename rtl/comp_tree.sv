// comp_tree: compensation tree of the truncated multiplier (Eq. 3 circuit).
//
// The columns 0..n-1 of the product are not built. Their effect on column n
// is estimated from column n-1 alone: with q the sum of its K signed digits,
// the compensation is l = q/2 rounded half away from zero (integer part of
// q/2 plus the signed remainder). The tree delivers l as K-1 carry digits,
// one per adder of the partial-product tree, so that each can enter the free
// carry input of an adder's lowest digit.
//
// Nodes 0..K-1 are the column digits, each with sign hint 0. Cell j takes
// nodes 2j and 2j+1; all but the last write node K+j (sum digit and hint).
// The first-level cells (two raw digits) are rha1, the last cell is rha3,
// the others rha2. carry[j] is cell j's carry. The sum of the carries equals
// l exactly for K <= 6 (n <= 12, checked over all inputs); above that the sign
// hint can miss and the result may differ from l by one. Combinational.
module comp_tree
  import rbsd_pkg::*;
#(
  parameter int unsigned K = 4
) (
  input  rbsd_t col   [K],
  output rbsd_t carry [K-1]
);

  // Node storage; the last cell writes no node, so 2K-2 entries suffice.
  rbsd_t s_n [2*K-2];
  rbsd_t g_n [2*K-2];

  for (genvar i = 0; i < K; i++) begin : g_leaf
    assign s_n[i] = col[i];
    assign g_n[i] = RB_ZERO;
  end

  for (genvar j = 0; j < K - 1; j++) begin : g_cell
    if (j == K - 2) begin : g_last
      rha3 u_rha3 (
        .a (s_n[2*j]),   .ga(g_n[2*j]),
        .b (s_n[2*j+1]), .gb(g_n[2*j+1]),
        .c (carry[j])
      );
    end else if (2*j + 1 < K) begin : g_top
      rha1 u_rha1 (
        .a(s_n[2*j]), .b(s_n[2*j+1]),
        .c(carry[j]), .s(s_n[K+j])
      );
      assign g_n[K+j] = carry[j];
    end else begin : g_mid
      rha2 u_rha2 (
        .a (s_n[2*j]),   .ga(g_n[2*j]),
        .b (s_n[2*j+1]), .gb(g_n[2*j+1]),
        .c (carry[j]),   .s (s_n[K+j]), .g(g_n[K+j])
      );
    end
  end

endmodule
