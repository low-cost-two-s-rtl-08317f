// trm_c_mult: n x n -> n-bit truncated two's complement multiplier with
// redundant binary signed digits and data-dependent carry compensation.
//
// x and y are n-bit two's complement numbers; p approximates x*y / 2^n,
// the upper half of the 2n-bit product, rounded. The structure:
//  * ceil(n/2) radix-4 Booth rows of RBSD partial products (one
//    rbsd_booth_encoder per row; row i carries weight 4^i);
//  * only columns n..2n-1 are summed, by a tree of carry-free RB adders
//    (rb_adder_tree); the n low columns are never built;
//  * the digits of column n-1 go to the compensation tree (comp_tree), which
//    estimates the carries the missing columns would have sent and returns
//    them as ceil(n/2)-1 carry digits. Each enters the free carry input of
//    the lowest digit of one tree adder, so compensation costs no extra row;
//  * rbsd_to_nb turns the RBSD sum into the n-bit two's complement result.
// The result is (sum of kept columns)/2^n + l, with l = q/2 rounded half away
// from zero and q the signed sum of column n-1 (exact for n <= 12). Its
// error against the exact product is about that of rounding the full
// product, at roughly two thirds of the hardware of a full multiplier.
//
// The truncation, the compensation formula, the cell levels and the way the
// carries enter the tree follow the source design; the gate-level form of
// each cell, the tree pairing and the converter are this design's own.
// Purely combinational, no clock; N >= 4.
module trm_c_mult
  import rbsd_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] p
);

  localparam int unsigned R = (N + 1) / 2;  // Booth rows = column n-1 digits

  // Multiplier bits with y[-1] = 0 below and the sign extended above:
  // ye[k+1] = y[k].
  logic [2*R:0] ye;
  always_comb begin
    ye[0] = 1'b0;
    for (int k = 0; k < 2 * R; k++) ye[k+1] = (k < N) ? y[k] : y[N-1];
  end

  rbsd_t [N:0]   pp    [R];
  rbsd_t [N-1:0] rows  [R];
  rbsd_t         col   [R];
  rbsd_t         carry [R-1];
  rbsd_t [N-1:0] sum;

  for (genvar i = 0; i < R; i++) begin : g_row
    rbsd_booth_encoder #(.N(N)) u_enc (
      .x   (x),
      .trip(ye[2*i+2:2*i]),
      .pp  (pp[i])
    );

    // Kept columns n..2n-1: digit c-2i of row i lands in column c.
    for (genvar c = N; c < 2 * N; c++) begin : g_col
      if (c - 2 * i <= N) begin : g_dig
        assign rows[i][c-N] = pp[i][c-2*i];
      end else begin : g_zero
        assign rows[i][c-N] = RB_ZERO;
      end
    end

    // Column n-1 feeds the compensation tree.
    assign col[i] = pp[i][N-1-2*i];
  end

  comp_tree #(.K(R)) u_comp (
    .col  (col),
    .carry(carry)
  );

  rb_adder_tree #(.R(R), .W(N)) u_tree (
    .rows(rows),
    .cin (carry),
    .sum (sum)
  );

  rbsd_to_nb #(.W(N)) u_conv (
    .r(sum),
    .n(p)
  );

endmodule
