// rha1: first-level cell of the compensation tree.
//
// Adds two RBSD partial-product digits of column n-1: a + b = 2*c + s.
// An even sum (+-2) becomes a carry c = +-1 into column n with s = 0; an odd
// sum (+-1) stays in the column as s = +-1, so the sum digit keeps the sign
// of the odd part; 0 gives nothing. The carry is also the sign hint of this
// node for the cells below (see comp_tree). Combinational.
module rha1
  import rbsd_pkg::rbsd_t;
(
  input  rbsd_t a,
  input  rbsd_t b,
  output rbsd_t c,
  output rbsd_t s
);

  always_comb begin
    c = '{p: a.p & b.p, m: a.m & b.m};
    s = '{p: (a.p & ~b.p & ~b.m) | (b.p & ~a.p & ~a.m),
          m: (a.m & ~b.p & ~b.m) | (b.m & ~a.p & ~a.m)};
  end

endmodule
