// rha2: middle-level cell of the compensation tree.
//
// Adds two sum digits from the level above with the same rule as rha1
// (a + b = +-2 gives carry +-1, a + b = +-1 stays as sum digit s = +-1).
// It also merges the sign hints ga, gb of its two subtrees with its own
// carry: g = sign(ga + gb + c). The hint estimates the sign of all
// compensation carries emitted above this point and is used by rha3 to round
// the column sum away from zero. A leaf digit entering an rha2 has hint 0.
// Combinational.
module rha2
  import rbsd_pkg::rbsd_t, rbsd_pkg::rb_val;
(
  input  rbsd_t a,
  input  rbsd_t ga,
  input  rbsd_t b,
  input  rbsd_t gb,
  output rbsd_t c,
  output rbsd_t s,
  output rbsd_t g
);

  logic signed [2:0] gsum;

  always_comb begin
    c = '{p: a.p & b.p, m: a.m & b.m};
    s = '{p: (a.p & ~b.p & ~b.m) | (b.p & ~a.p & ~a.m),
          m: (a.m & ~b.p & ~b.m) | (b.m & ~a.p & ~a.m)};
    gsum = 3'(rb_val(ga)) + 3'(rb_val(gb)) + 3'(rb_val(c));
    g = '{p: (gsum > 0), m: (gsum < 0)};
  end

endmodule
