// rha3: last-level cell of the compensation tree; makes the rounding carry.
//
// Its inputs are the last two sum digits a, b of column n-1 and the sign
// hints of their subtrees. The column sum is q = 2*C + a + b, where C is the
// total of the carries already emitted. The compensation wanted is q/2
// rounded half away from zero, of which C is already delivered, so:
//   a + b = +-2 -> c = +-1 (q even, exact half)
//   a + b = +-1 -> q is odd: c = a + b if q has that sign, else 0.
// The sign of q is taken from G = sign(ga + gb) when G is not 0 (|2C| > 1
// then dominates), and from a + b otherwise. Combinational.
module rha3
  import rbsd_pkg::*;
(
  input  rbsd_t a,
  input  rbsd_t ga,
  input  rbsd_t b,
  input  rbsd_t gb,
  output rbsd_t c
);

  logic signed [2:0] t, gs;

  always_comb begin
    t  = 3'(rb_val(a))  + 3'(rb_val(b));
    gs = 3'(rb_val(ga)) + 3'(rb_val(gb));
    if (t == 3'sd2 || t == -3'sd2)
      c = '{p: (t > 0), m: (t < 0)};
    else if (t != 3'sd0 && (gs == 3'sd0 || ((gs > 0) == (t > 0))))
      c = '{p: (t > 0), m: (t < 0)};
    else
      c = RB_ZERO;
  end

endmodule
