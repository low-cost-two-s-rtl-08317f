// rbsd_pkg: types and helpers shared by the signed-digit multiplier.
//
// A redundant binary signed digit (RBSD) takes a value in {-1, 0, 1}. It is
// carried on two wires in positive-negative encoding: value = p - m. The
// encoders and adders in this design only ever produce (0,0), (1,0) and
// (0,1); (1,1) would also read as 0 but is never generated.
package rbsd_pkg;

  typedef struct packed {
    logic p;  // positive weight
    logic m;  // negative weight
  } rbsd_t;

  localparam rbsd_t RB_ZERO = '{p: 1'b0, m: 1'b0};

  // Value of one digit as a small signed integer.
  function automatic int rb_val(rbsd_t d);
    return int'(d.p) - int'(d.m);
  endfunction

  // Negate a digit: swap its two wires.
  function automatic rbsd_t rb_neg(rbsd_t d);
    return '{p: d.m, m: d.p};
  endfunction

  // Digit for a value in {-1, 0, 1}; other values are not representable.
  function automatic rbsd_t rb_from_int(int v);
    return '{p: (v > 0), m: (v < 0)};
  endfunction

endpackage
