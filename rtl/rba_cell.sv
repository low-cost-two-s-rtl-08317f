// rba_cell: one digit of a carry-free redundant binary adder.
//
// Two RBSD digits a and b are added as a + b = 2*c_out + s, where the split
// of an odd sum is chosen from h_in, a flag from the next lower digit saying
// that both of its operands are non-negative. When h_in is set the lower
// digit can only send a carry of 0 or +1, so an odd sum is split with s <= 0;
// otherwise the lower carry is 0 or -1 and s >= 0 is chosen. The final digit
// z = s + c_in therefore never leaves {-1, 0, 1}, and no carry travels more
// than one digit. (c_out, h_out) is the carry pair passed to the next digit.
//
// The carry-free addition rule is the standard one for redundant binary
// adders; this cell is a gate-level description of it, not a transistor
// schematic. Inputs must not be (1,1); outputs never are. Combinational.
module rba_cell
  import rbsd_pkg::rbsd_t;
(
  input  rbsd_t a,
  input  rbsd_t b,
  input  rbsd_t c_in,
  input  logic  h_in,
  output rbsd_t c_out,
  output logic  h_out,
  output rbsd_t z
);

  logic signed [2:0] t;
  logic signed [1:0] c, s;
  logic signed [2:0] zv;

  always_comb begin
    t = 3'(signed'({1'b0, a.p})) - 3'(signed'({1'b0, a.m}))
      + 3'(signed'({1'b0, b.p})) - 3'(signed'({1'b0, b.m}));
    unique case (t)
      3'sd2:   begin c = 2'sd1;  s = 2'sd0;  end
      3'sd1:   begin c = h_in ? 2'sd1 : 2'sd0;   s = h_in ? -2'sd1 : 2'sd1; end
      -3'sd1:  begin c = h_in ? 2'sd0 : -2'sd1;  s = h_in ? -2'sd1 : 2'sd1; end
      -3'sd2:  begin c = -2'sd1; s = 2'sd0;  end
      default: begin c = 2'sd0;  s = 2'sd0;  end
    endcase
    zv    = 3'(s) + 3'(signed'({1'b0, c_in.p})) - 3'(signed'({1'b0, c_in.m}));
    c_out = '{p: (c > 0),  m: (c < 0)};
    z     = '{p: (zv > 0), m: (zv < 0)};
    h_out = ~a.m & ~b.m;
  end

endmodule
