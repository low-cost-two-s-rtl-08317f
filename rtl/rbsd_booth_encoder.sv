// rbsd_booth_encoder: one row of radix-4 (Booth-2) partial products, produced
// directly as redundant binary signed digits.
//
// The multiplicand X (N bits, two's complement) is read as an RBSD number
// whose top digit carries the sign with negative weight: digit N-1 is
// (0, x[N-1]) and digit j < N-1 is (x[j], 0). The Booth triplet
// {y[2i+1], y[2i], y[2i-1]} selects the multiple 0, +-X or +-2X with the usual
// modified-Booth table. Doubling is a one-digit shift, and negation swaps
// the p and m wires of every digit, so no "+1" correction row and no sign
// extension are needed: each row is N+1 digits, row i weighted by 4^i.
//
// Interface: x (multiplicand), trip (Booth triplet, trip[0] = y[2i-1]);
// pp[j] is the digit of weight 2^(2i+j). Purely combinational.
module rbsd_booth_encoder
  import rbsd_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]  x,
  input  logic [2:0]    trip,
  output rbsd_t [N:0]   pp
);

  logic neg, one, two;
  rbsd_t [N:0] xd;  // X as RBSD digits, digit N is zero

  always_comb begin
    neg = trip[2];
    one = trip[1] ^ trip[0];
    two = (trip[2] & ~trip[1] & ~trip[0]) | (~trip[2] & trip[1] & trip[0]);

    for (int j = 0; j < N - 1; j++) xd[j] = '{p: x[j], m: 1'b0};
    xd[N-1] = '{p: 1'b0, m: x[N-1]};
    xd[N]   = RB_ZERO;

    for (int j = 0; j <= N; j++) begin
      rbsd_t d;
      if (one)                d = xd[j];
      else if (two && j > 0)  d = xd[j-1];
      else                    d = RB_ZERO;
      pp[j] = neg ? rb_neg(d) : d;
    end
  end

endmodule
