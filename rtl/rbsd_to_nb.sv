// rbsd_to_nb: converts a W-digit RBSD number to W-bit two's complement.
//
// With positive-negative encoding the value is P - M, where P collects the
// p wires and M the m wires. The converter is the one carry-propagating
// step of the multiplier: n = P + ~M + 1 (mod 2^W). It is written as a plain
// subtractor and left to synthesis to pick the adder structure.
// Combinational.
module rbsd_to_nb
  import rbsd_pkg::rbsd_t;
#(
  parameter int unsigned W = 8
) (
  input  rbsd_t [W-1:0] r,
  output logic  [W-1:0] n
);

  logic [W-1:0] pv, mv;

  always_comb begin
    for (int k = 0; k < W; k++) begin
      pv[k] = r[k].p;
      mv[k] = r[k].m;
    end
    n = pv - mv;
  end

endmodule
