// rba_word: W-digit redundant binary adder built from a row of rba_cell.
//
// Adds two W-digit RBSD numbers and one extra carry digit cin entering the
// lowest digit: z = a + b + cin (mod 2^W). Each cell passes its carry pair
// (carry, h) to the next, so the delay does not grow with W. The lowest
// cell's h input is derived from cin itself (set unless cin is -1), which is
// the condition the adder rule places on a carry. The carry out of the top
// digit is dropped, so the result is the sum modulo 2^W.
// Combinational.
module rba_word
  import rbsd_pkg::rbsd_t;
#(
  parameter int unsigned W = 8
) (
  input  rbsd_t [W-1:0] a,
  input  rbsd_t [W-1:0] b,
  input  rbsd_t         cin,
  output rbsd_t [W-1:0] z
);

  rbsd_t [W:0] c;
  logic  [W:0] h;

  assign c[0] = cin;
  assign h[0] = ~cin.m;

  for (genvar k = 0; k < W; k++) begin : g_cell
    rba_cell u_cell (
      .a    (a[k]),
      .b    (b[k]),
      .c_in (c[k]),
      .h_in (h[k]),
      .c_out(c[k+1]),
      .h_out(h[k+1]),
      .z    (z[k])
    );
  end

  // The top carry pair has no digit to go to: the sum is kept modulo 2^W.
  logic unused_top;
  assign unused_top = ^{c[W], h[W]};

endmodule
