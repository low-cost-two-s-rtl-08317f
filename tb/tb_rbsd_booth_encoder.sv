// tb_rbsd_booth_encoder: exhaustive test of one RBSD Booth row, n = 8.
//
// For every multiplicand x and every Booth triplet, the signed digits of the
// row must add up to b*x, b = -2*t[2] + t[1] + t[0], and no digit may be
// (1,1). Also counts that each multiple 0, +-1, +-2 was produced.
module tb_rbsd_booth_encoder;
  import rbsd_pkg::*;

  localparam int N = 8;
  logic [N-1:0] x;
  logic [2:0]   trip;
  rbsd_t [N:0]  pp;
  int checks = 0, failures = 0;
  int seen [5];

  rbsd_booth_encoder dut (.x(x), .trip(trip), .pp(pp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int xi = 0; xi < (1 << N); xi++)
      for (int t = 0; t < 8; t++) begin
        int bd, xs, v;
        logic bad;
        x = N'(xi); trip = 3'(t);
        #1;
        bd = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
        xs = int'(signed'(x));
        v = 0; bad = 1'b0;
        for (int j = 0; j <= N; j++) begin
          v += rb_val(pp[j]) * (1 << j);
          bad |= pp[j].p & pp[j].m;
        end
        seen[bd + 2]++;
        checks++;
        if (v != bd * xs || bad) begin
          failures++;
          if (failures < 10) $display("x=%0d b=%0d: row value %0d, expected %0d", xs, bd, v, bd * xs);
        end
      end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("multiple %0d never selected", i - 2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
