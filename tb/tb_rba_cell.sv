// tb_rba_cell: exhaustive test of the redundant binary adder cell.
//
// Every operand pair (a, b) and every carry pair the rule allows from a lower
// digit (h_in = 1 with c_in in {0, 1}, h_in = 0 with c_in in {-1, 0}) is
// applied. Checks: z + 2*c_out = a + b + c_in; no output digit is (1,1);
// h_out is set exactly when a, b >= 0; and c_out agrees with h_out in the
// way the next digit relies on.
module tb_rba_cell;
  import rbsd_pkg::*;

  rbsd_t a, b, c_in, c_out, z;
  logic  h_in, h_out;
  int checks = 0, failures = 0;

  rba_cell dut (.a(a), .b(b), .c_in(c_in), .h_in(h_in), .c_out(c_out), .h_out(h_out), .z(z));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = -1; va <= 1; va++)
      for (int vb = -1; vb <= 1; vb++)
        for (int hc = 0; hc < 4; hc++) begin
          int vc;
          h_in = hc[1];
          vc   = h_in ? hc[0] : -int'(hc[0]);
          a = rb_from_int(va); b = rb_from_int(vb); c_in = rb_from_int(vc);
          #1;
          checks++;
          if (rb_val(z) + 2 * rb_val(c_out) != va + vb + vc) begin
            failures++;
            $display("sum wrong: a=%0d b=%0d c_in=%0d h_in=%0b -> z=%0d c_out=%0d", va, vb, vc, h_in, rb_val(z), rb_val(c_out));
          end
          checks++;
          if ((z.p & z.m) || (c_out.p & c_out.m)) begin failures++; $display("digit (1,1) produced"); end
          checks++;
          if (h_out != (va >= 0 && vb >= 0)) begin failures++; $display("h_out wrong"); end
          checks++;
          if (h_out ? (rb_val(c_out) < 0) : (rb_val(c_out) > 0)) begin failures++; $display("carry and h_out disagree"); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
