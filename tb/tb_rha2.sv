// tb_rha2: exhaustive test of the middle compensation cell over all digits
// and sign hints: 2c + s = a + b, carry only for a + b = +-2, and the hint
// g = sign(ga + gb + c).
module tb_rha2;
  import rbsd_pkg::*;

  rbsd_t a, ga, b, gb, c, s, g;
  int checks = 0, failures = 0;

  rha2 dut (.a(a), .ga(ga), .b(b), .gb(gb), .c(c), .s(s), .g(g));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 81; k++) begin
      int va, vga, vb, vgb, tot, sg;
      va = k % 3 - 1; vga = (k / 3) % 3 - 1; vb = (k / 9) % 3 - 1; vgb = (k / 27) % 3 - 1;
      a = rb_from_int(va); ga = rb_from_int(vga); b = rb_from_int(vb); gb = rb_from_int(vgb);
      #1;
      checks++;
      if (2 * rb_val(c) + rb_val(s) != va + vb || ((rb_val(c) != 0) != (va + vb == 2 || va + vb == -2))) begin
        failures++; $display("a=%0d b=%0d: c=%0d s=%0d", va, vb, rb_val(c), rb_val(s));
      end
      tot = vga + vgb + (va + vb) / 2;
      sg  = (tot > 0) - (tot < 0);
      checks++;
      if (rb_val(g) != sg) begin
        failures++; $display("hint wrong: ga=%0d gb=%0d a=%0d b=%0d g=%0d", vga, vgb, va, vb, rb_val(g));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
