// tb_rha3: exhaustive test of the last compensation cell. With C = ga + gb
// standing for the carries already emitted, the cell must supply the rest of
// (2C + a + b)/2 rounded half away from zero, i.e. round(2C + a + b) - C.
module tb_rha3;
  import rbsd_pkg::*;
  import tb_trm_pkg::comp_l;

  rbsd_t a, ga, b, gb, c;
  int checks = 0, failures = 0;

  rha3 dut (.a(a), .ga(ga), .b(b), .gb(gb), .c(c));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 81; k++) begin
      int va, vga, vb, vgb, cc, expc;
      va = k % 3 - 1; vga = (k / 3) % 3 - 1; vb = (k / 9) % 3 - 1; vgb = (k / 27) % 3 - 1;
      a = rb_from_int(va); ga = rb_from_int(vga); b = rb_from_int(vb); gb = rb_from_int(vgb);
      #1;
      cc   = vga + vgb;
      expc = comp_l(2 * cc + va + vb) - cc;
      checks++;
      if (rb_val(c) != expc) begin
        failures++;
        $display("a=%0d b=%0d ga=%0d gb=%0d: c=%0d expected %0d", va, vb, vga, vgb, rb_val(c), expc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
