// tb_rha1: exhaustive test of the first-level compensation cell: for all
// digit pairs, 2c + s = a + b, and the carry is non-zero only for a + b = +-2.
module tb_rha1;
  import rbsd_pkg::*;

  rbsd_t a, b, c, s;
  int checks = 0, failures = 0;

  rha1 dut (.a(a), .b(b), .c(c), .s(s));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = -1; va <= 1; va++)
      for (int vb = -1; vb <= 1; vb++) begin
        a = rb_from_int(va); b = rb_from_int(vb);
        #1;
        checks++;
        if (2 * rb_val(c) + rb_val(s) != va + vb) begin
          failures++; $display("a=%0d b=%0d: c=%0d s=%0d", va, vb, rb_val(c), rb_val(s));
        end
        checks++;
        if ((rb_val(c) != 0) != (va + vb == 2 || va + vb == -2)) begin
          failures++; $display("a=%0d b=%0d: carry rule broken", va, vb);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
