// tb_comp_tree: exhaustive test of the compensation tree for K = 2 .. 6
// column digits (n = 4 .. 12). For every digit combination the carries must
// add up to l = q/2 rounded half away from zero, q the sum of the digits, and
// every carry must be a legal digit.
module tb_comp_tree;
  import rbsd_pkg::*;
  import tb_trm_pkg::comp_l;

  int checks = 0, failures = 0;

  rbsd_t col2 [2], car2 [1];
  rbsd_t col3 [3], car3 [2];
  rbsd_t col4 [4], car4 [3];
  rbsd_t col5 [5], car5 [4];
  rbsd_t col6 [6], car6 [5];

  comp_tree #(.K(2)) dut2 (.col(col2), .carry(car2));
  comp_tree #(.K(3)) dut3 (.col(col3), .carry(car3));
  comp_tree dut4 (.col(col4), .carry(car4));
  comp_tree #(.K(5)) dut5 (.col(col5), .carry(car5));
  comp_tree #(.K(6)) dut6 (.col(col6), .carry(car6));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void judge(int k, int q, int lsum, logic bad);
    checks++;
    if (lsum != comp_l(q) || bad) begin
      failures++;
      if (failures < 10) $display("K=%0d q=%0d: carries sum to %0d, expected %0d", k, q, lsum, comp_l(q));
    end
  endfunction

  initial begin
    for (int code = 0; code < 729; code++) begin
      int d [6];
      int q, ls;
      logic bad;
      for (int i = 0; i < 6; i++) d[i] = (code / (3 ** i)) % 3 - 1;
      foreach (col2[i]) col2[i] = rb_from_int(d[i]);
      foreach (col3[i]) col3[i] = rb_from_int(d[i]);
      foreach (col4[i]) col4[i] = rb_from_int(d[i]);
      foreach (col5[i]) col5[i] = rb_from_int(d[i]);
      foreach (col6[i]) col6[i] = rb_from_int(d[i]);
      #1;
      if (code < 9) begin
        q = d[0] + d[1]; ls = 0; bad = 0;
        foreach (car2[i]) begin ls += rb_val(car2[i]); bad |= car2[i].p & car2[i].m; end
        judge(2, q, ls, bad);
      end
      if (code < 27) begin
        q = d[0] + d[1] + d[2]; ls = 0; bad = 0;
        foreach (car3[i]) begin ls += rb_val(car3[i]); bad |= car3[i].p & car3[i].m; end
        judge(3, q, ls, bad);
      end
      if (code < 81) begin
        q = d[0] + d[1] + d[2] + d[3]; ls = 0; bad = 0;
        foreach (car4[i]) begin ls += rb_val(car4[i]); bad |= car4[i].p & car4[i].m; end
        judge(4, q, ls, bad);
      end
      if (code < 243) begin
        q = d[0] + d[1] + d[2] + d[3] + d[4]; ls = 0; bad = 0;
        foreach (car5[i]) begin ls += rb_val(car5[i]); bad |= car5[i].p & car5[i].m; end
        judge(5, q, ls, bad);
      end
      q = d[0] + d[1] + d[2] + d[3] + d[4] + d[5]; ls = 0; bad = 0;
      foreach (car6[i]) begin ls += rb_val(car6[i]); bad |= car6[i].p & car6[i].m; end
      judge(6, q, ls, bad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
