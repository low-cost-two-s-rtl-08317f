// tb_rb_adder_tree: random test of the RB adder tree with its carry inputs,
// at R = 4 rows of W = 8 digits (n = 8) and at R = 5, W = 10 (an odd row
// count). The RBSD sum must equal the sum of all rows plus all carries,
// modulo 2^W, and no sum digit may be (1,1).
module tb_rb_adder_tree;
  import rbsd_pkg::*;

  localparam int ITER = 20000;
  int checks = 0, failures = 0;

  rbsd_t [7:0] rows4 [4];
  rbsd_t       cin4  [3];
  rbsd_t [7:0] sum4;
  rbsd_t [9:0] rows5 [5];
  rbsd_t       cin5  [4];
  rbsd_t [9:0] sum5;

  rb_adder_tree dut4 (.rows(rows4), .cin(cin4), .sum(sum4));
  rb_adder_tree #(.R(5), .W(10)) dut5 (.rows(rows5), .cin(cin5), .sum(sum5));

  initial begin : watchdog
    #(ITER + 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rbsd_t rnd_digit();
    return rb_from_int(int'($urandom_range(2)) - 1);
  endfunction

  initial begin
    for (int it = 0; it < ITER; it++) begin
      int e4, e5, g4, g5;
      logic bad;
      e4 = 0; e5 = 0;
      foreach (rows4[i]) for (int k = 0; k < 8; k++) begin
        rows4[i][k] = rnd_digit(); e4 += rb_val(rows4[i][k]) * (1 << k);
      end
      foreach (cin4[i]) begin cin4[i] = rnd_digit(); e4 += rb_val(cin4[i]); end
      foreach (rows5[i]) for (int k = 0; k < 10; k++) begin
        rows5[i][k] = rnd_digit(); e5 += rb_val(rows5[i][k]) * (1 << k);
      end
      foreach (cin5[i]) begin cin5[i] = rnd_digit(); e5 += rb_val(cin5[i]); end
      #1;
      g4 = 0; g5 = 0; bad = 0;
      for (int k = 0; k < 8; k++)  begin g4 += rb_val(sum4[k]) * (1 << k); bad |= sum4[k].p & sum4[k].m; end
      for (int k = 0; k < 10; k++) begin g5 += rb_val(sum5[k]) * (1 << k); bad |= sum5[k].p & sum5[k].m; end
      checks++;
      if (8'(g4) != 8'(e4) || bad) begin
        failures++; if (failures < 10) $display("R=4: sum %0d, expected %0d (mod 256)", g4, e4);
      end
      checks++;
      if (10'(g5) != 10'(e5)) begin
        failures++; if (failures < 10) $display("R=5: sum %0d, expected %0d (mod 1024)", g5, e5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
