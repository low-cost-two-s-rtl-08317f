// tb_rbsd_to_nb: exhaustive test of the RBSD to two's complement converter,
// W = 8: every pair of p and m words gives (P - M) mod 2^8.
module tb_rbsd_to_nb;
  import rbsd_pkg::*;

  localparam int W = 8;
  rbsd_t [W-1:0] r;
  logic  [W-1:0] n;
  int checks = 0, failures = 0;

  rbsd_to_nb dut (.r(r), .n(n));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pv = 0; pv < (1 << W); pv++)
      for (int mv = 0; mv < (1 << W); mv++) begin
        int v;
        for (int k = 0; k < W; k++) r[k] = '{p: pv[k], m: mv[k]};
        #1;
        v = 0;
        for (int k = 0; k < W; k++) v += (int'(r[k].p) - int'(r[k].m)) * (1 << k);
        checks++;
        if (n != W'(v)) begin
          failures++;
          if (failures < 10) $display("P=%0h M=%0h: n=%0h expected %0h", pv, mv, n, W'(v));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
