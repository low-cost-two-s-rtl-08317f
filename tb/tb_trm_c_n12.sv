// tb_trm_c_n12: end-to-end test of trm_c_mult at n = 12.
//
// Drives all 2^(2n) input pairs and compares every result with an integer
// reference model (tb_trm_pkg): the kept columns' value plus q/2 rounded half
// away from zero, q the signed sum of column n-1.
// The compensation tree is exact at this size: every result must match.
// It also gathers the error of the result against the exact product,
// e = |x*y - p*2^n|, and checks mean, variance and maximum against the
// published figures for n = 12 (mean 1786.0, variance 1747885.28, maximum
// 10923).
// Counts how often each mechanism acts: positive and negative compensation,
// rounding of an odd column sum away from zero, Booth rows
// selecting 2X and negated multiples; one that never acts is a failure.
// Combinational design: one input vector per time step.
module tb_trm_c_n12;
  import tb_trm_pkg::*;

  localparam int      N          = 12;
  localparam bit      EXHAUSTIVE = 1;
  localparam longint  SAMPLES    = EXHAUSTIVE ? (longint'(1) << (2 * N)) : 0;
  localparam bit      EXACT_L    = 1;
  localparam real     PAPER_MEAN = 1786.0;
  localparam real     PAPER_VAR  = 1747885.28;
  localparam longint  PAPER_MAX  = 10923;
  localparam real     TOL        = 0.02;  // relative tolerance on mean, variance
  localparam bit      HAS_REF    = 1;  // published figures exist for this n

  logic [N-1:0] x, y, p;

  trm_c_mult #(.N(N)) dut (.x(x), .y(y), .p(p));

  int checks = 0, failures = 0;
  longint n_lpos = 0, n_lneg = 0, n_odd_pos = 0, n_odd_neg = 0;
  longint n_two = 0, n_negm = 0, n_off = 0;

  initial begin : watchdog
    #(SAMPLES + 100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    trm_stats st;
    st = new();
    for (longint k = 0; k < SAMPLES; k++) begin
      longint unsigned xu, yu;
      longint hi, expv, prod, got, e;
      int q, l;
      if (EXHAUSTIVE) begin
        xu = longint'(k) & ((longint'(1) << N) - 1);
        yu = longint'(k) >> N;
      end else begin
        xu = longint'($urandom) & ((longint'(1) << N) - 1);
        yu = longint'($urandom) & ((longint'(1) << N) - 1);
      end
      x = N'(xu);
      y = N'(yu);
      #1;
      model(N, xu, yu, hi, q);
      l    = comp_l(q);
      expv = sext(N, longint'(hi + longint'(l)) & ((longint'(1) << N) - 1));
      got  = sext(N, longint'(p));
      if (EXACT_L) begin
        checks++;
        if (got != expv) begin
          failures++;
          if (failures < 10)
            $display("mismatch x=%0d y=%0d p=%0d expected %0d", sext(N, xu), sext(N, yu), got, expv);
        end
      end else begin
        // Above n = 10 the tree's sign hint may miss: allow one unit.
        checks++;
        if (got != expv) n_off++;
        if (got - expv > 1 || expv - got > 1) begin
          failures++;
          if (failures < 10)
            $display("mismatch x=%0d y=%0d p=%0d expected %0d", sext(N, xu), sext(N, yu), got, expv);
        end
      end
      prod = sext(N, xu) * sext(N, yu);
      e = prod - (got <<< N);
      st.add(e < 0 ? -e : e);
      if (l > 0) n_lpos++;
      if (l < 0) n_lneg++;
      if (q % 2 == 1)  n_odd_pos++;
      if (q % 2 == -1) n_odd_neg++;
      for (int i = 0; i < (N + 1) / 2; i++) begin
        int b;
        b = booth_digit(N, yu, i);
        if (b == 2 || b == -2) n_two++;
        if (b < 0) n_negm++;
      end
    end

    $display("n=%0d samples=%0d mean=%0.2f (published %0.1f) var=%0.1f (published %0.1f) max=%0d (published %0d)",
             N, st.cnt, st.mean(), PAPER_MEAN, st.variance(), PAPER_VAR, st.emax, PAPER_MAX);
    $display("compensation >0: %0d  <0: %0d  odd column sum rounded up: %0d down: %0d  2X rows: %0d  negated rows: %0d  off-by-one vs Eq.3: %0d",
             n_lpos, n_lneg, n_odd_pos, n_odd_neg, n_two, n_negm, n_off);
    if (HAS_REF) begin
    checks++;
    if (st.mean() > PAPER_MEAN * (1.0 + TOL) + 0.06 || st.mean() < PAPER_MEAN * (1.0 - TOL) - 0.06) begin
      failures++; $display("mean error off the published value");
    end
    checks++;
    if (st.variance() > PAPER_VAR * (1.0 + TOL) + 5.0 || st.variance() < PAPER_VAR * (1.0 - TOL) - 5.0) begin
      failures++; $display("error variance off the published value");
    end
    checks++;
    if (EXHAUSTIVE ? (st.emax != PAPER_MAX) : (st.emax > PAPER_MAX)) begin
      failures++; $display("maximum error off the published value");
    end
    end
    checks += 6;
    if (n_lpos == 0)    begin failures++; $display("positive compensation never seen"); end
    if (n_lneg == 0)    begin failures++; $display("negative compensation never seen"); end
    if (n_odd_pos == 0) begin failures++; $display("positive odd column sum never seen"); end
    if (n_odd_neg == 0) begin failures++; $display("negative odd column sum never seen"); end
    if (n_two == 0)     begin failures++; $display("2X multiple never selected"); end
    if (n_negm == 0)    begin failures++; $display("negated multiple never selected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
