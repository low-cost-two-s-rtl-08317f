// tb_trm_pkg: integer reference model of the truncated signed-digit
// multiplier, for the testbenches.
//
// Everything here is computed with plain integers, independently of the
// RTL: the radix-4 Booth digit of each row, the signed digits of +-X and
// +-2X column by column, the value H of the kept columns (n..2n-1), the
// signed sum q of column n-1, the compensation l = q/2 rounded half away
// from zero, and the expected n-bit result (H / 2^n + l) mod 2^n.
package tb_trm_pkg;

  // Signed digit j (0..n) of the multiple b*X, X an n-bit two's complement
  // number written with a negative-weight top digit, b in {-2..2}.
  function automatic int mult_digit(int n, longint unsigned xu, int b, int j);
    int src, d;
    if (b == 0) return 0;
    src = (b == 2 || b == -2) ? j - 1 : j;
    if (src < 0 || src > n - 1) d = 0;
    else if (src == n - 1)      d = -int'((xu >> src) & 1);
    else                        d = int'((xu >> src) & 1);
    return (b < 0) ? -d : d;
  endfunction

  function automatic int booth_digit(int n, longint unsigned yu, int i);
    int yb[3];
    for (int k = 0; k < 3; k++) begin
      int idx = 2 * i - 1 + k;
      if (idx < 0) yb[k] = 0;
      else yb[k] = int'((yu >> ((idx > n - 1) ? n - 1 : idx)) & 1);
    end
    return -2 * yb[2] + yb[1] + yb[0];
  endfunction

  function automatic longint sext(int n, longint unsigned v);
    return (((v >> (n - 1)) & 1) != 0) ? longint'(v) - (longint'(1) << n) : longint'(v);
  endfunction

  // q/2 rounded half away from zero: integer part plus signed remainder.
  function automatic int comp_l(int q);
    return q / 2 + q % 2;
  endfunction

  // Kept-column value H / 2^n and column n-1 sum q for inputs x, y.
  function automatic void model(int n, longint unsigned xu, longint unsigned yu,
                                output longint hi, output int q);
    longint h = 0;
    q = 0;
    for (int i = 0; i < (n + 1) / 2; i++) begin
      int b = booth_digit(n, yu, i);
      for (int j = 0; j <= n; j++) begin
        int c = 2 * i + j;
        int d = mult_digit(n, xu, b, j);
        if (c >= n)          h += longint'(d) <<< (c - n);
        else if (c == n - 1) q += d;
      end
    end
    hi = h;
  endfunction

  // Error statistics of a truncated multiplier against the exact product:
  // e = |x*y - p*2^n|, with its mean, variance E{(e - mean)^2} and maximum.
  class trm_stats;
    longint unsigned cnt = 0;
    real sum = 0.0, sum2 = 0.0;
    longint emax = 0;

    function void add(longint e);
      cnt++;
      sum  += real'(e);
      sum2 += real'(e) * real'(e);
      if (e > emax) emax = e;
    endfunction

    function real mean();
      return sum / real'(cnt);
    endfunction

    function real variance();
      return sum2 / real'(cnt) - mean() * mean();
    endfunction
  endclass

endpackage
