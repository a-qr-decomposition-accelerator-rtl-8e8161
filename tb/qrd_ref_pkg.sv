// qrd_ref_pkg: reference model for the testbenches, written independently of
// the RTL with plain integer arithmetic. It reproduces the accelerator's
// fixed-point Givens/CORDIC arithmetic (Q1.15 inputs, two guard bits,
// 12 micro-rotations with arithmetic right shifts, 180-degree pre-rotation
// for a negative pivot, gain removal by 19898/2^15 with round-half-up and
// saturation) and its binary-tree elimination schedule, so results can be
// compared bit for bit.
package qrd_ref_pkg;

  localparam int NMAX = 16;
  localparam int NIT  = 12;

  typedef int mat_t [NMAX][NMAX];

  // gain removal, rounding and saturation of an internal value (Q.17)
  function automatic int fin(longint v, ref int nsat);
    longint p, r;
    p = v * 19898;
    r = (p + (longint'(1) << 16)) >>> 17;
    if (r > 32767)  begin nsat++; return 32767;  end
    if (r < -32768) begin nsat++; return -32768; end
    return int'(r);
  endfunction

  // vectoring: returns the rotation sequence (flip, dirs) and the results
  function automatic void vec(input int x, input int y, output bit flip,
                              output bit [NIT-1:0] dir, output int xo,
                              output int yo, ref int nsat);
    longint a, b, na, nb;
    flip = x < 0;
    a = flip ? -longint'(x) * 4 : longint'(x) * 4;
    b = flip ? -longint'(y) * 4 : longint'(y) * 4;
    for (int k = 0; k < NIT; k++) begin
      dir[k] = b < 0;
      if (dir[k]) begin na = a - (b >>> k); nb = b + (a >>> k); end
      else        begin na = a + (b >>> k); nb = b - (a >>> k); end
      a = na; b = nb;
    end
    xo = fin(a, nsat);
    yo = fin(b, nsat);
  endfunction

  // rotation by a given sequence
  function automatic void rot(input int x, input int y, input bit flip,
                              input bit [NIT-1:0] dir, output int xo,
                              output int yo, ref int nsat);
    longint a, b, na, nb;
    a = flip ? -longint'(x) * 4 : longint'(x) * 4;
    b = flip ? -longint'(y) * 4 : longint'(y) * 4;
    for (int k = 0; k < NIT; k++) begin
      if (dir[k]) begin na = a - (b >>> k); nb = b + (a >>> k); end
      else        begin na = a + (b >>> k); nb = b - (a >>> k); end
      a = na; b = nb;
    end
    xo = fin(a, nsat);
    yo = fin(b, nsat);
  endfunction

  // whole decomposition: r starts as A and ends as R; qt ends as Q^T
  function automatic void qrd(input int n, ref mat_t r, ref mat_t qt,
                              ref int nsat, ref int nflip, ref int npairs,
                              ref int nstages, ref int ncarry);
    for (int i = 0; i < NMAX; i++)
      for (int c = 0; c < NMAX; c++) qt[i][c] = (i == c && i < n) ? 32767 : 0;
    for (int j = 0; j < n - 1; j++) begin
      for (int st = 1; st < n - j; st *= 2) begin
        int act;
        act = (n - j + st - 1) / st;
        nstages++;
        if (act % 2) ncarry++;
        for (int p = j; p + st < n; p += 2 * st) begin
          int t, xo, yo, ro, so;
          bit fl;
          bit [NIT-1:0] d;
          t = p + st;
          npairs++;
          vec(r[p][j], r[t][j], fl, d, xo, yo, nsat);
          if (fl) nflip++;
          for (int c = 0; c < NMAX; c++) begin
            if (c == j) begin
              ro = xo; so = 0;
            end else rot(r[p][c], r[t][c], fl, d, ro, so, nsat);
            r[p][c] = ro; r[t][c] = so;
            rot(qt[p][c], qt[t][c], fl, d, ro, so, nsat);
            qt[p][c] = ro; qt[t][c] = so;
          end
        end
      end
    end
  endfunction

endpackage
