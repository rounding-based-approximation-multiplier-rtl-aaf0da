// roba_ref_pkg -- reference model for the RoBA multiplier testbenches.
//
// Works from the definition rather than from the RTL's structure: the
// nearest power of two is found by measuring the distance to every candidate
// 2^e (a tie goes to the larger power), and the approximate product is
// evaluated with ordinary 64-bit multiplication as Ar*B + Br*A - Ar*Br.
package roba_ref_pkg;

  // Nearest power of two to m (m >= 0); 0 for m = 0. Ties round up.
  function automatic longint nearest_pow2(input longint m);
    longint best, d, bestd;
    if (m == 0) return 0;
    best  = 1;
    bestd = (m > 1) ? m - 1 : 1 - m;
    for (int e = 1; e < 40; e++) begin
      longint c = longint'(1) << e;
      d = (m > c) ? m - c : c - m;
      if (d <= bestd) begin
        best  = c;
        bestd = d;
      end
    end
    return best;
  endfunction

  // Exponent of a power of two.
  function automatic int log2_pow2(input longint c);
    for (int e = 0; e < 63; e++) if ((longint'(1) << e) == c) return e;
    return -1;
  endfunction

  // RoBA approximation of x*y for signed or unsigned operands given as
  // integers of their true value.
  function automatic longint roba(input longint x, input longint y);
    longint ax, ay, rx, ry, m;
    bit neg;
    ax  = (x < 0) ? -x : x;
    ay  = (y < 0) ? -y : y;
    neg = (x < 0) ^ (y < 0);
    rx  = nearest_pow2(ax);
    ry  = nearest_pow2(ay);
    m   = rx * ay + ry * ax - rx * ry;
    return neg ? -m : m;
  endfunction

endpackage
