// Reference arithmetic for the RoBA multiplier testbenches.
//
// Computes the expected RoBA results with integer arithmetic, independently of
// the bit-level rules the RTL uses:
//   round_pow2(a)  nearest power of two to a, ties (a = 1.5 * 2^k) rounded up,
//                  0 for a = 0
//   roba_u(a, b)   round(a)*b + round(b)*a - round(a)*round(b)
//   roba_s(x, y)   signed version: magnitudes, unsigned product, sign applied;
//                  with exact = 0 each negation is -v - 1 (ones' complement)
package roba_ref_pkg;

  function automatic longint round_pow2(longint a);
    longint lo;
    if (a <= 0) return 0;
    lo = 1;
    while (lo * 2 <= a) lo = lo * 2;
    // distance to lo versus distance to 2*lo
    if ((a - lo) >= (2 * lo - a)) return 2 * lo;
    return lo;
  endfunction

  function automatic longint roba_u(longint a, longint b);
    longint ar, br;
    ar = round_pow2(a);
    br = round_pow2(b);
    return ar * b + br * a - ar * br;
  endfunction

  function automatic longint neg_v(longint v, bit exact);
    return exact ? -v : -v - 1;
  endfunction

  function automatic longint roba_s(longint x, longint y, bit exact);
    longint mx, my, r;
    mx = (x < 0) ? neg_v(x, exact) : x;
    my = (y < 0) ? neg_v(y, exact) : y;
    r  = roba_u(mx, my);
    if ((x < 0) != (y < 0)) r = neg_v(r, exact);
    return r;
  endfunction

  function automatic bit is_pow2(longint a);
    return (a > 0) && ((a & (a - 1)) == 0);
  endfunction

endpackage
