// div_tb_pkg: helpers shared by the divider testbenches.
//
// in_scope(x, y, w) tells whether a W-bit operand pair is one the divider
// is specified for: Y /= 0, not the overflow -2^(W-1)/-1, and not
// -2^(W-1) divided by a power of two (see the README). rand_operand draws a
// W-bit value, biased towards small magnitudes and powers of two so that
// every quotient length N and the exact divisions are exercised.
// For fractional mode, is_norm tells whether a W-bit value is a normalized
// mantissa (01x..x, 10x..x other than 100..0, or 110..0) and rand_norm draws
// one; frac_q and frac_r give the expected quotient trunc(x*2^(W-2)/y) and
// remainder x*2^(W-2) - q*y.
package div_tb_pkg;

  function automatic bit is_pow2(int v);
    int a = (v < 0) ? -v : v;
    return (a != 0) && ((a & (a - 1)) == 0);
  endfunction

  function automatic bit in_scope(int x, int y, int w);
    int mn = -(1 << (w - 1));
    if (y == 0) return 1'b0;
    if (x == mn && (y == -1 || is_pow2(y))) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int rand_operand(int w);
    int sel = int'($urandom_range(0, 3));
    int bits = int'($urandom_range(1, w));
    int v;
    case (sel)
      0: v = int'($urandom_range(0, (1 << bits) - 1)) - (1 << (bits - 1));
      1: v = (1 << $urandom_range(0, w - 2)) * (($urandom_range(0, 1) == 1) ? -1 : 1);
      default: v = int'($urandom_range(0, (1 << w) - 1)) - (1 << (w - 1));
    endcase
    return v;
  endfunction

  function automatic bit is_norm(int v, int w);
    int h = 1 << (w - 2);
    return (v >= h && v < 2 * h) || (v < -h && v > -2 * h) || (v == -h);
  endfunction

  function automatic int rand_norm(int w);
    int v;
    do v = int'($urandom_range(0, (1 << w) - 1)) - (1 << (w - 1));
    while (!is_norm(v, w));
    return v;
  endfunction

  function automatic int frac_q(int x, int y, int w);
    return (x * (1 << (w - 2))) / y;
  endfunction

  function automatic int frac_r(int x, int y, int w);
    return (x * (1 << (w - 2))) % y;
  endfunction

endpackage
