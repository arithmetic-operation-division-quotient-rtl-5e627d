// div_comb_core: the complete combinational divider for signed integers.
//
// Computes the quotient z = trunc(x / y) and the remainder r = x - z*y (same
// sign as x) of two W-bit twos' complement numbers in one pass through
// combinational logic:
//   1. lead_norm (twice): left-normalize X and Y into Wx, Wy; counts sx, sy.
//   2. nk_adder: N = sy - sx + 1 integer quotient digits, K = (W-1) - N.
//   3. div_array: W-1 levels of non-restoring division give digits z[W-2:0]
//      and partial remainders R_1 .. R_(W-1).
//   4. The quotient register's sign position gets sign(X) XOR sign(Y); the
//      word {sign, digits} goes through a shift array (right by K, sign
//      extended) so that only the N integer digits remain, then through the
//      half-adder chain, which adds COR from quot_correction.
//   5. R_N is picked from the array, restored by rem_restore if the quotient
//      is even, and shifted right by sy so that it reads as an integer.
//      For N <= 0 (|X| below the divisor's order) the remainder is X itself.
// The remainder shift is sy. It equals the dividend-to-divisor order
// difference k - l whenever X needs no normalization (sx = 0); for sx > 0 only
// the shift by sy gives the remainder, because R_N = 2^sy * (X - Z*Y).
//
// Fractional mode (frac = 1) divides left-normalized mantissas, read as
// fixed-point numbers with the point after the sign bit. The operands bypass
// normalization (they must already be normalized: 01x..x, 10x..x except
// 100..0, or 110..0), N is W-1 and K is 0, so the shift array is transparent
// and z = trunc(x * 2^(W-2) / y): the quotient with W-2 fraction bits. r is
// then the matching scaled remainder x * 2^(W-2) - z*y, which a floating-point
// divider does not need.
//
// Y = 0 and the overflow -2^(W-1) / -1 give meaningless results; neither is
// flagged. One more case is outside the scheme: X = -2^(W-1) divided by a
// power of two +-2^j, an exact division whose partial remainders never reach
// zero; its quotient comes out one too small in magnitude and its remainder
// is nonzero.
//
// Combinational.  frac : mode;  x, y : operands;  z, r : quotient, remainder.
module div_comb_core #(
  parameter  int unsigned W  = div_pkg::DIV_W,
  localparam int unsigned CW = $clog2(W),
  localparam int unsigned NW = CW + 2,
  localparam int unsigned L  = W - 1
) (
  input  logic         frac,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] z,
  output logic [W-1:0] r
);

  logic [W-1:0]         wx_n, wy_n, wx, wy;
  logic [CW-1:0]        sx_n, sy_n, sx, sy, k;
  logic signed [NW-1:0] n_dig;
  logic                 n_pos;
  logic [L-1:0]         digits;
  logic [W-1:0]         r_lv [1:L];
  logic [L-1:0]         zero_lv;
  logic                 cor;
  logic [W-1:0]         z_aligned;
  logic [W-1:0]         r_last, r_fix, r_int;

  lead_norm #(.W(W)) u_norm_x (.v(x), .wn(wx_n), .s(sx_n));
  lead_norm #(.W(W)) u_norm_y (.v(y), .wn(wy_n), .s(sy_n));

  // fractional mode: the operands are taken as already normalized
  assign wx = frac ? x  : wx_n;
  assign wy = frac ? y  : wy_n;
  assign sx = frac ? '0 : sx_n;
  assign sy = frac ? '0 : sy_n;

  nk_adder #(.W(W)) u_nk (.frac(frac), .sx(sx), .sy(sy), .n_dig(n_dig), .k(k), .n_pos(n_pos));

  div_array #(.W(W)) u_array (
    .wx(wx), .wy(wy), .z(digits), .r_lv(r_lv), .zero_lv(zero_lv)
  );

  quot_correction #(.W(W)) u_cor (
    .xs(x[W-1]), .ys(y[W-1]), .zero_lv(zero_lv), .n_dig(n_dig),
    .eq(), .cor1(), .cor2(), .cor3(), .cor(cor)
  );

  shift_array #(.W(W)) u_zshift (
    .a({x[W-1] ^ y[W-1], digits}), .sh(k), .y(z_aligned)
  );

  half_adder_inc #(.W(W)) u_zinc (.a(z_aligned), .cin(cor), .s(z));

  // R_N: the partial remainder of the level that gave the last integer digit
  always_comb begin
    r_last = r_lv[1];
    for (int m = 1; m <= L; m++) begin
      if (n_dig == NW'(m)) r_last = r_lv[m];
    end
  end

  rem_restore #(.W(W)) u_restore (.r_last(r_last), .wy(wy), .z0(z[0]), .r_fix(r_fix));

  shift_array #(.W(W)) u_rshift (.a(r_fix), .sh(sy), .y(r_int));

  assign r = n_pos ? r_int : x;

endmodule
