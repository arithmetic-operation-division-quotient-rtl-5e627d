// nk_adder: the adder that follows the two normalization schemes.
//
// From the normalization counts of the dividend (sx) and of the divisor (sy)
// it forms N = sy - sx + 1, the number of quotient digits that are not known
// in advance (the number of integer digits of |X/Y|), and the parameter of
// the quotient's programmable shift array, K = (W-1) - N, clamped to the range
// 0 .. W-1 that the shifter can use. n_pos flags N >= 1; for N <= 0 the divisor
// is larger in magnitude than the dividend, the quotient is 0 and the
// remainder is the dividend itself.
// In fractional mode (frac = 1, division of left-normalized mantissas) the
// quotient always has the full W-1 digits: N = W-1 and K = 0, which makes the
// quotient's shift array transparent.
//
// Combinational.
//   frac   : fractional (mantissa) mode
//   sx, sy : left shifts applied to X and to Y, 0 .. W-1
//   n_dig  : N, signed
//   k      : K, clamped
//   n_pos  : N >= 1
module nk_adder #(
  parameter  int unsigned W  = div_pkg::DIV_W,
  localparam int unsigned CW = $clog2(W),
  localparam int unsigned NW = CW + 2
) (
  input  logic                 frac,
  input  logic [CW-1:0]        sx,
  input  logic [CW-1:0]        sy,
  output logic signed [NW-1:0] n_dig,
  output logic [CW-1:0]        k,
  output logic                 n_pos
);

  localparam logic signed [NW-1:0] LEVELS = NW'(W - 1);

  logic signed [NW-1:0] k_full;

  always_comb begin
    if (frac) n_dig = LEVELS;
    else      n_dig = $signed({2'b00, sy}) - $signed({2'b00, sx}) + NW'(1);
    k_full = LEVELS - n_dig;
    n_pos  = (n_dig > 0);
    if (k_full < 0)            k = '0;
    else if (k_full > LEVELS)  k = CW'(W - 1);
    else                       k = k_full[CW-1:0];
  end

endmodule
