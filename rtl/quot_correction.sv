// quot_correction: decides whether the quotient must be incremented.
//
// The array's digits, read as a twos' complement number whose sign was set in
// advance, can be one less than the truncated quotient because of the
// asymmetry of the twos' complement range. The correction COR (+1 in the
// quotient's least significant bit) is the OR of three terms:
//   cor1 = X >= 0 and Y < 0                (always)
//   cor2 = X <  0 and Y >= 0 and not EQ    (inexact division)
//   cor3 = X <  0 and Y <  0 and EQ        (exact division)
// EQ is 1 when a partial remainder R_m is zero at some level m <= N, i.e.
// the division is exact, possibly prematurely. Levels beyond N compute
// fractional digits; a zero there means only that the fraction ends, so
// their flags are masked out (this design's reading; a zero detected at any
// of the W-1 levels would give wrong quotients, e.g. -3/2).
//
// Combinational.
//   xs, ys  : sign bits of X and Y
//   zero_lv : zero_lv[m-1] is R_m == 0, m = 1 .. W-1
//   n_dig   : N, signed
module quot_correction #(
  parameter  int unsigned W  = div_pkg::DIV_W,
  localparam int unsigned L  = W - 1,
  localparam int unsigned NW = $clog2(W) + 2
) (
  input  logic                 xs,
  input  logic                 ys,
  input  logic [L-1:0]         zero_lv,
  input  logic signed [NW-1:0] n_dig,
  output logic                 eq,
  output logic                 cor1,
  output logic                 cor2,
  output logic                 cor3,
  output logic                 cor
);

  always_comb begin
    eq = 1'b0;
    for (int m = 1; m <= L; m++) begin
      if (NW'(m) <= n_dig) eq = eq | zero_lv[m-1];
    end
    cor1 = ~xs &  ys;
    cor2 =  xs & ~ys & ~eq;
    cor3 =  xs &  ys &  eq;
    cor  = cor1 | cor2 | cor3;
  end

endmodule
