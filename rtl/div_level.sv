// div_level: one level of the divider array (one step of non-restoring
// division of twos' complement numbers with a fixed divisor).
//
// The level adds the doubled previous partial remainder and the normalized
// divisor Wy or its complement: R_m = 2*R_(m-1) + Wy or 2*R_(m-1) - Wy.
// The doubling is a wiring shift, {R_(m-1)[W-2:0], 0}. Subtraction is the
// inverted divisor chosen by the two-input multiplexer (control signals
// CS+/CS-) plus a carry of 1 into the adder's least significant bit, so the
// array is built of adders only. The quotient digit of the level is the
// equivalence of the signs of R_m and Wy: 1 when they agree, and then the
// next level subtracts; 0 when they differ, and then it adds. The first level
// (FIRST = 1) adds the normalized dividend Wx itself, not doubled.
// zero flags R_m = 0, used to find an exact (or prematurely exact) division.
//
// Combinational.
//   r_prev : R_(m-1) (Wx for the first level)
//   wy     : normalized divisor
//   sub    : CS- of this level (1: subtract, 0: add)
//   r      : R_m;  z : quotient digit;  zero : R_m == 0
module div_level #(
  parameter int unsigned W     = div_pkg::DIV_W,
  parameter bit          FIRST = 1'b0
) (
  input  logic [W-1:0] r_prev,
  input  logic [W-1:0] wy,
  input  logic         sub,
  output logic [W-1:0] r,
  output logic         z,
  output logic         zero
);

  logic [W-1:0] lhs;
  logic [W-1:0] rhs;

  always_comb begin
    lhs  = FIRST ? r_prev : {r_prev[W-2:0], 1'b0};
    rhs  = sub ? ~wy : wy;
    r    = lhs + rhs + W'(sub);
    z    = ~(r[W-1] ^ wy[W-1]);
    zero = (r == '0);
  end

endmodule
