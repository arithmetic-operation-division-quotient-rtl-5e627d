// rem_restore: recovers the partial remainder that holds the remainder.
//
// If the (corrected) quotient is odd, the last partial remainder R_N already
// holds the remainder. If it is even, the last step overshot and the previous
// partial remainder is restored from R_N through a multiplexer and an adder:
// R_N - Wy when R_N and Wy have the same sign, R_N + Wy when they differ.
// Subtraction again uses the inverted divisor and a carry-in of 1.
//
// Combinational.
//   r_last : R_N;  wy : normalized divisor;  z0 : quotient bit 0
//   r_fix  : the partial remainder that holds the remainder, still scaled
module rem_restore #(
  parameter int unsigned W = div_pkg::DIV_W
) (
  input  logic [W-1:0] r_last,
  input  logic [W-1:0] wy,
  input  logic         z0,
  output logic [W-1:0] r_fix
);

  logic         same;
  logic [W-1:0] addend;
  logic         cin;

  always_comb begin
    same   = ~(r_last[W-1] ^ wy[W-1]);
    addend = z0 ? '0 : (same ? ~wy : wy);
    cin    = ~z0 & same;
    r_fix  = r_last + addend + W'(cin);
  end

endmodule
