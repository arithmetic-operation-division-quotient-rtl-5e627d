// half_adder_inc: the quotient's "1/2 ADDER", a chain of W half adders.
//
// Adds the one-bit correction cin to the least significant bit of the aligned
// quotient a, with the carry rippling up through half adders (s = a XOR c,
// carry = a AND c). The carry out of the sign position is dropped: the sum of
// a quotient that needs correction always fits in W bits.
//
// Combinational.   a : aligned quotient;  cin : COR;  s : a + cin
module half_adder_inc #(
  parameter int unsigned W = div_pkg::DIV_W
) (
  input  logic [W-1:0] a,
  input  logic         cin,
  output logic [W-1:0] s
);

  logic [W-1:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_ha
    assign s[i]   = a[i] ^ c[i];
    if (i < W - 1) begin : g_carry
      assign c[i+1] = a[i] & c[i];
    end
  end

endmodule
