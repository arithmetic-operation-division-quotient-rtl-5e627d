// lead_norm: left normalization of one twos' complement operand.
//
// Counts the leftmost insignificant digits of v (the copies of the sign bit
// that can be shifted out without changing the value's sign) and shifts v left
// by that count, so that the result wn has the sign bit followed by the first
// significant digit: 01xx..x for a positive number, 10xx..x for a negative one.
// One exception: a negative power of two, -2^j, is normalized to 1100..0
// rather than 1000..0, so that its normalized magnitude (2^(W-2)) has the same
// order as that of +2^j. Without it the quotient of an exact division by, or
// of, a negative power of two comes out one digit short. Zero and -1 give the
// largest counts (W-1 and W-2). The counting scheme itself is this design's
// own (a priority chain); only its function is given by the division scheme.
//
// Purely combinational: wn and s follow v after the gate delays.
//   v  : operand, W bits, twos' complement
//   wn : normalized operand (Wx or Wy)
//   s  : number of left shifts applied, 0 .. W-1
module lead_norm #(
  parameter  int unsigned W  = div_pkg::DIV_W,
  localparam int unsigned CW = $clog2(W)
) (
  input  logic [W-1:0]  v,
  output logic [W-1:0]  wn,
  output logic [CW-1:0] s
);

  logic [CW-1:0] cnt;
  logic          run;
  logic [W-1:0]  shifted;

  always_comb begin
    cnt = '0;
    run = 1'b1;
    for (int i = W - 2; i >= 0; i--) begin
      if (run && (v[i] == v[W-1])) cnt = cnt + 1'b1;
      else run = 1'b0;
    end
    shifted = v << cnt;
    // -2^j would become 100..0: stop one shift earlier, at 1100..0
    if (v[W-1] && (cnt != '0) && (shifted == {1'b1, {(W-1){1'b0}}})) begin
      cnt     = cnt - 1'b1;
      shifted = v << cnt;
    end
    s  = cnt;
    wn = shifted;
  end

endmodule
