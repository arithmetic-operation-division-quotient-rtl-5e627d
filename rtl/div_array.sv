// div_array: the hardware divider proper, W-1 levels of div_level in cascade.
//
// Level 1 forms R_1 = Wx -/+ Wy, subtracting when Wx and Wy have the same
// sign. Each later level m doubles R_(m-1) and subtracts Wy when the previous
// digit was 1, adds it when it was 0. The array always produces W-1 digits;
// level m gives digit z[W-1-m], so level 1 gives the most significant one
// (z6 .. z0 for W = 8). How many of them belong to the integer quotient (N)
// is decided later by the programmable shift array. All partial remainders
// and their zero flags come out as well: the remainder logic picks the one of
// level N, and the correction logic looks for a zero among the first N.
//
// The cascade, the first level's sign comparison and the digit numbering
// follow the 8x8 scheme's gate-level drawing; the zero flags of the drawing
// are produced per level and combined in quot_correction.
//
// Combinational; the delay is W-1 ripple adders in series.
//   wx, wy  : normalized dividend and divisor
//   z       : digits z[W-2] (level 1) .. z[0] (level W-1)
//   r_lv[m] : partial remainder R_m, m = 1 .. W-1
//   zero_lv : zero_lv[m-1] is R_m == 0
module div_array #(
  parameter  int unsigned W = div_pkg::DIV_W,
  localparam int unsigned L = W - 1
) (
  input  logic [W-1:0] wx,
  input  logic [W-1:0] wy,
  output logic [L-1:0] z,
  output logic [W-1:0] r_lv [1:L],
  output logic [L-1:0] zero_lv
);

  logic [W-1:0] r_in [L+1];
  logic [L-1:0] sub;

  assign r_in[0] = wx;
  assign sub[0]  = ~(wx[W-1] ^ wy[W-1]);

  for (genvar m = 1; m <= L; m++) begin : g_level
    logic zm;
    div_level #(.W(W), .FIRST(m == 1)) u_level (
      .r_prev (r_in[m-1]),
      .wy     (wy),
      .sub    (sub[m-1]),
      .r      (r_in[m]),
      .z      (zm),
      .zero   (zero_lv[m-1])
    );
    assign z[L-m]  = zm;
    if (m < L) begin : g_next
      assign sub[m] = zm;
    end
    assign r_lv[m] = r_in[m];
  end

endmodule
