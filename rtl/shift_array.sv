// shift_array: programmable arithmetic right shift array.
//
// Shifts a twos' complement word right by sh places with sign extension
// (towards the radix point). The divider uses two of them: one aligns the
// quotient digits by K = (W-1) - N, the other scales the last partial
// remainder down to the integer remainder. A shift of 0 leaves the word
// unchanged, which is how the array is made transparent. Built as log2(W)
// stages, each shifting by a power of two or passing its input through; the
// function is the divider scheme's, this stage structure is this design's.
//
// Combinational.
//   a  : word to shift;  sh : shift amount, 0 .. W-1;  y : result
module shift_array #(
  parameter  int unsigned W  = div_pkg::DIV_W,
  localparam int unsigned CW = $clog2(W)
) (
  input  logic [W-1:0]  a,
  input  logic [CW-1:0] sh,
  output logic [W-1:0]  y
);

  logic [W-1:0] stage [CW+1];

  assign stage[0] = a;

  for (genvar i = 0; i < CW; i++) begin : g_stage
    assign stage[i+1] = sh[i] ? W'($signed(stage[i]) >>> (2 ** i)) : stage[i];
  end

  assign y = stage[CW];

endmodule
