// divider_top: both organizations of the signed integer divider, side by side.
//
// c_* is the single-cycle divider (comb_divider): four registers around one
// combinational divider. p_* is the micro-pipelined divider (pipe_divider),
// which computes the same quotient and remainder at one operation per cycle
// with a latency of W+4 cycles. The two share only clock and reset. Each
// takes a mode bit with its operands: 0 for integer division (quotient and
// remainder), 1 for fractional division of normalized mantissas.
//   c_in_valid, c_frac, c_x, c_y -> c_out_valid, c_z, c_r  (2 edges later)
//   p_in_valid/p_in_ready, p_frac, p_x, p_y -> p_out_valid/p_out_ready,
//   p_z, p_r
module divider_top #(
  parameter int unsigned W = div_pkg::DIV_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         c_in_valid,
  input  logic         c_frac,
  input  logic [W-1:0] c_x,
  input  logic [W-1:0] c_y,
  output logic         c_out_valid,
  output logic [W-1:0] c_z,
  output logic [W-1:0] c_r,
  input  logic         p_in_valid,
  output logic         p_in_ready,
  input  logic         p_frac,
  input  logic [W-1:0] p_x,
  input  logic [W-1:0] p_y,
  output logic         p_out_valid,
  input  logic         p_out_ready,
  output logic [W-1:0] p_z,
  output logic [W-1:0] p_r
);

  comb_divider #(.W(W)) u_comb (
    .clk(clk), .rst_n(rst_n), .in_valid(c_in_valid), .frac(c_frac), .x(c_x), .y(c_y),
    .out_valid(c_out_valid), .z(c_z), .r(c_r)
  );

  pipe_divider #(.W(W)) u_pipe (
    .clk(clk), .rst_n(rst_n), .in_valid(p_in_valid), .in_ready(p_in_ready), .frac(p_frac),
    .x(p_x), .y(p_y), .out_valid(p_out_valid), .out_ready(p_out_ready),
    .z(p_z), .r(p_r)
  );

endmodule
