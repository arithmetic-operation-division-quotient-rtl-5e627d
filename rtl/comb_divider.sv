// comb_divider: single-cycle signed divider with its four registers.
//
// The input registers RGX and RGY capture the operands, and a mode bit the
// fractional-mode flag (see div_comb_core), when in_valid is high.
// Between them and the output registers RGZ (quotient) and RGR (remainder)
// lies only the combinational divider div_comb_core, so one division takes
// one clock period of combinational delay. A new operand pair can be loaded
// every cycle.
//
// Timing: operands presented with in_valid at clock edge t are in RGX/RGY
// after edge t; the results are in RGZ/RGR, with out_valid high, after edge
// t+1. out_valid is high for one cycle per operation. rst_n (asynchronous,
// active low) clears all four registers and out_valid; the handshake and the
// reset are this design's own, the description gives only the registers.
module comb_divider #(
  parameter int unsigned W = div_pkg::DIV_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         frac,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic         out_valid,
  output logic [W-1:0] z,
  output logic [W-1:0] r
);

  logic [W-1:0] rgx, rgy;
  logic         rg_valid;
  logic         rg_frac;
  logic [W-1:0] z_comb, r_comb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rgx      <= '0;
      rgy      <= '0;
      rg_frac  <= 1'b0;
      rg_valid <= 1'b0;
    end else begin
      rg_valid <= in_valid;
      if (in_valid) begin
        rgx     <= x;
        rgy     <= y;
        rg_frac <= frac;
      end
    end
  end

  div_comb_core #(.W(W)) u_core (.frac(rg_frac), .x(rgx), .y(rgy), .z(z_comb), .r(r_comb));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z         <= '0;
      r         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= rg_valid;
      if (rg_valid) begin
        z <= z_comb;
        r <= r_comb;
      end
    end
  end

endmodule
