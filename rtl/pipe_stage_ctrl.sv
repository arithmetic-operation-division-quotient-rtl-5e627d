// pipe_stage_ctrl: the finite state machine that controls one stage of the
// micro-pipelined divider.
//
// The stage register is EMPTY or FULL. It accepts a new operation (load) when
// the previous stage offers one (in_valid) and the register is empty or is
// being emptied in the same cycle (out_ready from the next stage). A full
// stage whose successor does not accept it holds its contents: this is how a
// stall at the pipeline's output propagates backwards, one stage per full
// register. in_ready depends combinationally on out_ready, so a pipeline that
// is never stalled moves one operation per stage per cycle. The description
// names one such machine per stage; the two-state valid/ready protocol is
// this design's own.
//
// Ports: in_valid/in_ready towards the previous stage, valid/out_ready towards
// the next, load enables the stage's data register. rst_n (asynchronous,
// active low) empties the stage.
module pipe_stage_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  output logic load,
  output logic valid,
  input  logic out_ready
);

  import div_pkg::*;

  stage_state_e state, state_nx;

  always_comb begin
    in_ready = (state == STAGE_EMPTY) || out_ready;
    load     = in_valid && in_ready;
    valid    = (state == STAGE_FULL);
    state_nx = state;
    if (load)           state_nx = STAGE_FULL;
    else if (out_ready) state_nx = STAGE_EMPTY;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= STAGE_EMPTY;
    else        state <= state_nx;
  end

  // a full stage that is not read keeps its operation
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           (valid && !out_ready) |=> valid)
    else $error("pipe_stage_ctrl: stalled stage dropped its operation");

endmodule
