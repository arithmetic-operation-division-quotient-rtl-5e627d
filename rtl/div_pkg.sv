// div_pkg: constants and types shared by the signed integer divider.
//
// DIV_W is the operand and result width. The default of 8 is the 8x8 divider
// drawn gate by gate in the design's principal logic scheme; every module
// takes its own width parameter, whose default is this constant.
// stage_state_e is the state of one micro-pipeline stage controller: a stage
// register is either empty or holds an operation in flight.
package div_pkg;

  localparam int unsigned DIV_W = 8;

  typedef enum logic {
    STAGE_EMPTY = 1'b0,
    STAGE_FULL  = 1'b1
  } stage_state_e;

endpackage
