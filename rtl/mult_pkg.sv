// mult_pkg: types and constants shared by the shift-register multiplier.
//
// OPERAND_WIDTH is the width of each operand (4 bits). The operand-a and
// result registers are twice as wide, so an N x N product always fits, and
// the published result drops the product's LSB (it is the product divided by
// two, truncated), leaving 2N-1 bits.
//
// ctrl_state_e names the four states of the two-flip-flop controller. The
// encoding is the pair of flip-flop outputs {q1, q2}: q1 is the flip-flop fed
// by the OR of (q1 AND start) with q2, q2 the one fed by the OR of
// (start AND NOT q1 AND NOT q2) with NOT internal_ready. The state names are
// this design's own labels; the encoding is the controller's gate structure.
package mult_pkg;

  timeunit 1ns; timeprecision 100ps;

  parameter int unsigned OPERAND_WIDTH = 4;

  typedef enum logic [1:0] {
    S_IDLE  = 2'b00,  // waiting for start
    S_LOAD  = 2'b01,  // load asserted: operands loaded, result cleared
    S_BUSY  = 2'b11,  // multiplying until the multiplier register is empty
    S_READY = 2'b10   // ready asserted until start is removed
  } ctrl_state_e;

endpackage
