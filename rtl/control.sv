// control: start/ready controller of the multiplier.
//
// Two D flip-flops, q1 and q2, with next-state logic taken gate for gate
// from the controller schematic:
//   q1 <= (q1 & start) | q2
//   q2 <= (start & ~q1 & ~q2) | ~internal_ready
//   load  = q2 & ~q1
//   ready = q1 & ~q2
// Read as a state machine over {q1, q2} (see mult_pkg::ctrl_state_e):
//   IDLE  (00) - start moves to LOAD.
//   LOAD  (01) - load is high for exactly one cycle; then BUSY if the data
//                path reports a non-zero multiplier, READY if it is zero.
//   BUSY  (11) - stays while internal_ready is 0, then READY.
//   READY (10) - ready is high while start stays high; when start falls the
//                controller returns to IDLE.
// internal_ready low also forces q2 high from IDLE or READY; with the data
// path attached that cannot happen in normal use, because the multiplier
// register is empty whenever the controller is in those states.
//
// Interface and timing: both flip-flops change on the rising edge of clock.
// start must be held until ready is seen and then removed. There is no reset
// input (the flip-flops' clear pins are tied inactive in the schematic): with
// start low the controller reaches IDLE by itself within two cycles of
// internal_ready going high, and the data path's multiplier register empties
// by itself within N cycles, so holding start low for N + 2 cycles after
// power-up brings the whole multiplier to IDLE.
module control
  import mult_pkg::*;
(
  input  logic clock,
  input  logic start,
  input  logic internal_ready,
  output logic load,
  output logic ready
);

  timeunit 1ns; timeprecision 100ps;

  ctrl_state_e state, state_next;

  logic q1, q2;
  assign q1 = state[1];
  assign q2 = state[0];

  always_comb begin
    state_next = ctrl_state_e'({ (q1 & start) | q2,
                                 (start & ~q1 & ~q2) | ~internal_ready });
  end

  always_ff @(posedge clock) begin
    state <= state_next;
  end

  assign load  = (state == S_LOAD);
  assign ready = (state == S_READY);

  // load is a single-cycle pulse: LOAD never follows LOAD.
  a_load_one_cycle : assert property (@(posedge clock) load |=> !load);

endmodule
