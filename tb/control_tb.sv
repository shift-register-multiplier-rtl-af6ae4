// control_tb: self-checking testbench for the start/ready controller.
//
// The controller is first brought to idle (start low, internal_ready high
// for two cycles). A reference state machine, written from the intended
// behaviour (idle, one-cycle load, busy until the multiplier register is
// empty, ready until start falls), then runs alongside it and load and ready
// are compared after every edge. Directed sequences repeat the two cases of
// the original controller test (a non-zero multiplication, where
// internal_ready falls after load, and a multiplication by zero, where it
// never falls); random stimulus follows. Each state transition of the
// reference must be seen at least once.
module control_tb;
  import mult_pkg::*;
  timeunit 1ns; timeprecision 100ps;

  logic clock = 1'b0;
  logic start, internal_ready, load, ready;
  int checks = 0, failures = 0;
  ctrl_state_e ref_state;
  int seen_load_busy = 0, seen_load_ready = 0, seen_busy_ready = 0;
  int seen_ready_hold = 0, seen_ready_idle = 0, seen_busy_hold = 0;

  control dut (.*);

  always #1 clock = ~clock;

  initial begin : watchdog
    repeat (10000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctrl_state_e ref_next(ctrl_state_e s, logic st, logic ir);
    case (s)
      S_IDLE:  return (st || !ir) ? S_LOAD : S_IDLE;
      S_LOAD:  return ir ? S_READY : S_BUSY;
      S_BUSY:  return ir ? S_READY : S_BUSY;
      default: return st ? (ir ? S_READY : S_BUSY) : (ir ? S_IDLE : S_LOAD);
    endcase
  endfunction

  // one clock cycle: apply inputs after the falling edge, update the
  // reference on the rising edge, compare just after it
  task automatic step(logic st, logic ir);
    ctrl_state_e nxt;
    @(negedge clock);
    start = st; internal_ready = ir;
    @(posedge clock);
    nxt = ref_next(ref_state, st, ir);
    if (ref_state == S_LOAD && nxt == S_BUSY)   seen_load_busy++;
    if (ref_state == S_LOAD && nxt == S_READY)  seen_load_ready++;
    if (ref_state == S_BUSY && nxt == S_READY)  seen_busy_ready++;
    if (ref_state == S_BUSY && nxt == S_BUSY)   seen_busy_hold++;
    if (ref_state == S_READY && nxt == S_READY) seen_ready_hold++;
    if (ref_state == S_READY && nxt == S_IDLE)  seen_ready_idle++;
    ref_state = nxt;
    #0.2;
    checks++;
    if (load !== (ref_state == S_LOAD) || ready !== (ref_state == S_READY)) begin
      failures++;
      $display("FAIL at %0t: load=%b ready=%b, expected state %s", $time, load, ready,
               ref_state.name());
    end
  endtask

  task automatic expect_count(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    start = 1'b0; internal_ready = 1'b1;
    repeat (2) @(posedge clock);
    ref_state = S_IDLE;
    step(1'b0, 1'b1);
    // non-zero multiplication: the multiplier register fills after load
    step(1'b1, 1'b1);                         // IDLE -> LOAD
    step(1'b1, 1'b0);                         // LOAD -> BUSY
    repeat (3) step(1'b1, 1'b0);              // BUSY
    step(1'b1, 1'b1);                         // BUSY -> READY
    repeat (2) step(1'b1, 1'b1);              // READY held
    step(1'b0, 1'b1);                         // READY -> IDLE
    repeat (3) step(1'b0, 1'b1);
    // multiplication by zero: internal_ready never falls
    step(1'b1, 1'b1);                         // IDLE -> LOAD
    step(1'b1, 1'b1);                         // LOAD -> READY
    step(1'b1, 1'b1);
    step(1'b0, 1'b1);                         // READY -> IDLE
    // random stimulus, internal_ready mostly high as in the real data path
    for (int i = 0; i < 3000; i++)
      step(1'($urandom_range(0, 1)), 1'($urandom_range(0, 3) != 0));
    expect_count("LOAD -> BUSY", seen_load_busy);
    expect_count("LOAD -> READY", seen_load_ready);
    expect_count("BUSY held", seen_busy_hold);
    expect_count("BUSY -> READY", seen_busy_ready);
    expect_count("READY held", seen_ready_hold);
    expect_count("READY -> IDLE", seen_ready_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
