// reference_sequence_tb: replays the multiplier's reference request sequence
// with its original timing, against the full-size design.
//
// Clock period 2 ns (rising edges at odd nanoseconds). No reset: start is
// low for the first 14 ns, which covers the 6 settling cycles the design
// needs. Each request sets a, b and start together, waits for ready, keeps
// start for another 3 ns, then lowers it and waits 15 ns:
//   10 x 3 / 2  -> 0001111
//   10 x 0 / 2  -> 0000000
//    1 x 15 / 2 -> 0000111
// Checked: the result at the moment ready rises and 3 ns later, that ready
// rises exactly once per request (no early pulse), and that it is low again
// before the next request.
module reference_sequence_tb;
  timeunit 1ns; timeprecision 100ps;

  logic       clock = 1'b0;
  logic [3:0] a = 4'b0000, b = 4'b0000;
  logic       start = 1'b0;
  logic       ready;
  logic [6:0] result;
  int checks = 0, failures = 0;
  int ready_pulses = 0;
  bit counting = 1'b0;   // power-up state is arbitrary until start is used

  designedsystem dut (.*);

  always #1 clock = ~clock;

  always @(posedge ready) if (counting) ready_pulses++;

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL at %0t, %s: got %0d expected %0d", $time, what, got, want);
    end
  endtask

  task automatic request(logic [3:0] av, logic [3:0] bv, logic [6:0] want, int n);
    a = av; b = bv; start = 1'b1;
    wait (ready == 1'b1);
    expect_eq($sformatf("%0d x %0d / 2 when ready rises", av, bv), int'(result), int'(want));
    #3 start = 1'b0;
    expect_eq($sformatf("%0d x %0d / 2 after 3 ns", av, bv), int'(result), int'(want));
    expect_eq("ready pulses so far", ready_pulses, n);
    #15;
    expect_eq("ready low before the next request", int'(ready), 0);
  endtask

  initial begin
    #14;
    expect_eq("idle after power-up", int'(ready), 0);
    counting = 1'b1;
    request(4'b1010, 4'b0011, 7'b0001111, 1);
    request(4'b1010, 4'b0000, 7'b0000000, 2);
    request(4'b0001, 4'b1111, 7'b0000111, 3);
    #20;
    expect_eq("total ready pulses", ready_pulses, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
