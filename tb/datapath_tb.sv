// datapath_tb: self-checking testbench for the shift-and-add data path.
//
// For every pair of 4-bit operands: a and b are presented with load high
// for one rising edge, the result is checked to be cleared while load is
// high, and the edges are counted until internal_ready rises. The result
// must then equal (a * b) / 2, truncated, and the number of edges must be
// 0 for b = 0 and (position of b's top 1 bit) + 1 otherwise. The worked
// example 10 x 3 / 2 = 15 is checked first.
module datapath_tb;
  timeunit 1ns; timeprecision 100ps;

  localparam int unsigned N = 4;

  logic           clock = 1'b0;
  logic [N-1:0]   a, b;
  logic           load;
  logic           internal_ready;
  logic [2*N-2:0] result;
  int checks = 0, failures = 0;

  datapath #(.N(N)) dut (.*);

  always #1 clock = ~clock;

  initial begin : watchdog
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected_shifts(int unsigned bv);
    int k = 0;
    for (int i = 0; i < int'(N); i++) if (bv[i]) k = i + 1;
    return k;
  endfunction

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, want);
    end
  endtask

  task automatic multiply(int unsigned av, int unsigned bv);
    int shifts = 0;
    @(negedge clock);
    a = N'(av); b = N'(bv); load = 1'b1;
    #0.2 expect_eq("result cleared while load is high", int'(result), 0);
    @(posedge clock);
    #0.2 load = 1'b0;
    while (!internal_ready) begin
      @(posedge clock);
      #0.2 shifts++;
      if (shifts > int'(N) + 2) break;
    end
    expect_eq($sformatf("%0d x %0d / 2", av, bv), int'(result), int'((av * bv) >> 1));
    expect_eq($sformatf("cycles for b=%0d", bv), shifts, expected_shifts(bv));
    // the result holds once the multiplier register is empty
    repeat (2) @(posedge clock);
    #0.2 expect_eq("result holds", int'(result), int'((av * bv) >> 1));
  endtask

  initial begin
    load = 1'b0; a = '0; b = '0;
    repeat (N + 1) @(posedge clock);
    multiply(10, 3);
    expect_eq("10 x 3 / 2", int'(result), 15);
    for (int i = 0; i < (1 << N); i++)
      for (int j = 0; j < (1 << N); j++)
        multiply(i, j);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
