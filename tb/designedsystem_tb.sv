// designedsystem_tb: end-to-end self-checking testbench of the multiplier,
// at its default size (4-bit operands, 7-bit result).
//
// Sequence:
//   1. Power-up: no reset exists, so start is held low for N + 2 cycles and
//      ready must then be low.
//   2. The three reference cases: 10 x 3 / 2 = 15, 10 x 0 / 2 = 0 (answered
//      at once) and 1 x 15 / 2 = 7 (the longest computation).
//   3. Every pair of 4-bit operands, with start held 0..2 extra cycles after
//      ready and 0..3 idle cycles between requests.
// Each request drives a, b and start half a cycle after a rising edge and
// counts rising edges, the one that samples start included, until ready is
// high. Checked: the result equals (a * b) / 2 truncated; ready rises 1 edge
// after the sampling edge for b = 0 and k + 2 edges after it otherwise (k the
// position of b's top 1 bit), so the count is 2 or k + 3; ready stays low while busy, stays high with a
// stable result while start is held, and falls one edge after start does.
// Every mechanism of the design (zero multiplier, longest multiplier, an
// add skipped for a 0 bit of b, truncation of an odd product, ready held by
// start, back-to-back requests) must occur at least once.
module designedsystem_tb;
  timeunit 1ns; timeprecision 100ps;

  localparam int unsigned N = 4;

  logic           clock = 1'b0;
  logic [N-1:0]   a, b;
  logic           start;
  logic           ready;
  logic [2*N-2:0] result;
  int checks = 0, failures = 0;
  int n_zero = 0, n_longest = 0, n_skip = 0, n_odd = 0, n_held = 0, n_b2b = 0;

  designedsystem dut (.*);

  always #1 clock = ~clock;

  initial begin : watchdog
    repeat (20000) @(posedge clock);
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

  function automatic int top_bit(int unsigned bv);
    int k = -1;
    for (int i = 0; i < int'(N); i++) if (bv[i]) k = i;
    return k;
  endfunction

  // rising edge, then half a cycle later (where inputs change)
  task automatic edge_mid();
    @(posedge clock);
    #0.5;
  endtask

  // one request; returns the result seen when ready rose
  task automatic multiply(input int unsigned av, input int unsigned bv,
                          input int hold, input int gap, output int got);
    int unsigned want = (av * bv) >> 1;
    int latency = 0;
    int k = top_bit(bv);
    a = N'(av); b = N'(bv); start = 1'b1;
    do begin
      edge_mid();
      latency++;
    end while (!ready && latency < int'(N) + 4);
    got = int'(result);
    expect_eq($sformatf("%0d x %0d / 2", av, bv), got, int'(want));
    expect_eq($sformatf("edges to ready for b=%0d", bv), latency, (k < 0) ? 2 : k + 3);
    if (bv == 0) n_zero++;
    if (k == int'(N) - 1) n_longest++;
    if (k > 0 && (bv & ((1 << k) - 1)) != ((1 << k) - 1)) n_skip++;
    if ((av * bv) % 2 == 1) n_odd++;
    if (hold > 0) n_held++;
    if (gap == 0) n_b2b++;
    for (int i = 0; i < hold; i++) begin
      edge_mid();
      expect_eq("ready held while start is high", int'(ready), 1);
      expect_eq("result stable while ready", int'(result), int'(want));
    end
    start = 1'b0;
    edge_mid();
    expect_eq("ready falls after start", int'(ready), 0);
    expect_eq("result kept after ready", int'(result), int'(want));
    for (int i = 0; i < gap; i++) begin
      edge_mid();
      expect_eq("idle", int'(ready), 0);
    end
  endtask

  initial begin
    int got;
    start = 1'b0; a = '0; b = '0;
    repeat (N + 2) edge_mid();
    expect_eq("idle after power-up", int'(ready), 0);

    multiply(int'(4'b1010), int'(4'b0011), 1, 7, got);
    expect_eq("reference case 10 x 3", got, int'(7'b0001111));
    multiply(int'(4'b1010), int'(4'b0000), 1, 7, got);
    expect_eq("reference case 10 x 0", got, int'(7'b0000000));
    multiply(int'(4'b0001), int'(4'b1111), 1, 7, got);
    expect_eq("reference case 1 x 15", got, int'(7'b0000111));

    for (int i = 0; i < (1 << N); i++)
      for (int j = 0; j < (1 << N); j++)
        multiply(i, j, $urandom_range(0, 2), $urandom_range(0, 3), got);

    expect_eq("zero multiplier seen",     int'(n_zero > 0), 1);
    expect_eq("longest multiplier seen",  int'(n_longest > 0), 1);
    expect_eq("skipped add seen",         int'(n_skip > 0), 1);
    expect_eq("odd product seen",         int'(n_odd > 0), 1);
    expect_eq("ready held by start seen", int'(n_held > 0), 1);
    expect_eq("back-to-back request seen", int'(n_b2b > 0), 1);
    $display("mechanisms: zero=%0d longest=%0d skip=%0d odd=%0d held=%0d b2b=%0d",
             n_zero, n_longest, n_skip, n_odd, n_held, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
