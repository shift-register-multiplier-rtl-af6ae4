// shift_reg_cled_tb: self-checking testbench for shift_reg_cled (4 bits).
//
// Random load, ce, left, sli, sri, d and occasional clear pulses are applied
// between clock edges. A reference value kept in the testbench follows the
// documented priority (clear, load, shift left toward Q3 or right toward Q0,
// hold) and is compared with q after every edge and after each clear.
module shift_reg_cled_tb;
  timeunit 1ns; timeprecision 100ps;

  localparam int unsigned WIDTH = 4;

  logic             clock = 1'b0;
  logic             clr, load, ce, left, sli, sri;
  logic [WIDTH-1:0] d, q, model;
  int checks = 0, failures = 0;
  int lefts = 0, rights = 0;

  shift_reg_cled #(.WIDTH(WIDTH)) dut (.*);

  always #5 clock = ~clock;

  initial begin : watchdog
    repeat (5000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, model);
    end
  endtask

  initial begin
    clr = 1'b0; load = 1'b0; ce = 1'b0; left = 1'b0; sli = 1'b0; sri = 1'b0;
    d = '0; model = '0;
    #1 clr = 1'b1;
    #1 check("clear at power-up");
    clr = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clock);
      load = ($urandom_range(0, 3) == 0);
      ce   = 1'($urandom_range(0, 1));
      left = 1'($urandom_range(0, 1));
      sli  = 1'($urandom_range(0, 1));
      sri  = 1'($urandom_range(0, 1));
      d    = WIDTH'($urandom);
      if ($urandom_range(0, 15) == 0) begin
        #1 clr = 1'b1;
        #1 model = '0;
        check("asynchronous clear");
        clr = 1'b0;
      end
      @(posedge clock);
      if (load) model = d;
      else if (ce && left) begin
        model = {model[WIDTH-2:0], sli};
        lefts++;
      end else if (ce) begin
        model = {sri, model[WIDTH-1:1]};
        rights++;
      end
      #1 check("clocked update");
    end
    checks++;
    if (lefts == 0 || rights == 0) begin
      failures++;
      $display("FAIL: a shift direction was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
