// shift_reg_cle_tb: self-checking testbench for shift_reg_cle (8 bits).
//
// Random load, ce, sli, d and occasional clear pulses are applied between
// clock edges. A reference value kept in the testbench is updated with the
// register's documented priority (clear, load, shift toward the MSB, hold)
// and compared with q after every edge. Clear pulses are also checked while
// the clock is idle, to show that clear acts without an edge.
module shift_reg_cle_tb;
  timeunit 1ns; timeprecision 100ps;

  localparam int unsigned WIDTH = 8;

  logic             clock = 1'b0;
  logic             clr, load, ce, sli;
  logic [WIDTH-1:0] d, q, model;
  int checks = 0, failures = 0;

  shift_reg_cle #(.WIDTH(WIDTH)) dut (.*);

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
      $display("FAIL %s: q=%h expected %h", what, q, model);
    end
  endtask

  initial begin
    clr = 1'b0; load = 1'b0; ce = 1'b0; sli = 1'b0; d = '0; model = '0;
    #1 clr = 1'b1;
    #1 check("clear at power-up");
    clr = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clock);
      load = ($urandom_range(0, 3) == 0);
      ce   = 1'($urandom_range(0, 1));
      sli  = 1'($urandom_range(0, 1));
      d    = WIDTH'($urandom);
      if ($urandom_range(0, 15) == 0) begin
        // clear pulse between edges: must act at once
        #1 clr = 1'b1;
        #1 model = '0;
        check("asynchronous clear");
        clr = 1'b0;
      end
      @(posedge clock);
      if (load)    model = d;
      else if (ce) model = {model[WIDTH-2:0], sli};
      #1 check("clocked update");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
