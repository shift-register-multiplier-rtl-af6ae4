// adder_tb: exhaustive self-checking testbench for the 8-bit adder.
//
// Every pair of 8-bit addends with both carry-in values is applied. The sum
// and carry are compared with integer addition, and the overflow flag with
// the signed sum falling outside -128..127.
module adder_tb;
  timeunit 1ns; timeprecision 100ps;

  localparam int unsigned WIDTH = 8;

  logic             ci, co, ofl;
  logic [WIDTH-1:0] a, b, s;
  int checks = 0, failures = 0;
  int overflows = 0;

  adder #(.WIDTH(WIDTH)) dut (.*);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          int unsigned usum;
          int          ssum;
          ci = c[0]; a = i[7:0]; b = j[7:0];
          #1;
          usum = i + j + c;
          ssum = int'($signed(a)) + int'($signed(b)) + c;
          checks++;
          if ({co, s} !== usum[8:0] || ofl !== (ssum < -128 || ssum > 127)) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d + %0d + %0d: s=%0d co=%b ofl=%b", i, j, c, s, co, ofl);
          end
          if (ofl) overflows++;
        end
    checks++;
    if (overflows == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
