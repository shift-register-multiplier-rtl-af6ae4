// shift_reg_cle: loadable shift register with clock enable and asynchronous
// clear, shifting toward the most significant bit.
//
// This is the behaviour of the 8-bit library shift register the multiplier's
// data path is drawn with (pins SLI, D, L, CE, C, CLR, Q). It is used twice:
// as the multiplicand register, which doubles its contents every cycle, and
// as the result register, which only ever loads.
//
// Priority, highest first:
//   clr  - asynchronous, clears q at once and while high
//   load - q <= d on the rising clock edge, whatever ce is
//   ce   - q <= {q[WIDTH-2:0], sli} on the rising clock edge
//   otherwise q holds.
// There is no other reset: the register powers up with whatever value it
// has until it is loaded or cleared.
module shift_reg_cle #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clock,
  input  logic             clr,
  input  logic             load,
  input  logic             ce,
  input  logic             sli,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  timeunit 1ns; timeprecision 100ps;

  always_ff @(posedge clock or posedge clr) begin
    if (clr)       q <= '0;
    else if (load) q <= d;
    else if (ce)   q <= {q[WIDTH-2:0], sli};
  end

endmodule
