// shift_reg_cled: loadable bidirectional shift register with clock enable and
// asynchronous clear.
//
// This is the behaviour of the 4-bit library shift register the multiplier
// holds its multiplier operand in (pins SLI, SRI, D0..D3, L, LEFT, CE, C,
// CLR, Q0..Q3). Bit 0 is Q0.
//
// Priority, highest first:
//   clr  - asynchronous, clears q at once and while high
//   load - q <= d on the rising clock edge, whatever ce is
//   ce   - on the rising clock edge, shift:
//            left = 1: toward Q3, q <= {q[WIDTH-2:0], sli}
//            left = 0: toward Q0, q <= {sri, q[WIDTH-1:1]}
//   otherwise q holds.
module shift_reg_cled #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clock,
  input  logic             clr,
  input  logic             load,
  input  logic             ce,
  input  logic             left,
  input  logic             sli,
  input  logic             sri,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  timeunit 1ns; timeprecision 100ps;

  always_ff @(posedge clock or posedge clr) begin
    if (clr)       q <= '0;
    else if (load) q <= d;
    else if (ce) begin
      if (left)    q <= {q[WIDTH-2:0], sli};
      else         q <= {sri, q[WIDTH-1:1]};
    end
  end

endmodule
