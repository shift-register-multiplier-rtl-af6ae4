// adder: WIDTH-bit binary adder with carry in, carry out and overflow flag.
//
// This is the behaviour of the 8-bit library adder of the multiplier's data
// path (pins CI, A, B, S, CO, OFL). It is purely combinational:
//   {co, s} = a + b + ci
//   ofl     = signed overflow: a and b have the same sign and s the other.
// The multiplier uses only s; co and ofl are kept so that the block has the
// full interface of the part it replaces.
module adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             ci,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s,
  output logic             co,
  output logic             ofl
);

  timeunit 1ns; timeprecision 100ps;

  always_comb begin
    {co, s} = {1'b0, a} + {1'b0, b} + {{WIDTH{1'b0}}, ci};
    ofl     = (a[WIDTH-1] == b[WIDTH-1]) && (s[WIDTH-1] != a[WIDTH-1]);
  end

endmodule
