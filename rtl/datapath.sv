// datapath: shift-and-add data path of the multiplier.
//
// Three registers and an adder:
//   operand a - 2N-bit shift register (shift_reg_cle), loaded with a
//               zero-extended to 2N bits, then shifted toward the MSB every
//               cycle: in cycle k it holds a * 2^k.
//   operand b - N-bit shift register (shift_reg_cled), loaded with b, then
//               shifted toward bit 0 every cycle with zeros coming in at the
//               top: in cycle k its bit 0 is bit k of b.
//   result    - 2N-bit register (shift_reg_cle used only for loading). It is
//               cleared asynchronously by load, and loads the adder's sum
//               (result + operand a) on each edge where bit 0 of operand b
//               is 1; otherwise it holds.
// internal_ready is the NOR of the operand-b register: the multiplication is
// complete as soon as no 1 bits of b are left, so a zero multiplier finishes
// at once and a multiplier whose top bit is N-1 needs N shift cycles.
// The output is the accumulated product without its LSB, i.e. the product
// divided by two and truncated (2N-1 bits).
//
// Interface and timing: all registers change on the rising edge of clock.
// Hold load high across one edge to start: a and b are captured on that edge
// and the result register is held clear while load is high. The result is
// final on the edge after which internal_ready is 1.
//
// The structure, the widths (N = 4: 8-bit operand-a and result registers,
// 7-bit output), the tied-off pins and the output taken from bits 7..1 all
// follow the data path schematic. The adder's carry and overflow outputs are
// unconnected there and are left open here. Because load is both a
// synchronous load enable (operand registers) and an asynchronous clear
// (accumulator), lint reports it as flopped both ways; that is intended.
module datapath #(
  parameter int unsigned N = mult_pkg::OPERAND_WIDTH
) (
  input  logic           clock,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           load,
  output logic           internal_ready,
  output logic [2*N-2:0] result
);

  timeunit 1ns; timeprecision 100ps;

  logic [2*N-1:0] operand_a_q;
  logic [N-1:0]   operand_b_q;
  logic [2*N-1:0] preresult;
  logic [2*N-1:0] sum;

  // Multiplicand: zero-padded on the left, doubled every cycle.
  shift_reg_cle #(.WIDTH(2*N)) u_operand_a (
    .clock (clock),
    .clr   (1'b0),
    .load  (load),
    .ce    (1'b1),
    .sli   (1'b0),
    .d     ({{N{1'b0}}, a}),
    .q     (operand_a_q)
  );

  // Multiplier: shifted toward bit 0 every cycle, zeros fill from the top.
  shift_reg_cled #(.WIDTH(N)) u_operand_b (
    .clock (clock),
    .clr   (1'b0),
    .load  (load),
    .ce    (1'b1),
    .left  (1'b0),
    .sli   (1'b0),
    .sri   (1'b0),
    .d     (b),
    .q     (operand_b_q)
  );

  adder #(.WIDTH(2*N)) u_adder (
    .ci  (1'b0),
    .a   (operand_a_q),
    .b   (preresult),
    .s   (sum),
    .co  (),
    .ofl ()
  );

  // Accumulator: cleared by load, adds operand a when the current bit of b is 1.
  shift_reg_cle #(.WIDTH(2*N)) u_result (
    .clock (clock),
    .clr   (load),
    .load  (operand_b_q[0]),
    .ce    (1'b0),
    .sli   (1'b0),
    .d     (sum),
    .q     (preresult)
  );

  assign internal_ready = ~|operand_b_q;
  assign result         = preresult[2*N-1:1];

endmodule
