// designedsystem: sequential multiplier computing (a * b) / 2.
//
// The controller (control) and the shift-and-add data path (datapath) are
// joined by two signals: load, from the controller, which captures a and b
// and clears the accumulator, and internal_ready, from the data path, which
// says that no 1 bits of the multiplier are left.
//
// Handshake: drive a and b, raise start and hold it (and the operands) until
// ready is 1; result is then valid and stays valid, and ready stays high,
// until start is lowered. The controller then returns to idle one cycle
// later and a new request may follow. A multiplier of zero is answered one
// cycle after start is sampled; otherwise ready rises k + 2 cycles after
// start is sampled, where k is the position of b's highest 1 bit (at most
// N + 1 cycles for N = 4: five cycles for b = 1111).
//
// Clocking: the controller works on the rising edge of clock and the data
// path on the falling edge. The data path therefore captures the operands
// half a cycle after load rises, and internal_ready already reflects the new
// multiplier when the controller next samples it. On a shared edge the
// controller would still see the previous, empty multiplier register right
// after load and raise ready for one cycle before the multiplication had
// begun. This choice of edges is this design's own; the rest follows the
// controller and data path schematics and the top-level port list.
//
// There is no reset input: hold start low for N + 2 cycles after power-up.
module designedsystem #(
  parameter int unsigned N = mult_pkg::OPERAND_WIDTH
) (
  input  logic           clock,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           start,
  output logic           ready,
  output logic [2*N-2:0] result
);

  timeunit 1ns; timeprecision 100ps;

  logic load;
  logic internal_ready;
  logic datapath_clock;

  assign datapath_clock = ~clock;

  control u_control (
    .clock          (clock),
    .start          (start),
    .internal_ready (internal_ready),
    .load           (load),
    .ready          (ready)
  );

  datapath #(.N(N)) u_datapath (
    .clock          (datapath_clock),
    .a              (a),
    .b              (b),
    .load           (load),
    .internal_ready (internal_ready),
    .result         (result)
  );

  // While start is held, ready never drops once raised.
  a_ready_held : assert property (@(posedge clock) ready && start |=> ready);

endmodule
