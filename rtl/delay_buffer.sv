// delay_buffer: behavioural model of a delay buffer (a chain of buffer cells).
//
// Behavioural model, not synthesizable logic: in silicon this is a sized
// buffer chain whose delay is set by the cells chosen at layout. Here the
// output simply follows the input after DELAY_PS picoseconds. Both the
// transition detector (to stretch a data transition into an error pulse) and
// the time-borrowing circuit (to build the delayed clock CLKD) use one. The
// delay value is this design's choice; synthesis drops the delay and leaves a
// wire, so a netlist needs a real delay cell put in its place.
//
// Interface: a (input, WIDTH bits) -> y (output, WIDTH bits).
// Timing:    y(t) = a(t - DELAY_PS).
module delay_buffer #(
  parameter int unsigned WIDTH    = 1,
  parameter int unsigned DELAY_PS = tet_pkg::ER_PULSE_PS
) (
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] y
);
  timeunit 1ns;
  timeprecision 1ps;

  assign #(DELAY_PS * 1ps) y = a;
endmodule
