// transition_detector: flags every change of a flip-flop's data input.
//
// Each bit of `in` is compared with a copy of itself taken through a delay
// buffer. Right after the input changes the two differ, so Er goes high and
// stays high for the buffer delay, then falls once the delayed copy has caught
// up. The result is one pulse of width PULSE_PS per transition, whether the
// input rises or falls. The detector is placed at the input of a flip-flop on
// a critical path: a transition that arrives after the rising clock edge is a
// late (erroneous) arrival, and its pulse is what reopens the flip-flop's
// master latch (see master_clock_generator).
//
// The detector built from a delay buffer and a compare of the input with its
// delayed copy follows the published scheme; the pulse width is this design's choice.
//
// Interface: in (WIDTH) data input of the protected flip-flop;
//            er (WIDTH) error-flag pulse per bit.
// Timing:    er rises with a transition of `in` and falls PULSE_PS later.
module transition_detector #(
  parameter int unsigned WIDTH    = 1,
  parameter int unsigned PULSE_PS = tet_pkg::ER_PULSE_PS
) (
  input  logic [WIDTH-1:0] in,
  output logic [WIDTH-1:0] er
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [WIDTH-1:0] in_delayed;

  delay_buffer #(.WIDTH(WIDTH), .DELAY_PS(PULSE_PS)) u_delay (
    .a(in),
    .y(in_delayed)
  );

  // Rising transition: in=1 while the delayed copy is still 0; falling
  // transition: the other way round.
  always_comb er = (in & ~in_delayed) | (~in & in_delayed);
endmodule
