// tet_pkg: shared timing constants of the timing-error-tolerant flip-flops.
//
// The error-correcting circuits work on analogue delays rather than on extra
// clock edges, so a few delay values are shared between modules and
// testbenches. All values are in picoseconds. They are this design's own
// choices for a 10 ns clock; the published scheme only names the delay buffers and does not
// size them.
//   ER_PULSE_PS   width of the transition detector's error pulse Er. It must
//                 cover the master latch's setup time and stay short enough to
//                 avoid hold violations.
//   CLKD_DELAY_PS delay from CLK to CLKD in the time-borrowing circuit, i.e.
//                 how far the second stage's capture edge may be pushed back.
package tet_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned ER_PULSE_PS   = 1000;
  localparam int unsigned CLKD_DELAY_PS = 3000;
endpackage
