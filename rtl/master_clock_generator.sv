// master_clock_generator: builds the master-latch clock CM of an
// error-tolerant flip-flop.
//
// In a positive-edge master-slave flip-flop the master latch is transparent
// while CLK is low. This block produces that master enable (the complement of
// CLK) and, in addition, passes the transition detector's pulse Er through
// while CLK is high. A late data transition therefore opens the master latch a
// second time inside the high phase, when the slave is also transparent, so
// the late value flows through to Q: the flip-flop acts as a short transparent
// window and stores the correct data without the system clock changing.
//
// The function (normal master clock plus a window only while the clock is
// high, driven by Er) follows the published scheme.
//
// Interface: clk system clock; er (WIDTH) error pulses; cm (WIDTH) master
//            clocks, master latch transparent while cm is high.
// Timing:    purely combinational; cm = ~clk outside error pulses.
module master_clock_generator #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] er,
  output logic [WIDTH-1:0] cm
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb cm = {WIDTH{~clk}} | (er & {WIDTH{clk}});
endmodule
