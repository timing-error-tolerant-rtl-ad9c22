// error_tolerant_ff: flip-flop that repairs a late-arriving input in place.
//
// A master-slave flip-flop whose slave latch runs on the system clock and
// whose master latch runs on CM from a master clock generator. A transition
// detector watches the data input. Data that arrives on time is captured at
// the rising clock edge as usual (the transition happens while CLK is low and
// CM is already high, so the pulse changes nothing). Data that arrives after
// the rising edge makes the detector fire while CLK is high. CM then goes high
// for the pulse width, both latches are transparent together, and the late
// value replaces the wrong one in Q. The system clock is never stretched; the
// price is that Q changes late in the cycle, which the next stage must absorb
// (see time_borrowing_circuit). The arrangement follows the published scheme; the
// per-bit detectors for WIDTH > 1 are this design's choice.
//
// Interface: clk system clock; rst asynchronous reset; d/q WIDTH bits;
//            er per-bit error pulses; cm per-bit master clocks;
//            cm_any OR of all cm bits, fed to a time-borrowing circuit.
// Timing:    q changes at the rising edge of clk, or, for a late input,
//            while its error pulse is high.
module error_tolerant_ff #(
  parameter int unsigned WIDTH    = 1,
  parameter int unsigned PULSE_PS = tet_pkg::ER_PULSE_PS
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] er,
  output logic [WIDTH-1:0] cm,
  output logic             cm_any
);
  timeunit 1ns;
  timeprecision 1ps;

  transition_detector #(.WIDTH(WIDTH), .PULSE_PS(PULSE_PS)) u_detector (
    .in(d),
    .er(er)
  );

  master_clock_generator #(.WIDTH(WIDTH)) u_mcg (
    .clk(clk),
    .er (er),
    .cm (cm)
  );

  ms_flip_flop #(.WIDTH(WIDTH)) u_ff (
    .clk_m(cm),
    .clk_s(clk),
    .rst  (rst),
    .d    (d),
    .q    (q)
  );

  always_comb cm_any = |cm;
endmodule
