// time_borrowing_circuit: lends the second pipeline stage extra time after a
// first-stage timing error.
//
// When the error-tolerant flip-flop of stage one corrects a late input, its
// output changes late, so the logic of stage two also finishes late and would
// miss the next rising edge. This circuit notices the correction and, for the
// following cycle only, clocks the stage-two flip-flop with a delayed clock:
//   1. CM high while CLK is high can only be an error window; CM AND CLK sets
//      an SR latch, whose output is CM_SR.
//   2. A D flip-flop clocked on the falling edge of CLK (CLKB) samples CM_SR,
//      so Q rises at the end of the error cycle. Q clears the SR latch, but
//      only while both CLK and CLKD are low: the clear starts CLKD_DELAY_PS
//      after the falling edge, after the flip-flop has sampled, and ends at
//      the rising edge, so that an error window in the high phase of the
//      borrowed cycle itself can set the latch again and extend the
//      borrowing by another cycle.
//   3. CLKD is CLK through a delay buffer; CLKDD = CLK AND CLKD rises
//      CLKD_DELAY_PS after CLK and falls with it. A multiplexer gives
//      CLK_TB = Q ? CLKDD : CLK.
//   4. At the next falling edge Q samples the now-cleared latch and returns
//      to 0, unless another error has set it again meanwhile.
// Q changes only while CLK is low, when CLK and CLKDD are both low, so the
// switch makes no glitch on CLK_TB. The structure (set from CM and CLK, SR
// latch, flip-flop on CLKB, CLKDD from a delay buffer, multiplexer on Q)
// follows the published scheme. This design's choices: the latch's clear
// comes from Q and is qualified by CLK and CLKD both low, the set input wins
// over it, the active-high asynchronous reset rst clears both the latch and Q
// (the flip-flop's SET pin is not used), and the size of the delay.
//
// Interface: clk system clock; rst; cm master clock of the stage-one
//            error-tolerant flip-flop (or the OR of several);
//            clk_tb clock for the stage-two flip-flop; borrow (Q) high for the
//            cycle in which CLK_TB is delayed; cm_sr the SR latch output.
// Timing:    an error window in cycle k delays the rising edge of clk_tb that
//            ends cycle k+1 by CLKD_DELAY_PS. CLKD_DELAY_PS must be shorter
//            than either phase of CLK.
// The SR latch is intentional.
module time_borrowing_circuit #(
  parameter int unsigned CLKD_DELAY_PS = tet_pkg::CLKD_DELAY_PS
) (
  input  logic clk,
  input  logic rst,
  input  logic cm,
  output logic clk_tb,
  output logic borrow,
  output logic cm_sr
);
  timeunit 1ns;
  timeprecision 1ps;

  logic set_window;
  logic clear;
  logic clkd;
  logic clkdd;

  always_comb begin
    set_window = cm & clk;
    clear      = borrow & ~(clk | clkd);
  end

  always_latch begin
    if (rst)             cm_sr = 1'b0;
    else if (set_window) cm_sr = 1'b1;
    else if (clear)      cm_sr = 1'b0;
  end

  always_ff @(negedge clk or posedge rst) begin
    if (rst) borrow <= 1'b0;
    else     borrow <= cm_sr;
  end

  delay_buffer #(.WIDTH(1), .DELAY_PS(CLKD_DELAY_PS)) u_clk_delay (
    .a(clk),
    .y(clkd)
  );

  always_comb begin
    clkdd  = clk & clkd;
    clk_tb = borrow ? clkdd : clk;
  end
endmodule
