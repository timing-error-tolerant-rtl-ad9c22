// ms_flip_flop: master-slave flip-flop with separately driven master and
// slave clocks.
//
// Two level-sensitive latches in series. The master latch is transparent while
// clk_m is high and the slave latch while clk_s is high. Driven with
// clk_m = ~clk and clk_s = clk it is an ordinary rising-edge flip-flop. The
// error-tolerant flip-flop drives clk_m from the master clock generator
// instead, so that the master can be reopened during the high phase while the
// slave is transparent. A separate master clock and slave clock follow the
// published scheme; the active-high asynchronous reset that clears both latches is
// this design's choice.
//
// Interface: d/q WIDTH bits; clk_m per-bit master clocks (WIDTH bits, so
//            each bit's master can be reopened on its own); clk_s slave
//            clock; rst.
// Timing:    q follows the master while clk_s is high; with complementary
//            clocks q changes only at the rising edge of clk_s.
// The two latches are intentional: they are the flip-flop's storage.
module ms_flip_flop #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] clk_m,
  input  logic             clk_s,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [WIDTH-1:0] master;

  for (genvar i = 0; i < WIDTH; i++) begin : g_master
    always_latch begin
      if (rst)           master[i] = 1'b0;
      else if (clk_m[i]) master[i] = d[i];
    end
  end

  always_latch begin
    if (rst)        q = '0;
    else if (clk_s) q = master;
  end
endmodule
