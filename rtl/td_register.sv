// td_register: time-dilation register, a word of TD flip-flops with a shared
// error flip-flop.
//
// WIDTH td_flip_flop bits sit between logic stages S_j and S_j+1. Their
// comparator outputs are ORed into Error_R. The Error flip-flop samples
// Error_R on the rising edge of Main_CLK; its output Memory switches every
// bit's MUX-latch to hold. Main_CLK should rise at the end of the window in
// which late data is still accepted; the top level drives it with the
// inverted system clock, so errors are sampled at the falling edge of CLK.
// After an error:
//   cycle k   rising edge: the main flip-flops capture stale data;
//             high phase : late data reaches M, M != Q, Error_R = 1;
//             falling edge: Memory = 1, the MUX-latches close on the late data.
//   cycle k+1 rising edge: the main flip-flops capture the held, correct data;
//             falling edge: M == Q, Memory = 0, the latches reopen.
// Memory is high for one cycle per error. While it is high the Q captured at
// the preceding rising edge is stale and the next word on D is not taken, so
// the stage upstream must hold its output for one extra cycle and the stage
// downstream must ignore that cycle. The OR gate, comparator per bit, Error
// flip-flop and Main_CLK follow the published scheme; WIDTH, the reset, and how
// Memory is used around the register are this design's choices.
//
// Interface: clk system clock; main_clk clock of the Error flip-flop;
//            rst asynchronous reset; d/q WIDTH bits; m the MUX-latch
//            outputs (the word the main flip-flops take next); error_r OR of the
//            comparators (combinational); memory registered error / hold.
// Timing:    one extra cycle per detected late arrival.
module td_register #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             main_clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] m,
  output logic             error_r,
  output logic             memory
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [WIDTH-1:0] error_bit;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    td_flip_flop u_tdff (
      .clk   (clk),
      .rst   (rst),
      .d     (d[i]),
      .memory(memory),
      .q     (q[i]),
      .m     (m[i]),
      .error (error_bit[i])
    );
  end

  always_comb error_r = |error_bit;

  always_ff @(posedge main_clk or posedge rst) begin
    if (rst) memory <= 1'b0;
    else     memory <= error_r;
  end
endmodule
