// td_flip_flop: one bit of a time-dilation (TD) register.
//
// A multiplexer in front of the main flip-flop chooses between the incoming
// data D (select 0) and its own output M (select 1). With select 1 the loop
// holds M, so the multiplexer works as a latch, the "MUX-latch"; it is
// transparent while Memory is 0. The main flip-flop captures M at the rising
// edge of CLK. An XOR comparator flags M != Q. During the high phase of CLK
// this can only mean that D changed after the edge, i.e. arrived late. The
// register's Error flip-flop then raises Memory, the MUX-latch keeps the late
// but correct value, and the main flip-flop takes it at the next edge: the
// evaluation time of the logic is stretched by one clock cycle. The MUX, main
// flip-flop and XOR comparator follow the published scheme; the feedback of M into
// multiplexer input 1 and the asynchronous reset of Q are this design's
// reading and choice.
//
// Interface: clk; rst (clears Q); d data from logic stage S_j; memory
//            hold request from the Error flip-flop; q to logic stage S_j+1;
//            m MUX-latch output; error comparator output (M xor Q).
// Timing:    q <= m at the rising edge of clk; error is combinational and
//            only meaningful during the high phase of clk.
// The latch is intentional: it is the MUX-latch. When this module is
// elaborated inside td_register, Verilator may report that it found no latch
// in the always_latch block; the storage is still a latch (synthesis infers a
// D latch enabled by ~memory).
module td_flip_flop (
  input  logic clk,
  input  logic rst,
  input  logic d,
  input  logic memory,
  output logic q,
  output logic m,
  output logic error
);
  timeunit 1ns;
  timeprecision 1ps;

  always_latch begin
    if (!memory) m = d;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= 1'b0;
    else     q <= m;
  end

  always_comb error = m ^ q;
endmodule
