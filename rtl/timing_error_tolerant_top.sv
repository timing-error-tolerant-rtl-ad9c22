// timing_error_tolerant_top: the two timing-error-tolerant schemes side by
// side.
//
// Time-borrowing pipeline (three flip-flop stages):
//   s1_d -> FF1 -> s1_q -> [logic stage 1, outside] -> s2_d -> FF2 -> s2_q
//        -> [logic stage 2, outside] -> s3_d -> FF3 -> s3_q
//   FF1 is a plain master-slave flip-flop on CLK. FF2 is an error-tolerant
//   flip-flop: its transition detector and master clock generator reopen the
//   master latch to store data that missed the clock edge. FF3 is a plain
//   master-slave flip-flop clocked by CLK_TB from the time-borrowing circuit,
//   whose rising edge is delayed for one cycle after FF2 has corrected an
//   error, so stage 2 can finish the work it started late.
//   The logic stages compute nothing defined by the design; they are left as
//   ports so the logic and its delays can be attached from outside.
//
// Time-dilation register:
//   td_d -> TD register (TD_WIDTH bits) -> td_q. Its Error flip-flop is
//   clocked by main_clk; td_memory high means "the word on td_q is stale this
//   cycle and td_d must be held one more cycle".
//
// Parameters: WIDTH of the time-borrowing pipeline, TD_WIDTH of the TD
// register, and the two delays (error-pulse width, CLKD delay). All widths and
// delays are this design's choices; the wiring follows the published scheme.
// Timing: all flip-flops capture at the rising edge of clk (FF3 at the rising
// edge of clk_tb); rst is asynchronous and active high.
module timing_error_tolerant_top #(
  parameter int unsigned WIDTH         = 8,
  parameter int unsigned TD_WIDTH      = 8,
  parameter int unsigned PULSE_PS      = tet_pkg::ER_PULSE_PS,
  parameter int unsigned CLKD_DELAY_PS = tet_pkg::CLKD_DELAY_PS
) (
  input  logic                clk,
  input  logic                rst,
  // time-borrowing pipeline
  input  logic [WIDTH-1:0]    s1_d,
  output logic [WIDTH-1:0]    s1_q,
  input  logic [WIDTH-1:0]    s2_d,
  output logic [WIDTH-1:0]    s2_q,
  input  logic [WIDTH-1:0]    s3_d,
  output logic [WIDTH-1:0]    s3_q,
  output logic [WIDTH-1:0]    er,
  output logic [WIDTH-1:0]    cm,
  output logic                cm_sr,
  output logic                borrow,
  output logic                clk_tb,
  // time-dilation register
  input  logic                main_clk,
  input  logic [TD_WIDTH-1:0] td_d,
  output logic [TD_WIDTH-1:0] td_q,
  output logic [TD_WIDTH-1:0] td_m,
  output logic                td_error_r,
  output logic                td_memory
);
  timeunit 1ns;
  timeprecision 1ps;

  logic cm_any;

  ms_flip_flop #(.WIDTH(WIDTH)) u_ff1 (
    .clk_m({WIDTH{~clk}}),
    .clk_s(clk),
    .rst  (rst),
    .d    (s1_d),
    .q    (s1_q)
  );

  error_tolerant_ff #(.WIDTH(WIDTH), .PULSE_PS(PULSE_PS)) u_ff2 (
    .clk   (clk),
    .rst   (rst),
    .d     (s2_d),
    .q     (s2_q),
    .er    (er),
    .cm    (cm),
    .cm_any(cm_any)
  );

  time_borrowing_circuit #(.CLKD_DELAY_PS(CLKD_DELAY_PS)) u_borrow (
    .clk   (clk),
    .rst   (rst),
    .cm    (cm_any),
    .clk_tb(clk_tb),
    .borrow(borrow),
    .cm_sr (cm_sr)
  );

  ms_flip_flop #(.WIDTH(WIDTH)) u_ff3 (
    .clk_m({WIDTH{~clk_tb}}),
    .clk_s(clk_tb),
    .rst  (rst),
    .d    (s3_d),
    .q    (s3_q)
  );

  td_register #(.WIDTH(TD_WIDTH)) u_td (
    .clk     (clk),
    .main_clk(main_clk),
    .rst     (rst),
    .d       (td_d),
    .q       (td_q),
    .m       (td_m),
    .error_r (td_error_r),
    .memory  (td_memory)
  );
endmodule
