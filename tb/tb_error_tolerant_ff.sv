// tb_error_tolerant_ff: drives an 8-bit error-tolerant flip-flop with a 10 ns
// clock. Each cycle the next word arrives either on time (during the low
// phase) or late (1 ns after the rising edge). Checks: on-time words are
// captured at the edge with no error pulse in the high phase; late words give
// an error pulse and are nevertheless in Q within one pulse width, where a
// plain flip-flop would still hold the old word.
module tb_error_tolerant_ff;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned PULSE_PS = 1000;

  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] d;
  logic [7:0] q;
  logic [7:0] er;
  logic [7:0] cm;
  logic       cm_any;
  int checks = 0;
  int failures = 0;
  int n_late = 0;
  int n_on_time = 0;
  int err_in_high = 0;

  error_tolerant_ff #(.WIDTH(8), .PULSE_PS(PULSE_PS)) dut (
    .clk(clk), .rst(rst), .d(d), .q(q), .er(er), .cm(cm), .cm_any(cm_any)
  );

  always #5ns clk = ~clk;

  // Count error windows: Er high while the clock is high.
  always @(posedge (|er)) if (clk) err_in_high++;

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h at %t", what, got, exp, $realtime);
    end
  endtask

  initial begin
    #5000ns;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] cur;
    rst = 1'b0;
    d = 8'h00;
    #0.1ns rst = 1'b1;
    cur = 8'h00;
    @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 40; i++) begin
      logic [7:0] nxt;
      bit late;
      int n0;
      nxt = cur ^ 8'($urandom_range(1, 255));  // always changes
      late = (i % 4 == 1) || (i % 7 == 3);
      if (!late) begin
        #1ns d = nxt;                 // low phase
        @(posedge clk);
        n0 = err_in_high;
        #0.5ns check(q, nxt, "on-time capture");
        #3ns;
        checks++;
        if (err_in_high != n0) begin
          failures++;
          $display("FAIL error pulse for on-time data");
        end
        n_on_time++;
      end else begin
        @(posedge clk);
        #0.5ns check(q, cur, "q holds old word until the late arrival");
        n0 = err_in_high;
        #0.5ns d = nxt;               // 1 ns after the edge
        #0.1ns check(cm, cur ^ nxt, "cm opens only changed bits");
        #(PULSE_PS * 1ps);
        check(q, nxt, "late word corrected");
        checks++;
        if (err_in_high != n0 + 1) begin
          failures++;
          $display("FAIL expected one error window, got %0d", err_in_high - n0);
        end
        #2ns check(q, nxt, "corrected word held");
        n_late++;
      end
      @(negedge clk);
      cur = nxt;
    end
    checks++;
    if (n_late == 0 || n_on_time == 0) failures++;
    $display("late=%0d on_time=%0d", n_late, n_on_time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
