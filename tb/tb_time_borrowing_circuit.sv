// tb_time_borrowing_circuit: feeds the circuit the master clock of an
// error-tolerant flip-flop (the inverted clock, plus a 1 ns error window
// 1 ns after selected rising edges, single and back-to-back). Checks that
// CM_SR is set by the window, that Q (borrow) is high for exactly the
// following cycle, and that each rising edge of CLK_TB comes CLKD_DELAY_PS
// after the rising edge of CLK in a borrowed cycle and together with it
// otherwise.
module tb_time_borrowing_circuit;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CLKD_DELAY_PS = 2500;
  localparam realtime     DLY = CLKD_DELAY_PS * 1ps;
  localparam int          NCYC = 60;

  logic clk = 1'b0;
  logic rst;
  logic win = 1'b0;
  logic cm;
  logic clk_tb;
  logic borrow;
  logic cm_sr;
  int checks = 0;
  int failures = 0;
  int n_borrowed = 0;
  int n_plain = 0;
  int cyc = 0;
  bit err_cycle [NCYC + 2];
  realtime clk_rise;

  time_borrowing_circuit #(.CLKD_DELAY_PS(CLKD_DELAY_PS)) dut (
    .clk(clk), .rst(rst), .cm(cm), .clk_tb(clk_tb), .borrow(borrow), .cm_sr(cm_sr)
  );

  assign cm = ~clk | win;
  always #5ns clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    clk_rise = $realtime;
  end

  // Every rising edge of CLK_TB is checked against the expected offset.
  always @(posedge clk_tb) if (!rst) begin
    realtime off;
    realtime exp;
    off = $realtime - clk_rise;
    exp = (cyc >= 2 && err_cycle[cyc - 1]) ? DLY : 0.0ns;
    checks++;
    if (off < exp - 0.01ns || off > exp + 0.01ns) begin
      failures++;
      $display("FAIL cycle %0d clk_tb edge offset %t expected %t", cyc, off, exp);
    end
    if (exp > 0.0ns) n_borrowed++;
    else n_plain++;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s: %b expected %b", cyc, what, got, exp);
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
    foreach (err_cycle[i]) err_cycle[i] = (i % 9 == 4) || (i % 13 == 7) || (i % 13 == 8);
    rst = 1'b0;
    #0.1ns rst = 1'b1;
    @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    while (cyc < NCYC) begin
      @(posedge clk);
      #0.5ns check(borrow, err_cycle[cyc - 1], "borrow during cycle");
      if (err_cycle[cyc]) begin
        #0.5ns win = 1'b1;
        #0.5ns check(cm_sr, 1'b1, "CM_SR set by error window");
        #0.5ns win = 1'b0;
      end
      @(negedge clk);
      #0.5ns check(borrow, err_cycle[cyc], "borrow after falling edge");
    end
    checks++;
    if (n_borrowed == 0 || n_plain == 0) failures++;
    $display("borrowed=%0d plain=%0d", n_borrowed, n_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
