// tb_master_clock_generator: exhaustive check of the master clock. With the
// clock low every master latch is enabled; with the clock high only the bits
// whose error pulse is high are.
module tb_master_clock_generator;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk;
  logic [3:0] er;
  logic [3:0] cm;
  int checks = 0;
  int failures = 0;

  master_clock_generator #(.WIDTH(4)) dut (.clk(clk), .er(er), .cm(cm));

  initial begin
    #1000ns;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int e = 0; e < 16; e++) begin
        logic [3:0] exp;
        clk = c[0];
        er  = 4'(e);
        #1ns;
        exp = (c == 0) ? 4'hF : 4'(e);
        checks++;
        if (cm !== exp) begin
          failures++;
          $display("FAIL clk=%0d er=%b cm=%b expected %b", c, er, cm, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
