// tb_td_flip_flop: drives one TD flip-flop bit with Memory under direct
// control. Checks that M follows D while Memory is 0 and holds while it is 1,
// that Q takes M at the rising edge, and that the comparator output equals
// M xor Q.
module tb_td_flip_flop;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0;
  logic rst;
  logic d;
  logic memory;
  logic q;
  logic m;
  logic error;
  int checks = 0;
  int failures = 0;

  td_flip_flop dut (
    .clk(clk), .rst(rst), .d(d), .memory(memory), .q(q), .m(m), .error(error)
  );

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %b expected %b at %t", what, got, exp, $realtime);
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
    logic mref;
    logic qref;
    rst = 1'b0;
    memory = 1'b0;
    #0.1ns rst = 1'b1;
    d = 1'b0;
    #1ns;
    rst = 1'b0;
    mref = 1'b0;
    qref = 1'b0;
    check(q, 1'b0, "reset");
    for (int i = 0; i < 100; i++) begin
      memory = 1'($urandom_range(0, 1));
      d = 1'($urandom_range(0, 1));
      #1ns;
      if (!memory) mref = d;
      check(m, mref, "MUX-latch");
      check(error, mref ^ qref, "comparator");
      d = ~d;
      #1ns;
      if (!memory) mref = d;
      check(m, mref, "MUX-latch after D change");
      clk = 1'b1;
      qref = mref;
      #1ns;
      check(q, qref, "main flip-flop capture");
      check(error, 1'b0, "no error right after capture");
      clk = 1'b0;
      #1ns;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
