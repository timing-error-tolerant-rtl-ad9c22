// tb_delay_buffer: checks that the delay buffer model repeats its input after
// exactly DELAY_PS. A 4-bit input is changed several times, and the output is
// sampled just before and just after the expected arrival time.
module tb_delay_buffer;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned DELAY_PS = 1500;
  localparam realtime     DLY      = DELAY_PS * 1ps;

  logic [3:0] a;
  logic [3:0] y;
  int checks = 0;
  int failures = 0;

  delay_buffer #(.WIDTH(4), .DELAY_PS(DELAY_PS)) dut (.a(a), .y(y));

  task automatic check(input logic [3:0] exp, input string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: y=%h expected %h at %t", what, y, exp, $realtime);
    end
  endtask

  initial begin
    #1000ns;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] prev;
    a = 4'h0;
    #10ns;
    prev = 4'h0;
    for (int i = 0; i < 10; i++) begin
      logic [3:0] nxt;
      nxt = 4'(i * 7 + 3);
      a = nxt;
      #(DLY - 0.1ns);
      check(prev, "before delay");
      #0.2ns;
      check(nxt, "after delay");
      #5ns;
      prev = nxt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
