// tb_ms_flip_flop: checks the master-slave flip-flop as an edge-triggered
// register (complementary clocks: input changes in the high phase are not
// taken) and with both latches open at once (the transparent window used for
// error correction).
module tb_ms_flip_flop;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk;
  logic       window;
  logic       rst;
  logic [7:0] d;
  logic [7:0] q;
  int checks = 0;
  int failures = 0;

  ms_flip_flop #(.WIDTH(8)) dut (
    .clk_m({8{~clk | window}}),
    .clk_s(clk),
    .rst  (rst),
    .d    (d),
    .q    (q)
  );

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h at %t", what, q, exp, $realtime);
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
    logic [7:0] held;
    clk = 1'b0;
    window = 1'b0;
    rst = 1'b1;
    d = 8'h00;
    #3ns;
    check(8'h00, "reset");
    rst = 1'b0;
    held = 8'h00;
    for (int i = 0; i < 30; i++) begin
      logic [7:0] a;
      logic [7:0] b;
      a = 8'($urandom);
      b = 8'($urandom);
      d = a;                 // low phase: on time
      #4ns;
      check(held, "low phase holds q");
      clk = 1'b1;            // rising edge
      #1ns;
      check(a, "captured at edge");
      d = b;                 // high phase: too late for a plain flip-flop
      #1ns;
      check(a, "high-phase change ignored");
      if (i % 3 == 0) begin  // open the master as well: window
        window = 1'b1;
        #0.5ns;
        check(b, "transparent window passes late data");
        window = 1'b0;
        held = b;
      end else begin
        held = a;
      end
      #2ns;
      clk = 1'b0;
      #1ns;
      check(held, "after falling edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
