// tb_transition_detector: checks that each input transition, rising or
// falling, gives one error pulse on its own bit, of the configured width,
// and that bits that do not change stay quiet.
module tb_transition_detector;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned PULSE_PS = 800;
  localparam realtime     PW       = PULSE_PS * 1ps;

  logic [2:0] in;
  logic [2:0] er;
  int checks = 0;
  int failures = 0;
  int pulses [3];
  realtime rise_t [3];

  transition_detector #(.WIDTH(3), .PULSE_PS(PULSE_PS)) dut (.in(in), .er(er));

  task automatic check(input logic [2:0] exp, input string what);
    checks++;
    if (er !== exp) begin
      failures++;
      $display("FAIL %s: er=%b expected %b at %t", what, er, exp, $realtime);
    end
  endtask

  // Measure every pulse independently of the checks below.
  for (genvar b = 0; b < 3; b++) begin : g_meas
    always @(posedge er[b]) rise_t[b] = $realtime;
    always @(negedge er[b]) if ($realtime > 5ns) begin
      pulses[b]++;
      checks++;
      if ($realtime - rise_t[b] < PW - 0.01ns || $realtime - rise_t[b] > PW + 0.01ns) begin
        failures++;
        $display("FAIL bit %0d pulse width %t", b, $realtime - rise_t[b]);
      end
    end
  end

  initial begin
    #2000ns;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] v;
    in = 3'b000;
    #10ns;
    check(3'b000, "idle");
    v = 3'b000;
    for (int i = 0; i < 20; i++) begin
      logic [2:0] nv;
      nv = 3'($urandom_range(0, 7));
      in = nv;
      #0.1ns;
      check(nv ^ v, "pulse start");
      #(PW - 0.2ns);
      check(nv ^ v, "pulse still high");
      #0.2ns;
      check(3'b000, "pulse ended");
      #10ns;
      check(3'b000, "quiet");
      v = nv;
    end
    checks++;
    if (pulses[0] == 0 || pulses[1] == 0 || pulses[2] == 0) begin
      failures++;
      $display("FAIL a bit never pulsed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
