// tb_td_register: streams random words through an 8-bit TD register with a
// 10 ns clock and Main_CLK = inverted clock. Most words arrive during the low
// phase; selected words arrive 1 ns after the rising edge they were meant
// for. The source holds its word for one more cycle whenever Memory is high,
// and the sink takes Q only in cycles where Memory stays low. Checks: every
// word reaches the sink once and in order, Memory rises exactly once per late
// word, and the run takes exactly one extra cycle per late word.
module tb_td_register;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NWORDS = 120;

  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] d;
  logic [7:0] q;
  logic [7:0] m;
  logic       error_r;
  logic       memory;
  int checks = 0;
  int failures = 0;
  logic [7:0] words [NWORDS];
  bit         late [NWORDS];
  int n_late = 0;
  int n_mem = 0;
  int sink_idx = 0;
  int cycles = 0;
  bit running = 1'b0;

  td_register #(.WIDTH(8)) dut (
    .clk(clk), .main_clk(~clk), .rst(rst), .d(d), .q(q), .m(m),
    .error_r(error_r), .memory(memory)
  );

  always #5ns clk = ~clk;

  // Sink: after each falling edge Memory says whether the word captured at
  // the preceding rising edge is valid.
  always @(negedge clk) if (running) begin
    #0.2ns;
    cycles++;
    if (memory) n_mem++;
    else if (sink_idx < NWORDS) begin
      checks++;
      if (q !== words[sink_idx]) begin
        failures++;
        $display("FAIL word %0d: q=%h expected %h", sink_idx, q, words[sink_idx]);
      end
      sink_idx++;
    end
  end

  initial begin
    #10000ns;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NWORDS; i++) begin
      words[i] = 8'($urandom);
      if (words[i] == ((i > 0) ? words[i-1] : 8'h00)) words[i] = ~words[i];
      late[i]  = (i % 5 == 2) || (i % 11 == 6);
      if (late[i]) n_late++;
    end
    rst = 1'b0;
    d = 8'h00;
    #0.1ns rst = 1'b1;
    @(posedge clk);
    #2ns rst = 1'b0;
    @(negedge clk);
    // Source. Word i is meant for the rising edge that follows its launch.
    for (int i = 0; i < NWORDS; i++) begin
      if (!late[i]) begin
        #1ns d = words[i];              // low phase: on time
        @(posedge clk);
        if (i == 0) running = 1'b1;
      end else begin
        @(posedge clk);
        if (i == 0) running = 1'b1;
        #1ns d = words[i];              // late: after the edge
      end
      @(negedge clk);
      #0.1ns;
      while (memory) begin              // hold while the register stalls
        @(negedge clk);
        #0.1ns;
      end
    end
    repeat (2) @(negedge clk);
    #1ns;
    checks++;
    if (sink_idx != NWORDS) begin
      failures++;
      $display("FAIL sink got %0d words", sink_idx);
    end
    checks++;
    if (n_mem != n_late) begin
      failures++;
      $display("FAIL memory cycles %0d, late words %0d", n_mem, n_late);
    end
    checks++;
    if (cycles != NWORDS + n_late + 2) begin
      failures++;
      $display("FAIL %0d cycles for %0d words with %0d late", cycles, NWORDS, n_late);
    end
    $display("late=%0d memory_cycles=%0d cycles=%0d", n_late, n_mem, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
