// tb_timing_error_tolerant_top: end-to-end test of both schemes at the
// default sizes (8-bit pipeline, 8-bit TD register, 1 ns error pulse, 3 ns
// clock delay), clock period 10 ns.
//
// Time-borrowing pipeline. The two logic stages are modelled here with
// transport delays:
//   stage 1: s2_d = s1_q + 37, after 6 ns (on time) or 11 ns (arrives 1 ns
//            after the next rising edge: a timing error);
//   stage 2: s3_d = swap-nibbles(s2_q) ^ 8'h5A, after 9.5 ns. That fits a
//            cycle only if s2_q changed at the clock edge; after a corrected
//            error it changes 1 ns late and needs the borrowed time.
// Words enter s1_d every cycle. The test checks s2_q one cycle and s3_q two
// cycles after a word entered, every cycle, so a missed correction or a
// missed borrow shows as a wrong word. It also counts error windows and
// borrowed CLK_TB edges (one each per late word, including back-to-back late
// words) and checks the delay of each borrowed edge.
//
// TD register. A source and sink stream words through it on the same clock,
// with Main_CLK = inverted clock; some words arrive 1 ns after their edge.
// The source holds its word while Memory is high and the sink skips those
// cycles. Every word must arrive once, in order, with one stall per late word.
module tb_timing_error_tolerant_top;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int          NWORDS = 200;
  localparam realtime     CLKD   = tet_pkg::CLKD_DELAY_PS * 1ps;

  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] s1_d, s1_q, s2_d, s2_q, s3_d, s3_q;
  logic [7:0] er, cm;
  logic       cm_sr, borrow, clk_tb;
  logic [7:0] td_d, td_q, td_m;
  logic       td_error_r, td_memory;
  int checks = 0;
  int failures = 0;

  timing_error_tolerant_top dut (
    .clk, .rst,
    .s1_d, .s1_q, .s2_d, .s2_q, .s3_d, .s3_q,
    .er, .cm, .cm_sr, .borrow, .clk_tb,
    .main_clk(~clk), .td_d, .td_q, .td_m, .td_error_r, .td_memory
  );

  always #5ns clk = ~clk;

  function automatic logic [7:0] f1(input logic [7:0] x);
    return x + 8'd37;
  endfunction
  function automatic logic [7:0] f2(input logic [7:0] x);
    return {x[3:0], x[7:4]} ^ 8'h5A;
  endfunction

  // ---------------- logic stages (outside the design) -----------------------
  bit late_now = 1'b0;
  // Transport delays: every change of a stage's input is queued with the time
  // its result is due, so overlapping changes are all kept. Due times stay in
  // order because a late result (11 ns) is always due before the next
  // on-time one (10 ns + 6 ns).
  logic [7:0] st2_val [$];
  realtime    st2_due [$];
  logic [7:0] st3_val [$];
  realtime    st3_due [$];

  always @(s1_q) begin
    st2_val.push_back(f1(s1_q));
    st2_due.push_back($realtime + (late_now ? 11ns : 6ns));
  end
  always @(s2_q) begin
    st3_val.push_back(f2(s2_q));
    st3_due.push_back($realtime + 9.5ns);
  end
  initial forever begin
    wait (st2_due.size() > 0);
    #(st2_due[0] - $realtime);
    s2_d = st2_val.pop_front();
    void'(st2_due.pop_front());
  end
  initial forever begin
    wait (st3_due.size() > 0);
    #(st3_due[0] - $realtime);
    s3_d = st3_val.pop_front();
    void'(st3_due.pop_front());
  end

  // ---------------- mechanism counters --------------------------------------
  int n_late = 0;
  int n_corrections = 0;   // error windows: Er high while CLK is high
  int n_borrowed = 0;      // CLK_TB edges taken from the delayed clock
  int n_back_to_back = 0;  // borrowed edges right after a borrowed edge
  int n_plain_edges = 0;
  bit prev_borrowed = 1'b0;
  realtime clk_rise;

  always @(posedge (|er)) if (clk && !rst) n_corrections++;
  always @(posedge clk) clk_rise = $realtime;
  always @(posedge clk_tb) if (!rst) begin
    realtime off;
    off = $realtime - clk_rise;
    if (borrow) begin
      n_borrowed++;
      if (prev_borrowed) n_back_to_back++;
      checks++;
      if (off < CLKD - 0.01ns || off > CLKD + 0.01ns) begin
        failures++;
        $display("FAIL borrowed CLK_TB edge %t after CLK", off);
      end
    end else begin
      n_plain_edges++;
    end
    prev_borrowed = borrow;
  end

  task automatic check8(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h at %t", what, got, exp, $realtime);
    end
  endtask

  initial begin
    #20000ns;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ------------------------------------------------
  logic [7:0] w [NWORDS];
  bit         late1 [NWORDS];
  logic [7:0] tw [NWORDS];
  bit         tlate [NWORDS];
  bit pipe_done = 1'b0;
  bit td_done = 1'b0;
  int td_late = 0;
  int td_stalls = 0;
  int td_idx = 0;
  int td_cycles = 0;
  bit td_running = 1'b0;

  initial begin
    for (int i = 0; i < NWORDS; i++) begin
      w[i] = 8'($urandom);
      if (w[i] == ((i > 0) ? w[i-1] : 8'h00)) w[i] = w[i] ^ 8'h81;
      late1[i] = (i % 6 == 2) || (i % 17 == 9) || (i % 17 == 10);
      tw[i] = 8'($urandom);
      if (tw[i] == ((i > 0) ? tw[i-1] : 8'h00)) tw[i] = ~tw[i];
      tlate[i] = (i % 7 == 3) || (i % 13 == 5);
      if (tlate[i]) td_late++;
    end
    rst = 1'b0;
    s1_d = 8'h00;
    td_d = 8'h00;
    #0.1ns rst = 1'b1;
    repeat (2) @(posedge clk);
    #2ns rst = 1'b0;
    fork
      // time-borrowing pipeline
      begin
        @(negedge clk);
        for (int n = 0; n < NWORDS + 2; n++) begin
          #1ns;
          if (n < NWORDS) begin
            s1_d = w[n];
            late_now = late1[n];
            if (late1[n]) n_late++;
          end else begin
            late_now = 1'b0;
          end
          @(posedge clk);
          #4ns;
          if (n >= 1 && n <= NWORDS) check8(s2_q, f1(w[n-1]), "stage-2 flip-flop");
          if (n >= 2) check8(s3_q, f2(f1(w[n-2])), "stage-3 flip-flop");
          @(negedge clk);
        end
        pipe_done = 1'b1;
      end
      // time-dilation register source
      begin
        @(negedge clk);
        td_running = 1'b1;
        for (int i = 0; i < NWORDS; i++) begin
          if (!tlate[i]) begin
            #1ns td_d = tw[i];
            @(posedge clk);
          end else begin
            @(posedge clk);
            #1ns td_d = tw[i];
          end
          @(negedge clk);
          #0.1ns;
          while (td_memory) begin
            @(negedge clk);
            #0.1ns;
          end
        end
        repeat (2) @(negedge clk);
        #1ns;
        td_done = 1'b1;
      end
    join
    checks++;
    if (n_corrections != n_late) begin
      failures++;
      $display("FAIL %0d error windows for %0d late words", n_corrections, n_late);
    end
    checks++;
    if (n_borrowed != n_late) begin
      failures++;
      $display("FAIL %0d borrowed edges for %0d late words", n_borrowed, n_late);
    end
    checks++;
    if (td_idx != NWORDS || td_stalls != td_late) begin
      failures++;
      $display("FAIL TD register: %0d words, %0d stalls, %0d late", td_idx, td_stalls, td_late);
    end
    checks++;
    if (td_cycles != NWORDS + td_late + 2) begin
      failures++;
      $display("FAIL TD register took %0d cycles", td_cycles);
    end
    // every mechanism must have happened
    checks++;
    if (n_corrections == 0 || n_borrowed == 0 || n_back_to_back == 0 || n_plain_edges == 0 ||
        td_stalls == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("corrections=%0d borrowed_edges=%0d back_to_back=%0d plain_edges=%0d td_stalls=%0d",
             n_corrections, n_borrowed, n_back_to_back, n_plain_edges, td_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // time-dilation register sink
  always @(negedge clk) if (td_running && !td_done) begin
    #0.2ns;
    td_cycles++;
    if (td_memory) td_stalls++;
    else if (td_idx < NWORDS) begin
      check8(td_q, tw[td_idx], "TD register word");
      td_idx++;
    end
  end
endmodule
