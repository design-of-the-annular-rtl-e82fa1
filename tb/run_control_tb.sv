// run_control_tb: self-checking test of the start/stop circuit and Cr.
//
// The testbench plays the ring itself: phase p = 0 .. 3 per clock period, C1
// low only in phase 0 (the T4 beat), the clearing flip-flop low except where
// a test raises it. Cr may change only at the rising edge that leaves phase 0,
// and must then copy the last start/stop request. Tested: clear, a start
// pulse in mid-cycle (Cr waits for the next T1), a stop pulse in mid-cycle
// (Cr holds through T4), start and stop low together (start wins), a request
// that is withdrawn before the boundary, and a boundary masked by the
// clearing flip-flop.
`timescale 1ns/1ps
module run_control_tb;
  import apg_pkg::*;

  logic clk = 1'b0;
  logic clr_n = 1'b0;
  logic start_n = 1'b1;
  logic stop_n = 1'b1;
  logic c1;
  logic c_clr = 1'b0;
  logic run;

  int checks = 0;
  int failures = 0;
  int phase = 0;

  run_control dut (
    .clk(clk), .clr_n(clr_n), .start_n(start_n), .stop_n(stop_n),
    .c1(c1), .c_clr(c_clr), .run(run)
  );

  always #(CLK_HALF_PERIOD_NS) clk = ~clk;

  // Ring model: the phase advances at each rising edge; C1 is low in phase 0.
  always @(posedge clk) begin
    phase <= (phase + 1) % DEFAULT_BEATS;
  end
  assign c1 = (phase != 0);

  initial begin
    #(300 * BEAT_NS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  // Wait until the middle of the low half of a period in phase p.
  task automatic goto_phase(input int p);
    do begin
      @(negedge clk); #(CLK_HALF_PERIOD_NS / 2);
    end while (phase != p);
  endtask

  // Count clock periods, sampled mid-high, until run equals v.
  task automatic periods_until(input logic v, output int n);
    n = 0;
    while (run != v && n < 20) begin
      @(posedge clk); #(CLK_HALF_PERIOD_NS / 2);
      n++;
    end
  endtask

  // Check that run changes only at the edge that leaves phase 0.
  logic run_prev;
  int   prev_phase;
  int   edges_checked = 0;
  always @(posedge clk) begin
    run_prev   = run;
    prev_phase = phase;
    #1;
    if (clr_n && run != run_prev) begin
      checks++;
      edges_checked++;
      if (prev_phase != 0) begin
        failures++;
        $display("FAIL run changed outside the T4-to-T1 boundary at %0t", $time);
      end
    end
  end

  int n;

  initial begin
    stop_n = 1'b0;
    #(CLK_HALF_PERIOD_NS / 2);
    stop_n = 1'b1;
    repeat (3) @(posedge clk);
    #(CLK_HALF_PERIOD_NS / 2);
    expect_eq("run cleared", int'(run), 0);
    clr_n = 1'b1;

    // Start pulse during phase 2: run rises at the edge leaving phase 0,
    // which is 2 periods later (phase 3, phase 0, then the edge).
    goto_phase(2);
    start_n = 1'b0; #20; start_n = 1'b1;
    expect_eq("no immediate start", int'(run), 0);
    periods_until(1'b1, n);
    expect_eq("periods to start", n, 3);
    expect_eq("started in phase 1", phase, 1);

    // Runs on for several cycles.
    repeat (9) @(posedge clk);
    #1 expect_eq("still running", int'(run), 1);

    // Stop pulse during phase 1: Cr holds through phases 2, 3 and 0.
    goto_phase(1);
    stop_n = 1'b0; #20; stop_n = 1'b1;
    periods_until(1'b0, n);
    expect_eq("periods to stop", n, 4);
    expect_eq("stopped in phase 1", phase, 1);

    // Start and stop low together: start wins.
    goto_phase(3);
    start_n = 1'b0; stop_n = 1'b0; #20; start_n = 1'b1; stop_n = 1'b1;
    periods_until(1'b1, n);
    expect_eq("start wins", int'(run), 1);

    // Stop requested, then withdrawn by a start before the boundary.
    goto_phase(1);
    stop_n = 1'b0; #20; stop_n = 1'b1;
    goto_phase(3);
    start_n = 1'b0; #20; start_n = 1'b1;
    repeat (8) @(posedge clk);
    #1 expect_eq("withdrawn stop ignored", int'(run), 1);

    // Stop request, but the boundary is masked by the clearing flip-flop.
    goto_phase(2);
    stop_n = 1'b0; #20; stop_n = 1'b1;
    goto_phase(0);
    c_clr = 1'b1;
    @(posedge clk); #1;
    expect_eq("masked boundary keeps run", int'(run), 1);
    c_clr = 1'b0;
    periods_until(1'b0, n);
    expect_eq("stop at next unmasked boundary", int'(run), 0);

    // Clear while running resets Cr at once.
    goto_phase(2);
    start_n = 1'b0; #20; start_n = 1'b1;
    periods_until(1'b1, n);
    goto_phase(2);
    clr_n = 1'b0; #1;
    expect_eq("clr clears run", int'(run), 0);
    clr_n = 1'b1;

    checks++;
    if (edges_checked < 5) begin
      failures++;
      $display("FAIL only %0d run changes seen", edges_checked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
