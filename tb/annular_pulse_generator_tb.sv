// annular_pulse_generator_tb: end-to-end test of the beat generator at its
// default size (four beats), over the 50 us reference run with a 100 ns clock
// pulse width (200 ns period).
//
// A reference model kept by the testbench counts clock periods since the last
// clear and the state of the start/stop requests. At the middle of every
// period it checks the ring stages, the one-hot beat potentials (T4o first
// after a clear, then T1o, T2o, T3o, T4o, ...) and the gated beats (equal to
// the potentials while running, all low while stopped). A second monitor
// times every beat: each potential must stay high exactly 200 ns and come
// back every 800 ns.
//
// Mechanisms made to happen and counted: the clear (at power-up and in mid
// cycle), a start that waits for T1, a start latched during the clear so T1
// is the second beat after it, a stop that lets the cycle finish through T4,
// and a stopped ring that keeps running underneath.
`timescale 1ns/1ps
module annular_pulse_generator_tb;
  import apg_pkg::*;

  localparam int unsigned B = DEFAULT_BEATS;
  localparam time RUN_NS = 50_000;

  logic clk = 1'b0;
  logic clr_n = 1'b1;
  logic start_n = 1'b1;
  logic stop_n = 1'b1;
  logic [B-1:0] t_pot, t;
  logic [B-2:0] ring;
  logic         ring_clr;

  int checks = 0;
  int failures = 0;

  annular_pulse_generator dut (
    .clk(clk), .clr_n(clr_n), .start_n(start_n), .stop_n(stop_n),
    .t_pot(t_pot), .t(t), .ring(ring), .ring_clr(ring_clr)
  );

  always #(CLK_HALF_PERIOD_NS) clk = ~clk;

  initial begin
    #(RUN_NS + 20 * CPU_CYCLE_NS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0h expected %0h", what, $time, got, exp);
    end
  endtask

  // ---------------------------------------------------------------------
  // Reference model.
  // n_since_clr: periods since the clearing edge (0 = the T4 beat that follows
  // it). req: start/stop request. exp_run: the expected run flip-flop.
  int   n_since_clr = -1;
  logic req = 1'b0;
  logic exp_run = 1'b0;
  logic clr_pending = 1'b0;

  // Counters of mechanisms.
  int n_clear_mid = 0, n_start_wait = 0, n_start_in_clear = 0;
  int n_stop_finish = 0, n_stopped_periods = 0, n_run_periods = 0;

  always @(negedge start_n) req = 1'b1;
  always @(negedge stop_n)  if (start_n) req = 1'b0;
  // The clear sets the clearing flip-flop at once; it drops at the first
  // falling clock edge with the clear released.
  always @(negedge clr_n) begin
    exp_run     = 1'b0;
    clr_pending = 1'b1;
  end
  always @(negedge clk) if (clr_n) clr_pending = 1'b0;

  int beat_idx;  // 0 = T1 .. B-1 = T(B)
  always @(posedge clk) begin
    if (clr_pending) begin
      // The clearing flip-flop is set by the clear: this edge empties the
      // ring.
      n_since_clr = 0;
    end else if (n_since_clr >= 0) begin
      n_since_clr++;
      // Entering T1: Cr takes the request.
      if (n_since_clr % B == 1) exp_run = req;
    end
  end

  // Checks in the middle of every high half.
  always @(posedge clk) begin
    #(CLK_HALF_PERIOD_NS / 2);
    if (n_since_clr >= 0) begin
      int k;
      k = n_since_clr % B;  // number of ring stages on
      beat_idx = (k == 0) ? B - 1 : k - 1;
      expect_eq("ring", int'(ring), (1 << k) - 1);
      expect_eq("t_pot", int'(t_pot), 1 << beat_idx);
      expect_eq("t", int'(t), exp_run ? (1 << beat_idx) : 0);
      if (exp_run) n_run_periods++;
      else         n_stopped_periods++;
    end
  end

  // Beat timing: width and repetition of every potential.
  time rise_t [B];
  bit  have_rise [B];
  int  n_width_checks = 0;
  for (genvar i = 0; i < B; i++) begin : g_timing
    always @(posedge t_pot[i]) begin
      if (have_rise[i] && clr_n && n_since_clr > B) begin
        expect_eq($sformatf("T%0d period ns", i + 1), int'($time - rise_t[i]), CPU_CYCLE_NS);
        n_width_checks++;
      end
      rise_t[i]    = $time;
      have_rise[i] = 1'b1;
    end
    always @(negedge t_pot[i]) begin
      if (have_rise[i] && clr_n && n_since_clr > B) begin
        expect_eq($sformatf("T%0d width ns", i + 1), int'($time - rise_t[i]), BEAT_NS);
      end
    end
  end

  // Wait until the middle of the low half of a period with k ring stages on.
  task automatic goto_k(input int k);
    do begin
      @(negedge clk); #(CLK_HALF_PERIOD_NS / 2);
    end while (n_since_clr < 0 || (n_since_clr % B) != k);
  endtask

  // Count periods (mid-high samples) until the first gated T1.
  task automatic periods_to_t1(output int n);
    n = 0;
    do begin
      @(posedge clk); #(CLK_HALF_PERIOD_NS / 2 + 1);
      n++;
    end while (t == '0 && n < 4 * B);
  endtask

  int n;

  initial begin
    // Power-up: clear held, request latch cleared by a stop pulse, and a start
    // pulse given while the clear is still held (the start-up of the timing
    // diagram: T4o then T1 with the run flip-flop set).
    #1 clr_n = 1'b0;
    stop_n = 1'b0; #(CLK_HALF_PERIOD_NS / 2); stop_n = 1'b1;
    @(posedge clk); #(CLK_HALF_PERIOD_NS / 2);
    start_n = 1'b0; #20; start_n = 1'b1;
    @(posedge clk); #(CLK_HALF_PERIOD_NS / 4);
    clr_n = 1'b1;
    // This period is T4o with no gated beat; the next is T1.
    #1 expect_eq("startup T4o", int'(t_pot), 1 << (B - 1));
    expect_eq("startup T4 gated off", int'(t), 0);
    periods_to_t1(n);
    expect_eq("startup periods to T1", n, 1);
    expect_eq("startup first beat is T1", int'(t), 1);
    if (n == 1 && t == 1) n_start_in_clear++;

    // Run a few CPU cycles.
    repeat (5 * B) @(posedge clk);

    // Stop during T2: the cycle finishes through T4, then all beats are low.
    goto_k(2);
    stop_n = 1'b0; #20; stop_n = 1'b1;
    @(posedge clk); #(CLK_HALF_PERIOD_NS / 2);
    expect_eq("after stop: T3", int'(t), 4);
    @(posedge clk); #(CLK_HALF_PERIOD_NS / 2);
    expect_eq("after stop: T4", int'(t), 8);
    @(posedge clk); #(CLK_HALF_PERIOD_NS / 2);
    expect_eq("after stop: off", int'(t), 0);
    expect_eq("after stop: ring runs on", int'(t_pot), 1);
    if (t == 0 && t_pot == 1) n_stop_finish++;

    // Stopped for a while.
    repeat (3 * B) @(posedge clk);

    // Start during T3: nothing until the next T1.
    goto_k(3);
    start_n = 1'b0; #20; start_n = 1'b1;
    periods_to_t1(n);
    expect_eq("periods from T3 to T1", n, 2);
    expect_eq("restart with T1", int'(t), 1);
    if (n == 2 && t == 1) n_start_wait++;

    repeat (6 * B) @(posedge clk);

    // Clear in mid cycle (during T2): the ring restarts at T4o and the run
    // flip-flop is cleared; a new start brings T1 back.
    goto_k(2);
    clr_n = 1'b0; #1;
    expect_eq("clear drops beats", int'(t), 0);
    #20 clr_n = 1'b1;
    @(posedge clk); #(CLK_HALF_PERIOD_NS / 2);
    expect_eq("after clear: T4o", int'(t_pot), 8);
    expect_eq("after clear: ring empty", int'(ring), 0);
    if (t_pot == 8) n_clear_mid++;
    start_n = 1'b0; #20; start_n = 1'b1;
    periods_to_t1(n);
    expect_eq("after clear: periods to T1", n, 1);

    // Free running to the end of the reference run.
    wait ($time >= RUN_NS);

    checks += 6;
    if (n_start_in_clear == 0) begin failures++; $display("FAIL start during clear never seen"); end
    if (n_stop_finish == 0)    begin failures++; $display("FAIL stop finishing the cycle never seen"); end
    if (n_start_wait == 0)     begin failures++; $display("FAIL start waiting for T1 never seen"); end
    if (n_clear_mid == 0)      begin failures++; $display("FAIL mid-cycle clear never seen"); end
    if (n_stopped_periods == 0) begin failures++; $display("FAIL no stopped period"); end
    if (n_width_checks < 40)   begin failures++; $display("FAIL too few beat timings (%0d)", n_width_checks); end
    $display("mechanisms: start-in-clear=%0d stop-finishes-cycle=%0d start-waits-T1=%0d mid-clear=%0d run-periods=%0d stopped-periods=%0d beat-timings=%0d",
             n_start_in_clear, n_stop_finish, n_start_wait, n_clear_mid,
             n_run_periods, n_stopped_periods, n_width_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
