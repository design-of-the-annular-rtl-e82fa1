// ring_counter_tb: self-checking test of the ring pulse generator.
//
// Two rings are run side by side from one 200 ns clock: the four-beat default
// and a five-beat one. After a clear, phase p (0 = all stages off) must hold
// the thermometer code (1<<p)-1 for one whole clock period, the phase must
// advance by one each period and wrap after BEATS periods, and the clearing
// flip-flop must be high in the second half of the last phase and the first
// half of phase 0 only. A clear in the middle of a cycle must set the clearing
// flip-flop at once and empty the ring at the next rising edge.
`timescale 1ns/1ps
module ring_counter_tb;
  import apg_pkg::*;

  localparam int unsigned B4 = 4;
  localparam int unsigned B5 = 5;

  logic clk = 1'b0;
  logic clr_n = 1'b0;
  logic [B4-2:0] c4;
  logic          clr4;
  logic [B5-2:0] c5;
  logic          clr5;

  int checks = 0;
  int failures = 0;

  ring_counter u4 (.clk(clk), .clr_n(clr_n), .c(c4), .c_clr(clr4));
  ring_counter #(.BEATS(B5)) u5 (.clk(clk), .clr_n(clr_n), .c(c5), .c_clr(clr5));

  always #(CLK_HALF_PERIOD_NS) clk = ~clk;

  // Watchdog.
  initial begin
    #(400 * BEAT_NS);
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

  // Check both rings at the middle of the high and low halves of one period.
  // p4/p5: phase of each ring in this period.
  task automatic check_period(input int p4, input int p5);
    @(posedge clk); #(CLK_HALF_PERIOD_NS / 2);
    expect_eq("c4 high half", int'(c4), (1 << p4) - 1);
    expect_eq("clr4 high half", int'(clr4), int'(p4 == 0));
    expect_eq("c5 high half", int'(c5), (1 << p5) - 1);
    expect_eq("clr5 high half", int'(clr5), int'(p5 == 0));
    @(negedge clk); #(CLK_HALF_PERIOD_NS / 2);
    expect_eq("c4 low half", int'(c4), (1 << p4) - 1);
    expect_eq("clr4 low half", int'(clr4), int'(p4 == B4 - 1));
    expect_eq("c5 low half", int'(c5), (1 << p5) - 1);
    expect_eq("clr5 low half", int'(clr5), int'(p5 == B5 - 1));
  endtask

  int wraps4;
  time t_zero_prev, t_zero;

  initial begin
    // Clear held over two rising edges, released in the high half.
    repeat (2) @(posedge clk);
    #(CLK_HALF_PERIOD_NS / 4);
    expect_eq("c4 cleared", int'(c4), 0);
    expect_eq("clr4 set by clr_n", int'(clr4), 1);
    clr_n = 1'b1;
    // Finish this period (phase 0) by hand.
    @(negedge clk); #(CLK_HALF_PERIOD_NS / 2);
    expect_eq("c4 phase0 low", int'(c4), 0);
    expect_eq("clr4 phase0 low", int'(clr4), 0);
    // Twenty periods after the first.
    for (int n = 1; n <= 20; n++) check_period(n % B4, n % B5);

    // Clear in the middle of a cycle: rings are now in phase 21%4=1, 21%5=1
    // at the next period; move to a period with p4 = 2 first.
    check_period(21 % B4, 21 % B5);
    check_period(22 % B4, 22 % B5);  // p4 = 2, p5 = 2; now in low half
    clr_n = 1'b0;
    #1;
    expect_eq("clr4 async set", int'(clr4), 1);
    expect_eq("clr5 async set", int'(clr5), 1);
    expect_eq("c4 holds until edge", int'(c4), 3);
    @(posedge clk); #(CLK_HALF_PERIOD_NS / 2);
    expect_eq("c4 cleared mid-cycle", int'(c4), 0);
    expect_eq("c5 cleared mid-cycle", int'(c5), 0);
    clr_n = 1'b1;
    @(negedge clk); #(CLK_HALF_PERIOD_NS / 2);
    for (int n = 1; n <= 9; n++) check_period(n % B4, n % B5);

    // Cycle length: time between successive entries into phase 0.
    wraps4 = 0;
    t_zero_prev = 0;
    for (int n = 0; n < 4 * B4; n++) begin
      @(posedge clk); #1;
      if (c4 == '0) begin
        t_zero = $time;
        if (wraps4 > 0) expect_eq("cycle length ns", int'(t_zero - t_zero_prev), CPU_CYCLE_NS);
        t_zero_prev = t_zero;
        wraps4++;
      end
    end
    expect_eq("wraps seen", wraps4, 4);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
