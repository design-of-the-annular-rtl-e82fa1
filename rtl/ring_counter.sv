// ring_counter: the ring pulse generator that produces the beat rhythm.
//
// How it works. BEATS-1 flip-flops C1..C(BEATS-1) form a shift register whose
// serial input is a constant 1, so on each rising clock edge one more stage
// turns on (thermometer code 000, 001, 011, 111 for four beats). The last
// flip-flop, c_clr (C4 for four beats), samples the top stage C(BEATS-1) on
// the falling clock edge. Once it is set, the next rising edge clears
// C1..C(BEATS-1) instead of shifting, and c_clr drops again at the following
// falling edge. The ring therefore cycles through BEATS states, one per clock
// period, with no start-up condition other than c_clr. Holding clr_n low sets
// c_clr asynchronously, so the ring is emptied at the next rising edge and
// restarts from the all-zero state (the T4 beat).
//
// Interface.
//   clk     beat clock, one beat per period
//   clr_n   active-low clear; sets c_clr at once
//   c       ring stages, c[0] = C1 .. c[BEATS-2] = C(BEATS-1)
//   c_clr   the clearing flip-flop (C4), high for half a period before each
//           wrap-around
//
// Timing. c changes only on rising clk edges; c_clr only on falling edges or
// when clr_n falls. The sequence repeats every BEATS clock periods.
//
// Following the design description: four D flip-flops, C1 fed by a constant
// 1, C4 clocked by the inverted clock and set by CLR_n, C1..C3 cleared while C4
// and the clock are both high. This implementation's own choice: the
// original gates the clock of C1..C3 with C4 and drives their asynchronous
// reset from C4 AND clock; here the same effect is a synchronous clear at the
// rising edge while c_clr is set, which gives identical waveforms without a
// gated clock or a combinational reset.
module ring_counter #(
  parameter int unsigned BEATS = apg_pkg::DEFAULT_BEATS
) (
  input  logic             clk,
  input  logic             clr_n,
  output logic [BEATS-2:0] c,
  output logic             c_clr
);

  // Clearing flip-flop, on the falling clock edge.
  always_ff @(negedge clk or negedge clr_n) begin
    if (!clr_n) c_clr <= 1'b1;
    else        c_clr <= c[BEATS-2];
  end

  // Shift register with constant-1 serial input, cleared by c_clr.
  always_ff @(posedge clk) begin
    if (c_clr) c <= '0;
    else       c <= {c[BEATS-3:0], 1'b1};
  end

  initial begin
    assert (BEATS >= 3) else $error("ring_counter: BEATS must be at least 3");
  end

endmodule
