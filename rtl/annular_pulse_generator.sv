// annular_pulse_generator: beat (timing pulse) generator of a
// micro-programmed CPU controller.
//
// A CPU cycle is cut into BEATS equal beats T1..T(BEATS), each one clock
// period long; with a 200 ns clock (100 ns pulse width) there are four 200 ns
// beats in an 800 ns CPU cycle, repeating without a gap. The design has three
// parts:
//   ring_counter   thermometer shift register C1..C3 and clearing flip-flop
//                  C4, which together cycle through BEATS states
//   beat_decoder   turns the ring state into one-hot beat potentials
//                  T1o..T4o (T1o = C1&~C2, T2o = C2&~C3, T3o = C3, T4o = ~C1)
//   run_control    start/stop latch and run flip-flop Cr, updated only at the
//                  T4-to-T1 boundary
// The beats given to the CPU are T(k) = T(k)o & Cr.
//
// Interface.
//   clk        beat clock
//   clr_n      active-low clear: restarts the ring (next beat is T4o, then
//              T1o) and clears Cr
//   start_n    active-low start request
//   stop_n     active-low stop request
//   t_pot      free-running beat potentials T1o..T(BEATS)o, bit 0 = T1o
//   t          gated beats T1..T(BEATS), bit 0 = T1; all low while stopped
//   ring       ring stages C1..C(BEATS-1), bit 0 = C1
//   ring_clr   the clearing flip-flop C(BEATS)
//
// Timing. t_pot and t change at rising clk edges; each beat lasts exactly one
// clock period. After clr_n is released the first rising edge gives T4o and
// the second T1o. A start takes effect at the next T1; a stop after the next
// T4.
//
// The structure and the equations follow the design description. Bringing out
// both the free-running potentials (the outputs of the schematic that has no
// start/stop circuit) and the gated beats is this implementation's choice.
module annular_pulse_generator #(
  parameter int unsigned BEATS = apg_pkg::DEFAULT_BEATS
) (
  input  logic             clk,
  input  logic             clr_n,
  input  logic             start_n,
  input  logic             stop_n,
  output logic [BEATS-1:0] t_pot,
  output logic [BEATS-1:0] t,
  output logic [BEATS-2:0] ring,
  output logic             ring_clr
);

  logic run;

  ring_counter #(.BEATS(BEATS)) u_ring (
    .clk   (clk),
    .clr_n (clr_n),
    .c     (ring),
    .c_clr (ring_clr)
  );

  beat_decoder #(.BEATS(BEATS)) u_decode (
    .c     (ring),
    .t_pot (t_pot)
  );

  run_control u_run (
    .clk     (clk),
    .clr_n   (clr_n),
    .start_n (start_n),
    .stop_n  (stop_n),
    .c1      (ring[0]),
    .c_clr   (ring_clr),
    .run     (run)
  );

  // Output gates: a beat reaches the CPU only while Cr is set.
  assign t = t_pot & {BEATS{run}};

endmodule
