// run_control: start/stop circuit and run flip-flop Cr.
//
// How it works. Two cross-coupled gates form a set/reset latch: a low pulse
// on start_n sets the run request, a low pulse on stop_n clears it (start_n
// wins if both are low, as in a cross-coupled NAND pair). The request is not
// used directly: the run flip-flop Cr copies it only at the boundary where the
// ring leaves the last beat (T4) and enters T1, that is at the rising clock
// edge at which C1 turns on. The beats are gated with Cr, so a start always
// begins with a whole T1 and a stop always lets the current CPU cycle finish
// through T4.
//
// Interface.
//   clk      beat clock
//   clr_n    active-low clear; clears Cr at once
//   start_n  active-low start request (pulse or level)
//   stop_n   active-low stop request (pulse or level)
//   c1       ring stage C1 from ring_counter
//   c_clr    clearing flip-flop C4 from ring_counter
//   run      Cr; high while the beats are passed on
//
// Timing. run changes only at the rising clk edge that starts T1, that is
// when C1 is low and c_clr is low; the request it takes is the latch state
// just before that edge.
//
// Following the design description: a start/stop gate pair feeding the D
// input of Cr, and Cr clocked through an inverter once per CPU cycle. This
// implementation's own choices: Cr is clocked by clk with an enable at the
// T4-to-T1 boundary rather than by a signal derived from the ring (the
// timing is the same), and clr_n also clears Cr.
//
// The request is a level-sensitive latch on purpose: it is the set/reset
// latch of the start/stop circuit and must hold a start or stop pulse that
// arrives at any time, with or without the clock running, until Cr takes it.
module run_control (
  input  logic clk,
  input  logic clr_n,
  input  logic start_n,
  input  logic stop_n,
  input  logic c1,
  input  logic c_clr,
  output logic run
);

  logic run_req;

  // Start/stop set/reset latch.
  always_latch begin
    if (!start_n)     run_req = 1'b1;
    else if (!stop_n) run_req = 1'b0;
  end

  // Cr: updated only when the ring moves from the last beat to T1.
  logic at_cycle_start;
  assign at_cycle_start = !c1 && !c_clr;

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n)              run <= 1'b0;
    else if (at_cycle_start) run <= run_req;
  end

endmodule
