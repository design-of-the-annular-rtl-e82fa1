// beat_decoder: turns the ring state into the beat potentials T1o..T4o.
//
// How it works. The ring holds a thermometer code: k stages on means beat k,
// no stage on means the last beat. Each beat is therefore found at the edge of
// the run of ones:
//   T(k)o     = C(k) & ~C(k+1)   for k = 1 .. BEATS-2
//   T(BEATS-1)o = C(BEATS-1)
//   T(BEATS)o = ~C1
// For four beats these are T1o = C1 & ~C2, T2o = C2 & ~C3, T3o = C3 and
// T4o = ~C1, exactly the design description's output equations. For every
// legal ring state exactly one output is high.
//
// Interface.
//   c      ring stages from ring_counter, c[0] = C1
//   t_pot  beat potentials, t_pot[0] = T1o .. t_pot[BEATS-1] = T(BEATS)o
//
// Timing. Purely combinational; the outputs follow the rising clock edges at
// which the ring changes.
//
// The equations follow the design description; writing them for any BEATS is
// this implementation's own generalisation.
module beat_decoder #(
  parameter int unsigned BEATS = apg_pkg::DEFAULT_BEATS
) (
  input  logic [BEATS-2:0] c,
  output logic [BEATS-1:0] t_pot
);

  always_comb begin
    for (int k = 0; k < BEATS - 2; k++) begin
      t_pot[k] = c[k] & ~c[k+1];
    end
    t_pot[BEATS-2] = c[BEATS-2];
    t_pot[BEATS-1] = ~c[0];
  end

endmodule
