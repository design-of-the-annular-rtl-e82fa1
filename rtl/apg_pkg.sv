// apg_pkg: constants shared by the annular (ring) pulse generator and its
// testbenches.
//
// A CPU cycle is split into BEATS beats T1..T4 of one clock period each. The
// reference timing is a 200 ns clock period (100 ns high, 100 ns low), giving
// 200 ns beats and an 800 ns CPU cycle. The beat count and the timing come
// from the design description; the names are this implementation's own.
package apg_pkg;

  // Number of beats per CPU cycle (T1..T4).
  localparam int unsigned DEFAULT_BEATS = 4;

  // Reference clock: 100 ns pulse width, so one beat lasts 200 ns.
  localparam int unsigned CLK_HALF_PERIOD_NS = 100;
  localparam int unsigned BEAT_NS            = 2 * CLK_HALF_PERIOD_NS;
  localparam int unsigned CPU_CYCLE_NS       = DEFAULT_BEATS * BEAT_NS;

endpackage
