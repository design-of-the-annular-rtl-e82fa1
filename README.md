# Annular (ring) beat pulse generator

A micro-programmed CPU controller does its work to a rhythm: each CPU cycle
is cut into a fixed number of equal *beats*, and each step of an operation
is tied to one beat. This design makes that rhythm. From one clock it
produces four one-hot beat signals, T1, T2, T3 and T4. Each is high for
exactly one clock period, and they follow one another without a gap. With
the reference clock (200 ns period, 100 ns high) each beat lasts 200 ns and a
CPU cycle lasts 800 ns.

The generator is a small classic circuit of four D flip-flops and a few
gates:

* a **ring** of flip-flops that steps through four states, one per clock;
* a **decoder** that turns each ring state into one beat potential, T1o..T4o;
* a **start/stop circuit** with a run flip-flop, Cr, which lets the beats
  through only in whole CPU cycles.

```
          +--------------+  c[2:0]  +--------------+  t_pot[3:0]        t[3:0]
 clk ---->| ring_counter |--------->| beat_decoder |-------------+--[AND]----->
 clr_n -->|  C1 C2 C3 C4 |          +--------------+             |    ^
          +--------------+                                       |    |
              | C1, C4                                           |    | run (Cr)
              v                                                  |    |
          +--------------+                                       |    |
 start_n->| run_control  |---------------------------------------+----+
 stop_n ->|  latch + Cr  |
          +--------------+
```

## The ring: C1..C3 and the clearing flip-flop C4

C1, C2 and C3 form a shift register. Its serial input is a constant 1 (C1's
D input is tied high). On every rising clock edge one more stage turns on,
so starting from empty the ring holds the thermometer codes `000`, `001`,
`011`, `111` (written C3 C2 C1).

The fourth flip-flop, C4, closes the ring. It is clocked on the **falling**
edge, and it copies C3. So C4 goes high half a clock after the ring fills
up. At the next rising edge, C1..C3 are cleared instead of shifted, and
half a clock after that C4 copies the now-empty C3 and drops again. The
ring therefore goes round four states and then starts over:

| period after a wrap | C3 C2 C1 | C4, first half / second half | beat potential |
|---|---|---|---|
| 0 | 000 | 1 / 0 | T4o |
| 1 | 001 | 0 / 0 | T1o |
| 2 | 011 | 0 / 0 | T2o |
| 3 | 111 | 0 / 1 | T3o |

C4 is also the clear input of the whole generator. Pulling `clr_n` low sets
C4 at once, and the ring empties at the next rising edge. After a clear the
first beat is always T4o, and T1o follows one clock later.

The original circuit does the clearing differently. It gates the clock of
C1..C3 with C4, and it drives their asynchronous resets from C4 AND clock.
This RTL gets the same waveforms with an ordinary synchronous clear at the
rising edge while C4 is set. So there is no gated clock and no
combinationally driven reset. The flip-flops still use both clock edges: C4
uses the falling edge, as in the original.

## Decoding the beats

A thermometer code is decoded by finding the edge of its run of ones:

```
T1o = C1 & ~C2
T2o = C2 & ~C3
T3o = C3
T4o = ~C1
```

For each of the four legal ring states, exactly one of these is high. The
potentials run freely as long as the clock runs. They are brought out as
`t_pot`; a build of the circuit without the start/stop part gives exactly
these as its outputs T1..T4.

## Starting and stopping on a cycle boundary

The beats sent on to the CPU are `t = t_pot & Cr`. Cr must never change in
the middle of a CPU cycle, or the CPU would see a partial cycle. The run
request therefore passes through two stages:

1. **Request latch.** `start_n` and `stop_n` are active-low inputs. They set
   and clear a level-sensitive latch, which behaves like a pair of
   cross-coupled NAND gates. If both are low at once, start wins. A pulse of
   any length, at any time, is held in the latch.
2. **Run flip-flop Cr.** Cr copies the latch only at the rising edge where
   the ring leaves T4o and enters T1o, that is, where C1 turns on. C4 must be
   low at that edge, so the clearing edge does not count as a boundary.

As a result:

* a start in mid-cycle waits, and the first beat out is a whole T1;
* a stop in mid-cycle lets the cycle run on through T4, and then `t` stays
  all-low. The ring and `t_pot` keep running underneath;
* a start given while `clr_n` is held low makes the beat sequence of the
  classic timing diagram: after the clear, T4o is suppressed (Cr is not set
  yet) and T1 comes out at the next edge;
* `clr_n` clears Cr at once.

The request latch is the only latch in the design, and it is meant to be
one. Synthesis reports it as a latch.

## Interface (`annular_pulse_generator`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | beat clock; one beat per period |
| `clr_n` | in | 1 | active-low clear: ring restarts at T4o, Cr cleared |
| `start_n` | in | 1 | active-low start request |
| `stop_n` | in | 1 | active-low stop request |
| `t_pot` | out | BEATS | free-running beat potentials, bit 0 = T1o |
| `t` | out | BEATS | gated beats T1..T(BEATS), bit 0 = T1 |
| `ring` | out | BEATS-1 | ring stages, bit 0 = C1 |
| `ring_clr` | out | 1 | the clearing flip-flop C4 |

There is one parameter: `BEATS`, the number of beats per CPU cycle. Its
default is 4, and the ring has `BEATS-1` stages plus the clearing flip-flop.
Other values (3 or more) extend the decoder in the obvious way:
T(k)o = C(k) & ~C(k+1), the second-to-last beat is the top stage, and the
last beat is ~C1. This generalisation is not part of the classic four-beat
circuit, and only 4, 5 (ring) and 6 (decoder) are tested.

The beat length is set only by the clock. To get other beat widths, change
the clock period.

## Files

| file | contents |
|---|---|
| `rtl/apg_pkg.sv` | default beat count and the reference clock timing |
| `rtl/ring_counter.sv` | C1..C(BEATS-1) and C4 |
| `rtl/beat_decoder.sv` | beat potentials from the ring state |
| `rtl/run_control.sv` | start/stop latch and Cr |
| `rtl/annular_pulse_generator.sv` | top level and output gates |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Departures from the classic circuit, and what is assumed

* **Clear of C1..C3:** this RTL uses a synchronous clear; the original uses
  a gated clock and an asynchronous reset, as described above. The waveforms
  are the same.
* **Clock of Cr:** the original clocks Cr through an inverter from a ring
  signal. The signal it inverts is not certain. Here Cr takes the request
  where T4o ends and T1o begins. This matches the classic timing diagram, in
  which T4 is missing in the first period after the clear and T1 is present
  in the next. Cr is clocked by `clk` with an enable.
* **Polarity of start/stop:** assumed active low, as the cross-coupled gate
  pair needs.
* **Reset of Cr:** `clr_n` also resets Cr. The original's reset connection
  for Cr is not known.
* **Power-up:** C1..C3 have no reset of their own. Hold `clr_n` low for at
  least one rising clock edge before use. The request latch powers up
  undefined, so give a stop pulse, or start the design under a clear with a
  start pulse.
* The crystal oscillator that makes the clock is not part of the RTL: `clk`
  is an input.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a run that hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module annular_pulse_generator_tb \
    rtl/apg_pkg.sv rtl/ring_counter.sv rtl/beat_decoder.sv rtl/run_control.sv \
    rtl/annular_pulse_generator.sv tb/annular_pulse_generator_tb.sv
./obj_dir/Vannular_pulse_generator_tb
```

Replace the top module and testbench file to run `ring_counter_tb`,
`beat_decoder_tb` or `run_control_tb`.

What the testbenches check:

* **`annular_pulse_generator_tb`** runs the full design at its defaults for
  the 50 µs reference run: 250 clock periods of 200 ns. A reference model
  counts periods since the last clear. In every period, the testbench checks
  the ring, the one-hot potentials and the gated beats against that model.
  For every beat it checks a width of 200 ns and a repeat time of 800 ns. It
  drives and counts each of these mechanisms: a start during the clear, a
  stop that lets the cycle finish, a start that waits for T1, a clear in
  mid-cycle, and stopped periods with the ring still running.
* **`ring_counter_tb`** runs four-beat and five-beat rings side by side. It
  checks the state and C4 in both halves of every period, an asynchronous
  clear in mid-cycle, and the 800 ns cycle length.
* **`beat_decoder_tb`** checks every legal state against a one-hot index
  worked out from the count of ones, and all eight input patterns against the
  equations. It also checks a six-beat decoder.
* **`run_control_tb`** checks that Cr changes only at the T4-to-T1 boundary
  and how many periods a start or stop takes. It also covers start winning
  over stop, a stop withdrawn by a later start, a boundary masked by C4, and
  the clear.

All four pass. A deliberately broken copy of each module makes its
testbench fail.
