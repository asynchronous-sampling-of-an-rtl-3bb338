# Ring-oscillator TDC that can be sampled while it runs

A ring-oscillator time-to-digital converter (TDC) measures time by letting
an edge run round a ring of gates. The ring outputs give the *fine* state,
one state per gate delay. A counter clocked by the ring gives the *coarse*
state, one count per ring period. Usually such a converter is started,
stopped once and read. Here it keeps running, and an asynchronous
`sample` edge may read it any number of times during one run, like the
split-time button of a stopwatch. That suits, for example, time-of-flight
mass spectrometry, where many ions arrive during one experiment.

The difficulty is the counter. The sample edge is not related to the ring
in any way, so sooner or later it lands just as the counter is clocked.
The counter then holds neither its old value nor its new one, or the new
value is stored together with the old fine state. Either way the reading
is wrong by a whole ring period: R states, where R is the number of fine
states. With 1 ns states and R = 8 that is 8 ns.

This design keeps **two copies of the coarse count that never change at
the same time**:

* the counter, which advances on the rising edge of a ring tap;
* a register, which copies the counter on the *falling* edge of the same
  tap, half a ring period later.

At every instant at least one copy is stable. A second ring tap, a quarter
period out of phase with the clock tap, tells which one. The sample edge
stores the ring outputs, both copies and that tap together. Afterwards a
multiplexer uses the *stored* tap to pick the copy that was stable at the
sample edge. Because the choice is made from stored values, a sample edge
that lands while the select tap is switching cannot upset it.

## The ring and its eight states

The ring has four stages. Stage 0 is an AND gate of `enable` and the last
stage's output. Stages 1 to 3 are inverters. While `enable` is low the ring
rests at F0..F3 = 0 1 0 1. When `enable` rises, one edge travels round the
ring, one stage per stage delay D. The ring therefore walks through
2 × 4 = 8 states per period. Each state lasts D, so the fine resolution is
D (1 ns by default).

With the default taps, the counter and register are clocked by F1 and the
multiplexer is steered by F3. A sample taken in each state then does the
following:

| fine state | F0 F1 F2 F3 | what happens on entering the state      | stored F3 | copy taken |
|-----------:|:-----------:|-----------------------------------------|:---------:|------------|
| 0          | 0 1 0 1     | F3 rises                                | 1         | counter    |
| 1          | 1 1 0 1     | F0 rises                                | 1         | counter    |
| 2          | 1 0 0 1     | F1 falls: the **register loads** the counter | 1    | counter    |
| 3          | 1 0 1 1     | F2 rises                                | 1         | counter    |
| 4          | 1 0 1 0     | F3 falls                                | 0         | register   |
| 5          | 0 0 1 0     | F0 falls                                | 0         | register   |
| 6          | 0 1 1 0     | F1 rises: the **counter advances**      | 0         | register   |
| 7          | 0 1 0 0     | F2 falls                                | 0         | register   |

Follow one period p, counted from the start of the run:

* On entering state 6 the counter goes from p to p+1. In states 6 and 7 the
  register still holds p, and the register is the copy taken.
* In states 0 to 3 of the next period the counter holds p+1, and the
  counter is the copy taken.
* In states 4 and 5 the register holds p+1, loaded on entering state 2.

So the coarse output steps exactly when the fine state wraps from 7 to 0,
and a sample reads

    elapsed time = (time_coarse × 8 + time_fine) × D

measured from the rising edge of `enable`. It wraps after 8 × 2^COARSE_W
states (32.768 µs with the defaults). The copy that is taken never has its
own clock edge closer than two states to the sample edge, on either side.

### The other tap arrangement

The taps can also be swapped: clock on F3, select on F1, with the counter
copy taken while F1 is low. Set `CLK_TAP=3`, `SEL_TAP=1`, `SEL_COUNTER=0`
to get it. Sampling is just as safe. The counter then advances on entering
state 0 and the register loads on entering state 4, so the coarse output
steps when the fine state enters 2, not 0. The reading then has to be
corrected for that offset. This is why F1/F3 is the default.

## Timing a real implementation must meet

The RTL is zero-delay. The properties that make the scheme work are about
real delays, and they follow from the table above:

* **Counter settling**: the ripple counter must settle within 2 stage
  delays. The counter is taken as early as two states after its own clock
  edge (sample in state 0, counter clocked on entering state 6). With a
  12-bit ripple counter and 1 ns stages this is the binding constraint.
  Use a shorter counter, a longer ring or a faster counter if it is not
  met.
* **Register load**: the counter must have settled when the register
  loads, four states after the counter edge. The register output must
  settle within two states of its own edge, for the same reason as the
  counter.
* **Sample memory**: the ring outputs, both copies and the select tap are
  captured by one edge. A ring output that is switching at that moment may
  resolve either way. That gives the ±1 state uncertainty every ring TDC
  has. It cannot cause a whole-period error, because both possible values
  of the select tap pick a copy that is stable.
* The multiplexer and the fine encoder sit *after* the sample memory, so
  their delay only adds output latency.

## Blocks

| file | block |
|---|---|
| `rtl/tdc_pkg.sv` | default constants (ring length, stage delay, counter width, taps) |
| `rtl/tdc_ring_osc.sv` | ring oscillator, **behavioural model** with a transport delay per stage; not synthesizable |
| `rtl/tdc_coarse_counter.sv` | ripple counter, clocked by the rising edge of the clock tap |
| `rtl/tdc_coarse_register.sv` | copy register, loaded on the falling edge of the clock tap |
| `rtl/tdc_sample_mem.sv` | sample memory: ring outputs, counter and register, stored on the rising edge of `sample` |
| `rtl/tdc_coarse_mux.sv` | picks the counter or register copy from the stored select tap |
| `rtl/tdc_fine_encoder.sv` | turns the stored ring outputs into a binary fine state |
| `rtl/tdc_top.sv` | the complete converter |

The ring is a timed loop of gates. On a chip it is a hand-built
structure, so here it exists only as a simulation model. Everything else
is ordinary synthesizable logic, but it is clocked by ring taps, by the
bits of the ripple counter and by `sample`. A synthesis or timing flow has
to be told about those clocks.

### Top-level interface (`tdc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `reset` | in | 1 | asynchronous, active high. Clears counter, register and sample memory, and holds the ring at rest |
| `enable` | in | 1 | high: ring runs. Time is measured from its rising edge |
| `sample` | in | 1 | every rising edge stores a reading. It may come at any time and any number of times per run |
| `fine_state` | out | STAGES | live ring outputs, bit i = Fi |
| `time_coarse` | out | COARSE_W | coarse value of the last sample |
| `time_fine` | out | log2(2·STAGES) | binary fine value of the last sample |

The outputs change one flip-flop delay after a `sample` edge, plus the
multiplexer and encoder delay. They hold until the next edge. There is no
readout handshake: whatever collects the readings must take each one
before the next `sample` edge.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `STAGES` | 4 | ring length. Must be even: one AND stage plus an odd number of inverters. Gives 2·STAGES fine states |
| `STAGE_DELAY_PS` | 1000 | stage delay of the ring model, in ps |
| `COARSE_W` | 12 | coarse counter width |
| `CLK_TAP` | 1 | ring stage that clocks counter and register |
| `SEL_TAP` | 3 | ring stage that steers the multiplexer |
| `SEL_COUNTER` | 1 | stored select level for which the counter copy is taken |

If you change `STAGES`, pick taps that keep the select tap a quarter
period away from the clock tap, and check the arrangement in simulation.
The fine encoder handles any even length.

### Fine encoding

XOR the ring outputs with the rest pattern 0101… to get a word t. In
states 0 to STAGES, t has its lowest s bits set. In the states above
STAGES, its ones have moved to the top end. With p the number of ones in
t, the fine state is p when the top bit of t is 0, and 2·STAGES − p when
it is 1. A word outside this code can appear only while a stopped ring
drains, and it is encoded by the same rule.

## Simulating

Verilator 5 with `--timing` is needed, because the ring model uses delays:

    verilator --binary --timing --assert -Wno-fatal -Irtl rtl/tdc_pkg.sv \
        tb/tb_tdc_top.sv --top-module tb_tdc_top
    ./obj_dir/Vtb_tdc_top

Every testbench ends with `TB_RESULT checks=N failures=M`:

* `tb_tdc_top` runs the converter at its default size, with no parameter
  overrides. It takes about 1,500 samples at random times during one run
  that goes past the counter wrap, then resets and runs again. Extra
  samples land exactly on the counter edge and exactly on the register
  edge. Each reading is compared with the state count computed from the
  sample time, with k−1 also accepted when the sample coincides with a
  ring transition. The test also checks that the copy taken did not change
  from two stage delays before the sample to two after. It counts samples
  near and on both edges, wraps and restarts, and fails if any of them
  never happened. It runs in well under a second.
* `tb_tdc_settling` shows the problem the scheme solves. It wires the same
  blocks as `tdc_top`, but adds a settling model behind the counter: for
  1.9 ns after each count the counter shows a random mix of old and new
  bits. Half of the samples land within a stage delay of the counter edge.
  Reading the stored counter directly, as a plain ring TDC would, goes
  wrong hundreds of times, by multiples of 8 states. Reading through the
  stored select tap and the multiplexer is never wrong. With 2.6 ns of
  settling, which is past the two-stage margin, the multiplexed reading
  fails too.
* `tb_tdc_top_fig5b` does the same for the swapped tap arrangement with a
  6-bit counter. It checks that the coarse value steps when the fine state
  enters 2.
* `tb_tdc_ring_osc`, `tb_tdc_coarse_counter`, `tb_tdc_coarse_register`,
  `tb_tdc_sample_mem`, `tb_tdc_coarse_mux` and `tb_tdc_fine_encoder` test
  the blocks one at a time. They check the ring's state sequence, its
  period of 8 stage delays and its return to rest, counting and wrap, the
  falling-edge load, storing and holding, both select polarities, and the
  encoding for 4- and 6-stage rings.

The simulator has two states. Everything that is read is reset or
initialised, and each testbench starts with a rising edge of reset.

## What is fixed by the architecture and what is a choice here

These follow the architecture:

* the AND-plus-three-inverters ring with 8 states;
* the ripple-style coarse counter on the rising edge of a tap;
* the copy register on the falling edge;
* sampling the ring, both copies and the select tap before the multiplexer
  decides;
* the F1 clock / F3 select arrangement, and the F3 clock / F1 select
  alternative;
* the 1 ns, 8-state example.

These are choices made here:

* **Counter width** of 12 bits. Nothing fixes it; set `COARSE_W` to the
  range needed, minding the settling constraint above.
* **Select polarity** for the F1/F3 arrangement: the counter is taken
  while F3 is high. That is the half period away from the counter's edge,
  and it gives a coarse value that steps at the 7→0 wrap.
* **Resets.** One asynchronous reset clears the counter, the register and
  the sample memory, and holds the ring's AND stage low. Clearing the
  register makes its value defined before its first load.
* **Edge-triggered register.** The copy register is an edge-triggered
  flip-flop, not a level latch.
* **Readout.** Binary fine encoding, separate coarse and fine outputs, and
  a single stored reading with no buffering or readout handshake.
* **Disable.** When `enable` falls, the edges already in the ring finish
  their trip before it rests. The counter may therefore advance once more
  after the last meaningful sample.
* **Delays.** The ring model's delays are ideal and identical for every
  stage. Mismatch between stages, which makes the fine states unequal in a
  real ring, is not modelled.
