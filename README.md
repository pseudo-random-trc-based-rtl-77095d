# Pseudo-random mux-ed twisted ring counter test pattern generator

In scan-based built-in self-test (BIST), a test pattern generator on the chip
produces the bits that are shifted into the scan chains of the circuit under
test. The usual generator is an LFSR. Its consecutive patterns are almost
uncorrelated, so roughly half of the scan cells toggle on every shift, and the
test burns far more power than normal operation.

This generator keeps the switching low and still mixes the patterns:

* A **multi-segment twisted ring counter** (Johnson counter) produces the
  patterns. Within a segment exactly one bit changes per clock. The segments
  cascade like the digits of a counter, so a 6-bit counter still gives 64
  different patterns.
* A **4:1 multiplexer** picks the counter bit that is sent to the scan chain
  input.
* The multiplexer's **select lines S1 and S0** are loaded from two counter bits
  once per scan cycle, at the "new scan cycle" pulse. For the rest of the scan
  cycle they are held. Which counter bit the scan chain receives therefore
  changes from one scan cycle to the next in a pseudo-random way. Within a
  scan cycle, the chain receives the slowly changing sequence of one bit.

The select lines are held by tristate buffers, enabled by the clock ANDed with
"new scan cycle". They replace the two D flip-flops of an earlier form of the
generator. That earlier form is still available through a parameter.

## The counter (`multiseg_trc`)

The N = `SEG_W`×`NSEG` state bits are named A(N-1)…A0. Segment *i* holds bits
A(i·SEG_W+SEG_W-1)…A(i·SEG_W). In every segment the bits shift one place
towards the segment's lowest bit, and the inverted lowest bit enters at the
top. For the first 2-bit segment:

    A1 <= ~A0      A0 <= A1          {A1,A0}: 00 -> 10 -> 11 -> 01 -> 00

A `SEG_W`-bit segment has 2·`SEG_W` states. Exactly one of those states has
all bits set.

**Cascade.** Segment 0 steps on every clock in test mode. Segment *i* steps on
a clock on which segment *i-1* steps while all of its bits are 1. In the
default three 2-bit segments, that makes segment 1 step once every 4 clocks
and segment 2 once every 16. The period is (2·SEG_W)^NSEG:

| configuration | segments | period |
|---|---|---|
| default, "6-bit divided by 3" | 3 × 2 bits | 4·4·4 = 64 |
| `SEG_W=3, NSEG=2`, "6-bit divided by 2" | 2 × 3 bits | 6·6 = 36 |
| `NSEG=1` | one N-bit Johnson counter | 2N |

The start of the default sequence, with the value printed as {A5..A0} in
decimal:

    0, 2, 3, 9, 8, 10, 11, 13, 12, 14, 15, 37, 36, 38, 39, 33, 32, ...

Each clock changes at most NSEG bits, and on average 1 + 1/4 + 1/16 ≈ 1.31
bits for the default counter.

The cascade depends on *both* conditions: segment *i-1* must be stepping and
must be all ones. An enable that looks only at segment *i-1*'s bits lets
segment 2 step on each of the four clocks in which segment 1 sits at 11. The
counter then repeats after 16 patterns instead of 64. The RTL chains the
enables.

The circuit this is based on gates the clock of each segment with an AND gate.
Here every register runs on the one global clock, and the AND gates become
synchronous step enables. The sequence is the same, and the glitches that
gated clocks cause are avoided.

## Choosing the scan-in bit (`sel_hold`, `mux4`)

This is the part whose timing needs care.

**Connections** (parameters of `trc_tpg_top`):

| signal | source | parameter |
|---|---|---|
| S1 | A1 | `S1_TAP = 1` |
| S0 | A2 | `S0_TAP = 2` |
| mux input 0 ({S1,S0} = 00) | A1 | `IN0_TAP = 1` |
| mux input 1 ({S1,S0} = 01) | A3 | `IN1_TAP = 3` |
| mux input 2 ({S1,S0} = 10) | A3 | `IN2_TAP = 3` |
| mux input 3 ({S1,S0} = 11) | A0 | `IN3_TAP = 0` |

Inputs 1 and 2 both carry A3: if exactly one select line is high, the
scan chain gets A3. Input 3 (both high) was chosen as A0, the bit nearest to it
in the described wiring. It is the least certain of these connections. Change
`IN3_TAP` if you need a different bit.

**Holding the select lines.** While the clock gated by `new_scan_cycle` is
high, each tristate buffer drives its select line from its counter bit. When
the buffer turns off, the undriven line keeps its last value. That behaviour
is a transparent latch, and `sel_hold` writes it as one (`HOLD = HOLD_LATCH`,
the default). So a synthesized netlist contains two latches. They are
intended, with enable `new_scan_cycle & clk`.

Timing of the latch form, for a scan cycle that starts at rising edge *t0*:

    clk            _|‾‾‾|___|‾‾‾|___|‾‾‾|___
    new_scan_cycle _|‾‾‾‾‾‾‾|_______________    (registered, one clock)
    latch enable   _|‾‾‾|___________________    (new_scan_cycle & clk)
    S1,S0          ==X=======================   take A1,A2 as they are after t0
    scan_in_o      ==X===X=======X=======X===   = selected bit, follows the counter

With `HOLD = HOLD_FLOP`, the earlier two-flip-flop form, the select lines load
at the rising edge that *ends* the new-scan-cycle clock. They therefore change
one clock later than in the latch form, with the same values. This form uses
a flip-flop with an enable, not a gated clock.

For the latch, `new_scan_cycle` must be glitch-free while `clk` is high. That
holds here because it comes straight from a flip-flop in `scan_cycle_timer`.
If you drive it from elsewhere, keep it registered on the same clock.

## Scan cycles (`scan_cycle_timer`)

A test-per-scan cycle lasts m + 1 clocks, where m is the number of flip-flops
in the scan chain: m shift clocks plus one capture clock. `scan_cycle_timer`
counts `SCAN_LEN + 1` clocks. It raises `new_scan_cycle` for one clock at the
start of each scan cycle, and after reset it does so in the first test-mode
clock. `scan_pos_o` gives the clock index within the scan cycle.
`SCAN_LEN = 8` is a placeholder. Set it to the length of your chain.

**Pick `SCAN_LEN + 1` coprime with the counter period.** If the scan cycle
length divides the period, or shares a large factor with it, the select lines
are loaded at the same few counter states every time. Then only one or two
multiplexer inputs are ever used. For example, a 6-clock scan cycle with the
36-pattern counter always selects the same input. The defaults (9 against 64)
reach all four inputs.

## Top level (`trc_tpg_top`)

| parameter | default | meaning |
|---|---|---|
| `SEG_W` | 2 | bits per counter segment |
| `NSEG` | 3 | number of segments (N = SEG_W·NSEG ≥ 4 for the default taps) |
| `SCAN_LEN` | 8 | scan chain flip-flops; scan cycle = SCAN_LEN+1 clocks |
| `HOLD` | `HOLD_LATCH` | `HOLD_LATCH` (tristate form) or `HOLD_FLOP` (earlier flip-flop form) |
| `S1_TAP`, `S0_TAP`, `IN0_TAP`…`IN3_TAP` | 1, 2, 1, 3, 3, 0 | counter bits feeding the select lines and mux inputs |

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | global clock |
| `rst_n` | in | 1 | asynchronous active-low reset; counter, timer and select lines go to 0 |
| `test_mode` | in | 1 | 1 runs the generator; 0 freezes counter and timer |
| `scan_in_o` | out | 1 | bit for the scan chain input |
| `pattern_o` | out | N | counter state {A(N-1)..A0} |
| `new_scan_cycle_o` | out | 1 | first clock of a scan cycle |
| `sel_o` | out | 2 | {S1,S0} |
| `seg_step_o` | out | NSEG | segment *i* steps at the next clock (bit 0 equals `test_mode`) |
| `scan_pos_o` | out | ⌈log2(SCAN_LEN+1)⌉ | clock index within the scan cycle |

The shared types (`sel_e` for {S1,S0}, `hold_e`) and `trc_period()` are in
`trc_tpg_pkg`. The circuit under test and its scan chain are not part of this
RTL. Connect `scan_in_o` to the chain's scan input, and use `new_scan_cycle_o`
and `scan_pos_o` to time shift and capture.

## Interpretations and departures

* **Counter choice.** The generator is described with a twisted ring counter
  feeding the multiplexer, and its simulated build has the 6-bit,
  three-segment counter. That counter is the default. `NSEG = 1` gives a
  single ring.
* **Cascade.** The segment clocks are chained: the enable of segment 2 includes
  the enable of segment 1. Only this reading gives the stated 64 patterns.
* **Gated clocks** are replaced by synchronous enables, except for the latch
  enable, which is the AND with the clock by nature.
* **Tristate buffers** are modelled as latches, because a floating line that
  holds its charge is not synthesizable logic.
* **Multiplexer input 3** (both select lines high) is A0. This is the least
  certain connection.
* **Additions of this design:** the `test_mode` input, the asynchronous
  active-low reset to all zeros, the scan cycle timer and its default chain
  length of 8.
* **Not included:** the LFSR that the generator is compared against, the
  circuit under test, any response analyser, and power. Power can only be
  estimated on a netlist with a target technology. As a proxy, the
  testbenches count bit changes per clock.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M`.

* `multiseg_trc_tb` checks the 3×2-bit and 2×3-bit counters every clock
  against an index-based model of the Johnson states. It also checks periods
  of exactly 64 and 36 with all patterns distinct, at most NSEG bit changes
  per clock, the sequence start 0, 2, 3 and the run 11, 13, 12, holding with
  `test_mode` low, and asynchronous reset.
* `sel_hold_tb` covers both storage forms with random data changed in every
  clock phase. The latch must be transparent only while both clock and pulse
  are high. The flip-flop form must load only at an edge with the pulse.
* `mux4_tb` is exhaustive. `scan_cycle_timer_tb` checks the pulse spacing and
  position for chain lengths 8 and 3, including a pause.
* `trc_tpg_top_tb` is the end-to-end test at the default parameters. It runs
  three full counter periods, a pause, and a reset in mid-run, with
  `trc_tpg_scoreboard` checking every output on every clock. It then requires
  that each mechanism happened: both segment cascades, scan cycles, all four
  select values, a wrap-around after exactly 64 patterns, and a hold.
* `trc_tpg_variants_tb` runs the 36-pattern build and the flip-flop select
  form against the same scoreboard.

Run a testbench with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/trc_tpg_pkg.sv \
        tb/trc_tpg_top_tb.sv --top-module trc_tpg_top_tb
    ./obj_dir/Vtrc_tpg_top_tb

Each testbench finishes in well under a second. The RTL also lints cleanly
with `verilator --lint-only -Wall`. The only synthesis notes are the two
intended select-line latches.
