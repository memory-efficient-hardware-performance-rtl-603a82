# Approximate hardware performance counters (Morris counters)

A processor can count only as many events at once as it has performance
counters, and each counter costs 64 flip-flops. This unit counts events
*approximately*. Each counter needs 30 bits instead of 64 and still covers the
same range. So for the same storage, about twice as many events can be
monitored in one run.

The idea is Morris' approximate counting. A small counter holds an exponent
X. When an event arrives, the counter steps X to X+1 only with probability
1/2^X. Its value stands for about 2^X events. One such counter is very noisy,
so five of them count the same event side by side, and a read returns the
average of their five estimates. A *Morris group counter* is therefore 5 x
6 bits = 30 bits.

The RTL follows the architecture described in "Memory-Efficient Hardware
Performance Counters with Approximate-Counting Algorithms". That design adds
such counters to a RISC-V in-order core. The design fixes these numbers:

- 6-bit Morris counters;
- 5 counters per group;
- 29 counters, each with its own event selector register;
- a Fibonacci LFSR followed by an OR-reduction to generate the 1/2^X decision;
- a separate random source for each member of a group.

The rest is this implementation's own choice and is listed under
[Choices and departures](#choices-and-departures). That covers the register
access, the seeds, the LFSR polynomial, the event encoding, saturation, clear
and timing.

## Block structure

```
events_i[11:0] ──► event_selector ×29 ──inc()──► morris_group_counter ×29 ──► query mux ──► rd_est_o / rd_x_o
                   (mask register)                 └─ morris_counter ×5
                                                        └─ prob_gate  (X, random word → accept)
random_prob_gen: fib_lfsr ×5 ("Seed 1".."Seed 5") ── word k ──► member k of every group
```

| module | role |
|---|---|
| `ahpc_pkg` | shared sizes, the event enumeration `event_e`, the LFSR taps and the seed function |
| `approx_hpm` | top level: 29 selectors, 29 group counters, one random generator, the register-access ports |
| `event_selector` | one event selector register; raises `inc()` when a selected event fires |
| `morris_group_counter` | five Morris counters sharing one `inc()`; `query()` = average of 2^X |
| `morris_counter` | one 6-bit exponent X; steps when its probability gate says so |
| `prob_gate` | takes X and a random word, and outputs 1 with probability 1/2^X |
| `random_prob_gen` | five independently seeded LFSRs |
| `fib_lfsr` | Fibonacci LFSR that advances a whole word per clock |

## The probabilistic increment

The decision "step with probability 1/2^X" costs almost no logic. Take X
random bits. All X bits are zero with probability exactly 1/2^X. `prob_gate`
masks the random word down to its low X bits and OR-reduces them. The counter
steps when the result is 0. For X = 0 nothing is masked in and every event is
accepted. So the first event always moves every member from 0 to 1. The
testbenches use this deterministic step.

Where the random bits come from matters more than it seems. A plain LFSR that
shifts one bit per clock delivers words that overlap in all but one bit with
the previous word. Suppose a counter at X = 20 has just accepted, so its low 20
bits were all zero. On the next clock, 19 of those bits are still zero, and the
chance of accepting again is 1/2 instead of 2^-20. Bursts of back-to-back events
would then be grossly overcounted.

`fib_lfsr` avoids this. It unrolls `STEPS` = 64 shift steps in one clock, so each
clock delivers 64 bits that the previous word did not contain. Advancing a
maximal-length LFSR by k steps per clock keeps it a maximal-length sequence of
the same period, 2^64 - 1. The feedback polynomial is x^64 + x^63 + x^61 +
x^60 + 1. The cost is a 64-deep XOR unrolling per source. Only five sources
exist in the whole unit, so this is cheap.

### Sharing of the random sources

There are five sources, "Seed 1" to "Seed 5". Source k drives member k of
*every* group:

- Inside one group, no two members share a source. This independence is what
  lets averaging reduce the variance.
- Two different groups do see the same word in the same clock. When both
  groups receive an event in that clock, their member k decisions are
  correlated. Each group's estimate keeps its own statistics; only the errors of
  different counters become correlated.

If that matters for a use, give each group its own five sources. Change
`random_prob_gen` to `NC*GS` sources and index them by group in `approx_hpm`.
That costs 64 flip-flops per source.

Seed k is `0x9E3779B97F4A7C15 * (k+1)` (`ahpc_pkg::lfsr_seed`). It is loaded at
reset. The sources then run freely on every clock, whether or not events
arrive. Clearing a counter does not reseed anything. Successive measurements
therefore see fresh random numbers.

## Reading a counter: the estimate

`query()` returns

    est = floor( (2^X1 + 2^X2 + 2^X3 + 2^X4 + 2^X5) / 5 )

This is computed combinationally in every group counter. The sum is 67 bits
wide and is divided by the constant 5. The top registers the selected group's
result.

Properties to keep in mind:

- **Offset of one.** E[2^X] = n + 1 after n events. A counter that has seen
  nothing reads 1, and the estimate runs one above the true count on average.
  The design returns 2^X as Morris' estimator is usually stated. Subtract 1 in
  software if the offset matters.
- **Spread.** One base-2 Morris counter has a relative standard deviation of
  about 1/sqrt(2) for large n. Averaging five gives about 0.32. Chebyshev's
  bound for one counter is P(|est - n| > eps*n) < 1/(2 eps^2). For the group it
  is a fifth of that.
- **Granularity.** Each member's estimate is a power of two, so small counts
  come out coarse.
- **Range.** X saturates at 63. A member therefore tops out at 2^63 and the
  group estimate at 2^63. The 6-bit register can hold 63 and no more.

The raw member states are also brought out on `rd_x_o`. Software can then do
its own estimation, for example the unbiased 2^X - 1, or a median.

## Event selection

Each of the 29 counters has a 12-bit selector register, one bit per event:

| bit | event | bit | event | bit | event |
|---|---|---|---|---|---|
| 0 | exception | 4 | arithmetic | 8 | branch mispredict |
| 1 | load | 5 | branch | 9 | I-cache miss |
| 2 | store | 6 | jal | 10 | D-cache miss |
| 3 | system | 7 | jalr | 11 | D-cache release |

The counter issues one `inc()` in any clock where at least one selected event
is active. Selecting several events therefore counts the clocks in which any of
them fired, not their sum. Reset selects nothing.

## Top-level interface and timing (`approx_hpm`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (clears everything, loads seeds) |
| `events_i` | in | 12 | event pulses from the core, one clock per occurrence |
| `sel_we_i`, `sel_addr_i`, `sel_wdata_i` | in | 1, 5, 12 | write selector register `sel_addr_i` |
| `clr_we_i`, `clr_addr_i` | in | 1, 5 | clear all five members of counter `clr_addr_i` |
| `query_i`, `query_addr_i` | in | 1, 5 | query counter `query_addr_i` |
| `rd_valid_o`, `rd_est_o`, `rd_x_o` | out | 1, 64, 5x6 | result, one clock after `query_i` |

Timing of each operation:

- **Events.** An event present during clock t is counted or rejected at the
  edge that ends clock t. At most one increment per counter per clock.
- **Writes and clears.** A write or clear takes effect at the next edge. A
  clear wins over an event arriving in the same clock.
- **Queries.** A query presented in clock t reads the state from before that
  edge. The answer is valid during clock t+1.
- **Pipelining.** A new query may be issued every clock.
- **Addresses.** Addresses 29 to 31 are ignored on writes and read as zero.

The ports replace the CSR access of the host core, which is not part of this
unit. To attach the unit to a core, drive `events_i` from the pipeline's event
signals and map the three access ports onto the core's counter and
event-selector CSRs.

Size, after coarse synthesis at the default parameters: 1633 flip-flops.

| part | flip-flops |
|---|---|
| 29 x 30 counter bits | 870 |
| 29 x 12 selector bits | 348 |
| 5 x 64 LFSR bits | 320 |
| read register | 95 |

## Accuracy

`tb_workloads` repeats the evaluation setup of the original design with
synthetic event streams: two benchmark-like event mixes, *spmv* and *vvadd*,
each run 50 times over the twelve events. Each event fires independently with a
fixed per-clock probability; these are not processor traces. Over 8000 clocks
per run, the results are:

| mix | mean relative error | results off by more than 75% |
|---|---|---|
| spmv | 0.25 | 15 of 600 |
| vvadd | 0.26 | 23 of 600 |

In both mixes the per-event minimum errors are within about 2%, and the maxima range
from about 0.5 to 2.0. The maxima come from the power-of-two granularity: one
member that jumped one step too far doubles its share of the average. These
figures agree with those reported for the original design: average errors
between 10% and 30%, minima within 5%, and occasional maxima above 100%.

## Choices and departures

These points are not fixed by the source design; this RTL chooses them:

- **Estimator.** Average of the members' estimates 2^X, not 2 to the power of
  the average X. It is rounded down, and it carries the +1 offset described
  above.
- **Saturation.** X stops at 63, so the range is 2^63 rather than 2^64.
- **Clear port.** A clear per counter exists, and clear wins over a
  simultaneous event.
- **Random sources.**
  - LFSR width 64, advanced 64 steps per clock.
  - Polynomial x^64+x^63+x^61+x^60+1.
  - Seeds as given above.
  - Sources shared across groups, as in the block diagram of the original
    design.
- **Event selection.** Encoding as a bit mask, and the OR of selected events
  into one increment per clock.
- **Register access.** The access ports and their one-clock read latency.
- **Reset.** Synchronous and active-low.

Not included:

- the processor core that produces the events;
- the core's CSR decoding;
- the deterministic 64-bit counters the approximate ones are compared with.

## Simulating

Each testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ahpc_pkg.sv tb/tb_approx_hpm.sv \
          --top-module tb_approx_hpm -Mdir obj_top
./obj_top/Vtb_approx_hpm
```

Replace `tb_approx_hpm` with any testbench below:

| testbench | what it checks |
|---|---|
| `tb_fib_lfsr` | clock-by-clock against a bit-serial model, for several widths and step counts; full period of an 8-bit instance |
| `tb_prob_gate` | every X against a reference; hit rate close to 1/2^X |
| `tb_morris_counter` | random requests and words against a model; clear; saturation at 63 |
| `tb_morris_group_counter` | all five members and the averaged estimate against a model; largest estimate |
| `tb_random_prob_gen` | five sources against their seeds and the LFSR model; sources differ |
| `tb_event_selector` | register and increment request against a model |
| `tb_approx_hpm` | the whole unit at default size against a cycle-accurate model of all 145 counters and 5 sources; counts that every mechanism occurs (selector write, accepted and rejected increments, multi-event sets, clear, query, out-of-range query) |
| `tb_workloads` | the accuracy experiment above |

All of them run in well under a second.

To change the configuration, edit the parameters in `ahpc_pkg` (counter
width, group size, number of counters) or override them on `approx_hpm`:

- `XW` must satisfy 2^XW - 1 < `EW`.
- `RW` must be at least 2^XW - 1, so that every X can be masked.
- `GS` also sets the number of random sources.
