# Statistic timing monitor for firmware execution time

Tampered or malfunctioning firmware often still computes the right result.
What changes is how long it takes. This design watches the execution time
of a piece of firmware from the outside and decides at run time whether it
still behaves as specified.

The firmware is annotated: it writes an event code to a GPIO port before
and after the code of interest, for example `0x01` and `0x02`. The hardware
stamps every change of that port with a global cycle count. It measures the
time between matching events and collects the measurements of a window into
a histogram. It then compares that histogram with a specified one.

The monitor judges a distribution, not a single deadline. A specification
might read: "in every sliding window of 30 executions, a third take
5.02–5.32 ms, a third 5.32–5.72 ms and a third 5.72–6.02 ms". A result
consistently in the wrong bin is flagged even if every run meets a plain
deadline. A 2-of-3 majority over successive windows gives the final verdict.
The verdict drives an alarm and a log. A small checker also compares the
run-time verdicts with a sequence recorded in simulation.

```
 GPIO port        OBSERVER                                     MONITOR (STMo)
 (firmware) ──► sensor/comparator ─► [event filter] ─► timed-event ─► link ─► [event filter] ─► synchronizer
                 (change → event)    (FILT_OBS)        generator      │        (FILT_MON)        (window, sort)
                                                         ▲            │                              │
                                              global_timer (64 bit)   │ direct wires               ▼
                                                                      │ or UART (COMM_OB_MO)    measurement
                                                                                               (latencies → bins)
                                                                                                     │
                      sim_result_checker ◄── verdict_unit ◄── assessment ◄─────────────────────────┘
                      (run-time vs.          (2 of 3)         (|meas − spec| ≤ tol)
                       recorded verdicts)        │
                                                 ├──► alert_escalation (alarm, irq, fail count)
                                                 └──► event_logger (ring of per-window records)
```

`stmo_system` is the top module. It holds an `observer`, the
observer-monitor link, one `stmo_monitor` and the `sim_result_checker`.
Shared types and the default specification are in `stmo_pkg`.

## Turning a timing specification into parameters

The part most likely to confuse a new user is how a written specification
becomes the monitor's parameters. The hardware knows only clock cycles and
counts:

| Specification item | Parameter | Default | How it is derived |
|---|---|---|---|
| events of interest | `START_EV`, `STOP_EV` | `8'h01`, `8'h02` | codes written by the firmware |
| pattern | `PATTERN` | `PAT_REACTION` | reaction: stop − start; repetitive: time between successive starts |
| window type | `WIN_TYPE` | `WIN_SLIDING` | sliding: new verdict after every execution; jumping: after every full window |
| window length | `WINDOW` | 30 | executions per histogram |
| bins | `NUM_BINS`, `BIN_EDGES` | 3; 251000, 266000, 286000, 301000 | each edge = (nominal time + jitter offset) × clock frequency |
| share per bin | `SPEC_COUNTS` | 10, 10, 10 | share × `WINDOW` (33.33 % × 30 = 10) |
| tolerance | `TOLERANCE` | 0 | allowed deviation of every bin count, in executions (percent × `WINDOW`) |

The defaults describe firmware with a nominal execution time of 5.52 ms. Its
runs are spread symmetrically over [−0.5, −0.2], [−0.2, 0.2] and [0.2, 0.5] ms
around that time, at a 50 MHz clock. `BIN_EDGES` is a packed array with
`NUM_BINS+1` entries and entry 0 is the lowest edge. Bin *b* holds latencies
in [edge *b*, edge *b*+1). The last bin also holds its upper edge. So a bin
with two equal edges matches one exact latency, which is how a specification
like "100 % at exactly 54.65 ms" is written. A latency outside all bins is
counted in `out_of_range` and makes no bin larger. It can still fail the
window, because the bins then miss a measurement.

## Windows and the synchronizer

The link to the monitor may reorder or delay events. `event_synchronizer`
therefore never measures from arrival order.

- **Buffers.** Start and stop time-stamps go into two circular buffers of
  `WINDOW` entries. For a repetitive pattern, every event counts as a start.
- **Copying a window.** A window is complete when the start buffer is full
  and something new has arrived. In a sliding reaction window, every start
  must also have its stop. The synchronizer then copies the newest `WINDOW`
  entries of each buffer.
- **Sorting.** It sorts both copies with an odd-even transposition sort.
  This takes exactly `WINDOW` cycles, using `WINDOW/2` compare-exchange units
  per array. It then raises `is_sorted`.
- **Jumping window.** The buffers are emptied when a window is copied. Events
  that arrive while a full window waits for the measurement are refused and
  counted in `dropped`.
- **Sliding window.** The buffers keep rolling, so every new execution
  produces a new window.
- **Fast executions.** Evaluating a window takes about 2·`WINDOW` cycles.
  Executions that complete faster than that are still counted in later
  windows. Not every intermediate window gets its own outcome.

`measurement` walks the sorted arrays at one latency per cycle. It compares
each latency with all bin edges at once. The i-th sorted stop is paired with
the i-th sorted start. This is correct as long as executions do not overlap,
which is the case for annotated sequential firmware.

## Assessment, verdict and what follows it

- **Assessment.** `assessment` marks a window compliant (`outcome = 1`) when
  every bin satisfies |measured − specified| ≤ `TOLERANCE`. `bin_ok` shows the
  result per bin.
- **Verdict.** `verdict_unit` keeps the last three outcomes and sets `verdict`
  when at least two are positive. A single disturbed window is therefore
  tolerated. Before three outcomes exist, `verdict` stays 1 and
  `verdict_valid` stays 0.
- **Alarm.** `alert_escalation` raises a sticky `alarm` on the first negative
  verdict, with a one-cycle `irq`. It also counts negative verdicts in
  `fail_count`. Software clears the alarm with `alarm_clear`.
- **Log.** `event_logger` keeps the last `LOG_DEPTH` records, one per assessed
  window. Each record holds the time of the window's last event (64 bits), the
  window number (16 bits), the outcome and the verdict. `log_rd_idx = 0` reads
  the newest record.
- **Run-time equivalence check.** `sim_result_checker` compares the first
  `NUM_EXP` verdicts with `EXPECTED`, the verdicts a design-time simulation of
  the same firmware produced. Bit *k* holds the k-th verdict.
  `equiv_done & equiv_ok` means the hardware reproduced the simulation. If
  not, `equiv_first_bad` gives the first differing verdict.

## Observer-monitor link

With `COMM_OB_MO = 1` (the default) the observer and monitor are wired
directly. With `COMM_OB_MO = 3`, each timed event crosses a serial line as a
9-byte packet:

- **Packet.** The event byte comes first, then the 64-bit time-stamp, most
  significant byte first.
- **Framing.** Each byte is sent 8N1 at `BAUD`, derived from `CLK_FREQ`.
- **Buffering.** The transmitter buffers four events. It leaves 30 idle bit
  times after each packet.
- **Receiver.** It synchronises the line with two flip-flops and removes
  single-sample glitches with a 3-sample majority debouncer
  (`USE_DEBOUNCER`). It restarts packet assembly after 20 idle bit times.
- **Errors.** Bytes with a bad stop bit and events lost to a full buffer are
  counted in `link_errors`.
- **Effect on timing.** The time-stamps are taken in the observer, so the
  link delay does not change any latency.

## Timing

All times are in clock cycles.

| Path | Cycles |
|---|---|
| GPIO change → timed event at observer output | 2 (3 with `FILT_OBS`) |
| monitor filter (`FILT_MON`) | +1 |
| completing event sampled by the monitor → `outcome_valid` | 2·`WINDOW` + 4 (copy 1, sort `WINDOW`, measure `WINDOW`, assessment and hand-over 3) |
| `outcome_valid` → new `verdict` | 1 |
| serial packet (COMM_OB_MO = 3) | 90 bit times + 30 bit times pause |

The default configuration (window 30) gives a verdict about 70 cycles after
the stop event. A monitored execution of 5 ms is 250000 cycles at 50 MHz,
so the monitor is idle almost all of the time.

After coarse synthesis the default top has about 670 word-level cells, 4345
flip-flop bits and 5408 memory bits. The two sort arrays (2 × 30 × 64 bits)
and the buffers dominate.

In the default configuration 33 output bits are constant by design:

- `link_txd` and `link_errors`, because there is no serial link;
- `dropped`, because a sliding window never refuses an event.

## Top-level parameters and ports

Parameters of `stmo_system` besides the specification parameters above:

- `EVENT_W` (8) and `TIME_W` (64).
- `COMM_OB_MO` (1), `FILT_OBS` (0) and `FILT_MON` (1).
- `CLK_FREQ` (50 MHz) and `BAUD` (115200), used only by the serial link.
- `CNT_W` (16), the histogram counter width.
- `LOG_DEPTH` (16).
- `NUM_EXP` (8) and `EXPECTED` (all ones).

| Port group | Ports |
|---|---|
| inputs | `clk`, `rst_n` (synchronous, active low), `gpio_in[7:0]`, `alarm_clear`, `log_rd_idx` |
| verdict | `verdict`, `verdict_valid`, `outcome`, `outcome_valid`, `processing`, `alarm`, `irq`, `fail_count` |
| histogram | `bin_counts`, `bin_ok`, `out_of_range`, `n_meas`, `win_fill` (start events in the current window), `dropped` |
| log | `log_rd_data`, `log_count`, `log_total` |
| equivalence check | `equiv_done`, `equiv_ok`, `equiv_mismatches`, `equiv_compared`, `equiv_first_bad` |
| observer side | `obs_ev`, `obs_time`, `obs_valid`, `global_time`, `link_txd`, `link_errors` |

Every submodule can be used on its own. Its interface and cycle timing are in
its header comment.

## Simulating

The testbenches are self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/stmo_pkg.sv \
          tb/tb_stmo_system.sv --top-module tb_stmo_system -o sim
./obj_dir/sim
```

The same command works for any `tb/tb_<block>.sv`.

- **`tb_stmo_system`** runs the whole design end to end at reduced size, with
  four differently configured systems on one GPIO stream: direct wires, a
  serial link with the filter in the observer, a wrong recorded sequence, and
  a jumping window. It checks every outcome and verdict against a reference
  model. It also counts each mechanism and fails if one never happens:
  - sliding and jumping windows;
  - an outcome outvoted by the majority, and a negative verdict;
  - the alarm, the interrupt and alarm clear;
  - an out-of-range latency;
  - filtering in the observer and serial transfer;
  - equivalence pass and mismatch.
- **`tb_stmo_full`** runs `stmo_system` with every parameter at its default.
  It simulates 43 executions of about 5 ms at 50 MHz (12 M cycles, a few
  seconds). It checks ten positive windows and the passing equivalence
  check, then the negative verdict and alarm after the distribution changes.
- **`tb_stmo_workloads`** runs three specifications at their real window
  sizes and bin shares. Times given below one clock period are scaled to
  whole cycles.
  - A single-bin sliding window of 100 executions with an exact execution
    time.
  - A jumping window of 100 with six bins and 5 % tolerance.
  - A jumping window of 200 with eight bins and 1.5 % tolerance.

  Each runs an exact window, a window deviating by exactly the tolerance
  (still compliant) and one deviating by one execution more. The testbench
  checks every outcome and histogram.
- **Block testbenches.** The other testbenches test one block each with
  random stimulus, including cycle-exact latencies where the header gives one.

The testbenches reset everything they read and only sample after reset, so
they give the same result with any initial register contents.

## Departures from the reference design, and limits

- **Sort algorithm.** The reference synchronizer uses quick sort. Here an
  odd-even transposition sort gives the same order with fixed timing and no
  recursion.
- **Latency sign.** Reaction latency is stop − start, so latencies are
  positive. Bins use half-open intervals, and the last bin is closed.
- **Event width.** The event port is 8 bits wide, as in the reference
  configuration data. The reference text also mentions a 7-bit port. For
  7-bit codes, set `EVENT_W = 7`.
- **Specification units.** Tolerance and bin shares are given in executions,
  not percent. Bin edges are absolute cycle counts, not offsets from a
  nominal time. The conversion in the table above is done when the
  parameters are chosen.
- **Cold start.** The monitor waits for a full window before its first
  outcome. The "arbitrary cold-start" of the specification language, and
  properties that only shape the bins (offset, symmetric or asymmetric
  distribution), have no hardware of their own.
- **Alarm, log and serial link.** The reference names the alerting and
  logging stages without defining them; here they are a minimal version. The
  serial link's packet format, pause and debouncer are also this design's
  own.
- **One specification.** One `stmo_monitor` checks one specification. The
  reference generator can produce a monitor for two or more specifications
  at once. Here, that means instantiating more monitors side by side.
- **No I2C or CAN links.** The reference lists I2C and CAN as planned
  link protocols that were never built, so neither is built here.
- **Outside this design.** The processor, its GPIO peripheral and the FPGA
  board logic (processing system, logic analyser) are not part of the
  design. `gpio_in` is where the processor's GPIO output connects.
- **Other evaluated specifications** need parameter changes:
  - a single-bin window of 100 executions at 54.65 ms: `WINDOW = 100`,
    `NUM_BINS = 1`, `BIN_EDGES = {2732500, 2732500}`, `SPEC_COUNTS = 100`;
  - jumping windows of 100 with 6 bins;
  - jumping windows of 200 with 8 bins and 1.5 % tolerance.
