# HotSpot instruction cache front end

A small L0 instruction cache in front of the L1 cache saves energy, because the
small array has much less capacitance to drive. Used as a plain filter cache,
though, it misses often and slows the processor down. This front end only puts
the **hot basic blocks of the current program phase** into the L0 cache. It fetches
all other code from the L1 cache, through a one-line buffer. Hot blocks are found
at run time by the branch target buffer (BTB), which the fetch stage already has:
each BTB entry counts how often its taken branch runs. A branch that reaches a
threshold has the basic block at its target copied into the L0 cache. Promotion
stops once the L0 cache is full, so promoted blocks do not keep evicting each
other and the L0 miss rate stays low. A monitor counter then watches whether hot
branches still dominate. When they stop dominating, the program has moved to a
new phase and profiling starts again.

The RTL is synthesizable SystemVerilog. Its defaults are the published design
point of this scheme:

| | default |
|---|---|
| L0 cache | 512 B, direct-mapped, 32 B lines (16 lines) |
| L1 cache | 16 KB, direct-mapped, 32 B lines (512 lines), one-entry line buffer |
| BTB | 64 sets x 4 ways |
| candidate threshold | 64 executions |
| monitor counter | 8 bits, starts at 128 |

The processor core and the memory behind the L1 cache are outside this RTL. Their
signals are ports of the top module `hotspot_icache`.

## Fetch modes

A fetch-mode register decides where the instructions after the last taken branch
come from:

| mode | instruction comes from | side effect |
|---|---|---|
| L0 | L0 cache | an L0 miss switches to L1 mode |
| L1 | line buffer, else the L1 arrays | line buffer reloaded on an L1 read |
| promoting | line buffer, else the L1 arrays | the line is copied into the L0 cache |

The mode changes only on these events (`hs_mode_ctrl`), highest priority first:

1. A resolved branch was mispredicted → **L1**. A mispredicted branch is unlikely to be a frequent one.
2. A fetch in L0 mode missed → **L1**. The rest of that block probably misses too.
3. A fetched instruction hits in the BTB, that is, it is a known taken branch:
   * its hot-block flag is set → **L0**;
   * profiling, and this execution brings its counter to the threshold → **promoting**;
   * profiling, and its prev-hot flag is set → **L0** (its block is probably still in L0);
   * otherwise → **L1**.
4. The stage turns to monitoring while in promoting mode → **L1**.

A fetch that misses the BTB does not change the mode. It is sequential code, a
fall-through, or a taken branch the BTB does not know, and such a branch will be
resolved as mispredicted anyway. The new mode applies from the next fetch on. A
block's mode is therefore set by the branch that jumps into it.

The L0 cache never fills itself on a miss. Lines enter it only in promoting mode.
So a promoted line that a later promotion displaced stays out of L0 for the rest
of the phase. Its branch is still hot, so each entry into that block costs one L0
miss and the block then runs from L1. This is deliberate: it trades some energy
for a bounded miss rate.

## Finding hot blocks in the BTB

Each BTB entry (`hs_btb`) holds a valid bit, a tag, the target, an execution
counter and two flag bits. The two flags take turns as the **hot-block** flag and
the **prev-hot** flag. The bit `hot_sel` says which of them is hot-block now. At a
phase change the roles swap: `hot_sel` toggles, and the flags need not be copied.

* While profiling, each delivered fetch that hits an entry whose hot-block flag is
  0 increments that entry's counter. The 64th such hit sets the hot-block flag,
  clears the counter, and puts the front end into promoting mode. Nothing is
  counted while monitoring.
* A resolved taken branch that misses the BTB is allocated with a clear counter and
  clear flags. One that hits has its target refreshed. A hit is predicted taken.
  There is no separate direction predictor.
* The victim is chosen in this order: an invalid way; else a way with neither flag
  set, searched from a per-set round-robin pointer; else the round-robin way. A hot
  branch is therefore only evicted from a set that holds nothing else.

The counter is 6 bits wide, just enough to reach the threshold of 64. It is
derived from `THRESHOLD`.

## Profiling, monitoring and false phase changes

`hs_phase_ctrl` has two stages. After reset it is profiling.

**Profiling.** Every line delivered in promoting mode counts as one promoted
line. It is counted once per run of fetches in that line, whether or not it had
to be copied into L0. When 16 lines (the L0 capacity) have been promoted, the
front end enters monitoring. At that edge every prev-hot flag is cleared and the
monitor counter is reloaded with 128.

**Monitoring.** `hs_monitor_counter` counts each delivered fetch that hits the BTB:
down for a hot branch, up for a non-hot one. It saturates at both ends. Reaching
255 means non-hot branches have outnumbered hot ones by 127 since monitoring
began. At that edge profiling restarts: `hot_sel` toggles, so the old hot flags
become prev-hot flags and an empty bank becomes the hot-block bank. That bank is
empty because it was cleared when monitoring began. All execution counters and
the promoted-line count are cleared as well.

The prev-hot flags address a false phase change. Suppose a phase's hot code is
larger than the L0 cache. The promoted part may then cover less than half of the
branch executions, and the counter saturates while the program is still in the
same code. In the new profiling stage the blocks promoted last time still run
from L0, through their prev-hot flags. So the L0 cache is not idle while the
counters warm up again. Those blocks are promoted again when they reach the
threshold. Their lines are usually still in L0, so they count toward the fill
limit without being rewritten.

## Fetch port and timing

The core holds `if_req` and `if_pc` until `if_ready`. Hits are combinational, so
one instruction can be delivered per cycle. Along with the instruction come:

* `if_src`: L0, line buffer (`LB`) or L1;
* the BTB's prediction for that address (`if_pred_taken`, `if_pred_target`).

| case | cycles until `if_ready` |
|---|---|
| L0 hit, line-buffer hit, L1 hit | 0 (same cycle) |
| L0 miss | 1 (mode drops to L1, then served from the L1 side) |
| L1 miss | refill: `mem_req` rises the next cycle; the fetch hits the cycle after `mem_ack` |

In promoting mode the L0 tag is checked as well, so a line already in L0 is not
written again.

The core reports every executed branch on `rs_valid`, `rs_pc`, `rs_taken` and
`rs_target`. It sets `rs_mispredict` when the BTB's prediction was wrong. The
core redirects its own program counter; the front end only drops to L1 mode. The
refill port (`mem_req`, `mem_addr`, `mem_ack`, `mem_line`) moves whole 256-bit
lines: the request is held until a one-cycle acknowledge that carries the line.

Status outputs show what the mechanism is doing. `mode`, `stage`, `hot_sel`,
`mon_value` and `promoted_lines` give its state. The one-cycle strobes
`ev_l0_miss`, `ev_promote_line`, `ev_l0_write`, `ev_enter_monitor` and
`ev_enter_profile` mark events, for counting L0 utilisation and miss rate.

## Files

| file | contents |
|---|---|
| `rtl/hs_pkg.sv` | widths, `fetch_mode_e`, `stage_e`, `fetch_src_e`, `line_word()` |
| `rtl/hs_btb.sv` | BTB with execution counters, two flag banks, non-hot-first replacement |
| `rtl/hs_monitor_counter.sv` | 8-bit saturating up/down counter |
| `rtl/hs_phase_ctrl.sv` | profiling/monitoring stage machine, bank select, clears |
| `rtl/hs_mode_ctrl.sv` | fetch-mode register and its transition rules |
| `rtl/hs_l0_cache.sv` | L0 cache, written only by promotion |
| `rtl/hs_line_buffer.sv` | one-entry line buffer |
| `rtl/hs_l1_cache.sv` | L1 cache with refill handshake |
| `rtl/hotspot_icache.sv` | top: fetch datapath and wiring |
| `tb/<module>_tb.sv` | self-checking testbench of each module |
| `tb/hs_tb_pkg.sv`, `tb/hs_mem_model.sv` | memory contents as a function of the address; behavioural refill memory |

The L1 cache and the top carry SystemVerilog assertions: the refill request stays
up with a stable, line-aligned address until acknowledged; an L0 miss is always
followed by L1 mode; the fetch source agrees with the mode; nothing is written
into L0 while monitoring. Build with `--assert` to check them in simulation.

Every testbench ends with a line `TB_RESULT checks=N failures=M` and contains a
watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module hotspot_icache_tb \
    rtl/hs_pkg.sv tb/hs_tb_pkg.sv tb/hotspot_icache_tb.sv -Mdir obj -o sim
./obj/sim
```

Replace the top module and testbench file to run another one. For testbenches
that do not import `hs_tb_pkg`, drop `tb/hs_tb_pkg.sv`.

## What the testbenches show

Each module's testbench compares it with an independent model: random traffic
plus directed cases. Among the directed cases:

* promotion on exactly the 64th counted hit;
* monitoring on exactly the 16th promoted line;
* saturation on exactly the 127th consecutive non-hot branch;
* a hot BTB entry surviving allocations into its full set;
* an L1 miss answered with `mem_ack` four cycles after the request hitting six
  cycles after the read.

`hotspot_icache_tb` runs the top at its default parameters with a core model and a
three-phase synthetic program:

* a 10-block loop;
* a 28-block loop whose hot code is larger than L0 and which crowds a few BTB sets;
* the first loop again.

It checks every delivered instruction, the mode/source agreement, the exact
points of both stage changes and the monitor counter against a model. It also
requires each mechanism to occur at least once: L0, line-buffer and L1 fetches,
refills, promotions, L0 misses, mispredictions, both stage changes, L0 mode from a
prev-hot flag, BTB replacement in a full set, and promotion cut short by
monitoring. A run takes about 190,000 cycles. The second phase is built to stress
the mechanism rather than to be typical. Over the whole run, 20 % of the fetches
come from L0, with an L0 miss rate of 1.4 % of fetches.

`hotspot_phases_tb` also runs at the default parameters. Its program has three
phases, like a media encoder moving from kernel to kernel. Each phase is a loop of
eight two-line blocks in its own code region, exactly the size of the L0 cache.
Each phase change is detected: three monitoring stages and two returns to
profiling. Once a phase has been profiled, all its fetches come from L0, and
there are no L0 misses. Counting the warm-up of about 80 loop iterations per
phase, 76-84 % of the fetches come from L0.

The multimedia benchmarks the scheme was designed for are not simulated here.
That would need a processor model and compiled programs. The configuration above
matches the design point those results were reported for, and nothing in the
front end limits code size.

## Choices made in this RTL

The scheme fixes the mechanism: the counters and two flags per BTB entry,
promotion at the threshold, the fill limit, the monitor counter, the mode rules,
and the line buffer. The following are choices of this implementation:

* **Counter width.** The counter has 6 bits so that it can reach the threshold of
  64. The scheme's overhead estimate assumes a 5-bit counter.
* **Reaching the threshold on a prev-hot branch.** The front end promotes, so the
  block is re-promoted in the new phase. It does not simply stay in L0 mode.
* **What is counted.** Counting happens only while profiling, only for entries
  that are not hot, and the counter is cleared when the hot flag is set. All
  counters are cleared at each new profiling stage.
* **"L0 is full".** This means 16 promoted lines in the current profiling stage.
* **Monitor counter.** It counts only branches that hit in the BTB, and is
  reloaded with 128 each time monitoring starts.
* **Priority and reset.** Events are prioritised as listed above. Reset starts in
  L1 mode, in profiling, with flag bank 0 as the hot-block bank.
* **Fetch timing.** Hits are combinational, an L0 miss costs one cycle, and the
  refill handshake has the shape described above. The BTB has no direction
  predictor, and round-robin is the fall-back replacement.
* **Line granularity.** Promotion copies whole 32 B lines, and the line buffer
  serves any fetch in the buffered line.
* **Widths.** Instructions and addresses are 32 bits, as for an ARM-like core.

## Not included

* The processor core and the memory behind L1. Both are represented by ports and,
  in simulation, by testbench models.
* Energy and delay models. The event strobes give the counts that such a model
  would need.
