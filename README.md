# TiVaPRoMi: time-varying probabilistic row-hammer mitigation

If a DRAM row is activated very often, the charge in its two neighbouring
rows is disturbed and their bits can flip. About 139 K activations of the
aggressor rows are enough. A memory controller can stop this by sometimes
activating the neighbours of an activated row. The activation refreshes
their charge. PARA, the classic scheme, does this with a fixed probability
of about 0.001 on every act. That fixed probability costs many needless
extra activations.

This RTL instead makes the probability depend on **how long ago the row
could last have been attacked safely**. A row that was refreshed a moment
ago cannot have been hammered enough yet, so its probability is near zero.
A row that has gone almost a whole refresh window without a refresh gets the
full PARA-like probability. The time comes from the refresh schedule itself:
the interval in which a row is refreshed follows from its address, so no
per-row state is needed. A small per-bank **history table** records rows
that already received an extra activation, and when. For those rows the
weight then counts from that extra activation instead of from the refresh.
This keeps a hammered row from triggering again and again.

The block sits beside the memory controller. It watches the controller's
`act` and `ref` commands and, when it decides, asks the controller for an
`act_n`: an activation of both physical neighbours of a given row.

## The weight and the probability

All sizes below are the defaults: a DDR4 bank of 1 GB, a 64 ms refresh
window of RefInt = 8192 refresh intervals (7.8 us each), 2^17 rows per bank,
and RowsPI = 16 rows refreshed per interval.

* The current refresh interval `i` counts `ref` commands modulo RefInt.
* Row `r` is refreshed in interval `f_r = r / RowsPI`, which is simply the
  top 13 bits of the 17-bit row address. Neighbouring rows are assumed to be
  refreshed together.
* The **linear weight** is the number of intervals since that refresh:
  `w_r = (i - f_r) mod RefInt`, a value from 0 to 8191. On a history-table
  hit, the stored interval of the last extra activation replaces `f_r`.
* The **logarithmic weight** is `w_log = 2^ceil(log2(w_r + 1))`, the
  smallest power of two above `w_r`. For example, every `w` in 16..31 gives
  32. It is never below the linear weight and at most twice it (plus one),
  so it reacts sooner, most of all to rows whose weight is still small.
* The probability is `p_r = weight * Pbase` with Pbase = 2^-23. So
  `RefInt * Pbase` is about 9.8e-4, the PARA-like ceiling. A uniform 32-bit
  random number `u` triggers the extra activation when `u < weight << 9`.
  This comparison is exact, with no rounding.

Four variants differ only in the weight they use:

| `VARIANT`  | name      | weight used                                                                                      |
|------------|-----------|--------------------------------------------------------------------------------------------------|
| `VAR_LI`   | LiPRoMi   | `w_r` (linear). Slowest to react to flooding.                                                    |
| `VAR_LO`   | LoPRoMi   | `w_log` always. Robust, but more extra activations.                                              |
| `VAR_LOLI` | LoLiPRoMi | `w_r` if the row is in the history table, otherwise `w_log`. **Default.**                        |
| `VAR_CA`   | CaPRoMi   | Counts activations per interval. At each `ref`, `p = cnt_r * w_log * Pbase` for every counted row. |

LoLiPRoMi is the default because it needs the least storage and, in the published
results, still
resists flooding. CaPRoMi gives the fewest extra activations, at about three
times the storage.

## Structure

```
            act, ref, RA, BA (from the memory controller)
                 |
     +-----------+-------------------------------------------+
     | refresh_interval_counter  -> i, win_start             |
     |                                                       |
     |  BA selects one of BANKS engines (ref goes to all)    |
     |  +-------------------------------+                    |
     |  | tvp_engine  (Li / Lo / LoLi)  |  or  ca_engine     |
     |  |   history_table (32 x 30 b)   |      + counter_table (64)
     |  |   weight_calc, log_weight     |                    |
     |  |   prng, prob_decision         |                    |
     |  +---------------+---------------+                    |
     |                  | one held request per bank          |
     |            rh_arbiter (round-robin)                   |
     +------------------+------------------------------------+
                        | RA_RH, BA_RH, IRQ_RH  (held while wait)
                        v
            memory controller interrupt logic -> act_n
```

| file | role |
|------|------|
| `rtl/tvp_pkg.sv` | default sizes and the `variant_e` enum |
| `rtl/tivapromi.sv` | top: interval counter, one engine per bank, arbiter |
| `rtl/refresh_interval_counter.sv` | `i` = number of `ref` commands modulo RefInt, and the window-start pulse |
| `rtl/weight_calc.sv` | `f_r` and the linear weight of Eq. (1) (combinational) |
| `rtl/log_weight.sv` | `w_log` as a leading-one detector shifted up one place (combinational) |
| `rtl/prng.sv` | xorshift32 generator, one per bank with its own seed |
| `rtl/prob_decision.sv` | `rnd < mult * w << (32 - 23)` (combinational) |
| `rtl/history_table.sv` | FIFO table of (row, interval), searched one entry per cycle |
| `rtl/counter_table.sv` | CaPRoMi counters with history link and lock bit |
| `rtl/tvp_engine.sv` | per-bank FSM for LiPRoMi, LoPRoMi and LoLiPRoMi |
| `rtl/ca_engine.sv` | per-bank FSM for CaPRoMi |
| `rtl/rh_arbiter.sv` | merges the banks' requests onto RA_RH / BA_RH / IRQ_RH |

### Top-level interface (`tivapromi`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock (the DDR4 clock, 1.2 GHz) and asynchronous active-low reset |
| `act_i`, `ref_i` | in | 1 | one-cycle pulses for each `act` / `ref` command the controller issues |
| `ra_i`, `ba_i` | in | 17, 4 | row and bank of the `act` |
| `ra_rh_o`, `ba_rh_o`, `irq_rh_o` | out | 17, 4, 1 | extra-activation request for the neighbours of `ra_rh_o` |
| `wait_i` | in | 1 | controller cannot take a request now |
| `iv_o`, `win_start_o` | out | 13, 1 | current interval `i`; pulse when a new refresh window starts |
| `busy_o`, `trig_o`, `hit_o` | out | 16 each | per bank: engine busy; an extra activation was triggered; history hit |
| `act_drop_o` | out | 1 | an `act` reached an engine that was still busy (see timing) |

**Request handshake.** `irq_rh_o` is a level, not a pulse. The request on
`ra_rh_o`/`ba_rh_o` counts as taken in any cycle where `irq_rh_o = 1` and
`wait_i = 0`. While `wait_i` is high, the three outputs stay unchanged. Each
bank engine holds one further request of its own. An assertion in
`rh_arbiter` checks the hold rule.

## The engines and their cycle budget

The engine must be idle again before the next `act` to the same bank. At
1.2 GHz, tRC = 45 ns allows 54 cycles between acts to one bank, and
tRFC = 350 ns allows 420 cycles after a `ref`. All counts below include the
cycle that carries the command.

**tvp_engine** (LiPRoMi / LoPRoMi / LoLiPRoMi):

```
IDLE --act--> SEARCH (32 cycles, one history entry per cycle)
          --> WEIGHT (choose linear / log weight, register it)
          --> DECIDE (compare with the random number)
          --> UPDATE (on a trigger: update the row's history entry in place,
                      or insert it FIFO-style; raise the request) --> IDLE
IDLE --ref--> REF (clear the history table if interval 8191 just ended)
          --> REF_DONE --> IDLE
```

An act takes 37 cycles and a ref takes 3. These match the published figures
for LiPRoMi and LoPRoMi. LoLiPRoMi is quoted at 36 cycles for act; here it
also takes 37. If the engine's previous request is still waiting when a new
one triggers, the FSM stays in UPDATE until the request is taken.

**ca_engine** (CaPRoMi):

* **act (35 cycles).** The row is searched for in the history table (32
  cycles). It is then recorded in the counter table in one cycle, using a
  parallel match. A matching row's count is incremented and its history link
  refreshed. A new row goes into a free entry with count 1. If no entry is
  free, a random unlocked entry is replaced. An entry locks once its count
  reaches `LOCK_TH` and is never replaced after that. If every entry is
  locked, the act is not recorded.
* **ref (258 cycles).** Each of the 64 counter entries takes 4 cycles:
  1. the weight, measured from the linked history interval if that entry
     still holds the same row, otherwise from `f_r`;
  2. `w_log`;
  3. the decision on `cnt * w_log * Pbase`;
  4. on a trigger, a history-table update with the interval that just ended,
     and a *pending* mark on that history entry.

  The counter table is then cleared. 4 × 64 + 2 = 258 cycles, the published
  figure. The published act figure is 50 cycles; this implementation needs
  35.
* **Issuing.** During the following interval, pending history entries are
  sent as requests one at a time, lowest index first.

At a new refresh window, both engines clear the history table. In CaPRoMi
the clear happens before the decisions of the last interval are stored.

## Storage

* **History table.** 32 × (17 row + 13 interval) bits = 120 B per bank.
  Entry validity is a fill count, not a bit per entry.
* **Counter table.** 64 × (valid + 17 row + 8 count + lock + link flag +
  5-bit history index) = 264 B per bank. The published CaPRoMi total is
  374 B; this one is 384 B, because the field widths are this design's own.
* **Defaults in total.** With 16 banks, LoLiPRoMi synthesises to 15 360
  memory bits and about 2.6 K flip-flops.

## Parameters (top level)

| parameter | default | origin |
|-----------|---------|--------|
| `VARIANT` | `VAR_LOLI` | choice among the four variants |
| `BANKS` | 16 | DDR4 bank count (design choice) |
| `ROW_W` | 17 | 120 B / 32 entries = 30 bits per entry, minus 13 interval bits |
| `IV_W` | 13 | RefInt = 8192, from RefInt · 2^-23 = 9.8e-4 |
| `HIST_N` | 32 | history entries per bank |
| `CNT_N` | 64 | CaPRoMi counters per bank |
| `CNT_W` | 8 | at most 165 acts per interval in DDR4 (design choice) |
| `LOCK_TH` | 32 | CaPRoMi lock threshold (design choice; no value is published) |
| `PBASE_LOG2` | 23 | Pbase = 2^-23 |

`IV_W` must satisfy RefInt = 2^IV_W, and `f_r` is taken as the top `IV_W`
bits of the row, so RowsPI = 2^(ROW_W-IV_W).

## What follows the published technique and what is this design's own

Taken from the technique:
* equations (1) and (2);
* the three probability formulas;
* the four variants;
* the FIFO history table of 32 entries, searched sequentially and cleared
  each window;
* the CaPRoMi counter table of 64 entries with a lock bit and random
  replacement;
* per-bank tables selected by BA;
* the RA_RH / BA_RH / IRQ_RH / wait interface;
* the 37 / 3 / 258-cycle loops.

Choices made here, where the technique leaves things open:
* the FSM state sequences (only their names and cycle totals are published);
* the xorshift32 random source;
* the exact integer comparison for the probability;
* update-in-place on a repeated trigger, instead of a second history entry;
* the fill-count validity of the history table;
* the parallel counter-table match;
* the lock threshold of 32;
* the rule for a full, all-locked counter table (the act is not recorded);
* the pending-bit issue order;
* round-robin arbitration between banks;
* the level-style IRQ with hold under `wait`;
* the reset value `i = 0`;
* the 16-bank count.

Not built:
* the memory controller and its interrupt logic that turns IRQ_RH into
  `act_n`;
* the DRAM;
* refresh orders other than "neighbouring rows together" (for example random
  or remapped refresh), because no mapping for them is defined;
* the more parallel variants needed for a 320 MHz DDR3 controller, where an
  act leaves only about 14 cycles.

**Worst-case flooding.** The weight depends only on the refresh schedule.
So an attacker who floods a row just after its refresh meets a weight that
starts at zero and grows by one per interval. In simulation, the three
single-weight variants then needed about 52 K activations, uncomfortably
close to the 69 K bound. The logarithmic weight helps little here: it is at
most twice the linear one. CaPRoMi, whose probability also scales with the
number of activations in the interval, needed about 22 K.

**Pending requests in CaPRoMi.** A pending extra activation lives in its
history entry. If more than `HIST_N` rows trigger at one `ref`, FIFO
insertion can overwrite a pending entry before it is issued.

**Timing limits.** An `act` that arrives while its bank's engine is busy is
not processed; `act_drop_o` flags it, and an assertion warns. DDR4 timing
rules this out, since 37 < 54. A `ref` that arrives while an engine is busy
is held and served next.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints one
`TB_RESULT checks=N failures=M` line and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `refresh_interval_counter_tb` | `i` after every ref; one window pulse per wrap (RefInt reduced to 16) |
| `weight_calc_tb` | Eq. (1), both cases, random rows and intervals at full size |
| `log_weight_tb` | Eq. (2) for every `w` in 0..8191 |
| `prng_tb` | against a software xorshift32; bit balance |
| `prob_decision_tb` | exact decision against 64-bit arithmetic; trigger rate vs. `p` within 4 σ |
| `history_table_tb` | FIFO model: search latency of exactly N cycles, first hit, wrap, update, clear, read port |
| `counter_table_tb` | model of match, insert, random replacement, locking, all-locked drop, saturation |
| `tvp_engine_tb` | All three variants at once, with Pbase = 1. A trigger then happens exactly when the weight is non-zero, so every hit and request is predicted. Also checks 37/3-cycle loops (scaled to N+5), stalls on a held request, and window clears. |
| `ca_engine_tb` | Model of counts, links and history. Every entry with `p ≥ 1` must trigger, and the other triggers must match their probabilities within 4 σ. Also checks the 35/258-cycle loops (scaled), replacement, locking, and all-locked drop. |
| `rh_arbiter_tb` | delivery exactly once and in order; hold under `wait`; round-robin order |
| `tivapromi_tb` | End to end, LoLiPRoMi and CaPRoMi side by side (4 banks, reduced sizes), DDR4-like command timing with a flooding attack. Checks that the attacked row is singled out, that every IRQ names an activated row, that no act is dropped, and that every mechanism occurs. |
| `tivapromi_full_tb` | Default parameters. Flooding one row: the first extra activation came after 6 495 activations, far below the 69 K limit. Then runs to the end of the 8192-interval window and checks the history table is cleared. |
| `tivapromi_flood_tb` | All four variants at default sizes, flooding one row with about 165 acts per interval. Rows refreshed long ago (8 rows, mean activations before the first extra activation, one run): LiPRoMi 4 191, LoPRoMi 2 854, LoLiPRoMi 2 854, CaPRoMi 5 445. Each must stay under 69 K. A row refreshed in the current interval is the worst case, because its weight starts at 0: the three single-weight variants needed 52 337 activations and CaPRoMi 21 780 (reported, not checked). The instances share random streams, so their counts are correlated. |
| `tivapromi_attack_tb` | Default parameters, 1 → 20 aggressors in one bank with benign traffic elsewhere (320 K acts). No aggressor reached 69 K activations without mitigation. In one run, mitigation took 1 341 activations on average and 4 190 at most; about 0.06 % of benign acts caused an extra activation. |

The results quoted above come from one run each. Random seeds differ between
simulators, so exact counts vary from run to run.

To simulate with Verilator, for example the full-size test:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/tvp_pkg.sv \
          tb/tivapromi_full_tb.sv --top-module tivapromi_full_tb -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace the testbench name to run any other test. Most finish in seconds;
`tivapromi_flood_tb` takes about a minute. To change the variant or the sizes, override the parameters of
`tivapromi`.
