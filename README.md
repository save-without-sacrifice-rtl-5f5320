# Adaptive power-down manager for DDR4 memory channels

A server memory channel often carries eight DDR4 ranks, but only one of them
can move data at any moment. The others burn standby power for nothing, and
with eight ranks that static power is more than half of the DRAM power. DDR4
offers precharge power-down: the controller pulls a rank's CKE pin low and the
rank shuts its input buffers and gates its peripheral logic, drawing roughly
40% less than in precharge standby. The catch is latency. A rank must stay
down at least tCKE (5 ns at DDR4-2400), and after CKE rises it takes no
command for tXP (6 ns). A rank that powers down just before the next request
arrives makes that request wait.

The usual compromise is an idle time-out per rank: power the rank down only
after it has seen no command for `lambda` cycles, and never while the
controller holds a request for it. Choosing one `lambda` for every workload
does not work: too short and busy ranks bounce in and out of power-down; too
long and idle ranks waste standby power.

This design makes `lambda` adaptive, per rank, from a single statistic: how
many times the rank had to wake up during the last epoch (20 us by default).

* **Many exits** (more than `THETA_HI` = 5): the rank powers down too eagerly.
  Requests keep arriving shortly after it drops CKE. `lambda` grows by `DELTA`
  (10 ns).
* **Very few exits** (fewer than `THETA_LO` = 2): the rank is either busy all
  the time or idle all the time. In both cases it seldom changes state, so a
  shorter time-out costs nothing and saves power in the idle case. `lambda`
  shrinks by `DELTA`.
* **Otherwise** `lambda` stays where it is. The gap between the two thresholds
  keeps `lambda` from oscillating.

`lambda` is clamped to [30 ns, 2 us] so that it can return quickly when the
access pattern changes. The hardware cost over a fixed time-out is one exit
counter per rank and one epoch timer per channel.

The scheme comes from a study of DDR4 energy efficiency. That study reports a
4.0% better system energy-delay product than the fixed-time-out and
precharge-only power-down policies on memory-intensive SPEC CPU2006 mixes,
with 8 TSV-RDIMM ranks per channel. Those figures come from its simulations,
not from this RTL.

## Block structure

```
                       adpd_pd_manager (one per channel)
  epoch_tick  <------  pd_epoch_timer ---------------------------+
                                                                 |
  per rank r:                                                    v
  cmd_issued[r] --+--> pd_idle_timer --expired--> pd_rank_fsm --pd_exit--> adpd_lambda_ctrl
  pd_exit[r] -----+         ^                     ^    |  |                     |
                            |        req_pending[r]    |  +--> cke[r], rank_ready[r], pd_state[r]
                            |        pd_allowed[r] ----+
                            +--------------------- lambda[r] <----------------+
```

| File | Role |
|---|---|
| `rtl/adpd_pkg.sv` | `pd_state_t` and the default constants |
| `rtl/pd_idle_timer.sv` | cycles since the last command or exit; `expired` once they reach `lambda` |
| `rtl/pd_rank_fsm.sv` | CKE state machine: standby, power-down, exiting; enforces tCKE and tXP |
| `rtl/adpd_lambda_ctrl.sv` | exit counter (epsilon) and the `lambda` update rule |
| `rtl/pd_epoch_timer.sv` | one tick per epoch for the whole channel |
| `rtl/adpd_pd_manager.sv` | top level: one epoch timer, and one of each per-rank block for each of `NRANKS` ranks |

## The adaptive time-out (adpd_lambda_ctrl)

Each rank's `eps` register counts `pd_exit` pulses and saturates at 255. In
the cycle where `epoch_tick` is high, the controller computes the next
`lambda` from the `eps` that has built up over the epoch:

```
eps >  THETA_HI : lambda' = min(lambda + DELTA, LAMBDA_MAX)
eps <  THETA_LO : lambda' = max(lambda - DELTA, LAMBDA_MIN)
otherwise       : lambda' = lambda
```

The new value is visible one cycle later. In that same tick cycle `eps`
restarts at 0, or at 1 if an exit happens in the tick cycle itself. A count
exactly equal to a threshold leaves `lambda` unchanged. After reset `lambda`
is `LAMBDA_INIT`, which defaults to `LAMBDA_MIN`.

All ranks share one epoch, so every rank updates its time-out in the same
cycle. `lambda` changes by at most one `DELTA` per epoch. Going from 30 ns to
2 us therefore takes 197 epochs (about 4 ms), and that is the time constant
of the adaptation.

The rule does not always settle on one value. Strictly periodic traffic
shows this: one request every 200 cycles, with `lambda` rising from 36
cycles. Once `lambda` reaches 192, the next epoch is still full of hasty
exits (about 60 per rank) and `lambda` steps up to 204. At 204 the rank never
powers down, so there are no exits and it steps back to 192. `lambda`
therefore dithers by one `DELTA` around the request gap. Every other epoch
has no wake-ups, and the wasted exits drop by half compared with a fixed
short time-out. The dead band between the thresholds damps patterns whose
exit count changes gradually with `lambda`. It cannot damp this one, where
the count jumps from zero to dozens.

## Power-down timing (pd_idle_timer, pd_rank_fsm)

| state | CKE | rank_ready | meaning |
|---|---|---|---|
| `PD_STANDBY` | 1 | 1 | precharge standby; the scheduler may issue |
| `PD_DOWN` | 0 | 0 | precharge power-down |
| `PD_EXITING` | 1 | 0 | CKE back high, waiting tXP |

Cycle by cycle, with `t` the cycle of the last command to the rank (or of its
last exit):

* The idle count is 0 in cycle `t+1`, and `expired` is first high in cycle
  `t+1+lambda`.
* If `expired`, `!req_pending` and `pd_allowed` all hold in cycle `e-1`, CKE
  is low from cycle `e` and `pd_enter` pulses in cycle `e`.
* CKE stays low for at least `TCKE` cycles. A request that is already waiting
  raises CKE in cycle `e+TCKE`. A request that first appears in a cycle
  `p >= e+TCKE-1` raises CKE in cycle `p+1`. `pd_exit` pulses in the first
  CKE-high cycle, `x`.
* `rank_ready` returns in cycle `x+TXP`.
* The idle timer restarts at `x`. CKE therefore stays high for at least
  `lambda+2` cycles before the next entry. DDR4's minimum CKE-high time is met
  as long as `LAMBDA_MIN >= TCKE`.

All outputs of the FSM come from registers. `rank_ready` depends only on the
state, so a scheduler may use it combinationally in the same cycle.

## Interface to the memory controller

The manager sits beside the controller's scheduler. It needs three per-rank
inputs each cycle:

* `cmd_issued[r]`: any command went to rank `r`.
* `req_pending[r]`: the request queue holds anything for rank `r`, refresh
  included.
* `pd_allowed[r]`: the rank may enter precharge power-down now. The
  controller should raise it only when all banks are precharged and no
  command timing is still running.

In return the scheduler must not issue to a rank whose `rank_ready` is low.
An assertion in `adpd_pd_manager` reports a violation. `cke[r]` goes to the
command/address PHY. `pd_state`, `lambda`, `eps`, `pd_enter`, `pd_exit` and
`epoch_tick` are there for power accounting and debug.

## Parameters

Times are in controller clock cycles. The defaults assume DDR4-2400 with the
command clock at tCK = 0.833 ns. Each default is the published time divided
by tCK and rounded up.

| parameter | default | from |
|---|---|---|
| `NRANKS` | 8 | eight ranks per channel, the configuration the scheme targets |
| `EPOCH_CYCLES` | 24000 | 20 us |
| `LAMBDA_MIN` | 36 | 30 ns |
| `LAMBDA_MAX` | 2400 | 2 us |
| `DELTA` | 12 | 10 ns |
| `THETA_LO` / `THETA_HI` | 2 / 5 | exit counts |
| `TCKE` | 6 | tCKE = 5 ns |
| `TXP` | 8 | tXP = 6 ns (7.2 cycles, rounded up) |
| `LAMBDA_INIT` | `LAMBDA_MIN` | own choice |
| `LAMBDA_W` | 12 | own choice; must hold `LAMBDA_MAX` |
| `EPS_W` | 8 | own choice; only compared with the thresholds |

For another speed grade, convert the same times at that tCK.

## Choices made in this design

These are not part of the published scheme:

* Expiry is "idle count >= lambda". The rank may therefore drop CKE
  `lambda+2` cycles after its last command.
* The idle count also restarts on a power-down exit, and it saturates rather
  than wrapping.
* Exit from power-down is triggered by `req_pending`. Refresh has to be
  signalled as a pending request.
* The `pd_allowed` qualifier is added. Only precharge power-down is used,
  never active power-down.
* Reset values: `lambda = LAMBDA_MIN`, `eps = 0`, every rank in standby. The
  first epoch tick comes `EPOCH_CYCLES` cycles after reset.
* Threshold equality and the inclusive bounds follow the rule as stated
  above.

## Not included

* **The controller.** The request queue, the scheduler (PAR-BS in the
  evaluated system) and the page policy are outside this design. So are the
  DRAM ranks and the processor.
* **Other DDR4 power features.** The study weighed these against adaptive
  power-down and found them less effective, so none is implemented: command
  address latency (CAL) mode, data bus inversion, precharge-only power-down
  and a fixed time-out. A fixed time-out can be approximated by setting
  `DELTA = 0`.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_pd_idle_timer` checks expiry against a reference count under random
  restarts and `lambda` values. It also checks the exact expiry latency and
  saturation.
* `tb_pd_rank_fsm` checks CKE low for exactly `TCKE` cycles with a waiting
  request, the exit one cycle after a late request, `rank_ready` exactly
  `TXP` cycles after the rise, and entry refused when a request is pending or
  entry is vetoed. It then runs 50,000 random cycles against a model.
* `tb_adpd_lambda_ctrl` drives epochs with 0, 1, 2, 3, 5, 6 and 10 exits, runs
  into both clamps, checks the exit in the tick cycle and epsilon
  saturation, and finishes with 3,000 random epochs.
* `tb_pd_epoch_timer` checks the tick period at 24000 and at 7 cycles, and
  restart after reset.
* `tb_adpd_phase_change` runs the manager at its defaults through three
  phases: 200-cycle gaps, then silence, then back-to-back traffic. It checks
  that `lambda` climbs to the gap and dithers around it, then falls back to
  `LAMBDA_MIN` with over 95% of the idle phase in power-down, and that busy
  ranks never power down.
* `tb_adpd_pd_manager` and `tb_adpd_pd_manager_full` run the whole channel.
  A small controller model serves eight ranks with different traffic: busy,
  periodic, idle, sparse, vetoed, random, and one rank that gets a request
  right after every power-down entry. The checks use the test's own model of
  idle counts, exit counts and `lambda`. Every cycle they check each rank's
  CKE edges, the tXP window, the epoch ticks and the `lambda` choices. Each
  mechanism is counted, and a failure is counted for any mechanism that
  never happens:
  * entry and exit
  * tCKE hold
  * entry blocked by a pending request
  * entry blocked by `pd_allowed`
  * `lambda` up, down and unchanged
  * clamps at both bounds

  The first run uses a 2000-cycle epoch and `LAMBDA_MAX = 240` over 40
  epochs, and takes about a second. The second runs every parameter at its
  default for 210 epochs (5 million cycles, about a minute). In that run
  `lambda` climbs from 30 ns to 2 us on the ranks that wake up too often.

Simulate with Verilator 5, from the repository root, for example:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/adpd_pkg.sv \
          tb/tb_adpd_pd_manager.sv --top-module tb_adpd_pd_manager
./obj_dir/Vtb_adpd_pd_manager
```

Swap in any other testbench name. The package must come first on the command
line.
