# Predictor-based power saving for a DDR3 DRAM

A DRAM draws a lot of current even when nothing accesses it. DDR3 offers two ways to
cut that idle current:

| mode                  | current (1 Gb DDR3-800) | power-up latency |
|-----------------------|-------------------------|------------------|
| precharged idle       | 50 mA (I_DD2N)          | –                |
| precharge power-down  | 12 mA (I_DD2P0)         | 10 cycles        |
| self-refresh          | 6 mA (I_DD6)            | 512 cycles       |

Self-refresh saves the most power, but waking the device from it takes 512 cycles. If
that happens only once a request has arrived, the request pays the whole latency.

This unit sits beside the arbiter bus in a memory controller's front end. It learns the
pattern of the bus's idle periods and forecasts how long the current one will last. It
then puts the DRAM into self-refresh only when that pays off, and wakes it *before* the
forecast end so that the next request finds it ready. Idle cycles that self-refresh
does not cover go to power-down, which costs only 10 cycles to leave. The policy is
called PSRS: prediction for self-refresh with speculative power-down.

```
 bus_idle ─► idle_monitor ─► level_encoder ─► history_buffer ─► pattern_predictor ─► level_decoder
                  │                ▲               (HL levels,          │                 │
                  │                │ temp entry     newest PL =         │ start           │ forecast length
                  │                │                reference)          │                 ▼
                  └──────────────► power_saving_policy ◄────────────────┴──────── sr_req / pd_req / mem_ready
```

All RTL is in `rtl/` and one self-checking testbench per module is in `tb/`. The top
module is `dram_power_predictor`.

## Idle lengths as levels

The lengths of idle periods range over several orders of magnitude, so the predictor
does not work on cycle counts. Each length is first encoded into one of `NLEV = 7`
*levels*. The levels are built around the **self-refresh threshold** SRT. SRT is the
shortest idle period for which self-refresh, with its power-up included, uses less
energy than power-down. Equate the energy of the two modes over an idle period of SRT
cycles:

    I_DD6·(SRT − X_SDLL) + I_DD2N·X_SDLL = I_DD2P0·(SRT − X_PDLL) + I_DD2N·X_PDLL
    SRT = (X_SDLL·(I_DD2N − I_DD6) − X_PDLL·(I_DD2N − I_DD2P0)) / (I_DD2P0 − I_DD6)

With the currents above this gives 3691.3, and the design uses `SRT = 3691`.
`psp_pkg::srt_from_currents` evaluates the formula for other devices.

| level | idle length (cycles) | lower bound = decoded forecast |
|-------|----------------------|--------------------------------|
| 1     | 0 – 3690             | 0 (self-refresh never pays)    |
| 2     | 3691 – 7381          | 3691                           |
| 3     | 7382 – 14762         | 7382                           |
| 4     | 14763 – 29524        | 14763                          |
| 5     | 29525 – 59048        | 29525                          |
| 6     | 59049 – 118096       | 59049                          |
| 7     | 118097 and up        | 118097                         |

The rule is:

- Level 2 ends at 2·SRT−1.
- From level 3 on, each upper bound is twice the one before.
- The top level has no upper bound.

`psp_pkg::level_lower(srt, i)` gives the lower bound of level *i*. The encoder compares a
length against these bounds. The decoder turns a forecast level back into its **lower
bound**, so a correct forecast never overstates the idle period. The price is that a
forecast can leave up to half of a long idle period uncovered. Power-down picks up
those cycles.

## The pattern predictor

The history buffer is a shift register that holds the levels of the last `HL = 50`
idle periods, newest first. Its newest `PL = 2` entries are the *reference pattern*.

The predictor slides a window of `PL` levels over the older history, one position per
clock cycle. At position *k*, it compares the window `hist[k .. k+PL−1]` with the
reference. If every point is within `⌊W/2⌋ = 2` levels of the reference, the window
matches. The level that followed the window, `hist[k−1]`, then counts towards the
forecast. Each match carries a weight:

    weight = 1 + Σ_i (⌊W/2⌋ − |hist[k+i] − hist[i]|)

An exact match has weight 5, and a match off by 2 levels in both points has weight 1.
The forecast is the weighted mean of the follower levels, **rounded down**, which keeps
it conservative. In hardware, this is the largest level L with L·Σweight ≤
Σ(weight·level). If no window matches, the forecast is level 1 (no self-refresh) and
`pred_matched` is low. This also happens while the history holds fewer than PL+1
entries.

A forecast takes `HL − PL + 2 = 50` cycles, from the `start` pulse to the `done`
pulse. `psp_pkg::pred_latency` computes this. The weighting formula and the rounding
are this design's own choices. The matching rule and the similarity-weighted mean are
the method's.

## What happens in an idle period

This is the core of the design, in `power_saving_policy`. Time is counted in idle
cycles from the end of the last transaction. `to` is `cfg_timeout`, and `pi` is
`cfg_max_pred`.

```
 request │ PD (time-out) │ SR ..................... │ power-up │ PD (speculative) │ request
         0               to                          p          e                  arrival
                          ▲ forecast F ≥ SRT?        ▲ repeat forecast: still ≥ SRT → e += F', stay in SR
```

1. **Time-out, in power-down.** From the first idle cycle, the DRAM is in power-down.
   Short idle periods are therefore never sent to self-refresh. The first forecast
   starts at once, because the history cannot change before the time-out ends.
2. **Enter self-refresh.** The first cycle after both the time-out and the forecast
   latency have passed is `max(to, 51) + 1`. If the decoded forecast `F` is at least
   SRT, the policy sets the expected end to `e = F` and the power-up point to
   `p = e − 512`, and the DRAM enters self-refresh. If `F` is shorter, the DRAM stays
   in power-down for the rest of the period.
3. **Repeated forecasts.** Shortly before `p`, the elapsed length `p` is written into
   the history as a *temporary* newest entry, and the forecast is run again. It is
   started `LAT + 2` cycles early, so its answer is ready at `p`.
   - If the new forecast `F'` is again at least SRT, the DRAM stays in self-refresh
     and the expected end becomes `e = e + F'`.
   - Otherwise, the 512-cycle power-up starts at `p`, and the DRAM is ready exactly at
     `e`.

   At most `pi` forecasts are made per idle period, counting the first.
4. **Speculative power-down.** If the bus is still idle when the DRAM is up again, the
   DRAM stays ready for one cycle and then goes to power-down.
5. **The request.** The arrival of a request ends the idle period, and its length
   replaces the temporary history entry. The wait the request sees depends on the mode
   it finds:

| state at arrival                 | wait                                    |
|----------------------------------|-----------------------------------------|
| ready (e.g. exactly at `e`)      | 0                                       |
| power-down (time-out or later)   | `X_PDLL` = 10                           |
| self-refresh (over-estimation)   | `X_SDLL` = 512                          |
| powering up                      | the rest of the power-up, `e − arrival` |

A wake-up latency counts from the cycle in which the policy decides to leave the mode.
That cycle is either the cycle the request arrives or the cycle `p`. `sr_req`/`pd_req`
fall one cycle later.

A forecast is weighted towards the past and rounded down to a level's lower bound. As
a result, the policy under-estimates far more often than it over-estimates. Repeated
forecasts recover much of what under-estimation loses, and power-down covers whatever
is left. Every idle cycle is therefore in one of the two modes, except the first idle
cycle, the power-up cycles and the one ready cycle before speculative power-down.

## Interface of `dram_power_predictor`

| port           | dir | width   | meaning |
|----------------|-----|---------|---------|
| `clk`, `rst_n` | in  | 1       | memory clock; synchronous active-low reset (empties the history) |
| `bus_idle`     | in  | 1       | no request pending and no transaction in flight at the bus |
| `cfg_timeout`  | in  | 16      | initial time-out `to` in cycles |
| `cfg_max_pred` | in  | 8       | forecasts allowed per idle period `pi` (0 disables self-refresh) |
| `sr_req`       | out | 1       | keep the DRAM in self-refresh |
| `pd_req`       | out | 1       | keep the DRAM in precharge power-down |
| `mem_ready`    | out | 1       | the DRAM is up; the bus may issue |
| `wake_stall`   | out | 1       | a request is waiting for power-up (a penalty cycle) |
| `pwr_state`    | out | 3       | policy state, `psp_pkg::pwr_state_e` |
| `pred_level`, `pred_len`, `pred_matched` | out | 3, 24, 1 | latest forecast: level, decoded length, whether any pattern matched |
| `pred_count`   | out | 8       | forecasts used in the current idle period |

Requirements on the front end:

- Keep `bus_idle` low from the arrival of a request until `mem_ready`, and for at least
  one cycle between idle periods.
- Change `cfg_timeout` and `cfg_max_pred` only while the bus is busy.

Using `sr_req` and `pd_req`, the command generator must issue the DDR3 command
sequences itself: self-refresh entry and exit, power-down entry and exit, and
power-down exit before self-refresh entry. The design does not model them.

Parameters, all of which are plain `int unsigned`:

| parameter | default | meaning |
|-----------|---------|---------|
| `HL`      | 50      | history length |
| `PL`      | 2       | reference pattern length |
| `W`       | 4       | width: points may differ by ⌊W/2⌋ levels |
| `SRT`     | 3691    | self-refresh threshold |
| `NLEV`    | 7       | number of levels (at most 7 with the 3-bit level type) |
| `X_SDLL`  | 512     | self-refresh power-up latency (≥ 2) |
| `X_PDLL`  | 10      | power-down power-up latency (≥ 2) |
| `CNT_W`   | 24      | idle counter width (saturating; 16.7 M cycles) |

The settings tuned for three multimedia applications are (`hl`, `pl`, `w`, `to`, `pi`):

- H.263 decoder: 50, 2, 4, 230, 150
- ray tracer: 50, 2, 4, 250, 40
- JPEG encoder: 50, 2, 4, 0, 200

`HL`, `PL` and `W` match the defaults. The time-out and the forecast limit are inputs,
so all three run on the same hardware. Reported for this policy are energy savings of
69–80 % and slow-downs of 0.3–2.2 %. This RTL has not been run on those application
traces.

## Design choices beyond the method

These points are decisions of this implementation:

- **Bus interface.** The unit watches only a single `bus_idle` signal, and idle time is
  a cycle count rather than a pair of time stamps.
- **Forecast rule.** The weight formula, rounding down, and level 1 when no pattern
  matches.
- **Predictor timing.** The predictor is serial, one window per cycle. The repeated
  forecast is started `LAT + 2` cycles before `p`, and the first forecast at the start
  of the idle period.
- **Temporary history entry.** Its value is the level of `p`, the elapsed length at
  the power-up point.
- **Extension.** A repeated forecast extends `e` by its decoded length. Self-refresh
  is entered only if `p` lies at least one cycle in the future.
- **Ready before speculative power-down.** After a power-up with the bus still idle,
  the DRAM stays ready for one cycle.
- **Top level.** The top level is open-ended. Levels are 1-based: level 1 means
  "self-refresh does not pay".
- **Reset and counters.** Reset is synchronous and active-low, and the counters
  saturate.
- **No command sequencing.** There are no refresh commands during power-down and no
  DRAM command sequencing (see above).

Only the PSRS policy is implemented. Two simpler policies are not: speculative
self-refresh after a time-out, and prediction for self-refresh without speculative
power-down.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_level_encoder` | all level bounds and their neighbours, 2000 random lengths, the SRT formula |
| `tb_level_decoder` | every level at SRT = 3691 and at SRT = 10 |
| `tb_idle_monitor` | 300 random busy/idle stretches: start pulse, elapsed count, reported lengths |
| `tb_history_buffer` | random commit/temporary writes against a queue model, HL = 8 and 50 |
| `tb_pattern_predictor` | 300+ histories against a division-based model, hand-worked cases, latency 50 |
| `tb_power_saving_policy` | nine hand-computed idle periods: time-out, level-1 forecast, exact cycle of entering and leaving self-refresh, extension, limit, full and partial penalty, no time-out, self-refresh disabled |
| `tb_dram_power_predictor` | whole unit at default sizes; see below |
| `tb_workloads` | the three application settings on long random idle-period mixes; see below |

`tb_dram_power_predictor` drives about 3.5 million cycles of scripted idle periods
under all three application settings and under a limit of two forecasts. It keeps its
own history and forecasting model. For every period, it checks:

- the forecast;
- the cycle in which self-refresh starts;
- that self-refresh happens only on forecasts of level 2 or higher;
- that the DRAM is ready exactly 512 cycles after self-refresh ends;
- the wait of every request.

It also counts and requires each mechanism: time-out filtering, power-down only,
self-refresh, extension by a repeated forecast, hitting the forecast limit, full and
partial over-estimation penalty, just-in-time wake-up, speculative power-down after
self-refresh, no match, and the top level. It runs in a few seconds.

`tb_workloads` runs each of the three application settings for 240 idle periods,
1.4 to 3 million cycles each. The periods follow generated motifs of short, medium and
long periods, because the application traces themselves are not part of this
repository. For every period it checks that the idle cycles are fully covered by
self-refresh, power-down or power-up. It also reports a simple current × cycles
energy figure and the penalty. On these synthetic mixes the DRAM uses about 19–23 % of
the always-awake energy, with 0.4–1.4 % extra cycles. These figures describe the
generated mixes, not the applications.

To run one testbench with Verilator (5.x):

```sh
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
          rtl/psp_pkg.sv tb/tb_dram_power_predictor.sv \
          --top-module tb_dram_power_predictor -o sim
./obj_dir/sim
```

Replace the testbench file and `--top-module` to run the others.
