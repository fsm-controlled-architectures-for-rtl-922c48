# Invasive linear processor array with FSM controllers

A program running on one processing element (PE) of a linear array can
*invade* its idle neighbours, *infect* them with its own program, run on all
of them in parallel, and *retreat* to free them again. There is no central
scheduler for the claiming: each PE has a small finite state machine, and the
invasion travels from neighbour to neighbour until it meets a PE that cannot
be claimed. The number of claimed PEs comes back along the same chain.

This RTL contains two designs built on that idea:

* **The invasive processor array**: `NUM_PE` PEs in a chain, each with an
  invasion controller, a two-bit role flag and the function unit of an FIR
  filter case study, plus a central control manager on a configuration bus.
* **The FPGA region manager**: the same invade / infect / retreat steps
  applied to the reconfigurable regions of an FPGA. Each region holds a
  hardware module that plays the part of a PE.

`invasive_top` puts the two side by side. They share only clock and reset.

## The invasion controller (`invasive_controller`)

Each PE has five states:

| state | name | flag | meaning |
|---|---|---|---|
| s0 | idle | free | waits for `start` (becomes master) or `invade_in` |
| s1 | masterExe | master | runs a program; issues invade, infect and retreat |
| s2 | invaded | slave | claimed; has passed the invasion on |
| s3 | infected | slave | program being copied in; waits for `start` |
| s4 | slaveExe | slave | runs the master's program |

Signals and their directions in the chain:

```
            invade, budget, retreat  ->            ->
   PE i-1  ------------------------------  PE i  -------------  PE i+1
            <-  ack, PE count              <-
   configuration bus: start, stop, infect_in (to each PE), infect_out (from each PE)
```

**Invade.** The master issues `invade` (the `cmd` port stands in for the
PE's atomic instruction). `invade_out` goes to the right neighbour. An idle
PE that sees `invade_in` moves to s2, sets its flag to slave and passes the
invasion on. The first PE that cannot be claimed (a master, or the right end
of the array) answers with `ack` and a count of 1. Each claimed PE passes the
answer back and adds one to the count. The master therefore receives `P + 1`
and stores `P`, the number of PEs it claimed, in `p_count`.

Every controller output is a register, so each hop costs one clock. If the
master issues `invade` at edge 0, `cmd_done` rises at edge `2P + 2`:
`P + 1` hops out to the boundary, one for the boundary's answer and `P` hops
back. For P = 3 that is 8 clocks.

**Budget.** The invade carries a budget: the most PEs to claim, where 0 means
as many as possible. Each claimed PE passes on the budget minus one. A PE that
receives a budget of 1 claims itself, goes no further and answers with a count
of 2, as if the boundary behind it had answered. That is one round trip fewer:
a budget-limited invasion of P PEs takes `2P` clocks.

**Infect.** The master issues `infect`. Its `infect_out` pulses with `P`, and
the control manager does the rest (see below). Invaded PEs move from s2 to s3
on `infect_in` and from s3 to s4 on `start`.

**Retreat.** The master issues `retreat`. Every s2, s3 or s4 PE that sees
`retreat_in` goes idle and passes the retreat on. The boundary answers with
a count of 1. The answer then travels back through the PEs that have just gone
idle, and each adds one. This also takes `2P + 2` clocks, and `freed_count`
ends up as the number of PEs freed. If the region ended because of a budget,
the boundary is an idle PE, which answers a stray retreat with a count of 1.

**Stop.** `stop` sends any PE straight to idle and forwards nothing.

**Precedence, where two inputs arrive together.** `start` beats `invade_in`,
and the invader is then answered as if by a master. `retreat_in` beats `stop`.
A master ignores a new invade or retreat command until the previous one has
been answered (`cmd_busy`).

## The processor array (`invasive_wppa_array`, `invasive_pe`, `control_manager`)

PE `i` connects to PE `i+1` through the invasion links above, and through
two data links: `out0 -> in0` carries samples and `out1 -> in1` carries
partial sums. No invasion and no data enter the left end. A terminator at the
right end answers an invade or retreat one clock later with a count of 1, so
a region that reaches the array end is measured like any other.

**Control manager.** A host drives the manager through a valid/ready port,
one command per clock:

| `host_op` | effect |
|---|---|
| 0 START | pulse `start` of PE `host_pe` (an idle PE becomes a master) |
| 1 STOP | pulse `stop` of PE `host_pe` |
| 2 WR_TABLE | write coefficient `host_addr` of the program table |
| 3 WR_PE | write word `host_addr` of PE `host_pe`'s coefficient memory |

When master `m` raises `infect_out` with `P`, the manager does three things
in turn:

1. It pulses `infect_in` of PEs `m+1 .. m+P`. Only PEs in s2 react.
2. It copies the program. The region shares the taps, `T = ceil(N_TAPS/(P+1))`
   per PE. PE `m+k` gets table words `k*T .. k*T+T-1` in its words
   `0 .. T-1`, then `T` in its taps register. That is `T + 1` writes per PE,
   one per clock. Past the end of the table the word is zero.
3. It pulses `start` of the same PEs, which then run as slaves.

If the `infect_out` pulse is sampled at edge C, `infect_in` is driven from
edge `C + 2`, the writes from edge `C + 3`, and `start` at edge
`C + 3 + P*(T+1)`. Infection requests are queued. The lowest-numbered master is
served first. Host commands wait while the manager is busy. `mgr_busy` tells
the host when the region is running.

## The FIR case study (`fir_tap_fu`)

The program that regions run is an FIR filter, `y[i] = sum_k a[k] u[i-k]`,
with `N_TAPS` taps. It is built as fixed-function hardware in each PE.
Nothing here models a PE's instruction memory, register file or branch unit.

**Sharing the taps.** A region of `P + 1` PEs (master first) splits the
filter into blocks of `T = ceil(N_TAPS/(P+1))` consecutive taps: PE `j` of
the region runs taps `jT .. jT+T-1`. The last block is padded with zero
coefficients. A master on its own has `T = N_TAPS` and runs the whole
filter. A region of `N_TAPS` PEs has `T = 1`, one tap per PE. Every case in
between uses the same unit, so halving the region doubles the time per
output.

**One PE.** Each PE keeps a delay line of its last `T` samples. When a sample
arrives it is shifted in, and the PE does `T` multiply-accumulates, one per
clock, reading its coefficients from its own memory. At the last one it adds
the partial sum from the left PE (zero for the master) and sends the result
right. It takes a new sample every `T` clocks (`ext_x_rdy` on the master is
low in between).

**Why the sample goes right late.** The sample a PE passes right is the one
that leaves its delay line, `T` samples old, not the one it just took. PE
`j` must multiply `a[jT + t]` by `u[i - jT - t]`, so each PE's samples must
lag the previous PE's by `T`. Passing the newest sample on, with equal delays
on the sample and sum paths, gives a chain that does not compute a
convolution.

**Timing.** The region's last PE, `m + P`, gives `y[i]` on `y_out`
`P + T - 1` clocks after the master took `u[i]`, and one output every `T`
clocks. With 64 taps: 64 clocks per output on one PE, 22 on three PEs, 16 on
four, 2 on 32 and 1 on 64.

**Changing T.** The master's `T` follows the `P` of its last infect. It goes
back to `N_TAPS` one clock after the retreat's `cmd_done`, or when the
master is stopped. Whenever a PE's `T` changes,
its unit is cleared for one clock. Samples taken before the change are then
forgotten, so the first outputs of a new region start from an empty history.
Feed a region only after its slaves are running (`mgr_busy` low).

## The FPGA region manager (`pr_control_manager`)

There are `NUM_PR` regions, five by default. Requests are levels, held until
the region's `done` pulse.

* **start**: the region becomes a master. With `PARTIAL = 1`, its module is
  loaded through the reconfiguration port.
* **invade** with a count: the manager claims free regions directly to the
  right of the master, one per clock. It stops at the first occupied region,
  at the last region, or when the count is reached.
* **infect**: this follows the invade in the same request. With
  `PARTIAL = 1`, each claimed region gets a copy of the master's module
  through the port (`pr_req`/`pr_done`, `pr_erase = 0`,
  `pr_src_region = master`). With `PARTIAL = 0`, the modules are already
  there and only their `clk_en` is turned on. `grant_count` returns the
  number of regions claimed.
* **retreat**: the master's slave regions are erased (`PARTIAL = 1`) or have
  their clock enable turned off, and become free.

Clock control is a clock-enable output per region, meant to drive a
clock-enable buffer. The reconfiguration port, that is the device's
configuration access, is outside this design. The testbenches contain a
behavioural stand-in for it.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_PE` | 4 | PEs in the array |
| `N_TAPS` | 64 | filter taps, and words of each PE's coefficient memory |
| `CNT_W` | 8 | width of PE counts and budgets |
| `NUM_PR` | 5 | FPGA regions |
| `PARTIAL` | 1 | 1: partially reconfigurable device; 0: clock control only |
| `PR_CNT_W` | 4 | width of region counts |

Data widths are in `inv_pkg`: 16-bit signed samples and coefficients, and
40-bit products and sums.

With the defaults, the fast 64-tap filters do not fit: one output per clock
needs a region of 64 PEs, and one output every two clocks needs 32. Set
`NUM_PE` that high for them. The four-PE array shows the protocol. With 64
taps, its largest region of four PEs gives one output every 16 clocks.

## What is this design's own choice

These points are not fixed by the original description of the architecture:

* The budget field on the invade link.
* The master's `cmd` port.
* The answer of an idle PE to a stray retreat.
* The right-end terminator.
* The precedence rules listed above.
* The state and flag encodings, and the synchronous active-low reset.
* The manager's host commands and its infection order.
* The late sample passed right (see above).
* How the taps are split over a region, the taps register, and the one-clock
  clear when `T` changes.
* The FPGA manager's request interface and its use of clock enables.

## Simulation

Every testbench checks itself and ends with a `TB_RESULT checks=... failures=...` line:

| testbench | covers |
|---|---|
| `tb_invasive_controller` | all transitions and outputs of one controller |
| `tb_fir_tap_fu` | chains of 1 to 6 units for several `N` and `T`, against a reference, with latency and rate |
| `tb_invasive_pe` | one PE as a lone master, as master of a region, and as slave |
| `tb_control_manager` | host commands and the clock-exact infection sequence |
| `tb_pr_control_manager` | FPGA steps with and without partial reconfiguration |
| `tb_invasive_wppa_array` | 6 PEs and 4 taps: every mechanism, counted, with 2P+2 timing; regions of 1, 3 and 4 PEs filtering |
| `tb_invasive_top` | both designs end to end |
| `tb_fir_workloads` | 64 PEs and 64 taps: regions of 64 (one output per clock) and 32 (one per two clocks), with invade and retreat times |
| `tb_invasive_top_full` | default sizes: 4 PEs and 64 taps, one full invade-infect-filter-retreat cycle (64 and then 22 clocks per output), plus the FPGA steps |

Example with plain Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb rtl/inv_pkg.sv tb/tb_invasive_top.sv \
          --top-module tb_invasive_top -Mdir obj && ./obj/Vtb_invasive_top
```

The array and top testbenches include `tb/wppa_scenario.svh`, the shared
array scenario.
