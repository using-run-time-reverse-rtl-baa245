# Row-granular DRAM refresh with reverse-engineered timings

Many refresh-saving schemes skip rows that do not need refreshing: rows that hold no data, rows refreshed
recently by an access, rows known to retain data longer. To do that they cannot use the DRAM's built-in
Auto-Refresh command, because Auto-Refresh refreshes a fixed group of rows inside the chip and cannot skip
any of them. So they refresh row by row from the controller instead, with explicit ACT and PRE commands. This
is *row-granular refresh* (RGR). The cost is that every ACT/PRE pair must obey the JEDEC timings meant for
normal reads and writes (t_RRD, t_FAW, t_RAS, t_RP). The chip's internal refresh does not obey those
timings. As a result, plain RGR blocks the DRAM for longer than Auto-Refresh does.

Those timings are not needed for a refresh. No read or write follows the ACT, so the bitlines are not
disturbed and restore faster. The activate-rate limits t_RRD and t_FAW exist for the power of read/write
traffic. The DRAM also carries an internal analog timer, t_RAS^min. It protects a row from an early PRE and
is set well below the JEDEC t_RAS. The controller here measures that timer at start-up. It then refreshes row
by row with a reduced timing set:

| timing | JEDEC (normal traffic) | refresh, ORGR |
|---|---|---|
| t_RAS | 35 ns | t_RAS* = measured t_RAS^min + 1 cycle |
| t_RP | 12.5 ns | t_RP* = 9.375 ns |
| t_RRD | 6 ns | t_RRD* = 3.75 ns |
| t_FAW | 30 ns | t_FAW* = 4 t_RRD*, so it never adds a wait |

This is *optimized row-granular refresh* (ORGR). Take a 4 Gb x16 DDR3 device at 533 MHz, where one refresh
covers 4 rows in each of 8 banks:

- plain RGR holds the DRAM for 292.5 ns;
- Auto-Refresh holds it for 262.5 ns;
- ORGR holds it for 146.25 ns.

Normal traffic keeps the JEDEC timings. The DRAM and the protocol are unchanged.

The RTL is the refresh side of a memory controller. It contains:

- the run-time calibration of t_RAS^min;
- the refresh timer;
- the row-granular refresh engine, which runs with either timing set;
- the register block that derives the reduced set;
- a top level that sequences them and shares the command bus with the host's access scheduler.

All timings are counted in clock cycles. The defaults are for DDR3 at 533 MHz (tCK = 1.875 ns), where the
reduced timings are whole cycles: t_RAS* 11, t_RP* 5, t_RRD* 2.

## How one row-granular refresh is scheduled (`rgr_engine`)

One refresh covers rows `base .. base+r-1` in every one of the B banks. The engine takes the slots in
row-major order: row `base` in bank 0, 1, ..., B-1, then row `base+1` in bank 0, 1, ..., and so on. Each
bank is precharged as soon as its t_RAS is up. Up to B rows are therefore restoring at once, which is where
the speed comes from. The engine runs a greedy scheduler with these rules:

- **ACT** to the next slot's bank when all of these hold: t_RRD has passed since the previous ACT; the
  oldest of the last four ACTs is at least t_FAW old; the bank is closed; t_RP has passed since the bank's
  last PRE.
- **PRE** to any open bank whose t_RAS has passed. If a PRE and an ACT are both ready in the same cycle, the
  PRE goes first. A PRE bounds when that bank can be used again, whereas the ACT only delays itself.
- **done** when every slot has been activated, every bank is closed, and the last PRE's t_RP has elapsed.

Per-bank down-counters hold t_RAS and t_RP, one counter holds t_RRD, and a four-entry ring of time stamps
holds the ACT window. When PREs and ACTs never compete for a cycle, this schedule blocks the DRAM for exactly

```
t_RFC = (rB - 1) t_RRD + t_RAS + t_RP                       last ACT, its t_RAS, its t_RP
      + (rB/4 - 1) t_wait                                   t_FAW stalls, one per group of four ACTs
      + (r - 1) [t_RAS + t_RP - (B t_RRD + t_wait)]>=0      bank 0 not yet free when row j+1 starts

t_wait = [t_FAW - 4 t_RRD]>=0,   [x]>=0 = max(x, 0)
```

`trfc_o` reports the measured value: cycles from the first ACT to the end. With the defaults (r = 4,
B = 8):

| set | t_RAS / t_RP / t_RRD / t_FAW (cycles) | t_RFC | at 533 MHz | at 400 MHz |
|---|---|---|---|---|
| ORGR | 11 / 5 / 2 / 8 | 78 cycles | 146.25 ns | 195 ns |
| RGR as measured (t_RAS stretched to 46.875 ns) | 25 / 7 / 4 / 16 | 156 cycles | 292.5 ns | 390 ns |
| RGR, JEDEC minimum | 19 / 7 / 4 / 16 | 150 cycles | 281.25 ns | — |

In the ORGR set, B t_RRD* = 16 equals t_RAS* + t_RP* = 16. Bank 0 is therefore free again exactly when the
eighth ACT of a row is out, and the ACT stream never pauses. For the same reason the reduced cycle counts are
the same at 400 MHz and 533 MHz.

**Selective refresh.** Rows at or above the programmed *row limit* are not refreshed. A refresh whose
rows all lie above the limit issues no command at all and reports t_RFC = 0. One whose range straddles the
limit refreshes only the rows below it. This is the hook for the schemes that skip rows, in the simplest
form: refresh only the part of the memory that is in use.

## Measuring t_RAS^min from outside the chip (`tras_calibrator`, `dqs_detector`)

A DRAM ignores a PRE that arrives before its internal t_RAS^min timer has run out, and the row then stays
open. The calibrator uses this. Each trial, on bank 7 row 0:

```
ACT ──(candidate t_RAS)──> PRE ──(t_RP)──> RD ──(window)──> DQS seen?
```

- If the PRE was accepted, the bank is closed: the RD is ignored and DQS stays quiet.
- If the PRE was ignored, the bank is still open: the RD returns data and DQS toggles.

The first candidate is the JEDEC t_RAS. Each trial shortens it by one cycle. The first trial that sees DQS
ends the search. t_RAS^min is then the candidate of the trial before it, the shortest ACT-to-PRE time the
chip accepted. The calibrator closes the row that is still open and waits t_RP. With a JEDEC t_RAS of 19
and a chip timer of 10 cycles, this takes 11 trials of about 40 cycles each.

If no candidate down to one cycle brings DQS back, `found` stays 0. The controller then keeps the JEDEC
t_RAS for refresh.

`dqs_detector` is armed when the RD is decided. It reports whether any high DQS sample arrived within
`rd_window` cycles (default 14). That covers a read latency of 7, the one-cycle command register, a 4-cycle
burst and some margin. Change the window if the PHY adds delay.

The vendor's timer already accounts for process variation. To follow temperature, the calibration can be
repeated at any idle point (`recal_req`), for example alongside ZQ calibration.

## Choosing the refresh timing set (`refresh_timing_regs`)

The block holds two sets:

- **JEDEC set**: used for all host traffic, and exported as `host_tim`.
- **Refresh set**: in ORGR mode, `{t_RAS*, t_RP*, t_RRD*, 4 t_RRD*}`; in RGR mode, the JEDEC set.

t_RAS* is worked out as follows:

- It is `t_RAS^min + guard`, with a guard of 1 cycle by default. The measured 18.75 ns (10 cycles) thus
  becomes 20.625 ns (11 cycles).
- It is capped at the JEDEC t_RAS.
- Until a calibration succeeds, the JEDEC t_RAS is used instead.

t_RRD* and t_RP* are programmed values. The registers are written through a one-port interface:

| addr | register | default |
|---|---|---|
| 0 | mode (bit 0: 1 = ORGR, 0 = RGR) | 1 |
| 1-4 | JEDEC t_RAS, t_RP, t_RRD, t_FAW | 19, 7, 4, 16 |
| 5, 6 | t_RRD*, t_RP* | 2, 5 |
| 7 | t_RAS guard | 1 |
| 8 | t_REFI (24 bits) | 4160 (7.8 µs) |
| 9 | r, rows per bank per refresh (1..16) | 4 |
| 10 | row limit for selective refresh | 32768 (all rows) |
| 11 | DQS window | 14 |

A 24-bit t_REFI reaches 16.7 M cycles. That covers refresh windows of up to 100 s (12.2 ms per refresh), the
range used for retention experiments.

## When to refresh (`refresh_timer`)

Every t_REFI cycles the timer adds one refresh to a pending count; `req` stays high while the count is above
zero. Each finished refresh does two things:

- it decrements the count;
- it moves the row pointer on by r, wrapping at R.

So N = R / r refreshes sweep every row once per refresh window t_REF = N t_REFI. With 8192 refreshes of 4
rows, that is the 32768 rows of a 4 Gb x16 DDR3 bank in 64 ms.

Up to eight refreshes may wait, as DDR3 allows. A ninth request is dropped and sets the sticky `overflow`
flag. In practice refreshes wait only while a calibration runs.

## The controller (`orgr_controller`)

```
           +-------------------+   ref_tim, host_tim, t_REFI, r, limit
 cfg ----->| refresh_timing_   |------------------------------+
           | regs              |<-- t_RAS^min ---+            |
           +-------------------+                 |            v
                                    +------------+---+   +---------------+
 dram_dqs ------------------------->| tras_calibrator|   | refresh_timer |
                                    | (dqs_detector) |   +-------+-------+
                                    +-------+--------+      req  | base_row
                                            | cmd                v
 host_cmd --(valid/ready)--+                |           +---------------+
                           v                v           |  rgr_engine   |
                     +--------------------------+  cmd  +---------------+
                     | sequencer + command mux  |<-------------+
                     +------------+-------------+
                                  v  (register)
                               dram_cmd
```

The sequencer goes through these states:

1. **Start-up calibration.** Runs after reset. Host commands are held off and the refresh timer is stopped.
   When the calibration finishes, `init_done` rises and the timer starts.
2. **Idle.** Host commands pass through: an accepted command is on `dram_cmd` one cycle later. The host
   scheduler is responsible for JEDEC timing between its own commands. `open_banks` tells it which of its
   banks are still open.
3. **Drain.** A refresh request or `recal_req` drops `host_ready`. The controller then waits until the host's
   last commands have timed out: t_RAS since the last ACT, `RW2PRE` (18) cycles since the last RD/WR, and
   t_RP since the last PRE. If banks are open it issues PREA and waits the JEDEC t_RP.
4. **Refresh.** The engine runs with the refresh timing set. When it ends, t_RP* after its last PRE, the host
   may use the DRAM again.
5. **Recalibration.** Runs when one was requested and no refresh is pending. Refreshes that fall due
   meanwhile wait in the timer.

Only one source drives the bus at a time; assertions check that the engine and the calibrator stay silent
outside their states.

### Ports of `orgr_controller`

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `cfg_we`, `cfg_addr`, `cfg_wdata` | in | 1, 4, 24 | register write |
| `recal_req` | in | 1 | pulse: recalibrate at the next idle point |
| `host_valid`, `host_ready`, `host_cmd` | in/out/in | 1, 1, 24 | host command port (`dram_cmd_t`) |
| `open_banks` | out | BANKS | banks the host left open |
| `host_tim` | out | 40 | JEDEC timing set for the host (`timing_t`) |
| `dram_cmd` | out | 24 | registered command bus: op, bank, row |
| `dram_dqs` | in | 1 | DQS sampled by the PHY |
| `init_done`, `cal_busy`, `ref_busy` | out | 1 | phase flags |
| `cal_found`, `tras_min`, `tras_star`, `cal_trials` | out | 1, 10, 10, 11 | calibration result |
| `last_trfc`, `ref_count`, `ref_pending` | out | 16, 32, 4 | refresh statistics |
| `ref_wrap`, `ref_overflow`, `orgr_mode` | out | 1 | window done, lost request, mode |

Types and constants live in `orgr_pkg`:

- `dram_cmd_t` is 3-bit op, 4-bit bank and 17-bit row.
- `timing_t` is four 10-bit cycle counts. Ten bits leave room for timing sets written in sub-nanosecond
  ticks.

Parameters of the top:

- organisation: `BANKS` = 8, `ROWS` = 32768, `MAX_ROWS_PER_REF` = 16, `ROWS_PER_REF` = 4, `TREFI` = 4160;
- reset values of the timing registers;
- `RD_WINDOW`, `RW2PRE`, `CAL_BANK` = 7 and `ORGR_MODE`.

For a 16 Gb DDR4 x16 part (8 banks, 131072 rows), set `ROWS` = 131072 and program r = 16, 8 or 4 for the
1X, 2X or 4X refresh modes. With the DDR4 timing sets below, the formula gives these values, in ns:

| set | 1X | 2X | 4X |
|---|---|---|---|
| RGR: 28.3 / 15 / 6.7 / 30.8 ns | 1018.2 | 525.4 | 279 |
| ORGR: 18.3 / 12.5 / 1.7 / 6.6 ns | 504.7 | 258.3 | 135.1 |

`tb_ddr4_fgr` reproduces these values with the engine. DDR4's bank-group timings (separate
t_RRD_S/t_RRD_L) are not modelled.

## What is this design's own, and what is missing

These follow the method exactly:

- the reduced-timing refresh with t_FAW* = 4 t_RRD*;
- the t_RFC schedule;
- the probing sequence ACT / PRE / RD on bank 7 with DQS as the verdict;
- the timing values.

These are choices made here:

- **Command bus.** One command per cycle, and PRE before ACT on a tie. Neither default timing set ever ties.
- **Calibration search.** Steps of one cycle, starting from the JEDEC t_RAS. The guard is one cycle, and
  t_RAS* is capped at the JEDEC t_RAS.
- **Drain before refresh.** The timeout rule, and PREA only when a bank is open.
- **Selective refresh.** A single row limit, not a per-row table.
- **Waiting refreshes.** At most eight, and the overflow flag.
- **Interfaces.** The register map and the host port.

What is not here:

- **Measuring t_RP^min.** No procedure for it is available, so t_RP* is a programmed value whose default
  is 9.375 ns.
- **Auto-Refresh.** The baseline the scheme is compared with is not built.
- **The normal read/write scheduler, DDR3 initialisation and the PHY.** The host port stands in their place.
- **Per-row retention bookkeeping** of the schemes ORGR would serve.
- **The RGR default t_RAS.** Table 2's RGR row uses t_RAS = 46.875 ns, while the JEDEC minimum is 35 ns. The
  default is the 35 ns (19 cycles). The measured RGR schedule is reproduced by writing 25 to the JEDEC t_RAS
  register.

## Simulation

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M` and has a watchdog. Example
with plain Verilator:

```
verilator --binary --timing --assert -y rtl rtl/orgr_pkg.sv rtl/orgr_controller.sv \
          tb/ddr3_model.sv tb/tb_orgr_controller.sv --top-module tb_orgr_controller
./obj_dir/Vtb_orgr_controller
```

| testbench | what it shows |
|---|---|
| `tb_rgr_engine` | t_RFC equals the formula: 78 and 156 cycles for the 533 MHz sets; 158 ns for a 2 Gb device (r = 2, 6/37.5/12.5/30 ns, run in 0.5 ns ticks); 30 random sets. Also partial and fully skipped selective refreshes, and a monitor on every t_RAS/t_RP/t_RRD/t_FAW rule and every (bank, row) slot. |
| `tb_tras_calibrator` | finds chip timers of 8 to 19 cycles in JEDEC t_RAS - t_RAS^min + 2 trials; checks ACT→PRE = candidate and PRE→RD = t_RP on the bus; handles a chip without the timer |
| `tb_dqs_detector` | strobes inside or outside the window, and the verdict latency |
| `tb_refresh_timing_regs` | reset values, t_RAS* derivation and cap, t_FAW* = 4 t_RRD*, mode switch, writes |
| `tb_refresh_timer` | request period, pointer stepping and wrap, waiting refreshes, overflow |
| `tb_ddr4_fgr` | the six DDR4 16 Gb schedules (RGR and ORGR in 1X/2X/4X), run in 0.1 ns ticks, plus the half-refresh skip |
| `tb_retention_trefi` | the controller at defaults with the refresh interval stretched for t_REF = 1 s and 100 s (65104 and 6510417 cycles): refresh spacing on the bus, t_RFC, row pointer |
| `tb_orgr_controller` | the whole controller at default parameters (see below) |

`tb_orgr_controller` runs against `ddr3_model`, a command-level model of the device. The model ignores a PRE
that comes before its t_RAS^min (10 cycles, later 12), drives DQS for a read to an open bank, records when
each row was last activated, and counts every violation of its true minimum timings (5/2/8 cycles). The test
runs these phases:

1. start-up calibration;
2. random host traffic with ORGR refreshes at the default 7.8 µs interval;
3. RGR refreshes;
4. a complete refresh window (8192 refreshes at a shortened interval) with only the lower half of the rows
   refreshed;
5. a recalibration after the chip's timer grows.

It checks the following:

- every refresh's t_RFC against the formula;
- every host command on the bus;
- no violation of the device's timings;
- every refreshed row refreshed within one window, and the skipped half not at all;
- that calibration, recalibration, PREA, host stall, ORGR refresh, RGR refresh, skipped refresh, window
  wrap and waiting refreshes each happened at least once.

It runs about 3.5 million clock cycles and takes a few seconds with Verilator.
