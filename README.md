# TWINKLE sieving array in SystemVerilog

Sieving is the expensive step of the Quadratic Sieve and Number Field Sieve
factoring algorithms. For each factor-base pair (p, r), a sieve adds log p to
every location r + kp of an interval. Then it reports the locations whose
sum passes a threshold. A software siever holds the interval in memory and
loops over the pairs. TWINKLE turns this around. It gives every pair its own
small cell, and it walks through the interval in time, one location per
clock. Every cell counts clocks. When its progression hits the current
location, the cell flashes an LED whose brightness stands for log p. A single
detector adds up all the light in that clock. If the total passes the
threshold, the location is a candidate.

This RTL implements the improved form of the device meant for special-q NFS
sieving. It makes four changes to the original device:

* The counters use cheap state decoding.
* Rational and algebraic flashes are summed separately, and a location is
  reported only when both sums are high.
* A query loop makes the cells that caused a report give their identities.
  The host then needs no trial division over the whole factor base.
* The array is simplified for special-q lines. Only the small primes get true
  arithmetic-progression cells. Each larger prime hits a line at most once, so
  it is handled by a cell with a single counter that is reloaded for every
  line.

The optical parts are replaced by their ideal digital equivalents: wires, an
exact adder and a clock enable. Everything else is synthesizable RTL.

## Array at a glance

```
             load lanes (I/O lines, LOAD_LANES wide)
                  |  bank k of cells hangs on lane k
   +--------------v-----------------------------------------+
   |  twinkle_cell x N_AP_CELLS    twinkle_hit_cell x N_HIT  |
   |  (A + B register)             (B register only)         |
   |   led_rat / led_alg / weight / rep_flag per cell        |
   +-----+----------------------------------------^-----+----+
         | LEDs + weights                   query |     | rep_flag
   +-----v--------------------------+             |  +--v-----------------------+
   | twinkle_photodetector          |-------------+  | twinkle_report_collector |
   | sum_rat > t_rat & sum_alg > t_alg, 8-tick loop |  | one identity per cycle   |
   +-----------------------------------------------+  +--+-----------------------+
         ^ tick, loc, loc_valid                 busy ^  | rep_valid/rep_loc/rep_id
   +-----+-------------------------------------------+--v---+
   | twinkle_controller: one tick per location, stall, done |
   +--------------------------------------------------------+
```

By default the array has 2,056 progression cells and 17,944 single-hit cells,
20,000 cells in all. A line has 2·2^12 = 8,192 locations. The 2,056
progression cells are 2·π(8192): one rational and one algebraic progression
for each prime below the line length. About 10^4 large-prime pairs hit a
given line, and the single-hit cells take those. Even-numbered cells are
rational and odd-numbered cells are algebraic, in both groups. Cell
identities run from 0 to 2,055 for the progression cells, followed by the
single-hit cells.

## The B register: how a cell knows when to flash

All timing in a cell comes from its B registers (`twinkle_counter`). A B
register counts up by one on every tick. Three states of the count matter.
In all three the MSB is set and every middle bit is clear:

| state (binary)   | value | meaning                                          |
|------------------|-------|--------------------------------------------------|
| `10...0 10000`   | F     | flash: the LED is on for this location           |
| `10...0 11000`   | F + 8 | report: if the query arrives now, raise rep_flag |
| `10...0 11001`   | F + 9 | reload from A (progression) or disarm (single hit) |

`F = 2^(CNT_W-1) + 16`. Only the MSB and the five low bits are decoded. The
counter never has its MSB set outside these few states, so no wide AND tree
is needed.

The host computes two values:

* **B value for a first hit at location k:** `b_init(k) = F - k`. The
  register reaches F after k ticks.
* **A value for prime p:** `a_value(p) = F - p + 10`. The reload happens 9
  ticks after the flash and costs one more tick. A register that restarts at
  `F - p + 10` therefore flashes again exactly p ticks after its last flash.
  This is the "augmented" A register.

Both functions are in `twinkle_pkg`. Because the reload comes 10 ticks after
a flash, a progression cell needs p ≥ 10. Primes below 10 have to be handled
by the host.

For a progression (p, r) on line b, the first hit k is the usual sieve offset
of the line. For line sieving over a ∈ [-A, A), it is `(b·r + A) mod p`. The
host computes k and only loads `b_init(k)`.

A register that was never loaded, or was cleared with `SEL_DISARM`, carries
an armed bit of 0 and stays dark. Reset clears every armed bit.

The original counter design was an asynchronous ripple counter, chosen to
save power. Its MSB may settle several clocks late, so the flash is timed by
bit 4 (the fifth lowest bit) as long as the MSB is already set. Here the
counter is synchronous. It goes through the same states on the same ticks,
so cell behaviour does not change. Only the power argument is lost.

## Cells

**`twinkle_cell`** is the arithmetic-progression cell. It has one A register
for its prime and `N_RAT` rational B registers (0 or 1). It also has `N_ALG`
algebraic B registers, one for each root of f1 mod p, up to 5. The rational
LED follows the rational register. The algebraic LED is on when any
algebraic register flashes. Both LEDs use the cell's intensity `weight`, a
5-bit register loaded by the host (about log2 p).

In the full NFS line-sieving cell every prime has one rational register and
d algebraic ones, so a cell has 2 to 7 registers. The default array uses the
single-progression variants: `N_RAT=1, N_ALG=0` for rational cells and
`N_RAT=0, N_ALG=1` for algebraic cells. The cell testbench runs the largest
type, with 1 rational and 5 algebraic registers.

**`twinkle_hit_cell`** has only a B register. It never reloads: after its
single flash and report window it disarms itself. There is no A register,
because the host knows which prime it placed in which cell and can name the
prime from the reported identity. Its colour is fixed by the parameter
`IS_ALG`. Its intensity is loaded for each line with the B value, because
the prime changes from line to line.

A cell sets `rep_flag` when it sees `query` during a tick while one of its B
registers is in the report state. The flag stays set until `rep_clr`. The
cell reports only its identity, not which of its registers fired.

## The light sum and the query loop

`twinkle_photodetector` adds the weights of all lit rational LEDs and, as a
separate sum, all lit algebraic LEDs. It declares a report when
`sum_rat > t_rat` **and** `sum_alg > t_alg`. Both comparisons are strict.
For special-q sieving the host passes `T1 - log q` as `t_alg`.

The query has to reach the cells exactly when the cells that flashed are in
their report state, which is 8 ticks after the flash. The module is
therefore a pipeline of exactly `QUERY_DELAY = 8` ticks:

1. Register the two sums and the location.
2. Register the comparison.
3. Delay the result through a shift line for the remaining stages.

All stages advance only on ticks. The design relies on this delay being equal
to the report offset of the counter (`REPORT_LOW - FLASH_LOW = 8`). If you
change one, change the other.

Locations past the end of the line (`loc_valid = 0`) never produce a
report. The summing adder is combinational. It first adds groups of 64 cells,
then adds the group sums. The report collector's priority encoder is split
the same way.

## Reading reports out: the stall

The load and report wires are long and slow, so identities cannot leave the
array at the sieving rate. When a query arrives, the following happens:

1. The flagged cells latch `rep_flag` on that tick.
2. From the next cycle on, `twinkle_controller` stops issuing ticks. This
   freezes every counter and the photodetector pipeline.
3. `twinkle_report_collector` picks the lowest pending identity each cycle,
   puts it on `rep_valid / rep_loc / rep_id` and clears that cell's flag.
4. When no flag is left, ticking resumes where it stopped.

A report with n identities costs n + 1 stall cycles. The TWINKLE proposal asks only
for "a proper encoding" of the identities. The priority encoder and the stall
are choices made in this design.

## Sequencing and timing of one line

1. **Load.** Wait until `busy` is low. Write cell registers over the lanes:
   A, weight and B for progression cells, B and weight for single-hit cells.
   This is one word per lane per cycle. The lanes go through one register
   stage, so a write takes effect two cycles after it is presented. An
   assertion flags any load while `busy` is high.
2. **Start.** Pulse `start` with `line_len = L`, `t_rat` and `t_alg`.
3. **Sieve.** Tick j (`sieve_tick` high) is location j for j < L. The line
   then runs 10 more ticks with no valid location. These let the last
   flashes reach their queries and every counter pass its reload state.
4. **Read out.** Each report adds identities on the output and stall cycles,
   as described above.
5. **Finish.** `done` pulses for one cycle. The line took
   L + 10 ticks plus, for each report, (identities + 1) stall cycles. A
   cycle counter for stalls (`stall_cycles`) and a report counter
   (`ev_count`) are provided.

Progression cells keep their A registers across lines. For a new special-q
line the host rewrites only the B registers and the single-hit cells.

## Top-level interface (`twinkle_device`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `load_valid` | in | LOAD_LANES | one write per lane |
| `load_word` | in | `load_word_t [LOAD_LANES]` | `{id[15:0], sel[3:0], data[CNT_W-1:0]}` |
| `start` | in | 1 | start a line (only accepted while idle) |
| `line_len` | in | LOC_W | locations in the line |
| `t_rat`, `t_alg` | in | SUM_W | thresholds (report when both sums are greater) |
| `busy`, `done` | out | 1 | line in progress; end-of-line pulse |
| `sieve_tick` | out | 1 | array clock enable (one location) |
| `rep_valid`, `rep_loc`, `rep_id` | out | 1, LOC_W, ID_W | reported identity and its location |
| `ev_count`, `stall_cycles` | out | 32 | number of reports and stall cycles since reset |
| `sum_rat`, `sum_alg` | out | SUM_W | registered light sums of the previous tick |

Register selects (`reg_sel_e`) are `SEL_A`, `SEL_WEIGHT`, `SEL_BRAT`,
`SEL_DISARM`, and `SEL_BALG0 + k` for algebraic root k. The 16-bit id
field limits an array to 65,536 cells. A single-hit cell
accepts both `SEL_BRAT` and `SEL_BALG0` for its B register.

Lane k reaches the cells k·BANK to k·BANK+BANK−1, where
BANK = ⌈N / LOAD_LANES⌉. A word whose id belongs to another bank is ignored.

Parameters: `N_AP_CELLS` (2056), `N_HIT_CELLS` (17944) and `LOAD_LANES` (10,
the tenfold parallel reload). The package sets `CNT_W` = 25 (primes below
2^24), `LOC_W` = 16 and `W_W` = 5. From these, `ID_W` = ⌈log2 N⌉ and
`SUM_W = W_W + ⌈log2(N+1)⌉`.

## Departures and choices

* **Counters.** The counters are synchronous, not ripple counters. They have
  the same states and timing, but not the power saving.
* **Optical parts.** The LEDs, photodetectors, clocking LED and lens are
  ideal. The light sum is an exact integer sum, and every optical path has
  the same, fixed delay. There is no analog noise, and no threshold
  tolerance is modelled.
* **Intensity.** Intensity is a loaded 5-bit register, not a property fixed
  at manufacture.
* **Report read-out.** Identities are read out by stalling the array and
  priority-encoding the flags. The TWINKLE proposal gives no encoding.
* **Armed bit and `SEL_DISARM`.** Both are additions. They let unused or
  finished counters stay dark.
* **Progression cells.** Progression cells are single-progression variants,
  half rational and half algebraic. Multi-root cells exist as
  `twinkle_cell` parameters but are not placed in the default array.
* **Line-end drain.** Every line ends with a fixed drain of 10 ticks.
* **Small primes.** Primes below 10 cannot be handled by a progression cell.

## Sizes and what they hold

* **512-bit special-q sieving.** This is the target. A line needs about
  12,056 pairs (2,056 progressions plus about 10^4 hits) and has 8,192
  locations. The array has 20,000 cells and a 16-bit location counter. A
  line takes 8,202 ticks plus the read-out stalls.
* **768-bit special-q sieving.** This needs a wafer up to about nine times
  larger, around 1.8·10^5 cells. Lines are also longer, about 69,000
  locations, so raise `LOC_W`. Primes above 2^24 would need a larger
  `CNT_W`.
* **512-bit line sieving.** This needs π(2^24) ≈ 1.08·10^6 multi-register
  cells and lines of 1.8·10^10 locations (`LOC_W` ≥ 35). That is far beyond
  the default array.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_twinkle_counter` | flash/report positions of progressions for several primes (up to 2^24−3) with idle cycles in between; single-hit disarm; dark when unloaded |
| `tb_twinkle_cell` | 1 rational + 5 algebraic registers: both LEDs tick by tick, query/report window, rep_clr, disarm |
| `tb_twinkle_hit_cell` | single flash, colour, report only for a query exactly 8 ticks later |
| `tb_twinkle_photodetector` | sums, strict thresholds, query exactly 8 ticks later with its location, freezing between ticks |
| `tb_twinkle_report_collector` | ascending order, one identity per cycle, each exactly once |
| `tb_twinkle_controller` | location sequence, L + 10 ticks, stalls while busy, cycle count |
| `tb_twinkle_device` | whole array (240 cells, 4 lanes, two 512-location lines) against a software sieve model: every reported (location, identity) pair, ticks, stall cycles; counts parallel loads, stalls, multi-identity reports, single-hit reports and reports after a progression reload, and fails if any never happened |
| `tb_twinkle_device_line` | the same on 512 progression cells and 1,536 single-hit cells, 10 lanes, over one full 8,192-location line |

To run one with Verilator:

```
verilator --binary --timing --assert --top-module tb_twinkle_device \
    rtl/twinkle_pkg.sv -y rtl -y tb tb/tb_twinkle_device.sv
./obj_dir/Vtb_twinkle_device
```

The largest array simulated so far is the one in `tb_twinkle_device_line`,
with 2,048 cells and a full 8,192-location line. The default array of 20,000
cells lints and elaborates in about two minutes. Verilator flattens the cells
into over 200 C++ files, though, so a simulation build at the default size
takes more than an hour of compile time. To simulate that size anyway, set
the sizes in a copy of `tb_twinkle_device_line` to the defaults. Use
`NAP = 2056`, `NHIT = 17944` and `HUSED = 10000`, and drop the parameter
overrides. The checking code works at any size.

## Files

* `rtl/twinkle_pkg.sv` – widths, state encodings, register selects, load word, `b_init` / `a_value`
* `rtl/twinkle_counter.sv` – B register
* `rtl/twinkle_cell.sv` – arithmetic-progression cell
* `rtl/twinkle_hit_cell.sv` – single-hit cell
* `rtl/twinkle_photodetector.sv` – light sums, thresholds, query delay
* `rtl/twinkle_report_collector.sv` – identity read-out
* `rtl/twinkle_controller.sv` – tick sequencing, stall, drain
* `rtl/twinkle_device.sv` – the array
