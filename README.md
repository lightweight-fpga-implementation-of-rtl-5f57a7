# Power-aware online FIPS 140-2 monitor for a random number generator

A random number generator fails silently: a broken entropy source still emits
bits. FIPS 140-2 therefore asks for the generator's output to be checked while
it runs. The standard's four statistical tests are monobit, runs, long run and
poker, each applied to a 20000-bit sample. This RTL runs all four in hardware,
on the bit stream itself, with a few hundred flip-flops. It is built around
three ideas:

* **Cheap tests first.** Monobit, runs and long run need only counters. The
  poker test needs two small RAMs and a wide accumulator. The monitor runs the
  cheap tests on a first sample. Only if they pass does it run the poker test,
  on a second sample. The poker logic is clock-enabled off the rest of the
  time.
* **A poker test with no multiplier.** The poker statistic needs the sum of
  the squared block counts. The monitor does not square anything at the end.
  It keeps each square up to date while bits arrive, using
  (n+1)^2 = n^2 + 2n + 1. The next section explains this.
* **A status bus that is hard to fake.** The verdict is a 4-bit code, and only
  one of the 16 codes means "pass". A single stuck or glitched wire cannot turn
  a failure into a pass.

Random bits reach the consumer (`xfer_bit`/`xfer_valid`) only after both
samples have passed. Any failure raises `alarm` and stops the monitor until
reset.

## The poker test without a multiplier

For m = 4 the 20000-bit sample is cut into 5000 blocks of 4 bits. If n_i is
the number of blocks with value i (0..15), the test statistic is

    X = (16 / 5000) * S - 5000,   where S = sum over i of n_i^2

and the sample passes if 2.16 < X < 46.17.

**While the bits arrive.** Two 16-word RAMs hold n_i (13 bits) and n_i^2
(25 bits). When block i is complete, both words at address i are read. On the
next cycle these two values are written back:

    n_i   <- n_i + 1
    n_i^2 <- n_i^2 + (n_i << 1) + 1

The shift is wiring. The `+ 1` is the adder's carry-in. So each table needs a
single adder and no multiplier. The read happens in the cycle of the block's
last bit and the write in the next cycle. The next block cannot complete
sooner than four bits later, so updates never overlap. An assertion in
`poker_test` checks this.

**After the last bit.** The square table is read once, one word per cycle,
and summed into S. This takes 16 cycles. There is no division: X's scale and
offset are folded, at elaboration time, into two integer bounds on S:

    2.16 < X  <=>  S > (N/m + 2.16) * N / (m * 2^m)   = 1563175
    X < 46.17 <=>  S < (N/m + 46.17) * N / (m * 2^m)  = 1576928.125

The hardware therefore only checks `1563175 < S <= 1576928`. The bounds are
computed from the `N_BITS` and `M` parameters, so they follow any change of
sample size. S always has the parity of the number of blocks (an even number
here), so the pass band holds exactly the even values 1563176 to 1576928.

**No clearing pass.** The RAMs are never cleared. A 16-bit register records
which words have been written since the last `clr`. A word that has not been
written is read as zero. The two RAMs need no reset, behaving like block or
LUT RAM.

**Timing.** `done` rises 18 cycles after the sample's last bit (2^m + 2).

## The three cheap tests

All four tests share one interface: `en`, `clr`, `bit_valid`, `bit_in`,
`last`, `done`, `pass`. `clr` clears the test before a sample. Each cycle with
`bit_valid` high delivers one bit. `last` marks the 20000th bit. `done` and
`pass` are valid from the next cycle and hold until the next `clr`. `en`
freezes the test.

| test | hardware | passes if |
|---|---|---|
| monobit (`monobit_test`) | one 14-bit counter of ones, saturating at 16383 | 9725 < ones < 10275 |
| runs (`runs_test`) | 12 counters, 12 bits, saturating: runs of 0s and of 1s of length 1, 2, 3, 4, 5 and ≥6, plus a 3-bit current-run length | each count strictly inside (2315,2685), (1114,1386), (527,723), (240,384), (103,209), (103,209) |
| long run (`long_run_test`) | 5-bit current-run counter, saturating at 31, and a sticky flag | no run of 0s or 1s reaches 26 bits |

A 14-bit counter cannot count to 20000. It does not need to, because the
verdict is already "fail" long before it saturates. The same reasoning sets
the 12-bit run counters.

The runs test counts a run when the bit changes. It also counts the run still
open at the last bit. If the last bit starts a new run, two counters of
opposite polarity step in the same cycle.

## Control sequence

`fips_control` is a small FSM with a 15-bit sample counter:

    IDLE --start--> ACQ_LOW --20000th bit--> WAIT_LOW --cheap tests pass--> ACQ_HIGH
    ACQ_HIGH --20000th bit--> WAIT_HIGH --all four pass--> XFER --start--> ACQ_LOW ...
    any failure in WAIT_LOW or WAIT_HIGH --> ALARM (stays until reset)

* **ACQ_LOW.** `rng_en` is high and bits go to the monobit, runs and long-run
  tests.
* **ACQ_HIGH.** A fresh sample goes to all four tests. The cheap tests stay on
  here, so the sample checked just before transfer has passed the full suite.
* **WAIT_LOW / WAIT_HIGH.** `rng_en` is low, and bits that still arrive are
  ignored. The verdict comes 1 cycle after the last bit in the low phase and
  19 cycles after it when the poker test runs.
* **XFER.** `rng_en` is high and every valid source bit is forwarded on
  `xfer_bit`/`xfer_valid`. A new `start` begins the next test cycle.
* **ALARM.** `alarm` is high, the status shows the failure code, and `start`
  is ignored.
* **`clr`.** The FSM pulses `clr` in the cycle before each sample.
* **`force_all`.** If `force_all` is high with `start`, all four tests run on
  the first sample and transfer follows it directly. This is the worst-case
  activity mode, for power measurement.

A complete test cycle takes 40000 bits plus about 20 cycles. At one bit per
clock and 200 MHz this is about 200 µs.

## Status bus

`status` is registered and typed `fips_pkg::status_e`:

| code | meaning |
|---|---|
| 0000 | idle |
| 0011 | testing, low-power phase |
| 0101 | testing, poker phase |
| **1010** | **pass: transfer enabled** |
| 0110 | fail: monobit |
| 1001 | fail: runs |
| 1100 | fail: long run |
| 1111 | fail: poker |

Every code has an even number of ones. Any other code therefore differs from
`1010` in at least two bits. A consumer must treat every value other than
`1010`, including unused codes, as "not pass". If several tests fail on the
same sample, the code names the first of monobit, runs, long run, poker.

## Top level: `fips140_monitor`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous active-low reset; the only exit from ALARM |
| `start` | in | 1 | begin a test cycle (from IDLE or XFER) |
| `force_all` | in | 1 | all four tests on the first sample |
| `src_sel` | in | 1 | 0: external source `trng_bit`/`trng_valid`; 1: internal LFSR |
| `trng_bit`, `trng_valid` | in | 1, 1 | external entropy source, at most one bit per cycle |
| `rng_en` | out | 1 | enable for the source (acquisition and transfer states) |
| `status` | out | 4 | status code, see above |
| `alarm` | out | 1 | failure, held until reset |
| `xfer_bit`, `xfer_valid` | out | 1, 1 | random bits released to the consumer |
| `poker_sum` | out | 25 | last S = sum n_i^2, for observation |

The internal source, `lfsr_rng`, is a 32-bit Fibonacci LFSR
(x^32 + x^22 + x^2 + x + 1). It stands in for a real generator during power
measurement, where it adds almost no activity of its own. Change `src_sel`
only while the monitor is idle.

Parameters: `N_BITS` (default 20000) and `LFSR_SEED`. `poker_test` also has
`M` (default 4), from which the table depth, the widths and the S bounds
follow. The monobit, runs and long-run bounds are the 20000-bit values in
`fips_pkg`. If you change `N_BITS`, change those bounds too.

## Files

| file | contents |
|---|---|
| `rtl/fips_pkg.sv` | sample size, test bounds, status codes |
| `rtl/fips140_monitor.sv` | top level |
| `rtl/fips_control.sv` | control FSM, sample counter, status encoder |
| `rtl/monobit_test.sv`, `rtl/runs_test.sv`, `rtl/long_run_test.sv` | low-power tests |
| `rtl/poker_test.sv` | multiplier-free poker test |
| `rtl/poker_ram.sv` | 2^m-word simple dual-port RAM, synchronous read |
| `rtl/lfsr_rng.sv` | LFSR bit source |
| `tb/fips_ref_pkg.sv` | software reference of the four tests; sample generators |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

    verilator --binary --timing --assert -y rtl rtl/fips_pkg.sv tb/fips_ref_pkg.sv \
        tb/tb_fips140_monitor.sv --top-module tb_fips140_monitor -o sim
    ./obj_dir/sim

Replace `fips140_monitor` with `ten_instance_measurement`, `poker_test`,
`runs_test`, `monobit_test`, `long_run_test`, `fips_control`, `poker_ram` or
`lfsr_rng` to run the other testbenches. Each runs in well under a second.

The expected results come from `fips_ref_pkg`, which evaluates the FIPS
definitions directly in software, computing the poker X in floating point. The
testbenches cover:

* **Monobit.** Samples with exactly 9725, 9726, 10274 and 10275 ones.
* **Long run.** Runs of 25 and 26 bits, of 0s and of 1s, at the start, middle
  and end of a sample.
* **Runs.** All twelve counters are compared on random, biased and periodic
  samples, including a first or last bit that forms a run of its own.
* **Poker.**
  * Samples constructed to give S = 1563174, 1563176, 1576928 and 1576930,
    just inside and outside both bounds.
  * Constant and skewed samples.
  * The 18-cycle latency.
* **Control.** Every path through the FSM, with stand-in tests.
* **Top level.** `tb_fips140_monitor` runs the complete design at its default
  size.
  * It captures the bits the tests consume and predicts each status code with
    the reference.
  * It also checks the verdict latencies and the forwarded bits.
  * It covers the LFSR source and an external source with idle cycles.
  * It covers restart from transfer, `force_all`, and an alarm from each test.
    The poker alarm comes from a sample that passes the three cheap tests.
  * It checks that the alarm ignores `start`.
* **Power-measurement setup.** `tb_ten_instance_measurement` runs the setup
  behind the reference power figures, at the default size.
  * Ten monitors run side by side, each with its own LFSR seed.
  * They run first in `force_all` mode, then in the normal two-phase mode after
    a restart from transfer.
  * Every verdict is checked against the reference.

## Where this RTL makes its own choices

These points follow the architecture described above. The items below were
not specified for it and were settled here:

* **Two samples per test cycle.** The poker test runs on a second, fresh
  sample because nothing stores the first one. The cheap tests also run on that
  second sample.
* **Status code values** and the failure priority.
* **Inputs and outputs added here:** `start` (the test cycle is not
  free-running), `force_all`, `src_sel` and `poker_sum`.
* **Test bounds.** Poker bounds: 2.16 < X < 46.17, taken from FIPS 140-2.
  Runs bounds: open intervals. FIPS 140-2 prints them as ranges; the two
  readings differ only when a count lands exactly on a bound.
* **Widths and saturation.** Run-counter width (12 bits) and the saturation of
  all counters.
* **Poker details.** The "written" flags, the RAM port arrangement and read
  timing, and taking the first bit of a block as its MSB. The last choice does
  not change X.
* **LFSR.** Length, polynomial and seed.
* **Power saving.** It is by clock enables (`en`), not by gated clocks.

## Reference figures

A single instance of this architecture was reported on a Kintex-7 XC7K325T
with these figures:

* **Resources:** 397 flip-flops, 440 LUTs and 38 LUTs used as memory.
* **Clock:** 399.8 MHz maximum.
* **Power:** 3.15 mW at 200 MHz, measured as the difference between running
  and idle over ten instances fed by an LFSR.
* **Energy per bit:** 3.15 mW × 5 ns = 15.75 pJ per tested bit.

This RTL accepts one bit per clock, as that energy figure assumes. A generic
coarse synthesis of this RTL gives 306 flip-flop bits and 608 RAM bits per
instance. No FPGA place-and-route or power measurement has been done on this
code.
