# Parametric maximum-frequency BIST with an on-chip PLL

Test equipment finds a chip's maximum clock frequency by sweeping an externally
applied clock, and at high clock rates its timing accuracy no longer keeps up.
This design moves that sweep onto the chip. The on-chip PLL is used as a
programmable frequency source, and the circuit under test (CUT) runs its own
LFSR/MISR built-in self-test at each frequency. A small controller searches for
the highest frequency at which that self-test still passes.

The PLL output is

    f_out = N / M * f_in

with a reference divider M in front of the phase detector and the usual feedback
divider N. M stays fixed during a test, so N is the frequency in steps of
`f_in / M`. The controller starts at a scanned-in N and runs the CUT's BIST. After
each pass it stores N and raises N by one. It stops at the first failure, or once N
exceeds `N_MAX`. The output register then holds the last passing N, and

    f_max = result * f_in / M

With the default numbers (f_in = 33 MHz board clock, M = 10, `N_MAX` = 28) the
step is 3.3 MHz and the highest frequency tested is 92.4 MHz. `N_MAX` is 28, not
the 50 that the PLL's input range would allow. Above roughly N = 28 the damping
of this kind of charge-pump PLL (it falls as 1/sqrt(N)) drops below 0.5, and
lock can no longer be trusted.

## Why the search is linear

A shmoo plot (pass/fail over clock period and supply voltage) of a real circuit
need not have a single pass/fail boundary. Consider a circuit that passes
at every period of 14.3 ns and above, fails between 14.3 ns and 12.8 ns, and
then passes again in an "island" of shorter periods. A binary search, or any
search that steps over the fail band, can land in the island and report a
maximum frequency the part does not have. A linear search whose step is smaller
than the fail band cannot miss the band. Here the band is 69.93 to 78.125 MHz, or
8.2 MHz wide. The 3.3 MHz step hits it twice (N = 22 and N = 23), and the search
stops at N = 21, i.e. 69.3 MHz.

## Blocks

| Block | Module | Clock | What it does |
|---|---|---|---|
| Control FSM | `pbist_control_fsm` | f_in | start → initialise → search → done |
| Initialisation logic | `pbist_initial` | f_in | Register M and Register N, scan chain, N ±1 |
| Test FSM | `pbist_test_fsm` | f_in | the linear search and the CUT handshake |
| Interface | `pbist_interface` | f_in | output register and serial read-out |
| Divider M | `pbist_divider` | f_in | f_in → f_in/M, reference to the PLL |
| Divider N | `pbist_divider` | f_out | f_out → f_out/N, PLL feedback |
| Top | `pbist_top` | both | wiring; the PLL and the CUT are outside |

Helpers are `pbist_pkg` (widths, defaults, state types) and `pbist_sync2`, a
two-flip-flop synchroniser.

The PLL and the CUT are not part of the RTL. Both already exist on a chip that
carries this BIST, and the PLL is analog. `pbist_top` brings their signals out:
`pll_ref`, `pll_fb`, `pll_fout` and `pll_lock` go to the PLL, and `test_on`,
`test_ready` and `good` go to the CUT. Behavioural models of both are in `tb/`.

## The search, step by step (`pbist_test_fsm`)

    CHECK   N > N_MAX ?  yes -> DEC
    SETTLE  wait SETTLE_CYCLES clk cycles (default 128)
    LOCK    wait for the synchronised lock
    RUN     test_on = 1 until test_ready
    SAMPLE  take good
    RELEASE test_on = 0, wait for test_ready = 0;  fail -> DEC
    STORE   output register <= N
    INC     N <= N + 1, back to CHECK
    DEC     N <= N - 1
    FINISH  test_ok until test drops

After DEC, Register N holds the last passing N, so the PLL is left at the
highest frequency that passed. There is one exception. If the very first N fails,
or already exceeds `N_MAX`, N ends one below its starting value, and the output
register reads 0.

The SETTLE state matters for correctness. When N changes, the PLL keeps
reporting lock until its phase detector has seen a feedback period of the new
length. That can take one or two reference periods, up to `M` board-clock cycles
each. Without the wait, a lock left over from the previous N would start the BIST
at a frequency still in transition. 128 cycles is about 3.9 µs at 33 MHz. That
covers several reference periods for any 6-bit M. Raise it if your PLL's lock
detector is slower.

## Using the pins

Everything is synchronous to `clk` (the board clock f_in). `rst` is synchronous
and active high.

1. **Start and scan-in.** Raise `start` and hold it. In the cycle where `start` is
   first sampled high, the output register is cleared. On each of the next 12 clock
   edges one bit of `scan_in` is shifted into the 12-bit chain {M, N}: M first,
   most significant bit first. Drive bit *k* during the *(k+1)*-th cycle after
   the one in which `start` was sampled.
2. **Search.** This runs on its own. Its length depends on the PLL's lock time and
   the CUT's BIST length.
3. **Done.** `done` goes high. It stays high until `start` is released.
4. **Read-out.** While `read_out` is low, a shift copy follows the output register.
   While `read_out` is high, `data_out` shows the copy's MSB, and the copy shifts
   left once per clock. The 6 result bits therefore appear MSB first in the first 6
   cycles of `read_out`. `result` gives the same value in parallel.

The minimum pin set is `start`, `scan_in`, `read_out` and `data_out`. The `done`
and `result` outputs are conveniences and can be left open.

## PLL and CUT interface

* `pll_ref` is f_in/M and `pll_fb` is f_out/N, the two phase-detector inputs.
  Divider N is clocked by `pll_fout` and takes its reset through a synchroniser.
  Its factor is quasi-static: it changes only while the test FSM is waiting for
  re-lock.
* `pll_lock`, `test_ready` and `good` may come from any clock domain. Each passes
  a two-flip-flop synchroniser.
* CUT handshake (four-phase): `test_on` rises and stays high until `test_ready`
  is seen. `good` must be valid while `test_ready` is high. `test_on` then falls,
  and the FSM waits for `test_ready` to fall before it moves on. The CUT compares
  its MISR with the golden signature itself and reports only `good`.

## Dividers (`pbist_divider`)

Each divider is a synchronous down counter with a parallel preset. At zero it
reloads `div - 1`, so a new factor takes effect at the end of the running
period, with no short or runt period. The output is registered. It is high for
ceil(div/2) input cycles, starting at the reload. Factors 1 and 0 pass the
input clock straight through, so a `div` of 0 behaves like 1.

## Where this RTL makes its own choices

The published description of this BIST names the blocks and signals, gives the
flow of the search and the default numbers, and says that the N divider is a
synchronous counter with a parallel preset. The following choices are this
design's own:

* the states of both FSMs, the settle wait and the four-phase CUT handshake;
* the scan order and timing, the serial read-out protocol, and clearing the output
  register at start (so 0 means "nothing passed");
* the reset values: M = 10 (the default reference divider) and N = 1;
* a single board-clock domain for all control logic, with synchronisers on
  every input from the PLL and the CUT;
* the divider duty cycle and the pass-through for factors 0 and 1;
* the `done` and `result` ports.

The design does not reproduce the original's 0.0474 mm² gate-area figure in a
0.35 µm library, or its PLL stability analysis. Those depend on the cell library
and on the analog loop.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `W` | 6 | width of M and N (values up to 63) |
| `N_MAX` | 28 | highest N tested; 28 for the PLL stability reason above |
| `SETTLE_CYCLES` | 128 | clk cycles to wait after a change of N before lock is trusted |

M is not a parameter. It is scanned in with every start. M = 17 and N = 50, the
extremes for a 2 MHz minimum PLL input and a 100 MHz CUT, fit in 6 bits.

## Simulation models (`tb/`)

* `pll_cp_model`: a charge-pump PLL. A phase/frequency detector drives a
  charge pump of ±I0 into a passive second-order filter: C1 to ground, in
  parallel with R in series with C2. The VCO is linear,
  f = 1 MHz + 80 MHz/V · V. Between detector events the filter voltages advance
  with the exact solution of the RC network. The component values (1.4 µA, 10 pF,
  200 pF, 35.4 kΩ) make the loop's damping
  ζ = R·C2/2 · sqrt(I0·K0 / (2π·C2·N)) about 2.6 at N = 1 and 0.5 at N = 28.
  That is the stability limit behind `N_MAX`. Lock is set after 16 reference
  cycles with a detector pulse under 1 ns. With M = 10 it takes roughly 40 to
  120 µs after a large change of N, and less after a single step.
* `cut_model`: a CUT with a 16-bit LFSR, a logic function and a 16-bit MISR.
  The function's result reaches the capture register only `PATH_DELAY` ns after
  the LFSR changes. A clock period shorter than that makes the MISR signature
  wrong. An optional `[ISLAND_LO, ISLAND_HI]` period window passes anyway, which
  models a pass island.

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and stops on a watchdog if
it hangs.

| Testbench | What it checks |
|---|---|
| `tb_pbist_divider` | period and high time for every factor 2..63, pass-through for 0/1, preset timing |
| `tb_pbist_initial` | reset values, random scan loads, init_ok timing, N ±1 against a model |
| `tb_pbist_interface` | store/clear against a model, MSB-first serial read |
| `tb_pbist_control_fsm` | output sequence for random handshake delays |
| `tb_pbist_test_fsm` | random start N and CUT limits: stored result, final N, settle time, lock before test_on |
| `tb_pbist_top` | whole design at default parameters with the PLL and three CUT models. It covers the N > N_MAX exit, a signature-fail exit, a start above N_MAX, a first-N failure and a second M. f_out is checked against N/M·f_in at every BIST run, and each mechanism (pass, fail, both exits, N ±1, store, lock, lock lost during the settle wait) must occur at least once |
| `tb_pbist_shmoo_gap` | the full 1..28 sweep (result 28, f_out measured at 92.4 MHz) and the pass-island CUT: the linear search stops at N = 21. A search started above the gap reports the island (N = 25) |

To run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
      -y rtl -y tb +libext+.sv -Irtl --top-module tb_pbist_top \
      rtl/pbist_pkg.sv tb/tb_pbist_top.sv
    ./obj_dir/Vtb_pbist_top

`-Wno-fatal` is needed because the PLL model delays by a computed VCO half
period, which Verilator warns about. Every test runs in well under a second.
Every register in the RTL has a reset value (the reset synchroniser of divider
N simply follows `rst`), so results do not depend on initial
values. The island in `tb_pbist_shmoo_gap` spans 12.8 ns down to 12.0 ns; its
lower edge is an assumption, and only its upper edge matters for the linear
search.
