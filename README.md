# Mesochronous pipelined carry-save multipliers

A conventional pipeline needs a clock period at least as long as its slowest stage plus
register overhead. Every register must also see the same clock edge at the same moment,
which takes a large, power-hungry clock tree. A *mesochronous* pipeline drops both
requirements. The clock is not broadcast. It runs down a chain of delay elements beside the
datapath, so each register rank gets its own copy, delayed by about as long as the data
takes to reach that rank. A stage can then be several clock periods deep and hold several
operand sets at once, kept apart only by their timing. The clock period is then set by the
*spread* between a stage's fastest and slowest paths:

    T  >=  (dmax - dmin) of the worst stage  +  t_setup + t_hold + 2*clock_uncertainty

It no longer depends on the stage's total delay. Deep stages mean fewer ranks and a simple
clock path, so the clock network draws less power.

This repository holds synthesizable SystemVerilog for two multipliers built this way, plus
behavioural models of their delay-type parts:

* An **8×8 carry-save array multiplier** in 4 pipeline stages and 5 register ranks. It is
  sized for a 350 ps clock (2.86 GHz) with a sense-amplifier flip-flop in every rank. A
  3-stage, 4-rank variant built from dynamic two-phase flops is one parameter change away.
* A **4×4 test chip** in 2 stages and 3 ranks, for a 1.95 ns on-chip clock. It has a
  selectable ring-oscillator clock, a 2^18 clock divider for watching that clock off chip,
  and slow input and output memory banks. These let operands be loaded slowly, multiplied
  at full speed, and read back slowly.

The two stand side by side in `mpp_top`.

## The clock path: δ and N

The register rank after stage *i* must capture on the clock edge that launched the data
into stage *i*, delayed by

    Δ_i = dmax(i) + clock-to-q + t_setup + clock_uncertainty.

Such a delay is long, often several clock periods. The clock is periodic, though, so only
the remainder has to be built:

    Δ_i = N_i · T + δ_i

The edge that arrives is then the N_i-th later copy of the launching edge. `mpp_clock_path`
builds exactly this chain:

* `clk_rank[0]` is the input clock.
* `clk_rank[i+1]` is `clk_rank[i]` after element *i*.
* `clk_out` is the last rank's clock, handed to whatever consumes the result.

Each element (`clk_delay_element`) delays both edges by `DELTA_PS`. It carries the number
`N` only as documentation of the design point, because in simulation an edge N periods
later is the same waveform. With `TUNABLE=1`, a digitally variable element
(`var_delay_element`) follows each fixed one. Its three control bits C1..C3 select
139.94 ps, 110.81 ps or 96.03 ps. That lets the clock path be retrimmed when stage delays
drift, for example after a change of clock period.

Two sets of bounds apply when N > 1:

* The data must neither arrive after its capturing edge nor overtake the edge before it:
  `dmin + clk-to-q − t_hold − Δclk ≥ (N−1)·T + δ` and `dmax + clk-to-q + t_setup + Δclk ≤ N·T + δ`.
* The clock period has a ceiling as well as a floor. Small N keeps the legal window wide.

These are constraints on the physical delays, so the logic cannot check them. `mpp_pkg`
evaluates them instead, with `t_clk_min`, `stage_clk_delay`, `whole_periods`,
`remainder_delay`, `setup_ok` and `hold_ok`, in integer picoseconds. `tb_mpp_timing`
uses these functions to check the design points below. The package holds the cell
constants they use:

* full-adder delays of 210–280 ps;
* flip-flop setup 10 ps, hold 130 ps and clock-to-q 295 ps;
* clock uncertainty of 10 ps.

For the 8×8 design the worked budget is 350 − (10 + 130 + 2·10) = 190 ps of delay spread
allowed per stage. With four adder layers per stage, Δ = 4·280 + 295 + 10 + 10 = 1435 ps
= 4·350 + 35. That gives the default `N = 4`, `DELTA_PS = 35`.

That edge meets setup by construction. Hold is the harder side. The next operand set,
launched one period later, must not reach the register before the capture is complete.
That holds exactly when the period is at least the delay-spread bound above. So each
stage's fastest path must be within 190 ps of its slowest. Four adder layers whose 70 ps
spreads simply added up would give 280 ps and fail hold. Four layers per stage therefore
depend on delay balancing inside the array keeping the fastest paths slow, for example
buffers padded to an adder's delay. The 3-stage dynamic-flop variant has a wider
budget: at 500 ps its flop leaves 400 ps, room for five layers of 70 ps spread.

### What a zero-delay simulation shows

RTL has no gate delays. The "several operand sets inside one stage" therefore cannot
appear inside the combinational logic in simulation. They appear in the clock path
instead. With the 350 ps clock entering a path whose stages add 96–140 ps each, more than
one rising edge is travelling down the path at once. The end-to-end testbench counts those
moments.

The property that matters for correctness does carry over: the n-th rising edge leaving
the path carries the product of the operands captured by the n-th rising edge entering it.
This holds whatever the skew between ranks, as long as each element's δ stays below one
period. Timing closure of the real circuit (the inequalities above) has to be done on the
gate-level netlist with real delays.

`tb_mpp_inflight` goes one step further. It rebuilds the 8×8 datapath from the same ranks
and stages and gives every bit entering a stage a flight time: clock-to-q plus a logic
delay drawn at random between the stage's dmin and dmax, per bit and per operand set.
The ranks are driven by the default clock path at 350 ps. With a 190 ps spread
(930–1120 ps per stage), the following hold:

* every product is correct, 16 edges after its operands were taken;
* no bit changes inside a register's setup or hold window;
* each stage's logic holds four operand sets at once.

With the spread of four independent 70 ps layers (840–1120 ps), the hold window is
violated thousands of times.

## The carry-save array

An M×M carry-save multiplier reduces M partial-product rows to a sum and a carry vector
with M layers of full adders. It then merges the two vectors with M more layers. Each
merging layer is built from full adders with carry-in 0, i.e. half adders. That makes 2M
layers with no carry-propagate adder. After layer 2M the carry vector is always zero and
the sum vector is the product. This holds for every operand pair; it was checked
exhaustively for M = 2, 3, 4 and 8.

The RTL is organised as follows:

* `pp_gen`: one partial-product row (`x & y[row]`), shifted into place.
* `csa_layer`: one layer. Layers 0..M−1 add a partial-product row into the (sum, carry)
  pair; layers M..2M−1 are the merging half-adder layers. Carries move up one bit per
  layer. The operands travel along with the sums, so each layer makes its own
  partial-product row from operands that have passed through the same ranks.
* `csa_stage`: layers `LO` to `HI−1`, purely combinational.
* `mpp_multiplier`: K stages and K+1 ranks (`pipe_rank`). Each rank holds the whole
  state {x, y, sum, carry}, i.e. 6M dual-rail bits. Stage *g* covers layers
  `rank_layer(g)` to `rank_layer(g+1)` with `rank_layer(r) = r·2M/K`. The product is
  valid K rank-clock edges after the operands are captured.

Registers are placed by an even split of the layers: 4+4+4+4 for the 8×8 design, 4+4 for
the test chip and 5+5+6 for the 3-stage variant. The split of the original circuit was
driven by measured delay spread per stage and is not reproduced. Changing `rank_layer` in
`mpp_pkg` moves the ranks.

### Dual rail

Every signal in the array is a pair: true and complement, produced at the same time. The
full adder computes each output rail only from input rails of the same polarity:

* sum = XOR of the true rails;
* complement sum = XOR3 of the complement rails, which equals the inverted sum;
* carry and complement carry are both majority functions.

The complement rail is thus a genuine second circuit, not an inverter on the first, as in
the transmission-gate differential cell it models. The sense-amplifier flip-flop (`saff`)
captures a differential pair on the rising edge. The product leaves on both rails
(`p`, `p_n`). The testbenches check that the two always agree.

### Flip-flops

`pipe_rank` is built from one of two cells, chosen with `FF`:

* `FF_SAFF` (default): `saff`, a differential rising-edge flop. If the pair is not
  complementary (`d == d_n`) it keeps its state, much like the sense amplifier, which
  resolves only a differential input.
* `FF_DYN`: `dyn_dff`, the dynamic two-phase flop. It is two transparent latches, the
  master open while the clock is low and the slave while it is high, with an inverter
  after each. It is single ended, so a rank uses one per rail. Charge leakage on its
  storage nodes, which sets a lowest usable clock frequency in silicon, is not modelled.
  Synthesis maps it to two latch bits.

## The 4×4 test chip (`tiny_chip`)

The chip's clock and data flow is:

    wr_* (slow) ──► input bank ─► multiplier ranks 0..2 ─► output bank ──► rd_* (slow)
                         ▲              ▲      ▲      ▲            ▲
    ring oscillator ─► clock path: clk_rank[0] [1]    [2] = clk_last
          │
          └─► ÷2^18 divider ─► clk_mon

Its parts work as follows.

* **Clock generator** (`ring_osc_clkgen`): selects 1.95, 2.22, 2.51 or 2.88 ns with
  S1S0 = 11, 10, 01, 00. It is a behavioural model; the real one is an inverter ring
  tapped into a multiplexer.
* **Monitor divider** (`clk_div_jk`): a ripple chain of 18 toggling JK flip-flops. Each
  stage is clocked by the inverted output of the previous one, so the taps count up. At
  1.95 ns the monitor period is 2^18 × 1.95 ns = 511.18 µs.
* **Clock path**: two stages with `N = 1` and δ = 0.90 ns and 1.35 ns. These are the
  stage delays 2.85 ns and 3.3 ns less one 1.95 ns period.
* **Input bank** (`io_bank`): each word holds `{y, x}`, with the multiplicand in the high
  bits. It is written at any slow rate through `wr_clk`/`wr_en`/`wr_addr`.
* **Sequencer**: runs on `clk_rank[0]`. A rising edge on `run` passes through a
  two-flop synchroniser, then starts one pass that reads words 0..DEPTH−1 on consecutive
  clocks. `busy` is high while operands are being issued.
* **Tags**: a valid bit and the operand address travel beside the data in extra ranks
  on the same rank clocks. The output bank is written on `clk_last` at the address the
  operands came from, so `rd_prod` at address *a* is the product of input word *a*.
* **Output bank**: read combinationally through `rd_addr`.

Both the multiplier and the tag ranks use the dynamic flop.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `mpp_multiplier` | `M`, `K`, `FF` | 8, 4, `FF_SAFF` | operand width, stages, flop cell |
| `mpp_clock_path` | `K`, `DELTA_PS[K]`, `N[K]`, `TUNABLE` | 4, 35.0 ps, 4, 0 | stage count, fixed delay per element, whole periods (documentation), add variable elements |
| `var_delay_element` | `D1_PS`, `D2_PS`, `D3_PS` | 139.94, 110.81, 96.03 | delay with one, two or three control bits set |
| `tiny_chip` | `M`, `K`, `DEPTH`, `DIV_N`, `DELTA_PS`, `N`, `T11_PS`..`T00_PS` | 4, 2, 16, 18, {900, 1350}, {1, 1}, 1950..2880 | test-chip configuration and its oscillator periods |
| `ring_osc_clkgen` | `T11_PS` .. `T00_PS` | 1950, 2220, 2510, 2880 | clock period per select code |
| `io_bank` | `WIDTH`, `DEPTH` | 8, 16 | word size, words |
| `mpp_top` | `M8`, `K8`, `T_DEPTH` | 8, 4, 16 | 8×8 size, its stage count, test-chip bank depth |

The 3-stage dynamic-flop 8×8 variant is `mpp_multiplier #(.M(8), .K(3), .FF(FF_DYN))`.

The fabricated chip ran about 2.05× slower than simulated: 3.97 ns clock and stage delays
of 5.84 ns and 6.76 ns. To model it, set the oscillator periods to 3970/4620/5110/5950 ps,
and `DELTA_PS` to {1870, 2790} with `N = {1, 1}`. `tb_tiny_chip` runs this
configuration next to the default one.

## Where this RTL departs from the original circuit

* **Register placement** is an even split of the adder layers, as above.
* **Delays** exist only in the behavioural clock-path models. The logic is zero-delay, so
  a simulation checks function, ordering and edge-to-data pairing, not timing margins.
* **δ and N for the 8×8 design** are worked out from the cell delays (35 ps, N = 4); no
  published values exist. In `mpp_top`, the 8×8 clock path is instead built from the
  variable elements alone (`DELTA_PS = 0`, `TUNABLE = 1`, 96–140 ps per stage), so it can
  be retrimmed through `m8_dly_ctl`.
* **Variable delay codes**: only 001, 011 and 111 have specified delays. The other codes
  take the delay of the listed code with the same number of bits set; 000 acts as 001.
* **Test-chip control** is this design's own: the run/busy sequencer, the address tags,
  the 16-word banks, the resets (`rst` on the sequencer and the divider) and the use of
  the dynamic flop.
* **Reset**: the multiplier ranks have none. The first K outputs after power-up are
  meaningless and should be discarded.
* **Not modelled**: transistor-level cells, layout, delay padding and buffering inside
  the array, and power.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

    verilator --binary --timing --top-module tb_mpp_top -y rtl -y tb +libext+.sv \
              -Irtl rtl/mpp_pkg.sv tb/tb_mpp_top.sv --Mdir obj_top -o sim
    ./obj_top/sim

Substitute any other testbench name for `tb_mpp_top`. The files use `timescale 1ps/10fs`.
The delay models need `--timing`.

| testbench | what it exercises |
|---|---|
| `tb_full_adder` | all 8 input combinations, both rails |
| `tb_saff`, `tb_dyn_dff`, `tb_pipe_rank` | capture on the rising edge only, hold through the period, hold on a non-complementary pair (`saff`) |
| `tb_mpp_multiplier` | 8×8 (latency 4), 3-stage dynamic-flop 8×8 (latency 3), exhaustive 4×4 (latency 2), and an 8×8 whose ranks are skewed 60 ps apart |
| `tb_clk_delay_element`, `tb_var_delay_element`, `tb_mpp_clock_path` | edge delays, all control codes, rank phases and retrimming |
| `tb_ring_osc_clkgen`, `tb_clk_div_jk` | all four periods; divide by 2^4 and by 2^18 |
| `tb_io_bank` | random writes and reads, write enable |
| `tb_tiny_chip` | load 16 pairs, run a pass in each clock mode, read back, busy length, monitor period; both the default chip and the slower as-fabricated one |
| `tb_mpp_timing` | the clock-period budget: 190 ps and 400 ps spread limits, 595 ps conventional period, the 8×8 and test-chip clock-path splits against the module defaults, and setup/hold on random design points |
| `tb_mpp_inflight` | the 8×8 datapath with per-bit flight times on the default clock path: products, setup/hold windows, operand sets per stage |
| `tb_mpp_top` | the whole design at its defaults, described below |

`tb_mpp_top` runs every block at its default size. It pushes 2000 random operand pairs
through the 8×8 multiplier at 350 ps and matches each product to its input edge by edge
count. It counts how often two clock edges were inside the clock path at once, and
retrims the clock path four times while running. It also runs the test chip in two clock
modes and checks the divided monitor clock. A mechanism that never happened counts as a
failure. It takes a few seconds.
