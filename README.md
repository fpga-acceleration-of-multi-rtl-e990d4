# Multi-factor Gaussian copula CDO pricer

This is an FPGA pricing engine for synthetic CDO tranches. It uses Monte Carlo
under the multi-factor Gaussian copula model. For every time step t_k of a
deal it estimates the expected tranche loss E[L^(t_k)]. A host turns these
numbers into the premium and default legs. The engine gets its speed from two
levels of parallelism:

* **Inside a pricing core.** A pipeline finishes one instrument of one
  Monte-Carlo path every max(PC, CC) cycles:
  * the factor sum uses four factors per cycle;
  * eight comparators test eight time steps per cycle.
* **Across cores.** Several identical cores run independent paths of the same
  deal, each with its own random numbers. A Collector combines their sums.

The architecture follows the integer variant of the published design
"FPGA Acceleration of Multi-Factor CDO Pricing" (Kaganov, Lakhany, Chow). In
that variant, losses are 42-bit integers, the path accumulator is 54 bits and
five cores fit a Virtex-5 SX50T. The RTL here is written from that
description. Where it had to fill gaps, this is said below and in each file's
header.

## The model in hardware terms

For instrument i (N of them), path x, F systemic factors X_j and an
idiosyncratic factor Z_i, all standard normal:

    Y_i          = sum_j alpha_ij X_j + beta_i Z_i           creditworthiness index   (Stage 1)
    L(t_k, x)    = sum_i R_i [Y_i < H(Ind_i, t_k)]           pool loss                (Stages 2, 3)
    L^(t_k, x)   = min(D - A, max(L(t_k, x) - A, 0))         tranche loss             (Stage 4)
    E[L^(t_k)]   = (1/P) sum_x L^(t_k, x)                    expectation              (Stage 5 + Collector)

The other symbols are:

* R_i: the recovery-adjusted notional.
* H(b, t_k): default barrier curve b.
* Ind_i: which curve instrument i uses. Deals typically have only a handful of
  distinct curves.
* A: the attachment point. D - A is the tranche width.
* P: the number of paths.

## Number formats

| Quantity | Format |
|---|---|
| X, Z, alpha, beta, Y, H | signed fixed point 5.27, 32 bits (`fx_t`) |
| R, pool loss, tranche loss, A, D - A | unsigned integer cents, 42 bits (`money_t`) |
| per-core sum over paths | 54 bits (`acc_t`) |
| Collector total over cores | 57 bits |
| result | 57-bit cents, rounded to nearest |

Products of 5.27 values are truncated to 5.27 and sums wrap. Keep
|alpha|, |beta| ≤ 1 and the index well inside ±16.

Capacity limits:

* One 512 × 32 block RAM per bank bounds the data:
  * N ≤ 512;
  * T ≤ 64;
  * up to 64 barrier curves;
  * N · ceil(F/4) ≤ 512 correlation entries per lane.
* The systemic-factor buffer allows up to 1024 factors per path.
* The correlation memory is the real limit on F. At N = 400, F can be at most
  4; at N = 125, F can be 16.

## Top level (`cdo_pricer`)

```
host_in ─► FIFO ─► Distributor ──memory broadcast, start──► core 0 … core NCORES-1 ─► per-core FIFOs
                        │                                                              │
                        └──────────── job {T, P} ──────────► Collector ◄───────────────┘
                                                                │
                                                   host_out ◄── FIFO
```

* `NCORES` (default 5) cores are fed the same data.
* The two host ports are valid/ready streams of 64-bit words. A PCI Express
  endpoint would connect there; the endpoint itself is not part of this RTL.
* `busy` is high while anything is queued or computing.
* `events` brings out the five mechanism pulses below, each ORed over the
  cores.

### Host words and the register map

An input word is `{target[63:60], address[59:44], data[43:0]}`.

| target | name | address | data |
|---|---|---|---|
| 0 | CFG | register number | register value |
| 1 | ALPHA | `{lane[1:0], entry[8:0]}`: alpha_ij goes to lane j mod 4, entry i·ceil(F/4) + floor(j/4) | 5.27 |
| 2 | BETA | instrument i | 5.27 |
| 3 | R | instrument i | cents |
| 4 | H | `{curve[5:0], step[5:0]}` | 5.27 |
| 5 | IND | instrument i | curve number |
| 15 | START | – | – |

The configuration registers are:

| # | Register | Meaning |
|---|---|---|
| 0 | PATHS | total Monte-Carlo paths P. P must be at least NCORES. |
| 1 | INSTR | N |
| 2 | STEPS | T |
| 3 | FACTORS | F |
| 4 | ATTACH | A, in cents |
| 5 | WIDTH | D − A, in cents |

Each result word is `{last[63], step[62:57], E[L^(t_k)] in cents[56:0]}`. A
simulation produces T result words, k = 0..T−1, and `last` marks k = T−1.

### Double buffering and overlapped loading

Every input memory has two banks: alpha, beta, R, Ind and the eight barrier
memories. Memory words always go to the bank the cores are *not* reading.
Configuration words go to shadow registers. A START word works as follows:

1. It waits until every core is idle and its random generators have
   initialised. The `start_wait` event is high while it waits.
2. It swaps the banks.
3. It copies the shadow configuration into every core.
4. It gives core c floor(P/NCORES) paths, plus one path if c < P mod NCORES.
5. It queues the job {T, P} for the Collector.

The host may therefore send the next data set while the current simulation
runs. The `overlap_load` event marks each word loaded that way. It then sends
START once more.

Two rules follow from this:

* Data that does not change between simulations must still be re-sent.
  After a swap, the loading bank holds the data of two simulations ago.
* The configuration registers keep their values, so they need only be sent
  when they change.

### Collector

Each core leaves its T per-step sums in its own FIFO. For each step, the
Collector:

1. visits the cores in turn through an (NCORES,1) mux;
2. adds their sums;
3. queues the total with P;
4. divides by P with a bit-serial restoring divider, about 57 cycles per step.
   The result is rounded to the nearest cent: (total + floor(P/2)) / P.

A four-entry job queue means the cores can already run the next simulation
while the Collector is still busy.

## Pricing core (`cdo_core`)

### Stage 1: creditworthiness index (`stage1`, `fam`, `wallace_grng`)

Stage 1 has two Wallace-style Gaussian generators, one for the X factors and
one for the Z factors. Each produces one 5.27 sample per cycle:

* The generator keeps a pool of 256 values.
* Every fourth cycle it replaces one value from each pool quarter with the
  orthogonal 4-point transform t = (a+b+c+d)/2, a' = t − a, and so on. The
  four new values are the next outputs.
* After reset the pool starts as ±1 pairs of opposite sign, and `valid` rises
  after 256 cycles. The transform preserves the pool sum, so a non-zero start
  sum would bias every sample.
* There is no chi-square correction of the pool energy.

The **Factor Accumulation Module** has eight memories: four lanes of alpha and
four lanes of X. Each cycle it:

1. reads one group of four factors;
2. zeroes the lanes beyond F;
3. multiplies the four lanes;
4. adds them in a two-level tree;
5. accumulates the group sum.

An instrument thus takes **PC = ceil(F/4)** cycles.

The X memories are double buffered by path. While the accumulator uses path
p's factors, the X generator writes path p+1's into the other half. A path
waits only if its factors are not complete yet, which is the `x_wait` event.
That happens when F > N · PC, i.e. when there are more factors than the
instruments take cycles.

beta_i · Z_i is formed alongside and added. The resulting Y_i goes into an
8-entry FIFO towards Stage 2. The FAM starts an instrument only while fewer
than 8 are in flight or queued (credit counting), so the FIFO never overflows.

### Stages 2 and 3: pool loss (`pool_loss`, `comparator`)

There are eight comparator replicas. Replica c handles time steps k = 8m + c,
so one Y occupies the comparators for **CC = ceil(T/8)** cycles. Each replica
works as follows:

* It reads H(Ind_i, t_k) from its own barrier memory at entry {curve, m}.
* It tests Y_i < H.
* It adds R_i or 0 into its partial-loss memory at entry m, with a two-cycle
  read-modify-write.
* R_i and Ind_i are read once per instrument from memories shared by all
  replicas.

**Producer/consumer balance.** Stage 2 needs a new Y every CC cycles and
Stage 1 supplies one every PC cycles. When PC > CC, Stage 2 waits; this is
the `y_starve` event. When PC ≤ CC, Stage 1 runs ahead into the FIFO and the
factor count costs nothing. A path therefore takes about N · max(PC, CC)
cycles.

**Two partial-sum banks when T ≤ 8.** With CC = 1, consecutive instruments
update the same word on consecutive cycles, which the two-cycle
read-modify-write cannot do. Each replica therefore has two partial-loss
banks, and instruments alternate between them by index parity. For T > 8
only bank 0 is used.

**Stage 3 read-out.** After the path's last instrument has left the pipeline,
Stage 3 reads out one time step per cycle for k = 0..T−1:

1. Two (8,1) muxes pick replica k mod 8 from bank 0 and bank 1, at entry
   floor(k/8).
2. An adder combines the two banks.
3. A (2,1) mux selects the sum (T ≤ 8) or bank 0 alone.

The read also clears the entries for the next path. Stage 2 takes no new Y
during the read-out; this is the `draining` event. It costs T cycles plus
about four cycles of pipeline flush per path, and it dominates for small
pools such as N = 14.

### Stage 4: tranche loss (`tranche_loss`)

Stage 4 computes min(D − A, max(L − A, 0)) with one subtractor, two compares
and a 3-way mux. It has one register stage.

### Stage 5: path accumulation (`path_accum`)

Stage 5 keeps one 54-bit sum per time step. On the first path of a simulation
it overwrites the sum instead of adding, so nothing needs to be cleared. After
the core's last path it copies the T sums into the core's output FIFO. The
core's `busy` output drops once they are there.

## Departures and interpretations

* **Number representation.** Only the integer variant is built. The single-,
  double- and hybrid floating-point variants of the original work are not.
  Losses are in cents.
* **Stage 3 structure.** The original describes two (8,1) muxes, an adder and
  a (2,1) mux, and says the integer pipeline creates few partial sums. It
  does not say how many partial sums there are or when they are used. The
  two-bank scheme above is this design's reading.
* **CC formula.** One passage states that a new Y is needed every ceil(T/4)
  cycles; the formal definition and the eight-replica hardware give
  ceil(T/8). The design uses ceil(T/8).
* **Gaussian generator.** The original only names a Wallace generator
  producing one sample per cycle. The pool size, addressing and start-up pool
  are this design's own. Its statistical quality has only been checked on the
  first four moments.
* **Design-specific choices.** The following are this design's own:
  * the host word format, the register map and the result word;
  * all FIFO depths;
  * rounding in the divider;
  * splitting the remainder of P over the first cores;
  * the start-while-busy rule.
* **Host link.** The PCI Express link is not included.

## Simulating

All files are plain SystemVerilog 2017. `rtl/cdo_pkg.sv` must come first.
Each testbench builds on its own with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/cdo_pkg.sv tb/tb_cdo_pricer.sv --top-module tb_cdo_pricer
obj_dir/Vtb_cdo_pricer +verilator+rand+reset+2
```

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and has a
watchdog.

| Testbench | What it checks |
|---|---|
| `tb_fsl_fifo` | FIFO ordering, full/exists, fall-through, random traffic against a queue |
| `tb_wallace_grng` | start-up time, one sample per cycle, mean/variance/skew/kurtosis |
| `tb_fam` | factor sums against a software model for several F (lane masking, PC cycles per instrument), X double buffering, `x_wait` |
| `tb_stage1` | Y against a model built from the generators' own samples, FIFO credit flow |
| `tb_pool_loss` | pool losses per step against a model, for one-bank and two-bank cases, starvation and read-out |
| `tb_tranche_loss` | random and corner losses against the formula |
| `tb_path_accum` | per-step sums over paths, restart, output handshake |
| `tb_cdo_core` | exact losses with "always/never/alternating" barriers, and a statistical run |
| `tb_distributor` | decoding, bank swap, path split, start waiting for busy cores |
| `tb_collector` | sums, rounding and ordering across cores and queued jobs |
| `tb_cdo_pricer` | whole design at default size, two overlapped simulations, every mechanism counted |
| `tb_benchmarks` | whole design at default size on four benchmark-sized deals (see below) |

`tb_cdo_pricer` and `tb_benchmarks` use the top with no parameter overrides.
`tb_benchmarks` loads four deals of benchmark size, each while the previous
one runs:

| Deal | N | T | F | Regime |
|---|---|---|---|---|
| CDX.EM | 14 | 6 | 16 | PC > CC |
| CDX.NA.HY | 100 | 15 | 8 | PC = CC |
| 400-name semi-homogeneous pool | 400 | 24 | 4 | PC < CC |
| CDX.NA.IG | 125 | 35 | 16 | |

For each deal the testbench:

* draws notionals of 20/50/100/200 million;
* builds correlation factors by stick-breaking;
* uses barrier curves whose outcome at each step is certain or has
  probability exactly ½, so every expected loss is known;
* checks the 80 per-step results;
* checks that each core's run time lies between N · max(PC, CC) and that plus
  the read-out and pipeline fill per path.

With 500 paths it measured 57, 220, 1229 and 666 cycles per path.

On a small machine the default-size tests take seconds to a few minutes.
Several block testbenches override `POOL` or `NCORES` to stay short.
