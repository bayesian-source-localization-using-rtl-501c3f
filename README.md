# Bayesian source localisation with stochastic bit streams

A small robot drives around a square arena looking for a light source. It
carries eight photodiodes, one per 45-degree sector around it, and each gives
only a noisy yes/no: a diode may fire because the source lies in its sector,
or because of a reflection or stray light. This design keeps, for every cell
of a K x K grid over the arena, the probability that the source is in that
cell, and updates all of them in parallel by Bayes' rule after every reading.
The cell with the highest probability is the estimate of where the source is.

The arithmetic is done with *stochastic computing*: a probability is carried
as a stream of random bits whose fraction of ones is that probability. A
product is then one AND gate, a complement one inverter, and the division that
Bayes' rule needs is done by a feedback counter. One cell's update costs a few
gates, four pseudo-random generators and two 8-bit registers, which is why a
40 x 40 arena (1600 cells) can be updated fully in parallel.

The architecture follows the paper *Bayesian Source Localization using
Stochastic Computation* (A. Krishna, C. S. Thakur). The sequencing, the
handshakes, the random-number generators and several number-range choices are
this implementation's own; they are listed under
[Departures and choices](#departures-and-choices).

## The model being computed

Two numbers describe the sensors:

* alpha: probability that a diode fires when the source is in its sector;
* beta: probability of a distractor in a sector without the source, so a diode
  there fires with probability alpha*beta.

For a cell (k, l) and the diode j of the sector that holds the cell as seen
from the robot, the likelihoods are

| z_j | L1 (source in the cell) | L0 (source not in the cell) |
|-----|-------------------------|-----------------------------|
| 1   | alpha                   | alpha*beta                  |
| 0   | 1 - alpha               | 1 - alpha*beta              |

and one time step replaces the cell's prior P_{t-1} by

    P_t = L1 * P_{t-1} / ( L1 * P_{t-1} + L0 * (1 - P_{t-1}) )

Each cell is treated as its own two-way question ("source here or not"); the
probabilities of different cells are not normalised against each other.

## Number format

All probabilities are 8-bit unsigned values. A stochastic number generator
(SNG) reads a value v as the probability (v + 1) / 256: 255 is certainty, 0 is
1/257. This follows from how the SNG is built (next section). Examples:
alpha = 0.8 is 204, alpha*beta = 0.32 is 82, and a freshly reset cell holds
128, i.e. one half.

## The stochastic Bayesian module (`stoch_bayes`)

This is the part worth understanding in detail. Per cell, every clock:

1. **SNGs** (`sng`, `lfsr`). A 16-bit maximal-length LFSR steps once per
   clock; its top byte r is compared with the 8-bit input x and the SNG
   outputs `r <= x`. Over the LFSR's 65535-clock period r = 0 occurs 255 times
   and every other byte 256 times, so the stream holds exactly 256x + 255 ones
   per period. Three SNGs turn alpha, alpha*beta and the held prior into
   streams alpha_s, ab_s and p_s.
2. **Likelihood multiplexers** (`likelihood`). With z_j = 1 they pass alpha_s
   and ab_s, with z_j = 0 their inverses: the L1 and L0 streams of the table.
3. **Two AND gates** form P1 = L1 & p_s and P2 = L0 & ~p_s, streams whose
   densities are the numerator and the second term of the denominator.
4. **The normalization module** (`normalization`) divides. An 8-bit counter
   is turned back into a stream P_o by a fourth SNG. The counter has one
   excitatory input E1 = P1 and two inhibitory inputs I1 = P1 & P_o and
   I2 = P2 & P_o, and moves by E1 - I1 - I2 each clock (+1, 0, -1 or -2). Its
   mean drift is P1 - P_o (P1 + P2), which vanishes exactly when
   P_o = P1 / (P1 + P2), the posterior. The counter therefore wanders around
   the posterior; its value is the 8-bit result.

The counter is a first-order loop with a time constant of roughly
256 / (P1 + P2) clocks (a few hundred clocks for typical values) and
a standing noise of a few counts. Each time step gives it N_SC = 2048 clocks,
several time constants, starting from the previous posterior.

The four SNGs of one cell must be statistically independent, otherwise the
AND gates do not multiply. Each SNG therefore has its own LFSR, the four LFSRs
of a cell use four different primitive polynomials, and seeds differ from
cell to cell (`bslm_pkg::lfsr_mask`, `lfsr_seed`). With 8-bit LFSRs, which all
share the period 255, the streams of one cell correlated enough to shift the
result by up to 20 counts (e.g. 78 instead of 58); with 16-bit LFSRs the
measured mean is within about 7 counts of the exact value over the tested
priors.

## One inference path per cell (`inference_path`)

A path is a triangulation module, a stochastic Bayesian module, and an 8-bit
register that holds the prior P_{t-1}. The register is loaded once per time
step, at its end, from the counter, so during a step the prior fed to the
prior SNG is steady while the counter settles.

**Triangulation** (`triangulation`) picks which photodiode speaks for the
cell. With dx = x_cell - x_robot and dy = y_cell - y_robot, sector j covers
bearings from 45(j-1) up to, but not including, 45j degrees, counted
anticlockwise from +x: sector 1 is east to north-east, 3 is north to
north-west, 5 is west to south-west, and so on. It is found from the signs of
dx and dy and a comparison of |dx| with |dy|, with no angle computation. A
bearing on a boundary belongs to the sector it opens. The cell under the robot
(dx = dy = 0) has no bearing and is given sector 1.

## Finding the most probable cell (`max_tree`)

A binary tree of comparators, padded with zero leaves to a power of two, with
a register after every level. Each node carries the value and a 16-bit tag,
the cell coordinate {x, y}, so the root delivers the estimate directly. On a
tie the lower cell index wins, where the index is (x-1)*K + (y-1). For
1600 cells the tree is 11 levels deep and answers 11 clocks after it samples.

## Sequencing a time step (`bslm_ctrl`, `bslm_top`)

`bslm_top` builds K x K paths, one controller and one max tree.

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; synchronous active-low reset (every prior and counter to 128) |
| start | in | 1 | begin a time step; taken only while `busy` is low |
| x_ugv | in | 16 | robot cell {x[15:8], y[7:0]}, grid indices 1..K, sampled on `start` |
| z | in | 8 | photodiode bits, `z[j-1]` is sector j, sampled on `start` |
| alpha, alpha_beta | in | 8 | alpha and alpha*beta in the format above; keep steady during a step |
| busy | out | 1 | a step is in progress |
| done | out | 1 | one-clock pulse; `x_s` and `p_max` are valid and hold until the next `done` |
| x_s | out | 16 | estimated source cell {x, y} |
| p_max | out | 8 | posterior of that cell |

Parameters: `K` (40), `N_SC` (2048 clocks of stochastic update per step),
`P_INIT` (128). A step takes 1 + N_SC + 1 + ceil(log2 K^2) clocks from the
clock that samples `start` to the one that raises `done`: 2061 clocks, or
20.61 us at 100 MHz, for the defaults. The published FPGA version reports
20.66 us per step at 100 MHz.

The controller samples `z` and `x_ugv`, raises `en` for N_SC clocks (counters
run, priors held), gives one `load` clock in which every prior register takes
its counter's value and the max tree samples the same values, then waits for
the tree. Moving the robot and reading the sensors is left to whatever drives
the ports.

## Departures and choices

Taken from the published design: the per-cell path structure, the eight
45-degree sectors and their numbering, the SNG as LFSR plus `r <= x`
comparator, the likelihood multiplexers, the AND gates, the counter rule of
the normalization module, 8-bit values and an 8-bit counter, the comparator
tree, 16-bit position and estimate buses, K = 40.

This implementation's own choices:

* **16-bit LFSRs** behind the 8-bit random numbers, with per-SNG polynomials
  and seeds, for the correlation reason above.
* **Counter ceiling 254.** The counter saturates at 0 and at 254. A prior of
  255 would make the prior stream all ones, P2 would stay 0, and the cell
  would keep posterior 1.0 regardless of later readings (Bayes' rule with a
  prior of exactly 1). In a 40 x 40 run with a ceiling of 255 thousands of
  cells locked at 255 and the max tree could not tell them apart; with 254 the
  same run found the source.
* **Initial prior 0.5** in every cell. A uniform 1/1600 rounds to 0 in 8 bits,
  and a zero prior can never rise because P1 is then always 0.
* **N_SC = 2048** clocks per step, chosen to match the reported step latency.
* Tie rule of the max tree, the register after every tree level, sector 1 for
  the robot's own cell, the boundary rule of the sectors.
* Synchronous active-low reset, the start/busy/done handshake, and alpha and
  alpha*beta as run-time inputs.

Known differences from the published results:

* **Size.** Each path holds an 8-bit counter, an 8-bit prior register and four
  16-bit LFSRs: 72 flip-flops, 115,200 for 1600 cells. The published FPGA
  figures (5,773 registers, 8,974 LUTs) are far smaller, so that
  implementation must have shared or time-multiplexed parts in a way not
  described; this RTL makes no attempt to match those numbers.
* **Steps to localise.** The published mean number of steps (over 100 runs)
  is 23, 27, 37 and 54 for beta = 0.2, 0.4, 0.6, 0.8 at alpha = 0.8. Single
  runs of this RTL with the robot model below took 32, 4 and 20 steps for
  beta = 0.2, 0.4, 0.6, and 50 steps for beta = 0.4 in another seed. With
  beta = 0.8 a detection is only 1.25 times likelier with the source than
  without; of four runs, two localised (after 41 and 101 steps) and two had
  not after 150 steps, the run in `tb_bslm_beta_sweep` among them. With many cells
  pinned at the 254 ceiling, the tie rule decides between them, which biases
  early estimates towards low x.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|-----------|----------------|
| `tb_lfsr` | seed, first states worked out by hand, all 65535 states once, period |
| `tb_sng` | exactly 256x + 255 ones per 65535 clocks, for end points and random x |
| `tb_likelihood` | all four input combinations |
| `tb_normalization` | counter rule clock by clock against a model, both limits, equilibrium P1/(P1+P2) from random streams |
| `tb_stoch_bayes` | mean posterior against Bayes' rule for ten prior/z cases, frozen when idle |
| `tb_triangulation` | all positions in a 12 x 12 patch plus random far ones against a bearing computed with `$atan2` |
| `tb_inference_path` | register loads only on `load` and takes the counter value; posterior rises with detections and falls with misses |
| `tb_max_tree` | one vector per clock into a 37-leaf tree: maximum, tie rule, tag, 6-clock latency; a 1600-leaf tree with 11-clock latency |
| `tb_bslm_ctrl` | en length, load pulse, sampled inputs, start ignored while busy |
| `tb_bslm_top` | 10 x 10 arena, 30 steps: latency, estimate equals the largest posterior, registers equal counters, and that every mechanism happened (z_j = 1 and 0, robot's own cell, tree ties, posteriors at 0 and 254, robot moves); must localise |
| `tb_bslm_top_full` | all defaults, 40 x 40, source at (8,33), robot from (34,10), alpha 0.8, beta 0.4, until localised (limit 100 steps) |
| `tb_bslm_beta_sweep` | 40 x 40, beta = 0.2 / 0.4 / 0.6 / 0.8, one run each; beta up to 0.6 must localise within 150 steps |

The end-to-end testbenches share `bslm_tb_pkg`, which models the world: the
photodiode noise (fire with alpha in the source's sector, alpha*beta
elsewhere) and a robot that moves one cell per step towards the current
estimate in one of eight directions. Localised means the estimate lies within
1.5 cells of the source.

To run one with Verilator (5.x):

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/bslm_pkg.sv tb/bslm_tb_pkg.sv tb/tb_bslm_top.sv \
        --top-module tb_bslm_top -Mdir obj_tb_bslm_top
    ./obj_tb_bslm_top/Vtb_bslm_top

Verilator finds the other modules through `-Irtl` from their file names. The
40 x 40 testbenches take about two minutes to compile and 5 to 80 seconds to
run.

## Files

`rtl/`: `bslm_pkg` (types, LFSR masks and seeds), `lfsr`, `sng`,
`likelihood`, `normalization`, `stoch_bayes`, `triangulation`,
`inference_path`, `max_tree`, `bslm_ctrl`, `bslm_top`.
`tb/`: the testbenches above and `bslm_tb_pkg`.
