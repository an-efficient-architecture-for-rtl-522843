# Adaptive progressive thresholding with a log-domain variance engine

This RTL picks a gray-level threshold for a 256×256, 8-bit image. It uses
*adaptive progressive thresholding* (APT), which is Otsu's method applied
recursively:

1. Find the threshold `t` that maximises the between-class variance
   σ_B²(t) over the current gray range `{0..T}`.
2. Test the *Cumulative Limiting Factor* (CLF) rule, σ_B² ≤ α·μ_T, where μ_T
   is the mean gray level of the current range and α is a tunable limit.
3. If the rule holds, `t` is the answer. If not, the dark class `{0..t}`
   becomes the new image (`T = t`) and the steps repeat.

A typical use is finding the dark lumen in endoscope frames. The camera and
lighting set α there; α = 9.8 is a typical value.

The main idea is the arithmetic. Evaluating σ_B² directly needs squares,
products and two divisions for each of the 256 candidates. This engine
maximises log₂σ_B² instead, so the squares become doublings and the
products and divisions become additions and subtractions. The logarithms
come from a small logarithm conversion unit (LCU). The LCU has one 448-bit
table and a few adders, and needs no multiplier. No antilogarithm is
needed, because only the position of the maximum and one comparison matter.

## Top-level behaviour (`apt_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; reset is synchronous and active-low |
| `start` | in | 1 | starts a frame; ignored while `busy` |
| `pix_valid`, `pix`, `pix_ready` | in/in/out | 1/8/1 | pixel stream; a pixel is taken when valid and ready are both high |
| `alpha` | in | 10 | CLF limit α, unsigned, 4 fraction bits (9.8 → 157) |
| `lut_we`, `lut_addr`, `lut_wdata` | in | 1/4/28 | rewrites one word of all logarithm tables |
| `busy`, `done` | out | 1 | `done` rises with the result and stays high until the next `start` |
| `thresh` | out | 8 | the APT threshold |
| `found` | out | 1 | at least one iteration produced a threshold |
| `iterations` | out | 5 | iterations that produced a threshold |
| `reason` | out | 2 | 1: CLF rule met; 2: no valid split left (previous threshold kept); 3: `MAX_ITER` reached |
| `log_sb2` | out | 20 | log₂σ_B² of the final threshold, signed, 12 fraction bits |

A frame takes exactly 65 536 pixels, at most one per clock. After the last
pixel the engine needs 256 clocks to build the cumulative sums, then
1 + 24·E clocks, where E is the number of evaluations. E is the iteration
count, plus one when the run ends on an empty sub-image. For example, a
three-iteration run finishes 329 clocks after its last pixel. Write the
tables and change `alpha` only while the engine is idle.

The only parameter is `MAX_ITER` (default 16). Image size, gray depth and
block count are constants in `apt_pkg`.

## Data flow

```
pixels ─► apt_hist_cum ──16 read ports──► bcv_block ×16 ──maxima──► apt_final_thresh
            (histogram,     (t = 16b+a)     (3 LCUs + LUT each)       (max, CLF rule,
             CH and CIA)                                                2 LCUs + LUT)
               ▲ top_idx = T                         ▲ start, T, W_T, U_T      │
               └──────────────── apt_ctrl ───────────┴──────────────────────────┘
```

* **`apt_hist_cum`** has two phases. First it counts one frame into 256
  bins. Then, in 256 clocks, it turns the bins in place into the cumulative
  histogram `c_t = Σ_{i≤t} n_i` (the CH array). It also fills the
  cumulative intensity `s_t = Σ_{i≤t} i·n_i` (the CIA array). Both arrays
  are organised as 16 blocks of 16 registers: block `b`, register `a`
  holds level `16b + a`. Every block has its own read port. An extra port
  reads the entry at the current upper bound `T`, which gives the sub-image
  totals.
* **`bcv_block`** (16 copies) covers 16 candidate thresholds. After `start`,
  its address counter reads one register per clock. Each candidate goes
  down a five-stage pipeline: normalise, two products, three logarithms,
  score, running maximum. All 16 blocks work in parallel, so one iteration
  scans the 256 candidates in 16 clocks plus the pipeline latency.
* **`apt_final_thresh`** picks the largest of the 16 block maxima and
  applies the CLF rule.
* **`apt_ctrl`** sequences the steps: frame, cumulation, and for each
  iteration it loads the totals, starts the blocks, evaluates the result,
  and either recurses or stops.

## The arithmetic, step by step

**Normalisation.** The raw sums are scaled to 1/1024 of the frame by a
fixed right shift of 6 bits (×1024/65536): `W_t = c_t >> 6` (0…1024) and
`U_t = s_t >> 6`. `W_T` and `U_T` are the same values at the upper bound
`T` of the current sub-image.

**Variance in sub-image terms.** Inside `{0..T}`, the weight of the dark
class is `w = W_t/W_T`, its first moment is `μ_t = U_t/W_T`, and the mean is
`μ_T = U_T/W_T`. Substituting these into σ_B² = (w·μ_T − μ_t)² / (w(1−w))
gives

```
σ_B² = (W_t·U_T − U_t·W_T)² / (W_T² · W_t · (W_T − W_t))
```

Each block therefore computes

```
score(t) = 2·log₂|W_t·U_T − U_t·W_T| − log₂W_t − log₂(W_T − W_t)
         = log₂σ_B²(t) + 2·log₂W_T
```

The last term is the same for every `t` in an iteration, so the `t` with the
largest score is the Otsu threshold of the sub-image. A candidate is skipped
when `W_t`, `W_T − W_t` or the numerator is zero. A tie goes to the lowest
`t`.

**Stopping rule.** The CLF is σ_B²/σ_T², and its limit is α·μ_T/σ_T². The
total variance σ_T² cancels, so the rule is σ_B² ≤ α·μ_T. With
μ_T = U_T/W_T this becomes

```
score ≤ log₂(α_q·U_T) − 4 + log₂W_T          (α_q = 16·α)
```

This costs one 10×18-bit product and two more LCUs. `alpha = 0` turns the
rule off, and the recursion then runs until the range is exhausted.

Scores and logarithms are fixed point with 12 fraction bits. `score_t` is
20 bits, signed.

## The logarithm conversion unit (`lcu`, `lcu_lut`)

For `Q = 2^j·(1+x)`, log₂Q = j + log₂(1+x). The unit works in four steps:

1. A leading-one detector finds `j`, the integer part.
2. A barrel shifter aligns the 12 bits below the leading one:
   `f = q[j-1 … j-12]`. Zeros fill in below bit 0, and bits below `j−12`
   are dropped.
3. `f[11:8]` addresses the table. The table word gives β, the fractional
   logarithm at the start of that 1/16 segment, plus four slope words
   D_A…D_D.
4. The remaining 8 bits form four 2-bit groups Z_A…Z_D. Each group replaces
   a product D·Z with a 4-way multiplexer that selects 0, D, 2D or 2D+D:

```
log₂Q ≈ j + β + D_A·Z_A + D_B·Z_B + D_C·Z_C + D_D·Z_D
```

The fraction saturates at 4095/4096. The operand width `IN_W` is a
parameter. The blocks use 16 bits for `W` and `W_T − W`, and 29 bits for the
numerator. The stop rule uses 28 bits for α·U_T.

**Table format.** A word is 28 bits, `{β[11:0], D_A[6:0], D_B[4:0],
D_C[2:0], D_D[0]}`, and 16 words make 448 bits. After reset every
table holds these contents, for segment `k` (x ∈ [k/16, (k+1)/16)):

```
s_k   = 16·(log₂(1+(k+1)/16) − log₂(1+k/16))          secant slope
bow_k = max over the segment of log₂(1+x) minus the secant
β_k   = round(4096·(log₂(1+k/16) + bow_k/2))
D_A = round(64·s_k)   D_B = round(16·s_k)   D_C = round(4·s_k)   D_D = round(s_k)
```

Centring the secant by half its bow trades the one-sided interpolation
error for a two-sided one. With these contents the worst error is 0.00133
over all 65 535 non-zero 16-bit operands.

**Reconfiguration.** There are 17 copies of the table: one per block (each
shared by that block's three LCUs) and one in the final threshold unit.
They all take the same write, so writing `lut_wdata` changes the precision
or bias of the whole engine. For example, zeroing the slope words and
repeating every fourth β gives a coarse, 4-segment log. The end-to-end test
shows that such a table moves the threshold.

## Where this RTL departs from the architecture it follows, or fills gaps

* **Two products per block.** The architecture this follows lists one
  17-bit multiplier per block, for `w_t·μ_T` over the whole image. Here the
  numerator is written in sub-image totals (`W_t·U_T − U_t·W_T`, two exact
  11×18-bit products), so later iterations need no division to re-reference
  `w_t` and `μ_T`.
* **Table contents and error.** Only the total table size (448 bits) is
  given for the 16-bit LCU. The 12/7/5/3/1 split of a word and the formulas
  above are this design's choice. Its worst error is 0.00133, against
  0.00098 quoted for a 16-bit unit. Other table sizes (2, 3, 5 or 6 address
  bits) are not built: the address width is fixed at 4 bits, and only the
  contents can change.
* **Choices where nothing is specified:**
  - the 4 fraction bits of α;
  - the tie rule (lowest `t`);
  - skipping degenerate candidates;
  - keeping the previous threshold when a sub-image has no valid split;
  - `MAX_ITER`;
  - the pixel handshake and the start/done protocol;
  - an in-place cumulation that reuses the histogram registers;
  - indexed reads through an address counter, rather than physically
    rotating the register blocks (the order is the same).
* **Not included.** Nothing here applies the threshold to the pixels. The
  engine only selects it.

## Verification

Each module has a self-checking testbench in `tb/`. The reference models
are in `tb/apt_tb_pkg.sv`. They compute the table from its real-valued
formula, the LCU with integer arithmetic, and the whole recursion from a
histogram.

| testbench | what it checks |
|---|---|
| `lcu_tb` | every non-zero 16-bit operand, bit-exact and error < 0.0014; 20 000 random 29-bit operands; package defaults equal to the formula |
| `lcu_lut_tb` | reset contents, write timing, untouched words, second reset |
| `apt_hist_cum_tb` | two random frames with input gaps; every CH/CIA entry through both read paths; 65 536-pixel frame end; 256-clock cumulation |
| `bcv_block_tb` | block 5 against the model for full, partial and empty ranges; done after 21 clocks |
| `apt_final_thresh_tb` | 2000 random evaluations with ties; both outcomes of the stop rule; α = 0 |
| `apt_ctrl_tb` | recursion bounds and totals per iteration; 24-clock spacing; all three stop reasons |
| `apt_top_tb` | default parameters, seven full 256×256 frames (see below) |

`apt_top_tb` checks threshold, iterations, stop reason, log₂σ_B² and clock
count against the model. It also checks that the first split is within 2%
of an exact floating-point Otsu search. It requires each of these to happen
at least once: several iterations, a CLF stop, an exhausted-range stop,
skipped candidates, input stalls, and table rewrites. On an endoscope-like
synthetic frame at α = 9.8, the recursion takes a few iterations and the
threshold lands in the dark cluster.

To run a testbench with Verilator 5:

```
verilator --binary -Wno-fatal -Irtl -Itb rtl/apt_pkg.sv tb/apt_tb_pkg.sv \
          tb/apt_top_tb.sv --top-module apt_top_tb -o sim && obj_dir/sim
```

Add `--assert` to also evaluate the two protocol assertions in the RTL:
`bcv_block` checks that the iteration operands stay stable during a scan,
and `apt_ctrl` checks that a result arrives only when one was requested.
Each testbench ends with `TB_RESULT checks=N failures=M`. The full-size
top-level run takes about a second of simulation.

## Size

After generic synthesis the engine has 10 496 memory bits, for the CH
(256×17) and CIA (256×24) arrays. It also has about 10.8 k flip-flop bits,
mostly the 17 tables (17 × 448 = 7616 bits) plus the pipeline registers.
The arithmetic is 32 multipliers of 11×18 bits (two per block), one
10×18-bit multiplier for α·U_T, and one 8×17-bit multiplier in the
cumulation. There are 50 LCUs (three per block, two in the final unit) and
no dividers.
