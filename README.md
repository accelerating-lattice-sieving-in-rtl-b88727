# A pipelined Reduce engine for lattice sieving

Sieving algorithms for the shortest vector problem (GaussSieve and its
relatives) keep a list of lattice vectors and spend nearly all of their time
in one operation: reducing a vector `v` by another vector `u`,

```
dot = <v, u>
if 2|dot| <= ||u||^2 : nothing to do
else                 : q = round(dot / ||u||^2)
                       v      <- v - q*u
                       ||v||^2 <- ||v||^2 + q^2 ||u||^2 - 2 q dot
```

This RTL implements that operation as a fully pipelined hardware unit that
accepts a new vector pair every clock cycle and delivers the result twelve
cycles later for 120-dimensional lattices. Around it sit two ways of feeding
it from a host computer that runs the rest of the sieve:

* **single-reduction offload**: the host sends one pair per reduction over a
  32-bit bus and gets the reduced vector back;
* **on-chip set sieving**: the host loads a whole set of vectors, the set is
  reduced pairwise inside the FPGA, and the result is read back, so that one
  transfer pays for many reductions.

For the first mode the bus dominates: a 120-dimensional pair and its answer
take about 90 bus words against 12 cycles of arithmetic. The second mode
exists to remove that bottleneck. How much it helps is then limited by how
many vectors fit in on-chip memory, not by logic.

## The arithmetic unit

### Inner product

`dot_product` multiplies all N coordinate pairs in parallel (one multiplier
per coordinate) and adds the products in a binary tree of two-input adders,
with a register after the multipliers and after every tree level. The tree is
padded with zeros to a power of two, so for N = 120 it has 7 levels and the
inner product takes 8 cycles.

### Rounding the quotient without a divider

The quotient is never large. If vectors longer than four times the expected
shortest length are thrown away, then by Cauchy–Schwarz `|dot| / ||u||^2 <= 4`
for every pair that is reduced. So `round_div` avoids a divider. It strips the
sign of `dot`, compares `2|dot|` with odd multiples of `||u||^2` (made with
shifts and adds), and puts the sign back:

| condition                          | \|q\| |
|------------------------------------|-----|
| `2|dot| <= ||u||^2`                | 0 (no reduction) |
| `||u||^2 < 2|dot| < 3||u||^2`      | 1   |
| `3||u||^2 <= 2|dot| < 5||u||^2`    | 2   |
| `5||u||^2 <= 2|dot| < 7||u||^2`    | 3   |
| `7||u||^2 <= 2|dot|`               | 4   |

This rounds halves away from zero. At exactly `2|dot| = ||u||^2` the pair is
not reduced, which matches the "no reduction" test of the operation above.
Quotients whose true value is above 4.5 are clamped to 4 and reported with a
`sat` flag. A clamped result is still a valid, shorter vector, and applying
Reduce again continues the reduction. A zero `u` never reduces anything.

### Update without recomputing the norm

Because `|q| <= 4`, `vector_update` forms `q*u_i`, `q^2 ||u||^2` and
`2 q dot` from shifts and adds of the bits of `|q|`. It uses no multipliers.
The new squared norm comes from the incremental formula, so no second inner
product is needed. Coordinates stay `W` bits wide. If a coordinate of
`v - q*u` does not fit, it wraps, and the `ovf` flag is raised. The returned
norm is still the exact norm of the unwrapped vector.

### Pipeline and timing

`reduce_pipeline` chains the three units:

```
cycle   1        2         3..9            10           11        12
      input -> multiply -> adder tree -> round_div -> update -> output
      reg       (dot_product, 1 + 7 stages)  reg         reg       reg
```

`v`, `u`, both norms and a user tag travel through delay lines next to the
inner product. Every stage therefore holds an independent operation.

* Throughput: one operation per clock, with no back-pressure.
* Latency: `5 + ceil(log2 N)` cycles, which is 12 for N = 120
  (`sieve_pkg::reduce_latency`).
* Outputs: the result vector and norm. They equal the inputs when
  `out_reduced` is 0.
* Flags: `out_sat` and `out_ovf`, as described above.
* Tag: `out_tag` returns the tag given with the request, so several clients
  can share the engine.

## Feeding the engine

All bus traffic uses 32-bit valid/ready words. A vector is sent as
`VW = N/4 = 30` words. Coordinate `i` is in word `i/4`, byte lane `i%4`, and
lane 0 is in the low bits. Squared norms go in one word each, zero-extended.

### Single-reduction offload (`host_link`)

| direction    | words | content |
|--------------|-------|---------|
| host → FPGA  | 30    | v |
|              | 30    | u |
|              | 1     | \|\|v\|\|² |
|              | 1     | \|\|u\|\|² |
| FPGA → host  | 30    | reduced v |
|              | 1     | status |

Bits of the status word:

* bit 31: reduced
* bit 30: quotient clamped
* bit 29: coordinate overflow
* bits 23:0: the new ||v||²

The first answer word appears 13 cycles after the last request word. One cycle
is the issue and 12 are the engine latency. The link receives the next pair
while the current one is computed and sent. If that next pair is complete
before the previous answer has been sent, the link raises `stall` and drops
`in_ready` until the answer buffer is free.

### On-chip set sieving (`set_sieve`, `vector_ram`)

The host sends these words:

1. A header `{budget[31:16], count[15:0]}`. A budget of 0 means no limit.
2. For each of the `count` vectors: 30 coordinate words and one norm word.

The controller stores the coordinates in `vector_ram`, with one vector per
960-bit word. The norms are kept in a register table, so the controller can
decide whether to reduce a pair without touching the RAM.

The set is reduced in **passes**. A pass is one **sweep** per reducer
`j = 0 .. count-1`:

* `L[j]` is read once on RAM port b and held there for the whole sweep.
* Every target `i` is visited once, one per clock. If
  `0 < ||L[j]||^2 <= ||L[i]||^2`, then `L[i]` is read on port a and sent into
  the engine one cycle later, together with `L[j]`. Otherwise the cycle is
  idle. The shorter vector always reduces the longer one, and zero vectors
  (collisions) are left alone.
* When a result leaves the engine and says "reduced", `L[i]` and its norm are
  written back. The engine tag carries `i` so that the write-back needs no
  bookkeeping.
* At the end of the sweep the engine is drained before the next reducer is
  read.

This keeps the pipeline full without any hazard check. Within one sweep each
target occurs once and the reducer is never written, so no operation can read
a value that an earlier one is still changing. Only the sweep boundaries need
a drain, and so a sweep over K vectors costs about `K + 15` cycles, however
many pairs it reduces. Issuing one pair at a time would cost 15 cycles per
pair (read, 12 in the engine, write-back). The gain is therefore 15 times the
fraction of pairs that are issued, less the drain overhead. On the small
12- and 16-vector sets of the tests it is about 4 to 5 times, and it grows
with the set size.

Passes repeat until one of these happens:

* a pass reduces nothing, which means the set is Gauss reduced:
  `2|<L[i],L[j]>| <= ||L[j]||^2` for every such pair;
* the budget of successful reductions is reached. The budget is checked
  before each sweep, so a run performs at least `budget` reductions.

The set then goes back to the host in the same format, followed by one word
with the number of reductions. A useful budget is at least `3n^2/2` reductions
(21 600 for n = 120), which is roughly what it takes for one transfer to pay
off.

### Top level (`sieve_top`)

One `reduce_pipeline` is shared by `host_link` and `set_sieve`, and the
`mode` input selects which of them owns the bus:

* `MODE_SINGLE`: the single-reduction offload;
* `MODE_SET`: on-chip set sieving.

`mode` is sampled only while both functions are idle, so a mode change never
splits an operation. `mode_active` shows the mode in effect. The engine tag
holds the mode in its top bit, and the response is steered back by that bit.
The bits below it hold the target index in set mode.

Status outputs:

* `link_stall`: a received pair is waiting in offload mode.
* `set_busy`: a set operation is under way.
* `set_sieving`: reduction passes are running.
* `set_reductions`, `set_pairs_issued`, `set_passes`: counters of the current
  or last set run.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N` / `N_DIM` | 120 | lattice dimension, one multiplier and one update lane per coordinate |
| `W` / `COORD_W` | 8 | bits per signed coordinate |
| `BW` / `BUS_W` | 32 | host bus width; must be a multiple of `W` |
| `SET_DEPTH` / `DEPTH` | 256 | vectors held on chip |
| `DOT_W`, `NORM_W` | 24 | `2W + ceil(log2 N) + 1`; NORM_W must be at most `BW - 3` |

The latency follows N automatically. For N = 70 it is also 12 cycles. The
synthesised default top has about 2 800 word-level cells, 8 000 flip-flop
bits and 290 000 memory bits. Most of the memory is the vector RAM
(256 × 960 bits); the pipeline delay lines map to memories as well.

## How far to trust it, and where it departs from the original design

All of the following is verified in simulation against independent software
models: the arithmetic, the 12-cycle latency, the one-per-cycle rate, the
offload protocol, the set sieve (result and Gauss-reduced property) and the
mode switching. Nothing has been run on an FPGA, and no clock rate has been
measured.

Points where this RTL makes its own choices or differs:

* **Throughput.** The original pipelined module is reported at 404·10⁶
  reductions/s at 202 MHz for n = 120, which is two per clock. Its figure
  calls the execution "pipelined and branched", but how two operations per
  clock are reached is not known. This engine does one per clock.
* **Coordinate width.** The original design does not state one. 8 bits
  were chosen because v, u and the answer then take exactly 90 words on a
  32-bit bus, matching the communication time reported for n = 120. Bases
  with larger entries need a larger `W`.
* **Norm words.** This protocol adds two norm words to the request and one
  status word to the answer: 62 + 31 words per reduction.
* **Quotients above 4** are clamped and flagged, not computed.
* **Set size** (256) and **set-mode schedule** (sweeps with a fixed reducer,
  norm filter, drain between sweeps, budget checked per sweep) are this
  design's own. The original work sizes the set by device memory. It gives
  the aim of using the pipeline to Gauss-reduce a set, with up to 12 times
  more speed, but not the schedule. Its parallel GaussSieve, built on an
  earlier multi-list design, is not reproduced.
* **Not included:** the host-side sieve and hardware sampling of new
  vectors.

Capacity: a full GaussSieve list for n = 120 needs about (4/3)^60 ≈ 3·10⁷
vectors, far beyond on-chip memory (256 vectors here, and at most a small
fraction of the list on any FPGA). Set mode therefore works on a subset.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops itself; a watchdog ends a run
that hangs. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sieve_pkg.sv tb/sieve_ref_pkg.sv tb/sieve_top_tb.sv \
    --top-module sieve_top_tb -Mdir obj_top
./obj_top/Vsieve_top_tb
```

Replace `sieve_top_tb` with any other testbench name.

| testbench | what it covers |
|-----------|----------------|
| `dot_product_tb` | random and extreme operands, latency 8 |
| `round_div_tb` | every boundary of the rounding table, plus random operands |
| `vector_update_tb` | every q from −4 to 4, norm update, overflow |
| `reduce_pipeline_tb` | back-to-back operations and every quotient, clamp, overflow, tag and 12-cycle latency |
| `reduce_dims_tb` | the engine at N = 70 and N = 120 side by side: 400 operations back to back, 12-cycle latency and one result per clock for both |
| `vector_ram_tb` | both read ports, read during write |
| `host_link_tb` | the offload protocol with the real engine, 13-cycle turnaround, stalls under back-pressure |
| `host_link_bus_tb` | the same at a 128-bit bus (18 request and 9 answer words per reduction) |
| `set_sieve_tb` | set mode at N = 8, compared with a software model; Gauss-reduced result; budget stop; cycles per sweep; back-to-back issue |
| `sieve_top_tb` | end to end at the default parameters with a 24-vector set |
| `sieve_top_full_tb` | the same with the full 256-vector set (about 1 s) |

The end-to-end tests count each mechanism and fail if one never happened:

* a stall
* a deferred and an immediate mode switch
* a clamped quotient
* a coordinate overflow
* an unreduced pair
* reductions in set mode
* a budget stop
* a skipped pair
* set-mode pairs issued faster than one per engine latency, i.e. overlapped in the pipeline

`tb/sieve_ref_pkg.sv` holds the software reference for Reduce and for the set
sieve. It uses true integer division and rounding, not the comparison table.

## Files

* `rtl/sieve_pkg.sv`: constants, width and latency functions, mode type.
* `rtl/dot_product.sv`, `rtl/round_div.sv`, `rtl/vector_update.sv`: the
  three arithmetic stages.
* `rtl/reduce_pipeline.sv`: the pipelined Reduce engine.
* `rtl/host_link.sv`: single-reduction offload.
* `rtl/vector_ram.sv`, `rtl/set_sieve.sv`: on-chip set sieving.
* `rtl/sieve_top.sv`: the top level.
* `tb/`: one testbench per module, plus `sieve_top_run.sv`, the shared body of
  the two end-to-end tests.
