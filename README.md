# RS-LLL: a lattice-reduction unit for MIMO detection

Lattice-reduction-aided successive interference cancellation (SIC) detects the
streams of a MIMO link nearly as well as maximum-likelihood detection, at the
cost of SIC. The work is moved into preprocessing. Once per channel
realisation, the channel's QR decomposition `G = QR` is turned into a "more
orthogonal" basis `G·T = Q̃R̃`. Here `T` is a unimodular matrix of Gaussian
integers (`|det T| = 1`). The detector then runs SIC on `R̃` and maps its
decisions back through `T`.

This repository holds synthesizable SystemVerilog for a hardware unit that does
this preprocessing for a 4 × 4 complex channel. It uses a low-complexity LLL
variant, the **reverse Siegel LLL (RS-LLL)**. Four things set it apart from
textbook LLL:

* **Siegel criterion.** Swap columns `k-1, k` when `ε·R̃(k-1,k-1)² ≥ R̃(k,k)²`, with
  `ε = 1/2`. The Lovász test is not used. The Siegel test needs only the two
  diagonal entries.
* **No full size reduction.** Only `R̃(k-1,k)` is reduced, just before each swap.
  The final pass that reduces every off-diagonal entry is dropped, because SIC
  does not gain from it.
* **Reverse order.** Processing starts at the bottom-right entry
  `R̃(MT,MT)` and moves up. SIC error rates are dominated by the last stream, so
  the most important part of the basis is improved first.
* **Early termination by swap count.** The run stops after `SMAX` column swaps
  (default 20). Run time is roughly proportional to the number of swaps, so this
  bounds latency. Loop iterations are not counted.

## Algorithm as implemented

Indices are 1-based, as in the usual LLL notation.

```
T ← I, k ← MT, S ← 0
while k ≥ 2 and S < SMAX:
    if ε·R(k-1,k-1)² ≥ R(k,k)²:                 # Siegel criterion
        S ← S + 1
        μ ← round(R(k-1,k) / R(k-1,k-1))         # complex integer, |Re|,|Im| ≤ 3
        r_k ← r_k − μ·r_(k-1);  t_k ← t_k − μ·t_(k-1)
        swap columns k-1, k of R and of T
        complex Givens rotation on rows k-1, k of R (and columns of Q)
            so that R(k,k-1) = 0 and both diagonal entries stay real
        k ← min(k+1, MT)
    else:
        k ← k − 1
```

When a run ends without early termination, every adjacent pair satisfies
`ε·R̃(k-1,k-1)² < R̃(k,k)²`. The testbenches check this in exact integer
arithmetic on the fixed-point result.

## Architecture

```
             host ports (load next Q,R / read previous Q~,R~,T)
                 │                 │                  │
           ┌─────┴─────┐     ┌─────┴─────┐     ┌──────┴──────┐
           │  r_mem    │     │  q_mem    │     │  t_mem      │
           │ 2 banks,  │     │ 2 banks,  │     │ 2 banks,    │
           │ triangle  │     │ 4x4 cplx  │     │ 4x4 int +   │
           │ real diag │     │           │     │ μ-MAC       │
           └─────┬─────┘     └─────┬─────┘     └──────┬──────┘
                 │ whole bank in parallel              │ kk, μ
           ┌─────┴─────────────────┴─────┐             │
           │          route_net          │◄── op, kk, j ── rslll_fsm
           └──┬───────────────────────┬──┘             │
        ┌─────┴───────┐        ┌──────┴────────┐       │
        │ cmult_array │        │  cordic_ext   │───────┘ μ
        │ 4 complex × │        │ master/slave  │
        │             │        │ + divider     │
        └─────────────┘        └───────────────┘
```

| Module        | Role |
|---------------|------|
| `rslll_top`   | Connects the blocks and holds the host interface and the `w` register. |
| `rslll_fsm`   | Controller: sequences the algorithm, counts swaps, ends the run. |
| `route_net`   | Selects multiplier operands, adds up the products, writes elements back. |
| `cmult_array` | Four combinational complex multipliers. |
| `cordic_ext`  | Complex Givens vectoring (master), phasors (slave), divider for μ. |
| `r_mem`       | Double-buffered R: 4 real diagonal entries and 6 complex entries above it. |
| `q_mem`       | Double-buffered Q: 16 complex entries. |
| `t_mem`       | Double-buffered T with its own small multiply-accumulate for `t_k − μ·t_(k-1)`. |
| `rslll_pkg`   | Data types, widths, operation codes, saturation helpers. |

All three memories are flip-flop arrays. The core sees its whole working bank
at once, which lets one cycle read whatever the multipliers need. The host bank
can be loaded and read while the core runs.

### The Siegel check on a complex multiplier

For a pair `(m, m+1)`, put `x = R(m,m)` and `y = R(m+1,m+1)`, both real. A
multiplier then forms

    (x + j·y) · (ε·x + j·y),   real part = ε·x² − y²

`ε·x` is a right shift by `EPS_SHIFT`. The real part is taken at full precision
(`p_re_full`), and its sign is the decision. There are four multipliers, so all
three pairs of a 4 × 4 matrix are tested in a single cycle. The controller then
jumps straight to the largest pair index `≤ k` that needs a swap. Descending
through pairs that pass costs no cycles.

### Division and size reduction (`cordic_ext`, `t_mem`)

`μ` is kept small (each component in −3…3), which keeps `T` narrow. So the
division needs only a few quotient bits. For each real component, a three-step
non-restoring divider computes `q = ⌊2|a|/d⌋` in 0…7. An 8-entry table then
turns `q` into the rounded magnitude:

| q    | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 (or overflow) |
|------|---|---|---|---|---|---|---|-----------------|
| \|μ\| | 0 | 1 | 1 | 2 | 2 | 3 | 3 | 3 (saturated) |

The divider's remainder `r = 2|a| − q·d` also gives the reduced entry
`|a| − |μ|·d = (r + (q − 2|μ|)·d)/2`. This is exact, so the new `R(k-1,k)` costs
no multiplication. The other entries of `r_k` (rows above `k-1`) are reduced on
the complex multipliers. In the same cycle they are written back with columns
`k-1` and `k` exchanged. `t_mem` does the matching update of `T` in one cycle.
It uses its own small multipliers (3-bit μ × 8-bit T entries) and saturates the
results.

### Givens rotation with a real diagonal

After the swap, rows `k-1, k` hold the vector `[a; b]` in the new column `k-1`.
Here `a` is the reduced `R(k-1,k)` (complex) and `b = R(k,k)` (real). The
rotation applied is

    Θ = [ w      s       ]      w = c·e^(−jφ),  φ = arg a
        [ s   −conj(w)   ]      c = |a|/r,  s = b/r,  r = √(|a|² + b²)

`Θ·[a; b] = [r; 0]`. The old diagonal `R(k-1,k-1)`, now in column `k`, maps to
`R(k-1,k) = w·R(k-1,k-1)` and `R(k,k) = s·R(k-1,k-1)`. The second of these is
real and non-negative. That is why the R memory can store a real diagonal.
`Θ` is unitary, so `Q̃ ← Q̃·Θᴴ` keeps `G·T = Q̃R̃`.

`cordic_ext` finds `φ` and `θ = atan(b/|a|)` in two vectoring stages. Each stage
has nine micro-rotations, three per clock cycle:

1. The master rotates `a` onto the real axis. It is first pre-rotated by π if it
   lies in the left half-plane.
2. The master rotates `(K·|a|, K·b)` onto the real axis. `K ≈ 1.6468` is the
   CORDIC gain. `b` is scaled by `K` with a constant multiplier, so both inputs
   carry the same gain.

A slave CORDIC repeats the master's micro-rotation directions on the vector
`(1/K, 0)`:

* At the end of stage 1 it holds the phasor `e^(−jφ)`.
* At the end of stage 2 it holds `(c, −s)`.

The published design states nine micro-rotations in total at three per cycle.
Read literally, that leaves four or five micro-rotations per angle, with angle
errors of several percent. This design instead uses nine per stage: 18 in all,
six cycles. It is a departure that costs three cycles per swap.

No gain correction is needed on the outputs. One complex multiplier then forms
`w = c·e^(−jφ)`. All updates go to the multiplier array: four products per
cycle, one element pair of R or Q per cycle. Each output is a sum of two
products, added in `route_net`.

### Schedule

Each operation of a swap at 0-based column index `kk` (the algorithm's `k` is
`kk + 1`) costs:

| Step   | Cycles       | Work |
|--------|--------------|------|
| CHECK  | 1            | Three Siegel tests, pick the next `kk`. |
| DIV    | 1            | μ and reduced `R(k-1,k)`. |
| SRED   | 1            | Reduce and exchange R rows above `k-1`, and T. Start the CORDIC. |
| VEC    | 7            | Six CORDIC cycles; the last also forms `w = c·phasor`. |
| ROTKK  | 1            | The swapped column pair of R. |
| ROTR   | `MT−1−kk`    | R columns to the right of the pair. |
| ROTQ   | `MR`         | The four rows of Q. |

One swap takes 15 to 17 cycles. One matrix takes `3 + Σ(11 + (MT−1−kk) + MR)`
cycles from `start` to `done`. The testbenches check this exactly.

The intended input is a *sorted* QR decomposition (SQRD: the column of least
remaining norm is taken first), which leaves little for the reduction to do.
`rslll_workload_tb` measures the unit on 300 such 4 × 4 i.i.d. Rayleigh
channels:

| Input        | `SMAX` | Swaps / matrix | Cycles / matrix | At 333 MHz        |
|--------------|--------|----------------|-----------------|-------------------|
| sorted QR    | 20     | 1.15           | 21.3            | 15.6 M matrices/s |
| sorted QR    | 4      | 1.05           | 19.6            | 17.0 M matrices/s |
| unsorted QR  | 20     | 3.1            | 52.8            | 6.3 M matrices/s  |

The published implementation reports 14 cycles per matrix on average
(23.8 M matrices/s at 333 MHz). Its exact schedule is not known. It probably
overlaps work that is sequential here: the Q rotations with the next check, and
the vectoring with the size reduction. This RTL makes no such overlap, so it
needs about 1.5 times as many cycles. That is the main departure from the
published design. The clock rate of this RTL is not known; it has not been
synthesised for a standard-cell library.

## Number formats

All widths are in `rslll_pkg`. They are this implementation's choices; the
published design states only that `T` and `μ` are kept low-precision.

| Quantity        | Format |
|-----------------|--------|
| Q, R entries    | Complex, 18 bits per component, 12 fractional (range ±32). |
| T entries       | Complex integers, 8 bits per component, saturating. |
| μ               | Complex integer, 3 bits per component, −3…3. |
| CORDIC internal | 24 bits, 2 guard bits. |

Multiplier outputs are rounded half-up and saturated.

16-bit data (range ±8) turned out to be too narrow. Entries above the diagonal
grow during unreduced swaps and saturated on ordinary channels. Inputs should be
scaled (gain control) so that no column of `G` has a norm above about 4. The
testbenches do the same.

## Host interface (`rslll_top`)

* Parameters:
  * `MT`, `MR`: both 4.
  * `SMAX`: default 20.
  * `EPS_SHIFT`: default 1, so ε = 1/2. Use 2 for ε = 1/4.
* Reset is asynchronous and active low. It clears all memories.
* Writing inputs:
  * `r_we/r_row/r_col/r_wdata` and `q_we/...` write into the host banks, one
    element per cycle.
  * R writes below the diagonal are ignored. So are imaginary parts on the
    diagonal.
  * The input R must be upper triangular with a non-negative real diagonal.
* Reading results:
  * `r_rrow/r_rcol → r_rdata`, `q_r*`, `t_r*` are combinational read ports on
    the host banks.
* Starting a run:
  * A one-cycle `start` while `ready` is high swaps all banks.
  * The core then reduces the freshly loaded Q and R and sets its T bank to the
    identity.
  * The host bank now holds the previous result, which can be read while the
    next matrix is loaded.
* End of a run:
  * `done` pulses for one cycle.
  * `swaps` gives the number of column swaps.
  * `early_term` is set if the run hit `SMAX`.
  * The result becomes readable after the next `start`. A stream of matrices
    therefore costs no transfer time. To fetch the last result, issue one more
    `start`, with any data.

## Limits and trust

* Tests run only with `MT = MR = 4`. `route_net` allows `MT` up to 5 with four
  multipliers and four write ports. An elaboration check rejects larger sizes.
* With early termination, the result is a valid basis change but not a reduced
  basis. This holds by design.
* `μ` saturates at ±3 and `T` entries at ±127. After saturation the run still
  yields a unimodular T and a consistent `Q̃R̃`. It may just need more swaps.
  Saturation of T entries would break `G·T = Q̃R̃`. No test channel provoked it.
* Rotation angles are accurate to about 9 bits, which is nine micro-rotations.
  The nulled entry is not stored, so each swap leaves a residual of about 0.4 %
  of `r`. The end-to-end tests bound the total error of `Q̃R̃` against `QRT` at
  3 % of its norm.
* The testbenches check that the unit reduces correctly. They do not measure
  SIC error rates.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

| Testbench             | What it checks |
|-----------------------|----------------|
| `cmult_array_tb`      | Products against floating-point, rounded, with saturation corners. |
| `cordic_ext_tb`       | μ and remainder exact against `round(num/den)`; phasor, c and s within 0.012; latencies of 1 and 6 cycles. |
| `r_mem_tb`, `q_mem_tb`| Concurrent host and core writes on different banks; bank swaps; triangular storage rules. |
| `t_mem_tb`            | Identity initialisation; MAC + exchange against an integer model; saturation flag. |
| `route_net_tb`        | Every operation's writes, found by address, against a floating-point model. |
| `rslll_fsm_tb`        | The controller against a cycle-by-cycle model of the algorithm with random Siegel outcomes; early termination at a reduced `SMAX`. |
| `rslll_top_tb`        | End to end on 61 streamed channels, on two units side by side: defaults, and `SMAX = 2`. See the first list below. |
| `rslll_top_full_tb`   | The unit at its default parameters on 12 channels, with the same result checks. |
| `rslll_workload_tb`   | 300 sorted-QR channels on two units (`SMAX` = 20 and 4), every result checked; reports average swaps, cycles and throughput. |

`rslll_top_tb` checks:

* `det T ∈ {±1, ±j}`, computed exactly.
* `‖QRT − Q̃R̃‖ / ‖QRT‖ < 3 %`.
* `Q̃` is orthonormal.
* The Siegel condition holds.
* The latency matches the schedule exactly.

It also requires each of these mechanisms to occur at least once:

* a swap;
* μ ≠ 0 and μ = 0;
* μ saturation;
* a check that skips elements;
* `k` capped at `MT`;
* a rotation right of the pair;
* regular termination and early termination;
* host transfers during a run.

`tb/rslll_tb_pkg.sv` generates the test channels with a Box-Muller Gaussian
source. It computes their QR decomposition in floating point and holds the
result checks.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module rslll_top_tb \
  rtl/rslll_pkg.sv tb/rslll_tb_pkg.sv rtl/cmult_array.sv rtl/cordic_ext.sv \
  rtl/r_mem.sv rtl/q_mem.sv rtl/t_mem.sv rtl/route_net.sv rtl/rslll_fsm.sv \
  rtl/rslll_top.sv tb/rslll_top_tb.sv
./obj_dir/Vrslll_top_tb
```

Unit testbenches need only `rtl/rslll_pkg.sv`, their module and the testbench.
`route_net_tb` also needs `rtl/cmult_array.sv`.
