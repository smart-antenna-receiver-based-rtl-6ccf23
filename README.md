# JSTE smart-antenna receiver for GSM/DCS: SystemVerilog RTL

A GSM base station with an antenna array can cancel co-channel interference (CCI) and
equalise intersymbol interference (ISI) in one receiver if it estimates, jointly and for
every symbol:

* a **beamformer** `w` (one complex weight per antenna) that suppresses the interferers, and
* a **temporal channel** `h` (L taps) for the maximum-likelihood sequence estimator (MLSE)
  that follows the beamformer.

This joint space-time estimation (JSTE) maximises the SINR after the spatial filter. With a
white training sequence it reduces to an eigenvector problem on the joint covariance matrix
of the antenna samples `y(n)` and the symbol vector `x(n)`:

```
R(n) = lambda R(n-1) + g g^H,   g = [ y(n) ; x(n) ]            (order N = M + L)
R    = Lbar Lbar^H,             Lbar = [ L  0 ; U  Ls ]        (Cholesky factor)
h    = eigenvector of the smallest eigenvalue of the Schur complement Ls Ls^H
       -> one inverse power step per symbol:  Ls Ls^H h(n) = h(n-1),  h normalised
w    = L^-H U^H h
```

The RTL here implements this receiver as the published single-chip architecture (Girola,
Picciriello and Vincenzoni, Siemens ICN) does: three processors working symbol by symbol.

```
           y(n) ------------------------------+
             |                                v
             v        +------------+     +---------+  z, ww  +-----------+
  x(n) --> Cholesky ->| RAM Re(L)  |---->|   FBS   |-------->|  Viterbi  |--> b_k
   ^       processor  | RAM Im(L)  |     |processor|         | processor |
   |                  +------------+     +---------+         +-----------+
   +---------------------- x(n): symbols of the maximum-likelihood path ---+
```

* `cholesky_proc` updates the Cholesky factor of `R(n)` with Givens rotations made of three
  CORDIC cells (fixed point, 20-bit words).
* `fbs_proc` (forward-backward substitution) reads the factor and computes `h`, `w`, the
  spatially filtered and matched-filtered sample `z`, and the metric table of the trellis
  (floating point, 16-bit mantissa, 5-bit exponent).
* `viterbi_proc` runs the 16-state MLSE and feeds the symbols of the best path back to the
  Cholesky processor. Inside the training sequence (midamble) the known symbols are used
  instead (decision-directed operation outside it).

Default sizes: `M = 4` antennas, `L = 5` channel taps, so `N = 9` and a 16-state trellis.

## Symbol slot and pipelining (`jste_chip`)

Each `sym_valid` starts one slot. In a slot:

1. the Cholesky processor starts the update of the factor and the FBS processor starts
   with the factor of the previous update, at the same time. The two factor memories have
   two banks each. The Cholesky processor reads the old factor from bank `b` and writes the
   new one into bank `!b`, while the FBS processor reads bank `b` through a second port.
2. When the FBS processor finishes, it has written `Re z` and the metric table into the
   Viterbi processor's RAM_WW. The top then starts one trellis step.
3. When both the Cholesky update and the trellis step have finished, `sym_done` pulses and
   the banks swap.

**Alignment.** The matched filter needs `L-1` future samples, so the trellis step of slot
`n` handles symbol `n-L+1`. The decisions available at the start of slot `n` come from the
previous slot, so they belong to symbol `n-L`. The Cholesky update of slot `n` therefore
uses the delayed sample `y(n-L)` together with `x(n-L) = [x(n-L) .. x(n-2L+1)]`. In
training mode these symbols come from a shift register of the training bits (`x_train` is
the symbol belonging to the `y(n)` given with it). In decision-directed mode they come from
`xhat` of the Viterbi processor. The mode is chosen per slot with `training`.

Symbols are `+-1` (GMSK handled as binary antipodal after derotation). They enter `g` as
`+-0.5`, so that `g` fits the Q1.15 range of the antenna samples.

## Cholesky update with three CORDICs (`cholesky_proc`, `cordic_cell`)

This is the least obvious part. The update `Lbar' Lbar'^H = lambda Lbar Lbar^H + g g^H` is
done by rotating the columns of `[ sqrt(lambda) Lbar | g ]` so that `g` is driven to zero
one element at a time. An orthogonal rotation of two columns leaves the sum of their outer
products unchanged. For column `k`:

1. **theta-CORDIC, vectoring** on the pivot `g(k)`. It rotates `g(k)` onto the real axis
   and records its micro-rotation directions. The same direction word is then applied
   (rotation mode) to every `g(i)`, `i > k`. This multiplies the rest of `g` by one unit
   phase and leaves `g g^H` unchanged.
2. **master phi-CORDIC, vectoring** on `(sqrt(lambda) L(k,k), |g(k)|)`. Both are real. The
   result `sqrt(lambda L(k,k)^2 + |g(k)|^2)` is the new diagonal element, real and positive.
3. For each `i > k`, the master phi-CORDIC rotates `(sqrt(lambda) Re L(i,k), Re g(i))`. The
   **slave phi-CORDIC**, driven by the master's direction word ("rot"), rotates the
   imaginary parts with the same real rotation. The first outputs form the new column `k`.
   The second outputs are the updated `g(i)`, which feed back to the theta-CORDIC for
   column `k+1`.

After `N` columns the factor is completely updated. A CORDIC cell performs one
micro-rotation per clock (`ITER = 16`). It uses a 180-degree pre-rotation for vectors with
negative x. A multiplication by `1/K` (K = 1.6468) then removes the CORDIC gain. The
forgetting factor is applied as a multiplication by `sqrt(lambda)` (`SQRT_LAMBDA`,
Q1.17, default `lambda = 0.9`) when an old element is read. `init` loads `delta * I`
(`delta = 1/16`) into both banks so that the first substitutions are well defined.

Word format: 20-bit two's complement with 15 fractional bits. This is 16-bit precision
plus four integer guard bits against growth of the factor.

Schedule: each CORDIC operation takes `ITER + 3` cycles (19), including one control cycle.
The theta cell works one element ahead of the phi pair:

* the theta rotation of `g(k+1)` runs beside the phi vectoring of column `k`;
* the theta rotation of `g(i+1)` runs beside the phi rotation of element `i`.

Column `k` therefore costs `N - k + 1` operation slots. An update takes
`((N+1)(N+2)/2 - 1) * (ITER+3)` = 1026 cycles for `N = 9`, plus two control cycles. The
theta vectoring of the next column still waits for the last phi rotation of the current
column. The published chip reports 390 cycles for its systolic, pipelined Cholesky
processor. That schedule is not described in detail and is not reproduced here.

## Floating point (`jste_pkg`)

The FBS processor works in floating point because `h` and `w` span a wide dynamic range.
The format is a 16-bit two's complement mantissa `m` and a 5-bit exponent `e`:
`value = m / 2^15 * 2^(e-16)`. Numbers are normalised (`m[15] != m[14]`) and zero is
`m = 0`. Results are truncated; an exponent above 31 saturates and one below 0 flushes to
zero. The package holds the arithmetic as functions (`fp_mul`, `fp_add`, `fp_div`,
`fp_isqrt`, conversions, complex versions). The BS, MAC and ISQRT units and the testbenches
all use these same functions.

The range is small (about `2^-16 .. 2^15`). Before normalisation, `h` grows like the
inverse square of the smallest singular value of `Ls`, so its squared norm could overflow.
The FBS processor therefore prescales `h` by a power of two, taken from its largest exponent,
before it forms the norm and applies the `1/sqrt`.

## FBS processor (`fbs_proc`, `fbs_mac`, `fbs_bs`, `fbs_isqrt`, `fbs_agu`)

The data path has these units:

* a complex **MAC** (one product per clock, optional conjugation of the first operand);
* a **BS** unit: `(x - s) / d` closes one row of a substitution, where `x` is the
  right-hand side, `s` the MAC result and `d` the real diagonal element. `x * d` scales;
* an **ISQRT** unit;
* two **AGUs**: one for the factor memory (row-major or transposed, for the `L^H`
  products), one for the working vector memory.

The program is a sequence of *rows*. Each row clears the accumulator, takes one term per
clock and finishes in one BS cycle (`k + 2` cycles for `k` terms):

| phase | computes | rows x terms |
|---|---|---|
| FWD | `Ls v = h_prev` | L x (0..L-1) |
| BWD | `Ls^H h = v` | L x (L-1..0) |
| NRM | `1 / sqrt(sum |h|^2)` (after prescaling) | 1 x L |
| SCL | `h = h * isq` | L x 0 |
| UH | `u = U^H h` | M x L |
| WBW | `L^H w = u` | M x (M-1..0) |
| SPAT | `r(n) = w^H y(n)` | 1 x M |
| MF | `z(n-L+1) = sum_l h_l r(n-L+1+l)` | 1 x L |
| AC | `s_j = sum_l h_l conj(h_{l+j})`, j = 1..L-1 | (L-1) x (L-j) |
| WW | `ww(state) = sum_j Re(s_j) * (+-0.5)` | 16 x (L-1) |

One run takes 227 cycles at the default sizes. `z` and `ww` are converted to 16-bit fixed
point with 10 fractional bits and written over the Viterbi bus: address 0 holds `Re z`,
address `1 + state` holds `ww`. After reset, `h_prev` is the unit vector `e0`.

Because `r = w^H y ≈ h^H x`, the effective channel after beamforming is `conj(h)`. The
matched filter with `h` then gives Ungerboeck samples
`z_k = s_0 x_k + sum_j (s_j x_{k-j} + conj(s_j) x_{k+j})`. This is why the trellis needs
only `z` and the autocorrelation.

## Viterbi processor (`viterbi_proc`, `vit_butterfly`)

* State: the last `L-1 = 4` symbols, newest in bit 0. Predecessors `j` and `j+8` lead to
  successors `2j` and `2j+1`.
* Branch gain for new symbol `x = +-1` from state `p`: `x * (Re z - ww(p))`. Metrics are
  maximised. They are 24-bit modulo numbers compared by the sign of their difference, so
  they are never rescaled.
* **BUTTERFLY**: five cycles (latch, `z - ww`, add, compare, select). It reads
  `Metr0`/`Metr8`/`ww0`/`ww1` and writes the two new metrics and survivor bits.
  A trellis step runs the 8 butterflies and takes 50 cycles (the published figure is 60
  cycles per bit).
* **RAM_MS**: two metric banks (old and new) and one 16-bit survivor word per symbol, for
  `NSYM = 160` symbols (one GSM burst).
* `xhat`: after each step, the best state's 4 bits plus its survivor bit. These are the
  L symbols of the maximum-likelihood path, fed back for the decision-directed update.
* `tb_start`: traces back from the best final state and streams the decisions `b_k` in
  time order on `bit_valid`/`bit_out`.

## Where this RTL departs from the published chip

* **Controllers.** The FBS processor (50-bit microcode, program ROM) and the Viterbi
  processor (41-bit microcode, decoder/sequencer/PROM) are microprogrammed in the original.
  Their microcode is not published, so both use hard-wired sequencers doing the same work.
  The read direction of the Viterbi processor's bidirectional data bus is not modelled.
* **Cycle counts.** Cholesky update: 1028 cycles here against 390. FBS: 227 against 540.
  Viterbi: 50 against 60 per bit.
* **Sizes and constants not given in the original:** `M = 4`, `lambda = 0.9`,
  `delta = 1/16`, `ITER = 16`, `NSYM = 160`, the Viterbi word widths, the matched-filter
  delay, the Ungerboeck metric table and the slot alignment described above. `L = 5`
  follows from the 16-state trellis of the original Viterbi processor.
* **Outside the chip:** the antenna array and RF front end. `y(n)` is a port.

At 70 MHz a slot takes about 1031 cycles (14.7 µs), so a 156-symbol burst needs about
2.3 ms. The published estimate is 1 ms per slot, and it states that real-time operation
(one 577 µs slot) needs 130-150 MHz with its faster Cholesky schedule. This RTL would need
about 280 MHz for real time.

**Training length.** From the initial state (`delta * I`, `h = e0`) and with `lambda = 0.9`,
the estimates need about 34 training slots before decision-directed operation is safe. This
is because the Cholesky update runs L slots behind the samples. A GSM training sequence has
only 26 symbols, so `tb_jste_gsm_slot` first runs the buffered training part once on its own.
It then clears the trellis and processes the whole burst.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares results with values
computed independently in `real` arithmetic and ends with a `TB_RESULT` line.

| testbench | what it checks |
|---|---|
| `tb_cordic_cell` | vectoring magnitude and zero `y`; rotation by the found angle; latency ITER+2 |
| `tb_chol_ram` | both read ports against a shadow copy |
| `tb_cholesky_proc` | after each of 12 random updates, `Lnew Lnew^H = lambda Lold Lold^H + g g^H` (tolerance 2e-3 plus 2e-3 relative), real positive diagonal, cycle bound |
| `tb_fbs_mac`, `tb_fbs_bs`, `tb_fbs_isqrt`, `tb_fbs_agu` | unit arithmetic and addressing against real arithmetic |
| `tb_fbs_proc` | `h`, `w`, `z` and the whole Viterbi table against the algorithm in real arithmetic; 227 cycles |
| `tb_vit_butterfly` | 500 random ACS operations, 5-cycle latency |
| `tb_viterbi_proc` | 120-symbol burst: matched-filter samples of a 5-tap channel with a small disturbance; error-free decisions (all but the last L-1), step ≤ 60 cycles, symbol count, final `xhat` equal to the last traced-back bits |
| `tb_jste_chip` | whole receiver at default sizes (see below) |
| `tb_jste_gsm_slot` | one 156-symbol GSM burst with 26 training symbols, after a training pre-pass: unit-norm `h`, no more than 3 bit errors after training (none in practice), cycles for the burst (160 992, or 2.3 ms at 70 MHz) |

`tb_jste_chip` sends a 120-symbol burst through a 3-tap channel from 20°. An interferer of
equal power arrives from -40°, and some noise is added. The first 40 slots use training
symbols and the rest run decision-directed. The testbench checks:

* `|h| = 1` after every slot;
* no more than 3 bit errors after training. Typically there are none; the only errors
  appear while the estimates are still settling, early in training;
* that each mechanism occurs: training and decision-directed updates, the mode switch,
  reads from both banks, Cholesky/FBS overlap, and the traceback.

## Simulating

All files are plain SystemVerilog-2017. With Verilator 5:

```
verilator --binary --timing --top-module tb_jste_chip -y rtl -y tb +libext+.sv \
          rtl/jste_pkg.sv tb/tb_jste_chip.sv
./obj_dir/Vtb_jste_chip
```

Replace `tb_jste_chip` with any other testbench name. The whole-receiver test simulates
about 125 000 clock cycles in well under a second.

## Changing it

* `M`, `L`, `ITER` and `NSYM` are parameters of `jste_chip` and are passed down.
  `L` sets the trellis to `2^(L-1)` states. The Viterbi bus address width and the FBS
  row program follow automatically.
* `lambda` and the initial diagonal are the `SQRT_LAMBDA` and `DELTA` parameters of
  `cholesky_proc`.
* The float format lives only in `jste_pkg`. Its field widths are fixed by the `fp_t`
  struct and the shift constants in `fp_norm`.

## Files

`rtl/`: `jste_pkg` (sizes, number formats, arithmetic), `cordic_cell`, `cholesky_proc`,
`chol_ram`, `fbs_mac`, `fbs_bs`, `fbs_isqrt`, `fbs_agu`, `fbs_proc`, `vit_butterfly`,
`viterbi_proc`, `jste_chip` (top).
`tb/`: one `tb_<module>` per module, plus `tb_jste_gsm_slot` (a whole GSM burst).
