# Multiplier-free sums of products by partitioned arithmetic

A sum of products `Y = Σ A_i·X_i` (i = 0 … N−1) is the core of an FIR filter
or a DFT. The usual circuit multiplies every pair. This design multiplies
nothing. It cuts each coefficient into a few short bit fields and sorts the
work by **field value**: all operands that share a field value `l` are added
into one RAM word. The words are then weighted by `l` using additions alone.

An L_A-bit coefficient magnitude is cut into K fields `a_ij` of M = L_A/K bits.
Field value `l` can only be 0 … 2^M−1. So however large N is, the weighting
step works on just 2^M partial sums. The cost is about K·N + 2·2^M additions
and no multiplications. At the default sizes (L_A = 12, K = 2, M = 6, N = 100)
that is 326 additions, or 3.26 per product. A shift-and-add multiplier would
need 13 per product.

The RTL contains three processors built from the same parts:

| unit | computes | idea |
|---|---|---|
| `sp_method1` | `Y = Σ A_i X_i` | shift every operand before binning (the main realization) |
| `sp_method2` | `Y = Σ A_i X_i` | bin unshifted operands per field position; shift only the bin sums |
| `tsp_unit`   | `Y_i = A_i·X`, i = 0 … N−1 | table of the multiples `X·l`, read once per field (transposed form) |

`pa_sp_tsp_top` instantiates all three side by side. They share only clock and
reset.

This is an independent RTL implementation of the method published by
K. Nakayama, "A New Realization of Sum of Products and Transposed Sum of
Products Implementation by Partitioned Arithmetic". Only the Method I datapath
is drawn in that publication. Method II and the transposed unit are given as
procedures, and their circuits here are this design's own.

## Number formats

* **Coefficient** `A_i`: sign-magnitude, L_A+1 bits. Bit L_A is the sign
  (1 = negative) and bits L_A−1 … 0 are the magnitude. The magnitude is cut
  into fields `a_i1` (most significant) … `a_iK`, and field j has weight
  `2^(M0 − jM)`. The value is therefore
  `A_i = ±Σ_j a_ij·2^(M0−jM)`, with M0 = 0 meaning `|A_i| < 1`.
* **Data**: X, every partial sum and Y are L_X-bit two's complement words
  with one common binary point (that of X).
* A shift by `2^−M` is an arithmetic right shift. It **truncates** toward −∞.
  Additions wrap modulo 2^L_X.

Example with L_A = 4, K = 2, M = 2 and M0 = 1: the coefficient `1 0101` is
−(1·2^−1 + 1·2^−3) = −0.625.

## Method I: the main processor

### Why it works

Write `X~_ij = ±2^(M0−jM)·X_i`, the operand shifted for field j and signed by
`A_i`. Then `Y = Σ_i Σ_j a_ij·X~_ij`. Group the terms by field value:

```
S_l  = Σ { X~_ij : a_ij = l }           l = 0 … 2^M−1
Y    = Σ_l l·S_l
```

The product `l·S_l` needs no multiplier. Take suffix sums from the top:
`S~_m = S~_(m+1) + S_m`, starting from `S~_(2^M) = 0`. Each `S_l` is then
contained in exactly `l` of the suffix sums `S~_1 … S~_l`, so
`Y = Σ_(m=1..2^M−1) S~_m`. Both steps are plain accumulations over the RAM,
run from the top address down.

### Datapath

```
 X_i ─► ×(±1) ─► ×2^M0 ─► (+) ─► >>M ──┬──► X~_ij ─► ADD1 ──► SW3(1) ─┐
 sign of A_i ─┘           ▲            │             ▲                 │
                          └──── τ ◄────┘   RAM OUT ─►SW2┐              ▼
 a_ij ──────────► SW1(1) ─┐                    (1)│(2) ▼           RAM IN
 sequential l ──► SW1(2) ─┴─► RAM ADDRESS            ADD2 ─┬─► SW3(2)
                                                     ▲  τ ◄┤
                                                     └─────┘──► SW4 ─► Y
```

* **Operand generator** (`xstar_gen`). It negates X_i when A_i is negative
  and scales by 2^M0. It then applies the field shifts *recursively* with one
  M-bit shifter. For j = 1 the adder takes the new operand. For j > 1 it takes
  only the previous result from the τ register. So step j yields
  `±2^(M0−jM)·X_i`.
* **Partial-sum RAM** (`ps_ram`). 2^M words of L_X bits, with an
  asynchronous read and a synchronous write. A word can therefore be read,
  added to and written back in a single cycle.
* **ADD1** adds the operand to the word read at address `a_ij`.
* **ADD2 with τ** (`add2_acc`) is the accumulator used by the two backward
  passes.
* **Switches SW1–SW4** (`sp_ctrl`, type `sp_sw_t` in `pa_pkg`):
  * SW1 selects the address: the field `a_ij` or the sequential counter.
  * SW2 routes the RAM output to ADD1 or to ADD2.
  * SW3 selects the RAM write data: ADD1, ADD2, none or zero.
  * SW4 releases the result.

### Sequence and timing (`sp_ctrl`)

| pass | cycles | SW1 / SW2 / SW3 | action |
|---|---|---|---|
| CLEAR | 2^M | seq / – / zero | RAM words 0 … 2^M−1 set to 0 |
| PH1 | K·N | a_ij / ADD1 / ADD1 | for i = 0 … N−1, j = 1 … K: `RAM[a_ij] += X~_ij` |
| PH2 | 2^M−1 | seq / ADD2 / ADD2 | l = 2^M−1 … 1: acc += RAM[l]; RAM[l] = acc (→ S~_l) |
| PH3 | 2^M−1 | seq / ADD2 / off | l = 2^M−1 … 1: acc += RAM[l]; SW4 closes on the last |

The ADD2 register is cleared before PH2 and again before PH3. Each pass does
one RAM access per cycle.

Handshake:

1. While idle, load `X_i` through `x_we`/`x_waddr`/`x_wdata` and `A_i`
   through `a_we`/`a_waddr`/`a_wdata`.
2. Pulse `start`. `start` is ignored while `busy`.
3. `busy` stays high for `2^M + K·N + 2(2^M−1)` cycles: 390 at the
   defaults.
4. On the next cycle `y_valid` pulses for one cycle and `y` holds the result
   until the next run.
5. `phase` shows the current pass.

## Method II (`sp_method2`)

Method II keeps the operands unshifted (`±2^M0·X_i`) and keeps a separate
bin for every field position j:

1. **BIN** (K·N cycles): `RAM[j, a_ij] += ±2^M0·X_i`, which gives `S_jl`.
2. **MERGE** (K·(2^M−1) cycles): for l = 2^M−1 … 1, compute
   `v = (v + S_jl) >> M` for j = K … 1, starting from v = 0. The result is
   `S_l = Σ_j S_jl·2^−jM`, and it is written over word (1, l).
3. **PH2 / PH3**: the same two backward passes as Method I, over the words
   (1, l).

A clearing pass of K·2^M cycles comes first. This method shifts the K·2^M bin
sums rather than the K·N operands, so each `S_l` carries one rounding chain
instead of one rounding per operand. It needs K·2^M partial-sum words
(128 at the defaults).

The interface is the same as Method I, and `phase` has type `sp2_phase_e`.
Latency is `K·2^M + K·N + K(2^M−1) + 2(2^M−1)` busy cycles, then `y_valid`.

## Transposed sum of products (`tsp_unit`)

This unit multiplies one value X by N coefficients, as a transposed FIR
filter does.

1. **Table phase** (2^M cycles). Word l of the RAM receives `2^M0·X·l`,
   built by repeated addition: each multiple is the previous one plus
   `2^M0·X`.
2. **Output phase** (K cycles per coefficient). For each i, the RAM is read
   at `a_iK, a_i(K−1), … a_i1`. Each word is added to the running value and
   the sum is shifted right by M: `v = (v + T[a_ij]) >> M`. After field 1,
   `v = Σ_j 2^M0·X·a_ij·2^−jM`. The sign of A_i is applied and the result
   `Y_i` is registered.

Handshake: load the coefficients, present `x` and pulse `start`.
`Y_0 … Y_(N−1)` then come out in order, one every K cycles. Each arrives as a
`y_valid` pulse carrying `y` and `y_idx`. The first one comes `2^M + K`
cycles after the start cycle.

## Scaling, rounding and overflow

All arithmetic is L_X bits wide and none of it saturates, so the user must
scale the inputs:

* **Method I.** The operand generator must not overflow: `|2^M0·X|` must fit
  in L_X bits. Intermediate sums may wrap, because all later operations are
  additions and wrapping is exact modulo 2^L_X. Only the final Y has to be in
  range.
* **Method II.** The merge shifts come *after* additions, so every bin sum
  `S_jl` must stay in range. With random data these sums grow like
  `sqrt(N/2^M)·max|X|`.
* **TSP.** The largest table entry `2^M0·X·(2^M−1)` must fit in L_X bits.
* **Rounding.** Every `>> M` truncates and drops M bits. Method I truncates
  once per (operand, field), which is K·N error sources. Method II and the
  TSP truncate once per chain step on the bin or table sums. When X_i is a
  multiple of 2^(L_A−M0), all three units are exact.

## Parameters and cost

| parameter | default | meaning |
|---|---|---|
| `N`  | 100 | number of products |
| `LA` | 12 | coefficient magnitude bits (plus one sign bit) |
| `K`  | 2 | fields per coefficient; must divide LA; M = LA/K = 6 |
| `LX` | 20 | data and partial-sum word length |
| `M0` | 0 | coefficient scale exponent (≥ 0 only) |

Memory at the defaults: 13,020 bits in total.

| unit | signal memory (N×LX) | coefficients (N×(LA+1)) | partial sums | total |
|---|---|---|---|---|
| Method I | 2000 | 1300 | 2^M × LX = 1280 | 4580 |
| Method II | 2000 | 1300 | K·2^M × LX = 2560 | 5860 |
| TSP | – | 1300 | 2^M × LX = 1280 | 2580 |

The Method I total agrees with `N(LA+1+LX) + LX·2^M`.

Other sizes are set through the parameters. For example, K = 3, 4 or 6 cuts a
12-bit coefficient into 4-, 3- or 2-bit fields, which trades RAM size (2^M)
against the K·N term. Larger N only lengthens the memories and the first
pass.

## Where this implementation departs from or adds to the published method

* **Truncation instead of rounding.** The published noise analysis models a
  rounding error, uniform in ±½ LSB. Here shifts truncate, which is cheaper.
  The error variance is the same, but there is a bias of −½ LSB per shift.
* **Clearing passes.** The RAM is zeroed before binning. The published
  description assumes empty partial sums but does not say how they are
  emptied.
* **Address ranges.** Word 0 (weight zero) is skipped in the backward passes
  and in the Method II merge.
* **Method II memory.** It is sized at K·2^M words, which the K·2^M bin sums
  need. The published text states that both methods need the same memory,
  which would be 2^M partial-sum words.
* **TSP circuit.** The TSP accumulation order (add, then shift, j = K … 1)
  follows the published procedure and its count of K shifts per output. The
  circuit around it is this design's own.
* **Memories and interface.** The signal and coefficient memories are plain
  indexed stores with a write port, not a sample delay line. The start/busy
  and valid handshakes, the registered outputs and the synchronous
  active-low reset are this design's choices. Reset clears control state and
  registers, not memory contents.
* **Scale exponent.** Only M0 ≥ 0 is supported.

## Verification

Each testbench is self-checking. It ends with one
`TB_RESULT checks=… failures=…` line, and it has a watchdog. Every one runs
the default sizes. The unit testbenches also run a small configuration: the
8-coefficient worked example with L_A = 4, K = 2, M0 = 1, whose coefficients
are `1 0101, 0 1101, 0 1010, 1 0001, 1 1001, 0 0110, 0 0011, 0 1110`.

| testbench | checks |
|---|---|
| `tb_pa_sp_tsp_top` | all three units at the defaults on shared data. Exact and truncation-model comparisons. Sum of TSP outputs equals the Method I result. Counts each phase, negative coefficients, zero fields and recursive shifts, and fails if any never occurs |
| `tb_sp_method1`, `tb_sp_method2` | worked example, exact sums, random sums against a rounding model, latency |
| `tb_tsp_unit` | every Y_i, its index, first-output latency and one-per-K rate |
| `tb_workloads` | the operation-count table sizes: K = 2 with N = 20, 50, 100, 500 and 1000, and N = 100 with K = 3, 4 and 6. All three units, exact results, busy cycles equal to the addition counts |
| `tb_sp_ctrl` | cycle-by-cycle switch settings and addresses, for K = 2 and K = 3 |
| `tb_xstar_gen`, `tb_add2_acc`, `tb_ps_ram`, `tb_operand_mem` | the building blocks against simple models |

Running a testbench with Verilator, for example the end-to-end one:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
  rtl/pa_pkg.sv tb/tb_pa_sp_tsp_top.sv --top-module tb_pa_sp_tsp_top -o sim
./obj_dir/sim
```

Linting a unit works the same way:

```
verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl +libext+.sv rtl/pa_pkg.sv rtl/sp_method1.sv
```

## Files

* `rtl/pa_pkg.sv`: default sizes, switch and phase types.
* `rtl/sp_method1.sv`: the Method I processor.
  * `rtl/sp_ctrl.sv`: its sequencer.
  * `rtl/xstar_gen.sv`: operand generator.
  * `rtl/add2_acc.sv`: ADD2 accumulator.
  * `rtl/ps_ram.sv`: partial-sum RAM.
  * `rtl/operand_mem.sv`: signal and coefficient memories.
* `rtl/sp_method2.sv`: Method II.
* `rtl/tsp_unit.sv`: transposed sum of products.
* `rtl/pa_sp_tsp_top.sv`: top level.
* `tb/`: one testbench per module, named `tb_<module>.sv`.
