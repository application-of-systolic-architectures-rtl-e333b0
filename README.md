# A cylindrical systolic array for state-space recursive filters

A recursive (IIR) filter of order N-1 can be written in state-space form:

    x(n+1) = A x(n) + B e(n)
    y(n)   = C x(n) + D e(n)

or, stacking the state and the sample, as one matrix-vector product
`v = H u`, where `H = [A B; C D]` is N x N, `u = [x(n); e(n)]` and
`v = [x(n+1); y(n)]`. A plain systolic matrix-vector array needs a time
proportional to N for every sample, and the recursion stops it from starting
the next sample before the states come back.

This design uses a different route. If N = p·q and H can be written as a
single Kronecker product of two small matrices (a one-term CTP decomposition),
the N-vector product turns into a product of three small matrices:

    fold u column by column into a p x q matrix U     (u = vec U)
    V = L U R                                          (v = vec V)
    holds for every u exactly when  H = Rᵀ ⊗ L

A p x p array can form `L U R` in a number of steps that grows with p + q
rather than with p·q. The array is *cylindrical*: its diagonal partial-sum
paths wrap around from one edge to the other, and it is *reconfigured
dynamically* between two operating forms. In the first it computes `L U`; in
the second it multiplies the result by `R`. The RTL is written for p = q = P,
with P = 2 by default: a third-order filter whose 4 x 4 matrix H comes from two
2 x 2 factors.

The document also proposes building the processing elements from
switched-capacitor (SC) circuits. The digital datapath here does the same
arithmetic in fixed point. The SC element itself is included as a behavioural
model, together with RTL for its two-phase switch clocks. Both stand beside the
filter and are not connected to it.

## Folding the filter: which Kronecker product

For the default size (N = 4, p = q = 2):

    U = [ x1(n)  x3(n) ]      V = [ x1(n+1)  x3(n+1) ]
        [ x2(n)  e(n)  ]          [ x2(n+1)  y(n)    ]

The input sample sits in the last entry of U, and the output sample appears in
the last entry of V. The identity `vec(L U R) = (Rᵀ ⊗ L) vec(U)` fixes the
order of the factors:

    H[(j·p+i)][(l·p+k)] = R[l][j] · L[i][k]        (all indices from 0)

So you load L and R, not H. Finding L and R for a given filter (the
decomposition) is done outside the hardware, and a general H has no exact
single-term decomposition. The testbench goes the other way: it draws random
L and R, builds H from them, and checks the array against the ordinary
state-space recursion with that H.

## The array

The array has P x P nodes. Node (r, c) is in row r (counted from the top) and
column c (counted from the left). It holds the coefficient

    l[(c − r) mod P][c]

The top row therefore holds the diagonal of L, and column c holds column c of
L. For P = 2 that gives l11 and l22 in the top row and l21 and l12 in the
bottom row (1-based labels). The same node later holds the result
`V[(c − r) mod P][c]`.

Two kinds of path connect the nodes:

* **Longitudinal (down a column).** A value entering column c at the top
  moves down one row per clock, unchanged. Column c is fed row c of U and then
  column c of R.
* **Transversal (diagonal).** Node (r−1, (c−1) mod P) feeds node (r, c). The
  diagonals wrap around the sides of the array, which makes it a cylinder. The
  bottom node of each diagonal, (P−1, c−1), can also feed the top node (0, c).
  A single switch, `fb_sel`, selects either zero or this fed-back value at the
  top transversal inputs. This switch is the dynamic reconfiguration.

The two wave fronts then work as follows.

1. **First wave front, L·U.** Row c of U enters column c, one element per
   clock, and the top transversal inputs receive zero. Each node computes
   `y_s = y_e + l·x_e`. A partial sum that starts at node (0, i) moves down its
   diagonal and meets `U[k][t]` times `l[i][k]` for every k. After P nodes it
   leaves the bottom as `(LU)[i][t]`. The rows of LU come out of the bottom one
   element per clock.
2. **Second wave front, (LU)·R.** At clock P the switch closes, so the rows of
   LU leaving the bottom re-enter at the top. At the same clock column c of R
   starts down column c. Now each node passes both inputs on unchanged and
   accumulates `V += y_e·x_e` in its own memory. Node (r, c) sees row
   (c−r) mod P of LU and column c of R, so it builds exactly its own element
   of V.

Clock by clock for P = 2 (k counts clocks after a sample is taken; 1-based
matrix labels):

| k | top inputs (col 0, col 1) | node (0,0) | node (0,1) | node (1,0) | node (1,1) |
|---|---|---|---|---|---|
| 0 | x1, x2 | l11·x1 | l22·x2 | – | – |
| 1 | x3, e | l11·x3 | l22·e | (LU)21 = l22·x2 + l21·x1 | (LU)11 = l11·x1 + l12·x2 |
| 2 | r11, r12; switch on | V11 = (LU)11·r11 | V22 = (LU)21·r12 | (LU)22 = l22·e + l21·x3 | (LU)12 = l11·x3 + l12·e |
| 3 | r21, r22 | V11 += (LU)12·r21 | V22 += (LU)22·r22 | V21 = (LU)21·r11 | V12 = (LU)11·r12 |
| 4 | idle; switch off | – | – | V21 += (LU)22·r21 | V12 += (LU)12·r22 |
| 5 | idle | all four V in the node memories; collected | | | |

Each node's operating form travels with the data. Every longitudinal value
carries a 2-bit tag: `TAG_LU`, `TAG_ACC_FIRST`, `TAG_ACC` or `TAG_IDLE`. As a
result the change of form moves down the array one row per clock, behind the
last element of U. A node's single memory holds l before the sample and V
after it. The first product of the second wave front (`TAG_ACC_FIRST`) therefore
overwrites the memory rather than adding to it, and L is written into every
node again before each sample.

## One sample: the frame

The sequencer (`ctp_seq`) runs one sample per frame of **3P clocks**:

| clocks | what happens |
|---|---|
| edge that takes e(n) | L loaded into every node; e(n) written into U[P−1][P−1] |
| 0 … P−1 | rows of U down the columns (`TAG_LU`); top transversal inputs get zero |
| P … 2P−1 | columns of R down the columns (`TAG_ACC_FIRST`, then `TAG_ACC`); `fb_sel` = 1 |
| 2P … 3P−1 | lower rows finish accumulating; at 3P−1 all of V is valid, and `collect` gathers it |

The input is a valid/ready handshake. `e_ready` is high when the filter is
idle and in the last clock of a frame, so samples offered back to back are
taken every 3P clocks (6 for P = 2). `y_valid` rises 3P + 1 clocks after the
clock in which the sample was taken. The states x(n+1) appear on `state_o` at
the same time and stay there until the next collection. If no sample is
offered, the array waits and keeps its results.

**Timing compared with the source.** The document counts p + q steps per
sample for this array (4 for the example), against 2N + 1 for a Kung-type
matrix-vector array (9). Its count charges nothing for three things: carrying
the LU rows from the bottom back to the top, the skew of the second wave front
down the array, and the collection. Here every node is registered on both
paths, and one clock is one multiply-add. Three clocks of the frame come from
these items, so a sample takes 3P = 6 clocks. That is still fewer than the 9
steps of the matrix-vector array.

## Collection network and state

The results are skewed across the nodes: V[i][j] sits in node ((j−i) mod P, j).
`ctp_collect` gathers all of them in one clock into the state register S, in
matrix order. S is the U of the next sample: the states are reused directly,
and the slot U[P−1][P−1] is overwritten with the next input sample. At the same
edge the block latches y(n) = V[P−1][P−1]. A sample accepted at the same edge
takes precedence over the collected value in that one slot. Reset clears S and
the node memories, so the filter starts from rest.

## Numbers

All values are 16-bit two's complement with 12 fraction bits (Q3.12), set in
`ctp_pkg` (`DATA_W`, `FRAC_W`). Coefficients and signals therefore lie in
[−8, 8). A product is formed at full width, shifted right arithmetically by 12
bits (truncation towards −∞), and wrapped to 16 bits. Sums wrap too; nothing
saturates. Scale L, R and the input so that LU and V stay in range. The
testbenches use entries below 0.35 (P = 2) or 0.25 (P = 3) in magnitude, with
inputs below 1.0.

## Coefficients

`cfg_we`, `cfg_sel` (0 = L, 1 = R), `cfg_row`, `cfg_col` and `cfg_data` write
one element per clock into `ctp_coef_store`. L is read when a sample is taken,
and R while the second wave front is fed. Write them between frames (when
`busy` is low) so that each sample sees a single, consistent set.

## Switched-capacitor element

`sc_element` models the basic SC circuit: a grounded capacitor C is switched
by two MOS switches, O1 and O2, alternately to node V1 and to node V2. Each
period T it moves the charge C·(V1 − V2) from V1 to V2, so on average it
behaves like a resistor T/C. The model uses real-valued voltages and ideal
switches, and it is not synthesizable. `sc_clkgen` is synthesizable RTL for the
two switch clocks. It counts 2·HALF master clocks per period and drives O1 in
the first half and O2 in the second, each starting after DEAD clocks, so the
two switches are never closed together. In the top, both run from `clk` with
their own ports (`sc_*`).

## Files

| file | contents |
|---|---|
| `rtl/ctp_pkg.sv` | word format, mode tags, longitudinal token type, fixed-point multiply |
| `rtl/pe_muladd.sv` | node multiplier/adder `sum = add + a·b` |
| `rtl/pe_delay.sv` | one-clock longitudinal delay (value and tag) |
| `rtl/pe_memory.sv` | node register: coefficient l, then result V |
| `rtl/cyl_pe.sv` | node: the two operating forms |
| `rtl/cyl_array.sv` | P x P cylinder, diagonal wiring, feedback switch |
| `rtl/ctp_coef_store.sv` | L and R registers with the write port |
| `rtl/ctp_collect.sv` | collection network, state matrix, output latch |
| `rtl/ctp_seq.sv` | frame sequencer and input handshake |
| `rtl/ctp_filter.sv` | top: the filter, with the SC element and clocks beside it |
| `rtl/sc_clkgen.sv` | two-phase non-overlapping switch clocks |
| `rtl/sc_element.sv` | behavioural model of the SC element |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_ctp_filter_p3` runs the top at P = 3 |
| `tb/cyl_array_check.sv` | array test driver used by `tb_cyl_array` at P = 2 and 3 |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog that counts a failure if the test never ends. For example, to build
and run the full-size end-to-end test:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/ctp_pkg.sv tb/tb_ctp_filter.sv --top-module tb_ctp_filter
    ./obj_dir/Vtb_ctp_filter

Replace the testbench name to run any other test. For lint only:
`verilator --lint-only -Wall -Irtl -y rtl rtl/ctp_pkg.sv rtl/ctp_filter.sv`.
The array size is the top's parameter `P`. Everything else follows from it,
and the word format is in `ctp_pkg`.

## What the tests establish

* `tb_ctp_filter` runs the default (P = 2) design on 300 samples. Inputs come
  back to back at first and with random gaps later, and the coefficients are
  rewritten half-way. Every y(n) and x(n+1) is checked in two ways:
  * exactly, against LU and then (LU)R computed in the testbench with the same
    fixed-point rule;
  * within 0.02, against the real-valued recursion with H = Rᵀ ⊗ L.

  The test also checks the 6-clock spacing of back-to-back outputs and the
  7-clock latency. It counts back-to-back frames, idle waits, feedback
  switches, coefficient reloads, rewrites and SC switching periods, and fails
  if any of them never happened. `tb_ctp_filter_p3` runs the same test at
  P = 3 (an eighth-order filter).
* `tb_cyl_array` checks the LU rows at the bottom outputs and every node's V,
  at P = 2 and P = 3.
* Each of the other modules has its own test against a reference written in
  the testbench, including the sequencer's frame timing and handshake, and the
  charge per period of the SC element.

## Where this departs from the source, and what is left out

* **Step count:** 3P clocks per sample, not p + q (see the frame section).
* **Registered transversal output:** the source marks only the longitudinal
  path as delayed by one time unit. Here the transversal sum is registered too.
* **Stream order:** the source's prose says that columns of U, and rows of R,
  go down the longitudinal paths. Its worked example, and the products it
  prints, only work if column c carries row c of U and then column c of R. The
  RTL follows the worked example.
* **"Tensor product of L and R"** is implemented as H = Rᵀ ⊗ L, the ordering
  that makes V = L U R equal to H u.
* **Square arrays only** (p = q): the same nodes store the p x p matrix L and
  the p x q matrix V, which requires p = q.
* **Single-term decomposition only:** filters whose H is not exactly one
  Kronecker product are outside this design.
* **Digital processing elements:** the source builds the multiplier/adder,
  delay and memory from switched-capacitor circuits whose internals it does
  not give. This design uses fixed-point logic for them. The SC element is
  modelled behaviourally and is not connected to the datapath.
* **Not included:**
  * the Kung-type matrix-vector array, which the source uses only for
    comparison;
  * two-dimensional filters, which the source mentions but does not work out.
* **Your own choices (not from the source):** word length, rounding, reset,
  the coefficient port, the input/output handshake, the one-clock collection,
  and the SC clock dead time.
