# Scalable two-level Karatsuba multiplier for GF(2^m) in shifted polynomial basis

This RTL multiplies two elements of a large binary field, GF(2^1223) by default,
the size used for pairing-based cryptography at the 128-bit security level. It
computes

    C = x^-v · A · B  mod F(x),      F(x) = x^1223 + x^255 + 1,   v = 254

where A, B and C are in the *shifted polynomial basis* (SPB). In that basis an
element is stored as the coefficients a_0 … a_(m-1) of x^-v·(a_0 + a_1 x + …).
Converting from or to the plain polynomial basis costs no hardware, because the
stored bits are the same.

Two Karatsuba levels let one moderate-sized multiplier do a 1223-bit product:

* **Outer level (three-way, time-multiplexed).** A and B are cut into three
  n-bit subwords, n = ⌈m/3⌉ = 408. A three-way Karatsuba split needs only six
  subword products instead of nine. All six run on one subword multiplier, one
  per clock. Each product is shifted into place and added into an accumulator D.
* **Inner level (d-term Karatsuba, spatial).** The subword multiplier is a
  pipelined systolic array built on a one-step d-term Karatsuba product of
  d-bit digits (d = 10). Its partial results stay in Karatsuba's "evaluation
  domain" until the very end, so the costly reconstruction is done only once.

One multiplication takes 13 clocks. A new multiplication can start in the cycle
`done` is raised.

## The outer level: six partial products

With A = A0 + A1 x^n + A2 x^2n (and B likewise), define

    A3 = A0+A1   A4 = A0+A2   A5 = A1+A2      (B3, B4, B5 likewise)
    Ci = Ai·Bi,  i = 0..5

Then

    A·B = C0(1 + x^n + x^2n) + C1(x^n + x^2n + x^3n) + C2(x^2n + x^3n + x^4n)
        + C3 x^n + C4 x^2n + C5 x^3n

Each product i is described by three control vectors, held in `CTRL_TABLE` of `control_unit`:

| i | S0 (selects one subword) | S1 (adds a second one) | S2 (sparse multiplier P_i) |
|---|---|---|---|
| 0 | A0 | – | 1 + x^n + x^2n |
| 1 | A1 | – | x^n + x^2n + x^3n |
| 2 | A2 | – | x^2n + x^3n + x^4n |
| 3 | A0 | A1 | x^n |
| 4 | A0 | A2 | x^2n |
| 5 | A1 | A2 | x^3n |

In the RTL, bit k of `s0` and `s1` selects subword k. Bit k of `s2` is the
coefficient of x^(k·n).

* `control_unit` keeps the six rows in a circular shift register. It rotates
  the register once per issued product, so after six products it is back at
  row 0.
* Two `operand_gen` instances, one for A and one for B, form
  Y = Σ s0[k]·Xk + Σ s1[k]·Xk.
* `degree_align` multiplies the 815-bit subword product by P_i and adds it into
  the 2445-bit register D. P_i is applied as the sum of the `s2`-gated shifts
  x^(k·n).
* `fpr` reduces D. A single term can reach degree 6n−2 = 2446. Bits above degree
  2m−2 = 2444 are dropped: they cancel in the full sum, because A·B has
  degree ≤ 2444.

## The inner level: evaluation points and recombination

This is the least obvious part of the design.

**One digit product.** For d-bit digits a and b, the one-step d-term Karatsuba
product works on *evaluation-point* (EP) vectors of S = d(d+1)/2 bits:

    EP(a) = (a_0 … a_(d-1),  a_i + a_j for every i < j)     (ep.sv)

For d = 10, S = 55. The *point-wise multiplication* (PWM) is a bitwise AND of
two EP vectors (pwm.sv). It gives D_i = a_i b_i and D_ij = (a_i+a_j)(b_i+b_j).
The *reconstruction* R (rec.sv) recovers the 2d−1 product coefficients:

    c_k = Σ_{i<j, i+j=k} (D_ij + D_i + D_j)  [+ D_(k/2) if k is even]

This works because D_ij + D_i + D_j = a_i b_j + a_j b_i.

Inside an EP vector the bits are ordered as follows: singles first, then the
pairs (i, j) in lexicographic order (`gf_pkg::pair_idx`).

**Recombination.** R is linear over GF(2). So instead of reconstructing every
digit product, the array adds PWM results in the evaluation domain, and a
single final reconstruction (FR) handles the whole sum. The sums are kept in
*slots* of S bits. Slot s collects every PWM(EP(a_t), EP(b_j)) with t + j = s.
In the evaluation domain, a shift by x^d is a shift by one slot. FR
(`fr.sv`) applies R to each slot and overlap-adds slot s at bit s·d.

**Array organisation** (`subword_mult.sv`). At the default sizes (n = 408):

* p = ⌈n/d⌉ = 41 digits of A. `ep_vec` (EP-A) produces P_A, which is 41 × 55 bits.
* B is cut into words B~ of l digits, l = 2^(⌈log2(1.5 d)⌉ − 2) = 4. That gives
  k = ⌈p/l⌉ = 11 words.
* The words are spread over W = ⌈k/T⌉ = 4 *parallel systolic arrays* (`psa`) of
  T = 3 processing elements each. B is zero-padded to W·T·l = 48 digits.
* A processing element (`pe`) does three things:
  * It expands its B~ word with its own EP-B, which is `ep_vec` with l digits.
  * It forms p·l PWM products in `pwm_core`, summed into p+l−1 slots.
  * It adds them into the running row sum at slot offset r·l, r being its
    position in the row.
  P_A and the row sum are registered and passed to the next PE.
* Because P_A moves one PE per clock, B~ word r of a row goes through r skew
  registers before it reaches PE r.
* A pipelined adder tree (`pat`) adds the four row sums, with row g offset by
  g·T·l slots (88 slots in total). FR then produces the 815-bit product.

The critical path in a PE is one EP XOR, one AND, log2(l) XOR levels and one
adder XOR. The combinational parts that follow it are FR, the alignment and the
D update, which come to roughly seven XOR levels. `pat`'s last register is the
only register in front of FR.

## Interface and timing

`spb_mult_top` ports:

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| start | in | 1 | sampled with `a`, `b` at a clock edge when `busy` is low |
| a, b | in | M | SPB operands |
| busy | out | 1 | high from the cycle after the start edge until `done` |
| done | out | 1 | one-cycle pulse; `c` holds the new result |
| c | out | M | x^-v·a·b mod F; held until the next result |

Pipeline of one operation, counted in clock edges after the start edge:

| edges | what happens |
|---|---|
| 1–6 | the operand register captures the decomposed subwords of products 0…5 |
| +T (3) | the products pass through the T PEs of every row |
| +⌈log2 W⌉ (2) | adder-tree levels |
| +1 | D accumulates the aligned product (last product: edge 12) |
| +1 | the reduced result is registered in `c`; `done` rises (edge 13) |

In general the latency is 6 + T + ⌈log2 W⌉ + 2. The subword multiplier accepts
a new operand pair every clock, but the controller runs one field
multiplication at a time. A `start` while `busy` is ignored.

## Final reduction and the choice of v

`fpr` maps each coefficient of D directly into the output. Take coefficient i,
with e = i − v:

* 0 ≤ e < m: it is kept.
* e < 0: it becomes x^(m+e) + x^(k+e), because x^-1 = x^(m−1) + x^(k−1).
* e ≥ m: it becomes x^(e−m+k) + x^(e−m).

The shift v = k − 1 is the value for which every term lies at most one step
outside the range. The reduction is then 2m−2 XOR inputs in two levels. Only
trinomials are supported. A pentanomial field would need a different `fpr`.

## Files

| file | block |
|---|---|
| `rtl/gf_pkg.sv` | EP index helpers, l formula, control-vector row type |
| `rtl/spb_mult_top.sv` | top: registers A, B, operand register, output register |
| `rtl/control_unit.sv` | circular control register, issue sequencing, S2 delay line |
| `rtl/operand_gen.sv` | decomposed operand generation |
| `rtl/subword_mult.sv` | systolic subword multiplier (EP-A, PSAs, PAT, FR) |
| `rtl/psa.sv`, `rtl/pe.sv`, `rtl/pwm_core.sv` | systolic row, processing element, PWM core |
| `rtl/ep.sv`, `rtl/ep_vec.sv`, `rtl/pwm.sv`, `rtl/rec.sv` | EP, EP row, PWM, reconstruction |
| `rtl/pat.sv`, `rtl/fr.sv` | pipelined adder tree, final reconstruction |
| `rtl/degree_align.sv`, `rtl/fpr.sv` | degree alignment with D, final polynomial reduction |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb/tb_ref_pkg.sv` holds the reference arithmetic |

## Parameters

Top-level parameters are `M` (1223), `K` (255, the middle exponent of the
trinomial), `DIG` (inner digit size d, 10) and `T` (PEs per systolic row, 3).
Everything else is derived: n, p, l, W and the pipeline depth.

* Changing `DIG` changes l. For example, d = 5 gives l = 2.
* Changing `T` trades the number of rows W against latency.
* `DIG` must be at least 2. F must be a trinomial with 1 ≤ K < M.

Size after generic synthesis at the defaults: about 43 k flip-flop bits. Most of
them are the P_A (2255 bits) and row-sum (2860 bits) registers of the 12 PEs.
There are about 1.7 k 55-bit AND words in the PWM cores.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=F` and stops itself. With
Verilator 5:

    verilator --binary --timing --assert --top-module tb_spb_mult_top \
        rtl/gf_pkg.sv tb/tb_ref_pkg.sv tb/tb_spb_mult_top.sv -y rtl -y tb
    ./obj_dir/Vtb_spb_mult_top

Substitute any other `tb_<module>` for the unit tests.

* The testbenches compute their expected values independently: a schoolbook
  carry-less product, EP vectors built by enumeration, and SPB reduction by long
  division followed by v divisions by x.
* `tb_spb_mult_top` runs the full 1223-bit design. It checks twelve
  multiplications, including x^-v·1·x^v = 1, all-ones and top-bit operands,
  back-to-back starts and an ignored start while busy.
* It checks that each takes exactly 13 clocks.
* It also counts that all six partial products, both reduction directions and
  the ignored start actually occurred.
* `tb_spb_mult_small` runs two reduced configurations side by side for 300
  operations each:
  * GF(2^47) with d = 5 and T = 2. This gives l = 2 and a single row, so there
    is no adder-tree level.
  * GF(2^61) with d = 3 and T = 1. This gives one PE per row and four rows.
  Each operation checks values and latency.

Building the full-size top takes well under a minute.

## Where this RTL fills in or departs from the published architecture

These parts follow the source architecture:

* the two-level structure;
* the control table;
* the EP/PWM/R decomposition;
* p, l, k and w and their formulas;
* the PSA/PAT/FR organisation and the PE contents;
* the register set A, B, D;
* the trinomial reduction cost.

The following are this design's own choices:

* **v = k − 1.** The source does not state v. This value makes the trinomial
  reduction cost match the cost quoted for trinomials.
* **T = 3, hence W = 4.** The source gives latency (d²+d)/2 + t + 4, reports 62
  clocks for d = 10, and does not state t. 62 = 55 + 3 + 4 gives t = 3.
  With six outer products the same formula gives 6 + 3 + 4 = 13, which this
  design meets. The 62-clock figure belongs to a ten-term outer split
  (55 partial products). Only the three-way outer split is built here.
* **Digit size.** d = 10 is used for the inner level only. The outer split is
  fixed at three terms.
* **Pipeline registers.**
  * An operand register sits between the operand generators and the array.
  * Each adder-tree level ends in a register.
  * The output register on `c` is added.
  * The B~ skew registers in each row are added; the source draws B~ entering
    every PE directly.
* **Degree alignment.** The source selects one of six precomputed shifted
  terms. Here the `s2`-gated shifts are summed, which gives the same six
  functions.
* **Handshake.** start/busy/done, the state machine that tracks validity
  alongside the pipeline, and the reset choices are this design's own. Datapath
  registers have no reset.
* **Gate counts.** XOR sharing inside R and the exact gate counts are left to
  synthesis. No attempt is made to match the published gate or latch totals.
