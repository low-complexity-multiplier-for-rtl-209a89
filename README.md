# Register-sharing systolic multiplier for GF(2^m) over an all-one polynomial

This is a bit-parallel, fully pipelined multiplier for the finite field GF(2^m).
The field is built on the all-one polynomial (AOP) P(x) = 1 + x + x^2 + ... + x^m.
It takes a new operand pair every clock. Every pipeline stage has at most one XOR
gate between registers. The multiplication is split into two systolic branches of
half the usual length, which roughly halves the latency. The two branches share a
single operand register chain, so the split costs almost no extra flip-flops.

The default size is m = 6 with 7-bit operands, which is the size of the published
worked example. The size is a parameter, `M`.

## The arithmetic

### Extended basis

Because (x + 1)·P(x) = x^(m+1) + 1, a root alpha of P satisfies alpha^(m+1) = 1.
The design therefore represents every element with m+1 coefficients over the
*extended* basis {1, alpha, ..., alpha^m}. Bit i of a vector is the coefficient of
alpha^i. Two things follow:

* Multiplying by alpha is a **cyclic shift**: coefficient a_i moves to position
  i+1, and a_m wraps around to position 0. The bit-shift cell needs no gates.
* The product is a sum of rotated copies of A, with no reduction step:

      C = A·B = sum_{i=0..m} b_i · A^(i),    A^(i) = alpha^i · A  (A rotated by i)

`c` is therefore A·B mod (x^(m+1) + 1). This value is congruent to A·B mod P(x).
The design leaves the result in the (m+1)-bit form. To get the m-bit
polynomial-basis result, add the top coefficient into every other one:
c'_j = c_j + c_m for j < m.

In the example vectors used by the tests, strings print a_0 first. For example,
`1110101 · 1000010 = 0100010` at m = 6.

### When this is a field

P(x) is irreducible only for certain even m: 2, 4, 10, 12, 18, 28, 36, 52, and so
on. For these sizes `c` is a field product. The default m = 6 is not one of them,
because x^7 + 1 splits into three factors over GF(2). At m = 6 the circuit computes
the exact product in the ring GF(2)[x]/(x^7 + 1), which is what the published
example shows. The testbenches cover both cases.

## The two branches and the shared operand register

The m+1 terms of the sum are split at m/2:

    C = sum_{i=0..m/2} b_i A^(i)   +   sum_{i=m/2+1..m} b_i A^(i)
        upper branch, m/2+1 terms      lower branch, m/2 terms

Both halves are accumulated side by side in one array of m/2+2 processing elements
(PEs). At stage k:

* The upper branch needs A^(k).
* The lower branch needs A^(k+m/2+1) = alpha^(m/2+1) · A^(k).

The lower branch's operand is a fixed rotation of the upper branch's operand.
Each stage therefore holds **one** operand register, and the lower operand is that
register rotated by m/2+1 bit positions. This is pure wiring (`bsc` with
`SHIFT = M/2+1`). This is the register sharing: two branches, one operand chain.

The array is also *retimed*: each stage registers its AND-cell products, and the
next stage's XOR cells add them. A stage therefore contains, in parallel, ANDs for
the current coefficient and XORs for the previous one. Its longest path is a
single XOR gate.

| Stage | Module | Cells | Does |
|---|---|---|---|
| PE[0] | `rs_pe0` | 2 AND, BSC | products b_0·A and b_(m/2+1)·alpha^(m/2+1)·A |
| PE[1] | `rs_pe1` | 2 AND, BSC | registers those products as the two sums; products for b_1 and b_(m/2+2) |
| PE[k], 2 ≤ k ≤ m/2−1 | `rs_pe_regular` | 2 AND, 2 XOR, BSC | adds the previous products to both sums; products for b_k and b_(k+m/2+1) |
| PE[m/2] | `rs_pe_half` | 1 AND, 2 XOR | last upper product b_(m/2)·A^(m/2); the lower sum is complete |
| PE[m/2+1] | `rs_pe_last` | 1 XOR, delay cell | completes the upper sum; holds the lower sum one clock |
| AC | `ac_unit` | 1 XOR, register | c = upper sum + lower sum |

Every cell is m+1 bits wide. In total there are m+1 AND cells and m XOR cells:
exactly the (m+1)² ANDs and m(m+1) XORs of the schoolbook product, and no more.
The upper branch is one term longer than the lower one. That is why PE[m/2] has
only one AND cell, and why the lower sum passes through a delay cell in the last
stage.

At m = 6 the array is PE[0], PE[1], one regular PE[2], PE[3], PE[4] and the AC.
Coarse synthesis of the default configuration reports 157 flip-flop bits (operand,
B, product and sum registers, and the 6-bit valid pipe), plus seven 7-bit AND cells and six 7-bit XOR cells.

### How B reaches the stages

Stage k reads b_k (upper) and b_(k+m/2+1) (lower). Each PE passes the whole B
vector to the next stage in a register beside the operand. Bits that no later
stage reads drive nothing, and synthesis removes them. The result is the usual
triangle of skew registers.

## Interface and timing

`gf_aop_rs_multiplier #(M = 6)`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | asynchronous, active low; clears every register |
| `in_valid` | in | 1 | marks `a`/`b` as a real operand pair |
| `a`, `b` | in | M+1 | operands, bit i = coefficient of alpha^i |
| `out_valid` | out | 1 | `c` is a product |
| `c` | out | M+1 | A·B mod x^(M+1)+1 |

* `a` and `b` are sampled at every rising edge. A new pair can enter every clock.
* The product of the pair sampled at edge t appears on `c` right after edge
  t + LATENCY − 1, where LATENCY = M/2 + 3 (6 at M = 6, 21 at M = 36).
  `gf_aop_pkg::rs_latency(M)` returns this value.
* `in_valid` does not gate the datapath. It only travels down a LATENCY-deep
  valid pipe to `out_valid`.
* Reset empties the pipe: no product in flight at reset ever shows up as valid.
* M must be even and at least 4. Other values stop elaboration with an error.

## Where this RTL makes its own choices

The arithmetic, the split into branches, the shared operand register, the cell
contents of PE[0], of the regular PEs, of the last PE and of the addition cell, and
the gate counts all follow the design as published. The following points are
this implementation's own choices:

* **Stage boundaries.** The published design states that its retiming brings the
  critical path down to one XOR gate. It does not give the exact cut-sets. Here
  every PE output is registered, and so is the addition cell's output. The
  published latency is not stated, so 3 + M/2 cannot be checked against it.
* **PE[1] has no XOR cells.** Its sums start from the PE[0] products, so there is
  nothing to add yet. The published PE[1] structure is shown only as a figure.
* **PE[m/2] insides** are derived from the term count (the lower branch has no
  term left at this stage), not from a published drawing.
* **Valid pipe and reset** are additions. The published design describes neither a
  handshake nor a reset.
* **No final reduction to m bits.** The published results are also
  (m+1)-bit values.
* **Default M = 6** matches the worked example, even though that AOP is not
  irreducible (see above).

## Files

| File | Contents |
|---|---|
| `rtl/gf_aop_pkg.sv` | `PAPER_M` (default size) and `rs_latency()` |
| `rtl/gf_aop_rs_multiplier.sv` | top: the array, the addition cell and the valid pipe |
| `rtl/rs_pe0.sv`, `rs_pe1.sv`, `rs_pe_regular.sv`, `rs_pe_half.sv`, `rs_pe_last.sv` | the five kinds of PE |
| `rtl/bsc.sv` | bit-shift cell, multiplication by alpha^SHIFT |
| `rtl/and_cell.sv`, `rtl/xor_cell.sv` | (M+1)-wide AND and XOR cells |
| `rtl/ac_unit.sv` | addition cell (XOR + register) |
| `rtl/delay_unit.sv` | D flip-flop bank with asynchronous reset |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_gf_aop_rs_sweep` |

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The reference values are
computed independently of the RTL:

* **Products** use a schoolbook polynomial product of degree 2m whose exponents
  are then folded mod m+1.
* **Rotations** use a double-width shift folded back.

What each testbench covers:

* `tb_gf_aop_rs_multiplier` runs at the default M = 6 with no parameter override.
  * It first checks the five published operand pairs, back to back.
  * It then runs all 16,384 operand pairs of the 7-bit default size, back to
    back.
  * It then measures the latency of a single isolated pair.
  * Next comes a 3000-cycle random stream with idle cycles and a reset in
    mid-stream.
  * It checks `c` and `out_valid` every cycle.
  * It counts back-to-back issues, idle cycles, products with a nonzero lower
    branch, products where both branch sums are nonzero, and the reset flush. It
    fails if any of these never happens.
* `tb_gf_aop_rs_sweep` runs 600 back-to-back random products at each of M = 4, 8,
  10, 12 and 36, checking values and latency. M = 4 has no regular PE; M = 8 has
  exactly one.
* The PE testbenches check every registered output against its formula for 1000
  random input sets. `tb_rs_pe_regular` uses PE[3] of an M = 10 array.
* `tb_bsc`, `tb_and_cell` and `tb_xor_cell` are exhaustive at M = 6. `tb_bsc` also
  covers the M/2+1 rotation and M = 10.
* `tb_ac_unit` includes the published 5-bit example 10011 + 01100 = 11111.
* `tb_delay_unit` also checks the asynchronous reset.

For each module, a copy with one deliberate bug was simulated against that
module's testbench, and the testbench failed every time.

What is not verified: gate-level timing, including the one-XOR critical-path claim
(which holds structurally), and any FPGA mapping. No published FPGA result can be
compared with this RTL, because the size and port list behind those results are
not known.

### Running a testbench

With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl \
        rtl/gf_aop_pkg.sv tb/tb_gf_aop_rs_multiplier.sv \
        --top-module tb_gf_aop_rs_multiplier -Mdir obj_top
    ./obj_top/Vtb_gf_aop_rs_multiplier

For any other testbench, substitute its name. Every testbench finishes in well
under a second.

## Changing the size

Set `M` on `gf_aop_rs_multiplier`. The number of regular PEs is M/2 − 2, created
by a generate loop, and the latency follows as M/2 + 3. For a real field, pick an
M for which the AOP is irreducible (m+1 prime and 2 primitive modulo m+1), for
example 10, 12, 18, 28, 36, 52, 58, 60, 66, 82, 100, 106, 130, 138, 148, 162, 172,
178, 180, 196, 210, 226 or 268. Area grows as (M+1)² gates. Flip-flops grow about
as (3M+4)·(M+1) bits, most of them in the sum, product and operand registers.
