# GF(2^m) multipliers: an AOP systolic array and an iterative Karatsuba unit

Multiplication in a binary extension field GF(2^m) is the core operation of
elliptic-curve cryptography and of many error-correcting codes. This RTL holds
two multipliers that tackle it from opposite ends:

* **`aop_systolic_mult`**: a fully pipelined, bit-parallel **systolic array**
  for fields defined by an *all-one polynomial* (AOP),
  P(x) = 1 + x + x^2 + ... + x^m. It accepts a new operand pair every clock
  cycle. Its critical path is a single XOR gate. Its latency is cut roughly
  in half, or to a quarter, by splitting the array into parallel branches that
  **share one set of operand registers**.
* **`ikm_multiplier`**: a small, **sequential** multiplier for large ECC fields
  (GF(2^233) by default). It reuses one W x W combinational multiplier
  3^k times, following the Karatsuba method, and **reduces the result modulo
  the field polynomial after every step**. Only an m-bit result register is
  therefore needed, instead of a double-length one.

`gf2m_multipliers_top` instantiates both side by side. They share clock and
reset and nothing else.

---

## 1. The AOP systolic multiplier

### 1.1 Arithmetic: why multiplying by x is free

P(x) = 1 + x + ... + x^m divides x^(m+1) + 1. So instead of working modulo P,
the array works modulo x^(m+1) + 1. It uses an **extended (m+1)-bit
representation**: bit k of a vector is the coefficient of x^k, for k = 0..m.
In this ring, multiplying by x is a cyclic rotation of the m+1 bits towards
the higher powers. The modular reduction therefore costs no gates at all. The
product is

    C = sum_{i=0..m} b_i * (A * x^i  mod x^(m+1) + 1)
      = XOR over i of  ( b_i AND rotate_left(A, i) ).

`c_o` is this (m+1)-bit vector. It is congruent to A*B modulo P(x). If you
need the canonical m-bit value, compute `c_k ^ c_m` for k < m. The array does
not do this step.

Worked example (m = 6, bit 0 written first):
A = 0101010 (x + x^3 + x^5), B = 0110110 (x + x^2 + x^4 + x^5) gives
C = 0100100 (x + x^4). This vector is one of the checks in
`tb_aop_systolic_mult`.

Note that P(x) is irreducible only for some m (2, 4, 10, 12, 18, 28, ...).
The default m = 20, and m = 6 from the example, give a ring rather than a
field. The circuit computes the product modulo P(x) either way.

### 1.2 Cells and processing elements

| cell / PE | module | contents |
|---|---|---|
| bit-shift cell (BSC) | `gf_bsc` | rotation by a fixed SHIFT, i.e. multiply by x^SHIFT; wiring only |
| AND cell | `gf_and_cell` | m+1 AND gates: b_i * A_i |
| XOR cell | `gf_xor_cell` | m+1 XOR gates: GF(2) addition |
| PE[0] | `aop_pe_first` | BSC + AND cell per lane; registers the first partial product |
| regular PE | `aop_pe` | BSC + AND + XOR per lane, all registered |
| adder cell (AC) | `aop_adder_cell` | registered XOR cell |

**Retiming.** In a straightforward array each PE would compute
`sum += b_i & A_i` in one cycle, so its path is an AND gate followed by an XOR
gate. Here the registers sit between the AND and the XOR. PE[j] forms the
product for bit j and registers it, while in the same cycle it XORs the product
registered by PE[j-1] into the running sum. Every stage is therefore one gate
deep, and the clock period is one XOR delay.

**Shared A0.** No PE registers a shifted copy of A. Every PE receives the
original operand A0 and applies its own fixed rotation, which is just wiring.

### 1.3 Branches and register sharing

The m+1 bits of B are split into `BR` branches of L = ceil((m+1)/BR) bits.
Branch k handles bits k*L ... k*L+L-1. All branches advance in lock step
through the same PE positions. A single chain of A0/B registers feeds all of
them, so a PE with two lanes holds two AND cells and two XOR cells but only
one set of operand registers.

Pipeline for one operand pair, branch length L:

| stage (clock edge) | what is registered |
|---|---|
| 1 | PE[0]: first product of every branch, A0, B |
| 2 .. L | PE[1..L-1]: running sum += previous product; next product |
| L+1 | last PE of each branch (an AC): sum += last product |
| L+2 .. L+1+log2(BR) | tree of ACs adding branch results pairwise |

Latency = L + 1 + log2(BR) cycles, with one result per cycle:

| BR | structure | latency | m = 20 | stages for m = 20 |
|---|---|---|---|---|
| 1 | basic systolic array | m + 2 | 22 | 22 PEs |
| 2 | low-latency register sharing (default) | m/2 + 3 | 13 | 12 PEs + 1 AC |
| 4 | improved, two pairs of merged branches | m/4 + 4 | 9 | 7 PEs + 3 ACs |

For BR = 2 each regular PE has 2(m+1) AND and 2(m+1) XOR gates, and the one
AC after the branches has m+1 XOR gates. `BR` must be a power of two. When BR
does not divide m+1, the last branch is shorter and its unused lanes form zero
products, which synthesis removes.

### 1.4 Interface and timing (`aop_systolic_mult`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous active-low reset; clears only the valid pipeline |
| `in_valid`, `a_i`, `b_i` | in | 1, M+1, M+1 | operand pair, accepted every cycle |
| `out_valid`, `c_o` | out | 1, M+1 | product, `LATENCY` cycles after it entered |

Parameters: `M` (default 20) and `BR` (default 2). The data registers have no
reset. `in_valid`/`out_valid` is a side pipeline that only marks which outputs
are products. It is an addition for convenience.

---

## 2. The iterative Karatsuba multiplier (IKM)

### 2.1 Idea

The operands (M bits, zero-padded to S*W) are cut into S = 2^k segments of W
bits. k levels of Karatsuba split the S x S segment product into 3^k products
of W x W bits. For the default S = 4 that is 9 products instead of 16. Each
clock cycle:

1. the **selection logic** (`ikm_selection`) forms the two W-bit factors of
   the current step by XORing segments;
2. the **partial multiplier** (`ikm_partial_mult`) multiplies them
   combinationally;
3. the **accumulation logic** (`ikm_accumulator`) adds the product at every
   segment position named by the step's **command word**, then reduces the sum
   modulo the field polynomial f(x), all in the same cycle.

### 2.2 The step schedule

Write step s in base 3 with one digit per Karatsuba level l (half size
h = 2^l segments). Each digit selects one of three products at that level:

* digit 0, the low halves: the product is placed at z^0 and z^h;
* digit 1, the high halves: placed at z^h and z^2h;
* digit 2, the sum of the halves (the middle term): placed at z^h.

Here z = x^W. The factor of a step is the XOR of every segment j whose index
bit l equals the digit wherever the digit is below 2. The command word is the
GF(2) product of the per-level placement polynomials. It has 2S-1 bits, one
per possible position.

For S = 4 (a0..a3 are segments of A; B is selected the same way):

| step | factor from A | positions (powers of z) | command word |
|---|---|---|---|
| 0 | a0 | 0 1 2 3 | 0001111 |
| 1 | a1 | 1 2 3 4 | 0011110 |
| 2 | a0+a1 | 1 3 | 0001010 |
| 3 | a2 | 2 3 4 5 | 0111100 |
| 4 | a3 | 3 4 5 6 | 1111000 |
| 5 | a2+a3 | 3 5 | 0101000 |
| 6 | a0+a2 | 2 3 | 0001100 |
| 7 | a1+a3 | 3 4 | 0011000 |
| 8 | a0+a1+a2+a3 | 3 | 0001000 |

`ikm_pkg` computes these masks and command words. `ikm_selection` turns them
into constant tables at elaboration time. At run time, selection is only a
table lookup and an AND/XOR network, the same structure for every step.

### 2.3 Reduction inside the accumulator

A product placed at position 6 reaches bit 6W + 2W - 2. Without reduction, the
accumulator would need 2*S*W bits (c0..c7 for S = 4). Here the unreduced sum
(stored result XOR placed products) is reduced modulo f(x) combinationally
before it is stored. Every bit i >= M clears itself by XORing f(x)*x^(i-M),
from the top down. Only the M-bit result is kept in flip-flops. For the
trinomial x^233 + x^74 + 1 this network is a few levels of XOR.

### 2.4 Partial multiplier

`ikm_partial_mult` is a hybrid recursive Karatsuba multiplier. Above `THRESH`
bits (default 16), the operands are split into halves of H = ceil(W/2) bits,
and the product is

    x*y = P0 + (P0 + P1 + Pm) x^H + P1 x^2H

with P0 = x0*y0, P1 = x1*y1 and Pm = (x0+x1)*(y0+y1). The halving repeats
until the width is at most `THRESH`. The resulting tree of 3^levels products
is unrolled with generate loops (no recursive instantiation), and its leaves
are schoolbook AND/XOR arrays. Odd widths are handled by zero-padding the high
half. For the default W = 64 this gives two levels and nine 16 x 16 leaves.

### 2.5 Interface and timing (`ikm_multiplier`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of busy/done/step |
| `start_i` | in | 1 | load `a_i`, `b_i` and start; ignored while `busy_o` |
| `a_i`, `b_i` | in | M | operands (polynomial basis, bit k = coefficient of x^k) |
| `busy_o` | out | 1 | steps in progress |
| `done_o` | out | 1 | one-cycle pulse: `c_o` = a*b mod f(x) |
| `c_o` | out | M | result; held until the next start |

The rising edge that samples `start_i` loads the operands and clears the
result. The next 3^k edges perform the steps, and `done_o` is high right after
the last of them. With S = 4 the result arrives 9 cycles after the start is
taken; S = 2 takes 3 cycles and S = 8 takes 27.

Parameters and configurations (all nine are simulated by
`tb_ikm_multiplier`):

| field | f(x) | S x W (cycles) |
|---|---|---|
| GF(2^163) | x^163 + x^7 + x^6 + x^3 + 1 | 2x96 (3), 4x48 (9), 8x24 (27) |
| GF(2^233) (default) | x^233 + x^74 + 1 | 2x128 (3), **4x64 (9)**, 8x32 (27) |
| GF(2^571) | x^571 + x^10 + x^5 + x^2 + 1 | 2x320 (3), 4x160 (9), 8x80 (27) |

Set `M`, `S`, `W` and `POLY` (an (M+1)-bit vector that includes the x^M bit).
S*W must be at least M.

---

## 3. Top level

`gf2m_multipliers_top` has parameters `AOP_M`, `AOP_BR`, `IKM_M`, `IKM_S`,
`IKM_W` and `IKM_POLY`. Its ports are the two interfaces above, prefixed
`aop_` and `ikm_`, plus a common `clk` and `rst_n`.

## 4. Files

* `rtl/`: one module or package per file.
  * AOP array: `gf_bsc`, `gf_and_cell`, `gf_xor_cell`, `aop_pe_first`,
    `aop_pe`, `aop_adder_cell`, `aop_systolic_mult`.
  * IKM: `ikm_pkg`, `ikm_selection`, `ikm_partial_mult`, `ikm_accumulator`,
    `ikm_multiplier`.
  * Top: `gf2m_multipliers_top`.
* `tb/`: a self-checking testbench `tb_<module>` for each module, and
  `tb_gf_ref_pkg` with the reference arithmetic. The reference arithmetic is
  written independently of the RTL: bit-serial schoolbook products, long
  division, and a ring product folded modulo x^(m+1)+1.

## 5. Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. Each also
has a watchdog that counts a failure if the run hangs. Example with Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/ikm_pkg.sv tb/tb_gf_ref_pkg.sv tb/tb_gf2m_multipliers_top.sv \
        --top-module tb_gf2m_multipliers_top
    ./obj_dir/Vtb_gf2m_multipliers_top

To run another testbench, swap in its file and top-module name. Every
testbench needs `tb/tb_gf_ref_pkg.sv`. `rtl/ikm_pkg.sv` is needed by
everything that reaches the IKM.

What is covered:

* **`tb_gf2m_multipliers_top`**: runs both units at their default sizes at the
  same time. The AOP unit gets a random stream with back-to-back operands and
  gaps, and the latency is checked at 13 cycles. The IKM performs twenty
  GF(2^233) products with ignored mid-run starts, each checked at 9 cycles. The
  testbench also counts that each of these situations actually occurred.
* **`tb_aop_systolic_mult`**: covers m = 6 and m = 20 with 1, 2 and 4
  branches, including the m = 6 example above. Every output cycle is checked
  for value and for latency.
* **`tb_ikm_multiplier`**: covers all nine field/segment configurations,
  including the edge operands 1, x^(M-1)*x and all-ones.
* **The cell and PE testbenches**: check each unit against the reference
  model. The selection logic is checked against the full Karatsuba identity
  for 2, 4 and 8 segments, and against the explicit table above.

## 6. Departures and open points

* **Output form.** The AOP array outputs the (m+1)-bit extended form. There is
  no final conversion to m bits, as described in 1.1.
* **Register count.** The source design gives 2.5m^2 + 6.5m + 4 bit-registers
  for the two-branch array: 1134 for m = 20. This RTL synthesises to 1334 data
  flip-flops for m = 20, plus 13 for the valid pipeline. Two things account for
  most of the gap. The running-sum register of the first regular PE only
  copies the first product. The B bits not yet consumed travel along the chain
  (synthesis drops those already used). No register-level breakdown was
  available to match.
* **PE structure.** The exact inside of each special PE (the first, the last,
  and the one where the shorter branch runs out) is this design's own
  construction. It meets the stated gate counts per PE and the stated latency
  formulas.
* **IKM control.** The start/busy/done handshake, the step order and the
  generic reduction network are this design's own choices.
* **Result register.** The IKM result register holds the fully reduced M bits,
  not four full segments (256 bits for the default).
* **Partial multiplier threshold.** The Karatsuba recursion threshold of 16
  bits is a guess.
* **Field polynomials.** The polynomials for the 163-, 233- and 571-bit fields
  are the standard NIST binary-curve polynomials.
* **Physical results.** No timing closure, area or power figures have been
  produced for this RTL.
