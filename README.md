# Linear systolic array for matrix multiplication

This is a matrix multiplier for C = A x B built as a single chain of identical
processors. The processors have no control unit, no addressable memory and no
valid or opcode signals. Each one does the same thing every clock cycle: it
adds the product of its two operands to a passing partial sum. All the "control"
is in the order and timing in which the host feeds elements into the chain.
The same six ports (three in, three out) serve any matrix size, so the I/O
bandwidth is constant and the pin count does not grow with the matrices.

For n x n matrices the array has 3n-2 processors and takes O(n^2) cycles. Each
processor holds O(n) bits of delay line, so the whole array takes O(n^2) storage.

## The idea: three streams at three speeds

```
          +-----+     +-----+             +--------+
 IA  ---->|     |---->|     |---> ... --->|        |----> OA
 IB  ---->|  1  |---->|  2  |---> ... --->| 3n-2   |----> OB
 OC  <----|     |<----|     |<--- ... <---|        |<---- IC
          +-----+     +-----+             +--------+
```

* Elements of **A** enter at IA and move right by **one processor per cycle**.
* Elements of **B** enter at IB and move right by **one processor every two cycles**.
* Partial sums of **C** enter at IC as zeros, at the far end. They move left by
  **one processor every n-1 cycles**.

At every processor, in every cycle, the processor takes the values a, b, c at its
inputs and passes c + a*b on to the left. The feeding schedule below is built so
that for each c_ij and each k, the operands a_ik and b_kj reach the processor
that c_ij is at in the same cycle. This happens at processor
`m = n + i + j - k - 1` (1-based indices), so c_ij collects a_i1*b_1j, then
a_i2*b_2j, and so on, while it moves from processor n+i+j-2 down to
processor i+j-1. Everywhere else the A value that c_ij meets is a zero that the
host put in the gaps of the A stream, so nothing is added.
c_ij then leaves at OC.

No two different elements of one matrix ever sit on the same port in the
same cycle. The schedule spaces the elements so that these collisions cannot
happen, and that is why no arbitration or valid bits are needed.

## One processor (`lamm_pe`)

```
 IP_A ──┬──────────────────────────────[reg]──> OP_A      (+1 cycle)
        │
 IP_B ──┼──┬─────────[S_B: 1 stage]────[reg]──> OP_B      (+2 cycles)
        v  v
       [ X ]  (lamm_mult)
          │
          v
 IP_C ──>[ + ] (lamm_add) ─[S_C: D-2 stages]─[reg]──> OP_C  (+D-1 cycles)
```

If a, b, c are at IP_A, IP_B, IP_C in cycle t, then:

* a is at OP_A in cycle t+1;
* b is at OP_B in cycle t+2;
* c + a*b is at OP_C in cycle t+D-1.

D = n for square matrices. The last register on each path is the hand-over
to the neighbouring processor. S_B and S_C are plain shift registers
(`lamm_shift_reg`). The multiply-add is combinational within the cycle, so the
critical path is one multiply plus one add. D = 2 is allowed: S_C then has no
stages.

## The feeding schedule

This is the part that needs care. All times are clock cycles relative to t_s,
the cycle in which c_11 enters IC. Indices are 1-based.

Square case (n x n times n x n, D = n, 3n-2 processors):

| port | element | enters in cycle |
|------|---------|-----------------|
| IC | c_ij = 0 | t_s + (i+j-2)·n + (i-1) |
| IA | a_ij | t_s + (2n-3)(n-1) + (j-1)·n + (i-1) |
| IB | b_ij | t_s + (2n-5)(n-1) + (n-j) + (i-1)(n+1) |
| OC | final c_ij leaves | t_s + (3n-2)(n-1) + (i+j-2)·n + (i-1) |

* IA must carry 0 in every cycle that has no element of A. This includes at
  least 3n-2 cycles before t_s, which clears the A registers of every
  processor. It is the only initialisation the array needs. There is no reset.
* IB and IC may carry anything in their idle cycles. The testbench feeds
  random data there on purpose.
* Because the array needs no reset, B and C registers may hold anything at
  power-up. Old C values leave OC only in cycles that carry no result.
* For 3 x 3 matrices (7 processors) with t_s = 0:
  * A enters a11, a21, a31, a12, ... in cycles 6, 7, 8, 9, ... 14.
  * B enters b13, b12, b11 in cycles 2, 3, 4; b23, b22, b21 in cycles 6, 7, 8;
    and b33, b32, b31 in cycles 10, 11, 12.
  * c11 enters in cycle 0 and c33 in cycle 14.
  * Results leave OC from cycle 14 (c11) to cycle 28 (c33).
  * The whole product, from c_11 in to c_nn out, takes
    (3n-2)(n-1) + (2n-2)n + (n-1) cycles. With the 3n-2 cycles of lead-in,
    this is O(n^2).

General case (p x q times q x r, p >= r): use p+q+r-2 processors and a row
spacing d >= p. S_C then has d-2 stages.

| port | element | enters in cycle |
|------|---------|-----------------|
| IC | c_ij = 0 | t_s + (i+j-2)·d + (i-1) |
| IA | a_ij | t_a + (j-1)·d + (i-1), where t_a = t_s + (d-1)(p+r-2) - (q-1) |
| IB | b_ij | t_b + (r-j) + (i-1)(d+1), where t_b = t_a - (q+r-2) |
| OC | final c_ij leaves | t_s + (p+q+r-2)(d-1) + (i+j-2)·d + (i-1) |

If p < r, feed B^T into IA and A^T into IB. What leaves OC is then C^T.

Matrices smaller than the array's n are padded with zero rows and columns.
Larger ones are split into n x n blocks. The host then adds the block
products: C_IJ = Σ_K A_IK·B_KJ.

## RTL

| file | what it is |
|------|------------|
| `rtl/lamm_pkg.sv` | default widths and size formulas (3n-2, p+q+r-2) |
| `rtl/lamm_shift_reg.sv` | fixed-length delay line, LEN ≥ 0 |
| `rtl/lamm_mult.sv` | signed multiplier, full-width product |
| `rtl/lamm_add.sv` | accumulator adder, wraps modulo 2^C_W |
| `rtl/lamm_pe.sv` | one processor |
| `rtl/lamm_array.sv` | the chain; top module |

Parameters of `lamm_array`:

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 3 | matrix size n of the square configuration (the 3 x 3 worked example) |
| `D` | N | row spacing; S_C length is D-2. Use d ≥ max(p, r) for non-square products |
| `NUM_PE` | 3N-2 | number of processors; p+q+r-2 for non-square products |
| `A_W`, `B_W` | 16 | width of the elements of A and B, two's complement |
| `C_W` | 32 | width of the elements of C |

Ports: `clk`, inputs `ia`, `ib`, `ic`, and outputs `oa`, `ob`, `oc`, all plain
vectors. There is one clock and no reset. The host drives the inputs so that
they are stable at the rising edge. Outputs change just after the rising edge.
The array holds NUM_PE·(A_W + 2·B_W + (D-1)·C_W) flip-flops. At the default
size this is 7 × (48 + 64) = 784.

## Testbenches and how to run them

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_lamm_shift_reg`, `tb_lamm_mult`, `tb_lamm_add` and `tb_lamm_pe` test the
  parts. `tb_lamm_pe` checks all three delays and the arithmetic, at D = 3 and
  D = 6.
* `tb_lamm_array` is the end-to-end test. Six arrays run side by side:
  * the default array (n = 3), for four products;
  * n = 2, which gives a zero-stage S_C;
  * n = 6;
  * 4x3 by 3x2;
  * 2x3 by 3x4, fed as transposes;
  * 3x2 by 2x3 with d = 5 > p.

  Each array is driven by `tb/lamm_host_model.sv`. This model draws random
  matrices and feeds them on the schedule above. It checks every c_ij at OC in
  its predicted cycle, and every a_ij and b_ij at OA and OB. For the default
  array, the test also compares the values at the inputs of each processor in
  cycles 6 to 15 with a hand-worked 3 x 3 example. It also checks the total
  latency formula.
* `tb_lamm_workloads` uses the array with every parameter at its default. It runs a 2x2 product padded to 3x3, a
  3x2 by 2x1 product padded to 3x3, and a 6x6 product split into eight 3x3 block
  products.

Run with plain Verilator from the directory that holds `rtl/` and `tb/`, for
example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/lamm_pkg.sv tb/tb_lamm_array.sv --top-module tb_lamm_array -Mdir obj
./obj/Vtb_lamm_array
```

All testbenches finish in well under a second. To try another size, change the
parameters of an instance in `tb_lamm_array`. The host model checks that
NUM_PE = p+q+r-2 and that D ≥ max(p, r).

## Choices and departures

* **Widths and arithmetic.** The algorithm does not fix a number format. Here
  A and B are 16-bit two's complement. C is 32 bits and wraps on overflow,
  with no saturation. With N = 3 and 16-bit operands, a sum can reach
  3·2^30, so extreme operands can wrap. Widen `C_W` if that matters.
* **Where the delays sit.** The timing at the ports (+1, +2, +D-1) is the
  algorithm's. Placing the extra register of each path after S_B and S_C is a
  choice of this implementation.
* **No reset.** This is deliberate, as explained above: zeros on IA are the
  initialisation.
* **Row step of B in the non-square schedule.** The schedule given with the
  non-square algorithm steps b's row index by p+1. With the delays above,
  a_ik, b_kj and c_ij meet only if the step is d+1. The two are the same for
  d = p. The host model uses d+1, and the d > p case is tested with it.
* **Condition on d.** The non-square derivation needs d ≥ p. This includes
  d = p, which the square case uses (d = n).
  A strict d > p is not needed, and d = p passes all tests.
* **Not in the RTL.** The host that stores the matrices and generates the
  schedule is outside the array. It exists here only as the testbench model
  `lamm_host_model`.
  So do block decomposition and padding.
