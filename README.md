# Unified modular divider for GF(p) and GF(2^n)

This is synthesizable SystemVerilog for a modular divider that serves both
field types used in elliptic-curve cryptography with one datapath:

* prime fields GF(p): Z = X / Y mod p, for an odd prime p;
* binary extension fields GF(2^n), polynomial basis: Z(x) = X(x) / Y(x) mod p(x).

With X = 1 it computes the modular inverse; with X = r mod p, where r = 2^n
(or x^n), it gives the Montgomery-domain inverse Y^-1 * r, and with X = r and
Y*r in place of Y the integer inverse of Y, all in the same time. The field
is chosen per operation by one input bit.

The design implements the *unified modular division* (UMD) algorithm and the
architecture published with it in "A Dual-field Modular Division Algorithm and
Architecture for Application Specific Hardware". The algorithm is a
binary-GCD / extended-Euclid loop. It has two features that suit hardware:

* **No comparisons.** A small signed counter, delta, replaces magnitude
  comparisons between field elements. Only its sign is ever tested.
* **No carry propagation in the loop.** Every addition is done in
  carry-save form by *unified* adders. In these adders a field-select line
  either lets carries through (GF(p)) or forces them to zero, which turns
  the adder into an XOR (GF(2^n)).

Two carry-save adders are shared over two clock phases, so an iteration
costs two adder delays and no more than two adders.

## The algorithm

The registers are C, D, U and W, with C = Y, D = p, U = X, W = 0 and
delta = 0 at the start. Each iteration does the following:

```
if C is even:
    C := C/2 ;  delta := delta - 1
else:
    if delta < 0:  swap C<->D, U<->W ;  delta := -delta
    k := +1
    if GF(p) and (C + D) mod 4 != 0:  k := -1
    else:                             delta := delta - 1
    C := (C + k*D)/2 ;  U := U + k*W
U := (U + u0*p)/2            -- u0 = parity of U, makes the halving exact mod p
```

The loop runs until C = 0. Then D = +-1 (in GF(2^n), D = 1), and the
result is Z = W when D = 1, or Z = p - W otherwise. In GF(2^n), "+" and "-"
are both XOR, k is always +1, and halving means division by x.

The invariant is U*Y == X*C (mod p), with each halving of C matched by a
halving of U modulo p. C shrinks by at least one bit per iteration, and
delta tracks the size of C against the size of D.

## How one iteration runs in hardware

In the worst case (C odd) an iteration needs three additions:
A1 = U + kW, A2 = A1 + u0*p and A3 = C + kD. A2 depends on A1, so the
iteration is split into two phases. Adder CSUA1 is used twice and CSUA2
once:

| phase | CSUA1 ((4,2) row)        | CSUA2 ((3,2) row)        | storage                           |
|-------|--------------------------|--------------------------|-----------------------------------|
| phi1  | A1 = U + k*W             | idle                     | A1 is captured at the end of phi1 |
| phi2  | A3 = (C + k*D)/2 → new C | A2 = (A1 + u0*p)/2 → new U | C/D and U/W registers load      |

In the RTL, `clk` is the doubled clock of this two-phase scheme. One
iteration takes two `clk` cycles. The storage between the adders
(`adder_latch`) is an enabled register that captures at the end of phi1.
The architecture also allows a level-sensitive latch and a shorter phi2;
neither is modelled.

MUX2 (`mux2_szn`) forms k*W in phi1 and k*D in phi2. Its select S is the
phase. Z = 1 forces zero, which is used when C is even, so that nothing is
added and C and U are only halved. N = 1 complements both carry-save
vectors, which gives k = -1. An AND gate gates p with u0.

## Carry-save arithmetic with signed values

Each of C, D, U and W is a pair of W = N+5 bit vectors (sum and carry). The
pair stands for their two's-complement sum. In GF(p) the values are signed:
C - D can be negative, and U and W are unreduced residues. A model of the
algorithm shows |U|, |W| < 3.7p. This section covers the parts that the
architecture leaves to the implementer and that need care.

**Negation needs +2.** For -V with V = Vs + Vc, the hardware uses
~Vs + ~Vc + 2. The two +1s enter as carries at bit 0:

* For A1, CSUA1 has two free weight-1 inputs: the sideways carry of its
  bit-0 compressor (`cin`) and bit 0 of its carry vector (`cy0`). Both are
  used.
* For A3 the result is halved, so the datapath shifts the four operand
  vectors right before CSUA1 instead of shifting the sum afterwards. In
  this branch C and D are both odd, so the discarded bit-0 column always
  adds up to 0 or 2. That column's carry goes into `cin`, and the halved
  +2 of the negation (now +1) goes into `cy0`. The result is exactly
  (C + kD)/2, without a third carry input.
* CSUA2's own carry input is therefore unused (tied to 0).

**Parity without carry propagation.** u0, the parity of A1, is the XOR of
the two low bits of the latched pair. Adding u0*p with p odd makes both low
bits of A2 zero, so halving A2 is a plain shift of both vectors.

**Wrap-around.** A carry-save pair is only defined modulo 2^W. Its two
vectors, read as signed numbers, can add up to the value plus or minus 2^W,
even when the value itself is small. Halving such a pair gives a wrong
answer. Suppose the value satisfies |value| < 2^(W-2). Then this wrap has
happened exactly when both vectors have top bits 01 (+2^W) or both have
10 (-2^W). Flipping the top bit of both vectors removes it. Every pair that
is stored or halved is corrected this way, so every stored pair is exact
as a signed sum. This is why W has two spare bits above the value range.

**Zero test.** C = 0 exactly when s ^ c == (s | c) << 1 (mod 2^W). This is
a bitwise test with no carries. The per-bit results are ANDed in 32-bit
chunks and registered twice (`zero_test`). The latency is harmless: once C
is 0, every later iteration takes the "C even" branch, which leaves C, D
and W unchanged. The controller therefore runs one extra iteration before
it stops.

**The mod-4 test.** (C + D) mod 4 needs only the two low bits of the four
vectors: a 2-bit sum of four inputs (`mod4_test`).

In GF(2^n) the carry vectors stay zero and the sign-extension and
wrap-around logic is disabled by the field select. The field polynomial
has degree n, so D needs n+1 bits; the width W covers that.

## Swapping without moving data

The swapping network (`swap_net`) is a row of 2-input multiplexers in
front of the datapath. It presents the registers as the algorithm's C, D,
U and W either straight or exchanged. The controller keeps one bit,
`sel_q`, that records which physical register currently holds the
logical C (and U). In an iteration that swaps, the network is driven with
`sel = sel_q ^ swap`. The new C is then written into the register that did
*not* hold the old C (Load D instead of Load C), and the same happens for U
and W. After that write, the other register of each pair already holds the
old C (or U). That is the new D (or W), so no data is moved for a swap.

## Control and result

`umd_control` runs the sequence IDLE → LOAD → (PHI1, PHI2)* → RESULT →
DONE. The decisions for an iteration come from register contents that do
not change until the end of phi2, so they are stable for both phases:

* c0 is bit 0 of the logical C;
* swap = c0 and (delta < 0);
* k = -1 when c0, GF(p) and the mod-4 test fires;
* Z = not c0;
* delta is negated on a swap and decremented unless k = -1.

`delta_counter` holds delta in clog2(N)+4 bits. A model of the algorithm
gives |delta| <= N+1.

`umd_result` is the only place with carry-propagate adders. When C = 0 it
adds up W and D. It negates W if D = -1 (the "p - W" of the algorithm).
Then it adds p while the value is negative, or subtracts p while it is at
least p, one step per cycle, until the result lies in [0, p). In GF(2^n),
W's sum vector is already the reduced result.

## Interface and timing

`umd_divider #(N = 512, GUARD = 5)`

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1     | clock; one iteration = 2 cycles |
| `rst_n`      | in  | 1     | asynchronous reset, active low |
| `start`      | in  | 1     | one-cycle pulse while idle |
| `field`      | in  | 1     | 1 = GF(p), 0 = GF(2^N) |
| `x`, `y`     | in  | N     | dividend and divisor; y != 0; x, y < p (degree < N) |
| `p`          | in  | N+1   | prime (bit N = 0) or field polynomial of degree N |
| `busy`       | out | 1     | high from start to done |
| `done`       | out | 1     | one-cycle pulse; `z` valid from then until the next start |
| `z`          | out | N     | quotient in [0, p) |
| `iterations` | out | 32    | iterations of the last run, including the extra zero-test iteration |

`field`, `x`, `y` and `p` are sampled with `start` and loaded one cycle
later, so hold them for two cycles. The modulus is copied into its own
register. A division takes `2*iterations + 3` to `2*iterations + 12`
cycles; the spread comes from the final reduction steps. Smaller moduli
(for example a 160-bit prime or a degree-160 polynomial) run unchanged on
the 512-bit hardware. Y = 0, or operands that share a factor with p, give a
meaningless result and are not flagged.

Measured on the RTL (`tb_umd_sizes`, random operands):

| operand size | GF(2^n) iterations/bit | GF(p) iterations/bit (mean) |
|--------------|------------------------|-----------------------------|
| 128–512      | 2.00–2.01              | 2.10–2.15                   |

The published text quotes 2n iterations as the worst case. That holds for
GF(2^n) (up to 2n+1). In GF(p), however, a model of the algorithm reaches
about 2.3n on rare inputs. Nothing in the RTL depends on a fixed iteration
count.

## Where this RTL departs from the published architecture

* Two-phase clocking is modelled with a single clock at twice the
  iteration rate, and an enabled register sits between the adders. The
  phi1/phi2 duty-cycle tuning and the clock-period formula are physical
  design matters and are not modelled.
* The registers are N+5 bits wide rather than N, to hold the signed
  carry-save values, the degree-N polynomial and two spare sign bits.
* Both negation carries are injected into CSUA1. A3 is halved before the
  adder instead of after it. Wrap-around correction and the result
  converter are additions needed for exact signed carry-save arithmetic.
* Three-state buffers for loading the operands are replaced by
  multiplexers.
* The zero test is the carry-free identity above, pipelined over two
  cycles. The counter-based alternative is not built.
* The up/down counter for delta is a plain binary counter.
* The start/busy/done handshake, the reset and the `iterations` port are
  this design's own.

## Files

| file | content |
|------|---------|
| `rtl/umd_pkg.sv` | field-select and state enums, default guard bits |
| `rtl/df_fa32.sv`, `rtl/df_c42.sv` | dual-field (3,2) and (4,2) bit cells |
| `rtl/csua1.sv`, `rtl/csua2.sv` | carry-save unified adder rows |
| `rtl/mux2_szn.sv` | MUX2 with select, zero, negate |
| `rtl/swap_net.sv` | swapping network |
| `rtl/adder_latch.sv` | storage between the two adders |
| `rtl/mod4_test.sv`, `rtl/zero_test.sv`, `rtl/delta_counter.sv` | control-side tests and the delta counter |
| `rtl/umd_datapath.sv` | the datapath: MUX2, CSUA1, storage, CSUA2, halving and wrap correction |
| `rtl/umd_regs.sv` | carry-save registers C, D, U, W |
| `rtl/umd_control.sv` | controller |
| `rtl/umd_result.sv` | carry-save to binary conversion and final reduction |
| `rtl/umd_divider.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_umd_full` (N = 512), `tb_umd_sizes` (size sweep) and `tb_umd_ref_pkg` (reference models) |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops
itself. Run them with Verilator 5 from the folder that holds `rtl/` and
`tb/`, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/umd_pkg.sv tb/tb_umd_ref_pkg.sv tb/tb_umd_divider.sv --top-module tb_umd_divider -o sim
./obj_dir/sim
```

* `tb_umd_divider` runs 300 random divisions and inversions at N = 24 in
  both fields. It checks each quotient against the reference model and by
  multiplying back. It also checks the iteration and cycle counts, and it
  counts that swaps, k = -1 steps, even-C steps, wrap corrections, D = -1
  endings and result reductions all occur.
* `tb_umd_full` runs at the default N = 512 with a fixed 512-bit prime and
  x^512 + x^8 + x^5 + x^2 + 1: inverses, Montgomery-domain inverses and
  divisions.
* `tb_umd_sizes` covers 128 to 512-bit operands on the 512-bit design.

The block testbenches check each module on its own. The bit cells and the
mod-4 test are checked exhaustively; the adders and datapath use random
operands; the controller is compared with a cycle-level model. To change
the operand size, set `N`; the register width, the counter width and the
zero-test chunking follow from it.
