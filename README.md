# Weighted-NTT multiplier for integer-based FHE encryption

Encrypting a bit under the integer-based ("DGHV"-style) fully homomorphic
scheme is dominated by products of huge integers: public-key elements x_i of
150 thousand to 19 million bits times random multipliers b_i of about
1,000 to 2,600 bits. This design multiplies them with a number theoretic
transform (NTT) whose arithmetic is small enough to live entirely in FPGA DSP
multipliers:

* the modulus is the 14-bit Proth prime p = 12289 = 3*2^12 + 1;
* a 4096-bit operand is split into N = 1024 digits of 4 bits, one per NTT point;
* a *weighted* (negacyclic) NTT uses all 1024 points for operand digits, with
  no half of the transform reserved for zero padding;
* Montgomery reduction costs one multiplication, because for this prime the
  Montgomery quotient is a shift and an add;
* a single 1024-entry table of powers of the weight factor supplies the
  weights, the NTT twiddles and their inverses.

A long x_i is cut into 4096-bit chunks; each chunk is multiplied by b_i on the
NTT multiplier and the partial products are accumulated by a shift-and-add
stage. One chunk takes 144 cycles; the Toy instance (x_i of 150,000 bits,
37 chunks) takes 5,329 cycles.

## The arithmetic

### Negacyclic convolution by weighting

Write the two operands as digit vectors a_0..a_1023 and b_0..b_1023 (the
operand is sum a_i*2^(4i)). The multiplier computes

    c_k = sum_{i+j=k} a_i*b_j - sum_{i+j=k+1024} a_i*b_j      (mod p)

the product of the digit polynomials modulo x^1024 + 1. A plain length-N NTT
computes cyclic convolutions (mod x^N - 1); multiplying a_i and b_i by phi^i
first, where phi is a primitive 2N-th root of unity, and the result by phi^-k
afterwards turns it into the negacyclic one. The constants:

| constant | value | role |
|---|---|---|
| p | 12289 | modulus, 14 bits |
| N | 1024 | transform length |
| phi | 7 | weight factor, order 2048 mod p |
| alpha = phi^2 | 49 | NTT kernel, order 1024 |
| R | 2^14 | Montgomery radix |
| p^-1 mod R | 4097 = 2^12 + 1 | Montgomery quotient factor |
| R^-1 mod p | 9216 | |

### Montgomery multiplication with a shift (`mont_mul`)

`mont_mul` returns a*b*R^-1 mod p:

    T  = a*b                      one 14x14 multiplication
    Q  = (T + (T << 12)) mod 2^14 = T*p^-1 mod R, shift and add
    QP = (Q << 13) + (Q << 12) + Q = Q*p, shifts and adds
    Z  = (T - QP) >> 14           exact; -p < Z < p
    z  = Z < 0 ? Z + p : Z

It is a five-cycle pipeline: four registers inside the module and the final
correction driven combinationally into whatever register the user writes
(in the multiplier, the coefficient bank). A new pair can enter every cycle.

### Keeping the Montgomery factors straight

Every multiplication in the datapath is a Montgomery product, so each one
would leave a stray factor R^-1. The table entries are stored as
phi^e * R mod p, so a Montgomery product with an entry multiplies by the plain
power phi^e and leaves no stray factor. Only two factors remain by the end:
R^-1 from the pointwise product (both inputs plain) and N from the unscaled
inverse transform. The last step multiplies by the constant N^-1*R^2 mod p,
which removes both and returns the coefficients in the standard domain.

### One table for everything (`twiddle_lut`)

Since phi has order 2N and phi^N = -1, any power of phi with exponent e in
[0, 2N) is either table entry T[e] (e < N) or p - T[e-N]. The powers needed are

    weight        phi^i          e = i
    forward       alpha^k        e = 2k mod 2N
    inverse       alpha^-k       e = 2N - 2k
    de-factor     phi^-i         e = 2N - i

so one N-entry table replaces the usual three tables (phi, phi^-1 and alpha,
alpha^-1; 3N entries). The entries are computed at elaboration time by square
and multiply: T[i] = 7^i * 4095 mod 12289 (4095 = R mod p). Each read port
takes an 11-bit exponent and returns the registered value one cycle later.

## The multiplier (`wntt_mult`)

### Organisation

Two coefficient banks, A and B, hold 1024 residues each. Each bank has 1024
Montgomery units, and the table has 1024 read ports, so every step (a whole
butterfly stage, the weighting of an operand, the pointwise product) is done
by all units at once:

| step | units | operation | cycles |
|---|---|---|---|
| load | | A <- a, B <- b (digits) | at start |
| weight | A and B, 1024 each | x_i <- x_i*phi^i | 6 |
| forward stage s = 0..9 | 512 in A, 512 in B | DIF butterfly (u+v, (u-v)*alpha^k) | 6 each |
| pointwise | A, 1024 | A_i <- A_i*B_i | 5 |
| inverse stage s = 0..9 | A, 512 | DIT butterfly (u + v*alpha^-k, u - v*alpha^-k) | 6 each |
| de-factor | A, 1024 | A_i <- A_i*phi^-i | 6 |
| conversion | A, 1024 | A_i <- A_i*N^-1*R^2 | 6 |
| **total** | | | **12 log2 N + 23 = 143** |

A 6-cycle step is one table-read cycle followed by the five Montgomery cycles;
the pointwise step reads nothing from the table and takes five. The
butterfly additions and subtractions are done combinationally on the way into
the multiplier (u - v) or on the way back into the bank (u + v, u +/- v*w),
so they add no cycles. The forward transform is decimation in frequency
(natural order in, bit-reversed order out) and the inverse is decimation in
time (bit-reversed in, natural out), so the pointwise product works on
bit-reversed data and no reordering step is needed.

In stage s of the forward transform the butterfly span is h = N/2^(s+1);
butterfly j pairs iu = 2h*floor(j/h) + (j mod h) with iv = iu + h and uses
alpha^((j mod h)*N/(2h)). The inverse transform runs the spans the other way,
h = 2^s, with the inverse twiddles.

`wntt_ctrl` only counts: it walks the steps and gives the datapath the step,
the stage, a table-read strobe on a step's first cycle and a write strobe on
its last.

### Interface and timing

`start` (one cycle, while `busy` is low) captures `a` and `b`. `done` pulses
143 edges after the edge that took `start`; `c` (1024 x 14 bits) then holds the
result until the next start. The operands do not need to stay on the
inputs after `start`.

### What the result is, and where it is an integer product

The output coefficients are the negacyclic convolution *modulo 12289*. Two
properties of this parameter choice limit when they describe the integer
product of the two 4096-bit operands:

* a convolution sum can reach 1024*15*15 = 230,400, far above p, in which
  case only its residue survives;
* the negacyclic wrap folds the upper half of the 8192-bit product back onto
  the lower half with a minus sign.

So the multiplier returns the integer product a*b exactly when every
convolution sum is below 12289 and a*b fits in 4096 bits (for example, when
both operands use only the lower 2048 bits and digits up to 3). For
full-range random operands the output is the residue vector the method
defines, not a*b. The design implements the method as specified and the
testbenches check both facts: every test compares against the residue-level
model, and the end-to-end test also checks exact integer products for
operands inside that range. Widening the modulus or the digit count,
or zero-padding the upper half, would restore exactness at the cost of the
DSP fit or of half the operand width; none of that is done here.

## The multiplication block (`fhe_mult_top`)

### Inner multiplication and outer accumulation

x_i is offered as Z chunks of 4096 bits, least significant first, on a
valid/ready stream; b_i (up to 4096 bits) is latched at `start` with the chunk
count Z. For each chunk the block runs one NTT multiplication (143 cycles). The
outer accumulator (`outer_acc`) then, in a single cycle:

1. turns the 1024 coefficients into an integer, sum c_i*2^(4i), by adding four
   vectors in which the 14-bit coefficients do not overlap (coefficients
   i = g mod 4 for g = 0..3);
2. adds the carry left by the previous chunk;
3. emits the low 4096 bits as result chunk k;
4. keeps the remaining 11 bits, shifted down by 4096, as the next carry.

After the last chunk a flush emits the final carry as result chunk Z. The
next multiplication starts in the same cycle as the accumulation, so a
product takes

    Z*(143 + 1) + 1 cycles

from the first chunk accepted to the last result chunk. Only one chunk and an
11-bit carry are held, so any Z up to 65,535 (16-bit `z_count`) runs without
more storage.

| instance | x_i bits | b_i bits | Z | cycles |
|---|---|---|---|---|
| Toy | 150,000 | 936 | 37 | 5,329 |
| Small | 830,000 | 1,476 | 203 | 29,233 |
| Medium | 4,200,000 | 2,016 | 1,026 | 147,745 |
| Large | 19,000,000 | 2,556 | 4,639 | 668,017 |

### Handshake

`x_ready` is high only while the multiplier is free and chunks remain, so an
x source that is late simply stalls the product. `y_valid`/`y_chunk` deliver
Z + 1 result chunks in order, the last with `y_last`; `done` pulses with it.
Z = 0 gives a single zero chunk.

## What is not included

* **Barrett reduction** modulo x_0, which reuses the multiplier for two
  multi-chunk products: its data path (precomputed constant, shifts,
  correction, multi-chunk by multi-chunk scheduling) is not specified here.
* **The encryption sequencer** for c = m + 2r + 2*sum x_i*b_i mod x_0, with
  its random r and b_i and the accumulation over the tau key elements.
* **Key storage** for x_i, b_i and x_0: the block reads x_i from a stream
  and b_i from a port.

## Departures and choices

* Both operand banks have 1024 Montgomery units (2,048 in all), so the two
  operands are weighted in one 6-cycle step and transformed together. A
  Kintex-7 mapping with one DSP per unit would use 2,048 DSPs, more than the
  1,536 the reference implementation reports.
* The inverse transform's 1/N is folded into the conversion constant.
* Table entries are in Montgomery form.
* The chunk stream and the streaming outer accumulator, which holds one chunk
  and an 11-bit carry instead of the whole product, are this design's own.
* The outer accumulation is one cycle, as its cost Z + 1 requires, which makes
  the coefficient-to-integer conversion and carry add a single 4,106-bit
  addition; at high clock rates it would need pipelining (which adds a
  cycle per chunk) or a carry-save form.
* Resets are asynchronous and active low and cover control state only;
  coefficient banks are loaded by `start`.

## Files

| file | contents |
|---|---|
| `rtl/wntt_pkg.sv` | constants, step encoding, mod-p add and subtract |
| `rtl/mont_mul.sv` | Montgomery multiplier |
| `rtl/twiddle_lut.sv` | shared power table, multi-port |
| `rtl/wntt_ctrl.sv` | step sequencer |
| `rtl/wntt_mult.sv` | the Weighted-NTT multiplier |
| `rtl/outer_acc.sv` | coefficient-to-integer conversion and chunk accumulation |
| `rtl/fhe_mult_top.sv` | x_i * b_i multiplication block (top) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_fhe_mult_full.sv` | the Toy product at full size |
| `tb/tb_fhe_mult_workloads.sv` | the Small, Medium and Large products at full size |

All parameters default to the full-size design (N = 1024, 4-bit digits,
p = 12289, phi = 7). Smaller transforms work for any power of two N up to
2048 with phi = 7^(2048/(2N)) mod 12289, which the testbenches use (N = 64) to
keep their reference models fast.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        +libext+.sv --top-module tb_wntt_mult rtl/wntt_pkg.sv tb/tb_wntt_mult.sv
    ./obj_dir/Vtb_wntt_mult

Replace `tb_wntt_mult` by any other testbench. `tb_fhe_mult_full` builds the
whole design at its default size (2,048 Montgomery units); it compiles in
about a minute and simulates in seconds. Its check covers one complete Toy
product: 38 result chunks against the residue-level model and the cycle count
of 5,329.

What the testbenches cover:

* `tb_mont_mul`: 3,000 operand pairs streamed back to back, checked as
  z*2^14 = a*b mod p.
* `tb_twiddle_lut`: every exponent of the table, the alpha and inverse
  relations.
* `tb_wntt_ctrl`: every step's order and length, the strobes, the 143-cycle
  latency, a start ignored while busy.
* `tb_wntt_mult`: nine multiplications at N = 64 against a direct negacyclic
  convolution, with the 95-cycle latency.
* `tb_outer_acc`: three products at full width against a wide reference.
* `tb_fhe_mult_workloads`: the Small (dense random x_i), Medium and Large
  (sparse x_i chunks, one nonzero digit each, so the reference stays cheap)
  products at full size, every result chunk and the cycle counts 29,233,
  147,745 and 668,017; about a minute of simulation.
* `tb_fhe_mult_top`: seven products at N = 64 with stalls, carries between
  chunks, exact integer products and Z = 0, plus the Z*96 + 1 cycle count.
