# Finite-ring signal processing from a single look-up-table cell

This RTL computes DSP arithmetic exactly in small residue rings (integers
modulo m, with m of 5 bits or fewer) instead of in wide binary words. A large
dynamic range comes from several such rings running side by side, the residue
number system (RNS). No carry ever passes from one ring to another, so every
datapath is a narrow, one-dimensional pipeline. Every arithmetic unit is built
from one kind of part: a tiny ROM (`lut_rom`) with a latch behind it. Only the
table contents change from one use to the next. A multiplication by a fixed
constant is just a different table, so a fixed-coefficient multiply costs no
more hardware than an addition.

Three ways of doing modular arithmetic with such cells are given. They stand
side by side in the top level `nt_dsp_top`:

| technique | modules | what it computes |
|---|---|---|
| ROM steering (bit-level systolic) | `bipsp_cell`, `ipsp`, `fir_ring`, `rns_fir`, `dft_ce`, `qrns_dft2x2` | fixed-coefficient FIR filter in RNS; complex 2x2 2-D DFT element over quadratic residue rings |
| redundant pipelined adder | `csa_bit_cell`, `cond_csa_stage`, `residue_adder` | addition modulo m of carry-save pairs, no comparison with m |
| neural-like iteration | `nn_subnet`, `crt_converter` | reduction modulo M by a convergent feedback sum; RNS-to-binary conversion (Chinese Remainder Theorem) |

`nt_pkg` holds the elaboration-time arithmetic: modular inverse, |2^i|_m,
the square root of -1, and the bit width ceil(log2 m). All ROM contents and
constants are derived from the moduli and coefficients given as parameters.
No table is stored in a file.

## The generic cell

`lut_rom` is a 2^AW-word by DW-bit table. It has four column-select lines
(from addr[1:0]) and 2^(AW-2) row-select lines (from the upper address bits).
Each output bit has its own plane of cross-points. A stored 1 models a
cross-point whose pull-down transistor was left out. In the intended circuit
the output line is pre-charged and then evaluated, so each ROM also acts as a
pipeline stage. In this RTL the ROM is combinational. The module that uses it
puts a clocked register after it (or after the steering switch). The default
and largest organisation used is 32 x 5 (8 rows x 4 columns).

## ROM steering: the bit-sliced inner-product cell

The basic operation is the inner product step `y_out = y_in + A*x (mod m)`
with A fixed. Write x in binary, x = sum x[i] 2^i. Then

    A*x = sum over i of  x[i] * |2^i * A|_m        (mod m)

so the step splits into B = ceil(log2 m) cells in a row. Cell i holds the
constant c_i = |2^i A|_m in a 2^B x B ROM addressed by y. The ROM output is
y + c_i mod m. A steering switch passes either the ROM output or y unchanged,
and a latch holds the result (`bipsp_cell`).

The switch is controlled by the x word, which travels with y. It travels
**cyclically rotated**, not as a broadcast. Each cell rotates x one place
(bit k+1 moves to bit k) and steers with bit 0. Cell i therefore sees bit i
of the original x. After B cells, x is back in its original order and can
enter the next inner-product step unchanged. Every cell has the same
structure: one ROM, one switch, two latches. Cells differ only in their
table.

`ipsp` chains B cells: latency B clocks, one operand pair per clock.

### FIR filter: the sliding window

`fir_ring` computes y(n) = sum_{i<N} COEF[i] x(n-i) mod m with N taps of B
cells each, N*B cells in one line. The partial sum y starts at 0 in tap 0
and moves one cell per clock. The sample x moves with it, but the last cell
of each tap (`X_EXTRA = 1`) holds x for one extra clock. Output n enters tap
i at clock n + iB. The sample that entered at clock n - i has been delayed
i(B+1) clocks by then, and so it is exactly there:

    clock at tap i:   y(n) arrives  n + i*B
                      x(n-i) arrives (n-i) + i*(B+1) = n + i*B

Every clock a new sample is taken and a finished output leaves N*B clocks
later. x_in is sampled on every clock, so the stream must be continuous.
`in_valid` only marks which outputs are meaningful. Reset clears all
latches, so samples before reset count as zero.

`rns_fir` runs one `fir_ring` per modulus (default 31, 29, 27, a range of
24 273) on the residues of the same sample. Channels narrower than the
widest are delayed, so that all residues of an output appear together. The
output stays in residue form.

`rns_encoder` turns a binary sample into its residues with the same cell.
Take an inner-product step with coefficient 1 and a W-bit operand: stage i
adds |2^i|_m when bit i is set, so after W stages the sum is |X|_m. The
`bipsp_cell` parameter `XW` widens the rotating x word for this use. In
`nt_dsp_top` the encoder (W = 15) feeds the filter, which adds 15 clocks of
latency.

### Complex 2x2 2-D DFT element over quadratic residue rings

For a prime m = 4q+1 there is a j with j^2 = -1 (mod m). A complex number
a + jb is then carried as two independent residues: the normal component
a + j b and the conjugate component a - j b. Complex addition and
multiplication act on each component separately. A complex transform
therefore splits into 2L identical real processors, one per component per
modulus.

`dft_ce` is one such processor. It computes the 2x2 transform with
pre-multiplied twiddles,

    X[k][l] = x00 + (-1)^l a01 x01 + (-1)^k a10 x10 + (-1)^(k+l) a11 x11,

as two arrays of four IPSPs:

    P  = x00 + a01 x01      Q  = x10 + (a11/a10) x11      X00 = P  + a10 Q    X10 = P  - a10 Q
    P' = x00 - a01 x01      Q' = x10 - (a11/a10) x11      X01 = P' + a10 Q'   X11 = P' - a10 Q'

P and Q are broadcast to two modules each. a10 must be invertible modulo m.
The latency is 2B clocks.

`qrns_dft2x2` instantiates `dft_ce` for both components of each modulus
(default 13, 17, 29). It takes the twiddles as complex integers
(`ALPHA_RE`, `ALPHA_IM` for positions 01, 10, 11; the default twiddles are
j, 1+j, -1+j) and maps them to each processor's component at elaboration.
Its ports carry QRNS components. Converting between a+jb and the two
components is left to the user:
`normal = a + j_m b`, `conjugate = a - j_m b`,
`a = (normal + conjugate)/2`, `b = (normal - conjugate)/(2 j_m)`, all mod m.
Here j_m is the smallest square root of -1 (5, 4 and 12 for 13, 17, 29).

## Redundant pipelined residue adder

`residue_adder` adds modulo m without ever comparing against m. Let
p = ceil(log2 m), so that m <= 2^p < 2m. An operand is a pair of p-bit words
whose sum is congruent to it modulo m. Adding two operands, (A1,A2) and
(R1,R2), is a chain of carry-save rows (`cond_csa_stage`). Each row adds one
p-bit word to the running sum/carry pair. A carry out of the top bit has
weight 2^p = m + K, where K = 2^p - m. So that carry is dropped and K is
added in a later row:

| stage | rows | adds | enabled when |
|---|---|---|---|
| 1 | 1 | A1 | always (carry out CP1) |
| 2 | 1 | A2 | always (CP2) |
| 3 | 2 | K, then 2K | CP1 xor CP2, then CP1 and CP2 (CP3 = carry of the row that added) |
| 4 | 1 | K | CP3 (CP4) |
| 5 | 1 | K | CP4 |

Each stage is one pipeline register, so the latency is 5 clocks and one
addition starts per clock. The number of stages does not depend on m. This
is what makes the scheme attractive for very large moduli, such as the range
of a CRT. The result is again a pair: `s_out + c_out` is congruent to the sum,
but is not reduced. `out_overflow` flags a carry leaving stage 5. An
exhaustive search over all 5-bit inputs found none for m = 17 to 32. For m
close to 2^p (for example 29), stage 5 never fires. The default m = 17 uses
every correction path.

Each bit of a row is a `csa_bit_cell`: a 16-word x 3-bit ROM addressed by
{enable, operand bit, carry bit, sum bit}. Enabled, it outputs the full-adder
sum and the carry into the next position. Disabled, it passes the sum bit
and the carry bit straight through, in the same position. At most one of the
two carry outputs is ever 1, and the row ORs them into its new carry word.
Nothing propagates along a row.

## Neural-like reduction and the CRT converter

Any integer Z = sum 2^i z[i] is congruent modulo M to
sum |2^i|_M z[i]. `nn_subnet` uses this identity as a two-layer network:

* the **collecting layer** counts the input bits of each weight 2^k. For
  addition that is the number of inputs with bit k set. For multiplication
  it is the number of partial products x[i] y[j] with i + j = k;
* the **computing layer** forms z = sum |2^k|_M * count_k, and then feeds z
  back as its only input: z <- sum |2^i|_M z[i].

Each step keeps z congruent to the result and never increases it. z stops
changing exactly when it has no bit of weight >= M, that is when
z < 2^ceil(log2 M). The settled value may still lie in [M, 2^ceil(log2 M)).
Such a value is a valid input to a following subnet. `CORRECT = 1`
subtracts M once for a final result. `start` loads the operands, `busy` is
high while the network iterates, and `done` rises one clock after the state
stopped changing. The number of iterations depends on the data. In the
tests at the default sizes it never took more than 4 clocks. An assertion
in `nn_subnet` checks that no feedback step increases z.

`crt_converter` arranges subnets as the CRT tree, all working modulo
Mt = prod m_i:

    Q_i = x_i * inv_i      (inv_i = (Mt/m_i)^-1 mod m_i)     level 1, one multiplying subnet per residue
    Z_i = Q_i * (Mt/m_i)                                      level 2, one multiplying subnet per residue
    X   = sum Z_i (mod Mt), corrected into [0, Mt)           one L-input adding subnet

A small sequencer starts each level when every subnet of the level below has
settled. An assertion checks that no subnet is still busy once the
sequencer is back in idle. With the default moduli (31, 29, 27) no conversion in the tests took more
than 10 clocks. These are the same moduli as the FIR, so the FIR's residue outputs
can be converted directly; the end-to-end testbench does this.

## Top level

`nt_dsp_top` instantiates `rns_encoder` feeding `rns_fir`, and
`qrns_dft2x2`, `residue_adder` and `crt_converter`. They share only `clk` and the synchronous, active-high
`rst`. Each keeps its own prefixed ports (`fir_*`, `dft_*`, `add_*`,
`crt_*`). The filter takes a binary sample `fir_x` (below the product of
its moduli) and returns residues. Residue buses are packed arrays `[L-1:0][BMAX-1:0]`. Each modulus
uses the low ceil(log2 m) bits, and the upper bits of outputs are zero.

| unit | throughput | latency |
|---|---|---|
| `ipsp` | 1 / clock | B |
| `rns_encoder` | 1 sample / clock | W (15 at defaults) |
| `fir_ring`, `rns_fir` | 1 sample / clock | N*B (40 at defaults) |
| `dft_ce`, `qrns_dft2x2` | 1 block / clock | 2B (10 at defaults) |
| `residue_adder` | 1 / clock | 5 |
| `nn_subnet` | one operation at a time | data dependent, `done` |
| `crt_converter` | one conversion at a time | data dependent (<= 10 seen at defaults), `done` |

Default parameters: FIR moduli 31, 29, 27, 8 taps with coefficients
3, 7, 12, 5, 9, 1, 4, 2; DFT moduli 13, 17, 29 with twiddles j, 1+j, -1+j;
adder modulus 17; CRT moduli 31, 29, 27. None of these values is special.
Any pairwise-coprime moduli of 3 to 32 work for the FIR and the CRT, any
primes 4q+1 up to 29 for the DFT, and any m >= 3 for the adder. Widen BMAX
for moduli above 32. Keep the ROMs at 32 words or fewer, as intended.

## What is not here

* **Conversion of the FIR output to binary by mixed-radix conversion built
  from the steering cell.** The CRT converter does this job here instead.
* **The fully bit-level skewed form of the residue adder.** Each row here is
  a word-wide pipeline stage with its enable broadcast to all bit cells.
* **The unrolled, feed-forward form of `nn_subnet`.** Only the synchronous
  feedback form is built, so its latency varies with the data.
* **The surrounding N x N 2-D FFT** (data ordering, twiddle selection around
  `dft_ce`), the recursive form of the CE, and QRNS encode/decode units.
* **Parity-style fault detection along the cell chains, and a short
  production test set for the arrays.**
* **The dynamic circuit itself** (pre-charge/evaluate timing, clock drivers).
  It is modelled as ordinary edge-triggered logic.

Choices made here where the intended design leaves room: the rotation
direction of x; the extra FIR latch on the whole x word, in the last cell of
each tap; the meaning of the three outputs of the carry-save cell; the
valid/ready/done handshakes; synchronous reset; and all moduli, coefficients
and twiddles.

The output names of `dft_ce` follow the transform formula above. The other
labelling convention, with X01 and X10 swapped, was not used.

## Simulating

Each module has a self-checking testbench `tb/<module>_tb.sv`. It prints
`TB_RESULT checks=N failures=F` and has a watchdog. All reference values are
computed in the testbench, in plain integer arithmetic: convolution sums,
complex arithmetic, CRT, and so on. Where a latency is defined, it is checked
to the clock. `nt_dsp_top_tb` runs the whole design at its default
parameters. It sends random binary samples through the encoder and the RNS filter and
converts every output through the CRT network back to binary. It runs complex blocks through the
QRNS DFT and random redundant operands through the adder. It also counts that
each mechanism occurred at least once: steering adds and bypasses, the
sliding x latch, all four correction paths of the adder, non-unique settled
subnet values, and the final CRT correction.

With Verilator 5 (the package first):

    verilator --binary --timing --assert -Wno-fatal -Irtl \
        rtl/nt_pkg.sv $(ls rtl/*.sv | grep -v nt_pkg) tb/nt_dsp_top_tb.sv \
        --top-module nt_dsp_top_tb -o sim
    ./obj_dir/sim

Replace `nt_dsp_top_tb` with any other testbench name to test one unit. All
of them finish in seconds.
