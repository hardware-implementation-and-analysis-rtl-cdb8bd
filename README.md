# Temporal interference mitigation accelerator

A receiver with 4 antennas records a block **Z** of 64 complex samples per
antenna. Part of what it hears is a known signal: a transmission whose samples
**X** (also 4 x 64) are known to the receiver, for example a radar's own
waveform leaking into a communications receiver, or the other way round. The
leak reaches each antenna through an unknown 4 x 4 channel **H**, so
Z = H X + N, where N is what the receiver actually wants. Temporal mitigation
removes the known part without estimating H separately. It projects Z onto
the part of sample space that the rows of X do not span:

    Zhat = Z (I - X^H (X X^H)^-1 X) = Z - (Z X^H) (X X^H)^-1 X

Here (Z X^H)(X X^H)^-1 is the least-squares estimate of H. Subtracting it
times X leaves N, less the small part of N that happens to lie along X.

This repository holds synthesizable SystemVerilog for a fixed-point hardware
implementation of that equation at 4 x 64. Each linear-algebra step has its
own accelerator. The steps run one after another under a small sequencer.
Each accelerator uses its own fixed-point word length and integer width. The
default "hybrid" choice gives 16-bit words to the transpose and the real
inverse and 32-bit words to everything else. It is meant to spend wide
arithmetic only where the error needs it. The measured cost of that saving is
given under "Measured accuracy".

## The accelerator chain

`temporal_mitigation` (the top) runs seven stages in order. Each stage reads
its operands from block-RAM buffers and writes its result to another buffer.

| stage | module | computes | size | format W_I | cycles |
|---|---|---|---|---|---|
| 1 | `conj_transpose` | X^H | 4x64 -> 64x4 | 16_1 | 259 |
| 2 | `cmat_mult` | Z X^H | 4x64 * 64x4 | 32_1 | 1027 |
| 3 | `cmat_mult` | X X^H | 4x64 * 64x4 | 32_1 | 1027 |
| 4 | `cmat_inv` | (X X^H)^-1 | 4x4 | sub-units 16_7 / 32_5 / 32_7, output 32_7 | 2763 |
| 5 | `cmat_mult` | P = (Z X^H)(X X^H)^-1 | 4x4 * 4x4 | 32_7 | 67 |
| 6 | `cmat_mult` | Q = P X | 4x4 * 4x64 | 32_5 | 1027 |
| 7 | `cmat_sub` | Zhat = Z - Q | 4x64 | 32_5 | 259 |

One run takes **6437 cycles** from `start` to `done`. That is the sum of the
stages, plus one launch cycle per stage, plus one cycle to leave idle.

All engines share one handshake and one memory style:

- `start` is a one-cycle pulse while the engine is idle.
- `busy` stays high until the run is over.
- `done` is a one-cycle pulse after the last result is written.
- Operands are fetched through read ports. Data arrives one clock after the
  address, as from a registered block RAM.
- Results leave through a write port (`we`, `addr`, data).
- Complex matrices are kept row-major, with the real and imaginary parts side
  by side in one RAM word.

The engines are sequential. Each one performs one complex multiply-accumulate
(four real products) or one element operation per clock. Only one engine is
busy at any time, and an assertion checks this.

### Top-level interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_we`, `in_sel`, `in_addr` | in | 1, 1, 8 | load element `r*64+c` of Z (`in_sel=0`) or X (`in_sel=1`) |
| `in_re`, `in_im` | in | 32 | the element, format 32_7 |
| `start` | in | 1 | one-cycle pulse while idle |
| `busy`, `done` | out | 1 | run in progress; one-cycle pulse at the end |
| `singular` | out | 1 | the inverse met a zero determinant (valid from `done` until the next `start`) |
| `stage` | out | 3 | running stage, 0 = idle, 1..7 as in the table |
| `out_addr` | in | 8 | Zhat element `r*64+c` |
| `out_re`, `out_im` | out | WS (32) | Zhat, format 32_5, one cycle after `out_addr` |

Loading is refused while `busy` is high, and an assertion flags an attempt. If
the inverse is singular it returns zeros, so Zhat = Z and `singular` is set.

## Fixed-point formats

A format written `W_I` is a signed two's-complement number with W bits, of
which I are integer bits (sign included). It therefore has F = W - I
fraction bits. The default format of each stage is listed in the table
above. They are set as package constants in `tm_pkg` and passed as parameter
pairs on the top:

| parameters | accelerator |
|---|---|
| `WH`/`IH` | conjugate transpose |
| `WG`/`IG` | the two 4x64 by 64x4 multiplications |
| `WV`/`IV` | real inverse |
| `WM`/`IM` | multiplication inside the inverse |
| `WD`/`ID` | addition inside the inverse |
| `WP`/`IP` | 4x4 multiplication |
| `WQ`/`IQ` | 4x4 by 4x64 multiplication |
| `WS`/`IS` | subtraction |

Setting every pair to the same value gives a uniform-precision design.

Every operand is converted to the format of the engine that reads it, at the
moment it is read. Each engine keeps its products and sums at full precision
and converts once per result. All conversions go through one function,
`tm_pkg::requant`:

- It shifts to the new number of fraction bits. Bits dropped on the right
  are floored (truncated toward minus infinity).
- It keeps the low W bits. Overflow therefore wraps; it does not saturate.

These are the default modes of the usual HLS fixed-point type. Which modes
the reference implementation used is not known.

With a 1-bit integer part, the 16_1 transpose and the 32_1 Gram products hold
values in [-1, 1) only. Inputs must be scaled so that every entry of X X^H and
Z X^H stays below 1; otherwise those stages wrap. Z and X are loaded in 32_7.

## Inverting a complex matrix with real units (`cmat_inv`)

This is the least obvious part of the design. The 4x4 complex matrix
M = X X^H is inverted without any complex divider. It takes two real 4x4
inversions, three real 4x4 multiplications and one real 4x4 addition.

Write M = A + iC, with A the real part and C the imaginary part, and its
inverse Y = B + iD. Then M Y = I splits into a real equation and an
imaginary equation:

    A B - C D = I
    A D + C B = 0   =>   D = -A^-1 C B

Substituting D into the first equation gives (A + C A^-1 C) B = I. With
`r0 = A^-1 C`, this becomes:

    r0  = A^-1 C                  (inversion 1, multiplication 1)
    y11 = (C r0 + A)^-1           (multiplication 2, addition, inversion 2)
    Y   = y11 - i (r0 y11)        (multiplication 3)

The same block formula solves the real 8x8 system [A -C; C A]. It has one
requirement: A must be invertible. For a Hermitian positive-definite M such
as X X^H, A is symmetric positive definite, so the requirement is always met.
The second inversion is safe as well. M^-1 is then Hermitian positive
definite too, so its real part y11 is symmetric positive definite, and
C r0 + A, which equals y11^-1, is invertible.

`cmat_inv` first loads the 16 complex elements into two register files (A
and C). It then runs its three sub-units in this order:

    INV(A) -> MUL(A^-1, C) -> MUL(C, r0) -> ADD(C r0, A) -> INV(S) -> MUL(r0, y11)

Each intermediate matrix is kept in the format of the unit that produced it:

- A^-1 and y11: 16_7
- r0, C r0 and r0 y11: 32_5
- S = C r0 + A: 32_7

Each read port converts its operand to the format of the unit reading it. A
final pass writes y11 as the real part of the result and -(r0 y11) as the
imaginary part, both cast to 32_7, the format of the 4x4 multiplication that
consumes them. `singular` is set if either real inversion met det = 0.

Timing at the default formats is 2763 cycles:

| step | cycles |
|---|---|
| load | 18 |
| two inversions | 2 x (1 + 1251) |
| three multiplications | 3 x (1 + 67) |
| one addition | 1 + 19 |
| write-out | 17 |

Only one sub-unit is active at a time, and an assertion checks this.

The inverse is the precision bottleneck of the chain. Its 16_7 format leaves
9 fraction bits, so its entries are known only to about 2e-3. This error
dominates the final result of the hybrid design, as the accuracy tables below
show.

## The adjugate inverse (`rmat_inv_adj`)

Each real inversion uses the adjugate formula, A^-1 = adj(A) / det(A). The
entry at row r, column c of adj(A) is the cofactor of A[c][r]. The unit works
in four phases:

1. **Load.** The 16 elements are read into registers in the unit's format
   (16_7).
2. **Cofactors.** Each of the 16 cofactors is a signed 3x3 minor. A minor is
   the sum of the six triple products of Sarrus' rule. One triple product is
   formed per clock (96 clocks in all) and accumulated at full precision,
   with 3F fraction bits.
3. **Determinant.** The determinant is expanded along row 0 from the stored
   cofactors, giving 4F fraction bits.
4. **Division.** Each output is |cofactor| * 2^(2F) / |det|, so the quotient
   has F fraction bits. A restoring divider produces one quotient bit per
   clock:
   - The dividend is 3W + 3 + 2F bits wide.
   - The sign is applied afterwards, so the result is truncated toward zero.
   - The result is wrapped to W bits.

The timing is 115 + 16 (5W + 5 - 2I) cycles, which is 1251 at 16_7. A zero
determinant raises `singular` and the unit writes zeros.

The widths follow from W: triple product 3W bits, determinant 4W + 5 bits,
dividend 3W + 3 + 2F bits. Any W up to 32 works.

## The other engines

- **`conj_transpose`** reads X row-major and writes X^H row-major. It swaps
  the indices and negates the imaginary part, one element per clock. The
  negation of the most negative value wraps.
- **`cmat_mult`** is an M x K by K x N complex multiplication with one
  multiply-accumulate per clock. It takes M·N·K + 3 cycles. Each operand is
  converted to the engine's format as it arrives. The accumulator is exact
  and is converted once per dot product. The four multiplications of the
  chain are instances of this one module with different sizes and formats.
- **`rmat_mult`** is the same engine for real operands. Its operands are
  already in its format. A 4x4 by 4x4 product takes 67 cycles.
- **`rmat_add`** adds two real vectors element by element, with wrap-around.
  16 elements take 19 cycles.
- **`cmat_sub`** subtracts complex elements one by one, each operand cast to
  32_5. 256 elements take 259 cycles.
- **`tm_ram`** is a simple dual-port RAM with a registered, read-first
  output. Its contents are not reset.

## Measured accuracy

`tb_tm_workloads` runs four copies of the top side by side on the same data:

- the hybrid default
- uniform 32_7
- uniform 16_7
- uniform 8_3

Each copy processes every combination of the following:

- **Channel.** Two kinds, both made up for these tests:
  - line of sight: one plane wave per transmitted stream
  - multipath: three waves with random gains and angles
- **Delta.** The level of N below H X: 0, 10, ..., 70 dB.

X has parts in [-0.08, 0.08]. The normalised error is
10 log10(sum |R - Y| / sum |R|), where R is a floating-point reference and Y
the hardware output. The multipath results (dB):

| config | 0 | 10 | 20 | 30 | 40 | 50 | 60 | 70 |
|---|---|---|---|---|---|---|---|---|
| hybrid | -22.7 | -21.1 | -15.7 | -9.1 | -4.8 | 0.4 | 4.9 | 7.7 |
| 32_7 | -63.7 | -59.0 | -54.1 | -48.8 | -44.0 | -38.9 | -33.8 | -29.3 |
| 16_7 | -15.7 | -11.9 | -6.5 | -1.7 | 3.6 | 8.1 | 13.3 | 16.6 |
| 8_3 | -2.4 | 2.2 | 8.2 | 10.3 | 15.8 | 24.1 | 27.7 | 31.8 |

The absolute error of the hybrid output is about 1e-3 at every delta. The
normalised error still grows with delta because the wanted signal N shrinks
while that error stays the same. The known signal is suppressed by more than
30 dB in every hybrid and 32_7 run. The trends match the published precision
study:

- 8 bits are not enough.
- 32_7 is the best uniform choice.
- Error rises with delta.

The absolute numbers depend on the signal scaling, which is this design's own
choice. In this scaling the hybrid design falls between 16_7 and 32_7. The
reference reports the hybrid choice close to the best uniform format. Here
the gap is wider, because the 16_7 real inverse limits the result. With
`WV = 32` and everything else left at the hybrid default, the multipath
error becomes -32 to -42 dB across the whole delta range. Above 50 dB that
matches or beats uniform 32_7.

### Error after each stage

The same testbench reads the intermediate buffers of the hybrid accelerator
and compares each one with the floating-point chain. Mean squared error,
multipath inputs, in dB:

| stage | delta 10 dB | delta 70 dB |
|---|---|---|
| X^H (16_1) | -92.0 | -92.2 |
| Z X^H (32_1) | -105.1 | -106.7 |
| X X^H (32_1) | -98.1 | -96.1 |
| (X X^H)^-1 (16_7 inside) | -36.0 | -37.8 |
| P, 4x4 product (32_7) | -57.0 | -59.4 |
| Q, 4x4 by 4x64 product (32_5) | -75.0 | -76.8 |
| Zhat (32_5) | -75.0 | -76.8 |

The first three stages sit at their quantisation floor. The inverse adds by
far the largest error. The later products scale that error down, because
Z X^H and X are small. The subtraction adds nothing measurable.

## Where this design departs from the reference implementation

The reference is an HLS build on a Zynq UltraScale+ MPSoC. An Arm host calls
each accelerator and moves the matrices by DMA, and the logic was clocked at
about 600 MHz. This design differs as follows:

- **Host, DMA and buffers.** An on-chip sequencer replaces the host's
  one-by-one invocation. The host/DMA data movement is replaced by a load
  port and a result read port. The processor, its DDR and the DMA engine are
  not included.
- **Data layout.** The reference keeps real and imaginary parts as separate
  real matrices, and it returns every intermediate result to the host. Here
  both parts share one RAM word, and every intermediate stays in an on-chip
  buffer.
- **Schedule.** The engines are plain sequential datapaths (one
  multiply-accumulate per clock) with cycle counts of their own. They do not
  reproduce the latencies reported for the preliminary floating-point build:

  | accelerator | reference (floating point) | this design |
  |---|---|---|
  | inverse | 406 | 2763 |
  | 4x4 multiplication | 135 | 67 |
  | 4x4 by 4x64 multiplication | 617 | 1027 |
  | subtraction | 535 | 259 |

  No timing closure at 600 MHz has been attempted.
- **Quantisation modes.** Floor and wrap are assumed (see above).
- **Formats the reference leaves open:**
  - Z and X are loaded in 32_7.
  - The inverse delivers 32_7.
- **Singular inputs.** A singular inverse is flagged, and Zhat = Z.
- **Notation.** One description of the complex inverse names the imaginary
  part B in its text and C in its equations. The equations are followed here,
  and they are consistent with the derivation above. Two forms of the
  off-diagonal block are also given. The one built, -(A^-1 C) y11, needs
  only A to be invertible. The other, -(C + A C^-1 A)^-1, also needs the
  imaginary part C to be invertible. C has a zero diagonal for Hermitian M
  and is often singular.
- **Not built.** The error-analysis flow (comparison against a
  floating-point golden model) exists here only as testbenches. The RF front
  end the algorithm is meant for is not part of the design.

## Files

| file | content |
|---|---|
| `rtl/tm_pkg.sv` | sizes, default formats, `requant` |
| `rtl/temporal_mitigation.sv` | top: buffers, seven engines, sequencer |
| `rtl/conj_transpose.sv`, `rtl/cmat_mult.sv`, `rtl/cmat_sub.sv` | complex engines |
| `rtl/cmat_inv.sv` | complex 4x4 inverse |
| `rtl/rmat_inv_adj.sv`, `rtl/rmat_mult.sv`, `rtl/rmat_add.sv` | real sub-units of the inverse |
| `rtl/tm_ram.sv` | block-RAM buffer |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_tm_workloads.sv` | delta sweep, channel kinds and precision configurations |

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each one:

- compares results against an independent reference (exact integer models
  for the arithmetic units, floating point for the inverse and the chain);
- checks cycle counts;
- has a watchdog.

`tb_temporal_mitigation` runs the top at full size with default parameters.
It covers three deltas, an input whose X X^H overflows the 32_1 format
(checked to wrap exactly), and a singular input. It also checks that every
stage is entered once per run, in order.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/tm_pkg.sv tb/tb_temporal_mitigation.sv --top-module tb_temporal_mitigation
    ./obj_dir/Vtb_temporal_mitigation

Replace the testbench name to run any other testbench. `-Wno-fatal` keeps
Verilator's lint warnings, for example about unused bits of the divider,
from stopping the build. The full-size end-to-end test runs in well under a second once built.
`tb_tm_workloads` builds four copies of the design and takes about half a
minute to compile.

To change the precision, override the format parameters of
`temporal_mitigation`. To change the defaults, edit the constants in
`tm_pkg`. The sizes (`NR = 4`, `NS = 64`) are package constants as well. The
engines are sized by parameters, but the top's 8-bit addresses and the 4x4
inverse assume 4 x 64.
