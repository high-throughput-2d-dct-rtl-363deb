# 8x8 2-D DCT / IDCT processor with half-rate parallel 1-D units

This is synthesizable SystemVerilog for an 8x8 two-dimensional DCT and inverse DCT
processor for video coding (JPEG, MPEG, H.261/H.263 style block transforms). It takes
one sample per clock and delivers one result per clock, continuously. It follows the
architecture of the article *High Throughput 2D DCT/IDCT Processor for Video Coding*.
Two ideas make it cheap and fast:

1. **The normalisation is factored out of the transform.** The orthonormal 8-point DCT
   matrix (rows in the order 0,4,2,6,1,5,3,7) is written as `S_R8 = P_R8 * J_R8`. Here
   `P_R8` is diagonal, and `J_R8` is a product of sparse factors that need only adders and
   four fixed coefficients. Both 1-D passes then use `J_R8` alone. All scaling collapses
   into one element-wise multiplication by `K8[i][j] = P_i * P_j`. A single multiplier does
   it, at the output for the DCT and at the input for the IDCT.
2. **The 1-D processors run at half the sample rate on two samples at once.** Each
   8-point vector travels as two serial streams of four samples: an even half and an odd
   half. Every basic processor takes 4 samples in series and produces 4 in series. Only
   the K8 multiplier and the rate converters run at the full clock.

## The factorisation

With `C_k = cos(k*pi/16)`, `C_0 = 1/sqrt(2)`, and `T1 = C7/C1`, `T2 = C6/C2`,
`T5 = C3/C5`:

```
P_R8 = 1/2 * diag(C0, C4, C2, C2, C1, C5, C5, C1)

J_R8 = diag( J_SE4 * Q_R4 ,  J_O4B * J_O4C * J_O4D ) * Q_R8

Q_R8  = [I4 ID4; ID4 -I4]        Q_R4  = [I2 ID2; ID2 -I2]      (ID = reversed identity)
J_SE4 = [1 1 0 0; 1 -1 0 0; 0 0 T2 1; 0 0 -1 T2]
J_O4D = [1 0 0 0; 0 -C4 C4 0; 0 C4 C4 0; 0 0 0 1]
J_O4C = [1 1 0 0; 1 -1 0 0; 0 0 -1 1; 0 0 1 1]
J_O4B = [T1 0 0 1; 0 T5 1 0; 0 -1 T5 0; -1 0 0 T1]
```

Forward: `X_R = K8 .* (J_R8 x J_R8^t)`. Inverse: `x = J_R8^t (K8 .* X_R) J_R8`.
`Q_R8`, `Q_R4`, `J_O4C` and `J_O4D` are symmetric. The inverse 1-D transform therefore
reuses the same processors in reverse order, plus transposed versions of `J_SE4` and
`J_O4B`. Those two differ from the forward versions only in the sign of one addend. Each
factor has been checked row by row against the DCT matrix. The testbenches compare the
whole chain with a floating-point DCT.

## Data path

```
forward:  din -> D-S -> J_R8 (rows) -> transpose buffer -> J_R8 (columns) -> U-S -> K8 -> dout
inverse:  din -> K8 -> D-S -> J_R8^t (rows) -> transpose buffer -> J_R8^t (columns) -> U-S -> dout
```

| unit | file | rate | what it does |
|---|---|---|---|
| D-S (down-sampling) | `down_sample.sv` | in f_s, out f_s/2 | collects an 8-sample row, emits pairs `(x[k], x[k+4])` on 4 ticks |
| 1-D processor | `jr8_proc.sv` | f_s/2 | `J_R8` or `J_R8^t` on one vector per 4 ticks |
| transpose buffer | `transpose_buffer.sv` | f_s/2 | 64 flip-flop words, rows in, columns out |
| U-S (up-sampling) | `up_sample.sv` | in f_s/2, out f_s | 4 pairs in, 8 samples out in element order |
| K8 multiplier | `k8_mult.sv` | f_s | sample `n` times `P_{n/8} * P_{n%8}`, 13-bit coefficients |

**Clocking.** There is one clock at the sample rate f_s. The half-rate clock of the
original design is a clock enable, `ce2`, that is high on every second cycle. All
half-rate registers load only when `ce2` is high. A "tick" below means one `ce2` cycle.

### Inside the 1-D processor (`jr8_proc`)

The processor holds one of each basic processor. Multiplexers chain them for the
selected direction:

```
forward:  (I_E, I_O) -> Q_R8 -> even: Q_R4 -> J_SE4 -------(sync 6 ticks)--> O_E
                                odd:  J_O4D -> J_O4C -> J_O4B -------------> O_O
inverse:  I_E -> J_SE4^t -> Q_R4 --(sync 6 ticks)--\
          I_O -> J_O4B^t -> J_O4C -> J_O4D --------> Q_R8 -> (O_E, O_O)
```

The odd chain is one processor deeper than the even chain. A 6-tick shift register
(`sync_delay.sv`) re-aligns the halves wherever they meet. Assertions in `jr8_proc` check
that alignment. I_E/O_E carry vector elements 0..3 and I_O/O_O carry elements 4..7, one
per tick.

Every basic processor shares one schedule (`sr_frame4.sv`). A shift register collects 4
samples. On the 4th sample the frame is copied to a holding register. During the next 4
ticks a single arithmetic unit produces one output per tick, while the next frame is
already shifting in. The arithmetic unit therefore works on every tick of a continuous
stream:

| processor | unit | outputs, phase 0..3 |
|---|---|---|
| `q_r8` | 2 add/sub | `u[k]+v[3-k]`, `u[3-k]-v[k]` |
| `q_r4` | add/sub | `a0+a3, a1+a2, a1-a2, a0-a3` |
| `j_o4c` | add/sub | `d0+d1, d0-d1, d3-d2, d3+d2` |
| `j_o4d` | pre-adder + `C4` multiplier | `b0, C4(b2-b1), C4(b1+b2), b3` |
| `j_se4` | `d_i*{1 or T2} +/- d_j` | fwd `h0+h1, h0-h1, T2h2+h3, T2h3-h2`; transposed: last two `T2h2-h3, T2h3+h2` |
| `j_o4b` | `d_i*{T1 or T5} +/- d_j` | fwd `T1h0+h3, T5h1+h2, T5h2-h1, T1h3-h0`; transposed: signs of the addend flipped |

Latency, from first input to first output: 5 ticks for add-only processors, 6 with a
multiplier, 22 ticks for the whole 1-D processor in either direction.

**Hardwired multipliers** (`coef_mult.sv`). Each 12-bit coefficient (11 fractional bits:
T1 = 407, T2 = 848, T5 = 3065, C4 = 1448, one = 2048) is recoded at elaboration into
canonical signed digits. For each digit position a multiplexer picks the shifted `d_i`,
its bit inverse (for a -1 digit) or zero, according to the selected coefficient. One
carry-save tree therefore serves both coefficients of a configurable multiplier. The +1
that completes each inverted row, the rounding constant (half an LSB) and the +1 of a
subtracted `d_j` all go into one correction row. The 14 digit rows and the correction row
are reduced by 4:2 compressors (`csa_4to2.sv`) and a 5:3 compressor (`csa_5to3.sv`):

| where | rows in | compressors | rows out |
|---|---|---|---|
| low half, before the register | digits 0-6 + correction | three 4:2 | 2 |
| high half, before the register | digits 7-13 | one 4:2, one 5:3 | 3 |
| after the register | 5 + `d_j` row | two 4:2 | 2 |

A carry-increment adder then resolves the last two rows. The result with its 11
fractional bits dropped is `round(d_i * coef) + d_j`. The final adders in
the design are carry-increment adders (`ci_adder.sv`, 4-bit blocks): each block adds with
carry-in 0, and an incrementer applies the real carry.

### The transpose buffer trick

Rows are written as pairs: on tick `n`, row `n/4`, elements `k` and `k+4` (`k = n%4`).
Columns are read the same way: column `n/4`, rows `k` and `k+4`. Each block is stored in
the orientation opposite to the block before it (row-major, then column-major, and so
on). With that alternation, the two words written on tick `n` of a block land exactly in
the two locations read on tick `n` of the previous block's read-out. One 64-word array
therefore serves simultaneous reading and writing. A block's read-out starts on the tick
after its last write and takes 32 consecutive ticks.

## Interface and timing (`dct2d_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | sample clock, synchronous active-low reset |
| `mode` | in | 1 | `MODE_DCT` (0) or `MODE_IDCT` (1); change only while the pipeline is empty |
| `din_valid`, `din` | in | 1, 12 | one sample per cycle, a block row by row; idle cycles allowed |
| `dout_valid`, `dout` | out | 1, 12 | results, a block column by column |

- **Forward:** `din` is a 9-bit two's-complement pixel (the low 9 bits are used).
  `dout` is a 12-bit coefficient, saturated to [-2048, 2047].
- **Inverse:** `din` is a 12-bit coefficient. `dout` is the pixel, saturated to
  [-256, 255].
- **Coefficient order** is the reordered order `R = (0,4,2,6,1,5,3,7)` at both ports:
  - Forward output sample `n = 8c + p` is `X[R(p)][R(c)]`, where the first index is the
    vertical frequency.
  - Inverse input sample `n = 8r + j` must be `X[R(r)][R(j)]`.
  - Inverse output sample `n = 8c + p` is pixel row `p`, column `c`.

  A codec would normally fold this fixed permutation into its zig-zag scan table.
- **Throughput:** one block every 64 cycles with a continuous input.
- **Latency:** 176 cycles from the first input sample of a block to its first output
  sample, in both directions, when the block is sent without idle cycles. Input gaps
  delay the output by at least the same amount.
- Blocks are delimited by counting valid samples from reset. There is no start-of-block
  signal.

## Word lengths and accuracy

| quantity | width | binary point (this implementation) |
|---|---|---|
| data path | 20 bits | 4 fractional bits (DCT), 7 (IDCT) |
| fixed coefficients | 12 bits | 11 fractional bits |
| K8 coefficients | 13 bits | 15 fractional bits (10 distinct values, `dct_pkg::k8_coef`) |

The widths are those of the original design. The binary points are this
implementation's:

- **DCT.** With 4 fractional bits, the worst-case DCT gain of about 85 on 9-bit input
  (21760) fits the 20-bit word.
- **IDCT.** With 7 fractional bits the integer range is ±4096. That is enough for
  coefficient blocks obtained from pixel data. Arbitrary full-scale coefficient blocks
  can overflow inner stages and wrap around.
- **Rounding.** The K8 multiplier and the pixel output round to nearest, ties away from
  zero. Round-half-up biased the mean error beyond the IEEE 1180 limit.

IEEE Std 1180-1990 IDCT accuracy test, 10,000 blocks per set, from `tb_ieee1180`
(limits: peak 1, PMSE 0.06, OMSE 0.02, PME 0.015, OME 0.0015):

| input range | peak | PMSE | OMSE | PME | OME |
|---|---|---|---|---|---|
| [-256, 255] | 1 | 0.0209 | 0.0174 | 0.0029 | 0.00003 |
| [255, -256] | 1 | 0.0208 | 0.0174 | 0.0032 | 0.00003 |
| [-5, 5] | 1 | 0.0125 | 0.0100 | 0.0027 | 0.00005 |
| [5, -5] | 1 | 0.0128 | 0.0100 | 0.0027 | 0.00006 |
| [-300, 300] | 1 | 0.0211 | 0.0161 | 0.0030 | 0.00015 |
| [300, -300] | 1 | 0.0209 | 0.0161 | 0.0027 | 0.00009 |

The random generator is the standard's 32-bit linear congruential generator, restarted
for each set. The forward DCT output matches a floating-point DCT to within ±1 LSB.

## Where this RTL departs from, or goes beyond, the original design

- **Latency.** It is 176 cycles for both directions. The original reports 172 (DCT) and
  178 (IDCT). The internal register arrangement of the original basic processors is not
  known, so the frame-then-hold schedule above is this implementation's own. No padding
  was added to match those numbers.
- **Clock.** The half-rate clock is a clock enable on a single clock, not a second clock.
- **Arithmetic details.** The multipliers use 4:2 and 5:3 compressors. The way the rows
  are grouped, where the mid-multiplier register sits and the carry-increment block size
  (4) are choices made here.
- **Component choices.** The D-S and U-S units and the transpose buffer timing are
  simple designs of this implementation. So are the coefficient port order, saturation
  and mode handling.
- **Gate counts.** The original quotes about 11.7k gates. They are not reproduced here:
  the 64 x 20-bit transpose buffer alone is 1280 flip-flops.

## Files

- `rtl/dct_pkg.sv`: widths, coefficients, the `mode_e` type, K8 table, latency constants.
- `rtl/dct2d_top.sv`: top level.
- `rtl/jr8_proc.sv`: 1-D processor.
- Basic processors: `rtl/q_r8.sv`, `rtl/q_r4.sv`, `rtl/j_se4.sv`, `rtl/j_o4d.sv`,
  `rtl/j_o4c.sv`, `rtl/j_o4b.sv`.
- Helpers: `rtl/sr_frame4.sv` (frame register), `rtl/sync_delay.sv`,
  `rtl/coef_mult.sv`, `rtl/csa_4to2.sv`, `rtl/csa_5to3.sv`, `rtl/ci_adder.sv`, `rtl/addsub.sv`.
- `rtl/down_sample.sv`, `rtl/up_sample.sv`, `rtl/transpose_buffer.sv`, `rtl/k8_mult.sv`.
- `tb/tb_<module>.sv`: a self-checking testbench per unit. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/tb_dct2d_top.sv`: end-to-end test at default parameters. It runs 41 blocks:
  - forward, inverse, then forward again;
  - extreme patterns, back-to-back blocks and input gaps;
  - IDCT saturation and latency checks.

  It also checks that each of those mechanisms actually occurred.
- `tb/tb_ieee1180.sv`: the full IEEE 1180 accuracy test (about 10 s of simulation).
- `tb/tb_dct_ref_pkg.sv`: floating-point reference DCT/IDCT and the IEEE 1180 generator.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dct_pkg.sv tb/tb_dct_ref_pkg.sv \
    tb/tb_dct2d_top.sv --top-module tb_dct2d_top -o sim
./obj_dir/sim
```

Replace `tb_dct2d_top` with any other testbench name. Verilator finds the RTL modules
through `-Irtl`. Testbenches that do not use the reference package can omit
`tb/tb_dct_ref_pkg.sv`.

To change word lengths, edit `dct_pkg` (`DW`, coefficients) or the `FRAC_DCT` and
`FRAC_IDCT` parameters of `dct2d_top`. Rerun `tb_ieee1180` after any change that touches
the inverse path.
