# Radix-3 and radix-4 DIT FFTs in combinational logic

This RTL computes short discrete Fourier transforms in one pass of
combinational logic:

- a **9-point FFT** built from radix-3 butterflies,
- a **16-point FFT** built from radix-4 butterflies,
- an **8-point FFT** built from radix-2 butterflies.

All three use decimation in time (DIT). Each twiddle multiplication comes
*before* the additions of its butterfly. In fixed point a multiply followed by
an add has a shorter critical path than an add followed by a multiply. The
design is sized and judged by area (LUTs, slices) and by its maximum
combinational path delay.

The arithmetic is built from the same three parts throughout:

- an unsigned **array multiplier**;
- a signed **Baugh-Wooley multiplier**;
- a **three-multiplier complex multiplier**, which rotates a sample by a
  twiddle factor.

The RTL follows the structure of the paper *High Speed Area Efficient Radix-3
and Radix-4 Fast Fourier Transforms* (IJIRCCE, Vol. 4, Issue 10, 2016). That
paper gives the block structure but no word widths, rounding or interface. All
of those are choices made here, and they are listed under
[Departures and choices](#departures-and-choices).

## How a two-rank DIT FFT is wired

The 9-point and 16-point transforms have the same shape, with radix r = 3 or 4
and N = r².

1. **Decimate.** Split the input into r interleaved sequences x(r·n + i),
   i = 0..r-1.
2. **Rank 1.** Butterfly i takes x(i), x(i+r), x(i+2r), … and computes their
   r-point DFT Y_i(k). No twiddles are needed.
3. **Rank 2.** Butterfly k takes Y_0(k) … Y_{r-1}(k). It multiplies input i
   by the twiddle W_N^(i·k), then takes another r-point DFT:

       X(k + r·m) = Σ_i  W_N^(i·k) · Y_i(k) · W_r^(i·m),   m = 0..r-1

   Rank-2 butterfly k therefore produces X(k), X(k+r), X(k+2r), and so on.

The only step that is easy to get wrong is the transpose between the ranks:
output k of rank-1 butterfly i goes to input i of rank-2 butterfly k.
`fft9_r3.sv` and `fft16_r4.sv` show this as `ar[i][k]`. The outputs are
rearranged so that the `yr`/`yi` ports are in natural order X(0..N-1).

The 8-point radix-2 FFT (`fft8_r2.sv`) has three ranks:

- **Rank 1** forms 2-point DFTs of the bit-reversed pairs (x0,x4), (x2,x6),
  (x1,x5) and (x3,x7).
- **Rank 2** forms the 4-point DFTs E(k) of the even samples and O(k) of the
  odd samples. It uses W8^0 and W8^2 = -j.
- **Rank 3** forms X(k) = E(k) + W8^k·O(k) and X(k+4) = E(k) - W8^k·O(k).

## The butterflies

Each butterfly has a parameter `ROT`:

- With `ROT = 1`, input m is first rotated by W_NPT^(m·Q). The parameters `Q`
  and `NPT` choose the twiddle.
- With `ROT = 0` (rank 1), no multiplier is built.

A rotation by W^0 = 1 is always just a wire.

- **Radix-2** (`bfly_r2`): A + W·B and A - W·B.
- **Radix-4** (`bfly_r4`): after the rotations, the 4-point DFT needs only
  adders. Multiplying by ±j swaps the real and imaginary parts and negates
  one of them:
  `s0=a+c, s1=a-c, s2=b+d, s3=b-d; X0=s0+s2, X1=s1-j·s3, X2=s0-s2, X3=s1+j·s3`.
- **Radix-3** (`bfly_r3`): the 3-point DFT has a single non-trivial constant,
  √3/2:
  `t=b+c, d=b-c; X0=a+t; X1,X2 = a - t/2 ∓ j·(√3/2)·d`.
  Two signed multipliers form (√3/2)·Re d and (√3/2)·Im d. X1 and X2 are
  summed at full precision and rounded once.

## Twiddle rotation with three multipliers

`complex_mult` computes (X + jY)(C + jS) with three real multiplications
instead of four. It shares the product Z between both outputs:

    Z = C·(X − Y)
    R = Z + Y·(C − S)       = C·X − S·Y
    I = X·(C + S) − Z       = S·X + C·Y

The coefficients C, C+S and C−S arrive as separate inputs, as a twiddle table
would supply them. Inside the FFTs they are constants, computed when the
design elaborates by the functions in `fft_pkg.sv` (`tw_c`, `tw_cps`,
`tw_cms`):

- W_N^k = cos(2πk/N) − j·sin(2πk/N);
- scaled by 2^14 and rounded to the nearest integer.

With constant coefficients, synthesis can reduce each multiplier to
shift-and-add logic. `twiddle_rot.sv` wraps the multiplier for a constant
twiddle.

## Multipliers

Both multipliers work in three steps:

1. generate the partial products;
2. add the operands together (multi-operand addition);
3. merge the result with a ripple-carry adder.

- **`array_mult`**: unsigned N × M multiplier with an N+M bit product.
  Default 4 × 4. It adds its rows with a carry-save array, one rank of full
  adders per row.
- **`signed_mult`**: two's complement Baugh-Wooley multiplier. Default 5 × 5.
  - The partial products a[N-1]·b[j] (j < M-1) and a[i]·b[M-1] (i < N-1) are
    inverted.
  - Constant ones are added in columns N-1, M-1 and N+M-1. For N = M the first
    two merge into column N.
  - Taken modulo 2^(N+M), the sum is the signed product.
  - The rows are reduced by a Wallace-style tree. At each level, rows are taken
    three at a time and turned into a sum row and a carry row. At 5 × 5 the row
    count goes 6 → 4 → 3 → 2, the same three levels as the reference's
    hand-placed tree of 16 full adders and 5 half adders.
  - The tree here is generated for any size and compresses whole rows, so
    before synthesis removes the constant zeros it has more adder cells than
    the hand-placed tree.

  The FFTs instantiate `signed_mult` at 17×16, 16×16, and similar sizes for
  the wider ranks.

## Number format and accuracy

| quantity | format |
|---|---|
| input samples | `DW` = 16-bit two's complement, real and imaginary parts |
| twiddles, √3/2 | 16-bit, 14 fractional bits (1.0 = 16384) |
| after a rotation | +1 bit |
| after a radix-2 sum | +1 bit |
| after a radix-3 or radix-4 sum | +2 bits |
| FFT outputs | `DW + 5` = 21 bits, all three sizes; cannot overflow |

Each rotation and each √3/2 product is kept at full precision through the
adder that follows it. It is then rounded half up by dropping 14 bits. The
outputs are unscaled: X(k) = Σ x(n)·W_N^(nk), with no 1/N factor.

The table below shows the measured worst deviation from a double-precision DFT
over 2000 random full-scale inputs, in output LSBs:

| transform | worst error |
|---|---|
| 9-point | 4.7 |
| 16-point | 6.2 |
| 8-point | 2.9 |

For the 16-point FFT, 6.2 LSB is about 6·10⁻⁶ of the output range.

## Top level and timing

`fft_top` places the 9-, 16- and 8-point FFTs and the array multiplier side by
side. Each has its own ports and its own output register.

- When `*_in_valid` is high at a rising edge of `clk`, the result for that
  cycle's inputs is loaded. `*_out_valid` is then high for one cycle.
- Latency is one clock cycle, and a new transform can start on every cycle.
- While `*_in_valid` is low, the outputs hold the last result.
- `rst_n` is synchronous and active low. It clears only the valid flags.
- The clock period must cover the full combinational path of the FFT.

Parameters:

| parameter | default | meaning |
|---|---|---|
| `DW` | 16 | FFT input width; outputs are `DW+5` bits |
| `AN` | 4 | array multiplier: width of the multiplier |
| `AM` | 4 | array multiplier: width of the multiplicand |

Sample arrays are unpacked arrays indexed by n or k, for example
`f9_xr[0:8]` and `f16_yr[0:15]`.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

- **Multipliers.** Exhaustive at the default sizes. Random and corner operands
  at 8×6, 16×16, 17×16 and 6×9.
- **Complex multiplier.** Checked bit-exactly against the four-multiplier
  formula, with random twiddles and full-scale corners.
- **Butterflies.** Checked bit-exactly against an integer model for several
  twiddle exponents and without rotation. The radix-3 butterfly is also
  checked against a floating-point 3-point DFT.
- **FFTs.** Checked against a direct double-precision DFT (`tb/tb_dft_pkg.sv`)
  with these inputs:
  - impulses;
  - constants;
  - one tone per frequency bin;
  - full-scale corners;
  - 2000 random vectors.
- **`fft_top_tb`.** Runs the whole design at its default parameters for 3000
  cycles with random valid patterns. It checks:
  - every result;
  - the one-cycle latency;
  - that outputs hold through idle cycles;
  - that the valid flags clear at a reset in the middle of the run.

  It fails if back-to-back transforms, idle holds or the reset never
  happened.

To run a testbench with Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/fft_pkg.sv tb/tb_dft_pkg.sv tb/fft9_r3_tb.sv --top-module fft9_r3_tb
    ./obj_dir/Vfft9_r3_tb

Replace the name to run another testbench. `fft_top_tb` takes a few minutes
to compile and seconds to run.

## Departures and choices

- **Word widths, rounding, output growth, registers and handshake** are this
  design's own choices. The paper specifies none of them.
- **Radix-3 butterfly internals.** The paper defines this butterfly only as a
  3-point DFT with twiddles. The t/d factoring and the √3/2 multipliers are
  the choices made here.
- **16-point FFT.** The paper gives no flow graph for it. It is built from the
  x(4n+i) decomposition and the radix-4 butterfly.
- **8-point output order.** The paper's drawing of the 8-point graph shows the
  outputs in the same order as the bit-reversed inputs. This RTL wires the
  standard DIT graph, and its output ports are in natural order.
- **Multiplier reduction.** The signed multiplier's tree is generated for any
  size. It does not reproduce the adder-by-adder placement of the reference's
  5 × 5 tree.
- **Twiddle table.** Twiddles are computed when the design elaborates, so
  there is no stored table.
- **Not built:**
  - an inverse-FFT mode (conjugate twiddles and 1/N scaling);
  - the decimation-in-frequency variants, which are only a basis for
    comparison;
  - FFT sizes beyond 16, including the pipelined 64-point "modified R2MDC"
    FFT that the paper's conclusion names but never describes.

  The units do not support the variable-length FFTs used by OFDM standards,
  where N runs from 256 to 8192.
- **No FPGA synthesis.** The reference reports 144 slices, 288 LUTs and
  15.1 ns for the 9-point DIT design, and 320 slices, 640 LUTs and 18.5 ns for
  the 16-point one, on a Xilinx FPGA. This RTL has not been synthesised for
  that target, so those figures cannot be compared with it.

## Files

| file | content |
|---|---|
| `rtl/fft_pkg.sv` | twiddle format and constant twiddle functions |
| `rtl/array_mult.sv` | unsigned array multiplier |
| `rtl/signed_mult.sv` | Baugh-Wooley signed multiplier |
| `rtl/complex_mult.sv` | three-multiplier complex multiplier |
| `rtl/twiddle_rot.sv` | rotation by a constant twiddle |
| `rtl/bfly_r2.sv`, `bfly_r3.sv`, `bfly_r4.sv` | DIT butterflies |
| `rtl/fft8_r2.sv`, `fft9_r3.sv`, `fft16_r4.sv` | the three FFTs |
| `rtl/fft_top.sv` | top level with output registers |
| `tb/*_tb.sv` | one testbench per block |
| `tb/tb_dft_pkg.sv` | reference DFT and fixed-point rotation model |
