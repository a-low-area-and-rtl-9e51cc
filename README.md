# 512-point radix-2^4-2^3 SDF FFT with ROM-free twiddle multipliers

This is a streaming 512-point FFT for OFDM baseband processing. It takes one
complex sample per clock and returns one frequency bin per clock, with no
gaps between frames. Two ideas keep it small:

* **Radix-2^4-2^3 ordering.** The nine radix-2 butterfly stages are grouped as
  a 16-point part (stages 1-4) and a 32-point part (stages 5-9). The 32-point
  part splits again as 8 x 4. Most of the twiddle factors then become the
  trivial -j. Only four general multipliers remain, and three of them use
  tiny constant sets: W16 (7 distinct factors), W8 (4) and W32 (16).
* **Constant multipliers instead of a ROM and general multipliers.** Each
  twiddle multiplication is a canonic-signed-digit (CSD) shift-and-add
  network. A multiplexer chooses among precomputed constant products, and
  quadrant/octant symmetry maps the result to the wanted angle. The
  512-entry W512 factor is split into a coarse and a fine rotation, so it
  needs only 9 + 8 constant pairs.

The architecture follows the article "A Low-area and Low-power 512-point
Pipelined FFT Design Using Radix-2^4-2^3 for OFDM Applications" (J. Yu,
K.-J. Cho). This RTL is an independent implementation of that description.
Where the article leaves details open, this design makes its own choices;
they are listed in the section "Design choices and departures".

## Pipeline

```
x(n) -> BFI(256) -> BFII(128) -> xW16 -> BFI(64) -> BFII(32) -> xW512
     -> BFI(16)  -> BFII(8)   -> xW8  -> BFI(4)  -> xW32     -> BFI(2) -> BFII(1) -> X(k)
```

Each butterfly stage is a single-path delay feedback (SDF) radix-2 butterfly.
Its feedback buffer holds D words (256 ... 1). A stage handles blocks of 2D
samples:

* **First D samples.** Each input goes into the buffer. What leaves the stage
  is the buffer's old contents, which are the differences of the previous
  block.
* **Second D samples.** Each input is paired with the sample D positions
  earlier. The sum leaves the stage and the difference goes into the buffer.

A **type II** stage (BFII) also multiplies some inputs by -j before the
butterfly, by swapping the real and imaginary parts and negating one. These
are the inputs whose frame position has bits log2(D) and log2(D)+1 both set.
This is how the -j entries of the radix-2^k twiddle sequence are absorbed
into the butterflies, so they cost no multiplier.

Every butterfly stage and every W32-type multiplier ends in a register. The
W512 multiplier has two registers. The total latency is 511 samples in the
buffers plus 14 registers, which gives **525 samples**.

## Scheduling: positions and twiddle exponents

This is the part to understand before changing anything.

`fft_ctrl` counts accepted input samples modulo 512 in a 9-bit counter. A
unit that sits L accepted samples behind the input holds the frame element
at position (counter - L) mod 512. The lags are set by the buffer lengths and
registers and are listed in `fft_pkg`:

| unit  | S1 | S2  | W16 | S3  | S4  | W512 | S5  | S6  | W8  | S7  | W32 | S8  | S9  | out |
|-------|----|-----|-----|-----|-----|------|-----|-----|-----|-----|-----|-----|-----|-----|
| lag   | 0  | 257 | 386 | 387 | 452 | 485  | 487 | 504 | 513 | 514 | 519 | 520 | 523 | 525 |

**Butterfly modes.** A stage with delay D reads bit log2(D) of its position
to pick its mode. A BFII stage also reads the next bit up to decide on the -j.

**Twiddle exponents.** These come from the index map n = 32*n1 + n2 and
k = k1 + 16*k2, and inside each part from the same split again. With p the
position at the multiplier input:

| multiplier | exponent                          | values used                   |
|------------|-----------------------------------|-------------------------------|
| W16        | p[6:5] * rev2(p[8:7])             | 0-4, 6, 9                     |
| W512       | p[4:0] * rev4(p[8:5])             | 0..465                        |
| W8         | p[2] * rev2(p[4:3])               | 0-3                           |
| W32        | p[1:0] * rev3(p[4:2])             | 0-10, 12, 14, 15, 18, 21      |

Here rev reverses the order of the bits. The products are formed from a few
counter bits, so no twiddle address ROM is needed. The results leave in
bit-reversed order: the bin at output position p is k = rev9(p).

## Twiddle multipliers

### W32, W16 and W8 (`csd_w32_bank`, `cmul_w32`)

Every factor W32^e can be written with the cosines c_m = cos(pi*m/16), m = 0..7.
With e = 8q + m:

    W32^e = (-j)^q * (c_m - j*c_(8-m))      (c_8 = 0)

`csd_w32_bank` multiplies one real operand by all eight c_m. It forms three
shared subexpressions and a few shifted sums (every `>>` is an arithmetic
shift):

    CSE1 = d + d>>2    CSE2 = d - d>>2    CSE3 = d - d>>4
    c0: d                          c4: CSE2 - d>>4 + CSE1>>6
    c1: d - CSE1>>6                c5: d>>1 + d>>4 - CSE3>>7
    c2: d - CSE1>>4 + d>>9         c6: CSE2>>1 + CSE3>>7
    c3: CSE2 + CSE1>>4 + CSE2>>8   c7: CSE2>>2 + CSE3>>7

These are cos(pi*m/16) rounded down to 11 fractional bits.

`cmul_w32` uses one bank for the real part a and one for the imaginary part b.
It then works in three steps:

1. Multiplexers driven by m pick a*c_m, a*s_m, b*c_m and b*s_m, where
   s_m = c_(8-m).
2. One adder and one subtractor form d*W32^m = (a*c_m + b*s_m) + j(b*c_m - a*s_m).
3. A mapping step applies (-j)^q using only swaps and negations.

The W16 and W8 instances are the same module with `STEP` = 2 and 4: W16^i is
W32^(2i) and W8^i is W32^(4i).

### W512 (`cmul_w512` = `w512_coarse` + `w512_fine` + `w512_map`)

Write the exponent as e = 128q + 64h + r. Fold it into the first eighth of the
circle: k = r when h = 0, and k = 64 - r when h = 1, so k runs from 0 to 64.
Then split k = 8*i1 + i2, with i1 = 0..8 and i2 = 0..7. The multiplier runs in
five steps:

1. **Coarse** (`w512_coarse`): multiplies the real part a and the imaginary
   part b separately by W512^(8*i1). The results are two complex partial
   products, A and B.
2. **Pipeline register.**
3. **Fine** (`w512_fine`): multiplies A and B by W512^i2.
4. **Mapping** (`w512_map`): combines the four real parts:
   - h = 0: d*W^k = (Ar - Bi) + j(Ai + Br)
   - h = 1: -j*d*conj(W^k) = (Br - Ai) + j(-Ar - Bi)

   and then multiplies by (-j)^q.
5. **Output register.**

The constants are round(cos and sin of 2*pi*k/512 * 2^12), with k = 8*i1 or
k = i2. Both the coarse and the fine stage build their products in
`csd_sel_mult`, in three steps:

1. **Shared subexpressions.** For each real operand it forms five
   subexpressions once: d+d>>2, d-d>>2, d+d>>3, d-d>>3 and d-d>>4. These
   are the CSD digit patterns 101, 10-1, 1001, 100-1 and 1000-1.
2. **Splitting the constants.** At elaboration, every constant of the table
   is written in canonic signed digits. Each is then split, from the most
   significant digit down, into at most seven signed, shifted copies of those
   subexpressions.
3. **Term slots.** Term slot s of the product is a multiplexer. Its input g is
   the fixed-wired s-th term of constant g, and the run-time index picks one
   input. The slots are summed.

A new angle therefore costs no shifter, only multiplexer selections.

## Interface and timing (`fft512_sdf`)

| port        | dir | width | meaning                                           |
|-------------|-----|-------|---------------------------------------------------|
| `clk`       | in  | 1     | clock                                             |
| `rst_n`     | in  | 1     | asynchronous reset, active low                    |
| `in_valid`  | in  | 1     | sample accepted this clock; low = whole pipe holds |
| `in_re/im`  | in  | 12    | input sample, two's complement                    |
| `out_valid` | out | 1     | a new output bin is present (one clock per accepted sample) |
| `out_index` | out | 9     | frequency index k of the output bin               |
| `out_re/im` | out | 20    | X(k)/2                                            |

* The first sample accepted after reset is sample 0 of a frame. Frames follow
  each other in the sample count; stalls may occur anywhere.
* The bin for frame position p comes out 525 accepted samples after input
  sample p. `out_valid` rises on the clock after the edge that produced it.
  To flush the last frame, feed 525 more samples (zeros or the next frame).
* Outputs leave in bit-reversed order. No reorder buffer is included.

## Word lengths and accuracy

* **Growth.** The word grows by one bit per butterfly stage: 12 bits in, 21
  bits after stage 9. The multipliers keep the width of their input.
* **Output scaling.** The output drops the least significant bit of the
  21-bit result, so it is X(k)/2 in 20 bits. A full-scale tone (amplitude 2000)
  and uniform random inputs fit with margin.
* **Overflow.** Inputs that sit near the corners of the 12-bit square with a
  phase chosen to add up coherently can wrap. There is no saturation.
* **Accuracy.** Against a double-precision DFT the error energy is about
  -63 dB of the signal energy. The largest error is about 2.5e-4 of the
  largest bin. It comes mostly from the truncated 11-bit W32 constants.
* **Storage.** The nine feedback buffers hold 511 complex words with widths
  growing from 13 to 21 bits, 14,290 bits in all.

## Design choices and departures

Taken from the article: the stage order, buffer sizes and stage types, the
trivial -j stages, and the W32 shift-add network with its three shared
subexpressions. Also the W16/W8 reuse of that network, the 1/8-symmetry
folding with the k = 8*i1 + i2 cascade and its pipeline register, the 12-bit
input and the 20-bit output.

Choices made here:

* **Butterflies.** The article only names the two butterfly types. They are
  built as the standard SDF radix-2 butterflies.
* **Controller.** The controller's exponent generation (products of counter
  bits) and the `in_valid` stall handshake are this design's own.
* **Registers and scaling.** The pipeline registers, the latency of 525, the
  per-stage bit growth and the final divide-by-two are chosen here.
* **W32 adder count.** The W32 network is built exactly from the article's
  equations. Counting one adder per + or -, those equations need 14 adders,
  while the article's text quotes 13 additions.
* **W512 constants.** These are computed by the rounding formula above. The
  CSD digit layout of each constant follows from the value.
* **Shared subexpressions in the W512 multiplier.** The coarse and fine
  multipliers use the same kind of shared subexpressions and multiplexed term
  slots as the article. However, each constant is split by a simple greedy
  rule, not by the article's hand optimisation. The fine stage may also use
  all five patterns, not two. Adder and multiplexer counts therefore differ,
  and area figures from this RTL are not comparable with the article's.
* **Mapping wiring.** The mapping blocks implement the quadrant/octant
  rules. They do not copy any particular multiplexer wiring.
* **Buffers.** The feedback buffers are circular buffers (array plus
  pointer), so the 256- and 128-word ones map onto RAM. Buffer storage is not
  reset.

## Files

| file | content |
|------|---------|
| `rtl/fft_pkg.sv` | lags, word lengths, control struct, W512 constants, CSD helpers |
| `rtl/fft512_sdf.sv` | top level |
| `rtl/fft_ctrl.sv` | sample counter, stage positions, twiddle exponents, output flags |
| `rtl/delay_buf.sv` | feedback buffer |
| `rtl/bf1.sv`, `rtl/bf2.sv` | butterfly stages type I and II |
| `rtl/csd_w32_bank.sv`, `rtl/cmul_w32.sv` | W32/W16/W8 multiplier |
| `rtl/csd_sel_mult.sv` | index-selected CSD constant multiplier with shared subexpressions |
| `rtl/w512_coarse.sv`, `rtl/w512_fine.sv`, `rtl/w512_map.sv`, `rtl/cmul_w512.sv` | cascade W512 multiplier |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
from the repository root:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv rtl/fft_pkg.sv \
          tb/tb_fft512_sdf.sv --top-module tb_fft512_sdf
./obj_dir/Vtb_fft512_sdf
```

`tb_fft512_sdf` runs the full design at its default size:

* **Frames.** Four back-to-back frames (random, a single tone, two tones,
  random), with random stalls.
* **Per-bin check.** Each bin is compared against a floating-point DFT.
* **Frame checks.** It also checks the SNR of each frame, the output order,
  `out_index` and the 525-sample latency.
* **Mechanism counts.** It counts that every mechanism occurred: stalls, both
  butterfly modes, the -j swap, non-trivial W16/W8/W32 factors and all eight
  W512 octants.

`tb_fft512_ofdm` is an OFDM receive workload. It builds three 512-carrier
symbols with 16-QAM on 400 active carriers, using an inverse DFT in floating
point quantised to 12 bits. It demodulates them through the FFT and
requires:

* no symbol errors;
* an error vector magnitude below -45 dB (about -55 dB is reached);
* empty bins that stay near zero.

The module testbenches check:

* **Arithmetic units.** Each multiplier is checked against floating-point
  rotation.
* **Butterflies.** The butterflies are checked against the radix-2 rule over
  the whole input history.
* **Controller.** The controller is checked against independently written
  index formulas.
