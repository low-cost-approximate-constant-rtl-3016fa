# Hybrid binary-unary constant multipliers, and a 2-D DCT and an FFT built from them

Multiplying by a constant is a monotonic function with a fixed slope. In a
*unary* (thermometer) code, where the value P is carried by P wires set to 1,
such a function needs no logic at all: every output wire is simply a copy of
the input wire at which the function first reaches that output level. The cost
moves into converting to and from unary, and that cost grows with 2^bits.

The *hybrid binary-unary* (HBU) multiplier keeps the cost small by converting
only the low M bits of the operand to unary. All 2^(N-M) sub-ranges of the
operand share one small unary "base function", and the high N-M bits choose a
binary bias to add to it:

```
            x[M-1:0]  +-----------+   2^M-1  +------------+   L   +-------------+
   x ---+------------>| thermo-   |--------->| unary core |------>| mux-based   |--+
        |             | meter enc |  wires   | (wires     | wires | decoder     |  |
        |             +-----------+          |  only)     |       +-------------+  |   +-----+
        |                                    +------------+                       +-->|  +  |--> y
        |  x[N-1:M]   +------------------------------+                                |     |
        +------------>| bias mux  b_r = q(C*r*2^M)   |------------------------------->|     |
                      +------------------------------+                                +-----+
```

This repository holds that multiplier in its variants and two DSP engines
built from it: a fully parallel 2-D DCT (8x8 blocks by default, one block per
clock) and a
pipelined-parallel radix-2 decimation-in-time FFT (one 128-point frame per
clock). Everything is parameterised SystemVerilog. All constants, routing
networks and bias tables are computed at elaboration time from the parameters,
so no data files are needed.

## The multiplier in detail

### Base function, bias and where the error comes from

Take a truncated N-bit multiplier, y = q(C*x / 2^N), where q is floor or
round-half-up. Write x = r*2^M + l, with l the low M bits. The hardware
computes

    g(x) = q(C*l / 2^N) + q(C*r*2^M / 2^N)
           '--- f_base(l) --' '---- b_r -----'

- `f_base` is the same for every sub-range, so one unary core serves all of
  them.
- `b_r` is the exact result at the start of sub-range r, kept in a small
  constant table.

When the quantiser is exact (no shift), g(x) = C*x exactly. When the result is
truncated, the two quantisation steps do not always line up, and g(x) can be
one unit above or below q(C*x). This is the method's approximation: a form of
aliasing between the sub-ranges and the output steps.

Here is a small example: a 5-bit multiplier with C = 9 (9/32), rounding, and
M = 4. At x = 16 the bias is q(9*16/32) = 5. So g(16..19) = 5, 5, 6, 6, while
the correct values are 5, 5, 5, 5. The `hbu_ccm` testbench checks this case.

With the default multiplier (C = 167, that is 0.6523, N = 8, M = 5), 65 of the
256 operands are one unit off. None is off by more.

### The four stages

| stage | module | what it is |
|---|---|---|
| thermometer encoder | `therm_enc` | 2^M-1 comparators `x > i` on the low M bits |
| unary core | `unary_core` | wires only. Output wire j = input wire `x_j - 1`, where x_j is the smallest x with f_base(x) > j. A slope below 1 leaves input wires unused. A slope above 1 gives one input wire several copies. |
| mux-based decoder | `mux_decoder` | thermometer to binary by binary search. Output bit k is the thermometer wire chosen by the bits above it plus 2^k, so each output bit is one multiplexer. |
| bias and adder | `bias_adder` | a multiplexer over 2^(N-M) constants, then an adder |

`hbu_ccm_path` chains the last three stages behind one encoder, so several
paths can share an encoder. `hbu_ccm` is the complete truncated multiplier,
with a register on the operand and a register on the result (latency 2).

The core has L = f_base(2^M-1) output wires, and the decoder has
clog2(L+1) bits. For the default multiplier, L = 20 and the decoder is 5 bits.

### Variants

- **`hbu_ccm_nt`: exact N x N -> 2N multiplier.** An exact core for a large
  constant would have C*(2^M-1) wires. Instead, the constant is split at bit
  MS (default N/2) into C1 and C0. Two exact paths share one encoder, and the
  result is `(C1*x << MS) + C0*x`. The result has no error.
- **`hbu_ccm_opt`: optimised multiplier.** The constant is written as
  `A0*CS0 + A1*CS1 + A2*CS2`, with each A in {-1, 0, +1}. The terms are
  truncated paths on one shared encoder, and the sum is clamped to
  0..2^N-1. Each term can be one unit off, so the sum can be two units off:
  for the default 68 = 26 + 42, six operands are off by two. Choosing the
  sub-coefficients is a cost search done before synthesis. It is not part of
  this RTL: the sub-coefficients are parameters.
- **`hbu_ccm16`: 16-bit truncated multiplier built from 8-bit ones.** With
  C = cH*256 + cL and x = xH*256 + xL:
  `C*x/2^16 = cH*xH + (cL*xH + cH*xL)/256 + cL*xL/2^16`.
  The first term is an exact `hbu_ccm_nt`. The middle two are rounded 8-bit
  `hbu_ccm`s. The last term is dropped. Against the exact rounded product, the
  error seen in simulation is at most 2 units.
- **`sm_ccm`: signed operands in sign-magnitude form.** The magnitude goes
  through `hbu_ccm` (W = 8) or `hbu_ccm16` (W = 16). The sign travels
  alongside in a 2-stage delay line. The DCT uses a floored magnitude. The FFT
  uses a rounded one.

## 2-D DCT engine (`dct2d`)

The DCT uses the direct 2-D form, not row-column:
F(u,v) = sum over x,y of T(u,v,x,y) * f(x,y).

- `dct_subkernel` computes one output coefficient. For a BxB block it has
  B*B `sm_ccm`s (one per input sample; zero basis values get none) and a
  B*B-input `adder_tree` with one register per level.
- `dct2d` instantiates B*B sub-kernels, one per (u,v). For the default
  B = 8 that is 64 x 64 = 4096 multipliers, and a whole block is accepted
  every cycle.

The block size B is a parameter. The values below are for B = 8. In general,
the basis constants are scaled by 128*B, the output is about (B/2)*F(u,v),
and the latency is 2 + log2(B*B).

| item | value |
|---|---|
| input | signed 8-bit samples (pixels minus 128), index 8*x+y |
| basis constants | T*1024, rounded, as 8-bit magnitude + sign (largest 246) |
| output | 14-bit signed, about 4*F(u,v), index 8*u+v |
| latency | 8 cycles: 2 in the multiplier, 6 in the adder tree |
| throughput | one 8x8 block per cycle |

The largest output is 64 * floor(246*128/256) = 7872, which fits in 14 bits.
On random blocks, the mean difference from the exact 4*F(1,2) is about 6
units, out of a range of +-7872.

## FFT engine (`fft_dit`)

All NPT complex 16-bit points enter in one cycle.

- The inputs are wired in bit-reversed order into log2(NPT) stages of NPT/2
  `fft_butterfly`s.
- Stage s pairs points 2^s apart. Its twiddles are W_NPT^(j*NPT/2^(s+1)),
  for j = 0..2^s-1.
- Each butterfly has a fixed twiddle and computes `(a + W*b)/2` and
  `(a - W*b)/2`, rounded half-up and saturated to 16 bits.
- The product W*b uses four 16-bit `sm_ccm`s. The twiddle parts are 16-bit
  magnitudes scaled by 65536.
- The twiddles 1 and -j need no multiplier, so those butterflies are plain
  wiring and negation.

The output is DFT(x)/NPT in natural order.

| item | value |
|---|---|
| butterfly latency | 4 cycles: operand register, product register, complex-sum register, output register |
| FFT latency | 4*log2(NPT) cycles (28 for 128 points) |
| throughput | one frame per cycle |
| multipliers at 128 points | 258 butterflies with multipliers, that is 1032 16-bit multipliers |

Inputs within +-8192 never saturate. In simulation, the accuracy against the
real-valued DFT/NPT, on random inputs within +-8192, has a signal-to-noise
ratio of about 69 dB at 8 points, 63-65 dB at 16 points and 61 dB at 32
points. It falls by about 2-3 dB per doubling, as each extra stage adds one
more rounding of the halved result. Every bin is within 6 units of the exact
value at all three sizes.

## Top level (`hbu_dsp_top`)

The top holds three independent parts side by side, with a shared `clk` and
`rst_n`:

- the DCT engine;
- the FFT engine (128 points by default);
- one stand-alone optimised 8-bit multiplier lane (68/256 = 26/256 + 42/256).

`rst_n` is active low and asynchronous. It clears only the valid pipelines.
The data registers have no reset, because every output is qualified by its
valid bit (the multiplier lane has no valid bit: its result is simply two
cycles behind its operand).

## Where this RTL departs from the published design, and what is its own

- **Fixed encoder width M = 5 everywhere.** The original flow searches the
  encoder width per coefficient, keeping the cheapest result after FPGA
  synthesis.
- **Plain single-constant multipliers in the DCT and FFT.** The published
  engines use cost-optimised multipliers whose sub-coefficient sets are not
  published. `hbu_ccm_opt` implements that structure, with its set as
  parameters.
- **No shared encoders inside `hbu_ccm16`.** Each of its three 8-bit
  sub-multipliers keeps its own encoder.
- **Sign-magnitude instead of inverters.** Negative constants use
  sign-magnitude, not a core with inverters on its output.
- **The design's own choices.** These were not specified and are this RTL's
  decisions:
  - the DCT basis scaling (x1024), the input format and the output width;
  - the FFT per-stage 1/2 scaling, rounding and saturation, and the wiring of
    the trivial twiddles;
  - the bias rule b_r = q(C*r*2^M);
  - the binary-search decoder structure;
  - the register placement that gives the 2-cycle multiplier, 8-cycle DCT
    and 4-cycle butterfly;
  - the reset and valid scheme.
- **Not hardware, not built.** The coefficient search (cost optimiser) and
  the rest of a JPEG encoder (quantisation, entropy coding) are not included.

## Files

`rtl/`:

| file | content |
|---|---|
| `hbu_pkg.sv` | the quantiser `qmul`, core length and routing functions, DCT basis, DCT output width and twiddle functions |
| `therm_enc.sv`, `unary_core.sv`, `mux_decoder.sv`, `bias_adder.sv`, `hbu_ccm_path.sv` | multiplier stages |
| `hbu_ccm.sv`, `hbu_ccm_nt.sv`, `hbu_ccm_opt.sv`, `hbu_ccm16.sv`, `sm_ccm.sv` | multipliers |
| `adder_tree.sv`, `dct_subkernel.sv`, `dct2d.sv` | DCT |
| `fft_butterfly.sv`, `fft_dit.sv` | FFT |
| `hbu_dsp_top.sv` | top |

`tb/`: one self-checking testbench per module (`<module>_tb.sv`), plus:

- `tb_ref_pkg.sv`: independent reference models;
- `fft_check.sv`: a per-size FFT harness used by `fft_dit_tb`.

Every testbench prints `TB_RESULT checks=N failures=F` and stops itself.
`hbu_dsp_top_tb` runs the whole top with 4x4 DCT blocks and a 16-point FFT.
It counts each mechanism and fails if one never happened: DCT blocks and
back-to-back blocks, FFT frames and back-to-back frames, and multiplier results
including aliasing errors.

### What has been simulated, and at what size

The top was never simulated at its default sizes (8x8 DCT, 128-point FFT). Its
Verilator build is several hundred megabytes of generated C++, too large to
build in reasonable time. The largest sizes simulated are:

| part | largest size simulated | testbench |
|---|---|---|
| whole top | 4x4 DCT blocks + 16-point FFT + multiplier lane | `hbu_dsp_top_tb` |
| DCT engine | 4x4 blocks (16 sub-kernels of 16 multipliers) | `dct2d_tb` |
| DCT sub-kernel | 8x8, default size (64 multipliers) | `dct_subkernel_tb` |
| FFT engine | 32 points (80 butterflies) | `fft_dit_tb` |
| butterfly | 128-point twiddles, default size | `fft_butterfly_tb` |
| multipliers | default sizes, all operands | one testbench each |

The default-size engines are the same generate loops at a larger count. Their
constants come from the same package functions that the smaller runs exercise.

## Simulating

Verilator 5:

```
verilator --binary --timing --assert rtl/hbu_pkg.sv tb/tb_ref_pkg.sv tb/hbu_ccm_tb.sv \
          -y rtl -y tb --top-module hbu_ccm_tb
./obj_dir/Vhbu_ccm_tb
```

Replace `hbu_ccm_tb` with any testbench name.

- The small blocks build in seconds.
- `dct2d_tb`, `fft_dit_tb` and `hbu_dsp_top_tb` instantiate hundreds of
  multipliers, so their C++ build takes a minute or more. Add `-j 4` (or more)
  to build in parallel.
- For a lint of the full top, run
  `verilator --lint-only -Wall rtl/hbu_pkg.sv rtl/hbu_dsp_top.sv -y rtl`.
  It takes about a minute and a half.

## Changing it

- **A different constant.** Set `C` (8-bit) or `CMAG`/`NEG` (signed). The
  routing and the bias table follow automatically.
- **The sub-range size.** Set `M`. 3 <= M <= N-1 is the useful range. Smaller
  M gives a smaller encoder and core but a larger bias table.
- **Another FFT size.** Set `FFT_NPT` (any power of two >= 4). Its latency is
  4*log2(FFT_NPT).
- **Another DCT block size.** Set `DCT_B` (a power of two). The output width
  `dct_out_w(B)` and the latency 2 + log2(B*B) follow.
- **Another word width.** `hbu_ccm` and `hbu_ccm_nt` take any N. The DCT is
  fixed at 8-bit samples and the FFT at 16 bits.
