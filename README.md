# A DCT systolic array built on a modified DFT

This is synthesizable SystemVerilog for a linear systolic array that computes
an N-point discrete cosine transform (DCT) of a continuous stream of real
samples, one sample in and one coefficient out per clock. The default size is
the 4-point, 12-bit design of the original 1989 proposal.

The main idea is to avoid a DCT-specific fast algorithm. Instead the array
evaluates a slightly modified DFT (MDFT) with Goertzel's recursion: every
processing element (PE) owns one output bin and one fixed twiddle factor. A
single multiplier at the end of the array then turns each MDFT bin into a DCT
coefficient. All twiddles are constants, so each constant multiplication inside
the array is a lookup in a *stored-product ROM*. The ROM holds the product of
the coefficient with every possible operand, so the coefficient itself is
never quantised.

## From DCT to a recursion per PE

The DCT used here is

    Y(k) = C(k) * sum_{n=0}^{N-1} x(n) cos((2n+1) k pi / 2N),   C(0) = 1/sqrt(2), C(k>0) = 1

Define the MDFT with the twiddle `U = exp(+j pi/N)`. It is a DFT on a circle of
2N points, so `U^N = -1`:

    Z(k) = sum_n x(n) U^(nk)

Then `Y(k) = C(k) * Re{ exp(j k pi/2N) * Z(k) }`. The DCT therefore needs one
N-point MDFT, one complex weight per bin, and the real part.

A stream arrives in the order x(0) first and x(N-1) last. For that order,
PE k runs the first-order recursion

    y <- U^-k * (y + x(n))          (y cleared at x(0))

After the N-th sample this leaves

    y = sum_n x(n) U^(-(N-n)k) = U^(-Nk) Z(k) = (-1)^k Z(k)

The stray sign `(-1)^k` is not removed in the array. It is folded into the
output weights, which become `a_k = (-1)^k C(k) cos(k pi/2N)` and
`b_k = (-1)^k C(k) sin(k pi/2N)`. Then

    Y(k) = a_k * Re{y_k} - b_k * Im{y_k}

## The array and its timing

```
 x(n) ──► PE0 ──► PE1 ──► PE2 ──► PE3          (samples move right, 1 PE per clock)
          U^-0    U^-1    U^-2    U^-3
          [Z0] ◄─ [Z1] ◄─ [Z2] ◄─ [Z3] ◄─ 0     (pump chain, results move left)
           │
           ▼
       multiplier ──► Y(k)
```

Each sample reaches PE k k clocks after it reaches PE 0. The array therefore
works on a skewed wavefront: PE k processes x(n) at clock n+k. Here is one
sequence when the input has no gaps (N = 4; clocks count from the edge that
takes x(0)):

| clock | PE0  | PE1  | PE2  | PE3  | left end of pump chain |
|-------|------|------|------|------|------------------------|
| 1     | x(0) |      |      |      |                        |
| 2     | x(1) | x(0) |      |      |                        |
| 3     | x(2) | x(1) | x(0) |      |                        |
| 4     | x(3)*| x(2) | x(1) | x(0) |                        |
| 5     | x'(0)| x(3)*| x(2) | x(1) |                        |
| 6     | x'(1)| x'(0)| x(3)*| x(2) |                        |
| 7     | x'(2)| x'(1)| x'(0)| x(3)*|                        |
| 8     | x'(3)| x'(2)| x'(1)| x'(0)| pump → Z(0)            |
| 9     | …    |      |      |      | Z(1)                   |
| 10    |      |      |      |      | Z(2)                   |
| 11    |      |      |      |      | Z(3)                   |
| 12    |      |      |      |      | pump → Z'(0)           |

`*` marks the clock at which a PE takes the last sample of the sequence. On the
same clock the PE copies its finished sum into its result latch and starts on
the next sequence (x'), so no clock is lost between sequences.

The pump chain is the hardest part to follow. A PE's accumulator holds a
finished result for only one clock, so each PE has a result latch (Latch#3).
The latch keeps the value until every PE of the sequence is done. Each PE also
has one stage of a left-shifting chain: a multiplexer with a storage register.

- One clock after PE N-1 has taken the last sample, the *pump* signal (RPX) is
  high.
- On that clock edge every chain stage loads its own PE's result latch, in
  parallel.
- On the following edges the chain shifts one stage to the left per clock, and
  the rightmost stage fills with zero.

The results therefore leave in the order k = 0, 1, …, N-1 on consecutive
clocks. The timing works as follows:

- **Latency.** The first result is at the left end 2N-1 clocks after x(0) was
  taken in.
- **Throughput.** A full set of results follows every N clocks.
- **No overwrite.** PE 0 overwrites its result latch with the next sequence on
  the same edge as the pump. Registers take their old value on that edge, so
  the pump still captures the earlier result.
- **Pump spacing.** An assertion in `mdft_array` checks that a pump never
  comes while the previous results are still leaving the chain.

The multiplier is combinational. Y(k) appears in the same clock as its MDFT
bin, so the whole DCT also has a latency of 2N-1 clocks.

Sequence boundaries travel with the data. The framing counter
(`dct_frame_ctrl`) attaches a token `{valid, first, last}` to every sample, and
the token moves through the PEs with the sample:

- `first` clears the PE's accumulator. This is the chip's E input.
- `last` makes the PE capture its result. This is the chip's clk2 strobe.
- `last` leaving PE N-1 is the pump.

Because of this, the input may pause (`x_valid` low) between sequences or in
the middle of one. A paused cycle simply carries an empty token through the
array. Sequences still come out whole and in order, and the results of one
sequence always leave on N consecutive clocks.

## Inside a processing element

A complex PE is made of two identical one-part circuits (`mdft_pe_chip`), one
for the real part and one for the imaginary part. Each part has a single clock
path made of one flip-flop, two adders and one ROM access:

```
 x_in ─┬──────────────────────────────► Latch#1 ──► x_out (next cell)
       ▼
   adder1: w = x_in + (first ? 0 : y)
       ├──► PROM cos: c*w ──► adder2: c*w + cross_in ──┬─► Latch#2 (y, fed back)
       └──► PROM sin: ∓s*w ──► cross_out (other part)  └─► Latch#3 (result, on last)
                                     Latch#3 ──► mux with storage ◄── adjacent cell
                                                    └──► z_out (toward multiplier)
```

The twiddle factor is `U^-k = c - j s` with `c = cos(k pi/N)` and
`s = sin(k pi/N)`. The two parts exchange one product per clock:

- Real part: `y_re <- c*w_re + s*w_im`. It sends `-s*w_re` to the imaginary
  part.
- Imaginary part: `y_im <- c*w_im - s*w_re`. It sends `+s*w_im` to the real
  part.

The two circuits are therefore the same except for the sign stored in their
sine ROM (`IS_IM`). The input is real, so the imaginary part's sample input is
zero. The cross connection carries no combinational loop, because each part's
`cross_out` depends only on its own `w`.

The stored-product ROM (`sp_rom`) has 2^W words, addressed by the W-bit
operand. Each word is `round(COEF * a)`, rounded to nearest with ties away from
zero and saturated to W bits. The contents are computed at elaboration from
the real coefficient, so no table file is needed. At the default size each
ROM has 4096 words of 12 bits. PE 0 (twiddle 1) has sine ROMs of all zeros,
which synthesis removes.

## Number format and accuracy

All data are W-bit two's-complement integers (W = 12 by default). No scaling
is applied between steps, and the adders wrap. The N-sample sums stay in range
only if the inputs obey

    |x| <= 2^(W-1) / (N+1)        (408 for N = 4, W = 12)

Every step adds at most one LSB of rounding error per part, and the twiddles
have unit magnitude. The array output is therefore within about N+1 LSB of
the exact value.

The post-multiplier's weights are CW-bit numbers with CW-2 fraction bits
(CW = 12). The products are rounded to nearest and saturated to W bits.

The classical fixed-point analysis of this kind of recursive DFT predicts an
output signal-to-noise ratio of `2^(2B+1)/(N+1)^2`, with B the fraction bits
(W-1). Measured with uniformly random inputs over the allowed range:

| N | predicted | measured |
|---|-----------|----------|
| 4 | 55.3 dB   | 55.9 dB  |
| 8 | 50.2 dB   | 48.7 dB  |

End to end, the DCT outputs of the default design stay within 2.5 LSB of the
exact transform over the test vectors.

## Top-level interface (`dct_systolic_top`)

| port      | dir | width      | meaning                                                 |
|-----------|-----|------------|---------------------------------------------------------|
| `clk`     | in  | 1          | clock; all registers on the rising edge                 |
| `rst_n`   | in  | 1          | synchronous, active low; clears all state and restarts the sample count |
| `x_valid` | in  | 1          | `x` holds a sample                                      |
| `x`       | in  | W          | sample, signed                                          |
| `y_valid` | out | 1          | `y` holds a DCT coefficient                             |
| `y_index` | out | clog2(N)   | its index k                                             |
| `y`       | out | W          | Y(k), signed                                            |
| `z_re`, `z_im` | out | W     | the array output (-1)^k Z(k) belonging to `y`           |

Parameters: `N` (transform size, default 4), `W` (data width, default 12),
and `CW` (output-weight width, default 12).

A sequence is any N consecutive valid samples counted from reset. The design
has no back-pressure: the output stream must be accepted when it comes.

## Files

| file | contents |
|------|----------|
| `rtl/dct_pkg.sv` | token type, default sizes, twiddle and output-weight functions |
| `rtl/sp_rom.sv` | stored-product ROM |
| `rtl/zout_stage.sv` | one stage of the pump chain (multiplexer with storage) |
| `rtl/mdft_pe_chip.sv` | one part (real or imaginary) of a PE |
| `rtl/mdft_pe.sv` | complex PE: two cross-coupled parts |
| `rtl/mdft_array.sv` | N PEs, pump generation, output index |
| `rtl/dct_frame_ctrl.sv` | sample counter producing the first/last tokens |
| `rtl/dct_post_mult.sv` | output multiplier, real part only |
| `rtl/dct_systolic_top.sv` | the complete DCT |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/tb_dct_snr.sv`, `tb/dct_snr_run.sv` | SNR measurement at N = 4 and N = 8 |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
with a watchdog. The reference values are worked out independently in real
arithmetic. The end-to-end test `tb_dct_systolic_top` runs the top at its
default parameters. It also checks the following:

- the 2N-1 clock latency;
- one sequence every N clocks;
- that back-to-back sequences, overlapping pumps, gaps inside and between
  sequences and sign-folded odd-k outputs all occur.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/dct_pkg.sv \
          tb/tb_dct_systolic_top.sv --top-module tb_dct_systolic_top -Mdir obj
./obj/Vtb_dct_systolic_top
```

Swap in any other `tb_*.sv` file and its module name to run another test.
`dct_pkg.sv` must be given first because the other files import it.

## Changing it

- **Transform size.** Set `N` on `dct_systolic_top`. All twiddles and weights
  follow from N. Keep the input range rule above. `tb_dct_snr` exercises
  N = 8.
- **Width.** `W` sets the data width and the ROM depth (2^W words per ROM,
  four ROMs per PE). A wider datapath grows the ROMs exponentially; past about
  14 bits, a real constant multiplier in `sp_rom` is the practical choice.
- **Other transforms.** The array computes any transform of the form
  `sum_n x(n) V_k^n` with one constant V_k per PE. A different transform of
  that family needs other values from the twiddle functions in `dct_pkg` and
  other output weights. The coefficients are fixed when the design is
  elaborated, not loadable at run time.

## What this RTL adds or leaves out

These choices belong to this implementation; the original proposal does not
specify them:

- the token that carries the clear/capture controls with the data;
- the pump timing;
- the `x_valid` pause behaviour;
- reset;
- the output index and valid signals;
- rounding and saturation rules;
- the width of the output weights;
- the input range rule.

The proposal builds its PE as a standard-cell chip in 3 µm CMOS. That chip has
look-ahead-carry adders, 92 I/O pads and a single-cycle path of about 96 ns
(about 10.4 MHz). Here the adders are plain `+` operators, left to synthesis,
and pads, layout and clock rate are outside the RTL. The original also
mentions extending the array to a two-dimensional DCT, but gives no
description of that, so it is not included.
