# 2048-point streaming FFT/IFFT for Mobile WiMAX (radix-2 SDF pipeline)

Mobile WiMAX (IEEE 802.16e) is an OFDMA system. Its modem needs an FFT and an
IFFT of up to 2048 points, with smaller sizes for narrower channels. This core
does that transform on a continuous stream. It takes one complex sample per
clock and gives one back per clock. The transform can be forward or inverse,
with a length of 128, 256, 512, 1024 or 2048 points, chosen at run time.

The core is a pipeline of radix-2 *single-delay-feedback* (R2SDF) stages,
using decimation in frequency. 2048 = 2^11, so there are 11 identical stages.
Each stage has one butterfly and one feedback FIFO. The FIFO holds 1024 words
in the first stage, 512 in the second, and so on down to 1 word in the last.
Each stage also has its own twiddle ROM with its own address counter, and a
complex multiplier. Giving every stage its own small ROM costs area but keeps
all the stages independent of each other.

## How one stage works

A stage whose FIFO holds `L` words works on blocks of `2L` samples. The
counter in its address generator (AGU) tracks the position inside the block.
The counter's top bit splits each block into two phases:

```
            in ──┬──────────────┐
                 │              ▼
                 │   ┌────── butterfly ──────┐
                 │   │  a = FIFO word        │ sum  (a+b)/2 ──┐
                 │   │  b = input word       │ diff (a-b)/2 ─┐│
                 │   └───────────────────────┘               ││
                 ▼                                            ││
 FIFO in = phase ? diff : in            ┌───── L-word FIFO ◄─┘│
                                        │                     │
 FIFO out ───────────► complex mult ◄── twiddle ROM[k] ◄── AGU│
                            │                                 │
 result = phase ? sum : product ◄─────────────────────────────┘
                            │
                          REG ──► next stage
```

* **Phase 0** covers samples `0 .. L-1` of a block. Each input word goes into
  the FIFO. The word that comes out of the FIFO is a butterfly difference
  stored during the previous block. It is multiplied by `W_2L^k`, where `k` is
  the AGU address, and sent on.
* **Phase 1** covers samples `L .. 2L-1`. The butterfly takes `x[k]` from the
  FIFO and `x[k+L]` from the input. The sum goes on at once, with no
  multiplication. The difference goes back into the FIFO, where it waits for
  the next phase 0.

So each stage sends out first the `L` sums of a block, then its `L`
twiddled differences. That is one column of the radix-2 DIF flow graph, in
the order the next stage needs. Compared with the textbook SDF stage, the
roles are swapped: here the sums go straight through and the differences are
stored. The effect is the same, and every stage keeps a single feedback path.

A stage's first block only fills its FIFO. Outputs start after `L` accepted
samples, and this is the start-up time: `len/2` samples for the first stage.
A `primed` flag holds back the phase-0 outputs until one whole block has
gone through. Until then, what comes out of the FIFO is just the memory's
power-up contents.

The stage moves only when `in_valid` is high. A cycle without input changes
nothing except `out_valid`, so gaps in the input stall the whole pipeline
without losing data.

## The pipeline, run-time length and output order

`fft2048` chains the 11 stages behind an input register. For a length
`2^m < 2048`, only the last `m` stages are used. The first `11 - m` stages
are bypassed: they copy their input through their result register. This works
because a stage's twiddle table depends only on its own FIFO length. It does
not depend on the transform length.

The output comes out in bit-reversed order, which is normal for decimation in
frequency. Output number `m` of a block is bin `bitrev_len(m)`. For 8 points
the order is X0, X4, X2, X6, X1, X5, X3, X7. There is no reorder buffer. The
`out_index` port gives the bin number of each output word, so a downstream
block can store the words directly by index.

## Number format and scaling

* Samples are complex, with 16-bit two's-complement real and imaginary parts.
  One datapath word and one FIFO word is therefore 32 bits. The type is
  `fft_pkg::cplx_t`, with the real part in the upper half.
* Twiddles are 16 bits in Q2.14 format, so 1.0 is 16384. This format holds
  `W^0 = 1` exactly, so the trivial twiddles, and the whole last stage, pass
  data through unchanged.
* Every butterfly halves its sum and its difference, rounding down. After
  log2(len) stages the forward output is `DFT(x)/len`. The inverse output is
  `(1/len)·Σ X[k]·e^{+j2πnk/len}`. This fixed scaling means nothing inside can
  overflow, but small inputs lose relative precision.
* The complex multiplier rounds to nearest: it adds 2^13, then shifts right
  by 14. It saturates to 16 bits, because one part of `x·W` can reach √2 ×
  full scale even though `|W| ≤ 1`. Inputs kept below half scale (|part| <
  2^14) never saturate.
* The testbench feeds random inputs below half scale, and tones of amplitude
  30000, at every length. Each output part stays within 5 LSB of a
  double-precision DFT/len; the largest error seen was 3.3 LSB.

## Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `cfg_load` | in | 1 | take `cfg_inverse` and `cfg_len_log2`, and flush the pipeline |
| `cfg_inverse` | in | 1 | 0 = FFT, 1 = IFFT (conjugated twiddles) |
| `cfg_len_log2` | in | 4 | log2 of the length, 7..11; other values are clamped, and an assertion warns |
| `in_valid`, `in_data` | in | 1, 32 | input sample, natural order |
| `out_valid`, `out_data` | out | 1, 32 | output sample, bit-reversed order |
| `out_index` | out | 11 | bin (or, for the IFFT, time index) of `out_data` |
| `len_log2`, `inverse` | out | 4, 1 | the configuration in use |

After reset the core runs a forward 2048-point FFT. A pulse on `cfg_load`
changes the mode or length. It clears every stage's counter, FIFO pointer
and `primed` flag, and restarts the output count. Data already inside the
pipeline is dropped.

**Timing.** When data is streamed every clock, the first output of a block
comes `len + 11` clocks after its first input was presented. That is 2059
clocks at 2048 points. The delay is made of `len - 1` clocks of FIFO delay,
one input register, and one result register in each of the 11 stages. After
that the core gives one sample per clock: one 2048-point block every 2048
clocks, which is 51.2 µs at 40 MHz. Each block leaves while the next one is
fed in. To push out the last block, feed another `len` samples, for example
zeros. After `T` inputs the core has given `T - len + 1` outputs.

## Modules

| file | what it is |
|---|---|
| `rtl/fft_pkg.sv` | widths, `cplx_t` and `cplx_tw_t` |
| `rtl/bf2.sv` | two-point butterfly with halving |
| `rtl/sdf_fifo.sv` | feedback delay line, built as a circular buffer: one memory and one pointer |
| `rtl/agu.sv` | per-stage sample counter giving the phase, the ROM address and the end of a block |
| `rtl/twiddle_rom.sv` | per-stage table `W_2L^k`, `k = 0..L-1`, computed at elaboration, with conjugation for the IFFT |
| `rtl/cmult.sv` | complex multiplier: 4 multipliers, rounding, saturation |
| `rtl/sdf_stage.sv` | one stage: all of the above, the phase multiplexers, the `primed` flag, the result register and the bypass |
| `rtl/fft2048.sv` | top: configuration registers, input register, 11 stages, output index |

The twiddle table of a stage is `re = round(2^14·cos(πk/L))`,
`im = round(−2^14·sin(πk/L))`. It is computed by a constant function with
`$cos`/`$sin` when the design is elaborated, so no data file is needed. The
whole core holds 2047 FIFO words and 2047 ROM words of 32 bits each, plus
about 550 flip-flops.

## Where this design differs from the architecture it follows

* **Latency.** The original architecture quotes 2050 clocks at 2048 points.
  It gets there by reading and writing the FIFOs on different clock events,
  which allows fewer register stages. This RTL uses only rising edges. The
  FIFO read is combinational, and the new word is written on the same edge.
  That adds one result register per stage, so the latency is 2059 clocks.
  Throughput is the same.
* **FFT/IFFT selection.** The IFFT is done by conjugating the twiddles in each
  stage's ROM. The AGU gives the same address in both directions. The original
  block diagram also shows an FFT/IFFT multiplexer in the address generator,
  and that multiplexer has no counterpart here.
* **The FIFO** is drawn as a shift register. Here it is a circular buffer,
  which has the same input-to-output behaviour.
* Several things are choices of this RTL, not taken from the original:
  halving in every butterfly, the Q2.14 twiddles, rounding and saturation in
  the multiplier, the valid/stall handshake, the `cfg_load` interface, the
  bypass used for shorter lengths, `out_index`, and the reset behaviour.
* The output order is bit-reversed, and no reorder buffer is built.

## Simulating

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.
For example, the end-to-end test at full size:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fft_pkg.sv rtl/bf2.sv rtl/cmult.sv rtl/agu.sv rtl/sdf_fifo.sv \
  rtl/twiddle_rom.sv rtl/sdf_stage.sv rtl/fft2048.sv tb/fft2048_tb.sv \
  --top-module fft2048_tb -o sim && ./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb/bf2_tb.sv` | sum and difference against integer floor division |
| `tb/cmult_tb.sv` | exact products with rounding and saturation; multiply by 1.0 is exact |
| `tb/sdf_fifo_tb.sv` | delay of 1024, 8 and 1 words with random shifts and a clear |
| `tb/agu_tb.sv` | phase, address and block end for L = 8 and 1024 |
| `tb/twiddle_rom_tb.sv` | every entry, in both directions, against `exp(∓jπk/L)` |
| `tb/sdf_stage_tb.sv` | bit-exact stage output and valid timing for FFT and IFFT with random gaps, plus bypass |
| `tb/fft2048_tb.sv` | the top at default size: 11 configurations covering all five lengths and both directions, with and without input stalls, random data and near-full-scale tones; DFT accuracy, `out_index`, latency `len + 11`, output count |

The end-to-end test finishes in about 2 s. It counts forward blocks, inverse
blocks, blocks of each length, full-scale tone blocks, configuration switches
and stalled cycles, and
it fails if any of these is zero. Saturation in the multiplier is exercised
by `cmult_tb`, not by the end-to-end test.

Not verified: the clock rate. The original targets 40 MHz in a 0.18 µm
process. Nothing here checks timing after synthesis.
