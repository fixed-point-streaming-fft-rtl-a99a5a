# 128-point streaming fixed-point FFT/IFFT (radix-2 SDF)

A pipelined FFT for an OFDM modem that takes one complex sample per clock, in
natural order, and delivers one transformed sample per clock, with no frame
buffering in front of it. It is a cascade of seven radix-2
decimation-in-frequency stages of the *single-path delay-feedback* (SDF) kind.
Each stage holds a feedback buffer half the size of the previous one
(64, 32, ..., 1 words). The stages use narrow two's-complement words: 11 bits,
4 integer and 7 fraction, in every stage. This works because every stage
scales its results by 1/sqrt(2), so the signal RMS stays the same from input
to output. The same hardware computes the inverse transform by swapping the
real and imaginary parts on the way in and on the way out.

```
 in --> [stage 1] -> [stage 2] -> [stage 3] -> [stage 4] -> [stage 5] -> [stage 6] -> [stage 7] --> out
         L = 64       L = 32       L = 16       L = 8        L = 4        L = 2        L = 1
        (swap re/im in front for IFFT)                                       (swap re/im behind for IFFT)
```

## How one SDF stage works

This is the part worth understanding first. A stage with buffer length `L`
works on blocks of `2L` consecutive samples. The radix-2 DIF butterfly pairs
sample `k` with sample `k+L`. A serial stream delivers `k` first, so the stage
must keep it until `k+L` arrives. A counter of accepted samples decides
what the two switches do:

| count in block | input switch                                 | output switch            |
|----------------|----------------------------------------------|--------------------------|
| `0 .. L-1`     | sample goes into the buffer                  | buffer output goes out   |
| `L .. 2L-1`    | butterfly difference goes into the buffer    | butterfly sum goes out   |

In the second half the buffer's output is sample `k` and the stage input is
sample `k+L`. The butterfly forms `k + (k+L)` and sends it on. It forms
`(k - (k+L)) * W`, with `W = exp(-j*pi*k/L)`, and writes that back into the
buffer in place of `k`. During the first half of the next block those stored
differences come out while the new samples go in. The output stream of a stage
is therefore the L sums of a block followed by its L differences. That is
exactly the input order the next stage, with half the buffer, needs. After
seven stages bin `k` leaves at position `bitreverse(k)` of the frame.

The buffer is a plain shift register that moves one place per accepted sample
(`sdf_buffer`). The twiddles for a stage are a constant table of `L` entries
computed from cos/sin at elaboration (`twiddle_rom`), indexed by `count - L`.

## Word lengths inside the butterfly

With input words of `P` bits (`P` = 11 by default) and twiddle and scale
constants of `TP` = 10 bits (2 integer, 8 fraction):

```
a, b (P) --+--> a + b  (P+1, exact) ---------------------------> x scale (M2) --> truncate to P --> next stage
           |
           +--> a - b  (P+1, exact) --> x twiddle (M1, complex) --> truncate to P+1
                                                          --> x scale (M2) --> truncate to P --> buffer
```

* "Truncate" drops the low 8 product bits, which rounds towards minus infinity.
* Multiplying by a twiddle does not increase the magnitude, so M1 keeps the
  integer bits of its input. One real component of a complex product can still
  exceed the range by up to sqrt(2). Any result that does not fit the narrower
  word saturates, and the stage reports it on `sat`.
* The scale constant is `round(2^8/sqrt(2)) = 181` (`SCALE_INV_SQRT2`, 1/sqrt(N)
  overall) or `128` (`SCALE_HALF`, 1/N overall).

Each stage may have its own word length. Stage `s` works in
`STAGE_INT[s].STAGE_FRAC[s]`, counting the sign among the integer bits. A stage
first aligns the previous stage's words to its own format: it truncates surplus
fraction bits, zero-fills missing ones, and saturates values that are out of
range. The input port uses the first stage's format, and the output port uses
the last stage's format.

## Configurations

| | default | 1/N alternative |
|---|---|---|
| `SCALE` | `SCALE_INV_SQRT2` (1/sqrt(2) per stage) | `SCALE_HALF` (1/2 per stage) |
| `STAGE_INT` | `'{4,4,4,4,4,4,4}` | `'{2,3,3,3,3,3,3}` |
| `STAGE_FRAC` | `'{7,7,7,7,7,7,7}` | `'{8,8,8,9,11,12,12}` |
| ports | 11-bit in, 11-bit out | 10-bit in (range ±2), 15-bit out |
| overall gain | 1/sqrt(N): output RMS = input RMS | 1/N |

The default is the configuration the design is built around. The 1/N column
reproduces the alternative word-length study, in which the precision grows
from stage to stage.

## Inverse transform

`swap(FFT(swap(x))) = conj(FFT(conj(x))) = N * IDFT(x)`, where `swap`
exchanges the real and imaginary parts. The stage scaling replaces the
factor N. With the default scaling the inverse output is therefore
`sqrt(N) * IDFT(x)`; with `SCALE_HALF` it is exactly `IDFT(x)`.

`in_inverse` is sampled with the first sample of each input frame. A frame
leaves the pipeline only while the next one is entering. A four-entry queue
therefore carries each frame's choice to the output side, so the output swap
is applied to the same frame. `out_inverse` reports that choice.

## Interface and timing (`fft128_sdf`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid` | in | 1 | a sample is presented; the pipeline advances only on such cycles |
| `in_inverse` | in | 1 | 1 = inverse transform; sampled with sample 0 of a frame |
| `in_re`, `in_im` | in | 11 | sample, two's complement 4.7 |
| `out_valid` | out | 1 | an output sample is presented |
| `out_re`, `out_im` | out | 11 | result, 4.7 |
| `out_index` | out | 7 | bin (time index for the inverse) of this sample, i.e. the bit-reversed output count |
| `out_first` | out | 1 | first sample of an output frame |
| `out_inverse` | out | 1 | this output frame is an inverse transform |
| `overflow` | out | 1 | some stage saturated a result |

* Frames are 128 consecutive accepted samples, counted from reset.
* Gaps in `in_valid` simply pause the whole pipeline.
* Output sample `j` (counted over the whole stream) appears exactly 7 clock
  cycles after the cycle in which input sample `127 + j` was accepted. That is
  127 samples held in the buffers plus one output register per stage.
* The last outputs of a frame leave while the next frame is being fed. To
  flush the last frame, feed one more frame, for instance zeros.
* Outputs are in bit-reversed order. No reordering buffer is included; use
  `out_index` to write a RAM in natural order if one is needed.

Throughput is one sample per clock. The hardware is 7 butterflies, each with a
complex multiplier and two scale multipliers, plus 127 complex words of buffer
and 127 twiddle words in constant tables.

## Accuracy

All numbers below are from simulation against a double-precision DFT; the
fixed-point results match the integer model bit for bit.

* At full-scale constant-envelope QPSK input (0 dB PAPR), the default
  configuration reaches about 30 dB SNR. The 1/N configuration reaches about
  39 dB. The design target for this arithmetic was quoted as 45 dB at 0 dB
  PAPR. With truncation to 7 fraction bits in each of the seven stages, this
  implementation does not reach that. If the target matters, add fraction
  bits through `STAGE_FRAC`.
* The sweep uses frames with a fixed peak of 1.0 and rising PAPR. SNR falls by
  about 1 dB per dB of PAPR. At 9 / 14 dB the default gives 20.9 / 16.2 dB and
  the 1/N configuration gives 29.7 / 25.3 dB, because the signal RMS sinks
  towards the fixed quantisation step.

## Files

| file | contents |
|---|---|
| `rtl/fft_pkg.sv` | default sizes, `scale_e`, scale constants, rounding helper |
| `rtl/fft128_sdf.sv` | top: stage cascade, IFFT swaps, frame-mode queue, output index |
| `rtl/sdf_stage.sv` | one SDF stage: counter, switches, input alignment, output register |
| `rtl/sdf_butterfly.sv` | butterfly with M1/M2 multipliers, truncation, saturation |
| `rtl/sdf_buffer.sv` | feedback shift register |
| `rtl/twiddle_rom.sv` | twiddle table, computed at elaboration |
| `tb/fft_ref_pkg.sv` | integer reference: butterfly, alignment, whole-frame DIF model |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the precision sweep |

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
through a watchdog if it hangs.

* `tb_twiddle_rom`: every table entry for L = 64, 4 and 1, against cos/sin,
  plus values known exactly.
* `tb_sdf_buffer`: random words and random shift enables; each output must be
  the word written exactly L shifts earlier.
* `tb_sdf_butterfly`: 3000 random operand sets for both scale modes, compared
  with the integer model; full-scale operands that saturate; results worked
  out by hand.
* `tb_sdf_stage`: five stages, including widening and narrowing input formats
  and saturation. The input stream is random with gaps. The testbench checks
  each output value, its cycle, and the number of outputs.
* `tb_fft128_sdf` runs the top at its default parameters. It streams ten
  frames of QPSK, uniform noise, a tone and an over-range frame. Forward and
  inverse frames are mixed, some frames run back to back and some have gaps.
  Each output is checked bit for bit, together with its index, frame flags
  and exact cycle. It also counts that every mechanism occurred and reports
  the SNR.
* `tb_fft_precision_sweep`: both configurations over 0 to 14 dB PAPR, checked
  bit for bit; prints the SNR table above.

To simulate with Verilator 5, for example the full design:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fft_pkg.sv tb/fft_ref_pkg.sv tb/tb_fft128_sdf.sv --top tb_fft128_sdf
./obj_dir/Vtb_fft128_sdf
```

All modules lint cleanly with `verilator --lint-only -Wall`, apart from unused
package constants. None of them contains a latch or a combinational loop.

## Design choices beyond the source description

* The valid handshake, and pausing on gaps in `in_valid`.
* The output register in each stage.
* Synchronous reset of the buffers and counters.
* Saturation on overflow.
* The twiddle and scale precision of 2.8.
* The rule for aligning words between stages.
* The frame-mode queue and the `out_index`, `out_first`, `out_inverse` and
  `overflow` outputs.
* No output reordering is done; results stay in bit-reversed order.
* The word lengths are parameters of the whole transform. Changing them changes
  the accuracy figures above, not the structure.
* The OFDM transmitter around the FFT (BPSK/QPSK mapping, framing), in which
  the accuracy figures were originally taken, is not included.
