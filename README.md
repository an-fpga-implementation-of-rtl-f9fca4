# Digital IF processor: FS/4 down, polyphase lowpass, FS/4 up

This is a small receiver back end for a radiometer IF chain. An 8-bit ADC
samples a real IF signal at Fs = 200 MHz. The band of interest lies around
Fs/4 = 50 MHz. The processor turns that into a complex signal at 100 MS/s
that holds 50 MHz of band, from 0 to +50 MHz, with the mirror image removed.

What makes it cheap is that it uses no multiplier except inside the filter.
Each frequency shift is by a quarter of the sample rate, so every mixing
coefficient is one of 1, j, -1 or -j. Mixing therefore reduces to negating
samples and swapping the real and imaginary parts. A free-running four-state
counter drives all of these operations.

```
            +----------+    +---------------------------+    +--------+
 busa[7:0] ->| fs4_down |--->| realfilter (32 taps)      |--->|        |--> real_o
 busb[7:0] ->| regs,    |--->| sync reg, imaginaryfilter |--->| fs4_up |--> imag_o
            | 2 neg,   |    | (31 taps)                 |    | swap,  |
            | 2 mux    |    +---------------------------+    | 2 neg  |
            +----^-----+                                     +---^----+
                 | neginput      dif_controller (00>01>10>11)    | swap, negreal, negimag
                 +-----------------------------------------------+
```

All logic runs on one clock, `clka`, at Fs/2 = 100 MHz. Each cycle the
processor takes two input samples and produces one complex output sample.

## Signal flow and why it works

**Input.** The ADC delivers its samples demultiplexed onto two 100 MHz buses.
`busa` carries the even samples x[2m]. `busb` carries the sample taken just
before, x[2m-1]. Both change once per cycle.

**FS/4 down (`fs4_down`).** Multiplying x[n] by exp(-j*pi*n/2) moves 50 MHz to
DC. For even n the factor is +-1, so even samples stay real. For odd n it is
+-j, so odd samples become purely imaginary. Between consecutive bus words
the sign alternates. Both samples of one word, x[2m-1] and x[2m], get the
same sign. Hardware: two negators and two multiplexers, steered by
`neginput`, which toggles every cycle.

**Decimating lowpass (`polyphase_filter`, `fir_filter`).** A 63-tap real lowpass
h[k] with cutoff 25 MHz removes everything outside -25..+25 MHz. That
includes the image of the wanted band, which the shift moved to around
-100 MHz. The filter output is then kept at every second sample. Write the
decimated output as y[m] = sum_k h[k] z[2m-k]. Even k touch only even,
purely real samples, and odd k touch only odd, purely imaginary samples. The
filter therefore splits into two independent real filters at 100 MHz:

* real part: even taps h[0], h[2], .., h[62] (32 taps) on the `busa` stream
* imaginary part: odd taps h[1], .., h[61] (31 taps) on the `busb` stream

No adder combines the two branches. Each branch is one output component.

**FS/4 up (`fs4_up`).** Multiplying y[m] by exp(+j*pi*m/2) moves the band from
-25..+25 MHz to 0..50 MHz. The factors 1, j, -1, -j are made by swapping the
two parts on odd m, then negating the real part, the imaginary part or both.
The stage can also shift down by exp(-j*pi*m/2), which puts the band at
-50..0 MHz. The `fs4_up` input selects the direction.

With the default taps, input tones at 41 MHz and 52 MHz come out at +16 MHz
and +27 MHz, and a 29 MHz tone comes out at +4 MHz.

## The controller and the pipeline alignment

`dif_controller` counts 00, 01, 10, 11, 00, ... and decodes four bits:

| state | neginput | swap | negimag | negreal |
|-------|----------|------|---------|---------|
| 00    | 0        | 1    | 0       | 0       |
| 01    | 1        | 0    | 0       | 1       |
| 10    | 0        | 1    | 1       | 1       |
| 11    | 1        | 0    | 1       | 0       |

In FS/4 down mode (`fs4_up = 0`) the negimag and negreal columns are exchanged.

The bit patterns only make sense together with the register counts. These
are the parts of the design that are easiest to get wrong:

* `busa` passes two input registers before its multiplexer, and `busb` passes
  one. So `busa` meets the multiplexer one cycle after `busb`, under the
  opposite value of `neginput`. The two multiplexers are wired with opposite
  polarity: `neginput = 1` passes `busa` and negates `busb`. The skew and the
  opposite wiring cancel, so both samples of a word get the same sign, as the
  mathematics requires.
* The imaginary stream leaves `fs4_down` one cycle early. One extra register
  in front of the imaginary filter lines the two branches up again.
* In the output stage the swap happens one register before the negation. So
  `swap` in the table leads `negreal` and `negimag` by one state.

The overall phase relative to reset is fixed. Count t from the first clock
edge at which `rst` is low. The output seen right after edge t+6 is

```
out = -( j)^t * y[t]   (fs4_up = 1)        out = -(-j)^t * y[t]   (fs4_up = 0)
y_re[t] = trunc( sum_i hr[i] * s(t-i) * busa[t-i] / 2048 )
y_im[t] = trunc( sum_i hi[i] * s(t-i) * busb[t-i] / 2048 ),   s(t) = -(-1)^t
```

Here trunc rounds toward zero, and each negation of an input sample is an
8-bit negation, so -(-128) stays -128. The constant minus sign in front is a
fixed phase. It does not change the spectrum.

Latency is seven register stages on every path: bus input to output takes 6
clock edges after the sampling edge. Throughput is one output per cycle, with
no stalls and no handshake.

## Filter arithmetic

`fir_filter` is a fully parallel filter. Both default tap sets are
symmetric, so by default (`SYMMETRIC = 1`) the two samples that share a tap
are added first and multiplied once. The 32-tap real branch then needs 16
multipliers. The 31-tap imaginary branch needs 15 multipliers for its pairs
plus one for the centre tap. Its seven zero pairs are constants that
synthesis removes. With `SYMMETRIC = 0` each tap has its own multiplier, and
any taps can be used. An adder tree sums the products at full precision
(8 + 10 + 5 = 23 bits), the sum is divided by 2^11 with rounding toward zero,
and the result is registered as 8 bits. The filter's latency is one cycle.
Its ports follow the filter block of the original design: `data_in`,
`clk_en`, `rst`, `clock`, `fir_result`, `rdy_to_ld` and `done`. Because the
filter is fully parallel, `rdy_to_ld` is always high once the filter is out
of reset, and `done` follows `clk_en` one cycle later. In the processor,
`clk_en` is tied high.

No saturation is needed. At elaboration the filter adds up |tap| and checks
that the largest possible result fits `OUT_W` bits. If it does not,
elaboration stops with an error. For the default taps the largest result is
+-112. A simulation assertion also checks that the divided sum never exceeds
`OUT_W` bits.

### The default taps

The taps are in `dif_pkg` (`REAL_COEFS`, `IMAG_COEFS`). They are a 63-tap
Hamming-windowed sinc lowpass with cutoff Fs/8 (25 MHz):

```
h[n] = (0.54 - 0.46 cos(2 pi n / 62)) * sin(2 pi k / 8) / (pi k),  k = n - 31  (h = 1/4 at k = 0)
q[n] = trunc(511 * h[n] / max|h|)          real: q[0], q[2], .., q[62]   imaginary: q[1], .., q[61]
```

The original filter was designed elsewhere, and its values are not
reproduced here. This prototype has the same length, the same 10-bit scaling
(largest tap 511, at the centre of the imaginary branch) and the same
property that every second imaginary tap is zero. Its response was checked
by simulation; see below. To use other taps, replace the two arrays and keep
the real branch at even and the imaginary branch at odd prototype indices.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `IN_W` | 8 | `digital_if`, `fs4_down`, `fir_filter` | ADC sample width |
| `OUT_W` | 8 | `digital_if`, `fir_filter`, `fs4_up` | filter and output width |
| `SHIFT` | 11 + 8 - `OUT_W` | `digital_if`, `fir_filter` | divide the sum by 2^SHIFT |
| `COEF_W` | 10 | `fir_filter` | tap width |
| `NTAPS` / `COEFS` | 32 / `REAL_COEFS` | `fir_filter` | tap count and values |
| `SYMMETRIC` | 1 | `fir_filter` | pre-add mirrored samples (taps must be symmetric) |

With `OUT_W` set to 10 or 12 you get the wider output paths. `SHIFT` drops
with them, so the gain stays the same and only the resolution improves.

## Interface (`digital_if`)

| port | dir | width | |
|---|---|---|---|
| `clka` | in | 1 | 100 MHz clock, rising edge |
| `rst` | in | 1 | synchronous, active high; clears every register and sets the controller to 00 |
| `fs4_up` | in | 1 | 1: FS/4 up output (band at 0..+50 MHz); 0: FS/4 down (band at -50..0 MHz); meant to be static, settles two cycles after a change |
| `busa` | in | 8 signed | even samples x[2m] |
| `busb` | in | 8 signed | odd samples x[2m-1] |
| `real_o`, `imag_o` | out | `OUT_W` signed | complex output, one sample per cycle |

In the original schematics the outputs are called `real` and `imag`. Both are
reserved words in SystemVerilog, hence the `_o` suffix.

## Files

* `rtl/dif_pkg.sv`: widths, taps, the controller state enum and the control-bit struct
* `rtl/dif_controller.sv`, `rtl/fs4_down.sv`, `rtl/fir_filter.sv`,
  `rtl/polyphase_filter.sv`, `rtl/fs4_up.sv`: the stages
* `rtl/digital_if.sv`: the top level
* `tb/tb_<module>.sv`: one self-checking testbench per module
* `tb/tb_digital_if_tones.sv`: the spectral test

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops with a
watchdog if it hangs. The expected values come from arithmetic written
independently in each testbench, not from copies of the RTL:

* `tb_dif_controller`: state sequence and decoded bits, both modes, mode change on the fly, reset mid-sequence.
* `tb_fs4_down`: register delays and signs, including the -128 wrap.
* `tb_fir_filter`: both branches, folded and direct form, against direct convolution, with `clk_en` gaps and stimuli that reach the largest sums.
* `tb_polyphase_filter`: both branches and their 2- and 3-cycle alignment.
* `tb_fs4_up`: all eight control combinations, at 8 and 12 bits.
* `tb_digital_if`: the whole processor at its default sizes, checked every cycle against the formula above for 4000 words. The run switches up to down and back, and it counts each rotation phase in each mode, both input signs and the -128 wrap.
* `tb_digital_if_tones`: spectral test with 1024 input samples. Two tones at 41 MHz and 52 MHz (6 dB apart) come out at 16 MHz and 27 MHz, 6 dB apart. A 29 MHz tone comes out at 4 MHz. Tone images and the whole rejected half of the spectrum are checked to be at least 30 dB down, at output widths 8, 10 and 12 bits and in FS/4 down mode. In simulation, the rejected half measured about 46 dB down at 8 bits.

Run any of them with plain Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dif_pkg.sv rtl/*.sv tb/tb_digital_if.sv \
          --top-module tb_digital_if -Mdir obj_tb && ./obj_tb/Vtb_digital_if
```

Each run takes well under a second.

## Departures and open points

* **Tap values.** These are this design's own (see above). The frequency
  plan, the tap counts and the 10-bit scaling match the original.
* **Inside of the filters.** In the original these are generated vendor
  cores. Here they are a parallel filter with symmetric folding and a latency
  of one cycle. A generated core with a
  different latency would shift the output rotation by a constant phase. It
  would not change the spectrum.
* **Bus sample order.** The order of `busa` and `busb` (x[2m] on `busa`,
  x[2m-1] on `busb`) is inferred from the register placement. It is the
  order under which the registers and sign pattern compute the correct
  filter.
* **Added controls.** The reset and the `fs4_up` direction input are
  additions. The original's state register starts from its power-up value,
  and the original does not say how the output direction is configured.
* **Wider outputs.** The 10- and 12-bit output widths and their `SHIFT` values
  are an extrapolation of the 8-bit path.
* **Not included.** The ADC with its demultiplexed output lies outside the
  FPGA and is not modelled. The testbenches drive `busa` and `busb`
  directly. No timing or area figure for a particular FPGA is claimed.
