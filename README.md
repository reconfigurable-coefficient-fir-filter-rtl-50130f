# CCD defect-inspection front end with a reconfigurable FIR filter

A linear CCD scans a moving film line by line. Each line has 2048 pixels,
sampled at 4 MHz by an AD9203 converter. A dark spot on the film shows up as a
dip in the line signal. This RTL is the FPGA part of that system:

* it clocks the converter and frames its samples into lines;
* it low-pass filters every line with a 33-tap linear-phase FIR filter, whose
  coefficients a host computer downloads at run time;
* it judges each pixel against a threshold that follows the light level;
* it writes compact defect records into a FIFO for the host to collect.

Why the coefficients are downloadable: the right cut-off frequency depends on
the optics and on the CCD drive frequency. Both can change in the field. The
host computes a new filter, for example with a Kaiser window, and writes it into
the running design.

Why the threshold moves: lamp flicker and uneven film thickness change the
signal level from line to line. The threshold of each line is therefore 75% of
the average level of the line before it.

The structure follows a published FPGA design of this kind (Altera Cyclone
EP1C6). Some things that design leaves open are filled in here: number formats,
handshakes, the host register map and the meaning of one record word. The
section "Design choices and departures" lists them all.

## Data path

```
 AD9203 pins                host register port (cfg_*)
     |                               |
 adc_ctrl ---- raw line ----> fir_filter <-- coef_bank
 (4 MHz clock, SH framing,     (33 taps,
  pixel index, sol/eol)         symmetric)
                                   |
                          filtered line (filt_*) --> host upload
                                   |
                 +-----------------+------------------+
                 |                                    |
           dyn_threshold --- threshold of the ---> defect_detect
           (64-point average,  previous line          |
            75 %)                                      v
                                               sync_fifo 4096 x 16 --> host read (fifo_*)
```

Everything runs on one clock, `clk`, which is the PLL output. The default is
8 MHz, twice the sampling rate. A sample moves through the chain every
`CLK_DIV` = 2 clocks. The shared types are in `ccd_pkg`. A sample travels as the
struct `pix_t`: the 10-bit value, the 11-bit pixel index, and flags for the first
(`sol`) and last (`eol`) pixel of the line.

| module | role |
|---|---|
| `ccd_fir_top` | wires up the chain; its ports go to the converter pins and the host link |
| `adc_ctrl` | makes the converter clock, holds STBY and 3-STATE low, turns an SH pulse into one tagged line |
| `coef_bank` | host-writable coefficients h(0)..h(16) and the symmetry mode |
| `fir_filter` | linear-phase direct-form FIR filter with pre-adders, a pipeline of 4 clocks |
| `dyn_threshold` | 64-point line average, then 75% of it; uses `adder_tree8` twice |
| `adder_tree8` | combinational sum of eight operands |
| `defect_detect` | compares each pixel with the threshold and writes the records |
| `sync_fifo` | 4096 x 16 record buffer that drops records when full |

## The linear-phase filter

The filter computes `y(n) = sum h(k) x(n-k)` over k = 0..32. Its coefficients are
symmetric, `h(k) = h(32-k)`, or antisymmetric, `h(k) = -h(32-k)`. Either way the
two taps that share a coefficient are combined first:

    pre(k) = x(n-k) +/- x(n-32+k)      k = 0..15
    pre(16) = x(n-16)                   (0 in odd-symmetry mode)
    y(n)   = sum over k = 0..16 of h(k) * pre(k)

This needs 17 multipliers instead of 33, and the host writes only 17 words.
Antisymmetry forces the centre coefficient to zero. The filter enforces this
itself, whatever value is in register 16. The same module also builds
even-length filters (`NTAPS` even, no centre tap).

Number formats:

* Input: unsigned 10-bit straight binary, as the converter delivers it.
* Coefficients: signed Q1.14 in 16 bits, so 1.0 = 16384 and the range is
  about -2..+2.
* `y_full` (top port `filt_full`): the exact signed sum, scaled by 2^14.
* `y`: that sum rounded half up to an integer and clipped to 0..1023. The
  filtered line can then be handled exactly like a raw one.

Pipeline: the sample enters the delay line at the clock edge that ends its
`in_valid` cycle. The pre-adders, the products and the adder tree each take one
register stage after that. `out_valid` therefore comes 4 clocks after
`in_valid`, and the filter accepts one sample per clock. A tag enters with each
sample and comes out with the result. The result's pixel index is that of the
newest sample in the window. A linear-phase filter delays the signal by
(N-1)/2 = 16 samples, so a dip at pixel p is reported near pixel p+16. The delay
line is not cleared between lines, so the first 16 outputs of a line still
contain the end of the previous line.

### Coefficient download (`cfg_*`)

| address | content |
|---|---|
| 0..16 | h(0)..h(16), signed Q1.14 |
| 63 | bit 0: 1 = odd (anti-)symmetry, 0 = even symmetry |
| other | ignored; `cfg_bad_addr` pulses |

A write takes effect at the next clock edge. No shadow copy is kept, so a host
that changes coefficients in the middle of a line sees a few mixed outputs.
Reset loads a pass-through response: h(16) = 1.0 and all other coefficients 0.

## The dynamic threshold

An exact average of 2048 samples is too large for the target FPGA. Instead,
the average is taken over 64 samples spaced 32 pixels apart:

1. A sample is taken at every pixel whose index satisfies `pixel mod 32 = 15`.
   That is the middle of each 32-pixel segment: pixels 15, 47, ..., 2031.
2. An eight-way selector files these samples into an 8-entry group register.
   When a group of 8 is full, adder array 1 (`adder_tree8`) adds it into the
   group sum S1..S8. That sum is registered one clock later.
3. After the eighth group, adder array 2 (a second `adder_tree8`) adds S1..S8
   into S, the 16-bit line sum.
4. The average is A = S >> 6. The threshold is (A >> 1) + (A >> 2), that is
   50% + 25% of A, using only shifts.

The new value is held back until the line's last pixel has passed. It then
becomes `threshold` for the whole next line, so a line is never judged by its
own average. A line that stops early (no `eol`) leaves the threshold alone.
After reset the threshold is 0, so the first line reports no defects.

Worked example: a line holding the ramp 0..1023 twice. The true 75% of its mean
is 383.625. The 64 samples give A = 511, and the threshold is
255 + 127 = 382. That is the value the original design reports for the same
test line. The sampling offset of 15 was chosen to reproduce it.

The threshold is measured on the filtered line, the same signal the detector
judges.

## Defect records

`defect_detect` marks a pixel as a defect when its filtered value is strictly
below the line's threshold. It then writes 16-bit words:

| word | meaning |
|---|---|
| `FFFF` | start of a line (written at its first pixel) |
| `8000 \| pixel` | one defect pixel; bit 15 marks it, bits 10..0 hold the index |
| `0xxx` (bit 15 clear) | end of a run of defect pixels; bits 14..0 hold the line number |

A run that reaches the end of the line is closed right after its last pixel.
The line number counts finished lines since reset. A 10-pixel dark spot at
pixels 5..14 of line 0x711 gives this sequence:

`FFFF 8005 8006 ... 800E 0711`

Some pixels need two words: the line flag plus a defect at pixel 0, or a defect
plus a run end at the last pixel. The second word is written one clock after the
first. Samples therefore must never arrive in consecutive clocks, and an
assertion checks this. `CLK_DIV >= 2` guarantees it.

The FIFO holds 4096 words. A record written into a full FIFO is lost:
`fifo_dropped` pulses and `fifo_overflow` stays set until reset. On the read
side, `fifo_rd_en` reads the oldest word. The word appears on `fifo_rd_data`
together with `fifo_rd_valid` in the next clock.

## Converter and line timing

`adc_ctrl` has these converter outputs:

* `adc_clk`: `clk / CLK_DIV`, with 50% duty.
* `adc_stby` and `adc_3state`: held low (normal operation, outputs enabled).

It captures the converter's data bus at the clock edge where `adc_clk` rises.
At that edge the bus holds the result of the previous conversion. The
converter's own pipeline latency is not compensated.

The line trigger `sh_trig` is asynchronous and passes through a two-flop
synchroniser. A rising edge while no line is in progress pulses `line_start`.
The next 2048 captured samples then leave tagged 0..2047. A trigger during a
line is ignored, and `trig_ignored` pulses. At the defaults a line takes
4096 clocks, 512 us.

## Design choices and departures

These follow the original design:

* 2048-pixel lines sampled at 4 MHz;
* the linear-phase direct structure with 33 taps (32nd order);
* coefficients downloaded from a host;
* the threshold arithmetic (64 samples, 8 x 8 adder arrays, >> 6, 50% + 25%);
* the threshold carried over from the previous line;
* the line flag `FFFF` and the bit-15 marked defect words;
* STBY and 3-STATE low.

These are this design's own choices:

* The 8 MHz fabric clock and the divide-by-2 converter clock. The original takes
  4 MHz straight from its PLL and does not describe its fabric clock.
* The number formats: unsigned 10-bit input, Q1.14 coefficients, rounding and
  clipping.
* The fully parallel filter with 17 multipliers and a 4-clock pipeline.
* The host register map and the pass-through reset value.
* The sampling offset 15 in the threshold unit. The original only says the 64
  points are evenly spaced.
* The meaning of the run-closing word. The original shows one word with bit 15
  clear after a defect run, described as the defect's "bottom position". Here
  it is the line number, that is, the position along the direction of film
  travel. This is an interpretation.
* The 4096 x 16 FIFO. The original used a vendor FIFO of unstated size. Its
  report of 71% of the device's 92,160 RAM bits matches 65,536 bits.
* A single clock for the FIFO's write and read sides, and dropping records when
  the FIFO is full.
* The filter sits in front of the defect path. The original applies its filter
  system to the inspection system but gives no block diagram.

These are not included, because they are not logic designed here:

* the PLL (`clk` is its output);
* the USB 2.0 controller and its protocol. The `cfg_*`, `filt_*` and `fifo_*`
  ports are where it would connect.
* the AD9203 itself, the CCD and its driver, and the host software.

## Size

At the defaults, coarse synthesis gives about 1,750 flip-flops, 65,536 memory bits
(the FIFO) and 17 multipliers of 12 x 16 bits. The original reported 774 logic
elements for its defect path alone on an EP1C6, and 75% of the device for the
filter system. The 17 parallel multipliers here cost more logic than a
time-multiplexed filter would need.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `adc_ctrl_tb` | against a converter model at divide 2 (2048 px) and divide 4 (64 px): clock period and duty, capture edge and data, pixel tags, sol/eol, one sample per converter period, SH ignored during a line, STBY/3-STATE |
| `coef_bank_tb` | reset contents, every register, symmetry bit, write timing, unmapped addresses |
| `fir_filter_tb` | bit-exact against a direct convolution, 33 taps and 8 taps, even and odd mode, back-to-back and gapped input, clipping, tag, latency of exactly 4 clocks |
| `adder_tree8_tb` | random and all-ones operands at 10 and 13 bits |
| `dyn_threshold_tb` | ramp line gives 382; random lines against the 64-point model; threshold constant during a line; cut-off lines ignored |
| `defect_detect_tb` | record stream word by word against a model; runs at line start and line end |
| `sync_fifo_tb` | random traffic against a queue model, drops when full, full 4096-word fill and drain |
| `ccd_fir_top_tb` | the whole chain at default parameters over nine 2048-pixel lines (details below) |
| `fir_kaiser_workload_tb` | the two low-pass experiments and a band-pass check at default parameters (details below) |

`ccd_fir_top_tb` runs the whole chain. It compares every filtered sample, every
threshold and every record read back with its own model. It counts each
mechanism and fails if one never happens. The mechanisms are:

* coefficient download and an unmapped address;
* odd-symmetry mode;
* output clipping;
* defect and run-end records;
* threshold updates;
* an ignored SH pulse;
* FIFO overflow with exactly the predicted number of dropped records.

`fir_kaiser_workload_tb` uses a 33-tap Kaiser low-pass: beta 3.4, 187.5 kHz
sampling, 35 kHz cut-off. The testbench designs the filter in SystemVerilog and
downloads it through the host port. It then runs two inputs:

* 1.5 kHz + 10 kHz: both tones pass unchanged, apart from the 16-sample delay.
* 1.5 kHz + 50 kHz: the 50 kHz tone is removed. Its residual is under 2 LSB for
  a 200 LSB tone, about -41 dB.

A third run downloads a band-pass filter from the same window (pass band 20 to
50 kHz) and feeds it 1.5 kHz + 35 kHz. The output holds only the 35 kHz tone,
within 2 LSB. The DC offset and the 1.5 kHz tone are removed.

Every output is also checked bit for bit.

To run a testbench with Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --top-module ccd_fir_top_tb \
        -y rtl -y tb +libext+.sv -Irtl rtl/ccd_pkg.sv tb/ccd_fir_top_tb.sv -o sim
    ./obj_dir/sim

Replace the top module and testbench file to run another testbench. Each
testbench finishes in a few seconds. Simulation is two-state, so every register
that is read has a reset.

Lint warnings that remain:

* `SYNCASYNCNET`: `rst_n` is used both as the asynchronous reset and in the
  `disable iff` of the handshake assertion in `defect_detect`.
* `adc_stby` and `adc_3state` are constant outputs by design.
* `UNUSEDPARAM` for `LINE_FLAG` when a module that imports `ccd_pkg` but
  writes no records is linted on its own.
