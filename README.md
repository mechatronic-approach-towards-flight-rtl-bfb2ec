# Flutterometer: in-flight flutter monitoring hardware

Flutter is a self-excited vibration of an aircraft structure. It appears when the aerodynamic
forces cancel the structure's own damping. Near the flutter boundary, the damping ratio of one
or more structural modes falls towards zero. The flutterometer watches this as it happens. It
measures the vibration of the airframe with accelerometers, separates the individual vibration
modes, identifies the natural frequency and damping ratio of each mode, and warns when a damping
ratio, which is the flutter margin, gets too small.

The processing chain for each sample is:

1. sample every accelerometer signal at 10–200 Hz;
2. filter each signal with one complex wavelet per mode. This isolates a narrow-band,
   slowly-varying mode signal;
3. reconstruct the mode signal from its wavelet coefficient;
4. fit a recursive least-squares (RLS) ARMA model to each mode signal;
5. turn the model into frequency and damping, and compare the damping with thresholds.

Steps 1–3 are fixed-point and run in dedicated hardware. Steps 4–5 are floating-point software on
an embedded soft processor. Dedicated floating-point instructions speed up that software. This
repository holds the hardware part as synthesizable SystemVerilog:

| Part | Module | What it does |
|---|---|---|
| Wavelet accelerator | `wavelet_accel` | Steps 1–3 for 2 signals × 3 modes, each over a 512-sample window. |
| Floating-point instructions | `fp_ci` | Single-precision add, multiply, reciprocal and square root as processor custom instructions. |
| Front panel | `display_panel` | 4-digit segment display of the damping figure, multicolour LED bar of the margin, alarm outputs. |
| Serial output | `serial_tx` | Sends result bytes written by the processor to external devices over an asynchronous serial line. |
| Top | `flutterometer` | Puts the four side by side. Every processor-side signal is a port. |

The processor, its bus fabric, DMA controller, memories, USB link, DAC and LCD are
not part of this RTL. Their connections are ports of `flutterometer`, and the end-to-end
testbench models them.

## The wavelet accelerator

### What it computes

Each **channel** is one mode of one input signal. There are `N_IN × N_MOD = 2 × 3 = 6` channels,
and channel `c` takes its samples from input `c / 3`. At every sampling instant `n`, channel `c`
computes, over the window of the newest `WINDOW = 512` samples:

```
re[n]  = ( Σ_{k < len_c} ψr_c[k] · x[n−k] ) >>> 15
im[n]  = ( Σ_{k < len_c} ψi_c[k] · x[n−k] ) >>> 15
rec[n] = ( re[n] · gain_c ) >>> 15
```

- `x` is the signed 16-bit ADC code.
- `ψr` and `ψi` are the real and imaginary parts of the channel's complex wavelet. They are
  Q1.15 numbers that the processor computes and loads at start-up.
- `len_c` is the channel's wavelet length, at most 512 taps. Each channel can have its own
  length.
- `re` + j·`im` is the wavelet coefficient. Its magnitude is the mode's envelope.
- `rec` is the reconstructed mode signal. With a single scale, the inverse wavelet transform is
  the real part of the coefficient times a constant. `gain_c` (Q1.15) is that constant.

A channel's wavelet table holds 1024 points: 512 real points, then 512 imaginary points. So the
1024-point table and the 512-sample window describe the same 512 taps.

### How it is organised

```
 sample_timer ──trig──► master_ctrl ──adc_start──► (ADCs)
                            │ ◄──adc_done, adc_data──
                            │ buf_wr
              ┌─────────────┼────────────────────────┐
              ▼             ▼ rd_en, rd_age = k      ▼
        circ_buffer[0]  circ_buffer[1]   wavelet_ram[0..5]
              │ x[n−k]       │ x[n−k]          │ ψr[k], ψi[k]
              └──────┬───────┴────────┬─────────┘
                     ▼  tap (valid/first/last/k), one cycle later
              conv_recon_unit[0..5]  (all in lock step)
                     │ re, im, rec
                     ▼
                 accel_regs ──► bus readback, status, DMA request, interrupt
```

- **`sample_timer`** is a phase accumulator. Each cycle it adds the programmed rate in Hz, and
  it emits a trigger each time the sum passes `CLK_HZ`. The average rate is exact and the trigger
  jitter is at most one clock. Rates are clamped to 10–200 Hz.
- **`master_ctrl`** is the single controller. On a trigger it starts the ADCs. When the ADCs
  answer, it writes the new samples into the circular buffers. Then it sweeps `k = 0 … 511`, one
  tap per clock. It reads every circular buffer and every wavelet table at address `k` in the same
  cycle, and broadcasts a tap control word to all units. A trigger that arrives while a sweep is in
  progress is dropped and flagged as an *overrun*.
- **`circ_buffer`** holds one input's window. A read names a sample by its age `k`, and the buffer
  turns that into an address relative to its write pointer. Ages older than the number of samples
  written since reset read as zero.
- **`wavelet_ram`** stores the real and imaginary halves of a table in two banks, so one complex
  tap is read per cycle.
- **`conv_recon_unit`** has a three-stage pipeline: multiply (with taps `k ≥ len` zeroed), then
  accumulate (cleared on the first tap), then scale and reconstruct.

Adding inputs or modes adds memories and units but no time: every unit works on the same tap in
the same cycle. `N_IN`, `N_MOD`, `DEPTH` (the window) and `PTS` (the table size, `2 × DEPTH`) are
parameters of `wavelet_accel`. `tb_wavelet_accel_scaled` runs 4 inputs × 2 modes with a
256-sample window, and the latency is still `DEPTH + 5` cycles.

### Timing

| Event | Cycle |
|---|---|
| ADC reports samples (`adc_done`) | 0 |
| samples written, sweep starts | 1 |
| last tap read | 512 |
| results valid in all units | 516 |
| `done`, status bit set, DMA request | 517 (`WINDOW + 5`) |

At the default 50 MHz clock and the 200 Hz maximum sampling rate, the sweep uses about 0.2 % of a
sample period. The results stay unchanged until the next window finishes, so the processor or the
DMA has a whole sample period to fetch them.

### Number formats and ranges

- Products are 32 bits and the accumulators are 48 bits. A full-scale 512-tap sum needs 41 bits,
  so the accumulators cannot overflow.
- `re` and `im` are at most about 2^25 in magnitude, and `rec` fits in 32 bits for any gain.
- All scaling is an arithmetic shift right, so results are truncated toward −∞, not rounded.

### Register map (`accel_regs`, 32-bit words, word addresses)

| Address | Name | Contents |
|---|---|---|
| 0x0000 | CTRL | [0] sampling enable, [1] interrupt enable, [2] DMA-request enable |
| 0x0001 | STATUS | [0] done (write 1 to clear), [1] overrun (write 1 to clear), [2] busy (read-only) |
| 0x0002 | RATE | [7:0] sampling rate in Hz, reset value 100 |
| 0x0003 | COUNT | number of completed windows (read-only) |
| 0x0010 + c | LEN | [9:0] wavelet length of channel c in taps, reset value 512 |
| 0x0018 + c | GAIN | [15:0] reconstruction gain of channel c, Q1.15, reset value 0 |
| 0x0040 + 4c | RE / IM / REC | +0 re, +1 im, +2 rec of channel c (read-only) |
| 0x0080 + i | SAMPLE | newest sample of input i, sign-extended (read-only) |
| 0x2000 + PTS·c + p | WAVE | wavelet point p of channel c (write-only; p < PTS/2 real, p ≥ PTS/2 imaginary; PTS = 1024 by default) |

The bus is an Avalon-MM-style slave with no wait states and a read latency of one cycle.
`dma_req` and `irq` stay high while STATUS.done is set and their enable bits are set. A new
`done` wins over a clear written in the same cycle. The map holds 2 to 8 channels and up to 64
inputs; `accel_regs` stops elaboration with an error for a configuration outside that. The LEN
registers reset to the window size `DEPTH`.

A typical processor sequence:

1. Write all wavelet points, then LEN and GAIN for each channel.
2. Write RATE, then CTRL = 0b101.
3. On each DMA request or interrupt, read the 18 result words.
4. Write STATUS = 1.

## Floating-point custom instructions

The RLS update and the damping computation are single-precision floating point. `fp_ci` gives the
processor four hardware operations, selected by the instruction's `n` field:

| n | Operation | Unit | Latency (start cycle → done cycle) |
|---|---|---|---|
| 0 | a + b | `fp_add` | 1 |
| 1 | a × b | `fp_mul` | 1 |
| 2 | 1 / a | `fp_recip` | 28 |
| 3 | √a | `fp_sqrt` | 27 |

All four are **correctly rounded**: IEEE-754 binary32, round to nearest, ties to even.

- `fp_add` aligns the operands with guard, round and sticky bits, then normalises by
  leading-zero count.
- `fp_mul` rounds a 48-bit significand product.
- `fp_recip` is restoring division of 1.0 by the significand, 26 quotient bits plus a sticky bit
  from the remainder.
- `fp_sqrt` is the restoring digit-by-digit square root of the significand (doubled first for an
  odd exponent), 25 root bits plus a sticky bit.

Subnormal inputs count as zero and subnormal results are flushed to zero. Overflow gives ∞. Every
invalid operation gives the quiet NaN `0x7FC00000`. The interface follows the Nios II multi-cycle
custom instruction: `clk_en`, `start`, `n`, `dataa`, `datab`, `result` and `done`, with an
active-high `reset`. One operation may be in flight at a time, and an assertion checks this.

## Front panel (`display_panel`)

The processor writes three numbers. The hardware does the rest.

- **Display**: the processor writes a signed 16-bit value and an optional decimal-point position.
  The hardware converts the value to BCD (shift-and-add-3), blanks leading zeros left of the
  decimal point, and puts a minus sign in the left digit for negative values (range −999 to 9999,
  otherwise all dashes). It decodes each digit to 7 segments plus the point and scans the four
  digits, each for `SCAN_DIV` clocks (1 kHz per digit at the default).
- **LED bar**: `BAR_LEN = 10` two-colour LEDs show the margin as a thermometer. The bar is red
  when margin < threshold, amber (both colours) when margin < 2 × threshold, and green otherwise.
- **Alarms**: `alarm[0]` is high while margin < threshold and alarms are enabled. `alarm[1]`
  also latches that condition until the processor acknowledges it.

Registers: 0 DISPLAY (`[15:0]` value, `[17:16]` decimal-point digit, `[18]` point on), 1 MARGIN,
2 ALARM (`[7:0]` threshold, `[8]` enable), 3 ACK (write 1 to clear the latch). Reads return the
register, or the latch state at address 3.

## Serial output (`serial_tx`)

The processor writes bytes into a 16-byte FIFO. The transmitter sends each one as an
asynchronous frame: a start bit (0), eight data bits LSB first, and a stop bit (1). Each bit lasts
DIVISOR clock cycles; the line idles high. The reset value of DIVISOR is `CLK_HZ / BAUD`
(434 cycles, 115200 baud at 50 MHz).

Registers: 0 DATA (write `[7:0]` to queue a byte), 1 STATUS (`[0]` FIFO full, `[1]` FIFO empty,
`[2]` busy, `[3]` lost, write 1 to clear), 2 DIVISOR (`[15:0]`, values below 2 act as 2). A byte
written to a full FIFO is dropped and sets `lost`. A byte written to an idle transmitter starts
on the line one cycle after the write. Back-to-back frames start `10 × DIVISOR + 1` cycles apart.
Which bytes to send is up to the software.

## What follows the source design and what is this design's choice

These follow the source design:

- the hardware/software split;
- a single master controller with circular input buffers, wavelet buffers written by the
  processor, and identical parallel convolution/reconstruction units;
- fixed-point arithmetic in the accelerator;
- 2 inputs × 3 modes, a 512-sample window and 1024-point wavelet tables;
- ADC triggering at 10–200 Hz;
- completion reported in status bits with a DMA request;
- floating-point add, multiply, reciprocal and square root as custom instructions;
- the display, multicolour margin bar and margin alarms;
- a serial output for results.

These are this design's own choices:

- **Complex wavelet layout.** The 1024 points are read as 512 complex taps. The reconstruction
  is read as `gain × re`, computed in the same pass.
- **Word widths.** 16-bit samples, Q1.15 coefficients, 48-bit accumulators, 32-bit results,
  truncation instead of rounding.
- **Handshakes and timing.** The ADC handshake (start pulse; done pulse with all samples in
  parallel), the tap pipeline and the `WINDOW + 5` latency.
- **Full-window sweep.** The sweep always covers the whole window, even when every wavelet is
  shorter.
- **Bus interface.** The register map, the write-1-to-clear status, the interrupt, and the
  overrun flag.
- **Defaults.** The 50 MHz clock (`CLK_HZ`) and all reset values.
- **Floating-point details.** Rounding, flushing subnormals to zero, NaN handling, the iterative
  methods and their latencies.
- **Front panel.** LED count and colour zones, the two alarm outputs (live and latched), and the
  display number format.
- **Serial output.** The frame format (8N1), the speed, the FIFO and its overflow flag.

Not built:

- the processor and its software (RLS, damping, the threshold table indexed by flight
  conditions);
- the bus fabric and DMA controller;
- the USB, DAC and LCD interfaces;
- the analog front end and ADC;
- the configuration flash, CPLD and SRAM.

## Simulating

Every testbench is self-checking and ends with `TB_RESULT checks=N failures=M`. Build and run one
with plain Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb -Irtl -Itb rtl/flutter_pkg.sv tb/fp_ref_pkg.sv \
  --top-module tb_wavelet_accel tb/tb_wavelet_accel.sv
./obj_dir/Vtb_wavelet_accel
```

Replace `tb_wavelet_accel` with any testbench below.

| Testbench | Covers |
|---|---|
| `tb_flutterometer_full` | Whole top at default parameters (50 MHz): loads all wavelets, 24 windows at 200 Hz, every result checked, the floating-point instructions and display driven. |
| `tb_flutterometer` | Whole top at `CLK_HZ = 120 kHz` (600 cycles per 200 Hz sample) over 1500 windows. Counts each mechanism and fails if one never occurs. |
| `tb_workloads` | Whole top at 100 Hz sampling with three signal sets: a 7.48 Hz triangle wave, a 5.76 Hz square wave whose amplitude decays and then grows, and two signals of three modes each (5.2, 7.46, 12.5 Hz). Every result is checked bit-exactly. It then recovers each mode's frequency from the coefficient's rotation and the damping ratio from its envelope (see below). |
| `tb_wavelet_accel_scaled` | Accelerator with 4 inputs × 2 modes (8 channels), a 256-sample window and 512-point tables: every result word, the DEPTH + 6 interrupt interval, the newest-sample registers. |
| `tb_wavelet_accel` | Accelerator alone, driven over the bus: 540 windows checked word by word, latency, DMA request, overrun. |
| `tb_master_ctrl`, `tb_circ_buffer`, `tb_wavelet_ram`, `tb_conv_recon_unit`, `tb_accel_regs`, `tb_sample_timer` | The accelerator's parts. |
| `tb_fp_add`, `tb_fp_mul`, `tb_fp_recip`, `tb_fp_sqrt`, `tb_fp_ci` | The floating-point units, each over thousands of random and special operands. |
| `tb_display_panel` | Digit patterns, scan timing, bar colours, alarms. |
| `tb_serial_tx` | Every cycle of every frame at two bit times, byte order, write-to-line delay, frame spacing, status bits, FIFO overflow. |

The two `tb_flutterometer*` testbenches share `tb/flutter_e2e_body.svh` and play the processor
and the board:

- **ADC model.** It produces a "vertical tail" signal (5.2 Hz and 12.5 Hz modes) and a "wing"
  signal (7.4 Hz mode), plus noise.
- **Flutter episode.** Part-way through the run the 5.2 Hz mode starts to grow (negative
  damping), then decays again.
- **Processor model.** It checks every accelerator result against its own convolution model. It
  computes the 5.2 Hz mode's amplitude and its relative change with the custom instructions, and
  checks each result against a double-precision reference. It writes the damping figure and
  margin to the panel, and sends the figure as two bytes over the serial output.
- **Serial receiver model.** It samples each bit in its middle and checks the start bit, the stop
  bit and every byte.

The mechanisms `tb_flutterometer` counts and requires are:

- windows and DMA requests;
- circular-buffer wrap-around;
- wavelets shorter than the window;
- each of the four floating-point operations;
- a negative damping figure on the display;
- a live alarm, and a latched alarm acknowledged after recovery;
- a sampling overrun, caused by a slowed-down ADC;
- serial bytes received and decoded by a receiver model.

`tb_workloads` stands in for the identification software with two simple estimates:

- **Frequency.** The complex coefficient of a channel turns by 2π·f/fs per sample. The mean
  turn over a few hundred windows gives f.
- **Damping ratio.** Once the window lies inside a stretch of exponential growth or decay, the
  magnitude of the coefficient follows the same exponential. Its rate σ gives ζ = σ / (2π·f).

It requires the triangle wave to give 7.48 Hz ± 0.05 and |ζ| < 0.003. The square wave must give
5.76 Hz ± 0.05 and ζ within 25 % of +0.02 while decaying and −0.02 while growing. Each of the
six flight channels must find its own mode within 0.1 Hz. Results obtained: 7.480 Hz with ζ = 0.0000;
5.760 Hz with ζ = +0.0200 / −0.0200; 5.200, 7.460 and 12.50 Hz on both inputs.

The floating-point references rely on this: rounding an exact double-precision `+ × / √` result
to binary32 is the same as rounding the exact result directly.

The two-state simulator starts unreset variables at random values. Memories are never cleared
(the circular buffers hide unwritten samples instead), so every test writes what it reads.

## Size

After generic synthesis, the whole top has about 1,600 word-level cells, about 2,400 flip-flop
bits and 114,900 memory bits:

- 6 × 1024 × 16 bits of wavelet tables;
- 2 × 512 × 16 bits of circular buffers;
- a few small register arrays (the display's digit patterns, the serial FIFO).

The accelerator needs 12 16×16 multipliers (two per channel) and 6 32×16 multipliers for the
reconstruction. The floating-point multiplier adds one 24×24 multiplier.
