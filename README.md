# ECG denoising FIR filter

An electrocardiogram carries its useful information below about 50 Hz, while
the trace picked up by the electrodes also holds mains hum (50/60 Hz) and
broadband noise. This design removes that noise in hardware with a 21-tap
(order-20) FIR low-pass filter. Its coefficients come from a Kaiser-window
design with a 20 Hz cut-off. All 21 multiply-adds are evaluated in parallel,
so one filtered sample leaves the filter on every clock. At a 50 MHz clock a
4000-sample record (8 s of ECG at 500 samples/s) is filtered in 80 µs.

The system has three parts:

```
             +--------------------+   addr   +----------------+  X_out  +-------------------+   Y
 clk, rst -->| sample_address_    |--------->| ecg_sample_rom |-------->|    fir_filter     |------>
             |   counter          |--valid-------------------------------> (21 taps, 32 bit) |--y_valid->
             +--------------------+--done-->                            +-------------------+
```

## The filter

`fir_filter` computes

    Y(n) = b0*x(n) + b1*x(n-1) + ... + b20*x(n-20)

in the direct form:

* **Sample registers reg0..reg20** (`tap_delay_line`). This is a chain of
  21 16-bit registers. reg0 takes in the new sample, and reg_k holds x(n-k).
* **One constant multiplier per register**, with **an adder chain**
  (`tap_mac`, 21 instances). Tap k forms `R_k = R_(k-1) + b_k * reg_k`, with
  R_0 = b_0 * reg0. Products and partial sums are 32 bits wide.
* **The output register Y** captures R20.

The multipliers and adders between the sample registers and Y are purely
combinational. This is the long path: 21 chained 32-bit adders after a
16x16 multiplier. It limits the clock to a few tens of MHz on a small FPGA,
which is enough for the 50 MHz target.

### Coefficients and number format

Each real coefficient b_n (all below 1) is stored as `round(b_n * 2^16)`, a
16-bit unsigned number:

| n        | 0   | 1   | 2    | 3    | 4    | 5    | 6    | 7    | 8    | 9    | 10   |
|----------|-----|-----|------|------|------|------|------|------|------|------|------|
| b_n      | 0.004375 | 0.009402 | 0.01675 | 0.02634 | 0.03775 | 0.05023 | 0.06276 | 0.07417 | 0.08332 | 0.08925 | 0.0913 |
| stored   | 287 | 616 | 1098 | 1726 | 2474 | 3292 | 4113 | 4861 | 5460 | 5849 | 5983 |

The filter is linear-phase, so b_n = b_(20-n) and taps 11..20 mirror taps
9..0. The 21 stored values add up to exactly 65535 = 2^16 - 1. This has two
consequences:

* The DC gain is 1 (to within 1/65536) when Y is read as a 16.16
  fixed-point number. `Y >> 16` is the filtered sample in the input's scale.
* Y never overflows. The largest possible sum is 65535 * 65535 < 2^32, so
  32 bits are exact and no rounding or saturation is needed anywhere.

Samples and coefficients are unsigned. An ECG with a negative excursion must
be stored with an offset, as the synthetic record in the ROM is (baseline
1024).

Y is brought out at its full 32 bits and is not shifted back down. The
caller chooses how many fraction bits to keep.

### Frequency response

Sampled at 500 Hz, the table gives these gains:

| tone    | 1 Hz  | 5 Hz | 10 Hz | 20 Hz | 30 Hz | 40 Hz | 50 Hz  | 60 Hz  |
|---------|-------|------|-------|-------|-------|-------|--------|--------|
| gain    | 0.999 | 0.968| 0.876 | 0.578 | 0.266 | 0.066 | 0.0037 | 0.0028 |

So mains hum at 50 or 60 Hz is suppressed by about 50 dB. QRS spikes,
which have energy up to about 40 Hz, are somewhat rounded off.

### Timing

* A sample on `x` with `x_valid` high is taken into reg0 at a clock edge.
* The adder chain settles during the next cycle.
* Y and `y_valid` update at the following edge: **2 clock edges from input
  to output**.
* Throughput is one sample per clock.
* With `x_valid` low the register chain holds, and Y keeps its last value.
* Assertions in `fir_filter` check the two-edge latency of the valid flag.
  Assertions in `sample_address_counter` check that the address stays
  inside the record and that `done` holds once set.

## Sample memory and sequencing

`ecg_sample_rom` holds one record of `DEPTH` 16-bit samples (default 4000)
and reads combinationally. There are two ways to fill it:

* **From a file.** Set `INIT_FILE` to a hex file with one sample per line.
  This is how a recorded trace, for example a PhysioNet ECG converted to
  unsigned 16-bit, is loaded.
* **Built in.** With `INIT_FILE` empty, the ROM computes a synthetic noisy
  ECG when it is initialised, so the design runs on its own. The trace
  repeats a 400-sample beat (P wave, QRS complex with a 640-count R spike,
  T wave) on a baseline of 1024. On top of that it adds an 8-sample
  triangle "hum" (about 60 Hz at 500 samples/s) and pseudo-random noise of
  ±32 counts. The exact formula is in the header of `rtl/ecg_sample_rom.sv`.

`sample_address_counter` starts at address 0 after reset and advances once
per clock. `valid` is high for exactly `NUM_SAMPLES` cycles. The counter then
stops, and `done` stays high until the next reset. Asserting `rst` replays
the record.

`ecg_fir_top` wires the counter, the ROM and the filter together:

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1     | clock, 50 MHz (20 ns) nominal |
| `rst`     | in  | 1     | synchronous, active high; restarts the record |
| `X_out`   | out | 16    | raw sample read this cycle |
| `x_valid` | out | 1     | X_out is part of the record |
| `Y`       | out | 32    | filtered sample, 16.16 fixed point |
| `y_valid` | out | 1     | Y updated at the last edge |
| `done`    | out | 1     | whole record read |

Counting flip-flops:

| part | flip-flops |
|------|-----------:|
| sample registers (21 x 16) | 336 |
| Y | 32 |
| address counter | 12 |
| flags | 3 |
| **total** | **383** |

The memory is extra, 64,000 bits. The original implementation reports 381
registers. The two extra flip-flops here are the valid flags of the
handshake.

The original implementation reached 63.81 MHz on a Cyclone IV FPGA. That
figure has not been re-checked for this RTL.

## Source of each decision

These points follow the original filter design:

* filter order 20, 21 taps
* 20 Hz low-pass Kaiser design and its coefficient values
* scaling of the coefficients by 2^16
* 16-bit unsigned samples and 32-bit products
* the register / multiplier / adder-chain structure, with output register Y
* a memory feeding the filter
* one output per 20 ns clock
* the 80 µs record time, and so 4000 samples

These are choices made for this implementation:

* the reset: synchronous, active high, clearing every register
* the `x_valid` / `y_valid` / `done` handshake and the enable on the sample registers
* the 32-bit width of the adder chain (only the product width is given)
* the combinational ROM read and the zero returned past the end of the record
* the counter stopping at the end of the record
* the whole synthetic default record, including its 500 Hz sample rate, beat
  shape and noise

The recorded ECG traces that the original design was run on are not included.
Load them through `INIT_FILE` to reproduce that use.

## Files

`rtl/`:

* `ecg_fir_pkg.sv`: widths, types and the coefficient table
* `tap_mac.sv`: one tap, multiply by a constant and add
* `tap_delay_line.sv`: the reg0..reg20 chain
* `fir_filter.sv`: the complete filter with output register
* `ecg_sample_rom.sv`: the record memory, file-loaded or synthetic
* `sample_address_counter.sv`: reads the record out, one sample per clock
* `ecg_fir_top.sv`: the top level

Every module's parameters default to the sizes above.

`tb/`: each testbench checks its results itself and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_tap_mac` | corner and random operands against 64-bit arithmetic |
| `tb_tap_delay_line` | random data with random enables against a history queue; reset |
| `tb_fir_filter` | impulse response (gives the coefficient table), full-scale step (settles at 65535²), Nyquist-rate square wave, random data with gaps; every output against a reference sum, exactly two edges after its input |
| `tb_fir_powerline_rejection` | sine gains at 5, 20, 50 and 60 Hz at 500 Hz sampling, and DC level |
| `tb_ecg_sample_rom` | file loading (`tb/ecg_rom_test.hex`), every synthetic sample against the formula, R peak position in every beat, reads past the end |
| `tb_sample_address_counter` | address sequence, 4000 valid cycles (80 µs), `done`, restart |
| `tb_ecg_fir_top` | the whole 4000-sample record at default parameters, see below |

`tb_ecg_fir_top` runs the whole record at the default parameters:

* It checks every Y against a reference built from the observed X_out.
* It checks that the record ends after 4000 clocks (80 µs at 20 ns).
* It checks that the output is smoother than the input: the summed squared
  step of `Y>>16` must be under a quarter of that of X_out. Measured: 386,866
  against 2,819,233.
* It runs the record a second time after a reset and checks that the
  results are identical.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl \
    rtl/ecg_fir_pkg.sv tb/tb_ecg_fir_top.sv --top-module tb_ecg_fir_top -o sim
./obj_dir/sim
```

Replace `tb_ecg_fir_top` with any other testbench name. The ROM test reads
`tb/ecg_rom_test.hex` by a relative path, so run it from the same directory.
Each simulation finishes in well under a second.

To filter a recorded ECG, write its samples as unsigned 16-bit hex, one per
line, and instantiate `ecg_fir_top` with `.INIT_FILE("<file>")` and
`.NUM_SAMPLES(<count>)`. To change the filter, override `COEFF` (and `NTAPS`)
on `fir_filter`. Keep the coefficient sum below 2^16, or widen `ACC_W`, so
that Y cannot overflow.
