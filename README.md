# Lamb-wave structural health monitoring front end with an embedded db4 wavelet transform

This RTL is the programmable-logic part of a structural health monitoring (SHM)
system for carbon-fibre composite plates. A piezoelectric transmitter in the
middle of the plate sends a short ultrasonic tone burst into the structure.
Four piezoelectric receivers at the corners pick up the guided (Lamb) waves.
Damage such as delamination or impact marks changes those waves.

The logic does three jobs:

- It generates the excitation burst and captures the four receiver channels in step with it.
- It stores every raw waveform and, next to it, a wavelet-filtered version computed in hardware while the samples stream in.
- It provides a small fixed-point classifier for feature vectors prepared by the processor: a linear SVM plus a Mahalanobis-distance outlier test.

The main idea is that feature extraction moves from offline software into the
acquisition path. A three-level Daubechies-4 (db4) discrete wavelet transform
runs on each channel at one sample per clock in 32-bit fixed point. It is
precise enough to replace a floating-point reference: in simulation, the mean
absolute error is about 2e-4 and the maximum is below 1e-3.

```
             start                                          rd_filtered/rd_ch/rd_addr
               |                                                      |
          +----v-----+  burst_start  +----------------+  dac_*        v
          | acq_ctrl |-------------->| tone_burst_gen |------->  +-----------+
          |   FSM    |               +----------------+          | read mux  |--> rd_data
          +----------+                                           +-----^-----+
   capture_en |  write addresses                                       |
              v                                                        |
 adc_*[c] -> stream_fifo --+--> sample_ram (raw, 2048 x 16)  ----------+
   (x4)                    |                                           |
                           +--> dwt_pipeline_full --> sample_ram (250 x 16)
                                 int_to_fixed (offset_elim)
                                 dwt_core_pipeline (3 x dwt_level)
                                 fixed_to_int

 feat/model --> svm_mahalanobis --> class, outlier, score, distance
```

## The wavelet block (`dwt_pipeline_full`)

Each receiver channel has its own DWT block with three streaming stages.
Stages pass data with a valid/ready handshake: a beat moves on a clock edge
where both are high. Every stage accepts one sample per clock without
bubbles, so the block runs at 100 MS/s with a 100 MHz clock.

### 1. `int_to_fixed`: offset removal and conversion

- The converters deliver unsigned 12-bit codes in a 16-bit word. Their mid-scale code, 2048, is the 1.25 V bias of the receiver front end.
- `offset_elim` subtracts 2048.
- The centred value is clamped to [-2048, 2047] and shifted into Q12.20: signed 32-bit, 12 integer bits, 20 fraction bits.
- The stage is an 8-register pipeline, so a sample leaves 8 clocks after it enters. The whole pipeline holds when its output is blocked.

The subtraction must happen before the conversion. A raw code above 2047
does not fit the 12 integer bits of Q12.20 until the offset is removed.

### 2. `dwt_core_pipeline`: three `dwt_level` stages

Each level keeps the last seven input samples. After every second sample,
once eight are available, it filters the 8-sample window with the db4
analysis low-pass filter `lo` and high-pass filter `hi`:

```
approx[k] = sum_{j=0..7} lo[j] * x[2k+7-j]
detail[k] = sum_{j=0..7} hi[j] * x[2k+7-j]
hi[j]     = (-1)^(j+1) * lo[7-j]
```

- Filtering and downsampling by two happen together, so only every other convolution output is computed.
- The eight `lo` taps are the standard db4 values, rounded to Q12.20. They are listed in `shm_pkg.sv`.
- All 16 products of a window are formed in parallel at full precision.
- The sum is truncated toward minus infinity back to Q12.20, then saturated.
- Level 2 takes the approximation output of level 1, and level 3 takes that of level 2.

There is no boundary extension: only windows that lie completely inside a
frame produce a coefficient. A frame of N samples therefore gives
(N-8)/2+1 coefficients. For the default frame of 2048 samples:

| level | input samples | coefficient pairs |
|-------|---------------|-------------------|
| 1     | 2048          | 1021              |
| 2     | 1021          | 507               |
| 3     | 507           | 250               |

Each level counts its own input samples and wraps after one frame, so
frames follow each other with no gap. `out_last` marks the final pair.
Consequences of streaming:

- The last level-3 coefficient depends on input sample 2041, not 2047.
- It leaves one register per level after that sample.
- Fed at one sample per clock, a frame's last coefficient comes out 2044 clocks after its first sample. The figure for the whole block is 2053 clocks.
- Fed at a converter rate of 1 MS/s, the block finishes 12 clocks after the sample that completes the last window.

The level-1 and level-2 detail coefficients are computed by the shared level
module and then dropped.

### 3. `fixed_to_int`: export as int16

Level-3 coefficients become int16 as `floor(x * 16)`, saturated. The result
keeps 4 fraction bits, and the full Q12.20 range of ±2048 just fits.

`OUT_DETAIL` selects the band that is exported:

- 0, the default: the level-3 approximation. This is the low-pass band that holds the 15 kHz excitation, with high-frequency noise removed.
- 1: the level-3 detail band.

### Number format and precision

All arithmetic is Q12.20. Products are truncated and overflow saturates.
Saturation only matters for an input at full scale, because the worst-case
gain of the low-pass filter is 1.87 per level. The error against a
double-precision reference comes almost entirely from rounding the
coefficients to 20 fraction bits. It grows with signal amplitude. For
signals of a few hundred codes, the testbench measures a mean of about
0.0002 and a maximum of about 0.0008 at level 3. It requires the mean to stay
below 0.0003 and the maximum below 0.0014.

## One acquisition (`acq_ctrl`, `shm_top`)

1. The processor pulses `start`. `acq_ctrl` pulses `burst_start` and opens the capture gates of all four channels on the same clock. The captured waveforms are therefore aligned to the excitation.
2. Each gate admits exactly `N_SAMPLES` converter strobes into the channel's `stream_fifo`, then closes on its own.
3. Every sample that leaves the FIFO is written to the channel's raw `sample_ram` and enters its DWT block. The DWT coefficients are written to the channel's filtered `sample_ram`. The write addresses are kept by `acq_ctrl`.
4. `acq_ctrl` pulses `done` and drops `busy` when three things are true: every raw buffer is full, every DWT block has delivered its last coefficient, and the burst has ended. A `start` while `busy` is ignored.
5. The processor reads the buffers. `rd_filtered` selects raw (0) or filtered (1), `rd_ch` selects the channel and `rd_addr` the word. `rd_data` appears one clock later, so a new request can be issued every clock. Filtered buffers use the low 8 address bits.

The DWT path never stalls, so a FIFO holds at most one sample at a time.

## Excitation burst (`tone_burst_gen`, `cordic_sin`)

The burst is 3.5 cycles of 15 kHz with a Hann window:

```
s[n] = 2048 + 2047 * sin(2*pi*15e3*n/1e6) * sin^2(pi*n/233),   n = 0..232
```

- It is sent as 12-bit offset-binary codes at 1 MS/s, one `dac_valid` strobe every 100 clocks.
- Two 32-bit phase accumulators, one for the carrier and one for the half-angle of the window, share one iterative 16-step CORDIC. The CORDIC needs 17 clocks per sine.
- The two sines of a sample are computed one after the other, well within the 100-clock sample period.
- When idle, the output rests at mid-scale.

## Classifier (`svm_mahalanobis`)

Given `N_FEAT` features `x` and a model loaded on its ports, the classifier computes:

```
score = b + w . x                 class   = score >= 0
dist2 = (x - mu)^T S (x - mu)     outlier = dist2 > threshold
```

The model is `w`, `b`, mean `mu`, inverse covariance `S` and `threshold`. A
sample flagged as outlier should not be given a class. The arithmetic uses
one multiply-accumulate per clock in Q12.20. The latency is fixed at
2 + N_FEAT + N_FEAT² clocks (22 for four features) from `start` to `done`.
The feature vector comes from a PCA projection computed outside the logic,
and the model is trained offline.

## Top-level ports (`shm_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock (100 MHz nominal); asynchronous active-low reset |
| `start` / `busy` / `done` | in / out / out | start an acquisition; running; complete (one-clock pulse) |
| `adc_valid[4]`, `adc_data[4]` | in | per-channel converter strobe and uint16 sample (12-bit code) |
| `dac_valid`, `dac_data[11:0]` | out | burst sample strobe and code |
| `rd_filtered`, `rd_ch[1:0]`, `rd_addr[10:0]` | in | buffer read request |
| `rd_data[15:0]` | out | raw uint16 or filtered int16 word, one clock after the request |
| `svm_start`, `feat`, `svm_w`, `svm_bias`, `maha_mu`, `maha_sinv`, `maha_threshold` | in | classifier start, features and model (Q12.20) |
| `svm_busy`, `svm_done`, `svm_class`, `svm_outlier`, `svm_score`, `maha_dist2` | out | classifier results |

Parameters of `shm_top`:

| parameter | default | meaning |
|-----------|---------|---------|
| `N_SAMPLES` | 2048 | samples per channel and acquisition |
| `FIFO_DEPTH` | 16 | depth of each channel FIFO |
| `N_FEAT` | 4 | classifier feature count |
| `CLK_HZ` | 100 MHz | clock |
| `DAC_HZ` | 1 MHz | burst sample rate |
| `TONE_HZ` | 15 kHz | burst frequency |

The number of channels, 4, is `shm_pkg::N_CH`. Changing `N_SAMPLES` changes
the coefficient counts through `shm_pkg::dwt_out_len`.

## What is outside this RTL, and where it departs from the original system

Not included:

- The ARM processor and its AXI connection. They are replaced by the plain `start`/`busy`/`done`, read and classifier ports. No register map is defined.
- The serial links to the converter chips. The converters appear as parallel words with a strobe.
- The analog filters and amplifiers, the transducers, and the host software.

The following were not specified for the original system, and the choices
here are this design's own:

- the frame length of 2048 samples
- the Hann window, DAC rate and DAC code format
- the FIFO depth
- the int16 scale factor
- saturation instead of wrap-around
- the classifier's feature count, number format and schedule
- the FSM's states
- all handshakes

Known differences:

- **Coefficient counts.** The original DWT reports 1022, 508 and 250 outputs for the three levels. This design gives 1021, 507 and 250. The level-3 count, which is what is exported, matches.
- **Latency.** The original reports 2038 clocks for the DWT block as a sum of per-stage figures, and elsewhere 568 clocks (5.68 µs). The two figures disagree. Here the levels overlap: see the timing above.
- **Band naming.** The original calls the exported data "D3" and also describes it as noise-suppressing low-pass output. The default here is the level-3 approximation, and `OUT_DETAIL = 1` gives the detail band.
- **One DWT block per channel.** The original diagram shows a single block.
- **Resources.** Each channel performs 48 constant-coefficient 32-bit multiplications per clock, which is far more than the 16 DSP slices the original reports. Fitting the same device would need the constant multiplications mapped to logic, or multipliers time-shared in levels 2 and 3, which only produce a result every 4 and 8 input samples.

## Files

- `rtl/shm_pkg.sv`: Q12.20 type, db4 coefficients, saturation, and the output-length function.
- `rtl/*.sv`: one module per file. The names match the blocks above.
- `tb/tb_<module>.sv`: a self-checking testbench per module. Each prints `TB_RESULT checks=N failures=M`.
- `tb/tb_ref_pkg.sv`: floating-point db4 reference shared by the testbenches.
- `tb/tb_shm_top.sv`: two acquisitions at full default size. It checks every raw and filtered word with pipelined reads, the burst, the done timing, and all four classifier outcomes.
- `tb/tb_campaign.sv`: a full test case of 34 acquisitions and 136 waveforms. It takes about a minute.

## Simulating

Each testbench is self-contained. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/shm_pkg.sv tb/tb_ref_pkg.sv $(ls rtl/*.sv | grep -v shm_pkg) \
  tb/tb_shm_top.sv --top-module tb_shm_top -o sim
./obj_dir/sim
```

The package is listed first and only once.

Use the same command with `tb_dwt_pipeline_full`, `tb_dwt_level` and the
other testbenches. For a block-level testbench, list only the package files
and the modules it uses, or all of `rtl/`. Lint with
`verilator --lint-only -Wall -Irtl rtl/shm_pkg.sv rtl/<module>.sv`. The
remaining lint warnings are unused signals: level-1 and level-2 detail
outputs, and flags that are not needed at the top.
