# ALTRO: a 16-channel digitiser and pulse processor for gas detectors

ALTRO is a front-end readout chip for gas detectors such as a time projection chamber. Sixteen analog inputs, each carrying a train of shaped pulses on a common baseline, are sampled by 10-bit ADCs. Each channel then cleans its stream in a pipelined processor:

- remove the slow baseline and systematic patterns;
- cancel the long ion tails of the pulses;
- restore the baseline again;
- throw away everything below a threshold.

What survives is stored as labelled clusters in a per-channel multi-event memory. A Level-1 trigger starts an acquisition of a programmed number of samples. A Level-2 trigger keeps (freezes) it; otherwise the next acquisition overwrites it. Frozen events are read out over a 40-bit bus on a readout clock that is independent of the sampling clock.

This repository is a synthesizable SystemVerilog model of the digital part of the chip. The ADC is a behavioural model. Everything runs at its real size: 16 channels, 1K x 10 pattern memories and 1024 x 40 data memories.

## Signal path of one channel

```
 vin/vinb -> ADC -> BC1 -> TCF -> BC2 -> ZS -> DF -> data memory (1024 x 40)
            5.5     3      1      6     11    packs     read on rclk
```

Latencies are in sampling clocks. The processor (BC1 input to DF input) takes 21 cycles.

**ADC (`altro_adc`, behavioural).**
- A pipelined converter: eight 1.5-bit stages and a final 1-bit stage, followed by the usual redundant-bit digital correction.
- The input is differential. `(vin - vinb) / (vrefp - vrefm)` from -1 to +1 maps onto codes 0..1023.
- The code appears 5.5 clocks after sampling. The input is sampled on the rising edge and the output changes on the falling edge.
- Noise, bandwidth and power are not modelled, and the common-mode input is not used.

**Baseline Correction I (`altro_bc1`).** This stage computes `dout = plus - minus`, saturated to 11-bit two's complement. A 7-bit configuration word chooses the operands:
- polarity inversion of the ADC code;
- the `plus` operand: the sample, the sample minus the self-calibrated pedestal `vpd`, or the pattern memory output. The last makes the memory a look-up table, for gain equalisation or non-linearity correction.
- the `minus` operand: a fixed pedestal `fpd` or the pattern memory output. The memory output removes systematic spurious signals, and the memory can also inject a test pattern.
- the memory address: the sample time within the acquisition, or the sample value itself.
- power save: outside the acquisition, the memory is not read and the output is 0.

The self-calibration runs only outside acquisitions. It is an exponential average with time constant 32 samples, and it is frozen while an acquisition runs, so the whole event is corrected with the same value.

**Tail Cancellation Filter (`altro_tcf`).**
- Three first-order sections in cascade, each `w[n] = x[n] + K w[n-1]` and `y[n] = w[n] - L w[n-1]`, so each section has the response `(1 - L z^-1)/(1 - K z^-1)`.
- A pulse whose tail is a sum of exponentials with ratios `L1..L3` is turned into a short pulse when the zeros `L` sit on the tail's poles. The poles `K` then set the remaining shape.
- Coefficients are unsigned 16-bit fractions (value / 65536).
- The arithmetic is 18 bits: the 11-bit input gets 7 fraction bits. Every section saturates. The output is rounded and saturated back to 11 bits.
- Latency: one clock.

**Baseline Correction II (`altro_bc2`).** This stage removes non-systematic baseline movement, such as pick-up.
- It keeps an estimate `bsl`: the average of the last eight samples that fell strictly inside `bsl - thr_lo .. bsl + thr_hi`.
- Samples outside this window (pulses) do not enter the average. Neither do `pre` (0..3) samples before and `post` (0..15) samples after any out-of-window sample. The decision is taken four samples ahead of the averaging point, which is what makes pre-sample exclusion possible.
- Each sample is corrected with `bsl`, a programmable offset is added, and the result is clipped to 0..1023.
- Two start-up rules, both this design's own:
  - After reset, every sample is averaged until eight in a row have fallen inside the window. This converges quickly.
  - If 256 samples in a row fall outside the window, that start-up is run again. Without this rule, a step in the input level (for example after BC1 is reconfigured) would leave the window stranded and the estimate frozen forever.
- Latency: six clocks.

**Zero Suppression (`altro_zs`).** This stage only flags samples to keep and delays the data to match (latency 11). A sample is kept when any of the following holds:
- it is `>= thr` and belongs to a run of at least `glitch+1` (1..4) such samples, so isolated spikes are dropped;
- it lies within `pre` (0..3) samples before such a run, or `post` (0..7) samples after it;
- it fills a gap of one or two samples between two kept sets. Every cluster costs two extra words, so merging is never worse.

With suppression disabled, every sample is kept.

**Data Format (`altro_df`).** Kept samples are grouped into clusters and packed four 10-bit words per 40-bit memory word. The first word goes in bits 9:0. The block of one channel for one event looks like this, in memory order:

```
  s s s ... s  T  N     (cluster 1: samples oldest first, T = time of the last sample, N = samples + 2)
  s ... s  T  N         (cluster 2)
  ...
  0x2AA ...             (stuffing to complete the last 40-bit word)
  trailer: [39:26] 0x2AAA  [25:16] 10-bit word count (without stuffing)  [15:12] 0xA
           [11:4] chip address  [3:0] channel
```

The block is meant to be read backwards:
1. The trailer gives the word count `n`.
2. Word `n-1` is the last cluster's size `N`, and word `n-2` its time stamp.
3. The `N-2` samples before those end at that time. Step back `N` words to reach the previous cluster's size.

Time stamps count samples from the start of the acquisition window, pre-trigger samples included.

If a block would overflow its buffer, clusters that do not fit with the trailer are dropped and `ovf` is raised. The block still ends with a valid trailer. The trailer is written two to six clocks after the window closes.

## Triggers, buffers and the acquisition window

**Trigger manager (`altro_trigman`).** L1 is taken on its rising edge. It is ignored while an acquisition runs or while the memory is full.
- The window is aligned so that its first sample is the one the ADC outputs after the trigger. This is the sample taken about five clocks before the trigger, because the ADC latency is not compensated.
- `pretrig` (0..15) moves the window earlier. `delay` moves it later.
- The manager drives:
  - the BC1 acquisition flag and the sample time, which address the pattern memory and freeze the self-calibration;
  - 21 cycles later, the window at the data format input.
- `nsamples` (10 bits) sets the length. The acquisition counts as busy until 10 clocks after the window, which leaves time for the trailer.

**Memory manager (`altro_memman`).** The data memory of every channel is split into 4 buffers of 256 words or 8 of 128 words. All channels use the same buffer for the same event.
- Acquisitions go into the buffers in ring order.
- An L2 freezes an event: either an L2 during its acquisition, or one after it while it is still the most recent.
- An unfrozen event is overwritten by the next acquisition.
- When every buffer holds a frozen event, `full` rises and L1 is ignored.
- The manager stores each channel's block length per buffer, so readout runs forward from the buffer base.
- A release command frees the oldest frozen event.

Four 1000-sample acquisitions without zero suppression fit the 4-buffer mode: 1002 words make 251 memory words, plus the trailer, out of 256. The 8-buffer mode holds up to 506 unsuppressed samples per event.

## Bus, registers and commands

The chip is a slave on a 40-bit bus. It has two clocks:
- `sclk` samples and processes;
- `rclk` runs the bus, the registers and the readout.

A transaction goes as follows:
1. The master puts an address word on `bd_in`, sets `write`, and raises `cstb`. The address word is: bit 39 broadcast, 38:31 chip address, 30:27 channel, 26:20 code, 19:0 data.
2. The chip answers with `ackn` and keeps it until `cstb` falls.
3. A register read returns the value on `bd_out[19:0]`, with `bd_oe` high, while `ackn` is high.

Broadcast writes reach all channels' per-channel registers and pattern memories.

| code | name | content |
|---|---|---|
| 00..05 | K1 K2 K3 L1 L2 L3 | per channel, 16-bit filter coefficients |
| 06 | VFPD | per channel, fixed pedestal (10 bits) |
| 07 | PMADD | pattern memory address |
| 08 | PMDTA | pattern memory data; the write stores at PMADD and advances it |
| 09 | VPD | read only: the channel's self-calibrated pedestal |
| 0A | BC1CFG | [6] polarity, [5] address = time, [4] address uses din-vpd, [3] plus = memory, [2] plus uses din-vpd, [1] minus = memory, [0] power save |
| 0B | BC2THR | [19:10] thr_hi, [9:0] thr_lo |
| 0C | BC2CFG | [16] enable, [15:12] post, [11:10] pre, [9:0] offset |
| 0D | ZSTHR | [9:0] threshold |
| 0E | ZSCFG | [7:5] post, [4:3] pre, [2:1] glitch, [0] enable |
| 0F | TRCFG | [19:10] trigger delay, [9:0] samples |
| 10 | BUFCFG | [4] 8 buffers, [3:0] pre-trigger samples |
| 11 | STATUS | read only: [17:12] double flips, [11:6] single flips, [5] empty, [4] full, [3:0] stored events |
| 1A | CHRDO | read out the addressed channel's block of the oldest frozen event |
| 1B | RPINC | release the oldest frozen event |
| 1C | SWTRG | software Level-1 trigger |
| 1D | L2 | software Level-2 trigger |
| 1E | ERCLR | clear the bit-flip counters |

How `CHRDO` reads a block:
- After the acknowledge, the chip drives the block one 40-bit word per `rclk` cycle with `dstb` high. `trsf` stays high for the whole transfer.
- While an acquisition runs, the readout pauses and then resumes, so the bus is quiet during sampling.
- At 60 MHz this is 300 MB/s.

The registers are not synchronised to `sclk`. Change them only while no acquisition runs.

## Protected bus state machine

The bus transaction machine (`altro_hamming_fsm`) has three states: idle, wait and done. They are coded in 6 bits at Hamming distance 3 from each other (000000, 000111, 011001). The decoder then handles bit flips as follows:
- **One flipped bit** (distance 1 from a state) is read as that state. The next clock goes where the inputs would have sent that state, so the transaction continues. The event is counted as a single error.
- **Two flipped bits** give a code that belongs to no state. The machine aborts to idle and counts a double error.

Both counters are in STATUS. The `seu_flip` input XORs bits into the state register so flips can be injected in test. The configuration registers, memories and datapath are not protected.

In the original chip, the machines that allocate the data memory are protected the same way. Here they are not: the memory manager's buffer pointers and event count are plain registers.

## What follows the original chip and what does not

These follow the chip:
- the channel count and the ADC architecture and latency;
- the order and the function of the processing stages;
- the 18-bit three-section filter with six coefficients;
- the 8-tap double-threshold baseline restorer with pre/post exclusion and start-up convergence;
- zero suppression with glitch filter, pre/post samples and merging of sets closer than three samples;
- the cluster format (samples, time of the last sample, size including itself) and 40-bit packing with stuffing and a trailer;
- the 1K x 10 pattern memory and the 1024 x 40 memory in 4 or 8 buffers;
- the L1/L2 freeze-or-overwrite rule and the full signal;
- up to 15 pre-trigger samples and a trigger delay;
- readout pausing during acquisitions;
- the Hamming-protected state machine.

These are this design's own choices:
- the register map;
- the bus handshake;
- the trailer's bit layout and the stuffing value;
- the form of the filter sections and the coefficient format;
- the self-calibration time constant;
- the start-up rules of BC2, including the 256-sample re-start;
- the ranges of pre/post/glitch;
- the L2 timing window;
- the software trigger and L2 commands;
- the state codes.

Differences from the original timing:
- The original states a processor latency of 18 clocks. Here it is 21, because BC1 takes 3 clocks instead of 1.5 and the data format has its own timing. The trigger manager is aligned to 21, so the acquisition window and pre-trigger behaviour are unchanged as seen from outside.
- The data format writes its trailer 2-6 clocks after the window, not at a fixed 2.
- Only the bus transaction machine is Hamming-coded (see above).

## Files and simulation

`rtl/`:
- `altro.sv` is the top.
- `altro_channel.sv` is one channel.
- `altro_pkg.sv` holds the types, the constants, the bus codes and the format constants.
- Each other block is in a file of its own name. `altro_tgl_sync.sv` moves command pulses between the clocks.

`tb/` has a self-checking testbench per block (`tb_<module>.sv`). Each prints `TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/altro_pkg.sv tb/tb_altro_bc2.sv \
          --top-module tb_altro_bc2 -Mdir obj_bc2
./obj_bc2/Vtb_altro_bc2 +verilator+rand+reset+2
```

`tb/tb_altro.sv` runs the full-size chip end to end in under a second of simulation wall time. The test does the following:
- configures everything over the bus and loads the pattern memories;
- drives analog pulses into all 16 inputs, with special pulses on some channels: a tail to cancel, a systematic bump, a glitch, pulse pairs that merge or do not;
- runs L1/L2, a software trigger, overwrite, full, release, a readout paused by a trigger, 8-buffer mode and injected bit flips;
- decodes every channel of every frozen event backwards from its trailer, checking cluster counts, peak heights (within 4 counts) and peak time stamps;
- counts each mechanism and fails if one never happened.

`tb/tb_altro_workloads.sv` runs the memory sizing on the full-size chip. With baseline correction II and zero suppression off, it checks every stored sample exactly against the analog input. It runs two workloads:
- four 1000-sample events in the 4-buffer mode;
- eight 500-sample events in the 8-buffer mode.

It also checks that, while the window is open, a channel writes its memory at most once every four sampling clocks.

Limits:
- The ADC model is ideal.
- The cross-clock paths rely on the quasi-static configuration rule above.
- There is no protection of the data path against bit flips, matching the original.
