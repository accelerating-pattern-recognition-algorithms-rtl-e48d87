# FPGA accelerators for fingerprint correlation and spiking-neuron character recognition

This RTL holds two independent pattern-recognition engines built for an
FPGA next to a host processor and a few banks of off-chip SRAM:

* **Fingerprint correlator.** It compares probe fingerprint images with a
  gallery of stored samples using an optical-style *phase-only filter* (POF).
  It does this in the frequency domain: C = FFT2( FFT2(probe) · conj(G)/|G| ),
  where G = FFT2(gallery). Each probe's best match is the gallery sample with
  the highest correlation peak.
* **Spiking neural network (SNN) recogniser.** It is a two-level network of
  Izhikevich neurons. Level 1 has one neuron per input pixel. Level 2 has one
  neuron per character class. The input is a binary character image; the
  class is the level-2 neuron that fires first.

The top level, `pr_accel_top`, places both side by side. They share only
clock and reset. All signals of the parts outside the FPGA are brought out as
ports: the DMA engine, the host interface and the SRAM chips.

## Fingerprint correlator

### Dataflow
Each 2-D FFT is a pass over the rows followed by a pass over the columns.
Correlating one probe/gallery pair therefore takes four FFT phases:

| phase | work | result buffer |
|-------|------|---------------|
| 1a | row FFT of probe (buffer `gn`) and of gallery (buffer `fn`), 8-bit pixels in | `mb0`, 16-bit complex |
| 1b | column FFT of both → F, G; P = F·conj(G)/\|G\|; FFT shift | `mb1`, 36-bit complex |
| 2a | row FFT of the 24 MSBs of `mb1` | `mb2` |
| 2b | column FFT of the 24 MSBs of `mb2`, streamed into the peak detector | best-match table |

`fp_core` runs these in two alternating slots:
* **Slot A** executes 1a of pair *t* together with 2a of pair *t−1*.
* **Slot B** executes 1b of pair *t* together with 2b of pair *t−1*.

During slot B the input buffers `gn`/`fn` are idle, so the images of pair
*t+1* are fetched from SRAM then. Memory latency is hidden behind computation.

Pairs are processed probe-fastest: every probe against gallery 0, then every
probe against gallery 1, and so on. Each gallery image is therefore fetched
once, and each probe once per gallery sample.

A slot ends when all of its units are done. A slot lasts one 128-line FFT pass:
128 × (2·128 + 64·7) = 90,112 clocks. A pair costs two slots, so about
180k clocks.

### Units
* **`fp_fft`**: a radix-2 burst FFT of one line, written for this design.
  * It loads N samples, runs (N/2)·log2N butterflies at one per clock, then
    unloads N samples in natural order.
  * Its output is not scaled: it grows by log2N bits.
  * Twiddles (18 bits, 16 fraction bits) are computed at elaboration.
  * `fp_pass` wraps it to walk all rows or all columns of a plane.
* **`fp_pof_mult`**: the filter and multiply are done as one CORDIC pipeline.
  * G is driven onto the real axis by 16 micro-rotations.
  * F gets exactly the same rotations, so it ends multiplied by e^{-j·arg G}.
    This equals conj(G)/|G| with no divider or square root.
  * A final constant multiply removes the CORDIC gain.
  * The result has 12 fraction bits in 36 bits.
  * Latency is 18 clocks at one bin per clock.
* **FFT shift**: applied by swapping quadrants on the write address into
  `mb1` (the MSB of row and column is inverted).
* **`fp_peak`**: forms re²+im² of every final output.
  * It keeps the running maximum with its coordinates.
  * At the end of each plane it updates a per-probe best-match table: squared
    amplitude, row, column and gallery index. The host reads this table after
    the run.
* **`fp_buffer`**: a simple dual-port RAM with synchronous read, used for all
  six buffers.

### Memory banks and the arbiter (`fp_arbiter`)
The three SRAM banks have these roles:
* Banks 0 and 1 hold gallery samples, 256 images each.
* Bank 2 holds up to 256 probes.
* An image is 2048 64-bit words of eight pixels.
* Gallery sample *g* lives in bank (g/256) mod 2, at slot g mod 256.

This lets a gallery of any length stream through two banks. The host refills
one bank while the core works from the other, using this handshake:

1. The host fills a bank by DMA and pulses `bank_loaded`. The bank's
   `bank_ready` bit is set.
2. The core reads a gallery image only from a ready bank. Otherwise it waits.
3. When the core fetches the first image of the next bank, it releases the
   previous one (`gal_release`). At the end of a run it releases the last one.

The core's reads always have priority. DMA writes are held off (`dma_ready`
low) in four cases:
* the bank is a ready gallery bank;
* the bank is the probe bank and a run is in progress;
* the bank is being read in the same clock;
* the bank is the unused fourth bank.

### Accuracy
* Phase 1 keeps the top 16 of 23 bits.
* Phase 2 keeps the top 24 bits of the 36-bit product.
* On 16×16 test images, the peak position always matches a double-precision
  model. The squared peak amplitude is within 0.1 % of the model.
* The second transform is a forward FFT. Relative to an inverse FFT, this
  mirrors the correlation plane: the peak's coordinates are mirrored, but its
  height is the same.

## SNN recogniser

### Network and arithmetic
* **Neurons.** Izhikevich neurons with a 1 ms step, in Q.12 fixed point
  (32-bit state):
  * V' = V + (0.04V² + 5V + 140 − u + I)/2
  * u' = u + a(bV − u)
  * If V' ≥ 30 mV, the neuron fires: V' = c and u' += d.
  * Level 1 uses excitatory parameters (a=.02, b=.2, c=−55, d=4).
  * Level 2 uses inhibitory parameters (a=.06, b=.22, c=−65, d=2).
  * Every neuron starts at V = −65 mV, u = bV.
* **Input.** An "on" pixel drives its level-1 neuron with a constant current
  of 20.
* **Recognition cycle.** One cycle updates every neuron once.
  * Then each level-2 neuron j receives I_j = Σ w(i,j) over the level-1
    neurons i that fired in that cycle.
  * The first level-2 neuron to fire gives the class.
  * If none fires within 12 cycles, the run ends without a recognition.

### Hardware
* **`snn_pe`**: one processing element.
  * It stores V, u, I for its block of neurons, about 369 of them, in local
    memory.
  * It streams them through a 23-stage pipeline, one neuron per clock. Each
    result is written back 23 clocks after the read.
  * Every neuron that fires is appended to the PE's local firing vector, and
    the PE's `fired` flag is set.
* **`snn_module`**: 25 level-1 PEs (9216 neurons, 96×96 pixels) and one
  level-2 PE (48 neurons), plus the two blocks below.
* **`snn_l2_current`**: reads the firing vectors over a shared bus.
  * It visits the level-1 PEs round robin and skips those whose flag is clear.
  * For each fired index it requests the 12 SRAM words holding that neuron's
    48 weights, one request per clock. Weights are 16-bit Q4.12, four per
    64-bit word.
  * The weight SRAM answers after 11 clocks. The module accumulates the 48
    currents and writes them into the level-2 PE.
* **`snn_ctrl`**: the controller sequence is initialise → sweep all PEs →
  look at the level-2 flag → stream weights → next cycle. It stops on a
  level-2 firing or after 12 cycles.

### Timing
* A sweep takes about 369 + 25 clocks.
* Weight streaming costs 12 clocks per level-1 spike.
* The 24×24 network (N1=576, N_PE=6) recognises the test characters in cycle
  8. That takes about 5,000 clocks, 26 µs at 199 MHz.
* The 96×96 network's run time is set mostly by the number of level-1 spikes.
  With test images that are half "on", it needs tens of thousands of clocks.

## What is this design's own

These points are not fixed by the method and were chosen here:
* the FFT architecture;
* the CORDIC form of the filter;
* the squared magnitude used as the peak measure;
* the per-probe result table;
* the bank ready/release handshake and DMA priority rules;
* one 24-bit FFT unit each for phases 2a and 2b;
* the Q formats, pipeline stage split, initial state and input current of the
  SNN;
* the weight packing order in SRAM;
* the block split of neurons over PEs.

Timing differs from the original hardware in two ways:
* The original FFT cores streamed continuously, so its slots were shorter than
  the burst FFT's.
* The SNN timings depend on the weights and images used. Only synthetic
  templates (hash-generated characters with ±α weights) were used here.

## Parameters (defaults)

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `pr_accel_top`, `fp_core` | `FP_N` / `N` | 128 | image side |
| | `FP_PRB_W` / `PRB_W` | 8 | probe index bits (256 probes) |
| | `FP_GAL_W` / `GAL_W` | 13 | gallery index bits (up to 8191 samples) |
| | `FP_BANK_IMGS` / `BANK_IMGS` | 256 | images per SRAM bank |
| `pr_accel_top`, `snn_module` | `SNN_N1` / `N1` | 9216 | level-1 neurons (pixels) |
| | `SNN_N2` / `N2` | 48 | classes |
| | `SNN_N_PE` / `N_PE` | 25 | level-1 PEs |
| | `SNN_MAX_CYC` / `MAX_CYCLES` | 12 | cycle limit |

The smaller SNN network is `N1=576, N_PE=6`.

## Simulation

Every file in `tb/` is a self-checking testbench (or a model or package it
uses). Each one prints `TB_RESULT checks=… failures=…` at the end. With plain
Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fp_pkg.sv rtl/snn_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_snn_ref_pkg.sv \
  tb/tb_pr_accel_top.sv --top-module tb_pr_accel_top
./obj_dir/Vtb_pr_accel_top
```

| testbench | what it covers |
|-----------|----------------|
| `tb_fp_fft` | 32-point FFT against a DFT, clocks per line |
| `tb_fp_pof_mult` | filter product against a real-valued model, 18-clock latency |
| `tb_fp_peak`, `tb_fp_buffer`, `tb_fp_arbiter` | peak/table, RAM, bank mapping and DMA hold-off rules |
| `tb_fp_core` | 16×16 correlation of 2 probes × 3 gallery samples, fetch counts, run length |
| `tb_fp_system` | 16×16, 10 gallery samples through 4-image banks with a refill during the run |
| `tb_snn_pe`, `tb_snn_l2_current`, `tb_snn_ctrl` | neuron update against an integer model, 23-clock latency, weight streaming, 12-cycle limit |
| `tb_snn_module` | 24×24 network recognising three characters against a full network model |
| `tb_pr_accel_top` | both engines running at the same time at reduced size |

There is no simulation of the whole top at its default parameters. The largest
sizes simulated were:
* the SNN at full network-two size (`tb_snn_module` with `N1=9216, N_PE=25`).
  Characters 5, 0 and 47 were recognised in cycles 7–8, about 60,000 clocks
  each, 0.30 ms at 198 MHz.
* the correlator at 16×16 pixels. At 128×128 it builds, but one pair takes
  about 180k clocks.

`tb_pr_accel_top` counts every mechanism and fails if one never occurs:
* phase overlap;
* prefetch;
* bank release;
* bank wait;
* DMA hold-off;
* weight streaming;
* recognition;
* time-out.

The SRAMs are behavioural models in `tb/`: three 64-bit banks with 4-clock
latency for the correlator, and an 11-clock weight SRAM for the SNN.
