# 16-channel EEG/ECoG sensor processor

A brain sensor that records 16 EEG or ECoG channels cannot afford to stream raw
data off the chip. This design does the analysis on the chip. It filters the
channels, extracts a feature vector ten times a second, shrinks that vector,
and runs a small program on it. The program decides what leaves the chip: the
features or only a decision, such as "seizure onset detected".

The SystemVerilog covers the whole digital part of the sensor:

- the **acquisition controller** that sequences the shared analog front end;
- the **DEEP** processor (digital EEG/ECoG processor), organised as three
  pipelines.

The analog blocks are not modelled. These are the 16 chopper LNAs, the
multiplexer, the PGA, the Gm-C low-pass filter and the 9-bit SAR ADC. Their
digital connections are ports of the top module `sbs_soc`.

```
 adc_data[8:0] ─► raw_regs ─► temporal_fir ─► spatial_filter ─► filt_buf      (PP)
                                                                   │ snapshot
       ┌───────────────┬──────────────┬──────────────┬─────────────┤
   temporal_alu    xcorr_unit   spectrum_unit      ci_unit                   (FE)
   energy,var      x-corr       FFT band ratio     corr. integral
       └───────────────┴──────┬───────┴──────────────┘
                       80 features ─► dim_reduce (1 MAC) ─► 4 values
                              │                                │
                              └──────► risc data SRAM ◄────────┘             (CD)
                                       risc program ─► out_data
 local_ctrl: 10 iterations/s, FE → DR → write-back → RISC      config_regs: all coefficients
 asac_ctrl: slot timing, mux channel, LNA power, PGA gain
```

## Timing: one clock, one sample slot every 12 clocks

The system clock is 49.152 kHz. The 16 channels are each sampled at 256 Hz,
which gives 4096 samples/s in total. `asac_ctrl` divides the clock by 12, so
each sample slot is 12 clocks long. In each slot it:

- selects the next multiplexer channel (`ch_sel`);
- powers only that channel's LNA (`lna_pc` is one-hot);
- pulses `adc_start` on the first clock;
- pulses the sample strobe to the DEEP on the 12th clock, together with a
  channel-one flag when channel 0 is converted.

The DEEP runs on the same clock and takes one sample per strobe. In the
original system the processor has its own 4.096 kHz clock. That clock leaves
only about 410 cycles per feature iteration, which is too few for feature
units shared by 16 channels. So here the processor runs on the fast clock and
is gated by the strobe. This is the main departure from the original system.
It leaves 4915 clocks per iteration.

## Channel folding in the pre-processing (PP) pipeline

**Sample history.** All channels share one 32-tap FIR core. `raw_regs` is a
512-stage shift register that samples enter in channel order. Stage
`16*j + 15` always holds the current channel's sample from `j` frames ago. So
32 fixed taps give the FIR the history of whichever channel just arrived,
without any addressing. ADC codes are offset binary and are turned into two's
complement by inverting the MSB.

**Temporal FIR.** `temporal_fir` multiplies the 32 taps by the coefficients
a1..a32. It then shifts the sum right by `fir_shift` and saturates it to 16
bits. Its output is registered.

**Spatial filter.** `spatial_filter` computes `y[o] = Σ_i W[o][i]·x[i] >> sp_shift`,
where W is a 16×16 weight matrix. It collects one full frame, that is, one
sample of every channel. During the next frame, each incoming sample triggers
one output channel, computed with 16 multipliers. The latency is therefore one
frame (16 slots).

**Filtered-data buffer.** `filt_buf` keeps a ring of 2·WIN = 64 samples per
channel. At each iteration start it freezes the base pointer. The feature
units then read a stable window of the last WIN = 32 samples while new samples
keep arriving. An iteration always ends within 26 frames, so the frozen window
is never overwritten.

## Feature extraction (FE): one iteration

`local_ctrl` adds 10 to a phase accumulator after every frame, modulo 256.
Each wrap starts an iteration, so there are exactly 10 iterations per 256
frames (one second). The gaps alternate between 25 and 26 frames.

An iteration takes these steps:

1. **FE.** The four units start together. Each walks through the channels in
   turn and reads its own port of the frozen window:

   | unit | result per channel | clocks per channel |
   |---|---|---|
   | `temporal_alu` | energy `Σx²/W`, variance `Σx²/W − (Σx/W)²` | 32 |
   | `xcorr_unit` | `Σ x_c·x_p / W`, where p is the programmed partner of channel c | 32 |
   | `spectrum_unit` | 32-point radix-2 FFT, then band power (bins band_lo..band_hi) divided by total power (bins 1..16), as Q0.15 | 145 |
   | `ci_unit` | correlation integral: the last 16 samples are embedded in 2-D (`(x[n], x[n+1])`), and the unit counts the pairs whose Chebyshev distance is below `radius` | 121 |

   - The FFT does one butterfly per clock with Q14 twiddles and halves each
     stage to avoid overflow. Band and total power are accumulated from the
     squared magnitudes. A restoring divider forms the ratio.
   - Each feature is shifted by its own programmable shift and saturated to a
     16-bit word. The band ratio and the CI count are not shifted.
   - The spectrum unit is the slowest. It sets the FE time at 16 × 145 = 2320
     clocks.
2. **DR.** `dim_reduce` runs one MAC over the 80 features for each of the 4
   output axes. That takes 320 clocks. The weights come from configuration and
   are, for example, PCA axes trained offline.
3. **Write-back.** 84 words are written into the RISC data SRAM. Word `5c+k`
   holds channel c's features, with k = 0 energy, 1 variance,
   2 cross-correlation, 3 band ratio and 4 CI count. The reduced values go to
   0x60..0x63.
4. **RISC.** The controller starts the processor, waits for its `busy` to rise,
   then waits for the program to halt.

**Overrun.** If the next trigger arrives while an iteration is still running,
that trigger is dropped and `overrun` pulses. The program must therefore halt
within roughly 4915 − 2320 − 320 − 84 ≈ 2190 clocks.

## Classification and decision (CD): the RISC

The RISC is a 16-bit processor with 8 registers (r0 reads zero) and
1024 × 16 instruction and data SRAMs. It is multi-cycle: each instruction
takes a fetch clock and an execute clock, and loads take one more. The ISA is
this design's own and is defined in `risc_pkg`:

| op | mnemonic | effect |
|---|---|---|
| 0 1 2 | ADD SUB MUL | `rd = rs op rt` (MUL keeps the low 16 bits) |
| 3 | ADDI | `rd = rs + imm6` |
| 4 5 | LW SW | `rd ↔ dmem[rs + imm6]` |
| 6 7 | BEQ BLT | if `rd == rs` / `rd < rs` (signed): `pc += 1 + imm6` |
| 8 | LI | `rd = imm9` (sign-extended) |
| 9 | JMP | `pc = imm12` |
| A | OUT | put `rd` on `out_data` and pulse `out_valid` |
| B | HALT | stop until the next iteration |
| C D E F | SRA AND OR NOP | |

Fields: `[15:12]` op, `[11:9]` rd, `[8:6]` rs, `[5:3]` rt. The helper functions
`enc_r`, `enc_i`, `enc_li` and `enc_j` assemble instructions. The unit test
`tb_risc` runs a nearest-neighbour classifier as an example program.

## Programming the chip

Every write goes through `prog_we/prog_addr/prog_data`, one word per clock:

| address | contents | reset value |
|---|---|---|
| 0x0000+t | FIR coefficient a(t+1) | a1 = 1, others 0 |
| 0x0100+16o+i | spatial weight W[o][i] | identity |
| 0x0200+c | cross-correlation partner of channel c | c+1 mod 16 |
| 0x0300..0x0309 | FIR shift, spatial shift, band_lo, band_hi, radius, PGA gain, energy/variance/x-corr/reduction shifts | 0,0,1,2,16,0,0,0,0,0 |
| 0x0400+128d+f | reduction weight, axis d, feature f | 0 |
| 0x8000+a | instruction SRAM word a | — |

With these reset values the filters pass samples through unchanged. Only the
program has to be loaded before the chip produces output.

## What follows the original system and what does not

**Taken from the original system:**

- 16 channels, 9-bit samples, 256 samples/s per channel;
- the 49.152 kHz system clock;
- a 32-tap temporal FIR shared by all channels through cascaded register rows;
- a spatial filter;
- the four kinds of features: temporal, cross-channel, spectral and chaotic;
- an FFT followed by ALUs;
- a single MAC for dimension reduction;
- 10 iterations per second;
- a RISC that is started once the features are in its data SRAM, and whose
  program decides the output;
- alternate LNA power-up and the digital PGA gain control.

**This design's own choices:**

- the processor clocking described above;
- all word widths;
- the window length (32) and the FFT size (32);
- the CI embedding: dimension 2, 16 samples, max norm;
- one correlation partner per channel;
- 4 reduced axes;
- the ISA and the memory sizes (two 1 k-word SRAMs plus a 16 k-bit ring, about
  48 kb in all);
- the address map and the data-memory layout;
- the overrun policy.

**Not modelled:**

- the analog front end;
- the 4.096 kHz clock domain;
- power gating;
- "and so on" temporal features beyond energy and variance.

**Synthesis size.** At the default parameters the design holds about 27 k
flip-flop bits and 34 k memory bits.

## Simulating

Each block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb_sbs_soc` runs the full
chip at its default parameters, and does these things:

- programs random filters, partners and reduction weights;
- loads a program that outputs all 84 feature and reduced words, plus a
  threshold decision on channel 0's energy;
- feeds 16 synthetic channels, with a burst of doubled amplitude, through the
  ADC port;
- compares every output word with an independent model of the arithmetic. The
  band ratio is compared against a floating-point DFT within a tolerance.

The testbench also checks the 10 Hz iteration rate. It then loads a slow
program to make overruns happen, and counts iterations, decisions and overruns.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/deep_pkg.sv rtl/risc_pkg.sv rtl/*.sv tb/tb_sbs_soc.sv \
  --top-module tb_sbs_soc -Mdir obj_sbs -o sim
obj_sbs/sim +verilator+rand+reset+2
```

The command lists the two package files again because `rtl/*.sv` includes
them. If your Verilator version complains about the duplicates, list the
module files separately. Replace `tb_sbs_soc` with any other `tb_<block>` to
run a unit test.
