# IQ sampling spectrometer for a radio-telescope back end

A radio receiver's down-converter delivers one RF band as two real signals:
in-phase (I) and quadrature (Q). Two ADCs sample them at 4.096 GS/s each.
Taken together, the two streams form a complex signal 4.096 GHz wide. This
design turns that signal, in real time, into power spectra of 4096 channels of
1 MHz. Each spectrum is averaged over a programmable number of FFT frames, for
example 10240 frames for a 10.24 ms integration, and handed to a DMA engine as
an AXI4-Stream.

The design targets the programmable logic of an RFSoC-class device. The ADCs
there present eight 16-bit samples (12-bit conversions, left as 16-bit words)
per 512 MHz clock on a 128-bit AXI4-Stream bus. A processor programs the
spectrometer over AXI4-Lite.

```
 ADC I ─128b─┐                  512 MHz │ 256 MHz
             ├─ combinator ─256b─ cdc_fifo ─512b─ pfb_fir ─ fft_wideband ─ scale_integrate ─► AXI4-Stream
 ADC Q ─128b─┘        │                                  ▲              ▲                      (to DMA)
                   probe_*                           shift│    acc_len,  │scale
                                                          └── axil_regs ─┘◄── AXI4-Lite
```

`iq_spectrometer_top` is the whole design. `spectrometer_dsp` is the signal
processing core: FIFO, filter bank, FFT, integrator and registers.

## Rate and data layout

Sample rate and clock fix the parallelism:

- 4.096 GS/s at 512 MHz is 8 samples per clock.
- After the FIFO, 4.096 GS/s at 256 MHz is 16 complex samples per clock.

Everything downstream of the FIFO takes one beat per clock and never stalls.
Each stage has a fixed latency, and its state advances only on valid beats.
Gaps in the input only delay the output; they never corrupt it.

| point            | beat contents                                                      |
|------------------|--------------------------------------------------------------------|
| ADC buses        | 8 x 16 bit, earliest sample in bits 15:0                           |
| combinator out   | 8 complex samples, lane k = {Q[k], I[k]}                           |
| FIFO out         | 16 complex samples, two combinator beats, earlier one in the low half |
| PFB / FFT        | 16 x {im, re}, 18-bit signed each                                  |
| spectra stream   | 16 x 32-bit power, 256 beats per spectrum, `tlast` on the last beat |

A frame is 4096 samples, i.e. 256 beats. Sample n = 16·m + p of a frame
travels on lane p in beat m.

**Output order.** The spectrum is *not* in natural order. In beat o, lane q
carries channel k = bitrev8(o) + 256·q, where bitrev8 reverses the 8 bits of
the beat number. Channel k is frequency k·1 MHz for k < 2048, and
(k − 4096)·1 MHz for k ≥ 2048. So the upper half of the channels holds the
negative frequencies, i.e. the part of the band below the LO. Software must
reorder the channels. Doing it in hardware would need another 256-beat buffer.

## The polyphase filter bank (`pfb_fir`)

The filter bank uses 3 taps per branch. Prototype filter:

    h[i] = (0.54 − 0.46·cos(2πi/L)) · sinc((i − L/2)/N),   L = 3·N = 12288

That is a Hamming window times a sinc one channel wide. It is quantised to
18 bits, with the peak at 2^17 − 1.

Output sample n of frame f is

    y_f[n] = Σ_t h[(2 − t)·N + n] · x_{f−t}[n] / 2^17

rounded and saturated to 18 bits.

- **History.** Each of the 16 lanes keeps the last two frames of its own
  samples in two 256-word circular buffers. Lane p only ever sees samples
  n ≡ p (mod 16).
- **Coefficients.** Each lane has its own 3 x 256 coefficient table. The
  tables are computed at elaboration from the formula above, so no data files
  are needed.
- **Start-up.** The first two frames after reset only fill the history. The
  first output is frame 2.
- **Latency.** 2 clocks. `m_sof` marks beat 0 of each frame.

## The wideband FFT (`fft_wideband`, `fft_sdf_stage`, `fft_direct`)

A 4096-point FFT is computed at 16 points per clock. It splits the transform
N = M·P, with M = 256 and P = 16, into three steps.

1. **Per-lane pipeline.** Each lane runs its own 256-point radix-2
   decimation-in-frequency pipeline. That is 8 `fft_sdf_stage` instances,
   each a single-path delay-feedback stage with a D = 128, 64, …, 1 word
   delay line. Lane p then holds X_p[k1] with k1 in bit-reversed time order.
2. **Twiddle rotation.** Lane p is rotated by W_4096^(p·k1). The table
   follows the beat counter.
3. **Cross-lane FFT.** `fft_direct` takes the 16-point FFT across the lanes
   of each beat: 4 registered radix-2 stages, then a fixed lane permutation.

That gives 12 radix-2 stages in total, one per bit of the run-time
**shift schedule**:

- `FFT_SHIFT[s] = 1` halves the output of stage s. Stages 0–7 are the
  per-lane stages; stages 8–11 are the cross-lane ones.
- With all ones (the reset value) the result is the DFT divided by 4096 and
  cannot overflow.
- With fewer shifts, small signals keep more resolution, but a stage may
  saturate. A saturated stage raises `ev_fft_ovf` and sets STATUS bit 0.
- Every stage takes its shift bit at the start of a frame, so a change never
  splits a frame inside one stage.

Arithmetic is 18-bit data with Q16 twiddles (1.0 = 65536). Results are
rounded, then saturated.

**Latency.** The first output frame starts 255 + 8 + 1 + 4 = 268 clocks after
the first input beat. After that, one frame leaves every 256 clocks.

## Power, integration and scaling (`scale_integrate`)

Each bin's power re² + im² (37 bits) is added into a 64-bit accumulator. The
accumulators are held in a 16 x 256 memory addressed by beat number.

**Integration length.** An integration is `ACC_LEN` spectra. Its first
spectrum overwrites the sums, so no clearing pass is needed. `ACC_LEN` and
`SCALE` are both sampled when an integration begins, so the processor can
write them at any time.

**Scaling and saturation.** During the last spectrum of an integration, each
finished sum is shifted right by `SCALE`, saturated to 32 bits (`ev_sat`) and
written to a dump buffer.

**Double buffering.** The dump buffer is doubled: one half is filled while the
other is sent. A sink that accepts one beat per clock on average therefore
never loses a spectrum, even at `ACC_LEN = 1`. If both halves are still
occupied when a new spectrum is due, that spectrum is skipped: `ev_dump_drop`
pulses and STATUS bit 2 is set. The accumulation itself never stops.

**Worst case.** Worst-case power is 2^35 per bin. At 10240 spectra that
reaches 2^48.3, far inside 64 bits. A `SCALE` of 17 keeps a full-scale
10.24 ms sum inside the 32-bit output.

## Clock crossing (`cdc_fifo`, `combinator`)

**Combinator.** It pairs I and Q beats one to one: a beat leaves only when
both streams have one, and each input waits for the other. `ev_skew_wait`
pulses on every clock in which one stream is ahead. A constant sample offset
between the ADCs is not corrected here: it must be aligned in the ADC
configuration.

**FIFO.** The FIFO first packs two 256-bit beats into one 512-bit word. It
then moves the word to the DSP clock through a 16-word asynchronous FIFO:
Gray-coded pointers, two-flop synchronisers, first-word fall-through.

The ADCs cannot be held back, so the FIFO's `s_tready` is always 1. If the
DSP clock is too slow and the FIFO fills, words are dropped. This is flagged
two ways:

- `ev_fifo_ovf_adc`, in the ADC domain;
- `ev_fifo_ovf` and STATUS bit 1, through a toggle synchroniser into the DSP
  domain.

At the nominal 2:1 clock ratio the FIFO never holds more than a word or two.

## Registers (`axil_regs`, AXI4-Lite, 32-bit)

| offset | name      | access | meaning |
|--------|-----------|--------|---------|
| 0x00   | CTRL      | W      | bit 0 = 1 clears STATUS and DUMPS |
| 0x04   | FFT_SHIFT | RW     | bits 11:0, shift schedule; reset 0xFFF |
| 0x08   | ACC_LEN   | RW     | spectra per integration (0 acts as 1); reset 10240 = 10.24 ms |
| 0x0C   | SCALE     | RW     | bits 5:0, right shift of the integrated powers; reset 0 |
| 0x10   | STATUS    | R      | sticky: bit 0 FFT overflow, 1 FIFO overflow, 2 dump dropped, 3 output saturated |
| 0x14   | DUMPS     | R      | integrations completed since reset or clear |

Write strobes are honoured. Responses are always OKAY. Unmapped addresses
read 0.

## Top-level ports (`iq_spectrometer_top`)

- `clk_adc`, `rst_adc_n` and `clk_dsp`, `rst_dsp_n`: 512 MHz and 256 MHz
  clocks, with asynchronous active-low resets.
- `s_axis_i_*`, `s_axis_q_*`: the two ADC streams.
- `probe_tdata`, `probe_tvalid`: the combined stream as it enters the FIFO,
  for an on-chip logic analyser. This allows raw samples to be captured and
  checked offline.
- `m_axis_*`: the integrated spectra, towards the DMA.
- `s_axil_*`: the register port.
- `ev_*`: one-clock event pulses. `ev_skew_wait` and `ev_fifo_ovf_adc` are in
  the ADC domain; the rest are in the DSP domain.

Parameters: `N` (4096), `TAPS` (3), `ADC_LANES` (8), `FIFO_DEPTH` (16). `N`
must be a power of two with N/16 ≥ 2. Shared constants and the rounding,
saturation and twiddle functions live in `spec_pkg`.

## Not included

These parts surround the design but are not built here. Their connections are
the top-level ports.

- The ADCs.
- The logic analyser.
- The AXI4-Stream-to-memory-mapped DMA, the DDR4 memory and its controller.
- The processor software that configures the system and sends spectra over
  Gigabit Ethernet.
- The analog down-converter and anti-aliasing filters.

## Where this design departs from, or adds to, the original system

- **FFT structure.** The original filter bank was built from a vendor DSP
  block library. Only its outward parameters are known: 3 taps,
  4096 channels, 12 stages, a configurable shift schedule. The window, word
  widths, FFT decomposition, output order and rounding are this design's own.
- **Integrator details.** The original names only "scaling and integration"
  with a programmable length and scaling factor. The power detector,
  accumulator width, right-shift scaling, double buffer and drop rule are
  this design's own.
- **Register map.** The register map and the status and event signals are new.
- **FIFO.** The FIFO depth and its drop-on-overflow behaviour are choices made
  here.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_combinator` | pairing under random gaps on either input and random output stalls, skew events, full rate |
| `tb_cdc_fifo` | order and rate across 512/256-style clocks, overflow in both domains, exact drain after overflow |
| `tb_pfb_fir` | against a direct computation with the same quantised coefficients (±1 LSB), start-up frame, 2-clock latency |
| `tb_fft_wideband` | N = 256, P = 4: against a floating-point DFT/N (±6 LSB) with gaps, exact latency, overflow with no shifts |
| `tb_scale_integrate` | exact sums, scaling, saturation, drops under a stalled sink, changing lengths |
| `tb_axil_regs` | reset values, strobes, readback, sticky status, counter, clear |
| `tb_spectrometer_dsp` | N = 256 chain against a floating-point PFB + DFT reference, every channel, all events |
| `tb_iq_spectrometer_top` | **full size, default parameters** (see below) |

The top-level testbench runs the complete design at its defaults. Its input
is a complex tone in channel 128 plus a weaker tone in channel −700, fed as
12-bit samples, with the Q stream starting late. It checks:

- every channel of each dump, against a floating-point model of the filter
  bank and FFT;
- that dumps arrive exactly `ACC_LEN`·256 DSP clocks apart, i.e. full rate;
- that each of these happens at least once, by changing registers, stalling
  the output and slowing the DSP clock: skew wait, output stall, register
  change, saturation, FFT overflow, dropped dump and FIFO overflow.

It runs in about 15 s with Verilator.

To simulate, for example the top:

    verilator --binary --timing -Wno-fatal -Irtl rtl/spec_pkg.sv tb/tb_iq_spectrometer_top.sv \
              --top tb_iq_spectrometer_top -o sim && ./obj_dir/sim

`-Wno-fatal` keeps Verilator's width warnings on the testbenches from
stopping the build. The default 4096-point build elaborates large constant
tables; expect a compile of a minute or so.
