# VCO-based neural-sensing chip: digital back-end in SystemVerilog

Neural recording implants have to digitize microvolt brain signals that ride on
stimulation artifacts and electrode offsets far larger than the signal itself.
This design avoids a front-end amplifier. Each electrode drives a
voltage-controlled ring oscillator (VCO) directly, and the digital logic
measures how far the oscillator's phase has moved. Phase is the integral of
frequency, so counting phase gives a first-order, inherently oversampled
quantizer. Its range is limited only by how many phases the counters can hold,
not by a supply rail.

This repository has the logic of a 32-channel chip built around that idea:

- the per-channel phase quantizers;
- the timing that chops the input and frames the measurement windows;
- a polynomial nonlinearity corrector shared by all channels;
- frame packing with time-stamps;
- two SPI ports, one for configuration and one for streaming data out;
- the digital control of the on-chip high-pass filter's switches.

The analog parts are represented by behavioural models for simulation: the
VCOs, the delay lines and the pulse shaper.

## Signal chain

```
 electrode -> [HPF, analog] -> [chopper + 2 ring oscillators] --29 stages x 2--+
                                                                               v
   fe_timing --Count/Sp/Sn/strobes--> fe_quantizer (x32) --16-bit sample-->
   nlc_interleaved (2 Horner engines) --> [artifact rejection, external]
   --> frame_packetizer --> spi_stream_tx --> data out
   spi_cfg_slave: register file for all of the above
```

Everything digital runs from one 12 MHz clock. A sampling period is 2000
clocks, giving 6 kHz per channel.

## How one channel measures voltage

### Two rings and chopping

Each channel has two 29-stage rings, A and B. The input is applied to them
differentially through a chopper:

- in the Sp half of a sampling period, A speeds up and B slows down;
- in the Sn half, the roles swap.

With K = 70 MHz/V, the frequency difference A − B is `K·v + mismatch` in one
half and `−K·v + mismatch` in the other. The quantizer measures the phase
difference A − B over a window in each half and subtracts the two results.
The static mismatch and the low-frequency drift cancel, and the signal term
doubles. Sp and Sn overlap by two clocks, so the rings are never left without
a current path.

### Counting phase with 58 phases per cycle

A ring of 29 inverters passes through 58 distinguishable states per
oscillation: each inverter switches once on the way up and once on the way
down. Each sub-quantizer (`ro_subquantizer`) does four things:

1. It latches all 29 stage outputs on the rising edge of Count (the window
   start) and again on the falling edge (the window end).
2. It counts full ring cycles on the last stage's rising edge between those
   two moments.
3. It combines each latched state with its count: `58·cycles + phase`.
4. It outputs `end − start`, the number of phases travelled in the window.

At 100 µs of total window and 70 MHz/V, a ±50 mV input spans about 40 600
codes. The output is 16 bits signed, so that range fits with margin.

### Decoding a ring state (`ro_phase_decoder`)

In a 29-stage ring that is settled, exactly one inverter has equal input and
output. That inverter is "active": it is the one about to switch. XOR-ing
neighbours finds it. Its index k (0..28) is the phase within one half of the
cycle.

To tell the first half from the second, the decoder does not look at the
switching inverter itself, which may be caught mid-transition. It looks at a
stage four positions away, which is stable. Its level against the reference
pattern says whether the ring is in the first half (phase k) or the second
half (phase k + 29).

A state with no active inverter, or more than one, is flagged invalid. This
can happen when the latch lands exactly on a transition. In that case the
decoder still returns the lowest candidate.

### Why three counter latches (`multi_latch_arbiter`)

The cycle counter is clocked by the ring, asynchronously to Count. If Count
arrives while the counter is incrementing, the latched count can be off by
one. Because a whole cycle is 58 codes, that error is large.

The design therefore latches the counter three times, with Count1, Count2 and
Count3. These are slightly early, slightly late and later still relative to
the edge that latches the ring state. The arbiter compares the three copies:

| copies | phase decoded | count used |
|---|---|---|
| all equal | any | that value |
| cnt1 = cnt2 ≠ cnt3 | first half (the ring just wrapped) | cnt1 + 1 |
| cnt1 = cnt2 ≠ cnt3 | second half | cnt1 |
| cnt1 ≠ cnt2 = cnt3 | first half | cnt3 |
| cnt1 ≠ cnt2 = cnt3 | second half | cnt3 − 1 |
| all differ | — | cnt3 or cnt1 by phase |

The phase decides which side of the wrap the latched state sits on. The copy
that agrees with it is then used. The `arb_event` output reports when
arbitration changed the answer.

The cycle counter only runs while `count_en` is high. `count_en` opens 16
clocks before the window and closes 16 after it, and is resynchronized by two
flops clocked by the ring. So the counter never starts or stops inside a
window.

### Per-channel output (`fe_quantizer`)

Two strobes per sampling period store the A − B phase difference for the Sp
and Sn windows. At `srdy` (the end of the period) the quantizer outputs
`Sp − Sn`, saturated to 16 bits.

## Timing of one sampling period (`fe_timing`, defaults)

| clock within period | event |
|---|---|
| 0 | Sp half starts. Sn stays high for 2 more clocks of overlap. |
| 200–799 | Count window of the Sp half (600 clocks = 50 µs) |
| 184–815 | count_en high |
| 832 | sample strobe, Sp result |
| 1000 | Sn half starts. Sp stays high for 2 more clocks of overlap. |
| 1200–1799 | Count window of the Sn half |
| 1832 | sample strobe, Sn result |
| 1833 | srdy: the channel sample is ready |

After srdy, the NLC processes 32 samples on two engines. Each sample takes 7
clocks, so the NLC needs about 115 clocks. The packetizer then sends
`2 + enabled channels` words at 6 MHz, 32 clocks per word. A full
32-channel frame takes about 1090 clocks, which fits inside the 2000-clock
period.

## Nonlinearity correction (`nlc_horner`, `nlc_interleaved`)

The VCO's frequency compresses at large inputs. The correction applies a
5th-order polynomial,

    y = a0 + a1·x + a2·x² + a3·x³ + a4·x⁴ + a5·x⁵

evaluated by Horner's rule with one multiplier: `acc ← a_k + x·acc` for
k = 5..0, one step per clock. The coefficients are Q3.15 (18-bit signed), so
a1 = 32768 means gain 1. The accumulator is 24 bits and saturates, and the
result saturates to 16 bits. The coefficients are loaded over SPI after a
one-time (foreground) calibration. At reset the polynomial is the identity.

`nlc_interleaved` shares two engines across the 32 channels: channel c goes to
engine c mod 2. It can also:

- pass samples through uncorrected (bypass);
- take its input from the `ext_sample` port instead of the front-ends, to test
  the corrector on known data.

## Output path

The corrected samples go out on `asar_in` for an artifact-rejection engine.
That engine is not part of this RTL. Its results return on `asar_out`. When
the engine is bypassed (the reset default), the NLC output goes straight to
the packetizer.

`frame_packetizer` sends one frame per sampling period:

1. the sync word `0xA55A`;
2. a 16-bit time-stamp that counts sampling periods;
3. the enabled channels, in ascending order.

If a new frame arrives while the previous one is still being sent, the new
frame is dropped and `overflow_cnt` counts the loss. The time-stamp still
advances, so the receiver sees the gap.

`spi_stream_tx` is an SPI master: mode 0, clk/2 (6 MHz), 16-bit words, MSB
first. Chip select stays low for one whole frame.

## Configuration (`spi_cfg_slave`)

The configuration port is an SPI slave, mode 0, oversampled by the 12 MHz
clock. Its SCLK must be below 3 MHz for writes and 1.5 MHz for reads.

A transaction is an 8-bit command followed by 24 data bits:

- command bit 7 = 1 means write, 0 means read;
- command bits 6:0 are the address.

On a read, the data appears on MISO during the 24 data clocks.

| addr | reset | contents |
|---|---|---|
| 0 | 0x1A | [0] NLC bypass, [1] artifact-rejection bypass, [2] external NLC input, [3] fast HPF clock enable, [4] slow HPF clock enable |
| 1, 2 | 0xFFFF | channel enables 15:0 and 31:16 |
| 3 | 0x33 | [3:0] fast-stage swclk pulse width (ns), [7:4] slow stage |
| 8–13 | a1 = 0x8000, others 0 | NLC coefficients a0..a5, Q3.15 in bits 17:0 |
| 15 | read-only status | [7:0] lost frames, [8] NLC busy, [9] all phase decodes valid, [10] packetizer busy |

## High-pass filter switch control

The input high-pass filter is a duty-cycled resistor network. It is analog and
not modelled here. Its switches are driven by short pulses.

`hpf_swclk_gen` makes two square waves from the 12 MHz clock:

- a1 at 10 kHz, for the fast stage;
- a2 at 500 Hz, for the slow stage.

The a2 edges are offset by a quarter of the a1 period, so the two switch
pulses never coincide.

`swclk_pulse_shaper` turns each rising edge into a pulse `A AND NOT
delay(A)`. The pulse width is set in 1 ns steps by a 4-bit control. This
block is a behavioural delay line: in silicon it would be a tuned inverter
chain.

## Files

| file | role |
|---|---|
| `rtl/vco_fe_pkg.sv` | constants (29 stages, 58 phases, widths) and shared types |
| `rtl/vco_sensing_chip.sv` | top level |
| `rtl/fe_timing.sv`, `fe_quantizer.sv`, `ro_subquantizer.sv`, `ro_phase_decoder.sv`, `multi_latch_arbiter.sv` | front-end quantizer |
| `rtl/nlc_horner.sv`, `nlc_interleaved.sv` | nonlinearity correction |
| `rtl/frame_packetizer.sv`, `spi_stream_tx.sv`, `spi_cfg_slave.sv` | output and configuration |
| `rtl/hpf_swclk_gen.sv` | HPF switch timing |
| `rtl/vco_model.sv`, `count_delay_line.sv`, `swclk_pulse_shaper.sv` | behavioural models of analog parts; not synthesizable |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends it if it hangs. For example:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/vco_fe_pkg.sv \
    tb/tb_fe_quantizer.sv --top-module tb_fe_quantizer
./obj_dir/Vtb_fe_quantizer
```

`tb_vco_sensing_chip` runs the whole chip at full size: 32 channels, each with
two behavioural rings. It uses about 2.5 ms of simulated time and a few
minutes of wall time.

The end-to-end test checks six configurations:

1. the reset defaults;
2. written NLC coefficients;
3. NLC bypass;
4. external data;
5. the artifact-rejection path, including a forced frame loss;
6. a sparse channel mask.

It compares every sample with the ideal value
`58 · 2 · K · g(v) · 50 µs`, where `g(v) = v − 8v³` is the model's
compression. It also checks that multi-latch arbitration, both HPF pulse
trains and status reads all occurred.

## How far to trust it, and where it departs from the source design

Taken from the source design:

- the VCO quantizer architecture: 29-stage rings, 58 phases, dual-edge state
  latching, a ring-clocked cycle counter with a retimed enable, triple
  latching with arbitration, phase unwrapping, and the chopped Sp − Sn
  subtraction with a final resample;
- K = 70 MHz/V, the 100 µs total window, 6 kHz from 12 MHz, and 32 channels;
- 5th-order foreground NLC computed with Horner's method;
- the interleaved NLC, artifact-rejection hand-off, packetization with a
  time-stamp, and the SPI links;
- the ~10 kHz HPF switch base signal and the pulse made by A AND delayed-not-A
  with a 1 ns step.

Choices of this implementation:

- **Timing details:** window placement, overlap length, count_en margins and
  strobe positions (the source gives only totals).
- **Decoder details:** the exact decoder pattern and the "four stages away"
  reference for the edge detector.
- **Arbiter rule:** the arbitration table as written above.
- **Number formats and widths:** all of them, including the 12-bit cycle
  counter.
- **Chip organization:** two NLC engines, the register map and SPI command
  format, the frame layout and sync word, the 500 Hz rate of the slow HPF
  clock and its edge offset.
- **VCO model values:** the centre frequency (5 MHz), compression coefficient
  and mismatch.

Limits:

- **Modelling:** the ring oscillators are modelled ideally. Real metastability
  at the latches is not modelled beyond the off-by-one counter case that the
  arbiter handles.
- **Not included:** the artifact-rejection algorithm, the analog HPF, the
  LDOs, the crystal oscillator and the power-on reset.
- **64 channels:** a 64-channel build would need a wider register map, and
  its frame would not fit one sampling period at the 6 MHz output clock.
- **Simulation only:** the behavioural models use real-valued delays. The
  synthesizable part is everything except `vco_model`, `count_delay_line` and
  `swclk_pulse_shaper`.
