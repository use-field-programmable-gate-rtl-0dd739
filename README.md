# Two-channel DDS test-signal generator for a bridge impedance meter

An automatic impedance bridge compares an unknown impedance Rx with a
reference R0 by driving them from two sine sources of the same frequency, G1
and G2, and watching the junction with a zero detector. G1 is fixed. The
amplitude and phase of G2 are adjusted until the detector reads nothing.
Then the currents through Rx and R0 cancel, and Rx follows from R0 and the
ratio of the two source voltages.

This RTL builds both sources digitally, for an FPGA driving two 16-bit
serial DACs (Analog Devices AD5541). Each source is a direct digital
synthesizer (DDS). A host microcontroller sets each source's frequency,
phase and amplitude over a three-wire serial link. The analog parts (DACs,
reconstruction filters and the bridge itself) are outside the RTL.

| | |
|---|---|
| Test-signal range | 10 Hz to 100 kHz |
| Sample rate | 500 kHz per channel, 1 M samples/s in total |
| Frequency resolution | f_s / 2^32 ≈ 116 µHz |
| Phase resolution | 2^-32 of a turn (phase word); 1/1024 turn after table lookup |
| Amplitude | signed 16-bit factor (Q1.15) |
| System clock | 50 MHz (assumed; change `CLK_HZ`) |

## One channel

```
 cfg_din/sclk/cs_n
        |
   spi_slave ----freq[31:0]----+
        |  \---phase[31:0]---+ |
        |                    v v
        |                    dds --out[15:0]--> rom1 --q[15:0]--> mul1 --result[31:0]
        |                                     (addr = out[15:6])        |
        +-----ampl[15:0]-------------------------------------------------+
                                                                         v
                                  result[30:15], sign bit inverted --> dac_spi --> AD5541
```

* **`dds`**: a 32-bit phase accumulator P. On each sample strobe, P gains
  the frequency word F, so P ramps and wraps 2^32 at the output frequency:
  `f_out = f_s * F / 2^32`. A second adder adds the phase-shift word to P
  without storing the sum. The top 16 bits of that sum are the output.
  Because the phase word only enters after the accumulator, changing it
  moves the signal at once and never disturbs P.
* **`rom1`**: one period of a sine, 1024 words of 16 bits. Word k is
  `round(32767 * sin(2*pi*(k+0.5)/1024))`. The half-step offset makes the
  table exactly antisymmetric. The table is computed at elaboration by a
  constant function, so no data file is needed. Address and output are both
  registered, like an FPGA block RAM, which gives two clocks of latency. The
  top 10 bits of the 16-bit DDS output form the address; the lower 6 are
  dropped (phase truncation).
* **`mul1`**: a combinational signed 16x16 multiplier. The sine sample and the
  amplitude are both Q1.15, so `result[30:15]` is the scaled sample in
  Q1.15. Amplitude `0x7FFF` is full scale and `0x4000` is half. A negative
  amplitude inverts the signal.
* **`dac_spi`**: sends the sample to the DAC. The AD5541 takes straight
  binary (0 = 0 V), so the sign bit of the Q1.15 sample is inverted
  (offset binary, mid-scale = `0x8000`).
* **`spi_slave`**: receives the channel's parameters (see below).

## Two locked channels

`impedance_test_gen` (the top) holds `NUM_CH = 2` copies of the channel:
channel 0 is G1 and channel 1 is G2. One `sample_timer` strobe, every
`CLK_HZ/FS_HZ = 100` clocks, advances both accumulators on the same clock.

Keeping the two channels at a known phase relation is the subtle part. The
host writes the channels one after the other, so after a frequency change
one channel runs at the new frequency for a few samples while the other
still runs at the old one. Their accumulators then end up with an arbitrary
offset. To prevent this, the top watches every channel's frequency register.
When any of them changes, it clears **all** accumulators on the same clock
(the *phase restart*). Once the host has written the same frequency to both
channels, the last write restarts both together. From then on:

```
phase(G2) - phase(G1) = (phase word G2 - phase word G1) / 2^32 turns
```

Phase and amplitude writes do not restart anything. A balancing loop can
step G2's phase and amplitude without a jump in G1, and without G2 jumping
except by the step itself.

## Parameter link (host → generator)

Each channel has its own select line (`cfg_cs_n[ch]`, active low). All
channels share `cfg_din` and `cfg_sclk`. A frame is exactly 80 bits, MSB
first, sampled on SCLK rising edges while CS is low:

| bits (first sent first) | field | meaning |
|---|---|---|
| 79..48 | `freq[31:0]` | phase increment per sample; `F = round(f_out / 500 kHz * 2^32)` |
| 47..16 | `phase[31:0]` | phase shift, `2^32` = one turn (`0x4000_0000` = +90°) |
| 15..0 | `ampl[15:0]` | signed amplitude, Q1.15 |

When CS rises after exactly 80 bits, all three registers load on the same
clock and `cfg_frame_ok[ch]` pulses. A frame of any other length is dropped
and `cfg_frame_err[ch]` pulses. The lines are synchronised to the system
clock and oversampled, so SCLK must stay below about f_clk/4 (12 MHz at
50 MHz). After reset the values are freq = 0, phase = 0 and ampl = `0x7FFF`.

## DAC link (generator → AD5541)

There is one link per channel (`dac_cs_n`, `dac_sclk`, `dac_din`). Each frame
is 16 bits, MSB first. Data changes on SCLK falling edges and is stable at
rising edges. CS rising updates the DAC output. SCLK runs at
`f_clk / (2*DAC_SCLK_DIV)` = 12.5 MHz.

## Timing

| event | clock after the sample strobe |
|---|---|
| accumulator updated | 0 |
| ROM address registered | 1 |
| ROM data registered | 2 |
| DAC frame starts, `dac_code` updated | 3 |
| DAC CS rises (analog output changes) | 69 |
| next strobe | 100 |

A frame takes `2*16*DAC_SCLK_DIV + 2 = 66` clocks. An elaboration check
requires the sample period to hold a frame plus the pipeline. An assertion
checks that a new sample never arrives while the previous one is still
being sent.

## Parameters of the top

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 50 000 000 | system clock, Hz |
| `FS_HZ` | 500 000 | sample rate per channel, Hz |
| `NUM_CH` | 2 | number of channels (G1, G2) |
| `ROM_AW` | 10 | sine table address bits (1024 words) |
| `DAC_SCLK_DIV` | 2 | DAC SCLK half period in clocks |

Shared widths (32-bit freq/phase, 16-bit amplitude and sample, 80-bit frame)
are in `dsg_pkg`.

## What is taken from the design description and what is not

Taken from the description:
* the chain SPI slave → DDS → 1024×16 sine ROM → signed multiplier;
* 32-bit frequency and phase words and a 16-bit DDS output;
* the 16-bit amplitude;
* the registered ROM;
* 500 kHz per signal, two signals, the AD5541 DAC;
* the 10 Hz–100 kHz range;
* the DIN/SCLK/CS host link.

Choices made here, where the description is silent:
* the system clock frequency and the sample strobe;
* the `en` and `clr` inputs of `dds`;
* the phase restart;
* which DDS bits address the ROM, and the table's half-step placement;
* the parameter frame format and length check;
* one CS and one DAC link per channel;
* the Q1.15 scaling and the offset-binary conversion;
* asynchronous active-low reset and the reset values.

The DDS output adds the phase word to the accumulator (P + Phase), as the
block diagram of the synthesizer shows.

Not in the RTL: the DAC chip, the analog reconstruction (interpolation)
filter, the bridge and zero detector, and the host microcontroller. The
testbenches contain a behavioural model of the AD5541 serial input
(`tb/ad5541_model.sv`).

## Verification

Each module has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M`:

* `tb_sample_timer`: strobe spacing of exactly 100 clocks.
* `tb_dds`: against a reference accumulator, with random words, strobes and
  clears, plus a known ramp.
* `tb_rom1`: every word against `$sin`, the antisymmetry, and the two-clock
  latency.
* `tb_mul1`: corner and random signed products.
* `tb_dac_spi`: codes received intact by the AD5541 model, frame length,
  start-while-busy ignored.
* `tb_spi_slave`: random frames, frames one bit short and one bit long,
  reset values.
* `tb_impedance_test_gen`: the whole generator at default parameters. It
  recomputes every DAC code of both channels independently, through
  frequency, phase and amplitude changes, a negative amplitude, a damaged
  frame, phase restarts and accumulator wraps. It also checks the 100-clock
  DAC update interval and counts each of these events.
* `tb_frequency_range`: 100 kHz, 1 kHz and 10 Hz at default parameters. It
  measures the output frequency from mid-scale crossings and the full-scale
  swing, and checks that G2 set to +90° is at its peak whenever G1 crosses
  zero upward (one full 10 Hz period is 5 M clocks).

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_impedance_test_gen rtl/dsg_pkg.sv tb/tb_impedance_test_gen.sv
./obj_dir/Vtb_impedance_test_gen
```

All modules are synthesizable except `tb/ad5541_model.sv`. The concurrent
assertions in `dac_spi` and the top are for simulation.
