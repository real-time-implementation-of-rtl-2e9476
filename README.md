# Acoustic radar on an FPGA

This design locates objects in a room with sound. A six-element loudspeaker array sends
a short tone burst: 1417 Hz under a Gaussian envelope, 2 ms long. The burst is steered
toward one angle by delaying each loudspeaker a little more than its neighbour. A
six-element microphone array records the echo. The same steering delays, applied to the
microphone channels, sum the six recordings into one beam that listens in that
direction. A matched filter (a correlation against the transmitted pulse) then turns
the beam into a peak. The position of the peak gives the round-trip time, and so the
range. The peak value says how strong the reflector is. Sweeping the steer angle from a
start angle to an end angle scans the room like a radar.

All of the signal processing and control runs in one FPGA clocked at 100 MHz. A host PC
configures it and receives the results as UDP packets. The SystemVerilog here is the
FPGA part: the controllers for the ADC and DAC chips, the receive filter chain, both
beamformers, the correlator, a UDP engine on top of an Ethernet MAC, and the system
controller that sequences them.

The geometry behind the numbers:
- Elements are spaced d = 0.12 m apart.
- Sound travels at c = 346.13 m/s (25 °C).
- Received sound is sampled at 250 kSPS.
- The pulse is played at 52083 samples/s.
- One capture is 14112 samples, or 56.4 ms. That covers a range of about 9.8 m.

## Signal path

```
 host PC <-UDP-> [MAC, external] <-LocalLink-> eth_ctrl <-WB-> radar_ctrl (WishBone master)
                                                                 |  |  |   \ BRAM port select
                                                    WB           |  |  |    \ channel FIFO reset
 tx_pulse_gen <------------------------------------------------- +  |  |
   | 6 x 24-bit, one valid                                          |  |
 pcm1602_dac_ctrl (6 FIFOs, 5 MHz serial side) -> PCM1602 DAC        |  |
                                                                    |  |
 ADS8364 ADC -> ads8364_adc_ctrl -> 6 x dc_offset_remover -> fir6_lpf (one FIR, 6 channels)
                (5 MHz domain)                                  |
                                  6 x async_fifo (held in reset between captures)
                                                                    |  |
                                                    rx_beamformer <-+  |
                                                          |            |
                             bram_arbiter -> rx_bram <-> correlator <--+
```

### Transmit
`tx_pulse_gen` holds one copy of the pulse, 104 samples at 52083 Hz, computed at
elaboration from its formula. It also holds a 181-entry table of the steering delay
between neighbouring elements, one entry per degree from 0° to 180°:

    delay(θ) = round(d · |cos θ| / c · fs)

A write to its steer angle register starts a burst. All six channels are sent together,
one sample set per clock, with a single valid strobe. Each channel reads the pulse with
its own offset of k·delay samples. For angles above 90° channel 0 leads; for angles
below 90° channel 5 leads.

`pcm1602_dac_ctrl` takes the burst into six dual-clock FIFOs. It plays the samples out
over the PCM1602's 24-bit right-justified serial port:
- BCK is 2.5 MHz and LRCK is BCK/48 = 52083 Hz.
- Three data lines each carry a left/right channel pair.

The six channels are reloaded together, and only when all six FIFOs have data, so they
never drift apart. When the FIFOs are empty the DAC plays zeros.

### Receive front end (5 MHz domain)
`ads8364_adc_ctrl` starts a simultaneous conversion of all six channels every 20 clocks,
which gives 250 kSPS. It reads the six results in the chip's cycle mode.

Each channel then passes through a `dc_offset_remover`. This is a first-order digital
RC high-pass:

    dc += (x − dc)·2⁻¹⁵,  y = x − dc

All six channels then share one 33-tap low-pass FIR, `fir6_lpf`:
- It is a pipelined systolic filter.
- The channels enter in turn, one per clock, each in its own slot of the pipeline.
- Coefficients are a Hamming-windowed sinc with a 2 kHz cutoff, computed at
  elaboration.
- The filter releases all six outputs with one strobe. Because of that, a downstream
  reset can never split a sample set.

A 33-tap filter at 250 kSPS cannot have a sharp 2 kHz edge. Its measured response is:
- −0.45 dB at 2 kHz
- −3 dB near 5 kHz
- −12.5 dB at 10 kHz
- below −40 dB from 20 kHz up

That is enough to remove everything far from the 1417 Hz carrier.

### Channel FIFOs and the receive window
Each filtered channel goes into its own `async_fifo`, 1024 × 16 bits. The FIFO crosses
from the 5 MHz domain to 100 MHz. **The controller holds these FIFOs in reset** except
when a capture is wanted. That is how the receive window is placed in time:
1. The controller triggers the pulse.
2. It waits the *initial system delay*, the latency from trigger to the first sample at
   the FIFOs (1.6 ms by default).
3. It waits the *silence time*, the length of the transmitted pulse (2 ms by default),
   so the direct sound is not recorded.
4. It then releases the FIFO reset.

The first sample in a FIFO is therefore the first sample of the receive window.

### Receive beamformer
`rx_beamformer` reads the six FIFOs and writes CAPTURE_LEN beam samples to the receive
BRAM. It has two ways to drop samples:
- **Calibration**: each channel first discards its own calibration count of samples
  (registers ch0..ch5). This removes fixed phase differences between channels.
- **Steering**: each channel also discards k·delay(θ) samples, from the same formula as
  the transmit side at 250 kSPS. The leading channel discards the most.

After both drops, one sample is taken from each FIFO per step, and the six are summed.
With *captures per angle* above 1, the first capture writes the BRAM and each later
capture adds to it (read–modify–write, 3 clocks per sample). That averages several
pings.

The beam is stored from address 499 upward, and the 499 words below it are zero. The
correlator can then run over N − 1 + CAPTURE_LEN positions without any edge cases.

### Receive BRAM and arbiter
`rx_bram` has 2¹⁴ words of 36 bits and a single port, with read data one clock after
the request. The beamformer, the correlator and the controller all use this one port.
`bram_arbiter` is a plain multiplexer driven by a select register in the controller
(0 controller, 1 beamformer, 2 correlator). The controller switches it only while the
other two masters are idle.

### Correlator
`correlator` computes the matched filter in place:

    y[n] = Σ_{k=0}^{499} h[k]·x[n+k]

Here h is the pulse sampled at 250 kSPS in Q1.15. The filter uses a single multiplier
and accumulator, so it computes one product per clock.

A decimation factor D (1..255) reduces the work in two ways:
- Only every D-th output is computed.
- Each output uses only every D-th tap.

Run time therefore falls with D². With the default sizes, D = 1 takes 14612 × 500
clocks, about 73 ms. D = 16 takes about 0.3 ms. The skipped outputs are written as
zero.

Each result, shifted right by 15 and saturated, overwrites x[n]. This is safe because
no later output reads x[n]. A final scan of the range finds the largest value and its
address. The controller reads them through the correlator's registers.

### Ethernet controller
`eth_ctrl` sits between the WishBone bus and the LocalLink byte streams of an Ethernet
MAC. The MAC itself is not part of this RTL.

Receive side:
- Frames are parsed byte by byte.
- Only IPv4/UDP frames addressed to the FPGA's MAC, IP and port are kept.
- The payload of a kept frame goes into a FIFO, each byte tagged with an end-of-packet
  flag.

Transmit side:
- The master writes a byte count, a start command, and then the data bytes.
- The transmit FSM cuts the data into UDP packets of at most 1472 bytes.
- Packets shorter than 18 bytes are padded with zeros, the minimum for a 64-byte frame.
- Each packet gets Ethernet, IPv4 and UDP headers. The IPv4 header checksum is computed;
  the UDP checksum is sent as 0.

## System controller and host protocol

`radar_ctrl` is the only WishBone master. Every register access waits for the slave's
acknowledge. It runs three phases:

1. **Observation**: clear the BRAM once after reset. Then poll the Ethernet controller
   for host packets and watch the command register.
2. **Transmit–receive**, repeated *captures per angle* times:
   1. Fire the pulse.
   2. Wait the initial delay, then the silence time.
   3. Release the channel FIFOs.
   4. Run the beamformer (calibration registers first, then the steer angle).
   5. Wait for its status register to read done.

   After the last capture, unless the command is "capture beamformer out", run the
   correlator with the decimation factor and read back its peak.
3. **Data feed**: send the result to the host and clear the BRAM.

A host packet is a register write. The first payload byte is the register address; the
following bytes are the value, most significant byte first.

| addr | register | reset |
|---|---|---|
| 0x00 | command: 0 idle, 1 capture beamformer out, 2 capture correlator out, 3 run radar | 0 |
| 0x01 | acknowledge (radar mode: host has taken the last result) | 0 |
| 0x02 | steer angle, degrees | 90 |
| 0x03 / 0x04 / 0x05 | scan start / end angle, angle step | 30 / 150 / 10 |
| 0x06 | initial system delay, 100 MHz clocks | 160000 (1.6 ms) |
| 0x07 | silence time, 100 MHz clocks | 200000 (2 ms) |
| 0x08 | captures per angle (0 acts as 1) | 1 |
| 0x09 | correlator decimation factor | 1 |
| 0x0A–0x0F | channel 0–5 calibration offset, samples | 0 |

What the host receives depends on the command:
- **Capture beamformer out** (1) and **capture correlator out** (2): the whole
  correlation range of the BRAM, 500 + CAPTURE_LEN words. Each word is sent as
  4 bytes, most significant first, fragmented over as many UDP packets as needed. The
  command then returns to idle.
- **Run radar** (3): one 9-byte packet per angle, made of the angle, the 32-bit peak
  index and the 32-bit peak value. The controller then serves register writes until
  the host writes the acknowledge register. After that it adds the step to the angle,
  wrapping past the end angle back to the start angle, and fires again. Writing idle to
  the command register stops the scan after the current angle.

The range of a peak at BRAM index i is (i − 499) / 250000 · c / 2 metres, plus the
distance covered during the initial delay and the silence time. Each stage adds a small
fixed delay: about 16 samples for the FIR and a few more for the FIFOs.

## Clocks and reset

`clock_gen` derives 100 MHz, 20 MHz and 5 MHz from the 100 MHz board clock. The three
clocks are phase-aligned. It also gives a locked flag. On an FPGA this is one PLL; here,
counter dividers do the job so that the whole design is plain RTL.

| clock | used by |
|---|---|
| 100 MHz | controller, pulse generator, beamformer, BRAM, correlator, Ethernet controller, FIFO read sides |
| 5 MHz | ADC controller, DC removers, FIR, channel FIFO write sides, DAC serial side (BCK = 5 MHz / 2) |
| 20 MHz | passed to the DAC as its system clock |

The global reset is the inverse of the locked flag. It is synchronised separately into
the 100 MHz and 5 MHz domains. The dual-clock FIFOs use Gray-coded pointers with
two-flop synchronisers.

The shared types live in `radar_pkg`:
- the WishBone request/response structs (8-bit address and data)
- the BRAM request struct
- the port-select enum
- all constants and table formulas

## Simulating

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. To run one with Verilator:

    verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/radar_pkg.sv tb/tb_correlator.sv --top-module tb_correlator -o sim
    ./obj_dir/sim

Unit testbenches:
- tb_async_fifo
- tb_dc_offset_remover
- tb_fir6_lpf
- tb_ads8364_adc_ctrl, which uses the behavioural ADC model `tb/ads8364_model.sv`
- tb_pcm1602_dac_ctrl
- tb_tx_pulse_gen
- tb_rx_beamformer
- tb_rx_bram
- tb_bram_arbiter
- tb_correlator, with decimation 1, 4 and 16
- tb_eth_ctrl, which covers padding, fragmentation, stalls and dropped frames
- tb_clock_gen
- tb_radar_ctrl, with models of the four slaves

Each testbench computes its expected values independently of the block. For example,
the FIR expectations come from a direct-form reference filter written in the testbench, and the
correlator expectations come from a plain double loop.

Two end-to-end testbenches run the whole chip. Both use the same stimulus:
- an ADC model fed with an echo from 60°
- a host that builds real Ethernet/IPv4/UDP frames
- a counter of DAC bits
- a correlation reference computed from a snapshot of the BRAM

The two differ in size and scope:
- `tb_acoustic_radar_top` uses CAPTURE_LEN = 1000, so it takes a few seconds. It runs
  capture-beamformer-out, capture-correlator-out with decimation, and radar mode at 60°
  and 70° with an angle wrap, and then stops. It checks that the beam points the right
  way: the 60° peak must clearly exceed the 70° one. It also checks that the peak lands
  at the expected index. It counts each mechanism (mode switches, packet fragmentation,
  padding, FIFO releases) and fails if one never happened.
- `tb_acoustic_radar_top_full` runs the top at its default sizes (14112-sample capture,
  D = 1). It runs one capture-correlator-out and one radar angle, in about 35 s of
  Verilator time (272 ms simulated).
- `tb_radar_workloads` also runs at the default sizes, with the reset values of every
  register. It replays two measured set-ups in radar mode:
  - a target 3.5 m away at 90°
  - a target 2 m away at 60°, scanned at 60° and 90°

  It checks that each reported peak index gives back the target's range to within
  2 cm, and that the 60° look returns the larger peak.

## How far it can be trusted

- Every block's testbench passes, and so do both end-to-end runs. For each testbench, a
  copy of the block with one deliberate bug was also run, and the testbench caught it.
- The DAC and ADC controllers are checked against the chips' data-sheet behaviour
  only: a behavioural ADC model and a bit-level decoder of the serial audio stream.
  They have not been on hardware.
- The Ethernet controller has only been tested against frames built by the testbench.
  It has never been connected to a real MAC.

## Departures from the original design

- **Clock generation**: a PLL in the original; counter dividers here. Replace
  `clock_gen` with the vendor PLL for an FPGA build.
- **Ethernet MAC**: the MAC and its LocalLink FIFOs are vendor IP and are not included.
  Their byte streams are top-level ports.
- **Correlator run time**: the original text quotes 0.73 s for D = 1, but
  (500 + 14112) × 500 × 10 ns is 73 ms. The correlator here does one product per clock
  and takes 73 ms.
- **Correlator decimation**: the original says the time falls with the square of D.
  Here that is achieved by decimating both the outputs and the pulse taps.
- **Words in the receive BRAM**: 36 bits, not 16. This leaves room for summing several
  captures and for correlation values.
- **DAC FIFOs**: 24 bits wide on both sides. The original used asymmetric FIFOs with a
  1-bit read side. The serial stream is the same.
- **Delay tables**: computed from the geometry, not copied from a measured table. The
  tables are computed from the formula above, one entry per degree. The original
  describes the receive table with 180 entries and the transmit table with 181. Both
  use 181 here. Which end of the array leads for a given side of broadside is this
  design's convention.
- **Details the original leaves open, chosen here**:
  - the register addresses, the host packet layout and the 9-byte radar result
  - the 2 ms default silence time
  - the angle wrap in radar mode
  - the command returning to idle after a capture
  - the MAC/IP/port defaults
  - the UDP size limits
  - the FIR coefficient format (Q1.17)
  - the rounding and saturation points
- **Not included**: the ADC and DAC chips, the transducer arrays and the host display
  program. These are outside the FPGA.
