# Digital logic for a multi-channel germanium-detector DAQ

This repository holds synthesizable SystemVerilog for the FPGA logic of a
modular data-acquisition system for nuclear spectroscopy, the kind used with
the Gerda Phase I germanium detectors. Each channel digitises a detector
signal with a free-running 14-bit, 100 MSamples/s ADC. A small FPGA sits
beside each ADC and adds five functions:

* **self-adaptive readout-clock alignment**: the FPGA moves the phase of its
  ADC readout clock until the data are sampled well away from their edges;
* **a real-time digital trigger**: a triangular shaping filter with a 1 us
  peaking time, followed by a per-channel threshold;
* **a rate meter**: a 24-bit count of triggers;
* **a baseline estimator**: a recursive, pulse-rejecting estimate of the
  signal's DC level;
* **slow control**: every channel is reachable from one PC over a single
  RS232 line at 38400 bit/s.

An expansion board connects the PC line to all channels. It also ORs the
channels' triggers into one trigger for the PCI receiver in the PC.

```
            RS232 38400 bit/s
   PC  <=====================>  expansion_board ----- trig_out (to PCI receiver)
                                 |  ^        ^
                   ch_rxd (copy) |  | ch_txd | ch_trig
                                 v  |        |
          +----------------------- daq_channel (x24) -----------------------+
 adc_d -->| adc_phase_align --> sample -+--> baseline_estimator --+          |
 clk_0/   |   ^  psen/psdone (DCM)      |                         v          |
 90/270   |                             +--> (sample - baseline) -> digital_trigger -> event_counter
          |                                                                   |
          |  slow_ctrl_slave: 16-byte user register (threshold, enables,      |
          |                   counter bytes, baseline, phase status)          |
          +-------------------------------------------------------------------+
```

`gerda_daq_top` holds 24 channels and the expansion board. The FPGA's clock
manager (DCM), the ADC, the analog front end and the high-rate sample link
are not part of this RTL. They meet the design at the top's ports: the
readout clocks and the phase-shift handshake come in and go out per channel,
and the aligned samples go out on `sample`.

## Readout-clock alignment (`adc_phase_align`)

The ADC's data edges have no fixed relation to the FPGA's 100 MHz system
clock. If the readout clock samples too close to an edge, bits are corrupted
now and then. The alignment block checks this continuously and fixes it.

**Three captures.** Every ADC bit goes to three flip-flops. They are clocked
by three copies of the readout clock that the DCM produces at -90 degrees
(`clk_270`), 0 degrees (`clk_0`) and +90 degrees (`clk_90`). At 100 MHz these
copies are 2.5 ns apart. If no data edge falls between the -90 and +90 edges,
all three flip-flops hold the same word. The 0-degree sample then has at least
a quarter period of margin on both sides.

**SYNC.** The three captures of one ADC word are made at different times, so
they have to be lined up before they can be compared. Everything is brought
into the `clk_0` domain:

| capture | taken at         | held until  | retimed into clk_0 as                              |
|---------|------------------|-------------|----------------------------------------------------|
| -90     | t - T/4          | t + 3T/4    | at t (`s270a`), then one more clk_0 stage (`s270`) |
| 0       | t                | t + T       | at t + T (`s0`)                                    |
| +90     | t + T/4          | t + 5T/4    | at t + T (`s90`)                                   |

Each `s*` register therefore holds the same ADC word. One XOR bank compares
the -90 and 0 captures and sets **UP** if any of the 14 bits differ. The other
compares the 0 and +90 captures and sets **DOWN**. The 0-degree word and both
flags are then registered into the system clock domain.

**Control loop.** The loop runs on the system clock and is also the DCM's
phase-shift clock:

1. It watches UP and DOWN for `OBS_CYCLES` (256) clocks.
2. If the window was clean, it sets `locked` and starts another window.
3. Otherwise it sends one `psen` pulse with `psincdec = 1`. This moves all
   three copies one fine step later, about 15 ps on a Spartan-3 DCM.
4. It waits for `psdone`, then `SETTLE_CYCLES` (16) more clocks, and goes back
   to 1.

The phase always moves in the same direction. Since the phase is periodic,
one direction is enough: the loop walks the sampling point past the data edge
until the edge lies more than a quarter period behind it. The bad positions
span half a period, so the worst case is about 333 steps, or roughly 1 ms
with the default windows (about 290 clocks per step). UP and DOWN show where
the edge currently is and are exported as status bits. Steering both ways with them would be faster, but the
one-direction scheme is the one the system used.

What to trust: the testbench starts with the data edge between the 0 and +90
captures. It checks that the loop stops after exactly the number of 15 ps
steps that the geometry predicts (301). After locking, every output word must
be the previous one plus the ADC model's increment, so no word is lost, torn
or repeated. The retiming from `clk_0` to the system clock is a single
register. It crosses between two clocks of the same frequency whose phase
the loop keeps changing, and the simulation has no setup or hold times. A
real implementation needs a timing constraint on that path, or a small FIFO
in its place.

## Digital trigger (`digital_trigger`)

The trigger filter turns each event into a triangle. Its input goes through
two K-sample delay lines, which give the second difference

    d[n] = x[n] - 2 x[n-K] + x[n-2K]

and that is integrated twice by two accumulators. Its impulse response rises
1, 2, ..., K and falls back to 0 over the next K samples, so the peaking time
is K samples. The default K = 100 gives 1 us at 100 MSamples/s. The delay
lines are plain memory arrays, which map onto dual-port block RAM. That is
what makes long peaking times cheap: K = 1000 (10 us) costs memory, not
logic.

Arithmetic details:

* The accumulators wrap modulo 2^Y_W. The whole filter equals an FIR whose
  coefficients sum to K^2, so `Y_W = IN_W + 2 + 2*clog2(K)` holds every true
  output and the wraps cancel.
* Until the delay lines have been written once after reset, their outputs
  count as zero. This is the same as block RAM cleared at configuration, and
  it keeps the integrators free of stale data.
* Latency: a sample first shows in `y` four clocks after it enters, with
  weight 1. An impulse of height A peaks at A*K, K+3 clocks after it enters.
* `trig = enable && y > threshold` (threshold: 24 bits, unsigned), registered.
  `trig_pulse` is one clock wide on each rising edge of `trig`.

The filter passes DC with gain K^2. For that reason `daq_channel` subtracts
the current baseline estimate from each sample before the filter, so the
threshold is measured from the baseline. The original system does not say
where the baseline enters; this is this design's choice.

## Baseline estimator (`baseline_estimator`)

The estimator has three identical stages. Each stage is a first-order
low-pass IIR filter feeding a comparator + limiter:

    acc_s += x_s - (acc_s >>> SHIFT)           m_s = acc_s >>> SHIFT
    c_s    = m_s + clamp(x_s - m_s, -L_s, +L_s)   -> input of stage s+1

A pulse on top of the baseline is cut to +-256 LSB around the first stage's
average, then to +-16, then to +-1. Each stage therefore sees less of the
pulses than the one before, and the estimate hardly moves when events arrive.
The estimate is `c` of the last stage, which stays within 1 LSB of that
stage's average.

The baseline changes slowly, so the three stages share one arithmetic unit.
The input is decimated by `DECIM` = 100 (1 MSamples/s). In slot 0 of each
decimation period the unit takes a new sample and works on stage 0, in slot 1
on stage 1, and in slot 2 on stage 2. The filter states live in a 3-entry
register file. `valid` pulses with each new estimate, every DECIM clocks. The
first sample after reset loads all three stages, so the estimate starts at
the signal level.

With SHIFT = 12 each filter has a time constant of 4096 decimated samples
(about 4 ms). In the testbench, a 500 LSB baseline carries +-10 LSB noise and
200 pulses/s of up to 3000 LSB. The estimate then stays between 499 and 503.

## Rate meter (`event_counter`)

This is a 24-bit counter of `trig_pulse`. Two bits of the control register
drive it: an enable, and a reset that holds the count at zero while it is 1.
The count is read as three bytes over the slow-control link. The link is
slow, so software first clears the enable bit and then reads the three bytes,
which keeps them consistent. The counter stops at 2^24-1 rather than wrapping.

## Slow control (`uart_rx`, `uart_tx`, `slow_ctrl_slave`, `expansion_board`)

**Line.** RS232 framing 8N1 at 38400 bit/s, which is 2604 clocks per bit at
100 MHz (38402 bit/s). The receiver synchronises the line, confirms the start
bit half a bit later and samples each bit in mid-cell. It drops a character
whose stop bit is low.

**Packets.** Both directions use four bytes:

| byte | request                          | reply                          |
|------|----------------------------------|--------------------------------|
| 0    | channel address (bits 5:0)       | same                           |
| 1    | bit 7 = write, bits 3:0 = register | same                         |
| 2    | data to write (ignored on reads) | register value after the access |
| 3    | CRC-8 of bytes 0..2              | CRC-8 of bytes 0..2            |

The CRC is x^8+x^2+x+1 (0x07), MSB first, initial value 0. A channel answers
only a request with a correct CRC and its own address. The reply to a write
carries the new value and so serves as the acknowledgement. If the line is
silent for 20 bit times between bytes, the next byte counts as byte 0. This
lets the two ends recover from a broken packet.

**User register (16 bytes per channel).**

| index | name        | access | meaning                                        |
|-------|-------------|--------|------------------------------------------------|
| 0     | CTRL        | r/w    | bit 0 trigger enable, bit 1 counter enable, bit 2 counter reset |
| 1..3  | THR0..THR2  | r/w    | trigger threshold, 24 bits, LSB first          |
| 4..6  | CNT0..CNT2  | r      | event counter, LSB first                       |
| 7..8  | BASE0..BASE1| r      | baseline estimate, 14 bits two's complement    |
| 9     | PHASE       | r      | bit 0 locked, bit 1 UP, bit 2 DOWN             |
| 10..15| —           | r/w    | general purpose                                |

All writable bytes are 0 after reset, so triggers and counters start
disabled. Writes to read-only bytes are ignored; the reply shows the
unchanged value.

**Expansion board.** The board copies the PC's line to every channel. It
follows the request stream itself, with the same framing and CRC. From the
address byte it picks which channel's answer line it connects back to the PC,
so a channel that holds its line low cannot block the rest. After each good
request to an existing channel it waits up to 20 bit times for the start bit
of the answer. If the answer comes, the channel's bit in `defective` is
cleared; if not, it is set. The board also ORs all channel `trig` levels into
`trig_out`, one clock later. The address field has 6 bits, so up to 64
channels can be addressed (16 NIM modules of 4). The top instantiates 24, the
number that share one PC.

## Parameters

| module             | parameter       | default | meaning |
|--------------------|-----------------|---------|---------|
| gerda_daq_top      | N_CH            | 24      | channels on one PC link |
| digital_trigger    | K               | 100     | delay = peaking time in samples (1 us); up to ~1000 |
| digital_trigger    | THR_W           | 24      | threshold width |
| baseline_estimator | DECIM           | 100     | decimation (and sharing period) |
| baseline_estimator | SHIFT           | 12      | IIR coefficient 2^-SHIFT |
| baseline_estimator | LIMIT0, LIMIT_SHR | 256, 4 | limits 256, 16, 1 LSB |
| adc_phase_align    | OBS_CYCLES, SETTLE_CYCLES | 256, 16 | observation window, wait after a step |
| uart_*, slow_ctrl_slave, expansion_board | CLKS_PER_BIT | 2604 | clocks per serial bit |
| slow_ctrl_slave, expansion_board | GAP_BITS, TIMEOUT_BITS | 20, 20 | framing gap, answer timeout |

Shared constants, the register map, the `ch_status_t` struct and the CRC
function are in `rtl/daq_pkg.sv`.

## What follows the original system and what does not

These parts follow the original system: the list of functions; the 14-bit,
100 MHz data path; the trigger filter structure (two K-sample delays, a
factor 2, two accumulators) with a 1 us peaking time in block RAM; the
per-channel threshold and enable; the 24-bit counter read as three bytes with
enable/reset register bits; three IIR + comparator/limiter stages sharing one
fast unit; the -90/0/+90 captures with SYNC, XOR, UP/DOWN and one-direction
15 ps steps; RS232 at 38400 bit/s with a CRC; 16 register bytes per channel;
addressing through the expansion board, with diagnostics there; and the OR of
all triggers.

These are this design's own choices, since the original leaves them open:
the packet format, the CRC polynomial and the register map; the framing gap
and the answer timeout; the IIR form, its coefficient, the limits, the
decimation and the preload; subtracting the baseline before the trigger; the
comparison rule and the one-pulse-per-crossing trigger output; counter
saturation; the observation and settle windows of the phase loop; the
DCM-style `psen/psincdec/psdone` handshake; and all register stages and word
widths not given.

Not built: the analog front end (input selection, attenuation, gain, offset,
30 MHz anti-aliasing), the ADC, the differential drivers of the ADC outputs,
the clock manager itself, the high-rate serial link of the samples to the PCI
receiver (its format is unknown), and the PCI receiver.

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. The ones with readout clocks need `--timing`
and a 1 ns/1 ps timescale. From the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
          -Irtl -y rtl -y tb rtl/daq_pkg.sv tb/tb_gerda_daq_top.sv \
          --top-module tb_gerda_daq_top
./obj_dir/Vtb_gerda_daq_top
```

| testbench              | what it covers | run time |
|------------------------|----------------|----------|
| tb_uart                | bit-exact 8N1 waveform, loopback, frame error | < 1 s |
| tb_event_counter       | random events, enable, clear, saturation | < 1 s |
| tb_digital_trigger     | K = 100: output vs. direct convolution every clock, peak height/time, DC gain, trigger level and pulse; K = 1000: impulse peak height/time | < 1 s |
| tb_baseline_estimator  | default size: equations every output, period, latency, accuracy under 200 pulses/s | ~4 s |
| tb_adc_phase_align     | step count to lock, UP and DOWN seen, word integrity after lock | < 1 s |
| tb_slow_ctrl_slave     | all register kinds, CRC, wrong address, bad CRC, resync | < 1 s |
| tb_expansion_board     | routing, defective flag, non-existent channel, trigger OR | < 1 s |
| tb_daq_channel         | one channel end to end: lock, threshold, counts = large pulses, stop, clear, baseline | ~1 s |
| tb_gerda_daq_top       | 24 channels, serial bit time shortened to 64 clocks: all mechanisms, incl. CRC error and a cut answer line | ~45 s |
| tb_gerda_daq_full      | 24 channels, every parameter at its default, 38400 bit/s: lock, set-up, count | ~2 min |

Models used only by the testbenches: `dcm_model` (three phase-shifted clocks,
15 ps steps, psdone latency), `adc_model` (baseline + noise + well-separated
large and small pulses), and `sc_pc_model` (the PC's serial end, with a CRC
computed by polynomial division, independent of the RTL's byte-serial form).

## Files

`rtl/`: `daq_pkg`, `uart_rx`, `uart_tx`, `slow_ctrl_slave`, `digital_trigger`,
`event_counter`, `baseline_estimator`, `adc_phase_align`, `daq_channel`,
`expansion_board`, `gerda_daq_top`. `tb/`: the testbenches above and the three
models. In `gerda_daq_top`, the per-channel `psincdec` outputs are constant 1
because the phase loop only ever shifts later.
