# Digitizer logic for a four-lobe beam position and phase monitor

A beam position monitor (BPM) for a proton linac has four pickup lobes around
the beam pipe. Each lobe delivers an rf signal at the bunch frequency (402.5 or
805 MHz). The amplitudes of the four lobes give the beam position. Their phase
against the machine reference gives the beam phase. This RTL is the digital part of
such an instrument, built as a PC plug-in card:

* An analog front end (AFE) down converts each lobe to a 50 MHz IF.
* Four 14-bit ADCs sample the IF at 40 MHz.
* The **digital front end (DFE)** turns each ADC stream into an I array and a
  Q array, which makes eight arrays. It also drives the AFE's calibration
  switches and gain.
* The **PCI carrier card** stores the eight arrays in eight 256 kB FIFOs when a
  trigger arrives. It then moves them by DMA into the PC's memory. It also
  configures the DFE over a 12-bit control bus, the *L-bus*.

Host software then averages the arrays into position and phase. That part is
software and is not included here.

The structure follows the published description of the SNS linac BPM
electronics. That description gives the following:

* the sample rates and widths;
* the I/Q split by under-sampling;
* the test multiplexer;
* the three-step calibration and its 300 ns limit;
* the 1X/4X gain;
* the eight 256 kB FIFOs;
* the duties of the card's gate array.

It does not give register maps, bus protocols or internal timing. Those are
the choices of this design, and they are marked as such below and in each
file's header.

## Getting I and Q by under-sampling

This is the part that needs the most care.

The IF is 50 MHz and the sample clock is 40 MHz. One sample period (25 ns)
is therefore 1.25 IF periods (20 ns), so the IF phase advances by 450°, or 90°
modulo a period, from one sample to the next. For a signal `A·cos(ωt + φ)`
with `I = A·cos φ` and `Q = A·sin φ`, the samples repeat the pattern

    x[0] = I,  x[1] = Q,  x[2] = -I,  x[3] = -Q,  x[4] = I, ...

(The sign given to Q is a convention. This design uses the one above.)

`iq_demux` undoes this pattern. On every clock it uses the current sample and
the previous one, and picks one as I and the other as Q, with the signs
removed:

| phase of x[n] | I        | Q        |
|---------------|----------|----------|
| 0             | x[n]     | -x[n-1]  |
| 1             | x[n-1]   | x[n]     |
| 2             | -x[n]    | x[n-1]   |
| 3             | -x[n-1]  | -x[n]    |

So the I array and the Q array each run at the full 40 MS/s. I and Q are
taken 25 ns apart, which is harmless for a signal whose band is limited to
about ±10 MHz. This rate also fits the FIFO size: 256 kB of 16-bit words is
131072 samples, which is 3.28 ms at 40 MS/s. That matches the roughly 3.2 ms
of history the system is meant to keep.

The position in the pattern has to be known. The 40 MHz clock is made from a
2.5 MHz phase reference by multiplying it by 16. The input `ref_sync` is a
one-clock pulse once per reference period, so it falls every 16 samples. This
design treats the sample at `ref_sync` as phase 0. Because 16 is a multiple
of 4, the pulse always agrees with the free-running phase counter. A future
10 MHz reference (one pulse every 4 samples) works the same way.

An output word is 16 bits signed. This is because -(-8192) does not fit in
14 bits. A full-scale ADC can produce -8192 but not +8192, so the negated
samples stay within 16 bits.

The per-channel test multiplexer (`dfe_data_mux`) can replace the I/Q
streams with other data:

* In **raw** mode, the raw ADC sample goes on both arrays.
* In **ramp** mode, a count that rises by one per clock goes on the I array
  and its complement goes on the Q array. The count restarts at
  `ref_sync`.

The raw and ramp modes are for checking the data path end to end.

## Self-calibration with reflected bursts

In front of each down converter, a fast switch network has three positions
(`afe_sw_e`):

* `SW_NORMAL`: the pickup cable feeds the down converter;
* `SW_CAL_TO_DC`: the calibration source feeds the down converter;
* `SW_CAL_TO_CABLE`: the calibration source drives the pickup cable.

The far end of each pickup lobe is shorted. A burst sent down the cable
therefore comes back one cable round trip later (300 ns). A calibration cycle
works much like a time-domain reflectometer. `cal_timing` runs it, with all
four channels switched together. With the reset settings (12 clocks = 300 ns)
it goes:

    clock:    0 ........ B  ..... B+G ............ B+G+R ........ B+G+R+B
    switch:   CAL_TO_DC  | NORMAL | CAL_TO_CABLE    | NORMAL
    rf burst: on         | off    | on for B, off   | off
    window:   meas_direct|        |                 | meas_refl

* **Step 1:** a burst of B clocks goes straight into the down converter. Its
  amplitude and phase are the reference.
* **Step 2:** a burst of the same length is launched into the cable.
* **Step 3:** R clocks after the launch, when the reflection arrives, the
  switch returns to normal. The reflected burst is then measured for B
  clocks.

The reflected burst has travelled the whole signal path, so comparing it with
the step-1 burst calibrates the chain in amplitude and phase.

The burst can be no longer than the round trip. If B is set larger than R, it
is cut to R. The gap G (reset value 40 clocks) is a choice of this design.
The `meas_direct` and `meas_refl` windows are outputs, so that the
calibration samples can be found in the data. A calibration cycle starts on a
pulse at `cal_trig`. The instrument calibrates continuously between beam
pulses. What issues the pulse is left to the system.

The same block drives the AFE gain select, `gain_4x` (0 = 1X, 1 = 4X).

## Capture and transfer

`acq_ctrl` runs on the ADC clock:

1. The host arms it.
2. The next rising edge of the front-panel `trigger` starts a delay of
   `TRIG_DLY` clocks.
3. It then writes `2·NPAIRS` consecutive samples of all eight arrays into the
   FIFOs.

The first sample written is the one present `TRIG_DLY + 3` clocks after the
trigger edge. Two of those clocks are the synchroniser. The reset length,
20000 pairs, is 1 ms, one injection cycle. The largest length, 65536 pairs,
fills the FIFOs exactly. A trigger while not armed only increments the
trigger counter. A write into a full FIFO is dropped and sets a sticky
overflow flag.

Each FIFO (`sample_fifo`) is dual-clock. Its write side is on the ADC clock
and its read side on the PCI clock. The pointers are Gray-coded, and the read
side is first-word-fall-through.

`dma_engine` empties the FIFOs one after the other, starting with array 0. It
packs two samples per 32-bit word, with the earlier sample in bits 15:0.
Sample pair `w` of array `k` goes to

    byte address = DMA_BASE + 4·(k·NPAIRS + w)

The arrays are numbered I0, Q0, I1, Q1, I2, Q2, I3, Q3 (array 2c is the I of
ADC channel c). The engine moves at most one word every two PCI clocks. At
33 MHz that is 66 MB/s. A 1 ms capture of all eight arrays is 640 kB, and
moving it needs 38.4 MB/s at the 60 Hz pulse rate. In simulation, a 1 ms
capture plus its DMA takes about 10.7 ms of the 16.7 ms between pulses.
A full 3.2 ms capture at every 60 Hz pulse would need 126 MB/s, which this
engine cannot sustain. It can do so up to about 31 Hz.

The engine's memory side is a plain valid/ready write port (`mw_*`). It
stands for the bus-master side of a PCI core, which is not part of this RTL.

## Control

### Host registers (`host_regs`, PCI clock)

Word addresses, 32-bit data. Writes take effect on the next clock. Read data
appears the clock after `reg_rd`.

| addr | name       | access | meaning |
|------|------------|--------|---------|
| 0x00 | `CTRL`     | W  | bit0 arm, bit1 start DMA, bit2 clear FIFO overflow flags |
| 0x01 | `STATUS`   | R  | bit0 capture done, bit1 armed, bit2 capture running, bit3 DMA busy, bit4 any FIFO overflow, bit5 L-bus busy |
| 0x02 | `NPAIRS`   | RW | sample pairs per array and capture, 1..65536 (reset 20000) |
| 0x03 | `TRIG_DLY` | RW | ADC clocks from trigger to first sample (reset 0) |
| 0x04 | `DMA_BASE` | RW | host byte address of array 0 (word aligned) |
| 0x05 | `LBUS`     | W  | one L-bus write: bits 27:16 DFE register, bits 11:0 data; ignored while `STATUS[5]` is set |
| 0x06 | `TRIG_CNT` | R  | triggers seen since reset |

Change `NPAIRS` and `TRIG_DLY` only while no capture is armed or running.
They are used in the ADC domain without synchronisation.

### L-bus

The L-bus is 12 bits wide and write-only. A write is two words on `lb_data`:
first the register address (`lb_addr` = 1), then the data (`lb_addr` = 0).
Each word uses a four-phase handshake:

1. The master drives the word and raises `lb_stb`.
2. The DFE takes the word and raises `lb_ack`.
3. The master drops `lb_stb`.
4. The DFE drops `lb_ack`.

Both ends synchronise the other's handshake line. This lets the PCI card and
the DFE run on unrelated clocks. The word is stable whenever `lb_stb` is
high, and `lbus_master` asserts this.

### DFE registers (written over the L-bus)

| addr  | name         | reset | meaning |
|-------|--------------|-------|---------|
| 0x000 | `MODE`       | 0     | 2 bits per channel, channel 0 in bits 1:0: 0 I/Q, 1 raw, 2 ramp |
| 0x001 | `GAIN`       | 0     | bit0: 1 = 4X |
| 0x002 | `CAL_BURST`  | 12    | burst length B, clocks (0 is taken as 1) |
| 0x003 | `CAL_REFL`   | 12    | cable round trip R, clocks (0 is taken as 1) |
| 0x004 | `CAL_GAP`    | 40    | gap G, clocks |
| 0x005 | `CAL_ENABLE` | 1     | bit0: run a cycle on each `cal_trig` |

## Clocks and reset

There are two clocks. `adc_clk` is 40 MHz and clocks the DFE, the capture
control and the FIFO writes. `pci_clk` clocks the host registers, the DMA,
the L-bus master and the FIFO reads. Signals cross between them as follows:

* Commands (arm, overflow clear) cross as toggles.
* Status bits cross through two-flip-flop synchronisers.
* The trigger count crosses in Gray code.
* The L-bus crosses through its own handshake.

`rst` is active high and must be held for a few cycles of both clocks. It is
released through a synchroniser in each domain, and every register is reset
synchronously.

## Hierarchy

    bpm_top
    ├── dfe                      DFE card, adc_clk
    │   ├── lbus_slave           L-bus receiver
    │   ├── dfe_iq_fpga ×2       two channels each
    │   │   ├── iq_demux ×2
    │   │   └── dfe_data_mux ×2
    │   └── cal_timing           calibration switches, gain
    └── pci_fpga                 PCI card gate array and FIFOs
        ├── host_regs
        ├── lbus_master
        ├── acq_ctrl             adc_clk
        ├── sample_fifo ×8       adc_clk → pci_clk
        ├── dma_engine
        └── pulse_sync, bit_sync clock-domain crossing

`bpm_pkg` holds the shared widths, types (`dfe_mode_e`, `afe_sw_e`,
`dfe_cfg_t`) and both register maps.

The following are outside the RTL. Their signals are ports of `bpm_top`:

* the AFE (`afe_sw`, `cal_rf_on`, `gain_4x`);
* the ADCs (`adc`, 14-bit two's complement);
* the clock multiplier, a PLL that makes `adc_clk` from the 2.5 MHz
  reference (`adc_clk`, `ref_sync`);
* the PCI bus core (`reg_*`, `mw_*`, `dma_done`).

## Where this design departs from the published system, or fills gaps

* The Q sign convention, the pairing of current and previous sample, and the
  use of `ref_sync` for alignment are this design's own choices.
* I and Q are produced at 40 MS/s each. This rate was inferred from the FIFO
  size and the stated 3.2 ms of history.
* FIFO words are 16 bits. The published system gives only the size in bytes.
* In the published system the FIFOs are separate parts on the card. Here they
  are instances inside `pci_fpga`.
* All four channels use one switch setting and one gain bit.
* All register maps, the L-bus protocol, the capture and DMA sequencing and
  the calibration gap are this design's own.
* The clock multiplier's serial programming interface is not given in the
  published system and is not built.

## Simulation

Every block has a self-checking testbench `tb/<block>_tb.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps --top-module bpm_top_tb \
        -y rtl -y tb +libext+.sv -Irtl rtl/bpm_pkg.sv tb/bpm_top_tb.sv
    ./obj_dir/Vbpm_top_tb

Use the same command for any other testbench, changing the top module and
file.

* `bpm_top_tb` runs the whole design at its default sizes, with eight FIFOs
  of 131072 words:
  * a 1 ms I/Q capture, moved by DMA, with every word checked;
  * raw, ramp and mixed modes set over the L-bus, with a trigger delay;
  * a capture that fills the FIFOs completely, followed by its DMA;
  * an overflow;
  * calibration cycles, one with a clamped burst, 4X gain, and calibration
    switched off.

  It counts each of these mechanisms and fails if one never happened. It
  takes a few seconds.
* `bpm_workload_tb` runs the operating scenarios on the full design. One is
  1 ms captures at the 60 Hz pulse rate, each followed by a DMA that must
  finish before the next pulse. The other is a train of 50 µs pulses on a
  noisy, off-centre beam, averaged to position and phase in the testbench.
  Every pulse must give the phase within 0.1° and the difference-over-sum
  position within 0.001. This takes about 30 s.
* The block testbenches use small FIFOs (16 or 64 words) where a FIFO is
  involved. Everything else runs at the default sizes.

The testbenches build their own input data and use `$urandom`. They need no
data files.
