# CCB FPGA: phase-switch, calibration-diode and integration sequencer

A differential radiometer measures the difference between two signal paths by
switching phase shifters in and out of them and adding up the detector output
separately for each switch setting. The result is correct only if every switch
setting gets exactly the same amount of integration time. Time spent while a
switch settles, or while a noise diode switches on or off, must be dropped
evenly.

This RTL is the FPGA that does this timing for a two-radiometer receiver with
16 detector channels. It drives two phase switches (A and B), two calibration
noise diodes and the reset of the analog integrators, and it takes a 16-channel
A/D sample at the end of every integrator window. It adds each sample into one
of 64 sums, one for each channel and phase-switch state. At the end of every
integration it writes the sums, an overflow mask and the last A/D values into
host memory over PCI, and then interrupts the host driver. The driver programs
everything through a small PCI register map, one integration ahead.

## Vocabulary

| term | meaning |
|---|---|
| sample | one integrator window, closed by one A/D conversion of all 16 channels |
| cycle | 1-32 samples. Each sample has its own phase-switch setting {B,A}. |
| measurement | the samples of one switch setting within one cycle |
| integration | `cycles-per-integ` cycles. Produces 64 sums, one per channel and switch state. |
| scan | one or more integrations started by one `start-scan` |

A switch state of 1 means the shifter inserts 180 degrees, and 0 means it does not.
The clock is nominally 10 MHz, and every interval register counts 100 ns clocks.

## How the time is spent: short and long samples

This is the part of the design that matters most.

- A phase switch needs `phase-switch-dt` clocks to settle after it changes.
- Every sample is followed by `analog-reset-dt` clocks of integrator reset.
- A sample that directly follows a settling delay is a **short sample** of
  `short-sample-dt` clocks.
- Every other sample is a **long sample** of `long-sample-dt` clocks.
- The driver sets `short = long - phase-switch-dt`. A settling delay plus a
  short sample therefore lasts as long as one long sample.

Each cycle must give every switch state the same time. To achieve this:

- The driver places the samples of each state contiguously, with the same
  number of samples per state.
- The hardware always inserts a settling delay at the start of every cycle,
  whether or not a switch changes. So each state gets exactly one settling
  delay per cycle.
- For cycles with no switching, the driver sets `phase-switch-dt` to 0.

Clock cost of sample *k* of a cycle, where an interval of 0 costs one clock:

    k == 0 or state(k) != state(k-1):  phase-switch-dt + short-sample-dt + analog-reset-dt
    otherwise:                         long-sample-dt + analog-reset-dt

The length of an integration is `cycles-per-integ` times the sum of these
costs over the cycle. With the register reset values (1 sample per cycle, 40
cycles, long = short = 250, other intervals 0), one integration takes
40 x (1 + 250 + 1) = 10,080 clocks = 1.008 ms. That is the nominal 25 us sample
and the 1 ms minimum integration time the system is specified for.

Calibration diodes can change only at an integration boundary. When the newly
written `cal-diode-states` differ from the current ones, the boundary inserts
a wait of `cal-diode-dt` clocks (up to 2^32-1, 429 s) before the next
integration's first sample. When the states do not change, the next
integration follows with no gap. Every scan starts with this wait, so switches
and diodes whose state was unknown can settle. The driver makes the first
integration's `cal-diode-dt` the longest of the switch and diode settling times.

## The two state machines

**Integration state machine** (`ccb_integ_fsm`). It has three states:

    WAIT_SCAN_START --start-scan and (not wait-1pps, or 1-PPS rising edge)--> WAIT_CAL_DIODE
    WAIT_CAL_DIODE  --cal-diode-dt elapsed--> INTEGRATE
    INTEGRATE       --integration complete and cal-diode states change--> WAIT_CAL_DIODE
    any state       --start-scan cleared--> WAIT_SCAN_START

- It latches the configuration registers once, when `start-scan` is first seen.
  This happens before any wait for 1-PPS.
- It latches them again at every integration boundary. The driver can
  therefore rewrite them freely during an integration.
- Nothing runs until the driver has set `interrupt-enable` once after reset.

**Sample state machine** (`ccb_sample_fsm`). Each state is timed by its own
counter (`ccb_timer`):

    WAIT_INTEG_START --INTEGRATE--> PHASE_SHIFT --> SHORT_SAMPLE --> WAIT_S_RESET
    WAIT_S_RESET / WAIT_L_RESET:
        next sample needs a settling delay, or cycle complete, or integration complete
            --> PHASE_SHIFT
        otherwise
            --> LONG_SAMPLE --> WAIT_L_RESET

When the integration state machine leaves INTEGRATE, the sample machine returns
to WAIT_INTEG_START.

**Phase-switch sequencer** (`ccb_phase_seq`). It provides the inputs of those
decisions:

- Two 32-bit shift registers hold the switch states. They are loaded from
  `phase-switch-a/b` at each cycle start and shifted right after each sample.
  Bit *n* of the register is the state in sample *n*.
- A comparator of bit 0 against bit 1 gives "next sample needs a delay".
- A cycle sample counter gives "cycle complete".
- An integrate sample counter gives "integration complete". It counts up to
  `samples-per-cycle` x `cycles-per-integ`, at most 2,097,120 samples.

The switch lines change when the reset of the previous sample ends, which is
the start of the settling delay.

## Register map (PCI base + offset)

Integers are unsigned and little-endian. Writes keep only the listed low bits.

| offset | register | bits | reset | meaning |
|---|---|---|---|---|
| 0x40 | control | 8 | 0 | see below |
| 0x44 | samples-per-cycle | 6 | 1 | 1-32 |
| 0x48 | phase-switch-a | 32 | 0 | bit n = switch A in sample n |
| 0x4C | phase-switch-b | 32 | 0 | bit n = switch B in sample n |
| 0x50 | cycles-per-integ | 16 | 40 | cycles per integration |
| 0x54 | long-sample-dt | 16 | 250 | clocks |
| 0x58 | short-sample-dt | 16 | 250 | clocks |
| 0x5C | phase-switch-dt | 8 | 0 | clocks |
| 0x60 | analog-reset-dt | 8 | 0 | clocks |
| 0x64 | cal-diode-states | 2 | 0 | bit 0 = diode A, bit 1 = diode B |
| 0x68 | cal-diode-dt | 32 | 0 | clocks |
| 0x6C | sent-1pps | 1 | 0 | 1-PPS interrupt sent; write 0 to clear |
| 0x70 | sent-integ-done | 1 | 0 | integration interrupt sent; write 0 to clear |

Control bits:

| bit | name | function |
|---|---|---|
| 0 | start-scan | Clearing it stops the scan at once. Setting it starts a new scan. |
| 1 | wait-1pps | Start the scan on the next 1-PPS rising edge. |
| 2 | reset-fpga | Raises `fpga_reload` to request a firmware reload. |
| 3 | interrupt-enable | Enables interrupts. The first time it is set, the state machines are released. |
| 4-7 | drive-phs-a, drive-phs-b, drive-cal-a, drive-cal-b | Enable the corresponding control-line driver. |

## Interrupts

One interrupt line (`irq`, active high) is shared by two events. Each event has
its own status register, so clearing one can never lose the other.

- **Integration interrupt.** Sets `sent-integ-done` after an integration's
  results have been written to host memory. The next integration is already
  running by then.
- **1-PPS interrupt.** Sets `sent-1pps` on every rising edge of the 1-PPS input,
  after a two-flop synchroniser.

While `interrupt-enable` is clear, events set nothing and the line is held low.
In its handler the driver reads both registers, clears the ones that are set,
reads the DMA block, and writes the configuration for the integration after the
one that has just started.

Driver sequences:

- **Start a scan immediately.** Clear start-scan, clear wait-1pps, write the
  first integration's configuration, then set start-scan.
- **Start a scan on the second.** Clear start-scan, set wait-1pps, write the
  configuration, wait for a 1-PPS interrupt early enough, then set start-scan.

## DMA block

Each integration writes 74 32-bit little-endian words at byte offsets
0x000-0x124 of the DMA area:

| words | contents |
|---|---|
| 0-63 | Integrated value *i*, where i = 4 x channel + {B,A}. Index 4c+0..4c+3 are the four switch states of A/D channel c. |
| 64-65 | Overflow mask. Bit *i* is set when sum *i* passed 2^32-1 (sums wrap). The 8 bytes are stored most significant byte first: bit 0 is the LSB of byte 7, and bit 63 is the MSB of byte 0. |
| 66-73 | Last A/D value of each channel, two per word, with the even channel in the low half. |

A/D channel order is detector fastest, then band (4), then radiometer (2).
Channel 0 is radiometer 1, band 1, detector 1. Channel 1 is detector 2 of the
same band. Channel 2 is band 2, detector 1, and so on.

Sums, mask and diagnostics are copied into a second register set at the
boundary, so the next integration starts accumulating immediately.
`ccb_dma_writer` then streams the copy out, one word per accepted transfer.
Without back-pressure this takes 74 clocks (7.4 us). If an integration ends
while the previous block is still being written, its results are dropped,
the sums are still cleared so the next integration starts from zero, and
`dma_overrun` pulses. This cannot happen at integration times anywhere near
1 ms.

## Top level and external parts

`ccb_top` wires the blocks together. Everything outside the FPGA logic is a port:

| ports | connect to |
|---|---|
| `reg_wr, reg_addr[7:0], reg_wdata, reg_be, reg_rdata` | Register port of a PCI target core. `reg_rdata` is combinational. |
| `dma_valid, dma_addr[8:0], dma_data, dma_ready` | Write port of a PCI bus-master core. The core adds the DMA base address. Address and data are held until `dma_ready`. |
| `irq` | PCI interrupt line (invert for INTA#). |
| `adc_data[16][16]`, `adc_strobe` | The 16 A/D converters. Data is taken in the clock where `adc_strobe` is high, which is the last clock of a sample. |
| `integ_reset` | Discharge switch of the analog integrators. |
| `phs_a_out/_oe`, `phs_b_out/_oe`, `cal_a_out/_oe`, `cal_b_out/_oe` | Phase-switch and noise-diode control lines: commanded state and driver enable. |
| `pps_in` | 1-PPS timing input, asynchronous. |
| `fpga_reload` | Configuration logic, to reload the firmware. |

About 800 word-level cells and 5,300 flip-flops. Most of these are the 64 sums
and their copy.

## What is specified and what is chosen here

The register map, reset values, control bits, state machines, timers, the
short/long sample rule, the configuration latching, the interrupt scheme, the
channel order and the overflow-mask byte order come from the CCB interface
specification. The following points are this design's own choices:

- A timer value of 0 lasts one clock. The register ranges start at 1, but
  several reset values are 0.
- In the sample machine, "cycle or integration complete" takes priority over
  "take a long sample". The return to WAIT_INTEG_START when INTEGRATE drops is
  also added here.
- "Cal-diode states change" means that the new `cal-diode-states` differ from
  the states in force.
- The addresses of the two status registers are chosen here. So is the
  write-0-to-clear rule.
- The switch state numbering of the four integrations, {B,A} = 0..3, is chosen
  here.
- The DMA block order is chosen here. So is packing two diagnostics per word.
- Sums wrap modulo 2^32 rather than saturating. The overflow flag is sticky for
  the integration.
- The drive-* bits are read as driver enables.
- Results that arrive while a DMA block is still being written are dropped.
- `samples-per-cycle` 0 acts as 1, and values above 32 act as 32.
  `cycles-per-integ` 0 acts as 1.
- The register and DMA ports are generic request ports, not a PCI core.

The following are not included: the PCI protocol core, the A/D converters and
the analog integrators, the power-supply voltage monitor (its channels and
format are unspecified), the firmware EPROM and reload mechanism, and the
microwave front end.

## Files

| file | contents |
|---|---|
| `rtl/ccb_pkg.sv` | Offsets, reset values, configuration struct, DMA layout, state encodings. |
| `rtl/ccb_regs.sv` | Register file. |
| `rtl/ccb_timer.sv` | State timer. |
| `rtl/ccb_phase_seq.sv` | Phase-switch shift registers, comparator, sample counters. |
| `rtl/ccb_sample_fsm.sv` | Sample state machine with its four timers. |
| `rtl/ccb_integ_fsm.sv` | Integration state machine, configuration latch, cal-diode timer. |
| `rtl/ccb_accum.sv` | 64 accumulators, overflow flags, diagnostics, result copy. |
| `rtl/ccb_dma_writer.sv` | DMA block writer. |
| `rtl/ccb_irq.sv` | 1-PPS synchroniser, status registers, interrupt line. |
| `rtl/ccb_top.sv` | Top level. |
| `tb/tb_<module>.sv` | Self-checking testbench of each module. |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, to run the full-system test:

    verilator --binary --timing --assert -Irtl -y rtl rtl/ccb_pkg.sv tb/tb_ccb_top.sv \
              --top-module tb_ccb_top -Mdir obj_top && obj_top/Vtb_ccb_top

Replace `ccb_top` with any other module name to run its own test.

`tb_ccb_top` runs the top with its default parameters. It acts as the driver,
host memory (with random back-pressure), the A/D converters and the 1-PPS
source. An independent reference model predicts three things from the
configuration the driver wrote:

- every DMA block,
- the switch states seen at every sample,
- the exact clock of the first sample of every scan and integration.

The scenarios are:

- the register defaults (1.008 ms integrations)
- the nominal analog timing: 25 us samples, 0.5 us reset, 2 us switch settling,
  and two-switch 8-sample cycles (1.02 ms integrations)
- switched 4-32 sample cycles, with and without diode changes, including a zero
  settling time
- a scan started on 1-PPS (the period is scaled to 3 ms)
- a scan aborted by clearing start-scan
- masked interrupts
- a full-scale integration of 65,568 samples that overflows
- integrations too short for the DMA transfer

It counts each of these mechanisms and fails if any of them never occurred.
The module tests cover the edges in more detail: timer lengths, byte enables,
every transition, overflow limits and the mask byte order. All tests finish
in well under a second.
