# TMC-TEG5: a pipeline time-to-digital converter with a level-1 buffer, plus a delay-line serialiser

The Time Memory Cell (TMC) measures when the edges of a detector signal arrive. It does not use a fast counter. Instead, a ring oscillator is phase-locked to the 40 MHz system clock. The oscillator has 32 stages, and its taps divide every 25 ns clock period into 32 equally spaced instants (781 ps apart). At each instant the hit input is latched. Every clock period therefore yields 32 samples of the input, a "snapshot" of its waveform. An edge shows up as a change between two neighbouring samples.

The samples are compressed into a short code. The code goes into a ring buffer, written every clock, that holds the last 6.4 µs of history. That history waits there for a level-1 trigger decision. When a trigger arrives, the chip copies a programmable window of the history into readout FIFOs, and a host reads it through a 12-bit port. Writing never pauses, so the readout causes no dead time.

This repository has synthesizable SystemVerilog for:

* the digital part of the two-channel TMC-TEG5 chip (`tmc_teg5`);
* a small parallel-to-serial converter (`p2s_converter`) that runs the TMC idea in reverse. Eight data bits are launched at successive delay-line instants and XORed into one NRZI serial line: 11 bit slots per clock, 220 Mb/s at 20 MHz.

The top level `tmc_top` holds both side by side. They share no signals.

The analog parts are not RTL. These are the PLL, the asymmetric ring oscillator, the delay line of the serialiser, and the pad receivers and drivers. They enter the design as input ports: `tap` carries the 32 oscillator phases per channel, and `ps_tap_start`, `ps_tap_d` and `ps_stop` carry the delay-line strobes. The testbenches drive these ports from behavioural timing models.

## From 32 samples to a 12-bit word

`tmc_latch` has one flip-flop per tap. Flip-flop *i* is clocked by oscillator tap *i* and samples the hit input. At the next clock edge all 32 samples are copied into the clock domain as one 32-bit word. The last sample of the period before is kept as `prev_last`, so that an edge right at a period boundary is seen too.

In the word, bit 0 is the earliest sample. Tap *i* must rise (i + ½)·T/32 after the clock edge. That is the phase the oscillator model produces, and the order the bits assume.

The 32 samples are split into two halves of 16. Each half has its own `tmc_encoder`, which finds the **first** transition in the half and emits a 6-bit code:

| bit | 5 | 4 | 3..0 |
|---|---|---|---|
| meaning | hit: a transition was found | rise: 1 = rising, 0 = falling | position 0..15 inside the half |

A transition at position *p* means that sample *p* differs from sample *p−1*. For position 0 of the lower half, the comparison is with `prev_last`. For position 0 of the upper half, it is with sample 15.

The stored word is `{code(upper half), code(lower half)}`, 12 bits. So one channel records up to two edges per 25 ns period, one per 12.5 ns half. This gives a double-pulse resolution below 14 ns. Both edge polarities are recorded.

Within one half, a second edge is lost. This is a deliberate limit of the two-encoder scheme. The 6-bit code layout is this design's own choice: the hit tag, polarity and position follow the earlier TMC chip's "hit tag + position, rise and fall" scheme.

Latency: the input during the clock period that starts at clock edge *n* is written into the ring buffer at edge *n + 2*.

## Level-1 buffer, trigger and event window

* **Write sequencer.**
  * A `WSTART` pulse sets `WRUN`.
  * From then on, the 8-bit write pointer advances every clock and wraps at 256.
  * Both channels' 256-word dual-port memories (`tmc_dpm`) are written at that pointer every clock.
* **Trigger sequencer.**
  * A rising edge of `TRIG` stores an event position in the 5-word trigger FIFO: `write pointer − CSR0(offset)`.
  * `TRIGOUT` pulses for one clock to acknowledge the trigger.
  * A trigger seen at clock edge *m* selects the periods that started at edges *m − 2 − offset*, *m − 1 − offset*, … .
  * A trigger is refused if the FIFO already holds five positions. This sets the overflow error flag.
  * A trigger is also refused while writing is stopped. This sets the "trigger while idle" flag.
* **Readout sequencer.**
  * It takes the next position from the trigger FIFO. Into every channel's 128-word readout FIFO it pushes a header word holding the 12-bit event number, followed by CSR4 (word count) memory words starting at that position.
  * All channels are copied in lockstep.
  * It starts an event only when every readout FIFO has room for CSR4 + 1 words. Otherwise it stalls, and the `rstall` test output shows this.
  * It never reads the word the write pointer is about to write.
  * Consecutive events start CSR4 + 3 clocks apart (2 clocks when CSR4 = 0).
  * `RRUN` is high while an event is being copied.
* **Output sequencer.**
  * It hands the words out one at a time in this order: channel 0's header and data, then channel 1's.
  * `DVALID*` is low while a word is on `D0-11`. `CH0` gives its channel. `EVEND*` marks the last word of the event.
  * The host takes a word with a strobe:
    * `SYNCMOD = 0`: a rising edge of `RE*`.
    * `SYNCMOD = 1`: a rising edge of `OCLK` while `RE*` is low.
  * Both strobe inputs pass through two-flop synchronisers, so the host may run on any clock. Allow at least two or three system clocks per strobe phase.
  * `UBYTE` puts bits 11..6 on `D0-5` and releases `D6-11`.
  * `OE*` enables the data, `CH0` and `CHP0-3` drivers. `CHP0-3` show the chip identifier input `cid`.
  * `EMPFLG*` is low when nothing is waiting. `ORUN` is high while words are pending.

The depths follow the chip: 256-word buffer (6.4 µs at 40 MHz), 128-word readout FIFOs, and a 5-word trigger FIFO (up to five consecutive triggers). They are parameters of `tmc_teg5` and `tmc_top` (`DPM_DEPTH`, `RFIFO_DEPTH`, `TFIFO_DEPTH`, `NCH`). The window must fit inside the buffer: offset + word count should stay well below 256 minus the trigger latency.

## Register port (CSR)

The port has an 8-bit bidirectional bus (`CIO0-7`, split into `cio_in`, `cio_out` and `cio_oe`), a 3-bit address `RA0-2`, and the strobes `CS*` and `WR*`.
* A write happens at the clock edge while `CS*` and `WR*` are both low.
* While `CS*` is low and `WR*` is high, the register is driven on `cio_out`.

| addr | name | access | contents | reset |
|---|---|---|---|---|
| 0 | offset | r/w | trigger offset in clock periods | 16 |
| 1 | rptr | r | read pointer | 0 |
| 2 | status | r | {0, 0, ORUN, RRUN, WRUN, trigger FIFO count[2:0]} | – |
| 3 | wptr | r | write pointer | 0 |
| 4 | wcount | r/w | data words per channel and event | 8 |
| 5 | evno | r | event number, low byte | 0 |
| 6 | errmask | r/w | error mask | FF |
| 7 | errflag | r, write 1 to clear | bit 0 trigger FIFO overflow, bit 1 trigger while writing stopped | 0 |

`ERR*` is low while any flag that is not masked is set. The chip's block diagram assigns the registers as follows: CSR0 to the offset, CSR1 to the read pointer, CSR3 to the write pointer, CSR4 to the word count, CSR5 to the event number, and CSR6 and CSR7 to test registers. This map follows that assignment. The status register, the reset values, the mask and the two error flags are this design's own.

## Clocks and resets

* `RST1*` resets everything.
* `RST2*` resets only the data path: pointers, FIFOs, sequencers and the event number. The registers keep their contents.
* Both are released through two-flop synchronisers.
* `ENOSC` and `DIV4` (×4 clock mode) are passed on to the external PLL as `pll_enosc` and `pll_div4`.
* `OSCOUT` shows either the clock (`TCLKEN = 1`) or an oscillator tap gated by `ENOSC`.

## The parallel-to-serial converter

`p2s_converter` has a start flip-flop and eight data flip-flops.
* The start flip-flop is clocked by `tap_start` (the clock edge).
* Flip-flop *i* is clocked by delay-line strobe `tap_d[i]`, one bit time later each, and samples data bit *i*.
* The output is the XOR of all nine flip-flops. Each "1" bit therefore toggles the line and each "0" leaves it: NRZI coding, preceded by a start transition.
* A `stop` signal from the end of the delay line clears all flip-flops asynchronously and holds the output low for the two stop-bit slots. This brings the line back to a known level for the next frame.

One frame is 1 + 8 + 2 = 11 bit times per clock period. The bit rate is set only by the delay-line spacing: T/11, 4.5 ns at 20 MHz. The receiver needs a separate frame-synchronisation signal, which this block does not produce.

Treat this block as a circuit whose timing lives outside the RTL. Static timing tools will see nine clock domains and an asynchronous clear. Its correctness depends on the strobes arriving in order, each after the previous flip-flop has settled.

## Files

| file | contents |
|---|---|
| `rtl/tmc_pkg.sv` | shared widths, the code struct, CSR addresses, error bits |
| `rtl/tmc_latch.sv` | 32-tap sampler and retiming |
| `rtl/tmc_encoder.sv` | first-edge encoder for 16 samples |
| `rtl/tmc_dpm.sv` | dual-port ring-buffer memory |
| `rtl/tmc_fifo.sv` | synchronous FIFO (readout and trigger FIFOs) |
| `rtl/tmc_channel.sv` | one channel: CAL mux, latch, two encoders, memory, readout FIFO |
| `rtl/tmc_write_seq.sv`, `rtl/tmc_trig_seq.sv`, `rtl/tmc_readout_seq.sv`, `rtl/tmc_output_seq.sv` | the four sequencers |
| `rtl/tmc_csr.sv` | register port |
| `rtl/tmc_clock_misc.sv` | resets and oscillator monitor |
| `rtl/tmc_teg5.sv` | the chip |
| `rtl/p2s_converter.sv` | serialiser |
| `rtl/tmc_top.sv` | chip and serialiser side by side |
| `tb/tmc_phase_model.sv` | behavioural 32-phase oscillator: clock plus taps |
| `tb/p2s_timing_model.sv` | behavioural delay line for the serialiser |
| `tb/tmc_ref_pkg.sv` | reference encoder used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench ends with a line `TB_RESULT checks=N failures=M`. Each has a watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_tmc_top -y rtl -y tb +libext+.sv \
  rtl/tmc_pkg.sv tb/tmc_ref_pkg.sv tb/tb_tmc_top.sv
obj_dir/Vtb_tmc_top
```

`tb_tmc_top` runs the whole design at its default sizes. It takes a few seconds. It drives random edges on both channels and on the calibration input. It keeps its own copy of every sample, and it checks every word, channel bit and `EVEND*` that the chip outputs for 31 events. Along the way it forces these to happen, and counts each one:
* two edges in one period;
* buffer wrap-around;
* five pending triggers and a refused sixth one;
* a trigger while idle;
* a readout stall on full FIFOs;
* both strobe modes;
* `UBYTE`;
* `RST2*`;
* 200 serial frames decoded at 11 bits per 50 ns.

`tb_tmc_teg5` is the same test for the chip alone.

`tb_tmc_workload` runs the chip at its default sizes with a 3 µs trigger latency (offset 120) and 20 bursts of five triggers two clocks apart (CSR4 = 16). It checks all 100 events word by word.

## Limits and departures

* **Analog parts.** The timing precision depends entirely on the analog oscillator and the latch flip-flops, which are not modelled beyond ideal delays. The tap spacing T/32 and the monotonic order of the taps are assumptions the digital part relies on. On real silicon the flip-flops clocked by taps need metastability-tolerant handling: the sample of an input edge that coincides with a tap is random.
* **Code format.** The 6-bit code per half period, the word layout, the event header and the event order on the output port are this design's own. The chip's real formats are not published in the source material.
* **Own choices.** The register map, error flags, strobe handshake and reset split are this design's own. Only the pin names come from the chip's block diagram.
* **Buffer overrun is not detected.** An event that waits in the trigger FIFO keeps its window in the ring buffer only while the write pointer has not come round to it again. With five pending events, keep offset + 4·(CSR4 + 3) below about 250. For larger values the last event of a burst reads overwritten words, and nothing flags it.
* **Receiver-select pins.** The chip's `ED` and `EDCLK` pins select single-ended or differential input receivers. They belong to the analog pads and are not ports here.
* **Calibration.** The calibration path is only the input multiplexer (`CALEN` selects `CALIN` on every channel). There is no calibration pulse generator.
* **Serialiser.** The serialiser has no receiver (serial-to-parallel). The two stop slots are driven low rather than carrying parity.
