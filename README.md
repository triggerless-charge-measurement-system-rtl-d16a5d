# Triggerless charge read-out for APD and PMT test stands

This RTL implements the FPGA firmware of a small read-out board for
scintillator detectors seen by avalanche photodiodes (APDs) or
photomultipliers (PMTs). Up to eight front-end cards each deliver a 10-bit
sample every 25 ns (40 MHz ADC). Instead of waiting for an external trigger,
the firmware records every sample, looks for pulses in the recorded stream
itself, keeps only the samples of each pulse, and sends them out over a USB
microcontroller as compact packets with a time stamp. Stretches with no pulse
produce small "empty" packets, so the host always knows how much time has
passed. An internal test pulse of known height can replace the ADC data to
check the whole chain.

The structure (ring buffer, pulse finder, data format, multi-event buffer,
main control, with calibration test, configuration, threshold and USB
blocks), the memory sizes, the clock ratio, the detection rule and the packet
layout follow the published description of this interface. Bus protocols,
register map, run sequencing, the time-stamp encoding, the test-pulse shape
and everything about overload behaviour are this implementation's own
choices; they are listed in "Where this implementation decides" below.

## Data path and clock domains

```
            ADC clock (40 MHz)      |        processing clock (80 MHz)                 | USB clock
                                     |                                                  |
 adc_data[c] ─┐                      |                                                  |
              ├─ mux ─► ring buffer ─┼─► pulse finder ─► data format ─┐                 |
 calibration ─┘  (test)  8192 x 10   |   (threshold)     (packets)    │                 |
   test pulse           per channel  |                                ├─► multi-event ──┼─► USB interface ─► microcontroller
                                     |        ... 8 channels ...      │   buffer        |        │
                                     |                                ┘   8192 x 10     |        │ config writes
                                     |  main control ◄── config registers ◄─────────────┼────────┘
```

Three clocks enter the top module; in the original board they come from an
FPGA PLL, which is not part of this RTL.

* `aclk` is the ADC clock. The channel input register, the write port of each
  ring buffer and the calibration pulse source run on it. `fee_clk[7:0]`
  forwards it to the front-end cards, and `adc_en[7:0]` enables conversion on
  the active channels during a run.
* `pclk` must run at (at least) twice `aclk`. Everything that processes
  data runs here: the ring-buffer read side, pulse finders, data formatters,
  the write side of the multi-event buffer, the configuration registers and
  the main control. Because a ring buffer is read at up to one sample per
  `pclk` and written at one per `aclk`, an unstalled reader always catches up.
* `uclk` is the clock of the microcontroller bus: the read side of the
  multi-event buffer and the command path of the USB interface.

Every crossing uses either Gray-coded counters through two flip-flops (ring
buffer write position, FIFO pointers), two-flip-flop synchronisers for
slowly changing levels (run, channel enables, test mode), or a toggle
handshake (configuration writes). Each domain gets its own synchronised copy
of the board reset `rst_n`.

## Finding pulses without a trigger (`pulse_finder`)

This is the part that decides what data survives, so its rules are given in
full.

* A **hit** is a sample strictly above the 8-bit threshold (one threshold
  for all channels).
* A **pulse** starts when three consecutive samples are hits. One or two
  isolated hits (noise, glitches) are discarded. The three samples that
  proved the pulse are part of it: the block keeps the last two samples in a
  small window. When the third hit arrives it holds its input for three
  clocks while it sends the two buffered samples and the current one.
* The pulse continues while samples stay hits, up to **25 samples**. A
  sample below threshold ends it. At 40 MHz a 650 ns detector pulse is 26
  samples long, so a pulse whose first sample is still at the baseline fits
  whole.
* If a pulse is cut at 25 samples, no new pulse can start until a sample
  falls below threshold. The tail of a long pulse therefore does not
  produce a second event.
* **Time stamps** count ADC samples. Each ring-buffer sample carries its
  running index (a 32-bit write counter). The time stamp of an event is the
  number of samples between its first sample and the previous event of the
  same channel. The first event of a run is measured from the first sample
  of that run. Stalls in processing therefore never distort time.
* **Empty events**: if `MAX_WAIT` samples pass with no event, an empty event
  with time stamp `MAX_WAIT` is produced and the reference moves forward by
  `MAX_WAIT`. Adding up all time stamps of a channel therefore always gives
  the time elapsed. A pulse starting on the same sample wins.
  The empty event can only be decided two samples late, because a pulse
  starting at that sample is only recognised two samples later.
* A sample marked `resync` (the ring buffer had to drop data, see below)
  closes an open pulse and clears the window. `flush` at the end of a run
  closes an open pulse once the channel's ring buffer is empty.

The output is a token stream (`pf_tok_t` in `daq_pkg`): `TK_START` with the
time stamp, one `TK_SAMPLE` per kept sample, `TK_END`; or a single
`TK_EMPTY`. With nothing stalled the block consumes one sample per clock.

## Packets (`data_format`)

Each token sequence becomes one packet of 10-bit words:

| word | valid event | empty event |
|---|---|---|
| 0 | start of event `{3'b111, 4'b0000, channel[2:0]}` | same |
| 1 | time stamp bits 29:20 | same |
| 2 | time stamp bits 19:10 | same |
| 3 | time stamp bits 9:0 | same |
| 4 | event number (per channel, 10 bits, wraps) | same |
| 5 … n+4 | the n kept samples, 1 ≤ n ≤ 25 | – |
| last | event length = n + 6 | 6 |

The event length counts every word of the packet, itself included. A reader
finds a packet by its start word. The `111` marker is in bits 9:7, so start
words are 896 to 903. A sample can take the same values, which is why a reader
must keep word-level framing from the first packet on. Valid and empty packets
both count in the event number, which restarts at 0 on every run start. The
formatter writes one word per clock; a 25-sample packet takes 31 clocks. The
length word is flagged `last` on the way to the multi-event buffer. Only the
10 data bits are stored.

## Ring buffers and what happens under overload (`ring_buffer`)

Each channel has an 8192 × 10 dual-clock memory (205 µs of samples at
40 MHz). The writer never waits: acquisition never stops during a run. If
processing is held up, for example because the USB side stops reading and
the multi-event buffer is full, samples pile up in the ring buffer. When
fewer than `MARGIN` (8) free places remain, the reader jumps to half a buffer
behind the writer. It increments `overruns` and marks the next sample with
`resync`. Data lost this way is visible: the top module reports it per channel
on `ch_overrun`, and the time stamps stay correct because they come from
sample indices.

## Multi-event buffer and USB side

`multi_event_buffer` is a single 8192 × 10 FIFO shared by all channels. A
round-robin arbiter gives it to one channel at a time and keeps that channel
until the packet's length word has been written, so packets never
interleave. When the FIFO is full the channel being served is held. Its
pulse finder and ring-buffer reader stall, but its ADC keeps writing.

`usb_interface` is the FPGA side of the microcontroller bus (all on `uclk`):

* Read-out: raising `uc_rd` while `uc_empty` is low pops one word. It appears
  on `uc_data` with `uc_valid` one clock later. Holding `uc_rd` high streams
  one word per clock.
* Configuration: write a 16-bit word `{addr[3:0], 2'b00, data[9:0]}` with
  a one-clock `uc_wr`. `uc_busy` stays high until the write has reached the
  processing domain, roughly five clocks of each domain. Writes made while busy
  are dropped and counted (`uc_dropped` inside the block).

Register map (`config_control`; all reset to 0):

| addr | name | meaning |
|---|---|---|
| 0 | CMD | bit 0: start a run, bit 1: stop the run (pulses, not stored) |
| 1 | CHANNELS | active-channel mask, bit c = channel c |
| 2 | THRESHOLD | threshold in ADC counts, 8 bits, all channels |
| 3 | TEST | bit 0: auto-test, calibration pulse instead of ADC data |

## Runs (`main_control`)

`start` latches the channel mask, threshold and test flag, so a run always
uses one consistent setting, and pulses `clear` (event
numbers and time references restart); `run` then enables the ADCs and the
ring-buffer writes. `stop` sequences the end of the run:

1. `run` goes low and the control waits `SETTLE` (16) clocks so the last
   written samples become visible on the read side.
2. DRAIN: `flush` goes high and the control waits until every ring buffer is
   empty. A channel whose ring buffer is already empty closes its open
   pulse right away. This matters: a packet left open would keep the shared
   FIFO locked and block the other channels from draining.
3. FLUSH: it waits until all pulse finders and formatters are idle. It then
   pulses `run_done` and returns to idle (`run_phase` = 0).

Start is ignored while a run is active, stop while idle.

## Calibration test (`calibration_test`)

While a run is in auto-test mode, every active channel records a stored test
pulse instead of its ADC. The pulse is a triangle of 26 samples peaking at
714 counts, `shape[k] = 714·(13 − |k − 13|)/13`, computed at elaboration. The
first pulse starts as soon as the run starts, then one follows every
`CAL_PERIOD` samples. A correct chain returns packets of 25 samples whose
maximum is exactly 714. The shape is this implementation's choice; the
amplitude and the rate (100,000 pulses in 14 hours, one every 0.504 s)
follow the original test.

## Parameters

| parameter (`daq_top`) | default | meaning |
|---|---|---|
| `RB_DEPTH` | 8192 | ring-buffer samples per channel |
| `MEB_DEPTH` | 8192 | multi-event buffer words |
| `MAX_WAIT` | 40,000,000 | samples without a pulse before an empty event (1 s at 40 MHz; own choice) |
| `CAL_PERIOD` | 20,160,000 | samples between test pulses (0.504 s) |

Widths and fixed numbers (10-bit samples and words, 8 channels, 8-bit
threshold, 30-bit time stamp, 25 data words, empty length 6) are in
`rtl/daq_pkg.sv`. Depths must be powers of two.

## Where this implementation decides

The original description leaves these points open or contradicts itself.
This RTL does the following:

* **Widths on the firmware diagram.** The block diagram prints 8-bit links
  between ring buffer, pulse finder, data format and multi-event buffer, but
  the text says 10-bit data and 8192 × 10 memories everywhere. The data path is
  10 bits. The 8-bit threshold and the 4-bit configuration address are
  taken from the numbers on the diagram. Other numbers on the diagram (15 and
  8 around the main control) are not used.
* **One multi-event buffer or eight.** The diagram draws one per channel
  layer, while the text says one memory holds the packets of all channels. A
  single shared FIFO is built.
* **Channel number.** The text lists a channel number in each packet, but
  the packet drawing has no word for it. The channel is carried in the low
  bits of the start-of-event word, next to the `111` marker.
* **Event length** counts the whole packet. This is the only reading that
  matches the printed length of 6 for an empty packet.
* **Sampling rate.** One passage quotes 20 MHz sampling; the rest of the
  description says 40 MHz, which is used.
* **Maximum-value measurement.** The host software can take each pulse's
  maximum from the payload. The firmware adds no field for it, because the
  packet layout has none.
* **Overload.** The original claims that data taking continues for a
  minute with USB stopped. With the stated memory sizes the ring buffers hold
  205 µs and the multi-event buffer 8192 words, about 315 full packets. Longer
  stalls lose samples, which `ch_overrun` reports.
* Not implemented, because it is hardware outside the FPGA logic: the PLL,
  the front-end cards (preamplifier, shaper, ADC), the USB microcontroller and
  its firmware, and the board's oscillators, regulators and configuration
  memory.

## Files

`rtl/`: `daq_top` (top), `daq_channel` (one channel's chain), `ring_buffer`,
`pulse_finder`, `data_format`, `multi_event_buffer`, `main_control`,
`config_control`, `usb_interface`, `calibration_test`, helpers `sync_2ff` and
`reset_sync`, and the package `daq_pkg`.

`tb/`: one self-checking testbench per block (`tb_<block>`). Each compares
against values computed in the testbench from the rules above, prints
`TB_RESULT checks=N failures=M` and has a watchdog. Four more exercise the
whole design:

* `tb_daq_top` uses reduced sizes (512-sample ring buffers, 256-word FIFO,
  `MAX_WAIT` 300, a test pulse every 200 samples). It runs three runs: data
  taking on seven channels with a USB pause that fills the FIFO and stalls
  processing; an auto-test run; and a long USB stall that makes the ring buffers
  overrun. Every word read over USB in the first two runs is checked against a
  reference model fed with the samples actually written. It counts valid,
  empty and truncated events, rejected glitches, FIFO-full and stall cycles,
  calibration packets, overruns and inactive-channel silence. A mechanism that
  never occurs counts as a failure.
* `tb_daq_full` runs the same environment (`daq_env`) with `daq_top` at its
  default parameters. It does a data run and an auto-test run with exact
  packet checks. It then does a quiet 1 s run on one channel, which must end
  in an empty event at the default `MAX_WAIT`. It takes about two minutes
  to run in Verilator.
* `tb_daq_rate` is the peak-rate case at the default parameters. All eight
  channels receive a 650 ns pulse (one baseline sample, then 25 over
  threshold) every 100 µs, which is 10 kHz per channel, for 10 ms. All 800
  packets must come back word for word with 25 samples each. The
  multi-event buffer must never fill and no ring buffer may overrun.
* `tb_daq_cal` is the calibration case at the default parameters. Channel 0
  runs in auto-test mode for two calibration periods (about 1 s of ADC
  time). It must return three packets that peak at 714, with the second and
  third time-stamped exactly 20,160,000 samples (0.504 s) after the one
  before. It takes about two minutes to run.

To simulate with Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_daq_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/daq_pkg.sv tb/tb_daq_top.sv
./obj_dir/Vtb_daq_top
```

Replace `tb_daq_top` by any other testbench name. Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/daq_pkg.sv rtl/<module>.sv`.
Remaining lint warnings are unused status bits and package constants.
`SYNCASYNCNET` comes from reset signals that also disable assertions.
