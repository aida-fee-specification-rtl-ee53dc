# AFE64 front-end logic: digital and analogue readout of a 64-strip silicon detector module

One AFE64 board reads 64 detector strips in two ways at once:

* **Digital readout.** Every strip's preamplifier output is sampled continuously by a
  14-bit flash ADC (eight strips per ADC device). For each strip the FPGA
  finds pulses with a leading-edge discriminator and measures their energy with a
  Moving Window Deconvolution (MWD) filter. When both agree it records the time and
  keeps a window of the raw waveform.
* **Analogue readout.** Four 16-channel front-end ASICs hold their shaped pulse
  heights. Each ASIC presents them one at a time on a multiplexed analogue output,
  which a 16-bit serial ADC converts. Each conversion becomes a two-word event,
  stamped with the time of the ASIC discriminator that fired.

Both paths are driven by a common 48-bit timestamp that a system SYNC signal aligns. Their
events are gathered in on-board buffers. A DMA engine then copies them into a ring buffer in
the memory of the board's processor, which sends them to the acquisition computers.

The RTL in `rtl/` is this board logic. It does not include the processor, the
network interface, the memory controller or the chips on the board (ADCs, ASICs). Its ports
sit where those parts connect.

## Block structure

```
 FADC x8 ─► fadc_deser x8 ─► cdc_fifo x8 ─► digital_channel x64 ─┬─► timestamp_queue (1024 x 115)
            (ADC bit clock)                  (le_disc, mwd_energy, │          │
                                              circ_buffer, energy  │          ▼
                                              queue, waveform FIFO)└─► digital_readout_sm
                                                                               │ 16-bit stream
                                                                               ▼
 ASIC x4 ─► asic_readout x4 (synchroniser, timestamp_queue,              dma_engine ─► processor memory
            asic_readout_sm, ad7686_if, flipflop_ram) ── 4 banks ──────►              (ring buffer)

 timestamp_counter (48 bit, SYNC load) ─► all queues     disc_or ─► fast trigger out
 i2c_master ─► ASIC registers, ID EEPROM
```

| module | role |
|---|---|
| `aida_pkg` | shared widths, entry structs, event word builders, record marks |
| `afe64_top` | the board logic; all parameters default to the full-size design |
| `timestamp_counter` | 48-bit time, loaded on the SYNC rising edge |
| `disc_or` | combinational OR of the four ASIC discriminator ORs, plus an edge counter |
| `timestamp_queue` | FIFO of {time, hit mask, sync/pause/resume flags}; counts drops |
| `sync_fifo` | first-word fall-through FIFO, used for waveforms (3072 x 16) and energy (10 x 36) |
| `fadc_deser` | turns DDR serial ADC lanes into 14-bit samples using the frame line |
| `cdc_fifo` | asynchronous FIFO that moves samples from the ADC clock into `clk` |
| `le_disc` | leading-edge discriminator with a hysteresis re-arm |
| `mwd_energy` | MWD trapezoid filter and peak search |
| `circ_buffer` | 1024-sample circulating buffer that copies a pre/post-trigger window into the FIFO |
| `digital_channel` | one strip: discriminator, filter, buffer, energy queue, waveform FIFO |
| `digital_readout_sm` | builds events from the timestamp queue and the channel queues |
| `ad7686_if` | conversion and read cycle of the serial ADC |
| `asic_readout_sm` | ASIC readout handshake; writes two-word events |
| `flipflop_ram` | two 1024 x 32 banks: one is written while the other is read |
| `asic_readout` | one ASIC's analogue path |
| `dma_engine` | round-robin transfer of banks and stream records into a memory ring |
| `i2c_master` | byte-level I²C master for the ASIC registers and the ID EEPROM |

## Clocking and sample rate

There are two clock domains:

* **`clk`** runs all the logic. It is intended to be 100 MHz, the processor bus rate.
  It must be at least the ADC sample rate, because each strip takes one sample per
  `clk` cycle.
* **`fadc_clk`** is the flash ADC's bit clock: 350 MHz at the full 50 MSPS. It runs
  only the eight deserialisers.

The FPGA input cells, outside this RTL, capture each lane on both edges of the bit
clock. They present one DDR bit pair per `fadc_clk` cycle as `d_rise`/`d_fall`, and
capture the frame line the same way as `fco_rise`/`fco_fall`. `fadc_pair_en` marks
cycles that carry a pair. Seven pairs make a sample, and the frame line is high for
the first seven bit times.

Each ADC device's eight samples (112 bits) cross into `clk` through an 8-deep
asynchronous FIFO, `cdc_fifo`. The FIFO uses Gray-coded pointers and two-flop
synchronisers. The FIFO can never fill, because it is emptied on every `clk` cycle and
`clk` outruns the sample rate.

`fadc_clk` may also be tied to `clk`. The sample rate is then clk/7, which is how
`afe64_top_tb` runs. `afe64_rate_tb` runs the two clocks at 350 and 100 MHz.

The system's 200 MHz distributed clock is not a separate domain: the timestamp counts
`clk` cycles.

## The digital channel

Samples first have `baseline` subtracted. The discriminator then fires on the rising
crossing of `le_thresh` and re-arms only once the signal has fallen below
`le_thresh - le_hyst`.

**MWD filter.** `mwd_energy` computes, per sample:

```
D[n] = x[n] - x[n-M] + (inv_tau * sum_{k=n-M}^{n-1} x[k]) >> 16      (inv_tau = 2^16 / tau)
T[n] = sum_{k=n-L+1}^{n} D[k]
```

Here x is the baseline-subtracted sample. For an exponential pulse with decay time tau,
the D term undoes the decay, so a step of height A turns into a flat-topped trapezoid
of height L·A. A trigger opens a window of M+L samples in which the filter tracks the
maximum of T. At the end of the window the maximum is the energy.
* `pileup` is set if another trigger arrives inside that window.
* `energy_ovf` is set if the result does not fit 32 bits.

Defaults are M = 128 and L = 64 samples. `inv_tau` is a port.

**Acceptance.** When the window closes, the event is accepted only if all of these hold:
* the energy is at least `e_thresh`
* the shared timestamp queue has room (`accept_ok`)
* the channel's energy queue has room

An accepted event does three things:

1. It pulses `hit` into the timestamp queue. The queued time is therefore the
   decision time, a constant M+L samples plus pipeline after the edge.
2. It pushes {quality, energy} (36 bits) into the 10-entry energy queue. The quality
   bits are {reserved, energy_ovf, wave_ok, pileup}.
3. It asks `circ_buffer` to copy `ws_len` samples, starting `pre_len` samples before the
   trigger, from the 1024-sample ring into the 3072-word waveform FIFO. This copy runs
   at one word per clock. It is refused, and `wave_ok` is cleared, if the FIFO has no
   room for the whole window. 1024 samples cover 20 µs at 50 MSPS.

**Known limit of the pileup flag.** The discriminator must re-arm before it can flag a
second pulse. A second pulse that arrives while the first is still above
`le_thresh - le_hyst` is not seen.

## Digital event stream

`digital_readout_sm` pops one timestamp-queue entry at a time and emits 16-bit
halfwords on a valid/ready stream. `out_last` marks the end of each record.

* If the entry carries a flag, it first emits an INFO record:
  `{4'hE, 9'b0, sync, pause, resume}`, then ts[47:32], ts[31:16], ts[15:0].
* Then, for each channel in the hit mask, lowest first, it emits an event:

| halfword | content |
|---|---|
| h0 | `{4'hD, 2'b00, channel[5:0], quality[3:0]}` |
| h1–h3 | timestamp, most significant first |
| h4–h5 | energy, most significant first |
| h6 | waveform length that follows (`ws_len`, or 0 if no waveform was kept) |
| h7 | number of channels in this timestamp entry |
| h8… | waveform words `{2'b00, sample[13:0]}` |

The eight header halfwords are four 32-bit words. An event with a 20 µs waveform
(1000 samples) is therefore 16 + 2000 = 2016 bytes. This is slightly less than the
2024–2032 bytes sometimes used in planning figures for the same contents.

## Analogue readout and its ASIC handshake

Each ASIC has its own `asic_readout`. Its 16 discriminator lines pass through a two-flop
synchroniser and a rising-edge detector. They are queued with the timestamp, which is
2 clocks later than the edge, in a 64-entry timestamp queue. The ASIC's SYNC, pause and
resume flags are queued there too.

`asic_readout_sm` serves one entry at a time. Only the role of the ASIC signals is fixed
(seven information lines, four control lines including a reset), so the handshake below
is this design's:

* **information (ASIC → FPGA):** `ro_chan[3:0]`, `ro_valid`, `ro_last`, `ro_hold`
* **control (FPGA → ASIC):** `ro_start`, `ro_next`, `ro_clr`, `ro_reset`

The sequence is:
1. Wait for `ro_hold`, then raise `ro_start`.
2. For each channel the ASIC offers, wait for `ro_valid`, then convert the multiplexed
   level with the ADC.
3. Raise `ro_next` and wait for `ro_valid` to drop. This is a four-phase handshake.
4. After `ro_last`, pulse `ro_clr`.

If the ASIC does not answer within `RO_TIMEOUT` cycles, the state machine pulses
`ro_reset`, counts a timeout and moves on.

`ad7686_if` drives the ADC in 3-wire mode without a busy indicator. It holds CNV high for
`CONV_CYCLES`, then clocks 16 bits MSB first with SCK at clk/(2·`SCK_HALF`). SDI is held
high. One conversion takes 1 + 160 + 31·2 = 223 cycles, which is 2.23 µs at 100 MHz.

Each conversion is written to the event store as two 32-bit words:

```
ADC  word0 = {2'b11, 2'b00, module_id[5:0], asic[1:0], ch[3:0], adc[15:0]}
     word1 = {4'b0, ts[27:0]}
INFO word0 = {2'b10, module_id[5:0], code[3:0], ts[47:28]}
     word1 = {4'b0, ts[27:0]}
```

The INFO codes are: SYNC = 1, PAUSE = 2, RESUME = 3, TSMSB = 4. A TSMSB record is
written whenever an event's ts[47:28] differs from the last one written, so software
can rebuild the full 48-bit time.

**Flip-flop store.** `flipflop_ram` has two banks of 1024 x 32. One bank is written
while the other waits for, or is being read by, the DMA. The banks swap when the
writing bank is full, or when `flush_tick` has requested it. The flush request is held
until it can be served, which makes it a good fit for a 1 ms processor tick.

A swap happens only when all of these hold:
* the reader has released the other bank
* no word is being written in that cycle
* the word count is a multiple of 2, so an event is never split

When both banks are full, the state machine waits.

## Transfer into processor memory

`dma_engine` writes 32-bit words into a ring that software sets up:

| signal | meaning |
|---|---|
| `ring_base` | word address of the ring |
| `ring_size` | ring size, in words |
| `sw_rd_ptr` | software's read offset |
| `wr_ptr` | offset of the next word the DMA will write |

One ring word is always left empty, so `wr_ptr == sw_rd_ptr` means the ring is empty.
A round-robin arbiter serves whole units:

* **a full bank** from any of the four analogue stores, sent as:
  * a header `{4'hA, source[3:0], 8'h00, count[15:0]}`
  * the bank's words, at one per clock while `m_ready` is high, so 1024 words take
    about 10 µs at 100 MHz

  The bank is then released. A bank waits until the ring has room for all of it.
* **one complete digital record**: halfwords are packed two per word, the first one
  in bits 31:16. A record of odd length is padded with a zero halfword.

## I²C register path

`i2c_master` gives the processor a two-wire bus to the ASIC configuration registers
and to the 128-byte ID EEPROM, which holds the value the software turns into a MAC
address. It works one byte at a time. The processor issues START (also used for a
repeated start), STOP, WRITE or READ on a valid/ready port. Each command ends with one
`rsp_valid` pulse, which carries the byte read and the slave's acknowledge bit.

Both lines are open drain: `*_oe = 1` pulls the line low. Each bit takes four quarter
periods of `I2C_QUARTER` clocks: 250 clocks at the default, which gives 100 kHz. SDA
changes only while SCL is low and is sampled in the middle of the high phase. If a slave
holds SCL low, the master waits for it (clock stretching). Multi-master arbitration is
not implemented.

## Rates this configuration can carry

* **Analogue.** At 60 k events/s per board the data rate is 480 kB/s. One ASIC
  readout cycle takes about 2.3 µs, and a bank holds 512 events, which is 8.5 ms at
  that rate.
* **Digital.** At 30 k events/s with 20 µs waveforms the data rate is 61 MB/s. The
  stream carries up to 200 MB/s (one halfword per clock) and the DMA carries 400 MB/s.
  Whether the processor and network can take that much is outside this logic.
* **FADC.** At 50 MSPS each strip needs one sample every two `clk` cycles, and the
  deserialisers run on the 350 MHz ADC clock.

## Departures and open points

* **Not implemented:**
  * lossless compression of the waveforms
  * the floating-point time vernier added to digital events
  * calibration pulse control
  * the register maps behind the I²C bus (ASIC registers, ID EEPROM contents)
* **Chosen by this design** (none of these is specified):
  * all event word layouts, record marks, headers and the ring protocol
  * the ASIC handshake
  * the MWD lengths
  * the analogue timestamp queue depth
  * the drop policies
* **FADC link calibration.** The deserialiser aligns words to the frame line, and
  re-aligns whenever the frame edge moves. Per-lane bit-delay tuning at power-up is
  left to the FPGA's input delay cells and is not in this RTL.
* **Shared settings.** Thresholds, baseline, MWD constant, waveform length and energy
  threshold are ports shared by all 64 strips. Per-strip registers would be added in
  front of `digital_channel`.
* **ASIC discriminators.** They are used only to timestamp the analogue path. They are
  not routed to the digital channels.
* **Monitor outputs.** Some internal monitor counters (re-alignments, per-channel drops,
  bank swaps) are not brought to top ports. They are visible in simulation.
* **Reset.** `rst_n` is an asynchronous, active-low reset in every module. It must be
  released synchronously to `clk` by a reset synchroniser on the board, which is not
  part of this RTL.

## Simulation

Every module except the package has a self-checking testbench in `tb/` named `<module>_tb`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.
The behavioural models `tb/fadc_model.sv`, `tb/asic_model.sv`, `tb/ad7686_model.sv` and
`tb/i2c_eeprom_model.sv` stand in for the chips.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/aida_pkg.sv tb/afe64_top_tb.sv --top-module afe64_top_tb -o sim
./obj_dir/sim
```

Replace `afe64_top_tb` with any other testbench name to run that one.

`afe64_rate_tb` runs one millisecond at the planned event rates, also at the default sizes:
* 60 analogue events
* 30 digital events, each with a 1000-sample waveform
* the 1 ms flush tick at the end

It checks that every event reaches the ring and that the byte totals match the plan
(60,480 B digital and 480 B analogue). The last word leaves about 1.03 ms after the
start.

`afe64_top_tb` runs the whole design at its default sizes in well under a minute of wall-clock time. Its stimulus:
* 64 strips with exponential pulses
* four ASIC models, one of which is muted to force a timeout
* a memory model whose consumer pauses to back-pressure the DMA
* an ID EEPROM model that is read over I²C

It parses the ring and checks every record. It counts each mechanism (pileup, refused
waveform, energy threshold, SYNC/pause/resume, full-bank swap, flush swap, timeout,
ring back-pressure, shared timestamp entries, the I²C read) and fails if any never happened.
