# Real-time reflectometry acquisition firmware (8 × 12-bit, PCIe DMA)

This is the FPGA firmware of a data-acquisition board for a real-time plasma
reflectometry diagnostic. Two broadband microwave reflectometers are sampled
on eight channels at 40, 80 or 100 MSPS. A burst of four frequency sweeps is
4 frames × 2048 samples × 8 channels × 16 bit, or exactly 128 KiB. That burst
must reach the host's RAM once per millisecond, quickly enough to leave most
of the 1 ms control cycle for the density-profile computation.

The design works like this:

* Buffer one burst in a 128 KiB on-chip FIFO.
* Upload it over an x8 PCIe link with DMA, at up to 2 GB/s.
* Start the upload at a programmed time after the first trigger of the
  burst, not after the burst ends. The upload then runs alongside the
  acquisition, catches up with it, and ends a few hundred nanoseconds after
  the last sample.

The architecture follows a published COTS (commercial off-the-shelf)
acquisition system: Virtex-5 FPGA board, quad serial-LVDS ADC boards, an
external timing system. That covers the block partition, the bus widths, the
clock rates, the buffer size, the 48-bit 200 MHz frame timer with its two
timestamp registers, and the timed DMA start. The insides of every block are
this design's own, because the publication describes the blocks only by
function. The same applies to the register map, the handshakes and the LVDS
bit order. The list of these choices is under "Choices made here".

## Block diagram

```
 ADC boards (2 x 4 ch)        timing system trigger          host (via DMA core)
        |  16 DDR lanes + dclk/fclk        |                       ^      |
        v                                  v                       |      v
 +----------------+  96 bit   +-----------------+         +------------+ +------------+
 | adc_lvds_deser |---------->|  acq_buf_ctrl   |<--trig--| frame_timer| | slave_mgmt |
 +----------------+  @fclk    | frame/burst,    |--events>| 48-bit,    | +------------+
                              | 12->16 pad      |         | ids, trig, |       | reg bus
                              +-----------------+         | DMA start  | +------------+
                                  | 128 bit @fclk         +------------+ | main_ctrl  |
                              +-----------------+              |         | registers  |
                              | async_fifo_asym |              | start   +------------+
                              | 128 KiB, 128:64 |              v               |
                              +-----------------+ 64 bit  +-----------+  +----------------+
                                                --------->| dma_mgmt  |  | serial_prog_if |
                                                 @250 MHz +-----------+  +----------------+
                                                               | 64-bit stream    | SPI to ADCs / PLL
                                                               v
                                                   DMA core / PCIe endpoint (external)
```

`reflecto_daq_top` wires these blocks together. It also holds the clock-domain
crossings and the per-domain reset bridges.

## Clock domains

| clock      | rate                        | what runs on it                                     |
|------------|-----------------------------|-----------------------------------------------------|
| `dclk`     | 3 × sample rate (≤ 300 MHz) | LVDS bit capture and word alignment                 |
| `fclk`     | sample rate (≤ 100 MHz)     | sample bus, frame/burst control, FIFO write port    |
| `clk_ts`   | 200 MHz                     | frame timer, trigger logic, DMA start timing        |
| `clk_ctrl` | 100 MHz                     | control registers                                   |
| `clk_spi`  | 20 MHz                      | serial programming port                             |
| `clk_dma`  | 250 MHz                     | FIFO read port, DMA management, register bridge     |

`clk_ts` comes from the acquisition PLL on the interface board. That PLL is
locked to the same 10 MHz reference as the ADC sample clock and the central
timer, so timestamps are in step with the triggers, with 5 ns resolution.

Clock-domain crossings:

* **Events** (frame start, burst start and end, DMA start and end, missed
  trigger, serial start and done, status clear) cross through `pulse_sync`,
  a toggle synchroniser. Each event costs 2–3 destination cycles. Events
  must be at least three destination cycles apart, which they are by a wide
  margin.
* **Status levels** cross through `bit_sync`, two flip-flops.
* **Configuration words** (frame size, periods, offsets) are treated as
  static. Change them only while acquisition is disabled (`CTRL[0] = 0`).
  The enable bit itself is synchronised.
* **The timer registers (burst and frame timestamps) and the serial
  read-back word** are sampled through synchronisers. They change only on
  events microseconds apart, so a read sees a settled value.

## The LVDS receiver and word alignment

This is the least obvious part of the design. Each channel sends one 12-bit
sample per frame-clock period on two lanes, six bits per lane, double data
rate. Two lanes × six bits over two edges per bit clock gives exactly three
`dclk` cycles per sample. So `dclk` = 3 × `fclk`, which matches a 300 MHz bit
clock at 100 MSPS.

The FPGA's input DDR registers are not part of the RTL. For each lane,
`adc_lvds_deser` receives the bit captured on the rising edge (`lane_rise`,
first in time) and the bit captured on the falling edge (`lane_fall`). It
shifts both into a 7-bit history per lane.

The frame clock is captured in the same way. A correct six-bit window of it
reads `111000`. Every three `dclk` cycles the receiver cuts a six-bit word
from each history. If the frame-clock word is wrong, it moves the cut:

1. It first takes the word one bit older (`ofs`).
2. On the next miss it returns `ofs` and holds the three-cycle phase counter
   for one cycle, a two-bit slip.

These two moves reach all six bit positions. After `LOCK_COUNT` (4) correct
frame words in a row the receiver declares lock. A single wrong frame word
drops lock and restarts the search. `slip_count` counts the moves and is
readable in `STATUS[15:8]`.

Bit order: lane 2c carries the even bits of channel c and lane 2c+1 the odd
bits, MSB first. This is the common two-wire mode of quad serial ADCs. If
your ADC orders the bits differently, change the `word_d` assembly loop.

The rebuilt 96-bit word is held for a whole frame in the `dclk` domain and
re-registered on `fclk`, one new sample set per `fclk` cycle.
`sample_valid` is the lock flag seen in the `fclk` domain.

## Frames, bursts and the burst buffer

`acq_buf_ctrl` waits for a trigger. It then writes `frame_size` consecutive
sample sets into the FIFO, one 128-bit word per `fclk` cycle. Each 12-bit
sample is zero-extended into a 16-bit lane, channel c in bits [16c+11:16c].
After `frames_per_burst` frames it pulses `burst_done`.

* A trigger that arrives during a frame is not taken. It is counted in
  `STATUS[47:32]`.
* A write into a full FIFO is dropped and sets the sticky overflow flag,
  `STATUS[2]`.

`async_fifo_asym` holds 8192 × 128-bit words, which is 1 Mbit, written as an
array so that it maps to block RAM. The read side returns each word as two
64-bit halves, low half first. In host memory a sample set is therefore
channels 0–3 and then channels 4–7, each a little-endian 16-bit value with
the top four bits zero.

The pointers cross in Gray code. A word is released to the writer only after
both of its halves are read.

## Timing, triggers and the overlapped DMA

`frame_timer` runs on `clk_ts`:

* **Timer:** a free-running 48-bit counter, which wraps after 16 days.
* **Trigger source:** `CTRL[1]` selects the external trigger (synchronised
  and edge-detected) or the internal generator. The generator gives one
  trigger at the start of each burst period (`TRIG_BURST`, reset 1 ms), then
  one every `TRIG_FRAME` ticks (reset 35 µs) until `FRAMES` triggers are out.
  With the reset values this is the reflectometer's pattern: four 25.6 µs
  frames at 80 MSPS, 35 µs apart, every millisecond.
* **Software trigger:** writing `CTRL` with bit 2 set gives one trigger in
  external mode, for bench tests without the timing system. It is
  timestamped like any other trigger.
* **Burst registers:** when the acquisition side reports that a trigger
  opened a burst, the timer stores two values. One is the timestamp of that
  trigger. The other is the number of the burst's first frame, which counts
  accepted frames and restarts when acquisition is enabled.
* **Frame timestamps:** the trigger time of each of the first four frames
  of a burst is kept too, so every sweep of the standard four-sweep burst
  has its own time. Frame k of the burst has frame number id + k.
* **Second timestamp:** `CTRL[5:4]` selects which event it records: DMA start
  (0), end of the burst acquisition (1), or end of the DMA transfer (2).
  Subtracting the burst timestamp gives upload or acquisition durations with
  5 ns resolution.
* **Timed DMA start:** `DMA_OFFSET` ticks after the burst trigger, it fires
  `dma_start`.

`dma_mgmt` then moves `frame_size × frames × 2` 64-bit words from the FIFO to
the DMA core's stream interface (`dma_valid/dma_data/dma_last/dma_ready`):

* With data available and the sink ready, it moves one word per 250 MHz
  cycle, which is 2 GB/s.
* When it has caught up with the acquisition it simply waits on the empty
  FIFO.
* If the start offset is chosen so that the upload would otherwise end
  early, the transfer ends right after the last sample.

In the end-to-end simulation, an offset of 64 µs with 80 MSPS and
4 × 2048-sample frames ended the transfer within 2 µs of the last sample,
measured with the second timestamp register.

The right offset depends on the sampling rate. At 100 MSPS the FIFO fills at
1.6 GB/s and the DMA stream is only 25 % faster. An upload that starts 64 µs
after the trigger then cannot catch up within the last frame, and it ends
about 4 µs late. A 20 µs offset ends it with the last sample. At 40 MSPS the
64 µs offset is ample. A start that arrives while a
transfer is still running is ignored and flagged (`STATUS[4]`). The
end-of-transfer interrupt to the host belongs to the DMA core.

## Registers

The registers are 128 bits wide and sit on a 4-bit index. The host reaches
them through the DMA core's target interface (`t_*` on `clk_dma`).
`slave_mgmt` carries one access at a time to the 100 MHz control clock:

1. Assert `t_req` for one cycle while `t_busy` is low.
2. `t_ack` pulses when the access is done. For a read, `t_rdata` is valid
   from `t_ack` onwards.

A round trip takes roughly 3 control and 3 DMA cycles.

Besides configuration, the registers carry logic levels to and from the
interface board: two general-purpose lines (`ext_io_in`, `ext_io_out`,
`ext_io_oe` on the top) meant for the board's trigger/IO connectors. The
tri-state pad that joins `out` and `in` is left to the board wrapper.

| idx | name       | access | contents                                                                                       |
|-----|------------|--------|------------------------------------------------------------------------------------------------|
| 0   | CTRL       | rw     | [0] acquisition enable, [1] internal trigger, [2] write 1: software trigger, [5:4] second-timestamp source, [8] write 1: clear status |
| 1   | FRAME_SIZE | rw     | samples per frame, reset 2048                                                                  |
| 2   | FRAMES     | rw     | frames per burst, reset 4                                                                      |
| 3   | TRIG_FRAME | rw     | internal trigger spacing in 5 ns ticks, reset 7000                                             |
| 4   | TRIG_BURST | rw     | internal burst period in 5 ns ticks, reset 200000                                              |
| 5   | DMA_OFFSET | rw     | DMA start after the burst trigger in 5 ns ticks, reset 0                                       |
| 6   | SPI_CMD    | rw     | [31:0] word, [36:32] length − 1, [42:40] device (0–3 ADC boards, 4 PLL); a write starts it     |
| 7   | STATUS     | ro     | [0] LVDS locked, [1] acquiring, [2] FIFO overflow, [3] DMA busy, [4] DMA overrun, [5] serial busy, [15:8] alignment moves, [31:16] bursts, [47:32] missed triggers, [63:48] DMAs done |
| 8   | TIMERS     | ro     | [47:0] burst timestamp, [95:48] second timestamp, [127:96] frame id of the burst's first frame |
| 9   | SPI_RDATA  | ro     | bits shifted in during the last serial transfer                                                |
| 10  | SCRATCH    | rw     | free                                                                                           |
| 11  | EXT_IO     | rw     | [1:0] line levels to drive, [3:2] drive enables (reset 0: undriven), [5:4] levels read from the pins (ro) |
| 12  | FRAME_TS01 | ro     | trigger timestamps of frames 0 [47:0] and 1 [95:48] of the last burst                          |
| 13  | FRAME_TS23 | ro     | trigger timestamps of frames 2 [47:0] and 3 [95:48] of the last burst; 0 for missing frames    |

The serial port (`serial_prog_if`) sends 1 to 32 bits, MSB first, in SPI
mode 0 at 10 MHz, with one active-low select per device. The ADC and PLL
word formats are left to software.

## Files

`rtl/`:

* `daq_pkg.sv`: sizes, register map and configuration structs.
* One module per file, as named above.
* Helper modules: `pulse_sync.sv`, `bit_sync.sv` and `rst_sync.sv`.

`tb/`:

* `tb_<module>.sv`: a self-checking testbench for each block. Each one ends
  with a `TB_RESULT checks=N failures=M` line and has a watchdog.
* `adc_lvds_model.sv`: a behavioural model of the ADC serial outputs.
  Sample n of channel c is `{c[2:0], n[8:0]}`, so lane, bit-order and
  alignment errors show up immediately. Its `skew` input delays the stream
  by 0–5 bit times.

`tb_reflecto_daq_top` runs the whole design at its default sizes. It covers:

* a register round trip, a PLL serial write, and LVDS alignment with a skew
  of 3;
* a full 128 KiB burst with internal triggers and an overlapped DMA;
* every one of the 16384 words checked;
* the burst and per-frame timestamps;
* a small burst with external triggers, a missed trigger and a stalling
  sink;
* a burst started by two software triggers, and the general-purpose lines
  driven and read back;
* an overflow burst into a sink that never accepts.

It counts each of these mechanisms and fails if any never happened. It runs
in a few seconds.

`tb_daq_rates` runs the same top at the other two sampling rates, again at
the default sizes: a 128 KiB burst at 100 MSPS and a 64 KiB burst
(4 × 1024 samples) at 40 MSPS. Each run checks every word and when the
upload ends relative to the last sample.

## Simulating

The top's testbench also uses `tb/adc_lvds_model.sv`. Verilator finds it
through `-y tb`, so no extra file argument is needed. Each block testbench
needs the package plus the testbench file, with `rtl/` and `tb/` as library
directories:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/daq_pkg.sv tb/tb_reflecto_daq_top.sv --top-module tb_reflecto_daq_top
./obj_dir/Vtb_reflecto_daq_top +verilator+rand+reset+2
```

Replace the testbench name to run another block. Lint a single module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/daq_pkg.sv rtl/<module>.sv`.

The remaining lint warnings are deliberate:

* Unused package constants.
* Two unconnected outputs in the top: the live timer value and the serial
  busy flag. The control logic keeps its own serial busy flag.
* Reset nets used both as asynchronous resets and in the `disable iff` of
  assertions.

## Choices made here

The published system gives the function of these blocks, not their insides.
The following were chosen for this RTL:

* The LVDS bit order, and word alignment by bit slipping against the frame
  clock. The real board also uses the FPGA's tap delays, which are not
  modelled.
* One bit/frame clock pair for all eight channels. Both ADC boards are
  driven in phase by the same PLL output.
* Zero padding in the top four bits of each 16-bit lane. Low 64-bit half
  read first.
* Frames start on the sample after the trigger. Triggers during a frame are
  dropped and counted. Writes into a full FIFO are dropped and flagged.
* The internal trigger generator's form: burst period, frame period, count.
* Packing of the 128-bit timer register. A 32-bit frame id that restarts
  with each run.
* Per-frame trigger timestamps for the first four frames of a burst only.
* DMA length = `frame_size × frames × 2` words. The DMA waits on an empty
  FIFO rather than failing.
* The register map, the register-bridge handshake and the serial-port
  format. The software trigger bit and the two general-purpose lines are
  one reading of "logic level and triggering signals" passed through the
  registers.
* Clock assignment: 100 MHz control logic and 20 MHz serial port, from the
  logic clock PLL's 20/100/200 MHz outputs.
* The stream and target interfaces toward the DMA core.

Not included:

* The PCIe endpoint (a hard block of the FPGA) and the third-party DMA core.
  Their interfaces appear as ports of the top.
* The FPGA clock PLL. Its clocks are ports.
* Everything off the FPGA: the ADC boards, the interface board's PLL, power
  supply and level translators, the timing board, the host and the
  networks.
* Data processing in the FPGA. The original system does all processing on
  the host.
