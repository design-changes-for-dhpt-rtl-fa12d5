# DHPT 1.1 data handling processor — SystemVerilog model

A data handling processor sits next to the front-end readout chips of a pixel
detector. Every row period it receives one row of raw pixel samples:
256 pixels of 8 bits, on 64 serial lines at 320 Mbit/s, each line carrying
4 time-multiplexed samples. One row arrives every 8 core clock cycles (100 ns).
That is about 19.5 Gbit/s per chip. The processor does
four things with each row:

* it keeps the raw row in a two-frame buffer;
* it subtracts a stored per-pixel pedestal;
* it removes the common-mode offset of the row with a two-pass mean;
* it keeps only the pixels above a threshold inside a trigger window.

The hits that survive are queued, packed into frames, 8b/10b encoded and sent
on a single 1.6 Gbit/s serial link through a current-mode driver with
pre-emphasis. A serial command line carries one 8-bit Manchester word per row.
It sets the reset, trigger and veto levels, aligns the frame, and can request a
calibration frame: a full dump of the raw buffer.

The revision modelled here (1.1) differs from its predecessor in four
circuits. The counter is modelled in its revised form; the delay line and
receiver models have parameters that also reproduce the older behaviour:

| Circuit | What changed in 1.1 |
|---|---|
| Serializer load pulse | The counter cell gets a second flip-flop, so the load pulse is two bit periods wide instead of one. |
| Programmable delay lines | They are built from identical inverters, which removes the duty-cycle distortion. |
| Command/data receiver | It has less input hysteresis. |
| Link driver | Lower parasitic resistance in wiring and vias (RF transistor layouts). The document expects no substantial gain in output swing because of the 1.2 V supply. The model has no parasitics: it keeps the driver's main and pre-emphasis currents only. |

## Block map

```
 cmd_p/cmd_n ─ lvds_rx ─ delay_line ─ cmd_decoder ─ trigger_ctrl ─┐ window, row, dump
                                                                  │
 dcd_data ─ dcd_deser ─┬─ raw_buffer (2 frames) ──────────────────┼──────────┐
 (64 x 320 Mb/s)      └─ pedestal_sub ─ common_mode ─ hit_finder ─ hit_fifos ─ framer ─ enc16b20b
                                                   (FIFO1 x64 → FIFO2)            │
 clk_bit (1.6 GHz) ─ cnt20_load ─ word_clk, load ─────────────── serializer20 ─┐  │
                                             lfsr8 ─ clock pattern ─ 0 ─ link mux ─ cml_driver ─ tx_p/tx_n
```

| File | Block |
|---|---|
| `rtl/dhp_pkg.sv` | Sizes, command codes, K characters, the hit record type |
| `rtl/dhpt_top.sv` | Top level: the wiring above |
| `rtl/cnt20_load.sv` | Divide-by-20 word clock and serializer load pulse (revised counter cell) |
| `rtl/serializer20.sv` | 20-bit parallel-to-serial converter |
| `rtl/lfsr8.sv` | 8-bit LFSR link test pattern |
| `rtl/enc8b10b.sv`, `rtl/enc16b20b.sv` | 8b/10b encoder, and two of them making a 20-bit link word |
| `rtl/cmd_decoder.sv` | Serial Manchester command word decoder |
| `rtl/dcd_deser.sv` | Front-end data deserializer: 64 serial lines into beats of 64 × 8-bit samples |
| `rtl/trigger_ctrl.sv` | Row and frame counters, trigger window, calibration sequencing |
| `rtl/raw_buffer.sv` | Two-frame raw data memory with "newest copy" read-out |
| `rtl/pedestal_sub.sv` | Pedestal memory and subtraction |
| `rtl/common_mode.sv` | Two-pass common-mode correction per row |
| `rtl/hit_finder.sv` | Threshold and trigger-window zero suppression |
| `rtl/sync_fifo.sv`, `rtl/hit_fifos.sv` | FIFO primitive; 64 × FIFO1 (256) merged into FIFO2 (4096) with a loss counter |
| `rtl/framer.sv` | Event and calibration frame builder |
| `rtl/delay_line.sv` | **Behavioural** programmable delay line |
| `rtl/cml_driver.sv` | **Behavioural** CML link driver with pre-emphasis |
| `rtl/lvds_rx.sv` | **Behavioural** receiver with hysteresis |

The three behavioural models are analog or full-custom cells. They use `#`
delays and `real` voltages and currents, and they are not synthesizable.
Everything else is synthesizable RTL.

## Clocking and the serializer load pulse

There is one clock source, the 1.6 GHz bit clock `clk_bit` from the on-chip PLL.
The PLL itself is not modelled; the clock is an input.

`cnt20_load` counts the bit clock modulo 10 and toggles a flip-flop at the
terminal count. This gives the 80 MHz word clock `word_clk`, which runs the
whole core, the command decoder and the link word.

The load pulse of the serializer is taken from the word clock through a chain
of flip-flops: `load = word_clk & ~q2`.

* In the earlier revision the chain had only one flip-flop and the load pulse
  was one bit period wide. Its timing against the word register was correct
  only in the fast process corner.
* The revised cell adds a second flip-flop. The pulse becomes two bit periods
  wide and starts together with the rising edge of the word clock, which gives
  the parallel word a full half word period to settle.

`serializer20` registers the 20-bit word on the word clock. It copies the word
into its shift register on the first bit cycle of the load pulse, then shifts
it out LSB first.

Timing: a word presented at word-clock edge *n* is registered at that edge.
Its first bit appears one bit cycle after the load pulse starts.

## Command word

The command line carries one 8-bit word per row: 8 bits, one per core cycle,
first bit first. The word holds four Manchester pairs, `<RST|TRG|VTO|FSYNC>`,
where `10` means on and `01` means off.

Two words break the Manchester rule on purpose:

* `00 01 11 01` is the synchronisation word, sent as IDLE.
* `11 10 00 <FSYNC pair>` is the calibration trigger (CALTRG). It can carry an
  FSYNC at the same time.

How the decoder treats each command:

* RST, TRG and VTO are levels.
* FSYNC and CALTRG produce one-cycle pulses when they switch on.
* When RST switches off, its width is reported in words (`rst_words`).

The word boundary is not fixed by anything else, so the decoder searches every
bit position for IDLE until it finds one, then locks. Once locked, a word that
is neither Manchester, IDLE nor CALTRG pulses `cmd_err` and drops the lock.

Outputs change one cycle after the last bit of a word. The command passes a
receiver model and a 4-bit delay line (0–3.1 ns in 208 ps steps) before the
decoder, so the sampling phase can be trimmed.

## Row timing, events and calibration frames

`trigger_ctrl` counts 8 cycles per row and 192 rows per frame. FSYNC restarts
the count at row 0 and toggles the frame bank of the raw buffer.

**Event data.** The trigger window is open while the TRG level is on, so the
trigger width chooses how much data is processed. The default width is
1536 cycles, one whole frame. The frame therefore starts at the row that was
current when TRG rose (row *m*) and ends at row *m*−1 of the next frame. Only
hits whose row passed the hit finder while the window was open are queued.
After the window closes, the framer waits for the pipeline to drain (16 cycles)
and for all FIFOs to empty, then closes the frame.

**Calibration data.** CALTRG freezes the raw buffer at once (`wr_inhibit`) and
requests a dump.

* If an event frame is still being sent, the request waits (`cal_hold`) until
  the framer is idle, meaning the FIFOs are flushed.
* The framer then sends rows 0..`row_max` (default 191). Each row is sent as
  4 beats of 64 samples.
* The data is re-sorted: for every row the raw buffer returns whichever of its
  two banks was written last. The dump is therefore a continuous frame ending
  at the row before the freeze, whatever the phase of CALTRG.
* Physics triggers that arrive while a calibration is pending or running, or
  while a frame is still being sent, are ignored and counted (`trg_ignored`).
* The alternative, in which leftover event data is sent after the calibration
  frame, is not built.

Dump length: each beat costs one read cycle plus 32 data words. A full
calibration frame is 192 × 4 × 33 = 25,344 word cycles: about 320 µs at 80 MHz,
or 330 µs at the chip's 76.35 MHz system clock.

## Front-end data input

The front-end chip digitises 256 pixels per row with 8-bit ADCs. A 4:1
multiplexer sends them on 64 lines: per row, each line carries 4 samples of
8 bits, 32 bits in all. At 320 Mbit/s that takes exactly one 100 ns row.

`dcd_deser` works as follows:

* **Row sync.** At each row start it pulses `dcd_sync` towards the front end.
* **Sampling.** It samples every line once per 5 bit-clock cycles (320 MHz),
  in the middle of the bit. The front end sends bit *k* of the row in
  bit-clock cycles 5k+1..5k+5 after the sync, MSB first.
* **Beats.** Every 8 bits it completes one beat of 64 samples. It hands the
  beat to the core clock through a toggle flag, at a moment 1 bit-clock cycle
  before a core edge, so the core samples stable data.
* **Columns.** Sample *s* of line *l* is column `l*4 + s`.
* **Timing.** Beats reach the core in cycles 3, 5, 7 and 9 after the row start,
  so the last beat of a row arrives in the next row.
* **Sampling phase.** The chip trims its deserializer sampling moment with
  programmable delay elements. Here the input `des_phase` (0..4 bit-clock
  cycles, default 2) plays that role. Phases 1..4 lie inside the bit with the
  front-end timing above. A phase above 2 delays the beats by one core cycle.

The top therefore tags each row with the row counter and frame bank seen at its
first beat, and uses that tag for all four beats.

## Processing chain

* **Pedestal subtraction.** The pedestal memory holds one 8-bit pedestal per
  pixel, at address `row*4 + beat`, written through `ped_we/ped_addr/ped_wdata`.
  The result is `max(sample − pedestal, 0)`. Latency is 2 cycles.
* **Common mode, two passes.** Pass 1 is the mean of all 256 pedestal-corrected
  samples of the row. Pass 2 is the mean of only those samples not above
  `mean1 + cm_thr`, so hits do not drag the estimate up. The pass-2 value is
  subtracted from every sample, clamped at 0. Rows are double-buffered.
  Output starts 2 cycles after the last beat of the row. `cm_overrun` flags a
  row that arrives before the previous one has left.
* **Hit finder.** A corrected sample above `hit_thr` while the window is open
  becomes a hit `{row, col, adc}`, with `col = lane*4 + beat`.
* **FIFOs.** Each lane has a FIFO1 (256 hits). A round-robin merge moves one
  hit per cycle into FIFO2 (4096 hits), which feeds the framer. A hit that
  meets a full FIFO1 is dropped, and `lost1` counts it.
* **Link capacity.** The link carries 16 payload bits per core cycle and a hit
  costs two words, so the sustained rate is 4 hits per row, about 1.6 %
  occupancy. Bursts above that fill the FIFOs; 20,480 hits can be buffered in
  total.

## Frame format on the link

Each core cycle the framer emits one 16-bit word with a K flag per byte,
upper byte first. `enc16b20b` encodes it into a 20-bit 8b/10b word with running
disparity.

| Item | Words |
|---|---|
| Idle | K28.5 K28.5 |
| Start of frame | K28.2 K27.7 |
| Event header | `{2'b01, frame_no[5:0], first_row[7:0]}` |
| Event hit | `{row, col}`, then `{8'h00, adc}` |
| Calibration header | `{2'b10, frame_no[5:0], row_max[7:0]}` |
| Calibration data | For each row and beat: one idle word (read cycle), then `{lane 2j, lane 2j+1}` for j = 0..31 |
| End of frame | K29.7 K30.7 |

Idle words may appear inside an event frame while FIFO2 is empty.

## Link output, driver and receivers

* **Link mux.** `link_sel` selects what drives the pad:
  * `00`: the serializer;
  * `01`: the LFSR pattern (x⁸+x⁶+x⁵+x⁴+1, seed 0x01, period 255);
  * `10`: a bit-clock/2 clock pattern;
  * `11`: constant 0.
* **`cml_driver`.** The driver steers a main current (mirror 1:20) and a
  pre-emphasis current (mirror 1:2) into 50 Ω loads.
  * The pre-emphasis current follows a delayed copy of the data with opposite
    sign.
  * The swing is therefore MAIN+BOOST right after a transition and MAIN−BOOST
    once the delayed copy has caught up.
  * The delay comes from a 2-bit delay line. `SW[1:0]` = 11/01/10/00 gives
    130/300/470/640 ps in steps of 170 ps. The measured last step is shorter
    (615 ps).
* **`delay_line`.** Delay = `T_MIN_PS + sel*T_STEP_PS`. With `SKEW_PS > 0` the
  rising edge is slowed by `SKEW_PS` per element, which models the older
  standard-cell chain. Its duty-cycle distortion grows with the setting. The
  default `SKEW_PS = 0` models the revised chain of identical inverters.
* **`lvds_rx`.** The output goes high above +34.4 mV and low below −27.5 mV
  (typical corner, about half the earlier hysteresis), after 100 ps.

## Parameters

Defaults are the real chip sizes.

| Parameter | Default | Where |
|---|---|---|
| `ROWS` | 192 | rows per frame |
| `ROW_CYCLES` | 8 | core cycles per row |
| `LANES` × `CH_PER_LANE` | 64 × 4 | pixels per row |
| `FIFO1_DEPTH` | 256 | per lane |
| `FIFO2_DEPTH` | 4096 | |
| `DRAIN` (framer) | 16 | pipeline flush after the trigger |

Run-time settings are top-level inputs: `cm_thr`, `hit_thr`, `row_max`,
`link_sel`, `drv_sw`, `cmd_dly`, `des_phase`, and the bias currents.

## Where this model departs from the chip

These are choices made here, where the chip's own behaviour was not available:

* **One clock.** The core runs on the 80 MHz word clock, which also stands in
  for the 76.35 MHz system clock.
* **Front-end link format.** The bit order, the sampling phase and the row
  alignment through `dcd_sync` are this design's own. The per-line receivers
  and delay adjustment in front of the deserializer are not instantiated; the
  lines enter as logic signals.
* **Encoding choices.** The serial bit order, the LFSR polynomial, the frame
  header and hit word formats, and the K characters used as frame delimiters
  are all this design's own.
* **Common mode.** The two-pass mean with a programmable cut is one reasonable
  reading of "two pass".
* **FIFO1 and the hit finder.** The chip's block diagram places FIFO1 in front
  of the hit finder. Here the threshold compare comes first and only hits are
  queued in FIFO1; the merge into FIFO2 follows it.
* **Reset and veto.** Any RST resets the data path; the reset modes selected by
  the RST width are not modelled. VTO is decoded to a level only, because the
  veto sequence belongs to the switcher sequencer.
* **Link mux inputs.** The assignment of the four link mux inputs is this
  design's own.

Not modelled at all:

* the PLL;
* JTAG;
* the switcher sequencer;
* DACs and ADC;
* the offset DAC memory.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
Each has a watchdog. With Verilator 5:

```sh
verilator --binary --timing -Wno-fatal --top-module tb_dhpt_top \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/dhp_pkg.sv tb/tb_dhpt_top.sv
./obj_dir/Vtb_dhpt_top
```

Replace `tb_dhpt_top` with any other testbench in `tb/`.

**`tb_dhpt_top`** runs the complete design at its default size, in about
15 s of wall time. It sends real command words on the differential line. It also acts as the
front end: at each `dcd_sync` it sends a row of pixels (random pedestal + row
offset + injected hits) on the 64 serial lines. The
sequence is:

1. Lock the decoder and send FSYNC.
2. Run a 1536-cycle trigger with 2 % hits. Every hit of a row fully inside the
   window must appear, with the right row, column and value, and nothing else.
3. Run a 200-row trigger with 50 % hits. The FIFOs overflow and `lost1`
   counts the loss.
4. Send CALTRG while that frame is still draining. The calibration is held
   (case B), and a trigger sent meanwhile is ignored. The calibration frame
   must then equal the newest raw data of all 192 rows.
5. Send an RST command, then a broken command word. The decoder must raise
   `cmd_err`, drop the lock and relock on the next IDLE. Then run the LFSR and
   clock link patterns.

Throughout the run, the serial output is compared bit by bit with the 20-bit
link words. Each of these mechanisms is counted, and one that never happens
counts as a failure.

The block testbenches (`tb_<block>`) check each block against an independent
model:

* 8b/10b tables, disparity and running sum, also across the two bytes of the
  20-bit link word;
* FIFO reference queues;
* pedestal and common-mode arithmetic;
* the load-pulse width and position;
* the delay steps and duty-cycle distortion;
* driver levels;
* receiver thresholds;
* command decoding;
* calibration hold.

Some use reduced sizes to run quickly.
