# Eight-channel storage-type dynamic test recorder: FPGA control logic

A storage-type dynamic recorder sits inside a test object: a projectile, a
fuze, a drop or impact rig. It runs on its own battery, with no cable to the
outside. It waits in a low-activity loop until an event happens, then records
eight analog channels into NAND flash. Afterwards it is recovered and read out
over an infrared link. The FPGA logic in this repository is the digital core of
such a recorder. It does the following:

- switches the supply regulators on and off in sequence;
- steps two 4:1 analog switches through the eight channels in front of one
  12-bit A/D converter (AD7492) and starts its conversions at 200, 100 or
  50 kHz;
- watches the converted samples for the trigger condition: an internal
  threshold, optionally required several times in a row, ORed with an
  external trigger line;
- builds a bad-block table of the NAND flash (K9F1G08U0M type: 1024 blocks
  of 64 pages of 2048 + 64 bytes) and records the sample stream page after
  page, skipping bad blocks, until a preset number of pages is written;
- waits in a low-power state until a host asks for the data, then streams it
  out over a serial link coded for an infrared transceiver;
- erases the flash only when the host commands it.

Everything is synthesizable SystemVerilog-2017 on a single 16 MHz clock
(`m16`), with the active-low reset `mclr`. The converter, the analog switches,
the regulators, the flash chip and the infrared transceiver are external parts.
The testbenches have behavioural models of the converter (with its switches)
and of the flash.

```
             +-----------+   mux1/mux0/a1/a0
  8 analog ->| 2x 4:1    |<----------------------- channel_gate <-- adv --+
  channels   | switches  |--> AD7492 <-- convst -- convst_gen              |
             +-----------+      | busy, db[11:0]   (200/100/50 kHz)        |
                                v                                          |
                             adc_if ---- sample {ch,data}, valid ----------+
                                |                 |
                                |            trigger_unit --ntr--+
                                v                                v
                           sample_fifo ---------------------> dts_ctrl --> nand_ctrl <--> NAND flash
                                                                 ^  |
   host <--> IR transceiver <--> ir_codec <--> uart_rx / uart_tx-+--+
   power_ctrl: ONA, ONB (ONB = recorder powered), WOFF
```

## The recording flow (`dts_ctrl`)

`dts_ctrl` is the centre of the design and the part that needs the most care.
It is one state machine. The state is brought out on the top's `state` port.

| state | what happens | leaves when |
|---|---|---|
| `ST_WAIT_POWER` | nothing; waits for the power-up signal (ONB high) | ONB = 1 |
| `ST_BB_SCAN` | reads one byte at column 2048 (the first spare byte) of pages 0 and 1 of every block; anything but FFh marks the block bad | all 1024 blocks read |
| `ST_READY` | waits for a host command | `'E'` → erase, `'R'` → read-out of old data |
| `ST_ERASE` | erases good blocks from block 0 up, until they hold `rec_pages` pages | enough blocks erased, or none left |
| `ST_LOOP` | cyclic sampling: conversions run, the trigger is armed, nothing is stored, the sample buffer is kept empty | trigger (`ntr`) |
| `ST_SEQ` | sequential sampling: every sample goes through the buffer into flash, page after page | `rec_pages` pages written, or the good blocks run out (`flash_full`) |
| `ST_LOW_POWER` | recording over; `low_power` = 1; conversions stopped | host `'R'` |
| `ST_READOUT` | reads every written page and sends each byte to the host | all pages sent |
| `ST_READ_DONE` | reading complete | `'R'` reads again, `'E'` erases and re-arms |

Some points are not obvious from the table.

**Erase only on command.** Recorded data is never erased automatically. After
power-up and the bad-block scan, the controller stops in `ST_READY` and waits
for the host. If the recorder lost power after a test, the host can first read
the old recording with `'R'`. Only `'E'` erases the flash and arms the
recorder.

**Bad blocks by address mapping.** The table is one bit per block (`bad`,
1024 flip-flops). Erase, program and read-out all walk the blocks in
ascending order from block 0 and step over marked blocks. So logical page *n*
of a recording always lands on the same physical page, and read-out finds it
again without storing a map. The same walk also limits the recording: if it
passes the last block before `rec_pages` pages are written, `flash_full` is
set, and the recorder goes to low power with what it has. Read-out then sends
exactly `pages_written` pages. The table is rebuilt after every power-up. It
is never written to flash.

**What a page holds.** Each sample takes two bytes: `data[7:0]`, then
`{0, channel[2:0], data[11:8]}`. The channel number travels with every
sample, so the host can sort the interleaved stream even if a conversion is
lost. A page takes 1024 samples (2048 bytes) in its main area; the spare area
is not written. Samples start with the first conversion after the trigger.
There is no pre-trigger history.

**Why there is a buffer.** A page program keeps the flash busy for up to
0.7 ms (K9F1G08U0M data sheet), and the converter does not stop. At 200 kHz
that is 140 conversions. `sample_fifo` (256 entries of 15 bits) holds them.
While a page is being programmed, `nand_ctrl` pulls bytes from the buffer at
8 MHz, much faster than they arrive. The buffer therefore only has to cover
the busy time. An overflow is not silent: it sets the sticky `fifo_overflow`.
`tb_dts_record` runs 70 pages at 200 kHz with a 0.7 ms program time and
loses no sample.

**Read-out.** Bytes leave through a one-byte hold register into `uart_tx`.
The flash engine only reads the next byte while the hold register is empty,
so the slow serial link paces the whole read. At 115 200 baud the link is
the bottleneck: about 11.5 kB/s. That is about 45 minutes for a 5-minute
50 kHz recording (30 MB), and about 3 hours for the full chip.

**Host commands.** Single bytes on the serial link: `'R'` (52h) reads and
`'E'` (45h) erases. Any other byte is ignored. `'E'` is accepted in
`ST_READY` and `ST_READ_DONE`. `'R'` is accepted there and in
`ST_LOW_POWER`. In `ST_READY`, `'R'` reads as many pages as `rec_pages` asked
for at power-up: the recorder does not know how much an earlier run wrote.

**Power-up signal.** The controller leaves `ST_WAIT_POWER` when ONB rises.
After that it does not watch ONB again: a later supply drop only stops the
sampling chain, which is gated by ONB. To start over, pull `mclr` low.

**Sampling only when needed.** Conversions and channel switching run only in
`ST_LOOP` and `ST_SEQ`. In every other state, CONVST is held high and both
analog switches are disabled. That covers the scan, the erase, low power and
read-out. The supply logic can additionally switch regulator B off (WOFF,
below). The channel counter restarts at channel 1 each time sampling
starts. Between operations the flash engine holds CE# high, which puts the
flash in its standby state, so in low power the memory is dormant.

## Flash command engine (`nand_ctrl`)

The flash has one 8-bit bus for commands, addresses and data. CLE marks a
command byte and ALE an address byte, both taken on the rising edge of WE#.
`nand_ctrl` runs one operation per `req`:

- page read: `00h`, col low, col high, row low, row high, `30h`, wait for
  R/B#, then `nbytes` RE# cycles;
- page program: `80h`, four address bytes, `nbytes` data bytes in one
  continuous WE# burst, `10h`, wait for R/B#;
- block erase: `60h`, row low, row high, `D0h`, wait for R/B#.

The row address is block × 64 + page (16 bits), and the column address is
12 bits. Every WE# or RE# cycle is two clocks long: 62.5 ns low and 62.5 ns
high. That meets the part's 25 ns minimum pulse widths and 50 ns cycle time
with margin. Read data is captured at the end of the RE# low clock. After the
last command byte the engine waits `WB_CYCLES` (4) clocks before it looks at
R/B#, which passes a two-flop synchroniser. CE# is low for a whole operation.
All flash pins are registered. The data bus comes out as
`flash_io_out`/`flash_io_oe`/`flash_io_in` for an external tri-state pad.

The data side has two streams with simple handshakes:

- write: `wr_ready` pulses when the byte on `wr_data` has been taken;
- read: `rd_valid` pulses with a byte, and the next RE# cycle starts only
  while `rd_ready` is high.

These handshakes are what let the controller pace programs from the buffer
and reads from the serial link.

## Trigger (`trigger_unit`)

The trigger compares the five most significant bits of each sample of one
chosen channel (`trig_ch`), ADD[11:7], with a 5-bit `threshold`. A counter
(`count1`) counts consecutive samples above the threshold, and a sample at or
below it resets the counter. The internal trigger `tr` rises when the count
reaches `retrig_n`:

- `retrig_n` = 1 triggers on any single sample above the threshold;
- `retrig_n` = 3, for example, needs three samples in a row (multiple
  retrigger), so a single spike does not start a recording;
- `retrig_n` = 0 switches the internal trigger off.

The external trigger `ext_trig` passes a two-flop synchroniser (`wcf`). The
trigger to the controller is the plain OR `ntr = tr | wcf`. `tr` latches once
it is raised. `ntr` therefore follows the external line, but stays high with
`tr`. The controller acts on the first clock `ntr` is high. The internal
trigger is armed only in `ST_LOOP`, and leaving that state clears `tr` and
`count1`.

On the board the external trigger input is held low, which leaves only the
internal trigger. When the input is opened, it goes high and the recorder
triggers; that is how the recorder is triggered by hand to check that it
records.

## Conversion timing and channel gating (`convst_gen`, `channel_gate`, `adc_if`)

`convst_gen` holds three divider counters that toggle at 40, 80 and 160
clocks. They give 50 % square waves of 200, 100 and 50 kHz (CONVST1..3). The
2-bit `rate` input picks the one that drives the converter's CONVST. The
converter starts on the falling edge, so `convst_gen` also gives a one-clock
`start` strobe at that edge. The dividers run only while `mclr` is high, ONB
is on and the controller is sampling (`ST_LOOP` or `ST_SEQ`). The rate is the
conversion rate shared by the eight channels: each channel is sampled at one
eighth of it (25, 12.5 or 6.25 kHz).

`adc_if` latches the channel that was selected at `start`. It waits for BUSY
to rise and then fall (BUSY passes a two-flop synchroniser). It then pulls the
joint CS/RD line low for two clocks and takes DB11..DB0. The result leaves as
a one-cycle `valid` together with the channel. It arrives a few clocks after
BUSY falls (at most 6; the testbench checks this), so about 1 µs after the
CONVST edge, well within the shortest period of 5 µs. If BUSY never rises
within 64 clocks, the conversion is dropped.

The same `valid` steps `channel_gate`'s 3-bit counter, which is decoded as:

| count | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---|---|---|---|---|---|---|---|---|
| channel | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
| MUX1 | 0 | 0 | 0 | 0 | 1 | 1 | 1 | 1 |
| MUX0 | 1 | 1 | 1 | 1 | 0 | 0 | 0 | 0 |
| A1 A0 | 00 | 01 | 10 | 11 | 00 | 01 | 10 | 11 |

MUX0 enables the switch for channels 1–4 and MUX1 the switch for channels
5–8. The switches settle during the rest of the conversion period. Both
enables are off whenever the recorder is not sampling.

## Supply sequencing (`power_ctrl`)

Two regulators feed the recorder. Regulator A gives 5 V and is enabled by
ONA. Regulator B gives 3.3 V and is enabled by ONB; it feeds the sensors and
the recorder's circuit.

- ONA is a flip-flop with an asynchronous clear. ON sets it on the clock, and
  the global power-off SOFF clears it at once.
- ONB is a flip-flop with an asynchronous preset and an asynchronous clear.
  KRST sets it at once and SOFF clears it at once; SOFF wins. ONB is also
  cleared on the clock by WOFF.
- WOFF comes from a 3-bit delay counter. The counter runs while TC = 1,
  KRST = 0 and ONB = 1, and is held at zero while TC = 0. When it reaches 7,
  WOFF (active low) drops for one clock and ONB switches off. So with TC
  high, regulator B turns itself off 8 clocks after KRST is released.

ONB is the recorder's power-up signal. SOFF, ON, KRST and TC are top-level
inputs. They belong to the always-powered supervisor controller, which is
outside this logic.

## Host link (`uart_tx`, `uart_rx`, `ir_codec`)

The link is a serial line, 8N1 at 115 200 baud (139 clocks per bit), with
mid-bit sampling and a frame-error flag on receive. `ir_codec` turns it into
light pulses: every 0 bit sends a pulse of 3/16 of a bit time at the start of the
bit, as in IrDA SIR. On the receive side, the rising edge of every pulse pulls
the serial input low for one bit time. On the host side, the same codec and
serial port are needed, followed in practice by a USB bridge.

## Top level (`dts_top`)

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 16 000 000 | system clock |
| `CLKS_PER_BIT` | 139 | serial bit time (115 200 baud) |
| `FIFO_DEPTH` | 256 | sample buffer entries (power of two) |
| `NUM_BLK` | 1024 | flash blocks |
| `PPB` | 64 | pages per block |
| `PAGE_DATA` | 2048 | bytes recorded per page |
| `BB_COL` | 2048 | column of the bad-block mark |

Ports:

- Configuration: `rate`, `trig_ch`, `threshold`, `retrig_n`, `rec_pages`
  (the recording length in pages: 1 page = 1024 samples), and `ext_trig`.
- Pins: the converter and switches, the flash, the supplies and the
  infrared transceiver.
- Status: `state`, `low_power`, `trig`, `int_trig`, `ext_trig_s`,
  `fifo_overflow`, `flash_full`, `bad_count`, `pages_written`.

`dts_pkg` holds the shared types: the state enum, the sample record, the
flash operation codes, and the command and host bytes.

One page holds 1024 samples, so at 50 kHz a 5-minute recording (15 million
samples, 30 MB) needs `rec_pages` = 14 649. One chip holds 65 536 pages
(128 MiB) less its bad blocks. `rec_pages` is 17 bits wide.

## Where this design departs from its source, and what it adds

The recorder's published description fixes the following:

- the blocks and the state flow;
- the switch truth table;
- the three rates and the 16 MHz clock;
- the five compared bits and the OR of the triggers;
- the flip-flop kinds and signal names of the supply logic, with a delay
  count of 7;
- the flash part, its command bytes, and the rule "mark byte in the first
  two pages not FFh = bad".

The rest is this design's own, namely:

- **Bad-block mark column.** The description gives column 4096 for the mark.
  A K9F1G08U0M page has only 2112 columns, so the mark is read at column 2048,
  the first spare byte, where the manufacturer puts it (`BB_COL`).
- **Capacity.** The description's target is 256 MB, but it names a single
  1 Gbit chip. This design drives that one chip: 128 MiB of data. More would
  need a second chip select.
- **Conversion rate.** One passage names 250 kHz for the first divider and
  another names 200 kHz. 200 kHz is built. The selected rate is the
  converter's total rate, so each channel gets an eighth of it.
- **Power-off input.** The supply state diagram and the text disagree on the
  polarity of SOFF. SOFF = 1 is taken as "everything off", after its name
  "global power-off".
- **Assumed values.** The rest was chosen where the description gives no
  detail:
  - the host command bytes and the READY state;
  - the page byte format;
  - the sample buffer and its depth;
  - the bus timing of the flash engine;
  - the read timing of the converter and the BUSY time-out;
  - the serial format and the infrared pulse code;
  - the trigger channel input, the strict ">" comparison, and the
    `retrig_n` = 0 disable;
  - the one-clock WOFF pulse.
- **Left out.** Analog conditioning, the regulators and the supervisor
  microcontroller are outside this logic. Wear levelling, ECC and marking
  blocks bad at run time (for example after a failed program) are not
  implemented. The program and erase status is not read back. The infrared
  link only carries the two commands and the read-out. Loading settings or
  new code into the recorder over the link is not supported: the rate,
  trigger and length settings are top-level inputs.

How far to trust it: every block has a self-checking testbench that compares
it with a reference computed inside the testbench. Each testbench is known to
catch a deliberately broken version of its block. The whole recorder runs end
to end, at reduced flash size and at full size. No FPGA has run this code,
and the flash and converter models are written from the data-sheet behaviour,
not from the vendors' models. Timing closure at 16 MHz has not been checked
on a real device, though the logic is shallow.

## Simulation

With Verilator 5 (`--binary --timing`), from the repository root, for any
testbench `<tb>`:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal --top-module <tb> \
    -Irtl -Itb -y rtl -y tb +libext+.sv rtl/dts_pkg.sv tb/<tb>.sv \
    --Mdir obj_<tb> -o sim
./obj_<tb>/sim
```

The testbenches give delays in nanoseconds (a 62 ns clock period); set the
time unit as above. Warnings are style remarks (mostly unused package
constants and bit-width notes), not errors. Each testbench prints
`TB_RESULT checks=N failures=M` and stops. A watchdog
counts a failure if it hangs.

| testbench | what it covers |
|---|---|
| `tb_power_ctrl` | asynchronous set/clear of ONA/ONB, delay counter, WOFF timing |
| `tb_convst_gen` | CONVST periods 80/160/320 clocks, duty cycle, start strobes, hold |
| `tb_channel_gate` | switch truth table over two cycles, hold, supply-off |
| `tb_adc_if` | BUSY handshake, CS/RD pulse, result latency, time-out |
| `tb_trigger_unit` | consecutive-count trigger against a reference, spikes, external trigger |
| `tb_sample_fifo` | order, full/empty/level, overflow flag, flush |
| `tb_nand_ctrl` | exact command/address/data byte sequences on the bus, WE# timing, reads |
| `tb_uart_tx`, `tb_uart_rx`, `tb_ir_codec` | serial frames, 3 % baud error, pulse coding |
| `tb_dts_ctrl` | every state change with a small flash, bad-block skip, flash full |
| `tb_dts_top` | whole recorder at small flash size: all triggers, rates, supply switching, read-out over infrared (a few seconds) |
| `tb_dts_top_full` | whole recorder at default size: full 1024-block scan, one page recorded and read back over the 115 200 baud link (a few seconds) |
| `tb_trigger_experiment` | whole recorder with a sine on channels 1–4 and a rectangle on 5–8: no trigger at low amplitude, trigger when raised, read-out matched to every conversion, sine amplitude within 2 % |
| `tb_dts_record` | default size: 70 pages across a bad block at 200 and 50 kHz with worst-case program time, every sample checked in flash (about 20 s) |

`tb/ad7492_model.sv` and `tb/nand_flash_model.sv` are behavioural models used
by the larger testbenches. The flash model is sparse, and it counts protocol
errors: programming a byte that is not erased, or touching a bad block. Its
`T_R`, `T_PROG` and `T_BERS` parameters set the busy times.
