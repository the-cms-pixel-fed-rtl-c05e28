# Pixel FED: a front-end driver for the CMS pixel detector readout

The pixel detector sends its data out as analogue signals over optical links:
each link carries a 40 MHz stream of pulse heights. The pixel address of a hit
is coded in a few discrete levels, and its charge in a continuous level. A
front-end driver (FED) board takes 36 such links. It digitises them with
10-bit ADCs, decodes the levels into hit words, and checks that every link
delivers the event the trigger asked for. It then merges the 36 pieces into
one event fragment per trigger and sends that fragment to the central data
acquisition over an S-Link (64 bits at 80 MHz, 640 MB/s).

The hard parts are these:

- The links are not in step. A readout chip buffers up to 16 events, so at
  one moment different links may be sending different events. Event sizes
  also vary from link to link.
- The board must never hang. When it is overloaded (too many hits, a dead
  link, a full S-Link) it must shed data in a controlled way, tell the
  trigger system through its TTS (trigger throttling) state, and record what
  happened.

This repository holds synthesizable SystemVerilog for the digital part of the
board: everything after the ADCs. The top module is `pixel_fed`.

## Data path

```
 36 links, 40 MHz, each on its own phase-shifted sampling clock
   |
   |  front_fpga x 4 (9 links each)
   |   adc_sync         clock crossing into the 80 MHz main clock
   |   baseline_adjust  pedestal (black level) pulled to a target
   |   input_processor  level decoding -> 32-bit words, event block
   |   FIFO-1           one per link, 1024 x 32
   |   group_builder    x2: one event of 5 (or 4) links, event-number check
   |   FIFO-2           one per group, 1024 x (64+4)
   |   column_histogram, error_memory
   |
   |  two 64+4-bit collection buses (A: FIFO-2 0..3, B: FIFO-2 4..7)
   v
 final_builder   header + 8 group pieces + trailer  --> spy FIFOs (bus A, bus B)
   |
 FIFO-3          65,536 x 66 bits, about 100 average events  --> spy FIFO (input)
   |
 slink_tx        one 64-bit word per clock, honours link-full
   v
 S-Link

 tts_control : READY / WARNING / BUSY / OUT_OF_SYNC / ERROR
 vme_slave   : VME A24/D32 with filtered inputs -> local bus -> registers
```

One 80 MHz main clock runs all the logic. The samples of each link are taken
by that link's own 40 MHz clock, whose phase is tuned in 1.6 ns steps. They
enter the main clock domain through a 16-entry Gray-pointer FIFO (`adc_sync`)
and from then on come with a valid strobe on about every other cycle. The
main clock is twice the sampling rate so that the event builder and the
S-Link sender can move one 64-bit word per clock, matching the link. The
reset is asynchronous and active low in every block.

## The link stream and how it is decoded

`input_processor` is a state machine fed by one sample per valid strobe. It
reads the stream layout of the CMS pixel readout chain:

| part | samples |
|---|---|
| idle | black level |
| event header | 3 x ultra-black, black, 4 symbols = event number (2 bits per symbol, MSB first) |
| each readout chip (ROC) | ultra-black, black, last-DAC value |
| each hit | 2 double-column symbols, 3 pixel symbols (base 6, most significant first), pulse height |
| event trailer | 2 x ultra-black, 2 x black, 2 status samples |

A symbol is one of six analogue levels. The sample is classified against
programmable thresholds:

- below `ub`: ultra-black;
- then by five boundaries `lvl[0..4]` into levels 0..5.

The defaults (`ub`=250, boundaries 400/500/600/700/800) suit a black level of
450 and level k at 350+100k. The decoder counts ROC headers to number the
chips. So ultra-black marks a header or trailer, and what follows it tells
which. A double column above 25 or a pixel number above 215 is not a valid
address. Such a hit is dropped and flagged.

The pedestal loop (`baseline_adjust`) depends on the decoder. It adds a
signed offset to every sample. The decoder marks idle black samples
(`black_valid`). The loop averages the error of those samples against the
target over 16 samples. When the mean error exceeds 4 counts, it removes that
mean from the offset. So a slow drift of the optical link's gain or offset is
followed, and the fixed thresholds stay valid. The analogue offset DAC on the
real board is not driven by this design; the correction is purely digital.

## Word and fragment formats

FIFO-1 words (32 bits, `fed_pkg::fed_word_t`):

| bits | 31:26 | 25:21 | 20:16 | 15:8 | 7:0 |
|---|---|---|---|---|---|
| hit | input 1..36 | ROC 1..27 | double column | pixel | pulse height (ADC >> 2) |
| header | input | 28 | 0 | 0 | event number |
| trailer | input | 30 | status | hit count | event number |
| error | input | 29 | error code | detail | trigger event number |

Error words are written by the group builders. A mismatch word gives the
link's input number. A group time-out word has input 0 and gives the link's
position within the group (0..4) in the detail field.

Trailer status bits are:

- 0: truncated;
- 1: reduced;
- 2: invalid address seen;
- 3: time-out.

Error codes are:

- 1: truncated;
- 2: reduced;
- 3: invalid address;
- 4: link time-out (critical);
- 5: event number mismatch;
- 6: group time-out.

FIFO-2 entries are 64+4 bits (`bus_word_t`). They hold two 32-bit words, the
earlier one in the upper half. The four control bits are:

- upper half valid;
- lower half valid;
- end of event;
- entry holds an error word.

An event of one group always ends with an entry marked end of event. That
entry may hold one word or none.

The S-Link fragment follows the CMS common data format:

- header: `5 | 1 | event number[23:0] | bunch crossing[11:0] | source id 0x028 | 1 | 0`;
- the body: the group entries in FIFO-2 order;
- trailer: `A | 0 | length[23:0] | CRC 0 | status | TTS`.

The length counts 64-bit words, header and trailer included. Status bit 0 of
the trailer means error words are present. The CRC field is left zero.
FIFO-3 stores 66-bit entries: a control flag (header or trailer, sent with
`uctrl_n` low), a last flag and 64 data bits.

## Event building with unsynchronised links

The trigger's event number is counted on the board from the trigger pulses,
starting at 1. Its low 8 bits go to each group builder's trigger queue
(32 deep). The full 24 bits and the bunch crossing go to the final builder's
queue (64 deep). A trigger therefore does not have to wait for its data.
Links lagging by 16 events only make the queues and FIFO-1 deeper.

For each queued trigger, `group_builder` visits its 4 or 5 links in a fixed
order. For each link it waits for the next block in that link's FIFO-1 and
copies it up to the trailer. Its output is one 32-bit word per clock, packed
two per FIFO-2 entry. The header's event number is compared with the
trigger's:

- On a mismatch, the block is kept. An error word goes in right after the
  header, and a report goes to the error memory.
- A link that mismatches in four events in a row (`OOS_LIMIT`) puts the board
  in OUT_OF_SYNC. The state ends when that link's number matches again.
- If a link delivers no block within `TIMEOUT` clocks (8192, about 100 µs),
  an error word with code 6 replaces its data, and the builder moves on.
  This time-out is deliberately longer than the input processor's own 2048
  samples. A link that stops in the middle of an event is therefore closed by
  its input processor with a time-out trailer, not skipped here.

`final_builder` then writes the header. It reads each FIFO-2 in turn, over
the bus that serves it, until that FIFO-2's end-of-event entry. It finishes
with the trailer, at one FIFO-3 write per clock.

## Overload handling

The design sheds load at each stage, from the links to the S-Link:

1. **Too many hits on a link.** After `MAX_HITS` (64) hits, the input
   processor writes the trailer at once with the truncated flag. It then
   discards the rest of the link's event.
2. **FIFO-1 nearly full** (7/8 of 1024 words). Events are reduced: header and
   trailer only, with the reduced flag. An error is reported and busy is
   raised. FIFO-1 is never written while completely full.
3. **FIFO-2 nearly full.** The group builder stalls. Its links' FIFO-1 then
   fill up, which leads back to step 2.
4. **FIFO-3.** The builder stalls two entries before full. At 7/8 full the
   board reports BUSY. At 1/2 full it reports WARNING.
5. **S-Link full** (`lff_n` low). `slink_tx` stops reading FIFO-3.
6. **Trigger queue overflow.** Only a trigger source that ignores BUSY can
   cause it. It is critical, because an event is lost.

TTS priority is ERROR > OUT_OF_SYNC > BUSY > WARNING > READY, with the codes
1100, 0010, 0100, 0001 and 1000. ERROR is raised by a critical error, that is
a link time-out or a trigger queue overflow. It stays until it is cleared
over VME. The other states follow their causes.

## Errors, histograms and spy memories

- **Error memory** (`error_memory`, one per front FPGA, 256 entries). Each
  entry holds: error code [31:28], input number [27:22], event number
  [21:14], critical flag [13], and a time stamp in units of 256 clocks
  [12:0]. If two reports arrive in the same clock, the lower source index
  wins. Lost reports are counted.
- **Column histogram** (`column_histogram`). It counts the hits per pixel
  column (0..51) of one selectable link in each front FPGA, using 16-bit
  saturating counters. A clear takes 52 clocks.
- **Spy memories** (`spy_fifo`, 512 x 68). There are three: bus A, bus B, and
  the FIFO-3 input. An armed spy records the words passing by until it is
  full and never stalls the data path. Each is read out over VME.

## Control interface

`vme_slave` decodes A24/D32 cycles for board address `vme_addr[23:18]` = 4. Every input first passes through `vme_filter`:
a two-flop synchroniser, then a change is accepted only after being stable for 3 clocks, so spikes shorter than
that are ignored. A cycle becomes one local-bus access (longword address = `vme_addr[17:2]`), answered with DTACK
until the strobes are released.

| address | access | contents |
|---|---|---|
| 0x0000 | W | bit 0 clear TTS error, bit 1 clear histograms, bits 4..6 arm spy 0..2 |
| 0x0001 | RW | pedestal target (default 450) |
| 0x0002 | RW | ultra-black threshold (250) |
| 0x0003..7 | RW | level boundaries 0..4 (400..800) |
| 0x0008 | RW | histogram input select, 0..8 within each front FPGA |
| 0x0010 | R | [3:0] TTS, [4] busy, [5] FIFO-3 warning, [9:6] trigger queue overflow, [31:16] FIFO-3 level / 2 |
| 0x0011 | R | triggers received |
| 0x0012 | R | fragments built |
| 0x0013 | R | ADC synchroniser lost flags, links 1..32 |
| 0x0020+f | R | pop error memory of front FPGA f (0 when empty) |
| 0x0024+f | R | lost error reports of front FPGA f |
| 0x0100+64f+c | R | histogram of front FPGA f, column c |
| 0x0200+4s | R | spy s: +0 data[31:0], +1 data[63:32], +2 {control bits, empty} and pop |
| 0x0300+i | RW | sampling clock phase of input i+1, 0..15 in 1.6 ns steps (output `adc_phase`) |
| 0x0340+i | RW | offset DAC setting of input i+1, 8 bits, default 0x80 (output `dc_dac`) |

## Sizes and rates

With the default parameters, the design meets these figures:

- **Storage.** 20 hits per link is the average expected at high intensity.
  An average event is then 36 x 22 32-bit words, which is 396 64-bit words,
  or 406 FIFO-3 entries with the group markers, header and trailer. 100 such
  events need 40,600 of FIFO-3's 65,536 entries.
- **100 kHz.** A 16-chip link with 20 hits takes about 182 samples (4.6 µs).
  A group of five links takes about 1.5 µs to copy. The fragment takes
  5.1 µs at one word per clock. All of these are within the 10 µs between
  triggers, and the S-Link is about half loaded.
- **300 kHz with short events** (2 hits per link). The link stream takes
  1.85 µs and the fragment takes 1.0 µs, within the 3.3 µs between triggers.

`tb_pixel_fed_rate` runs both loads at the default sizes: 30 events at
100 kHz, then 60 short events at 300 kHz. It checks every word of every
fragment and shows that TTS stays READY throughout. The S-Link load comes out
at 50 % and 28 %. The worst trigger-to-last-word latency is 11.2 µs at
100 kHz and 3.6 µs at 300 kHz.

The test ends with a burst of 16 triggers. During the burst one link holds
back its data until the other links are 16 events ahead, the largest lag
readout chips can build up. All 16 fragments still come out complete, and
the board never leaves READY.

## Simulating

Each block has a self-checking testbench, `tb/tb_<block>.sv`. The
testbenches print `TB_RESULT checks=N failures=M` and stop themselves
through a watchdog. `tb/tb_fed_pkg.sv` builds link streams and the expected
words independently of the RTL. Example with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/fed_pkg.sv tb/tb_fed_pkg.sv tb/tb_pixel_fed.sv --top tb_pixel_fed -Mdir obj
./obj/Vtb_pixel_fed
```

There are two end-to-end tests, and both use `tb/tb_pixel_fed_body.svh`:

- `tb_pixel_fed` uses smaller FIFOs and limits, so that it reaches every
  overload case.
- `tb_pixel_fed_full` keeps every default.

Both drive all 36 links on their own clock phases and pedestal shifts. They
check every fragment word against the reference and count each mechanism:

- truncation;
- a silent link (group time-out);
- four event-number mismatches, then OUT_OF_SYNC;
- a link stopping mid-event, then ERROR and its VME clear;
- BUSY and WARNING with the S-Link blocked;
- reduced events from a noisy link.

At full size, BUSY and reduced events do not occur in the short run.

## Departures and open points

- The main clock frequency is not fixed by the original description. 80 MHz
  is chosen so that building runs at the S-Link rate. The 1.6 ns phase step
  is 1/16 of the 25 ns sampling period. The original front logic may well
  have run at 40 MHz, with a faster final stage.
- Errors seen by an input processor reach the event data as trailer status
  flags: truncated, reduced, invalid address and time-out. Only the group
  builders insert separate error words, for a mismatch or a group time-out.
  The trailer's error bit counts only those error words.
- The stream layout, the word formats, the error codes, the TTS codes, the
  register map and all buffer depths and time-outs are this design's choices.
  Where a convention exists, they follow the CMS pixel and CMS DAQ
  conventions.
- One set of decoding thresholds is shared by all 36 links. The real board
  may need per-link thresholds.
- The CRC of the fragment trailer is not computed. The field is zero.
- Not part of this RTL:
  - the optical receivers, ADCs, offset and test-pattern DACs;
  - the clock-phase shifters;
  - the TTC receiver chip;
  - the S-Link card;
  - the board's bus wiring.

  Their signals are ports of `pixel_fed` or are modelled in the testbenches.
  The settings of the phase shifters and offset DACs are registers of
  `pixel_fed` (0x0300 and 0x0340), brought out as `adc_phase` and `dc_dac`.
