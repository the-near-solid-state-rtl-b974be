# Solid-state data recorder with pair-error-correcting EDAC

This is synthesizable SystemVerilog for a spacecraft solid-state data recorder
modelled on the recorders flown on the NEAR asteroid mission, as described in
the article "The NEAR Solid-State Data Recorders". The recorder takes serial
science data in, stores them in a large DRAM array and plays them back later,
usually at a much lower rate. That lets the spacecraft hold data until the link
to Earth is available or fast enough.

The hard part of the design is keeping DRAM data intact under radiation. The
DRAM devices in question have an upset mode in which one latch flip corrupts
up to 1024 *pairs* of bits. Such a pair is always bits 0 and 1, or bits 2 and 3,
of one 4-bit device. A plain single-error-correcting code cannot repair a
two-bit error. This design therefore splits every word between two code words
so that the two bits of a pair never land in the same one. It also scrubs the
whole array in the background, so that errors are repaired before they pile up.

## The stored word

Each 32-bit user word is stored as a 44-bit word across eleven 4-bit DRAMs:

```
user word  d31 ... d1 d0
             |        |
 even bits d0,d2,..,d30  -> 16 bits -> SEC-DED code word C0 (22 bits)
 odd bits  d1,d3,..,d31  -> 16 bits -> SEC-DED code word C1 (22 bits)

stored bit   43  42  41  40 ...  3   2   1   0
from        C1  C0  C1  C0 ... C1  C0  C1  C0      (stored[2i] = C0[i], stored[2i+1] = C1[i])
DRAM         <-- DRAM 10 -->    <--- DRAM 0 --->   (DRAM d holds stored[4d+3:4d])
```

Each code word is an extended Hamming code: 16 data bits, 5 Hamming check bits
at the power-of-two positions 1, 2, 4, 8 and 16, and an overall parity bit at
position 0 (`secded_codec`). On read-back the two code words are decoded
independently:

| error in the stored word                  | C0        | C1        | result             |
|-------------------------------------------|-----------|-----------|--------------------|
| none                                      | clean     | clean     | data as stored     |
| any single bit                            | 1 error   | clean     | corrected          |
| DRAM bits 0+1 or 2+3 (latch upset)        | 1 error   | 1 error   | corrected          |
| two bits of the same code word            | 2 errors  | any       | flagged, not fixed |

The 32-of-44 ratio is no accident. A memory module holds 44 DRAMs of 16 Mbit,
which is 704 Mbit raw, and its user capacity is 2^29 bits. That is 32/44 of
the raw size, which is exactly this word format. The use of two interleaved
single-error-correcting codes, with even bits in one and odd bits in the
other, comes from the source. The code-word width, the overall-parity
extension and the exact bit layout are this design's choices. The DRAMs also
correct single-bit errors internally, using a 137-bit code of 128 data and
9 check bits. That happens inside the devices and is not modelled.

## Record and playback path

```
data in A/B --serial_rx--> input sram_fifo --+
                                             |  mem_controller
segment pointer --reconfig_map--> physical --+--> EDAC encode --> bus A/B --> memory modules
                                                  EDAC decode <--
                                  output sram_fifo <--+
data out A/B <--serial_tx-----------------------------+
```

* **Record**: in record mode each 32-bit word received on the selected data
  line goes into the input buffer. The memory controller encodes the word at
  the head of the buffer and writes it at the record pointer of the current
  segment, then advances the pointer. A word that finds its segment full is
  dropped and counted as an overflow.
* **Playback**: in playback mode the controller reads the word at the
  playback pointer, corrects it and queues it in the output buffer. The
  spacecraft then clocks it out of the selected data output. When the segment
  has been played out and the buffers are empty, the recorder returns to idle
  by itself.
* **Rates**: the serial lines are clocked from outside, so the recorder works
  at any rate up to its limit. A serial clock must stay high and low for at
  least six system clocks. The source specifies up to 2,002 kbit/s for record
  and 400 kbit/s for playback, not at the same time. Record therefore needs a
  system clock of at least 16 MHz. The source gives no system clock.

Bus cycles are served in this priority order: refresh, record write, playback
read, scrub. A write takes one cycle. A read returns data two cycles after it
is issued.

## Scrubbing, refresh and the error table

`scrub_refresh` walks the whole physical array, one word per scrub interval.
The interval is `SCRUB_BASE << (rate-1)` cycles for rate codes 1 to 7; code 0
turns scrubbing off. For each word, the controller reads it and decodes it:

* if a bit was corrected, it re-encodes the word and writes it back;
* if the word is uncorrectable, it leaves the word alone and records the
  physical address in the error table (`reconfig_map`, 16 entries; errors
  beyond that are only counted).

Refresh requests come every `REFRESH_BASE << rate` cycles. Each one puts a
refresh cycle on the bus to all modules. A refresh that is not served before
the next one falls due is counted. The memory model only counts refresh rows;
it does not lose data.

## Segments and memory reconfiguration

The logical memory can be split into up to eight segments (`segment_table`).
Each segment has a start, a limit, a write pointer and a read pointer. A
segment is set up by command, which also empties it. After that it can be
recorded and played back in order, or with "random" commands that first move
the write or read pointer to a given address. After reset, segment 0 covers
all of memory.

Logical addresses go through a block map (`reconfig_map`) before they reach
the memory. A block is 2^16 words, so the full-size recorder has 512 blocks.
Logical block *i* is stored in physical block `map[i]`, and only the first
`in_service` logical blocks are used. If the error table shows that a
physical block has gone bad, the ground can move its logical block to a spare
physical block and shrink the in-service count. Recording then continues in a
contiguous, error-free logical memory. The top bit of the physical address
selects the memory module. Page 2 of telemetry reads the map back.

A DRAM that has dropped into its internal test mode corrupts all four of its
bits in every word it holds. That is two bits in each code word, so every
such word is reported as uncorrectable. One DRAM holds a quarter of a
module's words, which is 64 blocks. Moving those 64 logical blocks elsewhere,
or taking them out of service, maps around the failed device at the cost of
capacity.

## Commands

Commands arrive as 16-bit words on either command line, A or B. Both lines
are always listened to.

```
header   [15] checksum follows  [14:8] opcode  [7] 0  [6:0] number of fields (0..127)
fields   16-bit words; the first 8 are kept
checksum sum of header and fields, modulo 2^16
```

A command whose checksum fails, or whose opcode is not one of the 48 defined,
is rejected and counted. Opcodes:

| opcode    | command                | fields                                            |
|-----------|------------------------|---------------------------------------------------|
| 0x00      | no operation           |                                                   |
| 0x01      | idle                   |                                                   |
| 0x02      | built-in test          |                                                   |
| 0x03      | reset                  | restores the default configuration, flushes buffers |
| 0x04      | scrub rate             | f0[2:0]                                           |
| 0x05      | refresh rate           | f0[2:0]                                           |
| 0x06      | ports                  | f0[0] telemetry, f0[1] data, f0[2] bus (0 = A, 1 = B) |
| 0x07      | define segment         | f0 segment, f1:f2 start, f3:f4 limit (exclusive)  |
| 0x08      | map write              | f0 logical block, f1 physical block               |
| 0x09      | blocks in service      | f0                                                |
| 0x0A      | clear error table      |                                                   |
| 0x0B      | telemetry page         | f0[1:0] page (0 status, 1 EDAC report, 2 map), f1 first map block |
| 0x10+n    | record segment n       |                                                   |
| 0x18+n    | random record, seg. n  | f0:f1 word address                                |
| 0x20+n    | playback segment n     |                                                   |
| 0x28+n    | random playback, seg. n| f0:f1 word address                                |

The source gives the total of 48 commands, the 16 record and 16 playback
commands, the header contents (opcode, 0 to 127 fields, usually a checksum)
and the list of command classes. The numbering and field layouts above are
this design's. The source also has commands to reprogram the on-board
processor. They are not included, because this design does the processor's
work in hardware (see "Departures" below).

## Modes and the voted configuration

The recorder has four modes: idle, record, playback and built-in test.
`ssdr_control` holds the critical configuration in one triplicated register,
`tmr_reg`. That configuration is the mode, the scrub and refresh rates, the
A/B selection and the record and playback segments. The output is the bitwise
majority of the three copies. Every `TMR_REFRESH_PERIOD` cycles all three
copies are rewritten from the voted value, so an upset in one copy is removed
before a second upset can join it. The `seu_upset`/`seu_mask` ports flip bits
in chosen copies for testing; tie them to zero otherwise.

The segment table (all bounds and pointers) is also kept in three copies.
It is voted bit by bit on every read, and all three copies are rewritten
from the updated vote every cycle, so an upset in one copy is gone at the
next clock. The block map and its in-service count have three copies too,
with voted reads. The count is rewritten every cycle. The map is rewritten
one entry per cycle by a walking index, so a bad copy of an entry lasts at
most one walk (512 cycles at full size) and never shows at the outputs.
Each new disagreement between copies, found in any of the three places, is
counted and reported on telemetry page 1. Disagreements in consecutive
cycles count as one. The segment table's copies are always written alike,
so a synthesis tool will merge them into one unless its register-merging is
turned off for them.

**Built-in test.** The test writes `BIT_WORDS` words, spread evenly over the
whole array. Each word contains a deliberate DRAM pair error. The test then
reads every word back, checks that the EDAC restored it, and rewrites it
clean. Pass/fail and the error count appear in telemetry. The test overwrites
the words it uses. Refresh continues while it runs.

## Telemetry

Each time the selected telemetry gate opens, a 540-byte frame is sent.
Multi-byte values are sent most significant byte first. Bytes 0-23 are the
same in every frame. The rest depends on the page chosen with command 0x0B.
Reset returns to page 0. The page register is not triplicated: an upset
there changes only what is reported.

Common header and page 0 (status):

| bytes   | content                                                                 |
|---------|-------------------------------------------------------------------------|
| 0-1     | sync 0xEB 0x90                                                          |
| 2       | frame count                                                             |
| 3       | mode[7:6], ports[5:3], test done[1], test passed[0]                     |
| 4       | scrub rate[6:4], refresh rate[2:0]                                      |
| 5       | record segment[6:4], playback segment[2:0]                              |
| 6-9     | commands accepted, commands rejected                                    |
| 10      | last opcode, bit 7 set if accepted                                      |
| 11-14   | EDAC words corrected, words uncorrectable                               |
| 15-22   | overflows, scrub passes, blocks in service, test errors                 |
| 23      | page[7:6], error-table entries[4:0]                                     |
| 24-151  | per segment (16 bytes each): start, limit, write pointer, read pointer  |
| 152-215 | error table: 16 physical word addresses                                 |
| 216-539 | zero                                                                    |

Page 1, the EDAC report, replaces bytes 24-151:

| bytes   | content                                                                 |
|---------|-------------------------------------------------------------------------|
| 24-25   | pair corrections (both code words corrected at once, a DRAM pair error) |
| 26-29   | physical word address of the latest correction (playback or scrub)      |
| 30-31   | uncorrectable words not logged because the error table was full         |
| 32-33   | refresh requests missed                                                 |
| 34-35   | upsets outvoted in the triplicated registers                            |
| 36-151  | zero                                                                    |

Bytes 152-215 still hold the error table, and the rest is zero.

Page 2 reads the reconfiguration map. Bytes 24-279 hold 128 two-byte
entries: the physical block of logical blocks f1, f1+1, ... f1+127. The
logical block number wraps at the end of the map. The rest is zero. The whole
map of 512 blocks takes four frames.

## Redundancy

Every spacecraft interface has an A and a B copy: command, telemetry, data in
and data out. So does the internal bus to the memory modules. Commands are
taken from both command lines. The data side, the telemetry side and the bus
are each chosen by the ports command. Both memory modules are wired to both
buses.

## Serial line timing

Every serial line has three signals: a clock, a data line and a gate that is
high for the whole transfer. The clock is supplied by the spacecraft and
idles high. The recorder samples its inputs at rising clock edges. It changes
its outputs after falling clock edges, so the receiver can sample them at the
next rising edge. Bits go most significant first. All three signals are
synchronised into the system clock domain. If the gate closes in the middle
of a word, the partial word is dropped. An output with nothing to send sends
zero words.

## Sizes and parameters

`ssdr_top` parameters and their defaults:

| parameter            | default | meaning                                                      |
|----------------------|---------|--------------------------------------------------------------|
| `NUM_MOD`            | 2       | memory modules (2 = the larger recorder, 1 = the smaller)    |
| `MOD_AW`             | 24      | log2 words per module (2^24 x 32 bits = 2^29 user bits)      |
| `BLK_W`              | 16      | log2 words per reconfiguration block                         |
| `FIFO_DEPTH`         | 64      | words in each SRAM buffer                                    |
| `TLM_BYTES`          | 540     | telemetry frame length                                       |
| `ERR_DEPTH`          | 16      | error-table entries                                          |
| `BIT_WORDS`          | 64      | words exercised by the built-in test                         |
| `SCRUB_BASE`         | 64      | cycles between scrubs at rate 1                              |
| `REFRESH_BASE`       | 256     | cycles between refreshes at rate 0                           |
| `TMR_REFRESH_PERIOD` | 1024    | cycles between refreshes of the voted register               |

With the defaults the user capacity is 2^30 bits (134 MB) in 88 DRAM-sized
slices. These numbers come from the source: the two module sizes, the 540-byte
frame, 8 segments, 48 commands and 16-bit command words. All other defaults
are choices of this design.

## Departures and limits

* **Processor and firmware.** The original recorder is run by an 80C85
  microprocessor with firmware in EEPROM, a scratch-pad SRAM and a watchdog.
  Several FPGAs handle scrub, refresh, control, formatting and memory access.
  None of the firmware is published. Here the command executive, the
  segment and reconfiguration tables and the telemetry formatter are plain
  hardware. The processor, its memories and its watchdog are not part of
  this RTL, and neither is in-flight reprogramming.
* **DRAM devices.** `memory_module` is one 44-bit-wide array standing in for
  44 devices. The devices' internal EDAC, their redundancy latches and their
  "functional interrupt" test-mode upset are not modelled. The 3.6 V/5 V
  level translators and the power board are analogue and not included.
  Neither are the temperature, voltage and current readings in telemetry.
* **Which registers are voted.** The source says every critical register is
  triplicated and refreshed but does not list them. Here the configuration
  in `ssdr_control`, the segment table and the block map are. The error
  table is a plain register file, and an upset in it goes uncorrected.
* **Power-up contents.** Memory is not cleared at power-up. A real unit
  would start with random DRAM contents, which the scrubber would report as
  uncorrectable. The testbenches clear the arrays before use.
* **Extended telemetry.** The source says further telemetry is available on
  command, including a detailed EDAC report, and that every table can be
  telemetered. Its contents and format are not published. The pages above
  are this design's version of it.
* **Timing.** No system clock frequency is given. Every cycle count here is
  this design's own.

## Files

`rtl/`: `ssdr_pkg` (types, opcodes), `secded_codec`, `edac_interleaved`,
`tmr_reg`, `serial_rx`, `serial_tx`, `sram_fifo`, `memory_module`,
`scrub_refresh`, `mem_controller`, `segment_table`, `reconfig_map`,
`cmd_decoder`, `telemetry_fmt`, `ssdr_control`, `ssdr_top`. Each file starts
with a description of its interface and timing.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`);
`tb_ssdr_top` (end to end at reduced size); `tb_ssdr_full` (full size, all
defaults); `ssdr_tb_tasks.svh` (serial-line drivers shared by the two).

## Simulating

From the project root, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl rtl/ssdr_pkg.sv \
    tb/tb_ssdr_top.sv --top-module tb_ssdr_top -o sim
./obj_dir/sim
```

Replace `tb_ssdr_top` with any other testbench name. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself, with a watchdog in case it
hangs. The full-size testbench builds a 2 x 2^24-word memory (about 260 MB of
simulator memory) and runs in about a second.

What the tests cover:

* `tb_edac_interleaved` tries every single-bit error and every DRAM pair
  error on random words.
* `tb_ssdr_top` drives everything through the serial lines. It checks 15
  mechanisms: the built-in test, overflow, remapping, correction on playback,
  return to idle, random playback, command rejection, the majority vote,
  scrub correction, error logging, the B side, refresh, telemetry, command
  line B and the telemetry pages.
* `tb_ssdr_full` runs one complete record-and-playback at full size, across
  the boundary between the two modules.
