# BiRF Square: hardware relocation of Virtex-4 / Virtex-5 partial bitstreams

A self-reconfiguring FPGA system loads partial bitstreams into its own fabric
at run time. Without relocation it needs one stored bitstream for every place
a function might go. With relocation it stores one bitstream per function and
rewrites that bitstream, on the fly, for the place chosen at run time. On
Virtex-4 and Virtex-5 devices the place is two-dimensional: a half (top or
bottom), a row and a major column.

BiRF Square (Bitstream Relocation Filter, "square" for 2D) is the filter that
does the rewrite. The bitstream goes through it one 32-bit word per clock
cycle, together with a 14-bit destination. Every word comes out one cycle
later, unchanged except for two:

* the parameter of the "write 1 word to FAR" command (`30002001`). It is
  replaced by the frame address of the destination.
* the parameter of the "write 1 word to CRC" command (`30000001`). It is
  replaced by a checksum that matches the modified stream, so the device still
  accepts the bitstream.

The filter holds no bitstream. Its cost is a small fixed amount of logic,
whatever the bitstream size.

## Structure

```
birf_square_opb          bus slave: DEST / DIN / DOUT / STATUS / CTRL registers
└── birf_square          the filter: one word in, one word out per cycle
    ├── birf_parser      FSM: finds Dummy/Sync, the FAR and CRC commands, counts parameters
    ├── birf_mja         frame-address unit: destination -> 32-bit FAR
    ├── birf_crc         running configuration CRC, 37 bits folded in per cycle
    └── output mux       incoming word | new FAR | CRC   (registered)
birf_pkg                 constants, header structs, state and family enums
```

## What the filter sees in a bitstream

A configuration stream is made of 32-bit words. Before synchronisation the
device ignores everything except the Dummy word `FFFFFFFF` followed by the
Sync word `AA995566`. After that every command is a packet:

| Header | [31:29] | [28:27] | [26:13] | [12:11] | [10:0] |
|---|---|---|---|---|---|
| Type 1 | `001` | opcode: 00 NOP, 01 read, 10 write | register (low 5 bits used) | reserved | word count |
| Type 2 | `010` | reserved | word count [26:0] | | |

A Type 1 header is followed by as many parameter words as its word count. A
long write, such as the frame data to FDRI, uses a Type 1 header with count 0
followed by a Type 2 header that carries a 27-bit count. The registers used
here are CRC (0), FAR (1), FDRI (2), CMD (4) and LOUT (8). The RCRC command
(value 7 written to CMD) resets the device's CRC. It marks where the checked
part of the bitstream begins.

## The parser (`birf_parser`)

| State | Meaning | Next state |
|---|---|---|
| DUMMY | waiting for `FFFFFFFF` (entered on reset and restart) | SYNC on `FFFFFFFF`, otherwise stays |
| SYNC | Dummy seen | WAIT on `AA995566`, stays on `FFFFFFFF`, otherwise DUMMY |
| WAIT | expecting a header | CRC on `30000001`, FAR on `30002001`, CMD on any other write header with a non-zero count, otherwise stays |
| FAR | this word is the frame address | WAIT |
| CRC | this word is the checksum | WAIT |
| CMD | this word is a parameter of another command | WAIT when the count runs out, otherwise stays |

A command with one parameter and a command with thousands go through the same
CMD state. Its counter is 27 bits wide, so a single Type 2 packet may hold up
to 2^27-1 words. A data word that happens to look like `30002001` is never
taken for a header, because the parser only looks for headers in WAIT.

These interpretations are this implementation's choices:

* NOP and read headers, stray padding and words that are not headers all
  leave the parser in WAIT. A read carries no words in the incoming stream.
* A Type 1 header with count 0 records its register and direction. The Type 2
  header after it continues that write.
* There is no way back from WAIT to DUMMY inside a bitstream. The filter is
  restarted before each bitstream instead.

For every word the parser also tells the CRC unit whether the word enters the
checksum, under which register address, and whether it clears the checksum.

## The frame address (`birf_mja`)

The destination is `{top_bottom, row[4:0], column[7:0]}` (14 bits). The new FAR
keeps only these three fields. Block type and minor address are zero: the CLB/IO/CLK
block type and the first frame of the column. All other bits are zero too.

| Field | Virtex-4 bits | Virtex-5 bits |
|---|---|---|
| top/bottom | 22 | 20 |
| block type (000) | 21:19 | 23:21 |
| row | 18:14 | 19:15 |
| column | 13:6 | 14:7 |
| minor (0) | 5:0 | 6:0 |

Examples: destination bottom half, row 3, column 0x2A gives `0040CA80` on
Virtex-4 and `00119500` on Virtex-5.

Every `30002001` packet in the bitstream receives this same address. A
module whose bitstream writes several FARs, for example one per row it
spans, is therefore not relocated correctly. The filter handles modules that
are addressed by a single FAR write and auto-increment from there.

The address is registered. The register follows `dest` while the parser is in
DUMMY or SYNC and freezes once the Sync word is accepted. Set `dest` before the
bitstream starts. A later change cannot disturb a relocation in progress.

## The checksum (`birf_crc`)

Changing the FAR changes what the device checksums, so the stored CRC word
would no longer match. The CRC unit recomputes it over the words as they
leave the filter, so the new FAR value is included. Each included write adds
37 bits to the CRC: the 5-bit register address above the 32-bit data word.
The polynomial is

x^32+x^28+x^27+x^26+x^25+x^23+x^22+x^20+x^19+x^18+x^14+x^13+x^11+x^10+x^9+x^8+x^6+1
(`1EDC6F41`, the Castagnoli polynomial).

All 37 bits are absorbed in one cycle by an unrolled XOR network. At the CRC
word the multiplexer emits the value accumulated so far.

This part carries the most uncertainty. The following were chosen where the
device behaviour is not pinned down:

* **Bit order.** Least-significant bit first, into a reflected register
  starting at zero, with no final inversion. This is how the configuration
  CRC of later Xilinx families is defined.
* **Which writes count.** Writes to every register except CRC and LOUT.
* **When it resets.** On reset, on restart, on the RCRC command and after
  the CRC word itself.

If a real device rejects the result, these three choices are where to look.
All three live in `birf_crc.sv` and in `crc_checked` in `birf_parser.sv`.

### General-purpose and Lite versions

`CRC_CALC = 1` (default) builds the CRC unit. `CRC_CALC = 0` builds the Lite
filter: no CRC logic, and the CRC parameter is replaced by the constant
`LITE_CRC`. Each family has a predefined value that the device accepts without
checking. Use the Lite filter only where the bitstream is known to be intact. The default
`LITE_CRC = 0000DEFC` is a placeholder and must be set to the target family's
value.

## Bus slave (`birf_square_opb`, the top)

In the reference system a soft processor feeds the filter over the OPB bus
(IBM CoreConnect On-chip Peripheral Bus). The processor takes the bitstream
from DDR memory and writes each relocated word back in place. The top wraps
the filter as an OPB slave:

| Offset | Name | Access | Content |
|---|---|---|---|
| 0x00 | DEST | R/W | [13] top/bottom, [12:8] row, [7:0] major column |
| 0x04 | DIN | W | next bitstream word |
| 0x08 | DOUT | R | last relocated word |
| 0x0C | STATUS | R | [0] DOUT holds an unread word, [6:4] parser state (0 DUMMY, 1 SYNC, 2 WAIT, 3 CRC, 4 FAR, 5 CMD) |
| 0x10 | CTRL | W | [0] = 1 restarts the filter |

Sequence for one bitstream:

1. Write DEST.
2. Write CTRL = 1.
3. For each word: write DIN, then read DOUT.

An access is decoded in the first cycle of `OPB_select` inside
`[C_BASEADDR, C_HIGHADDR]`. `Sl_xferAck` is raised for exactly one cycle in
the next cycle, with the read data on `Sl_DBus`; the data bus is zero at all
other times. Byte enables and `OPB_seqAddr` are ignored. Errors, retries and
time-out suppression are never signalled, so those outputs are tied low.
Bits are numbered [31:0] with bit 0 the least significant. This register map
and handshake belong to this implementation.

The top's parameters are `C_BASEADDR`/`C_HIGHADDR` (default
`7E000000`–`7E0000FF`), `FAMILY` (`FAMILY_V4` or `FAMILY_V5`, default
Virtex-4), `CRC_CALC` and `LITE_CRC`.

The rest of the reference system is vendor IP and is not included here:
the processor, the bus itself, the memories and their controllers, ICAP,
UART, timer and interrupt controller. The top's OPB ports are where it
connects.

## Timing and throughput

The core accepts a word on every cycle with `in_valid` high. Each output word
appears one cycle later, so a bitstream of N words is fully relocated N + 1
cycles after its first word. The reference implementation reached 160 MHz on
Virtex-4 (-12) and 226 MHz on Virtex-5 (-3) in the general-purpose version.
It reached 304 MHz and 290 MHz in the Lite version. At 160 MHz, a 1 MB bitstream (262,884 words)
takes 1.64 ms in the filter alone.

The measured system throughput was about 7.3 MB/s. That rate is set by the
processor moving words over the bus, not by the filter. Through the bus slave
here, each word costs one write and one read of at least two bus cycles each
(decode, then acknowledge).

## Departures from the original description

* The FAR unit registers its output and samples the destination only before
  Sync (see above).
* The Virtex-5 frame address follows the device's FAR field layout: 11
  leading zero bits, top/bottom at bit 20. The published relocation formula
  string is one bit longer than 32.
* The CRC input, bit order, included registers and reset points are
  assumptions (see "The checksum").
* The Lite CRC constant is a parameter without a verified default.
* The bus-slave register map and handshake are original to this RTL. The
  reference system used a generated wrapper whose details are unknown.

## Files

| File | Content |
|---|---|
| `rtl/birf_pkg.sv` | shared constants, header structs, enums |
| `rtl/birf_parser.sv` | parser FSM |
| `rtl/birf_mja.sv` | frame-address unit |
| `rtl/birf_crc.sv` | CRC unit |
| `rtl/birf_square.sv` | filter core |
| `rtl/birf_square_opb.sv` | OPB slave, top level |
| `tb/birf_tb_pkg.sv` | reference model (bit-serial CRC in the other bit order, packet-walking relocation) and bitstream generator |
| `tb/tb_birf_*.sv` | one self-checking testbench per module, plus `tb_birf_workloads` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/birf_pkg.sv tb/birf_tb_pkg.sv tb/tb_birf_square_opb.sv \
    --top-module tb_birf_square_opb -o sim
./obj_dir/sim
```

Replace the testbench file and top module for the others.

| Testbench | What it checks |
|---|---|
| `tb_birf_parser` | every FSM transition, including aborted sync, Type 1 + Type 2 pairs, read/NOP/padding in WAIT, LOUT exclusion, RCRC, restart, a 2047-word packet |
| `tb_birf_mja` | both families against the field concatenation and hand-computed addresses, and the hold behaviour |
| `tb_birf_crc` | random update/clear sequences against an independently coded CRC model. That model is itself checked against the standard CRC-32C check value `E3069283` |
| `tb_birf_square` | Virtex-4, Virtex-5 and Lite instances on synthetic bitstreams with random gaps, word by word, plus the one-cycle latency |
| `tb_birf_square_opb` | the whole path at default parameters through the bus, the handshake and registers. It counts each mechanism: aborted sync, repeated Dummy, FAR and CRC replacement, generic parameters, Type 2 packets, RCRC, words outside the CRC, restarts |
| `tb_birf_workloads` | ten bitstreams of 1.45 KB to 1026.89 KB (the sizes of the published timing measurements) with exact cycle counts |

All pass. The test bitstreams are synthetic: real command packets with random
frame data. The filter has not been checked against a bitstream produced by
the vendor tools, nor on a device. So a CRC that a device accepts is not
demonstrated.
