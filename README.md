# Slicing-by-16 Ethernet CRC-32 at 16 bytes per clock

Ethernet protects every frame with a 32-bit cyclic redundancy check, the
Frame Check Sequence (FCS). A serial CRC circuit (an LFSR) handles one bit per
clock, far too slow for 100 Gbit/s links. This design computes the CRC-32 of
a whole 128-bit word, 16 bytes, in every clock cycle. Sixteen precomputed
lookup tables of 256 words each hold the CRC contribution of every possible
byte value at each of the 16 byte positions. The new CRC is the XOR of 16
table reads. At the intended 800 MHz clock that is 128 bits per 1.25 ns:
102.4 Gbit/s.

The tables are not stored as constants. A small sequential generator
computes them after reset (6656 clock cycles), and a host can overwrite any
entry through a write port.

## The CRC being computed

- Polynomial: 0x04C11DB7, the Ethernet CRC-32.
- Ethernet sends each byte least significant bit first. The design therefore
  uses the reflected (right-shifting) form of the CRC, with the bit-reversed
  polynomial 0xEDB88320. `crc32_pkg::reflect32` derives it from the normal
  value.
- The running remainder starts at 0xFFFFFFFF, and the output is its
  complement. With these settings `crc_32` is the standard Ethernet CRC-32;
  for example, the bytes 31 32 33 34 35 give 0xCBF53A1C.
- To fill in the FCS, send `crc_32` least significant byte first.
- A receiver can run the frame together with its FCS through the engine
  instead. An intact frame then always leaves the fixed residue 0x2144DF1C.

## How one word is absorbed (slicing by 16)

A 128-bit word carries 16 bytes. **The first byte of the stream is in bits
[7:0] and the last is in bits [127:120].** Call the current remainder `c`. One
clock performs:

```
m        = { data[127:32], data[31:0] ^ c }        // fold c into the first 4 bytes
c_next   = T0 [m[127:120]] ^ T1 [m[119:112]] ^ ... ^ T11[m[39:32]]
         ^ T12[m[31:24]]   ^ T13[m[23:16]]   ^ T14[m[15:8]]   ^ T15[m[7:0]]
```

Table `Tk` is addressed by the byte that still has `k` more bytes after it in
the word. `Tk[i]` is the remainder left by byte `i` followed by `k` zero
bytes, starting from zero. The last byte, with nothing after it, uses T0. The
first byte, with 15 bytes after it, uses T15.

The remainder only has 32 bits, so it overlaps the first four bytes of the
word. That is why it is XORed into `data[31:0]` and nowhere else. The twelve
upper bytes go to T0..T11 unchanged.

### The tables

```
T0[i]  = i shifted right 8 times through   t = (t >> 1) ^ (t[0] ? 0xEDB88320 : 0)
Tk[i]  = (Tk-1[i] >> 8) ^ T0[Tk-1[i] & 0xFF]          for k = 1..15
```

`crc32_table_gen` evaluates these formulas one step per clock:

- **T0.** For each index there is one load cycle, eight shift cycles and one
  write cycle: 10 cycles per entry, 2560 in total.
- **T1..T15.** For each index `i`, the generator reads `T0[i]` once. It then
  walks k = 1..15, one cycle each. Each cycle looks up `T0[v & 0xFF]` and
  writes `Tk[i]`. The running value `v` stays in a register, so
  `Tk-1[i]` never needs to be read back. This phase takes 256 × 16 = 4096
  cycles.
- **Read port.** While generating, the generator owns T0's read port.

## Clocking: half a cycle each

The cycle is split between the two clock edges:

- **Falling edge.** `crc32_input_buffer` captures `data_in`, `start` and
  `eof`.
- **Second half-cycle.** The 16 asynchronous table reads and the XOR tree
  settle.
- **Next rising edge.** `crc32_slice16` loads the new remainder.

Seen from outside, a word offered just after a rising edge has its CRC on
`crc_32` right after the next rising edge: **1 clock (1.25 ns at 800 MHz)**.
A new word can be offered every clock. The path from the falling-edge buffer
through table read and XOR tree to the rising-edge register is the critical
path. It has half a clock period.

## Interface (`crc32_fpga_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `reset` | in | 1 | synchronous, active high; clears the CRC and regenerates the tables |
| `start` | in | 1 | first word of a frame |
| `eof` | in | 1 | last word of a frame (may coincide with `start`) |
| `data_in` | in | 128 | 16 data bytes, first byte in [7:0] |
| `crc_32` | out | 32 | CRC-32 of the frame so far; the FCS value after the last word |
| `tables_ready` | out | 1 | tables generated; words offered earlier are ignored |
| `tbl_we`, `tbl_sel`, `tbl_addr`, `tbl_wdata` | in | 1, 4, 8, 32 | host write of one table word, accepted only once `tables_ready` is high |

The first six ports are the core engine's interface. `tables_ready` and the
`tbl_*` port come from the table-loading arrangement.

Framing rules:

- A frame is the run of consecutive words from the one flagged `start` to the
  one flagged `eof`, one word per clock, with no gaps.
- The start word uses 0xFFFFFFFF as the previous remainder, so a new frame
  can follow the previous one's `eof` word directly.
- Outside a frame the register holds, and `crc_32` keeps showing the last
  frame's CRC.
- After reset `crc_32` reads 0 (the remainder is 0xFFFFFFFF).
- Two assertions in `crc32_slice16` stop a simulation that breaks these
  rules: a `start` inside a frame, or an `eof` outside one.

## Modules

| module | role |
|---|---|
| `crc32_pkg` | polynomial, initial value, types, `reflect32`, one generation step |
| `crc32_lut_ram` | one 256 × 32 table, posedge write, asynchronous read |
| `crc32_lut_bank` | the 16 tables, one shared write port, 16 read ports |
| `crc32_table_gen` | computes and writes all tables after reset |
| `crc32_input_buffer` | 128-bit falling-edge input register with the two flags |
| `crc32_slice16` | byte split, CRC fold-in, 16-way XOR, CRC register, framing |
| `crc32_fpga_top` | wires them together and arbitrates table access |

Every parameter defaults to the full design: 16 slices, 128-bit words and
256 × 32 tables (131072 memory bits).

## Where this design goes beyond, or departs from, its source description

- **Table loading.** The source computes the tables in software on a host PC
  and downloads them into on-chip RAMs. It notes that an on-chip processor
  could take the PC's place. Here dedicated logic computes them after reset.
  The download path survives as the `tbl_*` port.
- **Polynomial in the generation loop.** The source's generation loop shifts
  right while XORing 0x04C11DB7. That combination does not produce the
  Ethernet CRC, yet the source also states that the bytes 31..35 give
  0xCBF53A1C, which is the Ethernet value. The design follows the Ethernet
  value and uses the reflected polynomial in the right-shifting loop.
- **Table width.** Each table word is 32 bits.
- **Left unspecified by the source.** The source names the `start`, `end`
  and `reset` inputs without defining them. The following are all choices of
  this design:
  - the framing rules above;
  - the initial value and output complement;
  - the byte order within a word;
  - the synchronous reset.
- **Whole words only.** Frames must be a whole number of 16-byte words. There
  is no handling of a partial last word, so:
  - the 64-byte minimum frame (with FCS) can be checked;
  - a 1518-byte maximum frame (94.875 words) cannot;
  - FCS generation works only for frame bodies whose length is a multiple
    of 16.

  Supporting arbitrary lengths would need a byte count for the last word and
  a final partial-word step. That is the main thing to add for real Ethernet
  use.
- **Not modelled.** The FPGA's clocking resources and the 800 MHz oscillator
  are not modelled. The design's timing at 800 MHz is a property of the
  target device and is not verified here.

## Verification

Each module has a self-checking testbench in `tb/`. Every one compares
against `crc32_ref_pkg`, a bit-at-a-time model that shares no table or
recurrence with the RTL, and each prints a `TB_RESULT checks=… failures=…`
line.

| testbench | what it establishes |
|---|---|
| `tb_crc32_lut_ram` | every location written and read back; `we` honoured |
| `tb_crc32_lut_bank` | writes land in the right table; 16 independent reads per cycle |
| `tb_crc32_table_gen` | all 4096 entries equal the reference; each is written exactly once; generation takes exactly 6656 cycles; a second reset regenerates |
| `tb_crc32_input_buffer` | transfer happens at the falling edge, not the rising one; reset clears the flags |
| `tb_crc32_slice16` | random frames of 1–8 words, CRC checked after every word; idle hold; `enable`; reset mid-frame; receiver residue |
| `tb_crc32_fpga_top` | end to end at full size (see below) |
| `tb_crc32_line_rate` | 2000 words at 800 MHz in back-to-back frames: measures 102.40 Gbit/s and 1.250 ns latency; `crc_32` is stable until the rising edge |

`tb_crc32_fpga_top` runs the complete design at its default size: table
generation, then 18 kB of frames (1 to 94 words). It counts every mechanism
and fails if one never occurs:

- generation;
- words ignored before the tables are ready;
- host writes dropped during generation;
- single-word, multi-word and back-to-back frames;
- idle hold;
- a host table overwrite changing the CRC, and its restore;
- receiver residue on good frames;
- a detected single-bit error;
- reset in mid-frame.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_crc32_fpga_top rtl/crc32_pkg.sv tb/crc32_ref_pkg.sv \
    tb/tb_crc32_fpga_top.sv -o sim && ./obj_dir/sim
```

Replace the top module and file name for the other testbenches. Each one
finishes in well under a second.
