# LZW instruction decompressor for a 32-bit RISC processor

A program is stored compressed with LZW (Lempel-Ziv-Welch) to save program
memory. A small hardware decompressor sits between that memory (or the
instruction cache) and an unmodified 32-bit processor, and rebuilds the
original instruction words on the fly. Compression happens offline, once, in
software. Only decompression is hardware.

This repository holds synthesizable SystemVerilog for that decompression path:

```
 compressed codes       +--------+   +-------------------------------+   +---------+   32-bit words
 (8 bits each)  ------> | IN BUF |-->|        lzw_decompressor       |-->| OUT BUF |--> processor / cache
                        | 16 x 8 |   |  FSM, code RAM ctrl,          |   | 16 x 32 |
                        +--------+   |  code RAM 256x8, char RAM     |   +---------+
                                     |  256x1, stack RAM ctrl,       |
                                     |  stack RAM 256x1, bit-to-byte |
                                     +-------------------------------+
```

The block partition, the RAM and buffer sizes, and the six-state controller
follow the design in Hussain and Al-Eidane, *Code Density Optimization and
Implementation Using LZW Approach Based on 32-bit RISC Processor*. Their
description covers the blocks and the states but not the details between
them. The code format, the handshakes, the bit order and the corner cases
below are this implementation's own choices. They are marked as such.

## The code format: LZW over single bits

The decompressor treats the program as one long **bit string**. Its alphabet
has two letters, 0 and 1. This is why the char RAM, which holds the last
letter of each dictionary entry, is only one bit wide.

* Every code is 8 bits (`lzw_pkg::CODE_W`).
* Codes **0** and **1** are the roots. They stand for the strings "0" and "1".
* Code **2** is reserved and never sent. The controller treats every prefix
  value at or below 2 as the end of a chain (`ROOT_LIMIT = 8'h02`).
* Codes **3 to 255** are dictionary entries, created while decoding. Entry
  *n* is stored as the pair (prefix code, last bit): `code_ram[n]` and
  `char_ram[n]`. Its string is the prefix's string followed by the last bit.
* The first code of a stream adds no entry. Every later code adds one entry:
  (previous code, first bit of the current string). Entries are numbered from
  3 upward.
* After 253 entries the dictionary is full (`decode_ram_full`). From then on
  the dictionary stays frozen until the stream ends. There is no clear code.
* Each stream starts with an empty dictionary. A stream begins when
  `decode_ena` rises while the decoder is idle.
* A code may name the entry that is about to be created, that is, it may equal
  the next free code. This is the usual LZW special case. Its string is the
  previous string followed by that string's own first bit.

Any LZW compressor for a two-letter alphabet produces this format if it
follows the same rules: roots 0 and 1, first new code 3, growth stops at code
255, and one 8-bit code per string. For example, `tb/lzw_ref_pkg.sv` keeps two
child pointers per code, since a binary alphabet allows at most two
extensions.

**Bit order.** The first bit of a stream becomes bit 31 of the first output
word. Bits fill each byte from the most significant bit down, and bytes fill
each word from bits 31:24 down. An instruction word therefore reads in
natural order. If a stream's length is not a multiple of 32 bits, its last
word is padded with zeros.

**Compression ratio.** With one-bit letters, an 8-bit code only saves space
when it stands for more than 8 bits. So a small dictionary saves space only
on very repetitive data. Random data grows by about 19%: 262,144 bits become
38,865 codes. The synthetic instruction-like data in
`tb/tb_lzw_code_width.sv` grows by 17% at 8-bit codes and by 3% at
13-bit codes. Treat the compression ratios quoted for LZW code compression
with care for this format. Ratios measured on byte-oriented LZW do not carry
over.

## Decoding one code

The controller (`lzw_fsm`) goes through these states for every code:

| state | what happens | next |
|---|---|---|
| IDLE | waits for `decode_ena`; clears the dictionary counter on leaving | RD_DATA |
| RD_DATA | takes one code from IN BUF; waits while IN BUF is empty | SCAN_TABLE |
| SCAN_TABLE | code RAM and char RAM are read at the chain address | CHK_CODE |
| CHK_CODE | the bit read is pushed onto the stack; if the prefix read is above 2 it becomes the new chain address (c1) | SCAN_TABLE (c1), OUT_STRING if the dictionary is full (c2), otherwise ADD_TABLE (c3) |
| ADD_TABLE | writes the entry (previous code, first bit) at the next free code | OUT_STRING |
| OUT_STRING | sends the first bit, then pops the stack | RD_DATA while `decode_ena` is high (c4), else IDLE (c5) |

The walk along the prefix chain is the core of the design. It visits a
string's bits from **last to first**. Entry *n* gives the last bit and a
pointer to the prefix, which gives the bit before, and so on. The **stack
RAM** turns the order around. Each bit is pushed as it is found, and
OUT_STRING pops the bits back in reading order.

The walk stops when the prefix read is a root, 0 or 1. That root value is the
**first bit of the string**. The bit is kept in a register (`first_char`) and
is not pushed, so the walk never spends a step on the root. OUT_STRING sends
this bit first and then the stack contents. ADD_TABLE uses the same register
as the last bit of the entry it creates. If the code received is itself a root,
there is nothing to walk. The string is that single bit.

When a code equals the next free code, the entry it names does not exist
yet. During RD_DATA the controller pushes the previous string's first bit,
which is still held in `first_char`. This bit ends up at the bottom of the
stack, so it is sent last. The controller then walks the previous code. The
result is the previous string followed by its own first bit, as LZW requires.

**Timing.** The RAMs have a registered read port, so each step of the walk
takes two cycles (SCAN_TABLE, then CHK_CODE). Suppose a code's string is *L*
bits long and not a special case. The code then takes 1 cycle in RD_DATA,
2(*L*-1) cycles walking, 1 cycle in ADD_TABLE and *L*+1 cycles in
OUT_STRING. That is 3*L*+1 cycles. A root code (*L* = 1) still takes one
SCAN_TABLE/CHK_CODE pair, so it needs 6 cycles. Add up to one cycle per
completed output word and any stalls on the buffers. A full-size run measured 3.03 cycles per output bit.
At the 40 MHz at which power figures for this design were quoted, that is
about 13 Mbit/s, or 0.4 M instructions/s. Decoding is sequential and is not
pipelined.

**Stack depth.** A string named by an 8-bit code has at most 254 bits. At
most 253 of them go on the stack, because the first bit stays in the
register. The 256-entry stack is enough. An assertion in `stack_ram_ctrl`
guards against overflow anyway.

## Files

| file | block |
|---|---|
| `rtl/lzw_pkg.sv` | shared constants (code width, dictionary and buffer sizes, root limit) and the `state_t` enum |
| `rtl/lzw_decomp_top.sv` | top: IN BUF, decompressor, OUT BUF |
| `rtl/lzw_decompressor.sv` | the decompression engine (structural) |
| `rtl/lzw_fsm.sv` | the six-state controller |
| `rtl/code_ram_ctrl.sv` | reads codes, walks prefix chains, adds dictionary entries |
| `rtl/stack_ram_ctrl.sv` | stack pointer, push/pop, output of the bit string |
| `rtl/bit2byte.sv` | packs bits into bytes and bytes into 32-bit words |
| `rtl/lzw_ram.sv` | synchronous RAM, used for the code RAM (256x8), char RAM (256x1) and stack RAM (256x1) |
| `rtl/in_buf.sv`, `rtl/out_buf.sv` | IN BUF (16x8) and OUT BUF (16x32) FIFOs |

## Interface of the top (`lzw_decomp_top`)

* `clk`, `rst_n`: one clock, asynchronous active-low reset.
* Code input: `code_wr_en`, `code_wr_data[7:0]`, `code_full`, `code_empty`,
  `code_count`. This is a FIFO write port. Writes while `code_full` is high
  are dropped, and an assertion flags them.
* Word output: `word_rd_data[31:0]`, `word_empty`, `word_rd_en`,
  `word_count`. This is a show-ahead FIFO read port. The data is valid while
  `word_empty` is low, and `word_rd_en` removes the word.
* `decode_ena`: raise it for one compressed stream. Keep it high while codes
  of that stream remain to be written. Lower it once the last code has been
  written and IN BUF has become empty. The decoder then finishes the string in
  hand, writes out a partial last word, and returns to IDLE.
* `busy`: high until the decoder is idle and no bits remain in the
  bit-to-byte stage. `state` and `dict_full` are for observation.

Do not lower `decode_ena` while codes of the stream are still missing. If the
decoder is waiting in RD_DATA for a code that never comes, it stays there.

## Simulating

All testbenches check themselves and end with a line
`TB_RESULT checks=N failures=M`. With plain Verilator 5:

```
verilator --binary --timing --assert -Mdir obj_full rtl/lzw_pkg.sv tb/lzw_ref_pkg.sv \
    -y rtl -y tb tb/tb_lzw_full_size.sv --top-module tb_lzw_full_size
./obj_full/Vtb_lzw_full_size
```

Replace the testbench name to run another:

| testbench | what it covers |
|---|---|
| `tb_lzw_full_size` | 8192 random 32-bit words (262,144 bits) compressed, decoded through the top at its default sizes, compared word by word |
| `tb_lzw_decomp_top` | several streams with random IN BUF gaps and OUT BUF stalls. It counts the IN BUF empty stall, chain step, dictionary add, full dictionary, code-equals-next-entry case, OUT BUF full stall, both exits of OUT_STRING and the partial-word flush, and fails if any of them never happened |
| `tb_lzw_code_width` | the same program-like data decoded with 8- to 14-bit codes (dictionaries of 256 to 16,384 codes); prints the compressed size per width |
| `tb_lzw_decompressor` | the engine alone, with the dictionary cleared between streams |
| `tb_lzw_fsm` | every state transition under random inputs |
| `tb_code_ram_ctrl` | chain walk and dictionary updates against the reference compressor, with two-cycle steps and the full flag after 253 entries |
| `tb_stack_ram_ctrl` | reverse order, first bit, one bit per cycle, strings up to 255 pushed bits |
| `tb_bit2byte` | packing, bit order, zero padding, OUT BUF back-pressure |
| `tb_lzw_ram`, `tb_in_buf`, `tb_out_buf` | the memories and FIFOs |

`tb/lzw_ref_pkg.sv` contains the reference compressor. It also holds the bit
packing and the generators for random data and program-like data.
`tb/lzw_width_run.sv` is a helper for `tb_lzw_code_width`.

## Changing the design

* **Code width and dictionary size.** `lzw_decompressor` takes `CW` (code
  width), `DEPTH` (dictionary codes, normally `2**CW`) and `SDEPTH` (stack
  entries). `SDEPTH` must be at least `DEPTH - 2`. The top uses the package
  constants, so to widen the whole path, change `CODE_W`, `DICT_DEPTH` and
  `STACK_DEPTH` in `lzw_pkg`. The compressor must then use the same width.
  `tb_lzw_code_width` shows that widths up to 14 bits work.
* **Buffer depths**: `IN_DEPTH` and `OUT_DEPTH` in `lzw_pkg`.
* **Output word width**: `OUT_W` and `bit2byte`'s `WORD_W`. It must be a
  multiple of 8.

## How far to trust it, and where it departs from the source

The RTL compiles cleanly in Verilator lint and in the slang front end, and it
passes all the testbenches above. Its behaviour is checked against an
independent software compressor: each stream is compressed in software and
the decoded output is compared with the original. The hardware has not been
checked against code streams from the original authors' tools, because none
are available. The open questions are therefore about format, not about
logic. A compressor written to the rules in "The code format" will work with
it.

Points where the source is unclear or inconsistent, and what was chosen:

* **Code width.** The block diagram gives an 8-bit code path: a 16x8 input
  buffer and a 256x8 code RAM. The paper's compression study speaks of a
  "9-bit code, 256-item" dictionary. That study appears to use a byte-oriented
  LZW. The hardware here follows the block diagram.
* **The root threshold 8'h02** comes from the source. What code 2 means is
  not stated; here it is reserved.
* **CHK_CODE to ADD_TABLE.** The state diagram labels this arc "~c3". The
  prose and the other arcs make it c3: the prefix is at or below 2 and the
  dictionary is not full. That reading is implemented.
* **RD_DATA** waits for a code. The state diagram leaves the arc to
  SCAN_TABLE without a condition.
* **RAMs.** The area table lists one 256x8 RAM and one 256x1 RAM. The block
  diagram has a 256x1 char RAM and a 256x1 stack RAM. Both are built.
* **Stack RAM control inputs.** The block diagram draws the code RAM and char
  RAM outputs straight into the stack RAM control. Here the char bit reaches
  it through the code RAM control's push port, and the root bit through
  `first_char`. The data flow is the same.
* **Buffers** are only named in the source. They are built here as FIFOs.
* **Not specified in the source, and chosen here:** the first bit held in a
  register rather than on the stack, the code-equals-next-entry case, the
  dictionary freezing when full, the bit and byte order, the zero padding,
  one-cycle RAM reads, and the reset style.

Not included:

* Compressor hardware. Compression is offline. The reference compressor is
  software in `tb/`.
* The processor and the memory that holds the compressed program.
* Published area (about 7,400 gates) and power (23.7 mW at 40 MHz) figures.
  These came from the authors' own synthesis and are not reproduced here.
