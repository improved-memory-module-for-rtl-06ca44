# Improved Memory Module: a NAND flash mass-memory core

Commercial NAND flash is dense and cheap, but it is awkward to use and, in
space, fragile. A page can be programmed only once after its block has been
erased. Pages inside a block must be programmed in ascending order. Erasing
takes a long time and wears the block out, and some blocks are bad from the
factory. Radiation adds random bit flips on top of this. The Improved Memory
Module (IMM) core hides all of it behind a simple page interface: the host
writes and reads 2 KB pages at *logical* page addresses. The core maps them
onto physical flash pages, keeps wear even, reclaims space, and protects every
stored bit with an error-correcting code.

This SystemVerilog follows the published architecture of the IMM IP core:

- a flash address translation layer (allocator, bad-block manager, wear
  leveller, garbage collector);
- four codecs: BCH for the data page, SEC-DED for the logical address,
  a repetition code for a block-type marker, and SEC-DED for RAM words;
- a fault injector on the flash data path, and a housekeeping monitor.

The internal details (widths, handshakes, table layouts, thresholds, decoder
organisation) are this implementation's own choices. They are listed under
"Departures and open points" below.

## Block structure

```
            host commands, page buffers                 housekeeping readings
                       |                                         |
                 +-----v------+   page operations         +------v-----+
                 |   nfatl    |-------------------+       | hk_monitor |--> power_off_req
                 | BMT, SMT,  |                   |       +------------+
                 | status,    |            +------v-------------------------------+
                 | erase cnt  |<-- done ---|              nand_dma                |
                 +------------+            |  input buf --> bch_encoder --------> |--> flash (program)
                                           |  lsa_codec, majority_codec (spare)   |
                                           |  output buf <-- bch_decoder <--      |
                                           |          fault_injector <----------- |<-- flash (read)
                                           +--------------------------------------+
```

`imm_top` connects `nfatl`, `nand_dma` and `hk_monitor`. `nand_dma` contains
the BCH encoder and decoder, the LSA and marker codecs, the fault injector and
the two SEC-DED protected page buffers.

## What a flash page holds

Each physical page carries 2082 bytes. The 2048 data bytes and the 29 BCH
bytes form one BCH code word; the other five bytes are in the spare area.

| bytes       | content                                                        |
|-------------|----------------------------------------------------------------|
| 0 – 2047    | host data                                                      |
| 2048 – 2076 | BCH parity: 225 bits, MSB first, padded with 7 zero bits        |
| 2077 – 2080 | logical sector address: 21 bits + 7 SEC-DED check bits, LSB byte first |
| 2081        | block-type marker: one bit repeated 7 times (bit 7 = 0)         |

Every page stores its own logical address because the tables cannot be
rewritten in place on flash. The marker decodes to 1 for ordinary pages.
Erased flash (0xFF) also decodes to 1. An all-zero marker is reserved for
blocks that hold a copy of the RAM tables.

## The translation layer (`nfatl`)

This is the most involved part. It is one state machine working on a set of
tables. In the default configuration, all of these are register arrays:

| table                   | per      | content                                       |
|-------------------------|----------|-----------------------------------------------|
| BMT (block mapping)     | logical block  | physical data block + valid bit         |
| block status            | physical block | free / data / log / dirty / bad / mem   |
| erase count             | physical block | 17-bit count (endurance is 100,000)     |
| program pointer         | physical block | next page that may be programmed        |
| page-valid bitmap       | physical block | which pages were programmed since erase |
| owner                   | physical block | logical block held by a data block      |
| SMT (sector mapping)    | log block × page offset | newest log page for that offset |

### Hybrid mapping with log blocks

A logical page number splits into a logical block (upper bits) and a page
offset (lower 7 bits). The BMT gives the data block; the page lives at the
same offset in that block.

A write is handled as follows:

1. **Unmapped logical block.** The layer allocates a free block, makes it the
   data block, and retries.
2. **Offset at or beyond the data block's program pointer.** The page can go
   straight to the data block, unless the log block already holds a newer copy
   of that offset. Skipped pages stay erased, and the page-valid bitmap
   records the hole.
3. **Otherwise (an overwrite, or a write behind the pointer).** The page goes
   to the next free page of the log block owned by this logical block. The
   SMT records which log page now holds that offset. If the logical block has
   no log block, a free one is allocated.
4. **Merges.** A merge happens in two cases. Either the owned log block is
   full, or a new log block is needed and all `NLOG` slots are taken (the
   victim slot is chosen round robin). The merge allocates a fresh block. For
   each offset in order, it copies the newest valid page into that block:
   from the log block if the SMT has the offset, otherwise from the data
   block if its bitmap bit is set. The fresh block becomes the data block,
   the old data and log blocks become *dirty*, and the write is retried.

A read looks in the SMT first, then in the data block's bitmap. A page that
was never written returns `resp_ok = 0`.

### Allocation and wear levelling

Allocation scans the whole status table (`NBLK` cycles) and takes the free
block with the lowest erase count.

Static wear levelling runs every `WL_PERIOD` successful erases, when the layer
is idle. It scans for the least-erased *data* block and the most-erased
*free* block. If their counts differ by more than `WL_THRESH`, the cold
logical block is merged into the worn free block. This frees a young block
for reuse.

### Garbage collection

- **On demand:** before every allocation, while free blocks ≤ `GC_THRESH`
  and a dirty block exists, dirty blocks are erased.
- **In the background:** when no command is waiting and `bg_gc_en` is set,
  dirty blocks are erased one at a time.

A successful erase makes the block free and increments its erase count.

### Bad blocks

After reset, the layer reads every block's factory bad-block mark
(`NOP_CHKBAD`) and fills the status table. This start-up scan takes one flash
operation per block. A block whose erase fails is marked bad and never used
again.

## Error-correcting codes

**BCH page code.** The code works over GF(2^15) with field polynomial
x^15 + x + 1 and corrects t = 15 errors. The generator polynomial g(x) is the
least common multiple of the minimal polynomials of α^1 … α^30. It has
degree 225 and is stored as the constant `BCH_G` in `imm_pkg`. The code is a
shortened code: 16,384 data bits + 225 parity bits = 16,609 bits (the full
length is 32,767). The code rate is 0.986.

- `bch_encoder` divides by g(x) in a 225-bit register. It unrolls eight
  bit-serial steps per clock, so it takes one byte per cycle.
- `bch_decoder` works in three phases:
  1. Odd syndromes S1 … S29 are accumulated byte by byte while the page is
     stored.
  2. The even syndromes are obtained by squaring. Then the simplified
     inversion-free Berlekamp–Massey algorithm runs for binary codes, one
     iteration per clock (15 clocks).
  3. A Chien search tests the eight bit positions of one byte per clock, and
     each corrected byte is output as soon as it is tested. The 29 parity
     bytes are also searched, to count roots. If the count differs from the
     degree of the locator polynomial, the word is flagged uncorrectable.

  The first corrected byte comes 17 cycles after the last input byte.

**LSA code.** The logical sector address is protected by a 21 + 7 bit Hsiao
SEC-DED code (`lsa_codec`, built on `secded_codec`). The code corrects one
bit error and detects two.

**Marker code.** `majority_codec` repeats the marker bit 7 times and decodes
it by majority vote. It corrects up to 3 flipped bits.

**RAM words.** `secded_codec` is a generic Hsiao SEC-DED code; the default
word is 8 data + 5 check bits. It protects both page buffers in `nand_dma`.
Words are encoded when written and corrected when read.

## Test utilities

**`fault_injector`.** It sits on the flash read path and flips one bit per
hit byte. The bit to flip is chosen by a 32-bit LFSR. It has three modes:

- `FI_COUNT`: exactly `err_num` errors, one every `err_rate` bytes from page
  start;
- `FI_RATE`: one error every `err_rate` bytes;
- `FI_RANDOM`: a byte is hit with probability `err_thresh`/65536.

**`hk_monitor`.** It compares each 14-bit current and temperature reading
with its threshold. After `PERSIST` consecutive violating samples it raises a
sticky `power_off_req`.

## Interfaces and timing

**Host** (`imm_top`):

- **Write:** wait for `cmd_ready`. Fill the input buffer through
  `wbuf_en/addr/data`, one byte per cycle. Then issue `cmd_valid` with
  `cmd_write = 1` and the logical page number.
- **Read:** issue a command with `cmd_write = 0`. When `resp_valid` pulses,
  read the page through `rbuf_addr → rbuf_data`, which is combinational.
- **Response:** the `resp_valid` pulse carries `resp_ok` and, for reads, the
  number of corrected bits (`resp_bit_errors`), `resp_uncorrectable`,
  `resp_lsa_error` (address unreadable or not the one expected),
  `resp_lsa_corrected` and `resp_table_copy`.

**Flash page interface:**

- `nf_req` is held with `nf_op` and `nf_addr` = {block, page} until
  `nf_done` pulses. `nf_fail` comes with `nf_done`: it reports a failed erase
  or a bad-block mark.
- **Program:** the core drives the 2082 bytes on `nf_wvalid/nf_wdata` on
  consecutive cycles, starting in the first cycle of `nf_req`.
- **Read:** the flash returns 2082 bytes on `nf_rvalid/nf_rdata` at any pace,
  then `nf_done`.
- Only one operation is outstanding at a time.

The pin-level flash protocol (command and address latches, strobes) belongs
to a flash interface outside this core.

**Rough cycle counts:**

| operation                     | cycles                                          |
|-------------------------------|-------------------------------------------------|
| page program transfer         | 2082                                            |
| page read                     | 2077 + 17 + 2048 + 29, plus flash time          |
| block allocation              | 4096 (status table scan)                        |
| merge                         | one read plus one program per valid page (up to 128 of each) |

## Parameters (`imm_top`)

| parameter   | default | meaning                                              |
|-------------|---------|------------------------------------------------------|
| `PAGE_B`    | 2048    | data bytes per page (BCH information length)         |
| `NBLK`      | 4096    | physical blocks                                      |
| `NPG`       | 128     | pages per block                                      |
| `NLOG`      | 4       | log blocks                                           |
| `LBLKS`     | 3840    | logical blocks offered to the host (15/16 of `NBLK`) |
| `GC_THRESH` | 8       | on-demand GC while free blocks ≤ this                |
| `WL_PERIOD` | 64      | erases between static wear-levelling checks          |
| `WL_THRESH` | 1000    | erase-count spread that triggers a move              |

The geometry, the log block count and the code parameters follow the
published core. `LBLKS`, the thresholds and the period are this design's
choices. With the defaults the core addresses 1 GiB of flash. A 64 Gbit
device needs a larger `NBLK`.

## Departures and open points

- **Table storage.** The tables are on-chip arrays, about 742 kbit at the
  default size, most of it the page-valid bitmap. The published core keeps
  its tables in an external 1M×8 SRAM; an SRAM controller is not included.
- **Power off / power on are not implemented.** These would save the tables
  into a reserved flash block (marked by the all-zero marker) and reload the
  newest copy. Here the tables are rebuilt empty at every reset, after the
  bad-block scan.
- **Decoder organisation.** The published decoder uses 15 Galois multipliers
  and has a latency of code size + 71 cycles. This decoder uses more
  multipliers (one Berlekamp–Massey step per clock, 8 Chien points per
  clock) and has a latency of code size + 17 cycles.
- **SMT layout.** The SMT is indexed by page offset, so reads need no log
  block scan.
- **Merges.** Every merge is a full copy; switch merges are not specialised.
  Copies go through the decoder and encoder, so bit errors are corrected
  before rewriting. The flash's internal copy-back is not used.
- **Program failures** are not handled. Only erase failures grow the bad
  block table.
- **Outside the core.** SpaceWire/RMAP, the RS232 test link, the APB bus and
  the I2C master of the current/temperature sensor are not part of this RTL.
  The registers they would reach are plain ports of `imm_top`. The latch-up
  emulator is an analogue board circuit.
- **Page size.** Only the 2 KB page configuration is covered. The 4 KB
  variant is mentioned as an option and would need a longer BCH code word.

## Simulation

Each testbench in `tb/` checks its results itself and ends with a line
`TB_RESULT checks=N failures=M`. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl --top-module tb_imm_top \
  rtl/imm_pkg.sv tb/tb_imm_top.sv -o sim
./obj_dir/sim
```

| testbench           | what it shows                                              |
|---------------------|------------------------------------------------------------|
| `tb_bch_encoder`    | full-size pages: parity equals long division by g(x); α^1…α^30 are roots; 2077 cycles per page |
| `tb_bch_decoder`    | 0–15 random errors in data and parity corrected and counted; 17 and 20 flagged; latency and rate |
| `tb_secded_codec`, `tb_lsa_codec` | every single error corrected, double errors flagged |
| `tb_majority_codec` | all 256 bytes against a vote counted in the testbench       |
| `tb_fault_injector` | positions and counts in each mode; random-mode rate         |
| `tb_hk_monitor`     | persistence, reset of a run, clear                           |
| `tb_nfatl`          | small flash (32×8 pages) with an operation-level flash model: flash rules, read-back of the newest data, merges, on-demand and background GC, wear-levelling moves, factory and grown bad blocks |
| `tb_nand_dma`       | stored page layout and parity, read with injected errors, corrected copy, LSA mismatch, erase and bad-block query, program transfer time |
| `tb_imm_top`        | end to end on a small flash with 512-byte pages: random writes and overwrites, reads with injected errors, spare-area errors, a flipped buffer bit, power-off request; each mechanism must occur |
| `tb_imm_full`       | the core at its default size: start-up scan of 4096 blocks, writes, an overwrite into a log block, reads with up to 15 errors |

`tb/nand_page_model.sv` is a behavioural flash for the testbenches. It checks
program-once, the in-order programming rule and bad-block use, and it can
make one chosen erase fail.

The simulator runs with two-state values. Every register that is read is
reset, and the large tables are filled by the start-up scan.
