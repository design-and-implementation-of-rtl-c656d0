# C-Pack: a cache line compressor, decompressor and pair-matching locator

A compressed last-level cache holds more data in the same SRAM, but only if
compression and decompression take a few cycles per line and little area.
C-Pack is a lossless code built for that case. It works on one 64-byte line
(sixteen 32-bit words) at a time. It codes each word either as one of two
static patterns (zero word, or a word with only its low byte set) or against
a small dictionary of the words seen earlier in the same line. The hardware
handles **two words per clock** in both directions. The result is placed in
the cache by **pair matching**: a physical line holds either one line or two
compressed lines whose sizes add up to less than 64 bytes.

This repository holds synthesizable SystemVerilog for the three units:

| unit | module | what it does | delay |
|---|---|---|---|
| compressor | `cpack_compressor` | 8 beats of 64 bits in, 128-bit blocks out | 13 cycles worst case; a new line every 8 cycles |
| decompressor | `cpack_decompressor` | 128-bit blocks in, 4 blocks of 128 bits out | 8 cycles; a new line every 8 cycles |
| line locator | `pair_locator` | picks where in a set a compressed line goes | 2 cycles |

`cpack_top` puts the three side by side, with the compressor's final length
driving the locator. The cache arrays themselves (tags, data, controller)
are not part of this design. Their signals are ports of the top.

## The code

Every word becomes one variable-length field. The field starts with a 2- or
4-bit code. A 4-bit dictionary index follows for dictionary matches, and then
the bytes that are not implied:

| code | pattern | field | bits |
|---|---|---|---|
| `00` | zzzz | `00` | 2 |
| `01` | xxxx | `01` + 4 bytes | 34 |
| `10` | mmmm | `10` + index | 6 |
| `1100` | mmxx | `1100` + index + 2 low bytes | 24 |
| `1101` | zzzx | `1101` + low byte | 12 |
| `1110` | mmmx | `1110` + index + low byte | 16 |

`z` is a zero byte, `m` a byte equal to the dictionary entry's, `x` a byte sent
as it is. Patterns are written most significant byte first, so mmxx matches
the upper half of the word. Code `1111` is unused.

Words are coded in this order of preference:
1. zzzz;
2. zzzx;
3. otherwise, the dictionary entry matching the most leading bytes (4, 3 or
   2, lowest index on a tie);
4. otherwise, the literal word.

Every word that is neither zzzz nor zzzx is then pushed into the dictionary,
including words that matched it.

The dictionary has 16 entries of 32 bits (64 bytes) and is first-in
first-out. It is emptied to all-zero entries at every line boundary, at both
ends. An index can therefore point at an entry that was never written, and
such a field still decodes correctly.

A line's fields are concatenated in word order and sent most significant bit
first, in 128-bit blocks. The last block is padded with zeros. A line's
compressed length ranges from 32 bits (all zero) to 544 bits (all literal).
If the length reaches 512 bits, the line is stored uncompressed instead.

`cpack_pkg` holds the code table, the field packing function, and the types
shared by the units.

## Two words per clock without losing dictionary matches

This is the subtle part of both units. Take a pair of words that the line has
not seen before and that are alike, such as `0x1234_5601` and `0x1234_5602`.
A sequential coder would push the first word and then code the second as
mmmx against it. To keep that match while handling both words in one cycle:

- The first word is compared with the dictionary as it stands.
- The second word is compared with a candidate list that depends on the first
  word. If the first word will be pushed, entry 0 of the list is the first
  word and entries 1 to 15 are dictionary entries 0 to 14. The oldest entry,
  which the push is about to drop, is left out. Otherwise the list is the
  dictionary unchanged.
- Both pushes happen at the same clock edge. After a double push, entry 0
  holds the second word and entry 1 the first.

The decompressor mirrors this. Decoder 2 reads a dictionary view in which the
first word just decoded is entry 0 whenever that word is pushed. The two
decoders are therefore chained within a cycle.

Because of this, the hardware output is bit-for-bit the same as a plain
one-word-at-a-time coder. The testbenches check exactly that.

## Compressor

`cpack_compressor` has three pipeline stages:

1. **Matching.** Both words of a beat are checked for zzzz and zzzx. Each is
   compared byte-wise with all 16 candidates, giving a 2-bit match class per
   entry. The push decision goes straight to the dictionary, which is
   therefore updated in this stage.
2. **Length generation.** Priority encoders take each word's best entry. The
   word length generators, the total length calculator and the length
   accumulator give each word's length, the pair's length (4 to 68 bits) and
   the running line total.
3. **Packing and shifting.** Combinational logic behind the stage-2 register:
   - The code concatenators build both fields.
   - A barrel shifter puts the second field right behind the first.
   - A second shifter ORs the pair into a 196-bit packing register, behind the
     bits already waiting there.
   - When 128 or more bits are waiting, the top 128 leave as a block
     (incremental transmission: blocks leave before the whole line is coded).
   - After the last pair, the rest leaves zero-padded. This happens in the
     same cycle, or in the next one if that cycle already sent a block.

**Fallback.** The line is also written into a 512-bit backup buffer as it
arrives (one of two, see below). Seven pairs code to at most 476 bits, so
only the last pair can take the total to 512. When it does, the compressor
drops its stream and sends the backup buffer as four blocks with
`out_comp = 0`. Up to three compressed
blocks of that line may already have gone out. The raw copy starts with a new
`out_first`, and a receiver must restart the line there.

**Interface and timing.**
- Input: `in_valid`/`in_ready`, with `in_data = {word 2k+1, word 2k}`.
- Output: `out_valid`, `out_data`, `out_comp`, `out_first`, `out_last`, and
  `out_len` (valid with `out_last`: the compressed bits, or 512 for a raw
  line). The output has no back-pressure.
- Lines overlap. The next line's first beat may follow the previous line's
  last beat in the next cycle, so the input takes 64 bits every cycle. The
  price is a second backup buffer: the two are used in turn, because a line
  may still fall back after the next line has started arriving.
- `in_ready` drops only for the 3 cycles in which raw blocks 1 to 3 of a
  line are sent. Stages 1 and 2 hold during that time.
- A padded remainder may leave in the same cycle as the next line's first
  pair enters the packing register.
- Counting the first beat as cycle 0, with no gaps between beats:
  - the last block of a raw line leaves in cycle 12 (13 cycles in all);
  - a compressed line finishes in cycle 9, or 10 when a padded remainder
    follows a full block.

## Decompressor

`cpack_decompressor` collects blocks in a 196-bit input buffer, left
aligned, with a count of the waiting bits. Each cycle:

- **Decode.** Decoder 1 reads the field at the top of the buffer. Decoder 2
  reads the field right behind it, at an offset equal to the first field's
  length. This needs at least 68 waiting bits (two longest fields), or the
  whole line already loaded. The buffer then shifts left by the pair's length.
- **Refill.** If fewer than 68 bits would remain after the decode, the next
  block is ORed in right behind them in the same cycle. A field that
  straddles two blocks is thus always complete before it is decoded. The
  buffer never holds more than 67 + 128 bits.
- **Output.** The first decoded pair of each output block waits in a 64-bit
  register. The second pair completes the block, which leaves at once.
  Output block j holds words 4j to 4j+3, with word 4j in bits [31:0].

**Interface and timing.**
- The compression flag (`in_comp`) and the compressed length in bits
  (`in_len`, 9 bits) are read with the first block of a line.
- A line with `in_comp = 0` passes straight through as four blocks.
- Decoding starts the cycle after the first block. If blocks keep coming, it
  never waits, and the fourth output block leaves 8 cycles after the first
  input block is accepted.
- Lines follow each other without a gap. The first block of a compressed
  line is taken in the cycle the previous line's last pair is decoded. So a
  line starts every 8 cycles, and the output carries 64 bits every cycle.
- In that last decode cycle `in_ready` follows `in_comp`. A raw line waits
  one cycle, because its first block would otherwise leave in the same cycle
  as the previous line's last block. A sender must therefore present
  `in_comp` before it looks at `in_ready`.
- `code_err` flags the unused code.

## Pair-matching line locator

`pair_locator` reads, for each of the 8 ways of the target set, which of its
two slots hold a line and the size of each line in bits. It then places a new
line of `req_size` bits in three steps:

1. **No eviction.** A way with one line qualifies if the two sizes add up to
   less than 512. An empty way always qualifies. Among these, it takes the
   way with the least space left over, so a tight partner wins over an
   empty way.
2. **One eviction.** Otherwise it tries every single eviction that makes room
   and takes the one that leaves the least space.
3. **Two evictions.** Otherwise it evicts both lines of the lowest way. This
   only happens when every way holds two lines and no single eviction makes
   room, for example for an uncompressed line.

The decision comes out two cycles after the request:
- way (`rsp_way`);
- the slot the new line takes (`rsp_slot`);
- the slots evicted (`rsp_evict`);
- the kind of placement (`rsp_action`).

Stage 1 works out each way's own best option and its leftover space. Stage 2
picks the best way (lowest way on a tie). Requests may come every cycle.

The number of ways is the parameter `WAYS` (default 8, also tested at 4).
The line size is `LINE_SIZE` (512 bits). The number of sets does not matter
here: the cache looks up the set and hands its state to the locator.

## What follows the source description and what does not

Taken from the published description of C-Pack:
- the code table;
- two words per cycle, with the second word matched against the first;
- the 64-byte FIFO dictionary;
- the three compressor stages and their units;
- 128-bit output blocks with zero padding;
- the backup-buffer fallback;
- the 68-bit refill rule, the 196-bit buffer, the 9-bit length input and the
  compression-flag bypass of the decompressor;
- the pair-matching rule and the best-fit placement;
- the worst-case delays of 13, 8 and 2 cycles, which this RTL meets;
- a throughput of 64 bits per cycle for both compression and decompression,
  which is why lines overlap in both units.

Choices made here:
- **Compressor input.** The compressor input is 64 bits (two words) per
  beat. The description also mentions a 128-bit bus as the input width, but
  its compressor block diagram and its "two words per cycle" both give 64 bits.
- **Compressor packing.** The description packs in two levels: a 136-bit
  register that hands 64 bits at a time to the halves of a 128-bit output
  register. It uses store, shift and fill controls, with a latch at the
  output. This design uses one 196-bit packing register instead, which gives
  the same blocks. The reason: a pair adds up to 68 bits per cycle, while a
  64-bit hand-over removes only 64. A run of long pairs would then outgrow
  the 136-bit register. Pairs of 58, 68, 68, 68 and 68 bits already need
  138 bits. The single register sends 128 bits at once, so it never holds
  more than 127 + 68 bits.
- **Decompressor arithmetic.** The description builds the decompressor's
  length arithmetic from a carry-save adder and carry-lookahead adders. Here
  it is plain counters.
- **Not specified by the source:**
  - the byte order of the patterns;
  - lowest index on a dictionary tie;
  - the field bit order;
  - the dictionary reset to zero at each line;
  - the fallback taken at 512 rather than above 512 bits, so that a
    compressed length fits 9 bits;
  - the restart of a line after the fallback;
  - the second backup buffer that lets lines overlap, and the stall behind a
    raw line;
  - the handshakes;
  - the unused code;
  - the locator's set-state inputs, tie rules and two-eviction choice.
- **Cache arrays.** The L2 tag and data arrays and their controller are
  outside this design.

## How far it has been checked

Each unit has a self-checking testbench in `tb/`. Compressed streams are
compared with a reference coder (`tb/cpack_ref_pkg.sv`) written
independently of the RTL, one word at a time.

- `tb_cpack_fifo_dict`: 2000 random clear/push cycles against a queue model.
- `tb_cpack_compressor`: 300 lines sent back to back, including all-zero and
  all-literal lines, and some with idle cycles between beats. It checks:
  - every block, flag and length;
  - the cycle of each line's last block;
  - that `in_ready` is low for exactly 3 cycles per raw line and never
    otherwise.
- `tb_cpack_decompressor`: 300 reference-coded lines sent back to back,
  some with gaps, some raw. It checks:
  - every output block;
  - the 8-cycle delay;
  - that a compressed line following a gap-free one is taken exactly 8 cycles
    after it.
- `tb_pair_locator`: 3000 random set states. Each decision is compared with
  an exhaustive search over every legal placement, and must arrive exactly
  two cycles after its request. An 8-way and a 4-way locator are checked side
  by side.
- `tb_cpack_top`: 400 lines at the default parameters. Each line is
  compressed, placed by the locator in a model of a set, and read back
  through the decompressor. The test counts each mechanism and fails if one
  never occurs:
  - all six patterns;
  - second-word matches against the first word;
  - raw fallbacks, and the compressor stalls behind them;
  - overlapping lines in the compressor;
  - padded trailing blocks;
  - decompressor waits;
  - raw pass-through;
  - all four placement kinds.

- `tb_cpack_workload`: a compression-ratio run on synthetic data. Its words
  follow the pattern mix reported for real L2 cache contents:
  - 39.7 % zzzz;
  - 32.1 % xxxx;
  - 7.6 % mmmm;
  - 7.3 % zzzx;
  - 7.2 % mmmx;
  - 6.1 % mmxx.

  The lines go through the top, then into a pair-matching cache of 8-way
  sets, at 64 KB and at 2 MB. Every block and every placement is checked.
  The run then reports:

  | cache | raw ratio | effective ratio | two-line evictions |
  |---|---|---|---|
  | 64 KB | 50.5 % | 57.5 % | 0.1 % |
  | 2 MB | 50.3 % | 56.9 % | 0.1 % |

  The raw ratio is compressed size over original size. The effective ratio
  counts a line alone in a physical line as 100 % and a line sharing one as
  50 %, averaged over the resident lines. On real cache traces, C-Pack is
  reported at 52.1 % raw and 58.5 % effective. Only pattern frequencies are
  matched here, not the data, so these numbers show plausibility, not
  agreement.

Not checked:
- the compression ratios on real cache, memory, disk or swap data;
- timing closure and area at any process node.

## Simulating

Plain Verilator 5 is enough. For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/cpack_pkg.sv tb/cpack_ref_pkg.sv rtl/cpack_fifo_dict.sv \
  rtl/cpack_word_decoder.sv rtl/cpack_compressor.sv rtl/cpack_decompressor.sv \
  rtl/pair_locator.sv rtl/cpack_top.sv tb/tb_cpack_top.sv --top-module tb_cpack_top
./obj_dir/Vtb_cpack_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`. The other
testbenches build with the same file list. Swap the last file and the top
module for one of these:
- `tb_cpack_fifo_dict`
- `tb_cpack_compressor`
- `tb_cpack_decompressor`
- `tb_pair_locator`
- `tb_cpack_workload`

Each runs in a few seconds. The workload run covers about 85,000 lines.

## Files

- `rtl/cpack_pkg.sv`: widths, code table, field packing, locator types.
- `rtl/cpack_fifo_dict.sv`: 16 x 32 FIFO dictionary, up to two pushes per
  cycle.
- `rtl/cpack_compressor.sv`: three-stage compressor with backup buffer.
- `rtl/cpack_word_decoder.sv`: one field decoder with its length generator.
- `rtl/cpack_decompressor.sv`: two-word-per-cycle decompressor.
- `rtl/pair_locator.sv`: pair-matching placement, two cycles.
- `rtl/cpack_top.sv`: the three units together.
- `tb/cpack_ref_pkg.sv`: the reference coder, line generator and
  exhaustive placement search.
- `tb/tb_*.sv`: one testbench per unit, the end-to-end test and the
  compression-ratio workload.
