# Bitmask code decompression unit

Embedded programs are stored compressed and expanded on the fly between the instruction cache
and the processor. The compression is dictionary-based with bitmasks: a 32-bit instruction that
appears often is replaced by a short index into a dictionary, and an instruction that differs
from a dictionary entry in one or two half-bytes is replaced by the index plus one or two 4-bit
XOR masks. Everything else stays uncompressed. The decoder only has to read a few fields, look
the entry up, and XOR it with a mask. So it can deliver an instruction per cycle, and with more
than one decode lane, several.

This RTL implements the decompression hardware of the bitmask technique in the article "An
Efficient Code Compression Technique for Embedded Systems", in the article's chosen codeword
format ("Encoding 2": up to two 4-bit masks). The compressor runs offline in software and is
not part of the RTL. The testbenches carry a small reference compressor
(`tb/bm_tb_pkg.sv`).

## The compressed stream

The compressed program is one bit stream, read most significant bit first, word by word. It is
made of codewords that follow each other without gaps (`IW` = index width = log2 of the
dictionary size, 11 by default):

| codeword          | bits                                                      | length   |
|-------------------|-----------------------------------------------------------|----------|
| uncompressed      | `1` · instruction[31:0]                                   | 33       |
| dictionary only   | `0` · `00` · index                                        | 3 + IW   |
| one mask          | `0` · `01` · loc(3) · pattern(4) · index                  | 10 + IW  |
| two masks         | `0` · `10` · loc(3) · pattern(4) · loc(3) · pattern(4) · index | 17 + IW |
| alignment marker  | `0` · `11` · zeros up to the next byte boundary           | 3 to 10  |

The instruction is `dictionary[index] XOR mask`. The 32-bit mask has each 4-bit pattern placed
on the half-byte its location names. Location 0 is bits 31:28 and location 7 is bits 3:0.

The field order and widths come from the article. These details are this design's own:

* decision bit 1 = uncompressed;
* the count values 0/1/2;
* numbering the locations from the most significant half-byte;
* the alignment marker.

The marker exists because of branches. Every branch target must start on a byte boundary of the
compressed stream, so the compressor pads the code in front of each target. A decoder that runs
sequentially into a target must step over that padding, so the padding begins with the
otherwise unused count value `11`. It runs up to the first byte boundary at least 3 bits
further on. The length is therefore fixed by the stream position modulo 8, and the decoder
tracks that position. Padding costs 3 to 10 bits per unaligned target instead of 0 to 7. A
target that is already aligned costs nothing.

With a 2048-entry dictionary the lengths are 14, 21 and 28 bits, or 33 uncompressed.

## How the decoder works

```
 cache ──► bm_decomp_logic ──index──► bm_dict_sram ──entry──┐
 (32 b)    prev_comp register                               ▼
           LANES field decoders ──mask fields──► bm_mask_gen ──► bm_output_buffer ──► processor
                                 ──uncompressed word─────────►   prev_decomp, XOR
```

**Front end (`bm_decomp_logic`).** The `prev_comp` register holds the compressed bits not yet
decoded. It is left-aligned, and its size is `BUF_W = 32*(LANES+1)` bits. Lane 0's field
decoder (`bm_field_decoder`) reads the codeword at the head. Lane 1 reads the codeword that
starts where lane 0's ends, and so on. The lanes form a chain of shifter plus decoder, which is
the longest combinational path of the design. A lane is used only if:

* every lane before it was used;
* no lane before it was an alignment marker;
* its whole codeword is already in the register.

So the instructions of one cycle are always lanes 0..k.

When the output stage can accept them, the used lanes' bits are shifted out. In the same cycle
a fetched 32-bit word is appended behind the remaining bits, provided that leaves no more than
`BUF_W-32` bits. In steady state this keeps at least `LANES*32` bits in the register at the
start of every cycle, enough for `LANES` compressed codewords.

**Dictionary and mask (`bm_dict_sram`, `bm_mask_gen`).** A lane's index addresses one read port
of the dictionary. There is one read port per lane, with a registered output. In the same cycle
the mask generator builds the 32-bit mask from the location and pattern fields. Mask generation
therefore runs in parallel with the dictionary access, as in the article.

**Output stage (`bm_output_buffer`).** `prev_decomp` captures, on the same edge as the SRAM, the
mask or the uncompressed instruction of each lane. The output is `entry XOR mask`, or the
uncompressed word. It holds until the processor takes it. A dictionary-only codeword has an
all-zero mask.

**Timing.** A codeword at the head of `prev_comp` in cycle *t* is an instruction at the output
in cycle *t+1*. A fetched word reaches the output two cycles after it is taken. With no stalls
the engine delivers `min(LANES, 32 / codeword length)` instructions per cycle on average, because
the 32-bit fetch port is the other limit. Measured with two lanes:

* 300 dictionary-only codewords take 152 cycles (the bound is 150);
* 300 one-mask codewords take 199 cycles (the bound is 197).

A taken branch delivers its first instruction 3 to 4 cycles after the redirect.

## Branches and the mapping table

The compressor rewrites every branch it can so that it carries the compressed byte address of
its target. Those are direct branches: the processor puts the address on `br_addr` with
`br_indirect` low. Other targets, mostly those of indirect branches, are only known as original
addresses at run time. Those are the ones the compressor could not patch.

For those targets, `bm_branch_map` holds a small table that maps an original address to the
compressed address. It is fully associative, looked up in the same cycle, and has 16 entries by
default. The processor raises `br_indirect`, and the unit looks the address up.

A redirect does the following in its cycle:

* empties `prev_comp` and the output stage;
* points the fetch address at the word holding the target byte;
* discards the bits in front of that byte from the first word fetched.

A lookup that misses raises `map_miss` and changes nothing; handling it is left to the
processor.

## Top-level interface (`bm_decomp_unit`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `dict_we`, `dict_waddr`, `dict_wdata` | in | 1, IW, 32 | load the dictionary (before running) |
| `map_we`, `map_widx`, `map_wkey`, `map_wval` | in | 1, log2(MAP_ENTRIES), 32, 32 | load a mapping-table entry: original address → compressed byte address |
| `fetch_addr` | out | 30 | word address of the next compressed word |
| `in_valid`, `in_data` | in | 1, 32 | the word at `fetch_addr`; taken when `in_ready` is high too |
| `in_ready` | out | 1 | depends combinationally on `out_ready` |
| `br_valid`, `br_indirect`, `br_addr` | in | 1, 1, 32 | branch: compressed byte address, or original address if indirect |
| `map_miss` | out | 1 | indirect target not in the table (same cycle) |
| `out_valid`, `out_instr` | out | LANES, LANES×32 | instructions in program order, lane 0 first |
| `out_ready` | in | 1 | the processor takes all valid lanes |
| `align_taken` | out | 1 | an alignment marker was stepped over (status) |

After reset the unit fetches from compressed address 0, so hold `in_valid` low until the
dictionary is loaded. Alternatively, start the program with a branch.

Parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `DICT_ENTRIES` | 2048 | dictionary size; the article evaluates 2048, 4096 and 8192 |
| `LANES` | 2 | instructions decoded per cycle (1 gives the one-instruction-per-cycle engine) |
| `MAP_ENTRIES` | 16 | mapping-table entries |
| `ADDR_W` | 32 | byte address width |

A compressed program is tied to its index width. A program compressed for a 4096-entry
dictionary needs a unit built with `DICT_ENTRIES=4096`.

## What follows the article and what does not

From the article:

* the codeword fields of Encoding 2;
* the four codeword kinds;
* the instruction-length mask, built by placing 4-bit patterns on half-byte boundaries and
  OR-ing them;
* mask generation in parallel with the dictionary lookup, followed by the XOR in the last stage;
* the `prev_comp` and `prev_decomp` registers;
* decoding several codewords from one fetched word;
* byte-aligned, patched branch targets;
* a small mapping table for the unpatchable targets;
* dictionary sizes of 2K, 4K and 8K entries.

This design's own choices:

* bit-level encodings: decision polarity, count values and location numbering;
* the alignment marker;
* the register sizes;
* the number of lanes and their chaining;
* the ready/valid handshakes;
* the dictionary and table load ports;
* the table's organisation and size;
* the behaviour on a table miss.

The article also describes:

* a generic format with 1-, 2-, 4- and 8-bit masks;
* two other customised formats (one 8-bit mask; a 4- or 8-bit mask followed by a 4-bit mask).

It selects Encoding 2 and uses only that one for its results, so the other formats are not
built.

The article argues that the XOR adds about 0.25 ns to a 5.99 ns path within an 8.5 ns cycle.
That claim concerns a gate-level implementation and is not checked here. The dictionary is
written as a register array with one read port per lane. In silicon it would be an SRAM macro,
or replicated SRAMs for more than one lane.

## Files

`rtl/`:

* `bm_pkg.sv` holds the constants, the codeword kind enum and the mask field struct.
* `bm_decomp_unit.sv` is the top.
* `bm_dce.sv` is the engine.
* The engine's parts are `bm_decomp_logic.sv`, `bm_field_decoder.sv`, `bm_mask_gen.sv`,
  `bm_dict_sram.sv` and `bm_output_buffer.sv`.
* `bm_branch_map.sv` is the mapping table.

`tb/`:

* `bm_tb_pkg.sv` is the reference compressor. It searches the whole dictionary for the entry
  with the fewest differing half-bytes and emits the cheapest codeword.
* Each module has a self-checking `tb_<module>.sv`.
* `tb_bm_configs.sv` (with `bm_cfg_runner.sv`) runs the engine with 2048, 4096 and 8192
  dictionary entries and with 1, 2 and 3 lanes, and checks the cycle counts against the
  lane/fetch bound.
* `tb_bm_decomp_unit.sv` runs the whole unit at its default parameters. It follows a
  600-instruction program through direct branches, indirect branches and a table miss, with
  random fetch and processor stalls. It checks every instruction, counts each mechanism (codeword
  kinds, alignment markers, dual-lane cycles, stalls, a full register, branch kinds, misses) and
  fails if any of them never happened.

Every testbench ends by printing `TB_RESULT checks=N failures=M`. All of them pass.

How far to trust this: the reference compressor was written from the format description
above, separately from the decoder. The two agree on every instruction in every test, across
all codeword kinds, alignment markers, branches and random stalls. Both follow the same reading
of the bit-level choices listed in the previous section, though. A compressor that makes
different choices (another decision polarity or location order, no alignment marker) produces
streams this unit decodes wrongly. No real benchmark binaries were run: the test programs are
random instructions placed at controlled half-byte distances from a random dictionary.

To simulate, for example the top (the two packages first, the rest found through `-y`):

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/bm_pkg.sv tb/bm_tb_pkg.sv tb/tb_bm_decomp_unit.sv -o sim && ./obj_dir/sim
```

Any other testbench works the same way by naming its file instead. Every testbench finishes in
well under a second.
