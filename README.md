# Bitmask-based dictionary compression with n-1 bit bitmasks

Dictionary compression replaces each frequently occurring word of a program,
an FPGA bitstream or a table of control words with a short index into a small
dictionary. Bitmask-based compression extends this to words that *almost*
match an entry. Such a word is stored as the index plus one or more bitmasks.
Each bitmask is an offset and a few mask bits that are XORed into the entry to
get the word back.

The saving this design builds on is in the mask bits themselves. If a bitmask
may slide to any bit position, its offset can always point at the *first*
differing bit. That bit of the mask is then always 1 and need not be stored,
so an n-bit bitmask costs only n-1 bits:

* A 1-bit mask costs nothing beyond its offset.
* A 2-bit mask needs one bit: '10' or '11'. The pattern '01' is the same as
  '10' one position further right.
* A 3-bit mask needs two bits.

Decoding puts the 1 back as a constant wire in front of the stored bits, so it
costs no logic.

This repository holds both engines and a top level, `bmc_codec`, that puts
them side by side:

* **Decompressor** (`bmc_decompressor`). This is the part that normally sits
  in a system, between the memory holding the compressed image and its user.
  It takes the packed stream and returns one original word per clock.
* **Compressor** (`bmc_compressor`). It produces exactly that stream from
  words and a given dictionary. Normally the compressed image is made once,
  ahead of time.

Choosing the dictionary contents is not part of the RTL.

## Codeword format

The stream is a sequence of codewords packed back to back with no alignment.
The first stream bit is in the MSB of the first stream word. Within a
codeword, fields are most significant bit first:

| kind          | fields, in order                                                                    | default length |
|---------------|--------------------------------------------------------------------------------------|----------------|
| uncompressed  | `0`, word (W bits)                                                                   | 33             |
| dictionary    | `1`, `0`, index (log2 DICT_DEPTH bits)                                               | 11             |
| bitmasked     | `1`, `1`, count-1 (log2 MAX_MASKS bits), then per mask: size selector (log2 NUM_MASK_TYPES bits), offset (log2 W bits), mask bits (size-1 bits); then the index | 19 to 28 |

How to read it:

* **Offset.** The offset counts from the left (MSB) end of the word and points
  at the first differing bit. The stored bits are the next size-1 positions
  to the right.
* **Cut masks.** A mask may reach past the last bit of the word. For example,
  a 3-bit mask at offset 31 covers only bit 31, and its outside bits are
  dropped. Without this, a difference in the last bit or two of a word could
  not be recorded.
* **Several masks.** The masks of one word are combined by XOR. The
  compressor places them so that they never overlap.
* **Empty fields.** A field that can hold only one value takes no bits. With
  one mask per word and one mask size, a bitmasked codeword is just
  `1 1 offset mask-bits index`.
* **Origin of the fields.** The order of the fields (isCompressed,
  isBitmasked, number of masks, offset/mask pairs, index) is that of the
  bitmask-compression format. The encodings of the count (count-1) and of the
  size selector (one bit per mask, 0 for MASK0_SIZE) are this design's own.

**Example.** In the default configuration (32-bit words, 512 entries, up to
two masks of 2 or 3 bits), a word that differs from an entry in one bit costs
2 + 1 + (1 + 5 + 1) + 9 = 19 bits instead of 33. With a full 2-bit mask field
it would cost 20 bits. The end-to-end test prints this effect for its random
data: 1000 words, 32000 bits raw, take about 21000 bits of codewords, and
about 700 bits more with full-width masks.

## Decompressor

```
 stream (IN_W) -> bit_buffer -head-> codeword_decoder -index-> dictionary (sync read)
                   ^    |               | 2 x bitmask_expand        |
                   |    +-fill/consume--+ raw, XOR pattern, kind    v
                   |                      --> output register --> word = entry ^ pattern
```

* **`bit_buffer`.** Keeps the undecoded bits left-aligned in a shift register
  of longest-codeword + 2*IN_W - 1 bits (96 by default). In one clock it
  drops the codeword just decoded and appends a new stream word behind what
  is left. `in_ready` is `fill + IN_W <= BUF_W`, which depends only on
  registered state. The extra IN_W bits of buffer keep this rule from
  starving the decoder.
* **`codeword_decoder`.** Combinational. It walks the fields of the head
  codeword, works out the length, and raises `ok` when the whole codeword is
  in the buffer. Every field that decides the length lies inside the
  codeword, so a length that fits the valid bits was computed from valid bits
  only. One `bitmask_expand` per mask slot turns an offset, size and stored
  bits into a W-bit pattern.
* **`dictionary`.** A DICT_DEPTH x W array with synchronous read, as a block
  RAM.
* **Output stage.** A complete codeword is consumed when the output register
  is free or being emptied. At that edge the dictionary is read and the
  kind, raw word and pattern are registered. The output is the raw word, or
  `entry ^ pattern`.

Timing:

* **Latency.** A word is on `out_data` one clock after the stream word that
  completes its codeword enters the buffer.
* **Throughput.** One word per clock while the stream supplies enough bits
  (IN_W per clock). In free flow 3000 words take about 3005 clocks.
* **Handshakes.** Valid/ready on both sides. The output holds while
  `out_valid && !out_ready`. Reset is asynchronous and active low, and the
  dictionary contents are not reset.
* **End of stream.** The stream has no end marker, so pulse `clear` between
  streams. In the default configuration zero padding is harmless, because it
  is shorter than an uncompressed codeword. With 8- or 16-bit words the
  padding can decode as an extra word; ignore anything beyond the expected
  word count.

## Compressor

* **Dictionary scan.** For each word, `bmc_compressor` scans the whole
  dictionary, one entry per clock. An entry read in one clock is compared in
  the next.
* **Exact match.** An exact match ends the scan with a dictionary codeword.
* **Mask search.** Otherwise `bitmask_cover` finds the cheapest mask set for
  `word ^ entry`. Each mask starts at the leftmost difference still
  uncovered. Every sequence of mask sizes with 1 to MAX_MASKS masks is tried,
  and the one with the fewest bits wins.
* **Choice of codeword.** Over all entries the shortest codeword is kept; on
  a tie the lowest index wins. If no bitmasked codeword is shorter than the
  uncompressed word, the word is sent uncompressed.
* **Output.** `codeword_encoder` lays out the fields. `bit_packer` appends
  the codeword to the stream and emits IN_W-bit words.
* **Flush.** After the last word, hold `flush` until `idle`. The partial last
  word is then sent padded with zeros.

Timing: a word without an exact match takes DICT_DEPTH + 3 clocks from
handshake to the next `in_ready` (515 at the defaults), provided the stream
output is not blocked. A word with an exact match takes fewer.

The sequential scan and greedy placement are the simplest engine that does
the job. They are not meant as a fast compressor.

## Top level

`bmc_codec` holds one compressor and one decompressor. They share the
dictionary write port, so both hold the same dictionary. Their streams are not
connected inside, since compression and decompression happen at different
times. The ports are prefixed `comp_` and `dec_`.

## Configurations

Parameters of `bmc_codec`, `bmc_compressor` and `bmc_decompressor`:

| parameter        | default | meaning                                   |
|------------------|---------|-------------------------------------------|
| `W`              | 32      | word width                                |
| `DICT_DEPTH`     | 512     | dictionary entries (a power of two)       |
| `MAX_MASKS`      | 2       | bitmasks per word                         |
| `NUM_MASK_TYPES` | 2       | 1 or 2 mask sizes                         |
| `MASK0_SIZE`     | 2       | size of mask type 0 (>= 1)                |
| `MASK1_SIZE`     | 3       | size of mask type 1                       |
| `IN_W`           | 32      | stream word width (this design's choice)  |

The defaults are the code-compression setting: 32-bit instructions, 512
entries, and sliding masks of 2 and 3 bits. The other evaluated settings need
overrides:

* **FPGA bitstreams.** `W=16, MAX_MASKS=1, NUM_MASK_TYPES=1, MASK0_SIZE=2`.
* **NISC control words.** `DICT_DEPTH=1024`.
* **Small worked examples.** `W=8, DICT_DEPTH=2, MAX_MASKS=1,
  NUM_MASK_TYPES=1, MASK0_SIZE=1` or `2`.

At most two mask sizes are supported, and no size may exceed W.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

Shared testbench code:

* **`bmc_ref_pkg.sv`.** Reference compressor, written from the format rather
  than from the RTL. It also makes test words: exact entries, entries with a
  few nearby bits flipped (including the last bits), entries with two
  distant bits flipped, and random words.
* **`bmc_stream_agent.sv`.** Drives a decompressor end to end. It checks
  every word, the latency, the throughput and the output hold under
  back-pressure. It counts every mechanism and fails any that never occurs:
  each codeword kind, one and two masks, each size, a cut mask, output
  stall, full input buffer and clear.

End-to-end tests:

* **`tb_bmc_codec.sv`** (full size, default parameters). Compresses 1000
  words with a 512-entry dictionary, with gaps and back-pressure. It checks
  that the stream equals the reference model's bit for bit, decompresses it
  and compares every word. It also checks the 515-clock scan and counts the
  mechanisms: exact-match early stop, flushed partial word, both kinds of
  back-pressure and a full input buffer.
* **`tb_bmc_decompressor.sv`.** Decompressor at the defaults.
* **`tb_bmc_fpga_bitstream.sv`, `tb_bmc_nisc_control.sv`,
  `tb_bmc_example_1bit.sv`, `tb_bmc_example_2bit.sv`.** Decompressor in the
  other configurations.

Unit tests:

* `tb_bitmask_expand.sv`: exhaustive.
* `tb_codeword_decoder.sv`: against the model.
* `tb_codeword_encoder.sv`: against the model, and round trip through the
  decoder.
* `tb_bitmask_cover.sv`: against the model's choice of masks.
* `tb_bit_buffer.sv` and `tb_bit_packer.sv`: against bit queues.
* `tb_dictionary.sv`: the dictionary RAM.
* `tb_bmc_compressor.sv`: 16-bit single-mask configuration, bit-exact stream
  and timing of every word.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/bmc_pkg.sv tb/bmc_ref_pkg.sv tb/tb_bmc_codec.sv \
    --top-module tb_bmc_codec -Mdir obj
./obj/Vtb_bmc_codec
```

Any other `tb_*.sv` can be the top. Each runs in seconds.

## How far to trust it

* **What follows the scheme closely.** The n-1 bit bitmask encoding with
  sliding offsets, the codeword kinds and field order, and the evaluated
  sizes (word width, dictionary depth, number and sizes of masks). With one
  mask type, the format gives the same codeword sizes as the small published
  example of bitmask compression: 3-bit dictionary codewords and 7-bit
  bitmasked codewords for 8-bit words and two entries.
* **This design's own choices.**
  * The count and size-selector encodings.
  * Cut masks at the word end.
  * MSB-first packing.
  * The buffer, pipeline, synchronous dictionary, valid/ready, `clear` and
    `flush`.
  * The compressor's sequential scan, greedy mask placement and tie-break.

  Another implementation of the scheme may pack these fields differently.
  Compressor and decompressor must agree on them.
* **Not included.** Dictionary selection (which words go into the
  dictionary), loading a dictionary from a compressed image, and any memory
  or cache interface beyond the valid/ready streams.
* **Tests and data.** All tests pass. They use random data, not real
  programs or bitstreams, so they check function and timing but say nothing
  about compression ratios on real benchmarks.
