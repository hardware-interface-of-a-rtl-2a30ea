# A SHA hash core with a FIFO-style word interface

This is SystemVerilog RTL for a secure-hash core built around a small, uniform
hardware interface. It covers SHA-1 and SHA-2 (SHA-224, SHA-256, SHA-384 and
SHA-512, as defined in FIPS 180-3). The interface uses one w-bit input word
stream and one w-bit output word stream, each with a ready/strobe pair. The
core drives both transfers, and the circuits around it only hold data. In the
usual setup those circuits are two ordinary FIFOs: the core reads message
words from an Input FIFO whenever it is not empty, and writes the hash value
into an Output FIFO whenever it is not full.

The width w is the hash function's natural word: 32 bits for SHA-1/224/256
and 64 bits for SHA-384/512. The function is set by a parameter, and the
default is SHA-256.

## Ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all logic on the rising edge |
| `rst` | in | 1 | synchronous reset, active HIGH, at least one cycle. A message in progress is dropped and produces no output. The core is then ready for a new message. |
| `din` | in | w | input word |
| `src_ready` | in | 1 | **active LOW**: the source has data. Wire it to the source FIFO's `empty`. |
| `src_read` | out | 1 | read strobe to the source |
| `dout` | out | w | word of the hash value |
| `dst_ready` | in | 1 | **active LOW**: the destination has room. Wire it to the destination FIFO's `full`. |
| `dst_write` | out | 1 | write strobe. The destination stores `dout` at the next rising edge. |

The two "ready" inputs are active low so that a FIFO's `empty` and `full`
flags connect directly, with no inverter.

### Read timing

The source is taken to have a *synchronous read*: a read requested in cycle t
is done at the rising edge that ends cycle t, and the word is on `din` during
cycle t+1. The core stores it at the end of cycle t+1. So `src_read` leads its
data by one cycle:

```
cycle        1      2      3      4      5
src_ready    1      0      0      0      1      (0 = source not empty)
src_read     0      1      1      0      0
din          --     --     D0     D1     --
stored by core             ^end   ^end
```

`src_read` is only raised while `src_ready` is low, so the core never reads an
empty source.

### Write timing

`dst_write` and `dout` are valid in the same cycle, and the destination stores
the word at the following edge. The core writes one word per clock while
`dst_ready` is low. If `dst_ready` goes high because the destination is full,
the core holds the current word. It resumes with that same word once
`dst_ready` is low again.

## Message format on the input stream

The core needs no extra signal to mark where a message starts or ends. Both
are coded in the word stream:

```
 seg_0_bitlen            <- first word of a message: always a bit length
 seg_0 data words        ceil(seg_0_bitlen / w) words
 seg_1_bitlen            <- non-zero: another segment follows
 seg_1 data words
 ...
 seg_n-1_bitlen
 seg_n-1 data words      last word may be partial
 0                       <- zero word: end of message
```

- A message whose length is known and below 2^w bits is one segment: length,
  data, zero.
- A message of unknown length, or of 2^w bits or more, is sent as several
  segments. Each segment has at most 2^w − 1 bits.
- Every segment except the last must be a whole number of words. The core
  does not check this.
- Only the last word of the last segment may be partial. Its message bits sit
  at the most significant end, and the core ignores the bits below them.
- After a segment's data, a zero word ends the message and any other word is
  the next segment's length. The first word of a message is always read as a
  length. So an empty message is two zero words: length 0, then the end
  marker.
- The segments map onto a software hash API: all but the last segment are
  *Update* calls, and the last segment is *Final*.

### Padding

The core pads every message itself, following FIPS 180-3:

1. a 1 bit after the last message bit;
2. zeros;
3. the total message length in the last 2w bits of the final block.

The total length is the sum of all segment lengths, kept in a 2w-bit counter.
Because the core always pads, do **not** send a message that software has
already padded: it would be padded twice.

## How the core works

```
           +----------------+  16-word block  +---------------+  hash value  +-----------------+
 din  ---->| sha_input_ctrl |----------------->| sha2_compress |------------->| sha_output_ctrl |----> dout
 src_* <-->| parse, pad     | valid/ready      | or            | valid/ready  | word per clock  |<---> dst_*
           | 16-word buffer | first/last       | sha1_compress |              | shift register  |
           +----------------+                  +---------------+              +-----------------+
```

The three units run at the same time. The input unit fills its buffer with the
next block while the current block is being compressed. The output unit copies
a finished hash value into its own shift register, so the next message can be
read and hashed while that value is still being written out.

### `sha_input_ctrl`: parser and padder

The input unit has three states:

| state | role of the next word | action |
|---|---|---|
| `S_HDR` | header | a length starts a segment; a zero word (except as the first word of a message) starts padding |
| `S_DATA` | data | words go into the 16-word block buffer |
| `S_PAD` | none | padding words are generated internally |

**Read rule.** A read is issued only when the core already knows what the
next word will be. In `S_DATA` this means up to the segment's word count, and
only while the block buffer can still take the word. In `S_HDR` only one header
read is in flight at a time. This rule keeps the core from reading a word that
belongs to the next message before the current one is finished. It costs one
idle read cycle after each header and at each block boundary. That cost is
hidden, because compressing a block takes far longer than reading one.

**Padding in the partial word.** If the last word is partial (r message bits,
0 < r < w), the padding 1 bit is merged into that word as it is stored:

```
stored = (din & ~(ONES >> r)) | (MSB >> r)
```

Otherwise the padding starts with a word `1000…0` after the zero word.

**Padding words.** Zero words follow, one per cycle, up to word 14 of a block.
Words 14 and 15 then receive the high and low halves of the 2w-bit length. If
the 1 bit lands in word 14 or 15, the padding runs on into an extra block.

**Block handoff.** A full buffer is offered with `blk_valid`. `blk_first` marks
the first block of a message, so the hash restarts from the initial value.
`blk_last` marks the final block, so the hash value goes out after it.

### `sha2_compress` and `sha1_compress`: compression

Both compression units are iterative and do one round per clock.

**Message schedule.** The 16 block words are loaded into a shift register
whose head is W_t. Each round shifts in W_{t+16}, computed from taps 0, 1, 9
and 14 for SHA-2, or 0, 2, 8 and 13 for SHA-1. No 64- or 80-entry schedule
memory is needed.

**Block flow.** The working variables are loaded from the current hash value,
or from the initial value for a first block. After the last round, one cycle
adds them into the hash value. For a final block the result is then offered
on `dig_words` with `dig_valid`, and the unit waits for `dig_ready` before it
takes another block.

Cycle counts per block (accept + rounds + add):

| function | w | rounds | cycles per block | bits per cycle, steady state |
|---|---|---|---|---|
| SHA-1 | 32 | 80 | 82 | 6.2 |
| SHA-224/256 | 32 | 64 | 66 | 7.8 |
| SHA-384/512 | 64 | 80 | 82 | 12.5 |

In a single-block test the hash value appears ROUNDS + 1 clock edges after the
edge that took the block.

**Constants.** The round constants and initial values are not typed in as a
table. `sha_pkg` computes them at elaboration from their definitions:

- SHA-512 K[t] is the first 64 fractional bits of the cube root of the t-th
  prime. `sha_pkg` finds it with a bitwise integer cube root of p·2^192.
- The initial values are the fractional bits of square roots of primes.
- SHA-256 uses the upper 32 bits of the SHA-512 values. SHA-224 uses the lower
  32 bits of the SHA-384 initial values.
- SHA-1 K is floor(2^30·√n) for n = 2, 3, 5 and 10. The five SHA-1 initial
  words are the fixed FIPS values.

### `sha_output_ctrl`: output

This unit loads the hash value and shifts it out starting with H0. It writes 5
words for SHA-1, 7 for SHA-224, 8 for SHA-256, 6 for SHA-384 and 8 for
SHA-512. `dst_write = words_left && !dst_ready`.

## The typical system: `sha_system`

`sha_system` is the top module: Input FIFO → core → Output FIFO, wired as
follows.

| FIFO signal | core port |
|---|---|
| Input FIFO `empty` (`fifoin_empty`) | `src_ready` |
| Input FIFO `read` (`fifoin_read`) | `src_read` |
| Output FIFO `full` (`fifoout_full`) | `dst_ready` |
| Output FIFO `write` (`fifoout_write`) | `dst_write` |

The outside world has these ports:

- **Input side:** `ext_idata`, `fifoin_write`, `fifoin_full`.
- **Output side:** `ext_odata`, `fifoout_read`, `fifoout_empty`. A word read
  with `fifoout_read` appears on `ext_odata` after the next rising edge.

Parameters: `ALGO` (default `SHA256`), plus `IN_DEPTH` and `OUT_DEPTH`
(default 16 each). Any FIFO depth from 1 upward works.

**`sha_fifo` behaviour:**

- Reads and writes are both synchronous.
- `dout` is a register that is loaded only on a read of a non-empty FIFO.
- A write to a full FIFO is ignored, and so is a read of an empty one.
- `empty` and `full` come from a word count.

The FIFOs are not part of the core. Any source that follows the
`src_ready`/`src_read` timing above, and any sink that follows the
`dst_ready`/`dst_write` timing, can take their place. A PCIe or similar bus
interface that already has FIFOs is the typical case.

## Choices made here, and limits

- **Hash functions.** All five are available through `ALGO`. SHA-256 is the
  default, a choice of this design.
- **Reset.** Reset is synchronous.
- **Read latency.** The core stores a word one cycle after `src_read`,
  matching a synchronous-read FIFO. A source with combinational (same-cycle)
  read data needs a register in front of `din`.
- **Padding.** Padding is always done in hardware.
- **Bubbles.** The core pauses for one read cycle after each segment header
  and at each block boundary (see the read rule above).
- **Lengths of 2^w bits or more.** The length counter's upper word is only
  reached by messages of at least 2^w bits, 4 Gbit for w = 32. No simulation
  here is that long, so that path is checked by review only.
- **Protocol errors.** A segment before the last that is not a whole number
  of words is a protocol error, and the core does not detect it.
- **Throughput.** Compression is one round per clock with no unrolling or
  pipelining. The core is built for clarity, not maximum throughput.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sha_fifo` | Replays a reference Input FIFO sequence cycle by cycle: write 0000ABCD; read it; read while empty; write 00001234 and 00005678; write 1A2B3C4D twice while reading. Checks the words on `dout` and the flags. Then runs depth-4 and depth-1 FIFOs against a queue model with random traffic. |
| `tb_sha_output_ctrl` | 8 words on 8 consecutive clocks; pausing and resuming under random `dst_ready`; no write while full. |
| `tb_sha_input_ctrl` | For w = 32 and w = 64, compares every block word and the first/last flags with blocks the testbench pads itself. Messages sit around the padding boundaries and are split into random segments, with random source and consumer stalls. |
| `tb_sha2_compress`, `tb_sha1_compress` | The FIPS 180-3 example messages `"abc"` and the 448-bit `"abcdbcdecdef…nopq"` against the published hash values, plus block latency and the digest hold. |
| `tb_sha_core` | Five cores side by side, one per function. Each gets 11–13 messages (0 to 2000 bits, partial words, multi-block) in random segments with random stalls on both sides, and every output word is compared. |
| `tb_sha_system` | End to end at default parameters. A reset in the middle of a message must produce no output. Then 13 messages go through both FIFOs, and each of these events must happen at least once: Input FIFO full, core waiting on an empty Input FIFO, Output FIFO full, multi-segment message, partial last word, extra padding block, empty message. |

`tb/sha_vectors.svh` holds the expected hash values of the generated test
messages. Message k has its bit length from the table, and its words come from
the LCG x ← x·1664525 + 1013904223 seeded with k+1. The values were computed
with a separate software model of the hash functions, which was itself checked
against a standard library implementation.

### Running

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sha_pkg.sv rtl/sha_fifo.sv rtl/sha_input_ctrl.sv rtl/sha1_compress.sv \
    rtl/sha2_compress.sv rtl/sha_output_ctrl.sv rtl/sha_core.sv rtl/sha_system.sv \
    tb/tb_sha_system.sv --top-module tb_sha_system -o sim
./obj_dir/sim
```

- **Other testbenches:** swap in the testbench and its helper (`tb/sha_core_harness.sv`,
  `tb/sha_input_harness.sv` or `tb/sha_compress_harness.sv`) and change
  `--top-module`.
- **Hash function:** set `ALGO` on `sha_system` or `sha_core`
  (`sha_pkg::SHA1`, `SHA224`, `SHA256`, `SHA384`, `SHA512`). The port width
  follows from it.

## Files

| file | contents |
|---|---|
| `rtl/sha_pkg.sv` | function enum, word widths, digest lengths, computed constants |
| `rtl/sha_fifo.sv` | synchronous FIFO (Input FIFO / Output FIFO) |
| `rtl/sha_input_ctrl.sv` | input parser, hardware padding, block buffer |
| `rtl/sha2_compress.sv` | SHA-224/256/384/512 compression |
| `rtl/sha1_compress.sv` | SHA-1 compression |
| `rtl/sha_output_ctrl.sv` | hash value output |
| `rtl/sha_core.sv` | the core with the standard interface |
| `rtl/sha_system.sv` | core between two FIFOs (top) |
| `tb/*` | testbenches, their helpers and expected hash values |
