# Chunked SCL polar decoder with a configurable allocation table

This is a successive-cancellation-list (SCL) decoder for polar codes of length
N = 32 to 1024, with list size 8. Both the code length and the bit allocation
table (which bits are frozen and which carry data) are set at run time.

The design is built to be small, so it does not keep eight complete decoding
trees. The decoding tree is split at rank 4, the level where each node covers
16 bits:

* **Above rank 4 (ranks n down to 4)** only one decoding path exists. Plain SC
  arithmetic on one row of 64 processing units produces the 16 LLRs of the
  next 16-bit chunk.
* **Inside a chunk** a full list decoder with 8 paths decides the 16 bits.
  Each path keeps its own small set of LLR registers for ranks 3, 2 and 1.
* **At the end of each chunk** the path with the best metric wins. Its bits
  are final. Its codeword goes back up the tree as the partial sum, and the
  list restarts from a single path for the next chunk.

So the list advantage applies only within each 16-bit chunk. The price is some
error-rate performance compared with a full-length SCL decoder. The gain is that
the memory for 8 paths shrinks from 8 x N LLRs to 8 x 14.

Around the decoder core sit:

* an AXI-Lite configuration port;
* an AXI-Stream input for LLRs and an AXI-Stream output for decoded
  information bits;
* a self-checking platform: ROM → polar encoder → FIFO → bit-to-LLR
  conversion → decoder → bit-error counter.

## Conventions

* **Bit order.** Bits and LLRs use natural order, with no bit reversal. The
  codeword of a tree node is built from the codewords of its left child (lower
  bit indices) and right child. Its lower half is `x_left ^ x_right` and its
  upper half is `x_right`. That is `x = u · F^{⊗n}` with `F = [[1,0],[1,1]]`
  and no bit-reversal permutation.
* **LLRs** are 8-bit two's complement, saturated to ±127. A positive LLR means
  bit 0 is more likely.
* **F function (min-sum).** `f(a,b) = sign(a)·sign(b)·min(|a|,|b|)`.
* **G function.** `g(a,b,u) = b + (1-2u)·a`, saturated.
* **Ranks.** Rank j holds 2^j LLRs. The channel is at rank n = log2 N, and
  rank 0 holds the bit decisions.
* **Allocation table.** A 1024-bit mask. Bit i = 1 means `u_i` carries data;
  bit i = 0 means `u_i` is frozen to 0. Only bits 0..N-1 are used.

## The upper tree: LLR memory and schedule (`put_upper`)

This is the part of the design that takes the most care to follow.

### Memory layout

All LLRs above rank 4 live in one memory of 2·NMAX LLRs, stored as rows of 64
LLRs. The memory is ordered like a heap: rank j occupies flat indices
`[2^j, 2^(j+1))`. This layout has three useful properties:

* Channel LLRs of any code length land at `[N, 2N)`.
* Every rank of 64 or more LLRs fills whole rows.
* The two inputs of rank-j LLR k are LLRs k and k + 2^j of rank j+1.

Ranks 5 and 4 are narrower than a row. They use 32 or 16 lanes of the line
decoder, and the unused lanes output 0.

### Computing the LLRs for one chunk

For chunk c (16 bits), the ranks that must be recomputed run from
`4 + ctz(c)` down to 4. Here `ctz` counts trailing zero bits; for c = 0, all
ranks from n-1 down to 4 are recomputed.

* The first recomputed rank uses the G function. Its partial sums come from the
  stored codewords of the left subtrees.
* Every rank below it uses the F function.
* Each step processes up to 64 LLRs, one row per clock, on the single 64-PU
  line decoder (`line_decoder`, made of `polar_pu`).
* The 16 rank-4 LLRs are then offered to the list decoder.

### Partial sums

When a chunk's 16-bit codeword comes back, it climbs one rank per clock:

* At a left child, it is stored as that rank's partial sum.
* At a right child, it is merged with the stored left sibling into
  `{left ^ x, x}` and climbs further.

The climb ends at the first left child, or at rank n, which ends the frame.
Each rank has its own register for partial sums, so partial sums never go
through the LLR memory.

## The in-chunk list decoder (`scl_chunk_decoder`, `scl_path_select`)

### State per path

Each of the L = 8 paths holds:

* 8 + 4 + 2 intermediate LLRs (ranks 3, 2 and 1);
* the bits decided so far in the chunk;
* a path metric (PM), 12 bits wide;
* an active flag.

### Deciding one bit per clock

For bit i, a path first recomputes ranks `ctz(i)` down to 1. The first of these
uses G, with the polar transform of the already decided left bits as partial
sum; the rest use F. This is done by 15 processing units per path, all working
in the same clock.

Each path then produces candidates:

* If bit i is frozen, the path extends with 0 only.
* If bit i is an information bit, the path splits into a 0-extension and a
  1-extension.

A candidate's PM grows by |LLR| when its bit disagrees with the sign of the
rank-0 LLR.

### Selection

`scl_path_select` ranks all 2L candidates. Each candidate counts how many
others have a smaller PM, or an equal PM and a lower index. Candidates with a
rank below L survive, in rank order, and each surviving path copies its
parent's registers.

The list starts from path 0 alone. It doubles at each information bit until it
holds 8 paths.

### Output

After bit 15, slot 0 holds the path with the best PM. Its bits and its codeword
are returned. The latency is exactly 16 clocks from accepting the chunk to
`out_valid`.

## Decoder core and timing (`polar_decoder_core`)

Frames are handled one at a time:

1. Load N/8 beats of channel LLRs.
2. Decode the frame chunk by chunk.
3. Accept the next frame.

Each decided chunk leaves together with its 16 allocation bits. At the same
moment, its codeword goes into the upper tree.

**Configuration.** The code length and the allocation table are sampled on the
first beat of each frame. The next frame's configuration can therefore be
written while the current frame is still being decoded.

**Length check.** If `tlast` does not arrive on beat N/8, the sticky `len_err`
flag is set. A later frame of correct length clears it.

Measured cycles per frame, including the load, with no output back-pressure:

| N    | cycles/frame |
|------|--------------|
| 32   | 46           |
| 128  | 190          |
| 1024 | 1568         |

Each chunk takes 16 clocks in the list decoder, plus a few clocks for the upper
tree. The load of N/8 beats is not overlapped with decoding.

At N = 1024, 1568 cycles per frame is 0.65 coded bits per clock. Reaching
about 158 Mbit/s of coded bits would take roughly 242 MHz. This number is
arithmetic only; no timing closure has been done.

## System interface (`polar_decoder_axi`)

The wrapper contains:

* `axil_config`, the register file;
* `sync_fifo`, an input FIFO of depth 16;
* `polar_decoder_core`;
* `info_packer`, which packs the output words.

### AXI-Lite register map

The address is 12 bits and the data 32 bits.

| Address | Access | Contents |
|---------|--------|----------|
| 0x000 | R/W | `log2 N`, 5..10 (reset 10). Other values answer SLVERR. |
| 0x004 | R | `{frames_done[15:0], 14'b0, len_err, busy}` |
| 0x100 + 4w | R/W | allocation table bits 32w+31..32w, w = 0..31 (reset all frozen) |

Unmapped addresses answer SLVERR.

### Input stream

64 bits per beat, carrying 8 LLRs. LLR k of the frame is in bits
`[8(k mod 8) +: 8]` of beat k/8. `tlast` marks the frame's last beat.

### Output stream

32-bit words holding only the information bits, in increasing bit index, with
the first bit in bit 0. The last word of a frame is padded with zeros and
carries `tlast`.

## Test platform (`polar_platform`)

The platform is a closed loop that needs no external data:

* `data_rom` holds 64 pseudo-random words from a 32-bit xorshift generator with
  seed `0x5ea0d236`. It has two read ports, one for the encoder and one for the
  checker.
* `polar_encoder` reads 32-bit words, places their bits on the information
  positions of the allocation table, and applies the polar transform with a
  butterfly network. It emits 8 code bits per beat. A ROM word left partly
  used at the end of a frame is dropped, so each frame starts on a fresh word.
* The code bits are queued in a 32-deep `sync_fifo`.
* `llr_trans` maps each bit to ±32 (0 → +32, 1 → −32).
* `ber_checker` compares the decoder output words with the ROM, ignoring the
  zero padding of each frame's last word. It counts bit errors, words and
  frames, and flags a `tlast` in the wrong place.

The encoder and the checker take N and the allocation table from the decoder's
configuration outputs, so the three always agree.

The channel is noiseless, so any bit error is a hardware fault. The testbenches
add Gaussian noise where error correction needs to be exercised.

## Departures from the original architecture and limits

* **No tier pipeline in the upper tree.** The original architecture feeds
  layer 1 with 128 LLRs per iteration through chained tiers of 64, 32, 16 and 8
  processing units. Here one 64-PU row computes one rank at a time. The LLRs
  are the same, but the cycle count is not that of the original pipeline.
* **LLR storage in flip-flops.** The upper tree's memory of 2048 LLRs (16 kbit)
  is written as per-row registers, so synthesis will not map it to block RAM.
  FPGA resource use has not been measured.
* **List decoding only within each chunk.** The list collapses to the best path
  after each 16-bit chunk, and the PM restarts at zero. This follows the
  original description of the lowest layer handing its best path up as the
  partial sum. It is not a full-length SCL.
* **Choices of this design where the original is silent:**
  * the PM update (|LLR| penalty);
  * the tie-breaking rule in path selection;
  * word widths (8-bit LLR, 12-bit PM);
  * the register map and stream formats;
  * the FIFO depths;
  * the ROM contents and the ±32 LLR magnitude.
* **Code lengths** are 32..1024. Length 2048 is not supported (`NMAX` = 1024).
* **No CRC and no early termination.**
* **No noise source.** The platform contains no channel noise generator.

## Files

All files are in `rtl/` (design) and `tb/` (testbenches).

| Module | Role |
|---|---|
| `polar_pkg` | widths, constants, F/G functions, 16-bit polar transform |
| `polar_pu` | one processing unit: F or G, chosen by `fsel` |
| `line_decoder` | P processing units side by side |
| `put_upper` | upper tree: LLR memory, rank schedule, partial-sum climb |
| `scl_path_select` | keeps the L best of 2L candidates |
| `scl_chunk_decoder` | 8-path list decoder for one 16-bit chunk |
| `polar_decoder_core` | frame controller joining the two layers |
| `axil_config` | AXI-Lite register file |
| `sync_fifo` | valid/ready FIFO |
| `info_packer` | chunk bits to 32-bit output words |
| `polar_decoder_axi` | the decoder with its AXI interfaces |
| `data_rom`, `polar_encoder`, `llr_trans`, `ber_checker` | test platform parts |
| `polar_platform` | top: platform around the decoder |

### Testbench support files

* `tb_ref_pkg` is a software model of the same decoder: the polar transform,
  SC LLRs per chunk, and a 16-bit list decoder with the same PM and tie rules.
  It also provides a bit-allocation generator (a simple weight-order
  construction) and a noisy-channel LLR generator.
* `tb_axil_master` is an interface with AXI-Lite read and write tasks.

### What the testbenches check

Every block has a testbench `tb/tb_<module>.sv` that compares the block against
the model. Each one prints `TB_RESULT checks=… failures=…` and has a watchdog.

`tb_polar_platform` runs the top at its default sizes. It decodes:

* N=1024, K=512;
* N=128, K=69;
* N=32, K=16.

It checks for zero bit errors and for the reported frame counts. It also
requires each of these mechanisms to happen at least once:

* a code-length switch;
* path splits;
* encoder FIFO full;
* decoder input back-pressure;
* decoder output stalls;
* G steps in the upper tree.

`tb_polar_ber` is an error-rate run of the decoder core on Polar(256,128) and
Polar(1024,512). It uses a noisy channel at Eb/N0 = 1, 2 and 3 dB, with 4
frames per point. Every decided bit must match the software model, and the
test prints the measured BER. A typical run gives:

| Code | 1 dB | 2 dB | 3 dB |
|---|---|---|---|
| (256,128) | 0.23 | 0.06 | 0 |
| (1024,512) | 0.32 | 0 | 0 |

With so few frames these are rough estimates, not curves.

## Simulating

With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/polar_pkg.sv tb/tb_ref_pkg.sv tb/tb_polar_platform.sv \
    --top-module tb_polar_platform
./obj_dir/Vtb_polar_platform
```

`-y` lets Verilator find the other modules and interfaces by file name. The
packages must be listed first. `-Wno-fatal` keeps the build going past
width-extension warnings in the testbenches. Replace the testbench file and top
module to run any other block test. The platform test runs in about half a
second after the build.

To change the main sizes:

* list size and chunk size: `polar_pkg` (`LIST_L`, `CHUNK`);
* maximum code length: `polar_pkg` (`NMAX`, `LOG_NMAX`);
* line-decoder width: the `P` parameter of `polar_decoder_core`. It must be at
  least 32.
