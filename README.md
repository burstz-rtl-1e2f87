# BurstZ: a stencil accelerator that keeps its data compressed

A 3-D stencil code spends most of its time moving grid data. This design keeps the grid
compressed everywhere outside the arithmetic: in host memory, over PCIe, and in the card's
DRAM. Data is expanded only on its way into the stencil engine, and each result plane is
compressed again before it is stored. The codec is **sZFP**, a variant of the ZFP
block-transform compressor that trades some compression ratio for hardware speed:

- It uses coarse 2-bit headers, one per six bit planes, instead of ZFP's bit-serial group tests.
- It packs the stream into independent 6 KB chunks, so several decoders can work on one stream.

The RTL covers the accelerator side of one stencil sweep step:

- a six-endpoint burst arbiter in front of the DRAM;
- three decompressors, one for each of planes z-1, z and z+1;
- the stencil engine, which holds three row buffers per plane and applies a 7-point stencil
  to four doubles per cycle;
- one compressor for the result plane.

The PCIe core and the DDR controller are vendor parts and are not included. Their connections
are ports of `burstz_top`.

```
 host write (ep0) ─┐                           ┌─ chunk_reader ─ szfp_decompressor ─┐ plane z-1
 host read  (ep1) ─┤                           ├─ chunk_reader ─ szfp_decompressor ─┤ plane z
                   ├── mem_arbiter ── DRAM     ├─ chunk_reader ─ szfp_decompressor ─┤ plane z+1
                   │   (6 endpoints)           │                                    ▼
                   └───────────────────────────┴─ chunk_writer ◄─ szfp_compressor ◄─ stencil_engine
```

## The sZFP block format

Data is coded in blocks of four consecutive doubles, which are one 256-bit word. Every block
goes through four steps:

1. **Fixed point** (`szfp_fixpt`). The block's largest exponent `emax` becomes the common
   exponent. Each value is converted to a 64-bit signed integer scaled by 2^(62−(emax−1022)).
   That leaves two guard bits for the transform. Zeros and subnormals become 0.
2. **Decorrelating transform** (`szfp_fwd_xform`). ZFP's 1-D integer lifting transform is
   applied, followed by the negabinary mapping `(x + 0xAAAA…) ^ 0xAAAA…`. After the mapping,
   small magnitudes have leading zeros in both signs. Element 0 holds the block mean, so its
   top bits are almost always set. Elements 1–3 are usually small.
3. **Bit-plane budget**. The number of planes needed for the error bound 2^minexp is
   `P = (emax − 1022) − minexp + 4`, rounded up to a multiple of 6 (the function `planes6` in
   `szfp_pkg`). A block whose common exponent is 0, or whose P is 0 or less, codes no planes.
   A block that needs more than 48 planes is stored raw.
4. **Encoding** (`szfp_encoder`). The coded block is laid out least significant bit first:

| field   | bits      | content |
|---------|-----------|---------|
| raw     | 1         | 0 for a coded block, 1 for a raw block |
| emax    | 11        | common exponent (coded blocks only) |
| blue    | P         | the top P bits of element 0 |
| green   | up to 4 groups | groups g = 0..3 |
| red     | up to 4 groups | groups g = 4..7, present only if P > 24 |

   Each group g covers planes 63−6g down to 58−6g. It is a 2-bit header h (0–3) followed by
   the 6-bit slices of elements 1..h. The header is the index of the last of elements 1–3
   whose slice is non-zero, so trailing zero slices cost nothing.

   A raw block is the raw flag followed by the 256 original bits, 257 bits in all.

The encoder spends one cycle per region:

| block                  | cycles |
|------------------------|--------|
| raw, or no planes      | 1 |
| P ≤ 24 (blue + green)  | 2 |
| P > 24 (red as well)   | 3 |

**Chunks.** The shuffler packs blocks into 256-bit words and 6 KB chunks (192 words,
49,152 bits). A block is placed only if it and a 12-bit end marker still fit in the chunk.
Otherwise the chunk is closed and the block starts the next one. The close is the marker
`0xFFE` (raw = 0, emax = 0x7FF, a value no real coded block has) followed by zero padding. The
padding costs at most 269 bits per chunk.

Because chunks are independent, a decoder can start on any chunk without knowing the ones
before it. This is what makes the parallel decompressor possible.

**Error.** The only loss is the dropped planes and the truncation of the conversions. The
testbenches check every decoded value against the original within 2^minexp. For an absolute
error bound ε, set minexp = floor(log2 ε). For example, 1E-3 gives −10 and 1E-6 gives −20.

## Compressor (`szfp_compressor`)

The compressor's stages are: `szfp_fixpt` → `szfp_fwd_xform` → N_ENC encoders → `szfp_shuffler`.

- Transformed blocks are dealt to the encoders round-robin, and the shuffler takes them back
  in the same order. The stream order is therefore kept without tags.
- Two encoders (the default) give one block per cycle when the average block needs at most
  two cycles. Three encoders cover the worst case.
- The shuffler keeps a 768-bit accumulator and emits one word per cycle.
- Outputs `out_chunk_last` and `out_stream_last` mark the last word of each chunk and of the
  stream. The last chunk is closed like the others.

## Decompressor (`szfp_decompressor`, `szfp_decoder`)

Decoding is the hard direction, because a block's start depends on the length of the block
before it.

- Incoming words are dealt to the N_DEC decoders (default 5) one whole chunk each, round-robin.
- Each decoder has a 192-word chunk buffer and a 768-entry output buffer (four times the
  chunk size). It therefore never blocks a neighbour that is slower or faster.
- Inside a decoder, a 768-bit window refilled one word per cycle is parsed one region per
  step: the header and blue field, then green, then red.
- A decoder holds each decoded block back one step. The block just before the end marker can
  then be tagged `last`, and the rest of the chunk is skipped.
- The collector reads decoder 0 until it sees a `last` block, then moves to decoder 1, and so
  on. Output order is the input order.
- After the collector, one `szfp_inv_xform` and one `szfp_float_conv` run at one block per cycle.

At the default five decoders the decompressor sustains one word per cycle on typical data.
The testbench measures the steady state: 1500 blocks in 1499 cycles. A stream where most
blocks need three steps needs more decoders. `N_DEC` is a parameter.

## Memory arbiter (`mem_arbiter`)

DRAM is fast only for long sequential accesses. The arbiter therefore works in bursts:

- An endpoint first posts a request (address, length, direction) into a 4-deep queue.
- A write burst starts only when all of its data is already in the endpoint's 512-word write
  buffer.
- A read burst starts only when its length, plus the words already buffered and in flight
  for that endpoint, fits in the 512-word read buffer.
- Among the endpoints whose head request may start, the scheduler picks round-robin.
- Once a burst starts it runs without a break, one word command per cycle.
- Read data returns in order and is steered by a 64-entry tag FIFO.
- `ep_idle` reports an endpoint with nothing queued, buffered or in flight.

These rules mean a slow endpoint can never stall the DRAM port in the middle of a burst, nor
deadlock it.

The endpoints used by `burstz_top` are:

| endpoint | use |
|----------|-----|
| 0 | host to card |
| 1 | card to host |
| 2–4 | the three plane readers |
| 5 | the result writer |

Plane readers and the writer move one 6 KB chunk per burst. The writer posts its burst after
the compressor has handed over the whole chunk.

## Stencil engine (`stencil_engine`, `row_buffer`, `stencil_core`)

The engine computes `u' = c0·u + c1·(sum of the six neighbours)`. For the heat equation,
c0 = 1 − 6α and c1 = α. Cells on the x and y faces of a plane are copied unchanged. The z
boundary planes are not swept; the host keeps them.

- **Lock step.** The engine takes one word from each of the three decompressed planes at
  once, and only when all three are present.
- **Row buffers.** Each plane has a `row_buffer`: two row memories used in turn. For the
  incoming word at column x of row r, it returns the words at x of rows r−2 and r−1 one cycle
  later.
- **Core input.** The nine words of a column, three planes by three rows, go to the
  `stencil_core`. The core computes output row r−1. Its x neighbours come from the words on
  either side, so each output word is released when the next column arrives.
- **Row and plane ends.** One idle slot after each row releases the row's last word. One
  flush row after the last input row produces the last output row.
- **Pipeline.** The core runs four lanes of double-precision add and multiply in five stages.
  The adders and multipliers truncate and flush subnormals to zero.
- **Output FIFO.** A 16-entry FIFO absorbs backpressure. The engine issues a new column only
  while the FIFO has room for everything in the pipeline.
- **Throughput.** A plane of R rows of W words takes (W+1)·(R+1) slots. That is one word per
  cycle apart from the row and plane ends.

The row memories hold up to `MAX_ROW_WORDS` = 256 words, which is 1024 doubles per row.
`n_rows` is 16 bits.

## Top level (`burstz_top`)

For one sweep step, the host first loads the three compressed planes into DRAM through
endpoint 0. It then sets these inputs and pulses `start`:

- `src_base` and `src_chunks` for each plane;
- `dst_base`;
- `row_words`, `n_rows`, `minexp`, and the coefficients `c0`, `c1`.

`done` rises once the last chunk of the new plane is in DRAM, and `out_chunks` gives its size.
A full time step is the host looping over z. DRAM addresses count 256-bit words, and 25 bits
cover 1 GB. The DRAM port issues one word per command, and read data comes back in command
order.

## Where this design departs from, or adds to, the original

- **Chosen here.** These details are this design's own: the bit order and header meaning, the
  +4 guard planes, the negabinary step, the end-of-chunk marker, the decoder's window, the
  engine's row-end slot and flush row, the truncating floating-point units, copying the
  boundary cells, one burst per chunk, and all buffer depths apart from the decoder's.
- **Padding.** The original quotes less than 32 bytes of padding per chunk. Here up to
  34 bytes can be lost, because a raw block is 257 bits.
- **Decoder worst case.** The original needs eight decoders for wire speed in its worst case.
  The worst case of this decoder was not characterised.
- **Not built.** The PCIe core and DMA, the DDR3 controller, and the host software. The
  uncompressed comparison modes are not built either: there is no bypass around the codec.

## Simulating

Every testbench in `tb/` checks itself and prints `TB_RESULT checks=… failures=…`. They use
reference models written in SystemVerilog:

- `szfp_ref_pkg` is a bit-serial sZFP encoder and decoder working on `real`.
- `stencil_ref_pkg` is the stencil in `real` arithmetic.
- `dram_model` is a behavioural DRAM with latency and row-change penalties.

| testbench | what it covers |
|-----------|----------------|
| `tb_szfp_fixpt` | fixed-point and float conversion |
| `tb_szfp_xform` | forward and inverse transforms |
| `tb_szfp_encoder` | encoder, including the 1-, 2- and 3-cycle timing |
| `tb_szfp_decoder` | a single decoder |
| `tb_szfp_compressor` | whole compressor, bit-exact against the reference stream |
| `tb_szfp_decompressor` | whole decompressor, error bound and throughput |
| `tb_mem_arbiter` | burst rules, data integrity, read-room and write-data rules |
| `tb_stencil_engine` | row buffers, core and engine with random gaps and backpressure |
| `tb_burstz_top` | one sweep step through the whole design at default parameters |

`tb_burstz_top` covers one sweep step:

1. It loads three 64×160 planes through the host endpoint.
2. It runs the step.
3. It reads the result back through the other host endpoint and decodes it.
4. It checks each cell against the reference stencil within the error bound.

It also counts how often each mechanism occurs, and fails if any never does:

- raw blocks;
- three-cycle encodes;
- decoder hand-overs across all five decoders;
- arbiter holds for write data and for read room;
- engine input stalls;
- chunk closes.

To run the top-level testbench with plain Verilator:

```
verilator --binary --timing -Wno-fatal --top-module tb_burstz_top \
  rtl/szfp_pkg.sv rtl/fp64_pkg.sv tb/szfp_ref_pkg.sv tb/stencil_ref_pkg.sv \
  $(ls rtl/*.sv | grep -v _pkg) tb/dram_model.sv tb/tb_burstz_top.sv
./obj_dir/Vtb_burstz_top
```

For another testbench, replace the top module and the last file. It takes about half a
minute to build and under a second to run.
