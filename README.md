# A dataflow JPEG encoder: twelve actors and blocking FIFOs

This is a baseline JPEG encoder for 4:4:4 colour images, built as a *dataflow
process network*. The encoder is split into small independent actors. Each
actor owns one step of the algorithm, and actors talk only through bounded
point-to-point FIFOs. A write to a full FIFO blocks, and so does a read from
an empty one. No actor knows anything about the others, and no scheduler is
needed: each stage runs as soon as it has data and room for its result. The
steady-state throughput of the whole pipeline is that of its slowest stage.

The partitioning is the twelve-actor topology of the JPEG dataflow case study
on a Virtex-II Pro FPGA. In that study every actor was a C program on its own
MicroBlaze soft processor, linked by Fast Simplex Link (FSL) FIFOs. Here every
actor is a hardware block. Each block has the same inputs and outputs as the
program it replaces and blocks in the same way. The graph, the channel
semantics and the order of the JPEG steps follow that design. The arithmetic
inside each actor, the token formats and the handshakes are this design's
own choices.

## The actor graph

```
                          RGB pixels (MCU by MCU)
                                   |
                        block_split2: even MCUs / odd MCUs
                     +-------------+-------------+
                 color_convert C_A          color_convert C_B
                   |    |    |                |    |    |
                   Y    Cb   Cr   (6 FIFOs)   Y    Cb   Cr
                   +----|----|-------+--------+    |    |
                        +----|-------|--+----------+    |
                             +-------|--|--+------------+
                         block_merge2 per channel (alternate blocks)
                                     |  |  |
              level_shift_dct       L/D L/D L/D     192 cycles / block
                                     |  |  |        (FIFO)
              quantizer              Q  Q  Q        luma table on Y
                                     |  |  |        (FIFO)
              huffman_encoder        H  H  H        run-length + Huffman
                                     |  |  |        (FIFO)
              bitstream_writer        \ | /
                                        W           Y, Cb, Cr block by block
                                        |
                             FF D8 header, scan bytes ... FF D9
```

There are 12 actors: 2 colour converters, 3 level-shift/DCT, 3 quantizers,
3 Huffman coders and 1 writer. They are joined by 15 `fsl_fifo` channels of
16 entries each. Colour conversion is shared between two actors by giving
them alternate MCUs. This is the only place where work is split by data
rather than by channel. Each level-shift/DCT actor reads whole blocks
alternately from the two converters (`block_merge2`), which restores the
MCU order. From there on, each colour channel has its own chain of three
actors. The three variable-length streams meet again in the write actor.

## How the three streams converge

This is the subtle part of the design. A 4:4:4 JPEG scan is one continuous
bit string in which the blocks are interleaved: the Y block of MCU 0, its Cb
block, its Cr block, then MCU 1, and so on. The bits are not byte-aligned at
block boundaries. The three Huffman actors, however, run independently and
at different speeds.

Each Huffman actor therefore emits *tokens*, not bytes. A token
(`jpeg_pkg::vlc_tok_t`, 32 bits) is `{last, len[4:0], bits[25:0]}`. It carries
one Huffman code followed by its magnitude bits, at most 16 + 10 = 26 bits,
right-aligned. `last` is set on the final token of a block: EOB, or the code
of coefficient 63 when that coefficient is nonzero.

Each image starts with the 589 bytes of marker segments that make the output
a complete baseline JPEG file: SOI, both quantization tables (DQT, in
zig-zag order), the frame header (SOF0: 8-bit samples, the image height and
width, three components with 1×1 sampling, Y on tables 0, Cb and Cr on
tables 1), the four Huffman tables (DHT) and the scan header (SOS). The
bytes come from a constant built from the same tables the actors use
(`jpeg_pkg::JPEG_HEADER`). Only the four size bytes are filled in at run
time, from `image_height` and `image_width`. The writer starts the header
when the first Y token of an image is waiting, so the header overlaps the
time the pipeline takes to fill. No JFIF APP0 segment is written; most
decoders accept the file without it.

After the header, the writer keeps a turn pointer. It offers `ready` only to the channel whose
turn it is, taking tokens until one has `last` set, and then moves to the
next channel. Tokens of the other channels wait in their FIFOs. When those
FIFOs fill up, the Huffman actors upstream stall. The writer appends each
token to a 40-bit bit buffer. It takes a token only when fewer than 8 bits
are waiting, so the buffer never holds more than 7 + 26 = 33 bits. It emits
one byte per cycle while 8 or more bits are buffered, and after every 0xFF
it inserts a stuffed 0x00. After the last MCU of the image it pads the last
byte with 1 bits, appends the EOI marker `FF D9`, and raises `m_last` on the
`D9`.

## Inside the actors

**Colour conversion** (`color_convert`). This actor applies the JFIF
equations in 16-bit fixed point. The coefficients are scaled by 2^16:
19595, 38470 and 7471 for Y; 11059, 21709 and 32768 for Cb; 32768, 27439
and 5329 for Cr. Y rounds half up. Cb and Cr add 2^15 − 1 before the
shift, so no result exceeds 255. The actor converts one pixel per cycle and
has three independent output handshakes. It takes a new pixel only when
all three output registers are free, which is a blocking write to three
channels at once.

**Level shift and DCT** (`level_shift_dct`). The DCT is separable and uses
the integer basis A(u,x) = round(c(u)/2 · cos((2x+1)uπ/16) · 2^13). This
basis is built in `jpeg_pkg::dct_basis` from the nine values of
cos(kπ/16)/2. The actor works in three phases:

1. **Load.** 64 samples are loaded, each minus 128.
2. **Row pass.** This pass computes t(y,u) = ⌊(Σx A(u,x)·f(y,x) + 2^9) / 2^10⌋,
   one value per cycle. Each value is an eight-term dot product on eight
   multipliers.
3. **Column pass.** This pass computes
   F(v,u) = ⌊(Σy A(v,y)·t(y,u) + 2^15) / 2^16⌋ and streams each result out
   as it is computed, in row-major order.

A block takes 64 + 64 + 64 = 192 cycles, and the next block is loaded only
after the last coefficient has left. Results stay within 2 of the exact DCT.
This actor is deliberately the slowest stage, as it was in the processor
version of the same topology.

**Quantization** (`quantizer`). The quantizer stores a block, then emits it
in zig-zag order. Each coefficient S is divided by its table entry Q, and
the quotient is rounded to nearest with halves away from zero:
sign(S)·⌊(|S| + ⌊Q/2⌋)/Q⌋. The division is combinational. The tables are
the example luminance (Y) and chrominance (Cb, Cr) tables of the JPEG
standard, selected by the `CHROMA` parameter. There is no quality scaling.
A block takes 64 cycles in and 64 cycles out.

**Run-length and Huffman coding** (`huffman_encoder`). Coefficient 0 is
coded as the difference from the previous DC of the same channel. The DC
predictor restarts at zero after the last block of each image. AC zeros are
counted into a run. A nonzero value emits the code of the symbol
(run << 4 | size) followed by its magnitude bits. A negative value v is
sent as the low `size` bits of v − 1. A run of 16 or more zeros before a
nonzero value first emits one ZRL (0xF0) per 16 zeros. While it does this,
the actor holds its input for one cycle per ZRL. Zeros that reach the end
of the block become one EOB (0x00).

The code tables are the example Huffman tables of the JPEG standard. They
are built at elaboration by the canonical code assignment of the standard,
from each table's BITS counts and symbol list (`jpeg_pkg::build_table`).
Only the symbols with codes shorter than 16 bits are listed. The rest of
each AC list is every remaining run/size symbol in ascending order, so it
is generated rather than listed.

**Channels** (`fsl_fifo`). A channel is a circular buffer of DEPTH words with
pointers one bit wider than the address. `s_ready` (not full) and `m_valid`
(not empty) depend only on the pointers, so there is no combinational path
through a channel. A token can be read one cycle after it is written.

**Timer** (`cycle_timer`). The timer is a free-running 32-bit cycle counter.
It starts on the first pixel taken while no image is in flight and stops on
the last byte of that image. The result is `image_cycles`, the figure by
which the topologies are compared.

## Performance

For a 40-MCU image with random gaps at the input and random back-pressure
at the output, the end-to-end test measures 8,292 cycles for a 1,678-byte
file, about 207 cycles per MCU. This is the 192-cycle block time of the
level-shift/DCT actors plus the pipeline fill and the part of the 589-byte
header that does not overlap the fill. On long images the cost per MCU
approaches 192 cycles. The three DCT actors run in parallel on the three
channels. Every other stage is at least twice as fast: the quantizer needs
128 cycles per block, the colour converters 64 cycles per MCU each, and the
Huffman and write actors about one cycle per coefficient or token. So
deepening the FIFOs does not raise throughput. Only a faster DCT does.
Large FIFOs would only absorb jitter from data-dependent stages, such as the
Huffman coders and the writer.

## Interface of `jpeg_encoder_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `image_width`, `image_height` | in | 16 | image size in pixels; hold stable while an image is in flight |
| `s_pix`, `s_valid`, `s_ready` | in/in/out | 24 | RGB pixel (`jpeg_pkg::rgb_t`, R in bits 23:16) |
| `m_data`, `m_valid`, `m_ready`, `m_last` | out/out/in/out | 8 | bytes of the JPEG file; `m_last` on the final byte (EOI) |
| `cycle_count` | out | 32 | free-running cycle counter |
| `image_cycles`, `image_cycles_valid` | out | 32 | cycles from the first pixel to the last byte of the last timed image |

Pixels must arrive MCU by MCU: the 64 pixels of each 8×8 tile in row-major
order, and the tiles in scan order. A raster image must be reordered by the
producer, or eight lines must be buffered in front of the encoder. When the
width or height is not a multiple of 8, the producer sends full edge tiles
(for example by repeating the last column or row). The encoder computes the
MCU count as ⌈width/8⌉·⌈height/8⌉, which must not exceed 65,535. A token
moves on a rising edge where its valid and ready are both high. A new image
may follow immediately after the last pixel of the previous one.
The image size must not change until the previous image's last byte has
left, because the Huffman actors and the writer count blocks independently.

The only top-level parameter is `FIFO_DEPTH` (default 16, a power of two).

## Where this differs from the processor version

- The actors are hardware, not programs on soft processors. As a result,
  nothing here corresponds to the processors, their shared debug bus, the
  UART or the debug module. The timer is kept as a dedicated block.
- The result leaves as a byte stream with a valid/ready handshake,
  instead of being written to memory.
- The quantization and Huffman tables are fixed at elaboration. They are
  the standard's example tables, as in the original, with no quality
  factor and no run-time loading.
- The choice of which converter handles which MCU (even/odd) and the FIFO
  depth of 16 are this design's own.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The reference
model shared by the testbenches is `tb/jpeg_ref_pkg.sv`. It is an
independent behavioural JPEG encoder: fixed-point colour conversion, a DCT
whose basis is computed with `$cos`, table quantization and a bit-level
Huffman writer with stuffing, plus the marker segments, which it assembles
segment by segment with computed lengths.

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/jpeg_pkg.sv tb/jpeg_ref_pkg.sv rtl/*.sv tb/tb_jpeg_encoder_top.sv \
    --top-module tb_jpeg_encoder_top
./obj_dir/Vtb_jpeg_encoder_top
```

Replace the testbench file and the top-module name to run another test.
Each test is described below.

- **`tb_jpeg_encoder_top`** runs at the default parameters. It encodes two
  images back to back (64×40 pixels, and 20×14 pixels padded to 3×2
  MCUs), built from four kinds of block:
  gradients, a checkerboard with energy only at zig-zag position 63 (which
  forces ZRLs and a block without EOB), noise (which produces 0xFF bytes)
  and flat saturated colour. The test compares every output byte, header
  included, and both
  `m_last` positions with the reference. It also requires that each
  mechanism happen at least once: input stalls, starved DCT inputs, MCUs
  converted by the second converter, ZRLs, EOBs, stuffed bytes, output
  back-pressure and the DC restart at the second image. Finally, it checks
  the timer against its own cycle count and the throughput against the DCT
  bound.
- **`tb_color_convert`** runs random pixels and the corners of the RGB cube
  under independent back-pressure on each output. It checks the results
  against the reference and against the real-valued equations, and checks
  a throughput of one pixel per cycle.
- **`tb_level_shift_dct`** checks the results exactly against the
  fixed-point reference, within 2 of the exact DCT, and checks the
  192-cycle block time.
- **`tb_quantizer`** runs both tables on random values, half-step values
  and extremes, and checks the 128-cycle block time.
- **`tb_huffman_encoder`** compares hand-made blocks against codes copied
  from the standard's tables: DC sizes, AC run/size codes, ZRL, EOB, a
  block ending in a nonzero coefficient and the predictor restart. It also
  runs random sparse blocks against the reference.
- **`tb_bitstream_writer`** feeds random tokens that arrive early or late
  on all three channels, with frequent 0xFF bytes, over two images of
  different sizes. It compares every byte and checks SOI and the size
  fields of each frame header.
- **`tb_fsl_fifo`** and **`tb_cycle_timer`** check the FIFO ordering,
  full and empty behaviour and latency, and the timer's counting.

## Files

`rtl/jpeg_pkg.sv` holds the shared types (`rgb_t`, `coef_t`, `vlc_tok_t`)
and the tables: zig-zag, quantization, Huffman, DCT basis and the file
header. The actors are
`color_convert`, `level_shift_dct`, `quantizer`, `huffman_encoder` and
`bitstream_writer`. The channels are `fsl_fifo`, the MCU distribution is
`block_split2` and `block_merge2`, the timer is `cycle_timer`, and the top
is `jpeg_encoder_top`. To change a table, edit its BITS counts and leading
symbols, or the quantization array, in `jpeg_pkg`. Every actor derives its
tables from there.
