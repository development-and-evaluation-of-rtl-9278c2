# CNN face recognizer with a bandwidth-saving image segmentation unit

A convolutional neural network works on overlapping windows of its input
image. Each pixel belongs to many windows, so a naive implementation reads it
from the frame buffer many times. When the frame buffer is a single-port RAM,
only one pixel per clock can leave it. The array of processing elements then
spends most of its time waiting for data.

This RTL implements a small Neocognitron-style face recognizer (32x32 grey
image in, 256-byte recognition code out) as a SIMD array:

- a **control unit** (CU);
- a **memory unit** (MU);
- a **segmentation unit** (SU);
- **20 processing elements** (PEs).

The SU copies image data from the single-port frame buffer into five
independent one-port block-RAM buffers, so that 20 PEs can then read in
parallel. Two SU designs are provided:

- **Method 2** (the default, `SEG_METHOD = 2`) reads every pixel that five
  neighbouring windows share only once. One clock writes it into up to five
  buffers, each at its own address. A twisted-ring (Johnson) counter picks the
  buffers. Each image needs 90,000 frame-buffer reads.
- **Method 1** (`SEG_METHOD = 1`) is the interleaved scheme. It reads every
  pixel of every window separately and writes each read to exactly one buffer.
  Each image needs 250,000 reads.

At 50 MHz, one image takes 153,859 clocks (3.08 ms) with method 2 and
313,859 clocks (6.28 ms) with method 1.

## The network

The recognizer evaluates a four-layer hierarchy. Simple layers (S) compare a
receptive field with trained weight vectors using the Manhattan distance
(sum of absolute differences). Complex layers (C) pool a window of their
input plane.

| layer | input | field | stride | features / planes | output |
|---|---|---|---|---|---|
| S1 | 32x32 image | 5x5 pixels | 1 | 4 | 28x28x4 |
| C1 | S1 planes | 4x4 | 2 | 4 | 13x13x4 |
| S2 | C1 planes | 4x4x4 | 1 | 16 | 10x10x16 |
| C2 | S2 planes | 4x4 | 2 | 16 | 4x4x16 = recognition code |

The design never computes a layer over the whole image at once. It works in
**large receptive fields**. A large field is the 14x14 pixel area that one
S2 cell depends on:

- 10x10 S1 positions;
- 4x4 C1 positions;
- one S2 position.

The image holds 10x10 large fields at a stride of two pixels. They are
processed one after the other. Inside a large field, the 100 overlapping 5x5
**small receptive fields** are processed in parallel. Because neighbouring
large fields overlap, S1 and C1 values are recomputed for each of them. The
design deliberately trades this arithmetic for regular, local data movement.

Arithmetic (8-bit activations everywhere):

- S1 = min(255, (sum of 25 |pixel - w|) >> 5)
- C1 = minimum of the 4x4 window
- S2 = min(255, (sum of 64 |c1 - w|) >> 6)
- C2 = minimum of the 4x4 window

## Schedule of one large field

```
SU   : copy 100 small field vectors into BRAM 0..4      900 clk (method 2) / 2500 clk (method 1)
S1   : 20 passes x 25 clk, 20 PEs = 5 BRAMs x 4 features     500 clk
C1   : 4 passes x 16 clk, PE 4f+cx = plane f, column cx       64 clk
S2   : 1 pass x 64 clk, C1 values broadcast, PE g = feature g  64 clk
       -> 16 S2 values stored at the field's position, one_simp2_end_flag
```

Parallelism falls from layer to layer:

- S1 uses all 20 PEs on five small fields at once.
- C1 uses 16 PEs.
- S2 is one receptive field seen by 16 PEs, one feature each.

After the 100th field, C2 runs 16 passes of 16 clocks over the stored
10x10x16 S2 maps and writes the code. With the handshakes and the two idle
clocks between layers, a field costs about 636 clocks of processing plus its
segmentation time.

## Filling the buffers: the segmentation unit

Each one-port BRAM holds 1 KiB, split into 32 partitions of 32 bytes. A
partition holds one 25-pixel small field vector, row by row: pixel (py, px)
is at offset 5*py + px. Each large field uses 20 partitions in each of the
five BRAMs. In S1, the CU reads the same address from all five BRAMs. Each
BRAM feeds the four PEs that compare its vector with the four S1 weight
vectors.

The two methods differ in which BRAM holds which small field, and therefore
in how often a pixel must be fetched.

### Method 1: interleaved (`seg_unit_m1`)

Three counters nest:

- `c0` is the pixel within the vector (0..24);
- `c1` is the vector within a BRAM (0..19);
- `c2` is the BRAM (0..4).

BRAM `c2` receives small fields 20*c2 .. 20*c2+19, taken in row order across
the 10x10 grid. Every BRAM port sees the same address, `c1*32 + c0`. The
write enable is `c2` decoded to one-hot. The image address is

    (2*lrf_y + v/10 + c0/5) * 32 + 2*lrf_x + v%10 + c0%5,   v = 20*c2 + c1

Each pixel goes to one BRAM, so a large field costs 25 x 100 = 2500 reads.

### Method 2: shared columns, parallel writes (`seg_unit_m2`)

Method 2 assigns small field (row sy, column sx) to BRAM `sx mod 5`,
partition `2*sy + sx/5`. Five horizontally neighbouring fields therefore sit
in five different BRAMs. Together they cover only nine image columns. The SU
walks those nine columns `t = 0..8`, five pixels per column (`j = 0..4`). That
makes 45 reads per group of five fields. Pixel (j, t) belongs to field `b`
exactly when `b <= t <= b+4`. It is written to every such BRAM in the same
clock, each BRAM at its own address:

    addr_b = (2*sy + half) * 32 + 5*j + (t - b)

The set of enabled BRAMs per column is the sequence of a 5-bit twisted ring
counter:

| column t | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|---|
| port_en (b4..b0) | 00001 | 00011 | 00111 | 01111 | 11111 | 11110 | 11100 | 11000 | 10000 |

The counter is loaded with `00001` at the start of each group of five fields
and steps once per column. One large field is 10 rows x 2 groups x 45 reads =
900 reads. For the image that is 90,000 reads instead of 250,000, which is
2.78 times fewer.

In both units the image RAM answers one clock after the address. The BRAM
writes, their enables and their per-BRAM addresses come from a pipeline
register one stage behind the read. `done` is high on the clock of the last
write.

## Memory unit contents

| store | size | written by | read by |
|---|---|---|---|
| image RAM | 1024 x 8, single port | host (idle only) | SU |
| one-port BRAM 0..4 | 5 x 1024 x 8 | SU (PH_SEG) | CU address, S1 |
| weight store | S1 4x25, S2 16x64 bytes | host | index common to all features |
| S1 maps | 4 x 10x10 registers | 20 results at a time | 16 reads per clock (C1) |
| C1 values | 64 registers | 16 at a time | broadcast (S2) |
| S2 maps | 16 banks x 100 | 16 per field | common address (C2) |
| recognition code | 256 x 8 | 16 at a time | host |

All reads are registered. The CU issues addresses on one clock. Data and
weights reach the PEs on the next clock, and the PE results are written back
one clock after that.

## Using the top level

`cnn_face_recognizer #(SEG_METHOD = 2)` has the following ports. `clk` is
the clock and `rst_n` is a synchronous active-low reset. The reset clears
control state only.

| port | dir | width | use |
|---|---|---|---|
| img_we, img_waddr, img_wdata | in | 1, 10, 8 | write pixel (y,x) at y*32+x while idle |
| w_we, w_layer, w_feat, w_idx, w_data | in | 1, 1, 4, 6, 8 | write weight: layer 0 = S1 (feature 0..3, index 0..24, row-major 5x5), layer 1 = S2 (feature 0..15, index plane*16 + row*4 + column) |
| start | in | 1 | one-clock pulse starts a recognition |
| busy, done | out | 1 | busy while running; done pulses on the last code write |
| one_simp2_end_flag | out | 1 | pulses when a large field's 16 S2 cells are stored |
| code_raddr, code_rdata | in/out | 8, 8 | code byte feature*16 + qy*4 + qx, one clock latency |

Do not write the image or the weights while `busy` is high. An assertion
flags a host write that collides with an SU read.

## Where this design fills gaps or departs

The following points are this design's own choices, not part of the
published description:

- **Complex-cell function.** C1 and C2 take the minimum of their window. For
  distance-valued simple cells, smaller means a better match.
- **Activation width.** All activations are 8 bits, with the S1 and S2 shifts
  listed above.
- **Weights.** The weight vectors are trained off-line and no values are
  published. They are therefore loaded through a host port instead of being
  fixed in ROM.
- **Frame buffer.** The single-port frame buffer is modelled inside the
  memory unit. A design with an external frame buffer would bring the SU's
  image port (`img_re`, `img_addr`, `img_rdata`) out of the chip. The
  one-read-per-clock limit, which is the point of the design, is the same
  either way.
- **Method 2 read order.** In method 2, the order of reads inside a group
  (column by column, top to bottom) and the window-to-BRAM assignment are
  reconstructed. The constraints are that a twisted ring counter drives the
  port enables, that one group takes 45 clocks, and that the whole image
  takes 90,000 reads. Any order that meets all three gives the same buffer
  contents.
- **Method 1 BRAM count.** Method 1 uses five BRAMs of 20 vectors, like
  method 2.
- **Interfaces.** The start/done handshakes, the host ports, the two idle
  clocks between layers and the pass order of C1, S2 and C2 are this design's
  own.
- **Overlap.** Segmentation and processing of a large field do not overlap.
  With that, the clock counts land within 3 % of the published image times
  (3.17 ms and 6.36 ms at 50 MHz).
- **Layer buffers.** Results passed between layers live in register maps
  (S1, C1) and banked memories (S2). The CU's read addresses rearrange them
  into the next layer's receptive fields. There are no separate queues
  between layers.
- **Not checked.** Maximum clock frequency and FPGA resource use were not
  evaluated.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| tb_cnn_face_recognizer | full image at default parameters (method 2): 256 code bytes and all 1600 S2 values against a behavioural reference (`cnn_ref_pkg`); 90,000 image reads; 10,000 five-BRAM writes; phase counts; total clocks within 5 % of 158,500; then a second image with the same weights |
| tb_cnn_face_recognizer_m1 | the same with `SEG_METHOD = 1`: 250,000 reads, only single-BRAM writes, total within 5 % of 318,000 |
| tb_seg_unit_m1 / _m2 | exact buffer layout for corner and random large fields, reads per field (2500 / 900), start-to-done latency |
| tb_control_unit | field order, operand clocks and vectors per layer, every read address, write-back strobes and addresses, 634 clocks from `su_done` to the S2 write |
| tb_pe_array, tb_pe | operand routing per layer; distance and minimum modes |
| tb_memory_unit | every store through its ports |
| tb_image_ram, tb_one_port_bram, tb_weight_store, tb_johnson_counter | storage and counter behaviour |

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/cnn_pkg.sv tb/cnn_ref_pkg.sv tb/tb_cnn_face_recognizer.sv \
    --top-module tb_cnn_face_recognizer -o sim
./obj_dir/sim
```

The full-size end-to-end simulation takes well under a second.

## Files

`rtl/` contains the following files:

- `cnn_pkg.sv`: sizes, types and the window-to-BRAM mapping.
- `cnn_face_recognizer.sv`: the top level.
- `control_unit.sv`
- `memory_unit.sv`
- `seg_unit_m1.sv` and `seg_unit_m2.sv`
- `johnson_counter.sv`
- `pe_array.sv` and `pe.sv`
- `image_ram.sv`, `one_port_bram.sv` and `weight_store.sv`

`tb/` contains one testbench per module and the reference model
`cnn_ref_pkg.sv`.
