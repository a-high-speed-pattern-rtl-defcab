# Repetitive-padding accelerator for MPEG-4 macroblocks

MPEG-4 codes video objects of arbitrary shape. A 16 x 16 macroblock on the
object's edge holds object pixels and non-object pixels, marked by the
macroblock's binary shape block ('1' = object). Motion estimation and
compensation need the non-object pixels filled in. **Repetitive padding** does
that in two passes:

1. **Rows.** Each non-object pixel takes a value from the nearest object pixels
   in its row. Between two object pixels it takes their average. Towards an end
   of the row it takes a copy of the single object pixel on that side. A row
   with no object pixel stays as it is.
2. **Columns.** The same is done along each column. Every row that held an
   object pixel now counts as object, so columns are filled from the padded
   rows.

This RTL pads one macroblock at a time. Its core is a small combinational
**pattern decoder**. In one clock cycle it finds one run of non-object pixels
(a *hole*) in a row or column, the two pixels that bound it and the hole's
write mask. Each cycle fills one hole. The design follows the architecture
published as *"A High-Speed Pattern Decoder in MPEG-4 Padding Block Hardware
Accelerator"*. Where that publication leaves things open, the choices made here
are marked below.

## One case instead of three: the added end bits

A line of shape bits can need padding in three ways. Reading from the right
end, these are:

* the line starts with non-object pixels: copy the first object pixel into them;
* a hole lies between two object pixels: fill it with their average;
* the line ends with non-object pixels: copy the last object pixel into them.

A decoder that tells these cases apart is irregular. The trick is to put an
extra object bit at each end of the line. The N = 16 shape bits become an
18-bit vector `a`:

```
a[17]      a[16] ... a[1]      a[0]
 '1'    shape bits 15 ... 0     '1'
```

After this, every line is "object bits with holes", and every hole has an
object bit on both sides. The pixel value of an added bit reads as **zero**.
So the sum of the two bounding pixels gives the right result in every case:

* both bounding bits are real pixels: the average is `sum >> 1`;
* one bounding bit is an added end bit: `sum` is the copy of the other pixel.

## The pattern decoder (`pattern_decoder`, `first_zero_detector`)

The building block is the **first-zero detector**. It scans from bit 0
upwards. Its output bit `i` is '1' if any of input bits `0..i` is '0'. That is
a thermometer code that switches on at the first zero. In silicon it is a pass
transistor chain. Here it is a prefix OR of the inverted input.

The decoder uses two of these detectors:

| signal | formula | meaning |
|---|---|---|
| `b` | first_zero(`a`) | '1' from the first hole bit upwards |
| `c` | `~(a & b)` | '0' only at the object bits above the hole |
| `d` | first_zero(`c`) | '1' from the object bit that closes the hole: the **second source** |
| `e` | `b ^ d` | exactly the hole: the **destination mask** |
| first source | `b` shifted one bit towards bit 0 | '1' from the object bit that opens the hole |
| `next` | `a[16:1]` all '1' or all '0' | nothing left to pad in this line |

Worked example (bit 17 on the left, bit 0 on the right; `x` = don't care):

```
a  = 1 xxxxxxxxx 1 0000 111      hole at bits 3..6, sources at bits 2 and 7
b  = 1 111111111 1 1111 000
c  = 0 (~x)       0 1111 111
d  = 1 111111111 1 0000 000
e  = 0 000000000 0 1111 000
```

Every source address stays a thermometer code. The source's position is the
lowest '1' of the code. The pixel memory turns the code into a one-hot select
with `t & ~(t << 1)`.

Because `a[0]` is always '1', the lowest stage of `b`, `d` and `e` is always
'0'. Synthesis removes that logic by itself.

## Filling a hole (`pixel_select`)

The pixel memory reads the two source pixels of the current line. Two
comparators check the source addresses:

* Is the first source the added bit at the right end? Its code has every bit set.
* Is the second source the added bit at the left end? Its code has only bit 17 set.

If exactly one of the two is true, the selector writes the plain 9-bit sum,
truncated to 8 bits. That sum is the copy of the one real pixel. Otherwise it
writes `sum >> 1`, the average rounded down. For example, 33 and 25 give 29. If
both were true the line would be empty. `next` is high for an empty line, so
nothing is written.

## Controller and schedule (`padding_fsm`)

The controller has four states: `ST_LOAD`, `ST_HOR_PAD`, `ST_VERT_PAD` and
`ST_STORE`.

* **ST_LOAD** accepts 16 rows from the input stream, one per handshake. Each
  row is 16 pixels and 16 shape bits.
* **ST_HOR_PAD** handles one row at a time. The row's shape sits in a shape
  register, which feeds the decoder with the two end bits added.
  * While `next` is low, each cycle fills one hole. The pixel memory writes the
    selected value under the mask `e`. The shape register and the shape memory
    both take `shape | e`.
  * When `next` goes high, the register loads the next row at the following
    clock edge. The shape memory already shows that row on a separate
    look-ahead read port.
* **ST_VERT_PAD** does the same along the 16 columns. It reads the shape as
  written back by the row pass, so a row that had any object pixel is now all
  '1'.
* **ST_STORE** streams the 16 padded rows out.

A line therefore costs **holes + 1 cycles**. Holes are counted with the end
bits added. An empty or full line costs 1 cycle. Example row
`1100011100011000`:

| cycle | shape register (18 bit) | first source code | second source code | write mask |
|---|---|---|---|---|
| 1 | `111000111000110001` | from bit 0 | from bit 4 | `000000000000001110` |
| 2 | `111000111000111111` | from bit 5 | from bit 9 | `000000000111000000` |
| 3 | `111000111111111111` | from bit 11 | from bit 15 | `000111000000000000` |
| 4 | `111111111111111111` | `next` = 1, the next row enters | | |

Padding one macroblock takes 32 cycles plus the total number of holes in its
rows and columns. The worst case is 32 + 16·8 + 16·8 = 288 cycles. Loading
and storing take 16 handshakes each, and they are not overlapped with padding.

The critical path lies inside one cycle: shape register → decoder (two
chained 18-bit first-zero detectors) → one-hot read of two pixels → 8-bit add
→ masked write. The published transistor-level decoder is reported at 0.5 ns
in 0.25 µm CMOS. That figure says nothing about this RTL on another process.

## Memories (`pixel_memory`, `shape_memory`)

Both memories are register arrays, 16 x 16 x 8 bit for pixels and 16 x 16 bit
for shape. Any row or column can be read or written in one cycle.

The pixel memory has:

* two thermometer-addressed reads (the added end positions read zero);
* one masked line write;
* a row write port for loading and a row read port for storing.

The shape memory has:

* a line read port, which the controller points at the next line;
* a line write port for the write-back;
* a row write port for loading.

## Interface of `padding_block`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous, active-low reset to `ST_LOAD` |
| `in_valid` / `in_ready` | in / out | 1 | input handshake; `in_ready` is high in `ST_LOAD` |
| `in_pix` | in | 16 x 8 | one row, `in_pix[i]` = pixel i |
| `in_shape` | in | 16 | one row of shape bits, '1' = object |
| `out_valid` / `out_ready` | out / in | 1 | output handshake; `out_valid` is high in `ST_STORE` |
| `out_last` | out | 1 | marks the 16th output row |
| `out_pix` | out | 16 x 8 | one padded row |
| `state` | out | 2 | controller state (`padding_pkg::pad_state_e`) |

Rows go in and come out in order 0..15. A beat transfers on a rising edge
where valid and ready are both high. `in_ready` is low outside `ST_LOAD`, so
the next macroblock can be loaded only after the 16th output row.

Parameters:

* `N` (default 16) is the line length. An 8 x 8 chrominance block can be padded
  by an instance with `N = 8`.
* `PIX_W` (8) lives in `padding_pkg`.
* `LW` is derived from `N`. Leave it alone.

## Files

| file | content |
|---|---|
| `rtl/padding_pkg.sv` | pixel width, state and direction enums |
| `rtl/first_zero_detector.sv` | thermometer code of the first zero |
| `rtl/pattern_decoder.sv` | source/destination codes and `next` |
| `rtl/pixel_select.sv` | comparators, adder, shift, multiplexer |
| `rtl/pixel_memory.sv`, `rtl/shape_memory.sv` | inner memories |
| `rtl/padding_fsm.sv` | controller |
| `rtl/padding_block.sv` | top level, including the one-bit first-source shifter |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_padding_block_chroma.sv` | the end-to-end test on an 8 x 8 block |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
For example, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/padding_pkg.sv \
    tb/tb_padding_block.sv --top-module tb_padding_block -Mdir obj
./obj/Vtb_padding_block
```

`tb_padding_block` runs the top at its default size. It checks every output
pixel against a reference written in the testbench straight from the padding
definition above. It also checks the cycle count of every macroblock and the 4
cycles of the example row. Its inputs are:

* directed blocks: the example row, an empty block, a full block, and single
  object pixels;
* 300 random blocks of varying density, some with empty rows;
* random gaps on the input stream and random stalls on the output stream.

It counts how often each mechanism happened: averaged fills, copies from
either end, empty-line skips, full lines, input gaps and output stalls. Any
mechanism that never happened counts as a failure.

The unit testbenches compare against the same kind of independent models:

* `tb_first_zero_detector`, `tb_pattern_decoder` and `tb_pixel_select` cover
  directed and random vectors, including the worked examples above;
* `tb_pixel_memory` and `tb_shape_memory` check against array models;
* `tb_padding_fsm` checks the controller with a modelled decoder and shape
  memory.

The controller also carries two assertions. A write happens only while
padding, and the write mask never covers an object pixel.

## Departures from the published design, and choices made here

* **Datapath routing.** In the published block diagram the decoder's
  addresses and the pixel values pass through the controller. Here they go
  straight to the memories and the selector, and the controller only enables
  the writes.
* **`next`.** The published decoder drives `next` from bits 1..17. Bit 17 is
  the constant added '1', so an all-zero test on those bits could never fire.
  Here `next` tests the 16 real shape bits for all '1' or all '0'.
* **These are this design's own choices:**
  * the register-based memories with row and column access;
  * the look-ahead shape read port;
  * the stream handshake and the 8-bit pixel width;
  * the synchronous reset;
  * rounding the average down (it is the shifted sum).
* **Extended padding is not included.** Extended padding fills macroblocks that
  lie wholly outside the object with a copy of a neighbouring row or column. It
  is a plain copy, outside this block.
* **Chrominance.** There is no separate chrominance mode. Use an `N = 8`
  instance. `tb_padding_block_chroma` runs the end-to-end test at `N = 8`.
