# Spiral-mapped SRAM for horizontal and vertical segmentation-free pixel access

A video datapath with N processing elements wants N pixels per cycle from its
pixel buffer. It needs any N consecutive pixels of a picture row
("horizontal access") and, for filters and motion estimation, any N consecutive
pixels of a picture column ("vertical access"). The start pixel can be anywhere
("segmentation-free"). An ordinary wide SRAM returns one aligned row word per
access. It needs two accesses when the window crosses a word boundary, and
N accesses for a column. The usual fix is to split the memory into N
independent small SRAMs. That handles horizontal windows only, and it repeats
an X-decoder (row decoder) in every division.

This design keeps one shared X-decoder and handles both directions. It stores
the picture **spirally**: every picture row is rotated by one column block
against the row above it. Any N horizontally adjacent pixels then lie in N
different column blocks, and so do any N vertically adjacent pixels. Three
small additions to an ordinary SRAM let it read or write either set in one
cycle:

* an X-decoder that can raise **N consecutive global wordlines** starting at any
  row;
* a **local-wordline select (LWLS) bus** wired spirally through the column
  blocks, so that each block opens only one of those N wordlines;
* a **Y-decoder** that tells each column block whether to use the left or the
  right pixel of its cell group.

This RTL implements the architecture described in "A Power- and Area-Efficient
SRAM Core Architecture for Super-Parallel Video Processing" (Miyakoshi et al.).
The default configuration is that paper's silicon example: 8 column blocks,
160 kbit, two read ports and one write port, used as the search-window buffer of
an H.264 motion estimator. The decoders are written for any power-of-two N, and
the super-parallel case N = 128 has been simulated.

## Where a pixel lives

Parameters: `N` column blocks, `NRB` row blocks of `N` global wordlines each
(`ROWS = N*NRB` rows), and two 8-bit pixels per cell group. A stored picture strip
is therefore `2N` pixels wide and `ROWS` rows high. Pixel (row `r`, column `c`) is
stored

* on global wordline `GWL r`,
* in column block `(c + r) mod N`,
* in the **left** cell if `c < N` and in the **right** cell if `c >= N`.

For N = 8 (rows A, B, C, ... are picture rows 0, 1, 2, ...):

| GWL | column block 0 | column block 1 | column block 2 | ... | column block 7 |
|-----|----------------|----------------|----------------|-----|----------------|
| 0   | A0 / A8        | A1 / A9        | A2 / A10       |     | A7 / A15       |
| 1   | B7 / B15       | B0 / B8        | B1 / B9        |     | B6 / B14       |
| 2   | C6 / C14       | C7 / C15       | C0 / C8        |     | C5 / C13       |

In a horizontal access (row `r`, columns `y .. y+N-1` modulo `2N`), the blocks
are `(y+i+r) mod N`, which are all different. In a vertical access (rows
`x .. x+N-1`, column `y`), the blocks are `(y+x+i) mod N`, which are also all
different.

## Choosing the wordlines: the X-decoder (`x_decoder`, `pre_decoder`)

The row address `xaddr` is split into a row-block number (upper bits) and an
offset inside the row block (`xaddr[log2 N - 1:0]`).

* Each row block `j` has a row-block select `D_j = (upper bits == j)`.
* The pre-decoder turns the offset into `PX[N-1:0]`. In a horizontal access `PX`
  is one-hot (`PX[i] = (i == offset)`). In a vertical access it is a thermometer
  code (`PX[i] = (i >= offset)`).
* Each row block also has a *segmentation-free* signal
  `S_j = D_(j-1) & !D_j & vertical`. It is true only for the row block just after
  the addressed one, and only in a vertical access.
* Wordline `i` of row block `j` is `PX[i] ? D_j : S_j`.

In a horizontal access, only `GWL xaddr` rises. In a vertical access the
positions `offset .. N-1` of the addressed row block rise through `D_j`. The
positions `0 .. offset-1` of the next row block rise through `S_(j+1)`. So exactly
N consecutive wordlines are up, whatever the alignment, and no second decoder is
needed. Row block 0 treats the last row block as its predecessor, so a vertical
window that starts in the last row block wraps to row 0.

## Opening one cell per column block: the spiral LWLS bus (`lwls_selector`, `column_block`)

With N wordlines up, every column block would put N cells on one bitline. Each
cell group therefore has a local-wordline driver that also needs one line of the
shared `LWLS[N-1:0]` bus. Inside column block `k`, the cell group on wordline `g`
listens to

    LWLS[(k - g) mod N]

The tap moves by one line from wordline to wordline and from block to block.
This is the spiral wiring, and it matches the spiral data mapping. Pixel (r, c)
sits in block `k = (c + r) mod N` on wordline `r`, so its tap is
`(k - r) mod N = c mod N`.

* Vertical access to column `y`: only `LWLS[y mod N]` is true. In every column
  block, exactly one of the N raised wordlines has that tap, and that wordline
  holds column `y`.
* Horizontal access: all LWLS lines are true. Only one wordline is up, so every
  block opens its cell group on that row.

`column_block` is one division. It holds the local-wordline drivers, the cell
array, the left/right bitline selector (SEL), the sense amplifiers (read ports)
and the write circuit (write port). The cells are a synthesizable memory array
(`mem[ROWS]` of two pixels). The opened local wordline is encoded to a row
index. An assertion fires if a port ever opens two local wordlines in the same
block, which is the bitline conflict the decoders exist to prevent.

## Left or right pixel: the Y-decoder (`y_decoder`) and its row rotation

Every column block holds two columns of each row, `c` and `c + N`. `YL[k]` picks
the right cell in block `k`. The Y-decoder takes `yaddr` (`log2 N + 1` bits, the
start column) and implements these two tables:

* vertical: all `YL` bits equal `yaddr[log2 N]`, because a column is entirely
  left or entirely right;
* horizontal, start `s`: `YL[k] = (k < s)` for `s <= N`. For `s > N` the window
  wraps past column `2N-1` back to column 0, and `YL[k] = (k >= s - N)`.

**Departure from the published tables.** The horizontal table is correct only for
rows that are not rotated (`r mod N = 0`). Row `r` is rotated by `r mod N` blocks,
so it needs the same pattern rotated by `r mod N` positions. For example, reading
B1..B8 needs only block 1 on the right. No single table entry gives that. The
top level therefore rotates the decoder output:
`YL_block[k] = YL_table[(k - xaddr) mod N]`. This is a few multiplexers per
port. It changes nothing in vertical accesses, where all bits are equal.
`y_decoder` itself stays exactly as tabulated. The end-to-end test fails badly
without the rotation.

## Putting the pixels in order (`barrel_shifter`)

Column block `k` always delivers its pixel on lane `k`. Pixel `i` of an access
(in both directions) is in block `(i + xaddr + yaddr) mod N`. On the read side,
a barrel shifter gives processing element `i` lane `(i + shift) mod N`, with
`shift = (xaddr + yaddr) mod N`. The write port has the inverse rotator, so that
write data can also be given in picture order.

## Top level `spiral_sram`: interface and timing

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (clears `rd_valid` only) |
| `rd_en` | in | NRD | read request per read port |
| `rd_dir` | in | NRD x `acc_dir_e` | `ACC_H` (0) horizontal, `ACC_V` (1) vertical |
| `rd_xaddr` | in | NRD x log2(ROWS) | row of the first pixel |
| `rd_yaddr` | in | NRD x (log2 N + 1) | column of the first pixel, 0 .. 2N-1 |
| `rd_valid` | out | NRD | high in the cycle after a request |
| `rd_data` | out | NRD x N x 8 | `rd_data[p][i]` is pixel `i` of the access |
| `wr_en`, `wr_dir`, `wr_xaddr`, `wr_yaddr` | in | as above | write request |
| `wr_data` | in | N x 8 | `wr_data[i]` is pixel `i` of the access |

Pixel `i` of an access is `(xaddr, (yaddr + i) mod 2N)` for a horizontal access.
For a vertical access it is `((xaddr + i) mod ROWS, yaddr)`.

* Everything is sampled at the rising edge of `clk`. A write stores its pixels
  at that edge.
* Read data are available one cycle after the request, marked by `rd_valid`.
  They stay on `rd_data` until the port's next read.
* A read and a write at the same edge on the same pixels return the old pixels.
* Row addresses at or past `ROWS` select nothing. Such a read returns zeros and
  such a write is dropped. This happens at the defaults, because 160 row blocks
  leave part of the 11-bit address space unused.
* Each read port and the write port has its own X-decoder, LWLS selector,
  Y-decoder and rotator. The ports are fully independent.
* The cell array is not reset.

Parameters (defaults): `N = 8` column blocks, `NRB = 160` row blocks,
`NRD = 2` read ports. That gives 8 x 1280 rows x 16 bits = 163,840 bits
(160 kbit), and 16 pixels read per cycle. `N` must be a power of two and `NRB >= 2`.
The pixel width (8) and the two pixels per cell group are constants in
`spiral_sram_pkg`. The one-bit `YL` select fixes the two pixels per cell group.

## What is modelled and what is not

* The decoders, spiral wiring, selectors and rotators follow the published
  architecture. `pre_decoder`, `lwls_selector` and `y_decoder` reproduce their
  truth tables exactly. The X-decoder's source selection and segmentation-free
  signal are built from the published description.
* This implementation chose the following: the barrel shifter's construction,
  the write-side rotator, the YL rotation described above, the wrap from the last
  row to row 0, independent addresses per port, one-cycle registered reads with
  read-before-write, and the handling of out-of-range rows.
* The memory cells, sense amplifiers and write drivers are a logical array. No
  bitline, precharge or self-timed circuitry is modelled. The published
  performance (cycle 9.0 ns, access 7.2 ns, decoder delay overhead 1.3 ns in
  130 nm) and the power/area savings are circuit-level results. This RTL does
  not reproduce them.
* The processing elements and the motion-estimation core that use the buffer are
  not included. They connect to the `rd_*` and `wr_*` ports.

## Files

| file | content |
|------|---------|
| `rtl/spiral_sram_pkg.sv` | access-direction enum, pixel width, pixels per cell group |
| `rtl/pre_decoder.sv` | PX pre-decoder |
| `rtl/x_decoder.sv` | row-block selects, segmentation-free signals, global wordlines |
| `rtl/lwls_selector.sv` | LWLS bus driver |
| `rtl/y_decoder.sv` | left/right select table |
| `rtl/column_block.sv` | one division: spiral local-wordline drivers, cells, SEL, read/write |
| `rtl/barrel_shifter.sv` | lane rotator (read and write direction) |
| `rtl/spiral_sram.sv` | top level |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/spiral_sram_wide_tb.sv` | top level at N = 128, 5 row blocks |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends the
simulation. Each has a cycle-count watchdog that counts as a failure. To build
and run one with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/spiral_sram_pkg.sv rtl/*.sv \
        tb/spiral_sram_tb.sv --top-module spiral_sram_tb -Mdir obj
    ./obj/Vspiral_sram_tb

* The unit testbenches compare against the truth tables written out by hand, or
  against independent reference formulas.
* `column_block_tb` drives wordline patterns directly and checks which cell
  answers.
* `spiral_sram_tb` runs the default-size memory end to end. It fills the picture
  with horizontal writes, then runs 20,000 random cycles of reads on both ports
  and horizontal and vertical writes. It checks every read against a reference
  picture, including the one-cycle latency. It counts every mechanism and fails
  if one never occurs: both access directions for reads and writes,
  left/right-mixed and wrapping row windows, row-block crossings, the
  last-to-first row wrap, rotated rows, both read ports together, a read meeting
  a write, and out-of-range rows. It runs in a few seconds.
* `spiral_sram_wide_tb` repeats the same test at N = 128.
