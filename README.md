# H.264/AVC intra 4x4 reconstruction accelerator

A software H.264 baseline decoder running on a small 32-bit soft processor
spends much of its time rebuilding intra-coded blocks. This RTL takes that
work off the processor. The processor still parses the bitstream, but for
every 4x4 luma block coded in intra 4x4 mode it hands the block's 16
quantized coefficients to the accelerator, together with the block's
prediction mode, QP and the macroblock position. It gets back the 16
reconstructed pixels.

Inside, the accelerator performs the three decoder steps that sit between
entropy decoding and the deblocking filter:

* inverse quantization: `W = Z * V(QP mod 6, position) << floor(QP/6)`;
* the 4x4 inverse integer transform: rows, then columns, then `(x+32)>>6`;
* 4x4 intra prediction, in all nine modes, from neighbouring pixels that the
  accelerator keeps itself.

It then adds the residual to the prediction and clips the sum to 0..255. One
block takes 10 clock cycles, and blocks can follow each other every 10
cycles.

The architecture follows the published description of this accelerator by
Damak, Loukil, Ben Atitallah and Masmoudi ("Software and Hardware
Architecture of H.264/AVC Decoder"). That description names the units, their
cycle counts, their main widths and the bus packing. The equations come from
the H.264 standard. This design fills in the rest: the storage of the
neighbour pixels, the register map, the handshake and the bit-exact details.
The section "Where this design departs from or adds to the source" lists
every such choice.

## Block diagram

```
            Avalon-MM slave (32 bit)
                     |
               avalon_ctrl ---- modes[16], QP, MBX, MBY, block counter
                     |
   +------------------------- intra4x4_chain ------------------------------+
   | coef_in_buffer -> inv_quant -> inv_transform --------+                |
   |   (16 x 16 bit)   rom_dequant   ict_1d -> ict_1d     |                |
   |                   16 x dequant_coef (4 x iict_x each)|                |
   |                                                      v                |
   | neighbor_pixels -> intra4x4_pred --------------> recon_add -> recon_out_buffer
   |   ^  (line buffer, current MB,                        |      (16 x 8 bit)
   |   |   left column, corner)                            |                |
   |   +-------------------- write-back -------------------+                |
   +-----------------------------------------------------------------------+
```

`h264_intra_accel` is the top level. It holds the bus controller and the
chain.

## Timing of one block

All units have a `start` input and give a one-cycle `done` pulse. The chain
starts the units from each other's `done`, so two paths run side by side:

| cycles after start | residual path              | prediction path            |
|--------------------|----------------------------|----------------------------|
| 0 - 2              | inverse quantization (3)   | neighbouring pixels (2)    |
| 2 - 3              |                            | intra prediction (6) ...   |
| 3 - 5              | inverse transform (2)      | ...                        |
| 5 - 8              | (result held)              | ... prediction done at 8   |
| 8 - 10             | addition (2), done at 10   |                            |

The addition starts once both paths have finished. The join does not assume
the order in which they finish.

At `done`, three things happen in the same cycle:

* The block is written into the output buffer. A bypass lets the bus read it
  in that same cycle.
* The block is written back into the neighbour storage.
* The next block may start.

## Intra prediction: one set of terms for all nine modes

The predictor does not compute nine separate predictions. Every pixel of
every mode, except vertical, horizontal and DC, is one of two kinds of term:

* a 2-tap average `(a+b+1)>>1`;
* a 3-tap average `(a+2b+c+2)>>2`.

Each of these is taken over adjacent pixels of the neighbour edge. The unit
lays the 13 neighbours along one line:

```
p[0..14] = L L K J I M A B C D E F G H H
```

The outer pixels are repeated at each end. This makes the two corner cases
of the standard, `(K+3L+2)>>2` in horizontal-up and `(G+3H+2)>>2` in
diagonal-down-left, ordinary 3-tap terms.

The datapath has six register stages:

1. capture the pixels;
2. the "basic" equations: 14 two-pixel sums of 9 bits;
3. the "derivate" equations: 13 three-tap sums of 10 bits (each the sum of
   two neighbouring basic sums), plus the 11-bit sum of A..D and I..L for
   DC;
4. the shift module: `>>1`, `>>2` and the DC divisions, with DC choosing
   among top+left, top only, left only and 128;
5. the mode multiplexer: for pixel (x,y), each mode reads term
   `h2[k]`/`h3[k]` with `k` linear in x, y or `y>>1`, `x>>1` (see
   `intra4x4_pred.sv`);
6. the output register.

The output is 9 bits wide per pixel and carries an 8-bit value.

## Neighbour storage and availability

`neighbor_pixels` keeps the following:

* `line`: one picture row of `FRAME_W` pixels (4 per word). It holds the
  bottom row of the macroblock row above. A macroblock overwrites its 16
  columns as its bottom blocks (10, 11, 14, 15) are written back.
* `cur`: the current macroblock, 16x16.
* `left`: the right column of the previous macroblock. It is copied when
  that macroblock's block 15 is written back.
* `corner`: the pixel above-left of the macroblock. It is saved from the
  line buffer just before block 15 overwrites it.

This storage works only if the blocks arrive in the H.264 order:

* blocks in z-scan order (0,1,4,5 form the top row; index bits are
  `{y1,x1,y0,x0}`);
* macroblocks in raster order;
* one slice per frame.

Availability follows the standard:

* Left, top and top-left are missing at the picture edge.
* Above-right is missing in these cases:
  * it lies outside the picture;
  * the block is in the right column of a macroblock below its first row
    (blocks 7, 13 and 15);
  * the above-right block comes later in z-scan order (blocks 3 and 11).
* When above-right is missing and the top row is present, E..H repeat D.
* Any other missing pixel reads 128. DC uses the availability flags instead.

The processor must only send modes whose neighbours exist, as a conforming
bitstream does.

## Inverse quantization and transform

`inv_quant` contains the following:

* `rom_dequant`: a combinational table from QP to `QE = floor(QP/6)` and to
  `QP mod 6`. It replaces a divider.
* Sixteen `dequant_coef` units, one per coefficient position. Each one:
  * cycle 1: reads its V table entry for its position class (even/even,
    odd/odd, mixed) and `QP mod 6`;
  * cycle 2: multiplies;
  * cycle 3: shifts by QE.

The results are kept to 23 bits.

`inv_transform` has two identical `ict_1d` passes. Each pass is four
`iict_x` butterflies, made only of adds, subtracts and `>>>1`. Unit k
transforms row k and writes column k of the result. The pass therefore
transposes its output, and two passes leave the block in its original
orientation. The second pass is followed by `(x+32)>>6` and by saturation to
9 bits. The saturation never changes a reconstructed pixel: a residual
beyond -256..255 clips the sum to 0 or 255 anyway.

## Bus interface

The Avalon-MM slave uses word addresses, 32-bit data and no read latency.
`avs_waitrequest` holds a transfer.

| word   | access | content                                                              |
|--------|--------|----------------------------------------------------------------------|
| 0..3   | R/W    | prediction modes; byte k of word w = mode of block 4w+k (low 4 bits)  |
| 4      | R/W    | `{8'h0, QP, MBY, MBX}`; writing it restarts the block counter at 0    |
| 5..12  | W      | coefficient pairs: word 5+n = `{coef[2n+1], coef[2n]}`, raster order  |
| 16..19 | R      | reconstructed row 0..3, pixel x in bits 8x+7:8x                       |
| 20     | R      | `{27'b0, busy, block counter}`                                        |

Writing word 12 starts the next block. A macroblock therefore costs:

* 5 parameter writes, since the 19 byte-wide parameters are packed four per
  word;
* then, for each of its 16 blocks, 8 coefficient writes and 4 reads.

Waitrequest is raised in two cases while a block is pending or running:

* for a write of word 12;
* for a read of words 16..19.

So the processor can read a block straight after starting it, and the bus
stalls until the pixels exist. The coefficient words 5..11 of the next block
can be written while a block is in flight, because the quantizer samples the
input buffer only when a block starts. That overlap hides most of the
10-cycle latency behind bus traffic. The first row is accepted 11 cycles after the
last coefficient write: 1 cycle to issue the start, then 10 in the chain. In
this polled flow the full-frame test measures about 22 cycles per block,
bus transfers included.

Two assertions check protocol rules:

* `avalon_ctrl`: a held transfer must not change.
* `intra4x4_chain`: a block is never started while another is in flight.

## Parameters and sizes

| name      | default | where                                                    |
|-----------|---------|----------------------------------------------------------|
| `FRAME_W` | 352     | picture width in luma pixels (CIF); sizes the line buffer |

Fixed widths are set in `h264_intra_pkg`:

* coefficients in: 16 bits;
* dequantized coefficients: 23 bits;
* residual: 9 bits;
* pixels: 8 bits;
* MBX and MBY: 8 bits each, which allows pictures up to 4096 pixels wide.

Storage at the default size:

* line buffer: 2816 bits;
* current macroblock: 2048 bits;
* left column and corner: 136 bits.

Both buffers and the pipeline registers come on top of that.

## Where this design departs from or adds to the source

* **Register map, address width, read latency and when waitrequest is
  raised.** These are this design's own. The source gives only the signal
  names and the packing: 4 bytes per word and 2 coefficients per word.
* **Neighbour storage and availability.** The source says only that a
  "neighbouring pixels" unit produces the neighbours from MBX and MBY. The
  line buffer, the current-macroblock store and the availability logic are
  this design's own. Availability follows the standard. The source reports
  6208 bits of memory for the whole accelerator; this organisation uses
  about 5000 bits of storage plus registers.
* **Addition latency.** The source's text gives 8 cycles, but its cycle
  table and schedule give 2 cycles, from cycle 8 to cycle 10. This design
  uses 2 cycles, which keeps the block at 10 cycles.
* **Stage split inside each unit.** Each unit's total cycle count is the
  source's. How the cycles are split into stages (for example six stages in
  the predictor) is this design's choice.
* **One `done` for the 16 quantizer units.** They run in lock-step, so the
  sixteen per-unit signals are ANDed into one.
* **Extra quantizer input.** `dequant_coef` takes `QP mod 6` as well as QE,
  because V depends on it.
* **Exact arithmetic from the standard.** The final `(x+32)>>6`, clipping to
  0..255 and the V table come from the standard. The 9-bit saturation of the
  residual is this design's choice and never changes a pixel.
* **Not covered:** chroma, intra 16x16 (and its DC Hadamard transform),
  inter prediction, entropy decoding and the deblocking filter. In this
  system they stay in software. The processor, bus fabric and peripherals
  are not part of the RTL.
* **Not verified:** timing closure at the source's reported clock
  (317.76 MHz on an Altera Stratix III), and area.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against
`tb/h264_ref_pkg.sv`, a reference written directly from the standard's
equations:

* prediction in p[x,y] form;
* dequantization as `c*V*2^(QP/6)`;
* the transform as the standard's matrix rows.

The unit tests also check each unit's cycle count: 3, 2, 2, 6, 2 and 2.

`tb_neighbor_pixels` and `tb_intra4x4_chain` walk small pictures, block by
block. They use a picture model in which a pixel is available once its 4x4
block has been reconstructed.

`tb_h264_intra_accel` runs the top level at its default size. It decodes one
full 352x288 intra frame, 396 macroblocks and 6336 blocks, through the bus,
then the first macroblock row of a second frame. Modes, QP and coefficients
are random, chosen so that the modes only use neighbours that are present.
The testbench counts the following and fails if any never occurs:

* every mode;
* every DC availability case;
* the E..H replacement;
* waitrequest stalls;
* clipping at both ends.

It also checks the 11-cycle write-to-read latency. It runs in well under a
second of simulation time.

`tb_workload_cif_qp30` decodes one CIF frame at QP 30 through the bus, with
synthetic content. QP 30 is the operating point of the Foreman and Akiyo CIF
sequences; the real bitstreams are not used, because they need the software
decoder around the accelerator. This testbench uses the overlapped
processor flow: the next block's first seven coefficient words are written
while the current block runs. The results:

* 6336 blocks in 99,793 cycles, or 15.75 cycles per block with all bus
  traffic included;
* 0.31 ms per frame at 317.76 MHz, far inside the 33 ms that 30 frames/s
  allow.

Without overlap the same frame takes about 22 cycles per block.

To simulate with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/h264_intra_pkg.sv tb/h264_ref_pkg.sv rtl/*.sv tb/tb_h264_intra_accel.sv \
    --top-module tb_h264_intra_accel -o sim
./obj_dir/sim
```

Swap the last file and `--top-module` to run any other testbench. Each one
prints `TB_RESULT checks=N failures=M`.
