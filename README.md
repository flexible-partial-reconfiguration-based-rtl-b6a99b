# PR_BRAM: a dataflow JPEG encoder time-multiplexed through one reconfigurable partition

A dataflow application is a chain of processing elements (PEs) joined by
FIFOs. On an FPGA the straightforward mapping places every PE side by side,
which costs area. The PR_BRAM architecture places **only one PE at a time**.
That PE sits in a single reconfigurable partition and is swapped for the next
one by partial reconfiguration. The data that would flow through the FIFOs
waits in **on-chip block RAM**. The slower alternative parks it in off-chip DDR.

This repository holds the RTL of that architecture's fixed ("static")
overlay. It also holds the four reconfigurable modules of the JPEG encoder
that the architecture was demonstrated with:

```
raw 8x8 blocks -> DCT -> Quantization -> RLE -> Huffman -> coded blocks
                  RM 0       RM 1       RM 2      RM 3
```

The ARM processor of a Zynq device drives the flow. In RTL, two AXI4-Lite
slave ports stand in for the ARM.

## How one encode runs

A 512x512 grey-scale image has 4096 8x8 blocks. Stored one sample per 32-bit
word, that is 1 MiB. This is twice the 131072-word (512 KiB) block RAM of the
overlay, so software encodes the image in **two loads of 2048 blocks**. For
each load:

1. `CTRL.mux_sel = 0`: the ARM side owns the BRAM. The pixels are written
   through the ARM-side BRAM controller, block `b` at words `64*b .. 64*b+63`,
   raster order, pixel in bits [7:0].
2. `CTRL.mux_sel = 1`: the partition owns the BRAM. Then, for each module in
   dataflow order (DCT, Quantization, RLE, Huffman):
   - write `RM_ID` (this represents loading the module's partial bitstream);
   - write `NBLK` (blocks in BRAM);
   - write `CTRL.start`;
   - poll `STATUS.done`, and optionally read `CYCLES`.
3. `CTRL.mux_sel = 0`: the coded blocks are read back.

Two loads times four modules gives eight reconfigurations per image. That is
the smallest count the original work reports for this architecture. Smaller
loads (more reconfigurations) work the same way, with a smaller `NBLK`.

**Every module rewrites each block in place.** The BRAM has no room for a
second copy of the data. Each module therefore does the same three steps:

1. read the 64 words of a block into a local buffer;
2. compute;
3. write its result words back over the same 64-word slot.

Every stage starts from word 0 of each block, so any block can be inspected
between stages.

### What a block slot holds after each stage

| after        | word 0                           | words 1..63                                                                      |
|--------------|----------------------------------|----------------------------------------------------------------------------------|
| (load)       | pixel (0,0)                      | pixels, raster order, bits [7:0]                                                  |
| DCT          | DCT(0,0), signed                 | DCT coefficients, raster order, signed 32-bit                                     |
| Quantization | quantized DC                     | quantized coefficients, raster order, signed 32-bit                               |
| RLE          | DC difference to previous block  | AC symbols `{12'b0, run[3:0], value[15:0]}`, then unused words keep old data      |
| Huffman      | number of code bits of the block | code bits, MSB first from bit 31 of word 1; last word padded with 1s              |

RLE symbols use the following conventions:

- `(0,0)` is end-of-block. It is written only when the block ends in zeros.
- `(15,0)` stands for 16 zeros.

The Huffman stage stops reading a block at end-of-block, or once its symbols
cover the 63 AC positions.

## The processing elements

All four share one port list. This uniform interface is what lets them take
turns in the same partition.

| port                | dir | meaning                                                         |
|---------------------|-----|-----------------------------------------------------------------|
| `pe_reset`          | in  | synchronous reset from software; aborts a run                   |
| `start`             | in  | one-cycle pulse                                                 |
| `num_blocks[15:0]`  | in  | blocks to process, from word 0 upward                           |
| `done`              | out | rises after the last block, held until the next start or reset |
| `busy`              | out | high while working                                              |
| `mem_req`           | out | `{en, we, addr[16:0], wdata[31:0]}`                              |
| `mem_rdata[31:0]`   | in  | read data, one cycle after a read request                       |

**DCT (`dct_pe`).** The 8x8 transform is
`DCT(i,j) = 1/4 C(i)C(j) sum_x sum_y s(x,y) cos((2x+1)iπ/16) cos((2y+1)jπ/16)`,
where `s = pixel - 128`. It is computed separably, rows first and then
columns, with one multiply-accumulate per cycle.

- The factors `0.5*C(k)*cos(...)` are the integers `round(4096*cos(mπ/16))`,
  which carry 13 fraction bits.
- Row sums keep 3 fraction bits.
- Results are rounded to integers, with halves rounded up.
- Accuracy is within ±1 of the real-valued transform.
- Timing: 1154 cycles per block (66 load, 512 row, 512 column, 64 store).

**Quantization (`quant_pe`).** Computes `round(DCT / Q)`, with halves rounded
away from zero. Q is the standard JPEG luminance table (ITU-T T.81 K.1). The
module streams: read one word, then divide it and write it back. This takes
128 cycles per block.

**RLE (`rle_pe`).** Performs the zig-zag scan, then DPCM of the DC value,
then run-length coding of the AC values.

- The DC predictor is 0 at every start. Each BRAM load therefore begins like
  a JPEG restart interval.
- Runs longer than 15 are split with `(15,0)` symbols.
- Timing: 66 load cycles, plus one cycle per coefficient and per `(15,0)`
  symbol, plus one store cycle per output word.

**Huffman (`huffman_pe`).** Codes one symbol per cycle.

- DC: the DC SIZE code, then SIZE value bits.
- AC: the Run/SIZE code, then SIZE value bits.
- Value bits are the value itself when positive. When negative they are
  `value-1`, cut to SIZE bits; for example, -8 becomes `0111`.

A 64-bit packing register hands a 32-bit word to the output buffer as soon as
32 bits are pending. A block produces at most 20 + 63·26 = 1658 bits, which
always fits its 63 words.

The AC table is the standard JPEG luminance AC table. The package
`prbram_pkg` builds it at elaboration from its code-length counts and symbol
order (canonical Huffman construction), not from a pasted table.

JPEG byte stuffing (`FF` → `FF 00`) and file markers are not added. The
software that assembles the file must do both, along with concatenating the
blocks' bit strings.

## The static overlay

**`ctrl_bus`** is an AXI4-Lite register file. The ARM uses it to run the
partition.

| offset | name   | bits                                                                      |
|--------|--------|---------------------------------------------------------------------------|
| 0x00   | CTRL   | [0] start (write 1, one-cycle pulse, reads 0), [1] pe_reset, [2] mux_sel  |
| 0x04   | STATUS | [0] done, [1] busy (read only)                                            |
| 0x08   | RM_ID  | [1:0] module in the partition: 0 DCT, 1 Quantization, 2 RLE, 3 Huffman    |
| 0x0C   | NBLK   | [15:0] blocks in BRAM                                                     |
| 0x10   | CYCLES | cycles of the last run, from start until busy falls, plus one (read only) |

Bus behaviour:

- A write is accepted when address and data are both valid.
- Byte strobes are honoured.
- Every response is OKAY.
- Unmapped addresses read 0.

**`arm_bram_ctrl`** is an AXI4-Lite slave that gives word access to the BRAM
through the MUX.

- Byte address bits [18:2] select the word.
- Writes always write the full word; strobes are ignored.
- It handles one transaction at a time.

**`bram_mux`** passes the ARM-side request when `mux_sel = 0` and the
partition's request when `mux_sel = 1`. The BRAM read data is wired to both
sides.

**`bram_memory`** is a single-port, read-first memory with one-cycle read
latency. It has 131072 x 32 bits, which equals the 128 36-Kb block RAM tiles
of the static design.

**`recon_partition`** stands for the partition pins.

- On the FPGA, only one module exists in the partition at a time.
- In RTL, all four are instantiated, and `RM_ID` picks the one wired to the
  pins. `start` and `pe_reset` reach only that module, and only its
  `mem_req`, `done` and `busy` leave the partition.
- Writing `RM_ID` therefore takes the place of a partial bitstream load.
  Reconfiguration time is not modelled: the original work measured about
  0.2 s per bitstream through PCAP.

**`prbram_top`** wires these blocks together. Its ports are:

- clock and active-low reset;
- the two AXI4-Lite ports, as request/response structs (`axil_req_t`,
  `axil_rsp_t` in `prbram_pkg`);
- `pe_done`;
- `rm_loaded`, which shows the current module.

## Sizes and performance

| item                   | value in this RTL                                               |
|------------------------|-----------------------------------------------------------------|
| BRAM                   | 131072 x 32 bit (parameter `BRAM_DEPTH`)                         |
| one BRAM load          | up to 2048 blocks (half of a 512x512 image)                      |
| image in one load      | does not fit (needs 262144 words)                                |
| block counter          | 16 bits                                                          |

Cycles measured for one 512x512 image (two loads, synthetic test image):

| stage        | cycles    |
|--------------|-----------|
| DCT          | 4 726 786 |
| Quantization |   524 290 |
| RLE          |   559 070 |
| Huffman      |   311 694 |

The total is about 6.1 M cycles, or 0.12 s at the 50 MHz the original system
ran at. This count excludes moving data over AXI and reconfiguration time.
The original HLS-generated modules took about 3 s of compute for the same
job, so this hand-written datapath does not reproduce their timing.

## Where this RTL departs from, or adds to, the original description

The original work describes the overlay at block-diagram level. Its pieces
are:

- a control bus;
- an ARM-side BRAM controller;
- a MUX with `Mux Sel = 0` for ARM phases;
- block RAM;
- one partition;
- start / done / reset control.

It also gives the JPEG algorithms (the DCT equation, the quantization
formula, zig-zag / DPCM / run-length coding, and the DC SIZE table). It
prints only the first rows of the AC Huffman table. The following are
choices of this implementation:

- register map, AXI4-Lite details, the CYCLES counter;
- one sample per 32-bit word and in-place processing of 64-word block slots
  (inferred from the stated memory sizes);
- all word layouts in the table above;
- the pixel level shift by 128, the fixed-point DCT and its serial schedule;
- the quantization matrix (standard JPEG luminance), and rounding halves away
  from zero;
- the remaining AC Huffman codes (standard JPEG luminance AC table; the
  printed rows are checked against it);
- the `(15,0)` zero-run symbol and the DC predictor reset at each start;
- padding the last code word with 1s; no byte stuffing or markers;
- the partition modelled as a multiplexer over all four modules.

The following are not built, because they are not logic of this design:

- the ARM processing system;
- the PCAP configuration port;
- DDR3;
- the SD card;
- the boot ROM and first-stage boot loader.

The testbenches play the ARM's part.

## Files

`rtl/` holds one module or package per file:

- `prbram_pkg.sv`: types, register map, table functions;
- `prbram_top.sv`, `ctrl_bus.sv`, `arm_bram_ctrl.sv`, `bram_mux.sv`,
  `bram_memory.sv`, `recon_partition.sv`;
- `dct_pe.sv`, `quant_pe.sv`, `rle_pe.sv`, `huffman_pe.sv`.

`tb/` holds the following. Every testbench compares against values computed
independently of the RTL and ends by printing `TB_RESULT checks=N failures=M`.

- `tb_<module>.sv`: one self-checking testbench per module.
- `tb_ref_pkg.sv`: the reference models. These are:
  - a real-valued DCT and a bit-exact model of the fixed-point one;
  - quantization;
  - the zig-zag table written out;
  - run-length coding;
  - Huffman coding as bit strings, built from the full standard symbol list.
- `tb_axil_master.sv`: an AXI4-Lite master model.
- `tb_prbram_env.sv`: the end-to-end software sequence. It:
  - encodes a synthetic image;
  - aborts one run with `pe_reset`;
  - checks every block's code bits;
  - counts that each mechanism occurred (reconfiguration, MUX switch,
    start/done handshake, abort, reload, DC restart, 16-zero run,
    end-of-block, block without end-of-block).
- `tb_prbram_top.sv`: the environment on a 32x16 image.
- `tb_prbram_full.sv`: the environment on the full 512x512 image at default
  sizes, which takes about 20 s. It encodes the image twice:
  - in 2 loads of 2048 blocks, which is 8 reconfigurations;
  - in 128 loads of 32 blocks, which is 512 reconfigurations. This is the
    other end of the range of load sizes.

The test images are synthetic. Their content includes:

- gradients;
- flat areas;
- edges;
- noise;
- a checkerboard block;
- a pure high-frequency block.

Together these make every coding case occur, including 16-zero runs and
blocks without end-of-block.

## Simulating

Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/prbram_pkg.sv tb/tb_ref_pkg.sv tb/tb_prbram_full.sv \
    --top-module tb_prbram_full --Mdir obj_full
obj_full/Vtb_prbram_full
```

Swap in any other `tb/tb_*.sv` and its module name to run that testbench.
`tb_ref_pkg.sv` is needed only by the testbenches that import it.
