# 3-D discrete wavelet transform processor (one filter pair, block-based)

Medical volume data — an MRI study is a stack of 2-D slices, typically 53
slices of 256 x 256 8-bit pixels — compresses better when the wavelet
transform also runs across slices, not only within each slice. This
processor computes one octave of a separable 3-D discrete wavelet transform
with a single low pass / high pass filter pair and very little on-chip
storage. Instead of transforming whole rows, then columns, then slices (which
would need the whole volume on chip), it fetches a small L1 x L2 x L3 block
of samples around one output position (4 x 4 x 2 for the prototype wavelet)
and turns that block into all 8 subband coefficients of that position
(LLL, LLH, LHL, LHH, HLL, HLH, HHL, HHH) before moving on. On-chip storage
depends only on the filter lengths, never on the volume size.

The cost is re-reading: neighbouring blocks overlap, because the block window
steps by two samples in every dimension (the transform downsamples by two)
while it is four samples wide. An off-chip buffer able to serve block rows is
assumed.

## How one block becomes eight outputs

The same two filters are reused for the three dimensions; only their
coefficients change. For a 4 x 4 x 2 block:

| pass | steps (cycles) | filter input | result stored |
|------|----------------|--------------|---------------|
| X    | 8 = L2*L3      | one 4-sample row (fixed y, z) from INRAM | low -> LRAM, high -> HRAM, word z, lane y |
| Y    | 4 = 2*L3       | word z of LRAM (X low band) or HRAM (X high band): the 4 X results along y | low -> LRAM, high -> HRAM, word L3+xb, lane z |
| Z    | 4              | word L3+xb of LRAM (Y low) or HRAM (Y high): the 2 Y results along z, padded | low and high results are two outputs |

The X pass produces 2 x 8 values (two bands of a 1 x 4 x 2 array), the Y pass
2 x 4 (four bands of 1 x 1 x 2), the Z pass 8 single values. The storage
layout is chosen so that every filter evaluation reads exactly one memory
word: when the X pass writes the result for row (y, z) into lane y of word z,
word z later holds precisely the four samples along Y that one Y-pass
evaluation needs. Z-pass inputs are built the same way. A filter shorter than
the filter width (the 2-tap Z filter in a 4-tap datapath) is handled by
padding its coefficients with zeros; the unused lanes are never written and
read as zero after reset.

Both filters always see the same input word; the low pass filter writes to
LRAM and the high pass filter to HRAM, so each cycle does one low and one high
pass evaluation.

## Controller schedule

`dwt3d_ctrl` numbers its states as the prototype does:

| state | work |
|-------|------|
| 0     | load the coefficients of both filters from off-chip (3 cycles: X, Y, Z register) |
| 1-8   | load the 8 rows of the block from off-chip into INRAM |
| 9-16  | X pass |
| 17-20 | Y pass |
| 21-24 | Z pass; two outputs per state |

State 0 runs once per `start`; after state 24 the controller goes straight to
state 1 of the next block. A block therefore takes 8 + 16 = 24 cycles. In the
last cycle before each pass, the controller has both coefficient units copy
that pass's coefficients (register R0, R1 or R2) into their working register
DWTC, so passes follow each other without a gap.

Block order: the window origin steps by 2 along x first, then y, then z, over
NX/2 x NY/2 x ceil(NZ/2) positions. Windows that run past an edge wrap around
to the other side of the volume (circular extension); with an odd slice
count the last slice pair is slice NZ-1 and slice 0.

All lengths are parameters (`L1`, `L2`, `L3`); in general a block takes
L2*L3 load cycles plus L2*L3 + 2*L3 + 4 compute cycles, and the filter width
is TAPS = max(L1, L2, L3).

## Arithmetic

Everything is 16-bit two's complement. Each filter has TAPS radix-4 Booth
multipliers (16 x 16 -> 32 bits) working in parallel and a tree of TAPS-1
16-bit carry look-ahead adders, log2(TAPS) levels deep. From each 32-bit
product only 16 bits are kept: by default the low 16 bits (the top half is
discarded), which makes the transform exact modulo 2^16 for integer
coefficients. The parameter `PROD_LSB` selects a different 16-bit slice
(for example `PROD_LSB = 8` for coefficients with 8 fraction bits). Sums wrap
modulo 2^16; there is no saturation, rounding or quantization on chip. 8-bit
pixels enter zero-extended to 16 bits.

The filters are combinational: a memory read, 16 x 16 multiplication and
the adder tree all happen in one cycle, and the result is captured by LRAM,
HRAM or the output register at the clock edge. No pipelining is provided.

## Blocks

| module | role |
|--------|------|
| `dwt3d_top` | the processor: wiring of everything below, filter input selection, output register |
| `dwt3d_ctrl` | central controller: the 25-state schedule, block stepping with wrap-around, row addresses, memory and coefficient control |
| `coef_unit` (x2) | R0/R1/R2 coefficient registers for X/Y/Z and the DWTC working register; one unit per filter |
| `inram` | 1 KB block cache, 128 rows of 4 x 16 bits; a block uses rows 0..L2*L3-1 |
| `stage_ram` (x2) | LRAM and HRAM: intermediate results, lane-writable, word-readable, cleared by reset |
| `dwt_filter` (x2) | low pass and high pass filter: Booth multipliers and CLA adder tree |
| `booth_mult16` | radix-4 Booth multiplier |
| `cla_adder16` | 16-bit adder, two-level 4-bit carry look-ahead |
| `dwt3d_pkg` | shared types: controller phase, dimension select, `max3` |

## Interface of `dwt3d_top`

| signal | dir | meaning |
|--------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start` | in | one-cycle pulse while idle: transform the whole volume |
| `busy`, `done` | out | running; `done` pulses in the cycle of the last Z step |
| `state_num` | out | controller state 0..24 |
| `coef_rd_en`, `coef_rd_sel` | out | state 0: the coefficient words of dimension `coef_rd_sel` (0 = X, 1 = Y, 2 = Z) are wanted this cycle |
| `coef_lo_word`, `coef_hi_word` | in | TAPS x 16 bits each, low / high pass, lane i = tap i, zero-padded |
| `blk_rd_en`, `blk_x`, `blk_y`, `blk_z`, `blk_addr` | out | a block row is wanted this cycle: the L1 samples at x = blk_x .. blk_x+L1-1 (mod NX) of row blk_y, slice blk_z; `blk_addr = (blk_z*NY + blk_y)*NX + blk_x` |
| `blk_rd_data` | in | those L1 samples, lane i = x offset i, in the same cycle |
| `out_valid` | out | one cycle after each Z step |
| `out_band` | out | {X band, Y band}, 0 = low, 1 = high |
| `out_lo`, `out_hi` | out | subband {out_band, L} and {out_band, H} |
| `out_bx`, `out_by`, `out_bz` | out | block index (output position in the half-size volume) |

Both off-chip reads are answered combinationally in the cycle they are
requested; there is no stall or handshake. A memory with read latency needs
the request signals registered or the schedule stretched.

Timing from `start` (4x4x2): the first `out_valid` is 24 cycles after the
edge that samples `start` (3 coefficient, 8 load, 8 X, 4 Y cycles, then one
output register cycle); each later block's outputs follow 24 cycles after
the previous block's.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `L1`, `L2`, `L3` | 4, 4, 2 | filter lengths along X, Y, Z (block size) |
| `NX`, `NY`, `NZ` | 256, 256, 53 | volume size; NX and NY even |
| `INRAM_WORDS` | 128 | block cache rows (must hold L2*L3) |
| `PROD_LSB` | 0 | first product bit kept |

## Throughput

The volume needs NX/2 * NY/2 * ceil(NZ/2) blocks of L2*L3 + L2*L3 + 2*L3 + 4
cycles each; for a 256 x 256 x 53 study that is 442,368 blocks and 10.6 M
cycles. Per slice this is 3*NX*NY cycles for the 4x4x2 wavelet, so 30 slices
per second at 256 x 256 need 5.9 MHz and at 1920 x 1080 187 MHz.

## Where this implementation departs from, or fills in, the original design

* **Block loads are not overlapped with computation.** The original cycle
  count per block, L2*L3 + 2*L3 + 4, counts only the compute states; its
  minimum clock rates (for example 4 MHz for 256 x 256 at 30 fps, 124 MHz for
  1920 x 1080) assume loading is hidden. Here the eight load states cost
  eight extra cycles per block, 1.5 times the cycles for 4x4x2.
* **First output.** The original quotes the first output at the 12th clock
  cycle; with its own 25-state schedule the first Z step is the 13th compute
  cycle (state 21). The schedule was followed.
* **Coefficient loading** (state 0) takes three cycles, one per dimension
  register; the coefficient bus width was not specified.
* **DWTC.** The original names a 64-bit DWTC register beside R0..R2 in each
  coefficient unit; here it is the register feeding the filter.
* **INRAM size.** The cache is 1 KB as specified, but one block uses only 8
  of its 128 rows; the use of the remainder was not described.
* **LRAM/HRAM** layout, sizes and reset clearing, same-cycle off-chip reads,
  block order (x fastest) and the pairing of an odd last slice with slice 0
  are choices made here.
* **Not included:** the quantizer and run-length/Huffman coder of the
  compression flow (software around the processor), the off-chip memory, and
  pads.
* **Several processors** can share a volume, each taking a slab of slices;
  the off-chip memory offsets each processor's slice numbers and nothing in
  the processor changes. With the 2-tap Z filter and even slab sizes no block
  crosses a slab boundary. For a longer Z filter the controller still wraps
  at its own slab's end, so the memory must redirect those reads to the
  neighbouring slab.
* The adder and multiplier were low-power full-custom cells in the original;
  here they are plain RTL with the same function.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `cla_adder16_tb`, `booth_mult16_tb`: corner and random operands against
  integer arithmetic.
* `dwt_filter_tb`: a 4-tap filter with low-half products and a 12-tap filter
  with `PROD_LSB = 8`, against integer sums.
* `coef_unit_tb`, `inram_tb`, `stage_ram_tb`: register and memory behaviour
  against models.
* `dwt3d_ctrl_tb`: every control output, every cycle, for an 8 x 6 x 5
  volume, including wrapped coordinates and the total cycle count.
* `dwt3d_top_tb`: end to end, 4x4x2 on 8 x 6 x 5 and 12x12x4 on 16 x 14 x 6,
  two runs each, every output value against a reference transform
  (`dwt3d_tb_pkg::ref_block`, computed directly from the definition), block
  and band order, first-output latency and cycles per block; it also checks
  that coefficient loads, all passes, wrap-around in x, y and z, and `done`
  each happened.
* `dwt3d_full_tb`: the default configuration over a whole 256 x 256 x 53
  volume (10.6 M cycles, every one of the 3.5 M outputs checked).
* `dwt3d_table1_tb`: 4x4x2 over a 1920 x 1080 frame pair and 12x12x4 over
  256 x 256 x 4, printing cycles per slice.
* `dwt3d_parallel_tb`: two processors, each on half the slices of an
  8 x 6 x 8 volume, checked against the whole-volume transform; they finish
  in half the cycles of one.

The test volume is synthetic (`dwt3d_tb_pkg::sample`), generated from the
coordinates; no data files are needed. Coefficients are random 16-bit
values, which exercises the arithmetic fully.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dwt3d_pkg.sv tb/dwt3d_tb_pkg.sv tb/dwt3d_top_tb.sv \
    --top-module dwt3d_top_tb -Mdir obj_top
obj_top/Vdwt3d_top_tb
```

Replace `dwt3d_top_tb` by any other testbench name; the block-level
testbenches need only `rtl/dwt3d_pkg.sv` and their own file. Verilator finds
the other modules through `-Irtl`. `dwt3d_full_tb` runs in well under a
minute.

To change the wavelet, set `L1`, `L2`, `L3` (and `PROD_LSB` for fixed-point
coefficients) on `dwt3d_top`; the coefficient words widen to TAPS x 16 bits.
To change the volume, set `NX`, `NY`, `NZ`.
