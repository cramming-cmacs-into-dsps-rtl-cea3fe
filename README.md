# Complex multiply-accumulate cells packed into DSP slices, and a TDM correlator around them

A radio-telescope correlator multiplies the signal of every antenna input by the
conjugate of every other input and adds the products up over time. For the low-frequency
Square Kilometre Array (1024 inputs: 512 stations with two polarisations each) that means
about half a million complex multiply-accumulates per sample time. On an FPGA the cost of one
complex multiply-accumulate cell (CMAC) therefore decides how many inputs one device can
correlate.

A complex product `(a + ib)(c + id) = (ac - bd) + i(ad + bc)` costs four real multiplies done
the textbook way, or three with Karatsuba's trick at the price of extra adders. This design
needs only **two DSP slices per CMAC with no extra fabric multipliers**. The slice's multiplier
is 27 x 18 bits but the samples are only 9 bits wide. So the real and imaginary parts of one
operand are packed into a single 27-bit word, 18 bits apart. One wide multiply then yields two
partial products at once, in separate bit fields.

This repository holds:

* `cmac`: the packed CMAC, built from two `dsp_slice` instances (a model of the
  DSP48E2 datapath) plus two fabric accumulators;
* a complete time-division-multiplexed (TDM) cross-correlator built from these cells:
  `tdm_cache` → `array_driver` → fold network → `cmac_array`, inside the top module
  `cmac_correlator`. At its defaults it correlates 1024 inputs with 1056 CMACs in 512 slots.

The CMAC follows the published CMAC design (ReConfig 2018, "Complex Multiply Accumulate Cells
for the Square Kilometre Array Correlators") down to its bit fields. The source describes the
correlator around it only by its component names and size tables. The array wiring, the cache
organisation, the slot sequencing and the result readout are this design's own (see
[Departures and own choices](#departures-and-own-choices)).

## The packing trick

Write `S = 2^(2W)` with `W = 9`, so `S = 2^18`. The two slices compute:

| slice | A port (27 b) | D port (27 b) | pre-adder | B port | product |
|-------|---------------|---------------|-----------|--------|---------|
| upper | `a·S` (bits 26:18 = a, rest 0) | `b`, sign-extended | `D + A` = `a·S + b` | `c` | `ac·S + bc` |
| lower | `a`, sign-extended | `b·S` | `D − A` = `b·S − a` | `−d` | `−bd·S + ad` |

The upper slice's product goes straight, unregistered, into the lower slice's ALU, which is
what the slices' cascade path (PCIN) is for. The lower slice's P register therefore holds

```
P = (ac − bd)·2^18 + (bc + ad)
```

* `P[17:0]` is the imaginary part as an 18-bit signed number.
* `P[35:18]` is the real part, **except** that a negative imaginary part borrowed one from it.
  The real accumulator therefore adds `P[17]`, the imaginary sign bit, as a carry-in. No extra
  adder is needed, because the accumulator's adder has a free carry input.
* Both fields then go to fabric accumulators. Each has a 2:1 mux on its feedback path that
  selects 0 on the first sample of a run, so a new integration starts without a separate clear
  cycle.

**Conjugation is free.** A correlator needs `x·conj(y)`, i.e. `d` replaced by `−d`. The lower
slice's B port already expects `−d`, so wiring the raw `d` to it gives the conjugate product
with no logic at all. `cmac` has a parameter `CONJ`. With `CONJ = 1` (the default, used by the
array) it computes `x·conj(y)`. With `CONJ = 0` it negates `d` first and computes `x·y`.

**The reserved code.** The packing is exact for every input except the most negative one,
`−2^(W−1)` (−256 for 9 bits):

* the lower pre-adder `b·S − a` leaves the 27-bit range when `b = −256`;
* `−d` overflows when `d = −256` and `CONJ = 0`;
* with all four inputs at −256, `bc + ad = 2^17` no longer fits its field.

Radio-astronomy sample formats reserve that code as "not a number", so the design does not
support it. The testbenches draw samples from −255..255.

**Widths.** The packing needs `3W ≤ 27` (checked by an elaboration-time assertion), so `W` can
be anything up to 9. The testbench runs the cell exhaustively at `W = 3` and `W = 4`, and at
random at `W = 9`.

## The CMAC pipeline

`dsp_slice` models the DSP48E2 datapath with all its registers:

1. input registers on A, D and B (and C);
2. the pre-adder result register AD and a second B register;
3. the multiplier result register M;
4. the ALU result register P.

The upper slice is instantiated with `PREG = 0`, so its output is `M` taken straight from
stage 3. It lands in the lower slice's ALU in the same cycle as the lower slice's own `M`.

| edge | what is registered |
|------|--------------------|
| 1 | A, D, B inputs of both slices |
| 2 | pre-adder sums, B delayed |
| 3 | both products |
| 4 | lower slice P = sum of both products |
| 5 | real/imaginary accumulators, `acc_done` |

`cmac` delays its `en`/`first`/`last` flags by 4 cycles to meet P. A finished sum appears 5
cycles after its `last` sample, and `acc_done` is high for that one cycle. The cell takes one
sample per cycle with no gaps. An `en = 0` cycle holds the accumulators.

## The correlator

```
             in_re/in_im (M samples per word)
                     │
              ┌──────▼──────┐  frame_ready, bank
              │  tdm_cache  │───────────────────┐
              │ 2 banks of  │                   ▼
              │ NB·T words  │◄── read addr ── array_driver
              └──┬───────┬──┘                   │ en/first/last, diag, slot tag
         X (blk i)       Y (blk j)              │
              ┌──▼───────▼──┐                   │
              │ fold network│◄──────────────────┤
              └──┬───────┬──┘                   │
          lower-triangle  upper-triangle buses  │
              ┌──▼───────▼──────────────────────▼──┐
              │ cmac_array: M x (M+1) cmac cells     │
              │ cell (r,k) += col[k] · conj(row[r])  │
              │ readout registers shift to column 0  │
              └──────────────────┬───────────────────┘
                                 ▼
     out_re/out_im[M], out_col, out_diag, out_row_blk, out_col_blk
```

**Inputs and frames.** The `NB·M` inputs are split into `NB` blocks of `M`. The defaults give
32 blocks of 32 inputs, i.e. 16 dual-polarisation stations per block, 512 stations in all.
The input stream carries one word of `M` complex samples per cycle (`in_valid`), in the order

```
for t in 0 .. T-1:  for blk in 0 .. NB-1:  word(blk, t)
```

`NB·T` words make a frame. `tdm_cache` writes a frame into one bank, then hands that bank to
the driver (`frame_ready`) and writes the next frame into the other bank.

**Slots and the M x (M+1) array.** The array works on two blocks at a time, `X` = block `i`
from the cache's row port and `Y` = block `j` from its column port. For `T` consecutive cycles
`array_driver` reads time sample `t` of both and flags `t = 0` as `first` and `t = T−1` as
`last`. Each row and each column of the array has two buses. Cells on or below the diagonal
(`k ≤ r`) listen to the "lo" buses, cells above it (`k > r`) to the "hi" buses. Between the
cache and the array, a small fold network of multiplexers chooses what goes on those buses:

* **Off-diagonal slot** (`i < j`, `out_diag = 0`): both bus sets carry `X` on the rows and `Y`
  on the columns. Cell `(r, k)` with `k < M` computes `V(iM + r, jM + k)`. The extra column
  `M` gets zeros and idles.
* **Diagonal slot** (`j = i + 1`, `out_diag = 1`): the lower triangle gets `X` on both rows and
  columns and computes `V(iM + r, iM + k)` for `k ≤ r`. The upper triangle gets `Y` in mirrored
  order (row `r` ← `Y[M−1−r]`, column `k` ← `Y[M−k]`) and computes
  `V(jM + M−1−r, jM + M−k)`. These are exactly the `k' ≤ r'` pairs of block `j`.

An `M x (M+1)` rectangle is two triangles of `M(M+1)/2` cells. So one slot holds the complete
self-correlation, autocorrelations included, of two blocks. A frame takes
`NB(NB−1)/2 + ceil(NB/2)` slots: the diagonal slots `(0,1), (2,3), …` first, then every
`i < j`. With an odd `NB` the last block shares its diagonal slot with itself, and its
products appear twice. For the defaults that is 512 slots of 64 cycles, 32 768 cycles per
frame. Keeping up in real time needs an array clock of 512 times the per-input sample rate.

**Results.** When a slot ends, every cell copies its sum into a readout register in the same
cycle in which it starts the next slot. The registers then shift towards column 0, one column
per cycle. While `out_valid` is high, `out_re[r] + i·out_im[r]` is cell `(r, out_col)` of the
slot tagged `out_diag`, `out_row_blk` (`i`) and `out_col_blk` (`j`), mapped to `V(p, q)` as
above, where

```
V(p, q) = Σ_t  x_q(t) · conj(x_p(t))
```

A slot's column 0 leaves 7 cycles after the slot's last read, and the first result of a frame
`T + 6` cycles after `busy` rises. Because the readout of one slot (`M + 1` columns) must
finish before the next slot ends, `T ≥ M + 1` is required (checked by assertions).

**Overrun.** A frame can complete while the previous one is still being replayed. The cache
then pulses `overrun`, because the next frame will overwrite the bank being read, and the
driver pulses `dropped` and skips that frame. Nothing is stalled: the input side is a
real-time stream.

## Parameters

| parameter | default | meaning | origin |
|-----------|---------|---------|--------|
| `W` | 9 | sample component width | published design (9-bit CMAC) |
| `M` | 32 | inputs per block; the array is `M x (M+1)` = 1056 CMACs | published matrix size 32 |
| `NB` | 32 | number of blocks ("stations per row") | published value 32 |
| `T` | 64 | samples per frame, i.e. per integration | own choice |
| `ACC_W` | 27 | accumulator width per part | own choice, holds `2^9` full-scale products |
| `CONJ` (cmac) | 1 | `x·conj(y)` or `x·y` | own parameter |
| DSP widths | 27/18/48 | A-D/B/P widths in `cmac_pkg` | DSP48E2 |

The published results table also lists matrix sizes 30 to 40 with other block counts. Setting
`M` and `NB` reproduces their input and CMAC counts (for example `M = 34, NB = 31` gives 527
stations and 1190 CMACs).

## Departures and own choices

* **Array wiring.** The published design gives the array size, `M(M+1)` cells (1056 for
  `M = 32`), and the slot counts (512 for 32 blocks). It does not show how the cells are fed.
  The lo/hi buses, the fold network, the neighbour pairing of diagonal blocks and the slot
  order are this design's reconstruction, and they reproduce those counts. For odd `NB` this
  design needs `NB(NB−1)/2 + (NB+1)/2` slots. The published table lists one more (for example
  614 for 35 blocks, against 613 here).
* **Cache.** The published cache uses 160 BRAM36 blocks for `M = 32`, and its organisation is
  not described. The ping-pong banks, the word order, the two read ports and `T = 64` are this
  design's choices. At the defaults the two banks hold 2 × 2048 words of 576 bits (2.36 Mbit).
* **Integration length and accumulator width** are free choices (`T`, `ACC_W`). Longer
  integrations need `ACC_W ≥ 18 + log2(T)`.
* **Readout.** The per-cell readout shift register and the slot tags are this design's own.
* **`dsp_slice`** models only what the CMAC uses, in the register layout of the DSP48E2: no
  OPMODE switching, pattern detector or SIMD. The C input passes two registers, as in the slice
  block diagram, so a C value joins the product of the operands presented one cycle before it. The CMAC does
  not use C. On an FPGA, `dsp_slice` should be replaced by the vendor primitive configured the
  same way, or left to inference.
* Resets are synchronous. Control and accumulators are reset; the sample memories are not.

## Verification

Each module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_dsp_slice` | five slice configurations against a model of the register pipeline, including 27-bit pre-adder wrap, PCIN, C, P feedback and the unregistered output |
| `tb_cmac` | 1500 random runs at `W = 9` (both `CONJ` settings, with idle cycles and full-scale corners); all 50 625 products at `W = 4`; all 2401 at `W = 3` (`x·y`); the 5-cycle latency |
| `tb_cmac_array` | 3 x 5 grid with independent lo/hi buses, 400 random runs: every sum, the column order and the cycle of each readout column |
| `tb_tdm_cache` | 12 frames with random gaps, bank alternation, read data of both ports, one provoked overrun |
| `tb_array_driver` | slot enumeration (diagonal then off-diagonal, odd `NB`), control alignment, replay length, a dropped frame |
| `tb_cmac_correlator` | end to end at `M = 4, NB = 3, T = 6`, 5 frames: every cell of every slot, including the idle column and a diagonal slot shared by one block; slot tags, replay length and latency; counts frames, both banks, diagonal and off-diagonal slots, an overrun and a dropped frame |
| `tb_cmac_correlator_full` | end to end at the default size: one full frame of 1024 inputs, all 512 slots, every one of the 1056 cells in each |

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/cmac_pkg.sv tb/tb_cmac_correlator_full.sv --top-module tb_cmac_correlator_full
./obj_dir/Vtb_cmac_correlator_full
```

The full-size testbench builds in about 20 s and runs in about a second. Timing closure and
resource use on an FPGA have not been checked. The published 9-bit CMAC reached 640 MHz in two
DSP48s, 86 LUTs and 54 flip-flops.

## Files

* `rtl/cmac_pkg.sv`: DSP widths, ALU and pre-adder enums, slot count function
* `rtl/dsp_slice.sv`: DSP48E2-style slice datapath
* `rtl/cmac.sv`: packed complex multiply-accumulate cell
* `rtl/cmac_array.sv`: grid with lo/hi triangle buses and readout
* `rtl/tdm_cache.sv`: double-buffered frame store
* `rtl/array_driver.sv`: TDM slot sequencer
* `rtl/cmac_correlator.sv`: top level, including the fold network
* `tb/`: one testbench per module, plus the full-size run
