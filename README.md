# Macroblock coprocessors for a software/hardware H.264 baseline decoder

This RTL is the hardware half of an H.264 / MPEG-4 AVC baseline-profile
decoder. The decoder splits the work between a processor and hardware:

- **Processor (ARM966-class CPU).** Runs entropy decoding (CAVLD), motion-vector
  decoding, intra prediction and reconstruction in software.
- **Hardware.** Three coprocessors on a 32-bit AHB take the arithmetic-heavy
  parts:
  - quarter-pel motion compensation (MC)
  - inverse quantisation plus inverse transform (Q⁻¹DCT⁻¹)
  - the deblocking loop filter (LF)

Each coprocessor works on one whole macroblock (MB) per task. The CPU overlaps
them with its own work in a three-stage MB pipeline:

| stage | work | done by |
|---|---|---|
| 1 | parse MB n+1 | CPU |
| 2 | predict and transform MB n | MC and Q⁻¹DCT⁻¹ coprocessors |
| 3 | filter MB n−1 | LF coprocessor |

The reference architecture targets QCIF at 7.5 frames/s with the coprocessors
clocked at 10 MHz. It sets these per-MB limits:

| coprocessor | local RAM | cycle limit per MB |
|---|---|---|
| MC | 12 Kbit | 1280 |
| Q⁻¹DCT⁻¹ | 3 Kbit | 210 |
| LF | 3.84 Kbit | 480 |

This implementation keeps those memory sizes and meets the limits with margin
(see *Cycle budget*).

## How the CPU drives the pipeline

Every coprocessor is a plain AHB slave with a local memory, a few registers
and a `ready` bit. There are no interrupts and no DMA. The CPU moves every
byte with single 32-bit transfers and polls STATUS. For MB *n* it:

1. Writes the MC reference windows and motion-vector fractions, then starts MC
   (inter MBs only).
2. Writes the 384 coefficient levels, the coded-block mask and the QPs to
   Q⁻¹DCT⁻¹, then starts it.
3. Writes MB *n−1* (already reconstructed) into the loop filter, with the 4
   rows above it and the 4 columns left of it. Also writes the boundary
   strengths and QPs, then starts the filter.
4. Parses MB *n+1* in software while all three coprocessors run.
5. Polls the ready bits.
6. Reads the prediction and the residual and reconstructs MB *n*
   (clip(pred + res)).
7. Reads back the filtered MB *n−1* together with the neighbour pixels the
   filter changed.

Because the filter needs only the upper and left neighbours, MBs are filtered
one at a time inside the pipeline. The CPU only has to keep the current and the
previous MB row.

Writing STATUS is harmless. Writing CTRL while the coprocessor is busy is
ignored, and an assertion flags it in simulation.

## System bus

`avc_hw_top` holds `ahb_interconnect` and the three coprocessors. The bus
masters and the memories are outside the top and connect through its ports.

| base | slave | where |
|---|---|---|
| `0x0000_0000` | embedded SRAM (1 MiB) | outside, `sram_*` ports |
| `0x2000_0000` | external memory interface (frame buffers in SDRAM) | outside, `emi_*` ports |
| `0x8000_0000` | `mc_coproc` | inside |
| `0x8001_0000` | `iqidct_coproc` | inside |
| `0x8002_0000` | `lf_coproc` | inside |

Any other address gets the two-cycle AHB ERROR response from a default slave.

There are two masters: the CPU (`cpu_*`) and a host bridge (`host_*`) that
loads data from a PC.

- **Arbitration.** The owner keeps the bus while it holds its request. When it
  lets go, the lowest-numbered requester gets the bus.
- **Grant timing.** Like HGRANT, `mgnt` names the owner of the *next* address
  phase.
- **Coprocessor timing.** The coprocessors never insert wait states. Each
  decodes its address phase in `ahb_slave_port` and answers reads
  combinationally in the data phase.

Shared types (`ahb_m2s_t`, `ahb_s2m_t`, `regbus_t`), the address map, register
offsets and the dequantisation and deblocking tables are in `avc_pkg`.

## Motion compensation (`mc_coproc`)

### Local memory

The CPU cuts the integer-pixel reference windows out of the reference picture,
so the coprocessor never sees picture coordinates. This includes any padding at
the picture border. The 12-Kbit memory (384 × 32 bit) holds:

- **Luma:** sixteen 9 × 9 windows, one per 4 × 4 block in raster order,
  starting at byte `81*b`. Each window starts two pixels above and left of the
  block, as the 6-tap filter needs.
- **Chroma:** eight 5 × 5 windows (Cb blocks 0–3, then Cr blocks 0–3) starting
  at byte `1296 + 25*k`.

That is 1496 pixels.

### MV registers

The CPU writes 16 MV words at `0x600 + 4*b`:

- `[1:0]`: x fraction of luma block *b* (quarter pel).
- `[3:2]`: y fraction of luma block *b*.
- In words 0–7 only: `[10:8]` and `[14:12]` hold the eighth-pel chroma
  fractions of chroma block *b*.

### Sequencer

The sequencer steps through the 24 blocks and copies each window word by word
into the luma or the chroma engine. Windows are not word-aligned, so each load
lane selects its own byte.

Each finished 4 × 4 prediction goes to a write-back unit. It stores the
prediction over the first 16 bytes of that block's window while the next
window is already loading. The CPU reads predictions from the same addresses
it wrote windows to.

### Luma engine (`mc_luma_interp`)

This is the most involved part of the design. The engine has two 6-tap
filters (`mc_six_tap`, taps 1, −5, 20, 20, −5, 1 built from shifts and adds),
an averaging adder and an output mux. All samples of a block come from 72
filter operations, two per cycle (36 cycles):

| operations | input | output |
|---|---|---|
| 0–35 | 9 window rows × 4 columns | horizontal half samples, kept **unrounded** (`hb1`) |
| 36–55 | integer columns 2–6 of the window | vertical half samples at the block's four columns and the column to the right (`vh1`) |
| 56–71 | the unrounded row results from `hb1` | the centre half samples *j* (`j1`) |

Operations 56–71 show how row results are fed back for column filtering.

One more cycle forms all 16 output pixels at once. By fraction, each output is
one of:

- the integer pixel *G*;
- a rounded half sample: `(x+16)>>5`, or `(x+512)>>10` for *j*;
- the rounded average of two such samples.

The choice follows the H.264 quarter-sample table. An integer MV skips the
filtering entirely.

Latency from the start edge to `done`:

- fractional MV: 38 cycles
- integer MV: 2 cycles

### Chroma engine (`mc_chroma_interp`)

Three 2-tap "Filter UV" units make one pixel per cycle:

- UV1 and UV2 filter rows *r* and *r+1* horizontally with weights (8−dx, dx).
- UV3 filters their two results vertically with weights (8−dy, dy).
- A final `(+32)>>6` gives H.264's bilinear chroma prediction.

Latency is 17 cycles.

### Registers

| offset | register |
|---|---|
| `0x700` | CTRL: bit 0 starts the MB |
| `0x704` | STATUS: bit 0 ready, bit 1 busy |
| `0x708` | CYCLES used by the last MB |

## Inverse quantisation and transform (`iqidct_coproc`)

### Level memory and mask

The 3-Kbit level memory holds the 384 levels of one MB as signed bytes. Row *r*
of block *b* is at word `4*b + r`, with column *c* in byte *c*. Blocks are
numbered:

- 0–15: luma, raster order
- 16–19: Cb
- 20–23: Cr

Levels outside −128..127 cannot be represented, the same limit the 3-Kbit size
implies.

The INFO register (`0x608`) holds:

- `[23:0]`: a coded-block mask. Bit *b* means block *b* has nonzero levels.
- `[24]`: marks an Intra 16×16 MB, whose luma DC levels sit at position 0 of
  each luma block.

The QP register (`0x60C`) holds the luma QP in `[5:0]` and the chroma QP in
`[13:8]`. The DCMASK register (`0x614`) marks, in bit *b*, a coded block whose
only nonzero level is at position 0.

### Processing order

1. **Luma DC (Intra 16×16 only).** Gathers the 16 luma DC levels (16 cycles)
   and applies the 4 × 4 Hadamard transform with H.264 DC scaling.
2. **Chroma DC.** Gathers the 8 chroma DC levels and applies the two 2 × 2
   Hadamard transforms with their scaling.
3. **Per block.** Reads four rows, one per cycle, dequantising each through
   constant multipliers (the 6 × 3 `v` table in `avc_pkg`, shifted by QP/6).
   Then it does one transform cycle:
   - multiplication-free row transform, transpose, column transform;
   - `(x+32)>>6`.

   Blocks fall into three classes, chosen by content:
   - mask bit 0: not read at all. The block is all zero, or (with a
     transformed DC) only that DC enters the transform;
   - DCMASK bit 1: only the first row is read (1 cycle instead of 4); the
     transform then reduces to the inverse DC term;
   - otherwise: all four rows are read.
4. **Write-back.** A write-back unit stores the four result rows while the
   next block is read.

### Results

Results are signed 16-bit, two per word, at `0x200 + 4*(2*(4*b+r) + h)`:

- `h` selects columns 0–1 (h = 0) or columns 2–3 (h = 1) of row `r`;
- the low half-word holds the even column.

The register map is otherwise the same as MC:

| offset | register |
|---|---|
| `0x600` | CTRL |
| `0x604` | STATUS |
| `0x610` | CYCLES |
| `0x614` | DCMASK |

## Loop filter (`lf_coproc`, `lf_edge_filter`)

### Local memory

The local memory is exactly 480 bytes (3.84 Kbit), byte-addressed from offset 0:

| bytes | contents |
|---|---|
| 0–63 | luma rows −4..−1 (bottom of the MB above), columns 0–15 |
| 64–383 | luma rows 0–15, columns −4..15, 20 bytes per row |
| 384–399 | chroma rows −2..−1, columns 0–7 |
| 400–479 | chroma rows 0–7, columns −2..7, 10 bytes per row |

It holds the luma of one MB and **one** chroma component. So an MB takes two
tasks:

1. CTRL = `0b111`: luma plus Cb.
2. CTRL = `0b101`: Cr alone, after the CPU has loaded the Cr samples.

### Filtering order

Each cycle the sequencer reads the eight pixels across one edge at one line
and runs them through `lf_edge_filter`. It writes the changed pixels back in
the same cycle, so later edges see filtered data. Edges are filtered in this
order:

1. luma vertical edges, left to right;
2. luma horizontal edges, top to bottom;
3. chroma vertical edges;
4. chroma horizontal edges.

This is the H.264 order, including the MB's own top and left edges.

`lf_edge_filter` is the complete H.264 line filter:

- the alpha/beta tests;
- the normal filter for bS 1–3, with the tC adjustment for luma;
- the strong filter for bS 4, in its luma and chroma forms.

It assumes zero slice filter offsets.

### Boundary strengths and QPs

The CPU computes the boundary strengths and writes them as 3-bit fields in
nibbles of four registers (`0x210`–`0x21C`):

- registers 0 and 1: vertical edges 0–1 and 2–3;
- registers 2 and 3: horizontal edges 0–1 and 2–3;
- within a register, nibble `4*(edge%2) + segment`, where a segment is a
  4-pixel piece of the edge.

Chroma edge *k* and line *i* use the bS of luma edge 2*k* and segment *i*/2.
On picture borders the CPU writes bS = 0.

QPY (`0x220`) and QPC (`0x224`) each hold three fields:

- `[5:0]`: the QP inside the MB;
- `[13:8]`: the average QP across the left MB edge;
- `[21:16]`: the average QP across the top MB edge.

## Cycle budget

These are measured in simulation, from the CTRL write to ready, on the worst
cases the testbenches construct:

| coprocessor | worst case built | limit | throughput at 10 MHz |
|---|---|---|---|
| MC (all 16 luma MVs fractional) | 1167 | 1280 | 8569 MB/s |
| MC (all MVs integer) | 591 | — | — |
| Q⁻¹DCT⁻¹ (fully coded Intra 16×16 MB) | 152 | 210 | 65789 MB/s |
| LF (luma + Cb, then Cr) | 162 + 34 = 196 | 480 | 51020 MB/s |

Level 1 of the baseline profile needs at most 1485 MB/s. QCIF at 7.5 frames/s
needs 742.5 MB/s. The bus traffic is about 5.1 KB per inter MB, roughly 3.8 ms
per QCIF frame on a 33 MHz, 32-bit AHB. The end-to-end test moves 575 KB for
its QCIF picture (66 inter and 33 intra MBs), or 4.4 ms at that rate. Its CPU
model reads back the whole MC memory instead of only the results, and it polls
status registers.

## Departures from the reference architecture

- **MC pixel count.** MC holds 1496 pixels: sixteen 9 × 9 luma and eight 5 × 5
  chroma windows. The reference quotes "about 1500" pixels in 12 Kbit. Its data
  table lists 256 chroma bytes, which would not fit in that memory together
  with the luma windows.
- **Residual width.** Q⁻¹DCT⁻¹ returns 16-bit residuals (768 bytes per MB), not
  bytes; H.264 residuals need more than 8 bits. Skipping is driven by an
  explicit coded-block mask and a DC-only mask written by the CPU, which
  knows both from entropy decoding.
- **Loop-filter register data.** The loop filter's bS and QP registers take 24
  bytes, not the 4 bytes of "edge info and QP" in the reference's data table.
  Chroma is filtered one component per task so that the 3.84-Kbit memory
  suffices.
- **Reconstruction.** Reconstruction is left to the CPU. The reference pipeline
  figure puts "reconstruction and loop filtering" in one stage, and its flow
  chart has the CPU prepare the data for it.
- **Clocking.** The design is single-clock. The reference clocks the AHB at
  33 MHz and the coprocessors at 10 MHz; no clock-domain crossing is built.
- **Unspecified interface details.** The register maps, the address map, the
  arbitration policy and the MV word format are this design's own choices.
- **No gate-count match.** Gate counts are not matched. The MC datapath uses two
  full 6-tap filters, and the LF memory is a register array with 8 reads and 6
  writes per cycle.

## Outside the RTL

These parts are not in the RTL:

- **Processor, SRAM and EMI.** The ARM966 processor, the 1-MiB embedded SRAM
  and the external memory interface with its SDRAM. Their AHB ports are on
  `avc_hw_top`.
- **Host bridge and debug interface.** The host bridge and its MultiICE link to
  a PC. The bridge's master port is on the top.
- **Software.** All the decoding software: CAVLD with its leading-zero table
  look-up, MV prediction, intra prediction, reconstruction and computing bS.

The testbenches stand in for the processor and the bridge with
`ahb_master_bfm`, and for the memories with `ahb_mem_model`.

## Verification

Every block has a self-checking testbench that ends with a `TB_RESULT
checks=N failures=M` line and has a watchdog. The references are independent
integer models in `tb/avc_ref_pkg.sv`: 6-tap and bilinear interpolation,
dequantisation, the DC and 4 × 4 transforms, the H.264 line filter and a
whole-plane MB filter.

| testbench | what it covers |
|---|---|
| `tb_mc_luma_interp` | all 16 quarter positions on random and extreme windows; latency 38 / 2 |
| `tb_mc_chroma_interp` | all 64 eighth positions; latency 17 |
| `tb_mc_coproc` | three MBs over the bus (all fractional, all integer, mixed); predictions, MV read-back, CYCLES ≤ 1280 |
| `tb_iqidct_coproc` | 25 MBs: random coded and DC-only masks, QP 0–51, Intra 16×16 and inter, no-coded-block and fully coded; CYCLES ≤ 210 |
| `tb_lf_edge_filter` | 40 000 lines over every bS, QP and plane type; counts strong, normal and untouched lines |
| `tb_lf_coproc` | 8 MBs with luma, Cb and Cr against the plane filter; cycles ≤ 480 per MB |
| `tb_ahb_interconnect` | two masters with random traffic into five memory models (two with wait states); grant one-hot, handovers, ERROR response |
| `tb_avc_hw_top` | end to end: a QCIF picture (11 × 9 MBs) through the MB pipeline (see below) |

`tb_avc_hw_top` decodes the picture with random MB syntax: inter and intra
MBs, Intra 16×16, fractional and integer MVs, random coded and DC-only masks
and QPs. The CPU
model runs the pipeline steps listed above, and the decoded picture is copied
to external memory. There it is compared pixel by pixel with a software decode
of the same syntax.

The test counts, and requires, each mechanism:

- inter and intra MBs, and the Intra 16×16 DC transform;
- fractional and integer luma MVs;
- blocks skipped by the coded-block mask, and DC-only blocks;
- strong and normal filter lines;
- cycles with two or more coprocessors busy at once;
- polls that found a coprocessor busy;
- host-bridge transfers during decoding;
- external-memory wait states;
- the ERROR response.

It also checks the CPU's bus traffic per MB against a budget. A coprocessor
that stays busy for 2000 status polls ends the test with a failure.

The top has no parameters, so this test runs the design at full size.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/avc_pkg.sv tb/avc_ref_pkg.sv $(ls rtl/*.sv | grep -v avc_pkg) tb/ahb_master_bfm.sv tb/ahb_mem_model.sv \
  tb/tb_avc_hw_top.sv --top-module tb_avc_hw_top -o sim
./obj_dir/sim
```

For a single block, replace the testbench file and `--top-module`. Lint
reports width warnings from the package's table functions and the signed
filter arithmetic; they are benign. It also reports `SYNCASYNCNET` because
the assertions use `rst_n` in `disable iff`.

## Files

- `rtl/avc_pkg.sv`: AHB and register-bus types, address map, register
  offsets, pixel clipping, dequantisation scale, deblocking tables.
- `rtl/avc_hw_top.sv`: top level: bus plus the three coprocessors.
- `rtl/ahb_interconnect.sv`: arbiter, decoder, response multiplexer, default
  slave.
- `rtl/ahb_slave_port.sv`: AHB-Lite slave front end shared by the
  coprocessors.
- MC: `rtl/mc_coproc.sv`, `rtl/mc_luma_interp.sv`,
  `rtl/mc_chroma_interp.sv`, `rtl/mc_six_tap.sv`.
- Q⁻¹DCT⁻¹: `rtl/iqidct_coproc.sv`.
- LF: `rtl/lf_coproc.sv`, `rtl/lf_edge_filter.sv`.
- `tb/`: the testbenches above, the bus-master and memory models, and the
  reference package.
