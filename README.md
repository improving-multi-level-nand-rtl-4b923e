# On-chip 4-D TCM for 2-bit-per-cell NAND flash

Two-bit-per-cell NAND flash normally protects each page with a BCH code
alone. As cells shrink, the raw bit error rate climbs, and the BCH code needs
more parity cells and a much larger decoder. This RTL implements the inner
half of a concatenated scheme, on the flash die: a trellis-coded modulation
(TCM). It stores 9 bits (8 user bits plus 1 convolutional parity bit) in
every group of four cells by programming each cell to one of **five** levels
instead of four. That costs no extra cells, because 2^9 = 512 ≤ 5^4 = 625.
On a read, the cells are sensed with 16-level quantization and decoded by a
Viterbi decoder. This lowers the bit error rate that reaches the outer BCH
code by one to two orders of magnitude. The BCH encoder and decoder stay off
chip and see ordinary user bytes.

The design follows a published BCH-TCM scheme for MLC NAND:

- the 4-D set partition and its subset table;
- the rate-2/3, 8-state code;
- the hierarchical demodulator and the register-exchange Viterbi decoder;
- the erasure of defective cells found by an extra word-line sweep step;
- the page-buffer architecture of local buses, bus segments and per-segment
  modulators.

Where the scheme leaves details open (the code polynomials, which 512 points
are used, the quantizer, widths, handshakes), this RTL makes its own choices.
They are listed under "Choices made here".

## The 4-D constellation

The constellation is the hardest part to follow. Everything else is built on
it.

**1-D.** A cell holds level 0..4. The levels split into two 1-D subsets,
E = {0, 2, 4} and F = {1, 3}.

**2-D.** A pair of cells falls into one of four 2-D subsets:
A = (E,E) with 9 points, B = (F,F) with 4, C = (E,F) with 6 and
D = (F,E) with 6.

**4-D.** Cells 0,1 form the first pair and cells 2,3 the second. A 4-D
*type* (X,Y) puts 2-D subset X on the first pair and Y on the second. Each
of the eight 4-D subsets is the union of two types:

| subset | types           | points | labels (type 0 + type 1) |
|--------|-----------------|--------|--------------------------|
| P1     | (A,A) ∪ (B,B)   | 81+16  | 48 + 16                  |
| P2     | (C,C) ∪ (D,D)   | 36+36  | 32 + 32                  |
| P3     | (A,B) ∪ (B,A)   | 36+36  | 32 + 32                  |
| P4     | (C,D) ∪ (D,C)   | 36+36  | 32 + 32                  |
| P5     | (A,C) ∪ (B,D)   | 54+24  | 40 + 24                  |
| P6     | (C,B) ∪ (D,A)   | 24+54  | 24 + 40                  |
| P7     | (A,D) ∪ (B,C)   | 54+24  | 40 + 24                  |
| P8     | (C,A) ∪ (D,B)   | 54+24  | 40 + 24                  |

P1..P4 hold the points whose level sum is even, and P5..P8 those whose sum
is odd. Inside a subset, every point is at squared distance 4 or more from
every other.

Each subset has more than 64 points, so 64 of them are chosen to carry the
six uncoded bits (the *label* k = 0..63). The points are numbered as
follows:

- A 2-D point is numbered i = i1·n2 + i2. Here i1 and i2 are the positions
  of the two levels inside their 1-D subsets (E: 0,2,4 → 0,1,2; F: 1,3 →
  0,1), and n2 is the size of the second cell's 1-D subset.
- A point of type (X,Y) is numbered j = jx·|Y| + jy.
- A subset gives its first m0 labels to points j = 0..m0−1 of its first type,
  and the remaining 64−m0 labels to the first points of its second type.
  m0 = 32 when both types hold at least 32 points. Otherwise the smaller type
  is used whole (the "labels" column above).

`tcm_pkg::modulate` and `tcm_pkg::demap` implement this numbering.
`tb/tb_ref_pkg.sv` rebuilds it by plain enumeration.

## Code and bit assignment

A group byte is `d[7:0]`:

- `d[3:0]` hold the four cells' first-page bits, and `d[7:4]` their
  last-page bits.
- `d[5:4]` = {y2, y1} enter the rate-2/3 systematic feedback encoder. Its
  parity-check polynomials are h0 = 11, h1 = 02 and h2 = 04 (octal), so
  y0(n) = y0(n−3) ⊕ y1(n−1) ⊕ y2(n−2).
- The subset index is {y0, y2, y1}: the parity picks the even or the odd
  half, and y2, y1 pick the subset inside it.
- The label is k = {d[7:6], d[3:0]}.

This assignment matters for multi-page programming. The first page is
already in the cells when the last page arrives, so only last-page bits may
enter the serial convolutional encoder. The first-page bits go into the
label uncoded, and the modulation can then run in parallel over the whole
page buffer.

The trellis starts in state 0 at the first group of a page. It is not
terminated.

## Demodulation and Viterbi decoding

Sensing gives each cell a 4-bit bin q. The 16 uniform bins cover
[−0.5, 4.5] level units. The demodulator uses the bin centre, and every
distance is an exact integer in units of 1/32 level: the centre of bin q is
at 10q − 11 and level L is at 32L.

- `demod_1d` (four of them): the nearest E level and the nearest F level,
  with their squared distances Metric_E and Metric_F.
- `demod_2d` (two of them): adds the 1-D results into a metric and a best
  point for each of A, B, C and D.
- `demod_4d`: for each of P1..P8 it adds the two pairs' 2-D metrics for both
  types and keeps the smaller one (ties go to type 0). It turns the winning
  point into a label. The hierarchy searches whole types, so the winner can
  be one of the unlabelled points. Such a point folds onto the last labelled
  point of its type.
- `viterbi_re`: the eight 17-bit subset metrics are the branch metrics of an
  8-state, state-parallel add-compare-select. Path metrics are 20-bit
  wrap-around values. Every state keeps a register-exchange survivor of
  DEPTH = 20 whole decoded bytes, each rebuilt from the branch's two coded
  bits and its subset's label. The byte that drops out of the best state's
  survivor is the output.

**Timing.** The decoder takes one group per clock: 8 bits per clock, or
1 Gb/s at 125 MHz. The first byte appears DEPTH+1 clocks after the first
group. After `in_last` the decoder holds `in_ready` low for DEPTH clocks and
flushes the best state's survivor. A page of N groups therefore takes
N + DEPTH + 1 clocks.

## Defective cells: the extra sweep step

Some string defects keep a bit-line from ever discharging. The cell then
reads as the top bin whatever it stores, which misleads a Euclidean-distance
decoder. `sense_sweep` latches each cell's bin as the first of the 15
threshold steps at which its bit-line discharges. It then takes one more
step with the selected word-line at the pass voltage V_unsel. Every healthy
cell conducts at that step, so a bit-line that stays charged flags its cell
as defective.

The demodulator *erases* a flagged cell: its distances count as zero, so
that group is decoded in three dimensions. The fixed levels 2 (E) and 1 (F)
are reported for it. The erased cell's own bits may come out wrong, and the
outer BCH code corrects them. Its neighbours are decoded from clean metrics.

## Page-buffer architecture

```
tcm_subsystem                    N_BUS = 4 local buses
└─ local_bus (x4)                one TCM encoder + one TCM decoder per bus
   ├─ tcm_encoder                conv_encoder + tcm_modulator, 1 group/clock
   ├─ tcm_decoder                demod_4d (4x demod_1d, 2x demod_2d) + viterbi_re
   └─ bus_segment (x M = 32)     bus switch, one tcm_modulator, G = 64 latch groups
      └─ sense_sweep             4*G sense latches with defect flags
```

The defaults give 4 × 32 × 64 = 8192 groups, or 32768 cells. Each page of
the two-page cell is then 4 kB, and there are 128 modulators. A latch group
holds:

- 8 data bits;
- the parity bit;
- 12 level bits;
- in the sense latches, four bins and four defect flags.

Each local bus runs six operations. Only one runs at a time.

| operation | control | what happens | clocks |
|---|---|---|---|
| first-page write | `wr_valid`, `wr_encode`=0, `wr_mask=01` | the bytes go straight into the latches; the array reads them as plain bits at `arr_bits` and programs them as usual (BCH alone protects them) | 1 per group |
| multi-page last-page write | `arr_page1_we` loads first-page bits read from the cells; `wr_valid`+`wr_encode`, `wr_mask=10` writes the last page in address order | the encoder's parity lands in the group one clock after each write | 1 per group |
| modulation pass | `mod_start` | bus switches open (`switch_on`=0); every segment modulates its groups in parallel: load, modulate, write back | 3·G = 192 (1.536 µs at 8 ns) |
| single-page write | `wr_encode`+`wr_inline`, `wr_mask=11` | the whole byte is TCM-encoded in line and its levels are stored directly; no modulation pass | 1 per group |
| TCM read | sweep into the sense latches, then `rd_start`, `rd_page` (1 = first, 2 = last page) | switches closed; all M·G groups stream through the decoder; `out_data` is the decoded byte, `out_nib` the requested page's nibble | M·G + DEPTH + 2 |
| bypass read | `rd_start`+`rd_bypass` | latch bytes stream out unchanged (a first page whose last page is not yet programmed; BCH alone protects it) | M·G + 2 |

With four buses reading in parallel, the sub-system decodes 4 × 8 bits per
clock, or 4 Gb/s at 125 MHz. Multi-page reads need that rate because half of
the decoded bits belong to the other page.

The array side of each segment is a group-addressed port:

- `arr_addr` → `arr_levels`: the levels to program;
- `arr_addr` → `arr_bits`: the plain first-page bits, for a first page
  programmed on its own;
- `arr_page1_we`/`arr_page1`: load first-page bits;
- `sweep_start`, `step_valid`, `step_idx` and `discharged`: the page-wide
  sweep.

The cell array, its program-and-verify circuits and the analog sweep are
outside.

Assertions check the handshake rules:

- no writes while a modulation or a read is running;
- no modulation start while an operation is busy, or in the clock where a
  parity write-back is still pending.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `tcm_subsystem` | `N_BUS` | 4 | local buses |
| `tcm_subsystem`, `local_bus` | `M` | 32 | segments (modulators) per local bus |
| `tcm_subsystem`, `local_bus`, `bus_segment` | `G` | 64 | latch groups per segment |
| `tcm_subsystem`, `local_bus`, `tcm_decoder`, `viterbi_re` | `DEPTH` | 20 | survivor length in groups |
| `viterbi_re` | `PM_W` | 20 | path metric width (wrap-around) |
| `demod_1d` | `ERASE_E_LEVEL`, `ERASE_F_LEVEL` | 2, 1 | levels reported for an erased cell |
| `sense_sweep` | `N_CELLS` | 256 | sense latches |

For a 512 B page with the same 1.5 µs modulation latency, use `M = 4`
(16 modulators).

## Choices made here

The original scheme leaves these open.

- **Code polynomials.** h0, h1, h2 = 11, 02, 04 (octal).
- **Subset index and bits.** The index is {parity, d5, d4}, and the byte
  layout is the one under "Code and bit assignment".
- **Point selection.** Which 64 points of each subset carry labels, their
  numbering, and the folding of unlabelled points in the demodulator.
- **Quantizer.** 16 uniform bins over [−0.5, 4.5] with exact integer metrics
  and no metric quantization.
- **Viterbi decoder.** DEPTH = 20, modulo path metrics, output taken from the
  best state, flush at the end of a page, no trellis termination.
- **Erased cells.** The fixed levels 2 and 1.
- **Sense latch.** Bin = first discharge step; defect = still charged at the
  V_unsel step.
- **Control.** Command/handshake signals, one-cycle register stages, an
  asynchronous active-low reset, and the per-segment array ports.
- **Single-page writes.** They use the encoder in line, and the multi-page
  flow stores only its parity.

## Not included

- **Outer BCH encoder/decoder.** It is off chip and unspecified here.
- **NAND cell array and its analog circuits.** These include
  program-and-verify, word-line sweep generation and bit-line sensing.
- **Comparison designs.** The 16-state trellis and infinite-precision
  sensing are not built.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/tcm_pkg.sv tb/tb_ref_pkg.sv tb/tcm_subsystem_tb.sv \
  --top-module tcm_subsystem_tb -Mdir obj_top
./obj_top/Vtcm_subsystem_tb
```

Swap in any other `tb/<module>_tb.sv` and its top name. `tb/tb_ref_pkg.sv`
is the reference model shared by the testbenches. It builds the
constellation by enumeration, encodes with the parity recursion, and
demodulates by brute force over every point of both types.

What the testbenches check:

- **Block tests.** All 512 modulator inputs and every 1-D bin, random 2-D
  and 4-D demodulator inputs with and without erasures, and encoder and
  Viterbi streams with noise.
  - Latency: first byte after DEPTH+1 clocks, flush of DEPTH+1 clocks.
  - The sense sweep, including defects.
  - Segment modulation, which must take 3·G clocks.
  - Every local-bus flow, at M=4, G=64: one of the four local buses of a
    512 B page.
- **`tcm_subsystem_tb`.** Runs the whole design at its default size
  (8192 groups) in about one minute:
  - multi-page programming with a modulation pass;
  - TCM reads of both pages;
  - single-page in-line programming and its read;
  - a first page on its own, checked at `arr_bits` and read back through
    the bypass.

  The cells get small noise, a large offset (0.6 level) in single cells, and
  one defective cell in about 64 groups. Every defect-free group must decode
  exactly, and each mechanism must occur at least once. In one run it
  counted about a thousand group reads corrected by the TCM and about two
  hundred group reads with an erased cell.

In these tests the disturbances are kept at least six groups apart, and out
of the last groups of a page (whose trellis is not terminated). That keeps
them within the inner code's reach. Denser errors can leave residual byte
errors, which the outer BCH code is there to correct. The testbenches do
not measure bit error rates against noise level.
