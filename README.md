# Multi-mode embedded compression codec for video memory traffic

In a handheld video system a large share of the power goes into moving
macroblocks between the video coder and external DRAM. This codec sits on that
path. It compresses each macroblock before it goes out on the bus and
decompresses it on the way back, so bus traffic shrinks by the compression
ratio. One algorithm, SPIHT bitplane coding on a two-level integer wavelet
transform, provides every mode, chosen per unit:

| mode | what is sent per 8x8 unit | effect |
|------|---------------------------|--------|
| lossless | the whole embedded bitstream | exact reconstruction, size depends on content |
| half size | the stream cut after 256 bits | compression ratio at least 2 on every block |
| quarter size | the stream cut after 128 bits | compression ratio at least 4 on every block |
| quality layers | the lowest 0..7 bitplanes left out | bounded error, smaller stream |

Because SPIHT sends the most important bits first, a shorter stream is always
a lower-quality version of the same picture. Rate control is therefore just a
matter of stopping. The encoder and decoder share almost all of the hardware.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable, and
`ec_codec` is the top, with no parameters to set.

## Data path

```
pixels  <->  dwt_idwt  <->  reg_array   <->  bitplane_rf  <->  spiht_engine  <->  bs_fifo  <->  32-bit bus
 2/cycle     S-transform    64 words x10     10 rows x 64      16 PEs             bit packer
                                  \______ ec_control: word <-> bitplane transfer, sequencing ______/
```

Encoding runs left to right and decoding right to left, through the same
blocks.

### Coding unit and four-tree pipelining

A two-level transform of an 8x8 pixel block gives exactly 64 coefficients:

- one LL2 coefficient with no descendants (called C0 here);
- three complete hierarchical trees of 21 coefficients each: a root in LL2, 4 level-2 children and 16 level-1 grandchildren.

These four trees form one **coding unit**. A 4:2:0 macroblock is six units:
four Y, one U and one V.

The wavelet transform produces coefficients word by word, while SPIHT consumes
them bitplane by bitplane. Buffering a whole transformed macroblock between the
two would be large. Instead, the pipeline works on one unit at a time with two
unit-sized buffers:

- the **register array** (64 words) is written by the transform;
- the **bitplane register file** (one 64-bit row per bitplane, plus a sign row) is read by SPIHT.

When the array is full and SPIHT has released the file, `ec_control` copies the
unit across, one bitplane per cycle: row k receives bit k of every word. These
10 cycles are the only bubbles. While SPIHT codes unit n from the file, the
transform is already filling the array with unit n+1.

Decoding mirrors this. SPIHT decodes into the free file. The transfer reads
one row per cycle and writes it into bit k of all 64 array words, taking 11
cycles because the file read is registered. The inverse transform then empties
the array while SPIHT decodes the next unit.

## The transform (`dwt_idwt`)

The filter is the integer S-transform, applied separably on 2x2 groups:

```
row:     L = floor((a + b) / 2)     H = a - b
column:  LL = floor((L0 + L1) / 2)  VL = L0 - L1
         HL = floor((H0 + H1) / 2)  HH = H0 - H1
```

It is exactly invertible, so lossless coding is possible. It also needs no
pixels from neighbouring blocks, so every 8x8 block is transformed on its own.

The coefficients are placed in the unit (index = row*8 + col) as follows:

- level-1 detail bands HL1, VL1 and HH1 go in the top-right, bottom-left and bottom-right 4x4 quadrants;
- the level-2 bands go in the same places inside the top-left quadrant;
- LL2 is the top-left 2x2.

Coefficients are stored as sign-magnitude words with 9 magnitude bits, since
|c| ≤ 510 for 8-bit pixels.

Timing of one block:

- **Encode:** two pixels per cycle in raster order, 32 cycles. Each odd row completes a 2x2 step, and its three detail coefficients are written at once. Four more cycles transform the LL1 quarter. Total: 36 cycles.
- **Decode:** four cycles rebuild LL1, then 32 cycles put out pixel pairs, clamped to 0..255.

## List-free SPIHT (`spiht_engine`)

This is the part that needs the most explanation.

### What textbook SPIHT does

Classic SPIHT keeps three lists:

- **LIP**: insignificant pixels;
- **LIS**: insignificant sets, either D(x) (all descendants) or L(x) (descendants except the children);
- **LSP**: significant pixels.

For each bitplane n it runs three passes:

- **LIP pass:** every pixel in the LIP sends a bit saying whether it becomes significant (|c| ≥ 2^n), and a sign if so.
- **LIS pass:** every set sends a significance bit. When D(x) becomes significant, x's children are coded at once and L(x) is appended. When L(x) becomes significant, the children are appended as new D sets and are processed in the same pass.
- **LSP pass:** every coefficient that was already significant sends its bit n (refinement).

The lists cost memory and force a data-dependent order.

### Replacing the lists

With only two levels, every list entry can be recomputed from one fact per
coefficient: was it significant before the current plane (`sig_q`, 64 bits)?
From `sig_q` and fixed masks the engine forms, for every root and level-2
child, whether D and L were already significant (`dprev`, `lprev`). Whether a
coefficient or set takes part in a pass then follows from these rules.

| pass | element | coded when | bits |
|------|---------|-----------|------|
| LIP | C0, roots | not yet significant | bit, and a sign if 1 |
| LIP | level-2 child | D(root) was significant, child not | bit, and a sign if 1 |
| LIP | level-1 coefficient | D(parent) was significant, coefficient not | bit, and a sign if 1 |
| LIS | root | D(root) not yet significant | Sn(D) |
| LIS | root | D(root) significant (now or before), L(root) not yet | Sn(L) |
| LIS | level-2 child | D(root) becomes significant in this plane | bit, and a sign if 1 |
| LIS | level-2 child | L(root) significant (now or before), D(child) not yet | Sn(D(child)) |
| LIS | level-1 coefficient | D(parent) becomes significant in this plane | bit, and a sign if 1 |
| LSP | any | significant before this plane | refinement bit n |

These rules produce exactly the bits of list-based SPIHT; only the order
inside a pass changes. The engine's testbench checks this against a list-based
reference model.

### Fixed order

Each pass takes four cycles, one 4x4 quadrant per cycle. In each cycle the
quadrant's 16 coefficients go to 16 PEs in Z (Morton) order, with bits
{row, col} = {q1, p3, p1, q0, p2, p0} for quadrant q and PE p.

Quadrant 0 holds C0, the three roots and the twelve level-2 children. So in the
first LIS cycle every D(child) decision is made. These 12 flags (`dnk_q`) are
the only state carried from one cycle to the next, and they decide which
level-1 coefficients the following three LIS cycles code.

Inside a cycle a decision can depend on a bit decoded earlier in the same
cycle. For example, a child's set bit is coded only if its root's L set has
just been found significant. To handle this, each PE passes three D flags and
three L flags, one per tree, along the chain. A root PE overwrites its tree's
flags; a child PE reads them.

A plane takes 13 cycles:

- 12 coding cycles;
- 1 update cycle, which ORs the new significance into `sig_q`, writes the decoded row back when decoding, and latches the next row, read ahead in the last coding cycle, when encoding.

A lossless unit therefore takes 4 + 13 × 9 = 121 cycles: a sign-row read, a
load, 9 planes and a flush.

### The PE chain and the bitstream

A PE (`spiht_pe`) codes at most three bits: its own bit, a sign, and one or two
set bits. Sixteen PEs form two chains of eight (`pe_array`, upper and lower),
so the stream each PE shifts is only 24 bits wide.

- **Encoding:** each PE shifts the incoming stream right by its bit count and puts its own bits on top. The stream leaving the chain therefore holds the cycle's bits at its top, oldest lowest.
- **Decoding:** each PE reads its bits from the bottom of the incoming stream and shifts the stream right by the same count.

So one PE datapath, with the same shift, serves both directions. The bit count
is computed the same way in both directions. It depends only on decisions that
are known, or have just been decoded, when the PE acts.

Only the joins between the two arrays differ by direction:

- `encode_shifter` appends the lower array's bits after the upper array's;
- `decode_shifter` hands the lower array the window that remains after the upper array's bits.

### Rate control

In the half and quarter modes a unit's stream stops at exactly 256 or 128 bits.
That is 512 raw bits divided by 2 or 4. A cycle may be cut in the middle:

- the encoder sends only the bits up to the budget;
- the decoder keeps only the PEs whose bits lie wholly inside the budget.

Both stop after that plane's update. Coefficient bits that were never decoded,
and planes that were left out (quality layers), are rebuilt as zero.

Every unit's stream is padded with zeros to a whole 32-bit word, so units start
on word boundaries. The stream carries no header: the decoder must be given
the same `cfg_i` as the encoder.

## Bitstream buffer (`bs_fifo`)

A 128-bit shift register holds the stream, oldest bit at bit 0.

- **Encoding:** the engine pushes up to 48 bits per cycle. A word is offered on the bus as soon as 32 or more bits are held.
- **Decoding:** the buffer accepts a bus word whenever it has room. The engine sees the oldest 48 bits and removes what it used.

The engine stalls a coding cycle when the buffer lacks room (encode) or bits
(decode). This is what keeps a slow bus correct.

## Top-level interface (`ec_codec`)

| port | dir | meaning |
|------|-----|---------|
| `dec_i` | in | 0 = encode, 1 = decode; change only while `idle_o` is high |
| `cfg_i` | in | `ec_cfg_t`: `rate` (lossless / half / quarter) and `trunc` (planes cut, 0..7); change only while idle |
| `pix_in_*` | in/out | encode: two pixels per transfer, raster order in each 8x8 block, valid/ready |
| `pix_out_*` | out/in | decode: rebuilt pixels, same order, valid/ready |
| `bs_out_*` | out/in | encode: 32-bit stream words, oldest bit in bit 0, valid/ready |
| `bs_in_*` | in/out | decode: stream words, valid/ready |
| `unit_done_o` | out | pulse when SPIHT finishes a unit |
| `idle_o` | out | nothing in flight |
| `stall_o`, `budget_o`, `bubble_o`, `unit_bits_o` | out | monitoring: FIFO stall, stream stopped on its budget, transfer cycle, bits of the current unit |

The reset is asynchronous and active low.

## Timing and size

- **Latency**, from the first pixel of a unit to the start of its SPIHT coding: 36 (transform) + 1 + 10 (transfer) = 47 cycles.
- **Steady lossless encoding:** one unit every 133 cycles (121 engine + 10 transfer + 2 hand-over). That is 798 cycles per 4:2:0 macroblock. For 640x480 at 30 frames/s, 36,000 macroblocks/s, 30 MHz leaves 833 cycles per macroblock, so the codec keeps up as long as the bus accepts words when offered.
- **Buffers:** the register array (640 bits) and the register file (640 bits). Apart from the coefficient bits, the engine keeps 64 significance bits, 64 bits of the current plane, 64 bits of signs and 12 set flags.
- **Coarse synthesis** of `ec_codec` (generic yosys cells, not a cell library): about 3,400 cells, 1,386 flip-flop bits and a 640-bit memory.

## How this departs from the published architecture

This design follows a published multi-mode embedded-compression codec. It keeps
the following from that design:

- the block structure;
- the four-tree pipeline with a register array and a single-port bitplane register file;
- 16 PEs in two arrays of eight, with encode and decode shifters;
- a bitstream FIFO;
- list-free two-level SPIHT with four cycles per pass;
- the lossless, CR 2, CR 4 and 0–7 bitplane truncation modes.

The following are its own choices or differ:

- **Register file of 10 rows instead of 8.** The S-transform of 8-bit pixels needs 9 magnitude planes, and the sign is kept as a row. The transfer therefore has 10 bubble cycles rather than 8.
- **Latency of 47 cycles** against the published 40, for the same reason and because the transform takes two pixels per cycle.
- **Only the S-transform.** The (5,3) lifting filter, which was also evaluated, is not built.
- **The pass-membership rules, the Z order inside a quadrant, and the per-tree flags passed along the PE chain** are worked out here. The published description only says that simple combinational logic decides membership.
- **One update cycle per plane** (13 cycles) on top of the 12 coding cycles.
- **Not specified in the source and chosen here:** the per-unit bit budget (256 / 128 bits); the 32-bit bus with a valid/ready handshake; the 128-bit FIFO; word padding per unit; no stream header; zero fill of bits that were not decoded.
- **Not built:** the alternative architecture that uses two ping-pong register buffers to avoid the bubble cycles.
- **Not reproduced:** the published gate count, area and power (0.18 µm library).

## Files

| file | contents |
|------|----------|
| `rtl/ec_pkg.sv` | constants, `ec_cfg_t`, PE control/result structs, index and tree-mask functions |
| `rtl/ec_codec.sv` | top level |
| `rtl/dwt_idwt.sv` | two-level S-transform and inverse |
| `rtl/reg_array.sv` | 64-word register array with word and bitplane writes |
| `rtl/bitplane_rf.sv` | single-port 10 x 64 register file |
| `rtl/ec_control.sv` | pipeline sequencing and word/bitplane transfer |
| `rtl/spiht_engine.sv` | list-free SPIHT control, budget, stalls |
| `rtl/pe_array.sv`, `rtl/spiht_pe.sv` | PE chain and processing element |
| `rtl/encode_shifter.sv`, `rtl/decode_shifter.sv` | joins between the two PE arrays |
| `rtl/bs_fifo.sv` | bitstream buffer |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_ec_codec` runs the top at its default size. For five configurations (lossless, half, quarter, two planes cut, and lossless with a slow bus) it encodes one macroblock of synthetic image data, switches to decoding without a reset and decodes the stream back. It checks:
  - the lossless round trip is exact;
  - the stream stays within 8 / 4 words per unit in the budget modes;
  - the error bounds hold;
  - the 47-cycle latency and the 133-cycle unit period.

  It also counts FIFO stalls, budget cuts, transfer bubbles, transform/SPIHT overlap, direction switches and rate switches, and fails if any of them never occurs.
- `tb_spiht_engine` compares the bit count of 60 random units with a list-based SPIHT model written in the testbench, in every mode. It checks the cycle count and decodes each stream back with random FIFO starvation.
- `tb_dwt_idwt` checks every coefficient against a testbench model of the transform, checks the 36-cycle timing, and checks the exact inverse.
- The remaining testbenches check their block against a behavioural model in the testbench, with random stimulus.

To simulate with Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
    rtl/ec_pkg.sv tb/tb_ec_codec.sv --top-module tb_ec_codec
./obj_dir/Vtb_ec_codec
```

Replace `tb_ec_codec` with any other testbench name. To lint a module, run
`verilator --lint-only -Wall -y rtl rtl/ec_pkg.sv rtl/<module>.sv`.

To change the design:

- the widths (pixel, magnitude planes, bus) live in `ec_pkg`;
- the per-unit budgets are in `unit_budget()`;
- the FIFO capacity is `FCAP` in `ec_codec`.
