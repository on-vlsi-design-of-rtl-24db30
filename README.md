# Rank-order filter on a dual-cell RAM

A rank-order filter outputs the r-th largest of the N samples in a sliding
window. With r = (N+1)/2 it is a median filter, the usual cure for impulsive
(salt-and-pepper) noise. This design does not sort. It finds the result one
bit at a time, MSB first. Each step reads one bit of every sample at once, and
then rewrites whole groups of lower bits at once. Both operations are done by
a small maskable memory, the **dual-cell RAM (DCRAM)**, under a 16-bit
long-instruction-word program. So the same hardware runs any rank, and both
plain and recursive filters, in 1-D and in 2-D.

The RTL here contains:

- the programmable processor (`rof_processor`);
- a hardware sequencer that runs the four standard filter programs;
- the line buffers needed for 3x3 image filtering;
- the top `rof_system`.

Default sizes:

- N = 9 samples of B = 8 bits;
- ranks 1..9;
- image lines of LINE_W = 800 pixels (SVGA width).

With the programs used here, one result is produced every 15 cycles for the
plain filter and every 18 for the recursive one.

## The bit-sliced algorithm

Take the N samples as B-bit words. For bit position b, from the MSB down:

1. Read the **bit-slice**: bit b of every word. Let Z be the number of 1s in it.
2. The result bit is `v = (Z >= r)`. If at least r words have a 1 here, the
   r-th largest also has a 1 here.
3. **Polarize.** Every word whose bit b differs from v is now known to be
   strictly above the result (if v = 0) or strictly below it (if v = 1).
   Overwrite all its bits below b with `~v`. This keeps it on the same side
   of the result in every later slice. The count Z of the later slices is
   then still correct for the r-th largest.

After B slices, the B result bits form the r-th largest sample.

Example: N = 5, 4-bit words {9, 12, 3, 12, 7}, r = 3. The answer is 9.

| slice | bits of the five words | Z | v | polarized words (bits below b set to ~v) |
|-------|------------------------|---|---|------------------------------------------|
| 3 | 1 1 0 1 0 | 3 | 1 | 3 -> 0000, 7 -> 0000 |
| 2 | 0 1 0 1 0 | 2 | 0 | both 12 -> 1111 |
| 1 | 0 1 0 1 0 | 2 | 0 | both 1111 (no change) |
| 0 | 1 1 0 1 0 | 3 | 1 | - |

The result bits read 1001, which is 9. Words that were polarized never change
a later decision in the wrong direction. So each bit costs one read, one
comparison and one masked write, whatever N and r are.

For a **recursive** filter, part of the window consists of earlier results
instead of earlier inputs. This is the recursive median filter (RMF) used for
smoothing. The datapath is the same; only the data loaded into the window
differs.

## The DCRAM

`rtl/dcram.sv` holds N words of B bits. Every bit has two cells:

- a **data cell**, in the *data field*;
- a **computing cell**, in the *computing field*.

| operation | instruction | effect |
|-----------|-------------|--------|
| load | `LOAD a` | data-field word `a` <= `d_in` |
| copy | `COPY` | computing field <= data field, all words at once |
| bit-slice read | `P_READ m` | `c_d[i]` = bit of computing word i selected by the one-hot read mask m |
| partial write | `P_WRITE m` | in every word i with `c_wl[i]` = 1, the bits selected by write mask m <= `c_in` |

There are two fields so that the next window can be assembled while the
current one is being destroyed by polarization. The data field is a plain
memory with the window's samples. The new sample overwrites the oldest one,
at address i, which cycles through 0..N-1. COPY takes a snapshot into the
computing field. The samples' order in memory does not matter to a rank-order
filter, so no data is ever shifted.

The read is combinational. While COPY is active, the read returns the data
field directly, as a transparent copy would. That lets COPY and the MSB read
share a cycle.

## The processor datapath

`rtl/rof_processor.sv` wires the following around the DCRAM:

- **Read-mask and write-mask registers (RMR, WMR)** (`rof_register`). These
  are loaded from the mask field of a P_READ or P_WRITE instruction. They
  drive the DCRAM for exactly one cycle and then return to zero.
- **Level quantizer** (`level_quantizer.sv`). It counts the 1s of the slice
  and decides `Z >= r`. The comparison is not a subtractor. It is the carry
  out of `Z + ~r + 1`, built as a ripple of majority gates:
  - `c(k+1) = Maj(Z[k], ~r[k], c(k))`;
  - the carry-in of 1 reduces the LSB cell to `Z[0] | ~r[0]`.
- **Shift register** (`shift_register.sv`). It collects the result bits MSB
  first. `sr[0]` is always the bit just decided.
- **Polarization selector (PS)** (`polarization_selector.sv`). It stores the
  slice just read and raises the write line of word i when
  `slice[i] != sr[0]`. The value written is `c_in = ~sr[0]`.
- **Rank register (RR)**. It is loaded by `SET`.
- **Output register (OUTR)**. It is loaded from the shift register by `DONE`.
  It drives `d_out`, and `done` pulses for one cycle.
- **Reset circuit** (`reset_circuit.sv`). It synchronizes the external reset.
  SET also clears every register and both memory fields, except RR, which
  takes the new rank.
- **Instruction decoder** (`instruction_decoder.sv`). It decodes the two
  halves of the instruction independently.

## Instruction word

Sixteen bits. The data-field operation is in the upper 6 bits and the
computing-field operation in the lower 10. Both issue in the same cycle
(`rtl/rof_pkg.sv`):

```
 15:14  13:10         9:8     7:0
 00     rank          00      one-hot bit     P_READ
 01     address       01      bits to write   P_WRITE
 10     1 1 c d       11      1111_1111       CF_NULL
 11     1 1 1 1
 SET / LOAD / COPY (c=1) and/or DONE (d=1) / DF_NULL
```

A P_WRITE for bit b uses the mask of all bits below b. For B = 8 that is
`0111_1111` after the MSB and `0000_0001` after bit 1.

### Timing

An instruction issued in cycle t has these effects:

- RR, RMR, WMR and OUTR load at the end of t.
- The LOAD/COPY memory write and the bit-slice read happen in t+1.
- The level quantizer decides during t+1. The new bit enters the shift
  register at the end of t+1, and the PS captures the slice at the same edge.
- A P_WRITE issued in t+1 therefore polarizes in t+2, using that bit and that
  slice.

So a P_READ / P_WRITE pair can be issued back to back, and one bit costs two
instructions. The instruction after an MSB read may also be a DONE of the
*previous* result. DONE copies the shift register one cycle after it is
issued. It must come exactly two instructions after the LSB read: one slot
later and the shift register has already taken the next window's MSB.

## Programs

Each program is a loop. One pass produces one result, and the pass of the
next window overlaps the end of the current one. The sequencer
(`rtl/instruction_sequencer.sv`) generates them for any B. `i` is the address
of the oldest sample, and it advances every pass.

| application | cycles per result (B = 8) | loop |
|-------------|---------------------------|------|
| 1-D ROF | 2B-1 = 15 | `LOAD i`+`P_READ` bit 0 (LSB of previous window), `COPY`+`P_READ` MSB, `DONE`+`P_WRITE`, then read/write pairs down to the write after bit 1 |
| 1-D RMF | 2B+2 = 18 | `LOAD i` (input), `DONE`, `LOAD i+4` (the result just output), `COPY`+`P_READ` MSB, write/read pairs down to the LSB read |
| 2-D ROF | 2B-1 = 15 | three LOADs of one image column at i, i+1, i+2, overlapping the last two bits of the previous window; `COPY`+`P_READ` MSB, `DONE`+`P_WRITE`, pairs |
| 2-D RMF | 2B+2 = 18 | three column LOADs, `DONE`, `LOAD i+4` (the result just output), `COPY`+`P_READ` MSB, pairs |

In the 1-D RMF, the window is 4 earlier results plus 5 inputs. The result must
be written back before the next window is copied, and that feedback loop is
why RMF is 3 cycles slower than ROF.

In 2-D, the window is 3x3. The nine DCRAM words hold three columns, and each
pass replaces the oldest column (i advances by 3, modulo 9). In the 2-D RMF,
the upper row and the left neighbour of the window are earlier results.
A fourth LOAD, at address i+4, writes the result just computed into the
window. That result is the left neighbour of the next window.

## The fully-pipelined processor

`rtl/rof_processor_fp.sv` trades area for speed. In the processor above,
one bit costs two cycles, and one window occupies the datapath alone. The
loop is read, quantize, shift, write. Here the level quantizer is cut into
two stages (`level_quantizer_pipe.sv`):

- LQ1 is the ones count, registered;
- LQ2 is the carry generator.

That makes the loop three cycles long, and three windows take turns in it.
Each window has its own computing field: the DCRAM (`dcram_fp.sv`) has three
of them. In one cycle, one field is read, another is polarized, and a third
can be copied into.

The windows in flight need the samples of three successive windows at once.
So the data field has N + 2 words (11 for N = 9). A COPY carries an 11-bit
copy mask: words outside the window are stored as 0, and a zero word can
never be the r-th largest of N real samples.

The shift register is 3B bits long. It receives the result bits of the three
windows interleaved, so OUTR takes every third bit.

The 42-bit instruction has four sub-instructions that issue together:

```
 41:26 SI1  000 1..1 rank  SET  | 001 1..1 address  LOAD | 010 c_cf cp_mask[10:0]  COPY | all ones: null
 25:24 SI2  01 DONE | 11 null
 23:12 SI3  00 w_cf mask  P_WRITE | all ones: null
 11:0  SI4  00 r_cf mask  P_READ  | all ones: null
```

The field selects `c_cf`, `w_cf` and `r_cf` take 1..3 for fields 1..3.

A P_READ issued in cycle t has these effects:

- The field is read in t+1.
- LQ2 decides in t+2.
- The P_WRITE issued in t+2 polarizes in t+3.
- The next read of that field can come in t+4.

The 1-D 9-point program (generated in `tb/tb_rof_processor_fp.sv`) issues a
read every cycle, rotating over fields 1, 2 and 3, and a write two cycles
after each read. A group of three windows starts every 24 cycles. For each
window, the COPY comes with its MSB read, and DONE comes 24 cycles later.
The three new samples are loaded in the cycles after the group's copies.
That gives three results per 24 cycles: 8 cycles per result instead of 15.

This processor has no sequencer. The top brings out its instruction and data
ports beside the main filter's.

## Input path and the top

`rtl/input_path.sv` chooses what the DCRAM's `d_in` sees during each LOAD,
through the sequencer's `input_sel`:

- **1-D ROF:** the sample input.
- **1-D RMF:** either the sample input or `d_out` (the newest result).
- **2-D ROF:** the raster-scanned pixel, registered as D0, passes through a
  line buffer of LINE_W-1 pixels to D1, and through another to D2. D0, D1 and
  D2 are one column of the 3x3 window, from the current line and the two
  above.
- **2-D RMF:** D0, D1, a line buffer of LINE_W-2 earlier *results* (the
  upper row of the window), or `d_out`.

Line buffers (`scan_line.sv`) are circular RAMs that behave like shift chains
starting at zero.

`rtl/rof_system.sv` is the top:

```
rof_system #(N=9, B=8, LINE_W=800)
  in  clk, rst (async, active high)
  in  start, mode[1:0], rank[3:0]   pulse start to (re)program; mode 0..3 = ROF1D, RMF1D, ROF2D, RMF2D
  in  pix[B-1:0], pix_valid
  out pix_ready                     one sample taken per pass when valid && ready
  out d_out[B-1:0], done            new result each done pulse
  in  fp_instruction[41:0], fp_d_in[B-1:0]
  out fp_d_out[B-1:0], fp_done      the fully-pipelined processor, driven directly
```

Each pass takes one input sample. In 1-D it is taken at the first step. In
2-D it is taken at the last step, so it is in the line buffers before the next
pass's LOADs. If `pix_valid` is low at that step, the sequencer issues null
instructions and waits: this is a **stall**. The filter is exact under any
stall pattern.

Result k after start belongs to the window completed by sample k-1; the first
result is 0. In 2-D the result for the pixel at raster position p appears at
done pulse p + LINE_W + 2. To flush the last line, feed LINE_W+2 dummy pixels.
There is no border handling:

- windows at the left and right edges wrap across lines;
- lines above the first read as zero.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=... failures=...` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_level_quantizer` | all counts x ranks, against `Z >= r` |
| `tb_dcram` | load, copy, masked slice reads and masked partial writes against an array model |
| `tb_rof_processor` | hand-written instruction streams; a worked 9-sample example; 1-D rank 3 on random data; the 15-cycle period; idle insertion |
| `tb_instruction_sequencer` | the four programs, instruction by instruction, against literal tables; stalls |
| `tb_input_path` | the four input paths on a small line width |
| `tb_scan_line` | a short line buffer against a shift-chain model, including the fill phase |
| `tb_rof_system` | the full-size top at its defaults (N=9, B=8, LINE_W=800): all four modes, random stalls, checked against a sorting reference of each window and in image coordinates |
| `tb_rof_processor_fp` | the fully-pipelined processor: ranks 1..9 on random and tie-heavy data; every result and its cycle (three per 24 cycles) |
| `tb_workload_svga` | one 800x600 frame at the default parameters, 3x3 rank 5 and 3x3 RMF: every interior output, cycles per frame (7.21 M and 8.65 M, i.e. 35.5 and 29.6 frames/s at 256 MHz) |
| `tb_workload_denoise` | 512x512 8-bit images with 8% / 9% salt-and-pepper noise; 3x3 filters of rank 4, 5 and 6 and the 3x3 RMF, with LINE_W=512 |

`tb_rof_system` checks the sample periods and requires every mechanism to
occur at least once: each instruction type, every input source, stalls,
restarts and filled line buffers. It also runs a rank-3 program on the
fully-pipelined processor in parallel.

`tb_workload_denoise` checks all 260,100 interior outputs per run against a
sorting reference. It also counts the remaining noisy pixels: about 20,000
drop to 4 for rank 5, and to 0 for the RMF. It runs in about 10 s.

The test images in `tb_workload_denoise` are synthetic (ramps plus a
checkerboard), not a photograph.

Simulate with Verilator 5, from the repository root:

```
verilator --binary --timing -Irtl rtl/rof_pkg.sv tb/tb_rof_system.sv --top-module tb_rof_system
./obj_dir/Vtb_rof_system
```

Use the same command for any other testbench. Modules are found through
`-Irtl`; only the package is listed explicitly.

## Design choices and departures

- **Instruction width.** Some of the original descriptions call the
  instruction 8 bits wide. The field layout itself needs 16 bits, so 16 are
  used. Computing-field code `10` is unused and treated as a null.
- **Cycle timing** is this design's, chosen to reproduce the published
  15- and 18-cycle periods with the published instruction order:
  - registered decode;
  - a read that bypasses to the data field during COPY;
  - the enable that stores the slice in the PS.
- **The sequencer** is dedicated hardware. A microprocessor could play the
  same role. The following are additions:
  - its valid/ready handshake and stalls;
  - the extra issue of the last 2-D step after SET;
  - the mode input.
- **Line buffers** are circular RAMs with a fill flag, not register chains.
  The physical memory's split into sub-words is not modelled.
- **Fully-pipelined processor.** The instruction layout and the three
  computing fields with a copy mask follow the original extension. The
  following are this design's own choices:
  - the numbering of the field selects;
  - the interleaved 3B-bit shift register;
  - the exact schedule of the 1-D program.
- **Adder tree** in the level quantizer is written as a sum. The synthesizer
  maps it to full and half adders.
- **Image geometry.** LINE_W fixes the image width. The default of 800 serves
  800-pixel-wide video (SVGA). Other widths need the parameter changed.
- **Throughput.** 2-D RMF takes 18 cycles per pixel. For 800x600 at 30
  frames/s that is 259 M cycles/s, so it needs a clock above 256 MHz. 2-D
  ROF needs 216 M cycles/s.

## Not included

- **Chip-level pads and I/O.**
- **The FPGA prototype.**
- **Transistor-level features.** These are below the level of RTL and are not
  modelled:
  - the DCRAM cell circuits;
  - precharge;
  - sense amplifiers.
