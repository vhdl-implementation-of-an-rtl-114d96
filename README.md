# CAVLC entropy encoder for H.264 residual blocks

H.264 Baseline video sends its quantised transform coefficients with CAVLC
(Context Adaptive Variable Length Coding). After the transform and quantisation,
most of a 4x4 block's coefficients are zero. The few non-zero ones cluster at low
frequencies, and the highest-frequency ones are often +1 or -1. CAVLC describes a block
with five kinds of syntax elements. The code table for the first element depends on
how busy the neighbouring blocks were.

This encoder reads each block once, in reverse zig-zag order (highest frequency
first). In that one pass it collects every statistic it needs. It then emits the
codewords while the next block is being read. It codes 4x4 blocks (16 coefficients) and
2x2 chroma DC blocks (4 coefficients). It accepts 12-bit signed coefficients and emits
each codeword together with its length, plus a packed 32-bit bit stream.

The architecture follows a published VHDL CAVLC encoder for a Cyclone II FPGA, which
was verified at 100 MHz. That design has a counter-based scan stage, double statistics
buffers, the five coding steps and a two-clock scheme. This RTL is a new SystemVerilog
implementation of that architecture. Where the original gives only a function, or
gives nothing, the choices are this design's own. They are listed under
[Departures and open points](#departures-and-open-points).

## What a block turns into

Take this 4x4 block (raster order, row by row):

```
 1  1  0  0
-2  0  1  0
-4  1  1  0
 1  0  0  0
```

In zig-zag order it reads `1 1 -2 -4 0 0 0 1 1 1 0 1 0 0 0 0`. The encoder walks it
backwards and sends:

| element | value | codeword |
|---|---|---|
| coeff_token | TotalCoeff 8, TrailingOnes 3, nC = 5 | `01101` |
| trailing-one signs | + + + | `000` |
| level | 1 | `1` |
| level | -4 | `00011` |
| level | -2 | `111` |
| level | 1 | `100` |
| level | 1 | `100` |
| total_zeros | 4 | `11` |
| run_before | 1 (zerosLeft 4) | `10` |
| run_before | 0 (zerosLeft 3) | `11` |
| run_before | 0 (zerosLeft 3) | `11` |
| run_before | 3 (zerosLeft 3) | `00` |

The five element kinds:

* **coeff_token** joins TotalCoeff (the number of non-zero coefficients) and
  TrailingOnes (up to three ±1 values at the high-frequency end, counted before any
  other non-zero value).
* **trailing-one signs** take one bit per trailing one, 1 for negative. They are sent
  as one codeword of TrailingOnes bits.
* **levels** are the other non-zero values, highest frequency first. Each is a unary
  prefix plus a suffix whose length adapts as the block goes on.
* **total_zeros** is the number of zeros below the highest-frequency non-zero
  coefficient. The code table depends on TotalCoeff.
* **run_before** is, for each non-zero coefficient from the top down, the number of
  zeros just below it. The code table depends on how many zeros are still left
  (zerosLeft). These codes stop when zerosLeft reaches 0. The last coefficient never
  gets one.

`tb_cavlc_top` reproduces this exact stream.

## Pipeline

```
 producer ──► cavlc_coeff_buffer ──► cavlc_scan ──► cavlc_stats_buffer ──► cavlc_code_gen ──► cavlc_bit_packer
  raster       2 banks x 16 x 12b    reverse scan,    2 block records       one codeword       32-bit words
  order        (load next while      1 coeff/clock                          per 2 clocks
               scanning current)
                     ▲
 nu, nl ──► cavlc_nc_select (coeff_token table for the block)
```

* **Load.** The producer writes a block one coefficient per clock, in raster order.
  A block is 16 words for 4x4 and 4 words for 2x2. With the first word it also gives
  the block kind and the TotalCoeff of the block above (`nu`) and to the left (`nl`).
  `cavlc_nc_select` turns these into the coeff_token table choice, which the buffer
  stores with the block. There are two banks, so one block can load while the other is
  read.
* **Scan** (`cavlc_scan`, the "CAVLC counters"). Reads a full bank in reverse zig-zag
  order (reverse raster for 2x2), one coefficient per clock. A block therefore takes 16
  clocks, or 4 for 2x2. Each coefficient updates every counter in the same clock, and
  the finished record goes into one of the two statistics buffers.
* **Output** (`cavlc_code_gen`). Takes the oldest record and produces its codewords,
  one per output step. It releases the record with the block's last codeword.
  `cavlc_bit_packer` joins the codewords into words.

**Clocks.** The original design uses two clocks. CLOCK_2 is the coefficient clock.
CLOCK_1 runs at half that rate and paces the output stage. Here there is a single
clock, `clk` (CLOCK_2). CLOCK_1 is a clock enable, high on every second edge, made in
`cavlc_top`. Everything is in one clock domain.

**Throughput and latency.**

* A 4x4 block occupies the scan for 16 clocks.
* It occupies the code generator for 2 clocks per codeword, from 1 codeword (empty
  block) up to 34 (16 levels plus run_before codes).
* Blocks overlap: block n+1 is loaded and scanned while block n is coded. Steady-state
  throughput is therefore set by the slower of the two stages.
* For the example block, 41 clocks pass from the first reverse-scan read of the
  loaded bank to the last codeword out: 16 scan, a few of handover, 12 codewords x 2.
  Counting from the first coefficient written adds the 16-clock load and gives 59.
  A 2x2 chroma DC block with six codewords takes 17 clocks from its first read.
* When both statistics buffers are full the scan does not start. When both coefficient
  banks are full, `ready` drops. Back-pressure therefore reaches the producer without
  losing data.

## The one-pass scan

`cavlc_scan` keeps a `blk_stats_t` record (defined in `cavlc_pkg`) and updates it for
each coefficient `c`, taken highest frequency first:

* **c ≠ 0:**
  * TotalCoeff += 1.
  * If trailing-one counting is still open, |c| = 1 and fewer than 3 have been
    counted, then it is a trailing one: store its sign and increase TrailingOnes.
  * Otherwise close trailing-one counting and append c to the level file.
  * Open a new run_before entry at 0 for this coefficient.
* **c = 0 after the first non-zero:** TotalZeros += 1 and the newest run_before
  entry += 1.
* **c = 0 before any non-zero:** ignored (trailing zeros of the scan).

Because the scan runs backwards, the arrays end up in coding order. Entry 0 of the
level file is the first level to send, and entry i of the run file is the run_before of
the i-th non-zero coefficient from the top. The code generator only indexes them.

The record (274 bits) holds:

* the table choice;
* TotalCoeff (5 bits), TrailingOnes (2), TotalZeros (5);
* three sign bits;
* 16 levels of 12 bits;
* 16 runs of 4 bits.

## Code generation

`cavlc_code_gen` is a small state machine. Its state names the next element to send
(`out_state_e`):

| `output_state` | element |
|---|---|
| 0 | idle |
| 1 | coeff_token |
| 2 | trailing-one signs |
| 3 | level |
| 4 | total_zeros |
| 5 | run_before |

From idle it sends coeff_token as soon as a record is waiting. It then skips any
element that does not apply:

* no signs if TrailingOnes = 0;
* no levels if all non-zero values were trailing ones;
* no total_zeros if the block is empty or has every coefficient non-zero;
* no run_before when TotalZeros = 0.

Each element's code comes from a combinational unit:

* `cavlc_coeff_token`: tables for 0 ≤ nC < 2, 2 ≤ nC < 4 and 4 ≤ nC < 8, plus chroma DC.
  For nC ≥ 8 it computes the 6-bit fixed-length code `{TotalCoeff-1, TrailingOnes}`
  (000011 for an empty block).
* `cavlc_total_zeros`: one table per TotalCoeff, with separate tables for chroma DC.
* `cavlc_run_before`: columns for zerosLeft 1..6 and one shared column for zerosLeft
  above 6. In that column, runs of 7 and more are (run-4) zeros followed by a one.
* `cavlc_level_coder`, the least obvious one, described next.

### Levels

A level L becomes levelCode = 2L-2 (L > 0) or -2L-1 (L < 0). The first level of a
block whose TrailingOnes is below 3 has levelCode reduced by 2. That level cannot be ±1,
because a ±1 there would have been counted as a trailing one. The codeword depends on
the current suffix length, sl:

| sl | levelCode | prefix (zeros, then a 1) | suffix |
|---|---|---|---|
| 0 | < 14 | levelCode | none |
| 0 | 14..29 | 14 | 4 bits, levelCode-14 |
| 0 | ≥ 30 | 15 | 12 bits, levelCode-30 |
| > 0 | < 15·2^sl | levelCode >> sl | sl low bits |
| > 0 | ≥ 15·2^sl | 15 | 12 bits, levelCode - 15·2^sl |

sl starts at 0, or at 1 if TotalCoeff > 10 and TrailingOnes < 3. After each level:

* sl becomes 1 if it was 0;
* sl then grows by one (up to 6) if |L| is above the threshold for the current sl:
  3, 6, 12, 24 or 48 for sl = 1..5.

It never grows by more than one per level. The longest codeword is 28 bits, an escaped
level. That sets the 28-bit codeword width. Every 12-bit level fits the 12-bit escape
suffix.

## Choosing the coeff_token table

`cavlc_nc_select` predicts nC from the neighbours' TotalCoeff:

* both available: (nA + nB + 1) >> 1;
* only one available: that one's count;
* neither available: 0.

The table is then picked by range:

| nC | table |
|---|---|
| 0..1 | 1 |
| 2..3 | 2 |
| 4..7 | 3 |
| ≥ 8 | fixed-length code |

A 2x2 chroma DC block always uses the chroma DC table. The encoder does not remember
neighbours itself. The producer keeps each block's TotalCoeff, which the encoder reports
on `nout` while coding the block, and passes it back as `nu`/`nl` for later blocks.

## Interface (`cavlc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (CLOCK_2); asynchronous active-low reset |
| `enable_input` | in | 1 | a coefficient is offered |
| `ready` | out | 1 | the coefficient is taken on a clock where both are high |
| `input_coeff` | in | 12 | signed coefficient, raster order within the block |
| `chroma_dc` | in | 1 | block is 2x2 chroma DC (sampled with the block's first coefficient) |
| `nu`, `nl` | in | 5 | TotalCoeff of the upper / left block (sampled with the first coefficient) |
| `nu_avail`, `nl_avail` | in | 1 | those neighbours exist |
| `valid_output` | out | 1 | high for one clock per codeword |
| `output_code` | out | 28 | codeword, right-aligned, sent MSB first |
| `output_code_length` | out | 5 | its length in bits |
| `output_state` | out | 3 | which element it is (table above) |
| `nout` | out | 5 | TotalCoeff of the block being coded |
| `flush` | in | 1 | send pending bits as a partial word (hold until `bs_bits` < 32) |
| `bs_valid` | out | 1 | a bit-stream word is on `bs_word` |
| `bs_word` | out | 32 | bit-stream bits, first bit in bit 31, zero-padded |
| `bs_bits` | out | 7 | real bits in `bs_word` (32, or fewer after flush) |

Blocks are back to back: a block is just the next 16 (or 4) accepted coefficients.
Codewords keep their block order, and `output_code` holds its value for the two clocks
of a step.

## Size

Coarse synthesis (yosys, generic cells) of `cavlc_top` gives:

* about 670 word-level cells;
* about 1020 flip-flop bits;
* the code tables as ROMs.

The two coefficient banks are 384 bits, which is the memory figure the original FPGA
build reports. The original reports 1961 logic elements and 696 registers on a Cyclone
II. This design keeps two full statistics records (548 bits) in registers, which
accounts for most of the difference in register count.

## Departures and open points

* **Code tables.** The original prints only parts of the coeff_token and run_before
  tables. The full tables here are H.264's (ITU-T H.264 tables 9-5, 9-7 to 9-10). They
  agree with the printed entries. For run_before 14 this design uses H.264's 11-bit
  code `00000000001`.
* **Level rules.** The original describes suffix-length adaptation in words and with a
  magnitude table. Its prefix/suffix equations, the first-level adjustment and the
  initial suffix length of 1 are not given. They are taken from H.264. The suffix length
  grows by at most one per level. Read literally, the magnitude table would allow larger
  jumps, which H.264 does not.
* **Stage timing.** The input stage matches: 16 clocks for 4x4, 4 for 2x2. The
  original quotes about 21 clocks of processing, and 42 to 44 clocks per 4x4 block (20
  to 21 per 2x2 block), counted from the read of the already filled input buffer. This
  design has no separate processing stage: codewords come straight from the counters'
  record, one per two clocks, so the latency depends on the block. The example takes 41
  clocks counted the same way, and a six-codeword 2x2 block takes 17. The raster-order
  load into the buffer comes before that and overlaps the previous block.
* **Block kinds.** Only 4x4 (16-coefficient) and 2x2 chroma DC blocks are supported.
  H.264 also codes 15-coefficient AC blocks (chroma AC, Intra 16x16 AC). Those would
  need a third block size in the buffer, the scan and the total_zeros selection.
* **Neighbour bookkeeping** (storing TotalCoeff per block position) is left to the
  producer.
* **Bit-stream memory.** The original names a bit-stream output memory without
  describing it. Here it is a 32-bit word packer with no storage behind it. There is no
  slice-level syntax and no byte alignment beyond the zero padding of a flushed word.
* **Interface signals.** The original's waveform also shows signals `sin` and `vs`,
  whose function is not described. They are not built.
* **Not included.** The rest of the video encoder (prediction, transform,
  quantisation, deblocking) is outside this design.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_cavlc_top` | the example block (codewords, element tags, `nout`, packed stream) and its latency; a 2x2 block's latency; 600 random blocks of both kinds with random neighbour contexts, against a behavioural reference; one codeword per two clocks; counts input stalls, scan/code overlap, every table, empty/full blocks, escapes, long runs and flushes, and fails if any never happened |
| `tb_cavlc_frame` | a synthetic CIF frame: 396 macroblocks of 16 luma and 2 chroma DC blocks (7128 blocks), coefficients shaped like quantised residuals, neighbour TotalCoeff kept per 4x4 position as an H.264 encoder does; every codeword, `nout` and the packed stream against the reference. It takes about 128 000 clocks (1.3 ms at 100 MHz) for about 199 000 bits |
| `tb_cavlc_scan` | 3000 random blocks against forward-scan arithmetic; the example's counters; 16/4-clock input stage |
| `tb_cavlc_code_gen` | 1500 random statistics records against the reference; one pop per block |
| `tb_cavlc_level_coder` | the example's levels; 40 000 random levels decoded back with H.264 parsing rules; suffix-length thresholds |
| `tb_cavlc_coeff_token`, `tb_cavlc_total_zeros`, `tb_cavlc_run_before` | all printed table entries, further entries typed from H.264, prefix-freeness of every table |
| `tb_cavlc_nc_select` | exhaustive over neighbour counts, availability and block kind |
| `tb_cavlc_coeff_buffer`, `tb_cavlc_stats_buffer`, `tb_cavlc_bit_packer` | ordering, back-pressure and content under random traffic |

The reference encoder, `tb/cavlc_ref_pkg.sv`, works from the forward zig-zag sequence
with ordinary loops rather than the hardware's single reverse pass. It shares the code
tables of `cavlc_pkg`. Those tables are checked separately by the three table
testbenches, so a mistyped entry shows up there and not silently in both.

To run one (Verilator 5), from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb \
          rtl/cavlc_pkg.sv tb/cavlc_ref_pkg.sv tb/tb_cavlc_top.sv \
          --top-module tb_cavlc_top -o sim
./obj_dir/sim
```

The packages are listed first. Verilator finds every module in `rtl/` by its file name
through `-Irtl`. `--timescale` gives the RTL files, which carry no `timescale`, the
testbenches' time unit. Replace `tb_cavlc_top` with any other testbench name. All of
them build without warnings at Verilator's default settings. Each finishes in a few
seconds and ends with its `TB_RESULT` line. A non-zero `failures` count is preceded by
`FAIL` lines naming the check.

## Files

| file | content |
|---|---|
| `rtl/cavlc_pkg.sv` | widths, `blk_stats_t`, `vlc_t`, table and state enums, code tables |
| `rtl/cavlc_top.sv` | the encoder |
| `rtl/cavlc_coeff_buffer.sv` | two-bank input buffer with reverse-scan read |
| `rtl/cavlc_scan.sv` | one-pass CAVLC counters |
| `rtl/cavlc_stats_buffer.sv` | two block statistics buffers |
| `rtl/cavlc_nc_select.sv` | nC prediction and table choice |
| `rtl/cavlc_code_gen.sv` | element sequencer |
| `rtl/cavlc_coeff_token.sv`, `rtl/cavlc_level_coder.sv`, `rtl/cavlc_total_zeros.sv`, `rtl/cavlc_run_before.sv` | codeword units |
| `rtl/cavlc_bit_packer.sv` | 32-bit bit-stream packer |
