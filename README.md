# Multi-character signature matcher for network intrusion detection

This design scans a byte stream for a large set of fixed attack signatures
(for example Snort content strings). It takes **four characters per clock**
and compares **one whole candidate signature per clock** in each matching
unit. There is no per-signature comparator. Signatures live in on-chip
memory, one signature per memory word, and a small shared datapath checks
whichever signature might be present at the current stream position.

Three ideas make this work:

1. **Unique substrings pick the candidate.** The signature set is split
   offline into *u-sets*. In a u-set, every signature contains a short
   substring, its *u-substring*, that occurs in no other signature of the
   set. If a u-substring shows up in the stream, only its own signature can
   be there. A brute-force detector looks for every u-substring at all four
   byte offsets of the clock. Its hit becomes the memory address of the
   *candidate signature* (CSig).
2. **Character re-encoding saves memory.** Signatures of a u-set are stored as
   rows of a *signature matrix*, shifted so that every u-substring starts in
   the same column, the *aligning column*. A column holds few distinct
   characters. A character is therefore stored as its index in that column's
   list (the *character matrix*), using `ceil(log2 p)` bits for `p`
   distinct characters. A column with a single character costs no memory:
   its one bit line is wired through.
3. **Stage/index masking handles variable lengths with uniform logic.**
   Comparing the aligned stream with the CSig gives one match bit per column,
   the *rm-vector*. The signature matches if the rm-vector is all ones over
   exactly its columns. Instead of a per-column mask, each entry carries two
   short (stage, index) pairs: one for the head (columns left of the aligning
   column) and one for the tail. A pipeline of six-bit matching steps checks
   them.

At the default size there are 7 matching units (SMUs). Each has 1024
signatures of up to 136 columns, so one u-substring hit per unit per clock
can be checked: 7,168 signature slots at 4 bytes/clock (4.8 Gb/s at
150 MHz).

## Block structure

```
in_chars[4] ─► char_decoder ─► input_pipeline (i-pipeline, 35 steps x 4 sections x 256 lines)
                                  │ all sections in parallel
            ┌─────────────────────┴──────────────── x N_SMU ─────────────────┐
            │ smu                                                            │
            │  usub_detector ─► pipelined_encoder ─► sma (1024 x 708 bits)   │
            │                                         │ CSig entry           │
            │  align_detect ◄── aligning char ────────┤                      │
            │       │ shift                           │ codes                │
            │  char_matrix (4:1 mux per cell) ─► csig_decoder ─► rm-vector   │
            │                                         │ stage/index mask     │
            │                              matching_logic (match_unit x 2/step)
            └──────────────────────────────────► match, sig_id ──────────────┘
```

| File | Block |
|---|---|
| `rtl/nids_pkg.sv` | Constants, types, matrix geometry, the signature-set tables, timing helpers |
| `rtl/char_decoder.sv` | 8-to-256 one-hot decoder per input character |
| `rtl/input_pipeline.sv` | i-pipeline: shift register of decoded characters, read in parallel |
| `rtl/usub_detector.sv` | u-substring matchers, 4 shifts each, registered |
| `rtl/pipelined_encoder.sv` | Hit vector to CSig address, two stages |
| `rtl/sma.sv` | Signature Memory Array, one entry per signature, synchronous read |
| `rtl/align_detect.sv` | Which of the four shifts holds the aligning character |
| `rtl/char_matrix.sv` | Alignment correction, one 4:1 multiplexer per character-matrix cell |
| `rtl/csig_decoder.sv` | Per column, the CSig code selects a cell: the rm-vector |
| `rtl/match_unit.sv`, `rtl/matching_logic.sv` | Stage/index matching pipeline |
| `rtl/smu.sv` | One Signature Matching Unit |
| `rtl/nids_top.sv` | Decoders, i-pipeline and N_SMU SMUs |

## How a match travels through an SMU

The hardest part to follow is the timing. Fetching the candidate takes time,
and the stream keeps moving.

**The i-pipeline as a stream window.** Section `q` of `win` always holds
stream character `base + q`. Section 0 is the oldest, and `base` grows by 4
every clock. So a character moves down by four sections per clock. Each
section is 256 one-hot lines. "Is character X at position q" is therefore
one wire, `win[q][X]`, and all comparisons in the design are plain
wire selections.

**Detection (clock t).** `usub_detector` reads sections
`DP .. DP+4`, where `DP = W_HEAD + 16`. For u-substring `i` and shift `s`,
it ANDs `win[DP+s][c0]` and `win[DP+s+1][c1]`. The outputs are registered:
`hit[i]`, plus `shift_hit[s]` saying at which shift a u-substring starts.

**Fetch (clocks t+1 .. t+4).** `pipelined_encoder` turns `hit` into an
address in two register stages. Stage 1 takes the lowest set bit per group
of 32; stage 2 takes the lowest non-empty group. `sma` returns the entry one
clock later. The four clocks have moved the stream down by 16 sections. The
u-substring's first character now sits at section `W_HEAD + s`: exactly the
aligning column of a *matching window* that starts at section 0. This is
why the detector taps the pipeline at `W_HEAD + 16`.

**Alignment and decode (clock t+4, combinational, then registered).**
- `align_detect` compares the entry's raw aligning character with
  `win[W_HEAD + s]` for s = 0..3. It keeps only shifts whose delayed
  `shift_hit` flag is set, and returns the shift.
- `char_matrix`: column `c` of the signature matrix lies over stream section
  `c + shift`. For every cell (column `c`, character `k` of that column's
  list) one 4:1 multiplexer picks `win[c+shift][char(c,k)]`. Only the lines
  of characters that occur in the column are carried on.
- `csig_decoder`: per column, the CSig's code selects one of that column's
  cells. The selected bit is 1 if the stream character equals the signature
  character. These bits form the rm-vector. It is registered together with
  the mask fields and the ID.

**Matching (17 clocks at the default size, then an output register).**
The rm-vector is cut into six-bit slices, counted outwards from the aligning
column on each side (bit 0 nearest it). Pipeline step `k` has a head MU and a
tail MU, each working on slice `k` of its side. Each candidate carries four
signals: `stage`, `index`, `continuity` and `match`.

| MU position relative to the candidate's `stage` | action |
|---|---|
| `k < stage` | `continuity &= (slice == 6'b111111)` |
| `k == stage` | `match = continuity && (slice & index) == index` |
| `k > stage` | pass through |

`match` is asserted when both sides report a match. Stage and index come
from the length `n` of that side:
- `stage = (n-1)/6`;
- `index` has the `n - 6*stage` bits nearest the aligning column set;
- for a side with no characters, `stage = 0` and `index = 0`.

For example, a 15-character head gives stage 2 and index `000111`. A
9-character tail gives stage 1 with the three bits nearest the line set.
Unused slices ride down the pipeline with their candidate, so a new
candidate can enter every clock.

**Latency.** From the detector window to `match` takes
`smu_latency() = 4 + 1 + NS + 1` clocks, where NS is the slice count of the
longer side. At the top level with default parameters, `match[u]` goes high
on the 44th rising clock edge after the edge that samples the u-substring's
first character. This is the same for all four lanes. Throughput is 4
characters every clock, with no back-pressure.

## The signature set and the SMA word

The real tables come from an offline signature compiler. That compiler
partitions the rule set into u-sets, including the further split that allows
at most one u-substring hit per clock, picks u-substrings, aligns the rows
and builds the character matrices. It is software and is not part of this
RTL. To make the hardware complete and testable, `nids_pkg` defines a
**synthetic u-set per SMU by formula**:

- u-substrings are two characters, `0xC0+i/32` followed by `0xE0+i%32`. That
  gives 1024 distinct u-substrings, one per signature address `i`.
- All other signature characters come from `0x00..0xBF`. A u-substring can
  therefore only appear at a signature's aligning column, which is the u-set
  property.
- Column `c` stores `col_bits(c)` bits and holds `2^col_bits` distinct
  characters:
  - the aligning column is raw, 8 bits;
  - the column after it holds 5 bits, the 32 second characters;
  - the other 134 columns follow a fixed spread: 3 columns of 0 bits, 2 of 1,
    6 of 2, 12 of 3, 13 of 4, 35 of 5, 43 of 6 and 20 of 7.
  With 136 columns this sums to **688 code bits per signature**.
- Cell `k` of an ordinary column holds character
  `(37c + 53*smu + 5k) mod 192`.
- Signature `i` of SMU `u`:
  - head length is `mix(u,i,1) mod (W_HEAD+1)`;
  - tail length is `2 + mix(u,i,2) mod (W_TAIL-1)`;
  - its code in column `c` is `mix(u,i,c+3) mod 2^col_bits(c)`.
  `mix` is a 32-bit integer hash in the package.

Each SMA word holds the following, least significant bit first:

| Field | Bits (default) |
|---|---|
| column codes, column 0 first (aligning column raw) | 688 |
| `h_stage` | `clog2(ceil(W_HEAD/6))` = 3 |
| `h_index` | 6 |
| `t_stage` | `clog2(ceil(W_TAIL/6))` = 5 |
| `t_index` | 6 |

That makes 708 bits in total, which fits in twenty 36-bit memory blocks.
Codes of columns outside the signature are 0; the mask ignores them.

To carry a real rule set, replace `col_bits`, `cm_char`, `usub_char` and
`sma_entry` in `nids_pkg` with the compiler's output (for example as
package constants). The RTL structure does not change.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `N_SMU` | 7 | `nids_top` | matching units (u-sets / memory arrays) |
| `NSIG` | 1024 | `nids_top`, `smu` | signatures per SMU (at most `DEPTH`) |
| `W_HEAD` | 36 | all | head columns left of the aligning column |
| `W_TAIL` | 100 | all | tail columns, the aligning column included |
| `DEPTH` | 1024 | `smu`, `sma` | SMA entries |
| `LANES` | 4 | `nids_pkg` | characters per clock (fixed) |
| `SLICE_W` | 6 | `nids_pkg` | rm-vector bits per matching step |

`W_HEAD` and `W_TAIL` set the matrix width (136), the i-pipeline depth
(`pipe_depth()` = 35 steps) and the matching pipeline length (17 steps).

## Top-level interface

| Port | Dir | Width | |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous, active low; clears pipelines and valid bits |
| `in_valid` | in | 1 | the four characters of this clock are real; low inserts four idle slots that never match |
| `in_chars` | in | 4 x 8 | `in_chars[0]` is the earliest character |
| `match` | out | N_SMU | SMU `u` found a signature this clock |
| `sig_id` | out | N_SMU x 10 | its address in that SMU's memory array |

## Where this departs from, or adds to, the source architecture

- **Signature tables are synthetic** (see above). The source evaluates 3,739
  Snort signatures, which are not included.
- **Head/tail split of the 136 columns (36/100) is chosen here.** The source
  gives only the total width.
- **Mask size.** Binary stage fields for 6 head and 17 tail slices give
  3 + 5 + 6 + 6 = 20 mask bits. The source quotes 17 bits for its 136-column
  example without giving its split.
- **Matching-window width** is `W + 3` sections: column `c` reads sections
  `c .. c+3`. The source's wording of the window size (matrix width times
  four) would be the width of a non-overlapping layout. The overlapping one
  is what its "four consecutive sections per column" requires.
- **Alignment detection** qualifies the aligning-character comparison with
  the detector's per-shift flag. Without it, a character repeated within the
  same four bytes could pick the wrong alignment. The source only says that
  the block finds the u-substring's first character in the window.
- **Encoder** is a two-stage priority tree, with the lowest index winning if
  the one-hit-per-clock rule is broken. The source only names a pipelined
  encoder.
- **The SMA is one wide array** with contents given by its initial value and
  no write port. On an FPGA it maps to side-by-side embedded memory blocks as
  in the source, which does not describe how the blocks are loaded.
- **Idle slots, reset and lane order** are not specified by the source. They
  are chosen as in the interface table.
- **The one-u-substring-per-clock guarantee** is a property of the
  signature set's partitioning and is not checked in hardware. If it is
  broken, the lowest signature index is checked and any other candidate in
  that clock is missed.
- The dual-port memory variant and the replication across a larger device,
  which the source mentions as extensions, are not built.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_char_decoder` | one line per character, all 256 values, idle = no line |
| `tb_input_pipeline` | every section against a queue model, reset |
| `tb_usub_detector` | hit/shift for every shift; half u-substrings and background give nothing |
| `tb_pipelined_encoder` | lowest set bit, exactly 2 clocks later |
| `tb_sma` | decodes every word: codes name the right characters, masks give the lengths |
| `tb_align_detect` | correct shift with repeated aligning characters; no alignment without a flag |
| `tb_char_matrix` | every cell for every shift |
| `tb_csig_decoder` | rm bit = cell named by the code |
| `tb_matching_logic` | one candidate per clock, ones or one hole over random lengths, latency NS+1 |
| `tb_smu` | stream-level test of one SMU, see below |
| `tb_nids_top` | end-to-end at reduced size (2 SMUs, 64 signatures, 12+24 columns) |
| `tb_nids_full` | end-to-end with every parameter at its default (7 x 1024 signatures, 136 columns) |
| `tb_table1_workload` | 3,739 distinct signatures (the size of the evaluated Snort set) spread over the 7 SMUs, each written into a 373k-character stream; all must be reported |

The three stream tests write signatures into random background text. One in
six inserted signatures has a single character changed. Some pairs are packed
so that one SMU matches in consecutive clocks, and idle clocks are mixed in.
A plain software scan of the stream gives the expected matches. Each must
appear on the right SMU, with the right ID, at exactly the latency above, and
any other match is an error. The tests also require that each of these
happened at least once: a match on every SMU, all four alignments, a
rejected near-miss, back-to-back matches and idle clocks.

Simulating with Verilator (for example the full-size test):

```
verilator --binary --timing --assert rtl/nids_pkg.sv rtl/char_decoder.sv \
  rtl/input_pipeline.sv rtl/usub_detector.sv rtl/pipelined_encoder.sv rtl/sma.sv \
  rtl/align_detect.sv rtl/char_matrix.sv rtl/csig_decoder.sv rtl/match_unit.sv \
  rtl/matching_logic.sv rtl/smu.sv rtl/nids_top.sv tb/tb_nids_full.sv \
  --top-module tb_nids_full -o tb && ./obj_dir/tb
```

The full-size model builds in about 40 s and runs its 300-signature stream in
about two seconds; the 3,739-signature workload runs in about 30 s. The unit tests take a few seconds each.

## Notes for changing the design

- All derived sizes (entry width, cell count, pipeline depth, latency) are
  package functions of `W_HEAD` and `W_TAIL`. Change those two parameters,
  not the derived values.
- The detector and the character matrix are written as loops over package
  functions. A synthesis tool unrolls them into constant wiring. Simulation
  elaborates them as loops, which keeps build times short at full size.
- `LANES` is fixed at 4: the alignment multiplexers and the `+16` detector
  offset assume it.
