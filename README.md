# Smith-Waterman alignment accelerator with origin tracking and multi-stream arrays

This is a hardware accelerator for local DNA sequence alignment (the
Smith-Waterman algorithm). It is aimed at the common case of aligning many
short reads (tens to a few hundred bases) against a very long reference.

A plain systolic Smith-Waterman array only finds the best score and where the
best alignment *ends*. To recover the alignment itself, the host would then
redo the whole dynamic-programming matrix. This design makes two changes to
that picture:

* **Origin tracking.** Next to its score, every cell of the matrix carries the
  coordinates of the cell where its alignment *started*. The array therefore
  reports, for the best alignment, its score, its start (origin) and its end.
  The host then only has to refill and trace back the small sub-matrix between
  those two points, instead of the query x reference matrix.
* **Multi-stream operation.** A long array wastes most of its processing
  elements (PEs) on a short read. Switching elements inside the array can cut
  it into 2, 4, ... equal, independent arrays at run time. The arrays can all
  align their own query against one shared reference (single reference,
  multiple queries: SRMQ). Or each array can run its own query/reference pair
  (multiple references, multiple queries: MRMQ).

With the default parameters the array has 512 PEs and can be split into up
to 8 arrays of 64. So eight 37-base reads can be aligned against a
chromosome in one pass of the reference, at one reference symbol per clock.

## The recurrence and the origin matrix

For a query `S1` of length n (one PE per query position i) and a reference
`S2` (streamed, position j), each cell is

```
G(i,j) = max( G(i-1,j-1) + Sbc(i, S2(j)),   diagonal
              G(i-1,j)   - gap,             up
              G(i,j-1)   - gap,             left
              0 )
```

`Sbc(i, s)` is the substitution score of query position i against symbol s.
It is loaded per PE as a *column* of four signed 8-bit scores (A, C, G, T).
Any scoring matrix can therefore be used. `gap` is a constant parameter
(`GAP`, default 4).

The origin `Cb(i,j)` is a pair (i0, j0) that follows whichever term won:

* **Diagonal wins.** If `Cb(i-1,j-1)` is (0,0), the alignment starts here and
  the origin is (i,j). Otherwise the origin is copied from the diagonal cell.
* **Up or left wins.** The origin is copied from the winning neighbour.
* **Result is 0 or less.** The score is 0 and the origin is (0,0), which
  means "no alignment in progress".

Ties are resolved in a fixed order:

1. Up is compared with left first, and up wins a tie.
2. The winner is then compared with the diagonal, and the diagonal wins a tie.

For example, align query `CAGCCTCGCT` against reference `AATGCCATTGAC`, with
+3 for a match, -1 for a mismatch and gap 4. The best score is 10. The
alignment ends at (8,10) and starts at (3,4). The PE testbenches check this
cell by cell.

Each PE also keeps a running **best record**: {score, origin i, origin j,
end i, end j}. The record passes down the array with the scores. A PE
replaces it only when its own cell has a strictly larger score, so among
equal scores the record that arrived from upstream is kept. The record that
leaves the last PE of an array is that array's result.

## Processing element

`sw_pe_cell` is the arithmetic of one PE. `sw_pe` wraps it with the
registers for the reference symbol, the coordinate j and the valid flag.

The datapath has two stages:

* **Previous clock.** The cell registers the score and origin that arrive
  from the PE before it (`G(i-1,j)`). In the same clock it adds the
  substitution score to the previous upper score and registers the diagonal
  sum (`G(i-1,j-1)+Sbc`).
* **Current clock.** The comparisons (up against left, then against the
  diagonal), the zero clamp and the origin multiplexers work on those
  registers. They drive `g_out`/`cb_out` combinationally.

The next PE registers those outputs, so there is one register stage per PE
on every path. A reference symbol leaves a PE exactly one clock after it
entered.

The reference stream carries a valid flag, so gaps in the input (an empty
FIFO) pass down the array as bubbles. A PE that sees a bubble changes no
state.

The PE's query position i is a constant input. The array supplies it
relative to the array the PE belongs to, so coordinates are always query
positions starting at 1.

`sw_pe_base` is the score-only PE without origin tracking. It is used when
`ENHANCED=0` and is about half the size. Its coordinate fields read as zero.

## The array and its switching elements

`sw_pe_array` chains `N_PE` PEs and places a switching element
(`sw_switch`) every `N_PE/MAX_STREAMS` PEs. With the defaults that is 7
switches, one every 64 PEs.

A switch works in one of two settings:

* **Joined.** It passes every array signal through one register. The clock
  period does not grow, but the array latency grows by one clock per joined
  switch. For the full 512-PE array, the last result leaves 512 + 7 clocks
  after the last reference symbol entered.
* **Split.** The downstream group becomes the head of a new array. It takes
  its own reference stream and starts from the row-zero values: G = 0,
  origin (0,0) and an empty best record.

Not all signals are handled in the same order:

* The reference symbol, coordinate, valid flag and best record are selected
  first and then registered.
* The score and origin are registered first and then selected.

`seg_log` sets how many arrays there are: 2^seg_log equal arrays. The switch
in front of group c splits when c is a multiple of `MAX_STREAMS >> seg_log`.
The best record at the end of group c is brought out on `tap_max[c]`. For
the last group of an array, that record is the array's result.

### Fixed single-reference variant

For devices where a different layout means re-synthesis anyway (FPGAs), the
array can instead be built with `SHARED_REF=1`. In SRMQ all arrays see the
same reference symbol and coordinate at the same clock. So the PEs at
position k of every array can share one set of reference registers.

`sw_pe_srmq` is such a PE: `NQ` score/origin datapaths (`sw_pe_cell`)
around one symbol/coordinate/valid register set. With `SHARED_REF=1`:

* `sw_pe_array` builds `MAX_STREAMS` rows of `N_PE/MAX_STREAMS` PEs out of
  these, with no switching elements. `MAX_STREAMS` need not be a power of
  two here (for example 3 rows of 37 PEs).
* The controller starts in, and stays in, the `MAX_STREAMS`-array SRMQ
  layout.
* Only reference FIFO 0 and its feeder are built; the status bits of the
  other reference FIFOs read 0.
* `config` is rejected as an invalid instruction.

## Loading queries: the auxiliary shift register

A query is loaded without stopping the array. `sw_query_sr` is a shift
register with one 32-bit stage per PE. It is cut into `MAX_STREAMS`
sub-chains at the same places as the array. With the array split, a shift
moves one word into the head of the selected array only; the other arrays'
stages hold.

Words move from the PE-1 end towards the far end. The host therefore sends a
query's columns **last position first**, after a `rstquery` that clears the
register. Stages the query does not reach keep the all-zero column, which is
the column of an unused PE. `ldcost` then copies every stage into its PE in
one clock.

The next batch's queries can therefore be shifted in while the current
batch's references are still streaming.

## Streaming references

There is one reference FIFO per possible array. `sw_ref_feeder` unpacks
32-bit words into one 2-bit symbol per clock:

* Symbols are encoded A=0, C=1, G=2, T=3, with the first symbol in bits 1:0.
  Each word holds 16 symbols.
* The feeder also sends the reference coordinate j and a valid flag.
* `ldref` tells a feeder how many symbols to send, up to 2^24 - 1 per
  instruction.
* j keeps counting across successive `ldref`s, so a reference of any length
  up to the coordinate width can be sent in pieces.
* `rstproc` restarts j at 1.
* A load that ends inside a word discards the rest of that word. Each
  `ldref` therefore starts on a fresh word.
* The first word of a load costs one extra clock, so a load of n symbols
  takes n+1 clocks when the FIFO keeps up.
* When the FIFO runs dry, bubbles enter the array. The results are
  unaffected.

Which feeder drives which array head is set as follows:

* **SRMQ:** feeder 0 drives every array.
* **MRMQ:** array a is driven by feeder a.

## Controller and instruction set

`sw_controller` decodes 32-bit instructions from the command/query FIFO. The
opcode is in bits 31:28.

| opcode | name | fields | action |
|---|---|---|---|
| 0 | `config` | 27:24 number of arrays (1, 2, 4, ... `MAX_STREAMS`), 23 MS (1 = MRMQ, 0 = SRMQ) | set the array layout; only when `MAX_STREAMS > 1` and not with `SHARED_REF` |
| 1 | `rstproc` | - | clear the PEs and the feeders (not the controller) |
| 2 | `rstquery` | - | clear the query shift register |
| 3 | `shiftnxtcost` | 27:24 array, 15:0 size | the next `size` words in the same FIFO are substitution columns for that array; decoding resumes after them |
| 4 | `ldcost` | - | copy the shift register into the PEs |
| 5 | `ldref` | 27:24 array, 23:0 size | let that array's feeder send `size` symbols (in SRMQ the field is ignored and feeder 0 is used); waits while the feeder is still busy with an earlier load |
| 6 | `endref` | - | wait until all feeders and the array are empty (plus `DRAIN` clocks), then write each array's result to the output FIFO |
| 7 | `getid` | - | write the capability word to the output FIFO |

Errors are reported through two flags:

* **II (invalid instruction).** Opcodes 8-15, or `config` where it does not
  exist.
* **IC (invalid configuration).** A `config` array count that is not a power
  of two up to `MAX_STREAMS`, or an array field beyond the configured arrays.

Each flag shows the outcome of the last instruction that could raise it.

A typical batch looks like this:

```
[config] rstquery  shiftnxtcost(a, n) + n columns  (for each array)
ldcost  rstproc  ldref(a, len) ...  [rstquery + next queries]  endref
```

### Output words

`endref` writes five words per array, in array order:

| word | contents |
|---|---|
| 0 | array number in 31:28, best score in 15:0 (the width is `SCORE_W`) |
| 1 | origin i (query position) |
| 2 | origin j (reference position) |
| 3 | end i |
| 4 | end j |

If the best score is 0 there is no alignment and the coordinates are 0.
`getid` returns `{MAX_STREAMS[7:0], N_PE[11:0], ENHANCED, SCORE_W[5:0], J_W[4:0]}`.

### Status word

The status word has 33 bits:

* Bit 32 is OA: the output FIFO holds data.
* Bit 31 is II and bit 30 is IC.
* For FIFO k, bit 2k is full and bit 2k+1 is almost full. FIFO 0 is the
  command/query FIFO; FIFO k+1 is reference FIFO k.

Almost full means four or fewer places are left. All FIFOs (`sw_fifo`) are
64 words of 32 bits.

## Bus interface

`sw_apb_accel` is the top. It is an AMBA 2.0 APB slave wrapped around
`sw_accel`, and it has no wait states. The host does flow control itself by
reading the status first.

| offset | access | meaning |
|---|---|---|
| 0x00 | write | push into the command/query FIFO |
| 0x04 | read | head of the output FIFO; the read pops it |
| 0x08 | read | status bits 31:0 |
| 0x0C | read | status bit 32 (OA) in bit 0 |
| 0x40 + 4k | write | push into reference FIFO k |

A transfer takes effect in its access phase (PSEL and PENABLE high). Other
addresses read as zero.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_PE` | 512 | PEs in the whole array (largest query) |
| `MAX_STREAMS` | 8 | most arrays the PEs can be split into (divides `N_PE`; a power of two unless `SHARED_REF=1`) |
| `ENHANCED` | 1 | 1 = origin-tracking PEs, 0 = score-only PEs |
| `SHARED_REF` | 0 | 1 = fixed SRMQ array of shared-reference PEs |
| `SCORE_W` | 12 | signed score width |
| `I_W` | 10 | query coordinate width |
| `J_W` | 28 | reference coordinate width: positions 1 .. 2^28-1 |
| `GAP` | 4 | linear gap penalty |
| `FIFO_DEPTH` | 64 | depth of every FIFO |
| `DRAIN` | 4 | extra clocks `endref` waits after the array is empty (controller only) |

Some limits follow from these widths:

* Scores do not saturate. `SCORE_W` must hold the largest possible score,
  which is the query length times the largest substitution score. At the
  defaults that is 512 x 3 = 1536 < 2047.
* Coordinate 0 is reserved to mean "no origin". A reference may therefore
  have at most 2^`J_W` - 1 symbols.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. The reference model
(`tb/tb_sw_model_pkg.sv`) fills G and Cb straight from the recurrence above.
A testbench can be built and run with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl -Itb \
  rtl/sw_pkg.sv tb/tb_sw_model_pkg.sv tb/tb_sw_host_pkg.sv \
  tb/tb_sw_apb_accel.sv --top-module tb_sw_apb_accel
./obj_dir/Vtb_sw_apb_accel
```

| testbench | what it covers |
|---|---|
| `tb_sw_pe_cell`, `tb_sw_pe`, `tb_sw_pe_base` | single PE and 10-PE chains: the worked example, random scoring, bubbles, one-clock latency per PE |
| `tb_sw_pe_srmq` | chain of 3-stream shared-reference PEs, each stream checked against its own model |
| `tb_sw_switch`, `tb_sw_query_sr`, `tb_sw_ref_feeder`, `tb_sw_fifo` | switch settings, shift-register chaining per layout, symbol unpacking and load timing, FIFO flags |
| `tb_sw_pe_array` | 16 PEs as 1, 2 and 4 arrays, both PE types, drain latency |
| `tb_sw_controller` | instruction decoding, flags, result sequencing |
| `tb_sw_accel` | core without the bus: status bits against FIFO levels, end-to-end results |
| `tb_sw_apb_accel` | whole design through the APB (32 PEs, up to 4 arrays) |
| `tb_sw_apb_srmq` | the `SHARED_REF=1` build through the APB |
| `tb_sw_apb_fpga` | the `SHARED_REF=1` build in a prototype shape: 3 streams of 37 PEs, 9-bit scores, 37-base reads |
| `tb_sw_apb_full` | default parameters: eight 37-base reads in SRMQ, eight pairs in MRMQ, and one 512-base query on the whole array |

`tb_sw_apb_accel` runs many batches:

* a single array;
* 2 and 4 arrays in SRMQ and in MRMQ;
* queries shorter than their array;
* references sent in several `ldref`s;
* queries preloaded while the array is busy;
* a starved reference stream;
* a full command FIFO;
* an output FIFO that stays full.

It counts each of these and fails if any of them never happened.

`tb_sw_apb_full` also checks that the 512-PE array drains in 519 clocks. The
reference lengths in simulation are a few hundred symbols; the intended
workload streams references of hundreds of millions of symbols at one symbol
per clock.

## How far this follows the published architecture

These parts follow the published description:

* the recurrence and the origin rule;
* the two-stage enhanced PE;
* switching elements at the split points, with their register placement and
  one-clock latency;
* SRMQ and MRMQ;
* the auxiliary query load structure;
* the eight instructions and their field positions;
* the 33-bit status word's fields;
* 64x32 FIFOs;
* the APB attachment;
* the shared-register SRMQ PE;
* the default sizes (512 PEs, 8 streams, 12-bit scores, 2^28 reference).

These are this implementation's own choices:

* the tie-breaking order;
* how the best record handles equal scores;
* PE coordinates relative to their own array;
* the direction of the query shift register and the column order;
* the `ldref` size field taking all of bits 23:0;
* MS polarity;
* reference-word packing;
* the order of the full/almost-full bits;
* the almost-full threshold;
* the result record and capability word layouts;
* the lifetime of the II/IC flags;
* the `endref` drain rule;
* the APB address map;
* the reset values.

The shared-register PE is generalised from two streams to `NQ`.

These parts are not included:

* the host processor;
* its memory system;
* the host software: the reduced matrix refill and the traceback between
  the reported origin and end.

With the switching elements the arrays are always equal power-of-two
divisions of `N_PE`. A stream count that is not a power of two, such as 3
arrays of 37 PEs, can only be built as the fixed `SHARED_REF=1` variant.
