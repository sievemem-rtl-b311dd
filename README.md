# SieveMem: pre-alignment filtering inside a computing memory

Before a DNA read is aligned to a reference genome with an expensive dynamic
programming aligner, a *pre-alignment filter* throws away candidate
read/reference pairs that cannot be within `E` edits of each other. Filters
such as SHD (shifted Hamming distance) and BandedKrait are dominated by two
simple kernels:

* **HMC, Hamming mask creation**: compare the read with a (shifted) reference,
  base by base, and produce one mismatch bit per base.
* **SPD, short pattern detection**: find short patterns in that bit vector.
  Examples are zero runs of one or two bits for SHD, or fully matching 4-base
  segments for BandedKrait.

Moving every pair from memory to a CPU or GPU costs more time than these
kernels do. SieveMem therefore runs them where the sequences are stored.
Reads and references sit in the rows of memristive crossbar tiles. Activating
two rows at once XORs them on the bit lines. Small TCAMs next to the arrays do
the pattern detection. Only a count of edits and an accept bit leave the
memory.

This repository holds synthesizable SystemVerilog for one SieveMem rank,
together with self-checking testbenches. The analog parts (memristor cells,
bit-line currents, DACs) are modelled digitally, as described below.

## Organisation

The memory keeps the usual hierarchy. Every level adds a few components:

```
sievemem (rank)
 ├─ sm_fifo            input buffer (commands)  ─┐
 ├─ rank controller FSM                          │ in sievemem.sv
 ├─ sm_fifo            output buffer (responses) ┘
 └─ sm_bank_group × BANK_GROUPS
     ├─ sm_count_unit       Count-TCAM (4 bits × 16 entries) + output mask + edit counter
     └─ sm_bank × BANKS
         └─ sm_subarray × SUBARRAYS       (controller FSM)
             ├─ sm_tile × TILES
             │   ├─ sm_row_decoder      word-line activation, up to two rows
             │   ├─ sm_crossbar         ROWS × 32 cells, bit-line level per column
             │   ├─ sm_sense_amp        enhanced SAs: READ / OR / AND / XOR
             │   ├─ sm_bp_or            one OR gate per base: 32 bits -> 16 mismatch bits
             │   └─ tile controller FSM
             ├─ sm_mask             AND mask register
             ├─ sm_tcam             Pattern-detect TCAM, 16 entries × 16 bits
             ├─ sm_tcam             Output-select TCAM, 16 entries × 16 match lines
             └─ sm_acc              AND accumulator
```

A *word* is 16 bases, stored as 32 bits in one crossbar row. Base `i` of the
word occupies bits `2i` and `2i+1`, with A=00, C=01, G=10 and T=11. After the
OR gates, bit `i` of every 16-bit vector belongs to base `i`, counted from the
left. The TCAM columns use the same order.

## The filtering chain of a subarray

The core of the design is the chain a tile result passes through
(`sm_subarray.sv`):

```
tile XOR (32 b) -> OR per base (16 b) -> mask -> Pattern-detect TCAM -> Output-select TCAM -> AND accumulator
                                             \__________________ use_tcam = 0 ________________/
```

* The **Pattern-detect TCAM** searches the masked mismatch word against 16
  ternary entries. Each entry drives a match line.
* The **Output-select TCAM** takes those 16 match lines as its search key. Its
  own 16 match lines form the output word. Each of its entries is a
  programmable function of the pattern-detect results, for example a NOR of
  three of them.
* The **accumulator** ANDs the output word of each check into its state. This
  is how the checks of one read word against its 2E+1 shifted reference
  windows are combined.

The kernels differ only in what the TCAMs hold. The testbench package
`tb/tb_sm_pkg.sv` builds both programmings from a formula:

**SHD.** Pattern-detect entry `i` (i = 0..13) matches `000` on bases
`i..i+2`. Entries 14 and 15 are all don't-care, so they always match.
Output-select entry `j` (j = 2..13) requires match lines `j-2, j-1, j` to be 0.
It therefore raises bit `j` unless base `j` lies inside a zero run of three or
more. Entries 0, 1, 14 and 15 of the Output-select TCAM require all 16 lines to
be 0. They can never match, because lines 14 and 15 are always 1. As a result,
the two bases at each edge of a word always read 0: they lack the context on
one side. The output is SHD's amended Hamming mask, in which short zero runs
(one or two matching bases between mismatches) are turned into mismatches.
ANDing over the shifts keeps a base marked only if no shift explains it.

**BandedKrait.** The read is cut into 4-base segments. A segment without an
exact match in any of the 2E+1 shifted windows counts as one error. The read
is accepted when `errors <= E`. Pattern-detect entry `s` (s = 0..3) matches
`0000` on bases `4s..4s+3`. Output-select entry `s` raises bit `s` when
Pattern-detect line `s` is 0. The remaining entries never match. After the AND
over all shifts, bit `s` is 1 exactly when segment `s` matched in no shift.

**HMC alone.** A compute with `use_tcam = 0` accumulates the masked mismatch
word directly.

The **mask** zeroes the bases outside the data. An example is the tail of a
100-base read, whose seventh word holds only 4 valid bases.

## Counting edits: the Count-TCAM

Each bank group has one Count-TCAM unit (`sm_count_unit.sv`). The rank
controller reads a subarray's accumulator and hands the 16-bit word to the
unit. The unit searches the word as four 4-bit segments, one per cycle. The
match lines are ANDed with an output mask, and the number of surviving matches
is added to the edit counter. A pattern that must count two edits is
programmed into two entries.

For SHD, the table has 14 entries plus two masked all-don't-care entries:

| entries | pattern (leftmost base first) | edits for these patterns |
|---|---|---|
| 0, 1 | `101X` | 2 (1010, 1011) |
| 2, 3 | `X101` | 2 (0101, 1101) |
| 4, 5 | `1001` | 2 |
| 6, 7 | `0110` | 2 |
| 8 | `111X` | 1 |
| 9 | `0111` | 1 |
| 10 | `001X` | 1 |
| 11 | `0001` | 1 |
| 12 | `1X00` | 1 |
| 13 | `0100` | 1 |
| 14, 15 | `XXXX` | masked off |

For BandedKrait, four entries `1XXX`, `X1XX`, `XX1X`, `XXX1` with mask `0x000F`
count the error bits.

Because the words of one read are spread over the subarrays of one bank group,
the counter sums over all words of the read. `CMD_RESULT` then returns the sum
and the accept bit, and clears the counter.

## Host interface and commands

The rank takes `sm_pkg::cmd_t` commands through a valid/ready input buffer. It
returns `sm_pkg::rsp_t` responses through a valid/ready output buffer.

| command | effect | response |
|---|---|---|
| `CMD_WRITE_ROW` | `data` -> row `row_a` of tile `tile` in (`bg`,`bank`,`sub`) | – |
| `CMD_READ_ROW` | read row `row_a` | `RSP_ROW` |
| `CMD_TCAM_WRITE` | program entry `entry` of Pattern-detect (`tcam_sel=0`) or Output-select (`1`); `care` bit 0 = don't care | – |
| `CMD_MASK_WRITE` | `data[15:0]` -> subarray mask | – |
| `CMD_ACC_CLEAR` | accumulator <- all ones | – |
| `CMD_COMPUTE` | `sa_op`(`row_a`,`row_b`) -> chain -> accumulator; `use_tcam` selects the TCAM path | – |
| `CMD_READ_ACC` | read the accumulator | `RSP_ACC` |
| `CMD_CTCAM_WRITE` / `CMD_CMASK_WRITE` | program the Count-TCAM / its output mask of bank group `bg` | – |
| `CMD_COUNT` | count the accumulator of (`bg`,`bank`,`sub`) into the counter of `bg` | – |
| `CMD_RESULT` | `data[31] = edits <= threshold`, `data[15:0] = edits`; counter cleared | `RSP_RESULT` |

Setting `bcast` sends a command that returns no data to every subarray of
every bank group at once. Because all subarrays hold their words at the same
rows, a single broadcast `CMD_COMPUTE` filters every loaded pair in parallel.
This is where the in-memory parallelism comes from.

A Mem-BandedKrait pass, as run by `tb/tb_sievemem.sv`, works as follows:

1. Write the words and their shifted windows.
2. Program the TCAMs by broadcast.
3. For each row group, write the masks, broadcast `CMD_ACC_CLEAR` and 2E+1
   `CMD_COMPUTE` commands, then issue one `CMD_COUNT` per word.
4. Issue one `CMD_RESULT` per bank group.

## Timing

* Tile: a write answers 2 cycles after it is accepted, and a read or compute 3
  cycles after. A compute goes through activate (the bit-line level is
  latched), sense (the amplifier output is latched) and respond.
* Subarray: register, TCAM and accumulator commands take 1 cycle. Tile commands
  take the tile latency plus 1. The mask, TCAM and accumulator chain is
  combinational into the accumulator register.
* Count unit: 1 cycle to latch the word and 1 per 4-bit segment.
* Rank: the controller executes one command at a time. It waits until every
  targeted subarray has answered. It stalls while the output buffer is full.

At default size, the testbench needs about 4,300 cycles for four rounds of two
100-base pairs under both filters, including reprogramming the TCAMs each
time.

## Parameters

| parameter | default | where |
|---|---|---|
| `BANK_GROUPS`, `BANKS`, `SUBARRAYS`, `TILES` | 2, 2, 2, 2 | `sievemem` |
| `ROWS` (rows per tile) | 64 | `sievemem`, `sm_tile` |
| `BUF_DEPTH` | 8 | `sievemem` |
| word, TCAM width | 16 bases, 16 entries | `sm_pkg` |
| Count-TCAM | 4 bits × 16 entries | `sm_pkg` |

The architecture itself fixes only these values: the 16-column TCAMs with 16 entries, the
4-bit, 16-entry Count-TCAM, 2 bits per base and segments of k = 4. All
hierarchy sizes, the row width, the buffer depth and the command format are
choices made for this RTL. The index fields of `cmd_t` are 4 bits wide, which
limits each hierarchy level to 16.

Capacity at the defaults: one read/reference pair per bank group. Each word
needs one read row and 2E+1 window rows. A 100-base read (7 words) fits up to
E = 31. A 250-base read (16 words, 4 row groups, two per tile) fits up to
E = 15. Larger thresholds need more `ROWS` or more subarrays: E = 40 on
100-base reads needs `ROWS` >= 82, and E = 100 on 250-base reads needs
404 rows per tile.

## How the analog parts are modelled

* **Crossbar cells** are flip-flop or memory bits. The summed bit-line current
  of the activated cells in a column becomes a 2-bit count (0, 1, 2, or 3 and
  more), latched when sensed.
* **Enhanced sense amplifiers** compare that count with fixed references:
  OR/READ `>= 1`, AND `>= 2`, XOR `== 1`. This follows scouting-logic style
  in-memory logic. Activating the same row twice activates one word line, so
  `AND(a, a)` reads 0.
* **DACs** are not modelled beyond the activation vector.
* **TCAMs** are registers with a valid bit per entry. An entry that was never
  written does not match.

## Departures and open points

* The controllers are blocking: one rank command at a time, one tile operation
  at a time per subarray. Parallelism comes only from broadcast. Overlapping
  tile, TCAM and count phases would raise throughput but is not built.
* The host command set, the response format, the reset values (mask all ones,
  accumulator all ones, TCAMs empty) and every handshake are this design's own.
* Shifted reference windows are written by the host, one row per shift. There
  is no in-memory shifter.
* The edge behaviour of the SHD programming (two bases at each edge of a word
  read 0) is kept as it is. Because those bases are then never counted as
  mismatches, SHD counts across word borders can be lower than a software SHD
  would report.
* Latencies and clock frequency of the real memristor arrays are not
  represented. The cycle counts above describe this RTL only.

## Simulating

Every testbench is self-checking and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Packages must come first on the command
line:

```
verilator --binary --timing --top-module tb_sievemem -y rtl -y tb +libext+.sv \
    rtl/sm_pkg.sv tb/tb_sm_pkg.sv tb/tb_sievemem.sv
./obj_dir/Vtb_sievemem
```

| testbench | covers |
|---|---|
| `tb_sievemem` | whole rank at default size: Mem-BandedKrait and SHD on 100- and 250-base reads (E = 3, 5) against Algorithm-level models; HMC bypass; output- and input-buffer back-pressure; accept and reject outcomes |
| `tb_sm_bank_group`, `tb_sm_bank` | routing, broadcast, Count-TCAM programming through commands |
| `tb_sm_subarray` | SHD, BandedKrait and HMC kernels through the TCAM chain, command latencies |
| `tb_sm_count_unit` | SHD table and popcount table, latency, clear |
| `tb_sm_tile`, `tb_sm_crossbar`, `tb_sm_sense_amp`, `tb_sm_row_decoder`, `tb_sm_bp_or` | tile datapath and latency |
| `tb_sm_tcam`, `tb_sm_mask`, `tb_sm_acc`, `tb_sm_fifo` | leaf blocks |

The end-to-end test runs in a few minutes. Shorter runs can use fewer trials
in `run_case`.
