# Self-repairing memory with global spare blocks

Defects in embedded memories tend to come in clusters: a handful of bad cells
packed into one corner of the array. Classic redundancy gives the memory whole
spare rows and columns, and a cluster can use up all of them even though most
of each spare line would replace perfectly good cells. This design cuts both
the array and the spares into **blocks** and lets each spare block replace a
faulty block **anywhere** in the array ("global" spares, as opposed to spares
tied to one bank). A built-in self-repair (BISR) flow finds the faults, decides
which blocks to replace, and from then on steers every access around them,
with no outside tester.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, and simulates with
plain Verilator.

## Geometry: banks, blocks and spares

```
            column bank 0       column bank 1
           c0 ........ c7     c8 ........ c15
 row   r0  +-----------------+-----------------+
 bank  ..  |                 |                 |      GSCB 0  GSCB 1  GSCB 2
 0     r7  |                 |                 |      (8 cells each, one
           +-----------------+-----------------+       column of one row bank)
 row   r8  |                 |                 |
 bank  ..  |                 |                 |
 1     r15 |                 |                 |
           +-----------------+-----------------+
           GSRB 0, GSRB 1, GSRB 2 (8 cells each, one row of one column bank)
```

| constant (`bisr_pkg`) | value | meaning |
|---|---|---|
| `ROWS`, `COLS` | 16, 16 | main array; one row is one 16-bit word |
| `BLK` | 8 | cells per block, so 2 row banks and 2 column banks |
| `NSRB` | 3 | global spare row blocks (GSRB) |
| `NSCB` | 3 | global spare column blocks (GSCB) |
| `NENT` | 6 | fault entries in the fault collection registers |

A **row block** is row *r* inside one column bank (8 cells); a spare row block
replaces it. A **column block** is column *c* inside one row bank (8 cells); a
spare column block replaces it. Because the spares are global, the three spare
row blocks could, for example, all go to rows of the same bank.

The array size, the banking and the three spares of each kind are those of the
published scheme. `NENT` is this design's choice: a memory with more open
(uncovered) faults than spares can never be repaired, so one entry per spare
is enough.

## The repair flow

`BISR_start` starts four phases in order:

1. **Spare test.** The BIST runs March C- over the spares. Each failing spare
   cell gives a one-cycle `erm_s` with a bitmap of the spares concerned, and
   the ARCAM sets their *faulty* flags. At the end, the ARCAM's counts of
   faulty row and column spares (`err_count`) are loaded into the FCR, so the
   analysis counts only good spares.
2. **Main test with on-line analysis.** The BIST runs March C- over the main
   array, without remapping. On a mismatch it stops, and for each failing bit it
   raises `erm_m` with the cell address `f_address`. The BIRA judges the fault
   and answers with `cnt`, and the BIST goes on.
3. **Final assignment and transfer.** When the BIST raises `finish`, the BIRA
   assigns a spare to every fault still open. It then shifts its repair records
   into the ARCAM, one per cycle, and raises `BISR_done` (`finish_r`).
   `repairable` tells whether every fault was covered.
4. **Mission mode.** Each access to the mission port is looked up in the ARCAM
   and steered bit by bit to the spares that replace faulty blocks.

March C- (`up w0; up r0 w1; up r1 w0; down r0 w1; down r1 w0; up r0`) is
this design's choice of test. It finds stuck-at cells. A stuck-at-1 cell fails
three reads per run and a stuck-at-0 cell fails two, so the analysis sees the
same fault several times and must recognise it.

For the spare test the BIST sees the spares as 8 words of 6 bits. Bit *k* of
word *j* is cell *j* of GSRB *k*, and bit 3+*k* is cell *j* of GSCB *k*. A
failing bit therefore names its spare directly.

## Redundancy analysis: how spares are chosen

This is the part of the design that does the real work. It is split as in
the published FCR structure:

- `fcr` is the datapath. It holds the fault entries, the two repair lists
  (row block = row + column bank, column block = column + row bank) and two
  counters of free good spares.
- `fcr_ctrl` is the state machine that decides.

The published scheme names the algorithm, Essential Most Spare Pivoting, but
does not give its steps. The rule built here follows that name:

**While testing (one fault at a time, `erm_m`):**

1. If the fault is already covered by a repair, or already stored, it is
   ignored (`repaired`). This absorbs the repeated reports of the march.
2. If a stored fault lies in the same **row block**, that block now holds two
   faults. It is *essential*: it gets a spare row block at once
   (`GSRB_repair`), and every stored fault inside it is dropped.
3. Otherwise, if a stored fault lies in the same **column block**, that block
   gets a spare column block (`GSCB_repair`) in the same way.
4. Otherwise the fault is stored as a new entry (`store`). Step 4 also catches
   steps 2 and 3 when their kind of spare is used up. If the stored entries
   already need every free spare (`full`), the repair has failed.
   `repair_fail` is sticky, and later faults are only acknowledged.

**After the test (`finish`):** every entry still open is a lone fault. Each
one gets the kind of spare with **more free spares left** ("most spare"), row
blocks on a tie. If no spare of either kind is left, the repair fails.

**Transfer:** the FCR presents its repair list on `shift_info`, NSP = 6 cycles,
row slots first. The ARCAM writes each valid record into the lowest entry of
its kind that is neither faulty nor used yet. Faulty spares are skipped here,
not in the FCR, which only counts them.

Worked example, the clustered case that `bisr_top_tb` uses (stuck-at-1 cells,
row bank 1, column bank 0). Faults arrive in row order:

| fault | decision |
|---|---|
| (8,1), (9,5) | stored |
| (10,5) | shares column block col 5 with (9,5): GSCB for col 5 |
| (10,6), (11,3) | stored |
| (11,4) | shares row block row 11 with (11,3): GSRB for row 11 |
| (11,5) | covered by the col 5 spare |
| (12,6) | shares col 6 with (10,6): GSCB for col 6 |
| (12,7) | stored; (13,7) then gives a GSCB for col 7 |
| (15,2), (15,3) | GSRB for row 15 |
| end of test | (8,1) still open; free spares: 1 row, 0 column, so GSRB for row 8 |

All six spares are used and the memory is repaired. Full-line spares would
need six 16-cell lines for the same cluster: twice the spare cells.

## Remapping in mission mode

The ARCAM compares the accessed row with all entries in parallel (a small
CAM):

- `row_map[cb]`: is column bank *cb* of this row served by a spare row
  block, and by which one?
- `col_map[c]`: is column *c* in this row's bank served by a spare column
  block, and by which one?
- `match`: any hit.

The AR block (address reconfiguration) uses these maps:

- **Write:** the word goes to the main array and also to every spare that
  serves part of it. A spare row block takes the 8 bits of its bank. A spare
  column block takes its one bit, at the row's offset in the bank.
- **Read:** each bit comes from its spare column block if it has one, else
  from the spare row block of its bank, else from the main array.

Reads are combinational, so `rdata` is valid in the same cycle as `addr`.

## Interface and timing of `bisr_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset, active high, clears FCR, ARCAM and controllers |
| `BISR_start` | in | 1 | start the flow (sampled while the BIST is idle) |
| `BISR_done` | out | 1 | flow finished; stays high until reset |
| `repairable` | out | 1 | with `BISR_done`: all faults covered |
| `bira_hold` | out | 1 | the analysis is busy |
| `addr`, `we`, `wdata` | in | 4, 1, 16 | mission access; writes on the rising edge |
| `rdata`, `match` | out | 16, 1 | remapped read data (combinational); ARCAM hit |
| `mm_sa_en`, `mm_sa_val` | in | 256 | stuck-at defects in the main array, bit r*16+c |
| `srb_sa_*`, `scb_sa_*` | in | 3x8 | stuck-at defects in spare row / column blocks |

The stuck-at ports are a test aid for planting defects. Tie them to zero in
real use.

Timing, one march operation per clock:

- The spare test takes 80 cycles and the main test 160 cycles, plus the fault
  handling.
- Each failing cell costs 3 cycles: report, judge, acknowledge. `cnt` comes two
  cycles after `erm_m`.
- Finishing takes one cycle to see `finish`, one cycle per open fault plus one,
  and 6 shift cycles.
- A fault-free memory is done 249 cycles after `BISR_start`.

While the flow runs, mission writes are ignored. Before it runs, accesses
reach the raw array. The flow runs once per reset: to run it again, pulse
`rst` first, which also clears the repair information.

## Files

| file | content |
|---|---|
| `rtl/bisr_pkg.sv` | sizes, address/record types, mode enum |
| `rtl/bisr_top.sv` | top level, wiring of the flow |
| `rtl/bist.sv` | March C- BIST, spare then main, `erm_s`/`erm_m`/`cnt` handshake |
| `rtl/bira.sv` | redundancy analysis = `fcr_ctrl` + `fcr` |
| `rtl/fcr_ctrl.sv` | allocation state machine |
| `rtl/fcr.sv` | fault entries, repair lists, spare counters, record shift |
| `rtl/arcam.sv` | faulty flags, repair entries, parallel lookup |
| `rtl/ar.sv` | data steering between ports, main array and spares |
| `rtl/main_mem.sv`, `rtl/spare_mem.sv` | storage with stuck-at injection |
| `tb/*_tb.sv` | one self-checking testbench per block |

## Verification

Assertions in `bist`, `fcr_ctrl` and `arcam` check the handshake rules during
simulation (`--assert`):

- fault reports are one-cycle pulses;
- the march holds still while it waits for `cnt`;
- the controller issues at most one command per cycle;
- a repair record always finds a good spare.

Every testbench checks against values worked out independently of the RTL,
and ends with a `TB_RESULT checks=N failures=M` line:

- `bisr_top_tb`: the full design at its default size. It runs four
  scenarios:
  - the cluster above;
  - a faulty spare of each kind, plus a row pair, a column pair and a lone
    fault;
  - seven isolated faults, which cannot be repaired;
  - a fault-free memory, for which the flow length is checked.

  For each repairable case, random words are written to every row and read
  back through the remapping. The testbench also counts each mechanism at
  least once: essential row and column repairs, most-spare assignment,
  repeated faults, spare flagging, failure, remapped access and hold.
- `bisr_random_tb`: 80 random clusters of 4 to 24 stuck-at cells, each inside
  a random 8 x 8 window. Every verdict is compared with an exhaustive search
  over all choices of at most three row blocks and three column blocks:
  - a claimed repair that the search finds impossible is a failure;
  - every claimed repair must also survive a read-back of a pattern and its
    complement.

  The allocation is a one-pass heuristic, so it can miss repairs that exist.
  With the default seed, the search finds 27 of the 80 patterns repairable
  and the design repairs 24 of them.
- `bist_tb`: the march length, and how many times each planted fault is
  reported. It also checks that the BIST holds still until `cnt`.
- `bira_tb`: the exact repair records of four scenarios, including
  most-spare picking column blocks, and the `cnt` latency.
- `arcam_tb`, `ar_tb`, `main_mem_tb`, `spare_mem_tb`: lookup, steering and
  storage against reference models.

Simulating with Verilator, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bisr_pkg.sv tb/bisr_top_tb.sv \
          --top-module bisr_top_tb -o sim && ./obj_dir/sim
```

Replace `bisr_top_tb` with any other testbench name to run that one.

## How far this follows the published scheme

These parts follow it:

- the 16 x 16 array in two row banks and two column banks;
- three global spare row blocks and three global spare column blocks;
- the flow: spare test with faulty flags set by `erm_s`, main test paused by
  `erm_m` and resumed by `cnt`, `err_count` updating the spare counters,
  transfer of the FCR to the CAM, remapping in mission mode with `match`;
- the split into FCR controller and FCR, with the signal names of their
  block diagram.

These parts are this design's own, because the scheme does not specify them:

- the allocation rule above. The scheme only names the algorithm, so it may
  differ from what its authors implemented;
- the march test and the fault model (stuck-at);
- the word organisation, the asynchronous-read register-file memories, the
  handshake timing and the directions of the controller/FCR signals;
- the ARCAM entry layout and fill order;
- read priority when a cell is covered twice;
- early failure when open faults outnumber free spares.

Not built:

- the memory macro as silicon: the array is modelled as registers;
- fault types beyond stuck-at, such as coupling or transition faults. March
  C- would detect many of them, but the defect-injection ports only model
  stuck-at faults.

The scheme's claims about area overhead and repair rate were not
re-evaluated.
