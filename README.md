# Built-in redundancy analysis with a 1D local bitmap

This is synthesizable SystemVerilog for a built-in redundancy analyzer (BIRA).
It repairs a word-oriented embedded RAM that has two kinds of spare:

- **global spare rows.** One spare row replaces a whole row of both halves of the array.
- **local spare columns.** The array is split into a left and a right subarray, and each half has its own spare columns. A spare column replaces one bit line of its half.

A memory BIST tests the RAM and reports each failing word. The analyzer decides, on chip and while the test runs, how to spend the spares. When the test ends, it either shifts the chosen repair addresses out to the fuses or reports that the memory cannot be repaired.

Finding the best allocation of spare rows and columns is NP-hard. Exhaustive on-chip analyzers keep a *2D* local bitmap: one cell per (faulty row, faulty column) pair. For word-oriented RAMs that means one word per cell, so the bitmap grows with the square of the spare count and linearly with the word width. This design keeps a *1D* bitmap instead. It is a short list of faulty words. Each entry holds a valid flag (VF), the row address (RAR), the column address (CAR) and the word's syndrome (HSR: one bit per data bit, set where the read data differed from the expected data). The analyzer allocates rows and columns in two dimensions by reading that list. The list needs only about `r + c` entries of `1 + n + m + W` bits.

For example, with n = 7 row bits, m = 6 column bits and W = 32, a 2D bitmap for 2 spare rows and 2 spare columns needs 2152 registers. The 1D list needs 4 × 46 = 184.

## Array organisation and addressing

- A word address is `{row (ROW_BITS), column (COL_BITS)}`, so there are 2^ROW_BITS rows and 2^COL_BITS column addresses.
- Data bits `0 .. WORD_W/2-1` lie in the left subarray and the rest in the right.
- A bit line is named by a column address and a data bit. A spare column is therefore allocated as (column address, bit position inside its half).

The default configuration is:

| parameter | default | meaning |
|---|---|---|
| `ROW_BITS` | 7 | row-address bits n |
| `COL_BITS` | 6 | column-address bits m (8192 words in all) |
| `WORD_W` | 64 | word width W |
| `SPARE_ROWS` | 1 | global spare rows r |
| `SPARE_COLS_HALF` | 1 | spare columns per half (c = 2) |
| `ENTRIES` | 4 | bitmap entries X |

This is an 8192 × 64-bit RAM with one spare row and two spare columns. The defaults live in `rtl/bira_pkg.sv`. Every module takes them as parameters.

## The analysis algorithm

Most of the logic is here. The controller (`bira_fsm`) runs three procedures.

### Phase-1: while the BIST runs

Each reported fault (row RA, column CA, syndrome) is first filtered:

- If its row already has a spare row, the fault is ignored.
- Syndrome bits whose bit line already has a spare column are cleared. If nothing is left, the fault is ignored.

The filtering is needed because the BIST tests the array without the repair applied, and a march test reads every cell several times.

The remaining fault falls into one of three cases:

1. **Same word as an entry** (RAR = RA and CAR = CA in one entry). The syndrome is ORed into that entry's HSR.
2. **Known row, new column** (some RAR = RA, and CA matches no stored CAR). The row now has faulty words at two column addresses, so it gets a spare row at once. All entries of that row are freed. With no spare row left, the memory is unrepairable.
3. **Anything else.** The fault is written into the lowest empty entry. If the bitmap is now full, the Subroutine runs.

### Subroutine: when the bitmap is full, and in Phase-2

Each pass makes one decision:

- **A half is out of spare columns but still has faulty entries.** Those entries can only be fixed by rows. The controller counts the distinct faulty rows of that half (N_FR).
  - If N_FR ≤ free spare rows, each of those rows gets a spare row.
  - Otherwise the memory is unrepairable.
- **Otherwise, while spare columns remain**, the B_MF detector finds where one spare column does the most good:
  - G_MC is the group of entries that share the most common column address.
  - B_MF is the bit position set in the most HSRs of that group. The least significant bit wins ties.
  - A spare column of B_MF's half takes (G_MC column, B_MF). That bit is cleared in the group's HSRs, and entries left with an empty HSR are freed.
- **With no spare column left at all**, the row of the lowest-indexed entry gets a spare row. If there is none, the memory is unrepairable.

After each pass, a still-full bitmap runs the Subroutine again. Otherwise the BIST resumes.

### Phase-2: after `test_done`

While the bitmap holds entries, the Subroutine runs. An empty bitmap means every fault is covered. The repair data are then shifted out.

### Worked example

Take a 6-bit word, two spare rows, one spare column per half, and these faults:

- row 1, column 2, bits 0 and 2
- row 2, column 2, bit 1
- row 3, column 2, bit 3

At test end the analysis runs as follows:

1. G_MC is column 2. Bits 0 to 3 tie with one fault each, so bit 0 wins. Column 2, bit 0 gets the left spare column.
2. The left half still has faults (rows 1 and 2), so N_FR = 2, which equals the two free spare rows. Rows 1 and 2 get them.
3. Column 2, bit 3 gets the right spare column.

The memory is repairable. `tb/tb_bira_fsm.sv` checks exactly this sequence.

## Blocks

| module | role |
|---|---|
| `bira_top` | The analyzer, wiring the four blocks below. The column address and bit chosen by the detector go straight to the bitmap and the remap register, and the controller only issues the commands. Its ports are listed under "Interface and timing". |
| `bira_fsm` | The controller. It implements the procedures above, one allocation per clock. |
| `local_bitmap` | The 1D local bitmap: ENTRIES × {VF, RAR, CAR, HSR}. It compares every entry with the current fault in parallel. Operations: merge, store, delete row, clear column bit, clear. |
| `bmf_detector` | A combinational G_MC / B_MF search. |
| `remap_register` | The Remapping Data Register. It holds the allocated spares, counts the free ones (N_ASR, LN_ASC, RN_ASC), looks up repaired rows and bit lines for the filter, and serialises the repair data. |
| `bira_pkg` | Default sizes, the bitmap operation and state encodings, and the repair-image length. |

The BIST, the RAM with its spare rows and columns, and the fuse group are outside this RTL. The testbenches contain simple behavioural stand-ins for the BIST and for a faulty RAM.

## Interface and timing

`syndrome = {row address, column address, hamming syndrome}` is valid in the clock where `fail_h` is high.

The handshake with the BIST works as follows:

- `hold_l` is high while the analyzer listens.
- The BIST pulses `fail_h` for one clock and then freezes.
- From the next clock, `hold_l` is low until the analysis of that fault is over.
- The BIST may continue once it sees `hold_l` high.

A fault that needs no allocation takes 2 clocks. Each spare allocated adds about one clock. The longest analysis with the default sizes stays well under 39 clocks, which is the worst case of the reference implementation of this scheme. The testbenches check that bound on every fault.

After `test_done`:

- **Repairable memory.** `shift_en` is high for exactly the length of the repair image, and `tdo` carries one bit per clock, bit 0 first.
- **Unrepairable memory.** `unrepairable` rises and stays high until `rst`. `hold_l` then goes high so that the BIST can finish.

`bira_en` starts the analyzer from idle. `rst` is synchronous and active high.

`bira_fsm` carries concurrent assertions for these rules:

- `fail_h` comes only while `hold_l` is high;
- `hold_l` falls in the clock after an accepted `fail_h`;
- `shift_en` and `unrepairable` are never high together;
- `unrepairable` stays high once set.

They are checked in every testbench run with `--assert`.

The repair image has one record per spare, listed in this order, each record LSB first:

1. each spare row: `{row address, valid}`
2. each left spare column: `{bit position, column address, valid}`
3. each right spare column: `{bit position, column address, valid}`

With the defaults the image is 32 bits.

## Where this RTL departs from, or adds to, the scheme it implements

- **Reference cycle counts.** The cycle counts of the reference implementation are not reproduced: about 26 cycles per fault on average, and 39 at worst. This controller is faster. It makes one decision per clock and uses a single-clock combinational B_MF search.
- **N_FR test.** The test is N_FR ≤ free spare rows. This is the reading the scheme's own worked example needs: it repairs two faulty rows with two spare rows.
- **Choices of this design.** The filter for already-repaired faults, the tie rule between equally large column groups (the lowest entry wins), the choice of "one row of the bitmap" (the lowest entry) and the exact way the bitmap is updated after an allocation are all this design's own.
- **Spare column.** A spare column is read as one bit line (column address plus bit position). The scheme's description of its last example step reads as if one spare column also covered a fault at another column address. That is not possible under this reading, so `tb_bira_fsm` expects "unrepairable" for that case.
- **Second word of a stored row.** In Phase-1, a second word of a stored row gets a spare row only when its column address matches no stored entry. This is literally as the scheme states it. The consequence is that a row fault with no spare row left is declared unrepairable even if spare columns could still cover it.
- **Default address split.** The default row/column split (7/6) for the 8192-word RAM is the split used for the register-cost comparison of the same word count. The other evaluated sizes (4096 × 128, 2048 × 256, and two spare rows) are reached by parameters only, and their address splits are a free choice.
- **Zero spares.** `SPARE_ROWS` or `SPARE_COLS_HALF` may be 0, but not both.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_local_bitmap` | Thousands of random operations compared against an array model, plus the G_MC example bitmap. |
| `tb_bmf_detector` | The two worked bitmaps (B_MF = bit 1, then bit 0 on an all-way tie; bit 3 with the left half disabled), plus random bitmaps against a queue-based reference. |
| `tb_remap_register` | Counters, the over-allocation guard, the repaired-row and repaired-bit-line lookup, and the exact serial image. |
| `tb_bira_fsm` | The worked example (allocation order and image), the same example with an extra fault (unrepairable), merging, an immediate spare row, ignoring of repaired faults, and an N_FR = 2 case with the left spare column already used. |
| `tb_bira_top` | 600 random trials on a 16 × 8 × 8-bit RAM with 2 spare rows, 1 spare column per half and 4 entries. |
| `tb_bira_full` | One complete test and repair at the default size: 8192 × 64, two read passes, and a repair using the spare row and both spare columns. |

In `tb_bira_top`, the injected faults are single cells, row and column twin-bits, and 2 × 2 clusters. The testbench checks:

- the verdict and the repair image against a behavioural reference of the algorithm;
- that every faulty cell is covered by the shifted-out repairs;
- the 39-clock bound;
- that each mechanism (merge, immediate row, store, full-bitmap Subroutine, column at B_MF, N_FR rows, row with columns exhausted, Phase-2 Subroutine, repaired-fault filter, both verdicts) happens at least once.

Two further testbenches run whole workloads.

`tb_bira_repair_rate` runs 14 spare configurations side by side on the default 8192 × 64 RAM. Each configuration analyses the same 500 generated defective cores per fault mix. It compares the analyzer's repair rate with an exhaustive search and checks every claimed repair cell by cell. With 1 to 6 faults per core, the results are:

| (r, c) | single cells: optimal / analyzer | mixed faults: optimal / analyzer |
|---|---|---|
| (1,2) | 43.6 % / 43.6 % | 34.0 % / 32.0 % |
| (2,2) | 63.8 % / 63.4 % | 52.2 % / 45.4 % |
| (3,4) | 99.6 % / 99.6 % | 94.2 % / 85.6 % |
| (4,4) | 100 % / 100 % | 99.2 % / 96.4 % |

The mixed faults are 40 % single cells, 20 % row twin-bits, 20 % column twin-bits and 20 % 2 × 2 clusters. On single-cell faults the analyzer is within a fraction of a percent of optimal. Clustered faults cost it more, because the greedy B_MF choice and the immediate spare row for a second word of a row can both waste a spare.

The published rates for this scheme are higher in absolute terms for the same (r, c). The number of faults per core behind them is not stated, so the fault-count mix here is a guess. Only the gap between the analyzer and the optimum is meant to be compared.

`tb_bira_sizes` runs 8192 × 64, 4096 × 128 and 2048 × 256 RAMs, each with (1,2) and (2,2) spares. The analysis takes 2.7 to 3.1 clocks per fault report on average. The longest hold is 10 clocks.

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_bira_top \
    -y rtl -y tb +libext+.sv rtl/bira_pkg.sv tb/tb_bira_top.sv -o sim
./obj_dir/sim
```

Put the package first, and change the top-module name for the other testbenches. Each runs in about a second or less.
