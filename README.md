# Reconfigurable built-in self-repair for several RAMs

A system on chip often holds many embedded RAMs of different sizes, and they
set most of its yield. Giving each RAM a few spare rows and spare columns lets
a chip with defective cells be repaired, but only if something finds the
defects and decides which spares replace what. This design does that on chip,
with one shared test-and-repair engine for all the RAMs: a single BIST (test
pattern generator and checker) and a single redundancy analyser, the
*ReBIRA*, are reconfigured for each RAM in turn from a small table of RAM
geometries. Each RAM is tested, its faults are collected and turned into
spare allocations while the test runs, the allocations are written into the
RAM's repair registers, and the RAM is tested again to confirm the repair.

The configuration built here has four word-oriented RAMs:

| RAM | rows (words) x bits | spare rows | spare columns |
|-----|---------------------|-----------:|--------------:|
| 0   | 16 x 32             | 2          | 2             |
| 1   | 32 x 64             | 2          | 3             |
| 2   | 128 x 64            | 3          | 2             |
| 3   | 256 x 64            | 0          | 0             |

RAM 3 has no redundancy at all: any defect in it makes it irreparable, and
the scheme must say so.

## Block structure

```
               program_ram_details, ram_details
                           |
                 ram_details_table (4 x 16)
                           |  entry of RAM ram_no
   start ---> rebisr_fsm --+--> cfg: depth, width ----> march_bist --+
               |   |            cfg: spare counts ----> rebira <-----+ fault reports,
               |   |                                    |   |          pause_bist
   ram_no, irrepairable, done                     local_bitmap  rep_reg_* writes
               |                                             |
           mem_mux  <---- BIST memory port, repair writes ---+
               |  <------ system port (normal operation)
     RAM0  RAM1  RAM2  RAM3   (repairable_ram each)
```

| file | what it is |
|------|------------|
| `rtl/rebisr_pkg.sv` | shared types (configuration word, memory request, fault, repair address) and the RAM table above |
| `rtl/repairable_ram.sv` | one RAM with spare rows, spare columns, repair registers and remap multiplexers |
| `rtl/ram_details_table.sv` | the 4 x 16-bit geometry table |
| `rtl/march_bist.sv` | the test W0; R0; W1; R1, sized at run time |
| `rtl/local_bitmap.sv` | the 4-entry fault table inside the ReBIRA |
| `rtl/rebira.sv` | the redundancy analyser |
| `rtl/mem_mux.sv` | routes test or system traffic to one RAM |
| `rtl/rebisr_fsm.sv` | the controller that walks through the RAMs |
| `rtl/rebisr_top.sv` | everything wired together |

## Repairable RAM: how a spare takes over

A row is one word. Every spare has one repair register:

* spare row *k*: `{RAE[k], RRA[k]}`, an enable and a row address. An access
  to row `RRA[k]` with `RAE[k]` set goes to spare row *k*, whole word, for
  both reads and writes.
* spare column *j*: `{CAE[j], CRA[j]}`. With `CAE[j]` set, bit `CRA[j]` of
  every main-array word is stored in spare column *j* instead; the rest of the
  word still comes from the main array.

The lowest-numbered register wins if two hold the same address. Spares are
assumed to be defect free, and a word held in a spare row is taken from it as
a whole, without column remapping. Writes happen at the clock edge; reads are
combinational.

Repair registers are written through one port: `rep_reg_wr`,
`rep_reg_addr = {is_col, index}` and `rep_reg_data` (the row or column
address). A write sets the entry's enable. Reset clears all enables. This is
*soft* repair: the repair is rebuilt by running the BISR after every reset,
and there is no fuse storage.

Defects are modelled by the `faults` input: up to eight stuck-at cells per
RAM, each `{valid, row, col, value}`. A stuck cell reads as `value` whatever
was written. The input only affects the main array, not the spares. It exists
for simulation. On silicon, tie it to zero.

## The test: W0; R0; W1; R1

`march_bist` runs ten states: IDLE, W0, WAIT1, WAIT2, R0, W1, WAIT3, WAIT4,
R1, DONE.

* W0 and W1 write all-zero and all-one words to rows 0 .. depth-1, going up,
  one row per cycle.
* Each WAIT pair is two idle cycles.
* R0 and R1 read from the last row down to row 0 and compare each word with
  what was written. Only the low `width` bits count.

Stuck-at-1 cells therefore show up in R0 and stuck-at-0 cells in R1. When a
word fails, its failing bits are reported one per cycle, lowest first, on
`fault_present / fault_row / fault_col`. A report is taken in a cycle where
`pause_bist` is low. While `pause_bist` is high the BIST freezes: it keeps
showing the same report and does not access the memory. With no faults and
no pauses, the test takes `1 + 4*depth + 4` cycles from `start` to
`bist_done`, and every failing bit adds one cycle.

Depth and width come from the configuration word at run time
(`cfg_log2_depth`, `cfg_log2_width`). So one BIST sized for 256 x 64 tests
every RAM.

## Redundancy analysis: the ReBIRA

This is the part that needs the most care.

**Collecting faults.** Faults go into a *local bitmap* of 4 entries x 64
bits. Each entry holds one faulty row address and a vector of the faulty
columns (bits) found in that row. A new fault in a row that already has an
entry sets one more bit. A fault in a new row opens a free entry.

**Repair on the fly.** Analysis runs at the same time as the test. If a fault
arrives for a new row while all four entries are in use, the bitmap is full.
The ReBIRA then raises `pause_bist` in the same cycle, so the report is held.
It makes *one* allocation, which frees space, and returns to take the waiting
fault. This repeats as often as needed. When `bist_done` rises, the entries
still in the bitmap are allocated one per cycle until it is empty.

**Range checking first.** Each allocation looks at the lowest valid entry
(row *r*) and its lowest faulty column *c*. It counts two numbers:

* NFCE: the faulty columns recorded in row *r* (the bits set in its entry).
* NFRE: the faulty rows recorded in column *c* (the entries with bit *c* set).

| condition | allocation |
|-----------|-----------|
| NFRE > NFCE | spare column for *c*: faults line up along the column |
| NFRE < NFCE | spare row for *r*: faults line up along the row |
| NFRE = NFCE | the kind with more spares left (row if equal) |

If the kind chosen has no spare left, the other kind is used. If neither kind
has a spare left while faults remain, the RAM is irreparable. A row
allocation frees the entry. A column allocation clears bit *c* in every entry
and frees any entry left empty.

**Faults already covered.** Once a row or column has been given a spare,
later reports in it are dropped. This matters because repair happens during
the test. A spare that has just been switched in still holds whatever it held
before. Its reads are meaningless until the next write phase, and in any case
until the verification pass. The reports it causes must not use up further
spares.

**Output.** Each allocation is a one-cycle `rep_reg_wr` pulse carrying
`{is_col, index}` and the address. Spares of each kind are used in order
0, 1, 2. `irreparable` and `rebira_done` hold until the next `start`.

Worked example (RAM 0 with the faults used in the end-to-end test): R0
reports (14,28) and (14,29), and R1 reports (7,18) and (6,18). The bitmap
then holds row 14 {28,29}, row 7 {18} and row 6 {18}. The first entry has
NFCE = 2 and NFRE = 1, so row 14 gets a spare row. The next entry, row 7 at
column 18, has NFCE = 1 and NFRE = 2, so column 18 gets a spare column, which
also clears row 6. One spare row and one spare column are used.

## Controller and configuration table

The table holds one 16-bit word per RAM:
`{log2 width, log2 depth, spare rows, spare columns}`, four bits each.
`rebisr_pkg::make_cfg(n)` builds the word for RAM *n*.

* While `rst` is high the table is cleared.
* Each cycle with `program_ram_details` high stores `ram_details` at the
  write pointer and advances the pointer.
* After four writes `full` rises, the pointer holds, and further writes are
  ignored.

`rebisr_fsm` waits for `start` (remembered if it comes early) and a full
table. Then, for each RAM in turn (`ram_no` = 0..3):

1. LOAD fetches the RAM's entry.
2. KICK starts the BIST and the ReBIRA.
3. REPAIR waits until both are done.
4. If the RAM is repairable, VKICK/VERIFY runs the BIST once more. The ReBIRA
   stays idle during this pass, and any fault reported marks the RAM
   irreparable.

`irrepairable` is high once any RAM is marked, and `irrepairable_map` shows
which RAMs. `done` rises at the end and stays high until reset. While
`test_mode` is high, `mem_mux` connects the BIST and the repair writes to the
RAM under test only. Otherwise it connects the system port (`sys_sel`,
`sys_req`, `sys_rdata`) to the RAM it addresses, through the repair logic.

Top-level use: reset; write the four configuration words, RAM 0 first; pulse
`start`; wait for `done`; read `irrepairable_map`; then use the RAMs through
the system port. In the reference case below, the whole repair takes 2502
cycles.

## How far it can be trusted

Each module has a self-checking testbench in `tb/`. Each bench prints one
line, `TB_RESULT checks=N failures=M`, and has a watchdog.

* `tb_repairable_ram` checks that defects show before repair, that random
  data reads back through a spare row and a spare column, that writes to
  spares that do not exist are ignored, and that reset clears the repair.
* `tb_ram_details_table` checks write order, `full`, the ignored fifth write
  and reset.
* `tb_march_bist` compares every fault report and its order with a list
  worked out from a memory model, on three geometries plus one run with
  random pauses. It also checks the cycle count and the write coverage.
* `tb_local_bitmap` compares 3000 random operations with a reference model.
* `tb_rebira` runs six fault scenarios: the expected allocations, the
  irreparable cases, a full bitmap, repeated reports, and faults in a line
  already replaced.
* `tb_mem_mux` checks routing and gating on random inputs.
* `tb_rebisr_fsm` checks the controller's order of work against stand-in
  BIST and ReBIRA models.
* `tb_rebisr_top` tests the whole design at full size, in two runs.
  * Run 1 uses the reference defects, listed as (row,bit):
    * RAM 0: (6,18) and (7,18) stuck at 0, (14,28) and (14,29) stuck at 1.
    * RAM 1: (15,43) and (16,43) stuck at 1, (28,61) stuck at 0.
    * RAM 3: (243,31) stuck at 0.

    The result must be RAM 3 irreparable and RAMs 0–2 repaired, with RAM 0
    using row 14 and column 18.
  * Run 2 has enough defects to fill the bitmap and to make RAM 0
    irreparable.

  After each run every repaired RAM is written and read back through the
  system port. The bench counts each mechanism: pause on a full bitmap, row
  allocation, column allocation, dropped report, irreparable RAM,
  verification pass and system access. It fails if any count is zero.
* `tb_rebisr_random` runs 40 full-size trials. Each trial gives every RAM up
  to eight random stuck-at cells, some of them sharing a row or a column. The
  verdict is then judged without reference to the analyser:
  * a RAM with no more defects than spares must be repaired;
  * RAM 3 must be irreparable exactly when it has a defect;
  * a RAM reported repaired must read back every word;
  * a RAM reported irreparable must still show a defect.

Limits:

* The spares themselves cannot be given defects, so verification never finds
  a fault here.
* Range checking is a heuristic. With few spares it can declare a RAM
  irreparable that an exhaustive search would have repaired.

## Where this design departs from, or adds to, the scheme it implements

* **Geometry reading.** The RAM table lists each RAM as "data width x
  depth", for example 16 x 32. The fault locations given for those RAMs (row
  243 in RAM 3, column 61 in RAM 1) only fit if the first number is the
  row count. This design uses rows x bits.
* **Spare cells.** The redundancy organisation also describes single spare
  cells for isolated defects. No RAM in the configuration has any, and the
  allocation rules only choose between rows and columns. They are not built.
* **Fuse box.** Hard repair with a fuse box and fuse register is described
  but not built. Repair is soft and is redone after each reset.
* **Concurrency.** The ReBIRA state diagram shows an IDLE state left "if BIST
  done". The written description has analysis running concurrently with the
  BIST and pausing it when the bitmap fills. The concurrent version is built.
* **This design's own choices:**
  * how the configuration word is encoded;
  * address order: rows go up in writes and down in reads;
  * reporting each failing bit separately;
  * the exact meaning of NFRE and NFCE, and the tie and fallback rules;
  * dropping reports in lines already replaced;
  * marking a RAM irreparable when verification fails;
  * the system port and `irrepairable_map`;
  * combinational RAM reads.
* **Timing.** A total repair time of 353,200 ns and an area of 2850 FPGA
  slices have been reported for this scheme, with no clock or device given.
  Neither can be compared with this RTL.

## Simulating and changing it

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl rtl/rebisr_pkg.sv \
    tb/tb_rebisr_top.sv --top-module tb_rebisr_top
./obj_dir/Vtb_rebisr_top
```

Any other bench works the same way: replace `tb_rebisr_top` with its name.
The package must come first on the command line. All benches finish in well
under a second.

To change the RAM set, edit `RAM_ROWS`, `RAM_WIDTH`, `RAM_SROWS` and
`RAM_SCOLS` (and `N_RAMS`) in `rebisr_pkg`. Then program the matching
configuration words. The rest is sized from the package. Fixed limits:

| limit | value | set by |
|-------|-------|--------|
| rows per RAM | 256 | `ADDR_W` |
| bits per word | 64 | `MAX_WIDTH`, `COL_W` |
| spares of each kind | 3 | `MAX_SPARE`, `SPARE_W` |
| bitmap entries | 4 | `BM_ENTRIES` |
| defect-model slots per RAM | 8 | `MAX_FAULTS` |
