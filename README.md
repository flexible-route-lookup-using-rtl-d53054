# Range-search route lookup engine

This is an IPv4 longest-prefix-match engine, written in SystemVerilog. It
does not store prefixes. It stores a **range table**: the address space is cut
into ranges, and each entry holds the last address of its range, the prefix
length that owns the range, and the destination port. Range ends are ordinary
32-bit numbers with no "don't care" bits, so the table can be sorted. A
lookup then means finding the first entry whose address is greater than or
equal to the search address. That entry's port is the answer.

The sorted table is spread over a matrix of `COLS` columns by `R` rows. Each
row is the memory of one identical **search unit**. A lookup runs in two
stages:

1. A pipelined **binary range search** over the last address of every column
   picks the column.
2. The search walks down that column, one search unit per row. The first row
   whose entry address is >= the search address sets the port and the
   *found* flag. The rows after it pass that result on unchanged.

Every memory has a fixed size, so capacity does not depend on how the
prefixes are distributed. N prefixes never need more than 2N entries. The
search units form one pool that can be split between several routing tables
(for example a destination table and a source table). Each table gets its own
range search unit and its own pipeline, and all tables are searched at the
same time.

At the default size there are 61 units of 8192 entries. That is 499 712
entries of 50 bits, about 25 Mbit, or roughly 250 000 prefixes. The default
configuration has two tables.

## From prefixes to ranges

Take the prefixes 0/0 → 1, 10/8 → 2, 10.10.1/24 → 3 and 10.10.2/24 → 4.
Their range table, written as last address → port/length, is:

| last address    | port | len |
|-----------------|------|-----|
| 9.255.255.255   | 1    | 0   |
| 10.10.0.255     | 2    | 8   |
| 10.10.1.255     | 3    | 24  |
| 10.10.2.255     | 4    | 24  |
| 10.255.255.255  | 2    | 8   |
| 255.255.255.255 | 1    | 0   |

A range starts right after the previous entry's address. The last entry is
always 255.255.255.255.

- **Adding** a prefix of length L adds at most two entries, one for
  start−1 and one for the end. Every entry inside the new range whose length
  is below L takes the new port and length L.
- **Changing** a prefix's port rewrites the entries inside its range that
  have exactly its length.
- **Deleting** a prefix gives its entries back to the longest prefix that
  covers it. Entries that now repeat their successor can then be removed.

The length field is there only to make these updates possible. Searches do
not use it.

## Matrix layout and the search pipeline

Column `c` holds a contiguous slice of the sorted table. It runs from its
first row down. The columns follow each other in address order. The range
search holds the *bound* of every column, which is the address of the last
real entry in that column. Rows below the last real entry are padding. They
can hold anything whose address is at least the bound; a copy of the last
entry is the simplest choice. A search never reaches a padding row, because
an address sent to column `c` is at most that column's bound.

The host must keep these invariants:

- every column is sorted from its first row down;
- every column holds at least one real entry;
- the bounds increase from column to column;
- the last entry of the last column is 255.255.255.255.

The bound of the last column is not stored: every address above the other
bounds goes to the last column.

**Range search (`range_search`).** There is one level per bit of the column
number, `log2(COLS)` levels in all. Level `b` compares the search address
with the bound of column `idx + 2^b − 1`, where `idx` is the column number
decided so far. If the address is larger, the level sets bit `b`. The bounds
that level `b` can probe are exactly the columns whose number ends in `b`
ones followed by a zero. So each bound lives in one level's memory, at
address `m >> (b+1)`, and level `b` holds `COLS >> (b+1)` words. Each level
takes 2 cycles: a synchronous read, then the compare. For 8192 columns that
is 13 levels and 26 cycles. `NEWRANGE(m, E)` writes `E.ip` into the level
that owns column `m` as the command passes that level.

**Search unit (`search_unit`).** Each unit takes 2 cycles:

- **Cycle A:** the memory is read at the column index. A command uses `m`
  instead.
- **Cycle B:** the comparison is done, the column register is loaded, and
  every memory write takes place. The token is then registered towards the
  next unit.

The memory (`lr_sram`) has one read port and one write port and is
write-first. A write in cycle B and the next token's read in cycle A can hit
the same word in the same clock, and the read still returns the new value. As
a result, every token sees the effect of all tokens issued before it.

**Throughput and latency.** One search or command enters each pipeline per
clock. A token leaves after `2·log2(COLS) + 2·(units owned by the pipeline)`
cycles. With one pipeline owning all 61 units that is 26 + 122 = 148 cycles.

## Update commands

Each unit has a fixed number `UNIT_NUM` (1..R) and a column register,
`col_q`. Commands travel down the same pipeline as searches, in order with
them.

| command | effect in each unit of the pipeline |
|---|---|
| `WRITE(m, j, E)` | unit `j` writes `E` at `m` |
| `READ(m, j)` | unit `j` puts its entry at `m` in the token's data field, which leaves the pipeline as `res.data` |
| `NEWRANGE(m, E)` | the range search sets the bound of column `m` to `E.ip` |
| `READCOL(m)` | every unit loads its entry at `m` into `col_q` |
| `FORWARD(m, j, k)` | units `j..k` write the *previous* unit's `col_q` at `m` (the first unit of a pipeline gets zero) |
| `BACKWARD(m, j, k)` | units `j..k` write the *next* unit's `col_q` at `m` (the last unit gets zero) |
| `WRITECOL(m)` | every unit writes its own `col_q` at `m` |
| `CHANGECOL(m, j, k, len, newlen, p)` | units `j..k` whose `col_q.len == len` write `{col_q.ip, newlen, p}` at `m` |

Some uses of these commands:

- `READCOL(m)` followed by `FORWARD(m, j, R)` shifts rows `j..R−1` of column
  `m` down by one row.
- `READCOL(m)` followed by `BACKWARD(m, j, R−1)` shifts the rows below `j` up
  by one row.
- `READCOL(a)` followed by `WRITECOL(b)` copies a whole column.
- `READCOL` followed by `CHANGECOL` re-owns the entries of one prefix in one
  column. Several `CHANGECOL`s with different `len` values can follow a
  single `READCOL`, because `CHANGECOL` does not change `col_q`.

**How each neighbour's `col_q` reaches the unit that writes it.**

- **FORWARD:** the value travels with the token. When a FORWARD leaves a
  unit, the unit puts its `col_q` in the token's data field, and the next
  unit writes that value. READCOL and FORWARD can therefore be issued back
  to back.
- **BACKWARD:** the value has to come from a unit the command has not reached
  yet. The next unit loads its `col_q` two cycles after this unit does. So a
  BACKWARD must enter at least three cycles after its READCOL, with no other
  READCOL in between. The entry gate `cmd_issue` enforces this. If a
  BACKWARD arrives sooner, the gate holds it: `cmd_ready` is low, `stall` is
  high, and nothing enters the pipeline. This costs up to two cycles per
  BACKWARD and is the only time a pipeline takes less than one token per
  clock.

### Typical sequences

The host works these out. The testbenches contain working versions.

- **Port change** of prefix P/L to port p. For each column that holds
  entries of P: `READCOL(c)`, then
  `CHANGECOL(c, first row, last row, L, L, p)`. The row range covers P's
  entries in that column, and extends to the last row when P's last entry is
  the column's last real entry.
- **Insert** entry E at row j of column c, when the column has a free row:
  `READCOL(c)`, `FORWARD(c, j+1, R)`, `WRITE(c, j, E)`.
- **Column spill**: move the last entry of column c to the top of column
  c+1, when c+1 has room:
  1. `READ(c, last)` gives `tmp`;
  2. `READ(c, last−1)` gives `tmp2`;
  3. `READCOL(c+1)`;
  4. `FORWARD(c+1, 1, R)`;
  5. `WRITE(c+1, 1, tmp)`;
  6. `NEWRANGE(c, tmp2)`.
- **Open a free column** at c+1, when the last two columns fit into one:
  1. WRITE the last column's entries below those of the column before it,
     and NEWRANGE that column;
  2. for d from the last column down to c+1: `NEWRANGE(d, bound of d−1)`,
     `READCOL(d−1)`, `WRITECOL(d)`;
  3. `NEWRANGE(c, new last entry)`, then READCOL/BACKWARD on c+1 to drop the
     entries that stay in c.

  Each bound is lowered before its column is overwritten. Two neighbouring
  columns may briefly hold the same entries, but the first of them always
  wins, so every search between two of these commands is still answered
  correctly.
- **Remove** the entry at row j of column c: `READCOL(c)`, then
  `BACKWARD(c, j, R−1)`. Add `NEWRANGE(c, new last entry)` if the removed
  entry was the last real one.

While an update sequence is in progress, a search may see the table half
updated. Issue searches between complete sequences if that matters.

## Sharing the unit pool between tables

`search_array` runs one bus per pipeline past all units. `unit_pipe[i]`
selects the pipeline that owns unit `i`. At that unit:

- the bus of the owning pipeline enters the unit and continues from the
  unit's output register;
- the other buses go past unchanged, with no register.

Each table therefore sees only its own units, in physical order. A table's
latency depends only on how many units it owns.

The BACKWARD feedback is routed the same way: a unit receives `col_q` from
the next unit *of its own pipeline*. Unit numbers stay physical. For example,
if table 0 owns units 1, 3, 5, …, then `FORWARD(m, 1, 61)` on table 0
touches units 1, 3, 5, …. Change `unit_pipe` only while no token is in
flight.

## Interface (`route_lookup`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset of all pipeline registers (the memories are not reset) |
| `unit_pipe[UNITS]` | in | pipeline that owns each search unit |
| `cmd_valid[NPIPE]`, `cmd_ready[NPIPE]` | in/out | one token per pipeline per cycle, taken when both are high |
| `cmd[NPIPE]` (`cmd_t`) | in | `op`, `tag`, `key` (search address), `m`, `j`, `k`, `len`, `newlen`, `p`, `entry` |
| `res[NPIPE]` (`result_t`) | out | every token leaving the pipeline: `valid`, `op`, `tag`, `found`, `dest`, `index` (column), `data` (READ) |
| `stall[NPIPE]` | out | the entry gate is holding a BACKWARD |

Types and widths are defined in `lr_pkg`:

| field | width |
|---|---|
| address | 32 bits |
| prefix length | 6 bits |
| port | 12 bits |
| `m` | 16 bits |
| `j`, `k` | 8 bits |
| `tag` | 8 bits |

A module uses only the low bits of `m` and `j`/`k` that its size needs.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `COLS` | 8192 | entries per search unit = columns; a power of two |
| `UNITS` | 61 | search units in the pool (R) |
| `NPIPE` | 2 | tables / pipelines, each with its own range search |

At the defaults the design holds:

- 61 × 8192 × 50 bits = 24.99 Mbit of search-unit memory;
- 2 × 8191 × 32 bits of range-search memory.

A table with a worst-case range table of 2 entries per prefix fits
249 856 prefixes. That is just short of 250 000: the full 500 000 entries
would need 61.04 units.

## Where this design makes its own choices

- **Two cycles per search unit.** There is a register between the
  synchronous memory read and the compare. The original paper counts the
  lookup latency as 61 cycles for the units plus about 26 for the range
  search. It also says that such registers exist in practice but leaves them
  out of its figures. Here they are counted, so the lookup latency is 148
  cycles with all 61 units on one table.
- **The BACKWARD gate** described above. An implementation with one cycle
  per unit could close this gap in other ways. Here the gate is visible as
  `cmd_ready`/`stall`.
- **Memory ports.** The search-unit memories have one read port and one
  write port, so a read and the write of an earlier command can happen in
  the same cycle.
- **Unit numbers are physical.** A unit's number, compared with `j` and
  `k`, is its place in the whole pool. It is not its place among the units
  of its own table.
- **Column register.** READ does not load `col_q`. Only READCOL does, so
  searches and READs between update commands leave `col_q` alone.
- **Handshake and ordering.** The valid/ready handshake, the tag, and the
  result for every token (commands too) are this design's. So is the 6-bit
  length field.
- **Shared pool.** The bypass around units owned by another table is
  unregistered, and partitioning is a static input.
- **Host software is not included.** The table-management software that
  turns prefix changes into command sequences, and merges many changes into
  few commands, is not part of this RTL.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line. Most of them compare results with an independent reference.
`lr_model_pkg` is a plain model of the matrix, column registers and bounds
that executes each token in full before the next one.

| testbench | what it does |
|---|---|
| `tb_lr_sram` | random reads and writes against an array; checks read latency, hold, and write-first |
| `tb_search_unit` | three chained units, COLS 8. Random mix of searches and all commands, including back-to-back READCOL/FORWARD/CHANGECOL, against the model. Checks 6-cycle latency |
| `tb_range_search` | 16 columns. Random searches, including addresses equal to or one past a bound, and sorted NEWRANGE updates against a linear scan. Checks 8-cycle latency |
| `tb_search_array` | 5 units shared by 2 pipelines under three partitions. Both pipelines are driven at once and checked against the model, with per-pipeline latency |
| `tb_route_lookup` | end to end, 8 columns × 8 units in two interleaved tables. See below |
| `tb_range_example` | the worked example above: adds 10.10.0.0/16 → 5, then deletes 10/8, reads back the whole matrix after each step, and checks the lookups. A second table checks 10.120.50.34 against 10/8 and 10.120.50/24 |
| `tb_column_moves` | 5 units, 16 columns. Replays a short sequence on a matrix of distinct entries: column 1 shifted down from row 3, column 3 shifted up into rows 3–4, column 5 copied to column 8. Then reads back every position. The BACKWARD is sent right after its READCOL and must be held |
| `tb_route_lookup_full` | default size, 61 units × 8192, two tables. Loads 483 328 synthetic entries (about 254 k cycles), runs 20 000 searches per table at once, and one port change, insert and removal per table. About 3 s in Verilator |

`tb_route_lookup` builds random nested prefix sets with a default route,
converts them to range tables, loads them, and then runs three rounds of port
changes, spills, column openings, inserts and deletes, using the command
sequences above. After
each round it reads back every position and sends searches to every prefix
boundary and to random addresses. Search results are compared with a
brute-force longest prefix match, and every token's latency is checked. It
also counts that each of these occurred:

- simultaneous searches on both tables;
- BACKWARD stalls;
- spills, inserts, deletes and port changes;
- whole-column moves.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/lr_pkg.sv tb/lr_model_pkg.sv rtl/lr_sram.sv rtl/search_unit.sv \
  rtl/search_array.sv rtl/cmd_issue.sv rtl/range_search.sv rtl/route_lookup.sv \
  tb/tb_route_lookup.sv --top-module tb_route_lookup
./obj_dir/Vtb_route_lookup
```

To run a different testbench, swap the `tb/` file and `--top-module`.
`tb_lr_sram` needs only `rtl/lr_sram.sv`. Verilator has no X state, so
anything that is read must be written first. Memories start with random
contents.

**Not established by simulation:**

- clock frequency or area;
- behaviour with `unit_pipe` changed while tokens are in flight;
- tables laid out in any way other than the invariants above.

## Files

- `rtl/lr_pkg.sv`: types: entry, command, token, result, opcodes.
- `rtl/lr_sram.sv`: synchronous one-read one-write memory.
- `rtl/search_unit.sv`: one row of the matrix, with the search step and the
  update commands.
- `rtl/range_search.sv`: pipelined binary search over the column bounds.
- `rtl/search_array.sv`: the unit pool and the per-table buses.
- `rtl/cmd_issue.sv`: entry gate (BACKWARD spacing).
- `rtl/route_lookup.sv`: top level.
- `tb/`: the testbenches above and `lr_model_pkg.sv`.
