# Systolic Smith-Waterman accelerator for a four-FPGA board

Smith-Waterman local alignment scores every prefix pair of a query and a
database sequence. The best cell of the (m+1) x (n+1) score matrix says how
well the two sequences match. In software this takes O(mn) time. In this
design the matrix is computed by a linear systolic array of processing
elements (PEs). Each PE holds one query character, which makes it one
column of the matrix. The database streams through the array at one
character per clock. PE x works on row y while PE x+1 works on row y-1, so
a whole anti-diagonal of the matrix is computed in every clock: 512 cells
per clock on one FPGA.

Three features set the design apart from a plain array:

* **Query loading by time-to-live.** Query characters are not written into
  PEs by address. They enter at the first PE with a hop count and shift
  down the array until the count reaches zero.
* **Several queries in one pass.** A register-and-mux stage sits between
  every group of 32 PEs. It either continues the current query or starts a
  new one. Up to 16 short queries therefore share a single pass of the
  database.
* **Queries longer than one FPGA.** The same mux at the array input and
  output connects the array to the neighbouring FPGAs. A query of up to
  2048 characters then runs over four FPGAs, with the database streaming
  from one FPGA into the next. There is no feedback buffer and no second
  pass.

The database stays in board memory, and the memory port can be rewound to
its start. A new batch of queries can therefore be run against the same
database without another host transfer.

## The recurrence each PE computes

Gaps are affine: the first gap position costs `eog` (gap open) and each
further position costs `e` (gap extend). A match adds `match` and a
mismatch subtracts `mismatch`. For database row y and query column x:

    S(y,x) = max{ 0, S(y-1,x-1) + Sub, S(y,x-1) - eog, S(y-1,x) - eog,
                  H(y,x-1) - e, V(y-1,x) - e }
    H(y,x) = max{ H(y,x-1) - e, S(y,x-1) - eog }      (gap along the query)
    V(y,x) = max{ V(y-1,x) - e, S(y-1,x) - eog }      (gap along the database)
    S(0,x) = S(y,0) = 0,   H(y,0) = V(0,x) = -eog

This is the usual Gotoh form. A gap of length k costs eog + (k-1)e.

In `sw_pe`:

* `S(y,x-1)` and `H(y,x-1)` arrive from the left neighbour in the same beat
  as database character c_y.
* `S(y-1,x-1)` is the left score of the previous beat. The PE keeps it in
  `s_diag`.
* `S(y-1,x)` and `V(y-1,x)` are the PE's own results for the previous beat.
* The PE sends `S(y,x)` and `H(y,x)` to the right, one register stage later.

The start of a database is not a global reset. The first character carries
a `first` flag, and each PE that sees it uses the row-0 values. This lets
back-to-back databases, and databases arriving from a neighbouring FPGA,
work without any array-wide control.

Every beat also carries a running row maximum. Each PE replaces it with
`max(max_in, S(y,x))`, so the beat leaving a query's last PE holds the best
score of that row.

Characters are 5-bit codes: 1 to 26 are A to Z. Code 0 is "empty" and
never matches, not even itself. A query that does not fill its last group
leaves code-0 PEs behind it. Their scores can only fall (Sub and the gap
terms are all negative), so they pass the query's row maximum through
unchanged. This relies on `mismatch` being non-negative, which is always
true because it is stored as an unsigned magnitude.

## Array organisation (`sw_pe_array`)

    peg_in ─┐
    local db ┴─[link 0]─ PE0..PE31 ─[link 1]─ PE32..PE63 ─ ... ─ PE480..PE511 ─[link 16]─ peg_out
                           │                    │                                │
                        max reg 0            max reg 1                       max reg 15

* Link k (`sw_group_link`) is a register stage with a mux. When
  `score_select[k]` is 1, it replaces the left scores with the row-0
  defaults: S = 0, H = -eog, row max = 0. The following group then starts
  a new query. When it is 0, the scores pass through and the query
  continues. The database beat always passes through. The only exception
  is link 0, which takes the beat either from the local database interface
  (`db_select` = 1) or from the left FPGA.
* A max register (`sw_max_latch`) sits at the output of each group. The
  first beat of a database loads it and later beats raise it. The score of
  a query is the register of the group that holds the query's last
  character.
* Link stages delay the database, scores and query characters alike, so
  all three stay aligned. A character reaches PE i of group g after
  i + g + 1 cycles. It leaves `peg_out` after NUM_PE + NUM_GROUPS + 1
  cycles (529 at full size).

Example with 16 groups: a 50-character query in groups 0 and 1, a
20-character query in group 2, and a 300-character query in groups 3 to 12.
Set SCORE_SEL bits 2 and 3 (bit 0 is the pin for link 0). Pad the first
query to 64 characters and the second to 32. Read MAX_SCORE 1, 2 and 12.

## Loading queries (`sw_query_interface`)

A `q_go` pulse starts a load:

1. All PEs are emptied with a one-cycle `q_clear`.
2. QUERY_SIZE characters are popped from the Query FIFO. Character k is
   sent with time-to-live k.
3. A PE keeps a character whose time-to-live is 0. Otherwise it forwards
   the character with the count lowered by one. Link stages forward without
   counting.
4. `q_done` rises NUM_PE + NUM_GROUPS + 2 cycles after the last character,
   when every character has surely settled.

Several queries go in one load. The host packs them back to back in the
FIFO, each starting at a multiple of 32 characters and padded with code 0.

## Streaming the database (`sw_db_interface`)

A `db_go` pulse with `db_select` = 1 starts a pass:

1. A one-cycle `mp_restart` rewinds the MultiPort to the database start.
   This flushes and refills the MultiPort's FIFO.
2. The interface streams DB_LEN characters with `first` and `last` flags.
   It sends one character per clock while the port has data. When the port
   runs empty it sends an invalid beat (a bubble). PEs keep their state
   across bubbles.
3. `db_done` rises one cycle after the last beat has reached the final max
   register, so every MAX_SCORE is final. It stays high until the next
   `db_go`.

With `db_select` = 0 the FPGA continues its left neighbour's database. Its
`db_go` streams nothing. It only clears `db_done` and waits for the
neighbour's last beat to arrive.

Both memory ports deliver 64-bit words of twelve 5-bit characters.
Character 0 is in bits 4:0 and bits 63:60 are unused. The interfaces
serialize these words (`sw_unpacker`). A port that never runs empty gives
one character per clock with no gaps between words.

## Chaining FPGAs (`sw_board`)

`sw_board` puts four identical `sw_fpga` instances in a row. The
`peg_out` of FPGA i drives the `peg_in` of FPGA i+1. This 68-bit bus
carries the database beat, S, H and the row maximum. FPGA 0 has no left
neighbour, so it must stream its own database.

Each FPGA is configured by its own pins and registers:

| arrangement                       | FPGA 0      | FPGA 1      | FPGA 2      | FPGA 3      |
|-----------------------------------|-------------|-------------|-------------|-------------|
| one query of <=2048, one database | sel 1, ss0 1 | sel 0, ss0 0 | sel 0, ss0 0 | sel 0, ss0 0 |
| two pairs, two databases          | sel 1, ss0 1 | sel 0, ss0 0 | sel 1, ss0 1 | sel 0, ss0 0 |
| four independent FPGAs            | sel 1, ss0 1 | sel 1, ss0 1 | sel 1, ss0 1 | sel 1, ss0 1 |

Since FPGA 0 always streams and each of the other three either streams or
continues, a board has eight such arrangements.

`sel` is `db_select` and `ss0` is `score_select0`. In a chain, FPGA f
loads characters f*512 onward of the query. Send `db_go` to every FPGA of
the chain, then read the result on the last one. Each FPGA boundary adds
one array latency (529 cycles).

## Host view (`sw_fpga`, `sw_status_regs`)

The register port is word-addressed. Writes happen on `reg_wr`; reads are
combinational on `reg_addr`.

| addr      | name       | access | content                                              |
|-----------|------------|--------|------------------------------------------------------|
| 0x00      | STATUS     | RO     | bit0 db_select, bit1 score_select0, bit2 db_done, bit3 q_done, bit4 db busy, bit5 q busy |
| 0x01      | MATCH      | RW     | reward for equal characters, 8 bits, reset 2          |
| 0x02      | MISMATCH   | RW     | penalty for unequal characters, 8 bits, reset 1       |
| 0x03      | GAP_OPEN   | RW     | eog, 8 bits, reset 2                                  |
| 0x04      | GAP_EXT    | RW     | e, 8 bits, reset 1                                    |
| 0x05      | QUERY_SIZE | RW     | characters loaded by q_go                            |
| 0x06      | DB_LEN     | RW     | characters streamed by db_go (32 bits)               |
| 0x07      | SCORE_SEL  | RW     | bits 16..1: new query at links 1..16; bit 0 reads the pin |
| 0x20+g    | MAX_SCORE  | RO     | max register of group g, sign-extended               |

The reset scoring values reproduce a textbook example. With query
ACGTATGC against database ACGAACCCTTGC, they give the best score 8.

A run has five steps:

1. Write the scoring values, DB_LEN and SCORE_SEL.
2. Push the queries into the Query FIFO and write QUERY_SIZE.
3. Pulse `q_go` and wait for `q_done`.
4. Pulse `db_go` and wait for `db_done`.
5. Read MAX_SCORE.

Repeat from step 2 for the next batch of queries. The stored database is
reused.

All inputs are sampled on the rising edge. Reset is synchronous and active
high. A pass over n database characters takes about n + 529 + 8 cycles
plus any bubbles. At a 125 MHz clock, one FPGA computes 64 G cell updates
per second.

## Where this RTL departs from, or adds to, the design it follows

* **Control state machines.** The original interfaces used larger state
  machines whose protocol was not published. These are five-state machines
  with simple go/done pins and a register port. The separate "control
  logic" block of the original is not reproduced; its work is done by the
  two interface state machines.
* **Vendor cores are outside.** The MultiPort memory port and the Query
  FIFO are vendor cores. They are not part of the RTL; their read ports are
  ports of `sw_fpga`. Both are assumed show-ahead: data is valid while
  `empty` is low, and `rd` consumes it. The MultiPort also has a
  restart-to-start-address input.
* **Choices made here.** The original does not specify the following
  points, so they are this design's own:
  * score width: 20 bits signed;
  * scoring values: 8-bit unsigned magnitudes;
  * memory word packing: 12 characters per 64-bit word;
  * code 0 as "empty";
  * the `first` flag in place of a column reset;
  * a pipeline register in every group link;
  * the `q_clear` at the start of each load;
  * the timing of `q_done` and `db_done`.
* **Not built.** The 2-bit DNA-only variant, traceback and a
  substitution-matrix option are not implemented. They were only suggested
  as variants or future work.

## Verification

Every module has a self-checking testbench in `tb/`. Results are compared
with `sw_ref_pkg::sw_best`, an independent textbook Gotoh implementation.
Memory ports are modelled by `sw_word_source_model`, which can be set to
run empty at random cycles.

| testbench               | what it covers |
|-------------------------|----------------|
| `tb_sw_pe`              | recurrences cell by cell against random left inputs, bubbles, database restarts, time-to-live forwarding |
| `tb_sw_group_link`, `tb_sw_max_latch` | mux defaults, register timing, max reload and last pulse |
| `tb_sw_pe_array`        | two chained 16-PE arrays: the example (score 8), three queries per array, a query across both arrays, latency |
| `tb_sw_db_interface`, `tb_sw_query_interface` | character order, flags, time-to-live values, one character per clock, stalls, done timing, words consumed |
| `tb_sw_status_regs`     | register map |
| `tb_sw_fpga`            | one FPGA through its pins: example, multi-query loads against one stored database, stalls, pass length in cycles |
| `tb_sw_board`           | four small FPGAs: example, one query over all four, database reuse, two pairs, one query per group, and all eight ways of splitting the board into database chains; counts each mechanism |
| `tb_sw_board_full`      | the same scenarios with the default sizes (4 x 512 PEs, queries up to 2048) |
| `tb_sw_workloads`       | one full-size FPGA: a 512-character query against 3000 characters, and a batch of DNA queries shorter than 128 characters packed several per load against one rewound database |

Run a testbench with Verilator 5 from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_sw_board \
      -y rtl -y tb +libext+.sv -Itb rtl/sw_pkg.sv tb/sw_ref_pkg.sv tb/tb_sw_board.sv
    ./obj_dir/Vtb_sw_board

Each testbench prints `TB_RESULT checks=N failures=M` as its last line. The
full-size board testbench builds in under a minute and runs in a few
seconds.

To change the array size, set `NUM_GROUPS` and `GROUP_SIZE` on `sw_fpga`
or `sw_board`. More than 512 PEs per FPGA also needs a wider `TTL_W` in
`sw_pkg`.
