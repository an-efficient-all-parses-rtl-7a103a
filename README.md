# A systolic array that finds every parse tree of a context-free string

This RTL takes a string of length N and a context-free grammar in Chomsky
normal form. It first decides whether the grammar derives the string. If it
does, it then produces all the parse trees, one per fixed-length stage, until
none is left. The hardware has two triangular meshes of small finite-state
processors. Each processor talks only to its neighbours.

- **The P-array** fills in the CKY recognition matrix, one anti-diagonal per
  clock. It then runs the same data paths backwards to search the matrix for
  the children of each tree node.
- **The Q-array** collects the tree found in a stage. It works out which part
  of the tree has to change for the next one, and feeds the tree back to the
  P-array.

Timing:

- accept/reject is known **3N-1 clocks** after the first symbol.
- A new tree appears every **6N-3 clocks**.
- For a string with m trees, the whole run takes 3N-1 + m(6N-3) clocks.
- Storage is O(N^2) processors of O(log N) bits each.

The default build is N = 4 with a four-nonterminal example grammar:

```
S -> AA | AB     A -> AC | CB | a     B -> BC | b     C -> CC | a
```

Under this grammar `abaa` has five parse trees.

## Words used below

- **R(i,j)** is the set of productions A->... such that A derives a_i..a_j.
  The string is accepted when R(1,N) holds a production of the start symbol S.
- **A production set** (`pset_t`) has one bit per production. The production
  number fixes the order of the set, so "the first production with left side
  A" means the lowest-numbered one.
- **A distinguished production** is the last production in an entry with its
  left side. It is carried as an extra bit (`distg`).
- **P(i,j)** is the P-processor in column i (from the left) and row j (from
  the top), for 1 <= i <= j <= N.
  - **Primary** processors are the diagonal ones, P(j,j). They hold matrix
    entries.
  - **Secondary** processors are all the others. They hold the pairs of
    entries that an entry is built from.
- **Q(i,j)** is the Q-processor that, after a stage, holds the tree's
  production from R(i,j).
  - It sits in column i counted from the right, and row j-i+1.
  - Row 1 is the leaves: Q(N,N) .. Q(1,1).
  - The bottom row is the single processor Q(1,N), which holds the root.

## Recognition: the folded P-array

### Sweeps

A **forward sweep** s reaches P(i,j) at clock s + (i-1) + (j-1). A value
computed at one processor in sweep s therefore reaches its right and lower
neighbours in the same sweep.

- The symbols a_1..a_N enter P(1,1) on clocks 1..N. The end marker `$`
  follows on clock N+1.
- In sweep s, primary P(j,j) computes R(s-j+1, s).

### The folded mapping

To compute R(a,b), the array needs the pairs [R(a,c), R(c+1,b)] for
a <= c < b. These pairs are stored in the secondary processors of row j, in
registers r00/r01 and r10/r11.

Listed in order of c, the pairs are folded about the middle of the list:

- The pair nearest each end of the list lives in P(j-1,j).
- Pairs towards the middle of the list live further left.

The entry is then built on the horizontal chain `v`. Each secondary passes on
`v_in OR (r00*r01) OR (r10*r11)` to its right, where `x*y` is the set of
productions A->BC with B the left side of something in x and C the left side
of something in y. The primary stores the result in r01 and r10.

### Moving the entries

Each processor passes its r registers on over four links:

| link | from | to | delay (clocks) |
|------|------|----|----|
| OUT00 -> IN00 | P(i-1,j-1) | P(i,j) | 3 |
| OUT11 -> IN11 | P(i-1,j-1) | P(i,j) | 2 |
| OUT01 -> IN01 | P(i,j-1)   | P(i,j) | 1 |
| OUT10 -> IN10 | P(i,j-1)   | P(i,j) | 2 |
| OUT_v -> IN_v | P(i-1,j)   | P(i,j) | 1 |

Each r register is the first stage of its link. `link_delay` adds the rest.

At the processors with 2i = j, the fold makes crossings:

- Two inputs cross: r00 loads from IN10, and r10 from IN00.
- Two outputs cross: OUT01 carries r11, and OUT11 carries r01.

Everywhere else, register r_pq simply loads from IN_pq and drives OUT_pq.

With these delays the registers hold the following at forward sweep s:

- For a secondary P(i,j) with j <= 2i: r00 = R(s-j+1, s-i) and
  r01 = R(s-i+1, s).
- For a secondary P(i,j) with j < 2i: r10 = R(s-j+1, s-j+i) and
  r11 = R(s-j+i+1, s).
- All other r registers of secondaries are empty.

The testbenches check this through the primaries, at every sweep, for every
string.

### Control waves

- **Start wave.** It leaves P(1,1) with the first symbol. It moves right 1
  clock per hop and down 2 clocks per hop, so it wakes P(i,j) at sweep j. In
  that clock the processor also copies the new r01 and r11 into t0 and t1.
  The parse phase needs these two values.
- **Halt wave.** It leaves P(1,1) with `$` and moves 1 clock per hop. It
  freezes every processor at sweep N+1.
- **Decision.** When the halt wave reaches P(N,N), P(N,N) checks R(1,N) for
  the start symbol. `accept` or `reject` rises after clock 3N-1.

## Parse generation: running the P-array backwards

### Reverse sweeps

Each stage starts with a **begin-parse** wave from P(N,N). It moves left and
up, 1 clock per hop. Reverse sweep r is the r-th clock after a processor
receives it.

Each P-processor has four **cells** C00..C11, each holding (tag, sym, pset).
The cells travel the forward links backwards, with the same delays. The aim
is that in reverse sweep r the cells hold what the r registers held in
forward sweep N-r+1. Two loads make this work:

- In reverse sweep 1, C00 and C10 load from r00 and r10.
- In reverse sweep N-j+1, C01 and C11 load from t0 and t1. This undoes the
  start-wave copy.

The r and t registers themselves never change after recognition, so every
stage can replay the matrix.

An **end-parse** wave ends a row's part of the stage. It leaves P(N,N) with
begin-parse, moves left 1 clock per hop and up 2 clocks per hop, and reaches
row j at reverse sweep N-j+1.

### Marking and MATCH

A cell whose tag is not NULL is **marked**: it holds a tree node whose
children must be found. When a marked cell reaches a primary P(j,j), the
primary sends an instruction to its left:

```
MATCH(pi, (tag1, tag2), id = (l, b), last_id)
```

The secondaries to its left form a chain of cell pairs. The chain runs
(C00,C01) then (C10,C11) of P(j-1,j), then the same two pairs of P(j-2,j),
and so on down to P(1,j).

The search works like this, for pi = A->BC:

1. The search starts at pair b of processor P(l,j).
2. The first pair whose left cell contains a B-production and whose right
   cell contains a C-production is marked with (B, tag1) and (C, tag2).
3. From there the instruction travels on with tags NULL and id set to the
   position found.
4. If any later pair also matches, last_id is cleared.

The instruction that leaves column 1 is the tree node, with its split point
and a flag saying whether it was the last possible split. It shifts into the
Q-array.

The marked cells then flow back to the primaries that own their entries, and
the search repeats one level down the tree.

### How a primary chooses its MATCH

The primary uses the cell's tag and record I. Record I is what Q(a,b) held
after the previous stage, for the entry R(a,b) that the cell carries.

| tag | instruction sent |
|-----|------------------|
| FIRST | the first production of the cell's symbol, tags (FIRST, FIRST), id (j-1,0), last_id = 1 |
| CURRENT | I's production, tags (CURRENT, CURRENT), I's id and last_id (the same subtree again) |
| NEXT, right subtree not finished (!rdone) | I's production, (CURRENT, NEXT): keep the left subtree, advance the right one |
| NEXT, left subtree not finished (!ldone) | I's production, (NEXT, FIRST): advance the left subtree, restart the right one |
| NEXT, more split points (!last_id) | I's production, (FIRST, FIRST), id moved one pair: (l,0)->(l,1), (l,1)->(l-1,0) |
| NEXT, otherwise | the next production of the symbol after I's, (FIRST, FIRST), (j-1,0) |

P(N,N) marks its C01 with the start symbol:

- In stage 1 the tag is FIRST.
- In later stages the tag is NEXT.
- If record I of the root says `done`, the last tree has already been output.
  P(N,N) then raises `all_done` and starts no further stage.

### Stopping

P(N,N) sends a **stop** wave in two cases:

- when it rejects the string;
- when it raises `all_done`.

The stop wave takes the begin-parse routes, 1 clock per hop. It reaches
P(1,1) 2N-2 clocks later, which raises the top-level `halted` flag. It then
runs on along the Q-array rows.

A processor that the stop wave has passed takes part in nothing more until
reset. The Q-array stops shifting, so `tree` freezes. After the last tree,
the stop wave reaches each Q-processor N+1 clocks behind the unload wave, so
every row has already shifted its whole tree out.

## The Q-array: load, update, unload, stop

### Load

During a stage, every row of the Q-array shifts left one place per reverse
sweep. The MATCH leaving P(1,j) enters at the right end of row j, or an
empty record if there is none. The left neighbour runs one clock later, so
each shift puts the old record into an output register, `sh_out`. This keeps
a record from running through the whole row in one sweep.

At end-parse, Q(i,j) holds the tree's production from R(i,j), with its id
and last_id.

### Update

An **update** wave leaves Q(N,N) at its end-parse clock. It moves right 1
clock per hop along the leaves, and diagonally down, Q(i+1,j) -> Q(i,j), 2
clocks per hop.

- **A leaf** sets ldone = done = rdone = 1.
- **An empty processor** passes its inputs down unchanged.
- **A tree node** takes:
  - ldone = done of its left child, which arrives from above: Q(i,j-1),
    1 clock.
  - rdone = done of its right child, which arrives diagonally: Q(i+1,j),
    2 clocks.
  - done = ldone & rdone & last_id & distinguished.

  It sends done on in both directions.

`done` means this subtree has no further variant. `tree_valid` pulses in the
clock after the root is updated, and `tree` then shows the whole finished
tree.

### Unload

The clock after the root's update, an **unload** wave leaves Q(1,N). It goes
up the right column and left along every row, 1 clock per hop. Every row
streams out of its left end into primary P(r,r) over the wrap-around link.

Q(1,N)'s own record arrives at P(N,N) one clock later, and this starts the
next stage. Each primary sees record I of an entry in exactly the reverse
sweep in which the entry's cell arrives. This fixes the stage length at
6N-3 clocks.

## Top-level interface (`systolic_parser`, parameter N)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst` | in | clock; synchronous active-high reset, needed before every string |
| `sym_in` | in | `{valid, eoi, term}`: a_1..a_N on clocks 1..N, then `$` (`eoi`=1) on clock N+1 |
| `accept`, `reject` | out | rise after clock 3N-1 and hold until reset |
| `tree_valid` | out | one-clock pulse per stage, when `tree` holds the new tree; pulses are 6N-3 clocks apart |
| `tree[i][j]` | out | `qreg_t` of Q(i,j), for i <= j: `pvalid`, `prod`, `distg`, id `(l,b)`, `last_id`, `ldone`, `done`, `rdone` |
| `all_done` | out | set when the stage after the last tree would start |
| `halted` | out | the stop wave has reached P(1,1): 2N-2 clocks after `reject` or `all_done`; N clocks later the whole array is frozen |
| `prim_entry[j]` | out | r01 of primary P(j,j), the latest entry it computed (for observation) |

To read a tree, start at `tree[1][N]`, the root, whose production is
`prod`. For a node at (i,j) with split id (l,b):

- its left child spans i..k, where k = i + (b ? l : (j-i+1) - l) - 1;
- its right child spans k+1..j.

Every other entry has `pvalid` = 0.

## Files

| file | contents |
|------|----------|
| `rtl/cfl_pkg.sv` | grammar tables, record types (`cell_t`, `match_t`, `qreg_t`), set functions |
| `rtl/link_delay.sv` | extra register stages of a link |
| `rtl/p_proc.sv` | one P-processor (recognition, cell routing, MATCH search/issue, stage control at P(N,N)) |
| `rtl/p_array.sv` | the triangular P-array and all of its links and waves |
| `rtl/q_proc.sv` | one Q-processor (shift, update, unload, stop) |
| `rtl/q_array.sv` | the triangular Q-array, update and unload waves, the wrap-around to the primaries |
| `rtl/systolic_parser.sv` | top: P-array plus Q-array |

### Changing the grammar or the size

- **Size.** N is a parameter of `systolic_parser` and must equal the string
  length.
- **Grammar.** Edit the constants at the top of `cfl_pkg`:
  - the counts `NNT`, `NTERM` and `NPROD`, and the widths `NT_W` and
    `PROD_W`;
  - the tables `PROD_LHS`, `PROD_RHS1`, `PROD_RHS2`, `PROD_BIN` and
    `PROD_TERM`;
  - `START_SYMBOL`.

  Production numbers set the order in which alternatives are tried.
- **`L_W`** bounds N to below 2^L_W. The default is 8 bits.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>`.

| testbench | what it does |
|-----------|--------------|
| `tb_systolic_parser` | N = 4, default parameters, all 16 strings over {a,b}. |
| `tb_systolic_parser_n7` | The same test at N = 7, all 128 strings (869 trees). |
| `tb_p_array` | N = 5, 40 strings. Checks each primary's entry at every sweep, the decision clock, the stop wave after a reject and the stage-1 MATCH stream. |
| `tb_p_proc` | Single processors on their own, driven at the links: P(3,5) (plain), P(2,4) (crossing), P(2,2) (primary), P(3,3) of a 3-array (P(N,N)). Covers MATCH search, last_id, every NEXT rule, all_done, the stop wave. |
| `tb_q_proc` | Load, all update cases, unload and stop of one Q-processor. |
| `tb_q_array` | Feeds the stage-1 MATCH stream of `abaa` into the Q-array. Checks the update flags, the tree_valid and next_stage clocks, and the unload stream to every primary. |

The two end-to-end testbenches compare against a reference built in the
testbench from the grammar tables:

- the CKY matrix, checked at every sweep;
- accept/reject, and that it comes in clock 3N-1;
- the tree count, by dynamic programming.

They also check:

- each output tree is a valid derivation of the string;
- no tree repeats an earlier one;
- all_done is raised after the last tree;
- stages are exactly 6N-3 clocks apart;
- halted rises exactly 2N-2 clocks after reject or all_done, and nothing
  changes afterwards.

For `abaa`, the first two trees and their update flags are compared with the
hand-worked result:

- first tree: S->AA split 3, A->AC split 2, A->CB split 1;
- second tree: S->AA, A->CB, B->BC.

The tests also count each mechanism and require every one to occur:

- accepted and rejected strings;
- stages that change only a subtree;
- stages that move the root's split point;
- stages that change the root production;
- detection of the last tree;
- the stop wave.

Run any testbench with plain Verilator from the repository root:

```
verilator --binary --timing -Irtl -Itb --top-module tb_systolic_parser \
    rtl/cfl_pkg.sv rtl/link_delay.sv rtl/p_proc.sv rtl/p_array.sv \
    rtl/q_proc.sv rtl/q_array.sv rtl/systolic_parser.sv tb/tb_systolic_parser.sv
./obj_dir/Vtb_systolic_parser
```

## Departures and own choices

- **Processor indices.** Each processor is given its (I, J) and N as
  parameters. It uses them to know whether it is primary, whether it sits at
  a crossing (2I = J) and whether it is P(N,N). A design that works without
  indices is possible but is not done here.
- **Grammar.** The grammar is fixed at build time, as package constants. It
  cannot be loaded at run time.
- **Tree output.** Trees are not streamed to an external host. The Q
  registers are brought out as a parallel `tree` port, with a one-clock
  `tree_valid` strobe.
- **Reject and end of parsing.** Both use the single stop wave described
  above. Its route and speed are this design's choice. The accept/reject
  answer is also given directly by P(N,N) in clock 3N-1.
- **Invariant of r11.** The relation for r11 given above was derived from
  the pairing and checked in simulation.
- **Stage start.** Stage 1 starts in the same clock as the decision.
- **Multiple marked cells.** If a primary ever received two marked cells at
  once, it would use C01. In correct operation at most one arrives.
- **Empty record I.** A primary with a CURRENT or NEXT cell but an empty
  record I issues nothing. This does not occur in correct operation.
- **Unload shifting.** Shifting in the Q-array simply continues until the
  next begin-parse or the stop wave.
- **Redundant done outputs.** The two `done` outputs of a Q-processor
  (vertical and diagonal) always carry the same value. They are kept
  separate to mirror the two links.
- **Clearing empty Q-processors.** An empty Q-processor clears its flags as
  well as p, id and last_id.
- **Reset.** All registers are cleared by a synchronous reset, which is
  needed between strings.
