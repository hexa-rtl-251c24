# HEXA lookup engines: tries and string-matching automata without next-node pointers

Packet-processing graphs such as IP lookup tries and Aho-Corasick string
matchers are usually stored as "node + pointers to the next nodes". With n
nodes every pointer costs ceil(log2 n) bits, and these pointers dominate the
fast on-chip memory. HEXA (History-based Encoding, eXecution and Addressing)
drops the pointers. A lookup engine always knows which input symbols brought
it to a node, so that history can *name* the node. A hash of the name gives
the node's memory cell. A node stores only a few bits for each successor:

* a **discriminator**, a small number the control plane picks so that no two
  nodes land in the same cell. It gives each node a choice of 2^c cells, as in
  multiple-choice or cuckoo hashing;
* for automata with cycles, the **length** of the part of the history that
  names the successor (bounded HEXA, "bHEXA").

A binary-trie node then needs 5 bits (a prefix flag plus two 2-bit
discriminators) instead of two 17-bit pointers. An automaton transition needs
3 bits instead of 16 or 17.

This repository holds synthesizable SystemVerilog for three engines built on
this idea, plus self-checking testbenches:

| engine | module | what it does |
|---|---|---|
| IP lookup | `hexa_ip_lookup` | longest-prefix match on 32-bit keys over a binary trie in HEXA form, one trie level per clock |
| string matcher | `bhexa_matcher` | Aho-Corasick multi-pattern matching over 8-bit symbols in bHEXA form, one symbol per clock, with a spill CAM |
| bit-split string matcher | `bitsplit_matcher` | the same matching done by four small automata, each reading 2 bits of every byte, each in bHEXA form; one group of 16 patterns |
| all | `hexa_top` | the three engines side by side; they share only clock and reset |

The node-to-cell assignment is a bipartite matching between nodes and cells.
It is computed by software on a control processor and loaded through the
engines' write ports. The testbench package `tb/tb_hexa_ref_pkg.sv` holds a
complete software model of that step.

## How a node is found

### Trie nodes

A trie node at depth d is named by the first d key bits (its *history*), the
depth d, and its discriminator. `hexa_trie_hash` packs them as

    identifier = { disc[DISC_W-1:0], history (right-aligned, zero-padded to 32 bits), depth[5:0] }

and maps this identifier onto `[0, CELLS)`:

* `HASH_MIX` (default). The identifier is cut into 32-bit chunks. Chunk i is
  XORed with i, multiplied by an odd constant, and the products are summed.
  The sum goes through the 32-bit MurmurHash3 finalizer (xor-shifts and two
  multiplies) and then a multiply-shift range reduction, `(x * CELLS) >> 32`. This works
  for any CELLS, not only powers of two.
* `HASH_SIMPLE`. Takes the identifier's numeric value modulo CELLS. This is
  useful for small hand-worked examples. It is a poor hash for real tables.

Discriminator value 0 means "no child". With `DISC_W = 2`, each node has three
possible cells (discriminators 1 to 3).

### Automaton nodes

In an Aho-Corasick automaton every path into a node ends with that node's own
string: a node is reached exactly when its string is the longest suffix of the
input that is also a pattern prefix. So any suffix of the node's string, up to
the node's depth, can name it. The control plane picks, for each node:

* a length code. A small programmable *length table* turns it into an
  identifier length k. The table resets to the identity (0,1,2,3). It can be
  reloaded with superlinear steps such as 0,1,3,7 so that the same code width
  reaches longer identifiers;
* a discriminator, `DISC_W` bits (1 by default).

`bhexa_hash` hashes the last k input symbols and the discriminator. The
history is given newest symbol first, and symbols beyond k are masked off.
`HASH_SIMPLE` is `(sum_{i=1..k} s_i * i + disc * (k+1)) mod CELLS`, with s_1
the oldest symbol.

### Nodes that do not fit: the spill CAM

Short identifiers cannot tell all nodes apart. For example, the nodes of
`x`, `xx`, ..., `x^20` share every suffix up to the maximum length, so at most
2^(DISC_W+LEN_W) - 1 of them can be hashed. Such nodes are *spilled*:

* a transition whose code is all ones means "the next node is spilled";
* `spill_cam` holds, per spilled node, its full string (up to `CAM_SYMS`
  symbols). It is searched with the input history. Among the entries that
  match the end of the input, the deepest one wins. That is the correct
  Aho-Corasick state, because the true state is the longest suffix of the
  input that is a node;
* spilled nodes live in `SPILL` extra rows after the `CELLS` hashed rows. CAM
  slot j is row `CELLS + j`, so the rest of the pipeline treats them like any
  other node.

If the code says "spilled" but no entry matches, `out_miss` is raised and the
walk restarts at the root. This only happens with a badly programmed table.

## IP lookup engine (`hexa_ip_lookup`)

Memories:
* fast path: `CELLS` words of `{prefix flag, left disc, right disc}`, 5 bits;
* next hop: `CELLS` words of `NH_W` bits, at the same cell numbers. A prefix
  node's next hop sits at the node's own cell. This next-hop memory plays the
  role of the slower "shadow" table: it is read once per lookup.

Walk: the root cell is `hash(cfg_root_disc, depth 0, no history)`. Each clock,
the cell read in the previous cycle returns:
1. If its flag is set, it becomes the best match so far (length and cell are
   recorded).
2. The next key bit selects the left or right discriminator. If that is 0, or
   the depth has reached 32, the walk ends.
3. Otherwise the child's cell is hashed from the discriminator, depth + 1 and
   the key bits so far. That cell is read in the same cycle. The path from
   memory output through the hash to the memory address is combinational.

Then the next-hop memory is read at the best match's cell, and the result is
reported.

Interface and timing: a `req_valid`/`req_ready` handshake carries the key.
One lookup is in flight at a time. If the request is accepted at edge 0 and
the last trie node on the key's path has depth D, then `resp_valid` (a
one-cycle pulse, no back-pressure) is high in the cycle after edge D+1. The
response carries `resp_found`, `resp_len`, `resp_loc` and `resp_next_hop`.
`req_ready` returns one cycle later, so the next key can be accepted at edge
D+2. Back-to-back lookups therefore take D+2 cycles each.

Updates: the cells can be written at any time through `fp_wr_*`/`nh_wr_*`.
Adding a prefix creates new nodes, and placing them may move a few existing
nodes to other cells (new discriminators). The control plane writes the new
cells and the parents whose discriminators changed. In the end-to-end test,
adding 31 prefixes to a 10,500-node trie rewrites about 300 cells.
`cfg_root_disc` must follow if the root moves. A lookup running during an
update can see a mix of old and new cells. Quiesce lookups if that matters.

## String matcher (`bhexa_matcher`)

Memories:
* transitions: `(CELLS + SPILL) * 256` codes of `DISC_W + LEN_W` bits,
  addressed `{row, symbol}`;
* match flags: one bit per row.

There are no failure links: every node has a code for all 256 symbols. A
mismatch therefore costs no extra cycles.

Pipeline, with no stalls and one symbol accepted per clock:

| cycle | work |
|---|---|
| t | symbol accepted; transition read at `{current row, symbol}`; symbol shifted into the history register (`max(MAX_LEN, CAM_SYMS)` symbols) |
| t+1 | code returned; next row = hash (or CAM); it becomes the current row and addresses a symbol accepted in this cycle; match flag read |
| t+2 | `out_valid`, `out_match`, `out_row`, `out_spill`, `out_miss` for the symbol of cycle t |

Bubbles (`in_valid` low) are allowed. `in_start` marks a symbol that starts a
new stream: it is taken from `cfg_root_row` with an empty history. The first
symbol after reset must carry `in_start`. After a restart the history
register is cleared. A saturating count of the symbols received since the
restart goes to the CAM as `key_len`. Entries longer than that count cannot
match, so the cleared history is never mistaken for input, whatever symbol
values the patterns use.

Programming: `tr_wr_*` writes one transition code, `mf_wr_*` one match flag,
`cam_wr_*` one CAM entry and `lt_wr_*` one length-table entry. `out_row`
identifies the node reached. Pattern identities for a match would be kept in
a separate table indexed by that row (not part of this design).

## Bit-split matcher (`bitsplit_matcher`)

A full Aho-Corasick node stores 256 transitions. The bit-split form cuts that
fan-out. A group of `NPAT` patterns (16) is matched by `MACHINES` (4)
automata running in lockstep. Machine m reads only bits `[2m+1:2m]` of each
byte, so it has 4 transitions per node. Its automaton is the Aho-Corasick
automaton of the patterns' 2-bit projections.

Each machine node also carries a partial-match vector: bit i is set when the
projection of pattern i ends at that node. Pattern i has occurred when every
projection of it has, so the result is the AND of the four vectors.

Each machine is a `bhexa_matcher` with 2-bit symbols. Its transitions are
5-bit `{disc, length code}` codes: 2 discriminator bits and 3 length bits.
It has its own spill CAM, which holds node strings as 2-bit slices. With 2-bit
symbols, short suffixes separate far fewer nodes, so these machines need the
longer identifiers of a superlinear length table such as 0,1,2,3,5,7,12,16.
All machines share one length table; a write goes to all of them.

Ports: the programming ports of the single matcher, with a machine select
`*_mach`. `pmv_wr_*` writes a node's vector; the machine's own match flag
gets the OR of the vector. There is one `cfg_root_row` per machine. The byte
stream has the same `in_valid`/`in_start` as before. The result comes three
cycles after the byte (two in the machines, one for the vector read):
`out_vec`, `out_match`, `out_spill` (some machine used its CAM) and
`out_miss`. A large pattern set is split into groups, one instance per group.

## Programming the tables (software side)

`tb/tb_hexa_ref_pkg.sv` shows the whole flow the control plane has to
implement:
* tries: build the binary trie; place each node with a random walk. Try the
  free cells among the node's discriminator choices. If none is free, evict
  the occupant of a random choice and re-place it. Then write
  `{flag, disc(left), disc(right)}` at each node's cell;
* trie updates: place each new node along a shortest augmenting path. A
  breadth-first search over "move node x to another of its cells" stops at
  the first free cell, and then every node on the path moves one step. Write
  the moved nodes and every parent whose child discriminator changed. If the
  root moved, also update `cfg_root_disc`;
* automata: build the goto, failure and full transition tables. For each
  node, the legal codes are those whose length is at most the node's depth
  (the root takes only length 0), excluding the all-ones code. Place nodes by
  random walk; a node that cannot be placed goes to the next spill row and the
  CAM. For every node and symbol, write the code of the next node (all ones if
  it is spilled);
* bit-split groups: build one automaton per machine from the projected
  patterns and map it the same way. Each node's vector has bit i set when
  projected pattern i is a suffix of the node's string.

With 2-bit discriminators, about 10% spare cells (CELLS of about 1.1 x the
number of nodes) is enough for a matching to exist with high probability. The
defaults are sized that way.

## Parameters (defaults in `hexa_top`)

| parameter | default | meaning |
|---|---|---|
| `IP_ADDR_W` | 32 | key width |
| `IP_DISC_W` | 2 | discriminator bits per child (3 choices + "no child") |
| `IP_CELLS` | 110000 | trie cells: a 100,000-node trie with 10% spare |
| `IP_NH_W` | 8 | next-hop width |
| `STR_SYM_W` | 8 | symbol width (256 transitions per node) |
| `STR_DISC_W`, `STR_LEN_W` | 1, 2 | 3-bit transition codes |
| `STR_MAX_LEN` | 16 | longest identifier the hash and length table support |
| `STR_CELLS` | 71377 | hashed rows: a pattern set of about 65,000 characters with 10% spare |
| `STR_SPILL` | 64 | spill CAM entries and spill rows |
| `STR_CAM_SYMS` | 64 | longest string a CAM entry can hold |
| `IP_HASH`, `STR_HASH` | `HASH_MIX` | hash selection (`hexa_pkg::hash_kind_e`) |

Memory at the defaults: 550 kbit of trie cells, 880 kbit of next hops, and
about 55 Mbit of transition codes (71,441 rows x 256 x 3 bits). The CAM holds
64 entries of 512 bits. The bit-split matcher is small: per machine 299 rows
x 4 x 5 bits of codes, 299 x 16 bits of partial-match vectors and a 16-entry
CAM of 128-bit strings.

## Choices this design makes

The method fixes what a node stores and how its location is derived. These
points are choices made here:

* the particular pseudo-random hash and the identifier bit layout;
* one trie level per clock, with a single lookup in flight. There is no
  multi-lookup pipeline;
* the root's discriminator is a configuration input;
* the next-hop memory is an on-chip array with a one-cycle read. In a real
  system it could be a slower external memory;
* the all-ones code marks a spilled node. This costs one code per transition:
  with 1+2 bits, hashed nodes can use 7 of the 8 codes;
* the CAM is keyed by the node's full string, with deepest-match priority;
* the length table resets to the identity;
* the handshakes, reset behaviour (walk state only, memories not reset) and
  result encodings.

Not included:
* the matching and update algorithm itself (software);
* multi-bit tries with tree-bitmap nodes;
* a pipelined trie.

## Files

* `rtl/hexa_pkg.sv`: hash selection enum, mixing function, range reduction
* `rtl/hexa_ram.sv`: simple dual-port memory (1-cycle read)
* `rtl/hexa_trie_hash.sv`, `rtl/bhexa_hash.sv`: identifier hashes
* `rtl/spill_cam.sv`: spill CAM
* `rtl/hexa_ip_lookup.sv`, `rtl/bhexa_matcher.sv`, `rtl/bitsplit_matcher.sv`: the engines
* `rtl/hexa_top.sv`: all three engines
* `tb/tb_hexa_ref_pkg.sv`: reference hashes, trie and Aho-Corasick models, mapping
* `tb/tb_*.sv`: one self-checking testbench per module. `tb_bhexa_run.sv` is
  a helper instantiated twice by `tb_bhexa_matcher.sv`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Each has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/hexa_pkg.sv tb/tb_hexa_ref_pkg.sv rtl/hexa_ram.sv rtl/hexa_trie_hash.sv \
      rtl/bhexa_hash.sv rtl/spill_cam.sv rtl/hexa_ip_lookup.sv rtl/bhexa_matcher.sv \
      rtl/bitsplit_matcher.sv rtl/hexa_top.sv tb/tb_hexa_top.sv --top-module tb_hexa_top
    ./obj_dir/Vtb_hexa_top

Swap the last testbench file and `--top-module` for the others. Also add
`tb/tb_bhexa_run.sv` for `tb_bhexa_matcher`. Verilator has two-state
simulation and randomises uninitialised state, so the testbenches initialise
every input.

What the testbenches cover:
* `tb_hexa_trie_hash`: on a nine-node example trie with 4-bit keys and 9
  cells, the simple hash gives the cells 0,1,0,2,1,8,1,0,0 for discriminator
  0. The mixing hash is checked against an independent model.
* `tb_bhexa_hash`: weighted-sum values for the three-symbol example
  (a=1, b=2, c=3; for example h(ab)=5, h(bba)=9, h(abc)=4 over 10 cells), the
  mixing hash against a model, and that symbols beyond the identifier length
  do not matter.
* `tb_hexa_ram`, `tb_spill_cam`: random traffic against models. The CAM test
  uses strings over two symbols, so many entries are suffixes of one another.
* `tb_hexa_ip_lookup`: about 300-node tries, 800 lookups against a brute-force
  longest-prefix match, exact latency, and an incremental update.
* `tb_bhexa_matcher`: the automaton for abc, cab, abba with the weighted-sum
  hash over 10 cells. Under that hash five nodes compete for four cells, so
  the CAM path is exercised. It also runs a random automaton with a long run
  of one symbol, a reprogrammed superlinear length table, bubbles and
  restarts. Every symbol's match flag, row, spill flag and 2-cycle latency
  are compared with a software automaton.
* `tb_bitsplit_matcher`: 16 patterns over 20 byte values, some pairs of which
  differ in a single machine's 2 bits. One of them
  is a run of 36 equal bytes, so every machine must spill nodes. The result
  vector of every input byte is compared with a direct scan of the input.
  The latency is checked to be 3 cycles, and the spill flag against the
  reference machines.
* `tb_hexa_ip_workload`: the trie engine at full size with a 100,000-node
  trie (90.9% of the 110,000 cells), 2,500 checked lookups, and 200
  single-node updates placed along shortest augmenting paths. In a typical run
  an update moves at most 10 existing nodes and writes at most 22 cells,
  counting the parents whose discriminator changes. Most updates write one
  or two cells. The run takes about 20 s.
* `tb_hexa_top`: all three engines at full default size, running at once: a
  10,500-node trie with 1,200 lookups and an update, a 450-node automaton
  with 12,000 symbols before and after a length-table switch, and the
  bit-split test above with 6,000 bytes. Every mechanism listed above is
  counted and must occur.

None of the testbenches has run real BGP tables or real signature sets. The
trie and automaton tests use random prefixes and patterns.
