# SNIDS: a snooping string-matching intrusion detector for an OPB system

The core looks for any of a set of fixed byte strings in Ethernet frames, such as
the literal payload patterns of Snort rules. It checks every frame a soft processor
receives, and it needs no buffer or data path of its own to do it. The core sits
on the processor's On-chip Peripheral Bus (OPB) as a plain slave and *listens*:

1. The processor reads the frame length from the Ethernet MAC (EMAC).
2. The processor reads the frame word by word from the EMAC's receive FIFO.
3. While that happens, the core copies each word off the bus and pushes it
   through a string matcher, one byte per clock.
4. Once the frame is in memory, the processor reads one register of the core.
5. That read returns the ID of the first string seen in the frame, or 0 for a
   clean frame.

The processor's only extra work is that one read per frame.

The matcher is a **bit-split Aho-Corasick machine**:

- Strings are sorted and cut into groups of at most 16. Each group is one *rule
  module*.
- A rule module runs four small state machines, called *tiles*, in lock step.
- Each tile sees only two bits of every input byte, so each state needs just 4
  next-state entries instead of 256.
- The table of one tile fits one block RAM: 256 states × 48 bits.
- Each tile outputs a 16-bit *partial match vector* (PMV). String *i* has
  matched only when bit *i* is set in all four PMVs.
- A priority encoder turns the match vectors of all rule modules into one
  string ID.

## Blocks

| module | what it is |
|---|---|
| `snids_pkg` | sizes, the table entry type `entry_t`, the table load bus `tbl_wr_t`, `encode_mv()` |
| `state_table` | 256 × 48 synchronous-read RAM, one per tile |
| `tile` | one bit-split state machine: state table, 4:1 next-state multiplexer, `saved_state` register, PMV register |
| `rule_module` | four tiles; match vector = AND of the four PMVs |
| `match_encoder` | priority encoder from NUM_RM match vectors to the string ID (SID) |
| `string_matching_engine` | NUM_RM rule modules sharing the input byte, followed by `match_encoder` (default engine) |
| `rule_module_l0` | pipelined rule module with registered inputs and a 5-bit encoded ID output |
| `rule_module_hier` | binary tree of `rule_module_l0` with a pipelined merge at every level (optional engine) |
| `opb_snoop_frontend` | OPB slave that snoops frames, feeds the engine and answers the ID read |
| `snids` | top: front-end plus one of the two engines |

## The tile and its timing

The current state of a tile is never held in its own register. The state is the
address the state-table RAM registered on the last clock edge. In each cycle:

1. The RAM outputs the row of the current state:
   - four next states, one for each value of the tile's two input bits;
   - the PMV of the current state.
2. The two input bits select one of the four next states.
3. That next state goes straight back to the RAM address, so the next edge makes
   it current.

One byte is consumed per clock. The loop from RAM output through the 4:1
multiplexer back to the RAM address is the critical path of a small design.

**Stalls.** `en` low means "no byte this cycle".

- On every enabled cycle, the selected next state is also copied into
  `saved_state`.
- While `en` is low, the RAM address is `saved_state`. The machine holds its state
  for as many cycles as needed.
- `rst` forces the address to state 0.

Both are synchronous.

**PMV output.** The PMV register loads the PMV of the state reached by a byte, one
cycle after that state was entered. After a cycle without a byte it loads 0, so a
match is reported once, not repeated through a stall.

Timing from a byte on `din`/`en` in cycle *t*:

| point | cycle |
|---|---|
| tile and rule-module PMV / match vector | *t*+2 |
| SID of `string_matching_engine` (combinational encoder) | *t*+2 |
| 5-bit ID of `rule_module_l0` | *t*+5 |
| ID of `rule_module_hier` with LEVEL *L* | *t*+5+2*L* (9 for four leaves) |

## State-table contents

Row `s` of the table of tile `k` is an `entry_t`:

- `next[v]` (bits `[8v+7:8v]`) is the state after input bits `din[2k+1:2k] == v`;
- `pmv` (bits `[47:32]`) is the partial match vector of state `s`.

The core does not compute its tables. They are written before traffic starts
through the `tbl_wr` port:

- `we` writes row `addr` of tile `tile` in rule module `rm`.
- One write per clock, with no handshake.
- Unwritten rows are undefined, so write every row the machine can reach.
- On an FPGA the same tables can be preloaded as RAM initial contents instead.

The tables can be built in any language. The procedure, which `bitsplit_ac_pkg`
in `tb/` implements in SystemVerilog, is as follows.

1. Sort all strings lexicographically. Walk the list and open a new rule module
   when the current one already has 16 strings, or when adding the next string
   would take its trie past 256 states. String *i* of rule module *m* gets
   **SID = 16·m + i + 1**.
2. For each rule module, build the ordinary Aho-Corasick automaton over bytes:
   - a trie;
   - failure links;
   - the full transition function δ(s, c);
   - for each state, the set of strings that end there, including strings
     reached through failure links.
3. For tile *k*, build a new machine whose states are *sets* of automaton states:
   - The start state is {root}.
   - From set S, the input value *v* leads to {δ(s, c) : s ∈ S, bits [2k+1:2k] of c = v}.
   - Repeat until no new sets appear. For an Aho-Corasick automaton there are never
     more sets than automaton states, so 256 rows suffice.
   - Number the sets in the order they are found (start set = 0).
   - Bit *i* of a set's PMV is 1 if any member of the set ends string *i*.

The AND of the four PMVs is exact: string *i* ends at the current byte if and only
if all four tiles report it.

## String ID and priority

`match_encoder` outputs `16·m + i + 1` for the lowest rule module *m* with a
nonzero match vector. Inside that module it uses the lowest set bit *i*. The output
is 0 when nothing matched.

Two strings can end on the same byte. This happens in different rule modules
("abc" and "zabc"), and also inside one module when one string is a suffix of
another ("he" inside "she"). Because the strings were sorted before they were
grouped, the lowest module and the lowest bit win. So the string that comes first
in sorted order is reported. With NUM_RM = 4 the SID is 7 bits wide (1…64). In
general it is `$clog2(16·NUM_RM + 1)` bits.

`rule_module_hier` gives exactly the same ID:

- Each `rule_module_l0` encodes its own 16-bit vector to 5 bits (0, or 1…16).
- Each merge node of level *k* takes two child IDs. It keeps the left ID if it is
  nonzero; otherwise it takes the right ID plus 16·2^(k-1).
- The result grows one bit per level.
- Every node registers its inputs and its output, so no wire crosses the whole
  engine in one cycle.

## The OPB snooping front-end

The front-end decodes three addresses. These are all parameters:

| address | meaning |
|---|---|
| `C_EMAC_BASEADDR + C_EMAC_RXLEN_OFFSET` | EMAC receive length register |
| `C_EMAC_BASEADDR + C_EMAC_RXFIFO_OFFSET` | EMAC receive FIFO |
| `C_BASEADDR` | the core's own ID register (a 4-byte word) |

A snooped read counts only in the cycle where `OPB_Select`, `OPB_RNW` and the
bus-wide `OPB_xferAck` are all high. On this OR-ed bus, `OPB_DBus` then carries
the EMAC's data.

- **Length read.** This starts a frame:
  - `OPB_DBus[16:31]` (the byte count) loads the counter register;
  - the matched-ID register is cleared;
  - the engine is reset in the same cycle.
- **FIFO read.** The word goes into the content register. A position register
  then sends its bytes to the engine, one per cycle:
  - the order is `OPB_DBus[0:7]` first, the lowest address on this big-endian bus;
  - each byte decrements the counter;
  - at zero the engine is stopped, even mid-word, so odd frame lengths work;
  - between words, `eng_en` is low and the tiles hold their state.
- **Matched-ID register.** This keeps the first nonzero SID of the frame. Later
  matches in the same frame are ignored.
- **ID read at `C_BASEADDR`.** The read is acknowledged for one cycle, with the ID
  right-aligned in `Sln_DBus`. In every other cycle all slave outputs are 0, as the
  OR-ed OPB requires. Writes are acknowledged and ignored. `Sln_errAck`, `Sln_retry`
  and `Sln_toutSup` are always 0.

**Limit on input rate.** A word takes four cycles to feed. The next FIFO read must
not complete sooner, or the rest of the word is lost. A processor copying with a
load/store loop is slower than that. DMA would need a frame buffer, which this core
does not have.

**Engine latency.** The parameter `ENG_LAT` is set by the top to the latency of the
engine it built:

- The acknowledge of the ID read is held back until the last byte fed has left the
  engine.
- For `ENG_LAT` cycles after a frame start, engine output is ignored. This stops a
  late result of the previous frame from landing in the new one.

With the default engine (2 cycles) and a realistic copy loop, neither rule ever
delays anything. With the tree engine (9 cycles for four rule modules) the ID read
may wait a few cycles. That is still far inside the 16 cycles OPB allows before an
acknowledge.

## Top-level parameters (`snids`)

| parameter | default | meaning |
|---|---|---|
| `NUM_RM` | 4 | rule modules (16 strings each) |
| `HIER` | 0 | 0: monolithic engine; 1: pipelined tree (`NUM_RM` must be a power of two) |
| `C_BASEADDR` | `32'h7E00_0000` | ID register |
| `C_EMAC_BASEADDR` | `32'h40C0_0000` | EMAC base |
| `C_EMAC_RXLEN_OFFSET` | `32'h3010` | receive length register offset |
| `C_EMAC_RXFIFO_OFFSET` | `32'h8100` | receive FIFO offset |
| `SID_W` | `$clog2(16*NUM_RM+1)` | ID width |

OPB buses use the IBM bit order `[0:31]`, where bit 0 is the MSB. Four rule modules
use 16 RAMs of 12,288 bits each. On a device with 18-kbit block RAMs that is one RAM
per tile, two thirds full. The core was meant for small boards, where the number of
free block RAMs sets the maximum `NUM_RM`. For example, 36 free RAMs give 9 rule
modules, which is 144 strings.

## Where this design departs from the original prototype

Followed:

- The sizes: 4 tiles of 2 bits, 256 states, 16-bit PMV, 48-bit rows, 16 strings
  per rule module.
- The tile structure: the state held as the RAM address, `saved_state`, the
  registered PMV, the 4:1 multiplexer.
- The AND of the PMVs.
- The encoder priority (lowest module first), SID numbering from 1 and 0 for "no
  match", the 7-bit SID for four modules.
- The front-end registers: counter, content, position, matched ID. It resets the
  engine on the length read, feeds one byte per cycle, stalls between words, and
  drives zeros when not acknowledging.
- The Level-0 module with a 5-bit ID, and the pairwise merge growing the ID by one
  bit per level.

This design's own choices:

- Loading the tables through `tbl_wr` instead of fixed RAM contents.
- The order of the four next states inside a row.
- The default addresses and the 16-bit length field.
- Which bytes of a word go first (big-endian).
- Keeping the *first* match of a frame.
- The one-cycle acknowledge.
- Clearing the PMV output in cycles without a byte.
- The `ENG_LAT` handling in the front-end.
- The exact pipeline registers of the tree engine, and offering it as a top-level
  option.

The original only built and timed Level-0 modules of the tree. It was not built
into a complete core.

Not included:

- the processor, EMAC, interrupt controller, UART, GPIO and PHY of the surrounding
  system;
- the alternative "filtering" architecture, which sits between EMAC and processor
  with its own frame buffers;
- the software that generates tables and rule-module wrappers (its algorithm is
  described above).

## Verification

Every block has a self-checking testbench in `tb/`. Each compares against
references that know nothing of automata or RTL:

- **String matching** is checked against plain suffix comparison (`ends_with` in
  `bitsplit_ac_pkg`). Each enabled byte is appended to a history. The expected SID
  is the first string, in rule-module order, that the history ends with.
- **The tables** come from the generator above, built in the testbench from random
  or fixed string sets.

| testbench | what it exercises |
|---|---|
| `tb_state_table` | random writes and reads; output holds when the address changes between edges |
| `tb_tile` | {abab, ac} on tile 0 (bits 1:0) with random stalls and a mid-stream reset; the PMV is checked every cycle against a walk of the table |
| `tb_rule_module` | 16 overlapping strings (he/she/hers…) over random text with stalls |
| `tb_match_encoder` | 5000 random sparse vectors against a scan in priority order |
| `tb_string_matching_engine` | 64 random strings in 4 modules; stalls, resets, simultaneous matches in several modules; latency 2 checked |
| `tb_rule_module_l0`, `tb_rule_module_hier` | same stream and reference, latency 5 and 9 checked |
| `tb_opb_snoop_frontend` | 200 frames through a bus model with a stand-in engine; byte order, one byte per cycle starting the cycle after each FIFO read, odd lengths, stalls, one engine reset per frame, ID read |
| `tb_snids` | whole core at default parameters (see below) |
| `tb_snids_hier` | the same, with `HIER=1` |
| `tb_snids_14str` | whole core at default parameters with only 14 strings: three rule modules hold an empty table and must stay silent |
| `tb_engine_sizes` | engine with 8, 9, 32 and 64 rule modules (128–1024 random strings) |

**`tb_snids`** loads 64 random strings. Some of them are drawn as suffixes of
others, so that strings of two rule modules can end on the same byte. It sends 120 frames through an OPB model of
the processor, the EMAC and the bus. The model:

- reads the length, then the FIFO words with random gaps;
- reads the ID at the end and checks it against the reference.

In the stream:

- strings are planted at random places;
- every fifth frame is clean;
- every fourth frame starts with the tail of a string whose head ended the previous
  frame. This checks that the engine reset at the frame start really forgets the
  previous frame.

The testbench counts the mechanisms it exercises: stalls between words, frames
ending mid-word, frames with more than one match, priority decisions between
modules, clean frames and split strings. It fails if any count is zero.

`tb_snids_hier` also requires that the ID read was made to wait at least once.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/snids_pkg.sv tb/bitsplit_ac_pkg.sv tb/tb_snids.sv --top-module tb_snids
./obj_dir/Vtb_snids
```

Replace `tb_snids` with any other testbench name. `tb_match_encoder` and
`tb_state_table` do not need `bitsplit_ac_pkg`. Each testbench prints
`TB_RESULT checks=N failures=M`. Each has a watchdog that ends the run with a
failure if it hangs. All of them finish in seconds.

## Changing the design

- **More strings.** Raise `NUM_RM`. The SID widens automatically, and the tables
  for the extra modules are loaded the same way. In a large engine, the single
  encoder and the fan-out of the input byte become the slow paths. Use `HIER=1`
  there; it costs 5+2·log2(NUM_RM) cycles of latency, which the front-end absorbs.
- **Another EMAC.** Set the three address parameters. The length must be in the
  low 16 bits of the length register.
- **Faster input.** Anything faster than one FIFO word per four cycles needs a word
  buffer in front of the position register.
