# LAP: a lightweight automata processor in SystemVerilog

LAP matches many patterns (regular expressions compiled into one finite
automaton) against character streams, with the whole automaton held in a
small on-chip memory: 16 KB of instruction memory and 0.625 KB of auxiliary
memory per core, with no DRAM behind it. Two ideas make that work.

1. **Compact automata.** The automaton is an ADFA, a DFA with *default
   edges*. A state stores only the edges that differ from those of its
   default state. Whenever a state has no edge for the input, it *falls back*
   to its default state, which then handles the same character. The transition
   tables of all states overlap in one linear memory (coupled-linear packing):
   state `s`'s edge on character `c` sits at word `s + c`. A signature field,
   the edge's own character, tells whether a word really belongs to `(s, c)`.
2. **Fall-backs hidden by parallel fetches.** A fall-back normally costs
   extra serial memory reads. LAP reads a second memory, the auxiliary
   memory, in the same cycle as the instruction memory. That memory holds the
   initial state's table and the "associated" words that describe each
   state's default state. Either a fall-back costs nothing (the default is the
   initial state) or it costs one step instead of two.

A core runs a four-stage pipeline over four independent input streams
(contexts) in strict rotation. Each context is in at most one stage at a time,
so the pipeline has no hazards and never stalls. On an ADFA it processes about
0.91 to 0.93 characters per cycle per core. Five cores (the default system)
scan twenty streams at once.

## Files

| file | contents |
|---|---|
| `rtl/lap_pkg.sv` | instruction, state, push, report and event types |
| `rtl/lap_system.sv` | top: `NCORES` cores and a shared program bus |
| `rtl/lap_core.sv` | one core: the four-stage pipeline |
| `rtl/lap_ass.sv` | Active State Stack for all contexts |
| `rtl/lap_spu.sv` | Stream Prefetch Unit for one context |
| `rtl/lap_addr_gen.sv` | stage-2 address arithmetic |
| `rtl/lap_imem.sv`, `rtl/lap_auxmem.sv` | the two memories |
| `rtl/lap_decoder.sv` | stage-4 instruction decoder |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/lap_ref_pkg.sv` | test programs, string-search golden model, reference interpreter |

## Instruction word and state descriptor

```
 31      24 23         12 11  9  8   7        0
+----------+-------------+------+---+----------+
|   sig    |   target    | type |acc| aux_ptr  |   instr_t, 32 bits
+----------+-------------+------+---+----------+
```

* `sig`: the character the edge is labelled with (signature check).
* `target`: 12-bit identifier of the next state. The identifier is also the
  base address of that state's table.
* `type`, `acc`, `aux_ptr`: properties of the **target** state. `acc` marks an
  accepting state. `aux_ptr` points into the auxiliary memory, to the target's
  associated word.

A word taken as "the next state" becomes a 24-bit *state descriptor*
(`state_t`: id, type, acc, aux_ptr). The stacks store descriptors, so a state
already carries its type and pointer when it is processed. The fields and
their widths come from the processor's description. The bit order, the type
codes and the split of the 9-bit attach field into `acc` and `aux_ptr` are
this implementation's choices.

## What each state type does

Each processing *step* takes one active state `S` and one character `c`. It
reads `I = imem[S.id + c]` and, in the same cycle, an auxiliary word `A`.
`A = aux[INIT_BASE + c]` when `S` is `DEFAULT_OPT1`. Otherwise
`A = aux[S.aux_ptr]`. `I` *hits* when `I.sig == c` and `I` is not a NULL
word.

| type | on a hit | on a miss | also |
|---|---|---|---|
| NULL (0) | nothing | nothing | dead state / empty slot |
| BASIC (1) | `I` for next char | state dies | |
| DEFAULT_OPT1 (2) | `I` | `A` if `A` hits, else the initial state | default state is the initial state |
| DEFAULT_OPT2 (3) | `I` | `A`'s state, **same character** | default state is a non-initial state |
| MAJORITY (4) | `I` | `A` for next char (majority edge) | |
| EPSILON (5) | `I` | – | `A`'s state, same character |
| PERSIST (6) | `I` | – | `S` stays active for next char |

Every type costs exactly one step. An OPT2 fall-back adds one more step, for
the default state. That state is always an OPT1 state, because the compiler
limits fall-back chains to depth 2, so it finishes in that second step. The
semantics of NULL, BASIC, DEFAULT_OPT1 and DEFAULT_OPT2 follow the processor's
description closely. MAJORITY, EPSILON and PERSIST are described there only by
their purpose ("compressing model size", "supporting/optimizing NFA model").
The rules in the table are this implementation's reading of that purpose.

A **report** is produced when a step moves, on the current character, into a
state whose `acc` bit is set. It carries the context, the state and the index
of that character in the stream.

## Memory layout a program must follow

* **Instruction memory** (4096 x 32): the own-table edge of state `s` on `c`
  goes in word `(s + c) mod 4096` with `sig = c`. Every word the program does
  not use must be written as zero (NULL). The memory is not cleared by reset.
* **Auxiliary memory** (160 x 32): words `INIT_BASE + c` (default
  `INIT_BASE = 0`) form the initial state's table, with `sig = c`. The
  remaining slots, including holes in that table, hold associated words. An
  associated word's `sig` must not equal the character that would index its
  slot. Reads past word 159 return NULL. So the initial state can have edges
  only on characters below 160.
* **The initial state** is given by the `start_st` port. It is normally an
  OPT1 state whose own table is empty: all of its edges then come from the
  auxiliary table.
* **Same-character chains** (OPT2 fall-backs, epsilon edges) must not form
  cycles. Accepting states reached through epsilon edges must be marked on
  the edge that enters the epsilon source.

`tb/lap_ref_pkg.sv` (`lap_prog::build_adfa`) shows a complete hand-compiled
program for the patterns `abc`, `ba` and `cd+`. It uses four OPT1 states,
three OPT2 states and the initial table. `lap_prog::build_nfa` shows the
same patterns as an NFA.

## Pipeline and contexts (`lap_core`)

```
 S1 select ──► S2 address ──► S3 fetch (imem ‖ aux) ──► S4 decode ──┐
   ▲  ASS pop / SPU char        state+c, aux addr        push, report│
   └──────────────────────────── same context, 4 cycles later ◄─────┘
```

* **S1:** a round-robin counter picks the context. If that context's "cur"
  stack (states still due for the current character) is non-empty, its top is
  popped. If it is empty, the context moves to the next character *in the
  same slot*: the stacks swap, the SPU head character is consumed, and the top
  of the old "next" stack is processed with it. So a one-state automaton
  spends one step per character. If there is no active state at all, the
  initial state is used (unanchored restart). If no character is ready, the
  slot stays idle (a *starve* event).
* **S2:** `lap_addr_gen` forms `S.id + c` and the auxiliary address.
* **S3:** both memories have a registered read, so the two words arrive
  together.
* **S4:** `lap_decoder` makes up to two pushes. `lap_ass` stores them at the
  clock edge, before the same context comes back to S1.

A context's work is always done before its next turn, so there is no
forwarding and no stall logic. This needs `NCTX >= 4`; a smaller value stops
elaboration with an error. All contexts share one program and one
`start_st`. Throughput: one step per cycle per core. The character rate is
`characters / steps`, about 0.91 to 0.93 on ADFA text with frequent
fall-backs. An NFA program takes one step per active state per character.

## Active State Stack (`lap_ass`)

Each context has two LIFO stacks of `STACK_DEPTH` (16) descriptors, for the
current and the next character. A bank bit swaps their roles in one cycle.
Pushes are checked against the entries already in the target stack, and
against each other: a duplicate is dropped, which keeps an NFA's active set a
set. A push into a full stack is dropped and sets the context's sticky
`ctx_overflow` flag. After an overflow, that context's results are incomplete.
The depth, the duplicate check and the overflow rule are this
implementation's choices.

## Interfaces (`lap_system`)

* **Program bus:** `prog_we`, `prog_aux` (0 = instruction memory,
  1 = auxiliary memory), `prog_addr`, `prog_data`. `prog_core` selects one
  core; `prog_bcast` writes every core. One word per cycle.
* **Per core:** `start_st`, and `ctx_init[k]`, which restarts context `k`
  (empty FIFO, position 0, initial state active, in-flight work discarded).
* **Per context:** the stream `in_valid/in_ready/in_char/in_last` (the SPU
  FIFO holds 4 characters), and `ctx_done[k]`, which rises after the last
  character has been processed and stays high until the next `ctx_init`. The
  final active states remain in the stack but are not brought out.
* **Per core outputs:** `rpt` (a one-cycle report; no back-pressure, at most
  one per cycle per core) and `ev` (one-cycle event pulses, for counting
  hits, fall-backs, restarts, drops and starved slots).

Reset is asynchronous and active-low. It clears all control state but not the
memory arrays.

## Verification

Every module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`.

* `tb_lap_system`: the whole system at its default size. Three cores run the
  `abc|ba|cd+` ADFA; their reports must equal a plain string search of the
  random texts. Two cores run random programs that use every instruction type
  (one of them overflows its stacks); they are compared with a reference
  interpreter of the rules above. It checks that each ADFA core takes four
  cycles per step of its busiest context, and that every mechanism occurred.
  It prints the line rate and the equivalent Gbps at 263 MHz.
* `tb_lap_core`: the same checks on one core, with random gaps in the input
  and a 4-entry stack. It also runs an NFA for the same three patterns (a
  PERSIST start state, and an EPSILON edge for `d+`) against the string
  search; that NFA runs at about 0.55 characters per cycle. A second ADFA,
  for `a+`, `b+c` and `c*d+`, must match its string search at exactly one
  character per cycle.
* `tb_lap_ass`, `tb_lap_spu`, `tb_lap_decoder`, `tb_lap_addr_gen`,
  `tb_lap_imem`, `tb_lap_auxmem`: unit tests against queue models, the rule
  table and address formulas.

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/lap_pkg.sv tb/lap_ref_pkg.sv tb/tb_lap_system.sv --top-module tb_lap_system
./obj_dir/Vtb_lap_system
```

## Departures and limits

* Only the optimized processor is built: every instruction takes one step. The
  slower serial fall-back behaviour, which the processor is compared against,
  is not an option here.
* The auxiliary memory's 0.6 KB becomes 160 words, so initial-state edges are
  limited to characters below 160. Setting `AUX_DEPTH` (and `INIT_BASE`)
  larger lifts this.
* The pattern compiler (regular expression to ADFA/NFA, then packing) is not
  part of this RTL. Programs must be produced elsewhere, following the layout
  above.
* How the cores connect to their host, and the input buffer the SPU reads
  from, are not specified. Plain ports stand in for both.
* Stack depth, FIFO depth, the report format, the restart rule and the
  duplicate/overflow handling are this implementation's own choices.
