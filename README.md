# Multi-context reconfigurable array with instruction buffer mode

A multi-context dynamically reconfigurable processor array keeps several
configurations ("contexts") of its processing elements in small memories
next to each element. It switches between them in a single clock by
broadcasting a context pointer. The catch is the number of slots. Here every
element has 64. A program whose tasks need more contexts than that must stop
and reload from the central configuration memory, which costs hundreds of
cycles per task.

Many contexts do little work. Some are used only once, such as an
initialisation step or a transposition. Others keep only one or two PEs
busy. Giving such a context a slot in every element's memory is waste. This
design adds a second execution mode per task, **instruction buffer mode**.
In this mode the configuration words are not stored. They stream from the
central configuration memory into a one-entry *instruction buffer* in each
element, and the context runs as soon as its last word has arrived. A context
made of k configuration words therefore costs k cycles and uses no slot. The
freed slots let the remaining, heavily reused tasks stay resident, so their
reloads disappear.

Configuration words are addressed with row and column multicast bits. One
word can therefore configure a whole rectangle of PEs. In buffer mode this
gives SIMD-like execution: sixteen PEs running the same operation cost one
cycle of configuration.

The array follows the organisation of the MuCCRA-1 prototype:

- a 4x4 array of PEs with 24-bit data and a 2-bit carry,
- island-style routing with two channels and a 5x5 grid of switching elements,
- four multipliers on the left,
- four 24-bit x 256 data memories at the bottom,
- 64 contexts.

## Array organisation

```
            SE(0,0) ── SE(0,1) ── SE(0,2) ── SE(0,3) ── SE(0,4)
   MULT0 ─┤    │   PE(0,0)  │   PE(0,1)  │   PE(0,2)  │   PE(0,3) │
            SE(1,0) ── SE(1,1) ── ...                      SE(1,4)
   MULT1 ─┤    ...
            SE(4,0) ── SE(4,1) ── SE(4,2) ── SE(4,3) ── SE(4,4)
                  MEM0       MEM1       MEM2       MEM3
```

- **Word format.** Every wire carries a 26-bit word: {carry[1:0], data[23:0]}.
- **SE (`se.sv`).** A switching element sits at each channel intersection. It
  has two switches, one per channel. Each switch picks one of 18 sources:
  - hold;
  - the 8 channel words of the four neighbouring SEs;
  - the outputs of the four PEs around the intersection;
  - a MULT output (left-edge SEs only);
  - a MEM output (bottom-edge SEs only);
  - clear.

  The switch outputs are registers that update at the end of each execution
  cycle. A word therefore moves one SE per context, and the routing can
  never form a combinational loop.
- **PE (`pe.sv`, `pe_core.sv`).** A PE reads the 8 channel words of its four
  corner SEs through its connection block.
  - Operands A and B each come from one of those 8 words, from one of the two
    register-file read ports, from a 16-bit sign-extended immediate, or from
    zero.
  - B passes through the Shift & Mask Unit (`pe_smu.sv`): shift left,
    logical or arithmetic shift right, mask the low n bits, or sign-extend
    from bit n.
  - The ALU (`pe_alu.sv`) then combines A and B. Its operations: add, add
    with carry, subtract, and, or, xor, pass A, pass B, set-less-than, min,
    max, equal. The carry bits give the carry/borrow and a result flag.
  - The ALU result drives the PE output, and can be written into the 8-entry
    register file (`pe_rfile.sv`).
  - PE timing is combinational within the cycle. The SEs register the result.
- **MULT (`mult_unit.sv`).** One per row. It takes a signed 24x24 product and
  returns its low or high 24 bits. Operands come from the channels of the two
  left-edge SEs of its row, or from an immediate.
- **MEM (`mem_unit.sv`).** One per column, 256 words of 24 bits. It does one
  read or write per execution cycle. The address is a channel word (or zero)
  plus an 8-bit offset. The read result is registered. A host port loads
  inputs and reads results while the array is idle.

## Configuration storage in every element

Every PE, SE, MULT and MEM has the same storage pair (`config_store.sv`),
and so does the controller's state-transition logic:

- **Context memory (`context_memory.sv`).** It has 64 entries, each as wide
  as the element's context word:

  | element | context word width |
  |---|---|
  | PE | 64 bits |
  | SE | 10 bits |
  | MULT | 24 bits |
  | MEM | 24 bits |
  | state transition | 10 bits |

  It is written from the configuration bus at the slot named in the word, and
  read asynchronously at the broadcast context pointer.
- **Instruction buffer (`instr_buffer.sv`).** One register plus a valid bit.
  The *mode flag* of each configuration-bus word picks where the word goes:
  the context memory or the buffer. The mode of the running task picks what
  the element executes: `exec_ib ? buffer : context_memory[ctx_ptr]`.

  In buffer mode, an element that was not written since the previous
  execution cycle sees an all-zero word, which is a no-op for every element
  type. So an element left out of a context does nothing rather than repeat
  its last instruction. A write in the same cycle as an execution wins. This
  lets the next context's first word arrive while the current context runs.

## Configuration bus and RoMultiC multicast

The central configuration memory (`config_memory.sv`) holds 1024 bus words
of 83 bits each (`cfg_word_t`):

| field | bits | meaning |
|---|---|---|
| target | 3 | element class: PE, SE, MULT, MEM, state transition |
| row | 5 | row multicast bits |
| col | 5 | column multicast bits |
| ctx | 6 | context slot |
| data | 64 | context word, right-aligned |

An element at (r, c) takes the word when the class matches and both `row[r]`
and `col[c]` are 1 (`romultic_decoder.sv`). MULTs use only the row bits and
MEMs only the column bits. SEs use all five bits of each field. One word can
therefore configure any rectangle of elements. Irregular patterns are built by
overwriting: a later word replaces an earlier one.

## Controller and the two execution modes

The controller (`controller.sv`) runs a program of up to 16 tasks, repeated
`repeat_cnt` times. Each task is described by a task-table entry (`task_t`):

| field | meaning |
|---|---|
| mode | mode flag: 0 = multi-context, 1 = instruction buffer |
| cfg_base, cfg_len | where the task's words are in the configuration memory |
| ctx_base, ctx_count | the context slots the task occupies |
| iter0, iter1 | iteration counts of up to two inter-context loops (8 bits each) |

**Context sequencing.** Every context ends with one state-transition word.
The controller stores these words in its own 64-entry context memory in
multi-context mode, or takes them from the bus in buffer mode. The word's
fields:

- `last` ends the task.
- `loop_en` marks the last context of a loop body. The controller jumps back
  to `target` while loop counter `loop_id` has iterations left.

A task with a loop body of `Context_loop` contexts iterated N times therefore
executes `Context_seq + N * Context_loop` contexts.

**States.** The controller moves through these states:

```
IDLE → FETCH (read descriptor) → mode 0: [WAIT_LOAD] → EXEC_MC → NEXT
                               → mode 1: IB → NEXT
NEXT → FETCH (next task) | DONE
```

- **Multi-context mode (mode 0).** The task's words are loaded into the
  context memories at one word per clock, and then the task runs at one
  context per clock. Three cases:
  - *Resident task.* The controller remembers which task owns each slot. If
    all of a task's slots still hold it, the task starts with no transfer.
  - *Foreground load.* Otherwise the array waits while the words are loaded
    (`WAIT_LOAD`). The cost is the number of words plus 3 cycles for the
    read pipeline.
  - *Background pre-load.* While a mode-0 task runs, the next task of the
    program is loaded into the context memories if three conditions hold: it
    is a mode-0 task, it is not resident, and its slots do not overlap the
    running task's slots. When its turn comes it starts at once.
- **Instruction buffer mode (mode 1).** The words stream at one per clock
  into the buffers. A context executes in the same cycle as its
  state-transition word arrives, with the context pointer unused. On a loop
  jump, the controller re-reads the loop body from the configuration memory.
  To find it, the controller records the configuration address of each
  context's first word in a 64-entry table. Execution therefore takes the
  total number of words of all executed contexts, plus one cycle of read
  latency. Nothing in the context memories is touched, so the resident
  multi-context tasks stay intact.

**Cost.** Every task has two overhead cycles: the descriptor fetch and the
task advance. The statistics outputs count:

- total cycles;
- execution cycles (either mode);
- stall cycles;
- words sent over the bus;
- words pre-loaded in the background;
- resident starts;
- contexts run in buffer mode;
- loop jumps.

**Choosing the mode.** A first-order rule for when buffer mode pays off
compares, for each task, the context usage:

- `Cycle_context = Cycle_execution / Context_task`
- the buffer-mode estimate `Conf_task / Context_task * Cycle_execution`

Tasks whose contexts are used only about once (Cycle_context near 1) cost
roughly the same in both modes, but in buffer mode they stop occupying slots.
Move such tasks to buffer mode until the remaining tasks fit into 64
contexts. Tasks with long loops should stay in multi-context mode.

## Host interface (`muccra_top.sv`)

1. Write configuration words with `cm_we/cm_waddr/cm_wdata`.
2. Write task descriptors with `tt_we/tt_addr/tt_wdata`.
3. Load input data with `mem_h_we[c]/mem_h_addr/mem_h_wdata`.
4. Set `num_tasks` and `repeat_cnt` and pulse `start`.
5. `busy` stays high until `done` pulses.
6. Read results on `mem_h_rdata[c]`. `stat_*` hold the cycle statistics of
   the last run.

## Measured behaviour

`tb/workload_tb.sv` rebuilds five evaluation tasks by their shape: words,
sequential contexts, loops and iterations. The tasks are 1D-DCT row,
transposition, 1D-DCT column, alpha blender and SHA-1. Their configuration
words are real bus words, but the arithmetic is not modelled. Cycles are
counted on this RTL:

| task | words | contexts | multi-context total | buffer-mode total |
|---|---|---|---|---|
| 1D-DCT(row) | 146 | 13 | 241 | 1010 |
| Transposition | 208 | 17 | 230 | 211 |
| 1D-DCT(column) | 151 | 14 | 254 | 1064 |
| Alpha-Blender | 67 | 8 | 715 | 5404 |
| SHA-1 | 244 | 20 | 751 | 6124 |

`tb/workload_tb.sv` also runs the five tasks in sequence for ten rounds, in
three ways:

| case | what runs in buffer mode | contexts needed | total cycles | words loaded into context memories |
|---|---|---|---|---|
| 0 | nothing | 72 | 15085 | 4884 |
| 1 | transposition | 55 | 15823 | 608 |
| 2 | SHA-1's 8 initialisation contexts | 64 | 15075 | 719 |

- **Case 0.** This case has 72 contexts for 64 slots, so tasks evict each
  other every round. Background pre-load hides almost all of the reloading in
  this placement.
- **Cases 1 and 2.** All contexts become resident. Buffer mode removes the
  reload traffic, but it costs extra execution cycles.

The benefit over case 0 therefore depends on how much reloading the
pre-load cannot hide.

For comparison, the published MuCCRA-1 measurements are:

- Single tasks, multi-context / buffer mode: 237 / 1106, 227 / 208,
  244 / 1114, 711 / 6406 and 670 / 3473 cycles.
- Cases 0, 1 and 2: 15316, 14857 and 13527 cycles in total.

Single-task multi-context figures agree within 2-4 percent, except SHA-1 at
12 percent. The buffer-mode figures differ most for SHA-1, because the shapes
here spread words evenly over contexts and have no branches. In the
prototype, case 0 spends more cycles on transfers than here (2666 against
1585 stall cycles), so the gain of cases 1 and 2 is larger there.

`tb/alpha_blend_tb.sv` runs an actual alpha-blending kernel. It computes
`out = B + ((A - B) * alpha >>> 8)` over 128 pixels, with an 8-context task
whose 7-context loop runs 128 times. It uses the same 24 configuration words
in both modes:

| mode | execution cycles | total cycles | context slots used |
|---|---|---|---|
| multi-context | 897 | 926 | 8 |
| instruction buffer | 2819 | 2821 | 0 |

## Departures from the reference architecture and choices made here

- The bit-level encodings are this design's own and are not the MuCCRA-1
  encodings:
  - the PE, SE, MULT, MEM and state-transition context words;
  - the ALU/SMU operation set;
  - the switch source list;
  - the configuration-bus word;
  - the task descriptor.
- The exact routing topology is a plausible island-style fabric. Its parts:
  - SE-to-neighbour-SE links;
  - PE connection blocks to the four corner SEs;
  - MULT and MEM attached to their edge SEs;
  - registered SE outputs.
- The configuration memory depth (1024 words), the task-table size (16) and
  the two 8-bit loop counters per task are choices.
- The controller's residency tracking, its pre-load rule (no slot overlap)
  and its cycle overheads are choices. The buffer valid bit is also a choice.
- A cheaper alternative was not built: using one context-memory entry as the
  buffer instead of a separate register.
- There is no branch support beyond loops. Data-dependent branching between
  contexts is not implemented.
- MEM has a host port for loading data. It is not part of the array
  description.

## Simulating

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. To run one with plain Verilator, from
the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/muccra_pkg.sv tb/<name>.sv --top-module <name>
./obj_dir/V<name>
```

| testbench | what it covers |
|---|---|
| context_memory_tb, instr_buffer_tb, config_memory_tb | storage, mode multiplexer, valid bit |
| romultic_decoder_tb | multicast selection for every class and pattern |
| pe_alu_tb, pe_smu_tb, pe_rfile_tb, pe_core_tb, pe_tb | PE datapath against a reference model |
| se_tb, mult_unit_tb, mem_unit_tb | routing switches and edge units |
| controller_tb | both modes, loops, resident start, pre-load, cycle counts |
| muccra_top_tb | full-size array: a mixed program (buffer-mode init, looped multiply-scale in multi-context mode, pre-loaded copy, SIMD summary), results in memory checked, every mechanism counted; then the looped task rerun in buffer mode with the same words and checked for identical results |
| workload_tb | evaluation task shapes, single and in sequence, cycle model |
| alpha_blend_tb | a real alpha-blending kernel (128 pixels, MEM → PE → MULT → PE → MEM) run from the same words in both modes, results and cycles checked |

All testbenches run the design at its default size in a few seconds.
