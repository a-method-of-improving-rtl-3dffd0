# CISC instruction decoder with a translation scheduler

This is the front end of a CISC/RISC hybrid processor. It fetches x86-style CISC instructions and turns them into RISC-like microinstructions. Each cycle it feeds up to three instructions to three translators that differ in size:

| translator | microinstructions per instruction | output lanes |
|---|---|---|
| simple (S) | 1 | lane 0 |
| general (G) | 1–2 | lanes 1–2 |
| complex (C) | 1–3 | lanes 3–5 |

An instruction that needs four or more microinstructions goes to a sequencer, alone.

Feeding instructions in program order often wastes a translator slot. For example, two 3-microinstruction instructions in a row cannot share a cycle, because only C can take them. The scheduler fixes this: it looks ahead in the current basic block and moves later instructions forward when they fit the free translators and moving them keeps the program correct. On the worked example block of 11 instructions, in-order dispatch needs 6 cycles; scheduled dispatch needs 5 (2.2 instructions per cycle instead of 1.83).

## Block diagram

```
 bus ─► prefetch_predecode ─► icache ─► scheduler ─► mapping_table ─► dispatch ─► decoder ─► execution unit (6 lanes)
          (predecode bits)      ▲                                                 S G C        │
                                │                                                 sequencer    ▼
                         branch prediction                                    translation_table (recovery point)
```

Blocks outside the design are ports of `cisc_decoder_top`: the memory bus, the branch predictor and the RISC execution core.

## Blocks (`rtl/`)

- **cr_pkg**: shared package:
  - the instruction format and its predecoder (12 predecode bits per 32-bit word);
  - the entry and microinstruction structures;
  - mix-type classification;
  - translator choice;
  - the microinstruction templates.
- **prefetch_predecode**: on a cache miss, reads a 4-word line from the bus, predecodes each word and fills the cache.
- **icache**: a direct-mapped cache, 64 lines of 4 words, each word stored with its predecode bits.
  - Each cycle it delivers from the fetch address to the end of the line, as much as the queue has room for.
  - Delivery stops after a branch. The predictor is asked for the next address.
- **scheduler**: the instruction queue, made of a 3-entry arrangement window followed by an SWS-entry search window (SWS default 6).
  - Each scheduling cycle it picks one dispatch group and writes it to the mapping table. An instruction is picked if the translators can still take it and it may legally move ahead of what it passes:
    - no true register dependence (renaming later removes the others);
    - no memory dependence of any kind;
    - flag set/test pairs stay together;
    - no branch is passed.
  - An instruction moved ahead of one that reads or writes the register it writes gets a rename tag (`rn`). Only that anti- or output-dependence makes the move illegal without renaming. The tag travels with the entry and ends up on the microinstruction that writes that register, so the stage behind the decoder knows to give it a new physical register.
  - It also reports the window's mix type (1–5) and whether the group was rearranged.
  - With the parameter `SCHED = 0` it never rearranges: each group is the in-order prefix of the window that fits the translators. This is the same decoder without a scheduler, used as the baseline for comparison.
  - With `TSET = 1` the translator set becomes two simple and one complex (2S+1C), the other comparison machine. The general translator's slot then acts as a second simple translator and takes only one-microinstruction instructions. So a group holds at most one instruction that needs two or more.
- **mapping_table**: a 16-entry FIFO of scheduled instructions. Each entry holds the address, code, translator number, D bit (D marks the first instruction of a group) and rename tag.
- **dispatch**: takes the oldest group from the mapping table and sends its members to S/G/C by translator number, or the single long instruction to the sequencer.
- **translator**: one registered translator stage, instantiated with 1, 2 or 3 lanes.
- **sequencer**: expands an instruction of 4 or more microinstructions over the six lanes, 6 per cycle. Dispatch waits while it is busy.
- **decoder**: holds S, G, C and the lane multiplexing, and passes each translated group to the translation table.
- **translation_table**: a 16-entry record of issued, not yet retired instructions, retired in order by a count from the core. On `irq` it reports the oldest unretired instruction (address, D bit, translator number) and empties.
- **cisc_decoder_top**: connects the blocks. `redirect` flushes everything behind fetch and restarts at `redirect_pc`.

### Timing

- Cache hit to scheduler: one cycle.
- Scheduling:
  - A group is chosen combinationally and written to the mapping table at the next edge.
  - The scheduler fires when the queue is full, when it holds a branch, or when fetching has stopped.
- Dispatch and translation:
  - Dispatch reads the mapping table head combinationally.
  - The translators register their outputs, so microinstructions appear on `ex_lane` one cycle after dispatch.
- Stalls: `ex_ready` low holds both the translator stage and dispatch.
- Throughput: on a warm cache and a full mapping table, the decoder issues one group per cycle.

## The instruction set used

The hardware needs real instruction words, so it uses a fixed 32-bit, x86-like encoding:

| field | bits |
|---|---|
| opcode | 6 |
| destination kind (none/register/memory/immediate) | 2 |
| source kind | 2 |
| destination id | 4 |
| source id | 4 |
| immediate | 14 |

- It has 21 opcodes: ALU ops, INC/DEC, CMP, MOV, PUSH/POP, conditional and unconditional jumps, LODSB/STOSB/MOVSB, and PUSHA/POPA.
- Memory operands are 16 direct word addresses.
- Microinstruction counts:
  - Register ALU ops take 1.
  - A memory source adds a load.
  - A memory destination takes load, operate and store.
  - String instructions take 3–5, and PUSHA/POPA take 9/8.

With this encoding, instruction boundaries are trivial. A real x86 front end would have to mark them in the predecode bits.

## Departures and own choices

- **Dependences** come from explicit operands only, with 8-bit registers aliased to their 16-bit ones. So LODSB's implicit AL write does not hold back a following CMP AX. This matches the example the design was derived from.
- **Interrupt recovery** is partial: the translation table names the oldest instruction in flight and clears itself. How execution restarts after reordered translation is not defined here.
- **Not built:**
  - physical register renaming: the decoder only tags the destinations that need a new register;
  - the branch predictor (a port);
  - the execution core (a port);
  - the bus (a port).
- **Sizes not given by the source** (all parameters):
  - queue widths;
  - cache geometry;
  - mapping and translation table depths (16);
  - the bus protocol (request held until grant, then one word per cycle).
- **When the scheduler fires** and its single in-order selection scan are own choices. On the worked example they reproduce the expected exchange steps exactly.

## Testbenches (`tb/`)

Each block has `tb_<block>.sv`, which prints `TB_RESULT checks=N failures=M`.

- `tb_scheduler`:
  - The worked example: exact order, groups, translator numbers and mix types.
  - 600 random instructions checked against an independent dependence model.
- `tb_cr_pkg` checks the package functions against independent models:
  - group fitting and mix types, exhaustively for groups of instructions needing 1–5 microinstructions;
  - the predecode bits against the microinstruction templates, for every legal operand form;
  - the resource masks, on random instructions.
- `tb_cisc_decoder_top`, at default parameters, runs end to end:
  - cold and warm passes of the example block (5 consecutive decode cycles when warm);
  - a PUSHA block through the sequencer;
  - random code;
  - random execution stalls;
  - an interrupt with its recovery point checked.

  It counts every mechanism: misses, rearranged groups, each mix type, sequencer multi-cycle issue, stalls, mapping-table-full back-pressure, rename tags and the interrupt.
- `tb_workloads` runs four schedulers side by side on random streams of basic blocks: SWS 1, 3 and 6, and one with `SCHED = 0`. The last must need exactly as many groups as an in-order model.
  - Instruction mixes, as percent of instructions needing 1/2/3/4+ microinstructions: (25,25,25,25), (35,35,20,10) and (45,40,10,5).
  - Dependency ratios 0–80%. The dependency ratio is the chance that an instruction reads something written earlier in its block.
  - It prints instructions per group for each window and for in-order dispatch, and checks each against reference rates for the same configurations within 10%.

  Reference rates for instructions per cycle:

  | mix | in order | SWS = 1 | SWS = 3 | SWS = 6 |
  |---|---|---|---|---|
  | (25,25,25,25) | 1.563 | 1.63–1.72 | 1.66–1.74 | 1.70–1.75 |
  | (35,35,20,10) | 2.082 | 2.14–2.24 | 2.19–2.29 | 2.22–2.30 |
  | (45,40,10,5) | 2.428 | 2.48–2.56 | 2.53–2.60 | 2.56–2.61 |

  Each range runs from 80% to 0% dependency ratio. This model comes out 1–6% below the reference, and its gain from rearranging is about 5% rather than 8%. For example, (45,40,10,5) at 40% gives about 2.47 with SWS = 6 against 2.35 in order. The dependency ratio barely changes this model's rates. Instructions of 4 or more microinstructions get no explicit dependences in it.
- `tb_workloads_m2` does the same for the 2S+1C set (`TSET = 1`) at SWS 1, 3 and 6.
  - Mixes are given as percent needing 1/2/3/4/5+ microinstructions: (25,25,25,15,10), (35,35,20,5,5), (45,40,5,5,5) and (55,15,15,10,5).
  - It checks each group against the 2S+1C rule, and each rate within 10% of reference rates. The references run from about 1.33 instructions per cycle for the first mix to 2.16 for the last.
  - The rates come out close to 1 divided by the share of instructions needing two or more, because the single complex translator limits every group.
  - For the first three mixes this model is 2–8% above the reference. For (55,15,15,10,5) it is about 9% below, close to the limit.

Each module's testbench has been confirmed to fail on a deliberately broken copy of that module.
