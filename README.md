# Trivial-instruction bypassing with speculative trivialization point advancing

Many integer instructions are *trivial*: their result is zero or one of their
own operands, with no arithmetic needed. Examples are `x + 0`, `x * 1`, `x * 0`,
`x & 0`, `x & 0xffffffff` and `x << 0`. The operand value that makes an
instruction trivial is its **trivializing operand (TO)**. The other operand is the
**non-trivializing operand (NTO)**. Once the opcode and the TO are known, the
result is known too. The moment both are known is the instruction's
**trivialization point**.

A conventional out-of-order core only reaches that point when the TO has been
computed. This design moves the point earlier. A small context predictor learns,
per static instruction, which operand tends to be trivializing and what its value
is. When the prediction is confident, the instruction enters the scheduler with
the predicted TO already in place. It then produces its (speculative) result as
soon as it is trivial under the prediction, and its dependants start early. When
the real TO arrives, the prediction is either confirmed with a cheap validation
message or repaired by selective re-execution. Nothing commits speculatively.

The RTL is an out-of-order core (`tp_core`) built around these mechanisms. It is
one instruction wide and takes a decoded instruction stream. Fetch, branches
and the memory system are left out; the departures are listed at the end.

## Trivial instructions and the detection unit

`rtl/trivial_detect.sv` is combinational. It decides triviality from the opcode
and whichever operands are known so far.

| operation | fully trivial (result 0, other operand not needed) | semi-trivial (result = other operand, both needed) |
|-----------|-----------------------------------------------------|----------------------------------------------------|
| add       | –                                                   | a = 0 or b = 0 |
| sub       | –                                                   | b = 0 |
| mul       | a = 0 or b = 0                                      | a = 1 or b = 1 |
| div       | a = 0                                               | b = 1 |
| and       | a = 0 or b = 0                                      | a = 0xffffffff or b = 0xffffffff |
| or, xor   | –                                                   | a = 0 or b = 0 |
| sll, srl, sra | a = 0                                           | b = 0 |

Fully-trivial cases win over semi-trivial ones, and source 0 is tested before
source 1. The unit reports a 3-bit **TO code** on `to_code`:

- Bit 2 says which source operand was trivializing.
- Bits 1:0 give its value: 0 → zero, 1 → one, 2 → all ones.

It also reports whether the result is zero or the NTO. The TO code is what the
predictor stores and predicts; the package `rtl/tp_pkg.sv` defines it.

One unit sits at dispatch. Another sits in every issue-window entry.

## Three points of detection

- **Decode-trivial.** At dispatch, the unit is given only *final*
  (non-speculative, already produced) operand values. If it finds the
  instruction trivial, the destination is not given a new physical register.
  Instead the rename table maps it onto one of two registers:
  - the NTO's physical register;
  - physical register 0, which always holds zero.

  The instruction goes into the reorder buffer already complete. It never
  enters the issue window and never uses the functional unit. When the result
  would equal an immediate there is no register to remap to. Such an
  instruction goes to the issue window and is bypassed there.
- **Issue-trivial.** The instruction waits in the issue window. Its TO arrives on
  the result bus, and the entry's detection unit sees it is trivial. The entry
  still takes the issue slot, but its result is selected from its operands
  rather than computed by the ALU (`ev_alu_use` stays low).

  A fully-trivial entry may issue with only its TO present. A semi-trivial
  entry waits for both operands.
- **Predicted (D-SPEC).** The predictor gives a confident TO code for this PC.
  The predicted operand is a register source that is not yet final, and the
  dispatch detection unit agrees that the predicted value makes the instruction
  trivial in the predicted way. When all of this holds, the operand is written
  into the window entry with the predicted value and its P (predicted) bit set.
  The entry can then issue at once if it is fully trivial, or as soon as the NTO
  arrives if it is semi-trivial.

## Speculation, validation and invalidation

This is the hardest part of the design to follow. The states live in the
issue-window entries (`rtl/issue_window.sv`). Each source operand carries:

- `R`: a value is present.
- `P`: that value is speculative.
- `pred`: the value came from the predictor, not from a producer.

Each entry carries:

- `executed`: a result has been broadcast from the current operand values.
- `last`: the value of that broadcast.

1. **Speculative broadcast.** An entry issues while some operand has `P` set.
   It broadcasts its result on the result bus with kind `SPEC` and stays in the
   window with `executed = 1`. Consumers that pick up a `SPEC` value set their
   own `P` bit. This is I-SPEC: instructions that are speculative only because
   an input is. The rename table also marks the destination as speculative, so
   later dispatches from the register file set `P` too.
2. **The real value arrives.** A final broadcast (kinds `NORMAL`, `VALID` or
   `INVAL`) reaches a predicted operand. If the value matches, the prediction
   was right: `P` and `pred` clear and nothing else happens. If it differs, the
   operand takes the real value and `executed` clears, so the entry issues
   again. A `SPEC` broadcast for a predicted operand is ignored. Only a final
   value settles a prediction.
3. **Validation.** An executed entry whose `P` bits have all cleared has a
   result that is now known to be right. It is sent once on the **validation
   bus**, and then the entry leaves the window. The validation carries:
   - the tag;
   - the value broadcast earlier;
   - the reorder-buffer slot;
   - the triviality information.

   Waiting consumers treat it as a final value for that tag and clear their own
   `P` bits. Chains of dependants are confirmed one per cycle without issuing
   again.
4. **Invalidation.** An entry that already broadcast speculatively may issue
   again because an input changed. If it issues with no `P` left, the new
   result is final:
   - If it equals `last`, it goes out as `VALID`.
   - If it differs, it goes out as `INVAL`. Consumers that used the old value
     take the new one and re-execute.

   Only instructions whose inputs actually changed run again. This is selective
   re-execution, not a flush.

The reorder buffer marks an entry complete only on a final result-bus broadcast
or a validation. A speculative result can therefore never commit. At commit, the
predictor is trained with three things:

- whether the instruction was trivial;
- its TO code;
- whether its result was zero.

## Context predictor

`rtl/context_predictor.sv` is a two-level value predictor over TO codes, not
full values. It has two tables:

- **Value history table.** 128 entries, indexed by the low PC bits. Each entry
  holds:
  - a 25-bit tag;
  - four TO codes;
  - a 2-bit LRU age per code;
  - an 8-bit history of the slots used by the last four TOs;
  - one bit saying whether the trivial result was zero or the NTO.
- **Pattern history table.** 128 entries of four 2-bit confidence counters.
  It is indexed by the history XOR the PC, folded to 7 bits.

The highest counter picks the slot. The lowest slot wins a tie. A prediction is
made only when that counter is above the threshold of 2.

Lookup is combinational and happens in the dispatch cycle. Update happens at
commit:

- **Trivial instruction.** Its code is found in the entry or replaces the LRU
  slot. Its counter goes up, the other three go down, and the history shifts.
- **Non-trivial instruction that hits.** All four counters go down.

The update rules and the index fold are this design's choices.

## Rename table and physical registers

`rtl/rename_table.sv` maps 32 architectural registers to 160 physical ones.
Each mapping has a *speculated* bit. It is set when the writer was dispatched
with a speculative input or a prediction. A final broadcast or a validation of
that physical register clears it in every mapping. Architectural register 0 is
pinned to physical register 0.

`rtl/phys_regfile.sv` holds values, ready bits and a **reference count** per
register. A decode-trivial remap makes two architectural names share one
physical register. A register therefore returns to the free list only when
every mapping that named it has been overwritten and committed:

- allocation sets the count to 1;
- a remap adds 1;
- the commit of an overwriting instruction subtracts 1.

## The core

`rtl/tp_core.sv` connects the blocks:

```
 decoded stream ─► rename + dispatch ─► issue window ─► ALU / bypass ─► result bus
   (valid/ready)   (decode-trivial remap,  (64 entries)                    │
                    predictor lookup)          └──────► validation bus ────┤
                                                                           ▼
 commit stream ◄── reorder buffer (128) ◄──────────────── completion, register write
         └──► predictor training
```

Each cycle the core does the following:

- dispatches at most one instruction;
- issues one instruction to a single-cycle unit (`rtl/tp_alu.sv`) or to the
  trivial bypass;
- sends one result-bus broadcast and one validation;
- commits one instruction.

A broadcast in the same cycle as a dispatch is forwarded to the instruction
being dispatched. A dependant can issue in the cycle after its producer.

**Interface.**

- Inputs with `in_valid`/`in_ready`:
  - `in_pc`, in instruction units;
  - `in_op`, the opcodes in `tp_pkg`;
  - two architectural sources;
  - `in_use_imm`/`in_imm`, where an immediate replaces source 1;
  - `in_dst`, where 0 means no destination;
  - `in_load_lat`.

  `OP_LI` is a load-immediate that stands in for a memory load. Its value is
  the immediate, and `in_load_lat` is the number of cycles before it may issue.
- Commit outputs give the PC, destination, value and triviality of each retired
  instruction in program order.
- `cfg_bypass_en` and `cfg_predict_en` select one of three modes:
  - a conventional core (both low);
  - bypassing at the ordinary trivialization point (bypass only);
  - the full design (both high).
- The `ev_*` outputs are one-cycle event pulses for counting:
  - decode-trivial;
  - issue-trivial;
  - predicted dispatch;
  - predictions confirmed or wrong;
  - speculative, validation and invalidation broadcasts;
  - ALU use;
  - dispatch stall.

Parameter defaults: `NARCH = 32`, `NPHYS = 160`, `IW_SIZE = 64`,
`ROB_SIZE = 128`, `VP_ENTRIES = 128`.

## Simulating

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/tp_pkg.sv tb/tp_core_tb.sv \
          --top-module tp_core_tb -Mdir obj_tp_core_tb -o sim
./obj_tp_core_tb/sim
```

Replace `tp_core_tb` with any other testbench name.

- `tp_core_tb` runs the core at its default sizes on a generated stream:
  - 6 loop bodies × 12 instructions × 40 iterations;
  - values biased toward 0, 1 and all-ones;
  - random load latencies;
  - all three modes.

  Every commit is compared with a sequential reference model. Every mechanism
  must occur, and the ALU must be used less with bypassing than without.
  Measured: 3036 / 2907 / 2904 cycles for the three modes, and 2880 / 1083 /
  1083 ALU uses.
- `tp_core_ct_tally_tb` runs an inner fragment of gzip's `ct_tally()` 300
  times. The fragment is a byte load that is usually zero, then `addiu` on it,
  `addu` from `r0`, and a shift. It runs with and without prediction, and
  checks commits, predictions and mispredictions.
- The block testbenches are `trivial_detect_tb`, `tp_alu_tb`,
  `context_predictor_tb`, `rename_table_tb`, `phys_regfile_tb`,
  `reorder_buffer_tb` and `issue_window_tb`. Each compares its block against a
  model in the testbench. `issue_window_tb` plays the rest of the core around
  the window on random dataflow programs with right and wrong predictions. It
  checks the following:
  - every tag gets exactly one final value;
  - that value is right;
  - nothing speculative follows it.

## Departures and limits

- **Width.** The core dispatches, issues and commits one instruction per cycle,
  with one functional unit. The design the mechanism was proposed for is
  8-wide. The mechanisms do not depend on width, but the speedups do.

  At width 1 the issue slot is the bottleneck. In the `ct_tally` fragment
  without prediction, 1200 instructions issue in 1205 cycles. Prediction cannot
  shorten that, and its re-executions after mispredictions make the run longer
  (1380 cycles). Expect reduced ALU use from this RTL as it stands, not
  speedups. Widening the dispatch, select and bus logic is the main extension
  needed to reproduce them.
- **No front end or memory.** There is no fetch, branch prediction, caches or
  load/store queue. Loads are modelled by `OP_LI` with a per-instruction
  latency. Since there are no branches, the rename table has no checkpoints.
- **Pipeline depth.** Rename/dispatch, issue-execute-broadcast and commit each
  take one cycle. The deeper decode and write-back-to-commit latencies of a
  real machine are not modelled.
- **Choices not fixed by the mechanism:**
  - fixed-priority selection (lowest window entry first) for both issue and
    validation;
  - a separate single validation bus;
  - reference counting for shared physical registers;
  - a prediction is used only when the detection unit agrees with it;
  - only the destination mapping is marked speculative, never the predicted
    source register;
  - division by zero returns zero;
  - 160 physical registers.
