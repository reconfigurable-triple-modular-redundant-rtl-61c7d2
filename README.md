# Run-time TMR / 4MR on a four-processor system, with diagnosable voters

A hard-wired triple-modular-redundant (TMR) system is reliable early in its
life. Later it becomes *less* reliable than a single module, because it keeps
depending on the same three modules as they age. This design takes a
different approach. Four ordinary pipelined processors normally run separate
programs (MIMD). A program can ask for redundancy around a critical stretch
of code with one instruction, `RECONFIG ON`. That instruction says which
processors to combine and which voter to use. From then on, one processor
fetches and decodes the instructions. Its operands are sent to the execute
units of all the selected processors, and their results are voted on in an
extra pipeline stage. Only the fetching processor writes the voted result
back. `RECONFIG OFF` returns to MIMD mode. Each new group can be built from
whichever processors are healthiest at that moment.

The voters are *diagnosable*. Besides the voted word, each one reports which
module disagreed, whether no majority exists, and, where possible, whether
its own match logic has failed.

## Block map

```
            P0            P1            P2            P3
         Fetch         Fetch         Fetch         Fetch
         Decode ──┐    Decode ──┐    Decode ──┐    Decode ──┐   RECONFIG in Decode
         Read     │    Read     │    Read     │    Read     │        │
           │      │      │      │      │      │      │      │        ▼
           └──────┴──────┴──────┴─ operand_router ─┴──────┘   reconfig_ctrl
             S1 S0 picks the broadcast, Pi picks it per processor  (cfg, freeze, grant)
         Execute       Execute       Execute       Execute
           │             │             │             │
           └──────── reconfig_stage (Reconfigure stage) ────────┘
             compaction muxes → VL0 | VL1 | VL2 ; VL3 takes all four
             per processor: Pi ? voted : own ; write if fetching or unselected
         Write         Write         Write         Write
```

| file | block |
|---|---|
| `rq_top.sv` | the whole system, plus a stand-alone exact word voter on its own ports |
| `rq_core.sv` | one processor: Fetch, Decode, Read, Execute, Reconfigure, Write |
| `reconfig_decoder.sv` | RECONFIG fields and the 2-4 voter-enable decoder |
| `reconfig_ctrl.sv` | mode register, switch sequencing, stalls |
| `operand_router.sv` | Read → Execute interconnect |
| `reconfig_stage.sv` | Execute → Write interconnect and the four voters |
| `cd_word_voter.sv` | VL0, centralized diagnosable word voter |
| `cd_subword_voter.sv` | VL1, the same with a mask register of ignored bits |
| `median_voter.sv` | VL2, median voter with a deviation threshold |
| `cd_3of4_voter.sv` | VL3, 3-of-4 voter for four processors |
| `exact_word_voter.sv`, `dual_rail_error.sv` | exact word voter with dual-rail self-checking outputs |
| `rq_pkg.sv` | shared types: instruction fields, stage bundles, diagnosis |

## The RECONFIG instruction

Instructions are 16 bits wide. The RECONFIG word is laid out as follows:

| bits | 15:12 | 11:9 | 8 | 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|---|---|---|---|
| field | opcode `E` | 0 | ON | S1 | S0 | P0 | P1 | P2 | P3 | V1 | V0 |

- **S1 S0** is the processor that keeps fetching.
- **Pi = 1** selects processor *i* for the group.
- **V1 V0** selects the voter: 0 = word voter, 1 = sub-word, 2 = median, 3 = 3-of-4.
- A 2-4 decoder, enabled by ON, turns V1 V0 into EN0..EN3.
- `RECONFIG OFF` is the same word with every field 0.

Example: processors 0, 1 and 3 with processor 3 fetching is S1 S0 = 11,
P0 P1 P2 P3 = 1101. `enc_reconfig()` in `rq_pkg` builds the word.

The order of the fields is given. The bit numbers, the opcode value and the
16-bit width are this implementation's own choices.

## What happens on a switch (the part to read carefully)

The description names the stalls that a switch needs but leaves their timing
open. This implementation resolves that with one rule: every instruction in
flight runs under a single configuration. The configuration is therefore one
global register, `cfg`, and the pipelines are drained around each change.

1. A RECONFIG is handled in **Decode**. There it raises `rc_req` and waits for
   `rc_grant`. It never goes further down the pipeline.
2. **MIMD mode, RECONFIG ON from processor r.** The processors it selects,
   other than r and the fetching processor S, stop issuing at once (`freeze`).
   The grant comes when two things hold:
   - r has nothing left in Read, Execute, Reconfigure or Write;
   - every selected processor and S have nothing left in Execute,
     Reconfigure or Write.

   `cfg` loads on the grant edge. If several processors ask at once, the
   lowest-numbered one goes first.
3. **Group active.** Every selected processor except S stays frozen. It keeps
   its own Fetch, Decode and Read contents, and it resumes them when the
   group is dissolved.
   - S issues one instruction per cycle as usual.
   - `operand_router` sends S's Read-stage bundle, with operands already
     read from S's registers, to the Execute stage of every selected
     processor.
   - Unselected processors carry on with their own programs.
4. **RECONFIG from another processor while a group is active.** It stalls in
   Decode until MIMD mode returns. This includes the fourth processor asking
   for its own group. Only S may change or dissolve the group, and it does so
   after the same draining. A `RECONFIG OFF` in MIMD mode does nothing.

Costs: a switch takes a few cycles of draining. While it waits, the
requester's pipeline behind Decode and the selected processors' back ends
empty out. The testbenches count these waits.

S is expected to be one of the selected processors, as in every example
given. If it is not, S writes its own unvoted result and the voted word goes
nowhere.

## The Reconfigure stage

`reconfig_stage` sits between the Execute result registers and the Write
registers.

- **Compaction.** Three 2:1 multiplexers with selects P0, P0·P1 and
  P0·P1·P2 put the results of the first three selected processors, in
  processor order, on the three voter inputs. For example:
  - {0,1,3} gives E0, E1, E3;
  - {1,2,3} gives E1, E2, E3.
- **Voters.** VL0, VL1 and VL2 see those three inputs. VL3 sees all four
  results. EN0..EN3 pick the voter whose word and diagnosis are used.
- **Output selection.** Processor *i* receives the voted word when Pi = 1 and
  its own result otherwise.
- **Write enable.** The enable of processor *i* is `(S == i) | ~Pi`, the
  terms S1'·S0' + P0', S1'·S0 + P1' and so on. Only the fetching processor
  and unselected processors write.
- **No majority.** When the enabled voter finds none, its output is disabled
  and the fetching processor's write is cancelled. The destination register
  keeps its old value.
- **Diagnosis.** `vdiag` reports the voter, error, match-logic error and the
  faulty module. The module is renumbered from voter inputs back to processor
  numbers.

## The voters

All voters are combinational. "Disabled" means the output reads 0 and
`out_en` is low. The original voters tri-state their outputs instead.

| voter | output | faulty module flagged when | error when |
|---|---|---|---|
| **VL0 word** (`cd_word_voter`): pairwise matches m12, m23, m31 | module 2, or module 1 if m31 | exactly one pair matches (the third module is flagged) | no pair matches |
| **VL1 sub-word** (`cd_subword_voter`) | as VL0, after masking; ignored bits read 0 | as VL0 | as VL0 |
| **VL2 median** (`median_voter`) | MID, the middle of the three (unsigned) | its word is more than `delta` from MID | two or more modules flagged |
| **VL3 3-of-4** (`cd_3of4_voter`): triple matches m123, m234, m134, m124 | module 2 if m234, else module 1 | exactly one triple matches (the fourth module is flagged) | no triple matches |
| **Exact word voter** (`exact_word_voter`): m12, m23, m31 | module 1 if m12, else module 3 | — | no pair matches |

Notes on the individual voters:

- **VL0.** `match_err` flags exactly two matching pairs. Working equality
  logic cannot produce that, so it points at the voter itself.
- **VL1.** A mask register (`mask_we`, `mask_wdata`; 1 = ignore the bit,
  reset 0) zeroes the ignored bits of all three words before voting.
  Differences in those bits never count.
- **VL2.** The sorter keeps track of which module each word came from, so
  the flags name modules. Small disagreements within `delta` are tolerated.
  The output is then the middle value, which need not equal any "correct"
  word. `delta` is loaded with `delta_we` and resets to 0.
- **VL3.** `match_err` flags two or three matching triples. Any two true
  triples imply that all four match, so this also points at the voter.
- **Exact word voter (enhanced).** It has no per-module diagnosis. Instead it
  checks itself:
  - every output bit and ERROR also exist on a complement rail built by
    separate logic from the inverted inputs;
  - (0,1) and (1,0) are legal pairs, and `rail_fault` reports an illegal
    (0,0) or (1,1);
  - `dual_rail_error` is the ERROR part on its own: a 3-input NOR, plus an
    AND of the inverted matches for the other rail.

  This voter is not one of VL0..VL3. In `rq_top` it stands alone on the
  `ewv_*` ports.

## The processors

The four processors stand in for the 32-bit RISC cores of the original
system, whose instruction set is not part of this design. Each `rq_core` has
a private 256 × 16-bit instruction memory and 16 × 32-bit registers. It runs
a small instruction set of this implementation's own:

| op | code | effect |
|---|---|---|
| NOP | 0 | — |
| ADD, SUB, AND, OR, XOR | 1–5 | rd = rs1 op rs2 (`op rd rs1 rs2`) |
| SHL | 6 | rd = rs1 << rs2[4:0] |
| LI | 7 | rd = sign-extended imm8 (`op rd imm8`) |
| ADDI | 8 | rd = rd + sign-extended imm8 |
| RECONFIG | E | see above |
| HALT | F | stop fetching; `halted` rises once the pipeline is empty |

There are no branches, loads or stores.

Pipeline behaviour and counters:

- Read interlocks on older instructions in Execute, Reconfigure and Write.
  There is no forwarding.
- Independent instructions issue one per cycle. A dependent instruction
  issues four cycles after its producer.
- Execute, Reconfigure and Write never stall.
- `exec_count` counts the instructions each Execute stage has run, including
  ones executed on behalf of another processor. This is the aging figure by
  which processors can be chosen for a group. Choosing them is left to
  software: the RECONFIG word names them explicitly.
- `fault_inj` (one 32-bit XOR mask per processor) corrupts the Execute result
  of writing instructions. It exists so that the voters can be exercised.
  Tie it to 0 in use.

## Top-level interface (`rq_top`)

Parameters: `WIDTH` = 32 (voter width) and `IMEM_DEPTH` = 256.

- **Clock and reset.** One clock. `rst_n` is an asynchronous, active-low
  reset that clears PCs, pipelines, registers, `cfg`, the mask and `delta`.
- **Program loading.** Load programs with `imem_we`, `imem_core`,
  `imem_addr`, `imem_wdata`, either before releasing reset or while the
  processor is idle. Instruction memory is not reset.
- **Outputs.** `halted`, `exec_count`, `cfg`, `freeze`, `rc_pending` and
  `vdiag` (valid in the cycle a voted instruction is in the Reconfigure
  stage).
- **Register inspection.** `dbg_core` and `dbg_raddr` select a register;
  `dbg_rdata` returns its value combinationally.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

- `tb_rq_top` runs the whole system at its default parameters. Processor 0
  builds TMR with VL0, then VL1, then VL2. Processor 3 works meanwhile, then
  asks for 4MR with VL3 and is stalled until processor 0's group ends.
  Faults are injected into single and double execute units. The test checks
  every register and every diagnosis, and counts each mechanism.
- `tb_rq_workloads` runs the {0,1,3}-with-3-fetching configuration through
  all three 3-input voters.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/rq_pkg.sv tb/tb_rq_top.sv --top-module tb_rq_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_rq_top` with any other testbench name. Each run takes well under
a second.

## Where this departs from, or goes beyond, the original description

- **Processors.** The instruction set, the 16-bit instruction word, the
  register count, the instruction memory and the hazard interlock are this
  implementation's own.
- **Switch timing.** The drain-then-switch rule, the lowest-first
  arbitration, and treating a RECONFIG from a non-fetching processor as a
  stall are choices. The original leaves the stall mechanism to future work.
- **Disabled outputs.** A disabled voter output reads 0 rather than high
  impedance, and a failed vote cancels the write. Sub-word ignored bits are
  driven 0.
- **Shared voter bus.** One multiplexer controlled by EN0..EN3 replaces the
  shared tri-state bus of the four voters.
- **Median voter.** It compares words as unsigned numbers and flags a
  deviation strictly greater than `delta`.
- **Diagnosis logic.** The diagnosis equations of VL0, VL1 and VL3
  (`err_mod`, `match_err`) are the simplest that do what is described. Their
  gate-level form is not given.
- **Exact word voter.** Its output selection (module 1 if m12, else
  module 3) is read from its gate count. The self-checking rail checker is a
  single XNOR per rail pair, not a full checker tree.
- **Multiplexer inputs.** Which input of each interconnect multiplexer is "1"
  follows the printed labels, read so that Pi = 1 means "take the broadcast /
  voted value".
- **Not covered.** Reliability figures, resource and delay numbers, and any
  policy for choosing processors are outside this RTL.
