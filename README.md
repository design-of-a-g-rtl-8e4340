# G-share branch predictor for the EISC processor

EISC is a 16-bit-instruction processor with a special prefix, LERI, that
extends the immediate of the instruction after it. The stock branch predictor
is a 4-entry, fully associative BTB. Every branch found in it is predicted
taken, it keeps no direction history, and it cannot predict a branch that
follows a LERI prefix.

This RTL replaces that predictor with a G-share predictor. It adds two things
that matter in a pipeline where several branches are in flight:

1. **Speculative global history at fetch.** A second global history register
   (GHR) sits in the fetch stage. It is updated with *predicted* directions, so
   a branch fetched right behind another one already sees that branch in its
   history. The history of *resolved* outcomes stays in the execute stage. The
   fetch copy is overwritten from it on every misprediction.
2. **Prediction of branches behind LERI prefixes.** The fetch stage folds
   LERIs into the next instruction and counts them. Decode rebuilds the branch's
   own PC from the folded PC and that count, so the BTB and PHT are trained
   under the address at which the branch is later fetched.

The main configuration is a 64-entry PHT of 2-bit counters, two 6-bit GHRs
and a 4-way, 64-set BTB of about 1.8 KB.

## Organisation

```
 fetch                                   | decode            | execute (processor)
                                         |                   |
 f_instr,f_pc -> leri_fold --fold-------->| F/D reg --> branch_pc_calc --> d_branch_pc
                     |                   |                   |
                     | branch?           |                   |  ex_pc,ex_taken,ex_target,
                     v                   |                   |  carried prediction
   f_pc --> gshare_predictor <-----------------------------------------
              |  PHT[PC[7:2] ^ ghr_fetch]  (read)            |
              |  BTB[set PC[7:2], tag PC[31:8]]              |  PHT[PC[7:2] ^ ghr_exec] (write)
              |  ghr_fetch  <== overwrite on mispredict ==   ghr_exec
              v                                              |
        f_pred_taken, f_pred_target                          ex_mispredict
```

| Module | File | Role |
|---|---|---|
| `eisc_bp_top` | `rtl/eisc_bp_top.sv` | Front end. It joins folding, prediction, the fetch/decode register and the decode PC adder. |
| `gshare_predictor` | `rtl/gshare_predictor.sv` | PHT, BTB, both GHRs, index XOR, misprediction detection and recovery. |
| `pht` | `rtl/pht.sv` | 64 two-bit saturating counters. One combinational read port and one update port. |
| `ghr` | `rtl/ghr.sv` | History shift register: newest bit in the LSB, plus a parallel load port for recovery. |
| `btb` | `rtl/btb.sv` | 4-way, 64-set BTB with parallel tag match and round-robin replacement. |
| `leri_fold` | `rtl/leri_fold.sv` | Fetch-stage LERI folding: first-LERI PC, LERI counter and immediate accumulator. |
| `branch_pc_calc` | `rtl/branch_pc_calc.sv` | Decode stage: actual PC = folded PC + 2 x LERI count. |
| `gshare_pkg` | `rtl/gshare_pkg.sv` | Sizes, counter type, folded-instruction struct and opcode predecode functions. |

### Address fields

| PC bits | Use |
|---|---|
| `[31:8]` | BTB tag (24 bits) |
| `[7:2]` | BTB set index, and PHT index before the XOR with the GHR |
| `[1:0]` | unused |

The PHT index is `PC[7:2] XOR GHR`. The GHR length is log2 of the PHT size,
so 6 bits for 64 entries. A BTB entry is a 24-bit tag, a 32-bit target and a
valid bit: 57 bits × 256 = 1824 bytes.

EISC instructions are 2 bytes long, but the index starts at PC bit 2. Two
branches at adjacent halfwords therefore share a BTB set and a PHT row. Only
the tag keeps them apart in the BTB: they are different entries of the same
set. `IDX_LSB` moves the field if you prefer `PC[6:1]`.

### Counters

Each PHT entry counts up on taken and down on not taken, and saturates at
`00` and `11`. `10` and `11` predict taken. All entries reset to `01` (weakly
not taken).

## Speculative history and its recovery

This is the least obvious part of the design, so it gets the most detail.

**The problem.** Take two branches A and B fetched back to back. B is
predicted before A reaches execute. With a single GHR updated at execute, B
reads the PHT with a history that lacks A. When B later updates the PHT, the
history does include A. B therefore reads one counter and trains another, and
never learns. The deeper the front end, the more often this happens. In the
test pipeline below, a conventional G-share misses 41–51% of the branches of
a simple nested loop.

**The fix, cycle by cycle** (`gshare_predictor`):

- *Fetch cycle of a branch* (`f_valid && f_is_branch`):
  - The PHT is read combinationally at `PC[7:2] ^ ghr_fetch`, and the BTB is
    looked up with the same PC.
  - The prediction is `btb_hit && counter[1]`. A branch with no BTB entry has
    no target, so it is predicted not taken.
  - At the clock edge the predicted direction is shifted into `ghr_fetch`.
- *Execute cycle of a branch* (`ex_valid`):
  - The counter at `ex_pc[7:2] ^ ghr_exec` is updated. `ghr_exec` holds only
    resolved outcomes, and at this point it holds exactly the older branches.
  - The outcome is then shifted into `ghr_exec`.
  - A taken branch writes its target into the BTB, refreshing the entry if it
    is already there.
- *Misprediction*:
  - `ex_mispredict` is raised when the direction is wrong, or when a taken
    branch went to another target than the one predicted.
  - At the same edge, `ghr_fetch` is loaded with `ghr_exec`'s *next* value,
    which includes the mispredicted branch's real outcome. The histories of
    the younger branches, which the processor flushes, are discarded with it.
  - The load wins over a fetch-side shift in the same cycle. A branch fetched
    in that cycle is younger and is flushed too.

If fetch never mispredicts, `ghr_fetch` runs ahead of `ghr_exec` by exactly
the branches in flight. A branch therefore reads the PHT with the same
history it later writes with. The testbenches check both registers against a
reference model after every cycle.

`SPEC_GHR = 0` reads the PHT with `ghr_exec` instead, which gives the
conventional G-share. It exists to compare the two.

## LERI folding and the actual branch PC

EISC can put up to three LERI prefixes in front of an instruction. In
hardware they never execute: `leri_fold` absorbs them at fetch.

- Each LERI appends its 14-bit immediate to an accumulator; the first LERI
  ends up in the most significant bits.
- The first LERI of a group records its PC, and each LERI increments the
  2-bit LERI counter.
- The next non-LERI instruction leaves the unit in the same cycle as one
  folded instruction. It carries the instruction word, `folded_pc` (the PC of
  the first LERI), `leri_cnt` and `leri_imm`.
- A flush drops a group that is only partly collected.

The folded instruction keeps the first LERI's PC, because PC-relative
addressing and exceptions need it. That PC is not the branch's own address,
however, and fetch will look the branch up under its own address. The decode
stage therefore computes `d_branch_pc = folded_pc + 2 * leri_cnt`, and the
processor sends that value back as `ex_pc`. The prediction lookup at fetch
uses the branch's own fetch PC (`f_pc`). Both sides thus use the same key,
and a branch behind LERIs gets BTB hits and taken predictions like any other.

The opcodes are assumptions kept in `gshare_pkg`:

- **LERI**: `instr[15:14] == 2'b01`, with a 14-bit immediate.
- **Conditional branch (jcc)**: `instr[15:12] == 4'hD`, as in the `d4`–`d7`
  jcc opcodes of EISC listings.

Change `is_leri`, `is_cond_branch` and `LERI_IMM_W` if your encoding
differs.

## Interface of `eisc_bp_top`

All signals are synchronous to `clk`. `rst_n` is an asynchronous, active-low
reset.

| Group | Signals | Behaviour |
|---|---|---|
| Fetch | `f_valid`, `f_instr`, `f_pc` → `f_ready`, `f_pred_taken`, `f_pred_target` | An instruction is accepted when `f_valid && f_ready`. `f_ready = !stall`. The prediction is combinational in the same cycle and is meant to steer the next fetch PC. |
| Decode | `d_valid`, `d_instr`, `d_folded_pc`, `d_leri_cnt`, `d_leri_imm`, `d_branch_pc`, `d_is_branch`, `d_pred_taken`, `d_pred_target` | The fetch/decode register, valid one cycle after acceptance. It holds while `stall` is high. LERIs never appear here. |
| Execute | `ex_valid`, `ex_pc`, `ex_taken`, `ex_target`, `ex_pred_taken`, `ex_pred_target` → `ex_mispredict` | One resolved conditional branch per cycle, sent with the `d_branch_pc` and prediction it carried. Updates take effect at the edge that ends the cycle. |
| Control | `stall`, `flush` | `flush` and `ex_mispredict` both clear the fetch/decode register and any partial LERI group. |
| Observation | `ghr_fetch`, `ghr_exec` | The two histories. |

The processor itself is not part of this RTL. It must supply the fetch PC
sequence, redirect on `f_pred_taken` and on `ex_mispredict`, flush its own
younger stages, and carry the prediction down to execute.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `PHT_ENTRIES` | 64 | PHT size. The GHR width is `$clog2(PHT_ENTRIES)`: 32 gives a 5-bit G-share, 128 a 7-bit one. |
| `BTB_WAYS`, `BTB_SETS` | 4, 64 | BTB shape. The tag width follows from them. |
| `IDX_LSB` | 2 | Lowest PC bit of the PHT and BTB index. |
| `SPEC_GHR` | 1 | 1 = speculative fetch GHR (this design); 0 = conventional G-share. |

## Choices this design makes where the source description is silent

- Counters reset to `01`; GHRs and BTB valid bits reset to zero.
- Reads are combinational (a prediction in the fetch cycle). The PHT update
  is a read-modify-write inside the table.
- Which branches enter the BTB: taken branches only, as in the original EISC
  predictor. Not-taken entries are left for the PHT to handle.
- BTB replacement: the lowest invalid way, otherwise round-robin per set.
- A taken prediction needs a BTB hit.
- The overwrite value includes the outcome of the branch that caused it.
- The opcode encodings listed above.
- An external `flush` does not restore `ghr_fetch`. Only a misprediction
  does.
- Pipeline handshake of the top: `stall`, `flush`, and the prediction carried
  down the pipeline.

The storage matches the described main configuration. The original 4-entry
predictor and the bimodal predictor appear only as comparisons and are not
built. `SPEC_GHR = 0` covers the conventional G-share.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `pht_tb` | Every counter against an integer model, both saturation ends, random traffic. |
| `ghr_tb` | Shift, load and load-over-shift priority against an arithmetic model. |
| `btb_tb` | Hit and target against a per-set model with the same replacement rule; set overflow and eviction; target refresh. |
| `leri_fold_tb` | Groups of 0–3 LERIs with random stalls and mid-group flushes. Each folded instruction's PC, count and immediate must be right, and no LERI may leak. |
| `branch_pc_calc_tb` | All counts, random PCs, wrap-around. |
| `gshare_predictor_tb` | A 3-stage pipeline model with refetch on misprediction, against a full reference model of PHT, BTB and both GHRs, checked every cycle. Requires branches in flight, overwrites and BTB hits. |
| `eisc_bp_top_tb` | End to end at default sizes (see below). |
| `loop_workloads_tb` | Nested-loop workloads on the conventional and the enhanced G-share, and on 5-, 6- and 7-bit histories (uses the helper `tb/loop_runner.sv`). |

`eisc_bp_top_tb` runs at the default sizes. It plays the processor, with a
2-cycle execute latency, random stalls and one external flush. The workload
is 100 iterations of a nested loop whose outer branch sits behind two LERIs,
then 40 executions of a branch behind three LERIs. It checks every decoded
field and every misprediction flag. It also requires that LERI folding, taken
predictions of LERI-prefixed branches, speculative history, overwrite, stall
and flush each occur at least once. On the loop it measures about 9–10 misses
in 500 branches.

`loop_workloads_tb` gives these results with a 3-cycle fetch-to-execute
distance and one instruction fetched per cycle:

| Workload | Conventional G-share | Enhanced G-share |
|---|---|---|
| `for i<100 { for j<3 }` (400 branches) | 50.75% | 2.25% |
| `for i<100 { br_1++; for j<4 br_2++; }` (500 branches) | 41.0% | 2.0% |
| same, outer branch behind two LERIs | — | 2.0% |
| same, 5-bit G-share (`PHT_ENTRIES=32`) | — | 1.8% |
| same, 7-bit G-share (`PHT_ENTRIES=128`) | — | 2.2% |

The published measurements on the real processor are 20.6% for the
conventional G-share and 1.4% for the enhanced one. The conventional figure
here is higher because the model keeps more branches in flight. The absolute
numbers depend on that pipeline model. The ordering does not.

Not verified: Dhrystone, or any program running on a real EISC core. The
processor is not part of this RTL, so the Dhrystone miss rates (about 9% for
the 6-bit G-share with LERI-branch prediction) cannot be reproduced here.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/gshare_pkg.sv tb/eisc_bp_top_tb.sv --top-module eisc_bp_top_tb -o sim
./obj_dir/sim
```

Replace `eisc_bp_top_tb` with any other testbench name. The package must be
listed first; `-y` finds the other modules by file name. Every testbench
finishes in well under a second.
