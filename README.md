# Error detection and recovery for a redundant single-thread processor

When transient faults become frequent (an error every few thousand, hundred
or even tens of cycles per structure), catching an error is no longer the
hard part. Recovering from it cheaply is. This RTL implements the detection
and recovery logic for a *reliable single-threaded processor* (STP): an
out-of-order core that runs every instruction twice. One copy belongs to an
"original" thread and the other to a "replica" thread, and the two results
are compared before anything becomes architectural.

Comparing at commit tells you *that* something went wrong, but not *where*:

- **Active errors** hit an instruction while it is in flight, for example in
  a functional unit or on a bus. Simply re-executing the instruction fixes
  them.
- **Passive errors** sit in storage: the rename map, a register, the ROB.
  Re-executing reads the same corrupted bit again and fails again. Only a
  restore from a checkpoint, or a local repair, helps.

The design therefore adds small error codes ("local checkpoints") to the
storage structures. They catch passive errors **eagerly**, at the moment
the corrupt entry is read, and usually repair them on the spot from a
redundant copy that already exists. The recovery controller then picks one
of three policies at commit, selected by the `mode` input:

| mode | name | on a commit mismatch |
|---|---|---|
| `MODE_LDCR` | lazy detection, checkpoint recovery | Reload the checkpoint (200 cycles), then re-execute. |
| `MODE_LDAR` | lazy detection, active recovery | Re-execute from the failing instruction and remember its PC. If the same PC fails again, the error is passive: correct it from the checkpoint (5 cycles), then re-execute. |
| `MODE_EDAR` | eager detection, active recovery | Passive errors have already been caught by the codes, so re-execute. A mismatch that the stored codes can resolve is corrected in place. |

The 200- and 5-cycle figures are parameters (`LDCR_RELOAD_CYCLES`,
`PASSIVE_FIX_CYCLES` in `stp_pkg`). The expected benefit grows with the
error rate. The published evaluation reports these IPC losses against the
unprotected redundant core, at a mean time to failure (MTTF) per structure
of 10000, 1000 and 100 cycles:

| mode | MTTF 10000 | MTTF 1000 | MTTF 100 |
|---|---|---|---|
| LDCR | ~3 % | ~20 % | ~65 % |
| LDAR | ~0 % | ~5 % | ~35 % |
| EDAR | ~0 % | ~2 % | ~15 % |

The eager checks run in every mode. `mode` changes only what happens at
commit.

## Efficient Register Renaming (ERR): why the replica is almost free

The key structural trick is that the replica thread does not get its own
rename map. The physical register file has two partitions of `NPART`
registers each. If the original copy of an instruction is renamed to
register `p`, its replica writes the twin register `p + NPART`. The
consequences run through the whole design:

- **One map table, one ROB entry per pair.** `err_rename` keeps a single map
  table. `rob` holds one entry for each original/replica pair and completes
  it only after both copies have written back (`wb_o_*`, `wb_r_*`).
- **Every register has a twin.** A register can be repaired from its twin.
  That is exactly what the register-file read ports do (see below).
- **Commit corroboration** reads both twins with their codes
  (`err_regfile` commit port) and compares them in an `ea_checker`:
  - equal values: commit;
  - different values with equal stored codes: the code shows which copy is
    intact, so the error can be corrected;
  - otherwise: report an error to the recovery controller.
- **Free list.** Freeing `p` frees both twins: one bitmap over partition 0.

## Eager detection and local repair

Every protected entry stores an error code next to its data (`edc_encode`).
The code is regenerated and compared whenever the entry is read. The
detection strength of each structure is fixed in `stp_pkg` and mapped to a
code:

| structure | bit errors detected | code used here |
|---|---|---|
| ROB, register files, rename map, ROB index table, LSQ | 3 | extended Hamming (Hamming + overall parity) |
| issue queue | 2 | Hamming |
| branch predictor, branch reuse buffer | 1 | parity |

The code width is computed by `stp_pkg::edc_width`. With 32-bit data the
codes are 1, 6 and 7 bits wide. Parity, Hamming and extended Hamming are
this design's choice for reaching each detection strength. The codes are
used only to **detect** errors and to **choose between two copies**. No
code corrects data by itself.

### Rename map and ROB index table (`err_rename`)

Each map entry has a code. Next to each map entry sits a ROB index table
entry with its own code. It holds the ROB index of the youngest in-flight
instruction that wrote this architectural register, plus a *committed* bit.

When a rename reads a map entry whose code fails, renaming stalls for one
cycle and the entry is rebuilt:

- **committed bit set:** the committed map (`rmap`) holds the right value;
- **committed bit clear:** the ROB entry named by the index table holds the
  destination mapping. It is read through the ROB query port (`q_idx`,
  `q_pdst`, `q_ok`), and the ROB checks its own code on that read;
- **the index table entry or the ROB entry is also corrupt:** `map_fail` is
  raised. Renaming stops, the recovery controller drains the older
  instructions, then restores from the checkpoint.

A branch misprediction walks the ROB back from the youngest entry,
restoring map entries and index table entries from the *previous mapping*
and *previous ROB index* fields kept in every ROB entry. Those fields are
coded too.

### Register file (`err_regfile`)

Every register has a value, a code and a status bit (written / not
written). On each read port:

| own code | twin | result |
|---|---|---|
| good | (not used) | value returned |
| bad | written, code good | twin's value returned (`rd_fix`) |
| bad | not written yet | `rd_wait`: the reader stalls and retries |
| bad | code bad | `rd_fail`: uncorrectable, goes to recovery |

The status-bit scheme is the variant built here. The alternative with an
extra register file is not built.

### Deadlocks (`dl_monitor`)

An upset in the issue queue, such as a changed wake-up tag, can leave an
instruction that never issues. Then nothing ever mismatches: the machine
just stops. Counters are shared by sets of `DL_SET` consecutive ROB
entries:

1. A counter is cleared when the first entry of its set is allocated.
2. It counts every cycle while any entry of the set is valid.
3. At `DL_THRESH` cycles it reports a deadlock, and recovery re-executes.

The threshold (1024) and the set size (4) are this design's choices.

## Front end and memory

- **`pc_gen_dup`: duplicated PC generation.** Two next-PC generators run in
  lock-step and are compared every cycle. On a mismatch no fetch is issued.
  Both copies reload from the last agreed next PC, which costs one bubble.
- **Branch prediction check.** The predictor keeps a parity bit with each
  prediction, delivered as `bp_code`. A prediction that fails its parity is
  not used, so fetch falls through. It is reported on `ev_bp_err`. Fetch
  is then held until that instruction has been evaluated.
- **`replication_checker`: instruction replication.** The instruction cache
  is assumed fault tolerant and returns each word with its code. The word is
  copied into an original and a replica copy, and both copies are checked
  against the code two cycles later:
  - both good: the pair is passed on;
  - one good: the good copy is used for both (`ev_repl_fix`);
  - neither good: the instruction is fetched again (`ev_refetch`).
- **`lsq_pair`: load/store queue.** The two copies of a load or store share
  one slot. Each copy writes its address and data with a code. Only one
  memory access is made per pair:
  - a load issues when both addresses are present and agree, or when the
    codes can pick the good address;
  - a store is written at commit, after the same check on its address and
    data;
  - an unresolved difference asks the controller to re-execute.

  The queue is served strictly in order, so there is no store-to-load
  forwarding. Wrong-path slots are dropped on a misprediction.

## Branch reuse buffer (`branch_reuse_buffer`)

Re-execution after an error repeats work already done. To keep it from also
repeating branch mispredictions, each in-flight branch owns an entry in a
16-entry circular buffer:

- **Entry contents:** valid, evaluated, outcome, target.
- **Writes:** a branch that turns out mispredicted records its real outcome
  and target.
- **After a flush:** dispatched branches step through the buffer instead of
  allocating. Where an entry is evaluated, its outcome replaces the
  prediction (`ev_reuse`).
- **Overflow:** when all 16 entries are in use, further branches are only
  counted in a small overflow counter and are not reused.

Two details are this design's own:

- The stored outcome is applied at dispatch: if it disagrees with the
  prediction, the front end is redirected there (`fe_flush`). It is not
  applied at fetch.
- Buffered branches are kept older than counted ones.

## Checkpoint and recovery control

`ckpt_rf` receives every corroborated committed value. It is the state a
restore goes back to. A restore replays it one architectural register per
cycle into the registers named by the committed map, writing both twins.
Restoring the 32 registers therefore takes at least 32 cycles.

`recovery_ctrl` has four states: `IDLE`, `DRAIN`, `RESTORE` and `FLUSH`.

- A **commit mismatch** is handled by the policy of the current mode (see
  the first table).
- An **eager failure** (`map_fail`, `rd_fail`) enters `DRAIN`:
  1. Dispatch stops, and older instructions may still commit.
  2. Once the instruction that saw the failure is the oldest, the
     checkpoint is restored.
  3. The passive-error counter is incremented.
- A **deadlock**, or an LSQ pair that cannot be resolved, makes it
  re-execute.
- **Re-execution** is a one-cycle flush pulse. Fetch restarts at the oldest
  uncommitted instruction.
- A **restore** lasts the configured number of cycles, and at least until
  the register walk has finished.

The counters `n_reexec`, `n_restore`, `n_passive` and `n_deadlock` count
the recoveries.

## The top: `reliable_stp`

The top wires all of the above together. It holds no execution core. The
decoder, issue queues, functional units, instruction cache, branch
predictor and data memory are outside, reached through ports. One
instruction is fetched, dispatched and committed per cycle.

| group | ports | meaning |
|---|---|---|
| fetch | `ic_req`, `ic_pc`, `ic_insn`, `ic_code`, `fe_stall`, `bp_taken`, `bp_target`, `bp_code` | Cache word and code arrive in the same cycle as the request. `fe_stall` is decoder back-pressure. |
| decode | `dec_valid`, `dec_pc`, `dec_insn_orig`, `dec_insn_rep`, `fe_flush`, `core_flush` | Checked instruction pair, two cycles after fetch. `fe_flush` drops what is in the decoder. |
| dispatch | `ds_*` in, `ds_ready` out; `iss_*` out | Decoded fields in. Renamed registers, ROB, LSQ and reuse-buffer indices out, in the same cycle. |
| operands | `rd_addr`, `rd_rob`, `rd_en` in; `rd_data`, `rd_wait` out | Combinational reads with eager repair. Retry while `rd_wait`. |
| writeback | `wb_o_*`, `wb_r_*` | Original / replica result. The full register address selects the partition. `we=0` only completes the ROB entry. |
| branches | `br_*` | Resolution: `br_mispred` starts the walk-back and redirects fetch. |
| memory | `ag_*`, `mem_*`, `ld_done`, `ld_rob`, `ld_data` | Address generation per copy, one memory port, load result for both copies. |
| commit | `cm_valid`, `cm_pc`, `cm_has_dst`, `cm_dst`, `cm_data` | Architectural commit trace. |
| events | `ev_*`, `n_*` | One-cycle event flags and recovery counters. |
| fault injection | `inj_*` | XOR masks into PC copies, fetched copies, map/ROB index table, registers, ROB, LSQ. Tie to zero in use. |

Default parameters:

| parameter | value |
|---|---|
| `DATA_W` | 32 |
| `PC_W` | 32 |
| `INSN_W` | 64 |
| `NARCH` | 32 |
| `NPART` | 64 (128 physical registers) |
| `ROB_DEPTH` | 64 |
| `BRB_DEPTH` | 16 |
| `LSQ_DEPTH` | 16 |
| `NRD` (read ports) | 2 |
| `DL_SET` | 4 |
| `DL_THRESH` | 1024 |

The 32-bit data and the 16-entry reuse buffer are given by the design
description. The other sizes, all widths and all handshakes are choices
made for this implementation.

## How far it can be trusted, and where it departs

Taken from the original description:

- the error classes;
- ERR with twin registers and a single map table;
- the ROB index table with committed bits and repair from the ROB;
- status bits for passive register errors;
- the three recovery policies and their cycle costs;
- shared deadlock counters;
- the 16-entry branch reuse buffer with an overflow counter;
- duplicated PC generation;
- the replication check against the cache code;
- paired LSQ slots with a single memory access;
- the per-structure detection strengths.

Own choices and departures:

- **Single width.** One instruction per cycle, in order through dispatch
  and commit. The widths, queue sizes and pipeline depths of the base
  machine are not reproduced. The two extra front-end stages appear here as
  the two-cycle replication check.
- **Simple LSQ ordering.** The LSQ is served in order, with no forwarding.
- **No second map table.** LDCR and LDAR use the same coded structures as
  EDAR and differ only in the commit policy. Eager repair is active in all
  modes.
- **Restore length.** A restore lasts at least `NARCH` cycles because of
  the one-register-per-cycle walk. The 5- and 200-cycle figures are lower
  bounds.
- **Reuse applied at dispatch.** Branch reuse redirects at dispatch, not at
  fetch.
- **Not modelled:**
  - the issue queue itself (outside), so its code exists only as a
    constant;
  - the register-file variant with an extra register file;
  - eager repair of a walked-back ROB entry from the entry its previous
    mapping ROB index points at. The ROB code is checked at commit and on
    the map-repair query port. A corrupt entry on the correct path is
    re-executed. Upsets are injected only into the current mapping, so a
    corrupt previous mapping during a misprediction walk is not exercised;

  - floating-point registers.

## Verification

Each block has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one compares against values worked out independently and ends with a
`TB_RESULT checks=… failures=…` line. Most start with short directed
sequences that have hand-worked expectations. After those comes a long
random phase. In it, `$urandom` stimulus is checked every cycle against a
small behavioural model of the block. The random phases cover these
blocks:

- the register file;
- the rename map;
- the ROB;
- the load/store queue;
- the branch reuse buffer;
- the checkpoint;
- the deadlock monitor;
- the recovery controller.

`tb_reliable_stp` runs the top at its default parameters. Around it are
behavioural models:

- an instruction ROM with codes;
- a not-taken predictor;
- a decoder queue;
- an in-order execution core that runs each instruction's original and
  replica copy through the real register-file ports;
- a data memory.

A small test program sums a 40-element array in a loop and stores the
result. The program runs three times, once per mode. In each run the
testbench injects faults of every kind:

- a PC copy upset;
- a corrupted prediction parity;
- a fetch-copy upset;
- a corrupted cache code;
- a map-table upset;
- a register upset under a pending read;
- an upset between the original and the replica write-back;
- a ROB-entry upset, repeated at the same instruction;
- an LSQ address upset;
- a map plus ROB-index-table upset, which cannot be repaired;
- a lost instruction, which causes a deadlock.

Every commit is compared against a golden instruction-level model, and the
stored sum is checked. The testbench counts how often each mechanism fired:

- PC repair;
- prediction check and fetch hold;
- replication repair;
- refetch;
- map repair;
- register repair;
- commit-time correction (EDAR);
- LSQ repair;
- branch reuse;
- misprediction walk-back;
- checkpoint restore;
- fetch stall;
- deadlock recovery;
- the mode-specific recovery counts.

Any mechanism that never fired is a failure.

`tb_stp_mttf` runs the same surroundings with a 300-iteration loop, about
1500 instructions. It replaces the scripted faults with random single-bit
upsets at a mean time to failure of 10000, 1000 and 100 cycles per
structure. The upsets hit a PC copy, a fetched copy, live registers, the
loop's map entries, recent ROB entries and LSQ slots. Every commit must
still match the golden model. A typical run (default seed):

| mode | no errors | MTTF 10000 | MTTF 1000 | MTTF 100 |
|---|---|---|---|---|
| LDCR | 4819 cycles | +0 % | +12 % | +89 % |
| LDAR | 4819 cycles | +0 % | +0 % | +3 % |
| EDAR | 4819 cycles | +0 % | +0 % | +2 % |

The ranking, and LDCR's steep loss at high error rates, follow the
published trend. The absolute numbers do not compare with it, for three
reasons:

- the core is a one-instruction-per-cycle stand-in;
- the program is tiny;
- errors land only where this testbench aims them.

To run one testbench with plain Verilator (5.x):

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/stp_pkg.sv tb/tb_reliable_stp.sv --top-module tb_reliable_stp
./obj_dir/Vtb_reliable_stp            # add +trace for a commit/event log
```

Lint the design with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/stp_pkg.sv rtl/reliable_stp.sv`.
The remaining warnings are unused bits of shared structs and intentionally
unconnected outputs. Each module's opening comment describes its timing and
which parts are its own choices.
