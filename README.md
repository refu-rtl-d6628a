# REFU — redundant execution on idle ALU functional units

REFU detects transient faults (single-event upsets) in the ALUs of a GPGPU's
streaming processors (SPs) without duplicating the ALU. Memories in a modern GPU
are already covered by parity or ECC; the arithmetic logic is not. REFU relies on
the fact that the ALU of an SP is really a set of independent sub functional
units (comparator, shifter, adder/subtractor, multiplier, logic unit, data
converter) and that a stream of instructions keeps only one or two of them busy
at a time. Every ALU instruction is therefore executed twice: once normally (the
*primary* execution), and once more later (the *redundant* re-execution) on the
same kind of unit whenever that unit is idle. Between the two executions the
instruction waits in a small **replay buffer** together with its operands, its
result and its flags. When the re-execution finishes, the two results are
compared; a difference raises a fault signal carrying the warp ID, so that the
warp can be restarted from a checkpoint.

This repository holds synthesizable SystemVerilog for the execution stage of one
streaming multiprocessor (SM) with REFU: the split ALU, the replay buffer, the
stall and re-execution control, the comparators, an SP that ties them together,
and an SM top with two SPs. The rest of the GPU (fetch, decode, scheduler,
register file, SFU, load/store unit, caches, checkpoint recovery) is not part of
it; the top's ports take and return what those parts would exchange with it.

## Life of an ALU instruction

1. The issue logic offers `{warp_id, op, a, b}` to an SP. The operands are
   already read from the register file, so the dependencies are resolved.
2. The SP starts the instruction on the sub functional unit that executes its
   type (`op_fu()` in `refu_pkg`). Units are not pipelined: an ADD or a compare
   keeps its unit for 2 cycles, a multiply for 3.
3. When the primary execution ends, the result is written back to the
   register file right away (`wb_*`), and at the same time the instruction is
   stored in the replay buffer: warp ID, instruction type, both operands,
   result, flags, *valid* = 1, *re-execute* = 0. Write-back does not wait for
   verification; a detected fault is handled by recovery.
4. Some cycles later the stall controller starts the re-execution on an idle
   unit of the right kind, using the stored operands and type, and sets the
   entry's re-execute bit so the location cannot be reused.
5. When the re-execution ends, its result and flags are compared with the
   stored ones. The entry is retired (valid and re-execute cleared). A
   mismatch produces a one-cycle `fault` pulse with the warp ID.

MOV and NOP do not use an ALU unit. They are executed without a unit (MOV
writes its operand back one cycle later) and are never stored or re-executed.

## Who gets a unit: the arbitration rules

This is the part that decides both the cost and the correctness of REFU, and
it lives in `refu_stall_ctrl`. Every cycle:

* **One primary at a time.** An SP holds one primary instruction; the next is
  taken in the cycle after the previous one's result was written. (This matches
  the in-order SP assumed throughout; REFU's gain comes from overlapping the
  primary stream with re-executions, not primaries with each other.)
* **Re-execution uses idle units.** A waiting buffer entry starts on its unit
  when that unit is idle and the primary instruction does not want it in this
  cycle.
* **A full buffer takes priority.** If the buffer is full, a waiting entry gets
  its unit even if the primary instruction wants it; the primary instruction
  stalls (`ev_stall_rb_full`).
* **Busy unit stalls the primary** (`ev_stall_fu_busy`), whether the unit is
  busy with another re-execution or its result is still waiting.
* **No deadlock.** With a full buffer the primary also stalls while a waiting
  entry needs its unit. Otherwise a primary could finish, find no free buffer
  location, hold its unit while waiting, and block the very re-execution that
  would free a location. A primary that starts while the buffer is full can
  still have to wait for a location at its end (`ev_wait_rb_space`), but only
  behind re-executions that are already running.
* At most one re-execution starts per cycle; the lowest buffer location wins.

With a one-entry buffer these rules give the following schedule for the stream
ADD, MOV, SUB, MUL, MOV, CMP, ADD, ADD (M = primary, R = re-execution; cycle
numbers count from the first ADD). `tb_refu_sp` checks it cycle by cycle.

| cycle | ADD/SUB unit | ML unit | COMP unit | taken from the pipeline |
|------:|--------------|---------|-----------|--------------------------|
| 0–1   | ADD M        |         |           | ADD (0)                  |
| 2–3   | ADD R        |         |           | MOV (2); SUB waits for the unit |
| 4–5   | SUB M        |         |           | SUB (4)                  |
| 6–7   | SUB R        | MUL M (6–8) |       | MUL (6)                  |
| 9–11  |              | MUL R   | CMP M (10–11) | MOV (9), CMP (10)    |
| 12–13 | ADD M        |         | CMP R     | ADD (12)                 |
| 14–15 | ADD R        |         |           | second ADD stalls: buffer full, its entry needs the unit |
| 16–17 | ADD M        |         |           | ADD (16)                 |
| 18–19 | ADD R        |         |           |                          |

Without re-execution, under the same one-primary-at-a-time rule, the last ADD
would be taken in cycle 13 instead of 16. At cycle
11 the CMP result is stored although the buffer is full, because MUL R retires
in the same cycle: a location being retired counts as free.

## The replay buffer entry

| field      | bits | protection                                   |
|------------|-----:|----------------------------------------------|
| warp ID    | 6    | parity                                       |
| instruction type | 5 | re-execution (a flip changes the operation) |
| operand a, b | 32 + 32 | re-execution                           |
| result     | 32   | comparison                                   |
| flags Z N C V | 4 | comparison                                   |
| valid      | 1    | parity                                       |
| re-execute | 1    | parity                                       |
| parity     | 1    | even parity over warp ID, valid, re-execute  |

An upset in the data fields shows up as a mismatch when the entry is
re-executed (an upset of an operand bit that does not change the result is
harmless and goes unseen). The three control fields cannot be checked that
way, so they carry a parity bit that is checked on every location in every
cycle. Start and retire update the parity incrementally, so an upset stays
visible (`parity_err`, a level) until the location is written with a new
entry. The SM `fault` output includes parity errors.

## Modules

All shared types are in `rtl/refu_pkg.sv` (`op_e`, `fu_e`, `flags_t`,
`issue_t`, `rb_entry_t`, `op_fu()`, `fu_latency()`, `rb_parity()`).

| module | role |
|--------|------|
| `refu_fu` | one sub functional unit (`FU` = COMP, SHF, ADDSUB, ML, LU, ICON), multi-cycle, holds its result until accepted |
| `refu_alu` | the six units; a primary and a redundant start port, per-unit result ports |
| `refu_replay_buffer` | `DEPTH` entries, lowest-free allocation, parity check |
| `refu_stall_ctrl` | the arbitration rules above (combinational) |
| `refu_compare` | stored vs. re-executed result and flags, registered fault pulse |
| `refu_sp` | one SP: ALU + buffer + control + one comparator per unit |
| `refu_sm_exec` | top: `N_SP` SPs and the merged SM fault signal |

Instruction types: ADD, SUB (ADD/SUB unit); MUL (low word), MULHU (ML);
CMPEQ, CMPLT, CMPLTU, MIN, MAX (COMP); SHL, SHR, SRA (SHF); AND, OR, XOR,
NOT (LU); SEXT8, SEXT16, ZEXT8, ZEXT16 (ICON, data conversion); MOV, NOP (no
unit). The data path is 32 bits. A compare writes 1 or 0 and sets C and V from
a − b; Z and N always describe the result.

### Top-level interface (`refu_sm_exec`)

Per SP `p`: `issue_valid[p]`, `issue[p]` (`issue_t`), `issue_ready[p]` — a
valid/ready handshake, the instruction is taken at a rising edge with both
high. `wb_valid[p]`, `wb_warp[p]`, `wb_op[p]`, `wb_result[p]`, `wb_flags[p]` —
one-cycle write-back pulse, in issue order, the cycle after the result leaves
its unit. `fault`/`fault_warp` — SM fault (mismatch on any SP/unit, or any
parity error) with the warp of the lowest-numbered SP and unit that
mismatched; `sp_fault`, `sp_checked`, `sp_parity_err` give the detail.
`ev_*`, `rb_count`, `idle` are for monitoring. Reset `rst_n` is asynchronous,
active low, and empties everything.

### Test-only fault ports

`inj_mask[p][f]` is XORed into unit `f`'s result while it presents it (a
transient fault in the unit); `rb_inj_en/slot/bit` flips one stored bit of a
replay buffer entry. Tie all of them to zero in a real design; they exist so
the detection can be tested.

## Parameters

| parameter | default | meaning |
|-----------|--------:|---------|
| `N_SP` (`refu_sm_exec`) | 2 | SP units per SM, as in the evaluated GTX480-class configuration |
| `DEPTH` (`refu_sm_exec`, `refu_sp`, `refu_replay_buffer`) | 4 | replay buffer entries; sizes 1 to 4 were evaluated, 4 is the default |
| `DATA_W`, `MAX_WARPS` (`refu_pkg`) | 32, 48 | data width; warps per SM (warp ID 6 bits) |
| `LATENCY` (`refu_fu`) | 3 for ML, else 2 | unit occupancy in cycles (must be ≥ 2) |

## Cost against buffer size

`tb_refu_rb_sizes` runs the same 3000-instruction streams through SPs with 1,
2, 3 and 4 buffer entries and compares the cycle count with that of the stream
without re-execution. One run gave:

| mix | 1 entry | 2 entries | 3 entries | 4 entries |
|-----|--------:|----------:|----------:|----------:|
| 7/8 ALU instructions | 83.7 % | 91.8 % | 96.7 % | 97.9 % |
| 1/2 ALU instructions | 91.5 % | 96.3 % | 98.0 % | 98.2 % |

(throughput relative to no re-execution). These are synthetic instruction mixes
for one SP, not GPU benchmarks: full programs run on a whole GPU, with memory
stalls that leave far more idle unit cycles, lose less (the published
evaluation of this scheme reports about 2 % mean performance loss). The trend
— one entry is clearly worse, the gain flattens after three — is the same.

## Where this RTL departs from, or stops short of, the scheme

* **One scalar lane per SP.** A real SP unit is a SIMD pipeline over many
  threads of a warp. Here each SP is one 32-bit datapath with its own replay
  buffer; a wider unit would replicate the SP per lane or widen the entry.
* **No SFU path.** The scheme draws the special function unit with the same
  arrangement as the SP: its own replay buffer, re-execution and comparator.
  The SFU's operations, formats and latencies are not specified, so no SFU is
  built here. `refu_replay_buffer` and `refu_compare` are written to be reused
  around one. MOV, NOP and loads/stores are not re-executed at all; they rely
  on the parity of the register file and memories.
* **No recovery.** The design ends at the fault signal. Re-executing the warp
  from a checkpoint, and the parity/PC checks in the rest of the pipeline, are
  outside it. The decoder remains unprotected, as in the original scheme.
* **Own choices**, not fixed by the scheme: the instruction set and encoding,
  the flags, 2-cycle occupancy of SHF, LU and ICON, the handshakes, registered
  write-back, lowest-location-first re-execution, one re-execution start per
  cycle, the deadlock rule, and the per-unit comparators. The per-unit
  comparators and per-unit result ports exist because a primary and a
  re-execution, or two re-executions, can finish in the same cycle.
* **Same-fault blindness.** Like any time redundancy on the same unit, a
  permanent fault that corrupts both executions identically is not detected.

## Simulating

Every testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. Run from the repository root, e.g.:

```
verilator --binary --timing --assert --top-module tb_refu_sm_exec \
  -y rtl -y tb +libext+.sv rtl/refu_pkg.sv tb/refu_tb_ref.sv tb/tb_refu_sm_exec.sv \
  --Mdir obj -o sim && ./obj/sim
```

| testbench | what it covers |
|-----------|----------------|
| `tb_refu_fu` | every operation of all six units vs. a reference model, occupancy, hold, tag, fault mask |
| `tb_refu_alu` | a primary and a redundant operation side by side on random pairs of units |
| `tb_refu_replay_buffer` | random write/start/retire against a model; write into a full buffer while an entry retires; parity on upsets |
| `tb_refu_compare` | match, result-bit and flag-bit mismatches, pulse timing |
| `tb_refu_stall_ctrl` | each arbitration rule, then 20 000 random states against a model |
| `tb_refu_sp` | the one-entry schedule above cycle by cycle; random streams; injected unit and buffer faults each detected once with the right warp; parity |
| `tb_refu_sm_exec` | the top at its defaults: two SPs, 16 000 instructions, fault-free and fault-injection phases; counts re-executions, overlap, both stall causes, MOV/NOP bypass, fault and parity detection, and fails if one never happened |
| `tb_refu_rb_sizes` | buffer sizes 1–4 on two instruction mixes (table above) |

`tb/refu_tb_ref.sv` is the testbench package with the reference model of the
operations (64-bit integer arithmetic, written independently of the RTL). The
simulator used has two-state semantics; all state is reset, so the results do
not depend on initial values.
