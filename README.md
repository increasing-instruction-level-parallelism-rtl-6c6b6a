# Instruction precomputation unit

Programs repeat the same arithmetic again and again: the same opcode applied to
the same operand values, for example a loop induction variable initialised and
stepped identically on every pass of an outer loop. Dynamic value reuse caches
such computations in a table that is updated and replaced while the program
runs. *Instruction precomputation* drops the dynamic part. A profiling run
finds the arithmetic computations that are executed most often (or that have
the largest frequency x latency product). Before the program starts, they are
written with their results into a **precomputation table (PT)**, and the table
is then left alone. While the program runs, any instruction whose opcode and
operand values match a PT entry can take its result from the table instead of
executing. Because nothing is written at run time, the table needs no update
ports, no replacement logic and no replacement state.

This repository holds synthesizable SystemVerilog for that unit, as it would
sit in a 4-wide out-of-order core: a 2048-entry PT, and the logic that
consults it in the dispatch and issue stages.

## Where an instruction meets the table

An arithmetic instruction can hit in the PT at two points of the pipeline. The
rules differ between them, and this is the part of the design most worth
understanding.

**Dispatch** (`pt_dispatch_check`). Up to four instructions are dispatched per
cycle. Each one that is arithmetic and already has both operand values is
looked up. On a hit the instruction is finished at this point. The core writes
the PT result as its result, marks it complete in the instruction window, and
never sends it to a functional unit; it only waits for in-order commit.
Dependent instructions can use the value at once. On a miss, or if an operand
is not yet known, the instruction goes on as usual.

**Issue** (`pt_issue_select`). Up to four ready instructions are offered per
cycle, oldest first. For each one, in that order:

1. If a functional unit of its class is free, the instruction takes it and
   executes normally, **even if it would hit in the PT**.
2. Otherwise, if it is arithmetic and hits in the PT, it takes the PT result
   and leaves the pipeline without a unit.
3. Otherwise it stays in the window and is offered again later.

So at issue the PT is a way past a structural hazard, not a replacement for
execution. An instruction that missed at dispatch only because its operands
were not ready gets its lookup here.

The outcome of each slot is reported as `issue_act_e`:
`ISSUE_FU` (execute), `ISSUE_PT` (result from the table) or `ISSUE_WAIT`.

## The precomputation table

`pt_table` stores entries of 200 bits each: an 8-bit opcode, two 64-bit
operand values and a 64-bit result. With 2048 entries that is 409,600
storage bits, plus one valid bit per entry and a fill counter per set.

*Lookup.* A key (opcode, op1, op2) hits only if all three fields are equal to
those of a valid entry. The hit flag and result come back combinationally, in
the same cycle. There are 8 lookup ports: 0-3 serve dispatch and 4-7 serve
issue.

*Organisation.* The table is indexed by the operand values. The set index is
an XOR fold of op1, of op2 shifted by one bit, and of the opcode, down to
log2(ENTRIES/WAYS) bits. Each set holds `WAYS` (default 8) entries, and all
of them are compared in parallel. Setting `WAYS = ENTRIES` makes the table
fully associative.

*Loading.* There is one load port, which writes one entry per cycle into the
next free way of the entry's set. Two loads are refused:

- A load into a full set is dropped (`ld_drop`).
- A load of a key that is already stored is ignored (`ld_dup`).

This guarantees that at most one way can match a lookup, which an assertion
checks. The loader is expected to write candidates in decreasing order of
frequency, so when a set overflows the better candidates are already in it.
The loader should keep going until `n_loaded` reaches `ENTRIES` or it runs out
of candidates. The table then holds the most valuable computations *that fit
its sets*. With a set-associative table this is not always exactly the top
2048. In the full-size test, 35 of about 1,370 candidates were dropped. If
that loss matters, raise `WAYS`.

*No run-time change.* Nothing but a load in load mode writes an entry. `flush`
(or reset) clears all valid bits, for a new program or a context switch.

## The unit and its interface (`ip_unit`, the top)

`ip_unit` instantiates the table, the dispatch check and the issue check. Its
ports are plain signals and arrays of the structs in `ip_pkg`.

| group | ports | notes |
|---|---|---|
| control | `clk`, `rst_n` (async, active low), `loading`, `flush` | |
| load port | `ld_valid`, `ld_entry`, `ld_accept`, `ld_drop`, `ld_dup`, `n_loaded` | active only while `loading` is high |
| dispatch | `disp_slot[4]` in; `disp_pt_done[4]`, `disp_pt_result[4]` out | `disp_slot_t`: valid, is_arith, op1_ready, op2_ready, key |
| issue | `iss_slot[4]`, `fu_free[5]` in; `iss_act[4]`, `iss_pt_result[4]` out | `iss_slot_t`: valid, is_arith, unit class, key; slot 0 oldest |

**Load mode.** While `loading` is high, the load port works and no lookup can
hit. While it is low, the program runs: lookups are answered and the load port
is ignored.

**Timing.** Loads and flushes take effect at the clock edge. Dispatch and issue
answers are combinational: inputs and outputs belong to the same cycle, and
the core registers them in its own pipeline.

**Free units.** `fu_free[c]` is the number of idle units of class `c` this
cycle. The classes follow the base machine: integer ALU (2 units), integer
multiply/divide (1), FP ALU (2), FP multiply/divide (1) and memory port (2).

**Outside this unit.** The rest of the core is not part of this RTL: the
64-entry instruction window, the 32-entry load/store queue, the functional
units, commit, the caches and the branch predictor. Neither is the profiler,
which is an offline software step. The testbenches model what they need of
these.

## Parameters

| parameter | default | where from |
|---|---|---|
| `ENTRIES` (ip_unit, pt_table) | 2048 | the main configuration of the technique |
| `W` (ip_unit, checks) | 4 | 4-way issue machine; dispatch taken to be as wide |
| `WAYS` (ip_unit, pt_table) | 8 | own choice |
| `NPORTS` (pt_table) | 8 = 2 x W | own choice: one per dispatch and issue slot |
| `OPC_W`, `DATA_W` (ip_pkg) | 8, 64 | own choice: 64 bits holds a double; integers are zero-extended |

`ENTRIES / WAYS` must be a power of two. Smaller tables (16, 32 or 256
entries) are the same RTL with `ENTRIES` changed.

## What follows the technique and what is this design's own

These follow the technique as described:

- The key is opcode plus operand values.
- Only arithmetic instructions use the table.
- The table is filled before the run and never updated or replaced.
- The table is checked at both dispatch and issue.
- A hit at dispatch removes the instruction.
- At issue, the PT result is used only when no unit is free.
- Sizes: 2048 entries, a 4-wide machine, and the functional-unit mix.

These are this design's own choices:

- The widths of the fields.
- The hash, the set associativity and the drop/duplicate rules of the load
  port.
- The load mode and the flush input.
- The combinational (same-cycle) lookup and a storage array of flip-flops
  rather than an SRAM macro.
- The dispatch lookup waits until both operands are known.
- Issue picks oldest first.
- The form of the free-unit interface.

## Verification

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_pt_table`: a 32-entry, 2-way table under random loads (accepted,
  dropped, duplicate) and random lookups on 4 ports, checked against a
  reference model. Every stored key is also looked up with two bits of one
  field flipped, landing in the same set, to prove the full key is compared.
  The test also covers flush and reload.
- `tb_pt_dispatch_check`, `tb_pt_issue_select`: random slot groups, random PT
  answers and random free-unit counts, with every output compared to the
  rules above.
- `tb_ip_unit`: end to end at the default size (2048 entries, 8 ways, W = 4).
  It profiles a synthetic 24,000-instruction trace ("input A") and loads its
  most frequent computations. It then runs a second trace ("input B") through
  a cycle-level core model (4-wide dispatch, 64-entry window, oldest-first
  issue, the base unit mix with latencies 1/3/2/4/1). Finally it flushes and
  runs B again without the table. Every hit and result is checked, and so is
  a positive speedup. Each mechanism must occur at least once: accepted,
  dropped and duplicate loads, a lookup blocked in load mode, a dispatch hit
  and miss, a free unit chosen despite a hit, a PT result at issue, a wait,
  and a flush.
- `tb_ip_table_sizes`: the same kind of run with 16-, 32-, 256- and
  2048-entry units side by side (harness `tb/ip_size_run.sv`). Each size is
  built twice. One copy is filled by frequency, the other by frequency x
  latency (F/LP). Each copy is profiled on input A and run on A and on B. The
  testbench requires a speedup for every size, selection and input.

The synthetic program is 25% loads, 45% one-off arithmetic and 30% drawn from
4,000 recurring computations. This gives the stored computations a share of
the instructions similar to what profiles of real integer programs show. The
cycle counts come from a simple core model, not from a detailed simulator, so
they only show that the mechanism works. One run gave these speedups:

| entries | stored | by frequency, run A | by frequency, run B | by F/LP, run A | by F/LP, run B |
|---|---|---|---|---|---|
| 16 | 16 | 2.4% | 2.5% | 4.8% | 4.0% |
| 32 | 32 | 4.8% | 4.0% | 9.1% | 6.7% |
| 256 | 256 | 21.9% | 15.2% | 34.9% | 28.8% |
| 2048 | 776 | 45.7% | 41.6% | 45.7% | 41.6% |

The 2048-entry unit stores only 776 entries here because the short trace has
no more recurring computations, so both selections store the same set. The
speedups are larger than one would expect on real programs. The model has no
dependency chains between instructions and is mostly limited by its two
integer ALUs, which a PT hit bypasses. F/LP selection gains at small sizes
because it favours the multi-cycle multiply and FP operations.

## Simulating

Every file holds one module or package, named after the file. `rtl/ip_pkg.sv`
must be read first. For example, with Verilator 5:

    verilator --binary --timing --assert --top-module tb_ip_unit \
        -y rtl -y tb +libext+.sv rtl/ip_pkg.sv tb/tb_ip_unit.sv
    ./obj_dir/Vtb_ip_unit

Replace `tb_ip_unit` with any other `tb_*` module to run that testbench. The
full-size run takes well under a second.

Lint the RTL with:

    verilator --lint-only -Wall -y rtl +libext+.sv rtl/ip_pkg.sv rtl/ip_unit.sv

This is clean for the top. Linted alone, `pt_table` and `pt_dispatch_check`
warn that they do not use some constants of the package; those warnings are
harmless.

## Files

- `rtl/ip_pkg.sv`: types (key, entry, lookup request/response, slots, unit
  classes, issue actions) and widths.
- `rtl/pt_table.sv`: the precomputation table.
- `rtl/pt_dispatch_check.sv`: the dispatch-stage check.
- `rtl/pt_issue_select.sv`: issue-stage unit selection with the PT fallback.
- `rtl/ip_unit.sv`: the top.
- `tb/`: the testbenches listed above and the `ip_size_run` harness.
