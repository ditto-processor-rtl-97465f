# Ditto core: time-redundant fault detection in a superscalar pipeline

A transient fault, such as a particle strike or a supply glitch, can silently corrupt a result
anywhere in a processor pipeline. The Ditto scheme detects such faults without a second core and
without multithreading. Every instruction is run twice on the same hardware, and the two runs are
compared before the machine's state counts as correct. What makes the scheme cheap is that it
treats two classes of instruction differently:

* **Long-latency operations** (multiply, divide, memory reference) are executed twice right away,
  on the same unit, while the original is still in the reorder buffer. They commit only when both
  results agree. Waiting for a slow unit a second time after commit would clog the buffer.
* **Every instruction**, long or short, is *cloned* when it commits. The clone is re-fetched from
  the same address, re-decoded and renamed again. A short-latency clone is also re-executed. The
  re-run is compared with what the original produced. This covers fetch, decode and renaming too,
  not only the execution units.

A mismatch anywhere rolls the machine back to the last verified instruction, the same way a
branch mispredict is undone. Execution resumes from there, and the second attempt succeeds.

This repository holds synthesizable SystemVerilog for a core built on that scheme, with
self-checking testbenches for every block and for the whole core.

## The two instruction streams

```
 normal stream                                       cloned stream
 ------------                                        -------------
 F   fetch at pc, predict next pc (gshare + BTB)     CF  take next delay-buffer entry -> clone_pc
 D   decode (normal decoder)                         CD  re-fetch at clone_pc, re-decode (clone decoder),
 I   rename lookup, read operands, ALU / branch,         allocate LP-ROB entry, copy original result in
     allocate ROB entry (ALU result written here)   CR  read sources (LP-ROB copy or verified register),
 X   MUL 3 / DIV 20 / LOAD 3 cycles, out of order        CHECK 1, pop delay buffer
     -> second execution of long ops from the ROB   CX  re-execute (short-latency clones only)
 C   commit (two copies compared) -> register file  CW  CHECK 2, mark register verified, write memory
     (transient) and delay buffer                        for stores, retire LP-ROB entry
```

The normal stream is a conventional pipeline. Issue is in order, completion is out of order, and
retirement is in order through the ROB (`ditto_rob`). A long-latency instruction's entry first
becomes *done* with its first result, and dependent instructions are scheduled on that result.
The entry then carries a status meaning "ready to execute a second time". The ROB offers the
oldest such entry on its `x2_*` port. The second execution uses the same unit and takes
precedence over new issue for that unit. When the second result arrives the ROB compares it with
the first. Equal sets the entry's *verified* bit. Different raises `mismatch`.

At commit the instruction writes the register file and is appended to the delay buffer
(`ditto_delay_buffer`). The delay buffer holds the instruction address, instruction word, result,
and the data address (loads, stores) or decoded target (branches, jumps). A long-latency
instruction takes a second, consecutive entry holding the values of its source operands.

The cloned stream reads the delay buffer in order. It has its own program counter, its own half
of fetch (second read port of `ditto_imem`) and its own decoder instance. Clones go into the
LP-ROB (`ditto_lp_rob`). That is the part of the 128-entry reorder buffer set aside for clones:
16 entries, leaving 112 for the normal stream. Each LP-ROB entry receives the original result,
copied out of the delay buffer.

That copy is what lets clones run without hazards. If a clone's source register was written by
an older clone that is still in the LP-ROB, it takes that entry's copied result. Otherwise it
reads the register's *verified* value. Either way the value is available at once, so the clone
pipeline never stalls on data.

## The two checks

| check | where | compares | catches |
|---|---|---|---|
| 1 | after clone register read (CR) | re-fetched instruction word vs. stored word; decoded branch/jump target vs. stored target; long-latency class; for long-latency clones, source values read vs. stored operand entry | faults in fetch or decode of either copy; faults in renaming or register read of long-latency instructions |
| 2 | after clone execution (CW) | clone result vs. original result; next PC for branches and jumps; data address for loads and stores | faults in an execution unit, in bypassing, or in renaming of short-latency instructions |
| dup | ROB, second completion | second vs. first execution of MUL / DIVU / LW | faults in long-latency units |
| commit | commit stage | two copies of the commit logic (`ditto_commit`) | faults in commit itself, which nothing downstream could see |

A long-latency clone that passes check 1 is finished: it is not executed a second time. A load or
store clone recomputes only its address (a short operation) and drops the memory access. The
verify logic (`ditto_verify`) holds both comparators.

The delay-buffer words pass through a SECDED code (`ditto_secded`, Hamming (39,32) plus overall
parity) on their way into the LP-ROB. A flipped stored bit is therefore corrected rather than
reported as a fault. An uncorrectable word is treated as a detected fault.

## Register state: transient and verified

Each architecture register (`ditto_arf`) has a status. A commit writes the value and makes it
*transient*. When the clone of that instruction is verified, the value becomes *verified*. The
normal stream treats both states as ready.

To let a rollback undo transient values, each register also keeps its last verified value. The
clone stream writes that value, and it verifies strictly in program order. A per-register count
of commits not yet verified gives the status bit.

Recovery works in three steps:

1. A fault is detected in cycle *t*.
2. In cycle *t+1* the core raises `flush`. This empties every pipeline register, the ROB, LP-ROB,
   delay buffer, rename table and unit pipelines. Every register goes back to its verified value.
   Fetch is loaded with `verified_pc`, the address after the last verified instruction.
3. In cycle *t+2* fetch resumes.

That is a two-cycle detection-and-recovery penalty. Because only verified clones write the
verified state, after recovery the number of verified instructions equals the program's
instruction count exactly. The end-to-end tests check this.

## Memory

Stores write data memory only when their clone is verified. Memory therefore always matches the
verified register state, and a rollback never has to undo a store. The cost: a load waits at
issue while any store is in flight or unverified (`stall_store_order`).

The load's memory access is the long-latency part. It is done twice, and the second access reads
the address recorded in the ROB. The memories (`ditto_imem`, `ditto_dmem`) stand in for the
16 KB L1 caches. They always hit: combinational instruction read, 3-cycle pipelined data read.
Levels behind them are not modelled.

## Top-level interface (`ditto_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `imem_we`, `imem_waddr`, `imem_wdata` | in | load the program (byte addresses) |
| `inj_valid`, `inj_site`, `inj_mask` | in | arm one fault: XOR `inj_mask` into the next value passing `inj_site` |
| `halted` | out | the clone of a `HALT` has been verified |
| `ev` | out | `ditto_events_t`: one-cycle pulses for commit, verify, second execution, mispredict redirect, correctly predicted taken branch, clone bypass, ECC correction, each error kind, rollback, and each stall kind |
| `dmem_dbg_addr` / `dmem_dbg_data` | in/out | read data memory |
| `arf_dbg_addr` / `arf_dbg_data`, `arf_dbg_vdata` | in/out | read a register's committed and verified values |
| `arf_transient` | out | transient status of all 32 registers |

Fault sites (`inj_site_e`): `INJ_FETCH` (normal instruction word), `INJ_ALU` (normal ALU result),
`INJ_MUL` (first multiply result), `INJ_CLONE_SRC` (long-latency clone's source A),
`INJ_CLONE_ALU` (clone ALU result), `INJ_COMMIT` (second commit copy), `INJ_DB` (one stored bit
of the delay buffer).

Parameters, with defaults from the reference configuration:

| parameter | default | meaning |
|---|---|---|
| `ROB_ENTRIES` | 128 | whole reorder buffer; the normal region is `ROB_ENTRIES - LP_ROB_ENTRIES` |
| `LP_ROB_ENTRIES` | 16 | clone region (10 % of the ROB) |
| `DB_ENTRIES` | 128 | delay buffer |
| `IMEM_WORDS`, `DMEM_WORDS` | 4096 | 16 KB each |
| `MUL_LAT`, `DIV_LAT`, `LOAD_LAT` | 3, 20, 3 | unit latencies (`DIV_LAT` at least 17) |
| `BP_PHT_ENTRIES` | 64 | gshare counters (power of two) |
| `BP_BTB_ENTRIES`, `BP_BTB_WAYS` | 8192, 8 | branch target buffer size and associativity |

## Instruction set

The core implements a 32-bit MIPS-like subset with MIPS encodings:

* R-type: `ADDU`, `SUBU`, `AND`, `OR`, `XOR`, `SLT`.
* Immediate: `ADDIU`, `ANDI`, `ORI`, `LUI`.
* Memory: `LW`, `SW`.
* Control: `BEQ`, `BNE`, `J`.

On top of that come three of this design's own encodings. `MUL rd,rs,rt` (funct 0x18) and
`DIVU rd,rs,rt` (funct 0x1B) write `rd` directly, with no HI/LO. `HALT` is opcode 0x3F. Branches
have no delay slot. Unknown encodings execute as no-ops. `ditto_pkg` has encoder functions
(`enc_r`, `enc_i`, `enc_j`).

## Files

| file | block |
|---|---|
| `rtl/ditto_pkg.sv` | types, opcodes, entry records, event and fault-site types |
| `rtl/ditto_top.sv` | the core: both streams, arbitration, rollback |
| `rtl/ditto_fetch.sv` | normal and clone program counters |
| `rtl/ditto_bpred.sv` | gshare direction predictor and branch target buffer |
| `rtl/ditto_decoder.sv` | decoder (instantiated once per stream) |
| `rtl/ditto_rename.sv` | normal-stream register-to-ROB map |
| `rtl/ditto_rob.sv` | normal ROB region with double-execution status and compare |
| `rtl/ditto_lp_rob.sv` | clone ROB region with clone renaming |
| `rtl/ditto_delay_buffer.sv` | committed-instruction queue, ECC-protected |
| `rtl/ditto_secded.sv` | SECDED encoder / decoder |
| `rtl/ditto_arf.sv` | register file with transient / verified status |
| `rtl/ditto_commit.sv` | commit decision (two instances in the top) |
| `rtl/ditto_verify.sv` | check 1 and check 2 |
| `rtl/ditto_alu.sv`, `ditto_mul.sv`, `ditto_div.sv` | execution units |
| `rtl/ditto_imem.sv`, `ditto_dmem.sv` | always-hit memories |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_ditto_top.sv` | whole core at small buffer sizes, with faults |
| `tb/tb_ditto_top_full.sv` | whole core at default sizes, with faults |
| `tb/tb_ditto_top_lat.sv` | whole core with a 6-cycle data-memory latency, with faults |
| `tb/tb_ditto_prog_pkg.sv` | test program and reference instruction-set model |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself, with a watchdog. With
Verilator 5, from the repository root:

```
verilator --binary --timing --assert --top-module tb_ditto_top_full \
    rtl/ditto_pkg.sv tb/tb_ditto_prog_pkg.sv $(ls rtl/*.sv | grep -v ditto_pkg) \
    tb/tb_ditto_top_full.sv -Wno-fatal
./obj_dir/Vtb_ditto_top_full
```

Replace the top-module name and the last file to run any other testbench.

The end-to-end tests run a 20-iteration loop built on multiply, subtract, load, add and branch,
with stores, divides, logic operations and jumps added: 354 dynamic instructions. During the run
one fault is injected at each of the seven sites. The tests compare all registers (committed and
verified copies) and every stored memory word against the reference model. They also check that
the verified count equals the instruction count, that detection is followed by the flush exactly
one cycle later, and that every error kind and stall occurred.

Typical output at default sizes: about 2,330 cycles, 6 rollbacks and 1 ECC correction. With
`LOAD_LAT=6` the same run takes about 2,500 cycles. The
reduced-size test (`ROB_ENTRIES=12`, `LP_ROB_ENTRIES=2`, `DB_ENTRIES=4`) also makes the
ROB-full, delay-buffer-full and LP-ROB-full stalls happen.

## How far this follows the reference microarchitecture

These parts follow the scheme as described:

* the split into long- and short-latency verification paths;
* the delay buffer contents, including the operand entry for long-latency instructions;
* the second program counter and the split fetch/decode;
* the LP-ROB carved out of a 128-entry ROB (16 entries) and clone renaming from copied results;
* the long-latency bit, the "ready for second execution" status and the verify bit;
* both checking mechanisms and what each compares;
* transient / verified register status and flushing of transient values;
* duplicated commit logic;
* ECC on the delay-buffer-to-LP-ROB copy;
* the unit latencies, the predictor sizes and the two-cycle recovery penalty.

These are this implementation's own choices:

* **Width.** One instruction per cycle per stream, with in-order issue. The reference machine
  fetches, decodes, issues and commits 8 per cycle (4 fetch/decode slots per stream) and issues
  out of order.
* **Front end.** The gshare table (64 two-bit counters) and the 8192-entry, 8-way branch target
  buffer have the reference sizes. Branches and jumps resolve at issue. A resolved next address
  that differs from the predicted one redirects fetch. The predictor is trained at issue, and
  the BTB replaces round-robin.
* **No load/store queue.** Loads are ordered by waiting for all older stores to be verified.
  Stores write memory at verification.
* **Rollback.** Every fault squashes everything in flight and restarts after the last verified
  instruction. A more selective squash, keeping older instructions that are known good, is
  possible but not built.
* **Verified copy.** Each register keeps a verified copy so that a flush has a value to restore.
* **No floating point**, and no L2 or main memory. The L1 caches are always-hit memories.
* **Fault injection.** The `inj_*` port exists for testing the checks. It is not part of the
  scheme.
