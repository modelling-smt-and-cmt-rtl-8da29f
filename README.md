# AC-P2: a dual-core pipelined SPM processor

AC-P2 is a chip-level multithreaded (multi-core) processor in its simplest
form. It has two copies of a small four-stage pipeline, AC-P. The two copies
share one program memory and one data memory, and nothing else. Each core
executes SPM, a five-instruction RISC instruction set. To software, each core
is a separate SPM processor running on its own instruction clock: the clock
ticks once for every instruction the core commits. The cores communicate only
through the shared data memory. So when a store from one core becomes visible
to a load on the other depends on the pipelines' timing: their stalls and
branch refills. That makes the implementation's timing part of what a program
can observe. The RTL is built to make that timing exact and easy to inspect:
every core tells you, in each cycle, which refill state it is in and how many
cycles remain until its next commit.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). The default size
is 16-bit words, 8-bit addresses (256-word memories) and 8 registers per core.

## The SPM instruction set

The architectural state of one core is a program counter `pc` and a register
file `r[0..7]`. The program memory `pm` and the data memory `dm` are shared.

| instruction        | effect                                          |
|--------------------|-------------------------------------------------|
| `add ra rb rc`     | `r[rc] = r[ra] + r[rb]; pc = pc + 1`            |
| `branch addr`      | `if r[0] == 0: pc = pc + addr else pc = pc + 1` |
| `load ra addr`     | `r[ra] = dm[addr]; pc = pc + 1`                 |
| `store ra addr`    | `dm[addr] = r[ra]; pc = pc + 1`                 |
| `set ra val`       | `r[ra] = zero-extended val; pc = pc + 1`        |

The only conditional is `branch`, which tests `r0`. Its offset is added to
the branch's own address, modulo 256, so `branch -1` jumps back one word. A
branch with offset 0 and `r0 = 0` loops on itself, which serves as a halt.

Encoding (16 bits):

```
 15   13 12  10 9  8 7                0
+-------+------+----+------------------+
|  op   |  ra  | -- |  addr / value    |      rb = [5:3], rc = [2:0]
+-------+------+----+------------------+
op: add 0, branch 1, load 2, store 3, set 4 (5..7 execute as a no-op)
```

The address/immediate field overlaps `rb` and `rc`, since no instruction
needs both. `spm_pkg` has `enc()` and `enc_add()` to build instruction words.

## One pipeline (`acp_pipeline`)

```
            pm                              dm (shared)
            |                                ^   |
   +--------v-+   +--------+   +-------------+---v---+
   |  fetch   |-->| decode |-->|  execute            |--> registers (commit)
   | ir, fpc  |   | fields |   | result,dest,unit,ctr|--> pc        (commit)
   +----------+   +--------+   +---------------------+--> dm store  (commit)
        ^              ^            |      ^
        +---- hold ----+---- conflict -----+
        +---- branch target (unit = pc) ---+
```

Fetch holds the instruction register `ir` and the fetch pc `fpc`. Decode
splits `ir` into its fields. Execute computes the instruction. The result is
committed at the next clock edge: the register file, the program counter and
the data memory each take it from the execute unit's state. Both memories are
read combinationally in the cycle that needs them: fetch reads `pm`, and
execute reads `dm` for loads.

### The execute unit's state, and the refill states

The execute unit holds four fields:

* `result`: the value to commit.
* `dest`: where the result goes. This is a register index, a data address or
  a branch target.
* `unit`: what the commit does.
  * `reg`: write a register.
  * `dmem`: write the data memory.
  * `pc`: jump to a taken branch's target.
  * `incpc`: just advance pc, for a branch that is not taken.
  * `wait`: nothing to commit.
* `ctr`: a 2-bit counter that brings the pipeline back to full after a branch
  or a flush.

Every cycle, the unit does one of three things:

1. `ctr = 0` and no conflict: execute the decoded instruction.
2. `ctr = 0` with a conflict: load `unit = wait` (one bubble).
3. `ctr > 0`: load `unit = wait` and `ctr - 1`.

A taken branch loads `(result, target, pc, 2)`. In the next cycle pc jumps,
and fetch reads the target. The counter then runs 2 → 1 → 0 while the
target travels through fetch and decode. The two instructions fetched after
the branch are discarded, because they reach execute while `ctr > 0`. Reset
and flush load `(wait, 2)`, and the same countdown refills the pipeline.

The pipeline is therefore always in one of four states. `pipe_state_monitor`
reports the state on `pstate` and the cycles until the next commit on `dur`:

| state          | execute unit          | cycles to next commit (`dur`) |
|----------------|-----------------------|-------------------------------|
| full           | `unit != wait`        | 1                             |
| after conflict | `unit = wait, ctr = 0`| 2                             |
| after branch   | `unit = wait, ctr = 1`| 3                             |
| flushed        | `unit = wait, ctr = 2`| 4                             |

Commit spacing follows from this table:

* A full pipeline commits one instruction per cycle.
* An instruction that depends on the one before it commits 2 cycles after
  it.
* The instruction at a taken branch's target commits 3 cycles after the
  branch.
* The first instruction after reset or flush commits on the 4th clock edge.

`retire` is high in each cycle whose clock edge commits an instruction.
`retire_count` counts those commits: it is the core's own instruction clock.

### Hazards (`conflict_unit`)

The decoded instruction reads registers and memory in the same cycle in which
the executing instruction is still waiting to commit. So the pipeline stalls
for one cycle in four cases:

* The decoded instruction is a branch, and the executing one writes `r0`.
* It is an add, and the executing one writes `ra` or `rb`.
* It is a store, and the executing one writes `ra`.
* It is a load, and the executing one stores to the address being loaded.

During a stall, fetch and decode hold and execute inserts a `wait`. In the
next cycle the producer has committed, and the consumer executes with the new
value. There is no forwarding path.

### What `pc` means

`pc` is the address of the next instruction to commit. While the execute
unit holds an instruction, that instruction sits at `pc`, and the decoded one
at `pc + 1`. While the execute unit waits, the decoded instruction sits at
`pc`. The execute unit uses this address as the base of a branch offset. At
each commit, `pc` and `regs` are exactly the state of an instruction-level
SPM processor that has executed the same instructions.

## Two cores and the shared memory (`acp2_top`)

`acp2_top` instantiates `NCORES = 2` pipelines, one `program_memory` with a
read port per core, and one `data_memory` with a read port and a write port
per core.

* **Loads see memory as it was when they executed.** A load reads `dm` in
  the cycle it executes, one cycle before it commits. A store that the other
  core commits at that same edge is not seen.
* **Stores in the same cycle are all written.** If two stores in one cycle
  go to the same word, core 0's value is kept.
* **Program memory is read-only for the cores.** It is written only through
  the load port.
* **`flush` empties both pipelines together.** Neither core keeps writing to
  the shared memory while the other refills. The instruction that is
  committing in the flush cycle completes. Fetch restarts at the following
  instruction, so no instruction is lost or repeated.

### Ports of `acp2_top`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `flush` | in | flush both pipelines (one cycle) |
| `rst_pc[NCORES]` | in | start address of each core; keep steady while `rst_n` is low |
| `pm_we`, `pm_waddr`, `pm_wdata` | in | program memory load port, written at the clock edge |
| `dm_host_we`, `dm_host_addr`, `dm_host_wdata` | in | data memory host port; a host write loses to a core store to the same word |
| `dm_host_rdata` | out | combinational read of `dm[dm_host_addr]` |
| `pc[c]`, `regs[c][0..7]` | out | architectural state of core `c` |
| `retire[c]`, `retire_count[c]` | out | commit strobe and count |
| `stall[c]` | out | hazard stall in this cycle |
| `pstate[c]`, `dur[c]` | out | refill state and cycles to the next commit |

Typical use:

1. Hold `rst_n` low.
2. Write the programs through `pm_*` and the data through `dm_host_*`.
3. Set `rst_pc`.
4. Release reset.
5. Read the results through `dm_host_*`, `pc` and `regs`.

## Files

`rtl/`:

| file | block |
|------|-------|
| `spm_pkg.sv` | widths, `ftch_t`/`dec_t`/`ex_t` state structs, opcode/unit/state enums, field and encoder functions |
| `fetch_unit.sv` | instruction register and fetch pc |
| `decode_unit.sv` | field extraction |
| `conflict_unit.sv` | hazard detection |
| `execute_unit.sv` | execution and refill sequencing |
| `register_unit.sv` | register file |
| `progcount_unit.sv` | architectural pc |
| `pipe_state_monitor.sv` | state class, `dur`, commit strobe and count |
| `program_memory.sv`, `data_memory.sv` | the shared memories |
| `acp_pipeline.sv` | one core |
| `acp2_top.sv` | the dual-core processor |

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`) and
`spm_ref_pkg.sv`, an instruction-level SPM model. The model also predicts
commit spacing from the instruction stream alone.

* `tb_acp_pipeline` runs twelve random programs on one core.
  * Each commit is replayed on the model.
  * pc and registers are compared after every commit.
  * Commit spacing and `dur` are compared with the model's prediction.
  * Data memory is compared at the end.
  * Random flushes are applied.
  * The testbench fails if any of these never occurs: a hazard stall, a
    store-to-load stall, a taken branch, a not-taken branch, a flush, each
    opcode.
* `tb_acp2_top` is the end-to-end test, at the default size.
  * Both cores store to the same word in one cycle; core 0's value must be
    kept.
  * Core 1 spins on a flag until core 0 writes it, then copies it.
  * Eight pairs of random programs run with per-commit checks of both cores
    and random joint flushes.
  * The testbench counts cycles in which both cores commit, and in which both
    store.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/spm_pkg.sv tb/spm_ref_pkg.sv tb/tb_acp2_top.sv --top-module tb_acp2_top
./obj_dir/Vtb_acp2_top
```

Leave out `tb/spm_ref_pkg.sv` for the unit testbenches, which do not use it.
The whole suite runs in seconds.

## Changing the size

`WORD_W`, `ADDR_W` and `RIDX_W` in `spm_pkg` set the word size, the address
size and the register index size. The opcode (3 bits) and the counter
(2 bits) are fixed by the architecture. The instruction format needs
`3 + RIDX_W + 2 + ADDR_W <= WORD_W` and `2 * RIDX_W <= ADDR_W`. The design
also assumes `RIDX_W <= ADDR_W <= WORD_W`. `NCORES` on `acp2_top` sets the
number of cores. The testbenches are written for the default widths and two
cores.

## Where this design makes its own choices

The pipeline's stage rules, hazard cases, refill states and duration values
are the architecture's. The following are choices made here:

* **Sizes and encoding.** The word, address and register-index widths, the
  instruction field positions and the opcode numbers. The architecture leaves
  them open.
* **Branch base address.** The architecture's description of the execute
  stage passes `pc` to a branch when the execute unit holds an instruction,
  and `pc + 1` when it waits. That contradicts the branch semantics and the
  way `pc` advances. This design passes the decoded instruction's real
  address, which is the other way round. Random programs with branches agree
  with the instruction-level model only this way.
* **Hazard rules need an actual register write.** The register hazard cases
  are all qualified with "the executing instruction writes a register". The
  architecture states this only for the branch case. Without it, a held
  `wait` with a stale `dest` would stall for ever.
* **Simultaneous stores.** Stores from both cores in one cycle are both
  written, and core 0 wins on the same address. Read literally, the
  architecture's memory update drops both stores in that case.
* **Ports and undefined opcodes.** The design adds the flush input, its
  refetch, reset values, per-core start addresses and the memory load and
  host ports. Opcodes 5 to 7 execute as no-ops.
* **Simplified state test.** The state classification uses only
  `(unit, ctr)`. The architecture's own test also compares the fetch and
  decode contents with a refilled copy of the pipeline, which has no hardware
  counterpart. A taken branch waiting to commit counts as "full".
* **Known limitation.** Resource conflicts between the cores are not
  arbitrated, as in the architecture: both memories have a port per core. A
  load on one core does not stall for a store on the other.
