# A two-way out-of-order MIPS I core built around one reorder buffer

This is a small superscalar MIPS I integer processor in SystemVerilog. Up to two
instructions are fetched, decoded, inserted and committed per cycle. A single
structure does all the scheduling work: the **reorder buffer (ROB)**. It holds every
in-flight instruction in a numbered *slot*. There is no separate rename table,
reservation station or branch unit:

- a register read is answered by searching the slots for the youngest older writer;
- a slot's number is the tag that results come back with;
- branches are evaluated inside the buffer.

The organisation follows the processor described in *Designing a Processor in
Bluespec*, which was written in Bluespec SystemVerilog. This RTL is an independent
implementation in plain SystemVerilog. Its cycle timing is not the same as that
design's; the differences are listed near the end of this file.

```
            +-------+    +------+  block of 4   +--------+  2/cycle  +-----------+
 ld_* ----->| imem  |<---| fetch|<--------------|  BTB   |           |  decode   |
            +-------+ pc +------+ -- 1 or 2 --> +--------+ --------> | + 2-way   |
                           ^  ^  instructions (epoch, predIA)         |   FIFO    |
           branch miss     |  |                                       +-----+-----+
           {correct, ia,   |  +--- BTB update                               | 0..2/cycle
            epoch}         |                                                v
        +------------------+--------------------------------------------------------+
        |                         reorder buffer (rob)                              |
        |  slots: IA, predIA, state, op, tv1, tv2, result    branch execution        |
        |  lookup through slots -> tag or value               bypass FIFO -> fetch   |
        +----+-----------------+-----------------+-----------------+----------------+
             | 4 read/2 write  | tag,op,v1,v2    | in program order| commit/inval
             v                 v                 v                 v
        +---------+       +---------+       +-------------------------+   +------+
        | regfile |       |  ALU    |       | memory unit             |-->| dmem |
        | r0..r31 |       | 1 cycle |       | 4-entry store buffer,   |   +------+
        | HI, LO  |       | + FIFO  |       | 1 load buffer           |
        +---------+       +---------+       +-------------------------+
```

## Slots and their states

`rob.sv` holds `N` slots (default 16) in a circular buffer between `head` (oldest)
and `tail` (next free). A slot stores:

- the instruction template: address, predicted next address (`predIA`), class,
  operation, immediate and destination;
- two operands, `tv1` and `tv2`. Each is either a *tag* (the producing slot's number)
  or a value;
- the result, an error flag, and a state.

| state      | meaning |
|------------|---------|
| Empty      | free |
| Waiting    | inserted; operands may still be tags |
| Dispatched | sent to the ALU or memory unit |
| Done       | result present, may commit |
| Killed     | on a mispredicted path, removed by commit |

A slot moves Empty → Waiting → Dispatched → Done → Empty. A branch goes Waiting →
Done, because the ROB evaluates it itself. A branch miss can set any non-empty slot
to Killed. A Killed slot becomes Empty when commit reaches it. `tail` is not moved
back, so the killed slots simply drain.

Several activities write slot states in the same cycle, each usually to a different
slot. The state of each slot is therefore a *multi-ported register* (`mp_reg.sv`).
Each writer has its own port, and the lowest-numbered port that writes wins. The
ports, in priority order, are:

1. kill
2. commit
3. result writeback
4. dispatch and insert

All of the following run in every cycle:

- **Insert** takes up to two decoded instructions. It needs Empty slots at `tail`,
  plus one more Empty slot behind them. That spare slot keeps `tail` from ever
  reaching `head`. Insert does not look at `head`.
  - Each operand comes from the youngest older live slot that writes its register:
    the value if that slot is Done, else its tag. If no slot writes it, the operand
    is read from the register file, which has 4 read ports.
  - Instructions whose epoch differs from the ROB's current epoch are dropped.
  - No insert happens in a cycle with a branch miss.
- **Operand capture**: a Waiting slot holding a tag copies the value once the tagged
  slot is Done.
- **Dispatch**:
  - The oldest ready ALU instruction goes to the ALU.
  - The oldest Waiting memory instruction goes to the memory unit once its operands
    are values. Memory instructions leave in program order.
  - Dispatch drives the unit's request port directly, with no FIFO in between, so an
    instruction can issue in the cycle after its last operand arrives.
- **Writeback**: tagged results from the ALU and the memory unit make the slot Done.
- **Commit** frees up to two slots from `head`.
  - A Done slot writes the register file (2 write ports).
  - A Killed slot is dropped.
  - A committed store tells the memory unit to write its oldest buffered store. A
    killed store that is already in the store buffer tells it to discard that store.
    Only one of these happens per cycle.
  - A slot killed while its operation is still in a functional unit waits for the
    result before it is freed, so its tag cannot be reused too early.

### 64-bit results

MULT, MULTU, DIV and DIVU occupy **two consecutive slots**: HI first, then LO. Each
slot is an ordinary destination (register 32 or 33), and each is computed by the ALU
as its own operation. An insert of such a pair uses the whole insert bandwidth of
that cycle. The pair commits together or not at all. MFHI and MFLO find them through
the normal slot lookup.

## Branches, the delay slot and epochs

MIPS I executes the instruction after a branch (the *delay slot*) whatever the
branch does. So the question is: which address follows the delay slot?

- **Prediction.** Every fetched instruction carries `predIA`, the address that fetch
  will fetch after it.
- **Resolution.** The ROB resolves the oldest Waiting branch or jump once both its
  operands are values *and* its delay-slot instruction is in the buffer. It compares
  the correct address with the `predIA` of the delay slot.
  - Waiting for the delay slot matters. A branch resolved earlier would change the
    epoch before the delay slot arrived, and the delay slot would then be dropped.
- **Miss.** On a miss the ROB:
  - kills every slot after the delay slot;
  - increments its 6-bit epoch;
  - pushes `{correct address, branch address, new epoch}` into a **bypass FIFO**
    (`bypass_fifo.sv`).

  That FIFO passes an entry through in the cycle it is written, so fetch and the BTB
  react in the same cycle. If they were not ready, nothing would be lost.
- **Fetch.** The fetch unit copies the epoch and restarts at the correct address.
  Everything still in flight from the old path has the old epoch and is dropped at
  insert.
- **BTB update.** The BTB learns the mapping (delay-slot address → correct address).

Branch targets are computed in decode. Only JR/JALR read their target from a register.

## Fetch and the BTB

The fetch unit (`fetch_unit.sv`) keeps three registers:

- `pc`, the next instruction to send;
- `npc`, the instruction after it;
- `epoch`.

Each cycle it asks the instruction memory for the block at `pc`. The memory returns
four words one cycle later (`imem.sv`).

The BTB (`btb.sv`) is an 8-entry direct-mapped table that maps an address to the
predicted address after it, with `address + 4` as the default. Fetch looks up `npc`:

- If the BTB predicts `npc + 4`, both `pc` and `npc` are sent, and fetch continues at
  the predicted address.
- Otherwise `npc` is the delay slot of a predicted-taken branch. Only `pc` is sent.
  `npc` goes out next cycle, carrying the predicted target as its `predIA`.
- If decode is full, the block is dropped and the same address is requested again.

## Decode

`decode_unit.sv` decodes up to two instructions into a fixed record: class,
operation, source registers, immediate or branch target, and destination. It
enqueues them into a 2-way FIFO of 4 entries, from which the ROB takes 0, 1 or 2 per
cycle.

Decoded:

- all MIPS I integer arithmetic, logic, shift, set, multiply/divide and HI/LO moves;
- branches and jumps, including the linking forms;
- byte, half and word loads and stores.

Decoded as no-operations: SYSCALL, BREAK, LWL/LWR/SWL/SWR, coprocessor instructions
and unknown opcodes.

## Memory unit

`mem_unit.sv` receives memory instructions in program order.

- **Stores** compute their byte mask and shifted data and enter a 4-entry store
  buffer. They reply at once, with an error flag if misaligned. They stay buffered,
  speculative, until the ROB either commits them (written to `dmem`) or invalidates
  them (discarded).
- **Loads** are held in a one-entry load buffer until the store buffer is empty.
  Then they read the data memory, and a cycle later they return the extracted,
  sign- or zero-extended value. No store-to-load forwarding is done.

`dmem.sv` is a word-wide array with a 4-bit byte write mask and a one-cycle read.

## Register file

`regfile.sv` holds r0–r31 (r0 always reads zero) plus HI and LO as indices 32 and 33.
It has 4 combinational read ports and 2 write ports. If both write ports hit one
register, port 1 wins; port 1 carries the younger of the two commits.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `mips_core` | `ROB_SLOTS` | 16 | reorder-buffer slots, 3 to 256 (a MULT/DIV pair plus the spare slot needs 3) |
| `mips_core` | `IMEM_WORDS`, `DMEM_WORDS` | 1024 | memory sizes in 32-bit words |
| `mips_core` | `RESET_PC` | 0 | first fetch address |
| `btb` | `ENTRIES` | 8 | BTB entries |
| `imem` | `BLOCK` | 4 | words returned per request |
| `mem_unit` | `SB_DEPTH` | 4 | store-buffer entries |
| `decode_unit` | `DEPTH` | 4 | decode FIFO entries (power of two) |

## Top-level interface (`mips_core`)

| ports | use |
|---|---|
| `clk`, `rst_n` | clock and asynchronous active-low reset |
| `ld_we`, `ld_addr`, `ld_data` | write the program into instruction memory (hold the core in reset meanwhile) |
| `dbg_*` | read or write data memory directly |
| `cm_valid`, `cm_ia`, `cm_we`, `cm_dest`, `cm_value` | commit trace: two lanes per cycle, lane 0 older; a MULT/DIV commits as HI lane then LO lane |
| `st_*` | each store as it is written to data memory |
| `halted` | a faulting (misaligned) access reached the head; commit has stopped |
| `ev_*` | one-cycle event pulses: branch miss, BTB hit, two-wide fetch, two-wide insert, decode stall, ROB full, wrong-epoch drop, MULT/DIV pair commit, store invalidation, load waiting for stores, killed slot waiting for its unit |

## Where this departs from the source design

- **Timing.** The source design reports a maximum IPC of 0.5 and a 3-cycle branch
  misprediction penalty. This RTL sustains about one instruction per cycle on its
  test program (913 instructions in 911 cycles). The first correct-path instruction enters the
  ROB 2 to 3 cycles after a branch miss is resolved. The figures are
  not a like-for-like comparison.
- **BTB addressing.** The source's description of the default prediction reads both
  as "PC + 4" and as "PC + 8". Here the BTB is keyed by the delay-slot address and
  defaults to the next sequential address. With that key, the two-wide sequential
  step works out to PC + 8.
- **Data memory** is described as a two-way cache, but its organisation is not
  given. It is modelled here as a flat single-cycle memory.
- **Exceptions** are not described. The only error is a misaligned access, and it
  stops the core (`halted`). ADD, ADDI and SUB do not trap on overflow; they behave like
  ADDU, ADDIU and SUBU.
- **Branch resolution** is in program order (the oldest Waiting branch first).
- **Sizes chosen here:** the number of ROB slots, the decode FIFO depth, the
  load-buffer depth (1) and the FIFO depths are not given by the source.
- **Observation ports.** The commit trace, store trace and event ports are additions
  for verification.

## Simulating

Each testbench in `tb/` is self-checking. It prints one line
`TB_RESULT checks=N failures=M` and calls `$finish`. Each also has a watchdog that
counts a failure if the run hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/mips_pkg.sv tb/tb_mips_core.sv \
          -y rtl -y tb --top-module tb_mips_core -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Swap in another `tb_*.sv` and its module name to run a block test. `-Wno-fatal` keeps lint warnings
from stopping the build. `-y rtl` lets Verilator find each submodule in the file of the same name.

`tb_mips_core` is the end-to-end test, run at the default parameters. It assembles a
program in SystemVerilog and runs it on the core. The program has:

- a directed part: a loop with stores and dependent loads, multiply/divide,
  JAL/JR, byte and half accesses, and a mispredicted branch with a store on the
  wrong path;
- a seeded random block that is executed three times.

The random block comes from a fixed seed. Adding `+seed=N` on the simulator command
line picks a different random block.

A simple in-order instruction-set model inside the testbench runs the same program.
Every commit (address, destination, value) is compared in order with that model, and
then the whole data memory is compared. The testbench also counts the core's event
pulses and fails if any mechanism never occurred.

The block tests:

| testbench | what it checks |
|---|---|
| `tb_rob` | the ROB with real decode, ALU, memory unit and register file around it; a small program exercising forwarding, the MULT pair, a branch miss (notification contents, delay slot kept, wrong path and its buffered stores discarded) and the stop at a misaligned load |
| `tb_fetch_unit` | two-wide sequential fetch, one-wide fetch before a predicted jump, the jump itself, stall without loss, redirect with new epoch |
| `tb_decode_unit` | decode results and FIFO ordering |
| `tb_btb` | lookups and updates of the table |
| `tb_imem` | block reads |
| `tb_mem_unit` | the store buffer, loads waiting for stores, byte/half extraction |
| `tb_dmem` | byte-masked writes and one-cycle reads against reference models |
| `tb_regfile` | reads and writes against reference models |
| `tb_alu_unit` | every ALU operation against a reference model, including 1-cycle latency |
| `tb_mp_reg`, `tb_bypass_fifo`, `tb_sync_fifo` | the building blocks, against reference models |

## Changing the design

- The end-to-end test also passes with 8 and 32 reorder-buffer slots. To try them,
  set the parameter on the `mips_core` instance in the testbench. With 4 slots every commit is still correct, but no wrong-path store ever reaches
  the store buffer, so the check that every mechanism occurred fails.
- Shared types live in `rtl/mips_pkg.sv`. Tags are 8 bits wide in the unit request
  and response structs, so `ROB_SLOTS` can grow to 256.
- To add an execution unit, give it a request port like the ALU's. Then, in `rob.sv`, add a
  dispatch selector and a result input. Merge its completions into the existing
  writeback (Done) port of each slot's state register; the two results that arrive
  today always name different slots.
- The ROB has these assertions: one slot is always free, results come back only for
  slots with an operation in flight, and the memory unit is never told to commit or
  discard when it has no store buffered.
