# A multi-cycle MIPS-subset CPU

A single-cycle processor must make its clock period long enough for its
slowest instruction, so every instruction pays for a load. This CPU breaks
each instruction into short steps of roughly equal length and spends one
clock cycle per step. Each instruction uses only as many cycles as it has
steps:

| Instruction | FSM states        | Cycles |
|-------------|-------------------|--------|
| BEQ         | 0 → 1 → 8         | 3      |
| J           | 0 → 1 → 9         | 3      |
| R-type      | 0 → 1 → 6 → 7     | 4      |
| SW          | 0 → 1 → 2 → 5     | 4      |
| LW          | 0 → 1 → 2 → 3 → 4 | 5      |

Because the steps of one instruction happen in different cycles, hardware
can be shared between them. The machine has **one ALU**, which computes
PC + 4, the branch target and the instruction's own result in different
cycles. It also has **one memory**, which holds both instructions and data. A
ten-state control FSM drives the datapath's multiplexers and write enables.

The RTL is SystemVerilog-2017. Every module is synthesizable. The memory is
written as an array.

## Which values are kept, and which are recomputed

Sharing hardware has a cost. A value computed in one cycle and used in a
later one must be saved if the unit that made it is busy in between. This
design saves as little as possible. It has only three write-enabled
registers besides the register file:

- **PC** is loaded in the fetch state with PC + 4. Every later state therefore
  sees the incremented PC.
- **IR** (the instruction register) is loaded only in the fetch state
  (IRWrite). It is needed because the same memory is read again for data in
  a later state. While IR holds the instruction, its rs/rt/rd fields keep
  addressing the register file.
- **Target** is loaded in the decode state (TargetWrite). It holds
  PC + 4 + (sign-extended offset << 2). The ALU is needed again in the BEQ
  state for the comparison, so it cannot also produce the target then.

There are **no** operand registers (A, B), no ALU-output register and no
memory-data register. This is the part that is easiest to misread:

- The register file's read ports are combinational, and IR does not change
  during an instruction. The operands therefore stay valid in every state
  without being latched.
- The load/store address is not stored. States 2, 3, 4 (LW) and 2, 5 (SW)
  all drive the same ALU inputs (rs + sign-extended offset) with IorD=1. The
  ALU recomputes the address in each cycle.
- The memory read is combinational. In the fetch state the read word goes
  straight into IR at the clock edge. In LW state 4 the read word goes
  straight through the MemtoReg multiplexer into the register file.

As a result, `lw $t, off($t)` works: the base register is overwritten only
at the clock edge that ends state 4.

Remember this if you change the design. A synchronous (registered) memory,
such as a real SRAM macro, would break these paths. It would need a
memory-data register and one more cycle for loads and fetches.

## Datapath

`mc_datapath` connects the following units. The select encodings come from
the control-signal tables; the enums are in `mc_pkg`.

| Select   | 0                     | 1                   | 2                             | 3                                  |
|----------|-----------------------|---------------------|-------------------------------|------------------------------------|
| IorD     | PC → memory address   | ALU result          |                               |                                    |
| RegDst   | rt (IR[20:16])        | rd (IR[15:11])      |                               |                                    |
| MemtoReg | ALU result            | memory read data    |                               |                                    |
| ALUSelA  | PC                    | register rs         |                               |                                    |
| ALUSelB  | register rt           | constant 4          | sign-extended IR[15:0]        | sign-extended IR[15:0] << 2        |
| PCSource | ALU result            | Target register     | {PC[31:28], IR[25:0], 2'b00}  |                                    |

Three more connections complete the datapath:

- Memory write data always comes from register rt.
- ALUOp chooses the ALU operation: 00 add, 01 subtract, 10 use the
  function field IR[5:0].
- The PC is written when `PCWrite | (PCWriteCond & Zero)`. This is the only
  way a BEQ redirects the PC.

| Unit             | Module           | Notes |
|------------------|------------------|-------|
| PC, IR, Target   | `en_reg`         | Write-enabled register with synchronous reset. |
| Memory           | `unified_memory` | `MEM_WORDS` 32-bit words (default 1024 = 4 KiB). Word-addressed by address bits [11:2] at the default size; higher bits wrap. Read data is 0 while MemRead is low. |
| Register file    | `regfile`        | 32 × 32 bits. Two combinational read ports and one write port. r0 is always 0. |
| ALU              | `alu`            | add, sub, and, or, signed slt. Its `zero` output is high when the result is 0. |
| ALU control      | `alu_control`    | Turns ALUOp and the function field into the ALU operation. |
| Control unit     | `control_fsm`    | Moore FSM. Its outputs are one `ctrl_t` struct. |

## Control FSM

All instructions share state 0 (fetch) and state 1 (decode and register
fetch). Neither state knows the instruction yet. State 1 therefore computes
the branch target speculatively for every instruction. The opcode then
selects a short sequence of states, and the last state of each sequence
returns to state 0. Signals not listed in a state are 0.

| State | Name              | Asserted signals |
|-------|-------------------|------------------|
| 0     | Fetch             | MemRead, IorD=0, IRWrite, ALUSelA=0, ALUSelB=01, ALUOp=00, PCSource=00, PCWrite |
| 1     | Decode / reg read | ALUSelA=0, ALUSelB=11, ALUOp=00, TargetWrite |
| 2     | Memory address    | ALUSelA=1, ALUSelB=10, ALUOp=00, IorD=1 |
| 3     | LW memory read    | as state 2, plus MemRead |
| 4     | LW write-back     | as state 3, plus MemtoReg=1, RegDst=0, RegWrite |
| 5     | SW memory write   | as state 2, plus MemWrite |
| 6     | R-type execute    | ALUSelA=1, ALUSelB=00, ALUOp=10 |
| 7     | R-type write-back | as state 6, plus RegDst=1, MemtoReg=0, RegWrite |
| 8     | BEQ               | ALUSelA=1, ALUSelB=00, ALUOp=01, PCWriteCond, PCSource=01 |
| 9     | Jump              | PCWrite, PCSource=10 |

State 1 branches on the opcode: LW or SW go to 2, R-type to 6, BEQ to 8 and
J to 9. State 2 goes to 3 for LW and to 5 for SW.

Some values in this table are not given by the original state diagram. They
are the values the datapath needs:

- States 4 and 5 keep the load/store address on the memory (ALUSelB=10,
  IorD=1).
- State 4 selects memory data for write-back (MemtoReg=1).
- States 6 and 7 select rt as the second operand (ALUSelB=00).
- State 9 selects the jump address (PCSource=10).

## Instruction set

The design names its five instruction classes but not their encodings. The
standard MIPS-I encodings are used:

| Instruction | Opcode IR[31:26] | Notes |
|-------------|------------------|-------|
| R-type      | 0x00 | funct 0x20 add, 0x22 sub, 0x24 and, 0x25 or, 0x2A slt. Other funct values do an add. |
| J           | 0x02 | target = {PC+4[31:28], IR[25:0], 00} |
| BEQ         | 0x04 | target = PC + 4 + (sign-extended offset << 2) |
| LW          | 0x23 | address = rs + sign-extended offset |
| SW          | 0x2B | address = rs + sign-extended offset |

Any other opcode is skipped: state 1 goes back to fetch after 2 cycles.
There are no delay slots, no byte or half-word accesses, no exceptions and
no overflow detection.

## Interface and timing (`mc_cpu`)

- `clk`: all state changes on the rising edge.
- `rst`: synchronous, active high. It puts the FSM in state 0 and clears the
  PC, IR, Target and all registers. Execution starts at address 0.
- Program loading: the memory has no load port. Write the program into
  `u_dp.u_mem.mem[]` (one 32-bit word per entry, word *i* at byte address
  4*i*) before you release reset. A simulation testbench does this with
  hierarchical assignments. For synthesis, add an initial file or a load
  port to `unified_memory`.
- Observation outputs: `pc`, `ir`, `state` (0–9), `mem_write`/`mem_addr`/
  `mem_wdata` and `reg_write`/`reg_waddr`/`reg_wdata`. These let the machine
  be checked from outside. `mem_addr` is the memory address after the IorD
  multiplexer.
- Parameter: `MEM_WORDS` (default 1024). It must be a power of two for the
  wrap-around addressing to be exact.

## Departures and additions

These choices are not part of the original design:

- Reset values, r0 hard-wired to zero, word-only memory and the memory size.
- The ALU's and/or/slt operations and every instruction encoding.
- The behaviour for unknown opcodes.
- Read data of 0 when MemRead is low.
- The observation ports.

The design also raises, as open questions, two alternatives that are **not**
built:

- Saving the operands in A/B registers.
- Asserting RegWrite or RegDst one state earlier.

The single-cycle machine it starts from appears only as the point of
comparison. It is not built.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_mc_cpu` runs the whole CPU at its default size.
  - It generates four random programs. Each has 400 words of loads, stores,
    all five R-type operations, forward BEQs (about a third of them with
    equal registers) and forward jumps, and ends with a jump to itself.
  - It runs each program on an instruction-level model in the testbench.
  - It checks, in order, every register write and every memory write, the
    final registers and data memory, the total cycle count, and the cycle
    count of each instruction against the table above.
  - It also counts how often each mechanism was used: every FSM state, taken
    and untaken branches, IR holding during data accesses, and writes to r0
    being dropped. If any count is zero, the test fails.
- `tb_mc_datapath` drives the datapath with hand-written control sequences.
  Its directed program covers lw, add, sub, sw, a taken and an untaken BEQ,
  j, slt, and, or, and a load with a non-zero base register.
- `tb_control_fsm` follows every instruction class through the FSM. It
  checks each state and all 17 control bits in every cycle.
- Assertions in `control_fsm` and `unified_memory` check rules that the
  datapath relies on, and they are active in every simulation run with
  `--assert`:
  - IRWrite only happens during a fetch from the PC.
  - PCWrite and PCWriteCond are never asserted together.
  - RegWrite only happens in a write-back state.
  - MemRead and MemWrite are never asserted together.
- `tb_alu`, `tb_alu_control`, `tb_regfile`, `tb_unified_memory` and
  `tb_en_reg` test the units exhaustively or with random values against
  testbench models.

Not verified:

- Jumps that need PC[31:28] ≠ 0, which the 4 KiB memory cannot reach.
- Timing closure, and any synthesis beyond a generic netlist.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_mc_cpu \
    -y rtl -y tb +libext+.sv rtl/mc_pkg.sv tb/tb_mc_cpu.sv
./obj_dir/Vtb_mc_cpu
```

Replace `tb_mc_cpu` with any other testbench name. The package `mc_pkg`
must come first on the command line.

To add an instruction:

1. Add its opcode to `opcode_e` in `mc_pkg`.
2. Add a state sequence and its outputs in `control_fsm`.
3. If it needs a new operand or PC source, widen the matching select enum
   and extend the multiplexer in `mc_datapath`.
