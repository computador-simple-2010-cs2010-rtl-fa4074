# CS2010 and CS2: two simple 8-bit teaching computers, plus a register-file calculator

CS2010 ("Computador Simple 2010") is a small 8-bit computer built for teaching.
It shows how a processor runs a program. It has eight registers, an ALU with
four status flags, a stack for subroutine calls, and separate code and data
memories. All of these talk over one shared internal bus. A control unit
fetches each instruction and steps the data path through its register
transfers, one transfer per clock cycle.

This repository gives synthesizable SystemVerilog for three related machines
from that course material:

| machine | module | what it is |
|---|---|---|
| CS2010 | `cs2010_computer` | 16-bit instructions, 21 operations, status flags V N Z C, stack, branches |
| CS2 | `cs2_computer` | the predecessor: 14-bit instructions, 8 operations, no flags, no jumps |
| calculator | `cs_calculator` | register file plus ALU; each cycle does `R[D] <- R[D] op R[F]` |

`cs_top` puts all three side by side. They share only the clock and the reset.

## CS2010 at a glance

- **Data:** 8 bits wide. There are eight registers R0–R7.
- **Code memory:** 256 words of 16 bits, addressed by the PC.
- **Data memory:** 256 bytes, reached only through MAR (the address) and MDR (the data).
- **Status register SR:** holds `{V,N,Z,C}`. The ALU computes the next flags from the current ones.
- **Stack pointer SP:** `CALL` pushes the return address at `M(SP)` and then decrements SP. `RET` does the reverse.
- **Hidden registers:** the programmer cannot see IR, AC, MAR or MDR.

### Instruction formats

```
 15      11 10    8 7          3 2     0
+----------+-------+------------+-------+
|   COP    |  Rd   |  -----     |  Rf   |   A: register operands (Rd holds the source in ST; Rf is the base in ST/LD)
|   COP    |  Rd   |  address / immediate  |   B: memory and immediate
|   COP    | cond  |  branch target        |   C: branches
+----------+-------+------------+-------+
```

| COP | instr | effect | flags |
|---|---|---|---|
| 00000 | `ST (Rb),Rf` | M(Rb) <- Rf | – |
| 00001 | `LD Rd,(Rb)` | Rd <- M(Rb) | – |
| 00010 | `STS dir,Rf` | M(dir) <- Rf | – |
| 00011 | `LDS Rd,dir` | Rd <- M(dir) | – |
| 00100 | `CALL dir` | M(SP) <- PC; SP <- SP-1; PC <- dir | – |
| 00101 | `RET` | SP <- SP+1; PC <- M(SP) | – |
| 00110 | `BRxx dir` | if condition: PC <- dir | – |
| 00111 | `JMP dir` | PC <- dir | – |
| 01000 | `ADD Rd,Rf` | Rd <- Rd + Rf | VNZC |
| 01010 | `SUB Rd,Rf` | Rd <- Rd - Rf | VNZC |
| 01011 | `CP Rd,Rf` | flags of Rd - Rf | VNZC |
| 01111 | `MOV Rd,Rf` | Rd <- Rf | – |
| 10010 | `CLC` | C <- 0 | C |
| 10011 | `SEC` | C <- 1 | C |
| 10100 | `ROR Rd` | rotate right through C | VNZC |
| 10101 | `ROL Rd` | rotate left through C | VNZC |
| 10111 | `STOP` | halt | – |
| 11000 | `ADDI Rd,k` | Rd <- Rd + k | VNZC |
| 11010 | `SUBI Rd,k` | Rd <- Rd - k | VNZC |
| 11011 | `CPI Rd,k` | flags of Rd - k | VNZC |
| 11111 | `LDI Rd,k` | Rd <- k | – |

Branch conditions sit in IR[10:8]:

| code | taken when | names |
|---|---|---|
| 000 | Z | BRZS, BREQ |
| 001 | C | BRCS, BRLO (unsigned less than, after a subtraction) |
| 010 | V | BRVS |
| 011 | N xor V | BRLT (signed less than) |
| 1xx | never | (reserved) |

Unused operation codes (09, 0C–0E, 10, 11, 16, 19, 1C–1E) run as a
two-cycle no-operation.

The encoding has a regularity that the control unit relies on.

- For every arithmetic, shift and flag instruction, the 4-bit ALU operation
  equals **COP[3:0]**.
- **COP[4]** selects the immediate IR[7:0] instead of register Rf as ALU
  input B.

For example, `ADD` is 0_1000, which is ALU code 1000 (A+B) with a register
operand. `ADDI` is 1_1000, the same ALU code with the immediate. `LDI` is
1_1111, which is "pass B" with the immediate.

### The ALU (`cs2010_alu`)

The ALU is combinational. OP is 4 bits and `S = {V,N,Z,C}`.

| OP | RESULT | V | N | Z | C |
|---|---|---|---|---|---|
| 00x0 | A | kept | kept | kept | 0 |
| 00x1 | A | kept | kept | kept | 1 |
| 0100 | `{C, A[7:1]}` (rotate right) | C_in ^ A7 | R7 | R==0 | A0 |
| 0101 | `{A[6:0], C}` (rotate left) | A7 ^ A6 | R7 | R==0 | A7 |
| 011x | A | kept | R7 | R==0 | kept |
| 100x | A + B | carry into bit 7 ^ carry out | R7 | R==0 | carry out |
| 101x | A − B | signed overflow | R7 | R==0 | borrow (A < B unsigned) |
| 11xx | B | kept | kept | kept | kept |

The SR is written only by the instructions that the table above marks as
changing flags. `MOV` and `LDI` go through the ALU's pass-B code but leave the
SR alone.

## How an instruction runs

This is the least obvious part of the design. It is also where the design
adds the most of its own, because only the data path and the effect of each
instruction are fixed.

### The shared bus

The shared bus carries one value per cycle.

- **Sources:** AC (`R_AC`), SP (`R_SP`), PC (`R_PC`), and the MDR when
  W=0 and I/O*=1.
- **Destinations:** the register file input, SP (load), PC (`W_PC`), MDR
  (W=1, I/O*=0) and MAR.

The ALU result does not reach the bus directly. It is first latched in the
hidden accumulator AC, and AC drives the bus on a later cycle. So an
instruction such as `ADD` needs two steps: compute into AC, then write AC back
to Rd.

The bus is built as an AND-OR multiplexer of the gated sources, not as
tri-state wires. When nothing drives it, it reads 0. The memory data bus
between MDR and data memory is built the same way. Assertions check that
each bus has at most one driver.

### The MDR

The MDR is the only way between the shared bus (its IB side) and the memory
(its EB side):

| W | I/O* | MDR takes | drives IB | drives EB |
|---|---|---|---|---|
| 0 | 0 | (holds) | no | yes: memory sees MDR (used to write) |
| 0 | 1 | (holds) | yes: bus sees MDR | no |
| 1 | 0 | IB (bus) | no | no |
| 1 | 1 | EB (memory) | no | no |

### Step sequences

Every instruction starts with one FETCH cycle. In that cycle IR takes the
code word at PC, and PC is incremented. Then the execute steps for the
operation code follow (E0, E1, …):

| instruction | execute steps | total cycles |
|---|---|---|
| ADD SUB ROR ROL ADDI SUBI | E0 AC <- ALU, SR <- flags; E1 Rd <- AC | 3 |
| MOV LDI | E0 AC <- ALU (pass B); E1 Rd <- AC | 3 |
| CP CPI CLC SEC | E0 SR <- flags | 2 |
| ST STS | E0 AC <- Rb or dir; E1 MAR <- AC; E2 AC <- Rf; E3 MDR <- AC; E4 M(MAR) <- MDR | 6 |
| LD LDS | E0 AC <- Rb or dir; E1 MAR <- AC; E2 MDR <- M(MAR); E3 Rd <- MDR | 5 |
| CALL | E0 MAR <- SP; E1 MDR <- PC; E2 M(MAR) <- MDR, SP <- SP-1; E3 AC <- dir; E4 PC <- AC | 6 |
| RET | E0 SP <- SP+1; E1 MAR <- SP; E2 MDR <- M(MAR); E3 PC <- MDR | 5 |
| JMP, BRxx taken | E0 AC <- dir; E1 PC <- AC | 3 |
| BRxx not taken, unused COP | E0 (nothing) | 2 |
| STOP | E0, then halted with STOP high | 2 |

Addresses and data reach AC through the ALU's pass-B code (register Rb or
the immediate) or its pass-A code (register Rf). Because the PC has already
been incremented during FETCH, `CALL` stores the address of the next
instruction.

### Control and status

- After reset the control unit waits for `START`.
- Execution always begins at address 0.
- When a `STOP` instruction has executed, the unit raises `STOP`. It stays
  halted until the next reset.
- `fetch` is high during the first cycle of every instruction.

## Initial state

Reset (synchronous, active high) loads these values:

- Every register Rk of all three machines: **10·k** (R0=0, R1=10, …, R7=70).
- Every data memory byte at address `a`: **`a` with its two nibbles
  swapped**. For example M($7A)=$A7, M($12)=$21 and M($07)=$70.
- PC: 0. SP: $FF. SR, AC, MAR, MDR, IR: 0.

The code memory has no reset value. Fill it before `START` through the load
port (`ld_we`, `ld_addr`, `ld_data`), which writes one word per clock cycle.

## CS2 (`cs2_computer`)

CS2 has the same data unit as CS2010, minus the SR and the SP. Its ALU is the
2-bit one described in the calculator section below, and its PC can only be
cleared and incremented.

Instruction format: a 14-bit word `COP[13:11] | Rd[10:8] | dir[7:0]`. Rf
(or Rb) sits in bits [2:0].

| COP | instruction |
|---|---|
| 000 | `ST (Rb),Rf` |
| 001 | `LD Rd,(Rb)` |
| 010 | `STS dir,Rf` |
| 011 | `LDS Rd,dir` |
| 100 | `ADD Rd,Rf` |
| 101 | `SUB Rd,Rf` |
| 110 | `MOV Rd,Rf` |
| 111 | `STOP` |

The cycle counts match the CS2010 ones for the same instructions. `START`
clears the PC (CL_PC) during the cycle in which it is accepted.

## The calculator (`cs_calculator`)

This is the register file and a 2-bit ALU (`cs2_alu`) connected into a loop:

- D selects the first operand and, through a 3-to-8 decoder enabled by W,
  the destination.
- F selects the second operand.
- P selects the ALU function: `00` A+B, `01` A, `10` A−B, `11` B.

Each clock edge with W high performs `R[D] <- R[D] op R[F]`. Outputs `a` and
`b` show R[D] and R[F].

The same register file (`cs_regfile`) serves all three machines. It has two
combinational read ports (`S_A`→A, `S_B`→B) and one write port (`S_W`, `IN`,
`W`). A read in the write cycle sees the old value.

## Choices made in this design

The course material fixes the block diagram, the instruction set, the ALU
function table, the MDR table and the initial values. The following are this
design's own choices:

- The execute-step sequences and cycle counts above. No microprogram was
  given, so each one is the straightforward sequence for the data path.
- **Bus implementation:** multiplexers instead of tri-state buses, and
  separate input and output ports for the memory data bus.
- **ALU codes the table leaves open:**
  - 0001 sets C, like 0011.
  - RESULT is A for the 00xx codes.
  - Flags marked "don't care" keep their value.
  - N and Z are defined for the pass-A code 011x.
- **Reset values:** PC 0, SP $FF, SR/AC/MAR/MDR/IR 0. The reset itself and
  its timing are also this design's choice.
- **`START` and `STOP`:** `START` is taken only after reset, and `STOP` holds
  until reset.
- **Reserved codes:** branch conditions 1xx never branch, and unused operation
  codes do nothing.
- **Code memory load port:** added so that programs can be loaded.
- **Data memory timing:** writes happen at the clock edge, and reads are
  combinational, so a load completes in one step.
- **SP's `C` command:** read as "load from the bus". No instruction uses it,
  so `ctrl.c_sp` is always 0 in CS2010.
- **Commands that are always 0:** `ctrl.cl_pc` in CS2010, and the SP, W_PC and
  SR commands in CS2. The shared command struct `cs_pkg::ctrl_t` carries them
  anyway.

Not built: the AVR microcontroller, whose instruction set appears alongside
as reference. Only its instruction summary is available, so a core for it
would be invention rather than this design.

## Files

Each module is in `rtl/<module>.sv`. Each file starts with a comment that
gives the module's interface and timing.

| file | contents |
|---|---|
| `cs_pkg` | operation codes, ALU codes, flag struct, control-command struct, initial-value functions |
| `cs2010_computer`, `cs2010_control`, `cs2010_alu` | CS2010 |
| `cs2_computer`, `cs2_control`, `cs2_alu` | CS2 (and the calculator's ALU) |
| `cs_regfile`, `cs_datamem`, `cs_codemem`, `cs_mdr`, `cs_load_reg`, `cs_pc`, `cs_sp` | shared data-path blocks (`cs_load_reg` serves as AC, IR, MAR and SR) |
| `cs_calculator` | the calculator |
| `cs_top` | the three machines side by side |

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb/cs2010_ref_pkg.sv` is an instruction-level reference model of CS2010
with instruction encoders. It computes the flags with plain integer
arithmetic and knows the cycle count of every instruction.

- **`tb_cs2010_computer`:**
  - Runs a directed program that uses every instruction, every branch
    condition taken and not taken, CALL/RET and an unused code.
  - Then runs 30 random programs with forward branches.
  - After each program it compares all registers, all 256 memory bytes, PC,
    SP, flags, the number of instructions and the exact cycle count against
    the model.
- **`tb_cs2_computer`:** does the same for CS2 with an inline model.
- **`tb_cs2010_control` and `tb_cs2_control`:** check each operation code's
  cycle count, the set of commands it asserts, and its ALU code. The CS2010
  test also covers every branch condition with every flag combination.
- **Unit tests:** the ALUs (the 2-bit one exhaustively), the register file,
  the memories, MDR, PC, SP and the plain register are checked against simple
  models.
- **`tb_cs_top`:** runs all three machines at once on the full-size design.
  - CS2010 sums eight memory bytes with carry into 16 bits, doubles the sum in
    a subroutine, and stores it. Expected: $0390 at M($81):M($80).
  - CS2 runs a load, add and store program.
  - The calculator runs 64 operations.
  - The test counts every mechanism: branches per condition, not-taken
    branches, JMP, CALL, RET, loads, stores, carry, overflow, zero, negative,
    shifts, flag instructions, an unused code, STOP, and each CS2 and
    calculator operation. A mechanism that never occurs fails the test.

To run a testbench with Verilator (packages first):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/cs_pkg.sv tb/cs2010_ref_pkg.sv \
  $(ls rtl/*.sv | grep -v cs_pkg) tb/tb_cs_top.sv \
  --top-module tb_cs_top -o sim
./obj_dir/sim
```

Swap in another `tb/tb_*.sv` and `--top-module` to run a unit testbench. Only
the CS2010 computer and top testbenches need `cs2010_ref_pkg.sv`. Every test
finishes in a few seconds.

## Changing the design

- **Width and depth:** the data-path blocks take width and depth parameters.
  The computers use the constants `DATA_W` and `ADDR_W` from `cs_pkg`.
- **Adding an instruction:**
  1. Give its code in `cs_pkg::cop_e`.
  2. Add a case to `cs2010_control` that lists its steps. Set `last` on its
     final step.
  3. Add the same instruction to `Cs2010Model::step` in the reference model,
     so the computer tests keep checking it.
