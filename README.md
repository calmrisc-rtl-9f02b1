# CalmRISC-style low-power 8-bit microcontroller core with a coprocessor port

This is synthesizable SystemVerilog for an 8-bit microcontroller built around
two ideas from the CalmRISC architecture:

* **Spend as few clock edges as possible per instruction.** A register-memory
  RISC instruction set with one-word, one-cycle instructions and a short
  three-stage pipeline keeps the cycles per instruction (CPI) close to 1, so
  the same work is done at a lower clock frequency. The only pipeline penalty
  is one cycle per conditional branch; data dependencies never stall. Inside
  the core, logic that is not needed in a cycle is kept from switching: the
  upper bits of the program counter are clock-gated, and the data address
  adder sits behind input latches that open only when an address is needed.
* **Attach a coprocessor (for example a DSP unit) without a second program.**
  The coprocessor is passive. The core fetches and early-decodes its
  instructions, then hands it a command. It also hands over the shared data
  memory for the one cycle in which the core is guaranteed not to use it. So
  there is no arbitration and no contention. A conditional branch in the core
  can test the coprocessor's status lines directly.

The RTL follows the published description of the pipeline, the incrementer
with gated clock, the selective input latching and the coprocessor interface.
That description gives no instruction encoding, register count, ALU operation
list or signal-level timing. Those parts are this design's own; each is listed
under "What is this design's own" below.

## Block structure

```
                 +------------------------- calmrisc_soc --------------------------+
 program ROM     |  +------------------- calmrisc_core -------------------+        |
 (outside) <-----+--| pagu (PC, gated incrementer)                        |        |
 imem_addr/en    |  | early decode -> ID/MEM reg -> regfile, bypass, dagu  |        |
 imem_rdata ---->+--| -> ID/MEM->EX reg -> calmrisc_alu -> write-back      |        |
                 |  +----+--------------------------+---------------------+        |
                 |       | dm_* (core side)          | cop_slot, cop_cmd, CLD       |
                 |  +----v--------------------------v----+                         |
                 |  | shared_dmem (256 x 8, one port)    |<--- cop_mem_* ----------+--- coprocessor
                 |  +------------------------------------+                         |    (outside)
                 +-------------------------------------------------------------------+
```

| File | Contents |
|---|---|
| `rtl/calmrisc_pkg.sv` | widths, opcode/function/condition enums, the instruction word struct, an assembler helper `mk()` |
| `rtl/calmrisc_soc.sv` | top: core + shared data memory, program and coprocessor ports |
| `rtl/calmrisc_core.sv` | the three-stage pipeline, branch control, bypass, coprocessor interface |
| `rtl/pagu.sv` | program address generation unit: PC with a ripple-carry incrementer and a gated clock for the high bits |
| `rtl/clock_gate.sv` | latch-based clock gate cell used by `pagu` |
| `rtl/dagu.sv` | data address generation unit: an adder behind input latches |
| `rtl/calmrisc_alu.sv` | 8-bit ALU |
| `rtl/calmrisc_regfile.sv` | 4 x 8-bit register file |
| `rtl/shared_dmem.sv` | single-port data RAM shared with the coprocessor, with no-contention assertions |
| `tb/cop_mac_model.sv` | behavioural multiply-accumulate coprocessor, used by the top testbench only |
| `tb/tb_*.sv` | one self-checking testbench per block and one for the whole design |

## The pipeline

```
cycle        t            t+1                 t+2
instr i      IF           ID/MEM              EX
             fetch from   decode, read regs   ALU op1 <- op1 (+) op2,
             program ROM, (EX result          write register and flags
             early decode bypassed in),       at the end of the cycle
                          DAGU address,
                          data memory access
```

* **IF.** `pagu` drives the program address for the whole cycle and the
  program memory answers within the cycle (`imem_rdata` is read
  combinationally). The early decoder looks at the fetched word. A jump
  (`OP_JMP`) loads its target into the PC at the end of IF, so a jump costs
  nothing. A conditional branch (`OP_BR`) freezes the PC. An instruction with
  a memory operand or a memory destination sets `id_calc`, which opens the
  DAGU latches in the next cycle.
* **ID/MEM.** The register file is read. If the instruction now in EX writes
  the same register, its result is forwarded instead (`byp_rd`, `byp_rs`). So
  back-to-back dependent instructions, and an indexed address that uses a
  register written by the instruction just before, run without a stall. The
  DAGU forms the data address. The data memory is synchronous: a load's data
  appears at the clock edge that ends ID/MEM and feeds the ALU in EX, and a
  store writes at that edge.
* **EX.** The ALU computes the result and the new flags. Both are written at
  the end of the cycle.

### Conditional branches: one bubble, no prediction

There is deliberately no branch predictor, since a misprediction wastes
fetches. The sequence for a branch at address B is:

| cycle | IF | ID/MEM | EX | PC update at end of cycle |
|---|---|---|---|---|
| t   | B (early-decoded as branch) | B-1 | B-2 | hold (PC stays B) |
| t+1 | bubble, `imem_en` = 0 | B | B-1 (may set flags) | target if taken, else B+1 |
| t+2 | target or B+1 | bubble | B | |

The condition is evaluated at the end of cycle t+1. It uses either the flags
that instruction B-1 is producing in EX that cycle (`flags_next`, a bypass)
or the coprocessor status inputs. Every conditional branch therefore costs
exactly one cycle, taken or not, and CPI = 1 + (conditional branches /
instructions). The published figure of 1.1 to 1.2 corresponds to one
instruction in five to ten being a conditional branch.

## Program address generation with a gated clock (`pagu`)

The PC is a 12-bit register incremented by a chain of half adders with a
carry-in of 1. The low M = 3 bits are clocked every cycle. The upper 9 bits
are clocked through `clock_gate`, whose enable is the carry out of the third
half adder (or a target load). When counting, the upper flip-flops therefore
see one clock edge in eight cycles instead of every cycle. M = 3 is the value
at which the total switching (low flops every cycle plus the gate and upper
flops on 1/2^M of cycles) is smallest for this width.

`clock_gate` is a standard latch-plus-AND cell. The latch is transparent while
`clk` is low, so an enable that settles late in the cycle cannot cut a clock
pulse. The synthesis log therefore lists one intended latch for it. The
enable of `pagu` is formed from the PC and the fetch controls of the same
cycle. Like any flip-flop input, it only has to settle before the next rising
edge.

Controls: `load` (target into the PC; the upper bits are clocked too), `hold`
(stall), otherwise increment. The PC resets to 0 asynchronously.

## Selective input latching (`dagu`)

The data address is `base + offset`. In direct mode the base is 0 and the
offset is an 8-bit address. In indexed mode the base is a register and the
offset an 8-bit displacement. Both adder inputs pass through level-sensitive
latches that are transparent only while `calc` is high. `calc` is the
registered early-decode bit, stable for the whole ID/MEM cycle. In every cycle
without a memory access the latches stay closed, so register file and
instruction register activity on the inputs does not reach the adder. The
address output then simply keeps its last value. These 16 latch bits are
intended.

## Coprocessor interface

All coprocessor signals belong to the ID/MEM or EX cycle of the instruction
that causes them:

| Signal | Direction (core view) | Valid |
|---|---|---|
| `cop_cmd_valid`, `cop_cmd[11:0]` | out | ID/MEM cycle of `OP_COP`; the command field is passed through unchanged, and its meaning is the coprocessor's |
| `cop_slot` | out | same cycle; the shared memory serves `cop_mem_*` instead of the core |
| `cop_mem_en/we/addr/wdata` | in | only while `cop_slot` is high (asserted in `shared_dmem`) |
| `cop_mem_rdata` | out | registered read data, valid from the edge that ends the slot, i.e. in the coprocessor's EX cycle |
| `cop_cld_valid`, `cop_cld_to_cop`, `cop_cld_reg[7:0]`, `cop_wdata` | out | ID/MEM cycle of `OP_CLD`; `cop_wdata` is the core register (bypassed) |
| `cop_rdata` | in | must be driven during the EX cycle of a CLD from the coprocessor; written to `rd` at its end and forwarded to the next instruction |
| `cop_status[1:0]` | in | sampled at the end of a branch's ID/MEM cycle (conditions `CC_CS0/1`, `CC_NCS0/1`) |

So a coprocessor sees a pipeline made of IF (done by the core) followed by its
own ID/MEM and EX. The core makes no data access in the slot cycle, so the
memory port needs no arbiter. The coprocessor generates its own addresses
there and can take one memory access in every slot it is given.

A branch placed directly behind a command sees that command's outcome only if
the coprocessor derives its status combinationally from the value it is
forming in its EX cycle, as `tb/cop_mac_model.sv` does. A status that is
registered at the end of EX is seen only by a branch at least two
instructions behind the command.

## Instruction word (this design's own encoding)

`insn_t` is 23 bits: `op[3:0] | fn[2:0] | rd[1:0] | rs[1:0] | imm[11:0]`.

| `op` | Meaning |
|---|---|
| `OP_NOP` | nothing |
| `OP_ALU_R` | `rd <- rd fn rs` |
| `OP_ALU_I` | `rd <- rd fn imm[7:0]` |
| `OP_ALU_M` | `rd <- rd fn DM[imm[7:0]]` |
| `OP_ALU_X` | `rd <- rd fn DM[rs + imm[7:0]]` |
| `OP_ST` / `OP_STX` | `DM[imm]` / `DM[rs + imm]` `<- rd` |
| `OP_JMP` | `PC <- imm`, no penalty |
| `OP_BR` | if condition `fn` then `PC <- imm`, one stall cycle |
| `OP_COP` | coprocessor command `imm` |
| `OP_CLD` | `fn[0]=1`: coprocessor register `imm[7:0] <- rd`; `fn[0]=0`: `rd <- ` coprocessor register |

ALU functions: ADD, ADC, SUB, SBC, AND, OR, XOR, MOV (MOV with a memory
operand is the load). Z is updated by every ALU instruction. C is the adder
carry (1 = no borrow on subtraction), and logic operations and MOV leave it
unchanged. Branch conditions: Z, NZ, C, NC, and status bit 0 or 1 set or
clear.

The instruction forms match the register-memory model op1 <- op1 (+) op2,
where only op2 may be in memory (stores excepted). With this model the eight
sample operations of the code-size comparison take 3, 3, 2, 2, 2, 2, 2, 2
instructions. The top testbench assembles and runs all eight.

## What follows the published architecture, and what is this design's own

Follows it:
* the 8-bit data path and the register-memory instruction model;
* the IF / ID-MEM / EX stages and their duties, with early decoding in IF;
* no data-dependency stalls, a conditional-branch stall and no prediction;
* the 12-bit ripple-carry PC incrementer, with the upper bits clocked on the
  carry of the third half adder;
* DAGU input latches opened only for an address calculation;
* a passive coprocessor that gets a command and does ID/MEM and EX;
* a single shared data memory used by the coprocessor only in cycles the core
  designates;
* CLD register transfers, and branches on coprocessor status inputs.

This design's own:
* the instruction word and opcodes, with no two-word instructions;
* 4 registers, the ALU operation set and the flags;
* a 256-byte data memory and 8-bit data addresses, with two addressing modes;
* jumps resolved in IF;
* the exact cycle of branch resolution and of every coprocessor signal;
* two status inputs;
* the asynchronous reset.

The published circuit techniques that have no RTL form are not modelled:
smaller cells off the critical path, and in-place resizing against
short-circuit current. Neither is the half-cycle timing of the published
pipeline, in which the address is calculated in the first half of ID/MEM.
Here every stage is one full cycle between rising edges.

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

* `tb_pagu`: runs 4096 increments through a full wrap, then holds, loads and
  5000 random operations against a reference counter. It also counts
  gated-clock edges, which must be exactly 512 for 4096 increments.
* `tb_dagu`: checks random sums, and checks that input changes with `calc`
  low leave the address unchanged.
* `tb_calmrisc_alu`, `tb_calmrisc_regfile`, `tb_shared_dmem`: random vectors
  against reference models. For the memory, one side writes and the other
  reads back, while the non-owning side drives junk requests.
* `tb_calmrisc_core`: a hand-written program with its expected fetch address
  in every cycle. It checks that a branch costs exactly one bubble and a jump
  none. It also checks bypassed dependencies, the cycle of each coprocessor
  signal, and the final registers and memory.
* `tb_calmrisc_soc` (top, default parameters): runs the eight code-size
  operations, an indexed 16-bit array sum, and a coprocessor dot product. The
  coprocessor part uses slot reads and a write, CLD both ways, and branches on
  status. An instruction-level reference model in the testbench runs the same
  program. All registers, flags, all 256 bytes of memory and the
  accumulator must match it. The halt must be reached after exactly
  instructions + conditional branches cycles: 140 instructions with 33
  branches in 173 cycles, CPI 1.236. Every mechanism is counted and must
  occur: stall (taken and not taken), jump, bypass, slot read and write, CLD
  to and from the coprocessor, status branch, gated PC clock, closed DAGU
  latches, indexed address.

* `tb_table1_ops`: the eight code-size operations alone. Each result is
  computed directly from its operands. The counts 3, 3, 2, 2, 2, 2, 2, 2
  (18 in all) are checked, as is exactly one cycle per instruction for the
  branch-free program.

To run one with Verilator 5 from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/calmrisc_pkg.sv \
    tb/tb_calmrisc_soc.sv --top-module tb_calmrisc_soc -o sim
./obj_dir/sim
```

Testbenches pulse `rst_n` low just after time 0. An asynchronous reset that
starts out low has no falling edge, and the gated upper PC bits would then
not be reset in simulation.

## Changing it

* Register count, data address width and memory size are in `calmrisc_pkg`
  and in the `DMEM_DEPTH` parameter of the top. The instruction fields follow
  `REG_AW` automatically, but `imm` stays 12 bits.
* `pagu` takes `PC_W` and `M`. `M` must be at least 1 and below `PC_W`.
* New instructions: add an opcode to `opcode_e`. Then extend the early decode
  (`if_mem` and friends) and the ID/MEM-to-EX control `case` in
  `calmrisc_core`, and extend the reference model in `tb_calmrisc_soc`.
