# Parallel ALU with a hardware dependency manager

This is a small processing unit that runs four instructions at once on four
ALUs. It finds the data dependencies among them in hardware. An instruction
that reads a register written by an earlier instruction of the same set waits
for that result. Every other instruction runs in the first execute clock. The
producer's result goes straight to the waiting instruction's operand, without a
round trip through the register file. The unit needs no compiler scheduling:
the external system hands over four instructions in program order and gets
back the twelve registers, exactly as if the four had run one after another.

Everything is small on purpose:

- four instructions per set, one ALU per instruction;
- twelve data registers of 4 bits each;
- seven 4-bit operations.

The architecture follows a published FPGA design study. That study presented
it in VHDL with mixed clocked and level-sensitive logic. This RTL is a fully
synchronous SystemVerilog version of it. Its cycle timing is chosen to match
the latencies the study reports. The sections below say where it departs.

## Instructions and registers

An instruction is `[opcode:3][A:4][B:4][Q:4]`. A and B are source registers
and Q is the destination. Registers are numbered 1 to 12. Address 0, and
addresses 13 to 15, name no register.

| opcode | operation | result Q |
|---|---|---|
| 000 | none | instruction is bypassed |
| 001 | OR | A \| B |
| 010 | AND | A & B |
| 011 | ADD | A + B, modulo 16 |
| 100 | SUB | A − B, modulo 16 |
| 101 | shift left | A << 1, zero fill |
| 110 | shift right | A >> 1, zero fill |
| 111 | rotate right | {A[0], A[3:1]} |

The single-operand operations ignore B. There is no carry or flag output.

An instruction is **active** if its opcode is not 000 and Q names a register.
Any other instruction is **bypassed**: it is never executed, it changes no
register, and nothing waits for it. A source address that names no register
reads as zero.

## Interface (`alu_dm_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; all logic is on the rising edge |
| `rst` | in | 1 | synchronous reset, active high |
| `ndr` | in | 1 | "new data ready"; its rising edge starts a cycle |
| `instr_in[4]` | in | `instr_t` (15 bits) | the four instructions, in program order |
| `ireg[12]` | in | 4 | input registers 1..12 (`ireg[0]` is register 1) |
| `ready` | out | 1 | idle; a new set may be started |
| `complete` | out | 1 | the last set has finished and `oreg` holds its result |
| `bypass[4]` | out | 1 | instruction i is bypassed in the running set |
| `oreg[12]` | out | 4 | output registers 1..12 |

The handshake works like this:

1. While `ready` is high, drive `instr_in` and `ireg`, then raise `ndr`.
2. The first clock edge that sees `ndr` high (having seen it low) starts the
   cycle. The same edge captures `instr_in` and `ireg`, so the host may change
   them afterwards.
3. `ready` and `complete` drop on that edge.
4. When the set is done, `complete` and `ready` rise together and `oreg` holds
   the result.
5. `complete` stays high until the next cycle starts.

`ndr` must go low again before the next set can start. Edges of `ndr` while
the unit is busy are ignored.

Each output register equals the input register of the same number unless an
instruction wrote it. If two instructions write the same register, the later
one wins.

## How an execution cycle unfolds

The clocks below are counted from edge 0, the edge that sees the `ndr` rising
edge.

| edge | what happens |
|---|---|
| 0 | Input buffer and instruction register capture the inputs. The dependency manager leaves Ready. |
| 1 | The distributer registers every ALU's operands. The dependency manager raises Enable for each active instruction with no pending producer, and Bypass for the inactive ones. |
| 2 | The enabled ALUs compute and raise Complete. |
| 3 | The dependency manager registers the Complete flags. The distributer registers the new results as the operands of the waiting instructions. If nothing is waiting, Complete and Ready rise here. |
| 4 | Enable rises for the instructions whose producers have now all completed. |
| 5 | Those ALUs complete, and so on. |

So a set takes **3 clocks per dependency level**:

- 3 clocks when all four instructions are independent;
- 12 clocks for a chain where each instruction needs the previous result.

A set in which every instruction is bypassed takes 1 clock. At a 6 ns clock
this gives 18 ns for an independent set. Each dependency adds 18 ns, which is
the cost per dependency the original study reports.

Why the third clock per level? An ALU result is ready after edge *n*, but the
dependent instruction's operand is a register in the distributer. That
register takes the result at edge *n+1*. The dependency manager therefore
releases the dependent instruction from a copy of the Complete flags that is
also delayed by one clock. The dependent ALU is enabled at *n+2* and computes
at *n+3*. Feeding the raw Complete into the release logic would save a clock
per level. But the ALU would then sample an operand register that had not yet
taken the result.

## Dependencies, forwarding and merging

The three blocks together give in-order results. Only one kind of hazard needs
the dependency manager to hold anything back.

- **Read after write** (a later instruction reads what an earlier one writes).
  The dependency manager holds back instruction j until every earlier active
  instruction whose Q equals j's A or B has completed. The distributer takes
  j's operand from the *nearest* such earlier instruction, straight from that
  ALU's output.
- **Write after read** (a later instruction overwrites what an earlier one
  reads). Nothing to do. Operands only ever come from the captured input
  registers or from *earlier* instructions, so a later write can never reach
  an earlier reader.
- **Write after write** (two instructions write one register). Nothing to do
  for ordering. The output merge in the distributer applies completed results
  in instruction order, so the later instruction's value wins, whichever ALU
  finished first.

The output registers are a combinational merge: each is the input buffer,
overridden by every completed instruction that writes it. The output buffer
follows this merge while the unit is busy and freezes on the edge that raises
Complete. Intermediate values can therefore appear on `oreg` during a cycle.
Only the values present when `complete` is high are the result.

## Blocks

| file | role |
|---|---|
| `rtl/alu_dm_pkg.sv` | sizes, `opcode_e`, `instr_t`, address helpers |
| `rtl/alu.sv` | one ALU; registered result, Complete one clock after Enable, held while Enable stays high |
| `rtl/dependency_manager.sv` | Idle/Run state machine, dependency check, Enable, Bypass, Ready and Complete |
| `rtl/distributer.sv` | operand selection with forwarding (registered), output merge (combinational) |
| `rtl/transfer.sv` | 12 × 4-bit load-enabled buffer; one instance for inputs (loads while Ready), one for outputs (loads while busy) |
| `rtl/instruction_register.sv` | holds the four instructions during a cycle (loads while Ready) |
| `rtl/alu_dm_top.sv` | wires the above together |

The dependency manager asserts that a bypassed instruction is never enabled.
Synthesised by itself, the whole unit has about 630 word-level cells and 216
flip-flop bits.

## Departures from the original description

- **Fully synchronous.** The original mixed clocked processes with processes
  that react to any input change. Here every block is clocked on one edge,
  with a synchronous reset that the original lacks.
- **Stored instructions and data.** The original modules read instruction
  fields straight from the unit's inputs. Here an instruction register and
  the input transfer buffer capture them on the start edge, so the host need
  not hold them during the cycle.
- **Bypass.** The original sets Bypass for opcode 000 in its prose but tests
  for destination 0 in its code. Here either condition bypasses.
- **Completion.** The original's code waits for all four ALUs even when some
  are bypassed, which never ends. Here the wait covers active instructions
  only, as the original's prose says.
- **Bypass pin.** The original routes Bypass to the ALUs, but its ALU has no
  such pin. Here the ALUs are simply not enabled, and Bypass is a status
  output of the unit.
- **Forwarding priority.** The original forwards from the *first* earlier
  writer of a register. Here it forwards from the *nearest*, which in-order
  semantics require. Bypassed instructions are never forwarded from.
- **Cycle timing.** This is this design's own: 3 clocks from start to Complete,
  plus 3 per dependency level. It matches the latencies the original reports
  (18 ns behavioural, "3 cycles per dependency"). The original also reports
  post-layout totals of about 24 ns (independent) and 78 ns (four-deep
  chain). This RTL gives 18 ns and 72 ns at a 6 ns clock: the same 18 ns per
  dependency, without the extra 6 ns of the post-layout figures.
- **Clock period.** The original states both a 40 ns minimum period and a 6 ns
  simulation clock. Nothing here depends on the period.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. `tb/tb_ref_pkg.sv` is the shared reference model. It executes a set in
order on a copy of the registers and computes each instruction's dependency
level, from which the expected latency follows.

- `tb_alu` runs every opcode on all 256 operand pairs. It also checks the
  one-clock latency, the hold while enabled and the clearing of Complete.
- `tb_distributer` uses random sets, many restricted to four registers so
  that forwarding and double writes are frequent. It checks the operands and
  the merged outputs.
- `tb_dependency_manager` models the ALUs as a one-clock delay. It checks the
  clock on which each instruction is first enabled (3·(level−1)+1), the total
  latency, Bypass, and that an `ndr` edge during a cycle is ignored.
- `tb_transfer` and `tb_instruction_register` check load and hold.
- `tb_alu_dm_top` runs the whole unit at its default size on 403 sets: an
  independent set, the four-deep chain, a bypass with a double write, and
  random sets. It checks every output register and the exact latency. While
  a cycle runs it scrambles the inputs and pulses `ndr`. It also counts
  parallel issue, dependency stalls, bypasses, double writes and ignored
  `ndr` edges, and fails if any of them never occurred.
- `tb_workload_1000` streams 1000 instructions as 250 back-to-back sets, with
  `ndr` raised as soon as `complete` is seen. It checks every result and the
  total clock count: 1000 clocks when all sets are independent (4 per set:
  3 of latency, 1 for the next `ndr` edge), 3250 when every set is a
  four-deep chain (13 per set).

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_alu_dm_top rtl/alu_dm_pkg.sv tb/tb_ref_pkg.sv tb/tb_alu_dm_top.sv
./obj_dir/Vtb_alu_dm_top
```

Replace the top module and the last file to run another testbench. Each one
finishes in well under a second.

## Changing it

- **Sizes.** The sizes are the constants at the top of `alu_dm_pkg.sv`.
  `DATA_W` can change freely. `NUM_REGS` must stay below `2**ADDR_W`.
  `NUM_INST` sets the number of ALUs, and the dependency check and forwarding
  scale with it (the check grows with the square of `NUM_INST`). The directed
  sets in the testbenches are written for four instructions.
- **Operations.** A new operation needs a wider `OP_W`, an `opcode_e` entry,
  a case in `alu.sv` and a case in `ref_op` in the reference model.
