# Single-gate processors: logic from one NAND gate, by micro-program

This design shows how a processor whose entire logic is one NAND gate can compute
NOT, AND, OR, NOR and XOR. It has no ALU. Each instruction is a short
*micro-program*. Every step of it either moves a value between registers over a
single shared data line, or applies the gate once. One micro-instruction takes one
clock cycle, so an instruction costs as many cycles as its micro-program has steps.
The design makes that cost visible. The same XOR can be written as a 12-step program
that uses four scratch registers, or as an 11-step program that uses three.

A second processor sits beside the first. It has the same architecture with a NOR
gate in place of the NAND gate, and its micro-instructions are supplied from outside.

## The datapath

```
            +------+    S1 ----+
   data  <->| RA   |-----------o--\
   line     +------+               NAND (or NOR) --o-- S3 --> RZ
    |   <-> | RB   |-----------o--/
    |       +------+    S2 ----+
    |   <-> | RZ   |
    |       +------+
    +---<-> | R1..R4 |  picked by A1 A2
            +--------+
```

* **RA, RB**: the operand registers. An instruction expects its operands here
  before it starts.
* **RZ**: the result register. It is written by the gate, or from the data line.
* **R1..R4**: scratch registers. The two signals A1 and A2 pick one of them
  (00 = R1, 01 = R2, 10 = R3, 11 = R4).
* **The data line**: one wire per bit. In a transfer step exactly one register
  drives it and any number of the others load from it. For example, "RA = RZ,
  RB = RZ" is a single step.
* **The gate**: inputs come from RA and RB, and the output goes to RZ. A gate step
  computes `RZ = RA NAND RB`.

Each register's connection to the data line is a two-way switch with three
settings: `01` drives the line (read), `10` loads from it (write) and `00` is
disconnected.

## The micro-instruction word

One micro-instruction is 13 bits (`sgp_pkg::micro_instr_t`):

| field | bits | meaning |
|---|---|---|
| S1 | 1 | RA to gate input X |
| S2 | 1 | RB to gate input Y |
| S3 | 1 | gate output to RZ |
| S12 | 2 | RA to data line: 01 read, 10 write, 00 off |
| S13 | 2 | RB to data line: same coding |
| S14 | 2 | RZ to data line: same coding |
| A1 A2 | 2 | which of R1..R4 |
| RW | 2 | the selected R1..R4 to data line: same coding |

A gate step is `111 00 00 00 00 00`. Everything else is a transfer. Here are two
examples:

* `000 01 10 00 00 00` is "RB = RA". RA drives the line and RB loads from it.
* `000 00 10 01 01 10` is "R2 = RZ, RB = RZ". RZ drives the line, and RB and R2
  (A = 01, RW = 10) load from it.

Some words are malformed:

* two sources on the line at once;
* the unused code `11`;
* a gate step without both input switches closed;
* RZ written by the gate and the line in the same step.

No correct program produces any of these. The datapath has assertions that catch
each one.

## The micro-programs

The control store (`microcode_rom`) holds six programs, 48 words in all.

| opcode | instruction | steps = cycles | scratch registers |
|---|---|---|---|
| `OP_NOT` | RZ = NOT RA | 2 | none |
| `OP_AND` | RZ = RA AND RB | 3 | none |
| `OP_OR` | RZ = RA OR RB | 9 | R1, R2 |
| `OP_NOR` | RZ = RA NOR RB | 11 | R1, R2 |
| `OP_XOR` | RZ = RA XOR RB, algorithm II | 11 | R1, R2, R3 |
| `OP_XOR_ALG1` | RZ = RA XOR RB, algorithm I | 12 | R1..R4 |

The programs rely on a few NAND identities. Below, `.` stands for NAND.

* NOT: `A . A = ~A`. The program copies RA to RB, then applies the gate.
* AND: apply the gate, copy RZ into both RA and RB, then apply the gate again.
  This gives `~(~(A.B)) = A & B`.
* OR: form `~A` and `~B` separately, then apply the gate: `~A . ~B = A | B`.
  The gate only reads RA and RB, so B is first saved in R1 and `~A` is parked in
  R2. That is why OR needs 9 steps and 2 registers.
* NOR: OR, followed by the two steps that turn NAND into NOT.
* XOR uses the four-gate NAND circuit:
  `A ^ B = (A . (A.B)) . (B . (A.B))`.

Algorithm II is the one the opcode `OP_XOR` uses. Its steps, and the register
contents after each step, are:

| step | action | RA | RB | RZ | R1 | R2 | R3 |
|---|---|---|---|---|---|---|---|
| 1 | R1 = RB | A | B | | B | | |
| 2 | gate | A | B | A.B | B | | |
| 3 | R2 = RZ, RB = RZ | A | A.B | A.B | B | A.B | |
| 4 | gate | A | A.B | A.(A.B) | B | A.B | |
| 5 | R3 = RZ | A | A.B | A.(A.B) | B | A.B | A.(A.B) |
| 6 | RA = R2 | A.B | A.B | A.(A.B) | B | A.B | A.(A.B) |
| 7 | RB = R1 | A.B | B | A.(A.B) | B | A.B | A.(A.B) |
| 8 | gate | A.B | B | B.(A.B) | B | A.B | A.(A.B) |
| 9 | RA = R3 | A.(A.B) | B | B.(A.B) | B | A.B | A.(A.B) |
| 10 | RB = RZ | A.(A.B) | B.(A.B) | B.(A.B) | B | A.B | A.(A.B) |
| 11 | gate | A.(A.B) | B.(A.B) | A ^ B | B | A.B | A.(A.B) |

Algorithm I computes the same circuit, but it first saves both A and B (in R1 and
R2) and writes its intermediate results separately. In Algorithm II, "R2 = RZ" and
"RB = RZ" share one step. Algorithm I spends two steps on that transfer, so it needs
one step and one register more. Both programs are kept so that the difference can
be measured.

After an instruction, the scratch registers still hold the values the program
left there. For example, after `OP_XOR`, R1 = B, R2 = A.B and R3 = A.(A.B). The
testbenches check these values.

## Sequencing and timing

`micro_sequencer` steps through a program one micro-instruction per clock. No
cycles are added for fetching or decoding.

```
clk      _/~\_/~\_/~\_/~\_/~\_
start    ~~~\___________________     sampled at edge 0
busy     ___/~~~~~~~~~~~\_______     steps 0..N-1 execute at edges 1..N
done     _______________/~~~\___     high for one cycle after edge N
```

* An instruction of N micro-instructions takes N cycles from the edge that samples
  `start` to the edge after which `done` is high.
* While `busy` is high, `start` and the operand load (`ld`) are ignored.
* A load given together with `start` lands at the start edge, before the first
  step.
* An opcode the store does not use (6 or 7) has length 0. It raises `done` one
  cycle later without executing any step.

## The NOR processor

The second processor is `single_gate_datapath` with `GATE = GATE_NOR`. No
micro-programs are defined for it, so the top brings its micro-instruction word out
as the port `nor_mi`, and any program can be driven in, one word per clock.

The end-to-end testbench uses De Morgan duality. It feeds the NOR processor the
same words the NAND processor is executing at that moment. A NAND program run on a
NOR gate computes the dual function:

* NOT stays NOT;
* AND becomes OR, and OR becomes AND;
* NOR becomes NAND;
* XOR becomes XNOR.

The testbench checks both processors' results this way.

## Modules

| module | role |
|---|---|
| `sgp_pkg` | micro-instruction struct, switch codes, opcodes, gate kind |
| `logic_gate_unit` | the one gate: NAND or NOR, `WIDTH` copies side by side |
| `gp_regfile` | R1..R4 with the A1/A2 selection and the R/W switch |
| `single_gate_datapath` | RA, RB, RZ, the data line, the switches, the gate and `gp_regfile` |
| `microcode_rom` | the six micro-programs, with a start address and a length for each opcode |
| `micro_sequencer` | micro-program counter, `busy` and `done` |
| `nand_processor` | sequencer, control store and NAND datapath |
| `single_gate_computer` | top: `nand_processor` and a NOR datapath side by side |

`WIDTH` defaults to 1, because the processor has a single gate. With a larger
`WIDTH`, every register and the data line get wider and the gate works bit by bit.
The micro-programs do not change.

## Choices beyond the published architecture

* **Operand load.** The original only assumes that A and B are already in RA and
  RB. Here they are written through `ld`, `ld_a` and `ld_b`.
* **Instruction start.** The original describes no instruction fetch. An
  instruction is started by `start` with an `op`, and its end is reported by `done`.
* **Reset.** An asynchronous active-low reset clears every register to zero.
* **Undriven signals.** An undriven data line reads as zero. So does a gate input
  whose switch is open.
* **Switch code `11`.** It is treated as disconnected, and an assertion flags it.
* **Both XOR algorithms** are available, as two opcodes.
* **Register count of algorithm II.** The original description states both three
  and four scratch registers for it. The program itself uses only R1..R3, so three
  is the figure used here.
* **Step order of algorithm I** follows its micro-instruction table and
  register-contents table: "RB = RZ" comes before "R3 = RZ".
* **NOR processor.** It has no control store, because its micro-programs are left
  open.

## Simulating

Each testbench in `tb/` checks its outputs itself. It prints
`TB_RESULT checks=N failures=M` and stops. A watchdog ends it and counts a failure
if it hangs. To build and run one with Verilator:

```
verilator --binary --timing --assert -y rtl rtl/sgp_pkg.sv \
          tb/tb_single_gate_computer.sv --top-module tb_single_gate_computer
./obj_dir/Vtb_single_gate_computer
```

| testbench | what it checks |
|---|---|
| `tb_logic_gate_unit` | NAND and NOR against their truth tables, at 1 and 8 bits |
| `tb_gp_regfile` | random reads and writes of R1..R4 against a reference array |
| `tb_single_gate_datapath` | random well-formed micro-instructions against a register model |
| `tb_nor_datapath` | the same, with the NOR gate |
| `tb_microcode_rom` | runs every stored program on its own model; checks the result, the length and the number of scratch registers |
| `tb_micro_sequencer` | step sequence, the N-cycle latency, and that `start` is ignored while busy |
| `tb_nand_processor` | every instruction, exhaustively at 1 bit and randomly at 8 bits; cycle counts and scratch registers |
| `tb_xor_register_trace` | both XOR algorithms, comparing all seven registers with their intended contents after every step |
| `tb_single_gate_computer` | the top at default size: both processors, every instruction and every mechanism (ignored start and load, transfers to two registers at once, use of each of R1..R4) |

All of these testbenches pass. Each one also fails, as it should, against a copy
of its module with one deliberate fault.

To add an instruction:

1. Append its words to `ROM` in `microcode_rom`.
2. Add a case with its start address and length.
3. Add an opcode to `sgp_pkg`.

Keep `STEP_BITS` wide enough for the longest program.
