# LC-3 multi-cycle processor

The LC-3 is a small teaching computer. It has 16-bit words, a 16-bit word-addressed
memory (65,536 words), eight general registers R0–R7 and condition codes N, Z, P.
Its 16-bit instructions carry a 4-bit opcode in IR[15:12]. This RTL builds the
LC-3's classic multi-cycle micro-architecture. A single 16-bit **bus** connects the
datapath. Four gates (GatePC, GateMARMUX, GateALU, GateMDR) decide which unit drives
it. A **control finite-state machine** sends out one control word per clock. Each
word is a set of load enables, gates and mux selects. So each instruction runs as a
short sequence of register transfers such as `MAR <- PC` or `MDR <- M[MAR]`.

The core executes the LC-3 operate, load and store instructions: ADD, AND, NOT, LEA,
LD, LDR, LDI, ST, STR and STI. It does not execute control-flow instructions,
traps or interrupts (see *What is not here*).

## Datapath

```
            +---------------------- bus (16) ----------------------------+
            |        ^GatePC        ^GateMARMUX     ^GateALU     ^GateMDR |
            v        |              |               |            |        |
  IR  MAR  REGFILE   PC <- PCMUX    MARMUX          ALU          MDR      |
  |    |   (DR,SR1,  (PC+1 | bus    (ZEXT IR[7:0] | (A = SR1,    ^  |     |
  |    |    SR2)      | adder)       adder)          B = SR2MUX)  |  |     |
  |    +--------------------------------------------------------> MEMORY  |
  +-> control FSM (IR[15:12])                    R <---------------+      |
                                                  N Z P <- LOGIC <--------+
```

| Unit | Module | What it does |
|---|---|---|
| Register file | `lc3_reg_file` | 8 x 16 bits. SR1 and SR2 are read combinationally. DR is written from the bus on the clock edge when `LD_REG` is set. |
| DRMUX / SR1MUX | `lc3_reg_select` | DRMUX: 00 = IR[11:9], 01 = R7, 10 = R6. SR1MUX: 00 = IR[11:9], 01 = IR[8:6], 10 = R6. |
| SR2MUX + ALU | `lc3_alu` | IR[5] picks the B operand: 0 = SR2 (IR[2:0]), 1 = SEXT(IR[4:0]). ALUK: 00 ADD, 01 AND, 10 NOT, 11 pass A. |
| Address unit | `lc3_addr_unit` | The adder computes ADDR1MUX + ADDR2MUX. ADDR1MUX: 0 = PC, 1 = SR1. ADDR2MUX: 00 = 0, 01 = SEXT(IR[5:0]), 10 = SEXT(IR[8:0]), 11 = SEXT(IR[10:0]). MARMUX: 0 = ZEXT(IR[7:0]), 1 = adder. |
| PC | `lc3_pc_unit` | PCMUX: 00 = PC + 1, 01 = bus, 10 = adder. Loads on `LD_PC`. Reset loads the `reset_pc` input. |
| Condition codes | `lc3_cc_logic` | On `LD_CC`, sets exactly one of N, Z, P from the sign of the bus value. |
| Bus | `lc3_bus` | Replaces the tri-state gates with an AND-OR mux. An assertion checks that at most one gate is open. With no gate open the bus reads 0. |
| IR, MAR, MDR | `lc3_datapath` | IR and MAR load from the bus. MDR loads the memory's read data when `MIO_EN` is set, and the bus otherwise. |
| Memory | `lc3_memory` | 2^16 x 16 bits, with the `MIO_EN`, `R_W` and ready `R` handshake. |

Every transfer takes one clock. In each state the control word opens one gate and
sets the `LD_*` bits of the registers that take the bus value. The new values are
there at the next rising edge.

All shared types live in `lc3_pkg`: `state_e` (the state numbers), `ctrl_t` (the
control word, one field per signal named on the datapath) and the mux-select enums.

## The control FSM

The states keep the traditional LC-3 numbers, so fetch is 18 → 33 → 35, not 0 → 1 → 2.
The FSM is a Moore machine. The control word depends only on the state. The next
state depends on the state, on IR[15:12] in state 32, and on the memory's `R` in the
memory states.

| State | Transfer | Control word (other bits 0) | Next |
|---|---|---|---|
| 18 | MAR ← PC, PC ← PC+1 | GatePC, LD_MAR, PCMUX=00, LD_PC | 33 |
| 33 | MDR ← M[MAR] | MIO_EN, R_W=0, LD_MDR | R ? 35 : 33 |
| 35 | IR ← MDR | GateMDR, LD_IR | 32 |
| 32 | decode | — | by opcode |
| 1 / 5 / 9 | DR ← SR1 op (SR2 or imm5) | SR1MUX=01, DRMUX=00, ALUK=00/01/10, GateALU, LD_REG, LD_CC | 18 |
| 14 (LEA) | DR ← PC + off9 | ADDR1MUX=0, ADDR2MUX=10, MARMUX=1, GateMARMUX, LD_REG (no LD_CC) | 18 |
| 2 / 10 / 3 / 11 | MAR ← PC + off9 | ADDR1MUX=0, ADDR2MUX=10, MARMUX=1, GateMARMUX, LD_MAR | 25 / 24 / 23 / 29 |
| 6 / 7 | MAR ← BaseR + off6 | SR1MUX=01, ADDR1MUX=1, ADDR2MUX=01, MARMUX=1, GateMARMUX, LD_MAR | 25 / 23 |
| 24, 29 | MDR ← M[MAR] (pointer) | MIO_EN, LD_MDR | R ? 26 / 31 : stay |
| 26, 31 | MAR ← MDR | GateMDR, LD_MAR | 25 / 23 |
| 25 | MDR ← M[MAR] | MIO_EN, LD_MDR | R ? 27 : 25 |
| 27 | DR ← MDR | GateMDR, DRMUX=00, LD_REG, LD_CC | 18 |
| 23 | MDR ← SR | SR1MUX=00, ALUK=11, GateALU, LD_MDR | 16 |
| 16 | M[MAR] ← MDR | MIO_EN, R_W=1 | R ? 18 : 16 |

LDI and STI are the memory-indirect forms. They read a pointer word first (24 or 29),
move it into MAR (26 or 31), and only then make the real access.

With single-cycle memory an instruction takes these clock counts:
- ADD, AND, NOT, LEA: 5.
- LD, LDR, ST, STR: 7.
- LDI, STI: 9.

Each extra wait cycle per memory access adds one clock per access. The fetch counts
as one access, and LDI/STI make two more.

Opcodes outside the ten above go from decode (32) straight back to fetch (18). They
execute as no-ops that only advance the PC.

## Memory handshake

`MIO_EN` starts an access at the address in MAR. `R_W` picks a read (0) or a write
(1). The memory raises `R` when the access completes, and until then the FSM stays in
its memory state. `lc3_memory` models the access time with the parameter `LATENCY`:
`R` stays low for `LATENCY-1` cycles and rises in the last one. A write happens in
the cycle where `R` is high. Read data comes straight from the array, and MDR samples
it on every cycle of the wait, so its final value is the word read. `lc3_top`
forwards the time as `MEM_LATENCY`, default 1. At the default a memory state lasts
one clock and never loops.

The memory fills the whole address space, so word xFFFF is ordinary memory. The
memory control bus (`mio_en`, `r_w`, `mem_r`, `bus_addr` = MAR, `bus_wdata` = MDR)
is brought out of `lc3_top`. That is where an address decoder for memory-mapped
devices would connect.

## Top level and test harness ports

`lc3_top` (parameter `MEM_LATENCY`) connects `lc3_control`, `lc3_datapath` and
`lc3_memory`.
- **Reset:** while `rst` is high, the PC takes `reset_pc` and the FSM goes to state 18. Registers, IR, MAR and MDR clear, and CC = Z.
- **Loading a program:** while the core is held in reset, write it with `load_en` / `load_addr` / `load_data`.
- **Reading memory back:** `peek_addr` / `peek_data` work at any time.
- **Observation:** `state`, `ctrl`, `pc`, `ir`, `mar`, `mdr`, `psr` and `regs[8]` show the whole machine after every clock. `psr` holds N, Z, P in bits 2:0; its other bits are 0 because privilege and priority are not modelled.

## Where this design departs from or adds to its source

Taken directly from the LC-3 lecture notes this design follows:
- fetch, decode, NOT, ADD (register and immediate), LEA, LD, LDR and LDI, with their state numbers and control signals;
- the mux encodings printed on the datapath (ADDR1MUX, ADDR2MUX, MARMUX, SR2MUX, DRMUX, SR1MUX, PCMUX = 00);
- ALUK = 00 for ADD and 10 for NOT.

Filled in from the standard LC-3, because the notes name these without detailing them:
- AND (state 5, ALUK = 01);
- ST, STR, STI (states 3, 7, 11, 23, 29, 31, 16), with pass-A (ALUK = 11) to route the source register to MDR;
- PCMUX 01/10.

This design's own choices:
- the memory latency parameter and the harness ports;
- reset values;
- bus = 0 when no gate is open;
- no-op treatment of the other opcodes.

LEA leaves the condition codes unchanged, as its state in the notes loads no CC.

## What is not here

- BR, JMP, JSR/JSRR, TRAP and RTI. None of them is described, so their opcodes act as no-ops.
- Interrupts. The fetch state of the LC-3 can branch to an interrupt sequence (state 49), which is not described. This core never branches there.
- Input and output devices, and the memory-I/O address decoder that would select them. No device registers or addresses are defined.

## Simulating

Every file holds one module or package. `rtl/lc3_pkg.sv` must come first. Example
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    --top-module tb_lc3_top rtl/lc3_pkg.sv tb/tb_lc3_top.sv
./obj_dir/Vtb_lc3_top
```

Each testbench ends by printing `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | Covers |
|---|---|
| `tb_lc3_reg_file`, `tb_lc3_reg_select`, `tb_lc3_alu`, `tb_lc3_addr_unit`, `tb_lc3_pc_unit`, `tb_lc3_cc_logic`, `tb_lc3_bus`, `tb_lc3_memory` | Each unit against values computed in the testbench. Includes the worked address examples (x201A + x0AF = x20C9, x4A1D − x34 = x49E9, x0005 + x0D = x0012, x0201 − 3 = x01FE) and the memory's R timing at LATENCY = 3. |
| `tb_lc3_control` | One instruction of each opcode. Checks the visited state sequence, the number of wait cycles, and the key control-word bits of every state. |
| `tb_lc3_datapath` | Hand-driven control words replaying LD R2 at x2019, then NOT, ADD and the store path. |
| `tb_lc3_top` | The full core with 3-cycle memory. Replays the worked examples, then runs 20 random programs (1,200 instructions) against an instruction-level reference model, checking registers, CC, PC, stored words and cycle counts. Counts that every opcode, every CC value, the R = 0 wait and memory writes occurred. |
| `tb_lc3_trace` | `lc3_top` at default parameters. Prints a tick-by-tick trace: the state, the control signals that are 1, the non-zero mux selects, and a register listing after each instruction. Checks every tick's state and signal list for LD, NOT, LEA and ADD. |
| `tb_lc3_puzzle` | `lc3_top` at default parameters. A position-independent, self-modifying program adds A and B to the opcode fields of its own first two instructions. Placed at random addresses, and must finish in 172 cycles. |

## Changing it

- **Memory access time:** set `MEM_LATENCY` on `lc3_top`.
- **New instruction:** add its states to `state_e` and give them a control word and a next state in `lc3_control`. The datapath already has PCMUX inputs for the bus and the address adder, and DRMUX/SR1MUX inputs for R6/R7, so control-flow instructions need control-FSM changes only. BR also needs a BEN register fed from N, Z, P and IR[11:9].
