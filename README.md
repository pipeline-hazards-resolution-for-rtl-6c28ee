# A five-stage RISC pipeline with complete hazard resolution

This is a 32-bit RISC processor in synthesizable SystemVerilog. It has five pipeline stages: IF, ID, EXE, MEM and WB. The design's point is hazard handling. Every case in which an instruction needs a register value that an older instruction has not yet written is listed, sorted by how soon the value exists, and given its own fix. A fix is a bypass, a few stall cycles chosen by a small state machine, or an extra register that keeps a just-written result. Control hazards are handled by a branch-target buffer (BTB) with 2-bit saturating counters, which predicts branches in the fetch stage. Wrong-path instructions are flushed when a branch resolves.

Instructions and data live in separate memories (Harvard organisation), so the pipeline has no structural hazards.

## Pipeline

| Stage | Work | Modules |
|-------|------|---------|
| IF  | Reads the instruction at `pc`. Looks `pc` up in the BTB, and sets the next `pc` to the predicted target or to `pc+4`. | `imem`, `btb`, `sat_counter` |
| ID  | Decodes the instruction and reads two registers. Resolves `J` (target in the word) and `JR` (target in a register). | `decoder`, `regfile`, `id_hazard_fsm` |
| EXE | Picks each operand from the ID value or one of three bypasses. Runs the ALU. Decides conditional branches and updates the BTB. | `exe_hazard_fsm`, `alu` |
| MEM | Loads (combinational read) and stores (clock edge). Chooses the store data. | `dmem`, `mem_bypass_ctrl` |
| WB  | Writes the register bank and fills the *additional register*. | `regfile` |

`rpp_top` holds the pipeline registers (IF/ID, ID/EX, EX/MEM, MEM/WB), the operand multiplexers, the additional register and the stall/flush sequencing. All shared types are in `rpp_pkg`: the opcodes, the decoded control word `ctrl_t`, the producer class `res_class_e`, the multiplexer encodings `op_src_e`/`id_src_e` and the event flags `events_t`.

## Instruction set

All instruction words are 32 bits, in MIPS-style R, I and J formats.

- **R format:** `ADD/ADDU, SUB/SUBU, AND, OR, XOR, NOR, SLT, SLTU, SLL, SRL, SRA, SLLV, SRLV, SRAV, JR`
- **I format:** `ADDI/ADDIU, SLTI, SLTIU, ANDI, ORI, XORI, LUI, LW, SW, BEQ, BNE`
- **J format:** `J`

Semantics:

- The immediate is sign-extended for arithmetic, comparison and addressing, and zero-extended for the logic operations.
- `ADD` and `ADDI` do not trap on overflow. No exceptions exist.
- `BEQ`/`BNE` take their target from the 16-bit immediate, read as an **absolute byte address**. For example, `0x14404000` = `BNE R2,R0,0x4000` (BNEZ) jumps to 0x4000. `J` likewise takes its 26-bit field as an absolute byte address. `JR` jumps to the register value.
- There are no branch delay slots. `R0` always reads zero.
- Unknown opcodes execute as no-ops.
- After reset, fetch starts at `RESET_PC` = 0x4000.

## Producers, consumers and the 18 data hazards

Each instruction has a *producer class*, which says where its result appears:

- **ResEXE**: ALU instructions. The result exists at the end of EXE.
- **ResMEM**: loads. The result exists at the end of MEM.

It may also be a *consumer*, named by the stage that needs the register:

- **RegID**: `JR` needs its target register in ID.
- **RegEXE**: ALU operands, branch comparisons and address bases.
- **RegMEM**: store data.

A result reaches the register bank in WB. By then the three following instructions have already left ID, the only stage that reads the bank. That gives 2 producer classes × 3 consumer stages × 3 distances (i+1, i+2, i+3), so 18 hazards.

The bank has no internal write-to-read forwarding: a read in the cycle of the write returns the old value. The **additional register** covers this. It holds, for one cycle, the value and destination that WB wrote in the previous cycle. That is exactly what an instruction three behind the producer needs when it reaches EXE.

The hazards fall into three categories:

1. The result does not exist yet: wait, then bypass.
2. The result is in the stage that made it: bypass.
3. The result has moved on but is not readable from the bank by this consumer: bypass from a later stage, or from the additional register.

Resolution of each hazard in this design:

| Producer → consumer | i+1 | i+2 | i+3 |
|---|---|---|---|
| ResEXE → RegID (JR) | **1 stall**, MEM bypass | MEM bypass | WB bypass |
| ResMEM → RegID (JR) | **2 stalls**, WB bypass | **1 stall**, WB bypass | WB bypass |
| ResEXE → RegEXE | MEM bypass (`S_OP`=1) | WB bypass (2) | additional register (3) |
| ResMEM → RegEXE | **1 stall**, WB bypass (2) | WB bypass (2) | additional register (3) |
| ResEXE → RegMEM (store) | bypassed in EXE, carried | bypassed in EXE, carried | bypassed in EXE, carried |
| ResMEM → RegMEM (store) | WB bypass in MEM | bypassed in EXE, carried | bypassed in EXE, carried |

"MEM bypass" is the EX/MEM result register, "WB bypass" the MEM/WB result register. When several older instructions write the same register, the nearest one wins.

### ID stage: `id_hazard_fsm`

This controller serves only `JR`. It has five states:

- **S0** is the default. It reads at once from the bank, the MEM bypass or the WB bypass. It also checks three conditions:
  - **C1:** the instruction in EXE is a ResEXE producer of `rs`.
  - **C2:** the instruction in EXE is a ResMEM producer of `rs`.
  - **C3:** the instruction in MEM is a ResMEM producer of `rs`.

  If any of them holds, S0 becomes the first wait cycle: `stall` is raised, ID holds and a bubble enters EXE.
- **C1** goes to **S1**, which reads the MEM bypass.
- **C2** goes to **S2a** (second wait), then to **S2b**, which reads the WB bypass.
- **C3** goes to **S3**, which reads the WB bypass.

Every reading state returns to S0. Two inputs were added to keep the FSM consistent with the rest of the pipeline:

- `advance`: low while EXE itself is stalled. It freezes the FSM, so the conditions are checked again once EXE moves.
- `flush`: set by a misprediction found in EXE, which discards the JR. It returns the FSM to S0.

### EXE stage: `exe_hazard_fsm`

This controller drives the two operand multiplexers `S_OP1` (rs) and `S_OP2` (rt). Their inputs are:

| Select | Source |
|---|---|
| 0 | value read in ID |
| 1 | MEM bypass |
| 2 | WB bypass |
| 3 | additional register |

The FSM has two states:

- **S0** checks condition **C**: a used operand is the destination of a load now in MEM. If C holds, it raises `stall`. IF, ID and EXE hold, a bubble enters MEM, and the FSM moves to S1.
- **S1** takes the loaded value from the WB bypass and lets the instruction go.

This is the classic one-cycle load-use penalty. It is the only wait EXE ever needs.

While EXE holds, the bypassed values of *all* operands are written back into the ID/EX register. Without this, a value that was only in the additional register during the wait would be gone one cycle later. The rule is this design's addition, and `tb_rpp_top` has a test that fails without it.

### MEM stage: `mem_bypass_ctrl`

Store data passes through the EXE multiplexers like any operand, so five of the six store hazards are already resolved when the store reaches MEM. The one left is a load directly before the store. While the store was in EXE, the loaded word did not exist yet. In MEM, the load sits in WB, so the multiplexer takes the WB bypass. MEM never stalls.

## Branch prediction: `btb` and `sat_counter`

The BTB is direct-mapped, indexed by the word-address LSBs of the instruction. Each line holds:

- the full branch address as a tag,
- the jump address,
- an n-bit saturating counter (n = `CNT_W` = 2).

The counter counts up on *taken* and down on *not taken*, clamped at both ends. It predicts *taken* when its value is 2^(n-1) or more. With two bits, the prediction flips only after two wrong guesses in a row.

- **IF:** a hit that predicts *taken* sends the next fetch to the stored target. A miss, or a *not taken* prediction, fetches `pc+4`.
- **EXE:** every `BEQ`/`BNE` and `J` updates the BTB. If the branch is already in its line, the counter steps and the target is refreshed. Otherwise the line is overwritten and its counter starts at `01`, then steps by this first decision.

So a branch taken on its first execution starts its next visit with counter `10` and is predicted taken.

Penalties:

| Event | Cost |
|---|---|
| Correctly predicted branch, taken or not | 0 bubbles |
| `J`/`JR` whose target the BTB did not supply | 1 bubble (the instruction fetched behind it is dropped in ID) |
| Mispredicted `BEQ`/`BNE` | 2 bubbles (IF/ID and ID/EX are cleared, fetch restarts at the correct address) |
| Non-branch that somehow hit a *taken* line | treated like a misprediction, restarts at `pc+4` |

## Programmable ALU: `alu` and `lut_alu`

The processor's instruction set is meant to be adaptable, so the ALU's arithmetic and logic operations are not hard-wired. Each one is a *page*: a small truth table in rewritable storage. Rewriting a page changes what the matching instruction computes, and the pipeline itself is untouched.

A page (`rpp_pkg::lut_page_t`, 17 bits) is applied to the operands one bit-slice at a time:

- `res_tt[7:0]`: result bit `i` = `res_tt[{a[i], b[i], c[i]}]`
- `cout_tt[7:0]`: carry into bit `i+1` = `cout_tt[{a[i], b[i], c[i]}]`
- `cin`: `c[0]`

Any operation made of a bitwise function and a ripple carry fits in one page. Reset loads the standard set:

| Page | Operation | `cin` | `cout_tt` | `res_tt` |
|---|---|---|---|---|
| 0 | add (`ADD`, `ADDU`, `ADDI`, `ADDIU`, load/store address) | 0 | E8 (majority) | 96 (a^b^c) |
| 1 | subtract (a + ~b + 1) | 1 | B2 | 69 |
| 2 | and (`AND`, `ANDI`) | 0 | 00 | C0 |
| 3 | or (`OR`, `ORI`) | 0 | 00 | FC |
| 4 | xor (`XOR`, `XORI`) | 0 | 00 | 3C |
| 5 | nor | 0 | 00 | 03 |

For example, writing `res_tt = C3` into page 4 turns `XOR`/`XORI` into xnor. Writing `{cin 1, cout_tt 8E, res_tt 69}`, that is the tables of `~a ^ b ^ c` and of the majority of (`~a`, b, c), into page 1 turns subtraction into `b - a`. Page 0 also computes load and store addresses, so rewriting it changes addressing as well.

A page is written on a rising clock edge through `alu_pg_we/sel/data`. It is used from the next cycle on by whatever instruction is in EXE. Shifts, `SLT`/`SLTU` and `LUI` cannot be written as a per-bit table with one carry, so they stay as fixed logic.

## Top-level interface (`rpp_top`)

| Port | Use |
|---|---|
| `clk`, `rst_n` | Clock. Synchronous active-low reset. |
| `prog_we/addr/data` | Writes the instruction memory. Usually done during reset. |
| `dm_ext_we/addr/wdata/rdata` | Preloads and inspects the data memory. Only preload while the core is in reset. |
| `dbg_reg_addr/data` | Reads any register. |
| `retire_valid/pc` | An instruction leaves WB. |
| `events` (`rpp_pkg::events_t`) | Per-cycle flags: which ID condition fired, ID/EXE stalls, which bypass was used, taken prediction, ID redirect, misprediction, correct branch prediction. |
| `if_pc`, `if_pred_cnt` | Fetch address and the BTB counter it sees. |
| `exe_s_op1/2`, `exe_result` | The EXE multiplexer selects and the ALU output. |
| `alu_pg_we/sel/data` | Rewrites one ALU truth-table page. Reset restores the standard pages. |

Parameters:

| Parameter | Default |
|---|---|
| `RESET_PC` | 0x4000 |
| `IMEM_DEPTH` | 1024 words |
| `DMEM_DEPTH` | 1024 words |
| `BTB_ENTRIES` | 16 |
| `CNT_W` | 2 |

Both memories are word-addressed by `addr[log2(DEPTH)+1:2]`, and higher address bits are ignored. A program placed at 0x4000 therefore occupies word 0 onward.

## Simulating

Every testbench in `tb/` is self-checking and ends with a `TB_RESULT checks=N failures=M` line. Example, for the whole processor:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rpp_pkg.sv tb/rpp_asm_pkg.sv rtl/*.sv tb/tb_rpp_top.sv \
  --top-module tb_rpp_top -Mdir obj && ./obj/Vtb_rpp_top
```

A block testbench `tb/tb_<block>.sv` is built the same way, with `rtl/rpp_pkg.sv`, the block's file and what it instantiates (`btb` needs `sat_counter`). `tb/rpp_asm_pkg.sv` holds instruction encoders and a sequential reference model of the instruction set. Use them to write new programs.

## What the tests establish

`tb_rpp_top` runs the processor at its default parameters. For every program it compares all registers and the data region with the reference model. The programs are:

- **Load/use sequence** (`addi R2,R0,0x100; lw R3,0(R2); addu R4,R2,R3`, with memory word 0x100 = 0x80). Checks that `S_OP1` is 1 for the `LW` and 2 for the `ADDU`, that exactly one bubble is inserted, and that `R4` = 0x180.
- **The four-instruction branch example** (`ADDI R2,R0,8; BNEZ R2,0x4000; ADDI; ADDU`, endless). The fetch addresses must run 4000, 4004, 4008, 400C, 4000, 4004, 4000, with the counter at `01` on the first `BNEZ` fetch and `10` on the second.
- **A loop closed by `BNEZ`.** On the first visit there is no prediction. The counter then reads `10` and the second visit is fetched straight from the target.
- **`JR` after each ID hazard case.** Retire times confirm 1, 2, 1, 0 and 0 stall cycles for C1, C2, C3 and the two immediate cases, and that a `JR`/`J` redirect costs one bubble.
- **A load-use stall while another operand sits in the additional register**, and a load followed by a store of the loaded word.
- **A rewritten ALU page.** Right after reset the xor page is rewritten as xnor. `XOR` and `XORI` with bypassed and load-stalled operands must then give xnor results. The next program's reset must bring xor back.
- **24 random loops** of ALU, load, store, forward-branch, `J` and `JR` instructions. Each `JR` takes its target from an ALU result or from memory, with 0 to 2 unrelated instructions in between, so the ID and EXE controllers also meet each other's stalls.

The test also counts 15 pipeline mechanisms (listed in `events_t`) and fails if any never happened.

Each block also has its own testbench against an independent model. The counter test also replays a branch taken nine times and then not taken once: a 1-bit counter mispredicts twice per period, a 2-bit counter once. The blocks covered are: counter, BTB, register bank, ALU, the look-up-table pages, decoder, both FSMs, MEM control and both memories. The page test rewrites pages as xnor, and-not, increment, reverse subtract and add-with-carry. It checks each against its arithmetic meaning.

## Where this departs from or goes beyond the source description

- **ALU pages.** The original ALU is built from rewritable SRAM look-up-table pages, one per operation. The page format is not specified. Here a page is a per-bit table with a ripple carry, held in registers with a simple write port. Only add, subtract and the logic operations are paged. Shifts, comparisons and `LUI` use fixed logic.
- **Select value after a load-use stall.** After the stall, the loaded value arrives on `S_OP` input **2** (WB), consistent with the stated numbering of the inputs. A published waveform of the same sequence labels that cycle with input 1.
- **`JR` as the ID-stage consumer.** The source classes name a consumer in ID but not the instruction. `JR` is the natural one.
- **Instruction details.** Absolute branch targets follow the reference waveform. The exact opcode subset is this design's choice.
- **Sizes and timing.** Memory sizes, BTB size and organisation (direct-mapped, replace on miss), asynchronous memory reads, reset values and the observation/loading ports are this design's choices.
- **Operand refresh during an EXE wait.** This is an addition. The FSM `advance`/`flush` inputs are additions too.
