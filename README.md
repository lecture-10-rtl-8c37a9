# PARCv1 processors: single-cycle and FSM microarchitectures

The same small MIPS-like instruction set, PARCv1, is implemented here twice,
each design making the opposite trade between cycles per instruction (CPI) and
cycle time:

| design | CPI | cycle time | why |
|---|---|---|---|
| single-cycle (`sc_proc`) | 1 | long | every instruction goes from fetch to write-back between two clock edges |
| FSM (`fsm_proc`) | > 1 (about 9 on mixed code) | short | every cycle moves one value over one shared bus |

Processor time per program is instructions × CPI × cycle time. The two designs
show how the choice of microarchitecture moves the last two factors against
each other. Both split into a **control unit**, which decides what happens, and
a **datapath**, which holds and transforms the data. Control signals flow from
control to datapath, and status signals (the instruction word, an equality
flag) flow back.

The two designs assume different technologies:

- **Single-cycle:** logic and ports are cheap. It uses a register file with two
  read ports and two write ports, and a dual-ported memory that answers within
  the cycle (one port for instructions, one for data).
- **FSM:** logic and ports are expensive. It has one register-file port, one
  memory port (still combinational), and as few registers and functional units
  as possible, all joined by a single bus.

`parc_top` instantiates both systems side by side, each with its own memory.

## Instruction set

32-bit instructions, 32 registers of 32 bits, `r0` always zero, byte
addresses, word accesses only. Field positions follow the datapath drawings:
`rs = ir[25:21]`, `rt = ir[20:16]`, `imm/offset = ir[15:0]`,
`targ = ir[25:0]`, and `rd = ir[15:11]`.

| instruction | effect | encoding (ir[31:26] / ir[5:0]) |
|---|---|---|
| `addu rd, rs, rt` | R[rd] ← R[rs] + R[rt] | 0x00 / 0x21 |
| `addiu rt, rs, imm` | R[rt] ← R[rs] + sext(imm) | 0x09 |
| `mul rd, rs, rt` | R[rd] ← low 32 bits of R[rs] × R[rt] | 0x1C / 0x02 |
| `lw rt, off(rs)` | R[rt] ← M[R[rs] + sext(off)] | 0x23 |
| `sw rt, off(rs)` | M[R[rs] + sext(off)] ← R[rt] | 0x2B |
| `j targ` | PC ← {PC+4[31:28], targ, 00} | 0x02 |
| `jal targ` | R[31] ← PC+4; PC ← {PC+4[31:28], targ, 00} | 0x03 |
| `jr rs` | PC ← R[rs] | 0x00 / 0x08 |
| `bne rs, rt, off` | if R[rs] ≠ R[rt]: PC ← PC+4 + sext(off)·4 | 0x05 |
| `lw.ai rt, off(rs)` | R[rt] ← M[R[rs] + sext(off)]; R[rs] ← R[rs] + 4 | 0x3B |
| `addu.mm rd, rs, rt` | M[R[rd]] ← M[R[rs]] + M[R[rt]] (FSM processor only) | 0x00 / 0x28 |

The encodings of the first nine are the standard MIPS32 ones. The encodings of
the two extension instructions, `lw.ai` (auto-incrementing load) and `addu.mm`
(memory-to-memory add), are this design's own choice. There are no branch
delay slots. An unrecognised instruction acts as a no-op.

All shared types live in `rtl/parc_pkg.sv`:
- the opcode constants and a `decode_inst` function that both control units use;
- the memory request `{typ, addr, data}` and response `{data}` structs;
- the control-signal structs `sc_ctrl_t` and `fsm_ctrl_t`;
- the FSM state enum.

## Single-cycle processor

```
        +------------------------------------------ jr (rs value) -------------+
        | +---------------------------------------- j_targ  (j_tgen) ----------+
        | | +-------------------------------------- br_targ (br_tgen) ---------+
        | | | +------------------------------------ pc_plus4 -----------------+
        v v v v                                                              |
 pc_sel [mux] -> PC -> imemreq.addr          rs -> regfile -> op0 -+-> alu ---+-> dmemreq.addr
                  |                          rt -> (2 read) -> rt -+-> mul    |
                  +-> +4 -> pc_plus4         op1 mux: rt | pc_plus4 | sext    |
 imemresp.data = ir -> control unit          wb_sel: alu | mul | dmemresp.data -> regfile write
```

- `sc_dpath` holds the only state element besides the register file: the PC.
  The word returned by the instruction port is used directly as the
  instruction register for this cycle.
- `sc_immgen` makes the three derived values:
  - `sext(ir[15:0])`;
  - `j_targ = {pc_plus4[31:28], ir[25:0], 00}`;
  - `br_targ = pc_plus4 + sext(ir[15:0])·4`.
- `sc_alu` adds, compares or passes op1 through. Compare gives `eq` for `bne`.
  Pass-through routes PC+4 to the register file for `jal`.
- `sc_regfile` has a second write port and there is a second +4 adder on the
  rs value. Both exist only for `lw.ai`, which must write both the loaded value
  (to `rt`) and the incremented base (to `rs`) in one cycle. When `rt == rs`,
  the increment wins.
- `sc_mul` is a full combinational 32×32 multiplier; it is the long path that
  makes this design's cycle long.
- `sc_ctrl` is a pure decoder (the instruction request is always valid):

| inst | pc_sel | op1_sel | alu_func | wb_sel | rf_waddr | rf_wen | dmem req |
|---|---|---|---|---|---|---|---|
| addu | pc+4 | rf | + | alu | rd | 1 | – |
| addiu | pc+4 | sext | + | alu | rt | 1 | – |
| mul | pc+4 | – | – | mul | rd | 1 | – |
| lw | pc+4 | sext | + | mem | rt | 1 | read |
| sw | pc+4 | sext | + | – | – | 0 | write |
| j | j_targ | – | – | – | – | 0 | – |
| jal | j_targ | pc+4 | copy | alu | 31 | 1 | – |
| jr | jr | – | – | – | – | 0 | – |
| bne | eq ? pc+4 : br_targ | rf | cmp | – | – | 0 | – |
| lw.ai | pc+4 | sext | + | mem | rt (and rs ← rs+4) | 1 | read |

**Timing.** Everything from the PC clock edge to the next edge is combinational:
instruction read, decode, register read, ALU or multiply, data-memory read and
register-write setup. Register-file and memory writes and the PC update all
happen on the same rising edge. Reset is synchronous and active high; it loads
PC = 0 and masks all writes and memory request valids.

## FSM processor

The FSM processor keeps only one of each resource and reuses it over several
short cycles.

```
          Datapath Bus (32 bits, one driver per cycle)
  +-----+-----+-----+----------+-----------+---------+------------+--> memreq.addr
  |     |     |     |          |           |         |            |
  v     v     v     v          v           v         v            |
  PC    IR    A    B<-[bus|B<<1] C<-[bus|C>>1]  WD -> memreq.data  RD <- memresp.data
  |     |     |     |          |                                  |
  |    iau    +--> alu <-------+ (C[0])        RF (1 port, addr: 31|0|rs|rt|rd)
  |     |          |  \-> eq                    |
 pc_bus iau_bus  alu_bus                     rf_bus          rd_bus  --> bus
```

Registers and units:

- `PC`, `IR`, `A`, `WD`: load from the bus when enabled.
- `B`: loads either the bus or `B << 1`.
- `C`: loads either the bus or `C >> 1`.
- `RD`: captures the memory response on every clock edge.
- `fsm_iau` derives immediates from IR:
  - `si` = sext(IR[15:0]);
  - `ts` = IR[25:0] << 2;
  - `sis` = sext(IR[15:0]) << 2.
- `fsm_alu` works on A, B and C[0]:
  - `+4` = A + 4;
  - `+` = A + B;
  - `+?` = A + B if C[0] else A;
  - `cmp` = A == B;
  - `jt` = {A[31:28], B[27:0]}.

  It reports `eq` = (A == B) to the control unit.
- `fsm_regfile` has a single address, chosen from 31, 0, rs, rt or rd. It drives
  the bus when `rf_bus_en` is set and writes the bus value when `rf_wen` is set.

The bus carries one value per cycle. The drawn tri-state drivers are written
as a multiplexer over the five enables (`pc`, `iau`, `alu`, `rf`, `rd`), and an
assertion checks that at most one is on. The memory address *is* the bus, so
any value on the bus can serve as an address.

### Micro-operation sequences

`fsm_ctrl` is a Moore machine: each state's control word depends only on the
state. The one exception is the branch decision in B2, which reads `eq`. After
F2 the machine dispatches on the opcode in IR, and each sequence ends by
returning to F0.

| inst | states (after fetch) | cycles incl. fetch |
|---|---|---|
| fetch | F0: memreq.addr ← PC, A ← PC (RD captures the word) · F1: IR ← RD · F2: PC ← A + 4 | 3 |
| addu | A ← RF[rs] · B ← RF[rt] · RF[rd] ← A + B | 6 |
| addiu | A ← RF[rs] · B ← sext(imm) · RF[rt] ← A + B | 6 |
| mul | M0 A ← RF[r0] · M1 B ← RF[rs] · M2 C ← RF[rt] · M3..M34 A ← A +? B, B ← B<<1, C ← C>>1 · M35 RF[rd] ← A +? B | 39 |
| lw | A ← RF[rs] · B ← sext(off) · memreq.addr ← A + B · RF[rt] ← RD | 7 |
| sw | WD ← RF[rt] · A ← RF[rs] · B ← sext(imm) · memreq.addr ← A + B (write) | 7 |
| j | B ← targ<<2 · PC ← A jt B | 5 |
| jal | RF[31] ← PC · B ← targ<<2 · PC ← A jt B | 6 |
| jr | PC ← RF[rs] | 4 |
| bne | A ← RF[rs] · B ← RF[rt] · A ← sext(off)<<2, done if A == B · B ← PC · PC ← A + B | 6 / 8 |
| lw.ai | as lw, then RF[rs] ← A + 4 | 8 |
| addu.mm | memreq.addr ← RF[rs] · A ← RD · memreq.addr ← RF[rt] · B ← RD · WD ← A + B · memreq.addr ← RF[rd] (write) | 9 |

Some steps are easy to misread:

- **The PC register.** After F2 it already holds PC+4. That is why `jal` links
  `PC` directly, and why `bne` adds the offset to `PC`. A still holds the old PC
  during `j`/`jal`, so the top four target bits come from the instruction's own
  address, not from PC+4. The two differ only when the instruction sits in the
  last word of a 256 MiB region.
- **B2 of `bne`.** It compares the *old* A and B (`eq` is combinational from
  the registers) while the same cycle loads A with the branch offset. If the
  operands are equal the machine returns to fetch at once.
- **Multiply.** It is shift-and-add:
  - A accumulates from zero (read from `r0`);
  - B holds the multiplicand and doubles each step;
  - C holds the multiplier and halves each step;
  - `+?` adds B only when the current low bit of C is 1.

  M3..M34 are one state repeated 32 times under a 5-bit counter. By M35, C has
  been shifted 32 times and is zero, so that last `+?` adds nothing, and it
  writes the finished low 32 bits of the product to `rd`.
- **`lw.ai`.** It writes `rt` first and then `rs` from the A register, which
  still holds the original base. If `rt == rs` the increment wins.
- **`addu.mm`.** It relies on RD capturing memory every cycle: RF[rs] drives
  the bus (and therefore the memory address) in one cycle, and RD is copied
  into A in the next.

## Memories and the top level

- `mem_dual` (single-cycle system) and `mem_single` (FSM system) are arrays
  of `WORDS` words. The default of 1024 words (4 KiB) is this design's choice.
- Reads are combinational and always driven. Writes happen on the rising
  edge when the request is valid and of type write.
- Bits [1:0] of the address are ignored, and the word index wraps modulo
  `WORDS`.

`parc_top` has one clock and a separate synchronous reset per system. While a
system is held in reset, its memory's data port is handed to a **host port**
(`*_host_wen/addr/wdata/rdata`), which loads programs and reads results back.
The host port is an addition of this design. After reset is released each
processor fetches from address 0. `fsm_state` brings out the FSM controller's
state for observation.

## Departures from the course material

The following are this design's own choices, not given by the course material
it follows:

- **Encodings and fields.** The instruction encodings, `rd = ir[15:11]`, and
  the decision that `r0` is hardwired to zero in both register files (the
  multiply sequence relies on it).
- **Single-cycle control rows.** The rows for addiu, sw, jal, bne and lw.ai. Also the
  ALU `cmp` and `copy` functions that they need; `eq` is taken from bit 0 of
  the ALU result, where the drawing taps it.
- **FSM sequences.** The fetch, addu and addiu sequences; the course only names
  them.
- **Extension instructions.** How `lw.ai` and `addu.mm` are carried out. The
  course gives only what the instructions do. On the single-cycle processor
  `lw.ai` uses the second register-file write port and the rs + 4 adder. On the
  FSM processor both instructions are micro-operation sequences that need no
  new datapath paths.
- **Unknown instructions and reset.** Handling of unknown instructions, reset
  behaviour (PC = 0, synchronous), and the undriven-bus value 0.
- **Sizes and top level.** The memory size and the host port.

Not built: `addu.mm` on the single-cycle processor. The course introduces it
only for the FSM design. In one cycle it would need three memory reads and a
write.

Not modelled: timing. The critical-path and cycle-time estimates the course
discusses belong to a technology, and nothing here depends on delays.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

- **Unit tests.** Register files, ALUs, multiplier, immediate units and
  memories are checked against arithmetic written out in the testbench.
  `sc_dpath_tb` and `fsm_dpath_tb` drive random control words cycle by cycle
  against a register-transfer model. `sc_ctrl_tb` checks the control table row
  by row. `fsm_ctrl_tb` walks every instruction's sequence and checks, state by
  state, which unit drives the bus and which register it loads.
- **Program tests.** `sc_proc_tb`, `fsm_proc_tb` and `parc_top_tb` run
  pseudo-random programs built by `tb/parc_tb_pkg.sv`. The programs contain:
  - arithmetic, multiplies, loads and stores;
  - a counted `bne` loop and a not-taken `bne`;
  - a `jal`/`jr` call;
  - `lw.ai` on both processors, and `addu.mm` on the FSM processor.

  An instruction-level reference model in the same package runs each program.
  The tests compare all of memory and a dump of all registers. They also check
  the cycle count: exactly one per instruction on the single-cycle processor,
  and exactly the sum of the table above on the FSM processor.
- **End-to-end test.** `parc_top_tb` runs both systems through the host ports
  at the default parameters. It counts each mechanism (taken and not-taken
  branches, jumps, loads and stores, multiplies and FSM multiply steps, the
  extension instructions) and fails if any never occurred.
- **Execution-diagram sequence.** `lw_addu_j_tb` runs `lw; addu; j`: 3 cycles
  on the single-cycle processor, 18 on the FSM processor.

Run any testbench with plain Verilator from the directory that holds `rtl/` and
`tb/`, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/parc_pkg.sv tb/parc_tb_pkg.sv tb/parc_top_tb.sv --top-module parc_top_tb
./obj_dir/Vparc_top_tb
```

Every testbench finishes in well under a second.

## Files

- `rtl/parc_pkg.sv`: shared types, constants, instruction decoder.
- Single-cycle processor: `rtl/sc_proc.sv` = `sc_ctrl` + `sc_dpath`
  (`sc_regfile`, `sc_alu`, `sc_mul`, `sc_immgen`). Memory: `rtl/mem_dual.sv`.
- FSM processor: `rtl/fsm_proc.sv` = `fsm_ctrl` + `fsm_dpath` (`fsm_regfile`,
  `fsm_alu`, `fsm_iau`). Memory: `rtl/mem_single.sv`.
- `rtl/parc_top.sv`: both systems with their memories and host ports.
- `tb/<module>_tb.sv`: one testbench per module.
- `tb/parc_tb_pkg.sv`: encoders, program generator and reference model.
- `tb/lw_addu_j_tb.sv`: the execution-diagram sequence.
