# Single-cycle MIPS processor with exceptions

This is a processor for a subset of the MIPS instruction set. It completes
every instruction in exactly one clock cycle. Nothing is pipelined and no
instruction takes more than one cycle, so the cycles-per-instruction figure is
exactly 1. The cost is the clock period, which must cover the slowest
instruction. Here that is `lw`, whose path runs through five structures in
series: instruction memory, register-file read, ALU, data memory, and
register-file write.

The design grows in stages from a datapath that only runs `add`. Each further
instruction adds a mux input, an adder or a shifter. At the end a small set of
coprocessor-0 registers and a privileged-mode bit add exceptions and an
operating-system mode.

## Instruction set

| instruction        | format | encoding (standard MIPS)   | what it does |
|--------------------|--------|----------------------------|--------------|
| `add rd, rs, rt`   | R | op 0x00, funct 0x20      | rd = rs + rt; traps on signed overflow |
| `addi rt, rs, imm` | I | op 0x08                  | rt = rs + sx(imm); traps on signed overflow |
| `lw rt, imm(rs)`   | I | op 0x23                  | rt = mem[rs + sx(imm)] |
| `sw rt, imm(rs)`   | I | op 0x2B                  | mem[rs + sx(imm)] = rt |
| `beq rs, rt, off`  | I | op 0x04                  | if rs == rt: PC = PC+4 + (sx(off) << 2) |
| `j target`         | J | op 0x02                  | PC = {PC+4[31:28], target, 00} |
| `jal target`       | J | op 0x03                  | as `j`, and $31 = PC+4 |
| `jr rs`            | R | op 0x00, funct 0x08      | PC = rs |
| `sll rd, rt, sh`   | R | op 0x00, funct 0x00      | rd = rt << sh |
| `slt rd, rs, rt`   | R | op 0x00, funct 0x2A      | rd = (rs < rt, signed) ? 1 : 0 |
| `syscall`          | R | op 0x00, funct 0x0C      | raises the syscall exception |
| `mfc0 rt, crN`     | - | 0x40000000 \| rt<<16 \| N<<11 | rt = CP0 register N (privileged) |
| `mtc0 rt, crN`     | - | 0x40800000 \| rt<<16 \| N<<11 | CP0 register N = rt (privileged) |
| `ret`              | - | 0x42000018 (MIPS `eret`) | PC = EPC and return to user mode (privileged) |

Any other encoding is an illegal instruction. Register `$0` always reads as
zero.

## Datapath

Each cycle runs from left to right:

1. **Fetch.** `pc_reg` holds the PC. `insn_mem` returns the instruction
   addressed by the PC without waiting for a clock edge.
2. **Register read.** `reg_file` reads `rs` on port s1 and `rt` on port s2.
3. **Operands.** The sign-extension unit widens the 16-bit immediate. The
   **ALUinB** mux then chooses the second ALU operand: `rt` or the extended
   immediate.
4. **Execute.** `alu` adds, subtracts (this is how `beq` compares), shifts
   left (`sll`), or produces the signed less-than bit zero-extended to 32 bits
   (`slt`). It also outputs a zero flag and a signed-overflow flag.
5. **Memory.** The ALU result is the `data_mem` byte address. The data to
   store comes from register `rt`. The memory writes only when **DMwe** is
   high.
6. **Write back.** The **Rdst** mux chooses the destination register: `rt`,
   `rd`, or `$31` for `jal`. The **Rwd** mux chooses the data to write: the
   ALU result, the memory word, PC+4 (for `jal`), or a CP0 register (for
   `mfc0`). The write happens only when **Rwe** is high.
7. **Next PC** (`next_pc`). A "+4" adder gives PC+4. A second adder adds the
   branch offset, shifted left by two, to PC+4. The next PC then goes through
   a chain of muxes, each stage overriding the one before:
   - the **BR** stage takes the branch target when BR AND zero;
   - the **JP** stage takes the jump target;
   - the jr stage takes the register value;
   - the last stage takes the exception vector when an exception is taken, or
     EPC on `ret`.

All state changes at the single rising clock edge that ends the cycle: the PC,
the register file, the data memory, and the CP0 registers.

Reads are combinational and writes happen only at the edge. So an instruction
always reads the values from before its own write, and the next instruction
sees the result. A value is never written and read at the same edge.

## Control

`control` has two parts, both combinational.

The **first part** decodes the instruction. For each instruction type it gives
one row of a control word (`ctrl_t` in `mips_pkg`); in effect this is a ROM
indexed by opcode. For the six base instructions the row is:

| insn | BR | JP | ALUinB | ALUop | DMwe | Rwe | Rdst | Rwd |
|------|----|----|--------|-------|------|-----|------|-----|
| add  | 0 | 0 | 0 | add | 0 | 1 | rd  | ALU |
| addi | 0 | 0 | 1 | add | 0 | 1 | rt  | ALU |
| lw   | 0 | 0 | 1 | add | 0 | 1 | rt  | mem |
| sw   | 0 | 0 | 1 | add | 1 | 0 | (rt) | (ALU) |
| beq  | 1 | 0 | 0 | sub | 0 | 0 | (rt) | (ALU) |
| j    | 0 | 1 | 0 | add | 0 | 0 | (rt) | (ALU) |

Values in parentheses are don't-cares, set to the default. `sll`, `slt`,
`jal`, `jr`, `mfc0`, `mtc0` and `ret` add their own rows. These use the extra
control bits: the 2-bit ALUop, the third and fourth Rdst/Rwd choices, and the
jr, CRwe and ret controls.

Note the `addi` row: it writes `rt`. The control table this design derives from gives
`addi` the same Rdst value as `add`. That would write the register named in
immediate bits 15:11. This design follows the instruction's definition
instead.

The **second part** recognises exceptions; see the next section.

## Exceptions and privileged mode

This is the least obvious part of the design.

**State.** `cp0` holds four coprocessor-0 registers, each a separate register
rather than an entry in a register array:

| CP0 reg | name     | contents |
|---------|----------|----------|
| $8      | BADVADDR | address of the last misaligned `lw`/`sw` that trapped |
| $12     | MASK     | bit k = 1: cause code k traps |
| $13     | CAUSE    | cause code of the last exception taken |
| $14     | EPC      | PC of the instruction that took the last exception |

`cp0` also holds the **PSR** bit: 1 = privileged (kernel) mode, 0 = user mode.
After reset the processor is in privileged mode with every exception enabled.

**Causes.** The controller raises one of these, in this priority order:

| code | cause |
|------|-------|
| 10 | illegal instruction |
| 11 | `mfc0`, `mtc0` or `ret` in user mode |
| 8  | `syscall` |
| 12 | signed overflow in `add` or `addi` |
| 4  | misaligned `lw` address |
| 5  | misaligned `sw` address |

An exception is taken only if MASK bit `code` is set.

**Taking an exception.** Nothing the instruction would have written is
written: the register-file write, the memory write and any `mtc0` are all
cancelled. At the clock edge:
- EPC takes the PC of the faulting instruction;
- CAUSE takes the code;
- BADVADDR takes the data address, for address errors only;
- PSR is set;
- the PC goes to `EXC_VECTOR` (0x180 by default).

**Masked exceptions.** If the cause is masked, the instruction behaves as
follows:
- an illegal, privileged or `syscall` instruction does nothing;
- an overflowing add writes the wrapped sum;
- a misaligned access uses the word that contains the address.

**The handler.** The handler reads CAUSE and EPC with `mfc0`. EPC points at
the faulting instruction itself, so to continue after it the handler adds 4
and writes EPC back with `mtc0`. `ret` then jumps to EPC and clears PSR. The
operating system also uses `ret` to enter user code the first time: it loads
EPC with the user entry point and executes `ret`.

There is no virtual memory, so there are no page or protection faults. The
misaligned-address check is the only source of BADVADDR.

## Top-level interface (`mips_single_cycle`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset (PC = `RESET_PC`, registers cleared, privileged mode) |
| `load_we`, `load_addr`, `load_data` | in | 1, log2(IMEM_WORDS), 32 | writes one instruction word per cycle into instruction memory; use it while `rst` is high |
| `pc`, `insn` | out | 32 | the instruction executing this cycle |
| `rf_we`, `rf_waddr`, `rf_wdata` | out | 1, 5, 32 | its register-file write |
| `dm_we`, `dm_addr`, `dm_wdata` | out | 1, 32, 32 | its data-memory write |
| `exc`, `exc_code` | out | 1, 5 | it takes an exception, and the cause |
| `priv` | out | 1 | current PSR |

| parameter | default | meaning |
|-----------|---------|---------|
| `IMEM_WORDS` | 1024 | instruction memory size, 32-bit words |
| `DMEM_WORDS` | 1024 | data memory size, 32-bit words |
| `RESET_PC`   | 0x0000_0000 | PC after reset |
| `EXC_VECTOR` | 0x0000_0180 | exception handler address |

Both memories are indexed by byte address bits `[log2(WORDS)+1 : 2]`. Higher
address bits are ignored, so addresses wrap around the memory size.

## Files

`rtl/`:

| file | content |
|------|---------|
| `mips_pkg.sv` | encodings, mux-select enums, `ctrl_t`, cause codes |
| `mips_single_cycle.sv` | top: wires the datapath; holds the ALUinB, Rdst and Rwd muxes and the sign extension |
| `pc_reg.sv` | program counter |
| `insn_mem.sv` | instruction memory with load port |
| `reg_file.sv` | 32 x 32 register file |
| `alu.sv` | add / sub / sll / slt, zero and overflow flags |
| `data_mem.sv` | data memory |
| `next_pc.sv` | PC+4, branch and jump targets, next-PC mux chain |
| `control.sv` | decoder and exception recognition |
| `cp0.sv` | EPC, CAUSE, BADVADDR, MASK, PSR |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`.
`mips_ref_pkg.sv` holds what the two full-processor testbenches share:
instruction encoder functions and `mips_ref_model`, an instruction-set model
written separately from the RTL.

`tb_mips_single_cycle` runs the whole processor at its default parameters:
- It assembles a kernel/user program.
- It runs the instruction-set model alongside the processor and compares PC,
  writes and exceptions every cycle.
- It checks the final registers, memory and CP0 state against hand-computed
  values.
- It checks that the program takes exactly one cycle per instruction (87
  cycles).
- It counts each mechanism and fails if any of them never happens: each
  instruction, taken and untaken `beq`, each exception cause, a masked
  overflow, and the switch to user mode.

`tb_mips_random` generates four random programs of about 600 instructions
each and runs them against the model, again at the default parameters. The
programs use forward branches and jumps, aligned and misaligned accesses,
traps, and writes to the exception mask. The first handler return drops to
user mode, so privileged instructions then trap too. At the end of each
program, every register, the touched data words and the CP0 state are
compared with the model.

Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/mips_pkg.sv tb/mips_ref_pkg.sv tb/tb_mips_single_cycle.sv \
    --top-module tb_mips_single_cycle \
    -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run another test, for example
`tb_mips_random`, `tb_alu` or `tb_control`. The unit tests do not need
`mips_ref_pkg.sv`. Every test finishes in a few seconds at most.

To run your own program, write it into instruction memory through the load
port while `rst` is high, then release `rst`. `build_program` in the
top-level testbench shows encoder functions you can copy.

## How far it can be trusted, and where it departs from the source design

- **Verification.** All modules are simulated against independent reference
  models or hand-computed values. Each testbench fails when its module is
  broken deliberately. Verilator lint and the slang front end of yosys accept
  every file. No timing analysis has been done.
- **Exception datapath.** The source design draws exception support on a
  multi-cycle datapath, with registers between the stages. Here the same
  functions are fitted into the single-cycle datapath, and `mfc0` data enters
  the register write-data mux rather than going through the ALU. The exception
  vector, reset PC, cause codes, mask layout and misaligned-address exceptions
  are choices of this design.
- **Clocking.** One clock edge drives all state. Delayed or inverted clock
  copies, one way the source design suggests to avoid races, are not used.
- **Control.** The control word is written as a lookup by instruction. A gate
  version would use one OR gate per signal over the decoded instruction
  lines. For the six base instructions it gives the same outputs, except
  for the `addi` destination.
- **Assertion.** An immediate assertion in the top checks that at most one
  PC-redirecting control (branch, jump, jr, ret) is active per instruction.
- **`addi` destination.** `addi` writes `rt`, as its definition requires. See
  the note under Control.
- **Memories.** Sizes, word-only access and the instruction-load port are this
  design's choices. Neither memory models its own latency; both read
  combinationally.
- **Reset.** The register file is cleared at reset. The memories are not: a
  program must store a location before it loads from it.
