# An eight-phase accumulator CPU

This is a very small accumulator machine. It has one 8-bit accumulator, a 32-word memory
that holds both program and data, and eight instructions. Each instruction is fetched and
executed in the same fixed sequence of eight clock phases. The machine has no pipeline and
no hazards, and each control signal is decoded from just two values: the current phase and
the opcode. That keeps the controller tiny and the timing easy to reason about, which makes
the design a good target for an implementation flow: it was meant to be synthesized,
scan-inserted and placed-and-routed for a 1 GHz clock (1 ns period) in a 45 nm standard-cell
library.

The only external ports are `clk`, `rst` and `hlt`.

## Instruction set

An instruction word is 8 bits: `opcode[7:5]` and `address[4:0]`.

| opcode | mnemonic | effect |
|---|---|---|
| 0 | HLT | raise `hlt` and stop until reset |
| 1 | SKZ | skip the next instruction if the accumulator is zero |
| 2 | ADD | `acc <= acc + mem[address]` (carry dropped) |
| 3 | AND | `acc <= acc & mem[address]` |
| 4 | XOR | `acc <= acc ^ mem[address]` |
| 5 | LDA | `acc <= mem[address]` |
| 6 | STO | `mem[address] <= acc` |
| 7 | JMP | `pc <= address` |

After reset, the accumulator, instruction register and PC are zero, and execution starts at
address 0. Code can modify itself: a STO to an instruction word takes effect the next time
that word is fetched.

## The eight phases

The phase generator is a 3-bit counter. The controller (`rtl/controller.sv`) is a
combinational decode of `phase`, `opcode` and `zero`. The table below is the whole control
design. A blank cell means 0. "ALUOP" means ADD, AND, XOR or LDA.

| phase | name | sel | rd | ld_ir | inc_pc | halt | ld_pc | data_e | ld_ac | wr |
|---|---|---|---|---|---|---|---|---|---|---|
| 0 | INST_ADDR | 1 | | | | | | | | |
| 1 | INST_FETCH | 1 | 1 | | | | | | | |
| 2 | INST_LOAD | 1 | 1 | 1 | | | | | | |
| 3 | IDLE | 1 | 1 | 1 | | | | | | |
| 4 | OP_ADDR | | | | not HLT | HLT | | | | |
| 5 | OP_FETCH | | ALUOP | | | | | | | |
| 6 | ALU_OP | | ALUOP | | SKZ and zero | | JMP | STO | | |
| 7 | STORE | | ALUOP | | | | JMP | STO | ALUOP | STO |

How the table relates to the datapath:

- **Addressing.** `sel` puts the PC on the memory address during the fetch phases 0–3. From
  phase 4 on, the operand address from the instruction register is on the address instead.
- **Memory reads are registered.** The memory captures `mem[addr]` at the end of any clock
  in which `rd` is high, and holds its output otherwise. So the instruction word is on the
  bus from phase 2. The instruction register loads it at the ends of phases 2 and 3. The
  operand is on the bus from phase 6, and the accumulator loads the ALU result at the end of
  phase 7.
- **PC update.** The PC increments once, at the end of phase 4. SKZ increments it a second
  time, at the end of phase 6, when the accumulator is zero. JMP loads it from the
  instruction's address field in phases 6 and 7, which overrides the increment.
- **Stores.** STO puts the accumulator on the data bus (`data_e`) in phases 6 and 7. It
  writes memory at the end of phase 7. `rd` is low throughout, so the bus has one source.
- **Halting.** In phase 4 of a HLT, `halt` is raised and the PC does not increment. `halt`
  also disables the phase counter, so the machine stays in phase 4 with `hlt` high until
  `rst`.

**Timing.** Every instruction takes exactly 8 clocks. If a HLT follows N executed
instructions, `hlt` rises 8·N + 4 clocks after reset is released.

## Blocks and files

| file | block |
|---|---|
| `rtl/risc_pkg.sv` | widths, `opcode_t`, `phase_t` |
| `rtl/risc.sv` | top: wires the blocks below |
| `rtl/phase_generator.sv` | the 3-bit phase counter (`counter_clk`), enabled by `!halt` |
| `rtl/controller.sv` | the phase/opcode decode above |
| `rtl/alu.sv` | eight operations on accumulator and bus word; `zero` flags accumulator == 0 |
| `rtl/register.sv` | register with synchronous load; used as accumulator (`register_ac`) and instruction register (`register_ir`) |
| `rtl/counter.sv` | counter with reset > load > count priority; used as program counter and phase counter |
| `rtl/mux.sv` | address select: PC (`sel`=1) or operand address |
| `rtl/driver.sv` | data-bus source select, with an assertion that memory is never read while the accumulator drives |
| `rtl/memory.sv` | 32 × 8 memory, synchronous write and registered read |

All resets are synchronous and active high. The memory array is not reset.

## Where this design makes its own choices

The CPU's description names the blocks, their connections and the control signals. It does
not give the opcode encoding, the per-opcode ALU operations, the phase table or the memory
timing. Everything in the two tables above is therefore one consistent choice: the classic
eight-instruction accumulator machine that fits the eight ALU operations, the `zero` flag
and the nine named control signals. Other specific points:

- **Word width.** The processor is described as a 16-bit CPU, but its ALU is specified with
  8-bit operands and result. This RTL uses 8-bit words. The widths live in `risc_pkg`
  (`DWIDTH`, `AWIDTH`).
- **Cycles per instruction.** Instructions are sometimes described as single-cycle. The
  block structure, however, has a phase generator driving the controller. This RTL follows
  the block structure: 8 clocks per instruction.
- **Data bus.** The block diagram draws a tri-state buffer between the accumulator path and
  a shared bus. Here the bus is a plain select (`driver`), so that no high-impedance value is
  needed. The buffer is fed from the accumulator output rather than from the ALU output.
  For STO the two are equal, and this avoids a combinational loop from the ALU output
  through the bus back into the ALU.
- **Phase generator enable.** The phase generator has an enable input, driven by `!halt`,
  so that HLT really stops the machine.
- **Program loading.** There is no program-load port. Programs are written into
  `memory_inst.array` before reset is released, for example hierarchically from a testbench.
- **Not in the RTL.** Scan chains (inserted by the synthesis tool on the netlist) and the
  45 nm physical implementation are not part of this RTL. Their cell counts, power and area
  therefore cannot be compared with this code.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

- `tb_alu`: all opcodes with corner and random operands.
- `tb_controller`: exhaustive over phase × opcode × zero, against a table built per
  instruction class.
- `tb_register`, `tb_counter`, `tb_memory`: random stimulus against shadow models.
- `tb_mux`, `tb_driver`: both selections with random data.
- `tb_phase_generator`: the 8-clock period, the hold when the enable is low, and reset.
- `tb_risc`: the whole CPU at its default parameters, against an instruction-level
  interpreter. It runs four directed programs that use every instruction, with the SKZ skip
  both taken and not taken. It then runs 56 random memory images whose reference run halts
  within 200 instructions. Each run checks three things:
  - the exact clock at which `hlt` rises (8·N + 4);
  - the final accumulator and PC;
  - all 32 memory words.

  It also counts each mechanism (every opcode executed, skip taken and not taken, jump,
  store, halt) and fails if one never happened.

To run a testbench with plain Verilator from the top of the tree:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/risc_pkg.sv tb/tb_risc.sv \
          --top-module tb_risc -o sim
./obj_dir/sim
```

Replace `tb_risc` with any other testbench name. Every run takes well under a second.

## Changing the design

- **Memory size and word width.** Change `AWIDTH`/`DWIDTH` in `risc_pkg`. The instruction
  word is `OPWIDTH + AWIDTH` bits and must equal `DWIDTH`. `risc.sv` takes the opcode from
  the top bits of the instruction register, so widening the data word without widening the
  address field leaves unused middle bits.
- **The instruction set.** To change it, edit `opcode_t`, `is_alu_op` and the `case`
  statements in `alu.sv` and `controller.sv`. Then update the reference models in `tb_alu`,
  `tb_controller` and `tb_risc`.
