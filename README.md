# A small 16-bit load/store processor with a lockstep instruction-set model

This is the RTL of a compact, non-pipelined 16-bit processor meant for an
embedded web server: small enough to sit next to a network controller and run
remote-control code, and simple enough that its register-transfer
implementation can be checked instruction by instruction against a plain
instruction-set model. Arithmetic happens only between registers; only loads
and stores touch data memory; program and data memory are separate (Harvard
organisation), each with a 16-bit address and a 16-bit word. There are four
registers, a carry and a zero flag, and no interrupts.

The instruction set, the block structure of the datapath, the register and
flag set, the bus widths, the fetch-state control values and the idea of
comparing state with a model at the start of every instruction come from the
original description of the processor. The binary encoding, the meaning of
each control-signal value, the number of control states, flag rules beyond
those stated, and reset behaviour were not given and are this design's own
choices; they are listed in "Where this design chooses" below.

## Instruction set

Registers are A, B, T and SP (numbered 0 to 3). T is the implicit second
operand of every two-operand instruction and the data of every store.

| Mnemonic | Effect | Flags |
|---|---|---|
| ADD r / ADDI r,i | r = r + T / r + sext(i) | C = carry out, Z |
| SUB r / SUBI r,i | r = r - T / r - sext(i) | C = borrow, Z |
| AND, ORR, XOR (and ...I forms) | r = r op T / r op sext(i) | Z |
| COM r | r = ~r | Z |
| ROL r | r = {r[14:0], C}, C = r[15] | C, Z |
| ROR r | r = {C, r[15:1]}, C = r[0] | C, Z |
| LUI r,i | r = {i, r[7:0]} | - |
| CLC / STC | C = 0 / 1 | C |
| JNZ / JNC / JMP ad | if Z = 0 / if C = 0 / always: PC = PC + 1 + sext(offset) | - |
| LDB r / LDS r | r = mem[B] / mem[SP] | - |
| STB / STS | mem[B] / mem[SP] = T | - |
| SPC | mem[SP] = address of SPC + 2 | - |
| LPC | PC = mem[SP] | - |
| R2T r | T = r | - |
| NOP | nothing | - |

Immediates are 8 bits, sign-extended; jump offsets are 11 bits, signed and
relative to the instruction after the jump. A 16-bit constant takes two
instructions: `ANDI r,0` / `ORRI r,lo` for the low byte (or any 8-bit
sequence that leaves the low byte right), then `LUI r,hi`, which replaces only
the upper byte.

### Encoding

```
 15      11 10  9  8  7               0
+----------+-----+--+-----------------+
|  opcode  | rs  |im|      imm        |   register / immediate forms
+----------+-----+--+-----------------+
|  opcode  |          offset          |   JNZ, JNC, JMP
+----------+--------------------------+
```

`im` (inst_mode) selects the immediate as the second operand, so ADD and
ADDI share an opcode. Opcodes, from `rtl/proc_pkg.sv`: NOP 0, ADD 1, SUB 2,
AND 3, ORR 4, XOR 5, COM 6, ROL 7, ROR 8, LUI 9, CLC 10, STC 11, JNZ 12,
JNC 13, JMP 14, LDB 15, LDS 16, STB 17, STS 18, LPC 19, SPC 20, R2T 21.
Opcodes 22 to 31 execute as NOP. The package also has `enc_r`, `enc_i` and
`enc_j` functions for writing programs in SystemVerilog.

## Datapath

```
          +---------------------------------------------+
          v                                             |
  PC decoder --next_pc_1--> PC --pc_out--> instruction address --> ROM
    ^   ^   |                                                      |
    |   |   +--> (SPC) data-out mux <-- T (b_out)                  v
 offset  data bus in        |                                IR (ir_ld)
 (IR)    (LPC)              v                         opcode rs im imm offset
                       data bus out                                 |
                                                         sign extension
  register file --a_out---------------------------> ALU <-- op_sel mux <-+
     ^  (reg_sel read, ld_sel write)                 |  ^         ^
     |        --b_out (always T)--------------------------------- +
     |                                               |  |
   mem_sel mux <-- ALU result / data bus in          |  C, Z flags
                   ALU result --> address bus -------+
```

* **PC decoder** (`pc_decoder`) forms PC + 1, PC + sext(offset) or the
  data-bus word, chosen by `pc_sel` and `pc_sel1`.
* **PC** (`pc_reg`) and **IR** (`ir_reg`) are plain load-enabled registers;
  IR also splits the instruction into its fields.
* **Register file** (`reg_file`) has one selectable read port (a), a read
  port fixed on T (b), and one write port with its own select. Read and
  write selects are separate because LDB/LDS read B or SP for the address
  while writing r, and R2T reads r while writing T.
* **ALU** (`alu`) decodes the opcode itself. For every instruction that is not
  arithmetic it passes operand a through. That is how B or SP reaches the
  address bus: the data-memory address is always the ALU result.
* **Flags** (`flag_reg`): the ALU says which flags an opcode writes. The
  control unit lets them change only in the execute state.
* Three word multiplexers (`mux2`): `op_sel` (T or immediate into the ALU),
  `mem_sel` (ALU result or data-bus word into the register file), `mem_sel1`
  (T or the PC decoder output onto the data bus).

## Control sequence and timing

`control_unit` is a three-state machine, and every instruction takes exactly
three clock cycles:

| State | Action |
|---|---|
| `ST_FETCH0` | `prog_en` = 0 (ROM enabled; it is 1 in every other state), `ir_ld` = 1: IR takes ROM[PC] at the clock edge |
| `ST_FETCH1` | `pc_load` = 1 with PC + 1 selected: PC now points past the instruction |
| `ST_EXEC` | the opcode sets the datapath controls; register, flag, PC and memory writes all happen at the clock edge that ends this state |

Every architectural result is in place at `ST_FETCH0`, before the next
instruction has changed anything. That is why the registers, flags and PC
are compared with the model in that state. Program and data memory are read
combinationally. A load therefore completes in its execute cycle, and a
store writes at the end of it.

Because PC has already advanced when a jump executes, a jump's target is
(jump address + 1 + offset). `JMP -1` (offset `0x7FF`) is a jump to itself
and serves as a halt.

## Subroutine call and return

There is no call instruction. A call is the pair

```
SPC          ; mem[SP] = address of SPC + 2
JMP sub      ; to the subroutine
...          ; execution resumes here after LPC
sub: ...
LPC          ; PC = mem[SP]
```

SPC does not store the PC itself. It stores the PC decoder's output, which in
the execute state is PC + 1. PC already points at the JMP, so the stored
value is the address just after the JMP, the correct return point.
Nesting needs the program to move SP itself (for example `SUBI SP,1` before
the inner call and `ADDI SP,1` after it); no instruction changes SP
automatically.

## Memories and system top

`proc_top` joins `proc_core` to `prog_rom` and `data_ram`. Both memories
have 2^AW words of 16 bits (AW = 16 by default, the full address space)
and start filled with zeros. In the ROM a zero word is NOP. The ROM has a
load port (`load_en`, `load_addr`, `load_data`, written on the rising clock
edge). A host fills it while `rst_n` holds the core in reset, then releases
reset, and the core starts at address 0. The top brings out the PC, the data
address bus, the written data and the write strobe `d_data_out`, so that
memory-mapped devices or a monitor can follow the program. The memories are
plain arrays; synthesis maps them to memory cells (2 x 1 Mbit at the default
size). Set AW lower to shrink them. DW must stay 16, because the instruction
format depends on it.

Reset (`rst_n`, asynchronous, active low) clears PC, IR, the four registers
and both flags, and puts the control unit in `ST_FETCH0`. It does not clear
the memories.

## Checking against the instruction-set model

`tb/isa_model_pkg.sv` is an instruction-set model of the processor. One call
of `step()` executes one whole instruction, with no reference to the
datapath. The system testbench runs it in lockstep with the RTL and checks
the same relations a refinement proof would state:

1. IR equals the model's IR in the states after every fetch.
2. The opcode field equals the model's opcode.
3. A, B, T and SP equal the model's registers at every `ST_FETCH0`.
4. C and Z equal the model's flags at every `ST_FETCH0`.
5. PC equals the model's PC at every `ST_FETCH0`.

It also checks every store's address and data, and the 3-cycle rhythm.
The carry flag's path back into the ALU (used by ROL and ROR) is covered by
these simulations and by `tb_alu`.
`tb_proc_top` runs at the default size. It first runs a directed program: a
loop that calls a subroutine five times and sums into T, with hand-computed
results. Then it runs four random 512-word programs of 6000 instructions
each. They widen step by step: computation instructions only, then with
jumps, then with loads and stores, then everything. A mismatch in an early
stage therefore points at a smaller part of the design. Random jumps only go
forward inside the program, each program ends with a jump back to 0, and
SPC/LPC come in pairs.

The testbench counts each mechanism: every opcode, immediate operands, taken
and not-taken conditional jumps, ADD carry, SUB borrow, a carry rotated in,
COM giving zero, stores, calls and returns. It counts a failure for any that
never occurs. A complement instruction that fails to update the zero flag is
exactly the kind of error this comparison exists to catch. `tb_alu` checks
that case directly.

`tb/tb_refinement.sv` states the same five relations as concurrent
assertions (`lemma1` to `lemma5`, plus one that keeps both sides in the same
control state). It checks them against `tb/isa_spec.sv`, a cycle-level
specification that steps through the same three states as the control unit
but executes each instruction behaviourally in one step. This form can be
handed to a property checker as it is. Uniformly random programs almost never
produce a zero result followed directly by COM, so a complement that forgets
the zero flag slips past them. Both random generators therefore insert that
pattern on purpose. With it, the assertions catch such an error early in
the run.

Each block also has its own testbench (`tb/tb_<module>.sv`), checked against
values computed in the testbench. `control_unit` carries assertions: the
state stays legal, the ROM is enabled exactly in `ST_FETCH0`, and a register
write and a memory write never happen in the same cycle.

## Where this design chooses

* The instruction encoding, the opcode numbers and the register numbering.
* Three control states (only the first fetch state was named).
* What `pc_sel`/`pc_sel1`, `reg_sel`/`ld_sel`, `mem_sel`, `mem_sel1`,
  `op_sel` and `d_data_out` mean. The signal names are original; their
  values and widths are chosen here. `flag_ld` is added.
* Jumps are PC-relative (the decoder takes an "offset" and the PC).
* Flag rules beyond "COM updates Z": see the table above. SUB's carry is a
  borrow.
* ROL/ROR rotate through the carry (a 17-bit rotate).
* LUI takes an 8-bit immediate (the instruction list shows only its
  register) and keeps the register's low byte.
* SPC stores PC + 2, which follows from where the data-out multiplexer taps
  the PC path.
* The original single bidirectional data bus is split into `data_bus_in`
  and `data_bus_out`, with `d_data_out` as the write strobe.
* Combinational memory reads, the ROM load port, zero-filled memories, and
  asynchronous reset to zero.

Synthesis of the core gives about 100 word-level cells and 101 flip-flop
bits, plus the two memories.

## Simulating

With Verilator 5 (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/proc_pkg.sv tb/isa_model_pkg.sv tb/tb_proc_top.sv --top-module tb_proc_top
./obj_dir/Vtb_proc_top
```

Every testbench ends with `TB_RESULT checks=N failures=M`. Replace
`tb_proc_top` with any other `tb_*` to run a single block. The system test
runs about 75,000 clock cycles in a few seconds. To run your own program,
write words with the `enc_*` functions and pass them through the ROM load
port, as `load_and_start` in `tb_proc_top.sv` does.

## Files

* `rtl/proc_pkg.sv`: widths, opcodes, register and state enums, encoders
* `rtl/proc_top.sv`: core + program ROM + data RAM
* `rtl/proc_core.sv`: the processor
* `rtl/control_unit.sv`, `pc_decoder.sv`, `pc_reg.sv`, `ir_reg.sv`,
  `reg_file.sv`, `alu.sv`, `sign_ext.sv`, `flag_reg.sv`, `mux2.sv`:
  datapath and control blocks
* `rtl/prog_rom.sv`, `rtl/data_ram.sv`: memories
* `tb/isa_model_pkg.sv`: instruction-set reference model (one call per instruction)
* `tb/isa_spec.sv`: cycle-level specification used by `tb_refinement`
* `tb/tb_*.sv`: testbenches
