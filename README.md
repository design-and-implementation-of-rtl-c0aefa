# Compact single-cycle RV32 core with hybrid CSA + CLA arithmetic

This core is a small 32-bit RISC-V processor for embedded use. Its
arithmetic units avoid long carry-ripple chains:

- **Add and subtract** use a carry lookahead adder (CLA). It is made of
  four 8-bit lookahead blocks.
- **Multiply** uses a *hybrid* multiplier. A tree of 3:2 carry-save
  compressors reduces the 32 partial products to two vectors, with no carry
  propagation. One CLA then adds those two vectors.
- **AND, OR and XOR** are plain gates.

Every instruction completes in one clock cycle.

The core executes a subset of RV32I, plus a multiply:

| instruction | operation | unit |
|---|---|---|
| `add rd, rs1, rs2` | rs1 + rs2 | CLA adder |
| `sub rd, rs1, rs2` | rs1 − rs2 | CLA subtractor (a + ~b + 1) |
| `mul rd, rs1, rs2` | low 32 bits of rs1 × rs2 | hybrid multiplier |
| `and` / `or` / `xor rd, rs1, rs2` | bitwise | logic unit |
| `addi rd, rs1, imm` | rs1 + imm | CLA adder, immediate operand |
| `lw rd, imm(rs1)` | rd ← mem[rs1 + imm] | CLA adder forms the address |
| `sw rs2, imm(rs1)` | mem[rs1 + imm] ← rs2 | CLA adder forms the address |

All other encodings write nothing and behave as a NOP. There are no
branches or jumps: the PC only counts up by 4.

## Datapath

```
 PC (+4) -> instruction memory -> decoder -> control unit
                                     |
 operand_a -> x1 ,                   v
 operand_b -> x2 '-> register file (32 x 32) --rdata1--------------> A
                                    --rdata2--> ALUSrc mux (imm) --> B
       A,B -> [CLA adder] [CLA subtractor] [hybrid multiplier] [AND/OR/XOR]
                    \____________ ALU control mux ____________/
                                       | alu_result
                     +-----------------+------------------+
                     v                                    v
              data memory (address)               write-back mux -> rd
                                                          |
                                 result capture (x3..x6 -> four outputs, done)
```

The four units always work on the same operands at the same time. The
4-bit ALU control code picks one result. There is no pipeline, so there
are no hazards. A register written at one clock edge is read by the next
instruction.

## The hybrid multiplier (`hybrid_multiplier`, `csa_row`, `cla_adder`)

This is the least obvious part of the design.

1. **Partial products.** Partial product *i* is `a << i` when `b[i]` is
   set, and 0 otherwise. The core only returns the low 32 bits of the
   product, so every partial product is cut to 32 bits. This gives the
   same low word for signed and unsigned operands, as RV32 `mul` requires.
2. **Carry-save layers.** Each layer splits its operands into groups of
   three. A `csa_row` turns each group into two vectors:
   - a sum vector, `x ^ y ^ z`;
   - a carry vector, `maj(x, y, z)` shifted left by one bit.

   The one or two operands left over pass straight to the next layer. With
   32 operands the counts per layer are 32 → 22 → 15 → 10 → 7 → 5 → 4 → 3
   → 2: eight layers, each one full-adder deep. The layer count comes from
   a constant function, so `WIDTH` can be changed; the testbench also checks
a 64-bit instance.
3. **Final add.** The last sum and carry vectors go into the 32-bit CLA.

Each layer keeps its operands in its own array, declared inside its
generate block. A single shared array would look to the tools like a
combinational loop.

## Carry lookahead adder (`cla_block`, `cla_adder`, `cla_subtractor`)

Each bit forms a propagate `p = a ^ b` and a generate `g = a & b`. Inside
an 8-bit `cla_block`, every carry is a flat sum of products of `p`, `g`
and the block's carry-in, so no carry ripples inside the block. The
carry-out of each block is the carry-in of the next. The only serial path
is therefore four block carries long.

The subtractor is a second `cla_adder` instance. It feeds the adder `~b`
with a carry-in of 1. The add and subtract results exist at the same
time, which is why there are two adders rather than one shared one.

## Operation and handshake (`riscv_hybrid_core`)

Top-level ports:

- `clk`
- `rst`: synchronous, active high
- `start`
- `operand_a`, `operand_b`
- `add_result`, `sub_result`, `mul_result`, `and_result`
- `done`

Sequence of operation:

1. **Load.** While `start` is low, the PC is held at 0. At every clock
   edge, `operand_a` is written into x1 and `operand_b` into x2. `done` is
   held low.
2. **Run.** While `start` is high, one instruction executes per cycle,
   starting at address 0.
3. **Capture.** The result-capture stage watches the register write port.
   A write to x3, x4, x5 or x6 is copied to `add_result`, `sub_result`,
   `mul_result` or `and_result`.
4. **Done.** `done` rises at the clock edge after which all four registers
   have been written since `start` rose. It stays high until `start` falls.

The built-in program (`instruction_memory`, when `INIT_FILE` is empty) is:

    add x3, x1, x2
    sub x4, x1, x2
    mul x5, x1, x2
    and x6, x1, x2
    nop ...

With this program, `done` rises exactly 4 cycles after `start`. For
example, operands `0x1e` and `0x0a` give `0x28`, `0x14`, `0x12c` and
`0x0a`. The result outputs keep their values after `start` falls.

Parameters of the top:

| parameter | default | meaning |
|---|---|---|
| `IMEM_WORDS` | 64 | instruction memory depth, in words |
| `DMEM_WORDS` | 256 | data memory depth, in words |
| `IMEM_INIT` | `""` | hex file of 32-bit words for `$readmemh`; empty selects the built-in program |

Both memories are word-addressed and ignore address bits [1:0]. An address
wraps around at the memory size. Reads are combinational. The data memory
writes on the clock edge.

## Where this design makes its own choices

The following points are fixed by the architecture:

- the unit structure;
- the four 8-bit CLA blocks with cascaded carries;
- subtraction as a + ~b + 1;
- the 3:2 tree over 32 partial products with a final CLA;
- the 32 × 32 register file;
- operands entering through x1 and x2;
- results captured from x3..x6.

The following are choices made in this RTL:

- **Start/done protocol.** Described above.
- **ALU control code values.** Defined in `riscv_pkg`: AND 0000, OR 0001,
  ADD 0010, XOR 0011, SUB 0110, MUL 1000.
- **MUL encoding.** The standard RV32M encoding is used (funct7 =
  0000001).
- **ADDI, LW and SW.** These are added so that the ALU-source multiplexer
  and the data memory are used. A load write-back path is added for LW.
- **Memory depths.** 64 instruction words and 256 data words.
- **Reset.** Reset clears the PC, all registers and the captured results.
- **Order inside each carry-save layer.** Operands are taken in groups of
  three, in order.

**Accumulate.** The unit is described as a multiply-accumulate unit, but
only its multiplier is specified. No accumulator register or accumulate
instruction is built. Use `mul` followed by `add` instead.

**Not modelled.** The reported FPGA figures (189 MHz, about 500 LUTs, three
DSP blocks, power) are implementation results. They are not modelled or
checked here.

## Files

- `rtl/riscv_pkg.sv` contains the opcodes, ALU control codes, the decoded
  field and control structs, and the instruction encoders `enc_r`,
  `enc_i` and `enc_s`.
- Each other file in `rtl/` holds one module, named after the file.
- `tb/tb_<module>.sv` is the self-checking testbench of each module. Each
  one prints `TB_RESULT checks=N failures=M`.
- `tb/tb_riscv_hybrid_core.sv` runs the core on `tb/core_program.hex`.
  This program exercises every instruction, loads and stores, writes to
  x0 and an unsupported encoding. The testbench counts how often each of
  these occurs.
- `tb/tb_riscv_hybrid_core_full.sv` runs the core with all parameters at
  their defaults.

## Simulating

From the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl rtl/riscv_pkg.sv \
        tb/tb_riscv_hybrid_core.sv --top-module tb_riscv_hybrid_core -Mdir obj
    ./obj/Vtb_riscv_hybrid_core

Change the testbench name to run any other test. Lint a module with:

    verilator --lint-only -Wall -y rtl rtl/riscv_pkg.sv rtl/<module>.sv

`core_program.hex` is opened by the relative path `tb/core_program.hex`,
so run the simulation from the project root. To write a new program, use
the encoder functions in `riscv_pkg`, or write hex words directly, one per
line.
