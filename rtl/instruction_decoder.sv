// Instruction decoder.
//
// Splits a 32-bit RISC-V instruction into its opcode, rd, funct3, rs1, rs2
// and funct7 fields at their standard bit positions, and builds the
// sign-extended immediate: the S-type layout {instr[31:25], instr[11:7]} for
// stores, the I-type layout instr[31:20] for everything else. Combinational.
module instruction_decoder
  import riscv_pkg::*;
(
  input  logic [31:0] instr,
  output decoded_t    f
);
  always_comb begin
    f.opcode = instr[6:0];
    f.rd     = instr[11:7];
    f.funct3 = instr[14:12];
    f.rs1    = instr[19:15];
    f.rs2    = instr[24:20];
    f.funct7 = instr[31:25];
    if (instr[6:0] == OPC_STORE) f.imm = {{20{instr[31]}}, instr[31:25], instr[11:7]};
    else                         f.imm = {{20{instr[31]}}, instr[31:20]};
  end
endmodule
