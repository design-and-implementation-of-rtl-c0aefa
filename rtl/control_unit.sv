// Control unit.
//
// From the decoded opcode, funct3 and funct7 it produces the 4-bit ALU
// control code, the ALU source select, and the register-write, memory-write
// and memory-to-register enables of the single-cycle datapath:
//   R-type ADD/SUB/MUL/AND/OR/XOR : ALU op, B = rs2, write rd
//   ADDI                          : add,    B = imm, write rd
//   LW                            : add,    B = imm, write rd from memory
//   SW                            : add,    B = imm, write memory
// Anything else is flagged illegal and writes nothing (it acts as a NOP).
// While rst is high no write is enabled. Combinational.
module control_unit
  import riscv_pkg::*;
(
  input  logic     rst,
  input  decoded_t f,
  output ctrl_t    ctrl
);
  always_comb begin
    ctrl            = '0;
    ctrl.alu_ctrl   = ALU_ADD;
    unique case (f.opcode)
      OPC_OP: begin
        ctrl.reg_write = 1'b1;
        unique case ({f.funct7, f.funct3})
          {F7_BASE, F3_ADD}: ctrl.alu_ctrl = ALU_ADD;
          {F7_SUB,  F3_ADD}: ctrl.alu_ctrl = ALU_SUB;
          {F7_MUL,  F3_ADD}: ctrl.alu_ctrl = ALU_MUL;
          {F7_BASE, F3_AND}: ctrl.alu_ctrl = ALU_AND;
          {F7_BASE, F3_OR }: ctrl.alu_ctrl = ALU_OR;
          {F7_BASE, F3_XOR}: ctrl.alu_ctrl = ALU_XOR;
          default: begin
            ctrl.reg_write = 1'b0;
            ctrl.illegal   = 1'b1;
          end
        endcase
      end
      OPC_OP_IMM: begin
        ctrl.alu_src   = 1'b1;
        ctrl.reg_write = (f.funct3 == F3_ADD);
        ctrl.illegal   = (f.funct3 != F3_ADD);
      end
      OPC_LOAD: begin
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_write  = (f.funct3 == F3_W);
        ctrl.illegal    = (f.funct3 != F3_W);
      end
      OPC_STORE: begin
        ctrl.alu_src   = 1'b1;
        ctrl.mem_write = (f.funct3 == F3_W);
        ctrl.illegal   = (f.funct3 != F3_W);
      end
      default: ctrl.illegal = 1'b1;
    endcase
    if (rst) begin
      ctrl.reg_write = 1'b0;
      ctrl.mem_write = 1'b0;
    end
  end
endmodule
