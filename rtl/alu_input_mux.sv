// ALU input multiplexer (ALUSrc).
//
// Operand A of every arithmetic unit is register read port 1. Operand B is
// register read port 2 for R-type instructions and the sign-extended
// immediate when alu_src is set (ADDI, and the address of LW/SW).
// Combinational.
module alu_input_mux #(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] rdata1,
  input  logic [XLEN-1:0] rdata2,
  input  logic [XLEN-1:0] imm,
  input  logic            alu_src,
  output logic [XLEN-1:0] a,
  output logic [XLEN-1:0] b
);
  assign a = rdata1;
  assign b = alu_src ? imm : rdata2;
endmodule
