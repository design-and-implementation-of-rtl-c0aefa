// ALU control multiplexer.
//
// The adder, subtractor, multiplier and logic unit all compute in parallel
// on the same operands; this multiplexer forwards the one selected by the
// 4-bit ALU control code as alu_result. Codes not in alu_ctrl_e give zero.
// Combinational. The code values are this design's own (see riscv_pkg).
module alu_control_mux
  import riscv_pkg::*;
#(
  parameter int unsigned XLEN = 32
) (
  input  alu_ctrl_e       alu_ctrl,
  input  logic [XLEN-1:0] add_r,
  input  logic [XLEN-1:0] sub_r,
  input  logic [XLEN-1:0] mul_r,
  input  logic [XLEN-1:0] and_r,
  input  logic [XLEN-1:0] or_r,
  input  logic [XLEN-1:0] xor_r,
  output logic [XLEN-1:0] alu_result
);
  always_comb begin
    unique case (alu_ctrl)
      ALU_ADD: alu_result = add_r;
      ALU_SUB: alu_result = sub_r;
      ALU_MUL: alu_result = mul_r;
      ALU_AND: alu_result = and_r;
      ALU_OR:  alu_result = or_r;
      ALU_XOR: alu_result = xor_r;
      default: alu_result = '0;
    endcase
  end
endmodule
