// Compact single-cycle RV32 core whose arithmetic is built on hybrid adders.
//
// Every instruction is fetched, decoded, executed and written back in one
// clock cycle. The ALU is four units working side by side on the same two
// operands: a 32-bit carry lookahead adder (four 8-bit lookahead blocks), a
// subtractor on the same CLA (a + ~b + 1), a multiplier that compresses its
// 32 partial products with a tree of 3:2 carry-save rows and adds the last
// two vectors with the CLA, and a bitwise AND/OR/XOR unit. The ALU control
// multiplexer picks one result, which goes to the register file, or serves as
// the data memory address for LW/SW.
//
// Operation: while start is low the PC is held at 0 and operand_a/operand_b
// are written into x1/x2 on every clock edge. When start goes high the core
// runs the program in the instruction memory from address 0, one instruction
// per cycle. Writes to x3, x4, x5 and x6 are copied to add_result,
// sub_result, mul_result and and_result; done goes high once all four have
// been written (four cycles after start with the built-in program, which is
// add/sub/mul/and of x1 and x2 into x3..x6). Taking start low again
// reloads the operands and clears done; the result outputs keep their
// values until overwritten. rst is synchronous and active high.
//
// The unit structure, the 32 x 32 register file, the operand path into x1/x2
// and the x3..x6 result capture follow the described core. The start/done
// protocol, ALU control codes, memory depths and the ADDI/LW/SW support that
// gives the ALU-source multiplexer and the data memory a use are this
// design's own choices. The control unit's illegal flag is not used here:
// an unsupported instruction already writes nothing.
module riscv_hybrid_core
  import riscv_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 64,
  parameter int unsigned DMEM_WORDS = 256,
  parameter string       IMEM_INIT  = ""
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic [CORE_XLEN-1:0] operand_a,
  input  logic [CORE_XLEN-1:0] operand_b,
  output logic [CORE_XLEN-1:0] add_result,
  output logic [CORE_XLEN-1:0] sub_result,
  output logic [CORE_XLEN-1:0] mul_result,
  output logic [CORE_XLEN-1:0] and_result,
  output logic            done
);
  logic [CORE_XLEN-1:0] pc;
  logic [31:0]     instr;
  decoded_t        dec;
  ctrl_t           ctrl;
  logic [CORE_XLEN-1:0] rdata1, rdata2, op_a, op_b;
  logic [CORE_XLEN-1:0] add_r, sub_r, mul_r, and_r, or_r, xor_r;
  logic [CORE_XLEN-1:0] alu_result, mem_rdata, wb_data;
  logic            reg_we, mem_we;
  logic            unused_add_cout;

  program_counter #(.XLEN(CORE_XLEN)) u_pc (
    .clk(clk), .rst(rst), .run(start), .pc(pc)
  );

  instruction_memory #(.WORDS(IMEM_WORDS), .INIT_FILE(IMEM_INIT)) u_imem (
    .addr(pc), .instr(instr)
  );

  instruction_decoder u_dec (.instr(instr), .f(dec));

  control_unit u_ctrl (.rst(rst), .f(dec), .ctrl(ctrl));

  assign reg_we = ctrl.reg_write && start;
  assign mem_we = ctrl.mem_write && start;

  register_file #(.XLEN(CORE_XLEN), .REGS(32)) u_rf (
    .clk(clk), .rst(rst),
    .rs1(dec.rs1), .rs2(dec.rs2), .rdata1(rdata1), .rdata2(rdata2),
    .we(reg_we), .rd(dec.rd), .wdata(wb_data),
    .load_ops(!start), .op_a(operand_a), .op_b(operand_b)
  );

  alu_input_mux #(.XLEN(CORE_XLEN)) u_alusrc (
    .rdata1(rdata1), .rdata2(rdata2), .imm(dec.imm), .alu_src(ctrl.alu_src),
    .a(op_a), .b(op_b)
  );

  cla_adder #(.WIDTH(CORE_XLEN)) u_add (
    .a(op_a), .b(op_b), .cin(1'b0), .sum(add_r), .cout(unused_add_cout)
  );

  cla_subtractor #(.WIDTH(CORE_XLEN)) u_sub (.a(op_a), .b(op_b), .diff(sub_r));

  hybrid_multiplier #(.WIDTH(CORE_XLEN)) u_mul (.a(op_a), .b(op_b), .product(mul_r));

  logic_unit #(.XLEN(CORE_XLEN)) u_logic (
    .a(op_a), .b(op_b), .and_o(and_r), .or_o(or_r), .xor_o(xor_r)
  );

  alu_control_mux #(.XLEN(CORE_XLEN)) u_alumux (
    .alu_ctrl(ctrl.alu_ctrl),
    .add_r(add_r), .sub_r(sub_r), .mul_r(mul_r),
    .and_r(and_r), .or_r(or_r), .xor_r(xor_r),
    .alu_result(alu_result)
  );

  data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .we(mem_we), .addr(alu_result), .wdata(rdata2), .rdata(mem_rdata)
  );

  assign wb_data = ctrl.mem_to_reg ? mem_rdata : alu_result;

  result_capture #(.XLEN(CORE_XLEN)) u_capture (
    .clk(clk), .rst(rst), .clear(!start),
    .we(reg_we), .rd(dec.rd), .wdata(wb_data),
    .add_result(add_result), .sub_result(sub_result),
    .mul_result(mul_result), .and_result(and_result),
    .done(done)
  );
endmodule
