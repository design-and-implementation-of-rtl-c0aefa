// Shared types and constants of the hybrid-adder RV32 core.
//
// The core runs a small RV32I subset: the R-type ADD, SUB, AND, OR, XOR and a
// multiply MUL, plus ADDI, LW and SW so that the ALU source multiplexer and
// the data memory have work to do. MUL uses the standard RV32M encoding
// (funct7 = 0000001, funct3 = 000); the encodings of the ALU control code are
// this design's own choice, as is the decoded-field and control-word layout.
package riscv_pkg;

  localparam int unsigned CORE_XLEN = 32;  // register and datapath width

  // RV32I major opcodes used by the core
  typedef enum logic [6:0] {
    OPC_OP     = 7'b0110011,  // R-type ALU
    OPC_OP_IMM = 7'b0010011,  // ADDI
    OPC_LOAD   = 7'b0000011,  // LW
    OPC_STORE  = 7'b0100011   // SW
  } opcode_e;

  // ALUControl[3:0]: which unit's result the ALU control multiplexer passes on
  typedef enum logic [3:0] {
    ALU_AND = 4'b0000,
    ALU_OR  = 4'b0001,
    ALU_ADD = 4'b0010,
    ALU_XOR = 4'b0011,
    ALU_SUB = 4'b0110,
    ALU_MUL = 4'b1000
  } alu_ctrl_e;

  localparam logic [6:0] F7_BASE = 7'b0000000;
  localparam logic [6:0] F7_SUB  = 7'b0100000;
  localparam logic [6:0] F7_MUL  = 7'b0000001;

  localparam logic [2:0] F3_ADD = 3'b000;  // also SUB, MUL, ADDI, LW/SW width
  localparam logic [2:0] F3_XOR = 3'b100;
  localparam logic [2:0] F3_OR  = 3'b110;
  localparam logic [2:0] F3_AND = 3'b111;
  localparam logic [2:0] F3_W   = 3'b010;  // LW / SW

  localparam logic [31:0] NOP = 32'h0000_0013;  // addi x0, x0, 0

  // Fields pulled out of an instruction word by the decoder
  typedef struct packed {
    logic [6:0]  opcode;
    logic [4:0]  rd;
    logic [2:0]  funct3;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [6:0]  funct7;
    logic [31:0] imm;     // sign-extended I or S immediate, by opcode
  } decoded_t;

  // Control word from the control unit
  typedef struct packed {
    alu_ctrl_e alu_ctrl;
    logic      alu_src;    // 1: ALU B input is the immediate
    logic      reg_write;
    logic      mem_write;
    logic      mem_to_reg; // 1: write back the data memory's read data
    logic      illegal;    // opcode/funct combination not supported
  } ctrl_t;

  // Instruction encoders, used for the built-in program and by testbenches
  function automatic logic [31:0] enc_r(input logic [6:0] f7, input logic [4:0] rs2,
                                        input logic [4:0] rs1, input logic [2:0] f3,
                                        input logic [4:0] rd);
    return {f7, rs2, rs1, f3, rd, OPC_OP};
  endfunction

  function automatic logic [31:0] enc_i(input logic [11:0] imm, input logic [4:0] rs1,
                                        input logic [2:0] f3, input logic [4:0] rd,
                                        input logic [6:0] opc);
    return {imm, rs1, f3, rd, opc};
  endfunction

  function automatic logic [31:0] enc_s(input logic [11:0] imm, input logic [4:0] rs2,
                                        input logic [4:0] rs1);
    return {imm[11:5], rs2, rs1, F3_W, imm[4:0], OPC_STORE};
  endfunction

endpackage
