// Instruction memory: read-only, word organised, combinational read.
//
// addr is a byte address; bits [log2(WORDS)+1:2] select the word, so the
// address wraps every WORDS*4 bytes. If INIT_FILE is empty the memory holds
// the built-in program below, otherwise it is loaded with $readmemh from
// INIT_FILE (one 32-bit hex word per line); words not listed read as NOP.
//
// Built-in program: with the two operands in x1 and x2 it computes
//   add x3, x1, x2 ; sub x4, x1, x2 ; mul x5, x1, x2 ; and x6, x1, x2
// and then runs NOPs. The destinations x3..x6 are those the result-capture
// stage watches. The depth of 64 words is this design's choice.
module instruction_memory
  import riscv_pkg::*;
#(
  parameter int unsigned WORDS     = 64,
  parameter string       INIT_FILE = ""
) (
  input  logic [31:0] addr,
  output logic [31:0] instr
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = NOP;
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, mem);
    end else begin
      mem[0] = enc_r(F7_BASE, 5'd2, 5'd1, F3_ADD, 5'd3);
      mem[1] = enc_r(F7_SUB,  5'd2, 5'd1, F3_ADD, 5'd4);
      mem[2] = enc_r(F7_MUL,  5'd2, 5'd1, F3_ADD, 5'd5);
      mem[3] = enc_r(F7_BASE, 5'd2, 5'd1, F3_AND, 5'd6);
    end
  end

  assign instr = mem[addr[AW+1:2]];
endmodule
