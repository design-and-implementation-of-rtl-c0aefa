// Self-checking test of instruction_decoder: random instruction words with
// R, I (OP-IMM, LOAD) and S (STORE) opcodes, every field and the immediate
// compared with values extracted independently.
module tb_instruction_decoder;
  import riscv_pkg::*;
  logic [31:0] instr;
  decoded_t    f;
  int checks = 0, failures = 0;

  instruction_decoder dut (.instr(instr), .f(f));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0]  opcs [4] = '{7'b0110011, 7'b0010011, 7'b0000011, 7'b0100011};
    logic [31:0] exp_imm;
    for (int i = 0; i < 400; i++) begin
      instr = {$urandom} & 32'hffff_ff80 | 32'(opcs[i % 4]);
      #1;
      if (opcs[i % 4] == 7'b0100011) exp_imm = 32'($signed({instr[31:25], instr[11:7]}));
      else                           exp_imm = 32'($signed(instr[31:20]));
      checks += 7;
      if (f.opcode !== instr[6:0])   begin failures++; $display("FAIL opcode"); end
      if (f.rd     !== instr[11:7])  begin failures++; $display("FAIL rd"); end
      if (f.funct3 !== instr[14:12]) begin failures++; $display("FAIL funct3"); end
      if (f.rs1    !== instr[19:15]) begin failures++; $display("FAIL rs1"); end
      if (f.rs2    !== instr[24:20]) begin failures++; $display("FAIL rs2"); end
      if (f.funct7 !== instr[31:25]) begin failures++; $display("FAIL funct7"); end
      if (f.imm    !== exp_imm)      begin failures++; $display("FAIL imm %h: %h vs %h", instr, f.imm, exp_imm); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
