// Self-checking test of instruction_memory with its built-in program: the
// first four words must be add/sub/mul/and x3..x6 from x1, x2 (encodings
// written out by hand below), the rest NOP, and the address must wrap.
module tb_instruction_memory;
  logic [31:0] addr, instr;
  int checks = 0, failures = 0;

  instruction_memory dut (.addr(addr), .instr(instr));

  task automatic check(input logic [31:0] ad, input logic [31:0] expected);
    addr = ad;
    #1;
    checks++;
    if (instr !== expected) begin
      failures++;
      $display("FAIL [%h] = %h, expected %h", ad, instr, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h00, 32'h002081b3);  // add x3, x1, x2
    check(32'h04, 32'h40208233);  // sub x4, x1, x2
    check(32'h08, 32'h022082b3);  // mul x5, x1, x2
    check(32'h0c, 32'h0020f333);  // and x6, x1, x2
    for (int i = 4; i < 64; i++) check(32'(i * 4), 32'h00000013);
    check(32'h100, 32'h002081b3); // wraps after 64 words
    check(32'h10c, 32'h0020f333);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
