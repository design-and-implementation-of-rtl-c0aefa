// Self-checking test of alu_control_mux: each unit input carries a distinct
// random value; every ALU control code, and an unused one, is applied and
// the selected output is compared with the expected input.
module tb_alu_control_mux;
  import riscv_pkg::*;
  alu_ctrl_e   alu_ctrl;
  logic [31:0] add_r, sub_r, mul_r, and_r, or_r, xor_r, alu_result;
  int checks = 0, failures = 0;

  alu_control_mux dut (.*);

  task automatic check(input alu_ctrl_e c, input logic [31:0] expected);
    alu_ctrl = c;
    #1;
    checks++;
    if (alu_result !== expected) begin
      failures++;
      $display("FAIL code %b: %h, expected %h", c, alu_result, expected);
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
    for (int i = 0; i < 50; i++) begin
      add_r = $urandom; sub_r = $urandom; mul_r = $urandom;
      and_r = $urandom; or_r = $urandom; xor_r = $urandom;
      check(ALU_ADD, add_r);
      check(ALU_SUB, sub_r);
      check(ALU_MUL, mul_r);
      check(ALU_AND, and_r);
      check(ALU_OR,  or_r);
      check(ALU_XOR, xor_r);
      check(alu_ctrl_e'(4'b1111), 32'h0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
