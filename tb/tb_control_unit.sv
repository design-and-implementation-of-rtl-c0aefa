// Self-checking test of control_unit: a table of instructions with the
// control word each must produce, including unsupported encodings and the
// effect of reset.
module tb_control_unit;
  import riscv_pkg::*;
  logic     rst;
  decoded_t f;
  ctrl_t    ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.rst(rst), .f(f), .ctrl(ctrl));

  // expected: alu_ctrl, alu_src, reg_write, mem_write, mem_to_reg, illegal
  task automatic check(input logic [6:0] opc, input logic [2:0] f3, input logic [6:0] f7,
                       input logic r, input logic [3:0] e_alu, input logic e_src,
                       input logic e_rw, input logic e_mw, input logic e_m2r, input logic e_ill);
    f = '0;
    f.opcode = opc; f.funct3 = f3; f.funct7 = f7;
    f.rd = 5'($urandom); f.rs1 = 5'($urandom); f.rs2 = 5'($urandom); f.imm = $urandom;
    rst = r;
    #1;
    checks++;
    if (ctrl.illegal !== e_ill || ctrl.reg_write !== e_rw || ctrl.mem_write !== e_mw ||
        (!e_ill && (ctrl.alu_ctrl !== e_alu || ctrl.alu_src !== e_src || ctrl.mem_to_reg !== e_m2r))) begin
      failures++;
      $display("FAIL opc=%b f3=%b f7=%b rst=%0d: %p", opc, f3, f7, r, ctrl);
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
    repeat (5) begin
      check(7'b0110011, 3'b000, 7'b0000000, 0, 4'b0010, 0, 1, 0, 0, 0); // add
      check(7'b0110011, 3'b000, 7'b0100000, 0, 4'b0110, 0, 1, 0, 0, 0); // sub
      check(7'b0110011, 3'b000, 7'b0000001, 0, 4'b1000, 0, 1, 0, 0, 0); // mul
      check(7'b0110011, 3'b111, 7'b0000000, 0, 4'b0000, 0, 1, 0, 0, 0); // and
      check(7'b0110011, 3'b110, 7'b0000000, 0, 4'b0001, 0, 1, 0, 0, 0); // or
      check(7'b0110011, 3'b100, 7'b0000000, 0, 4'b0011, 0, 1, 0, 0, 0); // xor
      check(7'b0010011, 3'b000, 7'($urandom), 0, 4'b0010, 1, 1, 0, 0, 0); // addi
      check(7'b0000011, 3'b010, 7'($urandom), 0, 4'b0010, 1, 1, 0, 1, 0); // lw
      check(7'b0100011, 3'b010, 7'($urandom), 0, 4'b0010, 1, 0, 1, 0, 0); // sw
      check(7'b0110011, 3'b001, 7'b0000000, 0, 4'b0000, 0, 0, 0, 0, 1); // sll: not supported
      check(7'b0110011, 3'b111, 7'b0100000, 0, 4'b0000, 0, 0, 0, 0, 1);
      check(7'b0010011, 3'b111, 7'b0000000, 0, 4'b0000, 0, 0, 0, 0, 1); // andi: not supported
      check(7'b0000011, 3'b000, 7'b0000000, 0, 4'b0000, 0, 0, 0, 0, 1); // lb: not supported
      check(7'b1101111, 3'b000, 7'b0000000, 0, 4'b0000, 0, 0, 0, 0, 1); // jal: not supported
      check(7'b0110011, 3'b000, 7'b0000000, 1, 4'b0010, 0, 0, 0, 0, 0); // add under reset
      check(7'b0100011, 3'b010, 7'b0000000, 1, 4'b0010, 1, 0, 0, 0, 0); // sw under reset
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
