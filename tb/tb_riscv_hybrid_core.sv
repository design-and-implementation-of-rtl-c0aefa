// End-to-end test of riscv_hybrid_core running the program in
// tb/core_program.hex (operands A in x1, B in x2):
//    0 add  x3, x1, x2        9 lw   x10, 8(x0)
//    1 sub  x4, x1, x2       10 lw   x11, 12(x0)
//    2 mul  x5, x1, x2       11 add  x3, x10, x11
//    3 and  x6, x1, x2       12 sub  x4, x9, x0
//    4 or   x7, x1, x2       13 mul  x5, x10, x11
//    5 xor  x8, x1, x2       14 add  x0, x1, x2    (x0 must stay 0)
//    6 addi x9, x1, -5       15 or   x6, x0, x11
//    7 sw   x7, 8(x0)        16 sll  x3, x1, x2    (unsupported: no write)
//    8 sw   x8, 12(x0)       17.. nop
// For each operand pair (the first is 0x1e, 0x0a) the operands are loaded
// with start low, start is raised, and the test checks that done rises
// exactly four cycles later with A+B, A-B, A*B and A&B on the outputs, then
// after the rest of the program that the outputs hold (A|B)+(A^B), A-5,
// (A|B)*(A^B) and A^B. Every instruction class the core supports, the
// immediate ALU source, loads, stores, the x0 rule, an unsupported encoding
// and done are counted when they occur; one that never occurs is a failure.
module tb_riscv_hybrid_core;
  import riscv_pkg::*;
  logic        clk = 0, rst, start, done;
  logic [31:0] operand_a, operand_b, add_result, sub_result, mul_result, and_result;
  int checks = 0, failures = 0;
  int cnt_add, cnt_sub, cnt_mul, cnt_and, cnt_or, cnt_xor, cnt_imm, cnt_lw, cnt_sw;
  int cnt_x0, cnt_illegal, cnt_done;

  riscv_hybrid_core #(.IMEM_INIT("tb/core_program.hex")) dut (.*);

  always #5 clk = ~clk;

  // count the mechanisms as the core executes them
  always @(posedge clk) if (!rst && start) begin
    if (dut.ctrl.illegal) cnt_illegal++;
    else if (dut.dec.opcode == OPC_OP) begin
      case (dut.ctrl.alu_ctrl)
        ALU_ADD: cnt_add++;
        ALU_SUB: cnt_sub++;
        ALU_MUL: cnt_mul++;
        ALU_AND: cnt_and++;
        ALU_OR:  cnt_or++;
        ALU_XOR: cnt_xor++;
        default: ;
      endcase
      if (dut.dec.rd == 5'd0) cnt_x0++;
    end
    else if (dut.dec.opcode == OPC_OP_IMM && dut.dec.rd != 5'd0) cnt_imm++;
    else if (dut.dec.opcode == OPC_LOAD)  cnt_lw++;
    else if (dut.dec.opcode == OPC_STORE) cnt_sw++;
  end

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s = %h, expected %h (A=%h B=%h)", what, got, exp, operand_a, operand_b);
    end
  endtask

  task automatic run_pair(input logic [31:0] a, input logic [31:0] b);
    int lat;
    logic [31:0] o, x;
    start = 0; operand_a = a; operand_b = b;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (done !== 1'b0) begin failures++; $display("FAIL done not cleared"); end
    start = 1;
    lat = 0;
    while (!done && lat < 20) begin
      @(posedge clk); #1;
      lat++;
    end
    cnt_done += int'(done);
    checks++;
    if (lat != 4) begin failures++; $display("FAIL done after %0d cycles, expected 4", lat); end
    expect_eq("add_result", add_result, a + b);
    expect_eq("sub_result", sub_result, a - b);
    expect_eq("mul_result", mul_result, a * b);
    expect_eq("and_result", and_result, a & b);
    repeat (20) @(posedge clk);
    #1;
    o = a | b; x = a ^ b;
    expect_eq("add_result (lw/add)", add_result, o + x);
    expect_eq("sub_result (addi/sub)", sub_result, a - 32'd5);
    expect_eq("mul_result (lw/mul)", mul_result, o * x);
    expect_eq("and_result (x0/or)", and_result, x);
    checks++;
    if (done !== 1'b1) begin failures++; $display("FAIL done dropped"); end
    start = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {cnt_add, cnt_sub, cnt_mul, cnt_and, cnt_or, cnt_xor, cnt_imm, cnt_lw, cnt_sw} = '0;
    {cnt_x0, cnt_illegal, cnt_done} = '0;
    rst = 1; start = 0; operand_a = 0; operand_b = 0;
    repeat (2) @(posedge clk);
    #1; rst = 0;
    run_pair(32'h0000_001e, 32'h0000_000a);
    run_pair(32'hffff_ffff, 32'hffff_ffff);
    run_pair(32'h8000_0000, 32'h0000_0001);
    for (int i = 0; i < 40; i++) run_pair($urandom, $urandom);
    // reset in the middle of a run clears the outputs
    start = 1; @(posedge clk); #1;
    rst = 1; @(posedge clk); #1; rst = 0; start = 0;
    expect_eq("add_result after reset", add_result, 0);
    checks++;
    if (done !== 1'b0) begin failures++; $display("FAIL done after reset"); end

    $display("mechanisms: add=%0d sub=%0d mul=%0d and=%0d or=%0d xor=%0d addi=%0d lw=%0d sw=%0d x0-write=%0d unsupported=%0d done=%0d",
             cnt_add, cnt_sub, cnt_mul, cnt_and, cnt_or, cnt_xor, cnt_imm, cnt_lw, cnt_sw,
             cnt_x0, cnt_illegal, cnt_done);
    checks += 12;
    if (cnt_add == 0)     begin failures++; $display("FAIL no add"); end
    if (cnt_sub == 0)     begin failures++; $display("FAIL no sub"); end
    if (cnt_mul == 0)     begin failures++; $display("FAIL no mul"); end
    if (cnt_and == 0)     begin failures++; $display("FAIL no and"); end
    if (cnt_or == 0)      begin failures++; $display("FAIL no or"); end
    if (cnt_xor == 0)     begin failures++; $display("FAIL no xor"); end
    if (cnt_imm == 0)     begin failures++; $display("FAIL no addi"); end
    if (cnt_lw == 0)      begin failures++; $display("FAIL no lw"); end
    if (cnt_sw == 0)      begin failures++; $display("FAIL no sw"); end
    if (cnt_x0 == 0)      begin failures++; $display("FAIL no x0 write"); end
    if (cnt_illegal == 0) begin failures++; $display("FAIL no unsupported instruction"); end
    if (cnt_done == 0)    begin failures++; $display("FAIL done never rose"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
