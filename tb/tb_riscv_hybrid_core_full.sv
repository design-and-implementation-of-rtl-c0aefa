// Full-size test of riscv_hybrid_core with every parameter at its default,
// running the built-in program (add, sub, mul, and of x1, x2 into x3..x6).
// It loads the operands 0x1e and 0x0a and then random pairs, raises start,
// and checks that done rises four cycles later with the sum, difference,
// low product word and bitwise AND on the four result outputs.
module tb_riscv_hybrid_core_full;
  logic        clk = 0, rst, start, done;
  logic [31:0] operand_a, operand_b, add_result, sub_result, mul_result, and_result;
  int checks = 0, failures = 0;

  riscv_hybrid_core dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s = %h, expected %h (A=%h B=%h)", what, got, exp, operand_a, operand_b);
    end
  endtask

  task automatic run_pair(input logic [31:0] a, input logic [31:0] b);
    int lat;
    start = 0; operand_a = a; operand_b = b;
    repeat (2) @(posedge clk);
    #1;
    start = 1;
    lat = 0;
    while (!done && lat < 20) begin
      @(posedge clk); #1;
      lat++;
    end
    checks++;
    if (lat != 4) begin failures++; $display("FAIL done after %0d cycles, expected 4", lat); end
    expect_eq("add_result", add_result, a + b);
    expect_eq("sub_result", sub_result, a - b);
    expect_eq("mul_result", mul_result, a * b);
    expect_eq("and_result", and_result, a & b);
    repeat (10) @(posedge clk);
    #1;
    expect_eq("add_result held", add_result, a + b);
    start = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; operand_a = 0; operand_b = 0;
    repeat (2) @(posedge clk);
    #1; rst = 0;
    run_pair(32'h0000_001e, 32'h0000_000a);   // 0x28, 0x14, 0x12c, 0x0a
    for (int i = 0; i < 50; i++) run_pair($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
