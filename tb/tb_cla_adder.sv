// Self-checking test of cla_adder: corner cases and random operands, every
// result compared with a 33-bit reference sum a + b + cin.
module tb_cla_adder;
  logic [31:0] a, b, sum;
  logic        cin, cout;
  int checks = 0, failures = 0;

  cla_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic tc);
    logic [32:0] ref_sum;
    a = ta; b = tb_; cin = tc;
    #1;
    ref_sum = {1'b0, ta} + {1'b0, tb_} + {32'b0, tc};
    checks++;
    if ({cout, sum} !== ref_sum) begin
      failures++;
      $display("FAIL %h + %h + %0d = %h_%h, expected %h", ta, tb_, tc, cout, sum, ref_sum);
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
    check(32'h0000_001e, 32'h0000_000a, 1'b0);   // 0x28
    check(32'hffff_ffff, 32'h0000_0001, 1'b0);   // carry through all four blocks
    check(32'hffff_ffff, 32'h0000_0000, 1'b1);
    check(32'h00ff_00ff, 32'h0000_0001, 1'b0);   // block carry into block 1 only
    check(32'h8000_0000, 32'h8000_0000, 1'b0);
    check(32'hffff_ffff, 32'hffff_ffff, 1'b1);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
