// Self-checking test of cla_subtractor: corner cases and random operands,
// compared with the two's-complement reference a - b.
module tb_cla_subtractor;
  logic [31:0] a, b, diff;
  int checks = 0, failures = 0;

  cla_subtractor dut (.a(a), .b(b), .diff(diff));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    a = ta; b = tb_;
    #1;
    checks++;
    if (diff !== ta - tb_) begin
      failures++;
      $display("FAIL %h - %h = %h, expected %h", ta, tb_, diff, ta - tb_);
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
    check(32'h0000_001e, 32'h0000_000a);   // 0x14
    check(32'h0000_000a, 32'h0000_001e);   // negative result
    check(32'h0000_0000, 32'h0000_0001);
    check(32'h8000_0000, 32'h0000_0001);
    check(32'h1234_5678, 32'h1234_5678);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
