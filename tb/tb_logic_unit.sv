// Self-checking test of logic_unit: AND, OR and XOR of random and corner
// operands compared with reference expressions.
module tb_logic_unit;
  logic [31:0] a, b, and_o, or_o, xor_o;
  int checks = 0, failures = 0;

  logic_unit dut (.a(a), .b(b), .and_o(and_o), .or_o(or_o), .xor_o(xor_o));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    a = ta; b = tb_;
    #1;
    checks += 3;
    if (and_o !== (ta & tb_)) begin failures++; $display("FAIL and %h %h", ta, tb_); end
    if (or_o  !== (ta | tb_)) begin failures++; $display("FAIL or %h %h", ta, tb_); end
    if (xor_o !== (ta ^ tb_)) begin failures++; $display("FAIL xor %h %h", ta, tb_); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0000_001e, 32'h0000_000a);   // and = 0x0a
    check(32'hffff_0000, 32'h0f0f_0f0f);
    for (int i = 0; i < 500; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
