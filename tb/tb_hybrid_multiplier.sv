// Self-checking test of hybrid_multiplier at its default 32-bit width:
// corner cases and random operands, compared with the low 32 bits of the
// 64-bit reference product. A second, 64-bit instance checks that the
// layer count and the CLA follow the WIDTH parameter.
module tb_hybrid_multiplier;
  logic [31:0] a, b, product;
  int checks = 0, failures = 0;

  hybrid_multiplier dut (.a(a), .b(b), .product(product));

  logic [63:0] a64, b64, p64;
  hybrid_multiplier #(.WIDTH(64)) dut64 (.a(a64), .b(b64), .product(p64));

  task automatic check64(input logic [63:0] ta, input logic [63:0] tb_);
    logic [127:0] full;
    a64 = ta; b64 = tb_;
    #1;
    full = {64'b0, ta} * {64'b0, tb_};
    checks++;
    if (p64 !== full[63:0]) begin
      failures++;
      $display("FAIL 64-bit %h * %h = %h, expected %h", ta, tb_, p64, full[63:0]);
    end
  endtask

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    logic [63:0] full;
    a = ta; b = tb_;
    #1;
    full = {32'b0, ta} * {32'b0, tb_};
    checks++;
    if (product !== full[31:0]) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", ta, tb_, product, full[31:0]);
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
    check(32'h0000_001e, 32'h0000_000a);   // 0x12c
    check(32'hffff_ffff, 32'hffff_ffff);   // all 32 partial products present
    check(32'h0000_0000, 32'hffff_ffff);
    check(32'h0000_0001, 32'h8000_0000);
    check(32'hffff_ffff, 32'h0000_0002);   // -1 * 2
    check(32'h0001_0000, 32'h0001_0000);   // product overflows 32 bits
    for (int i = 0; i < 32; i++) check(32'hffff_ffff, 32'h1 << i);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom);
    for (int i = 0; i < 500; i++) check($urandom & 32'hffff, $urandom & 32'hffff);
    check64('1, '1);
    for (int i = 0; i < 500; i++) check64({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
