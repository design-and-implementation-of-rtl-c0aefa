// Self-checking test of alu_input_mux: operand A must always be rdata1,
// operand B rdata2 with alu_src low and the immediate with alu_src high.
module tb_alu_input_mux;
  logic [31:0] rdata1, rdata2, imm, a, b;
  logic        alu_src;
  int checks = 0, failures = 0;

  alu_input_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      rdata1 = $urandom; rdata2 = $urandom; imm = $urandom; alu_src = 1'(i % 2);
      #1;
      checks += 2;
      if (a !== rdata1) begin failures++; $display("FAIL a"); end
      if (b !== (alu_src ? imm : rdata2)) begin failures++; $display("FAIL b src=%0d", alu_src); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
