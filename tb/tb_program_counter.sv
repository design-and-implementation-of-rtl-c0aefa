// Self-checking test of program_counter: reset to 0, +4 per clock while run
// is high, held at 0 while run is low.
module tb_program_counter;
  logic        clk = 0, rst, run;
  logic [31:0] pc, expected;
  int checks = 0, failures = 0;

  program_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; run = 0;
    @(posedge clk); #1;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst = 0; run = 1; expected = 0;
    for (int i = 0; i < 40; i++) begin
      @(posedge clk); #1;
      expected += 4;
      checks++;
      if (pc !== expected) begin failures++; $display("FAIL pc=%h expected %h", pc, expected); end
    end
    run = 0;
    @(posedge clk); #1;
    checks++; if (pc !== 0) begin failures++; $display("FAIL hold pc=%h", pc); end
    @(posedge clk); #1;
    checks++; if (pc !== 0) begin failures++; $display("FAIL hold pc=%h", pc); end
    run = 1;
    @(posedge clk); #1;
    checks++; if (pc !== 4) begin failures++; $display("FAIL restart pc=%h", pc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
