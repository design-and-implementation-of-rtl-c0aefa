// Self-checking test of register_file against a reference array: random
// writes (some to x0), operand loads into x1/x2, reads on both ports after
// every clock, and a reset that must clear everything.
module tb_register_file;
  logic        clk = 0, rst, we, load_ops;
  logic [4:0]  rs1, rs2, rd;
  logic [31:0] rdata1, rdata2, wdata, op_a, op_b;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  register_file dut (.*);

  always #5 clk = ~clk;

  task automatic read_all();
    for (int r = 0; r < 32; r++) begin
      rs1 = 5'(r); rs2 = 5'(31 - r);
      #1;
      checks += 2;
      if (rdata1 !== model[r])      begin failures++; $display("FAIL x%0d = %h, expected %h", r, rdata1, model[r]); end
      if (rdata2 !== model[31 - r]) begin failures++; $display("FAIL x%0d = %h, expected %h", 31 - r, rdata2, model[31 - r]); end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; load_ops = 0; rd = 0; wdata = 0; op_a = 0; op_b = 0; rs1 = 0; rs2 = 0;
    for (int r = 0; r < 32; r++) model[r] = 0;
    @(posedge clk); #1;
    rst = 0;
    read_all();
    for (int i = 0; i < 200; i++) begin
      we = 1'($urandom % 4 != 0);
      rd = 5'($urandom);
      wdata = $urandom;
      load_ops = 1'($urandom % 8 == 0);
      op_a = $urandom; op_b = $urandom;
      @(posedge clk); #1;
      if (we && rd != 0) model[rd] = wdata;
      if (load_ops) begin model[1] = op_a; model[2] = op_b; end
      we = 0; load_ops = 0;
      rs1 = 5'($urandom); rs2 = 5'($urandom);
      #1;
      checks += 2;
      if (rdata1 !== model[rs1]) begin failures++; $display("FAIL x%0d = %h, expected %h", rs1, rdata1, model[rs1]); end
      if (rdata2 !== model[rs2]) begin failures++; $display("FAIL x%0d = %h, expected %h", rs2, rdata2, model[rs2]); end
    end
    read_all();
    rst = 1; @(posedge clk); #1; rst = 0;
    for (int r = 0; r < 32; r++) model[r] = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
